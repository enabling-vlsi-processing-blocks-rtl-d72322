// Constraint maker of the E8 sphere decoder (eq. (12) of the paper).
//
// E8 is built from Z8 with the (8,4,4) extended Hamming code (construction
// A).  The tree is searched from dimension 7 down to 0.  The code bits
// c7, c6, c5 and c3 are free; the others follow from the bits fixed higher
// in the tree:
//     c4 = c7^c6^c5,  c2 = c4^c3^c5,  c1 = c4^c3^c6,  c0 = c4^c3^c7.
// The code bit of a fixed dimension is recovered from its symbol as
// c_j = class(s_j) ^ cbar_j, where cbar is the coset leader of E8 in Z8 that
// this decoder serves.  For the level d being entered the unit reports
// whether its class is forced and the class c'_d = c_d ^ cbar_d it must have.
// With e8_en = 0 every level is free (plain Z8 decoding).  Combinational.
module constraint_maker
  import mimo_pkg::*;
(
  input  logic       e8_en,
  input  logic [7:0] cbar,       // coset leader of E8 in Z8
  input  sym_t       s [8],      // symbols; only those above level d are used
  input  logic [2:0] level,      // dimension d being entered
  output logic       forced,
  output logic       req_class
);

  logic [7:0] c;
  logic       cd;

  always_comb begin
    for (int j = 0; j < 8; j++) c[j] = pam_class(s[j]) ^ cbar[j];
    forced = 1'b0;
    cd     = 1'b0;
    case (level)
      3'd4: begin forced = 1'b1; cd = c[7] ^ c[6] ^ c[5]; end
      3'd2: begin forced = 1'b1; cd = (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[5]; end
      3'd1: begin forced = 1'b1; cd = (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[6]; end
      3'd0: begin forced = 1'b1; cd = (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[7]; end
      default: ;
    endcase
    forced    = forced & e8_en;
    req_class = cd ^ cbar[level];
  end

endmodule

// U_psi unit of the sphere decoder: first candidate of a tree level.
//
// For the level d being entered it forms
//     psi_d = y~_d - sum_{j>d} R_dj * s_j
// from the symbols already fixed at the upper levels (sel_mask marks them),
// and picks the PAM point nearest to psi_d / R_dd without a general divider:
// the quotient is sliced with the first log2(Q) steps of a restoring
// (successive-subtraction) divider.  The first step tests saturation at the
// outermost point, the remaining log2(Q)-1 steps produce the bits of
// floor(|psi|/(2 R_dd)), giving the odd magnitude 2q+1.  The remainder tells
// on which side of the chosen point psi/R lies; that side (dir) is where the
// second-nearest point is, i.e. the sign of the correction term Delta of
// eq. (6) of the paper.
//
// When the E8 constraint maker forces the sub-set class of this level
// (forced=1), a point of the wrong class is replaced by its neighbour on the
// psi side (or the other side at the edge of the constellation), which is
// the nearest allowed point; dir is re-derived for that point.
//
// DW is the data word width (default 16); the slicing needs no fraction
// point, since psi and R_dd share one format.
//
// Purely combinational.  R_dd must be positive (upper-triangular factor with
// positive diagonal).  psi saturates to the 16-bit word.  The slicing follows
// the paper; the saturation, the dir encoding and the class correction are
// this design's choices.
module u_psi_unit
  import mimo_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = W     // data word width
) (
  input  logic signed [DW-1:0] y_d,             // rotated received value y~_d
  input  logic signed [DW-1:0] r_row [N],       // row d of R
  input  sym_t         s     [N],       // current symbols
  input  logic [N-1:0] sel_mask,        // 1 for the j > d terms
  input  logic signed [DW-1:0] r_dd,            // R_dd (> 0)
  input  qam_e         mode,
  input  logic         forced,          // E8: class of this level is fixed
  input  logic         req_class,       // E8: required class when forced
  output logic signed [DW-1:0] psi,
  output sym_t         s_first,         // nearest (allowed) PAM point
  output logic         dir_up           // 1: next candidate lies above s_first
);

  localparam int unsigned AW = DW + SW + $clog2(N) + 1;

  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] psi_w;
  logic        [DW:0]    a;        // |psi|
  logic        [DW+4:0]  rem;
  logic        [DW+4:0]  b2;       // 2*R_dd
  logic        [1:0]    q;
  logic        [2:0]    smag;
  logic                 outward;
  logic [2:0]           qmax;
  logic [1:0]           nbits;
  sym_t                 s1;
  logic                 d1;
  logic signed [SW:0]   s_alt;     // one bit wider: s1 +- 2 may leave the 4-bit range
  logic signed [SW:0]   lim;

  always_comb begin
    acc = '0;
    for (int j = 0; j < N; j++)
      if (sel_mask[j]) acc += AW'(r_row[j]) * AW'(s[j]);
    psi_w = AW'(y_d) - acc;
    if (psi_w > AW'(signed'({1'b0, {(DW-1){1'b1}}})))
      psi = {1'b0, {(DW-1){1'b1}}};
    else if (psi_w < AW'(signed'({1'b1, {(DW-1){1'b0}}})))
      psi = {1'b1, {(DW-1){1'b0}}};
    else
      psi = psi_w[DW-1:0];
  end

  // log2(Q)-step successive-subtraction slicer.
  always_comb begin
    qmax  = pam_max(mode);
    nbits = pam_bits(mode);
    a     = psi[DW-1] ? (DW+1)'(-(DW+1)'(signed'(psi))) : (DW+1)'(psi);
    b2    = (DW+5)'({r_dd, 1'b0});
    rem   = (DW+5)'(a);
    q     = '0;
    // step 1: beyond the outermost point?  |psi| >= Q * R_dd
    if (rem >= ((DW+5)'(r_dd) << nbits)) begin
      smag    = qmax;
      outward = 1'b1;
    end else begin
      // steps 2..log2(Q): quotient bits of |psi| / (2 R_dd)
      for (int k = 1; k >= 0; k--) begin
        if (k <= int'(nbits) - 2) begin
          if (rem >= (b2 << k)) begin
            rem  = rem - (b2 << k);
            q[k] = 1'b1;
          end
        end
      end
      smag    = {q[1:0], 1'b1};
      outward = (rem >= (DW+5)'(r_dd));
    end
    s1 = psi[DW-1] ? -sym_t'({1'b0, smag}) : sym_t'({1'b0, smag});
    d1 = psi[DW-1] ? ~outward : outward;
  end

  // E8 class correction.
  always_comb begin
    s_first = s1;
    dir_up  = d1;
    s_alt   = d1 ? (SW+1)'(s1) + (SW+1)'(2) : (SW+1)'(s1) - (SW+1)'(2);
    lim     = {2'b00, qmax};
    if (forced && (pam_class(s1) != req_class)) begin
      if ((s_alt <= lim) && (s_alt >= -lim)) begin
        s_first = s_alt[SW-1:0];
        dir_up  = ~d1;
      end else begin
        s_first = d1 ? s1 - sym_t'(2) : s1 + sym_t'(2);
        dir_up  = d1;
      end
    end
  end

endmodule

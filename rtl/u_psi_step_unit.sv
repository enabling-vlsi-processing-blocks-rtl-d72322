// U_psi_Step unit: next candidate of a tree level (eq. (7) of the paper).
//
// The symbols of a level are visited in Schnorr-Euchner zig-zag order around
// the first choice: s, s+A, s-A, s+2A, ... (starting on the side given by the
// sign of the correction term), so that the distance |psi - R s| never
// decreases.  A is the spacing of the points that are allowed: 2 for a free
// level, 4 for a level whose E8 class is forced (every other PAM point).
// The level keeps the highest (hi) and lowest (lo) point visited so far and
// the side to try next; when one side has left the constellation the
// sequence continues on the other side only, and when both have, the level
// is exhausted (valid = 0).  This range handling is this design's choice;
// the paper gives the unbounded rule.
//
// Purely combinational; the sphere decoder evaluates it for the level above
// the current node while that node is being scored, so the alternative node
// is ready when the branch is pruned.
module u_psi_step_unit
  import mimo_pkg::*;
(
  input  sym_t  hi,
  input  sym_t  lo,
  input  logic  dir_up,      // side to try next
  input  logic  constrained, // 1: spacing 4, else 2
  input  qam_e  mode,
  output logic  valid,
  output sym_t  s_next,
  output sym_t  hi_next,
  output sym_t  lo_next,
  output logic  dir_next
);

  logic signed [SW:0] up, dn, lim;

  always_comb begin
    lim = (SW+1)'({2'b00, pam_max(mode)});
    up  = (SW+1)'(hi) + (constrained ? (SW+1)'(4) : (SW+1)'(2));
    dn  = (SW+1)'(lo) - (constrained ? (SW+1)'(4) : (SW+1)'(2));
    valid    = 1'b0;
    s_next   = hi;
    hi_next  = hi;
    lo_next  = lo;
    dir_next = dir_up;
    if (dir_up) begin
      if (up <= lim) begin
        valid = 1'b1; s_next = up[SW-1:0]; hi_next = up[SW-1:0]; dir_next = 1'b0;
      end else if (dn >= -lim) begin
        valid = 1'b1; s_next = dn[SW-1:0]; lo_next = dn[SW-1:0]; dir_next = 1'b0;
      end
    end else begin
      if (dn >= -lim) begin
        valid = 1'b1; s_next = dn[SW-1:0]; lo_next = dn[SW-1:0]; dir_next = 1'b1;
      end else if (up <= lim) begin
        valid = 1'b1; s_next = up[SW-1:0]; hi_next = up[SW-1:0]; dir_next = 1'b1;
      end
    end
  end

endmodule

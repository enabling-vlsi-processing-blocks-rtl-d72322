// Metric_Compute unit: partial Euclidean distance of one tree node (eq. (5)).
//
//     e   = psi_{l+1} - R_ll * s_l
//     T_l = T_{l+1} + e^2
//
// Words are DW bits with FW fraction bits and metrics TW bits with FW
// fraction bits (defaults 16, 9, 16 from mimo_pkg).
// e^2 is reduced to the metric format (FW fraction bits, truncated) before
// the addition and the sum saturates at the largest metric, so an overflowing
// branch is simply pruned.  Combinational; one node per clock in the sphere
// decoder.  The equation is the paper's; the truncation and saturation are
// this design's choice.
module metric_compute
  import mimo_pkg::*;
#(
  parameter int unsigned DW = W,      // data word width
  parameter int unsigned FW = FRAC,   // fraction bits of data and metric
  parameter int unsigned TW = MW      // metric width
) (
  input  logic [TW-1:0] t_parent,
  input  logic signed [DW-1:0] psi,
  input  logic signed [DW-1:0] r_ll,
  input  sym_t    s,
  output logic [TW-1:0] t_node
);

  localparam int unsigned EW = DW + SW + 1;

  logic signed [EW-1:0]     e;
  logic        [2*EW-1:0]   e2;
  logic        [2*EW-1:0]   sum;

  always_comb begin
    e   = EW'(psi) - EW'(r_ll) * EW'(s);
    e2  = (2*EW)'(e * e) >> FW;
    sum = e2 + (2*EW)'(t_parent);
    t_node = (sum > (2*EW)'({TW{1'b1}})) ? {TW{1'b1}} : sum[TW-1:0];
  end

endmodule

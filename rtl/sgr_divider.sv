// Two-cycle divider based on a first-order Taylor expansion (eq. (10)).
//
// The divisor Y (positive) is normalised so that its leading one is the top
// bit, then split into a high part Y_H (the leading one and the next LUT_AW
// bits) and a low part Y_L (the remaining bits):
//     X / Y = X (Y_H - Y_L) / (Y_H^2 - Y_L^2)  ~  X (Y_H - Y_L) / Y_H^2
// with relative error below 2^-14 for this split.  1/Y_H^2 comes from a
// 2^LUT_AW-entry table of LUT_W-bit words, entry(i) = round(2^24/(256+i)^2)
// (clamped to the word), built here by a constant function.  With the
// default 8-bit entries the table rounding dominates the error (< 0.8 %).
//
// Pipeline: cycle 1 normalises Y, reads the table and forms X (Y_H - Y_L);
// cycle 2 multiplies by the table word and rescales.  q is X/Y with
// OUT_FRAC fraction bits in QW bits, saturated; Y = 0 saturates too.  X and
// Y share one fixed-point format, which cancels.
//
// From the paper: the expansion, the 256 x 8-bit table, 16-bit operands and
// the two-cycle latency.  This design's choices: normalisation by leading-
// zero count, the table scaling, two multipliers (one per pipeline stage,
// so a division can start every clock), and the output format.
module sgr_divider #(
  parameter int unsigned W        = 16,
  parameter int unsigned LUT_AW   = 8,
  parameter int unsigned LUT_W    = 8,
  parameter int unsigned QW       = 24,
  parameter int unsigned OUT_FRAC = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x,
  input  logic        [W-1:0]  y,
  output logic signed [QW-1:0] q
);

  localparam int unsigned LN  = 1 << LUT_AW;
  localparam int unsigned HW  = LUT_AW + 1;          // Y_H incl. leading one
  localparam int unsigned LWB = W - HW;              // Y_L bits
  localparam int unsigned SH0 = 24 + 2*LWB;          // scale of X(Y_H-Y_L)*lut
  localparam int unsigned PW  = W + HW + LWB + 2;
  localparam int unsigned P2W = PW + LUT_W + 1;

  function automatic logic [LUT_W-1:0] lut_entry(int unsigned i);
    longint unsigned yh, v;
    yh = longint'((64'd1 << LUT_AW) + 64'(i)) << (8 - LUT_AW);
    v  = ((64'd1 << 24) + (yh * yh) / 2) / (yh * yh);
    if (v > (64'd1 << LUT_W) - 1) v = (64'd1 << LUT_W) - 1;
    return LUT_W'(v);
  endfunction

  logic [LUT_W-1:0] lut [LN];
  for (genvar i = 0; i < LN; i++) begin : g_lut
    assign lut[i] = lut_entry(i);
  end

  // ---- stage 1 ----
  logic [$clog2(W+1)-1:0] lz;
  logic [W-1:0]           yn;
  logic [HW-1:0]          yh;
  logic [LWB-1:0]         yl;
  logic signed [PW-1:0]   p1;

  always_comb begin
    lz = '0;
    for (int b = 0; b < W; b++)
      if (y[b]) lz = ($clog2(W+1))'(W - 1 - b);
    yn = y << lz;
    yh = yn[W-1 -: HW];
    yl = yn[LWB-1:0];
    p1 = PW'(x) * PW'(signed'({1'b0, yh, {LWB{1'b0}}}) - PW'(signed'({1'b0, yl})));
  end

  logic signed [PW-1:0]   p1_q;
  logic [LUT_W-1:0]       lut_q;
  logic [$clog2(W+1)-1:0] lz_q;
  logic                   zero_q;
  logic                   xneg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q <= '0; lut_q <= '0; lz_q <= '0; zero_q <= 1'b0; xneg_q <= 1'b0;
    end else begin
      p1_q   <= p1;
      lut_q  <= lut[yh[LUT_AW-1:0]];
      lz_q   <= lz;
      zero_q <= (y == '0);
      xneg_q <= x[W-1];
    end
  end

  // ---- stage 2 ----
  logic signed [P2W-1:0] p2;
  logic signed [P2W-1:0] qs;
  int                    sh;

  always_comb begin
    p2 = P2W'(p1_q) * P2W'(signed'({1'b0, lut_q}));
    // X/Y = p2 * 2^lz / 2^SH0 ; keep OUT_FRAC fraction bits
    sh = int'(SH0) - int'(lz_q) - int'(OUT_FRAC);
    qs = (sh >= 0) ? (p2 >>> sh) : (p2 <<< (-sh));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (zero_q)
      q <= xneg_q ? {1'b1, {(QW-1){1'b0}}} : {1'b0, {(QW-1){1'b1}}};
    else if (qs > P2W'(signed'({1'b0, {(QW-1){1'b1}}})))
      q <= {1'b0, {(QW-1){1'b1}}};
    else if (qs < P2W'(signed'({1'b1, {(QW-1){1'b0}}})))
      q <= {1'b1, {(QW-1){1'b0}}};
    else
      q <= qs[QW-1:0];
  end

endmodule

// Branch-metric computer for the Z8/E8 golden space-time trellis-coded
// modulation (GST-TCM).
//
// Z8 splits into 16 cosets of the Gosset lattice E8.  The Viterbi decoder
// of the outer trellis code needs, for every trellis stage, the distance of
// the received point to the closest point of each coset.  This unit runs
// NDEC sphere decoders in E8 mode side by side on the same R and y~, decoder
// k serving coset leader cbar(k).  The coset leaders are the 16 binary words
// supported on the parity positions 4, 2, 1, 0 of the extended Hamming code
// (cbar bits 0, 1, 2, 4 = bits 0, 1, 2, 3 of k): every word of F2^8 is a
// codeword plus exactly one of them.
//
// start launches all decoders; done pulses when the last one has finished;
// metric[k], s_hat[k] and found[k] then hold the branch metric, the closest
// point and whether one was inside radius_init.  The search time of each
// decoder depends on the data, so done follows the slowest.
//
// From the paper: one E8 decoder per coset, 16 per trellis stage, each the
// Z8 sphere decoder plus the constraint maker.  The coset-leader choice and
// the parallel arrangement with a common done are this design's choices.
module e8_branch_metric
  import mimo_pkg::*;
#(
  parameter int unsigned NDEC = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  qam_e    mode,
  input  metric_t radius_init,
  input  data_t   r [8][8],
  input  data_t   y [8],
  output logic    busy,
  output logic    done,
  output logic    found  [NDEC],
  output metric_t metric [NDEC],
  output sym_t    s_hat  [NDEC][8],
  output logic [15:0] nodes [NDEC],
  output logic [15:0] prunes [NDEC]
);

  logic [NDEC-1:0] done_d, fin_q;

  for (genvar k = 0; k < NDEC; k++) begin : g_dec
    localparam logic [3:0] K = 4'(k);
    sphere_decoder #(.N(8)) u_sd (
      .clk, .rst_n, .start, .mode, .e8_en(1'b1),
      .cbar({3'b000, K[3], 1'b0, K[2:0]}),
      .radius_init, .r, .y,
      .busy(), .done(done_d[k]), .found(found[k]), .s_hat(s_hat[k]),
      .metric(metric[k]), .nodes(nodes[k]), .pops(), .prunes(prunes[k]),
      .leaves(), .cycles());
  end

  // collect the individual done pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        fin_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if ((fin_q | done_d) == '1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          fin_q <= '0;
        end else begin
          fin_q <= fin_q | done_d;
        end
      end
    end
  end

endmodule

// MIMO-OFDM detector processing blocks for a 2x2 golden-code system.
//
// A 2x2 antenna system with a two-channel-use space-time block code gives,
// per OFDM sub-carrier, an 8-dimensional real lattice detection problem
// y = M s + z.  This top holds the three processing blocks of that receiver:
//   * qr  : sgr_qr_array, squared-Givens-rotation QR factorisation of the
//           8x8 lattice generator M, one matrix every 48 clocks, giving
//           U = diag(R)[R | Q^T];
//   * sd  : sphere_decoder, maximum-likelihood Z8 detection of one received
//           vector for 4-, 16- or 64-QAM chosen per vector;
//   * bmc : e8_branch_metric, 16 E8 sphere decoders producing the coset
//           branch metrics of the GST-TCM outer trellis code.
// The blocks stand side by side with their own ports.  The step from U to
// the sphere decoder's inputs (R from U by the square roots of its diagonal,
// and y~ = Q^T y) and the Viterbi decoder that uses the branch metrics are
// outside this design; their signals are the ports.
module mimo_detector_top
  import mimo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ---- QR factorisation ----
  input  logic        qr_in_valid,
  output logic        qr_in_ready,
  input  data_t       qr_in_row [8],
  output logic        qr_out_valid,
  output data_t       qr_out_u [8][16],
  output logic [15:0] qr_init_count,
  output logic [15:0] qr_rot_count,
  // ---- Z8 sphere decoder ----
  input  logic        sd_start,
  input  qam_e        sd_mode,
  input  metric_t     sd_radius,
  input  data_t       sd_r [8][8],
  input  data_t       sd_y [8],
  output logic        sd_busy,
  output logic        sd_done,
  output logic        sd_found,
  output sym_t        sd_s_hat [8],
  output metric_t     sd_metric,
  output logic [15:0] sd_nodes,
  output logic [15:0] sd_pops,
  output logic [15:0] sd_prunes,
  output logic [15:0] sd_leaves,
  output logic [15:0] sd_cycles,
  // ---- E8 branch metrics ----
  input  logic        bm_start,
  input  qam_e        bm_mode,
  input  metric_t     bm_radius,
  input  data_t       bm_r [8][8],
  input  data_t       bm_y [8],
  output logic        bm_busy,
  output logic        bm_done,
  output logic        bm_found  [16],
  output metric_t     bm_metric [16],
  output sym_t        bm_s_hat  [16][8],
  output logic [15:0] bm_nodes  [16],
  output logic [15:0] bm_prunes [16]
);

  sgr_qr_array #(.N(8)) u_qr (
    .clk, .rst_n, .in_valid(qr_in_valid), .in_ready(qr_in_ready), .in_row(qr_in_row),
    .out_valid(qr_out_valid), .out_u(qr_out_u), .init_count(qr_init_count),
    .rot_count(qr_rot_count));

  sphere_decoder #(.N(8)) u_sd (
    .clk, .rst_n, .start(sd_start), .mode(sd_mode), .e8_en(1'b0), .cbar(8'h00),
    .radius_init(sd_radius), .r(sd_r), .y(sd_y), .busy(sd_busy), .done(sd_done),
    .found(sd_found), .s_hat(sd_s_hat), .metric(sd_metric), .nodes(sd_nodes),
    .pops(sd_pops), .prunes(sd_prunes), .leaves(sd_leaves), .cycles(sd_cycles));

  e8_branch_metric #(.NDEC(16)) u_bmc (
    .clk, .rst_n, .start(bm_start), .mode(bm_mode), .radius_init(bm_radius),
    .r(bm_r), .y(bm_y), .busy(bm_busy), .done(bm_done), .found(bm_found),
    .metric(bm_metric), .s_hat(bm_s_hat), .nodes(bm_nodes), .prunes(bm_prunes));

endmodule

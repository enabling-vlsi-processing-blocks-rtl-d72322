// Triangular systolic array for QR factorisation by squared Givens
// rotations (SGR), 8x8 real matrices by default.
//
// The N rows of the input matrix M enter one per step (three clocks), each
// extended on the fly by the matching row of the identity, i.e. the array
// triangularises [M | I].  Array row i (sgr_row_stage) keeps row i of
//     U = diag(R) [R | Q^T]        (M = Q R, R with positive diagonal)
// so the Q factor is formed in the internal registers while M streams in,
// and no square root is ever taken.  Every row leaves array row i with its
// element i cancelled and a new weight w, and goes down to row i+1; row 0
// starts with w = 1.  Array row i holds one diagonal PE and 2N-1-i internal
// PEs, all sharing one divider per row.
//
// Handshake: a matrix row is taken when in_valid and in_ready are both high
// (in_ready is high in the first clock of a step).  After the N-th row the
// array refuses rows for N steps, so a new matrix can start every 2N steps
// = 48 clocks, the rate given in the paper (4.63 M matrices/s at 223 MHz).
// out_valid is high for one clock, 3(2N-1) = 45 clocks after the first row
// of a matrix was taken; out_u must be captured then (it holds until the
// next matrix starts overwriting it).  out_u[i][j] is 0 for j < i.
//
// Data are 7.9 fixed point: U and M/I fit for matrices with entries of
// magnitude up to about 1 (diag(U) = squared column norms < 64).  The row
// pipeline (one row per array row per step, the PEs of a row working in
// parallel) and the handshake are this design's choices; the paper gives
// the PE operations, the 3-clock PE latency and the 48-clock period.
module sgr_qr_array
  import mimo_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t in_row [N],
  output logic  out_valid,
  output data_t out_u [N][2*N],
  output logic [15:0] init_count,   // boundary-mode updates so far
  output logic [15:0] rot_count     // internal-mode (rotation) updates so far
);

  localparam int unsigned M2 = 2*N;
  localparam data_t ONE = data_t'(1 << FRAC);

  logic [1:0]  phase;
  logic [3:0]  row_cnt;
  logic [4:0]  hold;
  logic        take;

  assign in_ready = (phase == 2'd0) && (hold == '0);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      row_cnt <= '0;
      hold    <= '0;
    end else begin
      phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      if (phase == 2'd0 && hold != '0) hold <= hold - 5'd1;
      if (take) begin
        if (row_cnt == 4'(N-1)) begin
          row_cnt <= '0;
          hold    <= 5'(N);
        end else begin
          row_cnt <= row_cnt + 4'd1;
        end
      end
    end
  end

  // augmented input row [M_r | e_r]
  data_t v0 [M2];
  always_comb
    for (int j = 0; j < M2; j++)
      v0[j] = (j < N) ? in_row[j] : ((j - N == int'(row_cnt)) ? ONE : '0);

  logic        sv   [N+1];
  logic [3:0]  st   [N+1];
  data_t       sd   [N+1][M2];
  logic [15:0] sw   [N+1];
  logic [N-1:0] init_p, rot_p;

  assign sv[0] = take;
  assign st[0] = row_cnt;
  assign sd[0] = v0;
  assign sw[0] = 16'h8000;   // w = 1.0 in 1.15

  for (genvar i = 0; i < N; i++) begin : g_row
    sgr_row_stage #(.N(N), .IDX(i)) u_row (
      .clk, .rst_n, .phase,
      .in_valid(sv[i]), .in_tag(st[i]), .in_v(sd[i]), .in_w(sw[i]),
      .out_valid(sv[i+1]), .out_tag(st[i+1]), .out_v(sd[i+1]), .out_w(sw[i+1]),
      .u(out_u[i]), .init_done(init_p[i]), .rot_done(rot_p[i]));
  end

  assign out_valid = init_p[N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_count <= '0;
      rot_count  <= '0;
    end else begin
      init_count <= init_count + 16'($countones(init_p));
      rot_count  <= rot_count + 16'($countones(rot_p));
    end
  end

endmodule

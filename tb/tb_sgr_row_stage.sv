// Self-checking testbench of sgr_row_stage (row 0 of a 2x2 array, so rows
// of 4 words: two matrix and two identity columns).
//
// Each trial sends a row with tag 0 (initialisation: u = w v_0 v) and then
// a row with tag 1 and a random weight (rotation), and checks the stored
// row, the outgoing row and the outgoing weight against the SGR updates of
// eq. (9) evaluated here in floating point:
//   u' = u + w v_0 v,  v' = v - (v_0/u_0) u,  w' = w u_0 / (u_0 + w v_0^2).
// Timing: the outgoing row must be flagged in the clock after phase 2 of
// its step and the new weight one clock later.
module tb_sgr_row_stage;
  import mimo_pkg::*;

  localparam int N = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [1:0]  phase;
  logic        in_valid, out_valid, init_done, rot_done;
  logic [3:0]  in_tag, out_tag;
  data_t       in_v [2*N];
  data_t       out_v [2*N];
  data_t       u [2*N];
  logic [15:0] in_w, out_w;

  sgr_row_stage #(.N(N), .IDX(0)) dut (.*);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 2'd0;
    else        phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;

  function automatic real fx(data_t d);
    return real'(d) / 512.0;
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp > tol) || (exp - got > tol)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  // send one row during the next step
  task automatic send(real v [2*N], real w, int tag);
    while (phase != 2'd0) @(negedge clk);
    in_valid = 1'b1;
    in_tag   = 4'(tag);
    for (int j = 0; j < 2*N; j++) in_v[j] = data_t'($rtoi(v[j] * 512.0));
    @(negedge clk);
    in_valid = 1'b0;
    in_w = 16'($rtoi(w * 32768.0));
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    real a [2*N];
    real b [2*N];
    real ua [2*N];
    real w1;
    in_valid = 1'b0; in_tag = '0; in_w = '0;
    for (int j = 0; j < 2*N; j++) in_v[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int j = 0; j < 2*N; j++) begin
        a[j] = real'(int'($urandom_range(800)) - 400) / 512.0;
        b[j] = real'(int'($urandom_range(800)) - 400) / 512.0;
        a[j] = $itor($rtoi(a[j] * 512.0)) / 512.0;
        b[j] = $itor($rtoi(b[j] * 512.0)) / 512.0;
      end
      if (a[0] > -0.4 && a[0] < 0.4) a[0] = (a[0] < 0) ? a[0] - 0.4 : a[0] + 0.4;
      w1 = real'(8192 + $urandom_range(24000)) / 32768.0;
      send(a, 1.0, 0);
      // now phase 0: initialisation result stored
      checks++;
      if (!init_done) begin failures++; $display("FAIL init_done missing"); end
      for (int j = 0; j < 2*N; j++) begin
        ua[j] = a[0] * a[j];
        check("init u", fx(u[j]), ua[j], 0.01);
      end
      send(b, w1, 1);
      // phase 0 of the next step: the outgoing row is flagged
      checks++;
      if (!out_valid || !rot_done || out_tag != 4'd1) begin failures++; $display("FAIL rotation flags"); end
      for (int j = 0; j < 2*N; j++) begin
        check("rot u", fx(u[j]), ua[j] + w1 * b[0] * b[j], 0.01 + 0.01 * ((ua[j] < 0) ? -ua[j] : ua[j]));
        if (j == 0) check("v'0", fx(out_v[j]), 0.0, 0.0);
        else check("v'", fx(out_v[j]), b[j] - (b[0] / ua[0]) * ua[j], 0.02);
      end
      @(negedge clk);
      check("w'", real'(out_w) / 32768.0, w1 * ua[0] / (ua[0] + w1 * b[0] * b[0]), 0.01);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

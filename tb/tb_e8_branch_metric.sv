// Self-checking testbench of e8_branch_metric.
//
// Random upper-triangular channels and noisy received vectors in 4-QAM and
// 16-QAM.  For each of the 16 cosets of E8 in Z8 the returned metric must
// equal the minimum found by an exhaustive search over the points of that
// coset, the returned point must reach it and lie in that coset.  The coset
// of a point is its syndrome under the extended Hamming code (parity bits
// 4, 2, 1, 0 recomputed from bits 7, 6, 5, 3).
module tb_e8_branch_metric;
  import mimo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    start, busy, done;
  qam_e    mode;
  metric_t radius_init;
  data_t   r [8][8];
  data_t   y [8];
  logic    found [16];
  metric_t metric [16];
  sym_t    s_hat [16][8];
  logic [15:0] nodes [16];
  logic [15:0] prunes [16];

  e8_branch_metric #(.NDEC(16)) dut (.*);

  longint rr [8][8];
  longint yy [8];

  function automatic longint ref_metric(int s[8]);
    longint t, psi, e;
    t = 0;
    for (int l = 7; l >= 0; l--) begin
      psi = yy[l];
      for (int j = l+1; j < 8; j++) psi -= rr[l][j] * s[j];
      e = psi - rr[l][l] * s[l];
      t += (e * e) >>> 9;
      if (t > 65535) t = 65535;
    end
    return t;
  endfunction

  function automatic int coset_of(int s[8]);
    logic [7:0] c;
    logic [3:0] k;
    logic p;
    for (int j = 0; j < 8; j++) c[j] = 1'(((s[j] - 1) >>> 1) & 1);
    p = c[7] ^ c[6] ^ c[5];
    k[3] = c[4] ^ p;
    k[2] = c[2] ^ p ^ c[3] ^ c[5];
    k[1] = c[1] ^ p ^ c[3] ^ c[6];
    k[0] = c[0] ^ p ^ c[3] ^ c[7];
    return int'(k);
  endfunction

  task automatic trial(qam_e m, int q, int noise);
    longint best [16];
    int s[8];
    int total, cyc;
    for (int i = 0; i < 8; i++) s[i] = 2*int'($urandom_range(q-1)) - (q-1);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        rr[i][j] = (j < i) ? 0 : (i == j) ? 256 + $urandom_range(512) : longint'($urandom_range(256)) - 128;
    for (int i = 0; i < 8; i++) begin
      yy[i] = longint'($urandom_range(2*noise)) - longint'(noise);
      for (int j = i; j < 8; j++) yy[i] += rr[i][j] * s[j];
    end
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      y[i] = data_t'(yy[i]);
      for (int j = 0; j < 8; j++) r[i][j] = data_t'(rr[i][j]);
    end
    mode = m; radius_init = '1; start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100000) begin @(posedge clk); cyc++; end
    #1;
    total = 1;
    for (int i = 0; i < 8; i++) total *= q;
    for (int k = 0; k < 16; k++) best[k] = 65536;
    for (int k = 0; k < total; k++) begin
      int v, cs;
      longint t;
      v = k;
      for (int i = 0; i < 8; i++) begin s[i] = 2*(v % q) - (q-1); v = v / q; end
      t = ref_metric(s);
      cs = coset_of(s);
      if (t < best[cs]) best[cs] = t;
    end
    for (int k = 0; k < 16; k++) begin
      for (int i = 0; i < 8; i++) s[i] = int'(s_hat[k][i]);
      checks++;
      if (!found[k] || longint'(metric[k]) != best[k] || ref_metric(s) != best[k] || coset_of(s) != k) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d coset %0d metric %0d ref %0d", q, k, metric[k], best[k]);
      end
    end
  endtask

  initial begin
    start = 1'b0; mode = QAM4; radius_init = '1;
    for (int i = 0; i < 8; i++) begin y[i] = '0; for (int j = 0; j < 8; j++) r[i][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) trial(QAM4, 2, 500);
    for (int t = 0; t < 3; t++) trial(QAM16, 4, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// End-to-end testbench of mimo_detector_top at its default sizes.
//
//   * QR: three 8x8 matrices streamed back to back; each U = diag(R)[R|Q^T]
//     compared with a floating-point Gram-Schmidt reference (0.03 + 3 %);
//     first-row-to-result latency 45 clocks, matrix period 48 clocks.
//   * Z8 sphere decoder: 4-QAM and 16-QAM vectors with noise checked against
//     an exhaustive ML search; noiseless 64-QAM vectors must return the
//     transmitted point with metric 0; rate one node per clock.
//   * E8 branch metrics: for 16-QAM vectors, each of the 16 coset metrics
//     compared with an exhaustive search over that coset.
// Mechanisms counted (each must occur): QR initialisation and rotation
// modes, QR input hold-off, modulation switch, pruning, radius update,
// exhausted-level pop, E8 forced-class levels (coset points found).
module tb_mimo_detector_top;
  import mimo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        qr_in_valid, qr_in_ready, qr_out_valid;
  data_t       qr_in_row [8];
  data_t       qr_out_u [8][16];
  logic [15:0] qr_init_count, qr_rot_count;
  logic        sd_start, sd_busy, sd_done, sd_found;
  qam_e        sd_mode;
  metric_t     sd_radius, sd_metric;
  data_t       sd_r [8][8];
  data_t       sd_y [8];
  sym_t        sd_s_hat [8];
  logic [15:0] sd_nodes, sd_pops, sd_prunes, sd_leaves, sd_cycles;
  logic        bm_start, bm_busy, bm_done;
  qam_e        bm_mode;
  metric_t     bm_radius;
  data_t       bm_r [8][8];
  data_t       bm_y [8];
  logic        bm_found [16];
  metric_t     bm_metric [16];
  sym_t        bm_s_hat [16][8];
  logic [15:0] bm_nodes [16];
  logic [15:0] bm_prunes [16];

  mimo_detector_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_hold = 0, n_switch = 0, n_prune = 0, n_leafupd = 0, n_pop = 0, n_e8 = 0;

  // ================= QR part =================
  localparam int NMAT = 3;
  real mat [NMAT][8][8];
  int  start_cyc [NMAT];
  int  out_mat = 0;

  task automatic qr_reference(int m, output real uref [8][16]);
    real a [8][8];
    real q [8][8];
    real r [8][8];
    real nrm;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin a[i][j] = mat[m][i][j]; r[i][j] = 0.0; end
    for (int k = 0; k < 8; k++) begin
      nrm = 0.0;
      for (int i = 0; i < 8; i++) nrm += a[i][k] * a[i][k];
      nrm = $sqrt(nrm);
      r[k][k] = nrm;
      for (int i = 0; i < 8; i++) q[i][k] = a[i][k] / nrm;
      for (int j = k + 1; j < 8; j++) begin
        real d;
        d = 0.0;
        for (int i = 0; i < 8; i++) d += q[i][k] * a[i][j];
        r[k][j] = d;
        for (int i = 0; i < 8; i++) a[i][j] -= d * q[i][k];
      end
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 16; j++)
        uref[i][j] = (j < 8) ? r[i][i] * r[i][j] : r[i][i] * q[j-8][i];
  endtask

  always @(posedge clk) begin
    if (qr_in_valid && !qr_in_ready) n_hold++;
    if (qr_out_valid && out_mat < NMAT) begin
      real uref [8][16];
      qr_reference(out_mat, uref);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 16; j++) begin
          real got, err, mag;
          got = real'(qr_out_u[i][j]) / 512.0;
          err = got - uref[i][j];
          if (err < 0) err = -err;
          mag = (uref[i][j] < 0) ? -uref[i][j] : uref[i][j];
          checks++;
          if (err > 0.03 + 0.03 * mag) begin
            failures++;
            if (failures < 10) $display("FAIL QR mat %0d U[%0d][%0d] %f ref %f", out_mat, i, j, got, uref[i][j]);
          end
        end
      checks++;
      if (cyc - start_cyc[out_mat] != 45) begin failures++; $display("FAIL QR latency"); end
      out_mat <= out_mat + 1;
    end
  end

  task automatic run_qr();
    for (int m = 0; m < NMAT; m++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          mat[m][i][j] = (i == j) ? ($urandom_range(1) ? 1.0 : -1.0) * real'(384 + int'($urandom_range(128))) / 512.0
                                  : real'(int'($urandom_range(360)) - 180) / 512.0;
    for (int m = 0; m < NMAT; m++) begin
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        qr_in_valid = 1'b1;
        for (int j = 0; j < 8; j++) qr_in_row[j] = data_t'(int'($rtoi(mat[m][i][j] * 512.0)));
        @(posedge clk);
        while (!qr_in_ready) @(posedge clk);
        if (i == 0) start_cyc[m] = cyc;
      end
    end
    @(negedge clk) qr_in_valid = 1'b0;
    while (out_mat < NMAT) @(posedge clk);
    checks++;
    if (start_cyc[1] - start_cyc[0] != 48 || start_cyc[2] - start_cyc[1] != 48) begin
      failures++; $display("FAIL QR period");
    end
    @(posedge clk);
    checks++;
    if (qr_init_count != 16'(NMAT * 8) || qr_rot_count != 16'(NMAT * 28)) begin
      failures++; $display("FAIL QR mode counts");
    end
  endtask

  // ================= detection reference =================
  longint rr [8][8];
  longint yy [8];
  int     s_tx [8];

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

  // coset index of a point: syndrome bits of c' on positions 4,2,1,0
  function automatic int coset_of(int s[8]);
    logic [7:0] c;
    logic [3:0] k;
    for (int j = 0; j < 8; j++) c[j] = 1'(((s[j] - 1) >>> 1) & 1);
    k[3] = c[4] ^ (c[7] ^ c[6] ^ c[5]);
    k[2] = c[2] ^ (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[5];
    k[1] = c[1] ^ (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[6];
    k[0] = c[0] ^ (c[7] ^ c[6] ^ c[5]) ^ c[3] ^ c[7];
    return int'(k);
  endfunction

  // exhaustive search; best[16] per coset, best[16] overall
  task automatic ref_search(int q, output longint best [17]);
    int s[8];
    int total;
    longint t;
    total = 1;
    for (int i = 0; i < 8; i++) total *= q;
    for (int k = 0; k < 17; k++) best[k] = 65536;
    for (int k = 0; k < total; k++) begin
      int v, cs;
      v = k;
      for (int i = 0; i < 8; i++) begin s[i] = 2*(v % q) - (q-1); v = v / q; end
      t = ref_metric(s);
      cs = coset_of(s);
      if (t < best[cs]) best[cs] = t;
      if (t < best[16]) best[16] = t;
    end
  endtask

  task automatic make_problem(int q, int noise);
    for (int i = 0; i < 8; i++) s_tx[i] = 2*int'($urandom_range(q-1)) - (q-1);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        if (j < i) rr[i][j] = 0;
        else if (i == j) rr[i][j] = 256 + $urandom_range(512);
        else rr[i][j] = longint'($urandom_range(256)) - 128;
      end
    for (int i = 0; i < 8; i++) begin
      yy[i] = 0;
      for (int j = i; j < 8; j++) yy[i] += rr[i][j] * s_tx[j];
      if (noise > 0) yy[i] += longint'($urandom_range(2*noise)) - longint'(noise);
    end
  endtask

  qam_e last_mode = QAM4;

  task automatic run_sd(qam_e m, int q, int noise);
    longint best [17];
    int s[8];
    make_problem(q, noise);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      sd_y[i] = data_t'(yy[i]);
      for (int j = 0; j < 8; j++) sd_r[i][j] = data_t'(rr[i][j]);
    end
    if (m != last_mode) n_switch++;
    last_mode = m;
    sd_mode = m; sd_radius = '1; sd_start = 1'b1;
    @(negedge clk) sd_start = 1'b0;
    while (!sd_done) @(posedge clk);
    #1;
    n_prune += sd_prunes; n_pop += sd_pops;
    if (sd_leaves > 1) n_leafupd++;
    for (int i = 0; i < 8; i++) s[i] = int'(sd_s_hat[i]);
    checks += 2;
    if (sd_cycles != sd_nodes + sd_pops + 16'd2) begin failures++; $display("FAIL SD rate"); end
    if (noise == 0) begin
      if (sd_metric != 0 || s != s_tx) begin failures++; $display("FAIL SD noiseless q=%0d", q); end
    end else begin
      ref_search(q, best);
      if (longint'(sd_metric) != best[16] || ref_metric(s) != best[16] || !sd_found) begin
        failures++; $display("FAIL SD q=%0d metric %0d ref %0d", q, sd_metric, best[16]);
      end
    end
  endtask

  task automatic run_bm(int noise);
    longint best [17];
    int s[8];
    make_problem(4, noise);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      bm_y[i] = data_t'(yy[i]);
      for (int j = 0; j < 8; j++) bm_r[i][j] = data_t'(rr[i][j]);
    end
    bm_mode = QAM16; bm_radius = '1; bm_start = 1'b1;
    @(negedge clk) bm_start = 1'b0;
    while (!bm_done) @(posedge clk);
    #1;
    ref_search(4, best);
    for (int k = 0; k < 16; k++) begin
      for (int i = 0; i < 8; i++) s[i] = int'(bm_s_hat[k][i]);
      checks++;
      if (!bm_found[k] || longint'(bm_metric[k]) != best[k] || ref_metric(s) != best[k] || coset_of(s) != k) begin
        failures++; $display("FAIL BM coset %0d metric %0d ref %0d", k, bm_metric[k], best[k]);
      end else n_e8++;
    end
  endtask

  initial begin
    qr_in_valid = 1'b0; sd_start = 1'b0; bm_start = 1'b0;
    sd_mode = QAM4; bm_mode = QAM16; sd_radius = '1; bm_radius = '1;
    for (int j = 0; j < 8; j++) begin
      qr_in_row[j] = '0; sd_y[j] = '0; bm_y[j] = '0;
      for (int i = 0; i < 8; i++) begin sd_r[i][j] = '0; bm_r[i][j] = '0; end
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    run_qr();
    for (int t = 0; t < 3; t++) run_sd(QAM4, 2, 700);
    for (int t = 0; t < 3; t++) run_sd(QAM16, 4, 500);
    for (int t = 0; t < 2; t++) run_sd(QAM64, 8, 0);
    run_sd(QAM16, 4, 500);
    for (int t = 0; t < 2; t++) run_bm(400);
    $display("mechanisms: hold=%0d switch=%0d prune=%0d radius_update=%0d pop=%0d e8_coset=%0d QR init=%0d rot=%0d",
             n_hold, n_switch, n_prune, n_leafupd, n_pop, n_e8, qr_init_count, qr_rot_count);
    checks++;
    if (n_hold == 0 || n_switch == 0 || n_prune == 0 || n_leafupd == 0 || n_pop == 0 || n_e8 == 0 ||
        qr_init_count == 0 || qr_rot_count == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

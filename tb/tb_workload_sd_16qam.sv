// Workload testbench: Z8 sphere decoding of 16-QAM golden-code vectors at
// an SNR of 20 dB, on sphere_decoder at its default size (N = 8, 16-bit
// words).
//
// Each trial draws an 8x8 real channel matrix M with independent Gaussian
// entries (variance 1/2), 8 random 4-PAM symbols and Gaussian noise whose
// power is 1/100 of the mean received signal power per dimension. M is
// factorised here in floating point (modified Gram-Schmidt, R with positive
// diagonal), y~ = Q^T y is formed, and R and y~ are rounded to the 7.9
// format. The decoder's metric must equal an exhaustive ML search over all
// 4^8 points, using the same fixed-point arithmetic.
//
// The clocks per vector (start to done, plus one clock to load the next
// job) are summed and printed next to the figure of 22.9 clocks per vector
// that a throughput of 148.6 Mbit/s at 213 MHz (16 bits per vector) implies.
// That average depends on the channel statistics; the i.i.d. Gaussian
// channel here only stands in for the golden-code channel matrix, so the
// average is reported, not checked. Checked: every decision is ML, and the
// decoder spends one clock per scored node (cycles = nodes + pops + 2).
module tb_workload_sd_16qam;
  import mimo_pkg::*;

  localparam int NTRIAL = 200;
  localparam real SNR_DB = 20.0;
  localparam real BUDGET = 213.0e6 * 16.0 / 148.6e6;   // clocks per vector

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    start;
  qam_e    mode;
  metric_t rad;
  data_t   r [8][8];
  data_t   y [8];
  logic    busy, done, found;
  sym_t    s_hat [8];
  metric_t metric;
  logic [15:0] nodes, pops, prunes, leaves, cycles;

  sphere_decoder dut (
    .clk, .rst_n, .start, .mode, .e8_en(1'b0), .cbar(8'h00),
    .radius_init(rad), .r, .y, .busy, .done, .found, .s_hat, .metric,
    .nodes, .pops, .prunes, .leaves, .cycles);

  longint rr [8][8];
  longint yy [8];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

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

  function automatic longint ref_search();
    int s[8];
    longint best, t;
    best = 65536;
    for (int k = 0; k < 65536; k++) begin
      for (int i = 0; i < 8; i++) s[i] = 2 * ((k >> (2*i)) & 3) - 3;
      t = ref_metric(s);
      if (t < best) best = t;
    end
    return best;
  endfunction

  // channel, QR and rounding to 7.9
  task automatic make_problem();
    real m [8][8];
    real q [8][8];
    real rf [8][8];
    real yr [8];
    real yt [8];
    real a [8][8];
    real nrm, d, sigma;
    int  s [8];
    sigma = $sqrt(8.0 * 0.5 * 5.0 / (10.0 ** (SNR_DB / 10.0)));
    for (int i = 0; i < 8; i++) s[i] = 2 * int'($urandom_range(3)) - 3;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        m[i][j] = gauss() * 0.7071067811865476;
        a[i][j] = m[i][j];
        rf[i][j] = 0.0;
      end
    for (int i = 0; i < 8; i++) begin
      yr[i] = sigma * gauss();
      for (int j = 0; j < 8; j++) yr[i] += m[i][j] * real'(s[j]);
    end
    for (int k = 0; k < 8; k++) begin
      nrm = 0.0;
      for (int i = 0; i < 8; i++) nrm += a[i][k] * a[i][k];
      nrm = $sqrt(nrm);
      rf[k][k] = nrm;
      for (int i = 0; i < 8; i++) q[i][k] = a[i][k] / nrm;
      for (int j = k + 1; j < 8; j++) begin
        d = 0.0;
        for (int i = 0; i < 8; i++) d += q[i][k] * a[i][j];
        rf[k][j] = d;
        for (int i = 0; i < 8; i++) a[i][j] -= d * q[i][k];
      end
    end
    for (int k = 0; k < 8; k++) begin
      yt[k] = 0.0;
      for (int i = 0; i < 8; i++) yt[k] += q[i][k] * yr[i];
    end
    for (int i = 0; i < 8; i++) begin
      yy[i] = longint'($rtoi(yt[i] * 512.0 + ((yt[i] < 0.0) ? -0.5 : 0.5)));
      if (yy[i] > 32767) yy[i] = 32767;
      if (yy[i] < -32768) yy[i] = -32768;
      for (int j = 0; j < 8; j++)
        rr[i][j] = (j < i) ? 0 : longint'($rtoi(rf[i][j] * 512.0 + ((rf[i][j] < 0.0) ? -0.5 : 0.5)));
    end
  endtask

  longint total_clocks = 0;
  longint total_nodes = 0;
  int     max_clocks = 0;

  initial begin
    start = 1'b0; mode = QAM16; rad = '1;
    for (int i = 0; i < 8; i++) begin y[i] = '0; for (int j = 0; j < 8; j++) r[i][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTRIAL; t++) begin
      longint best;
      int c0;
      make_problem();
      for (int i = 0; i < 8; i++) begin
        y[i] = data_t'(yy[i]);
        for (int j = 0; j < 8; j++) r[i][j] = data_t'(rr[i][j]);
      end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      c0 = 0;
      while (!done && c0 < 100000) begin @(posedge clk); c0++; end
      #1;
      best = ref_search();
      checks += 2;
      if (!found || longint'(metric) != best) begin
        failures++; $display("FAIL trial %0d metric %0d ref %0d", t, metric, best);
      end
      if (cycles != nodes + pops + 16'd2) begin
        failures++; $display("FAIL trial %0d cycles %0d nodes %0d pops %0d", t, cycles, nodes, pops);
      end
      total_clocks += longint'(cycles) + 1;
      total_nodes  += longint'(nodes);
      if (int'(cycles) + 1 > max_clocks) max_clocks = int'(cycles) + 1;
    end
    $display("16-QAM, SNR %0.1f dB, %0d vectors: %0.2f clocks/vector on average (max %0d), %0.2f nodes/vector; budget %0.2f",
             SNR_DB, NTRIAL, real'(total_clocks) / NTRIAL, max_clocks, real'(total_nodes) / NTRIAL, BUDGET);
    $display("throughput at 213 MHz: %0.1f Mbit/s", 213.0 * 16.0 * NTRIAL / real'(total_clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench of sphere_decoder.
//
// Random upper-triangular channels with positive diagonal and received
// vectors y = R s + noise are decoded and compared with an exhaustive
// maximum-likelihood search done here with plain integer arithmetic:
//   * N = 8, 4-QAM and 16-QAM, Z8 (all 2^8 / 4^8 points);
//   * N = 8, 16-QAM, E8 mode with each coset leader tried over the points
//     whose code bits form an extended Hamming codeword;
//   * N = 4, 64-QAM (8^4 points) on a second, smaller instance that also
//     uses a wider datapath (20-bit words with 12 fraction bits, 20-bit
//     metrics), with channels scaled to that format;
//   * a radius too small for any point (found must stay 0).
// The decoded metric must equal the exhaustive minimum and the decoded
// point must reach it.  Rate: the decoder scores one node per clock, so
// cycles must equal nodes + idle pops + 2 (start and first-candidate clocks).
module tb_sphere_decoder;
  import mimo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------- DUT N = 8 -----------------
  logic    start8;
  qam_e    mode8;
  logic    e8_en;
  logic [7:0] cbar;
  metric_t rad8;
  data_t   r8 [8][8];
  data_t   y8 [8];
  logic    busy8, done8, found8;
  sym_t    sh8 [8];
  metric_t met8;
  logic [15:0] nodes8, pops8, prunes8, leaves8, cyc8;

  sphere_decoder #(.N(8)) dut8 (
    .clk, .rst_n, .start(start8), .mode(mode8), .e8_en(e8_en), .cbar(cbar),
    .radius_init(rad8), .r(r8), .y(y8), .busy(busy8), .done(done8), .found(found8),
    .s_hat(sh8), .metric(met8), .nodes(nodes8), .pops(pops8), .prunes(prunes8),
    .leaves(leaves8), .cycles(cyc8));

  // ---------------- DUT N = 4 -----------------
  localparam int DW4 = 20;
  localparam int FW4 = 12;
  localparam int TW4 = 20;
  logic    start4;
  qam_e    mode4;
  logic [TW4-1:0] rad4;
  logic signed [DW4-1:0] r4 [4][4];
  logic signed [DW4-1:0] y4 [4];
  logic    busy4, done4, found4;
  sym_t    sh4 [4];
  logic [TW4-1:0] met4;
  logic [15:0] nodes4, pops4, prunes4, leaves4, cyc4;

  sphere_decoder #(.N(4), .DW(DW4), .FW(FW4), .TW(TW4)) dut4 (
    .clk, .rst_n, .start(start4), .mode(mode4), .e8_en(1'b0), .cbar(8'h00),
    .radius_init(rad4), .r(r4), .y(y4), .busy(busy4), .done(done4), .found(found4),
    .s_hat(sh4), .metric(met4), .nodes(nodes4), .pops(pops4), .prunes(prunes4),
    .leaves(leaves4), .cycles(cyc4));

  // ---------------- reference -----------------
  longint rr [8][8];
  longint yy [8];

  function automatic longint ref_metric(int n, int s[8], int fw = 9, longint sat = 65535);
    longint t, psi, e;
    t = 0;
    for (int l = n-1; l >= 0; l--) begin
      psi = yy[l];
      for (int j = l+1; j < n; j++) psi -= rr[l][j] * s[j];
      e = psi - rr[l][l] * s[l];
      t += (e * e) >>> fw;
      if (t > sat) t = sat;
    end
    return t;
  endfunction

  function automatic bit in_e8_coset(int s[8], logic [7:0] cb);
    logic [7:0] c;
    for (int j = 0; j < 8; j++) c[j] = 1'(((s[j] - 1) >>> 1) & 1) ^ cb[j];
    return (c[4] == (c[7]^c[6]^c[5])) && (c[2] == (c[4]^c[3]^c[5])) &&
           (c[1] == (c[4]^c[3]^c[6])) && (c[0] == (c[4]^c[3]^c[7]));
  endfunction

  // exhaustive search; returns min metric and number of admissible points
  function automatic longint ref_search(int n, int q, bit e8, logic [7:0] cb, output int cnt,
                                        input int fw = 9, input longint sat = 65535);
    int s[8];
    int idx[8];
    longint best, t;
    int total;
    total = 1;
    for (int i = 0; i < n; i++) total *= q;
    best = sat + 1;
    cnt = 0;
    for (int k = 0; k < total; k++) begin
      int v;
      v = k;
      for (int i = 0; i < 8; i++) begin
        if (i < n) begin idx[i] = v % q; v = v / q; s[i] = 2*idx[i] - (q-1); end
        else s[i] = 1;
      end
      if (!e8 || in_e8_coset(s, cb)) begin
        cnt++;
        t = ref_metric(n, s, fw, sat);
        if (t < best) best = t;
      end
    end
    return best;
  endfunction

  function automatic int rnd_sym(int q);
    return 2*int'($urandom_range(q-1)) - (q-1);
  endfunction

  // random channel and received vector in 7.9 fixed point
  // sh scales the channel and noise by 2^sh (for more fraction bits)
  task automatic make_problem(int n, int q, int noise, int sh = 0);
    int s[8];
    for (int i = 0; i < 8; i++) s[i] = rnd_sym(q);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        if (i >= n || j >= n || j < i) rr[i][j] = 0;
        else if (i == j) rr[i][j] = (256 + $urandom_range(512)) << sh;           // 0.5 .. 1.5
        else rr[i][j] = (longint'($urandom_range(256)) - 128) <<< sh;            // -0.25 .. 0.25
      end
    for (int i = 0; i < 8; i++) begin
      yy[i] = 0;
      if (i < n) begin
        for (int j = i; j < n; j++) yy[i] += rr[i][j] * s[j];
        yy[i] += (longint'($urandom_range(2*noise)) - noise) <<< sh;
      end
    end
  endtask

  task automatic run8(qam_e m, int q, bit e8, logic [7:0] cb, metric_t rad);
    int cnt, s[8];
    longint best, got;
    int c0;
    for (int i = 0; i < 8; i++) begin
      y8[i] = data_t'(yy[i]);
      for (int j = 0; j < 8; j++) r8[i][j] = data_t'(rr[i][j]);
    end
    mode8 = m; e8_en = e8; cbar = cb; rad8 = rad;
    @(negedge clk) start8 = 1'b1;
    @(negedge clk) start8 = 1'b0;
    c0 = 0;
    while (!done8 && c0 < 200000) begin @(posedge clk); c0++; end
    #1;
    best = ref_search(8, q, e8, cb, cnt);
    if (rad != '1 && best >= longint'(rad)) begin
      checks++;
      if (found8) begin failures++; $display("FAIL found with small radius"); end
    end else begin
      for (int i = 0; i < 8; i++) s[i] = int'(sh8[i]);
      got = ref_metric(8, s);
      checks += 3;
      if (!found8) begin failures++; $display("FAIL not found q=%0d e8=%0d", q, e8); end
      if (longint'(met8) != best) begin failures++; $display("FAIL metric %0d ref %0d q=%0d e8=%0d cb=%h", met8, best, q, e8, cb); end
      if (got != best || (e8 && !in_e8_coset(s, cb))) begin failures++; $display("FAIL point metric %0d ref %0d", got, best); end
    end
    checks++;
    if (cyc8 != nodes8 + pops8 + 16'd2) begin failures++; $display("FAIL cycles %0d nodes %0d pops %0d", cyc8, nodes8, pops8); end
    if (e8) begin
      checks++;
      if (cnt != ((q == 4) ? 4096 : 16)) begin failures++; $display("FAIL E8 coset size %0d", cnt); end
    end
  endtask

  task automatic run4(int noise);
    int cnt, s[8];
    longint best, got;
    int c0;
    make_problem(4, 8, noise, FW4 - 9);
    for (int i = 0; i < 4; i++) begin
      y4[i] = DW4'(yy[i]);
      for (int j = 0; j < 4; j++) r4[i][j] = DW4'(rr[i][j]);
    end
    mode4 = QAM64; rad4 = '1;
    @(negedge clk) start4 = 1'b1;
    @(negedge clk) start4 = 1'b0;
    c0 = 0;
    while (!done4 && c0 < 200000) begin @(posedge clk); c0++; end
    #1;
    best = ref_search(4, 8, 1'b0, 8'h00, cnt, FW4, (longint'(1) << TW4) - 1);
    for (int i = 0; i < 8; i++) s[i] = (i < 4) ? int'(sh4[i]) : 1;
    got = ref_metric(4, s, FW4, (longint'(1) << TW4) - 1);
    checks += 3;
    if (!found4) begin failures++; $display("FAIL 64QAM not found"); end
    if (longint'(met4) != best) begin failures++; $display("FAIL 64QAM metric %0d ref %0d", met4, best); end
    if (got != best) begin failures++; $display("FAIL 64QAM point"); end
    checks++;
    if (cyc4 != nodes4 + pops4 + 16'd2) begin failures++; $display("FAIL 64QAM cycles"); end
  endtask

  int tot_prunes = 0, tot_leaves = 0, tot_pops = 0;

  initial begin
    start8 = 0; start4 = 0; mode8 = QAM4; mode4 = QAM64; e8_en = 0; cbar = 0;
    rad8 = '1; rad4 = '1;
    for (int i = 0; i < 8; i++) begin y8[i] = '0; for (int j = 0; j < 8; j++) r8[i][j] = '0; end
    for (int i = 0; i < 4; i++) begin y4[i] = '0; for (int j = 0; j < 4; j++) r4[i][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      make_problem(8, 2, 700); run8(QAM4, 2, 1'b0, 8'h00, '1);
      tot_prunes += prunes8; tot_leaves += leaves8; tot_pops += pops8;
    end
    for (int t = 0; t < 6; t++) begin
      make_problem(8, 4, 500); run8(QAM16, 4, 1'b0, 8'h00, '1);
      tot_prunes += prunes8; tot_leaves += leaves8; tot_pops += pops8;
    end
    for (int t = 0; t < 6; t++) begin
      logic [7:0] cb;
      cb = {3'b000, 1'($urandom), 1'b0, 3'($urandom)};   // bits 4,2,1,0
      make_problem(8, 4, 300); run8(QAM16, 4, 1'b1, cb, '1);
      tot_prunes += prunes8; tot_leaves += leaves8; tot_pops += pops8;
    end
    make_problem(8, 2, 50); run8(QAM4, 2, 1'b1, 8'h17, '1);
    make_problem(8, 4, 300); run8(QAM16, 4, 1'b0, 8'h00, 16'd1);
    for (int t = 0; t < 6; t++) begin run4(500); tot_pops += pops4; end
    checks++;
    if (tot_prunes == 0 || tot_leaves <= 18 || tot_pops == 0) begin
      failures++; $display("FAIL mechanisms prunes=%0d leaves=%0d pops=%0d", tot_prunes, tot_leaves, tot_pops);
    end
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

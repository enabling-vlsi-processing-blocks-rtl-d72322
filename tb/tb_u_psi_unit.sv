// Self-checking testbench of u_psi_unit.
//
// Random rows of R, symbols and masks: psi must equal y~_d minus the masked
// sum (saturated to 16 bits).  The first candidate must be a PAM point (of
// the required class when forced) with the smallest |psi - R_dd s| among
// all allowed points, and dir must point to the side whose next allowed
// point is at least as close as the one on the other side.  All distances
// are exact integers.  Covers 4-, 16- and 64-QAM, forced and free levels.
module tb_u_psi_unit;
  import mimo_pkg::*;

  localparam int N = 8;

  int checks = 0;
  int failures = 0;

  data_t        y_d, r_dd, psi;
  data_t        r_row [N];
  sym_t         s [N];
  logic [N-1:0] sel_mask;
  qam_e         mode;
  logic         forced, req_class, dir_up;
  sym_t         s_first;

  u_psi_unit #(.N(N)) dut (.*);

  function automatic longint pdist(longint p, longint r, int sv);
    longint d;
    d = p - r * sv;
    return (d < 0) ? -d : d;
  endfunction

  function automatic bit cls(int sv);
    return 1'(((sv - 1) >>> 1) & 1);
  endfunction

  initial begin
    for (int k = 0; k < 6000; k++) begin
      longint acc, p;
      int q, qm, sf, step;
      bit ok_min;
      mode = qam_e'(k % 3);
      q  = (mode == QAM4) ? 2 : (mode == QAM16) ? 4 : 8;
      qm = q - 1;
      y_d  = data_t'(int'($urandom_range(8000)) - 4000);
      r_dd = data_t'(64 + $urandom_range(900));
      for (int j = 0; j < N; j++) begin
        r_row[j] = data_t'(int'($urandom_range(600)) - 300);
        s[j]     = sym_t'(2 * int'($urandom_range(q-1)) - qm);
      end
      sel_mask  = N'($urandom);
      forced    = (k % 4 == 1);
      req_class = 1'($urandom);
      #1;
      acc = longint'(y_d);
      for (int j = 0; j < N; j++) if (sel_mask[j]) acc -= longint'(r_row[j]) * longint'(s[j]);
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      checks++;
      if (longint'(psi) != acc) begin failures++; $display("FAIL psi %0d exp %0d", psi, acc); end
      p  = longint'(psi);
      sf = int'(s_first);
      step = forced ? 4 : 2;
      checks++;
      ok_min = (sf >= -qm) && (sf <= qm) && (sf % 2 != 0) && (!forced || cls(sf) == req_class);
      for (int v = -qm; v <= qm; v += 2)
        if ((!forced || cls(v) == req_class) && pdist(p, r_dd, v) < pdist(p, r_dd, sf)) ok_min = 0;
      if (!ok_min) begin failures++; if (failures < 10) $display("FAIL first %0d psi %0d r %0d q %0d forced %0d", sf, psi, r_dd, q, forced); end
      // direction: the next point on the dir side is not farther than the other side
      begin
        int up, dn;
        up = sf + step; dn = sf - step;
        if (up <= qm && dn >= -qm) begin
          checks++;
          if (dir_up ? (pdist(p, r_dd, up) > pdist(p, r_dd, dn)) : (pdist(p, r_dd, dn) > pdist(p, r_dd, up))) begin
            failures++; if (failures < 10) $display("FAIL dir psi %0d r %0d s %0d", psi, r_dd, sf);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench of u_psi_step_unit.
//
// For random real targets x (= psi/R), starting from the nearest allowed
// point and the side of x, the unit is iterated until it reports no further
// candidate.  The sequence must visit every allowed point (all PAM points,
// or every other one when constrained) exactly once, in order of
// non-decreasing distance |x - s| (Schnorr-Euchner order of eq. (7)).
module tb_u_psi_step_unit;
  import mimo_pkg::*;

  int checks = 0;
  int failures = 0;

  sym_t hi, lo, s_next, hi_next, lo_next;
  logic dir_up, constrained, valid, dir_next;
  qam_e mode;

  u_psi_step_unit dut (.*);

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int q, qm, a, off, s1, cnt, expected, prev_s, sn;
      real x, prevd, d;
      bit seen [int];
      mode = qam_e'(k % 3);
      q  = (mode == QAM4) ? 2 : (mode == QAM16) ? 4 : 8;
      qm = q - 1;
      constrained = (k % 2 == 1) && (q > 2);
      a  = constrained ? 4 : 2;
      off = $urandom_range(1);           // which class when constrained
      x  = (real'($urandom_range(20000)) / 1000.0) - 10.0;
      // nearest allowed point
      s1 = 999;
      for (int v = -qm; v <= qm; v += 2) begin
        bit allowed;
        allowed = !constrained || ((((v - 1) >>> 1) & 1) == off);
        if (allowed && (s1 == 999 || (x - real'(v)) * (x - real'(v)) < (x - real'(s1)) * (x - real'(s1)))) s1 = v;
      end
      expected = constrained ? q / 2 : q;
      hi = sym_t'(s1); lo = sym_t'(s1); dir_up = (x > real'(s1));
      seen.delete();
      seen[s1] = 1;
      cnt = 1;
      prevd = x - real'(s1);
      if (prevd < 0.0) prevd = -prevd;
      prev_s = s1;
      #1;
      while (valid && cnt < 20) begin
        sn = int'(s_next);
        d  = x - real'(sn);
        if (d < 0.0) d = -d;
        checks++;
        if (d + 1e-9 < prevd || seen.exists(sn) || sn > qm || sn < -qm) begin
          failures++;
          if (failures < 10) $display("FAIL x=%f prev %0d next %0d", x, prev_s, s_next);
        end
        seen[sn] = 1;
        prevd = d;
        prev_s = sn;
        cnt++;
        hi = hi_next; lo = lo_next; dir_up = dir_next;
        #1;
      end
      checks++;
      if (cnt != expected) begin failures++; if (failures < 10) $display("FAIL x=%f visited %0d of %0d", x, cnt, expected); end
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

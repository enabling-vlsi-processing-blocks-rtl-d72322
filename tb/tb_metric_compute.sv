// Self-checking testbench of metric_compute: random psi, R_ll, symbols and
// parent metrics, including overflowing ones, against
// T = min(T_parent + floor((psi - R s)^2 / 2^9), 65535) in integers.
module tb_metric_compute;
  import mimo_pkg::*;

  int checks = 0;
  int failures = 0;

  metric_t t_parent, t_node;
  data_t   psi, r_ll;
  sym_t    s;

  metric_compute dut (.*);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      longint e, t;
      t_parent = (k % 4 == 0) ? metric_t'($urandom) : metric_t'($urandom_range(4000));
      psi  = data_t'($urandom);
      r_ll = (k % 2 == 0) ? data_t'($urandom_range(1024)) : data_t'($urandom);
      s    = sym_t'(2 * int'($urandom_range(7)) - 7);
      #1;
      e = longint'(psi) - longint'(r_ll) * longint'(s);
      t = longint'(t_parent) + ((e * e) >>> 9);
      if (t > 65535) t = 65535;
      checks++;
      if (longint'(t_node) != t) begin
        failures++;
        if (failures < 10) $display("FAIL psi=%0d r=%0d s=%0d tp=%0d got %0d exp %0d", psi, r_ll, s, t_parent, t_node, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

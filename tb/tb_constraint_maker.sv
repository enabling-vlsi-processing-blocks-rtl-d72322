// Self-checking testbench of constraint_maker.
//
// For every coset leader cbar and every sub-set word c' (256 x 256 cases)
// the tree walk from dimension 7 to 0 accepts c' when every forced level
// has the required class.  Checked without using the equations of the
// unit: for cbar = 0 the accepted words must be 16 words forming a linear
// code of minimum distance 4 (the extended Hamming code); for any cbar the
// accepted words must be exactly that code shifted by cbar; levels 7, 6, 5
// and 3 must be free; with e8_en = 0 nothing is forced.
module tb_constraint_maker;
  import mimo_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       e8_en, forced, req_class;
  logic [7:0] cbar;
  sym_t       s [8];
  logic [2:0] level;

  constraint_maker dut (.*);

  bit code [256];

  function automatic sym_t sym_of(logic b);
    return b ? sym_t'(3) : sym_t'(1);     // class 1 -> 3, class 0 -> 1
  endfunction

  task automatic walk(logic [7:0] cp, output bit ok, output int nforced);
    ok = 1; nforced = 0;
    for (int j = 0; j < 8; j++) s[j] = sym_of(cp[j]);
    for (int d = 7; d >= 0; d--) begin
      level = 3'(d);
      #1;
      if (forced) begin
        nforced++;
        if (req_class != cp[d]) ok = 0;
        if (d == 7 || d == 6 || d == 5 || d == 3) ok = 0;
      end
    end
  endtask

  initial begin
    int n, nf;
    bit ok;
    e8_en = 1'b1;
    cbar = '0;
    #1;
    n = 0;
    for (int w = 0; w < 256; w++) begin
      walk(8'(w), ok, nf);
      code[w] = ok;
      if (ok) n++;
      checks++;
      if (nf != 4) begin failures++; $display("FAIL forced levels %0d", nf); end
    end
    checks++;
    if (n != 16 || !code[0]) begin failures++; $display("FAIL code size %0d", n); end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        if (code[a] && code[b]) begin
          checks++;
          if (!code[a ^ b]) begin failures++; $display("FAIL not linear"); end
          if (a != b && $countones(8'(a ^ b)) < 4) begin failures++; if (failures < 5) $display("FAIL distance %h %h", a, b); end
        end
    for (int cb = 1; cb < 256; cb++) begin
      cbar = 8'(cb);
      for (int w = 0; w < 256; w++) begin
        walk(8'(w), ok, nf);
        checks++;
        if (ok != code[w ^ cb]) begin failures++; if (failures < 10) $display("FAIL cbar %h word %h", cb, w); end
      end
    end
    e8_en = 1'b0;
    for (int d = 0; d < 8; d++) begin
      level = 3'(d);
      #1;
      checks++;
      if (forced) begin failures++; $display("FAIL forced in Z8 mode"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

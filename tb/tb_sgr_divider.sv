// Self-checking testbench of sgr_divider.
//
// Random signed dividends and positive divisors over the whole 16-bit range
// are fed one per clock; each quotient is checked two clocks later against
// X/Y computed in floating point, within 1 % plus one output LSB (the
// 8-bit reciprocal table limits the accuracy).  Division by zero must
// saturate, and the latency must be exactly two clocks.
module tb_sgr_divider;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [15:0] x;
  logic        [15:0] y;
  logic signed [23:0] q;

  sgr_divider dut (.clk, .rst_n, .x, .y, .q);

  real exp_q [$];
  real maxrel = 0.0;

  initial begin
    x = '0; y = 16'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      real e, got, tol;
      @(negedge clk);
      x = 16'($urandom);
      y = 16'($urandom_range(65535, 1)) >> $urandom_range(15);
      if (y == 0) y = 16'd1;
      e = real'(x) / real'(y) * 32768.0;
      if (e > 8388607.0) e = 8388607.0;
      if (e < -8388608.0) e = -8388608.0;
      exp_q.push_back(e);
      if (k >= 2) begin
        e = exp_q.pop_front();
        got = real'(q);
        tol = ((e < 0) ? -e : e) * 0.01 + 1.0;
        checks++;
        if ((got - e > tol) || (e - got > tol)) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d expected %f", q, e);
        end
      end
    end
    // division by zero saturates
    @(negedge clk); x = 16'sd100; y = '0;
    @(negedge clk); x = -16'sd100; y = '0;
    @(negedge clk);
    checks += 2;
    if (q != 24'sh7fffff) begin failures++; $display("FAIL /0 positive"); end
    @(negedge clk);
    if (q != 24'sh800000) begin failures++; $display("FAIL /0 negative"); end
    // exact case: 3 / 1.5 = 2
    @(negedge clk); x = 16'sd768; y = 16'd384;
    @(negedge clk); x = 16'sd0;
    checks++;
    if (q == 24'sd65536) begin failures++; $display("FAIL latency shorter than 2"); end
    @(negedge clk);
    checks++;
    if (q < 24'sd65536 - 24'sd660 || q > 24'sd65536 + 24'sd660) begin failures++; $display("FAIL 3/1.5 -> %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

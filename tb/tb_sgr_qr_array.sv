// Self-checking testbench of sgr_qr_array.
//
// Streams random 8x8 matrices back to back (diagonal entries of magnitude
// 0.75..1, the others within +-0.35, so that no leading sub-matrix is close
// to singular, which 16-bit words would not resolve) and compares
// every result with U = diag(R) [R | Q^T] computed here in floating point by
// modified Gram-Schmidt (R with positive diagonal).  Tolerance: 0.03 + 3 %
// of |U|, which covers the 16-bit words and the 8-bit reciprocal table of
// the divider.  Also checked: the first result arrives 45 clocks after the
// first row of its matrix, consecutive matrices start 48 clocks apart, and
// both PE modes (initialisation and rotation) occur the expected number of
// times (N and N(N-1)/2 per matrix).
module tb_sgr_qr_array;
  import mimo_pkg::*;

  localparam int N = 8;
  localparam int NMAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  in_valid;
  logic  in_ready;
  data_t in_row [N];
  logic  out_valid;
  data_t out_u [N][2*N];
  logic [15:0] init_count, rot_count;

  sgr_qr_array #(.N(N)) dut (.*);

  real    mat [NMAT][N][N];
  int     cyc = 0;
  int     start_cyc [NMAT];
  int     out_mat = 0;
  real    maxerr = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic reference(int m, output real uref [N][2*N]);
    real a [N][N];
    real q [N][N];
    real r [N][N];
    real nrm;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin a[i][j] = mat[m][i][j]; r[i][j] = 0.0; end
    // columns of a
    for (int k = 0; k < N; k++) begin
      nrm = 0.0;
      for (int i = 0; i < N; i++) nrm += a[i][k] * a[i][k];
      nrm = $sqrt(nrm);
      r[k][k] = nrm;
      for (int i = 0; i < N; i++) q[i][k] = a[i][k] / nrm;
      for (int j = k + 1; j < N; j++) begin
        real d;
        d = 0.0;
        for (int i = 0; i < N; i++) d += q[i][k] * a[i][j];
        r[k][j] = d;
        for (int i = 0; i < N; i++) a[i][j] -= d * q[i][k];
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2*N; j++)
        uref[i][j] = (j < N) ? r[i][i] * r[i][j] : r[i][i] * q[j-N][i];
  endtask

  // result checker
  always @(posedge clk) begin
    if (out_valid && out_mat < NMAT) begin
      real uref [N][2*N];
      reference(out_mat, uref);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < 2*N; j++) begin
          real got, err;
          got = real'(out_u[i][j]) / 512.0;
          err = got - uref[i][j];
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          checks++;
          if (err > 0.03 + 0.03 * ((uref[i][j] < 0) ? -uref[i][j] : uref[i][j])) begin
            failures++;
            if (failures < 10) $display("FAIL mat %0d U[%0d][%0d] got %f ref %f", out_mat, i, j, got, uref[i][j]);
          end
        end
      checks++;
      if (cyc - start_cyc[out_mat] != 45) begin
        failures++; $display("FAIL latency %0d", cyc - start_cyc[out_mat]);
      end
      out_mat <= out_mat + 1;
    end
  end

  initial begin
    in_valid = 1'b0;
    for (int j = 0; j < N; j++) in_row[j] = '0;
    for (int m = 0; m < NMAT; m++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          mat[m][i][j] = (i == j) ? (($urandom_range(1) != 0) ? 1.0 : -1.0) * real'(384 + int'($urandom_range(128))) / 512.0
                                  : real'(int'($urandom_range(360)) - 180) / 512.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMAT; m++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int j = 0; j < N; j++) in_row[j] = data_t'(int'($rtoi(mat[m][i][j] * 512.0)));
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) start_cyc[m] = cyc;
      end
      @(negedge clk) in_valid = 1'b0;
    end
    while (out_mat < NMAT) @(posedge clk);
    checks++;
    if (start_cyc[1] - start_cyc[0] != 48 || start_cyc[3] - start_cyc[2] != 48) begin
      failures++; $display("FAIL period %0d", start_cyc[1] - start_cyc[0]);
    end
    @(posedge clk);
    checks++;
    if (init_count != 16'(NMAT * N) || rot_count != 16'(NMAT * N * (N-1) / 2)) begin
      failures++; $display("FAIL mode counts init=%0d rot=%0d", init_count, rot_count);
    end
    $display("max abs error %f", maxerr);
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

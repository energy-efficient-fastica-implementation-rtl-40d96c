// tb_evd_processor: loads a random symmetric positive definite 8 x 8 matrix
// C = A A^T (through the load port, upper triangle only, as the covariance
// unit does), runs the Jacobi EVD and checks, in real arithmetic, that
//   E is orthonormal (E^T E = I),
//   E^T C E is diagonal with the eigenvalues on the diagonal,
//   the eigenvalues sum to the trace of C,
// and that the run takes SWEEPS * 28 pairs * 19 rotations * (ITER + 3) cycles.
module tb_evd_processor;
  import tb_fp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, ld_en = 0, start = 0, busy, done;
  logic [2:0] ld_row, ld_col;
  logic [31:0] ld_data;
  logic [31:0] eig_val [N];
  logic [31:0] eig_vec [N][N];
  real c [N][N], a [N][N];
  int checks = 0, failures = 0, cycles;

  evd_processor dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real s, scale, tr, sum;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) a[i][j] = urand(-30.0, 30.0);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      s = 0.0;
      for (int k = 0; k < N; k++) s += a[i][k] * a[j][k];
      c[i][j] = $floor(s);          // integer, like the covariance unit's output
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) for (int j = i; j < N; j++) begin
      ld_en = 1; ld_row = 3'(i); ld_col = 3'(j); ld_data = r2f(c[i][j]);
      @(negedge clk);
    end
    ld_en = 0;
    start = 1; @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 8 * 28 * 19 * 21 + 1) begin failures++; $display("cycles %0d", cycles); end
    scale = 0.0; tr = 0.0; sum = 0.0;
    for (int i = 0; i < N; i++) begin
      tr += c[i][i]; sum += f2r(eig_val[i]);
      if (c[i][i] > scale) scale = c[i][i];
    end
    checks++;
    if (!near(sum, tr, 1e-4, 0.0)) begin failures++; $display("trace %f vs %f", sum, tr); end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      real ete, d;
      ete = 0.0; d = 0.0;
      for (int k = 0; k < N; k++) ete += f2r(eig_vec[k][i]) * f2r(eig_vec[k][j]);
      for (int k = 0; k < N; k++) for (int l = 0; l < N; l++)
        d += f2r(eig_vec[k][i]) * c[k][l] * f2r(eig_vec[l][j]);
      checks += 2;
      if (!near(ete, (i == j) ? 1.0 : 0.0, 0.0, 1e-4)) begin failures++; $display("E^T E[%0d][%0d] = %f", i, j, ete); end
      if (!near(d, (i == j) ? f2r(eig_val[i]) : 0.0, 0.0, 1e-4 * scale)) begin
        failures++; $display("E^T C E[%0d][%0d] = %f (eig %f)", i, j, d, f2r(eig_val[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

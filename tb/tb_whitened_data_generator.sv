// tb_whitened_data_generator: gives the unit random positive eigenvalues and a
// random eigenvector matrix, fills the data memory with random centered 18-bit
// samples, and checks in real arithmetic the whitening matrix
// P[i][j] = e_ji / sqrt(d_i) and every whitened word z_i(t) = sum_j P[i][j] x_j(t)
// written back in place.
module tb_whitened_data_generator;
  import tb_fp_pkg::*;
  localparam int N = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] eig_val [N];
  logic [31:0] eig_vec [N][N];
  logic [31:0] p_mat [N][N];
  logic mem_en, mem_we;
  logic [10:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int x [N][N_SMP];
  real pr [N][N];
  int checks = 0, failures = 0;

  whitened_data_generator dut (.*);
  data_memory mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real z, mag;
    for (int i = 0; i < N; i++) begin
      eig_val[i] = r2f(urand(10.0, 5.0e6));
      for (int j = 0; j < N; j++) eig_vec[i][j] = r2f(urand(-1.0, 1.0));
    end
    for (int j = 0; j < N; j++) for (int t = 0; t < N_SMP; t++) begin
      x[j][t] = int'($urandom_range(0, 8000)) - 4000;
      mem.mem[j*N_SMP + t] = 32'(x[j][t]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      pr[i][j] = f2r(eig_vec[j][i]) / $sqrt(f2r(eig_val[i]));
      checks++;
      if (!near(f2r(p_mat[i][j]), pr[i][j], 1e-5, 1e-9)) begin
        failures++; $display("P[%0d][%0d] %g vs %g", i, j, f2r(p_mat[i][j]), pr[i][j]);
      end
    end
    for (int i = 0; i < N; i++) for (int t = 0; t < N_SMP; t++) begin
      z = 0.0; mag = 0.0;
      for (int j = 0; j < N; j++) begin
        z += pr[i][j] * x[j][t];
        mag += rabs(pr[i][j] * x[j][t]);
      end
      checks++;
      if (!near(f2r(mem.mem[i*N_SMP + t]), z, 0.0, 1e-5 * mag + 1e-9)) begin
        failures++;
        if (failures < 10) $display("z[%0d][%0d] %g vs %g", i, t, f2r(mem.mem[i*N_SMP + t]), z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

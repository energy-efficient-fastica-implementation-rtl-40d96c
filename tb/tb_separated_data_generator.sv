// tb_separated_data_generator: random weight matrix in the old weight matrix
// memory (row-vector k at words 8k..8k+7), random floating-point whitened data
// in the data memory; checks every output word s_i(t) = w_i^T z(t) written in
// place, against real arithmetic.
module tb_separated_data_generator;
  import tb_fp_pkg::*;
  localparam int N = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic ow_en;
  logic [5:0] ow_addr;
  logic [31:0] ow_rdata;
  logic mem_en, mem_we;
  logic [10:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  real w [N][N], z [N][N_SMP];
  int checks = 0, failures = 0;

  separated_data_generator dut (.*);
  owmm ow (.clk, .en(ow_en), .we(1'b0), .addr(ow_addr), .wdata(32'd0), .rdata(ow_rdata));
  data_memory mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real s, mag;
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) begin
      w[k][j] = f2r(r2f(urand(-1.0, 1.0)));
      ow.mem[k*N + j] = r2f(w[k][j]);
    end
    for (int j = 0; j < N; j++) for (int t = 0; t < N_SMP; t++) begin
      z[j][t] = f2r(r2f(urand(-3.0, 3.0)));
      mem.mem[j*N_SMP + t] = r2f(z[j][t]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < N; i++) for (int t = 0; t < N_SMP; t++) begin
      s = 0.0; mag = 0.0;
      for (int j = 0; j < N; j++) begin s += w[i][j] * z[j][t]; mag += rabs(w[i][j] * z[j][t]); end
      checks++;
      if (!near(f2r(mem.mem[i*N_SMP + t]), s, 0.0, 1e-5 * mag + 1e-9)) begin
        failures++;
        if (failures < 10) $display("s[%0d][%0d] %f vs %f", i, t, f2r(mem.mem[i*N_SMP + t]), s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

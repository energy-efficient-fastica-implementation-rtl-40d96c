// tb_one_unit: loads a random unit vector w, fills the data memory with random
// floating-point whitened samples, runs one one-unit operation and checks every
// element of w+ = sum_i z_i t_i - (256 - sum_i t_i^2) w, with t_i the 13-piece
// tanh approximation of w^T z_i, all computed here in real arithmetic. Also
// checks the cycle count N * (N_SMP * (N + 4) + 2) + 1 from the start pulse to the done pulse.
module tb_one_unit;
  import tb_fp_pkg::*;
  localparam int N = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic w_ld_en = 0;
  logic [2:0] w_ld_idx;
  logic [31:0] w_ld_data;
  logic mem_en;
  logic [10:0] mem_addr;
  logic [31:0] mem_rdata;
  logic [31:0] wplus [N];
  real w [N], z [N][N_SMP];
  int checks = 0, failures = 0, cycles;

  one_unit dut (.*);
  data_memory mem (.clk, .en(mem_en), .we(1'b0), .addr(mem_addr), .wdata(32'd0), .rdata(mem_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real nrm, y, t, s2, ref_w, mag;
    real s1 [N];
    nrm = 0.0;
    for (int j = 0; j < N; j++) begin w[j] = urand(-1.0, 1.0); nrm += w[j] * w[j]; end
    for (int j = 0; j < N; j++) w[j] = f2r(r2f(w[j] / $sqrt(nrm)));
    for (int j = 0; j < N; j++) for (int i = 0; i < N_SMP; i++) begin
      z[j][i] = f2r(r2f(urand(-2.5, 2.5)));
      mem.mem[j*N_SMP + i] = r2f(z[j][i]);
    end
    s2 = 0.0;
    for (int j = 0; j < N; j++) s1[j] = 0.0;
    for (int i = 0; i < N_SMP; i++) begin
      y = 0.0;
      for (int j = 0; j < N; j++) y += w[j] * z[j][i];
      t = tanh_ref_pwl(y);
      s2 += t * t;
      for (int j = 0; j < N; j++) s1[j] += z[j][i] * t;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < N; j++) begin
      w_ld_en = 1; w_ld_idx = 3'(j); w_ld_data = r2f(w[j]); @(negedge clk);
    end
    w_ld_en = 0;
    start = 1; @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != N * (N_SMP * (N + 4) + 2) + 1) begin failures++; $display("cycles %0d", cycles); end
    for (int j = 0; j < N; j++) begin
      ref_w = s1[j] - (256.0 - s2) * w[j];
      mag = 256.0 * 2.5;
      checks++;
      if (!near(f2r(wplus[j]), ref_w, 0.0, 1e-4 * mag)) begin
        failures++; $display("w+[%0d] %f vs %f", j, f2r(wplus[j]), ref_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

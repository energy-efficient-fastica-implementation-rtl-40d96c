// tb_four_parallel_one_units: eight random unit vectors in the old weight
// matrix memory, random whitened samples in the data memory; after one run the
// new weight matrix memory must hold w+ of each vector (computed here in real
// arithmetic as in tb_one_unit), which checks the vector-to-unit assignment of
// both passes, the shared memory stream and the write-back addresses.
module tb_four_parallel_one_units;
  import tb_fp_pkg::*;
  localparam int N = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic mem_en;
  logic [10:0] mem_addr;
  logic [31:0] mem_rdata;
  logic ow_en, nw_en;
  logic [5:0] ow_addr, nw_addr;
  logic [31:0] ow_rdata, nw_wdata, unused_rd;
  real w [N][N], z [N][N_SMP];
  int checks = 0, failures = 0, cycles;

  four_parallel_one_units dut (.*);
  data_memory dmem (.clk, .en(mem_en), .we(1'b0), .addr(mem_addr), .wdata(32'd0), .rdata(mem_rdata));
  owmm ow (.clk, .en(ow_en), .we(1'b0), .addr(ow_addr), .wdata(32'd0), .rdata(ow_rdata));
  nwmm nw (.clk, .wa_en(nw_en), .wa_addr(nw_addr), .wa_data(nw_wdata), .rb_en(1'b0), .rb_addr(6'd0), .rb_data(unused_rd));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real nrm, y, t, s2, ref_w;
    real s1 [N];
    for (int k = 0; k < N; k++) begin
      nrm = 0.0;
      for (int j = 0; j < N; j++) begin w[k][j] = urand(-1.0, 1.0); nrm += w[k][j] * w[k][j]; end
      for (int j = 0; j < N; j++) begin
        w[k][j] = f2r(r2f(w[k][j] / $sqrt(nrm)));
        ow.mem[k*N + j] = r2f(w[k][j]);
        nw.mem[k*N + j] = 32'd0;
      end
    end
    for (int j = 0; j < N; j++) for (int i = 0; i < N_SMP; i++) begin
      z[j][i] = f2r(r2f(urand(-2.5, 2.5)));
      dmem.mem[j*N_SMP + i] = r2f(z[j][i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 2 * (N * (N_SMP * (N + 4) + 2) + 66) + 1) begin failures++; $display("cycles %0d", cycles); end
    for (int k = 0; k < N; k++) begin
      s2 = 0.0;
      for (int j = 0; j < N; j++) s1[j] = 0.0;
      for (int i = 0; i < N_SMP; i++) begin
        y = 0.0;
        for (int j = 0; j < N; j++) y += w[k][j] * z[j][i];
        t = tanh_ref_pwl(y);
        s2 += t * t;
        for (int j = 0; j < N; j++) s1[j] += z[j][i] * t;
      end
      for (int j = 0; j < N; j++) begin
        ref_w = s1[j] - (256.0 - s2) * w[k][j];
        checks++;
        if (!near(f2r(nw.mem[k*N + j]), ref_w, 0.0, 0.064)) begin
          failures++; $display("w+[%0d][%0d] %f vs %f", k, j, f2r(nw.mem[k*N + j]), ref_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gram_schmidt_unit: eight random (non-orthogonal) vectors of mixed lengths
// in the new weight matrix memory; after the run the memory must hold the
// Gram-Schmidt orthonormalization of them in order, compared element by element
// with a real-arithmetic reference, and the result must be orthonormal.
module tb_gram_schmidt_unit;
  import tb_fp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic nw_wen, nw_ren;
  logic [5:0] nw_waddr, nw_raddr;
  logic [31:0] nw_wdata, nw_rdata;
  real v [N][N];
  int checks = 0, failures = 0;

  gram_schmidt_unit dut (.*);
  nwmm nw (.clk, .wa_en(nw_wen), .wa_addr(nw_waddr), .wa_data(nw_wdata),
           .rb_en(nw_ren), .rb_addr(nw_raddr), .rb_data(nw_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real d, nrm;
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) begin
      v[k][j] = f2r(r2f(urand(-100.0, 100.0) * (k + 1)));
      nw.mem[k*N + j] = r2f(v[k][j]);
    end
    for (int k = 0; k < N; k++) begin           // reference
      for (int i = 0; i < k; i++) begin
        d = 0.0;
        for (int j = 0; j < N; j++) d += v[k][j] * v[i][j];
        for (int j = 0; j < N; j++) v[k][j] -= d * v[i][j];
      end
      nrm = 0.0;
      for (int j = 0; j < N; j++) nrm += v[k][j] * v[k][j];
      for (int j = 0; j < N; j++) v[k][j] /= $sqrt(nrm);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) begin
      checks++;
      if (!near(f2r(nw.mem[k*N + j]), v[k][j], 0.0, 1e-4)) begin
        failures++; $display("w[%0d][%0d] %f vs %f", k, j, f2r(nw.mem[k*N + j]), v[k][j]);
      end
    end
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) begin
      d = 0.0;
      for (int j = 0; j < N; j++) d += f2r(nw.mem[a*N + j]) * f2r(nw.mem[b*N + j]);
      checks++;
      if (!near(d, (a == b) ? 1.0 : 0.0, 0.0, 1e-4)) begin failures++; $display("dot %0d %0d = %f", a, b, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

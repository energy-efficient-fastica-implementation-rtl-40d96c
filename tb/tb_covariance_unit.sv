// tb_covariance_unit: fills a data memory with random centered 18-bit data,
// runs the covariance unit and checks the 36 streamed elements (order p <= q,
// row by row, value floor(sum_t x_p x_q / 256) saturated to 24 bits, computed
// here), and the cycle count 36 * (3 * N_SMP + 1) from start to done. Channel 7
// is given full-scale values so that saturation is exercised.
module tb_covariance_unit;
  localparam int N_CH = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic mem_en;
  logic [10:0] mem_addr;
  logic [31:0] mem_rdata;
  logic cov_valid;
  logic [2:0] cov_p, cov_q;
  logic signed [23:0] cov_data;
  int x [N_CH][N_SMP];
  int checks = 0, failures = 0, cycles = 0, nout = 0, ep = 0, eq = 0;

  covariance_unit dut (.*);
  data_memory mem (.clk, .en(mem_en), .we(1'b0), .addr(mem_addr), .wdata(32'd0), .rdata(mem_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint expected(int p, int q);
    longint s = 0, m;
    for (int t = 0; t < N_SMP; t++) s += longint'(x[p][t]) * longint'(x[q][t]);
    m = s >>> 8;
    if (m > 8388607) m = 8388607;
    if (m < -8388608) m = -8388608;
    return m;
  endfunction

  always @(posedge clk) if (rst_n && cov_valid) begin
    checks += 2;
    if (cov_p != 3'(ep) || cov_q != 3'(eq)) begin failures++; $display("index %0d,%0d exp %0d,%0d", cov_p, cov_q, ep, eq); end
    if (longint'(cov_data) != expected(ep, eq)) begin failures++; $display("C[%0d][%0d] %0d vs %0d", ep, eq, cov_data, expected(ep, eq)); end
    nout++;
    if (eq == N_CH - 1) begin ep++; eq = ep; end else eq++;
  end

  initial begin
    for (int c = 0; c < N_CH; c++)
      for (int t = 0; t < N_SMP; t++) begin
        x[c][t] = (c == 7) ? ((t % 2) ? 4095 : -4096) : int'($urandom_range(0, 4000)) - 2000;
        mem.mem[c*N_SMP + t] = 32'(x[c][t]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks += 2;
    if (nout != 36) begin failures++; $display("outputs %0d", nout); end
    if (cycles != 36 * (3 * N_SMP + 1) + 1) begin failures++; $display("cycles %0d", cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

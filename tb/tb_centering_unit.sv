// tb_centering_unit: fills a data memory with random 12-bit samples (each channel
// with its own offset), runs the centering unit and checks every written-back
// word against x - floor(sum / 256) computed here, sign-extended to 32 bits, and
// the cycle count N_CH * (3 * N_SMP + 1) + 1 from start to done.
module tb_centering_unit;
  localparam int N_CH = 8, N_SMP = 256;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic mem_en, mem_we;
  logic [10:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int x [N_CH][N_SMP];
  int checks = 0, failures = 0, cycles;

  centering_unit dut (.*);
  data_memory mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      int off;
      off = int'($urandom_range(0, 2000)) - 1000;
      for (int t = 0; t < N_SMP; t++) begin
        x[c][t] = off + int'($urandom_range(0, 2000)) - 1000;
        if (x[c][t] > 2047) x[c][t] = 2047;
        if (x[c][t] < -2048) x[c][t] = -2048;
        mem.mem[c*N_SMP + t] = 32'(x[c][t]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != N_CH * (3 * N_SMP + 1) + 1) begin
      failures++; $display("cycle count %0d", cycles);
    end
    for (int c = 0; c < N_CH; c++) begin
      int sum, mean;
      sum = 0;
      for (int t = 0; t < N_SMP; t++) sum += x[c][t];
      mean = sum >>> 8;
      for (int t = 0; t < N_SMP; t++) begin
        checks++;
        if (mem.mem[c*N_SMP + t] !== 32'(x[c][t] - mean)) begin
          failures++;
          if (failures < 10) $display("ch %0d t %0d: %0d vs %0d", c, t, $signed(mem.mem[c*N_SMP+t]), x[c][t]-mean);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

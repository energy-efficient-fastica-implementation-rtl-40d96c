// tb_owmm: writes random words to random addresses of the 64 x 32 old weight
// matrix memory, keeps a shadow copy, and checks every read (one cycle latency)
// and that the read register holds while the memory is not enabled.
module tb_owmm;
  localparam int DEPTH = 64;
  logic clk = 0, en = 0, we = 0;
  logic [5:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] shadow [DEPTH];
  bit          valid  [DEPTH];
  int checks = 0, failures = 0;

  owmm dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      addr = 6'($urandom_range(0, DEPTH-1));
      en = 1;
      if ($urandom_range(0, 1) == 0 || !valid[addr]) begin
        we = 1; wdata = $urandom; shadow[addr] = wdata; valid[addr] = 1;
        @(negedge clk);
      end else begin
        we = 0;
        @(negedge clk);
        checks++;
        if (rdata !== shadow[addr]) begin
          failures++; $display("read %0d: got %h exp %h", addr, rdata, shadow[addr]);
        end
        en = 0; addr = addr + 1'b1;
        @(negedge clk);
        checks++;
        if (rdata !== shadow[addr - 1'b1]) begin failures++; $display("hold failed"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

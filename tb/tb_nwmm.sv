// tb_nwmm: drives the write port and the read port of the 64 x 32 dual-port new
// weight matrix memory at the same time with random traffic and checks every
// read against a shadow copy (one cycle latency, a read of the word being
// written returns the old value).
module tb_nwmm;
  logic clk = 0, wa_en = 0, rb_en = 0;
  logic [5:0] wa_addr = '0, rb_addr = '0;
  logic [31:0] wa_data = '0, rb_data;
  logic [31:0] shadow [64];
  logic [31:0] expq;
  bit          expv;
  int checks = 0, failures = 0;

  nwmm dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      wa_en = 1; wa_addr = 6'(i); wa_data = $urandom; shadow[i] = wa_data;
      @(negedge clk);
    end
    expv = 0;
    for (int n = 0; n < 3000; n++) begin
      wa_en = $urandom_range(0, 1); wa_addr = 6'($urandom); wa_data = $urandom;
      rb_en = 1; rb_addr = ($urandom_range(0, 3) == 0) ? wa_addr : 6'($urandom);
      expq = shadow[rb_addr];
      if (wa_en) shadow[wa_addr] = wa_data;
      @(negedge clk);
      checks++;
      if (rb_data !== expq) begin failures++; $display("read %0d: %h vs %h", rb_addr, rb_data, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_inv_sqrt: random positive inputs over twelve binary orders of magnitude
// (both exponent parities), compared with 1/sqrt(x) in real arithmetic to a
// relative error of 1e-5; zero and negative inputs must give 0. Also checks the
// NR_STEPS + 1 = 4 cycle latency.
module tb_inv_sqrt;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  inv_sqrt dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [31:0] v, output int cyc);
    x = v; start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    real v;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      v = urand(1.0, 2.0) * (2.0 ** ($urandom_range(0, 24) - 12));
      run(r2f(v), cyc);
      checks += 2;
      if (cyc != 4) begin failures++; $display("latency %0d", cyc); end
      if (!near(f2r(y), 1.0 / $sqrt(f2r(r2f(v))), 1e-5, 0.0)) begin
        failures++; $display("1/sqrt(%g) = %g exp %g", v, f2r(y), 1.0 / $sqrt(v));
      end
    end
    run(32'h0, cyc);  checks++; if (y !== 32'h0) failures++;
    run(r2f(-2.0), cyc); checks++; if (y !== 32'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

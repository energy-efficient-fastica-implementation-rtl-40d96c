// tb_cordic_engine: random vectoring operations (z_r must equal
// z_0 + atan(y_0 / x_0), including negative x_0) and rotation operations
// (x_r, y_r must equal the rotated vector), compared with real-arithmetic
// results; also checks the ITER + 2 cycle latency from start to done.
module tb_cordic_engine;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, mode = 0, busy, done;
  logic [31:0] x0, y0, z0, xr, yr, zr;
  int checks = 0, failures = 0;

  cordic_engine dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit m, input real x, input real y, input real z);
    int cyc;
    mode = m; x0 = r2f(x); y0 = r2f(y); z0 = r2f(z);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 20) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    real x, y, z, r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      x = urand(-4.0, 4.0); y = urand(-4.0, 4.0); z = urand(-0.5, 0.5);
      if (rabs(x) < 0.05) x = 0.05;
      run(0, x, y, z);
      checks++;
      if (!near(f2r(zr), z + $atan(y / x), 0.0, 2e-5)) begin
        failures++; $display("vec %f %f %f: z %f exp %f", x, y, z, f2r(zr), z + $atan(y / x));
      end
      z = urand(-1.5, 1.5);
      run(1, x, y, z);
      r = $sqrt(x * x + y * y);
      checks += 2;
      if (!near(f2r(xr), x * $cos(z) - y * $sin(z), 0.0, 2e-5 * r + 1e-6)) begin
        failures++; $display("rot x %f exp %f", f2r(xr), x * $cos(z) - y * $sin(z));
      end
      if (!near(f2r(yr), x * $sin(z) + y * $cos(z), 0.0, 2e-5 * r + 1e-6)) begin
        failures++; $display("rot y %f exp %f", f2r(yr), x * $sin(z) + y * $cos(z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

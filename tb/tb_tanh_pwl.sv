// tb_tanh_pwl: sweeps x over [-9, 9] and random points, including the
// breakpoints; the approximation a*x + b*sign(x) must match the segment table
// evaluated here in real arithmetic (1e-5) and stay within 0.02 of tanh(x).
module tb_tanh_pwl;
  import tb_fp_pkg::*;
  logic [31:0] x, coef_a, coef_b, y;
  int checks = 0, failures = 0;

  tanh_pwl dut (.*);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input real v);
    real ref_pwl, ref_tanh, got;
    x = r2f(v); #1;
    got = f2r(y);
    ref_pwl = tanh_ref_pwl(f2r(x));
    ref_tanh = (($exp(2.0 * f2r(x)) - 1.0) / ($exp(2.0 * f2r(x)) + 1.0));
    checks += 2;
    if (!near(got, ref_pwl, 1e-5, 1e-6)) begin failures++; $display("x=%f y=%f pwl=%f", v, got, ref_pwl); end
    if (!near(got, ref_tanh, 0.0, 0.02)) begin failures++; $display("x=%f y=%f tanh=%f", v, got, ref_tanh); end
  endtask

  initial begin
    real bp [7] = '{0.5, 1.0, 1.5, 2.0, 3.0, 7.0, 0.25};
    foreach (bp[i]) begin check(bp[i]); check(-bp[i]); end
    for (int n = -900; n <= 900; n++) check(n / 100.0);
    for (int n = 0; n < 2000; n++) check(urand(-9.0, 9.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

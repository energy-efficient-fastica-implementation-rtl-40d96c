// tb_early_determination_unit: random SAD pairs and thresholds, including
// differences just below and above 0.001 x threshold, in both directions of
// change; checks DV1, DV2 = |old - new|, the stop decision and the two-cycle
// latency from eval to done.
module tb_early_determination_unit;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, eval = 0, done, stop;
  logic [31:0] conv_threshold, sad_old, sad_new, dv1, dv2;
  int checks = 0, failures = 0, nstop = 0;

  early_determination_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real thr, so, sn, e1, e2;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      thr = urand(1e-4, 1e-1);
      so  = urand(4.0, 8.0);
      case (n % 4)
        0: sn = so + 0.0005 * thr;
        1: sn = so - 0.002 * thr;
        2: sn = so + urand(-0.01, 0.01);
        default: sn = so - 0.0002 * thr;
      endcase
      conv_threshold = r2f(thr); sad_old = r2f(so); sad_new = r2f(sn);
      e1 = f2r(conv_threshold) * 0.001;
      e2 = rabs(f2r(sad_old) - f2r(sad_new));
      eval = 1; @(negedge clk); eval = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 4;
      if (cyc != 2) begin failures++; $display("latency %0d", cyc); end
      if (!near(f2r(dv1), e1, 1e-5, 0.0)) begin failures++; $display("dv1 %g vs %g", f2r(dv1), e1); end
      if (!near(f2r(dv2), e2, 1e-5, 1e-7)) begin failures++; $display("dv2 %g vs %g", f2r(dv2), e2); end
      if (stop != (f2r(dv2) < f2r(dv1))) begin failures++; $display("stop %0d dv1 %g dv2 %g", stop, f2r(dv1), f2r(dv2)); end
      if (rabs(e2 - e1) > 1e-3 * e1 && stop != (e2 < e1)) begin failures++; $display("decision %0d: %g vs %g", stop, e2, e1); end
      nstop += stop;
    end
    checks++;
    if (nstop < 500 || nstop > 1500) begin failures++; $display("stops %0d", nstop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

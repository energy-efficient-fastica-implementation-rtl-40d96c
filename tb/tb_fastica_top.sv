// tb_fastica_top: end-to-end runs of the whole engine on a synthetic scene
// (seven non-Gaussian sources and one Gaussian source, randomly mixed and
// quantised to 12 bits), with MAX_ITER lowered to 30 so that the iteration limit
// is reachable in a short simulation. Three runs, each loading the mixture
// through the host port and reading the result back:
//   1. threshold 0.01: must stop by convergence;
//   2. threshold 1e-12: convergence is out of reach, and the run must stop in
//      the early determination unit once the SAD stops changing (or at the
//      limit);
//   3. threshold 0: neither test can pass, the run must stop at MAX_ITER.
// After every run each non-Gaussian source must be matched by some output with
// |correlation| >= 0.9. The test counts how often each mechanism (preprocessing
// pass, one-unit pass, convergence stop, early stop, iteration-limit stop)
// happened and fails if one never did.
module tb_fastica_top;
  import tb_fp_pkg::*;
  import fastica_pkg::fp32_t;
  import fastica_pkg::PH_WHITEN;
  import fastica_pkg::PH_ONEUNIT;
  localparam int N = 8, T = 256, MAXI = 30;
  logic clk = 0, rst_n = 0, start = 0;
  fp32_t conv_threshold;
  logic host_en = 0, host_we = 0;
  logic [10:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic busy, done, converged, early_stop;
  logic [4:0] iterations;
  scene_src_t src;
  scene_mix_t mix;
  int checks = 0, failures = 0;
  int n_conv = 0, n_early = 0, n_limit = 0, n_pre = 0, n_units = 0;

  fastica_top #(.MAX_ITER(MAXI)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (4_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.unit_start && dut.phase == PH_WHITEN) n_pre++;
    if (dut.unit_start && dut.phase == PH_ONEUNIT) n_units++;
  end

  task automatic one_run(input real thr, input string name);
    real out [T], s [T], best;
    int cyc;
    for (int c = 0; c < N; c++) for (int t = 0; t < T; t++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 11'(c * T + t); host_wdata = 32'(mix[c][t]);
    end
    @(negedge clk); host_en = 0; host_we = 0;
    conv_threshold = r2f(thr);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%s: %0d cycles, %0d iterations, converged %0d, early stop %0d", name, cyc, iterations, converged, early_stop);
    if (converged) n_conv++;
    else if (early_stop) n_early++;
    else if (iterations == 5'(MAXI)) n_limit++;
    // read back the separated signals
    for (int c = 0; c < N; c++) begin
      real y [T];
      for (int t = 0; t < T; t++) begin
        host_en = 1; host_we = 0; host_addr = 11'(c * T + t);
        @(negedge clk);
        y[t] = f2r(host_rdata);
      end
      for (int t = 0; t < T; t++) outs[c][t] = y[t];
    end
    host_en = 0;
    for (int k = 0; k < N - 1; k++) begin
      best = 0.0;
      for (int t = 0; t < T; t++) s[t] = src[k][t];
      for (int c = 0; c < N; c++) begin
        real cc;
        for (int t = 0; t < T; t++) out[t] = outs[c][t];
        cc = abs_corr(s, out);
        if (cc > best) best = cc;
      end
      checks++;
      $display("  source %0d best |corr| %0.4f", k, best);
      if (best < 0.9) failures++;
    end
  endtask

  real outs [N][T];

  initial begin
    make_scene(src, mix);
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(0.01, "threshold 0.01");
    checks++; if (!converged) begin failures++; $display("run 1 did not converge"); end
    one_run(1e-12, "threshold 1e-12");
    checks++; if (converged) begin failures++; $display("run 2 converged"); end
    one_run(0.0, "threshold 0");
    checks++; if (converged || early_stop || iterations != 5'(MAXI)) begin failures++; $display("run 3 did not hit the limit"); end
    $display("mechanisms: preprocessing %0d, one-unit passes %0d, convergence %0d, early stop %0d, iteration limit %0d",
             n_pre, n_units, n_conv, n_early, n_limit);
    checks += 5;
    if (n_pre == 0) failures++;
    if (n_units == 0) failures++;
    if (n_conv == 0) failures++;
    if (n_early == 0) failures++;
    if (n_limit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

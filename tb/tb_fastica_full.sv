// tb_fastica_full: one complete separation with every parameter of the engine
// at its default (8 channels, 256 samples, 300-iteration limit). The synthetic
// 12-bit mixture of seven non-Gaussian sources and one Gaussian source is
// loaded through the host port, the engine runs with convergence threshold
// 0.01, and the separated signals are read back; each non-Gaussian source must
// be matched by an output with |correlation| >= 0.9, the run must end by
// convergence, and its cycle count must stay below the 29 M cycles (0.29 s at
// 100 MHz) that bound a run at the iteration limit.
module tb_fastica_full;
  import tb_fp_pkg::*;
  localparam int N = 8, T = 256;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] conv_threshold;
  logic host_en = 0, host_we = 0;
  logic [10:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic busy, done, converged, early_stop;
  logic [8:0] iterations;
  scene_src_t src;
  scene_mix_t mix;
  real outs [N][T];
  int checks = 0, failures = 0;

  fastica_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (30_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real out [T], s [T], best, cc;
    int cyc;
    make_scene(src, mix);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) for (int t = 0; t < T; t++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 11'(c * T + t); host_wdata = 32'(mix[c][t]);
    end
    @(negedge clk); host_en = 0; host_we = 0;
    conv_threshold = r2f(0.01);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%0d cycles, %0d iterations, converged %0d, early stop %0d", cyc, iterations, converged, early_stop);
    checks += 2;
    if (!converged) failures++;
    if (cyc > 29_000_000) failures++;
    for (int c = 0; c < N; c++) for (int t = 0; t < T; t++) begin
      host_en = 1; host_we = 0; host_addr = 11'(c * T + t);
      @(negedge clk);
      outs[c][t] = f2r(host_rdata);
    end
    host_en = 0;
    for (int k = 0; k < N - 1; k++) begin
      best = 0.0;
      for (int t = 0; t < T; t++) s[t] = src[k][t];
      for (int c = 0; c < N; c++) begin
        for (int t = 0; t < T; t++) out[t] = outs[c][t];
        cc = abs_corr(s, out);
        if (cc > best) best = cc;
      end
      $display("  source %0d best |corr| %0.4f", k, best);
      checks++;
      if (best < 0.9) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

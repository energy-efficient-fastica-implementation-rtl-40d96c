// tb_fastica_rates: the engine at shorter windows, as for one-second EEG
// windows sampled at 128, 64 and 32 Hz. Three copies of fastica_top run side by
// side with N_SMP = 128, 64 and 32 (all other parameters at their defaults);
// each is loaded with the first N_SMP samples of the synthetic eight-source
// mixture, run with threshold 0.01, and read back. Checks per size: the run
// ends (by any of the three exits) within the iteration limit, and the
// separated outputs still carry the sources: at least three of the seven
// non-Gaussian sources are matched by an output with |correlation| >= 0.9.
// Short windows estimate the statistics less well, so this is looser than the
// 256-sample tests (at 32 samples the run usually ends at the 300-iteration
// limit). The best correlation of every source is printed.
module tb_fastica_rates;
  import tb_fp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, finished = 0;
  scene_src_t src;
  scene_mix_t mix;

  always #5 clk = ~clk;
  initial begin
    repeat (40_000_000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    make_scene(src, mix);
    repeat (3) @(negedge clk);
    rst_n = 1;
  end
  initial begin
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int T  = 128 >> g;
    localparam int AW = $clog2(N * T);
    logic start = 0, host_en = 0, host_we = 0;
    logic [AW-1:0] host_addr = '0;
    logic [31:0] host_wdata = '0, host_rdata, conv_threshold;
    logic busy, done, converged, early_stop;
    logic [8:0] iterations;

    fastica_top #(.N_SMP(T)) dut (.*);

    initial begin
      real outs [N][T];
      real best, cc, mu, mv, suv, suu, svv;
      int cyc, n_good;
      @(posedge rst_n);
      for (int c = 0; c < N; c++) for (int t = 0; t < T; t++) begin
        @(negedge clk);
        host_en = 1; host_we = 1; host_addr = AW'(c * T + t); host_wdata = 32'(mix[c][t]);
      end
      @(negedge clk); host_en = 0; host_we = 0;
      conv_threshold = r2f(0.01);
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      $display("N_SMP %0d: %0d cycles, %0d iterations, converged %0d, early stop %0d",
               T, cyc, iterations, converged, early_stop);
      checks++;
      if (iterations == 0 || iterations > 300) failures++;
      for (int c = 0; c < N; c++) for (int t = 0; t < T; t++) begin
        host_en = 1; host_we = 0; host_addr = AW'(c * T + t);
        @(negedge clk);
        outs[c][t] = f2r(host_rdata);
      end
      host_en = 0;
      n_good = 0;
      for (int k = 0; k < N - 1; k++) begin
        best = 0.0;
        for (int c = 0; c < N; c++) begin
          mu = 0.0; mv = 0.0; suv = 0.0; suu = 0.0; svv = 0.0;
          for (int t = 0; t < T; t++) begin mu += src[k][t]; mv += outs[c][t]; end
          mu /= T; mv /= T;
          for (int t = 0; t < T; t++) begin
            suv += (src[k][t] - mu) * (outs[c][t] - mv);
            suu += (src[k][t] - mu) * (src[k][t] - mu);
            svv += (outs[c][t] - mv) * (outs[c][t] - mv);
          end
          cc = (suu == 0.0 || svv == 0.0) ? 0.0 : rabs(suv) / $sqrt(suu * svv);
          if (cc > best) best = cc;
        end
        $display("  N_SMP %0d source %0d best |corr| %0.4f", T, k, best);
        if (best >= 0.9) n_good++;
      end
      checks++;
      if (n_good < 3) failures++;
      finished++;
    end
  end
endmodule

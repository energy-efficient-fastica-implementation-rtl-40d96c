// tb_convergence_check_unit: runs MAX_ITER = 3 checks on prepared old/new
// weight matrices and checks, against values computed here, the SAD of each
// check, the previous SAD, the convergence flag (N - SAD < threshold), the
// iteration count, the max_reached flag on the third check, the copy of the new
// matrix into the old weight matrix memory, clear, and the 3 * N * N + 2 cycle
// duration.
module tb_convergence_check_unit;
  import tb_fp_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clear = 0, start = 0, busy, done;
  logic [31:0] conv_threshold, sad_new, sad_old, ow_wdata, ow_rdata, nw_rdata;
  logic converged, max_reached;
  logic [8:0] iterations;
  logic ow_en, ow_we, nw_ren;
  logic [5:0] ow_addr, nw_raddr;
  real wo [N][N], wn [N][N];
  real prev_sad;
  int checks = 0, failures = 0;

  convergence_check_unit #(.MAX_ITER(3)) dut (.*, .iterations(iterations[1:0]));
  owmm ow (.clk, .en(ow_en), .we(ow_we), .addr(ow_addr), .wdata(ow_wdata), .rdata(ow_rdata));
  nwmm nw (.clk, .wa_en(1'b0), .wa_addr(6'd0), .wa_data(32'd0), .rb_en(nw_ren), .rb_addr(nw_raddr), .rb_data(nw_rdata));
  assign iterations[8:2] = '0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one_check(input real noise, input real thr, input int n_expected, input bit max_exp);
    real sad, d;
    int cyc;
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) begin
      wo[k][j] = f2r(ow.mem[k*N + j]);
      wn[k][j] = f2r(r2f(((j == k) ? ((k % 2) ? -1.0 : 1.0) : 0.0) + urand(-noise, noise)));
      nw.mem[k*N + j] = r2f(wn[k][j]);
    end
    sad = 0.0;
    for (int k = 0; k < N; k++) begin
      d = 0.0;
      for (int j = 0; j < N; j++) d += wo[k][j] * wn[k][j];
      sad += rabs(d);
    end
    conv_threshold = r2f(thr);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 7;
    if (cyc != 3 * N * N + 2) begin failures++; $display("cycles %0d", cyc); end
    if (!near(f2r(sad_new), sad, 1e-5, 1e-6)) begin failures++; $display("sad %f vs %f", f2r(sad_new), sad); end
    if (!near(f2r(sad_old), prev_sad, 1e-5, 1e-6)) begin failures++; $display("old sad %f vs %f", f2r(sad_old), prev_sad); end
    if (converged != (N - sad < thr)) begin failures++; $display("converged %0d, N-SAD %g thr %g", converged, N - sad, thr); end
    if (iterations != 9'(n_expected)) begin failures++; $display("iterations %0d", iterations); end
    if (max_reached != max_exp) begin failures++; $display("max_reached %0d", max_reached); end
    begin
      int bad = 0;
      for (int a = 0; a < N * N; a++) if (ow.mem[a] !== nw.mem[a]) bad++;
      if (bad != 0) begin failures++; $display("copy: %0d words differ", bad); end
    end
    prev_sad = f2r(sad_new);
  endtask

  initial begin
    for (int a = 0; a < N * N; a++) ow.mem[a] = r2f(urand(-1.0, 1.0));
    prev_sad = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    one_check(0.3, 0.01, 1, 0);        // random old matrix: far from converged
    one_check(1e-4, 0.01, 2, 0);       // identity-like to identity-like: converged
    one_check(1e-4, 1e-9, 3, 1);       // not converged, third check hits MAX_ITER
    clear = 1; @(negedge clk); clear = 0;
    checks += 2;
    if (iterations != 0) begin failures++; $display("clear: iterations %0d", iterations); end
    if (sad_new != 0) begin failures++; $display("clear: sad"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fastica_controller: plays the units' done pulses back to the controller and
// checks the phase sequence of three runs: (1) one loop through early
// determination without stop, then convergence; (2) iteration limit reached;
// (3) early determination stop. Also checks the identity matrix written to the
// old weight matrix memory, one start pulse per phase, the conv_clear pulse and
// the early_stop flag.
module tb_fastica_controller;
  import fastica_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  phase_t phase;
  logic busy, done, early_stop, unit_start, conv_clear;
  logic center_done = 0, cov_done = 0, evd_done = 0, whiten_done = 0, oneunit_done = 0;
  logic gs_done = 0, conv_done = 0, converged = 0, max_reached = 0, ed_done = 0, ed_stop = 0, sep_done = 0;
  logic ow_en;
  logic [5:0] ow_addr;
  logic [31:0] ow_wdata;
  int checks = 0, failures = 0;
  phase_t seen [$];
  int owrites;

  fastica_controller dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Unit models: answer each start pulse with a done pulse a few cycles later.
  int conv_count, ed_mode;   // ed_mode: 0 never stop, 1 stop
  int conv_at, max_at;
  always @(posedge clk) if (rst_n) begin
    if (ow_en) begin
      owrites++;
      checks++;
      if (ow_wdata !== ((ow_addr / 8 == ow_addr % 8) ? FP_ONE : FP_ZERO)) begin
        failures++; $display("init W word %0d = %h", ow_addr, ow_wdata);
      end
    end
    if (unit_start) begin
      seen.push_back(phase);
      fork begin
        automatic phase_t ph = phase;
        repeat (3) @(posedge clk);
        #1;
        case (ph)
          PH_CENTER: center_done = 1;  PH_COV: cov_done = 1;  PH_EVD: evd_done = 1;
          PH_WHITEN: whiten_done = 1;  PH_ONEUNIT: oneunit_done = 1;  PH_GS: gs_done = 1;
          PH_CONV: begin
            conv_count++;
            converged = (conv_count == conv_at); max_reached = (conv_count == max_at);
            conv_done = 1;
          end
          PH_EARLY: begin ed_stop = (ed_mode == 1); ed_done = 1; end
          PH_SEPARATE: sep_done = 1;
          default: ;
        endcase
        @(posedge clk); #1;
        {center_done, cov_done, evd_done, whiten_done, oneunit_done, gs_done, conv_done, ed_done, sep_done} = '0;
      end join_none
    end
  end

  task automatic run(input int c_at, input int m_at, input int edm, input phase_t exp_seq [$], input bit exp_early);
    int n_clear = 0;
    seen.delete(); conv_count = 0; conv_at = c_at; max_at = m_at; ed_mode = edm; owrites = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) begin if (conv_clear) n_clear++; @(negedge clk); end
    checks += 4;
    if (seen != exp_seq) begin
      failures++; $write("sequence:"); foreach (seen[i]) $write(" %s", seen[i].name()); $display("");
    end
    if (owrites != 64) begin failures++; $display("OWMM writes %0d", owrites); end
    if (early_stop != exp_early) begin failures++; $display("early_stop %0d", early_stop); end
    if (n_clear != 1) begin failures++; $display("conv_clear pulses %0d", n_clear); end
    @(negedge clk);
  endtask

  initial begin
    phase_t pre [$] = '{PH_CENTER, PH_COV, PH_EVD, PH_WHITEN};
    phase_t loop [$] = '{PH_ONEUNIT, PH_GS, PH_CONV};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (phase != PH_IDLE || busy) failures++;
    run(2, 0, 0, {pre, loop, PH_EARLY, loop, PH_SEPARATE}, 0);
    run(0, 3, 0, {pre, loop, PH_EARLY, loop, PH_EARLY, loop, PH_SEPARATE}, 0);
    run(0, 0, 1, {pre, loop, PH_EARLY, PH_SEPARATE}, 1);
    checks++; if (phase != PH_IDLE || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

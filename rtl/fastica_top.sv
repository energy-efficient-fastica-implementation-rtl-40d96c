// fastica_top: eight-channel FastICA blind source separation engine.
//
// The engine separates N_CH mixed signals of N_SMP samples each into N_CH
// independent components. A host fills the data memory with the 12-bit samples
// (word ch * N_SMP + t, sign-extended) while the engine is idle, pulses start
// with a floating-point convergence threshold, waits for done, and reads the
// separated signals back from the same addresses as IEEE-754 single-precision
// words. Inside, the preprocessing unit (centering unit, covariance unit,
// CORDIC-based EVD processor, whitened data generator) replaces the data by
// whitened data Z in place; the fixed-point iteration unit (four parallel
// one-units, Gram-Schmidt unit, convergence checking unit, early
// determination unit) then refines the weight matrix W, two one-unit passes
// per iteration, until the SAD test passes, MAX_ITER iterations have run or the
// SAD has stopped changing; the separated data generator finally writes
// S = W^T Z. The controller owns the sequence; each memory port is handed to
// the unit of the current phase by the multiplexers below. Memories: data
// memory 2048 x 32 single port, old weight matrix memory (OWMM) 64 x 32 single
// port, new weight matrix memory (NWMM) 64 x 32 dual port, as in the
// document. iterations, converged and early_stop describe the last run.
// Cycle budget at the defaults: about 146k cycles of preprocessing (EVD 89k),
// about 50.3k cycles per iteration, 23k for the separation.
module fastica_top
  import fastica_pkg::*;
#(
  parameter int unsigned N_CH     = 8,
  parameter int unsigned N_SMP    = 256,
  parameter int unsigned MAX_ITER = 300,
  localparam int unsigned AW      = $clog2(N_CH * N_SMP),
  localparam int unsigned WAW     = $clog2(N_CH * N_CH),
  localparam int unsigned CHW     = $clog2(N_CH),
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp32_t         conv_threshold,
  input  logic          host_en,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] iterations,
  output logic          converged,
  output logic          early_stop
);
  phase_t phase;
  logic   unit_start, conv_clear;

  // ---------------- memories ----------------
  logic          dm_en, dm_we;
  logic [AW-1:0] dm_addr;
  logic [31:0]   dm_wdata, dm_rdata;
  logic           ow_en, ow_we;
  logic [WAW-1:0] ow_addr;
  fp32_t          ow_wdata, ow_rdata;
  logic           nw_wen, nw_ren;
  logic [WAW-1:0] nw_waddr, nw_raddr;
  fp32_t          nw_wdata, nw_rdata;

  data_memory #(.DEPTH(N_CH * N_SMP)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata));
  owmm #(.DEPTH(N_CH * N_CH)) u_owmm (
    .clk, .en(ow_en), .we(ow_we), .addr(ow_addr), .wdata(ow_wdata), .rdata(ow_rdata));
  nwmm #(.DEPTH(N_CH * N_CH)) u_nwmm (
    .clk, .wa_en(nw_wen), .wa_addr(nw_waddr), .wa_data(nw_wdata),
    .rb_en(nw_ren), .rb_addr(nw_raddr), .rb_data(nw_rdata));

  assign host_rdata = dm_rdata;

  // ---------------- controller ----------------
  logic center_done, cov_done, evd_done, whiten_done, ou_done, gs_done;
  logic cc_done, cc_conv, cc_max, ed_done, ed_stop, sep_done;
  logic           ctl_ow_en;
  logic [WAW-1:0] ctl_ow_addr;
  fp32_t          ctl_ow_wdata;

  fastica_controller #(.N(N_CH)) u_ctrl (
    .clk, .rst_n, .start, .phase, .busy, .done, .early_stop, .unit_start, .conv_clear,
    .center_done, .cov_done, .evd_done, .whiten_done, .oneunit_done(ou_done),
    .gs_done, .conv_done(cc_done), .converged(cc_conv), .max_reached(cc_max),
    .ed_done, .ed_stop, .sep_done,
    .ow_en(ctl_ow_en), .ow_addr(ctl_ow_addr), .ow_wdata(ctl_ow_wdata));

  // ---------------- preprocessing unit ----------------
  logic          ce_en, ce_we;
  logic [AW-1:0] ce_addr;
  logic [31:0]   ce_wdata;
  centering_unit #(.N_CH(N_CH), .N_SMP(N_SMP)) u_center (
    .clk, .rst_n, .start(unit_start && phase == PH_CENTER), .done(center_done),
    .mem_en(ce_en), .mem_we(ce_we), .mem_addr(ce_addr), .mem_wdata(ce_wdata),
    .mem_rdata(dm_rdata));

  logic              cv_en, cv_valid;
  logic [AW-1:0]     cv_addr;
  logic [CHW-1:0]    cv_p, cv_q;
  logic signed [23:0] cv_data;
  fp32_t             cv_float;
  covariance_unit #(.N_CH(N_CH), .N_SMP(N_SMP)) u_cov (
    .clk, .rst_n, .start(unit_start && phase == PH_COV), .done(cov_done),
    .mem_en(cv_en), .mem_addr(cv_addr), .mem_rdata(dm_rdata),
    .cov_valid(cv_valid), .cov_p(cv_p), .cov_q(cv_q), .cov_data(cv_data));

  fixed_to_float #(.W(24)) u_conv2 (.fixed_in(cv_data), .float_out(cv_float));

  fp32_t eig_val [N_CH];
  fp32_t eig_vec [N_CH][N_CH];
  logic  evd_busy;
  evd_processor #(.N(N_CH)) u_evd (
    .clk, .rst_n, .ld_en(cv_valid), .ld_row(cv_p), .ld_col(cv_q), .ld_data(cv_float),
    .start(unit_start && phase == PH_EVD), .busy(evd_busy), .done(evd_done),
    .eig_val, .eig_vec);

  logic          wh_en, wh_we, wh_busy;
  logic [AW-1:0] wh_addr;
  logic [31:0]   wh_wdata;
  fp32_t         p_mat [N_CH][N_CH];
  whitened_data_generator #(.N(N_CH), .N_SMP(N_SMP)) u_whiten (
    .clk, .rst_n, .start(unit_start && phase == PH_WHITEN), .eig_val, .eig_vec,
    .busy(wh_busy), .done(whiten_done),
    .mem_en(wh_en), .mem_we(wh_we), .mem_addr(wh_addr), .mem_wdata(wh_wdata),
    .mem_rdata(dm_rdata), .p_mat);

  // ---------------- fixed-point iteration unit ----------------
  logic           ou_en, ou_busy, ou_ow_en, ou_nw_en;
  logic [AW-1:0]  ou_addr;
  logic [WAW-1:0] ou_ow_addr, ou_nw_addr;
  fp32_t          ou_nw_wdata;
  four_parallel_one_units #(.N(N_CH), .N_SMP(N_SMP)) u_units (
    .clk, .rst_n, .start(unit_start && phase == PH_ONEUNIT), .busy(ou_busy), .done(ou_done),
    .mem_en(ou_en), .mem_addr(ou_addr), .mem_rdata(dm_rdata),
    .ow_en(ou_ow_en), .ow_addr(ou_ow_addr), .ow_rdata(ow_rdata),
    .nw_en(ou_nw_en), .nw_addr(ou_nw_addr), .nw_wdata(ou_nw_wdata));

  logic           gs_busy, gs_wen, gs_ren;
  logic [WAW-1:0] gs_waddr, gs_raddr;
  fp32_t          gs_wdata;
  gram_schmidt_unit #(.N(N_CH)) u_gs (
    .clk, .rst_n, .start(unit_start && phase == PH_GS), .busy(gs_busy), .done(gs_done),
    .nw_wen(gs_wen), .nw_waddr(gs_waddr), .nw_wdata(gs_wdata),
    .nw_ren(gs_ren), .nw_raddr(gs_raddr), .nw_rdata(nw_rdata));

  logic           cc_busy, cc_ow_en, cc_ow_we, cc_nw_ren;
  logic [WAW-1:0] cc_ow_addr, cc_nw_raddr;
  fp32_t          cc_ow_wdata, sad_new, sad_old;
  convergence_check_unit #(.N(N_CH), .MAX_ITER(MAX_ITER)) u_conv (
    .clk, .rst_n, .clear(conv_clear), .start(unit_start && phase == PH_CONV),
    .conv_threshold, .busy(cc_busy), .done(cc_done), .sad_new, .sad_old,
    .converged(cc_conv), .max_reached(cc_max), .iterations,
    .ow_en(cc_ow_en), .ow_we(cc_ow_we), .ow_addr(cc_ow_addr), .ow_wdata(cc_ow_wdata),
    .ow_rdata(ow_rdata), .nw_ren(cc_nw_ren), .nw_raddr(cc_nw_raddr), .nw_rdata(nw_rdata));
  assign converged = cc_conv;

  fp32_t dv1, dv2;
  early_determination_unit u_early (
    .clk, .rst_n, .eval(unit_start && phase == PH_EARLY), .conv_threshold,
    .sad_old, .sad_new, .done(ed_done), .stop(ed_stop), .dv1, .dv2);

  logic           sp_busy, sp_ow_en, sp_en, sp_we;
  logic [WAW-1:0] sp_ow_addr;
  logic [AW-1:0]  sp_addr;
  logic [31:0]    sp_wdata;
  separated_data_generator #(.N(N_CH), .N_SMP(N_SMP)) u_sep (
    .clk, .rst_n, .start(unit_start && phase == PH_SEPARATE), .busy(sp_busy), .done(sep_done),
    .ow_en(sp_ow_en), .ow_addr(sp_ow_addr), .ow_rdata(ow_rdata),
    .mem_en(sp_en), .mem_we(sp_we), .mem_addr(sp_addr), .mem_wdata(sp_wdata),
    .mem_rdata(dm_rdata));

  // ---------------- memory port multiplexers ----------------
  always_comb begin
    dm_en = 1'b0; dm_we = 1'b0; dm_addr = '0; dm_wdata = '0;
    unique case (phase)
      PH_IDLE:     begin dm_en = host_en; dm_we = host_we; dm_addr = host_addr; dm_wdata = host_wdata; end
      PH_CENTER:   begin dm_en = ce_en; dm_we = ce_we; dm_addr = ce_addr; dm_wdata = ce_wdata; end
      PH_COV:      begin dm_en = cv_en; dm_addr = cv_addr; end
      PH_WHITEN:   begin dm_en = wh_en; dm_we = wh_we; dm_addr = wh_addr; dm_wdata = wh_wdata; end
      PH_ONEUNIT:  begin dm_en = ou_en; dm_addr = ou_addr; end
      PH_SEPARATE: begin dm_en = sp_en; dm_we = sp_we; dm_addr = sp_addr; dm_wdata = sp_wdata; end
      default: ;
    endcase

    ow_en = 1'b0; ow_we = 1'b0; ow_addr = '0; ow_wdata = FP_ZERO;
    unique case (phase)
      PH_INIT_W:   begin ow_en = ctl_ow_en; ow_we = 1'b1; ow_addr = ctl_ow_addr; ow_wdata = ctl_ow_wdata; end
      PH_ONEUNIT:  begin ow_en = ou_ow_en; ow_addr = ou_ow_addr; end
      PH_CONV:     begin ow_en = cc_ow_en; ow_we = cc_ow_we; ow_addr = cc_ow_addr; ow_wdata = cc_ow_wdata; end
      PH_SEPARATE: begin ow_en = sp_ow_en; ow_addr = sp_ow_addr; end
      default: ;
    endcase

    nw_wen = 1'b0; nw_waddr = '0; nw_wdata = FP_ZERO;
    nw_ren = 1'b0; nw_raddr = '0;
    unique case (phase)
      PH_ONEUNIT: begin nw_wen = ou_nw_en; nw_waddr = ou_nw_addr; nw_wdata = ou_nw_wdata; end
      PH_GS: begin
        nw_wen = gs_wen; nw_waddr = gs_waddr; nw_wdata = gs_wdata;
        nw_ren = gs_ren; nw_raddr = gs_raddr;
      end
      PH_CONV: begin nw_ren = cc_nw_ren; nw_raddr = cc_nw_raddr; end
      default: ;
    endcase
  end
endmodule

// four_parallel_one_units: N_UNITS one-units working in lock-step on N_UNITS
// weight vectors at a time, N / N_UNITS passes per FastICA iteration.
//
// One pass: the old vectors 4j .. 4j+3 are read from the old weight matrix
// memory (one word per cycle, one cycle latency) into the units; the units are
// started together and, having data-independent timing, issue the same
// data-memory request every cycle, so unit 0 drives the memory and its read
// data is broadcast to all four; when they finish, the four new vectors are
// written into the new weight matrix memory (one word per cycle). With N = 8
// this is the document's "four one-unit operations by two loops". Timing per
// pass: N_UNITS * N + 1 load cycles, the one-unit time, N_UNITS * N write
// cycles; done pulses once after the last pass. An assertion checks that the
// units' memory requests stay identical; it is disabled while rst_n is low,
// which makes lint report rst_n as used both as an asynchronous reset and as a
// synchronous signal. That second use is only the assertion's disable and
// builds no logic, so the warning is expected. Unrolling by four and the sharing of
// the data memory follow the document; the load/write schedule is this
// design's. Per pass: one-unit time + 2 * N_UNITS * N + 2 cycles; 49,316
// cycles for both passes at the defaults.
module four_parallel_one_units
  import fastica_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned N_SMP   = 256,
  parameter int unsigned N_UNITS = 4,
  localparam int unsigned AW     = $clog2(N * N_SMP),
  localparam int unsigned WAW    = $clog2(N * N),
  localparam int unsigned NW     = $clog2(N),
  localparam int unsigned UW     = $clog2(N_UNITS),
  localparam int unsigned PASSES = N / N_UNITS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // data memory, read only
  output logic           mem_en,
  output logic [AW-1:0]  mem_addr,
  input  logic [31:0]    mem_rdata,
  // old weight matrix memory, read only
  output logic           ow_en,
  output logic [WAW-1:0] ow_addr,
  input  fp32_t          ow_rdata,
  // new weight matrix memory, write only
  output logic           nw_en,
  output logic [WAW-1:0] nw_addr,
  output fp32_t          nw_wdata
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN, STORE} state_t;
  state_t state;

  logic [$clog2(PASSES+1)-1:0] pass;
  logic [UW+NW:0]  cnt;             // word counter within a pass
  logic            ld_vld;
  logic [UW+NW-1:0] ld_cnt;

  logic [N_UNITS-1:0] u_busy, u_done, u_mem_en;
  logic [AW-1:0]      u_mem_addr [N_UNITS];
  fp32_t              u_wplus    [N_UNITS][N];
  logic               u_start;

  assign u_start = (state == LOAD) && ld_vld && (ld_cnt == (UW+NW)'(N_UNITS * N - 1));

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    one_unit #(.N(N), .N_SMP(N_SMP)) u_one (
      .clk, .rst_n,
      .w_ld_en(ld_vld && ld_cnt[UW+NW-1:NW] == UW'(u)),
      .w_ld_idx(ld_cnt[NW-1:0]),
      .w_ld_data(ow_rdata),
      .start(u_start),
      .busy(u_busy[u]), .done(u_done[u]),
      .mem_en(u_mem_en[u]), .mem_addr(u_mem_addr[u]),
      .mem_rdata(mem_rdata),
      .wplus(u_wplus[u])
    );
    if (u > 0) begin : g_chk
      a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
        (u_mem_en[u] == u_mem_en[0]) && (!u_mem_en[0] || u_mem_addr[u] == u_mem_addr[0]))
        else $error("one-unit %0d left lock-step", u);
    end
  end

  assign mem_en   = u_mem_en[0];
  assign mem_addr = u_mem_addr[0];
  assign busy     = (state != IDLE);

  always_comb begin
    ow_en    = (state == LOAD) && (cnt < (UW+NW+1)'(N_UNITS * N));
    ow_addr  = WAW'(32'(pass) * N_UNITS * N + 32'(cnt));
    nw_en    = (state == STORE);
    nw_addr  = WAW'(32'(pass) * N_UNITS * N + 32'(cnt));
    nw_wdata = u_wplus[cnt[UW+NW-1:NW]][cnt[NW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      pass   <= '0;
      cnt    <= '0;
      ld_vld <= 1'b0;
      ld_cnt <= '0;
      done   <= 1'b0;
    end else begin
      done   <= 1'b0;
      ld_vld <= ow_en;
      ld_cnt <= cnt[UW+NW-1:0];
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD; pass <= '0; cnt <= '0;
        end
        LOAD: begin
          if (ow_en) cnt <= cnt + 1'b1;
          if (u_start) state <= RUN;
        end
        RUN: if (u_done[0]) begin
          state <= STORE;
          cnt   <= '0;
        end
        STORE: begin
          cnt <= cnt + 1'b1;
          if (cnt == (UW+NW+1)'(N_UNITS * N - 1)) begin
            cnt <= '0;
            if (pass == ($bits(pass))'(PASSES - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              pass  <= pass + 1'b1;
              state <= LOAD;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

// separated_data_generator: produces the separated signals S = W^T Z.
//
// The final weight vectors w_0 .. w_{N-1} are read from the old weight matrix
// memory (address = vector * N + element, one word per cycle, one cycle
// latency) into a register matrix whose row i is w_i, so that
// s_i(t) = w_i^T z(t). The floating-point whitened data in the data memory are
// then transformed in place, sample by sample (column_transform with
// floating-point input): after done, data-memory word i * N_SMP + t holds
// s_i(t) in IEEE-754 single precision. Timing: N * N + 1 load cycles, then
// the column_transform time (22,528 cycles at the defaults). The unit's place
// at the end of the flow and the in-place result follow the document; the
// loading scheme is this design's.
module separated_data_generator
  import fastica_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned N_SMP = 256,
  localparam int unsigned AW   = $clog2(N * N_SMP),
  localparam int unsigned WAW  = $clog2(N * N),
  localparam int unsigned NW   = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           ow_en,
  output logic [WAW-1:0] ow_addr,
  input  fp32_t          ow_rdata,
  output logic           mem_en,
  output logic           mem_we,
  output logic [AW-1:0]  mem_addr,
  output logic [31:0]    mem_wdata,
  input  logic [31:0]    mem_rdata
);
  typedef enum logic [1:0] {IDLE, LOAD, XFORM} state_t;
  state_t state;

  fp32_t          wt [N][N];
  logic [WAW:0]   cnt;
  logic           rd_vld;
  logic [WAW-1:0] rd_a;
  logic           ct_start, ct_busy, ct_done;

  column_transform #(.N(N), .N_SMP(N_SMP), .FIXED_IN(1'b0), .X_W(18)) u_xform (
    .clk, .rst_n, .start(ct_start), .m(wt), .busy(ct_busy), .done(ct_done),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  assign ow_en    = (state == LOAD) && (cnt < (WAW+1)'(N * N));
  assign ow_addr  = cnt[WAW-1:0];
  assign ct_start = (state == LOAD) && (cnt == (WAW+1)'(N * N));
  assign busy     = (state != IDLE) || ct_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt <= '0; rd_vld <= 1'b0; rd_a <= '0;
      done <= 1'b0;
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) wt[a][b] <= FP_ZERO;
    end else begin
      done   <= 1'b0;
      rd_vld <= ow_en;
      rd_a   <= cnt[WAW-1:0];
      if (rd_vld) wt[rd_a[WAW-1:NW]][rd_a[NW-1:0]] <= ow_rdata;
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD; cnt <= '0;
        end
        LOAD: begin
          cnt <= cnt + 1'b1;
          if (ct_start) state <= XFORM;
        end
        XFORM: if (ct_done) begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

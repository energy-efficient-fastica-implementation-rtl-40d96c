// column_transform: in-place matrix-times-column transform of the data memory,
// out(t) = M * in(t) for every sample t, where in(t) is the column of N words
// at addresses j * N_SMP + t (j = 0..N-1).
//
// Shared by the whitened data generator (M = P, input = centered 18-bit integers,
// FIXED_IN = 1, converted to floating point on the way in) and the separated
// data generator (M = W^T, floating-point input, FIXED_IN = 0). For one sample
// the unit computes the N outputs one after the other with one floating-point
// multiplier and one adder, re-reading the column from the single-port memory
// for each output (one read per cycle, the product accumulated one cycle
// later), keeps the N results in a small output buffer, and only then writes
// them over the column, so no input is overwritten before its last use.
// Timing: N_SMP * (N * (N + 2) + N) cycles from start to the done pulse
// (22,528 at N = 8, N_SMP = 256). The output buffer is this design's choice; the
// multiply-accumulate datapath follows Block 4 of the preprocessing unit.
module column_transform
  import fastica_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned N_SMP    = 256,
  parameter bit          FIXED_IN = 1'b1,
  parameter int unsigned X_W      = 18,
  localparam int unsigned AW      = $clog2(N * N_SMP),
  localparam int unsigned NW      = $clog2(N),
  localparam int unsigned SW      = $clog2(N_SMP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp32_t         m [N][N],
  output logic          busy,
  output logic          done,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);
  typedef enum logic [2:0] {IDLE, RD, DRAIN, STORE, WR} state_t;
  state_t state;

  logic [NW-1:0] i, j, rd_j;
  logic [SW-1:0] t;
  logic          rd_vld;
  fp32_t         acc;
  fp32_t         zbuf [N];
  fp32_t         xin, conv;

  fixed_to_float #(.W(X_W)) u_conv (.fixed_in(mem_rdata[X_W-1:0]), .float_out(conv));
  assign xin = FIXED_IN ? conv : mem_rdata;

  assign busy = (state != IDLE);

  always_comb begin
    mem_en    = (state == RD) || (state == WR);
    mem_we    = (state == WR);
    mem_addr  = AW'(32'(j) * N_SMP + 32'(t));
    mem_wdata = zbuf[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      i <= '0; j <= '0; t <= '0; rd_j <= '0;
      rd_vld <= 1'b0;
      acc    <= FP_ZERO;
      done   <= 1'b0;
      for (int n = 0; n < N; n++) zbuf[n] <= FP_ZERO;
    end else begin
      done   <= 1'b0;
      rd_vld <= (state == RD);
      rd_j   <= j;
      if (rd_vld)
        acc <= fp_add((rd_j == '0) ? FP_ZERO : acc, fp_mul(m[i][rd_j], xin));
      unique case (state)
        IDLE: if (start) begin
          state <= RD; i <= '0; j <= '0; t <= '0;
        end
        RD: begin
          j <= j + 1'b1;
          if (j == NW'(N - 1)) state <= DRAIN;
        end
        DRAIN: state <= STORE;
        STORE: begin
          zbuf[i] <= acc;
          j       <= '0;
          if (i == NW'(N - 1)) begin
            i     <= '0;
            state <= WR;
          end else begin
            i     <= i + 1'b1;
            state <= RD;
          end
        end
        WR: begin
          j <= j + 1'b1;
          if (j == NW'(N - 1)) begin
            t <= t + 1'b1;
            state <= RD;
            if (t == SW'(N_SMP - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

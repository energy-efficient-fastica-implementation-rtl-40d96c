// covariance_unit: covariance matrix of the centered data (Block 2 of the
// preprocessing unit).
//
// Because the covariance matrix is symmetric, only the 36 elements with p <= q
// are computed, row by row (p = 0..7, q = p..7). For one element the unit
// accumulates x_p(i) * x_q(i) over the N_SMP samples with one multiplier and
// one accumulator, then divides by N_SMP with an arithmetic right shift. The
// single-port data memory delivers one word per cycle, so each product takes
// three cycles: read x_p(i), read x_q(i), multiply-accumulate. Each finished
// element leaves on cov_data (C_W-bit two's complement, saturated) with
// cov_valid high for one cycle and its indices on cov_p / cov_q; done pulses
// after the last one. Timing: 36 * (3 * N_SMP + 1) cycles after start. The
// element order, the three-cycle product, the >>8 and the 24-bit output width
// (converter 2's input) follow the document; saturation is this design's
// choice (12-bit inputs can reach 2^24, one past the 24-bit range).
module covariance_unit
  import fastica_pkg::*;
#(
  parameter int unsigned N_CH  = 8,
  parameter int unsigned N_SMP = 256,
  parameter int unsigned X_W   = 18,
  parameter int unsigned C_W   = 24,
  localparam int unsigned AW   = $clog2(N_CH * N_SMP),
  localparam int unsigned SW   = $clog2(N_SMP),
  localparam int unsigned CHW  = $clog2(N_CH),
  localparam int unsigned ACW  = 2 * X_W + SW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  done,
  output logic                  mem_en,
  output logic [AW-1:0]         mem_addr,
  input  logic [31:0]           mem_rdata,
  output logic                  cov_valid,
  output logic [CHW-1:0]        cov_p,
  output logic [CHW-1:0]        cov_q,
  output logic signed [C_W-1:0] cov_data
);
  typedef enum logic [2:0] {IDLE, RD_P, RD_Q, MAC, OUT} state_t;
  state_t state;

  logic [CHW-1:0]          p, q;
  logic [SW-1:0]           idx;
  logic signed [X_W-1:0]   xp;
  logic signed [ACW-1:0]   acc, mean;
  localparam logic signed [ACW-1:0] CMAX = ACW'((64'sd1 <<< (C_W - 1)) - 1);
  localparam logic signed [ACW-1:0] CMIN = -ACW'(64'sd1 <<< (C_W - 1));

  assign mean = acc >>> SW;

  always_comb begin
    mem_en   = (state == RD_P) || (state == RD_Q);
    mem_addr = AW'(32'((state == RD_Q) ? q : p) * N_SMP + 32'(idx));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      p         <= '0;
      q         <= '0;
      idx       <= '0;
      acc       <= '0;
      xp        <= '0;
      done      <= 1'b0;
      cov_valid <= 1'b0;
      cov_p     <= '0;
      cov_q     <= '0;
      cov_data  <= '0;
    end else begin
      done      <= 1'b0;
      cov_valid <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= RD_P; p <= '0; q <= '0; idx <= '0; acc <= '0;
        end
        RD_P: state <= RD_Q;
        RD_Q: begin
          xp    <= mem_rdata[X_W-1:0];
          state <= MAC;
        end
        MAC: begin
          acc <= acc + ACW'(xp * $signed(mem_rdata[X_W-1:0]));
          idx <= idx + 1'b1;
          state <= (idx == SW'(N_SMP - 1)) ? OUT : RD_P;
        end
        OUT: begin
          cov_valid <= 1'b1;
          cov_p     <= p;
          cov_q     <= q;
          cov_data  <= (mean > CMAX) ? C_W'(CMAX) : (mean < CMIN) ? C_W'(CMIN) : C_W'(mean);
          acc       <= '0;
          state     <= RD_P;
          if (q == CHW'(N_CH - 1)) begin
            if (p == CHW'(N_CH - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              p <= p + 1'b1;
              q <= p + 1'b1;
            end
          end else begin
            q <= q + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

// convergence_check_unit: sum of absolute dot-products (SAD) between the old
// and the new weight vectors, convergence test and iteration count.
//
//   SAD = sum_k | w_k(old)^T w_k(new) |,   k = 0 .. N-1
// A converged vector keeps its direction, so each term approaches 1 and SAD
// approaches N. The unit declares convergence when N - SAD < conv_threshold,
// and max_reached when this is the MAX_ITER-th check since clear. While it reads
// each word pair it also writes the new word over the old one in the old weight
// matrix memory (OWMM), so after the check OWMM holds the vectors the next
// iteration starts from and that the separated data generator uses. Per word:
// read both memories, multiply-accumulate, write OWMM (3 cycles); 3 * N * N + 2
// cycles from start to the done pulse. sad_new is this check's SAD and
// sad_old the previous check's (0 after clear), for the early determination
// unit. The SAD definition, the threshold comparison and the 300-iteration
// limit follow the document; the form N - SAD < threshold, the copy into OWMM
// and the schedule are this design's choices.
module convergence_check_unit
  import fastica_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned MAX_ITER = 300,
  localparam int unsigned WAW     = $clog2(N * N),
  localparam int unsigned IW      = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           start,
  input  fp32_t          conv_threshold,
  output logic           busy,
  output logic           done,
  output fp32_t          sad_new,
  output fp32_t          sad_old,
  output logic           converged,
  output logic           max_reached,
  output logic [IW-1:0]  iterations,
  // OWMM, single port
  output logic           ow_en,
  output logic           ow_we,
  output logic [WAW-1:0] ow_addr,
  output fp32_t          ow_wdata,
  input  fp32_t          ow_rdata,
  // NWMM read port
  output logic           nw_ren,
  output logic [WAW-1:0] nw_raddr,
  input  fp32_t          nw_rdata
);
  typedef enum logic [2:0] {IDLE, RD, MAC, WR, EVAL} state_t;
  state_t state;

  logic [WAW-1:0] a;
  fp32_t dot, dot_nx, nbuf, sad;

  assign busy     = (state != IDLE);
  assign ow_en    = (state == RD) || (state == WR);
  assign ow_we    = (state == WR);
  assign ow_addr  = a;
  assign ow_wdata = nbuf;
  assign nw_ren   = (state == RD);
  assign nw_raddr = a;
  assign dot_nx   = fp_add((a[$clog2(N)-1:0] == '0) ? FP_ZERO : dot, fp_mul(ow_rdata, nw_rdata));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a <= '0;
      dot <= FP_ZERO; nbuf <= FP_ZERO; sad <= FP_ZERO;
      sad_new <= FP_ZERO; sad_old <= FP_ZERO;
      converged <= 1'b0; max_reached <= 1'b0; iterations <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        sad_new <= FP_ZERO;
        sad_old <= FP_ZERO;
        iterations  <= '0;
        converged   <= 1'b0;
        max_reached <= 1'b0;
      end
      unique case (state)
        IDLE: if (start) begin
          state <= RD; a <= '0; sad <= FP_ZERO;
        end
        RD: state <= MAC;
        MAC: begin
          dot  <= dot_nx;
          nbuf <= nw_rdata;
          if (a[$clog2(N)-1:0] == ($clog2(N))'(N - 1)) sad <= fp_add(sad, fp_abs(dot_nx));
          state <= WR;
        end
        WR: begin
          a <= a + 1'b1;
          state <= (a == WAW'(N * N - 1)) ? EVAL : RD;
        end
        EVAL: begin
          sad_old     <= sad_new;
          sad_new     <= sad;
          converged   <= fp_lt(fp_sub(fp_from_int(32'(N)), sad), conv_threshold);
          iterations  <= iterations + 1'b1;
          max_reached <= (iterations + 1'b1 == IW'(MAX_ITER));
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

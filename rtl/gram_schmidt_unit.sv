// gram_schmidt_unit: sequential Gram-Schmidt orthonormalization of the N new
// weight vectors held in the new weight matrix memory (NWMM).
//
// For k = 0 .. N-1 the unit loads vector w_k into a working register v, then for
// every earlier (already orthonormal) vector w_j, j < k, reads w_j into a buffer
// while accumulating d = v^T w_j, and subtracts d * w_j from v. It then forms
// |v|^2, takes its inverse square root, scales v to unit length and writes it
// back over w_k. Each step uses one floating-point multiplier and one adder.
// The projection uses the partly orthogonalized v (modified Gram-Schmidt), which
// equals the document's formula in exact arithmetic and is the more robust
// order. NWMM port A writes, port B reads with one cycle latency. Timing: per
// vector (N + 1) load, k * (2N + 1) projection, N + inverse square root
// (NR_STEPS + 3) + N scaling and N write cycles; done pulses once at the end.
// Sequential processing of all vectors and the normalisation follow the
// document; the schedule and the modified order are this design's choices.
module gram_schmidt_unit
  import fastica_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned WAW = $clog2(N * N),
  localparam int unsigned NW  = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           nw_wen,
  output logic [WAW-1:0] nw_waddr,
  output fp32_t          nw_wdata,
  output logic           nw_ren,
  output logic [WAW-1:0] nw_raddr,
  input  fp32_t          nw_rdata
);
  typedef enum logic [3:0] {IDLE, LDV, LDW, SUBV, NORM, ISQ_GO, ISQ_WAIT, SCALE, WR} state_t;
  state_t state;

  fp32_t v [N];
  fp32_t wb [N];
  fp32_t acc, inv;
  logic [NW-1:0] k, jv;
  logic [NW:0]   cnt;
  logic          rd_vld;
  logic [NW-1:0] rd_e;

  logic  isq_start, isq_busy, isq_done;
  fp32_t isq_y;

  inv_sqrt u_isq (.clk, .rst_n, .start(isq_start), .x(acc), .busy(isq_busy),
                  .done(isq_done), .y(isq_y));

  assign isq_start = (state == ISQ_GO);
  assign busy      = (state != IDLE);

  always_comb begin
    nw_ren   = ((state == LDV) || (state == LDW)) && (cnt < (NW+1)'(N));
    nw_raddr = WAW'(32'((state == LDV) ? k : jv) * N + 32'(cnt));
    nw_wen   = (state == WR);
    nw_waddr = WAW'(32'(k) * N + 32'(cnt));
    nw_wdata = v[cnt[NW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k <= '0; jv <= '0; cnt <= '0; rd_vld <= 1'b0; rd_e <= '0;
      acc <= FP_ZERO; inv <= FP_ZERO;
      done <= 1'b0;
      for (int n = 0; n < N; n++) begin
        v[n]  <= FP_ZERO;
        wb[n] <= FP_ZERO;
      end
    end else begin
      done   <= 1'b0;
      rd_vld <= nw_ren;
      rd_e   <= cnt[NW-1:0];
      unique case (state)
        IDLE: if (start) begin
          state <= LDV; k <= '0; cnt <= '0;
        end
        LDV: begin
          if (rd_vld) v[rd_e] <= nw_rdata;
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N)) begin
            cnt <= '0;
            jv  <= '0;
            state <= (k == '0) ? NORM : LDW;
          end
        end
        LDW: begin
          if (rd_vld) begin
            wb[rd_e] <= nw_rdata;
            acc <= fp_add((rd_e == '0) ? FP_ZERO : acc, fp_mul(v[rd_e], nw_rdata));
          end
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N)) begin
            cnt   <= '0;
            state <= SUBV;
          end
        end
        SUBV: begin
          v[cnt[NW-1:0]] <= fp_sub(v[cnt[NW-1:0]], fp_mul(acc, wb[cnt[NW-1:0]]));
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N - 1)) begin
            cnt <= '0;
            jv  <= jv + 1'b1;
            state <= (jv + 1'b1 == k) ? NORM : LDW;
          end
        end
        NORM: begin
          acc <= fp_add((cnt == '0) ? FP_ZERO : acc, fp_mul(v[cnt[NW-1:0]], v[cnt[NW-1:0]]));
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N - 1)) state <= ISQ_GO;
        end
        ISQ_GO: state <= ISQ_WAIT;
        ISQ_WAIT: if (isq_done) begin
          inv   <= isq_y;
          cnt   <= '0;
          state <= SCALE;
        end
        SCALE: begin
          v[cnt[NW-1:0]] <= fp_mul(v[cnt[NW-1:0]], inv);
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N - 1)) begin
            cnt   <= '0;
            state <= WR;
          end
        end
        WR: begin
          cnt <= cnt + 1'b1;
          if (cnt == (NW+1)'(N - 1)) begin
            cnt <= '0;
            if (k == NW'(N - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              k     <= k + 1'b1;
              state <= LDV;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

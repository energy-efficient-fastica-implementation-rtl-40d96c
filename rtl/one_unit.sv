// one_unit: hardware-reused FastICA one-unit, one floating-point multiplier
// and one adder computing
//   w+ = sum_i z_i tanh(w^T z_i) - (N_SMP - sum_i tanh^2(w^T z_i)) w
// (the expectations of the FastICA update without the common 1/N_SMP factor,
// which the later normalisation removes).
// The old vector w is loaded element by element through w_ld_* while the unit
// is idle. After start, element m = 0..N-1 of w+ is produced by a pass over all
// N_SMP whitened samples z_i (data memory word j * N_SMP + i holds element j of
// z_i, read with one cycle latency):
//   R1 = w^T z_i        N reads in column order, one multiply-add each
//   R2 = tanh(R1)       13-piece linear approximation, one multiply-add
//   R3 += z_m(i) * R2   one read in row order, one multiply-add
//   R4 += R2 * R2       one multiply-add
// then R5 = N_SMP - R4 (separate subtractor) and R_out = R3 - R5 * w_m, which
// is stored as wplus[m]. w^T z_i and tanh are recomputed for every m rather than
// stored, trading time for storage. Timing: N + 4 cycles per sample (N reads
// with the last data arriving one cycle later, tanh, R3, R4), so
// N * (N_SMP * (N + 4) + 2) cycles from start to the done pulse (24,592 at the
// defaults). The memory request (mem_en, mem_addr) does not depend on data, so
// several units started together issue identical requests and can share one
// memory. The step sequence, the registers R1-R5 and R_out and the single
// multiplier and adder follow the document; the cycle schedule is this
// design's.
module one_unit
  import fastica_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned N_SMP = 256,
  localparam int unsigned AW   = $clog2(N * N_SMP),
  localparam int unsigned NW   = $clog2(N),
  localparam int unsigned SW   = $clog2(N_SMP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w_ld_en,
  input  logic [NW-1:0] w_ld_idx,
  input  fp32_t         w_ld_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          mem_en,
  output logic [AW-1:0] mem_addr,
  input  logic [31:0]   mem_rdata,
  output fp32_t         wplus [N]
);
  typedef enum logic [2:0] {IDLE, RD, TANH, ACC3, ACC4, SUB5, OUT} state_t;
  state_t state;

  fp32_t w [N];                      // w_1(t-1) .. w_N(t-1)
  fp32_t r1, r2, r3, r4, r5, zm;
  logic [NW:0]   j, rd_j;            // 0..N-1 column reads, N: row read
  logic          rd_vld;
  logic [NW-1:0] m;
  logic [SW-1:0] i;

  // Shared datapath: one multiplier feeding one adder.
  fp32_t mul_a, mul_b, add_a, prod, sum;
  fp32_t ta, tb, ty;

  tanh_pwl u_tanh (.x(r1), .coef_a(ta), .coef_b(tb), .y(ty));

  always_comb begin
    mul_a = FP_ZERO;
    mul_b = FP_ZERO;
    add_a = FP_ZERO;
    if (rd_vld && rd_j != (NW+1)'(N)) begin      // R1 += w_j * z_j(i)
      mul_a = w[rd_j[NW-1:0]];
      mul_b = mem_rdata;
      add_a = (rd_j == '0) ? FP_ZERO : r1;
    end else begin
      unique case (state)
        TANH: begin mul_a = ta; mul_b = r1; add_a = tb; end
        ACC3: begin mul_a = r2; mul_b = zm; add_a = (i == '0) ? FP_ZERO : r3; end
        ACC4: begin mul_a = r2; mul_b = r2; add_a = (i == '0) ? FP_ZERO : r4; end
        OUT:  begin mul_a = fp_neg(r5); mul_b = w[m]; add_a = r3; end
        default: ;
      endcase
    end
    prod = fp_mul(mul_a, mul_b);
    sum  = fp_add(add_a, prod);
  end

  assign busy     = (state != IDLE);
  assign mem_en   = (state == RD);
  assign mem_addr = (j == (NW+1)'(N)) ? AW'(32'(m) * N_SMP + 32'(i))
                                      : AW'(32'(j) * N_SMP + 32'(i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      j <= '0; rd_j <= '0; rd_vld <= 1'b0; m <= '0; i <= '0;
      r1 <= FP_ZERO; r2 <= FP_ZERO; r3 <= FP_ZERO; r4 <= FP_ZERO; r5 <= FP_ZERO;
      zm <= FP_ZERO;
      done <= 1'b0;
      for (int n = 0; n < N; n++) begin
        w[n]     <= FP_ZERO;
        wplus[n] <= FP_ZERO;
      end
    end else begin
      done   <= 1'b0;
      rd_vld <= (state == RD);
      rd_j   <= j;
      if (rd_vld) begin
        if (rd_j == (NW+1)'(N)) zm <= mem_rdata;
        else                    r1 <= sum;
      end
      unique case (state)
        IDLE: begin
          if (w_ld_en) w[w_ld_idx] <= w_ld_data;
          if (start) begin
            state <= RD; j <= '0; m <= '0; i <= '0;
          end
        end
        RD: begin
          j <= j + 1'b1;
          if (j == (NW+1)'(N)) state <= TANH;
        end
        TANH: begin r2 <= sum; state <= ACC3; end
        ACC3: begin r3 <= sum; state <= ACC4; end
        ACC4: begin
          r4 <= sum;
          j  <= '0;
          i  <= i + 1'b1;
          state <= (i == SW'(N_SMP - 1)) ? SUB5 : RD;
        end
        SUB5: begin r5 <= fp_sub(fp_from_int(32'(N_SMP)), r4); state <= OUT; end
        OUT: begin
          wplus[m] <= sum;
          m <= m + 1'b1;
          if (m == NW'(N - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else state <= RD;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

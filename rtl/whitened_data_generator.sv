// whitened_data_generator: whitening matrix and whitened data (Blocks 3 and 4
// of the preprocessing unit).
//
// Block 3 forms the whitening matrix P = D^-1/2 E^T: for each eigenvalue d_i the
// inverse square root unit gives d_i^-1/2, and one multiplier then fills row i
// of P with d_i^-1/2 * e_ji, one element per cycle (P is held in registers).
// Block 4 (column_transform) computes Z = P * Xbar sample by sample: the
// centered 18-bit samples are read from the data memory, converted to floating
// point, multiplied and accumulated, and the whitened column is written back in
// place as IEEE-754 words. Interface: eig_val / eig_vec come from the EVD
// processor and must be stable from start to done; done pulses once when Z is
// in memory. Timing: N * (NR_STEPS + 2 + N + 1) cycles for P, then the
// column_transform time (22,528 cycles at the defaults). The split into the
// two blocks and the data path follow the document; the one-multiplier
// schedule for P is this design's choice.
module whitened_data_generator
  import fastica_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned N_SMP = 256,
  localparam int unsigned AW   = $clog2(N * N_SMP),
  localparam int unsigned NW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp32_t         eig_val [N],
  input  fp32_t         eig_vec [N][N],
  output logic          busy,
  output logic          done,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata,
  output fp32_t         p_mat [N][N]
);
  typedef enum logic [2:0] {IDLE, ISQ_GO, ISQ_WAIT, MULP, XFORM} state_t;
  state_t state;

  logic [NW-1:0] i, j;
  fp32_t         dinv;
  logic          isq_start, isq_busy, isq_done;
  fp32_t         isq_y;
  logic          ct_start, ct_busy, ct_done;

  inv_sqrt u_isq (
    .clk, .rst_n, .start(isq_start), .x(eig_val[i]),
    .busy(isq_busy), .done(isq_done), .y(isq_y)
  );

  column_transform #(.N(N), .N_SMP(N_SMP), .FIXED_IN(1'b1), .X_W(18)) u_block4 (
    .clk, .rst_n, .start(ct_start), .m(p_mat), .busy(ct_busy), .done(ct_done),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  assign isq_start = (state == ISQ_GO);
  assign ct_start  = (state == MULP) && (i == NW'(N - 1)) && (j == NW'(N - 1));
  assign busy      = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      i <= '0; j <= '0;
      dinv  <= FP_ZERO;
      done  <= 1'b0;
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) p_mat[a][b] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= ISQ_GO; i <= '0; j <= '0;
        end
        ISQ_GO: state <= ISQ_WAIT;
        ISQ_WAIT: if (isq_done) begin
          dinv  <= isq_y;
          state <= MULP;
          j     <= '0;
        end
        MULP: begin
          p_mat[i][j] <= fp_mul(dinv, eig_vec[j][i]);
          j <= j + 1'b1;
          if (j == NW'(N - 1)) begin
            if (i == NW'(N - 1)) state <= XFORM;
            else begin
              i     <= i + 1'b1;
              state <= ISQ_GO;
            end
          end
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

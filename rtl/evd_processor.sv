// evd_processor: eigenvalue decomposition of the symmetric covariance matrix by
// the cyclic Jacobi method, using one floating-point CORDIC engine.
//
// Register D holds the working matrix B (initially the covariance matrix, loaded
// element by element through ld_*; a write to (r, c) also writes (c, r)), register
// E the accumulated rotations (set to the identity at start), register theta the
// current rotation angle. Every SWEEPS sweep visits the pairs (p, q), p < q, row
// by row: (0,1), (0,2), ... (0,N-1), (1,2), ... (N-2,N-1). For one pair:
//   1. vectoring: x0 = b_qq - b_pp, y0 = 2 b_pq (exponent + 1), z0 = 0;
//      theta = z_r / 2 (exponent - 1) = 0.5 atan(2 b_pq / (b_qq - b_pp)).
//   2. first rotation, B <- J^T B: for every column k the pair (b_pk, b_qk) is
//      rotated by theta. For k other than p and q, symmetry gives the column
//      entries b_kp, b_kq too, so they are written at the same time.
//   3. second rotation, B <- B J, only for the 2x2 block: the pairs
//      (b_pp, b_pq) and (b_qp, b_qq) are rotated by theta.
//   4. E <- E J: for every row k the pair (e_kp, e_kq) is rotated by theta.
// Each rotation is one CORDIC operation of ITER + 3 cycles (issue, ITER + 2 in
// the engine), so a pair takes (1 + N + 2 + N) * (ITER + 3) cycles and the whole
// decomposition SWEEPS * N(N-1)/2 times that: 8 * 28 * 19 * 21 = 89,376 cycles
// at the defaults. Afterwards eig_val[i] = b_ii (the diagonal of D) and column i of
// eig_vec (E) is the matching eigenvector, C = E diag(eig_val) E^T; done pulses
// once. The method, the vectoring/rotation use of one CORDIC, the reduced second
// rotation, 18 iterations and 8 sweeps follow the document; the exact schedule
// and the load port are this design's.
module evd_processor
  import fastica_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned SWEEPS = 8,
  parameter int unsigned ITER   = 18,
  localparam int unsigned NW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_en,
  input  logic [NW-1:0] ld_row,
  input  logic [NW-1:0] ld_col,
  input  fp32_t         ld_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output fp32_t         eig_val [N],
  output fp32_t         eig_vec [N][N]
);
  typedef enum logic [2:0] {IDLE, VEC, ROW, COL, EVEC} phase_t;
  phase_t phase;
  logic   waiting;           // CORDIC operation in flight

  fp32_t  b [N][N];          // register D
  fp32_t  e [N][N];          // register E
  fp32_t  theta;             // register theta
  logic [NW-1:0] p, q, k;
  logic [$clog2(SWEEPS+1)-1:0] sweep;

  logic  c_start, c_busy, c_done;
  fp32_t c_x0, c_y0, c_z0, c_xr, c_yr, c_zr;
  logic  c_mode;
  logic [NW-1:0] r_sel;      // row used by the second rotation

  assign r_sel = (k == '0) ? p : q;

  always_comb begin
    c_mode = 1'b1;
    c_z0   = theta;
    c_x0   = FP_ZERO;
    c_y0   = FP_ZERO;
    unique case (phase)
      VEC: begin
        c_mode = 1'b0;
        c_z0   = FP_ZERO;
        c_x0   = fp_sub(b[q][q], b[p][p]);
        c_y0   = fp_scale2(b[p][q], 1);
      end
      ROW: begin
        c_x0 = b[p][k];
        c_y0 = b[q][k];
      end
      COL: begin
        c_x0 = b[r_sel][p];
        c_y0 = b[r_sel][q];
      end
      EVEC: begin
        c_x0 = e[k][p];
        c_y0 = e[k][q];
      end
      default: ;
    endcase
  end

  assign c_start = (phase != IDLE) && !waiting;
  assign busy    = (phase != IDLE);

  cordic_engine #(.ITER(ITER)) u_cordic (
    .clk, .rst_n, .start(c_start), .mode(c_mode),
    .x0(c_x0), .y0(c_y0), .z0(c_z0),
    .busy(c_busy), .done(c_done), .xr(c_xr), .yr(c_yr), .zr(c_zr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= IDLE;
      waiting <= 1'b0;
      done    <= 1'b0;
      theta   <= FP_ZERO;
      p <= '0; q <= '0; k <= '0;
      sweep   <= '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          b[i][j] <= FP_ZERO;
          e[i][j] <= (i == j) ? FP_ONE : FP_ZERO;
        end
    end else begin
      done <= 1'b0;
      if (phase == IDLE) begin
        if (ld_en) begin
          b[ld_row][ld_col] <= ld_data;
          b[ld_col][ld_row] <= ld_data;
        end
        if (start) begin
          phase <= VEC;
          p <= '0; q <= NW'(1); k <= '0;
          sweep <= '0;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++)
              e[i][j] <= (i == j) ? FP_ONE : FP_ZERO;
        end
      end else if (!waiting) begin
        waiting <= 1'b1;     // c_start is high this cycle
      end else if (c_done) begin
        waiting <= 1'b0;
        unique case (phase)
          VEC: begin
            theta <= fp_scale2(c_zr, -1);
            phase <= ROW;
            k     <= '0;
          end
          ROW: begin
            b[p][k] <= c_xr;
            b[q][k] <= c_yr;
            if (k != p && k != q) begin
              b[k][p] <= c_xr;
              b[k][q] <= c_yr;
            end
            if (k == NW'(N - 1)) begin
              phase <= COL;
              k     <= '0;
            end else k <= k + 1'b1;
          end
          COL: begin
            b[r_sel][p] <= c_xr;
            b[r_sel][q] <= c_yr;
            if (k == NW'(1)) begin
              phase <= EVEC;
              k     <= '0;
            end else k <= k + 1'b1;
          end
          EVEC: begin
            e[k][p] <= c_xr;
            e[k][q] <= c_yr;
            if (k == NW'(N - 1)) begin
              k     <= '0;
              phase <= VEC;
              if (q == NW'(N - 1)) begin
                if (p == NW'(N - 2)) begin
                  p <= '0;
                  q <= NW'(1);
                  if (sweep == ($bits(sweep))'(SWEEPS - 1)) begin
                    phase <= IDLE;
                    done  <= 1'b1;
                  end
                  sweep <= sweep + 1'b1;
                end else begin
                  p <= p + 1'b1;
                  q <= p + NW'(2);
                end
              end else q <= q + 1'b1;
            end else k <= k + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb
    for (int i = 0; i < N; i++) begin
      eig_val[i] = b[i][i];
      for (int j = 0; j < N; j++) eig_vec[i][j] = e[i][j];
    end
endmodule

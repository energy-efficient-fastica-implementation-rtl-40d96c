// cordic_engine: floating-point CORDIC with vectoring and rotation modes.
//
// One engine serves both modes so that the EVD processor needs a single
// CORDIC. Each of the ITER iterations takes one cycle and uses only
// shift-and-add operations on IEEE-754 numbers: a shift by i is an exponent
// decrement, and the angle step comes from a table of atan(2^-i).
//   Vectoring (mode = CORDIC_VECTOR): y is driven to zero and
//     z_r = z_0 + atan(y_0 / x_0). A negative x_0 is handled by negating x_0
//     and y_0 first, which leaves y_0 / x_0 unchanged.
//   Rotation (mode = CORDIC_ROTATE): z is driven to zero, and (x, y) is
//     rotated by z_0: x_r = x_0 cos z_0 - y_0 sin z_0,
//     y_r = x_0 sin z_0 + y_0 cos z_0.
// The growth of the vector length (K = prod sqrt(1 + 2^-2i), about 1.6468) is
// removed at the output by multiplying x_r and y_r by k = 1/K.
// Interface: pulse start with mode and x0/y0/z0 valid; ITER + 2 cycles later
// done pulses for one cycle with xr/yr/zr valid (they hold until the next
// start). Rotation converges for |z_0| <= 1.74 rad. The two modes in one
// engine, the floating-point data, the gain multipliers k and the 18
// iterations follow the document; the register-per-iteration schedule is this
// design's choice.
module cordic_engine
  import fastica_pkg::*;
#(
  parameter int unsigned ITER = 18
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  mode,        // 0: vectoring, 1: rotation
  input  fp32_t x0,
  input  fp32_t y0,
  input  fp32_t z0,
  output logic  busy,
  output logic  done,
  output fp32_t xr,
  output fp32_t yr,
  output fp32_t zr
);
  localparam logic CORDIC_VECTOR = 1'b0;
  localparam logic CORDIC_ROTATE = 1'b1;

  // 1/K for ITER = 18 (the constant is the same to single precision for any
  // ITER >= 12).
  localparam fp32_t K_INV = 32'h3F1B_74EE;

  // atan(2^-i) in single precision; for i >= 12 atan(2^-i) = 2^-i to 24 bits.
  function automatic fp32_t atan_tab(input int unsigned i);
    case (i)
      0:  return 32'h3F49_0FDB;
      1:  return 32'h3EED_6338;
      2:  return 32'h3E7A_DBB0;
      3:  return 32'h3DFE_ADD5;
      4:  return 32'h3D7F_AADE;
      5:  return 32'h3CFF_EAAE;
      6:  return 32'h3C7F_FAAB;
      7:  return 32'h3BFF_FEAB;
      8:  return 32'h3B7F_FFAB;
      9:  return 32'h3AFF_FFEB;
      10: return 32'h3A7F_FFFB;
      11: return 32'h39FF_FFFF;
      default: return {1'b0, 8'(127 - i), 23'd0};
    endcase
  endfunction

  fp32_t x, y, z;
  logic  md;
  logic [$clog2(ITER+1)-1:0] it;

  fp32_t xs, ys, at;
  logic  dir_pos;      // 1: x -= y*2^-i, y += x*2^-i, z -= atan

  always_comb begin
    xs = fp_scale2(x, -int'(it));
    ys = fp_scale2(y, -int'(it));
    at = atan_tab(32'(it));
    dir_pos = (md == CORDIC_ROTATE) ? !z[31] : y[31];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      x <= FP_ZERO; y <= FP_ZERO; z <= FP_ZERO;
      xr <= FP_ZERO; yr <= FP_ZERO; zr <= FP_ZERO;
      md <= CORDIC_VECTOR;
      it <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        md   <= mode;
        it   <= '0;
        z    <= z0;
        if (mode == CORDIC_VECTOR && x0[31]) begin
          x <= fp_neg(x0);
          y <= fp_neg(y0);
        end else begin
          x <= x0;
          y <= y0;
        end
      end else if (busy) begin
        if (it == ($bits(it))'(ITER)) begin
          busy <= 1'b0;
          done <= 1'b1;
          xr   <= fp_mul(x, K_INV);
          yr   <= fp_mul(y, K_INV);
          zr   <= z;
        end else begin
          it <= it + 1'b1;
          if (dir_pos) begin
            x <= fp_sub(x, ys);
            y <= fp_add(y, xs);
            z <= fp_sub(z, at);
          end else begin
            x <= fp_add(x, ys);
            y <= fp_sub(y, xs);
            z <= fp_add(z, at);
          end
        end
      end
    end
  end
endmodule

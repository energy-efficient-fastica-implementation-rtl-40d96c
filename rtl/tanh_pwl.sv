// tanh_pwl: segment selection of the 13-piece linear approximation of tanh.
//
// tanh(x) is approximated by a*x + b*sign(x) with the seven segments of |x|
// below (the first six are mirrored for negative x, so 13 pieces in all):
//   |x| >= 7        a = 0          b = 1
//   3   <= |x| < 7  a = 0.0006965  b = 0.9959
//   2   <= |x| < 3  a = 0.02922    b = 0.9113
//   1.5 <= |x| < 2  a = 0.1162     b = 0.7358
//   1   <= |x| < 1.5 a = 0.2844    b = 0.4878
//   0.5 <= |x| < 1  a = 0.598      b = 0.1788
//   0   <= |x| < 0.5 a = 0.9533    b = 0
// The unit compares |x| with the breakpoints and returns the segment's slope
// coef_a and the already signed offset coef_b = b * sign(x); the one-unit
// evaluates a*x + b with its shared multiplier and adder, and y gives the same
// value for a stand-alone use. Purely combinational. Breakpoints and
// coefficients are the document's; their single-precision encodings are
// rounded to nearest.
module tanh_pwl
  import fastica_pkg::*;
(
  input  fp32_t x,
  output fp32_t coef_a,
  output fp32_t coef_b,
  output fp32_t y
);
  fp32_t ax, b_mag;

  always_comb begin
    ax = fp_abs(x);
    if (!fp_lt(ax, 32'h40E0_0000)) begin        // 7
      coef_a = FP_ZERO;       b_mag = FP_ONE;
    end else if (!fp_lt(ax, 32'h4040_0000)) begin // 3
      coef_a = 32'h3A36_9553; b_mag = 32'h3F7E_F34D;
    end else if (!fp_lt(ax, 32'h4000_0000)) begin // 2
      coef_a = 32'h3CEF_5EC8; b_mag = 32'h3F69_4AF5;
    end else if (!fp_lt(ax, FP_1P5)) begin
      coef_a = 32'h3DED_FA44; b_mag = 32'h3F3C_5D64;
    end else if (!fp_lt(ax, FP_ONE)) begin
      coef_a = 32'h3E91_9CE0; b_mag = 32'h3EF9_C0EC;
    end else if (!fp_lt(ax, FP_HALF)) begin
      coef_a = 32'h3F19_1687; b_mag = 32'h3E37_1759;
    end else begin
      coef_a = 32'h3F74_0B78; b_mag = FP_ZERO;
    end
    coef_b = x[31] ? fp_neg(b_mag) : b_mag;
    y      = fp_add(fp_mul(coef_a, x), coef_b);
  end
endmodule

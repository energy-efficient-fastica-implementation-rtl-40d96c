// fastica_pkg: types, constants and IEEE-754 single-precision arithmetic shared by
// the FastICA datapath.
//
// The preprocessing back end (covariance conversion, EVD, whitening) and the whole
// fixed-point iteration unit work on 32-bit IEEE-754 single-precision numbers,
// sign / 8-bit biased exponent / 23-bit fraction. The functions below are
// combinational and synthesizable; a module that calls one gets one operator.
// Simplifications chosen for this design: results are truncated, not rounded;
// subnormal inputs and results are flushed to zero; exponent overflow saturates
// to the largest finite magnitude; infinities and NaNs are not produced or
// recognised. The FastICA data never leave the range where these matter.
package fastica_pkg;

  typedef logic [31:0] fp32_t;


  localparam fp32_t FP_ZERO  = 32'h0000_0000;
  localparam fp32_t FP_ONE   = 32'h3F80_0000;
  localparam fp32_t FP_HALF  = 32'h3F00_0000;
  localparam fp32_t FP_1P5   = 32'h3FC0_0000;
  localparam fp32_t FP_256   = 32'h4380_0000;
  localparam fp32_t FP_MILLI = 32'h3A83_126F;   // 0.001, early determination
  localparam fp32_t FP_MAXF  = 32'h7F7F_FFFF;

  // Phases of one separation run, in order (the controller's state).
  typedef enum logic [3:0] {
    PH_IDLE, PH_INIT_W, PH_CENTER, PH_COV, PH_EVD, PH_WHITEN,
    PH_ONEUNIT, PH_GS, PH_CONV, PH_EARLY, PH_SEPARATE
  } phase_t;

  // Memory maps of the data memory (channel-major: address = ch*N_SMP + sample)
  // and of the weight memories (address = vector*N_CH + element).

  function automatic logic fp_sign(input fp32_t a);
    return a[31];
  endfunction

  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return fp_is_zero(a) ? FP_ZERO : {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_abs(input fp32_t a);
    return {1'b0, a[30:0]};
  endfunction

  // a * 2^k for a small signed k (exponent arithmetic only: the CORDIC shift,
  // the doubling of b_pq and the halving of the vectoring angle).
  function automatic fp32_t fp_scale2(input fp32_t a, input int k);
    int e;
    if (fp_is_zero(a)) return FP_ZERO;
    e = int'(a[30:23]) + k;
    if (e <= 0) return FP_ZERO;
    if (e >= 255) return {a[31], FP_MAXF[30:0]};
    return {a[31], 8'(e), a[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    int          e;
    logic [22:0] f;
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      f = p[46:24];
      e = e + 1;
    end else begin
      f = p[45:23];
    end
    if (e <= 0) return FP_ZERO;
    if (e >= 255) return {a[31] ^ b[31], FP_MAXF[30:0]};
    return {a[31] ^ b[31], 8'(e), f};
  endfunction

  // Addition with three guard bits; the larger magnitude sets the exponent.
  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       hi, lo;
    logic [27:0] mb, ms, sum;    // hidden bit + 23 fraction + 3 guard, plus carry
    int          d, e, lz;
    logic        s;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin
      hi = a; lo = b;
    end else begin
      hi = b; lo = a;
    end
    d  = int'(hi[30:23]) - int'(lo[30:23]);
    mb = {1'b0, 1'b1, hi[22:0], 3'b000};
    ms = (d > 26) ? 28'd0 : ({1'b0, 1'b1, lo[22:0], 3'b000} >> d);
    e  = int'(hi[30:23]);
    s  = hi[31];
    if (hi[31] == lo[31]) begin
      sum = mb + ms;
      if (sum[27]) begin
        sum = sum >> 1;
        e   = e + 1;
      end
    end else begin
      sum = mb - ms;
      if (sum == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - lz;
    end
    if (e <= 0) return FP_ZERO;
    if (e >= 255) return {s, FP_MAXF[30:0]};
    return {s, 8'(e), sum[25:3]};
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // a < b, both finite.
  function automatic logic fp_lt(input fp32_t a, input fp32_t b);
    logic az, bz;
    az = fp_is_zero(a);
    bz = fp_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return !b[31];
    if (bz) return a[31];
    if (a[31] != b[31]) return a[31];
    if (!a[31]) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  // Signed integer (up to 32 bits, sign-extended) to floating point, truncating.
  function automatic fp32_t fp_from_int(input logic signed [31:0] v);
    logic [31:0] m;
    int          msb;
    logic [22:0] f;
    if (v == 0) return FP_ZERO;
    m   = v[31] ? 32'(-v) : 32'(v);
    msb = 0;
    for (int i = 0; i < 32; i++) if (m[i]) msb = i;
    m = m << (31 - msb);
    f = m[30:8];
    return {v[31], 8'(127 + msb), f};
  endfunction

endpackage

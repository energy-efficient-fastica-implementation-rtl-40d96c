// tb_fp_pkg: helpers for the testbenches. Conversions between the 32-bit
// IEEE-754 words of the design and simulator reals, and a tolerance check, so
// that reference values are computed in ordinary real arithmetic, independent
// of the design's floating-point functions.
package tb_fp_pkg;
  // Decoded field by field (normal numbers and zero).
  function automatic real f2r(input logic [31:0] b);
    real m;
    int  e, mi;
    if (b[30:23] == 8'd0) return 0.0;
    mi = 0;
    mi[23:0] = {1'b1, b[22:0]};
    m = mi;
    m = m / 8388608.0;
    e = 0;
    e[7:0] = b[30:23];
    e = e - 127;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    if (b[31]) m = -m;
    return m;
  endfunction

  // Encoded from the double-precision bits, fraction truncated.
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return 32'd0;
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // |got - exp| <= abs_tol + rel_tol * |exp|
  function automatic bit near(input real got, input real exp, input real rel_tol, input real abs_tol);
    return rabs(got - exp) <= abs_tol + rel_tol * rabs(exp);
  endfunction

  // Table I of the tanh approximation, as reals, for the reference models.
  function automatic real tanh_ref_pwl(input real x);
    real ax, a, b;
    ax = rabs(x);
    if      (ax >= 7.0) begin a = 0.0;       b = 1.0;    end
    else if (ax >= 3.0) begin a = 0.0006965; b = 0.9959; end
    else if (ax >= 2.0) begin a = 0.02922;   b = 0.9113; end
    else if (ax >= 1.5) begin a = 0.1162;    b = 0.7358; end
    else if (ax >= 1.0) begin a = 0.2844;    b = 0.4878; end
    else if (ax >= 0.5) begin a = 0.598;     b = 0.1788; end
    else                begin a = 0.9533;    b = 0.0;    end
    return a * x + ((x < 0.0) ? -b : b);
  endfunction

  // Uniform real in [lo, hi).
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  // Test scene for the whole engine, 8 channels x 256 samples: seven
  // non-Gaussian sources (sine, square, sawtooth, triangle, uniform noise,
  // amplitude-modulated sine, sparse spikes) and one Gaussian source (sum of
  // twelve uniforms), each scaled to unit variance-ish, mixed by a random
  // matrix with entries in [-1, 1] plus 1.5 on the diagonal, and quantised to
  // 12-bit two's complement.
  localparam int SC_N = 8, SC_T = 256;
  typedef real scene_src_t [SC_N][SC_T];
  typedef int  scene_mix_t [SC_N][SC_T];

  function automatic void make_scene(output scene_src_t s, output scene_mix_t x);
    real a [SC_N][SC_N];
    real pi = 3.14159265358979;
    real m, peak;
    for (int t = 0; t < SC_T; t++) begin
      real g = 0.0;
      s[0][t] = $sin(2.0 * pi * 5.0 * t / SC_T);
      s[1][t] = ((t / 20) % 2) ? 1.0 : -1.0;
      s[2][t] = 2.0 * ((t % 37) / 37.0) - 1.0;
      s[3][t] = 2.0 * rabs(2.0 * ((t % 64) / 64.0) - 1.0) - 1.0;
      s[4][t] = urand(-1.0, 1.0);
      s[5][t] = $sin(2.0 * pi * 23.0 * t / SC_T) * $sin(2.0 * pi * 1.5 * t / SC_T);
      s[6][t] = ((t % 31) == 7) ? 3.0 : -0.1;
      for (int k = 0; k < 12; k++) g += urand(0.0, 1.0);
      s[7][t] = (g - 6.0) * 0.5;
    end
    for (int i = 0; i < SC_N; i++) for (int j = 0; j < SC_N; j++)
      a[i][j] = urand(-1.0, 1.0) + ((i == j) ? 1.5 : 0.0);
    peak = 0.0;
    for (int i = 0; i < SC_N; i++) for (int t = 0; t < SC_T; t++) begin
      m = 0.0;
      for (int j = 0; j < SC_N; j++) m += a[i][j] * s[j][t];
      if (rabs(m) > peak) peak = rabs(m);
    end
    for (int i = 0; i < SC_N; i++) for (int t = 0; t < SC_T; t++) begin
      m = 0.0;
      for (int j = 0; j < SC_N; j++) m += a[i][j] * s[j][t];
      x[i][t] = int'($floor(m / peak * 2000.0));
    end
  endfunction

  // |correlation coefficient| of two length-SC_T sequences.
  function automatic real abs_corr(input real u [SC_T], input real v [SC_T]);
    real mu = 0.0, mv = 0.0, suv = 0.0, suu = 0.0, svv = 0.0;
    for (int t = 0; t < SC_T; t++) begin mu += u[t]; mv += v[t]; end
    mu /= SC_T; mv /= SC_T;
    for (int t = 0; t < SC_T; t++) begin
      suv += (u[t] - mu) * (v[t] - mv);
      suu += (u[t] - mu) * (u[t] - mu);
      svv += (v[t] - mv) * (v[t] - mv);
    end
    if (suu == 0.0 || svv == 0.0) return 0.0;
    return rabs(suv) / $sqrt(suu * svv);
  endfunction
endpackage

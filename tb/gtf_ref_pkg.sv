// Reference arithmetic for the testbenches of the folded gammatone filter.
//
// A plain, unfolded, sample-by-sample model of one second-order section in
// transposed direct form, with the same number format as the hardware:
// DATA_W-bit two's complement data, products (c*x) >>> FRAC saturated to
// DATA_W bits, each two-operand sum saturated to DATA_W bits, and the
// three-operand node summed as (b1*x + s2) + a1*y.  Also computes the
// 8-bit coefficients of a fourth-order gammatone channel (eighth-order
// digital, four sections) with the impulse-invariant design
//   section k: b0 = T, b1 = -(T cos(wT) +/- sqrt(3 +/- 2^1.5) T sin(wT)) / e^(BT),
//              b2 = 0, denominator 1 - 2 cos(wT)/e^(BT) z^-1 + e^(-2BT) z^-2,
// B = 2*pi*1.019*ERB(fc), ERB(fc) = 24.7 (4.37 fc/1000 + 1), w = 2*pi*fc,
// with each section's numerator scaled to unit gain at fc and every
// coefficient rounded to FRAC fraction bits.
package gtf_ref_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC   = 6;
  localparam int DMAX   = (1 << (DATA_W - 1)) - 1;
  localparam int DMIN   = -(1 << (DATA_W - 1));

  typedef struct {
    int s1;
    int s2;
  } sect_state_t;

  typedef int coef_set_t [4][5];   // [section][b0, b1, b2, a1, a2]

  // Number of results the reference model has clipped so far.
  int sat_events = 0;

  function automatic int sat(longint v);
    if (v > longint'(DMAX)) begin sat_events++; return DMAX; end
    if (v < longint'(DMIN)) begin sat_events++; return DMIN; end
    return int'(v);
  endfunction

  function automatic int mul(int c, int x);
    longint p;
    p = longint'(c) * longint'(x);
    return sat(p >>> FRAC);
  endfunction

  function automatic int add(int a, int b);
    return sat(longint'(a) + longint'(b));
  endfunction

  typedef struct {
    int          y;
    sect_state_t st;
  } sect_result_t;

  // One sample through one section: the output and the next state.
  function automatic sect_result_t sect_step(sect_state_t st, int c [5], int x);
    sect_result_t r;
    r.y     = add(mul(c[0], x), st.s1);
    r.st.s1 = add(add(mul(c[1], x), st.s2), mul(c[3], r.y));
    r.st.s2 = add(mul(c[2], x), mul(c[4], r.y));
    return r;
  endfunction

  function automatic int qcoef(real v);
    int q;
    q = $rtoi(v * (1 << FRAC) + ((v >= 0.0) ? 0.5 : -0.5));
    if (q > 127)  q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  function automatic coef_set_t gtf_coefs(real fc, real fs);
    coef_set_t cs;
    real pi, t, erb, bw, e, cw, sw, a1, a2;
    real sgn [4];
    real root [4];
    real b1, hr, hi, dr, di, nr, ni, g, w;
    pi  = 3.14159265358979;
    t   = 1.0 / fs;
    erb = 24.7 * (4.37 * fc / 1000.0 + 1.0);
    bw  = 2.0 * pi * 1.019 * erb;
    e   = $exp(bw * t);
    cw  = $cos(2.0 * pi * fc * t);
    sw  = $sin(2.0 * pi * fc * t);
    a1  = -2.0 * cw / e;
    a2  = $exp(-2.0 * bw * t);
    sgn  = '{1.0, -1.0, 1.0, -1.0};
    root = '{$sqrt(3.0 + $pow(2.0, 1.5)), $sqrt(3.0 + $pow(2.0, 1.5)),
             $sqrt(3.0 - $pow(2.0, 1.5)), $sqrt(3.0 - $pow(2.0, 1.5))};
    w = 2.0 * pi * fc * t;
    for (int k = 0; k < 4; k++) begin
      b1 = -(2.0 * t * cw / e + sgn[k] * 2.0 * root[k] * t * sw / e) / 2.0;
      // H(e^jw) = (t + b1 e^-jw) / (1 + a1 e^-jw + a2 e^-2jw)
      nr = t + b1 * $cos(w);
      ni = -b1 * $sin(w);
      dr = 1.0 + a1 * $cos(w) + a2 * $cos(2.0 * w);
      di = -a1 * $sin(w) - a2 * $sin(2.0 * w);
      hr = $sqrt(nr * nr + ni * ni);
      hi = $sqrt(dr * dr + di * di);
      g  = hi / hr;
      cs[k][0] = qcoef(t * g);
      cs[k][1] = qcoef(b1 * g);
      cs[k][2] = 0;
      cs[k][3] = qcoef(-a1);
      cs[k][4] = qcoef(-a2);
    end
    return cs;
  endfunction

endpackage

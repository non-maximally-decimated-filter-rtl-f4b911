// nmdfb_pkg - shared types and elaboration-time tables for the non-maximally
// decimated filter bank (NMDFB) up-converter and the frequency-hopping modulator.
//
// Samples are 16-bit two's complement (DW). Filter coefficients and twiddles
// are 18-bit (CW), the coefficient width of an FPGA DSP multiplier. No table is
// stored: the sine, the twiddles exp(j*2*pi*m/M) and the low-pass prototype are
// computed by the tools at elaboration with an integer Taylor series, so the
// path count M and the taps per path K can be changed freely.
//
// Prototype filter (a design choice; the prototype of the hardware is not
// specified): length NT = M*K, a windowed sinc with cut-off at half the input
// sample rate of a 1:M/2 interpolator,
//   h(j) = sinc(t*2/M) * w(t),   t = j - (NT-1)/2,
//   w(t) = 0.35875 + 0.48829 cos(2 pi t/NT) + 0.14128 cos(4 pi t/NT)
//          + 0.01168 cos(6 pi t/NT)            (4-term Blackman-Harris),
// scaled by 2^17 (Q1.17). Its DC gain is about M/2, so each of the M/2 output
// phases of the interpolator has unit gain. The M-path partition follows
// h_r(n) = h(r + n*M).
package nmdfb_pkg;

  localparam int DW = 16;          // sample width
  localparam int CW = 18;          // coefficient / twiddle width
  localparam int COEF_FRAC = 17;   // prototype coefficients are Q1.17
  localparam int TW_FRAC = 16;     // twiddles are Q2.16 (1.0 = 65536)

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam longint Q = 28;                      // fraction bits of the series
  localparam longint ONE_Q = 64'sd1 << Q;
  localparam longint PI_Q = 64'sd843314857;       // pi * 2^28

  // sin(2*pi*num/den) * 2^28, for den > 0.
  function automatic longint sin_q(longint num, longint den);
    longint n;
    n = num % den;
    if (n < 0) n = n + den;
    // map the angle to (-pi, pi]
    if (2 * n > den) n = n - den;
    return sin_core(n, den);
  endfunction

  // Taylor series of sin(2*pi*n/den) for |2*pi*n/den| <= pi. Twelve terms are
  // exact to the 2^-28 resolution; no intermediate product exceeds 2^62.
  function automatic longint sin_core(longint n, longint den);
    longint x, term, sum, x2;
    x = (2 * PI_Q * n) / den;
    x2 = (x * x) >>> Q;
    term = x;
    sum = x;
    for (int k = 1; k <= 12; k++) begin
      term = -((term * x2) >>> Q) / ((2 * k) * (2 * k + 1));
      sum = sum + term;
    end
    return sum;
  endfunction

  function automatic longint cos_q(longint num, longint den);
    return sin_q(4 * num + den, 4 * den);
  endfunction

  // Saturate an integer to the coefficient range.
  localparam longint CMAX = (64'sd1 <<< (CW - 1)) - 1;
  function automatic coef_t to_coef(longint v);
    if (v > CMAX) return coef_t'(CMAX);
    if (v < -CMAX - 1) return coef_t'(-CMAX - 1);
    return coef_t'(v);
  endfunction

  // Prototype coefficient j of an NT = M*K tap filter, Q1.17.
  function automatic coef_t proto_coef(int j, int m, int k);
    longint nt, t2, s, w, h, r;
    nt = longint'(m) * longint'(k);
    t2 = 2 * longint'(j) - (nt - 1);              // 2*t, odd because nt is even
    // sinc(2t/M) = sin(2*pi*t/M) / (2*pi*t/M) = sin(2*pi*t2/(2M)) * M / (pi*t2)
    s = sin_q(t2, 2 * longint'(m));
    // window in Q28: cos(2*pi*t/NT) = cos(2*pi*t2/(2NT))
    w = (ONE_Q * 35875) / 100000
        + ((cos_q(t2, 2 * nt) * 48829) / 100000)
        + ((cos_q(2 * t2, 2 * nt) * 14128) / 100000)
        + ((cos_q(3 * t2, 2 * nt) * 1168) / 100000);
    // h = s/2^28 * M / (pi t2) * w/2^28, to Q17
    h = (s * longint'(m) * (64'sd1 <<< COEF_FRAC)) / (PI_Q * t2);   // sinc in Q17
    r = (h * w + (64'sd1 <<< (Q - 1))) >>> Q;
    return to_coef(r);
  endfunction

  // Twiddle exp(j*2*pi*mm/M) in Q2.16: real and imaginary part.
  localparam longint TW_SH = Q - longint'(TW_FRAC);

  function automatic coef_t tw_re(int mm, int m);
    longint v;
    v = (cos_q(longint'(mm), longint'(m)) + (64'sd1 <<< (TW_SH - 1))) >>> TW_SH;
    return to_coef(v);
  endfunction

  function automatic coef_t tw_im(int mm, int m);
    longint v;
    v = (sin_q(longint'(mm), longint'(m)) + (64'sd1 <<< (TW_SH - 1))) >>> TW_SH;
    return to_coef(v);
  endfunction

  // Round a wide signed value right by sh bits (half up) and saturate to DW.
  function automatic sample_t round_sat(logic signed [63:0] v, int sh);
    logic signed [63:0] r;
    r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 64'sd32767) return sample_t'(16'sh7fff);
    if (r < -64'sd32768) return sample_t'(-16'sh8000);
    return sample_t'(r[DW-1:0]);
  endfunction

endpackage

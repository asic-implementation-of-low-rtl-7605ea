// decor_fir_pkg: sizes and default coefficients shared by the DECOR FIR filter.
//
// The filter is a 20th-order (21-coefficient) low-pass FIR filter on 8-bit signed
// samples with 8-bit signed coefficients and a 16-bit output register. It is
// computed in the "decorrelated" form: the transfer function is multiplied and
// divided by T(z) = (1 + ALPHA z^-BETA)^M. With the defaults ALPHA = -1,
// BETA = 1, M = 1 each coefficient is replaced by its difference from the
// previous one and the previous output is added back, which gives the same
// response with smaller multiplier operands.
//
// The default coefficients are the design's own: a 21-tap Hamming-windowed sinc
// low-pass with cut-off fc = 10.8 kHz at fs = 48 kHz (the midpoint of a 9.6 kHz
// pass band edge and a 12 kHz stop band edge), quantised to Q1.7:
//   C[k] = round(128 * 2*fc/fs * sinc(2*fc/fs*(k-10)) * (0.54 - 0.46*cos(2*pi*k/20)))
// Every adjacent difference of this set fits in 8 signed bits, and the sum of |C[k]|
// (190) times the largest sample magnitude (128) fits in 16 signed bits.
package decor_fir_pkg;

  parameter int unsigned TAPS_DEF   = 21;  // filter order 20 -> 21 coefficients
  parameter int unsigned M_DEF      = 1;   // order of coefficient difference
  parameter int          ALPHA_DEF  = -1;  // T(z) = (1 + ALPHA z^-BETA)^M
  parameter int unsigned BETA_DEF   = 1;
  parameter int unsigned DATA_W_DEF = 8;   // input sample width
  parameter int unsigned COEF_W_DEF = 8;   // coefficient and coefficient-difference width
  parameter int unsigned ACC_W_DEF  = 16;  // accumulator / output width

  // Coefficients are kept as integers so that the same table type serves any
  // coefficient width; the ROM converts them to COEF_W bits.
  parameter int COEFS_DEF [TAPS_DEF] = '{
    0, 0, -1, -1, 2, 3, -4, -10, 6, 39, 58, 39, 6, -10, -4, 3, 2, -1, -1, 0, 0
  };

  // Binomial coefficient, used for the m-th order difference and its inverse.
  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - i + 1) / i;
    return r;
  endfunction

  // Weight of z^(-i*BETA) in T(z) = (1 + ALPHA z^-BETA)^M: binom(M,i) * ALPHA^i.
  function automatic int tz_weight(input int m, input int alpha, input int i);
    int w;
    w = binom(m, i);
    for (int n = 0; n < i; n++) w = w * alpha;
    return w;
  endfunction

endpackage

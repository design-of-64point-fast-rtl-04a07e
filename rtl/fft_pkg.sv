// fft_pkg - constants and helper functions shared by the FFT datapath.
//
// Twiddle factors W_N^k = exp(-j*2*pi*k/N) are computed at elaboration time
// from cos/sin and rounded to a signed fixed-point number with FRAC fraction
// bits (value = round(cos(2*pi*k/N) * 2^FRAC), and -sin for the imaginary
// part). The index permutations for decimation-in-time input ordering
// (bit reversal for radix 2, base-4 digit reversal for radix 4) and the
// round-then-saturate step used after every butterfly live here too.
// The fixed-point format, rounding and saturation are this design's own
// choices; the published design only gives the transform and its butterflies.
package fft_pkg;

  localparam real PI = 3.14159265358979323846;

  // Real part of W_N^k in Q(FRAC): round(cos(2*pi*k/N) * 2^FRAC).
  function automatic int tw_re(int k, int n, int frac);
    return int'($floor($cos(2.0 * PI * real'(k) / real'(n)) * (2.0 ** frac) + 0.5));
  endfunction

  // Imaginary part of W_N^k in Q(FRAC): round(-sin(2*pi*k/N) * 2^FRAC).
  function automatic int tw_im(int k, int n, int frac);
    return int'($floor(-$sin(2.0 * PI * real'(k) / real'(n)) * (2.0 ** frac) + 0.5));
  endfunction

  // Reverse the lowest DIGITS digits of i, each digit DBITS bits wide
  // (DBITS = 1: bit reversal, DBITS = 2: base-4 digit reversal).
  function automatic int digit_rev(int i, int dbits, int digits);
    int r = 0;
    int v = i;
    for (int d = 0; d < digits; d++) begin
      r = (r << dbits) | (v & ((1 << dbits) - 1));
      v = v >> dbits;
    end
    return r;
  endfunction

  // Number of base-2^DBITS digits needed to index N points.
  function automatic int num_digits(int n, int dbits);
    int d = 0;
    int v = 1;
    while (v < n) begin
      v = v << dbits;
      d++;
    end
    return d;
  endfunction

  // Divide by 2^SH, rounding to nearest (halves toward +inf). SH >= 1.
  function automatic int round_shift(int v, int sh);
    return (v + (1 << (sh - 1))) >>> sh;
  endfunction

  // True when v does not fit a W-bit two's complement number.
  function automatic bit overflows(int v, int w);
    return (v > (1 << (w - 1)) - 1) || (v < -(1 << (w - 1)));
  endfunction

  // Clamp v to the W-bit two's complement range.
  function automatic int saturate(int v, int w);
    if (v > (1 << (w - 1)) - 1) return (1 << (w - 1)) - 1;
    if (v < -(1 << (w - 1)))    return -(1 << (w - 1));
    return v;
  endfunction

endpackage

// fft_pkg: constants and elaboration-time helpers shared by the parallel
// radix-4 FFT.
//
// The twiddle factor W_N^n = exp(-j*2*pi*n/N) is written as Cb + j(-Sb), with
// Cb = cos(2*pi*n/N) and Sb = sin(2*pi*n/N). In hardware both parts are
// integers scaled by an "expanding factor" of 2^TW_FRAC (1024 for the main
// configuration) and rounded to the nearest integer, so for N = 256 the
// factors W^0..W^10 read 1024+0j, 1024-25j, 1023-50j, ... 993-249j. The
// functions below compute these constants while the design is elaborated, so
// no table has to be stored. Rounding to the nearest integer reproduces the
// published twiddle values; the word-growth rule below is this
// implementation's choice.
//
// Word growth: every dragonfly adds four values, so each stage can grow the
// magnitude of a complex sample by 4. Because a rotation can move the whole
// magnitude |z| <= sqrt(2)*max(|re|,|im|) into one component, one guard bit is
// added once, after the first stage; from then on two bits per stage suffice.
// stage_w() gives the width of the words entering stage s (0-based).
package fft_pkg;

  localparam real PI = 3.14159265358979323846;

  // log4 of a power of four
  function automatic int log4(input int n);
    int r;
    r = 0;
    while ((4 ** (r + 1)) <= n) r++;
    return r;
  endfunction

  // width of the words entering stage s (s = log4(N) gives the output width)
  function automatic int stage_w(input int in_w, input int s);
    return (s == 0) ? in_w : in_w + 2 * s + 1;
  endfunction

  // round(2^frac * cos(2*pi*n/N))
  function automatic int tw_cos(input int n_pts, input int n, input int frac);
    real th;
    th = 2.0 * PI * real'(n % n_pts) / real'(n_pts);
    return int'($cos(th) * real'(1 << frac));
  endfunction

  // round(2^frac * sin(2*pi*n/N)); the coefficient used in the datapath is
  // its negative, -Sb
  function automatic int tw_sin(input int n_pts, input int n, input int frac);
    real th;
    th = 2.0 * PI * real'(n % n_pts) / real'(n_pts);
    return int'($sin(th) * real'(1 << frac));
  endfunction

  // base-4 digit reversal of k over 'digits' digits: the in-place DIF
  // pipeline leaves bin k at position digit_rev4(k)
  function automatic int digit_rev4(input int k, input int digits);
    int r, v;
    r = 0;
    v = k;
    for (int d = 0; d < digits; d++) begin
      r = (r << 2) | (v & 3);
      v = v >> 2;
    end
    return r;
  endfunction

endpackage

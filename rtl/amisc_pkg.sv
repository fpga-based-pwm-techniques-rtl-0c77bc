// amisc_pkg: constants and helper functions shared by the AMISC-PWM units.
//
// The generator keeps one quarter of a sine wave in a small table and builds
// both the sine reference and the inverted-sine carrier from it. This package
// holds the default table geometry, the fixed-point widths, and the constant
// functions that compute the table and the carrier peak-correction gain at
// elaboration time, so no data file is needed.
//
// Table entry k (k = 0 .. depth-1) is round(FULL * sin((k + 0.5) * 90deg / depth))
// with FULL = 2^mag_w - 1. The half-step offset makes a quarter read backwards
// (address depth-1 .. 0) the exact mirror of the quarter read forwards, which
// is how the second and fourth quarters are produced. The 50-entry depth and
// the 200-step / 100-step counters follow the published architecture; the
// widths are this design's choice.
package amisc_pkg;

  // Quarter table depth (addresses 0..49) and counter lengths.
  localparam int unsigned QUARTER_DEPTH = 50;
  localparam int unsigned REF_STEPS     = 4 * QUARTER_DEPTH;  // counter 0..199
  localparam int unsigned CAR_STEPS     = 2 * QUARTER_DEPTH;  // counter 0..99

  // Magnitude width of a table entry; signed samples carry one more bit.
  localparam int unsigned MAG_W  = 15;
  localparam int unsigned DATA_W = MAG_W + 1;

  // Modulation index: unsigned, MI_FRAC fraction bits (1.0 = 1024).
  localparam int unsigned MI_W    = 11;
  localparam int unsigned MI_FRAC = 10;

  // Quarter-wave table entry k of a table of the given depth and width.
  // sin(x) is evaluated in integer arithmetic (Q30 fixed point, Taylor series
  // to x^17, error far below one output LSB), so the table needs no real
  // numbers and synthesis tools can fold it.
  localparam longint PI_Q30 = 64'd3373259426;  // round(pi * 2^30)

  function automatic int unsigned sine_entry(int unsigned k, int unsigned depth,
                                             int unsigned mag_w);
    longint x, x2, term, sum, full;
    x    = ((2 * longint'(k) + 1) * PI_Q30 + 2 * longint'(depth)) / (4 * longint'(depth));
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int i = 1; i <= 8; i++) begin
      term = -((term * x2) >>> 30) / (2 * i * (2 * i + 1));
      sum  = sum + term;
    end
    full = (64'sd1 <<< mag_w) - 1;
    return int'((sum * full + (64'sd1 <<< 29)) >>> 30);
  endfunction

  // Gain, with mag_w fraction bits, that lifts the inverted table
  // (FULL - entry) so that its largest value, FULL - entry(0), maps to FULL.
  function automatic int unsigned peak_gain(int unsigned depth, int unsigned mag_w);
    longint unsigned full, span;
    full = (64'd1 << mag_w) - 1;
    span = full - longint'(sine_entry(0, depth, mag_w));
    return int'(((full << mag_w) + span / 2) / span);
  endfunction

  // Greatest common divisor, used to reduce clock ratios.
  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

endpackage

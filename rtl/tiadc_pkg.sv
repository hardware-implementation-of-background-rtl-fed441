// tiadc_pkg: number formats, shared types and filter-coefficient design
// functions of the TIADC gain/timing mismatch calibrator.
//
// All samples inside the calibrator are signed fixed point with W bits, F of
// them fractional (range +/-2^(W-F-1)); the headroom above the ADC's [-1,1)
// range is there because the band-pass derivative of a signal in Nyquist band
// K grows roughly like K*pi. FIR taps are CW bits with CF fractional bits.
// The adaptive gain/timing coefficients are AW bits with AF fractional bits, so
// that the product of two samples (2F = AF fractional bits) adds onto them
// directly. These widths are this design's choice; the publication behind
// the algorithm gives no word lengths.
//
// The coefficient functions are evaluated at elaboration. They produce
// Hamming-windowed versions of the ideal impulse responses:
//   differentiator  h_d[k] = (-1)^k / k            (k != 0), h_d[0] = 0
//   Hilbert         h_h[k] = 2 / (pi k)            (k odd),  0 otherwise
//   free-band       f[k]   = delta[k] - (sin(w2 k) - sin(w1 k)) / (pi k),
//                   f[0]   = 1 - (w2 - w1)/pi       (band-stop, w1 < w2)
// with k = i - (N-1)/2 for tap i of an N-tap (odd N) filter.
package tiadc_pkg;

  localparam int W  = 24;  // internal sample width
  localparam int F  = 15;  // internal sample fractional bits
  localparam int CW = 16;  // FIR tap width
  localparam int CF = 14;  // FIR tap fractional bits
  localparam int AW = 32;  // adaptive coefficient width
  localparam int AF = 30;  // adaptive coefficient fractional bits (= 2F)

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [W-1:0]  samp_t;
  typedef logic signed [CW-1:0] tap_t;
  typedef logic signed [AW-1:0] acoef_t;
  // ternary modulation value: -1, 0 or +1
  typedef logic signed [1:0]    tern_t;

  function automatic real hamming(int i, int n);
    return 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(n - 1));
  endfunction

  function automatic tap_t quant_tap(real v);
    real s;
    s = v * real'(1 << CF);
    return tap_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real diff_ideal(int k);
    if (k == 0) return 0.0;
    return ((k % 2) != 0 ? -1.0 : 1.0) / real'(k);
  endfunction

  function automatic real hilbert_ideal(int k);
    if ((k % 2) == 0) return 0.0;
    return 2.0 / (PI * real'(k));
  endfunction

  // w1, w2: band-stop edges in units of pi rad/sample
  function automatic real bandstop_ideal(int k, real w1, real w2);
    if (k == 0) return 1.0 - (w2 - w1);
    return -($sin(PI * w2 * real'(k)) - $sin(PI * w1 * real'(k))) / (PI * real'(k));
  endfunction

  // Scale of the Hilbert branch, (-1)^K * floor(K/2) * 2*pi, with SF
  // fractional bits.
  localparam int SW = 20;
  localparam int SF = 13;
  typedef logic signed [SW-1:0] scale_t;

  function automatic scale_t band_scale(int k);
    real s;
    s = ((k % 2) != 0 ? -1.0 : 1.0) * real'(k / 2) * 2.0 * PI * real'(1 << SF);
    return scale_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  // Round a value with `shift` surplus fractional bits to the nearest
  // integer (ties toward +inf).
  function automatic logic signed [127:0] round_shift(logic signed [127:0] v, int shift);
    if (shift <= 0) return v;
    return (v + (128'sd1 <<< (shift - 1))) >>> shift;
  endfunction

endpackage

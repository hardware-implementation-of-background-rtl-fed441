// tiadc_model_pkg: behavioural model of an M-channel time-interleaved ADC
// with gain and timing mismatches, used as the stimulus for the calibrator.
// Not synthesizable; it stands for the analog converter front end.
//
// Channel m = n mod M multiplies the input by g_m = 1 + dg[m] and samples it
// at (n + r[m]) Ts. The input is a multitone band-pass signal in Nyquist band
// K: each tone has a base-band frequency w_i (rad/sample, 0 < w_i < pi) and
// the analog frequency (K-1)*pi + w_i for odd K, K*pi - w_i for even K, so
// that after sampling it folds back to w_i. Samples are rounded to DW bits
// (Q1.(DW-1)) after adding white noise of rms noise_rms (a sum of twelve
// uniform variates, close to Gaussian). sample(n) also returns the ideal sample x[n] without mismatch,
// as the reference for measuring SNDR.
package tiadc_model_pkg;

  localparam real PI = 3.14159265358979323846;

  class tiadc_model #(int M = 4, int DW = 12);
    real dg [M];
    real r  [M];
    int  band;
    int  ntones;
    real w   [64];
    real amp [64];
    real ph  [64];
    real noise_rms;

    function new(int k);
      band   = k;
      ntones    = 0;
      noise_rms = 0.0;
      for (int m = 0; m < M; m++) begin
        dg[m] = 0.0;
        r[m]  = 0.0;
      end
    endfunction

    function void add_tone(real wb, real a, real p);
      w[ntones]   = wb;
      amp[ntones] = a;
      ph[ntones]  = p;
      ntones++;
    endfunction

    function real analog_w(int i);
      if (band % 2 == 1) return real'(band - 1) * PI + w[i];
      return real'(band) * PI - w[i];
    endfunction

    // analog input at time t (in sample periods)
    function real xa(real t);
      real s = 0.0;
      for (int i = 0; i < ntones; i++) s += amp[i] * $cos(analog_w(i) * t + ph[i]);
      return s;
    endfunction

    function void sample(longint n, output logic signed [DW-1:0] y, output real x);
      int  m;
      real v, q;
      m = int'(n % M);
      x = xa(real'(n));
      v = (1.0 + dg[m]) * xa(real'(n) + r[m]);
      if (noise_rms > 0.0) begin
        real u = 0.0;
        for (int i = 0; i < 12; i++) u += real'($urandom) / 4294967296.0;
        v += noise_rms * (u - 6.0);
      end
      q = v * real'(1 << (DW - 1));
      q = (q >= 0.0) ? q + 0.5 : q - 0.5;
      if (q > real'((1 << (DW - 1)) - 1)) q = real'((1 << (DW - 1)) - 1);
      if (q < -real'(1 << (DW - 1)))      q = -real'(1 << (DW - 1));
      y = DW'($rtoi(q));
    endfunction

    // Coefficients of a per-channel sequence v[m] (zero mean) in the basis
    // [cos(pi n/2), sin(pi n/2), (-1)^n] (M = 4) or [(-1)^n] (M = 2).
    function real basis_coef(real v [M], int k);
      if (M == 2) return (v[0] - v[1]) / 2.0;
      case (k)
        0: return (v[0] - v[2]) / 2.0;
        1: return (v[1] - v[M-1]) / 2.0;
        default: return (v[0] - v[1] + v[2] - v[M-1]) / 4.0;
      endcase
    endfunction
  endclass

endpackage

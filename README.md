# Background gain/timing mismatch calibration for time-interleaved ADCs, any Nyquist band

A time-interleaved ADC (TIADC) reaches a high sample rate by letting M slower
converters take turns. If the channels differ slightly in gain or in sampling
instant, the multiplexed output carries copies of the signal shifted by
multiples of fs/M: spurious images that can land on top of the wanted signal.
This RTL removes those images in the digital domain, in the background, while
the converter is running on its normal input. It needs no reference channel and
no pilot tone. What sets it apart from the classic version of the method is
that it also works when the input is a band-pass signal that has been
**undersampled**, i.e. lies in the 2nd, 3rd, ... Nyquist band.

The method follows the published scheme of H. Le Duc, V.-P. Hoang, D.-M. Nguyen
and C.-K. Pham, "Hardware Implementation of Background Calibration Technique
for TIADCs with Signals in Any Nyquist Bands". That publication gives the
algorithm and its block diagram, but not a hardware architecture. The word
lengths, filter designs, pipeline and interface here are this design's own.
They are listed in [Design choices](#design-choices-not-fixed-by-the-method).

Default configuration: M = 4 channels, 12-bit samples, one sample per clock.

## The error model

Write the TIADC output as `y[n] = x[n] + e[n]`. Channel `m = n mod M` has a
gain `1 + dg_m` and samples `r_m` sample periods early or late. Take `dg_m`
and `r_m` to have zero mean over the channels; a common gain or delay is not a
mismatch. To first order,

    e[n] = dg_(n mod M) * x[n]  +  r_(n mod M) * x'[n]

where `x'` is the time derivative of the analog input, in units of one sample
period. A zero-mean sequence of period M can be written with M-1 real basis
sequences, the *modulation vector* `m_n`. For M = 4 this design uses

    m_n = [ cos(pi n/2),  sin(pi n/2),  (-1)^n ]      (values -1, 0, +1 only)

and then

    e[n] = c_g^T (m_n x[n]) + c_r^T (m_n x'[n])

with three gain coefficients `c_g` and three timing coefficients `c_r`. The
coefficients relate to the per-channel errors as follows (the same for `c_r`
with `r` in place of `dg`):

    c_g[0] = (dg_0 - dg_2)/2
    c_g[1] = (dg_1 - dg_3)/2
    c_g[2] = (dg_0 - dg_1 + dg_2 - dg_3)/4

Because every element of `m_n` is -1, 0 or +1, applying it costs only a
negation. Only M = 2 and M = 4 are supported.

## The derivative of an undersampled signal

The timing term needs `x'`, the derivative of the *analog* signal. For an
input in Nyquist band K, sampling folds the spectrum down to base band. For
odd K the spectrum keeps its orientation; for even K it is mirrored. A
base-band differentiator applied to the samples therefore gives the wrong
answer. It sees frequency `w` where the analog tone has `(K-1)pi + w` (odd K)
or `K pi - w` (even K). The missing part is a constant frequency offset
times a 90-degree phase shift, which a Hilbert transformer supplies:

    x'[n] = (h_d * y)[n]  +  (-1)^K * floor(K/2) * 2 pi * (h_h * y)[n]

Check with K = 3 and a tone `cos(w n)`. The analog frequency is `2pi + w`, so
the true derivative is `-(2pi + w) sin(w n)`. The differentiator gives
`-w sin(w n)`, and the Hilbert transform of the cosine is `sin(w n)`, weighted
by `-2pi`. The two add up to the true derivative. For K = 1 the Hilbert branch
has weight zero. `bpd_filter` implements exactly this sum. The factor is a
16-entry constant table indexed by the run-time input `nyq_band`.

## Free-band estimation

The coefficients are learned from the part of the spectrum where the wanted
signal has no energy, the *free band* or mismatch band. The input is
band-limited and slightly oversampled, so part of `[0, pi]` holds only
mismatch images. In the 2.7 GS/s example with a 540 MHz .. 1.08 GHz folded
band, the signal occupies `0.4 pi .. 0.8 pi`. The free band lies on both sides
of it: some images fall below `0.4 pi`, others above `0.8 pi`. The filter
`f[n]` is therefore a band-stop over the signal band. A high-pass would not
do, because the `(-1)^n` image of a signal at `0.4..0.8 pi` lands at
`0.2..0.6 pi`.

The same `f[n]` is applied to the output and to each element of the two
signal vectors:

    d[n]     = (f * y)[n]                          only mismatch images
    xb_g,n   = f * (m_n y),   xb_r,n = f * (m_n x')
    eps[n]   = d[n] - (c_g^T xb_g,n + c_r^T xb_r,n)
    c_g     += 2^-MU_G_SHIFT * eps[n] * xb_g,n
    c_r     += 2^-MU_R_SHIFT * eps[n] * xb_r,n

This is the LMS algorithm; it drives the modelled images onto the observed
ones. The correction runs in parallel with the estimation and always uses the
latest coefficients:

    x_hat[n] = y[n] - (c_g^T m_n y[n] + c_r^T m_n x'[n])

## Datapath

```
 y_ch[0..M-1] (one frame per round)
   │
 channel_mux ── y[n] ──► scale to Q8.15 ──► bpd_filter ──┬─ y_al ──► correction_unit ──► x_hat
                                      (h_d, h_h, K-scale) └─ x_der ─►    ▲      │ y, x_g, x_r
                                                                          │      ▼
                                      modulation_gen ── m_n ─────────────►│  estimation_unit
                                                                          │  (7 x f[n], eps, LMS)
                                                                          └──── c_g, c_r ◄┘
```

| module | role |
|---|---|
| `tiadc_calibration` | top level; wires the blocks below |
| `channel_mux` | the TIADC output multiplexer: one frame of M sub-ADC samples in, the full-rate stream y[n] out in channel order |
| `bpd_filter` | band-pass derivative: `derivative_filter` + `hilbert_filter` + K-dependent scale; also delays y to align with x' |
| `derivative_filter` | 31-tap base-band differentiator `h_d` |
| `hilbert_filter` | 31-tap Hilbert transformer `h_h` |
| `modulation_gen` | channel counter and modulation vector `m_n` |
| `correction_unit` | forms `m_n y`, `m_n x'`; subtracts the rebuilt error |
| `estimation_unit` | seven `freeband_filter`s, `eps`, LMS update with saturation |
| `freeband_filter` | 63-tap band-stop `f[n]` |
| `fir_filter` | common streaming FIR (delay line, constant taps, rounding) |
| `tiadc_pkg` | number formats, types, tap-design functions |

All filter taps are computed at elaboration by functions in `tiadc_pkg`, from
the ideal responses under a Hamming window:

- differentiator: `(-1)^k / k`
- Hilbert: `2/(pi k)` for odd k, 0 for even k
- band-stop: `delta[k] - (sin(W2 pi k) - sin(W1 pi k))/(pi k)`

There are no coefficient files. Changing a filter length or the stop band is a
parameter change.

### Timing

Input is by frames: `y_ch[m]` holds the sample of sub-ADC m from one round
`l`, and the frame is taken on a clock where `frame_valid` and `frame_ready`
are both high. Once offered, a frame must stay offered and unchanged until it
is taken (an assertion checks this). `channel_mux` can take a new frame while
the last sample of the previous one leaves, so frames offered back to back
are taken every M clocks, and the rest of the datapath then gets one sample
per clock. Every stage advances only on a valid sample, so gaps between
frames are allowed. Delays:

- frame taken to its channel-0 sample as `x_hat`: `(N_DIFF-1)/2 + 5` clocks
  (20 by default).
  - 1 clock is the multiplexer.
  - 15 samples are the group delay of the 31-tap filters.
  - 4 clocks are the pipeline: filter register, derivative sum, signal vectors, output.
  - After reset the first 15 outputs come from the zeroed delay lines.
- Estimation loop: 63-tap filters, `eps` one clock later, coefficient update
  the clock after that.
  - The update uses the coefficients of its own clock and `eps` from one clock
    earlier: a delayed LMS, with no visible effect at these step sizes.

`modulation_gen` starts at channel phase `(-D) mod M`, with `D = (N_DIFF-1)/2`.
This way the vector it shows at the correction stage belongs to the sample
that is there. Because the multiplexer is inside, sample n always comes from
channel n mod M; no alignment is needed at the input.

### Number formats

| quantity | format |
|---|---|
| `y_ch`, `x_hat` | signed DW bits, Q1.(DW-1), range [-1, 1) |
| internal samples (`samp_t`) | 24 bits, 15 fractional (range +/-256, headroom for `x'` up to K = 15) |
| FIR taps | 16 bits, 14 fractional |
| band scale table | 20 bits, 13 fractional |
| `c_g`, `c_r` | 32 bits, 30 fractional (range +/-2), saturating |

The product of two internal samples has exactly the 30 fractional bits of the
coefficients. The LMS step is therefore a product, a shift by `MU_*_SHIFT` and
an add. All rounding is to nearest. `x_hat` saturates at the 12-bit limits.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears delay lines and coefficients) |
| `frame_valid` | in | 1 | `y_ch` holds a frame |
| `y_ch` | in | M x DW | sub-ADC samples y_0[l] .. y_{M-1}[l] of one round |
| `frame_ready` | out | 1 | the frame is taken at a clock where `frame_valid` and `frame_ready` are high |
| `nyq_band` | in | 4 | Nyquist band K = 1..15 of the analog input; static while running |
| `adapt_en` | in | 1 | 1: coefficients adapt; 0: frozen (correction continues) |
| `coef_clear` | in | 1 | synchronous clear of all coefficients |
| `out_valid`, `x_hat` | out | 1, DW | calibrated sample |
| `c_g`, `c_r` | out | (M-1) x 32 | current coefficient estimates |
| `eps`, `eps_valid` | out | 24, 1 | LMS error, for monitoring convergence |

### Parameters of `tiadc_calibration`

| parameter | default | meaning |
|---|---|---|
| `M` | 4 | channels (2 or 4) |
| `DW` | 12 | ADC sample width |
| `N_DIFF` | 31 | taps of `h_d` and `h_h` (odd) |
| `N_FB` | 63 | taps of `f[n]` (odd) |
| `FB_W1`, `FB_W2` | 0.35, 0.85 | stop band of `f[n]` in units of pi; must cover the folded signal band with room for the transition (about 0.05 pi each side at 63 taps) |
| `MU_G_SHIFT`, `MU_R_SHIFT` | 8, 11 | LMS step sizes 2^-8 and 2^-11 |

The step sizes set the trade-off between convergence time and coefficient
noise. The timing step is smaller because `x'` grows with the band: roughly
`K pi` times the signal.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

- `tb_derivative_filter`, `tb_hilbert_filter`, `tb_freeband_filter`: the
  impulse response tap by tap, a bit-exact comparison with a convolution in
  the testbench on random data with input gaps, the alignment of `x_mid`, the
  one-clock output timing, and the magnitude response measured with tones
  against the ideal filter.
- `tb_bpd_filter`: tones in bands K = 1..4 at three base-band frequencies.
  `x_der` must match the analytic derivative of the analog tone within 1 % of
  its peak (measured: 0.2-0.6 %), and `y_al` must match the delayed input.
- `tb_channel_mux`: random frames for M = 4 and M = 2, back to back and
  with gaps. A scoreboard checks the order and channel number of every
  sample, channel 0 one clock after the frame is taken, a frame taken every
  M clocks when offered back to back with no break in the stream,
  `frame_ready` low while a frame is being sent, and that nothing is lost.
- `tb_modulation_gen`: the vector against cos/sin/(-1)^n for M = 4 and M = 2,
  with a phase offset and valid gaps.
- `tb_correction_unit`: a bit-exact reference model on random data, including
  saturation of `x_hat`.
- `tb_estimation_unit`: the output is built from known coefficients plus a
  strong tone in the stop band. The LMS must find the coefficients, `eps` must
  drop by more than 10 dB, freezing must hold, adaptation must track a change,
  and clear must zero the coefficients.
- `tb_tiadc_calibration` runs end to end at the default parameters. A
  behavioural 4-channel TIADC (`tb/tiadc_model_pkg.sv`) feeds the design frames,
  first back to back and then with random gaps. Bands K = 3, 2 and 1 are tested. For each band the test
  checks every coefficient against the value implied by the model's
  mismatches, the SNDR (about 37-40 dB raw, about 58 dB calibrated), the
  20-clock latency, the frame rate and the output count. It also checks freeze and clear.
  Each mechanism (stall, freeze, clear, each band) must have occurred.
- `tb_third_band_example` runs the reference experiment at the default
  parameters. It uses a 60 dB SNR 4-channel TIADC at 2.7 GS/s and 40 tones
  between 3.24 and 3.78 GHz (third band). The mismatch coefficients are of the
  size of the published convergence plots, and the run is 260,000 samples
  long.
  - SNDR goes from 34.8 dB to 57.9 dB. The published figures are 42.4 dB to
    58.5 dB; the raw value depends on the mismatch values, which are only
    known approximately.
  - The gain coefficients are within 8 % of their final values after 50,000
    samples and settled by 100,000. The published scheme converges in about
    50K samples.

To run one with Verilator 5 (packages first):

```
verilator --binary --timing --assert --top-module tb_tiadc_calibration \
  rtl/tiadc_pkg.sv tb/tiadc_model_pkg.sv \
  rtl/fir_filter.sv rtl/derivative_filter.sv rtl/hilbert_filter.sv \
  rtl/freeband_filter.sv rtl/bpd_filter.sv rtl/modulation_gen.sv \
  rtl/correction_unit.sv rtl/estimation_unit.sv rtl/channel_mux.sv \
  rtl/tiadc_calibration.sv \
  tb/tb_tiadc_calibration.sv
./obj_dir/Vtb_tiadc_calibration
```

Each testbench takes a few seconds at most. The unit testbenches need only
`tiadc_pkg`, `fir_filter` and the modules they test.

## Design choices not fixed by the method

The published scheme fixes the structure described above:

- the error model;
- the band-pass derivative with its `(-1)^K floor(K/2) 2pi` Hilbert weight;
- correction by subtraction;
- free-band filtering of the output and of both signal vectors;
- LMS on `eps`.

The following are this implementation's own:

- **Modulation vector.** The real Fourier basis above. Any basis of the
  zero-mean period-M sequences works, with correspondingly transformed
  coefficients.
- **Filters.** Hamming-windowed designs with 31 taps for `h_d` and `h_h` and
  63 taps for `f[n]`. The derivative error in band 3 is about 0.3 % of peak;
  this limits the residual timing images to about -50 dBc of the timing error.
- **Free-band filter as a band-stop** with programmable edges, set for a
  folded band of 0.4-0.8 pi. A different input band needs `FB_W1`/`FB_W2`
  changed; with `FB_W1 = 0` it becomes the high-pass of the low-pass case.
- **Word lengths, rounding and saturation**, as in the table above.
- **Step sizes** as powers of two, chosen for convergence within roughly
  50,000-100,000 samples.
- **Frame input with a valid/ready handshake**, multiplexed inside to one
  sample per clock. A converter at 2.7 GS/s
  delivers far more samples than one 200 MHz datapath can take. This design
  processes the stream at its clock rate, which suits offline,
  hardware-in-the-loop or decimated use. Running at the full converter rate
  would need a polyphase (M-parallel) version of the same arithmetic, which
  is not provided.
- **Run-time controls** `nyq_band`, `adapt_en`, `coef_clear`; asynchronous
  reset.

## Limitations

- First-order model. The gain-times-timing cross term is not corrected.
  Large mismatches (beyond a few percent of gain, a few percent of a sample
  period) leave residual images.
- The free band must exist: the folded signal must not fill the whole of
  `[0, pi]`, and `f[n]` must be set to the actual signal band.
- `nyq_band` must match the real band. A wrong K gives a wrong timing
  derivative, and the timing coefficients converge to wrong values.
- The output keeps the average gain of the channels. Only the differences
  between channels are removed, not a common gain error.
- Only M = 2 and M = 4.
- The analog converter channels are outside this RTL; only their output
  multiplexer is included. `tb/tiadc_model_pkg.sv` is
  a behavioural stand-in for simulation only.

// estimation_unit: the free-band LMS estimation of the calibrator. The same
// band-stop filter f[n] is applied to the TIADC output and to every element
// of the two signal vectors:
//     d[n]   = f * y                 (mismatch-band content of the output)
//     xb_g,n = f * x_g,n,  xb_r,n = f * x_r,n
//     eb[n]  = c_g^T xb_g,n + c_r^T xb_r,n
//     eps[n] = d[n] - eb[n]
//     c_g   += mu_g * eps[n] * xb_g,n ,  c_r += mu_r * eps[n] * xb_r,n
// With the signal band removed, d holds only mismatch images, and the LMS
// drives c_g, c_r to the values that reproduce them. This dataflow follows
// the publication. The step sizes are powers of two (2^-MU_G_SHIFT and
// 2^-MU_R_SHIFT), the update uses eps and the filtered vectors registered one
// clock earlier together with the coefficients of that clock (one clock of
// update delay), and the coefficients saturate at the limits of their format;
// these are this design's choices.
//
// Interface: y, x_g, x_r aligned with in_valid (from correction_unit);
// adapt_en = 0 freezes the coefficients; clear (synchronous) returns them to
// zero. c_g, c_r are outputs in AF-fractional format. Timing: the filters add
// one clock plus (N-1)/2 samples; eps is registered one clock after the
// filter outputs and the coefficients change the clock after that.
module estimation_unit
  import tiadc_pkg::*;
#(
  parameter int  M          = 4,
  parameter int  N          = 63,
  parameter real W1         = 0.35,
  parameter real W2         = 0.85,
  parameter int  MU_G_SHIFT = 8,
  parameter int  MU_R_SHIFT = 11
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  samp_t  y,
  input  samp_t  x_g [M-1],
  input  samp_t  x_r [M-1],
  input  logic   adapt_en,
  input  logic   clear,
  output acoef_t c_g [M-1],
  output acoef_t c_r [M-1],
  output samp_t  eps,
  output logic   eps_valid
);

  localparam int K = M - 1;

  // free-band filters: index 0 = y, 1..K = x_g, K+1..2K = x_r
  samp_t f_in   [2*K+1];
  samp_t f_out  [2*K+1];
  logic  f_vld  [2*K+1];

  always_comb begin
    f_in[0] = y;
    for (int k = 0; k < K; k++) begin
      f_in[1+k]   = x_g[k];
      f_in[1+K+k] = x_r[k];
    end
  end

  for (genvar i = 0; i < 2*K+1; i++) begin : g_fb
    freeband_filter #(.N(N), .W1(W1), .W2(W2)) u_f (
      .clk, .rst_n, .in_valid,
      .x(f_in[i]), .out_valid(f_vld[i]), .y(f_out[i]), .x_mid()
    );
  end

  // eps = d - c^T xbar
  localparam int PW = W + AW + $clog2(2*M) + 1;
  logic signed [PW-1:0] eb_acc;
  samp_t                eps_c;

  always_comb begin
    eb_acc = '0;
    for (int k = 0; k < K; k++) begin
      eb_acc += PW'(f_out[1+k])   * PW'(c_g[k]);
      eb_acc += PW'(f_out[1+K+k]) * PW'(c_r[k]);
    end
    eps_c = f_out[0] - samp_t'(round_shift(128'(eb_acc), AF));
  end

  samp_t xb_g [K];
  samp_t xb_r [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eps       <= '0;
      eps_valid <= 1'b0;
      for (int k = 0; k < K; k++) begin
        xb_g[k] <= '0;
        xb_r[k] <= '0;
      end
    end else begin
      eps_valid <= f_vld[0];
      if (f_vld[0]) begin
        eps <= eps_c;
        for (int k = 0; k < K; k++) begin
          xb_g[k] <= f_out[1+k];
          xb_r[k] <= f_out[1+K+k];
        end
      end
    end
  end

  // LMS update with saturation
  localparam int UW = AW + 2;
  localparam logic signed [UW-1:0] CMAX =  (UW'(1) <<< (AW-1)) - UW'(1);
  localparam logic signed [UW-1:0] CMIN = -(UW'(1) <<< (AW-1));

  function automatic acoef_t lms_step(acoef_t c, samp_t e, samp_t xb, int sh);
    logic signed [2*W-1:0] p;
    logic signed [UW-1:0]  n;
    p = (2*W)'(e) * (2*W)'(xb);            // 2F = AF fractional bits
    n = UW'(c) + UW'(round_shift(128'(p), sh));
    if (n > CMAX) return acoef_t'(CMAX);
    if (n < CMIN) return acoef_t'(CMIN);
    return acoef_t'(n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) begin
        c_g[k] <= '0;
        c_r[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < K; k++) begin
        c_g[k] <= '0;
        c_r[k] <= '0;
      end
    end else if (eps_valid && adapt_en) begin
      for (int k = 0; k < K; k++) begin
        c_g[k] <= lms_step(c_g[k], eps, xb_g[k], MU_G_SHIFT);
        c_r[k] <= lms_step(c_r[k], eps, xb_r[k], MU_R_SHIFT);
      end
    end
  end

  // all free-band filters see the same valid stream
  for (genvar i = 1; i < 2*K+1; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) f_vld[i] == f_vld[0]);
  end

endmodule

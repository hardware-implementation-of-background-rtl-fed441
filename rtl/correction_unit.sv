// correction_unit: the digital correction of the calibrator. It rebuilds the
// mismatch error from the TIADC output itself and subtracts it:
//     x_g,n = m_n * y[n]                (gain signal vector)
//     x_r,n = m_n * x'[n]               (timing signal vector)
//     e^[n] = c_g^T x_g,n + c_r^T x_r,n
//     x^[n] = y[n] - e^[n]
// where x'[n] is the band-pass derivative from bpd_filter and c_g, c_r are
// the current estimates from the estimation unit. The modulation values are
// -1/0/+1, so the signal vectors need only negation; the 2(M-1) products with
// the coefficients are full multiplies. This dataflow follows the
// publication; the two-stage pipeline and the output rounding and saturation
// to DW bits are this design's choice.
//
// Interface: y and x_der aligned, with in_valid and the matching m; the
// coefficients in AF-fractional format. Stage 1 registers the signal vectors
// and y (est_valid; these feed the estimation unit); stage 2 registers x_hat
// (out_valid). Latency: one clock to the signal vectors, two to x_hat.
module correction_unit
  import tiadc_pkg::*;
#(
  parameter int M  = 4,
  parameter int DW = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  samp_t                  y,
  input  samp_t                  x_der,
  input  tern_t                  m     [M-1],
  input  acoef_t                 c_g   [M-1],
  input  acoef_t                 c_r   [M-1],
  output logic                   est_valid,
  output samp_t                  y_est,
  output samp_t                  x_g   [M-1],
  output samp_t                  x_r   [M-1],
  output logic                   out_valid,
  output logic signed [DW-1:0]   x_hat
);

  localparam int SHIFT = F - (DW - 1);   // internal -> Q1.(DW-1)
  localparam int PW    = W + AW + $clog2(2*M) + 1;

  initial assert (SHIFT >= 0) else $fatal(1, "correction_unit: DW too large for F");

  function automatic samp_t tern_mul(tern_t t, samp_t v);
    case (t)
      2'sd1:   return v;
      -2'sd1:  return -v;
      default: return '0;
    endcase
  endfunction

  // stage 1: modulated signal vectors
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0;
      y_est     <= '0;
      for (int k = 0; k < M-1; k++) begin
        x_g[k] <= '0;
        x_r[k] <= '0;
      end
    end else begin
      est_valid <= in_valid;
      if (in_valid) begin
        y_est <= y;
        for (int k = 0; k < M-1; k++) begin
          x_g[k] <= tern_mul(m[k], y);
          x_r[k] <= tern_mul(m[k], x_der);
        end
      end
    end
  end

  // stage 2: error reconstruction and subtraction
  logic signed [PW-1:0] e_acc;
  samp_t                e_hat, corr;
  logic signed [W-1:0]  corr_r;

  always_comb begin
    e_acc = '0;
    for (int k = 0; k < M-1; k++) begin
      e_acc += PW'(x_g[k]) * PW'(c_g[k]);
      e_acc += PW'(x_r[k]) * PW'(c_r[k]);
    end
    e_hat  = samp_t'(round_shift(128'(e_acc), AF));
    corr   = y_est - e_hat;
    corr_r = samp_t'(round_shift(128'(corr), SHIFT));
  end

  localparam logic signed [W-1:0] OMAX = W'((1 <<< (DW-1)) - 1);
  localparam logic signed [W-1:0] OMIN = -W'(1 <<< (DW-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_hat     <= '0;
    end else begin
      out_valid <= est_valid;
      if (est_valid) begin
        if (corr_r > OMAX)      x_hat <= OMAX[DW-1:0];
        else if (corr_r < OMIN) x_hat <= OMIN[DW-1:0];
        else                    x_hat <= corr_r[DW-1:0];
      end
    end
  end

endmodule

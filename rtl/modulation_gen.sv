// modulation_gen: generator of the modulation vector m_n that turns the
// per-channel gain and timing errors of an M-channel TIADC into M-1 real
// coefficients each. The channel index of the current sample, n mod M, is
// kept in a counter that advances with every valid sample; the vector is the
// real Fourier basis of a sequence of period M without its DC term:
//     M = 4:  m_n = [cos(pi n/2), sin(pi n/2), (-1)^n]
//     M = 2:  m_n = [(-1)^n]
// Every element is -1, 0 or +1, so applying m_n needs no multiplier. The
// basis is this design's choice for the vector the publication takes from
// earlier work without printing it; only M = 2 and M = 4 are supported.
// PHASE0 is the channel index of the first valid sample after reset, so the
// generator can be placed after a pipeline with a known sample delay.
// Interface: valid marks a sample; m and ch describe the sample currently
// marked by valid (combinational from the counter), the counter moves on at
// the clock edge.
module modulation_gen
  import tiadc_pkg::*;
#(
  parameter int M      = 4,
  parameter int PHASE0 = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  output tern_t                m  [M-1],
  output logic [$clog2(M)-1:0] ch
);

  initial assert (M == 2 || M == 4) else $fatal(1, "modulation_gen: M must be 2 or 4");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ch <= ($clog2(M))'(PHASE0 % M);
    else if (valid) ch <= ch + 1'b1;
  end

  always_comb begin
    if (M == 4) begin
      // cos(pi n/2): 1 0 -1 0 ; sin(pi n/2): 0 1 0 -1 ; (-1)^n: 1 -1 1 -1
      unique case (ch)
        0: begin m[0] =  2'sd1; m[1] =  2'sd0; m[M-2] =  2'sd1; end
        1: begin m[0] =  2'sd0; m[1] =  2'sd1; m[M-2] = -2'sd1; end
        2: begin m[0] = -2'sd1; m[1] =  2'sd0; m[M-2] =  2'sd1; end
        default: begin m[0] = 2'sd0; m[1] = -2'sd1; m[M-2] = -2'sd1; end
      endcase
    end else begin
      m[0] = ch[0] ? -2'sd1 : 2'sd1;
    end
  end

endmodule

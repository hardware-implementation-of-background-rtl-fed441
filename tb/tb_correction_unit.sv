// tb_correction_unit: self-checking test of the digital correction.
// Random aligned samples y and x_der, random modulation values and random
// coefficients (including values large enough to drive x_hat into
// saturation) are applied with random gaps in in_valid. A reference model
// in the testbench computes the signal vectors m*y and m*x_der, the error
// estimate sum(c_g*x_g + c_r*x_r) rounded from 30 fractional bits, the
// difference y - e_hat rounded to 12 bits and saturated; the outputs must
// match bit for bit, the signal vectors one clock and x_hat two clocks after
// the sample.
`timescale 1ns/1ps
module tb_correction_unit;
  import tiadc_pkg::*;

  localparam int M  = 4;
  localparam int DW = 12;

  logic clk = 0, rst_n = 0, in_valid = 0;
  samp_t y = '0, x_der = '0;
  tern_t  m   [M-1];
  acoef_t c_g [M-1];
  acoef_t c_r [M-1];
  logic est_valid, out_valid;
  samp_t y_est;
  samp_t x_g [M-1];
  samp_t x_r [M-1];
  logic signed [DW-1:0] x_hat;

  correction_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_s(int bits);
    return longint'($urandom_range(0, (1 << bits) - 1)) - (longint'(1) << (bits - 1));
  endfunction

  function automatic longint rshift(longint v, int s);
    return (v + (longint'(1) << (s - 1))) >>> s;
  endfunction

  initial begin
    for (int k = 0; k < M-1; k++) begin m[k] = '0; c_g[k] = '0; c_r[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      longint ey, exg [M-1], exr [M-1], eacc, ehat, corr, q;
      int big;
      @(negedge clk);
      big = (it % 8 == 0);
      y     = samp_t'(rnd_s(big ? 17 : 15));      // about +/-2 or +/-0.5
      x_der = samp_t'(rnd_s(big ? 21 : 19));
      for (int k = 0; k < M-1; k++) begin
        m[k]   = tern_t'(int'($urandom_range(0, 2)) - 1);
        c_g[k] = acoef_t'(rnd_s(big ? 31 : 24));
        c_r[k] = acoef_t'(rnd_s(big ? 31 : 22));
      end
      in_valid = 1;
      // reference
      eacc = 0;
      for (int k = 0; k < M-1; k++) begin
        exg[k] = longint'(m[k]) * longint'(y);
        exr[k] = longint'(m[k]) * longint'(x_der);
      end
      // products stay below 2^53, their sum well inside 64 bits
      for (int k = 0; k < M-1; k++)
        eacc += exg[k] * longint'(c_g[k]) + exr[k] * longint'(c_r[k]);
      ehat = rshift(eacc, 30);
      corr = longint'(y) - ehat;
      corr = samp_t'(corr);                // wrap like the 24-bit datapath
      q = rshift(corr, 4);
      if (q > 2047) begin q = 2047; n_sat++; end
      if (q < -2048) begin q = -2048; n_sat++; end
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!est_valid || y_est !== y) begin failures++; $display("FAIL: it=%0d est_valid/y_est", it); end
      for (int k = 0; k < M-1; k++) begin
        checks++;
        if (x_g[k] !== samp_t'(exg[k]) || x_r[k] !== samp_t'(exr[k])) begin
          failures++;
          $display("FAIL: it=%0d signal vector %0d", it, k);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (!out_valid || x_hat !== DW'(q)) begin
        failures++;
        $display("FAIL: it=%0d x_hat=%0d expected %0d", it, x_hat, q);
      end
      // a gap now and then: no new output
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid || est_valid) begin failures++; $display("FAIL: valid without input"); end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_modulation_gen: self-checking test of the modulation-vector generator.
// Two instances are tested, M = 4 with PHASE0 = 1 and M = 2 with PHASE0 = 0,
// under random valid gaps. The expected vector is computed here from
// cos(2*pi*n/M), sin(2*pi*n/M) and (-1)^n of the running sample index n,
// rounded to -1/0/+1, and the channel output must equal n mod M.
`timescale 1ns/1ps
module tb_modulation_gen;
  import tiadc_pkg::*;

  localparam real PI_ = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, valid = 0;
  tern_t m4 [3];
  tern_t m2 [1];
  logic [1:0] ch4;
  logic [0:0] ch2;

  modulation_gen #(.M(4), .PHASE0(1)) dut4 (.clk, .rst_n, .valid, .m(m4), .ch(ch4));
  modulation_gen #(.M(2), .PHASE0(0)) dut2 (.clk, .rst_n, .valid, .m(m2), .ch(ch2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tern(real v);
    return v > 0.5 ? 1 : (v < -0.5 ? -1 : 0);
  endfunction

  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 3) != 0);
      begin
        int n4, e0, e1, e2, ea;
        n4 = n + 1;
        e0 = tern($cos(2.0 * PI_ * n4 / 4.0));
        e1 = tern($sin(2.0 * PI_ * n4 / 4.0));
        e2 = (n4 % 2 == 0) ? 1 : -1;
        ea = (n % 2 == 0) ? 1 : -1;
        checks++;
        if (int'(m4[0]) != e0 || int'(m4[1]) != e1 || int'(m4[2]) != e2 || int'(ch4) != n4 % 4) begin
          failures++;
          $display("FAIL: M=4 n=%0d m=(%0d,%0d,%0d) expected (%0d,%0d,%0d)", n4, m4[0], m4[1], m4[2], e0, e1, e2);
        end
        checks++;
        if (int'(m2[0]) != ea || int'(ch2) != n % 2) begin
          failures++;
          $display("FAIL: M=2 n=%0d m=%0d expected %0d", n, m2[0], ea);
        end
      end
      if (valid) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

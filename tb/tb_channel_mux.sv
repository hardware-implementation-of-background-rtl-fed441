// tb_channel_mux: self-checking test of the TIADC output multiplexer.
// Two instances, M = 4 and M = 2, get random frames, partly back to back and
// partly with random gaps, and sometimes offered while the previous frame is
// still being sent (so the frame must wait). A scoreboard checks that every
// sample leaves in channel order with the right channel number, that channel
// 0 appears one clock after the frame is taken, that back-to-back frames
// give an unbroken stream (a frame taken every M clocks), that frame_ready
// is low while a frame is being sent, and that nothing is lost or added.
`timescale 1ns/1ps
module tb_channel_mux;

  localparam int DW = 12;

  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------------------------------------------------------- M = 4
  logic                 fv4 = 0, fr4, ov4;
  logic signed [DW-1:0] ych4 [4];
  logic signed [DW-1:0] y4;
  logic [1:0]           ch4;

  channel_mux #(.M(4), .DW(DW)) dut4 (
    .clk, .rst_n, .frame_valid(fv4), .y_ch(ych4), .frame_ready(fr4),
    .out_valid(ov4), .y(y4), .ch(ch4)
  );

  // ---------------------------------------------------------------- M = 2
  logic                 fv2 = 0, fr2, ov2;
  logic signed [DW-1:0] ych2 [2];
  logic signed [DW-1:0] y2;
  logic [0:0]           ch2;

  channel_mux #(.M(2), .DW(DW)) dut2 (
    .clk, .rst_n, .frame_valid(fv2), .y_ch(ych2), .frame_ready(fr2),
    .out_valid(ov2), .y(y2), .ch(ch2)
  );

  // scoreboards: expected samples and channels, and the clock at which the
  // first sample of each frame must appear
  int     exp4 [$], expc4 [$], exp2 [$], expc2 [$];
  longint due4 [$], due2 [$];
  int     nout4 = 0, nout2 = 0, nin4 = 0, nin2 = 0;
  int     run4 = 0, maxrun4 = 0;

  // outputs are compared at the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (ov4) begin
        check(exp4.size() > 0, "M=4 sample out with none expected");
        if (exp4.size() > 0) begin
          int e, c;
          e = exp4.pop_front();
          c = expc4.pop_front();
          check(int'(y4) == e && int'(ch4) == c,
                $sformatf("M=4 output %0d: y=%0d ch=%0d, expected y=%0d ch=%0d", nout4, y4, ch4, e, c));
          if (c == 0) begin
            longint d;
            d = due4.pop_front();
            check(cyc == d, $sformatf("M=4 channel 0 at clock %0d, expected %0d", cyc, d));
          end
        end
        nout4++;
        run4++;
        if (run4 > maxrun4) maxrun4 = run4;
      end else begin
        run4 = 0;
      end
      if (ov2) begin
        check(exp2.size() > 0, "M=2 sample out with none expected");
        if (exp2.size() > 0) begin
          int e, c;
          e = exp2.pop_front();
          c = expc2.pop_front();
          check(int'(y2) == e && int'(ch2) == c,
                $sformatf("M=2 output %0d: y=%0d ch=%0d, expected y=%0d ch=%0d", nout2, y2, ch2, e, c));
          if (c == 0) begin
            longint d;
            d = due2.pop_front();
            check(cyc == d, $sformatf("M=2 channel 0 at clock %0d, expected %0d", cyc, d));
          end
        end
        nout2++;
      end
    end
  end

  // M = 4 driver: phase 0 back to back, phase 1 random gaps and early offers
  task automatic drive4(int nframes, bit gaps);
    longint t_prev = -1;
    int wrong_rate = 0;
    for (int f = 0; f < nframes; f++) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        fv4 = 0;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        t_prev = -1;
      end
      for (int m = 0; m < 4; m++) ych4[m] = DW'($urandom);
      fv4 = 1;
      while (!fr4) @(negedge clk);
      for (int m = 0; m < 4; m++) begin
        exp4.push_back(int'(ych4[m]));
        expc4.push_back(m);
      end
      // taken at the next rising edge (cyc + 1); channel 0 one clock later
      due4.push_back(cyc + 2);
      if (t_prev >= 0 && cyc + 1 - t_prev != 4) wrong_rate++;
      t_prev = cyc + 1;
      nin4 += 4;
      @(negedge clk);
    end
    fv4 = 0;
    if (!gaps) check(wrong_rate == 0, $sformatf("M=4 back-to-back frames not taken every 4 clocks (%0d)", wrong_rate));
  endtask

  // M = 2 driver, random gaps throughout
  task automatic drive2(int nframes);
    for (int f = 0; f < nframes; f++) begin
      if ($urandom_range(0, 3) == 0) begin
        fv2 = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      for (int m = 0; m < 2; m++) ych2[m] = DW'($urandom);
      fv2 = 1;
      while (!fr2) @(negedge clk);
      for (int m = 0; m < 2; m++) begin
        exp2.push_back(int'(ych2[m]));
        expc2.push_back(m);
      end
      due2.push_back(cyc + 2);
      nin2 += 2;
      @(negedge clk);
    end
    fv2 = 0;
  endtask

  // frame_ready must be low exactly while channels 0..M-2 of a frame are
  // still to leave, i.e. in the M-1 clocks after a frame is taken
  int taken_ago4 = 99, ready_err4 = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (taken_ago4 < 3 && fr4) ready_err4++;
      if (taken_ago4 >= 3 && !fr4) ready_err4++;
    end
  end
  always @(posedge clk) begin
    if (!rst_n) taken_ago4 <= 99;
    else if (fv4 && fr4) taken_ago4 <= 0;
    else if (taken_ago4 < 99) taken_ago4 <= taken_ago4 + 1;
  end

  initial begin
    for (int m = 0; m < 4; m++) ych4[m] = '0;
    for (int m = 0; m < 2; m++) ych2[m] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(fr4 && fr2 && !ov4 && !ov2, "ready/valid wrong after reset");
    @(negedge clk);
    fork
      begin
        drive4(200, 1'b0);
        repeat (6) @(negedge clk);   // let the last frame leave
        check(maxrun4 >= 200 * 4, $sformatf("M=4 back-to-back stream broken (longest run %0d)", maxrun4));
        drive4(1500, 1'b1);
      end
      drive2(2000);
    join
    repeat (10) @(negedge clk);
    check(nout4 == nin4 && exp4.size() == 0, $sformatf("M=4 %0d samples in, %0d out", nin4, nout4));
    check(nout2 == nin2 && exp2.size() == 0, $sformatf("M=2 %0d samples in, %0d out", nin2, nout2));
    check(ready_err4 == 0, $sformatf("M=4 frame_ready wrong on %0d clocks", ready_err4));
    $display("M=4: %0d samples, M=2: %0d samples", nout4, nout2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

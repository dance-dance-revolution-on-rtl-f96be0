// Self-checking testbench of beat_detect at its default parameters.
//
// Frames of FFT bins are generated with a quiet, jittering background level and
// loud frames on a regular beat grid, plus two kinds of spurious loud frames: one
// two frames after a beat (to be rejected by the minimum gap) and one five
// frames after a beat (to be rejected by the moving average of beat intervals).
// A reference model in this file recomputes the sub-band energy, the one-second
// history test and the interval filter with 64-bit integers and compares every
// output pulse, its value and its latency (three cycles after bin 31).
`timescale 1ns/1ps
module tb_beat_detect;
  localparam int XK_W = 27, NB = 32, HIST = 47, CQ8 = 333, IH = 8, MING = 4;

  logic clk = 0, rst_n = 0;
  logic xk_valid = 0;
  logic [9:0] xk_index = '0;
  logic signed [XK_W-1:0] xk_re = '0, xk_im = '0;
  logic energy_valid, raw_beat, beat_irq;
  logic [2*XK_W+4:0] energy;
  logic [7:0] beat_interval;

  beat_detect dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_raw = 0, n_valid = 0, n_rej_gap = 0, n_rej_avg = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // reference state
  longint unsigned rhist[$];
  longint unsigned rsum = 0;
  int unsigned rint[$];
  int unsigned risum = 0;
  int unsigned rt = 255;

  // expected outputs of the frame in flight
  longint unsigned exp_e;
  bit exp_raw, exp_valid;
  int unsigned exp_int;
  int last_bin_cycle;

  task automatic ref_frame(input longint unsigned e);
    bit full, raw, gap_ok, avg_ok;
    full = rhist.size() == HIST;
    raw = full && (e * HIST * 256 > CQ8 * rsum);
    gap_ok = rt >= MING;
    avg_ok = (rint.size() == 0) || (rt * rint.size() * 2 >= risum);
    exp_e = e; exp_raw = raw; exp_valid = raw && gap_ok && avg_ok; exp_int = rt;
    if (raw && !gap_ok) n_rej_gap++;
    else if (raw && !avg_ok) n_rej_avg++;
    rhist.push_front(e); rsum += e;
    if (rhist.size() > HIST) rsum -= rhist.pop_back();
    if (exp_valid) begin
      if (rt != 255) begin
        rint.push_front(rt); risum += rt;
        if (rint.size() > IH) risum -= rint.pop_back();
      end
      rt = 1;
    end else if (rt != 255) rt++;
  endtask

  // output checker
  int pulses_seen = 0;
  always @(posedge clk) begin
    if (rst_n && energy_valid) begin
      pulses_seen++;
      check(cyc - last_bin_cycle == 3, "energy latency");
      check(energy == exp_e, "energy value");
      if (energy != exp_e) $display("  got %0d exp %0d", energy, exp_e);
      check(raw_beat == exp_raw, "raw beat");
      check(beat_irq == exp_valid, "valid beat");
      if (exp_valid) check(beat_interval == exp_int[7:0], "beat interval");
      if (raw_beat) n_raw++;
      if (beat_irq) n_valid++;
    end else if (rst_n) begin
      check(!raw_beat && !beat_irq, "no pulse outside energy_valid");
    end
  end

  longint unsigned e;
  longint re, im;
  task automatic send_frame(input int amp);
    e = 0;
    for (int k = 0; k < NB + 8; k++) begin
      // random idle cycles between bins
      while ($urandom_range(3) == 0) begin
        @(negedge clk); xk_valid = 0;
      end
      @(negedge clk);
      xk_valid = 1;
      xk_index = 10'(k);
      if (k < NB) begin
        re = longint'(amp / (k + 1)) + longint'($urandom_range(200)) - 64'sd100;
        im = -longint'(amp / (k + 2)) + longint'($urandom_range(200)) - 64'sd100;
        xk_re = XK_W'(re); xk_im = XK_W'(im);
        e += unsigned'(re * re + im * im);
        if (k == NB - 1) begin
          ref_frame(e);
          last_bin_cycle = cyc;
        end
      end else begin
        xk_re = 27'h3FFFFFF; xk_im = -27'sd5000000;   // must be ignored
      end
    end
    @(negedge clk); xk_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frames = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int amp;
      amp = 20000 + int'($urandom_range(4000));
      if (f >= 55 && (f - 55) % 12 == 0) amp = 400000;
      if (f == 55 + 12*4 + 2) amp = 300000;         // too soon: minimum gap
      if (f == 55 + 12*6 + 5) amp = 300000;         // too soon for the average
      if (f == 20) amp = 400000;                    // history not yet full
      if (f == 57) amp = 400000;                    // no interval history yet: gap only
      send_frame(amp);
      frames++;
    end
    repeat (10) @(negedge clk);
    check(pulses_seen == frames, "one energy pulse per frame");
    check(n_valid >= 10, "valid beats occurred");
    check(n_rej_gap >= 2, "gap rejection occurred");
    check(n_rej_avg >= 1, "average rejection occurred");
    check(n_raw == n_valid + n_rej_gap + n_rej_avg, "raw beat accounting");
    $display("raw=%0d valid=%0d rej_gap=%0d rej_avg=%0d", n_raw, n_valid, n_rej_gap, n_rej_avg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

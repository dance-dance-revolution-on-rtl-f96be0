// Self-checking testbench of ac97_capture.
//
// An AC-link model sends 300 frames with random left samples and random bits in
// all other slots.  Each extracted sample is compared, in order, with what was
// sent; frames whose slot-3 tag is cleared must give no sample; one frame slip
// must drop `locked` once and the block must realign by itself.  The spacing
// of sample strobes (256 bit clocks) and the clk_48k period are checked too.
`timescale 1ns/1ps
module tb_ac97_capture;
  logic bit_clk = 0, rst_n = 0;
  logic [15:0] left = 16'h1234;
  logic tag_left = 1, slip = 0;
  logic sync, sdata, frame_start;
  logic [15:0] sample;
  logic sample_valid, clk_48k, codec_ready, locked;

  ac97_codec_model codec (.bit_clk, .left, .tag_left, .slip, .sync, .sdata, .frame_start);

  ac97_capture dut (.clk(~bit_clk), .rst_n, .sync, .sdata_in(sdata), .sample,
                    .sample_valid, .clk_48k, .codec_ready, .locked);

  always #40.69 bit_clk = ~bit_clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [15:0] expq[$];
  int pushed = 0;
  int frames = 0, got = 0, skipped = 0, unlocks = 0, relocks = 0;
  int bc = 0, last_sv = -1, last_48 = -1;
  bit started = 0;

  always @(negedge bit_clk) begin
    bc++;
    if (frame_start) begin
      frames++;
      left = 16'($urandom);
      tag_left = !(frames >= 50 && frames < 53);
      if (!tag_left) skipped++;
      if (frames == 100) slip = 1; else slip = 0;
      // the first frame after reset may be only partly seen
      if (tag_left && frames >= 2) begin expq.push_back(left); pushed++; end
      if (frames == 2) started = 1;
    end
  end

  // the DUT's clock is the inverted bit clock: its active edge is our negedge
  always @(negedge bit_clk) begin
    if (rst_n && sample_valid && started) begin
      got++;
      check(expq.size() > 0, "unexpected sample");
      if (expq.size() > 0) check(sample == expq.pop_front(), "sample value");
      if (last_sv >= 0)
        check((bc - last_sv) == 256 || (bc - last_sv) == 257 ||
              (bc - last_sv) == 4 * 256 || (bc - last_sv) == 4 * 256 + 1, "strobe spacing");
      last_sv = bc;
    end
  end

  logic locked_q = 0, c48_q = 0;
  always @(negedge bit_clk) begin
    locked_q <= locked;
    c48_q <= clk_48k;
    if (locked_q && !locked) unlocks++;
    if (!locked_q && locked) relocks++;
    if (clk_48k && !c48_q && frames > 3) begin
      if (last_48 >= 0) check((bc - last_48) == 256 || (bc - last_48) == 257, "clk_48k period");
      last_48 = bc;
    end
  end

  initial begin
    #(81.38 * 256 * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge bit_clk);
    rst_n = 1;
    wait (frames == 300);
    tag_left = 1;
    repeat (200) @(negedge bit_clk);
    check(got == pushed && got >= 290, "number of samples");
    check(expq.size() == 0, "all samples delivered");
    check(unlocks == 1, "slip dropped lock once");
    check(relocks == 2, "locked after start and after the slip");
    check(locked && codec_ready, "locked and codec ready at the end");
    $display("frames=%0d samples=%0d skipped=%0d unlocks=%0d", frames, got, skipped, unlocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

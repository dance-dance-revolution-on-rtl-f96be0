// End-to-end testbench of ddr_top at its default parameters.
//
// Phase 1, display: the character memory is written through port A with a
// static hollow up arrow, a moving filled left arrow, the label "SCORE" and a
// score, and read back.  One whole frame is captured from the VGA outputs;
// every pixel of both arrows and of the digits is compared with shapes built
// here, and in the lower half of the screen the overlay must show through the
// blank cells.
// Phase 2, pad: a PlayStation controller model answers the first poll; the
// button register must hold the pressed arrows.
// Phase 3, audio: an AC-link model sends a tone with loud bass beats every 16
// FFT frames (0.34 s) plus two spurious loud frames; the samples pass through
// the extractor, a behavioural FFT model and the beat detector.  Raw beats must
// come for every loud frame after the one-second history has filled, valid
// beat interrupts only for the beats, with an interval of 16 frames.
// Every mechanism (sample capture, history fill, raw beat, valid beat, the two
// rejection rules, overlay, glyph drawing, pad update) is counted and must have
// happened.
`timescale 1ns/1ps
module tb_ddr_top;
  import ddr_pkg::*;

  // clocks, each can be stopped to keep the run short
  logic bit_clk = 0, pix_clk = 0, sys_clk = 0;
  bit run_aud = 0, run_pix = 0, run_sys = 1;
  always begin wait (run_aud); #40.69 bit_clk = ~bit_clk; end
  always begin wait (run_pix); #12.5  pix_clk = ~pix_clk; end
  always begin wait (run_sys); #5     sys_clk = ~sys_clk; end

  logic aud_rst_n = 0, pix_rst_n = 0, sys_rst_n = 0;

  // AC-link and FFT
  logic [15:0] left = 0;
  logic tag_left = 1, slip = 0, ac_sync, ac_sdata, frame_start;
  logic fft_clk, fft_ce, clk_48k, xk_dv;
  logic [15:0] fft_xn_re;
  logic [9:0] xk_index;
  logic signed [26:0] xk_re, xk_im;
  int out_frame;
  logic beat_irq, beat_raw, ac97_locked, ac97_codec_ready;
  logic [7:0] beat_interval;
  // memory port A
  logic bram_we = 0;
  logic [12:0] bram_addr = 0;
  logic [15:0] bram_wdata = 0, bram_rdata;
  // display
  logic ov_en = 0;
  rgb_t ov_rgb = 24'h203040;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_blank_n, vga_pix_clk;
  // pad
  logic psx_att_n, psx_clk, psx_cmd, psx_dat = 1;
  logic [15:0] pad_buttons;
  logic [7:0] pad_id;
  logic pad_update, pad_error;

  ac97_codec_model codec (.bit_clk, .left, .tag_left, .slip, .sync(ac_sync), .sdata(ac_sdata), .frame_start);

  fft_model fft (.clk(fft_clk), .ce(fft_ce), .xn_re(fft_xn_re), .xk_dv, .xk_index, .xk_re, .xk_im, .out_frame);

  ddr_top dut (
    .ac97_bit_clk(bit_clk), .ac97_sync(ac_sync), .ac97_sdata_in(ac_sdata), .aud_rst_n,
    .fft_clk, .fft_xn_re, .fft_ce, .clk_48k,
    .fft_xk_dv(xk_dv), .fft_xk_index(xk_index), .fft_xk_re(xk_re), .fft_xk_im(xk_im),
    .beat_irq, .beat_raw, .beat_interval, .ac97_locked, .ac97_codec_ready,
    .bram_clk(sys_clk), .bram_we, .bram_addr, .bram_wdata, .bram_rdata,
    .pix_clk, .pix_rst_n, .ov_en, .ov_rgb,
    .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync, .vga_blank_n, .vga_pix_clk,
    .sys_clk, .sys_rst_n, .psx_att_n, .psx_clk, .psx_cmd, .psx_dat,
    .pad_buttons, .pad_id, .pad_update, .pad_error
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int m_samples = 0, m_hist_fill = 0, m_raw = 0, m_valid = 0, m_rej_gap = 0, m_rej_avg = 0;
  int m_overlay = 0, m_glyph = 0, m_pad = 0;

  initial begin
    #4s; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ display
  bit up_img [32][32];
  function automatic bit arrow_px(input int dir, input int px, input int py);
    case (dir)
      0: return up_img[px][py];
      1: return up_img[31 - py][px];
      2: return up_img[py][px];
      default: return up_img[31 - px][py];
    endcase
  endfunction
  function automatic bit hollow_px(input int dir, input int px, input int py);
    bit i;
    i = arrow_px(dir, px, py);
    if (!i) return 0;
    if (px == 0 || px == 31 || py == 0 || py == 31) return 1;
    return !(arrow_px(dir, px - 1, py) && arrow_px(dir, px + 1, py) &&
             arrow_px(dir, px, py - 1) && arrow_px(dir, px, py + 1));
  endfunction

  logic [15:0] screen [TEXT_ROWS * TEXT_COLS];
  task automatic put(input int r, input int c, input logic [7:0] code, input logic [3:0] color);
    @(negedge sys_clk);
    bram_we = 1; bram_addr = 13'(r * TEXT_COLS + c); bram_wdata = {color, 4'h0, code};
    screen[r * TEXT_COLS + c] = bram_wdata;
    @(negedge sys_clk);
    bram_we = 0;
  endtask

  logic [23:0] frame_buf [V_ACTIVE][H_ACTIVE];
  int cap_frames = 0, cx = 0, cy = -1;
  logic bl_q = 0, vs_q = 0;
  always @(posedge pix_clk) if (pix_rst_n) begin
    if (vga_vsync && !vs_q) begin cap_frames++; cy = -1; ov_en = 0; end
    if (vga_blank_n && !bl_q) begin cy++; cx = 0; end
    if (vga_blank_n && cap_frames == 1 && cy >= 0 && cy < V_ACTIVE && cx < H_ACTIVE)
      frame_buf[cy][cx] = {vga_r, vga_g, vga_b};
    if (vga_blank_n) cx++;
    if (!vga_blank_n && bl_q) ov_en = (cy + 1 >= 300);
    bl_q <= vga_blank_n; vs_q <= vga_vsync;
  end

  function automatic logic [23:0] pal(input logic [3:0] i);
    logic [7:0] hi;
    logic [23:0] c;
    hi = i[3] ? 8'h55 : 8'h00;
    c = {(i[2] ? 8'hAA : 8'h00) + hi, (i[1] ? 8'hAA : 8'h00) + hi, (i[0] ? 8'hAA : 8'h00) + hi};
    if (i == 4'd6) c[15:8] = 8'h55;
    return c;
  endfunction

  task automatic display_phase();
    // hollow up arrow (static target) at cells (1..4, 40..43), colour 7
    for (int t = 0; t < 16; t++) put(1 + t / 4, 40 + t % 4, 8'hE0 | 8'(t), 4'd7);
    // filled left arrow (moving) at cells (50..53, 20..23), colour 12
    for (int t = 0; t < 16; t++) put(50 + t / 4, 20 + t % 4, 8'h80 | 8'(t), 4'd12);
    // "SCORE 1800" on row 2 at the right
    begin
      logic [7:0] txt [10] = '{8'h53, 8'h43, 8'h4F, 8'h52, 8'h45, 8'h20, 8'h31, 8'h38, 8'h30, 8'h30};
      for (int i = 0; i < 10; i++) put(2, 88 + i, txt[i], 4'd15);
    end
    // read back through port A
    for (int t = 0; t < 16; t++) begin
      @(negedge sys_clk); bram_addr = 13'((50 + t / 4) * TEXT_COLS + 20 + t % 4);
      @(negedge sys_clk); check(bram_rdata == screen[(50 + t / 4) * TEXT_COLS + 20 + t % 4], "port A read back");
    end
    run_pix = 1;
    repeat (4) @(negedge pix_clk);
    pix_rst_n = 1;
    fork
      wait (cap_frames == 2);
      begin repeat (3 * H_TOTAL * V_TOTAL) @(posedge pix_clk); check(0, "display timed out"); end
    join_any
    disable fork;
    run_pix = 0;
    // compare the captured frame
    for (int y = 0; y < V_ACTIVE; y++)
      for (int x = 0; x < H_ACTIVE; x++) begin
        logic [15:0] w;
        logic [23:0] e;
        bit on;
        w = screen[(y / 8) * TEXT_COLS + x / 8];
        on = 0;
        if (w[7:0] >= 8'hC0) on = hollow_px(2, (int'(w[1:0])) * 8 + x % 8, (int'(w[3:2])) * 8 + y % 8);
        else if (w[7:0] >= 8'h80) on = arrow_px(0, (int'(w[1:0])) * 8 + x % 8, (int'(w[3:2])) * 8 + y % 8);
        else if (w[7:0] == 8'h31) on = (x % 8 == 5) && (y % 8 < 7);
        else if (w[7:0] == 8'h38 || w[7:0] == 8'h30) begin
          if (y % 8 == 0 || y % 8 == 6) on = (x % 8 >= 1 && x % 8 <= 5);
          else if (y % 8 == 3) on = (w[7:0] == 8'h38) ? (x % 8 >= 1 && x % 8 <= 5) : (x % 8 == 1 || x % 8 == 5);
          else if (y % 8 < 6) on = (x % 8 == 1 || x % 8 == 5);
        end else if (w[7:0] != 8'h00 && w[7:0] != 8'h20) begin
          continue;   // letters: drawn, not compared here
        end
        e = on ? pal(w[15:12]) : (y >= 300 ? ov_rgb : 24'h0);
        if (on) m_glyph++;
        if (!on && y >= 300) m_overlay++;
        check(frame_buf[y][x] == e, $sformatf("pixel %0d,%0d", x, y));
      end
  endtask

  // ------------------------------------------------------------ pad
  logic [7:0] pad_reply [5] = '{8'hFF, 8'h41, 8'h5A, 8'b0101_1111, 8'hFF};  // UP and LEFT... active low
  int pad_bit = 0;
  logic [39:0] pad_cmd_bits;
  always @(negedge psx_att_n) pad_bit = 0;
  always @(negedge psx_clk) if (!psx_att_n) psx_dat = pad_reply[pad_bit / 8][pad_bit % 8];
  always @(posedge psx_clk) if (!psx_att_n) begin pad_cmd_bits[pad_bit] = psx_cmd; pad_bit++; end
  always @(posedge sys_clk) if (pad_update) m_pad++;

  // each phase waits for its result or counts a failure after a fixed number of cycles
  task automatic pad_phase();
    fork
      wait (pad_update);
      begin repeat (200000) @(posedge sys_clk); check(0, "pad poll timed out"); end
    join_any
    disable fork;
    @(negedge sys_clk);
    // byte 3 = 0101_1111: bits 5 (DOWN) and 7 (LEFT) low = pressed
    check(pad_buttons == 16'h00A0, $sformatf("pad buttons %h", pad_buttons));
    check(pad_id == 8'h41 && !pad_error, "pad id");
    check(pad_cmd_bits[7:0] == 8'h01 && pad_cmd_bits[15:8] == 8'h42 && pad_cmd_bits[39:16] == 0, "pad command");
  endtask

  // ------------------------------------------------------------ audio
  localparam int PERIOD = 16, FIRST = 52, NFRAMES = 140;
  localparam int SP_GAP = FIRST + 2;                // too close: minimum gap (no interval history yet)
  localparam int SP_AVG = FIRST + 4 * PERIOD + 6;   // too close for the average
  localparam int EARLY  = 20;                       // before the history is full
  int n_cap = 0;

  function automatic bit is_beat(input int f);
    return f >= FIRST && (f - FIRST) % PERIOD == 0;
  endfunction

  function automatic logic [15:0] wave(input int n);
    int f;
    real v;
    f = n / 1024;
    v = 1500.0 * $sin(2.0 * 3.14159265358979 * 10.0 * (n % 1024) / 1024.0);
    v += real'($urandom_range(400)) - 200.0;
    if (is_beat(f) || f == EARLY) v += 12000.0 * $sin(2.0 * 3.14159265358979 * 4.0 * (n % 1024) / 1024.0);
    if (f == SP_GAP || f == SP_AVG) v += 9000.0 * $sin(2.0 * 3.14159265358979 * 3.0 * (n % 1024) / 1024.0);
    return 16'($rtoi(v));
  endfunction

  always @(negedge bit_clk) if (frame_start) left = wave(n_cap);
  always @(posedge fft_clk) if (aud_rst_n && fft_ce) n_cap++;

  int last_valid_frame = -1;
  always @(posedge fft_clk) if (aud_rst_n) begin
    if (beat_raw) begin
      m_raw++;
      check(is_beat(out_frame) || out_frame == SP_GAP || out_frame == SP_AVG,
            $sformatf("raw beat on frame %0d", out_frame));
      if (!beat_irq && out_frame == SP_GAP) m_rej_gap++;
      if (!beat_irq && out_frame == SP_AVG) m_rej_avg++;
      check(beat_irq == is_beat(out_frame), $sformatf("valid beat decision on frame %0d", out_frame));
    end
    if (beat_irq) begin
      m_valid++;
      check(beat_raw, "valid beat is a raw beat");
      if (last_valid_frame >= 0)
        check(beat_interval == 8'(PERIOD), $sformatf("beat interval %0d", beat_interval));
      last_valid_frame = out_frame;
    end
  end

  // the early loud frame must give no raw beat while the history fills
  bit early_seen = 0;
  always @(posedge fft_clk) if (xk_dv && xk_index == 10'd1023 && out_frame == EARLY) early_seen = 1;

  task automatic audio_phase();
    int expected_beats;
    run_aud = 1;
    repeat (10) @(negedge bit_clk);
    aud_rst_n = 1;
    fork
      wait (out_frame == NFRAMES);
      begin repeat ((NFRAMES + 4) * 1024 * 256) @(posedge bit_clk); check(0, "audio timed out"); end
    join_any
    disable fork;
    m_samples = n_cap;
    if (early_seen) m_hist_fill++;
    expected_beats = 0;
    for (int f = FIRST; f < NFRAMES; f++) if (is_beat(f)) expected_beats++;
    check(m_valid == expected_beats, $sformatf("valid beats %0d of %0d", m_valid, expected_beats));
    check(m_raw == expected_beats + 2, "raw beats");
    check(ac97_locked && ac97_codec_ready, "AC-link locked");
    check(n_cap >= NFRAMES * 1024, "samples captured");
  endtask

  initial begin
    for (int v = 0; v < 32; v++)
      for (int u = 0; u < 32; u++)
        up_img[v][u] = (v >= 1 && v <= 15 && u >= 16 - v && u <= 15 + v) ||
                       (v >= 16 && v <= 30 && u >= 10 && u <= 21);
    for (int i = 0; i < TEXT_ROWS * TEXT_COLS; i++) screen[i] = '0;
    repeat (4) @(negedge sys_clk);
    sys_rst_n = 1;
    pad_phase();
    display_phase();
    run_sys = 0;
    audio_phase();
    check(m_samples > 0, "mechanism: sample capture");
    check(m_hist_fill > 0, "mechanism: history fill");
    check(m_raw > 0, "mechanism: raw beat");
    check(m_valid > 0, "mechanism: valid beat interrupt");
    check(m_rej_gap > 0, "mechanism: minimum gap rejection");
    check(m_rej_avg > 0, "mechanism: moving average rejection");
    check(m_overlay > 0, "mechanism: overlay");
    check(m_glyph > 0, "mechanism: glyph drawing");
    check(m_pad > 0, "mechanism: pad update");
    $display("samples=%0d raw=%0d valid=%0d rej_gap=%0d rej_avg=%0d overlay_px=%0d glyph_px=%0d pad=%0d",
             m_samples, m_raw, m_valid, m_rej_gap, m_rej_avg, m_overlay, m_glyph, m_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

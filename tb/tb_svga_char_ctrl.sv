// Self-checking testbench of svga_char_ctrl.
//
// A memory model with one cycle of read latency holds a test screen: cells
// whose row+column is 0 mod 3 hold a solid block in colour (7*row+col) mod 16,
// 1 mod 3 hold a blank, 2 mod 3 hold the digit '1' in colour 9.  The checker
// follows the outputs only (hsync, vsync, blank_n), works out each pixel's
// position and compares every pixel of a whole frame with the expected colour.
// In the lower half of the frame the overlay is enabled and blank pixels must
// show the overlay colour.  Line and frame lengths, sync widths and the
// horizontal front porch are checked against the 800x600 at 60 Hz timing.
`timescale 1ns/1ps
module tb_svga_char_ctrl;
  import ddr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [12:0] ram_addr;
  char_word_t ram_data;
  logic ov_en = 0;
  rgb_t ov_rgb = 24'h123456;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync, vga_blank_n;

  svga_char_ctrl dut (.*);
  always #12.5 clk = ~clk;

  function automatic char_word_t cell_word(input int r, input int c);
    char_word_t w;
    w = '0;
    if ((r + c) % 3 == 0) begin w.code = 8'h7F; w.color = 4'((7 * r + c) % 16); end
    else if ((r + c) % 3 == 1) begin w.code = 8'h20; w.color = 4'd3; end
    else begin w.code = 8'h31; w.color = 4'd9; end
    return w;
  endfunction
  always @(posedge clk) ram_data <= cell_word(int'(ram_addr) / 100, int'(ram_addr) % 100);

  logic [23:0] pal [16] = '{
    24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA, 24'hAA5500, 24'hAAAAAA,
    24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF, 24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};

  int checks = 0, failures = 0, pix_fail = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int frames = 0, ay = -1, ax = 0, line_len = 0, hs_len = 0, vs_hs = 0;
  int clk_cnt = 0, last_hs_rise = -1, last_vs_rise = -1, blank_fall = -1, act_lines = 0;
  int pixels_checked = 0, overlay_px = 0, glyph_px = 0;
  logic hs_q = 0, vs_q = 0, bl_q = 0;

  always @(posedge clk) if (rst_n) begin
    clk_cnt++;
    // horizontal timing
    if (vga_hsync && !hs_q) begin
      if (last_hs_rise >= 0) check(clk_cnt - last_hs_rise == H_TOTAL, "line length");
      if (blank_fall >= 0 && clk_cnt - blank_fall < H_TOTAL)
        check(clk_cnt - blank_fall == H_FP, "front porch");
      last_hs_rise = clk_cnt;
      hs_len = 0;
    end
    if (vga_hsync) hs_len++;
    if (!vga_hsync && hs_q) check(hs_len == H_SYNC, "hsync width");
    // vertical timing
    if (vga_vsync && !vs_q) begin
      if (last_vs_rise >= 0) begin
        check(clk_cnt - last_vs_rise == H_TOTAL * V_TOTAL, "frame length");
        check(act_lines == V_ACTIVE, "active lines");
      end
      last_vs_rise = clk_cnt;
      frames++;
      ay = -1;
      act_lines = 0;
      ov_en = 0;
    end
    if (!vga_vsync && vs_q) check(clk_cnt - last_vs_rise == V_SYNC * H_TOTAL, "vsync width");
    // active video
    if (vga_blank_n && !bl_q) begin ay++; ax = 0; act_lines++; end
    if (!vga_blank_n && bl_q) begin
      check(ax == H_ACTIVE, "active pixels per line");
      blank_fall = clk_cnt;
      if (ay + 1 >= 300) ov_en = 1;
    end
    if (vga_blank_n && frames == 1) begin
      char_word_t w;
      bit on;
      logic [23:0] e;
      w = cell_word(ay / 8, ax / 8);
      case (w.code)
        8'h7F: on = 1;
        8'h31: on = ((ax % 8) == 5) && ((ay % 8) < 7);
        default: on = 0;
      endcase
      e = on ? pal[w.color] : (ov_en ? ov_rgb : 24'h0);
      if (on) glyph_px++;
      if (!on && ov_en) overlay_px++;
      check({vga_r, vga_g, vga_b} == e, $sformatf("pixel %0d,%0d", ax, ay));
      pixels_checked++;
    end
    if (vga_blank_n) ax++;
    if (!vga_blank_n) check({vga_r, vga_g, vga_b} == 24'h0, "black in blanking");
    hs_q <= vga_hsync; vs_q <= vga_vsync; bl_q <= vga_blank_n;
  end

  initial begin
    #(25.0 * 1056 * 628 * 3); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (frames == 2);
    repeat (10) @(negedge clk);
    check(pixels_checked == 800 * 600, "whole frame checked");
    check(overlay_px > 0 && glyph_px > 0, "overlay and glyph pixels seen");
    $display("pixels=%0d glyph=%0d overlay=%0d", pixels_checked, glyph_px, overlay_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Character-mode SVGA controller with colour characters and an overlay input.
//
// The screen (800x600 at 60 Hz, 40 MHz pixel clock) is a grid of 100x75
// character cells of 8x8 pixels.  For each pixel the controller reads the word
// of its cell from the character memory (port B of char_bram), looks up the
// row of the glyph in char_gen_rom and the 4-bit colour in clut.  A set glyph
// pixel shows the character's colour.  A clear one shows black, or, with ov_en
// high, the overlay pixel ov_rgb, which lets a frame buffer draw a background
// picture under the characters.
//
// Pipeline, one pixel per clock:
//   0  svga_timing: x, y, active, syncs; ram_addr = (y/8)*100 + x/8
//   1  character word from the memory
//   2  glyph row from the generator, colour index registered
//   3  glyph bit selected, colour from the CLUT
//   4  output register: RGB (black outside the active area), hsync, vsync,
//      blank_n
// The syncs are delayed with the pixels, so the outputs are aligned with each
// other; they lag the raster counters by four clocks.  ov_rgb is sampled into
// the output register, i.e. it must carry the pixel that appears on the next
// clock's outputs.
//
// The memory layout (code in bits 7:0, colour in bits 15:12, 16 colours) and
// the overlay multiplexer follow the design description; cell size, pipeline
// depth and sync polarity (active high, VESA) are this design's choices.
module svga_char_ctrl
  import ddr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  output logic [CRAM_AW-1:0] ram_addr,
  input  char_word_t         ram_data,
  input  logic               ov_en,
  input  rgb_t               ov_rgb,
  output logic [7:0]         vga_r,
  output logic [7:0]         vga_g,
  output logic [7:0]         vga_b,
  output logic               vga_hsync,
  output logic               vga_vsync,
  output logic               vga_blank_n
);
  typedef struct packed {
    logic [2:0] xb;
    logic [2:0] yr;
    logic       act;
    logic       hs;
    logic       vs;
  } pix_ctl_t;

  logic [10:0] x;
  logic [9:0]  y;
  logic        active, hsync, vsync, frame_start;

  svga_timing u_timing (
    .clk, .rst_n, .x, .y, .active, .hsync, .vsync, .frame_start
  );

  // stage 0: cell address, row*100 = row*64 + row*32 + row*4
  logic [6:0] cell_row;
  logic [7:0] cell_col;
  always_comb begin
    cell_row = y[9:3];
    cell_col = x[10:3];
    ram_addr = CRAM_AW'({cell_row, 6'b0}) + CRAM_AW'({cell_row, 5'b0}) +
               CRAM_AW'({cell_row, 2'b0}) + CRAM_AW'(cell_col);
  end

  pix_ctl_t s1, s2, s3;
  logic [3:0] s2_color;
  logic       s3_pix;
  logic [7:0] glyph_bits;
  rgb_t       char_rgb;

  char_gen_rom u_rom (.clk, .code(ram_data.code), .row(s1.yr), .bits(glyph_bits));
  clut         u_clut (.clk, .idx(s2_color), .rgb(char_rgb));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      s2_color <= '0;
      s3_pix <= 1'b0;
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
      vga_hsync <= 1'b0; vga_vsync <= 1'b0; vga_blank_n <= 1'b0;
    end else begin
      s1 <= '{xb: x[2:0], yr: y[2:0], act: active, hs: hsync, vs: vsync};
      s2 <= s1;
      s2_color <= ram_data.color;
      s3 <= s2;
      s3_pix <= glyph_bits[3'd7 - s2.xb];
      vga_hsync   <= s3.hs;
      vga_vsync   <= s3.vs;
      vga_blank_n <= s3.act;
      if (!s3.act) begin
        {vga_r, vga_g, vga_b} <= '0;
      end else if (s3_pix) begin
        {vga_r, vga_g, vga_b} <= char_rgb;
      end else if (ov_en) begin
        {vga_r, vga_g, vga_b} <= ov_rgb;
      end else begin
        {vga_r, vga_g, vga_b} <= '0;
      end
    end
  end
endmodule

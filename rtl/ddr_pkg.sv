// Shared constants and types of the dance-game hardware.
//
// AC-link frame layout (AC'97 rev 2.x): a frame is 256 BIT_CLK periods, slot 0
// (the tag) is 16 bits, slots 1-12 are 20 bits each, MSB first.  Slot 3 carries
// the left PCM channel; a 16-bit codec fills its 16 most significant bits.
//
// SVGA timing is the VESA 800x600 at 60 Hz mode that a 40 MHz pixel clock
// gives.  The display is character mapped with 8x8 pixel cells, so the screen is
// 100 columns by 75 rows and the character memory holds 8192 words of 16 bits.
// A character word has the code in bits 7:0 and the colour index in bits 15:12.
package ddr_pkg;

  // ---------------- AC-link ----------------
  localparam int AC_FRAME_BITS = 256;
  localparam int AC_TAG_BITS   = 16;
  localparam int AC_SLOT_BITS  = 20;
  localparam int AC_LEFT_SLOT  = 3;
  // first bit of slot 3 inside the frame: 16 + 2*20 = 56
  localparam int AC_LEFT_FIRST = AC_TAG_BITS + (AC_LEFT_SLOT - 1) * AC_SLOT_BITS;
  localparam int AC_LEFT_LAST  = AC_LEFT_FIRST + AC_SLOT_BITS - 1;
  localparam int PCM_W         = 16;

  // ---------------- FFT stream ----------------
  localparam int FFT_N      = 1024;
  localparam int FFT_IDX_W  = 10;
  // unscaled output width of an N-point FFT: input + log2(N) + 1
  localparam int FFT_OUT_W  = PCM_W + FFT_IDX_W + 1;

  // ---------------- SVGA 800x600 @ 60 Hz ----------------
  localparam int H_ACTIVE = 800;
  localparam int H_FP     = 40;
  localparam int H_SYNC   = 128;
  localparam int H_BP     = 88;
  localparam int H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP;   // 1056
  localparam int V_ACTIVE = 600;
  localparam int V_FP     = 1;
  localparam int V_SYNC   = 4;
  localparam int V_BP     = 23;
  localparam int V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP;   // 628

  localparam int CHAR_W    = 8;
  localparam int CHAR_H    = 8;
  localparam int TEXT_COLS = H_ACTIVE / CHAR_W;                // 100
  localparam int TEXT_ROWS = V_ACTIVE / CHAR_H;                // 75
  localparam int CRAM_AW   = 13;                               // 8192 >= 7500 cells
  localparam int CRAM_DW   = 16;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [3:0] color;   // bits 15:12, index into the CLUT
    logic [3:0] unused;  // bits 11:8
    logic [7:0] code;    // bits 7:0, character code
  } char_word_t;

  // Character codes with a fixed meaning in the character generator.
  localparam logic [7:0] CH_SPACE = 8'h20;
  localparam logic [7:0] CH_BLOCK = 8'h7F;   // solid 8x8 block
  localparam logic [7:0] CH_ARROW = 8'h80;   // first arrow tile

  // Arrow directions in dance-pad order (left, down, up, right).
  typedef enum logic [1:0] {
    DIR_LEFT  = 2'd0,
    DIR_DOWN  = 2'd1,
    DIR_UP    = 2'd2,
    DIR_RIGHT = 2'd3
  } arrow_dir_t;

endpackage

// Hardware of the dance game: audio beat detection, character display and
// dance-pad input, around a processor that runs the game.
//
// Audio path (BIT_CLK domain): ac97_capture listens to the AC-link between the
// AC'97 controller and the codec and delivers one 16-bit left sample per 48 kHz
// frame.  The samples go out to a streaming 1024-point FFT core (fft_* ports,
// with the sample strobe as its clock enable); its results come back in and
// beat_detect turns the low-band energy into a beat interrupt, beat_irq, for
// the interrupt controller.  The audio domain is clocked by the inverted
// BIT_CLK, which is also given to the FFT as fft_clk.
//
// Display path (pixel clock domain, 40 MHz from the clock manager):
// svga_char_ctrl reads the 100x75 character screen from port B of char_bram
// and drives the VGA DAC.  Port A of char_bram (bram_* ports, bus clock) is
// where the processor writes arrows and the score.  ov_en/ov_rgb take a
// background picture from a frame buffer.
//
// Pad input (system clock domain, 100 MHz): psx_pad_if polls a PlayStation 2
// controller and keeps the pressed buttons in a register (pad_* ports) for the
// bus.
//
// The three domains share nothing inside this module.  Resets are synchronous,
// active low, one per domain.  The partition into these blocks follows the
// design description; the processor, buses, FFT core, clock manager, UART,
// GPIOs and interrupt controller are outside and connect at the ports.
module ddr_top
  import ddr_pkg::*;
(
  // AC-link (snooped)
  input  logic                        ac97_bit_clk,
  input  logic                        ac97_sync,
  input  logic                        ac97_sdata_in,
  input  logic                        aud_rst_n,
  // FFT core
  output logic                        fft_clk,
  output logic [PCM_W-1:0]            fft_xn_re,
  output logic                        fft_ce,
  output logic                        clk_48k,
  input  logic                        fft_xk_dv,
  input  logic [FFT_IDX_W-1:0]        fft_xk_index,
  input  logic signed [FFT_OUT_W-1:0] fft_xk_re,
  input  logic signed [FFT_OUT_W-1:0] fft_xk_im,
  // beat detector
  output logic                        beat_irq,
  output logic                        beat_raw,
  output logic [7:0]                  beat_interval,
  output logic                        ac97_locked,
  output logic                        ac97_codec_ready,
  // character memory, port A
  input  logic                        bram_clk,
  input  logic                        bram_we,
  input  logic [CRAM_AW-1:0]          bram_addr,
  input  logic [CRAM_DW-1:0]          bram_wdata,
  output logic [CRAM_DW-1:0]          bram_rdata,
  // display
  input  logic                        pix_clk,
  input  logic                        pix_rst_n,
  input  logic                        ov_en,
  input  rgb_t                        ov_rgb,
  output logic [7:0]                  vga_r,
  output logic [7:0]                  vga_g,
  output logic [7:0]                  vga_b,
  output logic                        vga_hsync,
  output logic                        vga_vsync,
  output logic                        vga_blank_n,
  output logic                        vga_pix_clk,
  // PlayStation controller
  input  logic                        sys_clk,
  input  logic                        sys_rst_n,
  output logic                        psx_att_n,
  output logic                        psx_clk,
  output logic                        psx_cmd,
  input  logic                        psx_dat,
  output logic [15:0]                 pad_buttons,
  output logic [7:0]                  pad_id,
  output logic                        pad_update,
  output logic                        pad_error
);
  // ---------------- audio ----------------
  logic aud_clk;
  logic energy_valid;
  logic [2*FFT_OUT_W+4:0] energy;

  assign aud_clk = ~ac97_bit_clk;
  assign fft_clk = aud_clk;

  ac97_capture u_capture (
    .clk(aud_clk), .rst_n(aud_rst_n), .sync(ac97_sync), .sdata_in(ac97_sdata_in),
    .sample(fft_xn_re), .sample_valid(fft_ce), .clk_48k, .codec_ready(ac97_codec_ready), .locked(ac97_locked)
  );

  beat_detect #(.XK_W(FFT_OUT_W), .IDX_W(FFT_IDX_W)) u_beat (
    .clk(aud_clk), .rst_n(aud_rst_n),
    .xk_valid(fft_xk_dv), .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im),
    .energy_valid, .energy, .raw_beat(beat_raw), .beat_irq, .beat_interval
  );

  // ---------------- display ----------------
  logic [CRAM_AW-1:0] ram_addr;
  logic [CRAM_DW-1:0] ram_q;

  char_bram #(.AW(CRAM_AW), .DW(CRAM_DW)) u_cram (
    .clka(bram_clk), .wea(bram_we), .addra(bram_addr), .dina(bram_wdata), .douta(bram_rdata),
    .clkb(pix_clk), .addrb(ram_addr), .doutb(ram_q)
  );

  svga_char_ctrl u_svga (
    .clk(pix_clk), .rst_n(pix_rst_n), .ram_addr, .ram_data(char_word_t'(ram_q)),
    .ov_en, .ov_rgb, .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync, .vga_blank_n
  );

  assign vga_pix_clk = pix_clk;

  // ---------------- pad ----------------
  psx_pad_if u_pad (
    .clk(sys_clk), .rst_n(sys_rst_n), .att_n(psx_att_n), .psx_clk, .cmd(psx_cmd),
    .dat(psx_dat), .buttons(pad_buttons), .pad_id, .update(pad_update), .error(pad_error)
  );
endmodule

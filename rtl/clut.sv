// Colour look-up table: 4-bit colour index of a character to 24-bit RGB.
//
// Sixteen colours are all that the four colour bits of a character word can
// select.  The table is the classic 16-colour IRGB palette: bit 3 of the index
// is intensity, bits 2..0 are red, green and blue; a set colour bit gives 0xAA,
// intensity adds 0x55, and index 6 is brown (its green halved) rather than dark
// yellow.  The table is written as a formula, so no initialisation file is
// needed.  One register stage: rgb belongs to the idx of the previous clock.
// The 4-bit index and the 16 entries follow the design description; the palette
// itself is this design's choice.
module clut
  import ddr_pkg::*;
(
  input  logic       clk,
  input  logic [3:0] idx,
  output rgb_t       rgb
);
  function automatic rgb_t palette(input logic [3:0] i);
    rgb_t c;
    logic [7:0] hi;
    hi = i[3] ? 8'h55 : 8'h00;
    c.r = (i[2] ? 8'hAA : 8'h00) + hi;
    c.g = (i[1] ? 8'hAA : 8'h00) + hi;
    c.b = (i[0] ? 8'hAA : 8'h00) + hi;
    if (i == 4'd6) c.g = 8'h55;
    return c;
  endfunction

  always_ff @(posedge clk) rgb <= palette(idx);
endmodule

// Character generator: one 8-pixel row of an 8x8 character cell.
//
// Code map:
//   0x20        blank
//   0x30-0x39   digits, drawn as seven-segment figures 5 pixels wide, 7 high
//   'C','E','O','R','S' (0x43,0x45,0x4F,0x52,0x53) seven-segment letters, so
//               the score can be labelled "SCORE"
//   0x7F        solid block
//   0x80-0xFF   arrow tiles.  An arrow is 32x32 pixels, i.e. 4x4 cells.  Code
//               bits: [6] hollow (outline) arrow, [5:4] direction (0 left,
//               1 down, 2 up, 3 right), [3:2] tile row, [1:0] tile column.
//               Filled arrows are the moving ones, hollow arrows mark the
//               static target row.
//   others      blank
//
// The glyphs are computed from their geometry instead of being stored as a
// table.  An up arrow, in tile coordinates u (column) and v (row) of 0..31 and
// with d = distance of the column from the centre line (0..15), covers the
// head 1 <= v <= 15, d <= v-1, and the shaft 16 <= v <= 30, d <= 5.  Other
// directions mirror or transpose u and v.  A hollow arrow keeps the pixels of
// the shape that have a 4-neighbour outside it.
//
// Output: bits[7] is the leftmost pixel; registered, one clock after code/row,
// like the block RAM it replaces.
// Storing the arrows as extra characters above 0x7F follows the design
// description; their exact shape, size and codes are this design's choice.
// Only the characters listed above are drawn: other ASCII codes are blank.
module char_gen_rom (
  input  logic       clk,
  input  logic [7:0] code,
  input  logic [2:0] row,
  output logic [7:0] bits
);
  // ---- arrow geometry ----
  function automatic logic up_shape(input int u, input int v);
    int d;
    if (u < 0 || u > 31 || v < 0 || v > 31) return 1'b0;
    d = (u >= 16) ? u - 16 : 15 - u;
    return ((v >= 1 && v <= 15 && d <= v - 1) || (v >= 16 && v <= 30 && d <= 5));
  endfunction

  // shape of an arrow of direction dir at pixel (px, py) of its 32x32 box
  function automatic logic arrow_shape(input logic [1:0] dir, input int px, input int py);
    unique case (dir)
      2'd0:    return up_shape(py, px);          // left: tip at px = 0
      2'd1:    return up_shape(px, 31 - py);     // down
      2'd2:    return up_shape(px, py);          // up
      default: return up_shape(py, 31 - px);     // right
    endcase
  endfunction

  function automatic logic arrow_pixel(input logic hollow, input logic [1:0] dir,
                                       input int px, input int py);
    logic in_shape, interior;
    in_shape = arrow_shape(dir, px, py);
    interior = arrow_shape(dir, px - 1, py) && arrow_shape(dir, px + 1, py) &&
               arrow_shape(dir, px, py - 1) && arrow_shape(dir, px, py + 1);
    return hollow ? (in_shape && !interior) : in_shape;
  endfunction

  // ---- seven-segment figures ----
  // segment order {a,b,c,d,e,f,g}
  function automatic logic [6:0] segments(input logic [7:0] c);
    unique case (c)
      8'h30, 8'h4F: return 7'b1111110;   // 0, O
      8'h31: return 7'b0110000;
      8'h32: return 7'b1101101;
      8'h33: return 7'b1111001;
      8'h34: return 7'b0110011;
      8'h35, 8'h53: return 7'b1011011;   // 5, S
      8'h36: return 7'b1011111;
      8'h37: return 7'b1110000;
      8'h38: return 7'b1111111;
      8'h39: return 7'b1111011;
      8'h43: return 7'b1001110;          // C
      8'h45: return 7'b1001111;          // E
      8'h52: return 7'b0000101;          // r
      default: return 7'b0000000;
    endcase
  endfunction

  function automatic logic [7:0] seg_row(input logic [6:0] s, input int r);
    logic [7:0] b;
    b = '0;
    // columns 1..5 are bits 6..2
    if ((r == 0 && s[6]) || (r == 3 && s[0]) || (r == 6 && s[3])) b = b | 8'b0111_1100;
    if ((r <= 3 && s[5]) || (r >= 3 && r <= 6 && s[4])) b = b | 8'b0000_0100;   // b, c
    if ((r <= 3 && s[1]) || (r >= 3 && r <= 6 && s[2])) b = b | 8'b0100_0000;   // f, e
    return b;
  endfunction

  function automatic logic [7:0] glyph(input logic [7:0] c, input logic [2:0] r);
    logic [7:0] b;
    b = '0;
    if (c[7]) begin
      for (int col = 0; col < 8; col++)
        b[7 - col] = arrow_pixel(c[6], c[5:4], int'(c[1:0]) * 8 + col, int'(c[3:2]) * 8 + int'(r));
    end else if (c == 8'h7F) begin
      b = 8'hFF;
    end else begin
      b = seg_row(segments(c), int'(r));
    end
    return b;
  endfunction

  always_ff @(posedge clk) bits <= glyph(code, row);
endmodule

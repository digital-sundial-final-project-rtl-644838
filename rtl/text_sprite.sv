// text_sprite: draws a fixed text label on the video raster.
// TEXT holds NCHARS ASCII characters, first character in the top byte, drawn
// left to right with its top-left corner at (x0, y0). Each character cell is 8x8
// font units holding a 5x7 glyph, and one font unit is 2^SCALE_LOG2 screen pixels
// square, the same grid as number_sprite so labels and numbers line up.
// pixel_on is high where (hcount, vcount) lies on a lit glyph pixel, in the same
// cycle (combinational).
// The built-in font holds only the characters the display needs: the letters
// A, E, G, L, N and the colon. Any other character draws as a blank cell.
// The design shows word sprites next to its numbers, and the "ANGLE:" label is
// visible on its screen. The font and the set of characters are this
// implementation's own.
module text_sprite
  import sundial_pkg::*;
#(
  parameter int unsigned           NCHARS     = 6,
  parameter logic [8*NCHARS-1:0]   TEXT       = "ANGLE:",
  parameter int unsigned           SCALE_LOG2 = 2
) (
  input  xcoord_t hcount,
  input  ycoord_t vcount,
  input  xcoord_t x0,
  input  ycoord_t y0,
  output logic    pixel_on
);
  // 5x7 glyphs; bit 4 is the leftmost column, the first row is the top one.
  function automatic logic [4:0] glyph_row(input logic [7:0] c, input logic [2:0] row);
    logic [34:0] g;
    case (c)
      "A":     g = {5'b01110, 5'b10001, 5'b10001, 5'b11111, 5'b10001, 5'b10001, 5'b10001};
      "E":     g = {5'b11111, 5'b10000, 5'b10000, 5'b11110, 5'b10000, 5'b10000, 5'b11111};
      "G":     g = {5'b01110, 5'b10001, 5'b10000, 5'b10111, 5'b10001, 5'b10001, 5'b01111};
      "L":     g = {5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b11111};
      "N":     g = {5'b10001, 5'b11001, 5'b10101, 5'b10011, 5'b10001, 5'b10001, 5'b10001};
      ":":     g = {5'b00000, 5'b01100, 5'b01100, 5'b00000, 5'b01100, 5'b01100, 5'b00000};
      default: g = '0;
    endcase
    return g[5*(6 - row) +: 5];
  endfunction

  always_comb begin
    logic [XW-1:0] rel_x, ux;
    logic [YW-1:0] rel_y, uy;
    logic [7:0]    ch;
    int unsigned   pos;
    pixel_on = 1'b0;
    rel_x = hcount - x0;
    rel_y = vcount - y0;
    ux = rel_x >> SCALE_LOG2;
    uy = rel_y >> SCALE_LOG2;
    pos = int'(ux[XW-1:3]);
    ch = '0;
    if (hcount >= x0 && vcount >= y0 && pos < NCHARS && uy < 8) begin
      ch = TEXT[8*(NCHARS - 1 - pos) +: 8];
      if (ux[2:0] < 3'd5 && uy[2:0] < 3'd7)
        pixel_on = glyph_row(ch, uy[2:0])[3'd4 - ux[2:0]];
    end
  end
endmodule

// number_sprite: draws a decimal number on the video raster.
// The value is converted to DIGITS BCD digits (double dabble, bcd_convert) and
// drawn most significant digit first with its top-left corner at (x0, y0). Each
// digit cell is 8x8 font units holding a 5x7 glyph; one font unit is
// 2^SCALE_LOG2 screen pixels square. pixel_on is high where (hcount, vcount) lies
// on a lit glyph pixel, in the same cycle (combinational).
// The design draws its numbers (angle, length, four alarms) from a sprite sheet
// of digits; the sheet itself is not given, so a built-in 5x7 font is used here.
module number_sprite
  import sundial_pkg::*;
#(
  parameter int unsigned BIN_W      = 12,
  parameter int unsigned DIGITS     = 3,
  parameter int unsigned SCALE_LOG2 = 2
) (
  input  xcoord_t          hcount,
  input  ycoord_t          vcount,
  input  xcoord_t          x0,
  input  ycoord_t          y0,
  input  logic [BIN_W-1:0] value,
  output logic             pixel_on
);
  logic [4*DIGITS-1:0] bcd;

  bcd_convert #(.BIN_W(BIN_W), .DIGITS(DIGITS)) u_bcd (.bin(value), .bcd(bcd));

  // 5x7 glyphs; bit 4 is the leftmost column.
  function automatic logic [4:0] glyph_row(input logic [3:0] d, input logic [2:0] row);
    logic [34:0] g;
    case (d)
      4'd0: g = {5'b01110, 5'b10001, 5'b10011, 5'b10101, 5'b11001, 5'b10001, 5'b01110};
      4'd1: g = {5'b00100, 5'b01100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b01110};
      4'd2: g = {5'b01110, 5'b10001, 5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b11111};
      4'd3: g = {5'b11111, 5'b00010, 5'b00100, 5'b00010, 5'b00001, 5'b10001, 5'b01110};
      4'd4: g = {5'b00010, 5'b00110, 5'b01010, 5'b10010, 5'b11111, 5'b00010, 5'b00010};
      4'd5: g = {5'b11111, 5'b10000, 5'b11110, 5'b00001, 5'b00001, 5'b10001, 5'b01110};
      4'd6: g = {5'b00110, 5'b01000, 5'b10000, 5'b11110, 5'b10001, 5'b10001, 5'b01110};
      4'd7: g = {5'b11111, 5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b01000, 5'b01000};
      4'd8: g = {5'b01110, 5'b10001, 5'b10001, 5'b01110, 5'b10001, 5'b10001, 5'b01110};
      4'd9: g = {5'b01110, 5'b10001, 5'b10001, 5'b01111, 5'b00001, 5'b00010, 5'b01100};
      default: g = '0;
    endcase
    return g[5*(6 - row) +: 5];
  endfunction

  always_comb begin
    logic [XW-1:0] rel_x, ux;
    logic [YW-1:0] rel_y, uy;
    logic [3:0]    digit;
    int unsigned   pos;
    pixel_on = 1'b0;
    rel_x = hcount - x0;
    rel_y = vcount - y0;
    ux = rel_x >> SCALE_LOG2;
    uy = rel_y >> SCALE_LOG2;
    pos = int'(ux[XW-1:3]);
    digit = '0;
    if (hcount >= x0 && vcount >= y0 && pos < DIGITS && uy < 8) begin
      digit = bcd[4*(DIGITS - 1 - pos) +: 4];
      if (ux[2:0] < 3'd5 && uy[2:0] < 3'd7)
        pixel_on = glyph_row(digit, uy[2:0])[3'd4 - ux[2:0]];
    end
  end
endmodule

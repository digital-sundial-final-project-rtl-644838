// channel_select: picks the colour channel the threshold works on.
// The RGB565 camera pixel is widened to 8 bits per channel (red and blue x8,
// green x4); CH_LUMA gives the brightness estimate (2R + 5G + B)/8 of the widened
// channels. Combinational.
// A channel selector in front of the threshold is part of the design; the
// channel set and the brightness weights are this implementation's choice.
module channel_select
  import sundial_pkg::*;
(
  input  rgb565_t    pixel,
  input  channel_t   sel,
  output logic [7:0] value
);
  logic [7:0]  r8, g8, b8;
  logic [10:0] luma;

  always_comb begin
    r8 = {pixel.r, 3'b000};
    g8 = {pixel.g, 2'b00};
    b8 = {pixel.b, 3'b000};
    luma = (11'(r8) << 1) + 11'(g8) * 11'd5 + 11'(b8);
    unique case (sel)
      CH_RED:   value = r8;
      CH_GREEN: value = g8;
      CH_BLUE:  value = b8;
      default:  value = luma[10:3];
    endcase
  end
endmodule

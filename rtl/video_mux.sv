// video_mux: composes the HDMI picture.
// Priority, highest first: the number sprites (white), the crosshair through the
// centre of mass (green), the crosshair through the true centre (blue), then the
// image, which is either the camera pixel widened to 24 bits or, in mask mode, the
// thresholded dial in pink on black. Outside active video the output is black.
// The output and the syncs passed through are registered: everything follows the
// inputs by one clock.
// The two crosshairs, their colours and the sprite overlays follow the design;
// the colours of the sprites and the mask view are this implementation's choice.
module video_mux
  import sundial_pkg::*;
#(
  parameter int unsigned N_SPRITES = 6
) (
  input  logic                 clk,
  input  xcoord_t              hcount,
  input  ycoord_t              vcount,
  input  logic                 active,
  input  logic                 hsync_in,
  input  logic                 vsync_in,
  input  rgb565_t              cam_pixel,
  input  logic                 mask,
  input  logic                 show_mask,
  input  xcoord_t              x_com,
  input  ycoord_t              y_com,
  input  xcoord_t              x_cen,
  input  ycoord_t              y_cen,
  input  logic [N_SPRITES-1:0] sprite_on,
  output rgb888_t              rgb,
  output logic                 hsync,
  output logic                 vsync,
  output logic                 active_out
);
  rgb888_t next;

  always_comb begin
    if (!active)
      next = '0;
    else if (|sprite_on)
      next = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
    else if (hcount == x_com || vcount == y_com)
      next = '{r: 8'h00, g: 8'hFF, b: 8'h00};
    else if (hcount == x_cen || vcount == y_cen)
      next = '{r: 8'h00, g: 8'h00, b: 8'hFF};
    else if (show_mask)
      next = mask ? '{r: 8'hFF, g: 8'h80, b: 8'hFF} : '0;
    else
      next = '{r: {cam_pixel.r, 3'b000}, g: {cam_pixel.g, 2'b00}, b: {cam_pixel.b, 3'b000}};
  end

  always_ff @(posedge clk) begin
    rgb <= next;
    hsync <= hsync_in;
    vsync <= vsync_in;
    active_out <= active;
  end
endmodule

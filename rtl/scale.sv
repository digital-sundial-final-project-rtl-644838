// scale: maps the HDMI raster onto the stored camera frame.
// Each camera pixel is shown as a FACTOR x FACTOR block: the frame-buffer
// address is (vcount/FACTOR)*CAM_W + hcount/FACTOR, and in_image is high while
// the raster lies on the scaled picture (hcount < FACTOR*CAM_W,
// vcount < FACTOR*CAM_H). Combinational.
// A scaler in front of the frame buffer is part of the design; the factor 3 (a
// 320x240 frame fills the 720 lines of the output) is this implementation's.
module scale
  import sundial_pkg::*;
#(
  parameter int unsigned FACTOR = 3,
  parameter int unsigned IMG_W  = CAM_W,
  parameter int unsigned IMG_H  = CAM_H
) (
  input  xcoord_t                          hcount,
  input  ycoord_t                          vcount,
  output logic [$clog2(IMG_W*IMG_H)-1:0]   addr,
  output logic                             in_image
);
  localparam int unsigned ABITS = $clog2(IMG_W * IMG_H);
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;

  always_comb begin
    cx = hcount / XW'(FACTOR);
    cy = vcount / YW'(FACTOR);
    in_image = (32'(hcount) < FACTOR * IMG_W) && (32'(vcount) < FACTOR * IMG_H);
    addr = in_image ? ABITS'(32'(cy) * IMG_W + 32'(cx)) : '0;
  end
endmodule

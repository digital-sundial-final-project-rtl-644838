// mass_estimate: "pixel mass" of the dial as the area of the ellipse inscribed in
// its bounding box, m = pi*a*b with semi-axes a = (x_bottom - x_top)/2 and
// b = (y_bottom - y_top)/2, i.e. m = (pi/4)*dx*dy. pi/4 is taken as 201/256
// (error 0.03 %). Registered: mass follows the inputs by one clock.
// The ellipse-area model is the design's; the fixed-point constant is this
// implementation's choice.
module mass_estimate
  import sundial_pkg::*;
#(
  parameter int unsigned MW = 20,
  parameter int unsigned PI4_NUM = 201   // pi/4 in units of 1/256
) (
  input  logic          clk,
  input  xcoord_t       x_top,
  input  xcoord_t       x_bottom,
  input  ycoord_t       y_top,
  input  ycoord_t       y_bottom,
  output logic [MW-1:0] mass
);
  logic [XW-1:0]    dx;
  logic [YW-1:0]    dy;
  logic [XW+YW+8:0] prod;

  always_comb begin
    dx = (x_bottom > x_top) ? x_bottom - x_top : '0;
    dy = (y_bottom > y_top) ? y_bottom - y_top : '0;
    prod = (XW+YW+9)'(dx) * (XW+YW+9)'(dy) * (XW+YW+9)'(PI4_NUM);
  end

  always_ff @(posedge clk) mass <= MW'(prod >> 8);
endmodule

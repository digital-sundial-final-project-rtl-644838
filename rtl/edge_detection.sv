// edge_detection: bounding box and true centre of the dial in one frame.
// While valid_in is high the pixel (x_in, y_in) is part of the thresholded dial
// and the running minimum and maximum of x and y are updated. On the one-cycle
// tabulate pulse (frame end) the extremes are registered as x_top/x_bottom
// (min/max x) and y_top/y_bottom (min/max y), the centre
// x_cen = (x_min + x_max)/2, y_cen = (y_min + y_max)/2 is formed (truncated), the
// trackers restart, and valid_out pulses one cycle later. A frame without mask
// pixels gives no valid_out and keeps the previous box.
// The midpoint formula and the four edge outputs follow the design; the port
// naming top = minimum, bottom = maximum is this implementation's reading.
module edge_detection
  import sundial_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  xcoord_t x_in,
  input  ycoord_t y_in,
  input  logic    valid_in,
  input  logic    tabulate,
  output xcoord_t x_top,
  output xcoord_t x_bottom,
  output ycoord_t y_top,
  output ycoord_t y_bottom,
  output xcoord_t x_cen,
  output ycoord_t y_cen,
  output logic    valid_out
);
  xcoord_t xmin, xmax;
  ycoord_t ymin, ymax;
  logic    seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      xmin <= '1; xmax <= '0; ymin <= '1; ymax <= '0;
      seen <= 1'b0;
      x_top <= '0; x_bottom <= '0; y_top <= '0; y_bottom <= '0;
      x_cen <= '0; y_cen <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (tabulate) begin
        if (seen) begin
          x_top <= xmin; x_bottom <= xmax;
          y_top <= ymin; y_bottom <= ymax;
          x_cen <= XW'(({1'b0, xmin} + {1'b0, xmax}) >> 1);
          y_cen <= YW'(({1'b0, ymin} + {1'b0, ymax}) >> 1);
          valid_out <= 1'b1;
        end
        xmin <= '1; xmax <= '0; ymin <= '1; ymax <= '0;
        seen <= 1'b0;
      end else if (valid_in) begin
        seen <= 1'b1;
        if (x_in < xmin) xmin <= x_in;
        if (x_in > xmax) xmax <= x_in;
        if (y_in < ymin) ymin <= y_in;
        if (y_in > ymax) ymax <= y_in;
      end
    end
  end
endmodule

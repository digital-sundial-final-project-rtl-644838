// center_of_mass: centroid of the thresholded dial pixels of one frame.
// While valid_in is high the pixel (x_in, y_in) belongs to the mask: its
// coordinates are added to two running sums and a pixel counter is incremented.
// A one-cycle tabulate pulse (frame end) freezes the sums, clears the
// accumulators for the next frame and starts two serial dividers,
// x_com = sum(x)/N and y_com = sum(y)/N. valid_out pulses for one cycle when both
// quotients are ready (WIDTH+3 cycles after tabulate); x_out/y_out then hold until
// the next result. A frame with no mask pixels produces no valid_out and keeps the
// previous result.
// The formula is the design's; the accumulate-then-divide structure, the
// truncating division and the empty-frame rule are this implementation's.
module center_of_mass
  import sundial_pkg::*;
#(
  parameter int unsigned SUM_W = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  xcoord_t x_in,
  input  ycoord_t y_in,
  input  logic    valid_in,
  input  logic    tabulate,
  output xcoord_t x_out,
  output ycoord_t y_out,
  output logic    valid_out
);
  logic [SUM_W-1:0] sum_x, sum_y, count;
  logic [SUM_W-1:0] qx, qy, rx, ry;
  logic             div_start, done_x, done_y, busy_x, busy_y;
  logic             got_x, got_y;
  logic [SUM_W-1:0] num_x, num_y, den;

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_x <= '0;
      sum_y <= '0;
      count <= '0;
      num_x <= '0;
      num_y <= '0;
      den <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (tabulate) begin
        num_x <= sum_x;
        num_y <= sum_y;
        den <= count;
        div_start <= (count != 0);
        sum_x <= '0;
        sum_y <= '0;
        count <= '0;
      end else if (valid_in) begin
        sum_x <= sum_x + SUM_W'(x_in);
        sum_y <= sum_y + SUM_W'(y_in);
        count <= count + 1'b1;
      end
    end
  end

  divider #(.WIDTH(SUM_W)) u_div_x (
    .clk, .rst, .start(div_start), .dividend(num_x), .divisor(den),
    .quotient(qx), .remainder(rx), .busy(busy_x), .done(done_x)
  );
  divider #(.WIDTH(SUM_W)) u_div_y (
    .clk, .rst, .start(div_start), .dividend(num_y), .divisor(den),
    .quotient(qy), .remainder(ry), .busy(busy_y), .done(done_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      got_x <= 1'b0;
      got_y <= 1'b0;
      x_out <= '0;
      y_out <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (div_start) begin
        got_x <= 1'b0;
        got_y <= 1'b0;
      end else begin
        if (done_x) got_x <= 1'b1;
        if (done_y) got_y <= 1'b1;
        if ((got_x || done_x) && (got_y || done_y)) begin
          x_out <= XW'(qx);
          y_out <= YW'(qy);
          valid_out <= 1'b1;
          got_x <= 1'b0;
          got_y <= 1'b0;
        end
      end
    end
  end
endmodule

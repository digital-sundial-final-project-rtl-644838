// angle_division: shadow angle from the centre of mass and the true centre.
// With x = x_com - x_cen and y = y_com - y_cen (pixel coordinates, y counted
// downwards as the raster runs), the vector is placed in one of four quadrants and,
// inside it, in the half nearer the quadrant's first axis or its second axis. In
// quadrant i the component along the axis at 90(i-1) degrees is called a and the
// component along the axis at 90i degrees is called b (quadrant I: a=x, b=y;
// II: a=y, b=-x; III: a=-x, b=-y; IV: a=-y, b=x). Then
//   a >= b : angle = 90(i-1) + LUT(round(100*b/a))
//   a <  b : angle = 90i     - LUT(round(100*a/b))
// so the divider only ever forms a ratio of at most 100, and the 0..45 degree
// LUT (angle_lut) covers every octant. The result is 0..359 whole degrees; a zero
// vector gives 0.
// Interface: start (one-cycle pulse) samples the four coordinates; done pulses when
// angle is valid; angle holds until the next result. Latency is a fixed 25 cycles
// from start to done (20-bit serial divider), well inside the ~100-cycle budget of
// the design and the vertical blanking interval.
// The octant scheme, the factor 100 and the formula follow the design; the
// rounding (divide 200*b + a by 2a) and the tie rules on the axes are this
// implementation's choice.
module angle_division
  import sundial_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  xcoord_t x_com,
  input  ycoord_t y_com,
  input  xcoord_t x_cen,
  input  ycoord_t y_cen,
  output angle_t  angle,
  output logic    busy,
  output logic    done
);
  localparam int unsigned DW = 20;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_OUT} state_t;
  state_t state;

  logic signed [XW:0] dx, dy;
  logic [XW-1:0] a, b;
  logic [8:0]    base;       // 90(i-1)
  logic          a_ge_b;
  logic          zero_vec;

  logic          div_start, div_done, div_busy;
  logic [DW-1:0] div_num, div_den, div_q, div_r;
  logic [5:0]    lut_angle;
  logic [8:0]    sum;

  // Quadrant and octant decision on the sampled coordinates.
  always_comb begin
    logic signed [XW:0] sx, sy;
    sx = dx;
    sy = dy;
    zero_vec = (sx == 0) && (sy == 0);
    if (sx > 0 && sy >= 0) begin
      base = 9'd0;   a = XW'(sx);  b = XW'(sy);
    end else if (sx <= 0 && sy > 0) begin
      base = 9'd90;  a = XW'(sy);  b = XW'(-sx);
    end else if (sx < 0 && sy <= 0) begin
      base = 9'd180; a = XW'(-sx); b = XW'(-sy);
    end else begin
      base = 9'd270; a = XW'(-sy); b = XW'(sx);
    end
    a_ge_b = (a >= b);
  end

  always_comb begin
    if (a_ge_b) begin
      div_num = DW'(200 * b + a);
      div_den = DW'(2 * a);
    end else begin
      div_num = DW'(200 * a + b);
      div_den = DW'(2 * b);
    end
  end

  divider #(.WIDTH(DW)) u_div (
    .clk, .rst, .start(div_start), .dividend(div_num), .divisor(div_den),
    .quotient(div_q), .remainder(div_r), .busy(div_busy), .done(div_done)
  );

  angle_lut u_lut (
    .ratio((div_q > 100) ? 8'd100 : div_q[7:0]),
    .angle(lut_angle)
  );

  always_comb sum = a_ge_b ? (base + 9'(lut_angle)) : (base + 9'd90 - 9'(lut_angle));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      dx <= '0;
      dy <= '0;
      angle <= '0;
      done <= 1'b0;
      div_start <= 1'b0;
    end else begin
      done <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          dx <= $signed({1'b0, x_com}) - $signed({1'b0, x_cen});
          dy <= $signed({2'b0, y_com}) - $signed({2'b0, y_cen});
          div_start <= 1'b1;
          state <= S_DIV;
        end
        S_DIV: if (div_done) state <= S_OUT;
        S_OUT: begin
          if (zero_vec)       angle <= '0;
          else if (sum >= 360) angle <= AW'(sum - 9'd360);
          else                angle <= AW'(sum);
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

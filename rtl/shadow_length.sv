// shadow_length: gnomon-shadow length from the centroid displacement.
// Modelling the dial as an ellipse of pixel mass m and the shadow as a rectangle
// of width w, the shadow length L satisfies a quadratic whose positive root is
//   L = (r/2) * (-1 + sqrt(1 + 2m/(w*r))),   r = |(x_com - x_cen, y_com - y_cen)|.
// Steps, one after another on one shared divider and one shared root unit:
//   1. r = floor(sqrt(dx^2 + dy^2))
//   2. q = (2m << 16) / (w*r)              (q in Q16 fixed point)
//   3. s = floor(sqrt(q + 2^16))           (s = sqrt(1+q) in Q8)
//   4. L = (r*(s - 256)) >> 9, saturated to 11 bits
// r = 0 or w = 0 gives L = 0. Interface: start (one-cycle pulse) samples the
// inputs; done pulses when length is valid, about 90 cycles later; length holds
// until the next result.
// Eq. (8)'s rearranged form (divide m by w*r instead of working with (wr)^2) is
// the design's. The design took its roots from reduced-resolution lookup tables;
// this implementation uses an exact iterative root and the Q16/Q8 scaling above.
module shadow_length
  import sundial_pkg::*;
#(
  parameter int unsigned MW = 20
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  xcoord_t       x_com,
  input  ycoord_t       y_com,
  input  xcoord_t       x_cen,
  input  ycoord_t       y_cen,
  input  logic [MW-1:0] mass,
  input  logic [7:0]    width,
  output logic [LW-1:0] length,
  output logic          busy,
  output logic          done
);
  localparam int unsigned W = 40;

  typedef enum logic [2:0] {S_IDLE, S_ROOT_R, S_DIV, S_ROOT_S, S_OUT} state_t;
  state_t state;

  logic [MW-1:0]  m;
  logic [7:0]     w;
  logic [W/2-1:0] r;

  logic           sq_start, sq_done, sq_busy;
  logic [W-1:0]   sq_in;
  logic [W/2-1:0] sq_root;
  logic           dv_start, dv_done, dv_busy;
  logic [W-1:0]   dv_num, dv_den, dv_q, dv_rem;
  logic [W-1:0]   prod;
  logic [XW-1:0]  abs_dx;
  logic [YW-1:0]  abs_dy;

  always_comb begin
    abs_dx = (x_com > x_cen) ? x_com - x_cen : x_cen - x_com;
    abs_dy = (y_com > y_cen) ? y_com - y_cen : y_cen - y_com;
  end

  isqrt #(.WIDTH(W)) u_sqrt (
    .clk, .rst, .start(sq_start), .radicand(sq_in), .root(sq_root),
    .busy(sq_busy), .done(sq_done)
  );
  divider #(.WIDTH(W)) u_div (
    .clk, .rst, .start(dv_start), .dividend(dv_num), .divisor(dv_den),
    .quotient(dv_q), .remainder(dv_rem), .busy(dv_busy), .done(dv_done)
  );

  always_comb prod = W'(r) * (W'(sq_root) - W'(256));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      m <= '0; w <= '0; r <= '0;
      sq_start <= 1'b0; sq_in <= '0;
      dv_start <= 1'b0; dv_num <= '0; dv_den <= '0;
      length <= '0;
      done <= 1'b0;
    end else begin
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          m <= mass;
          w <= width;
          state <= S_ROOT_R;
          sq_start <= 1'b1;
          sq_in <= W'(abs_dx) * W'(abs_dx) + W'(abs_dy) * W'(abs_dy);
        end
        S_ROOT_R: if (sq_done) begin
          r <= sq_root;
          if (sq_root == 0 || w == 0) begin
            length <= '0;
            done <= 1'b1;
            state <= S_IDLE;
          end else begin
            dv_num <= W'(m) << 17;
            dv_den <= W'(w) * W'(sq_root);
            dv_start <= 1'b1;
            state <= S_DIV;
          end
        end
        S_DIV: if (dv_done) begin
          sq_in <= (dv_q > {W{1'b1}} - W'(65536)) ? {W{1'b1}} : dv_q + W'(65536);
          sq_start <= 1'b1;
          state <= S_ROOT_S;
        end
        S_ROOT_S: if (sq_done) state <= S_OUT;
        S_OUT: begin
          length <= ((prod >> 9) > W'(2**LW - 1)) ? {LW{1'b1}} : LW'(prod >> 9);
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

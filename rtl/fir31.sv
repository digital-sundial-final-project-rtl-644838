// fir31: 31-tap FIR filter for the 8-bit audio stream.
// Each ready pulse stores the signed sample x in a 32-entry circular history and
// starts a multiply-accumulate pass over the 31 most recent samples, one tap per
// clock: acc = sum_k COEFFS[k] * x[n-k]. When the pass ends (32 clocks after
// ready) y = acc >>> SHIFT, saturated to 8 bits, and y_valid pulses. The next
// ready must come at least 33 clocks later (an audio sample period is hundreds).
// Default coefficients: the 31-point triangular low-pass c[k] = 16 - |k - 15|,
// which sums to 256, so SHIFT = 8 gives unity DC gain.
// The tap count, the 8-bit stream and the serial tap-per-clock structure follow
// the design; its coefficients are tuned per recording and are not given, so the
// triangular set is this implementation's default, replaceable via COEFFS.
module fir31 #(
  parameter int unsigned NTAPS = 31,
  parameter int unsigned SHIFT = 8,
  parameter int          COEFFS [NTAPS] = '{
    1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16,
    15, 14, 13, 12, 11, 10, 9, 8, 7, 6, 5, 4, 3, 2, 1}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,
  input  logic signed [7:0] x,
  output logic signed [7:0] y,
  output logic              y_valid
);
  logic signed [7:0]  hist [32];
  logic [4:0]         wptr;       // slot of the newest sample
  logic [4:0]         index;      // tap being accumulated
  logic               running;
  logic               finish;     // last tap accumulated
  logic signed [23:0] acc;
  logic signed [23:0] shifted;

  always_comb shifted = acc >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      index <= '0;
      running <= 1'b0;
      finish <= 1'b0;
      acc <= '0;
      y <= '0;
      y_valid <= 1'b0;
      for (int i = 0; i < 32; i++) hist[i] <= '0;
    end else begin
      y_valid <= 1'b0;
      finish <= 1'b0;
      if (ready) begin
        hist[wptr + 1'b1] <= x;
        wptr <= wptr + 1'b1;
        index <= '0;
        acc <= '0;
        running <= 1'b1;
      end else if (running) begin
        acc <= acc + 24'(signed'(COEFFS[index])) * 24'(hist[wptr - index]);
        if (index == 5'(NTAPS - 1)) begin
          running <= 1'b0;
          finish <= 1'b1;
          index <= '0;
        end else begin
          index <= index + 1'b1;
        end
      end
      if (finish) begin
        if (shifted > 24'sd127)       y <= 8'sd127;
        else if (shifted < -24'sd128) y <= -8'sd128;
        else                          y <= 8'(shifted);
        y_valid <= 1'b1;
      end
    end
  end
endmodule

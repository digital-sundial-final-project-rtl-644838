// pwm: 8-bit pulse-width modulator for the speaker.
// A free-running 8-bit counter is compared with level: out is high while
// count < level, so the duty cycle is level/256 over a 256-clock period.
// PWM as one of the two selectable speaker drives follows the design.
module pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] level,
  output logic       out
);
  logic [7:0] count;
  always_ff @(posedge clk)
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  always_comb out = (count < level);
endmodule

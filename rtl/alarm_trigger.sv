// alarm_trigger: starts the alarm sound at a stored solar angle.
// Each time a new sundial angle arrives (angle_valid, once per video frame) it is
// compared with the four stored alarm angles. When the angle becomes equal to an
// alarm (it was not equal on the previous update), trigger pulses for one clock
// and hit_index names the matching alarm (the lowest one if several match).
// The angle is registered with angle_valid, so trigger follows it by one clock.
// Alarms in sun-angle units driving the audio follow the design; equality with
// edge detection is this implementation's rule.
module alarm_trigger
  import sundial_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  angle_t     angle,
  input  logic       angle_valid,
  input  angle_t     alarms [N_ALARMS],
  output logic       trigger,
  output logic [1:0] hit_index
);
  logic [N_ALARMS-1:0] match_now, match_prev;

  always_comb
    for (int i = 0; i < N_ALARMS; i++) match_now[i] = (angle == alarms[i]);

  always_ff @(posedge clk) begin
    if (rst) begin
      match_prev <= '1;   // no trigger from the first update after reset
      trigger <= 1'b0;
      hit_index <= '0;
    end else begin
      trigger <= 1'b0;
      if (angle_valid) begin
        match_prev <= match_now;
        for (int i = N_ALARMS - 1; i >= 0; i--)
          if (match_now[i] && !match_prev[i]) begin
            trigger <= 1'b1;
            hit_index <= 2'(i);
          end
      end
    end
  end
endmodule

// user_interface: the alarm-setting panel.
// Three push buttons, debounced: BTN1 steps the audio track (0..N_TRACKS-1,
// wrapping), BTN2 lowers the alarm value being edited by 1, BTN3 raises it by 10,
// both kept within 0..ALARM_MAX degrees of sun angle. Pressing BTN2 and BTN3
// together stores the edited value in the current alarm slot and moves to the
// next of the four slots (wrapping), loading that slot's stored value for editing.
// A press is acted on when all buttons are released again, using every button
// that was held during the press; this tells the BTN2+BTN3 chord from single
// presses. Two RGB LEDs show which slot is being edited: slot 0 LED0 red,
// slot 1 LED0 green, slot 2 LED1 red, slot 3 LED1 green.
// Button meanings, step sizes, the 0..360 range and the four alarms and tracks
// follow the design. Acting on release, saturating at the range ends, reset
// values of 0 and the LED patterns are this implementation's choices.
module user_interface
  import sundial_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 742_500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn1,       // next track
  input  logic       btn2,       // -1
  input  logic       btn3,       // +10
  output angle_t     alarms [N_ALARMS],
  output angle_t     edit_value,
  output logic [1:0] alarm_index,
  output logic [1:0] track,
  output logic [2:0] led0_rgb,
  output logic [2:0] led1_rgb
);
  logic [3:1] clean, held;

  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db1 (.clk, .rst, .btn(btn1), .clean(clean[1]));
  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db2 (.clk, .rst, .btn(btn2), .clean(clean[2]));
  debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db3 (.clk, .rst, .btn(btn3), .clean(clean[3]));

  always_ff @(posedge clk) begin
    if (rst) begin
      held <= '0;
      edit_value <= '0;
      alarm_index <= '0;
      track <= '0;
      for (int i = 0; i < N_ALARMS; i++) alarms[i] <= '0;
    end else if (|clean) begin
      held <= held | clean;
    end else if (|held) begin
      held <= '0;
      unique case (held)
        3'b110: begin                           // BTN3 + BTN2: store, next slot
          alarms[alarm_index] <= edit_value;
          alarm_index <= alarm_index + 1'b1;
          edit_value <= alarms[alarm_index + 1'b1];
        end
        3'b100: edit_value <= (edit_value + 10 > AW'(ALARM_MAX)) ? AW'(ALARM_MAX) : edit_value + AW'(10);
        3'b010: edit_value <= (edit_value == 0) ? '0 : edit_value - 1'b1;
        3'b001: track <= track + 1'b1;
        default: ;                              // other combinations: ignored
      endcase
    end
  end

  always_comb begin
    led0_rgb = 3'b000;
    led1_rgb = 3'b000;
    unique case (alarm_index)
      2'd0: led0_rgb = 3'b100;
      2'd1: led0_rgb = 3'b010;
      2'd2: led1_rgb = 3'b100;
      default: led1_rgb = 3'b010;
    endcase
  end
endmodule

// user_interface_tb: presses buttons with contact bounce and checks the edited
// value (+10 from BTN3, -1 from BTN2, clamped to 0..360), the BTN2+BTN3 chord
// (store in the current slot, advance, reload that slot's value), the four-slot
// wrap, the track cycling of BTN1 and the slot LEDs, against a model kept here.
module user_interface_tb;
  import sundial_pkg::*;
  localparam int DB = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic b1 = 0, b2 = 0, b3 = 0;
  angle_t alarms [N_ALARMS]; angle_t edit; logic [1:0] idx, track; logic [2:0] l0, l1;

  user_interface #(.DEBOUNCE_CYCLES(DB)) dut (.clk, .rst, .btn1(b1), .btn2(b2), .btn3(b3),
    .alarms, .edit_value(edit), .alarm_index(idx), .track, .led0_rgb(l0), .led1_rgb(l1));

  int m_alarm [4], m_edit = 0, m_idx = 0, m_track = 0;

  // press a set of buttons {b3,b2,b1} with bounce on press and release
  task automatic press(input logic [2:0] set);
    for (int i = 0; i < 4; i++) begin
      {b3, b2, b1} = set; repeat (3) @(negedge clk);
      {b3, b2, b1} = 3'b000; repeat (2) @(negedge clk);
    end
    {b3, b2, b1} = set; repeat (4 * DB) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      {b3, b2, b1} = 3'b000; repeat (3) @(negedge clk);
      {b3, b2, b1} = set; repeat (2) @(negedge clk);
    end
    {b3, b2, b1} = 3'b000; repeat (4 * DB) @(negedge clk);
    case (set)
      3'b100: m_edit = (m_edit + 10 > 360) ? 360 : m_edit + 10;
      3'b010: m_edit = (m_edit == 0) ? 0 : m_edit - 1;
      3'b001: m_track = (m_track + 1) % 4;
      3'b110: begin m_alarm[m_idx] = m_edit; m_idx = (m_idx + 1) % 4; m_edit = m_alarm[m_idx]; end
      default: ;
    endcase
    compare();
  endtask

  task automatic compare();
    logic [2:0] w0, w1;
    checks++;
    if (edit != AW'(m_edit) || idx != 2'(m_idx) || track != 2'(m_track)) begin
      failures++; $display("FAIL edit %0d/%0d idx %0d/%0d track %0d/%0d", edit, m_edit, idx, m_idx, track, m_track);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (alarms[i] != AW'(m_alarm[i])) begin failures++; $display("FAIL alarm %0d = %0d want %0d", i, alarms[i], m_alarm[i]); end
    end
    w0 = (m_idx == 0) ? 3'b100 : (m_idx == 1) ? 3'b010 : 3'b000;
    w1 = (m_idx == 2) ? 3'b100 : (m_idx == 3) ? 3'b010 : 3'b000;
    checks++;
    if (l0 != w0 || l1 != w1) begin failures++; $display("FAIL leds"); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) m_alarm[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    compare();
    press(3'b010);                                  // clamp at 0
    repeat (5) press(3'b100);                       // 50
    repeat (3) press(3'b010);                       // 47
    press(3'b110);                                  // store alarm 0 = 47
    repeat (12) press(3'b100);                      // 120
    press(3'b110);                                  // alarm 1 = 120
    repeat (40) press(3'b100);                      // clamp at 360
    press(3'b010);                                  // 359
    press(3'b110);                                  // alarm 2 = 359
    press(3'b100);
    press(3'b110);                                  // alarm 3 = 10, back to slot 0
    press(3'b100);                                  // 47 + 10
    repeat (5) press(3'b001);                       // tracks wrap
    repeat (20) press($urandom_range(1, 6) == 5 ? 3'b110 : 3'(1 << $urandom_range(0, 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

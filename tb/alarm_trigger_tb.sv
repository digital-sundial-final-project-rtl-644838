// alarm_trigger_tb: a slowly rising sun angle with jitter is fed once per
// "frame"; a trigger must come exactly when the angle first becomes equal to a
// stored alarm (with the right index) and never while it stays equal.
module alarm_trigger_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fired = 0;
  angle_t ang = 0; logic av = 0; angle_t alarms [N_ALARMS];
  logic trig; logic [1:0] hit;
  alarm_trigger dut (.clk, .rst, .angle(ang), .angle_valid(av), .alarms, .trigger(trig), .hit_index(hit));
  initial begin
    int prev_match [4];
    alarms[0] = 30; alarms[1] = 95; alarms[2] = 200; alarms[3] = 359;
    for (int i = 0; i < 4; i++) prev_match[i] = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int step = 0; step < 2000; step++) begin
      int a, want, wanti;
      a = step / 5 + $urandom_range(0, 1);
      if (a > 359) a = 359;
      ang = AW'(a); av = 1;
      want = 0; wanti = 0;
      for (int i = 3; i >= 0; i--)
        if (a == int'(alarms[i]) && !prev_match[i]) begin want = 1; wanti = i; end
      for (int i = 0; i < 4; i++) prev_match[i] = (a == int'(alarms[i]));
      @(negedge clk) av = 0;
      checks++;
      if (trig != 1'(want) || (want && hit != 2'(wanti))) begin
        failures++; $display("FAIL angle %0d trig %0d want %0d", a, trig, want);
      end
      if (trig) fired++;
      repeat (3) @(negedge clk);
      checks++;
      if (trig) begin failures++; $display("FAIL trigger without update"); end
    end
    checks++;
    if (fired < 4) begin failures++; $display("FAIL only %0d triggers", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

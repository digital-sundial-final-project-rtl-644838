// pwm_tb: for several levels, the number of high clocks in each 256-clock
// period must equal the level, and the output must be one pulse per period.
module pwm_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] level = 0; logic out;
  pwm dut (.clk, .rst, .level, .out);
  initial begin
    int levels [6] = '{0, 1, 64, 128, 200, 255};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (levels[i]) begin
      int highs, rises; logic prev;
      highs = 0; rises = 0; prev = 0;
      level = 8'(levels[i]);
      repeat (256) @(negedge clk);
      for (int c = 0; c < 256; c++) begin
        if (out) highs++;
        if (out && !prev) rises++;
        prev = out;
        @(negedge clk);
      end
      checks += 2;
      if (highs != levels[i]) begin failures++; $display("FAIL level %0d highs %0d", levels[i], highs); end
      if (rises > 1) begin failures++; $display("FAIL level %0d pulses %0d", levels[i], rises); end
    end
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

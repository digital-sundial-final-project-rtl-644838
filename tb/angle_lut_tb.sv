// angle_lut_tb: every ratio 0..100 (and a few above) must give the nearest whole
// degree of atan(R/100), computed here with real arithmetic.
module angle_lut_tb;
  int checks = 0, failures = 0;
  logic [7:0] ratio;
  logic [5:0] angle;
  angle_lut dut (.ratio, .angle);
  initial begin
    for (int r = 0; r <= 110; r++) begin
      int expect_deg;
      real deg;
      ratio = 8'(r);
      #1;
      deg = $atan((r > 100 ? 100.0 : real'(r)) / 100.0) * 180.0 / 3.14159265358979;
      expect_deg = $rtoi(deg + 0.5);
      checks++;
      if (angle != 6'(expect_deg)) begin failures++; $display("FAIL R=%0d got %0d want %0d", r, angle, expect_deg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

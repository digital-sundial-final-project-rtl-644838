// mass_estimate_tb: ellipse area pi*a*b from random boxes, compared with real
// arithmetic to within 0.1 % (+1 pixel).
module mass_estimate_tb;
  import sundial_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  xcoord_t xt, xb; ycoord_t yt, yb;
  logic [19:0] mass;
  mass_estimate dut (.clk, .x_top(xt), .x_bottom(xb), .y_top(yt), .y_bottom(yb), .mass);
  initial begin
    for (int i = 0; i < 300; i++) begin
      real want;
      @(negedge clk);
      xt = 11'($urandom_range(0, 600)); xb = 11'($urandom_range(600, 1279));
      yt = 10'($urandom_range(0, 300)); yb = 10'($urandom_range(300, 719));
      if (i == 0) begin xt = 5; xb = 5; end
      want = 3.14159265358979 * (xb - xt) / 2.0 * (yb - yt) / 2.0;
      @(negedge clk);
      checks++;
      if (((real'(mass) - want) < 0 ? want - real'(mass) : real'(mass) - want) > want * 0.001 + 1.0) begin
        failures++; $display("FAIL box %0d..%0d x %0d..%0d: %0d want %f", xt, xb, yt, yb, mass, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

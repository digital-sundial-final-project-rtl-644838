// angle_division_tb: the angle for the axes, the diagonals and random vectors in
// all four quadrants. The expected value is worked out with real trigonometry:
// the octant ratio R = round(100*small/large), then round(atan(R/100)) degrees,
// placed in its octant. Also checks the result against atan2 to within one degree
// and that every result arrives within 100 cycles.
module angle_division_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, max_lat = 0;
  logic start = 0;
  xcoord_t xc, xn;
  ycoord_t yc, yn;
  angle_t angle;
  logic busy, done;

  angle_division dut (.clk, .rst, .start, .x_com(xc), .y_com(yc), .x_cen(xn), .y_cen(yn),
                      .angle, .busy, .done);

  function automatic int model(input int x, input int y);
    int base, a, b, r, t, ang;
    if (x == 0 && y == 0) return 0;
    if (x > 0 && y >= 0)      begin base = 0;   a = x;  b = y;  end
    else if (x <= 0 && y > 0) begin base = 90;  a = y;  b = -x; end
    else if (x < 0 && y <= 0) begin base = 180; a = -x; b = -y; end
    else                      begin base = 270; a = -y; b = x;  end
    if (a >= b) begin
      r = $rtoi($floor(100.0 * b / a + 0.5));
      t = $rtoi($atan(r / 100.0) * 180.0 / 3.14159265358979 + 0.5);
      ang = base + t;
    end else begin
      r = $rtoi($floor(100.0 * a / b + 0.5));
      t = $rtoi($atan(r / 100.0) * 180.0 / 3.14159265358979 + 0.5);
      ang = base + 90 - t;
    end
    return ang % 360;
  endfunction

  task automatic run(input int x, input int y);
    int lat = 0, want, ideal, diff;
    xn = 11'd640; yn = 10'd360;
    xc = 11'(640 + x); yc = 10'(360 + y);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    if (lat > max_lat) max_lat = lat;
    want = model(x, y);
    checks++;
    if (angle != AW'(want)) begin failures++; $display("FAIL (%0d,%0d) got %0d want %0d", x, y, angle, want); end
    if (x != 0 || y != 0) begin
      ideal = $rtoi($atan2(real'(y), real'(x)) * 180.0 / 3.14159265358979 + 360.5) % 360;
      diff = int'(angle) - ideal;
      if (diff > 180) diff -= 360;
      if (diff < -180) diff += 360;
      checks++;
      if (diff > 1 || diff < -1) begin failures++; $display("FAIL atan2 (%0d,%0d) got %0d ideal %0d", x, y, angle, ideal); end
    end
    checks++;
    if (lat > 100) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 0);
    run(100, 0); run(0, 100); run(-100, 0); run(0, -100);
    run(50, 50); run(-50, 50); run(-50, -50); run(50, -50);
    run(100, 17); run(17, 100); run(-17, 100); run(-100, 17);
    run(-100, -17); run(-17, -100); run(17, -100); run(100, -17);
    run(1, 300); run(300, 1); run(-359, 2); run(600, -355);
    repeat (400) run($urandom_range(0, 1200) - 600, $urandom_range(0, 700) - 350);
    $display("max latency %0d cycles", max_lat);
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

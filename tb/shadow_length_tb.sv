// shadow_length_tb: compares L with the quadratic-formula root
// L = (-w r + sqrt((w r)^2 + 2 w r m)) / (2 w), evaluated in real arithmetic with
// the integer displacement r = floor(|d|), to within 2 pixels + 1 %; checks the
// zero-displacement and zero-width cases and that each result takes under 150
// cycles.
module shadow_length_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  xcoord_t xc, xn; ycoord_t yc, yn;
  logic [19:0] m; logic [7:0] w;
  logic [LW-1:0] len; logic busy, done;

  shadow_length dut (.clk, .rst, .start, .x_com(xc), .y_com(yc), .x_cen(xn), .y_cen(yn),
                     .mass(m), .width(w), .length(len), .busy, .done);

  task automatic run(input int dx, input int dy, input int mass, input int width);
    int lat;
    real r, want;
    xn = 640; yn = 360; xc = 11'(640 + dx); yc = 10'(360 + dy); m = 20'(mass); w = 8'(width);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    r = $floor($sqrt(real'(dx * dx + dy * dy)));
    if (r == 0.0 || width == 0) want = 0.0;
    else want = (-width * r + $sqrt((width * r) ** 2 + 2.0 * width * r * mass)) / (2.0 * width);
    if (want > 2047.0) want = 2047.0;
    checks += 2;
    if (((real'(len) - want) < 0 ? want - real'(len) : real'(len) - want) > 2.0 + 0.01 * want) begin
      failures++; $display("FAIL d=(%0d,%0d) m=%0d w=%0d: %0d want %f", dx, dy, mass, width, len, want);
    end
    if (lat >= 150) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 0, 100000, 10);
    run(20, 0, 100000, 0);
    run(20, 5, 200000, 20);
    run(-3, 4, 50000, 8);
    run(100, -100, 700000, 30);
    repeat (300) run($urandom_range(0, 400) - 200, $urandom_range(0, 300) - 150,
                     $urandom_range(1000, 720000), $urandom_range(1, 255));
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

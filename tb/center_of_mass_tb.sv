// center_of_mass_tb: feeds frames of random mask pixels (one pixel per clock,
// random gaps), keeps its own sums, and checks the centroid after each tabulate,
// that an empty frame gives no result, and the result latency.
module center_of_mass_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  xcoord_t x; ycoord_t y;
  logic valid = 0, tab = 0;
  xcoord_t xo; ycoord_t yo; logic vo;

  center_of_mass dut (.clk, .rst, .x_in(x), .y_in(y), .valid_in(valid), .tabulate(tab),
                      .x_out(xo), .y_out(yo), .valid_out(vo));

  initial begin
    longint sx, sy, n;
    int lat;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 20; f++) begin
      int npix = $urandom_range(1, 3000);
      sx = 0; sy = 0; n = 0;
      for (int i = 0; i < npix; i++) begin
        @(negedge clk);
        x = 11'($urandom_range(0, 1279)); y = 10'($urandom_range(0, 719));
        valid = ($urandom_range(0, 3) != 0) || (i == npix - 1);
        if (valid) begin sx += x; sy += y; n++; end
      end
      @(negedge clk) valid = 0; tab = 1;
      @(negedge clk) tab = 0;
      lat = 1;
      while (!vo && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat >= 100) begin failures++; $display("FAIL no result"); end
      if (lat > 40) begin failures++; $display("FAIL latency %0d", lat); end
      if (xo != 11'(sx / n) || yo != 10'(sy / n)) begin
        failures++; $display("FAIL com (%0d,%0d) want (%0d,%0d)", xo, yo, sx / n, sy / n);
      end
    end
    // empty frame: no valid_out, result kept
    @(negedge clk) tab = 1;
    @(negedge clk) tab = 0;
    lat = 0;
    repeat (60) begin @(negedge clk); if (vo) lat++; end
    checks++;
    if (lat != 0) begin failures++; $display("FAIL empty frame gave a result"); end
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

// edge_detection_tb: random mask pixels per frame; the box and the midpoint
// centre are compared with min/max kept by the testbench, one cycle after
// tabulate. An empty frame must give no result.
module edge_detection_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  xcoord_t x; ycoord_t y;
  logic valid = 0, tab = 0;
  xcoord_t xt, xb, xc; ycoord_t yt, yb, yc; logic vo;

  edge_detection dut (.clk, .rst, .x_in(x), .y_in(y), .valid_in(valid), .tabulate(tab),
                      .x_top(xt), .x_bottom(xb), .y_top(yt), .y_bottom(yb),
                      .x_cen(xc), .y_cen(yc), .valid_out(vo));

  initial begin
    int xmin, xmax, ymin, ymax, seen;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 30; f++) begin
      int npix = $urandom_range(1, 500);
      xmin = 4000; xmax = 0; ymin = 4000; ymax = 0;
      for (int i = 0; i < npix; i++) begin
        @(negedge clk);
        x = 11'($urandom_range(100, 1200)); y = 10'($urandom_range(50, 700));
        valid = ($urandom_range(0, 2) != 0) || (i == npix - 1);
        if (valid) begin
          if (x < xmin) xmin = x; if (x > xmax) xmax = x;
          if (y < ymin) ymin = y; if (y > ymax) ymax = y;
        end
      end
      @(negedge clk) valid = 0; tab = 1;
      @(negedge clk) tab = 0;
      checks += 3;
      if (!vo) begin failures++; $display("FAIL no valid_out"); end
      if (xt != 11'(xmin) || xb != 11'(xmax) || yt != 10'(ymin) || yb != 10'(ymax)) begin
        failures++; $display("FAIL box %0d %0d %0d %0d", xt, xb, yt, yb);
      end
      if (xc != 11'((xmin + xmax) / 2) || yc != 10'((ymin + ymax) / 2)) begin
        failures++; $display("FAIL centre (%0d,%0d)", xc, yc);
      end
    end
    @(negedge clk) tab = 1;
    @(negedge clk) tab = 0;
    checks++;
    if (vo) begin failures++; $display("FAIL empty frame gave a result"); end
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

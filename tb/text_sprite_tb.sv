// text_sprite_tb: checks the "ANGLE:" label pixel by pixel.
// The expected picture is written out below as rows of '#' and '.', one string
// per glyph row, independent of the bit-coded font in the module. The test
// sweeps a window that extends one cell beyond the label on every side and
// compares every pixel at scale 1 (2x2 screen pixels per font unit). It also
// checks that a label placed at a different origin draws the same shape shifted.
module text_sprite_tb;
  import sundial_pkg::*;
  int checks = 0, failures = 0;
  xcoord_t hc, x0; ycoord_t vc, y0;
  logic on;

  text_sprite #(.NCHARS(6), .TEXT("ANGLE:"), .SCALE_LOG2(1)) dut (
    .hcount(hc), .vcount(vc), .x0, .y0, .pixel_on(on)
  );

  // 6 cells of 8 columns: 5 glyph columns then 3 blank ones
  string pic [7] = '{
    ".###....#...#....###....#.......#####..........",
    "#...#...##..#...#...#...#.......#........##....",
    "#...#...#.#.#...#.......#.......#........##....",
    "#####...#..##...#.###...#.......####...........",
    "#...#...#...#...#...#...#.......#........##....",
    "#...#...#...#...#...#...#.......#........##....",
    "#...#...#...#....####...#####...#####.........."
  };

  function automatic bit want(input int ux, input int uy);
    if (ux < 0 || uy < 0 || ux >= 48 || uy >= 8) return 0;
    if (uy == 7 || ux >= pic[uy].len()) return 0;
    return pic[uy][ux] == "#";
  endfunction

  task automatic sweep(input int ox, input int oy);
    x0 = XW'(ox); y0 = YW'(oy);
    for (int y = oy - 16; y < oy + 32; y++)
      for (int x = ox - 16; x < ox + 48 * 2 + 16; x++) begin
        hc = XW'(x); vc = YW'(y);
        #1;
        checks++;
        if (on != want((x - ox) >= 0 ? (x - ox) / 2 : -1, (y - oy) >= 0 ? (y - oy) / 2 : -1)) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0b", x, y, on);
        end
      end
  endtask

  initial begin
    #5;  // leave time 0 before driving
    sweep(100, 50);
    sweep(700, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

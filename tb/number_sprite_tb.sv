// number_sprite_tb: renders a three-digit number and reads the glyphs back by
// scanning the screen area; each 5x7 digit pattern is compared with a
// reference font written out here row by row, and nothing may be lit outside
// the number's cells.
module number_sprite_tb;
  import sundial_pkg::*;
  int checks = 0, failures = 0;
  xcoord_t h; ycoord_t v; logic [11:0] val; logic on;
  number_sprite #(.BIN_W(12), .DIGITS(3), .SCALE_LOG2(1)) dut (
    .hcount(h), .vcount(v), .x0(11'd100), .y0(10'd50), .value(val), .pixel_on(on));

  // reference glyphs, row 0 first, '#' = lit
  string font [10][7] = '{
    '{".###.", "#...#", "#..##", "#.#.#", "##..#", "#...#", ".###."},
    '{"..#..", ".##..", "..#..", "..#..", "..#..", "..#..", ".###."},
    '{".###.", "#...#", "....#", "...#.", "..#..", ".#...", "#####"},
    '{"#####", "...#.", "..#..", "...#.", "....#", "#...#", ".###."},
    '{"...#.", "..##.", ".#.#.", "#..#.", "#####", "...#.", "...#."},
    '{"#####", "#....", "####.", "....#", "....#", "#...#", ".###."},
    '{"..##.", ".#...", "#....", "####.", "#...#", "#...#", ".###."},
    '{"#####", "....#", "...#.", "..#..", ".#...", ".#...", ".#..."},
    '{".###.", "#...#", "#...#", ".###.", "#...#", "#...#", ".###."},
    '{".###.", "#...#", "#...#", ".####", "....#", "...#.", ".##.."}};

  task automatic show(input int n);
    int d [3];
    d[0] = n / 100; d[1] = (n / 10) % 10; d[2] = n % 10;
    val = 12'(n);
    for (int pos = 0; pos < 3; pos++)
      for (int row = 0; row < 8; row++)
        for (int col = 0; col < 8; col++) begin
          logic want;
          want = (row < 7 && col < 5) ? (font[d[pos]][row][col] == "#") : 1'b0;
          // every screen pixel of this font unit (scale 2)
          for (int sy = 0; sy < 2; sy++)
            for (int sx = 0; sx < 2; sx++) begin
              h = 11'(100 + pos * 16 + col * 2 + sx);
              v = 10'(50 + row * 2 + sy);
              #1;
              checks++;
              if (on != want) begin failures++; $display("FAIL n=%0d pos %0d row %0d col %0d", n, pos, row, col); end
            end
        end
    // outside the box
    h = 11'd99; v = 10'd55; #1; checks++; if (on) failures++;
    h = 11'd148; v = 10'd55; #1; checks++; if (on) failures++;
    h = 11'd110; v = 10'd49; #1; checks++; if (on) failures++;
    h = 11'd110; v = 10'd66; #1; checks++; if (on) failures++;
  endtask

  initial begin
    show(123); show(456); show(789); show(0); show(360); show(258);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// scale_tb: every raster position of the 1280x720 frame maps to
// (v/3)*320 + h/3 inside the 960x720 picture and is flagged outside it.
module scale_tb;
  import sundial_pkg::*;
  int checks = 0, failures = 0;
  xcoord_t h; ycoord_t v; logic [16:0] addr; logic in_img;
  scale dut (.hcount(h), .vcount(v), .addr, .in_image(in_img));
  initial begin
    for (int y = 0; y < 750; y += 7)
      for (int x = 0; x < 1650; x += 1) begin
        h = 11'(x); v = 10'(y);
        #1;
        checks++;
        if (x < 960 && y < 720) begin
          if (!in_img || addr != 17'((y / 3) * 320 + x / 3)) begin failures++; $display("FAIL (%0d,%0d)", x, y); end
        end else if (in_img) begin
          failures++; $display("FAIL (%0d,%0d) in image", x, y);
        end
      end
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

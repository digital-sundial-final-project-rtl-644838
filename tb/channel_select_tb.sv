// channel_select_tb: all four channel selections on random RGB565 pixels,
// expected values widened by hand (x8 / x4, luma (2R+5G+B)/8).
module channel_select_tb;
  import sundial_pkg::*;
  int checks = 0, failures = 0;
  rgb565_t px; channel_t sel; logic [7:0] v;
  channel_select dut (.pixel(px), .sel, .value(v));
  initial begin
    for (int i = 0; i < 400; i++) begin
      int r8, g8, b8, want;
      px = 16'($urandom);
      sel = channel_t'(i % 4);
      #1;
      r8 = px.r * 8; g8 = px.g * 4; b8 = px.b * 8;
      case (i % 4)
        0: want = r8;
        1: want = g8;
        2: want = b8;
        default: want = (2 * r8 + 5 * g8 + b8) / 8;
      endcase
      checks++;
      if (v != 8'(want)) begin failures++; $display("FAIL px=%h sel=%0d got %0d want %0d", px, i % 4, v, want); end
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

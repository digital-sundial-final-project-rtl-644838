// bcd_convert_tb: every 12-bit value below 10000 against decimal digits worked
// out with / and %.
module bcd_convert_tb;
  int checks = 0, failures = 0;
  logic [11:0] bin; logic [15:0] bcd;
  bcd_convert #(.BIN_W(12), .DIGITS(4)) dut (.bin, .bcd);
  initial begin
    for (int i = 0; i < 4096; i++) begin
      bin = 12'(i);
      #1;
      checks++;
      if (bcd != {4'(i / 1000), 4'((i / 100) % 10), 4'((i / 10) % 10), 4'(i % 10)}) begin
        failures++; $display("FAIL %0d -> %h", i, bcd);
      end
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

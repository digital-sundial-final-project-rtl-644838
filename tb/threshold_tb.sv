// threshold_tb: the inclusive band test on every value for several bands.
module threshold_tb;
  int checks = 0, failures = 0;
  logic [7:0] v, lo, hi; logic m;
  threshold dut (.value(v), .lower(lo), .upper(hi), .mask(m));
  initial begin
    for (int b = 0; b < 6; b++) begin
      lo = 8'($urandom_range(0, 200)); hi = 8'($urandom_range(0, 255));
      if (b == 0) begin lo = 0; hi = 255; end
      if (b == 1) begin lo = 100; hi = 100; end
      for (int i = 0; i < 256; i++) begin
        v = 8'(i);
        #1;
        checks++;
        if (m != (i >= lo && i <= hi)) begin failures++; $display("FAIL v=%0d band %0d..%0d", i, lo, hi); end
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

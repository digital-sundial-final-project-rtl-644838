// seven_segment_controller_tb: scans the eight digits and decodes the segment
// pattern of each back to a decimal digit with a reference table; the upper four
// must read the upper value and the lower four the lower value in decimal. Also
// checks that exactly one anode is active at a time.
module seven_segment_controller_tb;
  localparam int SB = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] up, lo; logic [7:0] an; logic [6:0] cat;
  seven_segment_controller #(.SCAN_BITS(SB), .VAL_W(12)) dut (.clk, .rst, .upper_value(up), .lower_value(lo), .an, .cat);

  function automatic int decode(input logic [6:0] c);
    logic [6:0] s;
    s = ~c;
    case (s)
      7'h3F: return 0; 7'h06: return 1; 7'h5B: return 2; 7'h4F: return 3; 7'h66: return 4;
      7'h6D: return 5; 7'h7D: return 6; 7'h07: return 7; 7'h7F: return 8; 7'h6F: return 9;
      default: return -1;
    endcase
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      int seen [8];
      int val_up, val_lo;
      up = 12'($urandom_range(0, 360)); lo = 12'($urandom_range(1, 4));
      if (t == 0) begin up = 358; lo = 2; end
      for (int d = 0; d < 8; d++) seen[d] = -2;
      for (int c = 0; c < 8 * (1 << SB) + 4; c++) begin
        @(negedge clk);
        checks++;
        if ($countones(~an) != 1) begin failures++; $display("FAIL anodes %b", an); end
        for (int d = 0; d < 8; d++) if (!an[d]) seen[d] = decode(cat);
      end
      val_up = seen[7] * 1000 + seen[6] * 100 + seen[5] * 10 + seen[4];
      val_lo = seen[3] * 1000 + seen[2] * 100 + seen[1] * 10 + seen[0];
      checks += 2;
      if (val_up != int'(up)) begin failures++; $display("FAIL upper %0d want %0d", val_up, up); end
      if (val_lo != int'(lo)) begin failures++; $display("FAIL lower %0d want %0d", val_lo, lo); end
    end
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

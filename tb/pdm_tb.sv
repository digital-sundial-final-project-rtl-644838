// pdm_tb: for several levels the density of ones over 256 clocks must equal the
// level, and no run of ones or zeros may be longer than the even spreading
// allows (ceil(256/level) for zeros, ceil(256/(256-level)) for ones).
module pdm_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] level = 0; logic out;
  pdm dut (.clk, .rst, .level, .out);
  initial begin
    int levels [6] = '{1, 3, 64, 128, 200, 255};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (levels[i]) begin
      int ones, run, maxrun0, maxrun1; logic prev;
      ones = 0; run = 0; maxrun0 = 0; maxrun1 = 0; prev = 0;
      level = 8'(levels[i]);
      repeat (300) @(negedge clk);
      for (int c = 0; c < 256; c++) begin
        if (out) ones++;
        if (c == 0 || out != prev) run = 1; else run++;
        if (out && run > maxrun1) maxrun1 = run;
        if (!out && run > maxrun0) maxrun0 = run;
        prev = out;
        @(negedge clk);
      end
      checks += 2;
      if (ones != levels[i]) begin failures++; $display("FAIL level %0d ones %0d", levels[i], ones); end
      if (maxrun0 > (256 + levels[i] - 1) / levels[i] ||
          maxrun1 > (256 + (256 - levels[i]) - 1) / (256 - levels[i])) begin
        failures++; $display("FAIL level %0d runs %0d/%0d", levels[i], maxrun0, maxrun1);
      end
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

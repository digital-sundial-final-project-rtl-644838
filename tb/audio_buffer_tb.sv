// audio_buffer_tb: fills one half while reading the other, checks one-clock read
// latency and that the halves do not disturb each other.
module audio_buffer_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0; logic [9:0] wa = 0, ra = 0; logic [7:0] wd = 0, rd;
  logic [7:0] ref_mem [1024];
  audio_buffer dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk) we = 1; wa = 10'(i); wd = 8'($urandom); ref_mem[i] = wd;
    end
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      if (i > 0) begin checks++; if (rd != ref_mem[ra]) begin failures++; $display("FAIL %0d", ra); end end
      we = 1; wa = 10'(512 + i); wd = 8'($urandom); ref_mem[512 + i] = wd;
      ra = 10'(i);
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 1024; i++) begin
      ra = 10'(i);
      @(negedge clk);
      checks++;
      if (rd != ref_mem[i]) begin failures++; $display("FAIL %0d", i); end
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

// frame_buffer_tb: writes a full 320x240 frame of random pixels, reads it back in
// random order and checks each word arrives exactly two read clocks after its
// address.
module frame_buffer_tb;
  localparam int D = 320 * 240;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0; logic [16:0] wa, ra; logic [15:0] wd, rd;
  logic [15:0] ref_mem [D];
  frame_buffer dut (.wclk(clk), .we, .waddr(wa), .wdata(wd), .rclk(clk), .raddr(ra), .rdata(rd));
  initial begin
    logic [16:0] a0, a1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; wa = 17'(i); wd = 16'($urandom); ref_mem[i] = wd;
    end
    @(negedge clk) we = 0;
    a0 = 0; a1 = 0;
    for (int i = 0; i < 3000; i++) begin
      ra = 17'($urandom_range(0, D - 1));
      @(negedge clk);
      if (i >= 1) begin
        checks++;
        if (rd != ref_mem[a0]) begin failures++; $display("FAIL addr %0d", a0); end
      end
      a1 = a0; a0 = ra;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

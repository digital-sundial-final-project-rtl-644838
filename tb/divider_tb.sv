// divider_tb: checks the serial divider against the / and % operators on
// directed and random operands, including division by zero, and checks that done
// comes exactly WIDTH+2 cycles after start.
module divider_tb;
  localparam int unsigned W = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  logic [W-1:0] a, b, q, r;
  logic busy, done;

  divider #(.WIDTH(W)) dut (.clk, .rst, .start, .dividend(a), .divisor(b),
                            .quotient(q), .remainder(r), .busy, .done);

  task automatic run(input logic [W-1:0] n, input logic [W-1:0] d);
    int cycles = 0;
    a = n; b = d;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (d == 0) begin
      if (q !== '1 || r !== n) begin failures++; $display("FAIL %0d/0 -> %0d r %0d", n, q, r); end
    end else begin
      if (q !== n / d || r !== n % d) begin failures++; $display("FAIL %0d/%0d -> %0d r %0d", n, d, q, r); end
      checks++;
      if (cycles != W + 2) begin failures++; $display("FAIL latency %0d", cycles); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(100, 7); run(0, 5); run(16'hFFFF, 1); run(16'hFFFF, 16'hFFFF); run(5, 9); run(12, 0);
    repeat (200) run(W'($urandom), W'($urandom_range(1, 300)));
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

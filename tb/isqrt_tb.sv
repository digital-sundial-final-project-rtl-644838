// isqrt_tb: floor square root of directed and random radicands, checked by
// r*r <= n < (r+1)*(r+1), and the fixed latency of WIDTH/2+2 cycles.
module isqrt_tb;
  localparam int unsigned W = 40;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  logic [W-1:0] n;
  logic [W/2-1:0] root;
  logic busy, done;

  isqrt #(.WIDTH(W)) dut (.clk, .rst, .start, .radicand(n), .root, .busy, .done);

  task automatic run(input logic [W-1:0] v);
    int cycles;
    longint unsigned r;
    n = v;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    r = root;
    checks += 2;
    if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin failures++; $display("FAIL sqrt(%0d) = %0d", v, r); end
    if (cycles != W / 2 + 2) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(0); run(1); run(2); run(3); run(4); run(65536); run(65535); run(1_000_000);
    run({W{1'b1}}); run(40'd2_160_000);
    repeat (300) run({8'($urandom), 32'($urandom)});
    repeat (100) run(W'($urandom_range(0, 5000)));
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

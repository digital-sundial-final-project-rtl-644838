// fir31_tb: feeds random and step inputs with the default triangular taps and,
// separately, with random taps, and compares each output with a direct
// convolution worked out here (sum c[k]*x[n-k], arithmetic shift, saturation).
// Also checks that the output arrives 33 clocks after each ready.
module fir31_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int RC [31] = '{ -20, 5, 33, -7, 12, 40, -3, 0, 17, 25, -11, 9, 60, -45, 100, 127,
                               100, -45, 60, 9, -11, 25, 17, 0, -3, 40, 12, -7, 33, 5, -20};
  int tri_c [31];

  logic ready = 0; logic signed [7:0] x = 0, y1, y2; logic v1, v2;
  fir31 u_tri (.clk, .rst, .ready, .x, .y(y1), .y_valid(v1));
  fir31 #(.COEFFS(RC), .SHIFT(9)) u_rnd (.clk, .rst, .ready, .x, .y(y2), .y_valid(v2));

  int hist [$];

  function automatic int conv(input int c [31], input int shift);
    longint acc = 0;
    int r;
    for (int k = 0; k < 31; k++) acc += c[k] * ((k < hist.size()) ? hist[k] : 0);
    r = int'(acc >>> shift);
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  initial begin
    int lat;
    int rc_copy [31];
    for (int k = 0; k < 31; k++) begin tri_c[k] = 16 - ((k > 15) ? k - 15 : 15 - k); rc_copy[k] = RC[k]; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x = (n < 100) ? 8'($urandom) : ((n < 200) ? 8'sd100 : -8'sd128);
      ready = 1;
      hist.push_front(int'(x));
      @(negedge clk) ready = 0;
      lat = 1;
      while (!v1 && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (int'(y1) != conv(tri_c, 8)) begin failures++; $display("FAIL tri n=%0d %0d want %0d", n, y1, conv(tri_c, 8)); end
      if (int'(y2) != conv(rc_copy, 9)) begin failures++; $display("FAIL rnd n=%0d %0d want %0d", n, y2, conv(rc_copy, 9)); end
      if (lat != 33) begin failures++; $display("FAIL latency %0d", lat); end
      repeat ($urandom_range(0, 10)) @(negedge clk);
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

// camera_byte_rx_tb: a model of the microcontroller bridge sends a small frame
// byte by byte (strobe much slower than the FPGA clock, as on the real link);
// every assembled pixel must carry the sent value and position, pixels beyond
// the frame are dropped, and vsync restarts the frame.
module camera_byte_rx_tb;
  import sundial_pkg::*;
  localparam int W = 6, H = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, received = 0;
  logic [7:0] d = 0; logic pclk = 0, href = 0, vsync = 0;
  rgb565_t px; logic [8:0] hc; logic [7:0] vc; logic pv;
  logic [15:0] sent [H][W + 2];

  camera_byte_rx #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .rst, .pmod_data(d), .pmod_clk(pclk),
    .cam_href(href), .cam_vsync(vsync), .pixel(px), .hcount(hc), .vcount(vc), .pixel_valid(pv));

  task automatic send_byte(input logic [7:0] b);
    d = b;
    #40 pclk = 1;
    #40 pclk = 0;
  endtask

  always @(posedge clk) if (pv && !rst) begin
    received++;
    checks++;
    if (hc >= W || vc >= H || px != sent[vc][hc]) begin
      failures++; $display("FAIL pixel (%0d,%0d) = %h", hc, vc, px);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      vsync = 1; #200 vsync = 0; #200;
      for (int y = 0; y < H + 1; y++) begin
        href = 1;
        for (int x = 0; x < W + 2; x++) begin     // two extra pixels per line
          logic [15:0] p = 16'($urandom);
          if (y < H) sent[y][x] = p;
          send_byte(p[15:8]);
          send_byte(p[7:0]);
        end
        #40 href = 0;
        #200;
      end
    end
    checks++;
    if (received != 2 * W * H) begin failures++; $display("FAIL received %0d", received); end
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

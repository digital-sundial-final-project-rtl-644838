// video_sig_gen_tb: runs two full 1280x720 frames and checks the frame and line
// lengths, the number of active pixels, the sync pulse widths and positions, and
// that new_frame comes once per frame at (0, 720).
module video_sig_gen_tb;
  import sundial_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  xcoord_t h; ycoord_t v; logic hs, vs, ad, nf; logic [5:0] fc;
  video_sig_gen dut (.clk, .rst, .hcount(h), .vcount(v), .hsync(hs), .vsync(vs),
                     .active(ad), .new_frame(nf), .frame_count(fc));
  localparam int TH = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int TV = V_ACTIVE + V_FP + V_SYNC + V_BP;
  initial begin
    longint act = 0, hsc = 0, vsc = 0, nfc = 0, cyc = 0;
    int bad_h = 0, bad_nf = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 2 * TH * TV; i++) begin
      if (ad) act++;
      if (hs) hsc++;
      if (vs) vsc++;
      if (nf) begin nfc++; if (h != 0 || v != YW'(V_ACTIVE)) bad_nf++; end
      if (h >= XW'(TH) || v >= YW'(TV)) bad_h++;
      @(negedge clk);
    end
    checks += 6;
    if (act != 2 * H_ACTIVE * V_ACTIVE) begin failures++; $display("FAIL active %0d", act); end
    if (hsc != 2 * TV * H_SYNC) begin failures++; $display("FAIL hsync %0d", hsc); end
    if (vsc != 2 * TH * V_SYNC) begin failures++; $display("FAIL vsync %0d", vsc); end
    if (nfc != 2) begin failures++; $display("FAIL new_frame %0d", nfc); end
    if (bad_h != 0 || bad_nf != 0) begin failures++; $display("FAIL counter range"); end
    if (fc != 6'd2) begin failures++; $display("FAIL frame_count %0d", fc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3 * TH * TV) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// video_mux_tb: drives random raster positions and overlay inputs and checks the
// one-cycle-later colour against the priority sprites > centre-of-mass crosshair
// (green) > true-centre crosshair (blue) > image, in camera and mask modes, and
// that blanking is black and the syncs are delayed by one clock.
module video_mux_tb;
  import sundial_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  xcoord_t h, xcm, xcn; ycoord_t v, ycm, ycn;
  logic act, hsi, vsi, mask, showm;
  rgb565_t px; logic [5:0] spr;
  rgb888_t rgb; logic hs, vs, ao;

  video_mux dut (.clk, .hcount(h), .vcount(v), .active(act), .hsync_in(hsi), .vsync_in(vsi),
                 .cam_pixel(px), .mask, .show_mask(showm), .x_com(xcm), .y_com(ycm),
                 .x_cen(xcn), .y_cen(ycn), .sprite_on(spr), .rgb, .hsync(hs), .vsync(vs),
                 .active_out(ao));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] want;
      @(negedge clk);
      h = 11'($urandom_range(0, 20)); v = 10'($urandom_range(0, 20));
      xcm = 11'($urandom_range(0, 20)); ycm = 10'($urandom_range(0, 20));
      xcn = 11'($urandom_range(0, 20)); ycn = 10'($urandom_range(0, 20));
      act = ($urandom_range(0, 5) != 0); hsi = 1'($urandom); vsi = 1'($urandom);
      mask = 1'($urandom); showm = 1'($urandom); px = 16'($urandom);
      spr = ($urandom_range(0, 4) == 0) ? 6'(1 << $urandom_range(0, 5)) : 6'd0;
      if (!act) want = 24'h000000;
      else if (spr != 0) want = 24'hFFFFFF;
      else if (h == xcm || v == ycm) want = 24'h00FF00;
      else if (h == xcn || v == ycn) want = 24'h0000FF;
      else if (showm) want = mask ? 24'hFF80FF : 24'h000000;
      else want = {px.r, 3'b000, px.g, 2'b00, px.b, 3'b000};
      @(negedge clk);
      checks += 2;
      if (rgb != want) begin failures++; $display("FAIL rgb %h want %h", rgb, want); end
      if (hs != hsi || vs != vsi || ao != act) begin failures++; $display("FAIL syncs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

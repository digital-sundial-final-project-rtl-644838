// sundial_top_full_tb: one complete operation of the sundial at its default
// sizes: 1280x720 raster, 320x240 camera frame scaled by 3, 10 ms button
// debouncing, 24.75 MHz audio clock with 48 kHz samples. A camera-bridge model
// sends a dial image whose shadow points slightly above the -x axis, so the
// centre of mass lies at a small angle. The testbench checks centre of mass,
// true centre, angle (against an independent octant/arctangent model) and length
// (quadratic formula, real arithmetic); sets alarm 0 to that angle with the
// buttons; and checks that the alarm starts the audio and that the first three
// sectors of the track are played sample by sample from the SD-card model,
// 515 or 516 audio clocks apart (48 kHz), and that angle and length are
// delivered inside the vertical blanking of the frame that produced them. It
// also counts the white pixels of the "ANGLE:" label over one frame.
module sundial_top_full_tb;
  import sundial_pkg::*;
  localparam int IW = 320, IH = 240, SF = 3, DB = 742_500;
  localparam int SHADOW_W = 30;

  logic clk_pixel = 0, clk_audio = 0, rst = 1;
  always #5 clk_pixel = ~clk_pixel;    // 74.25 MHz scaled to a 10-unit period
  always #15 clk_audio = ~clk_audio;   // 24.75 MHz, one third of the pixel clock
  int checks = 0, failures = 0;

  logic btn1 = 0, btn2 = 0, btn3 = 0;
  logic [7:0] pmod_data = 0; logic pmod_clk = 0, cam_href = 0, cam_vsync = 0;
  logic sd_ready, sd_rd, sd_bav; logic [31:0] sd_addr; logic [7:0] sd_dout;
  rgb888_t rgb; logic hs, vs, act, spk_l, spk_r;
  logic [7:0] an; logic [6:0] cat; logic [2:0] l0, l1;
  angle_t angle; logic angle_v; logic [LW-1:0] len; logic len_v;
  xcoord_t cx, nx; ycoord_t cy, ny; logic fired, playing; logic [15:0] underruns;
  int sectors;

  sundial_top dut (
    .clk_pixel, .clk_audio, .rst, .btn1, .btn2, .btn3, .channel_sel(CH_LUMA),
    .thresh_lower(8'd128), .thresh_upper(8'd255), .show_mask(1'b0), .shadow_width(8'(SHADOW_W * SF)),
    .fir_enable(1'b0), .use_pdm(1'b0), .pmod_data, .pmod_clk, .cam_href, .cam_vsync,
    .sd_ready, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available(sd_bav),
    .video_rgb(rgb), .video_hsync(hs), .video_vsync(vs), .video_active(act),
    .spk_left(spk_l), .spk_right(spk_r), .ss_an(an), .ss_cat(cat), .led0_rgb(l0), .led1_rgb(l1),
    .sun_angle(angle), .sun_angle_valid(angle_v), .shadow_len(len), .shadow_len_valid(len_v),
    .com_x(cx), .com_y(cy), .cen_x(nx), .cen_y(ny), .alarm_fired(fired),
    .audio_playing(playing), .audio_underruns(underruns)
  );

  sd_card_model #(.BYTE_GAP(8)) u_sd (.clk(clk_audio), .rst(dut.arst), .rd(sd_rd), .addr(sd_addr),
    .ready(sd_ready), .dout(sd_dout), .byte_available(sd_bav), .sectors_read(sectors));

  function automatic bit lit(input int x, input int y);
    real ex, ey, px, py, t, p;
    ex = (x - 150.0) / 130.0; ey = (y - 120.0) / 100.0;
    if (ex * ex + ey * ey > 1.0) return 0;
    // shadow: from (150,120) towards (-0.985, -0.174), 100 long, 30 wide
    px = x - 150.0; py = y - 120.0;
    t = -px * 0.985 - py * 0.174;
    p = px * 0.174 - py * 0.985;
    if (t >= 0.0 && t <= 100.0 && p >= -15.0 && p <= 15.0) return 0;
    return 1;
  endfunction

  task automatic send_byte(input logic [7:0] b);
    pmod_data = b;
    #30 pmod_clk = 1;
    #30 pmod_clk = 0;
  endtask

  task automatic send_frame();
    cam_vsync = 1; #200 cam_vsync = 0; #200;
    for (int y = 0; y < IH; y++) begin
      cam_href = 1;
      for (int x = 0; x < IW; x++) begin
        logic [15:0] p = lit(x, y) ? 16'hFFFF : 16'h0000;
        send_byte(p[15:8]);
        send_byte(p[7:0]);
      end
      #30 cam_href = 0;
      #100;
    end
  endtask

  function automatic int angle_model(input int x, input int y);
    int base, a, b, r;
    if (x == 0 && y == 0) return 0;
    if (x > 0 && y >= 0)      begin base = 0;   a = x;  b = y;  end
    else if (x <= 0 && y > 0) begin base = 90;  a = y;  b = -x; end
    else if (x < 0 && y <= 0) begin base = 180; a = -x; b = -y; end
    else                      begin base = 270; a = -y; b = x;  end
    if (a >= b) begin
      r = $rtoi($floor(100.0 * b / a + 0.5));
      return (base + $rtoi($atan(r / 100.0) * 180.0 / 3.14159265358979 + 0.5)) % 360;
    end
    r = $rtoi($floor(100.0 * a / b + 0.5));
    return (base + 90 - $rtoi($atan(r / 100.0) * 180.0 / 3.14159265358979 + 0.5)) % 360;
  endfunction

  int e_cx, e_cy, e_nx, e_ny, e_angle;
  real e_len;

  task automatic expect_results();
    longint sx = 0, sy = 0, n = 0;
    int xmin = 100000, xmax = 0, ymin = 100000, ymax = 0;
    real r, m, w;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        if (lit(x, y))
          for (int j = 0; j < SF; j++)
            for (int i = 0; i < SF; i++) begin
              int X = x * SF + i, Y = y * SF + j;
              sx += X; sy += Y; n++;
              if (X < xmin) xmin = X; if (X > xmax) xmax = X;
              if (Y < ymin) ymin = Y; if (Y > ymax) ymax = Y;
            end
    e_cx = int'(sx / n); e_cy = int'(sy / n);
    e_nx = (xmin + xmax) / 2; e_ny = (ymin + ymax) / 2;
    e_angle = angle_model(e_cx - e_nx, e_cy - e_ny);
    r = $floor($sqrt(real'((e_cx - e_nx) ** 2 + (e_cy - e_ny) ** 2)));
    m = 3.14159265358979 / 4.0 * (xmax - xmin) * (ymax - ymin);
    w = SHADOW_W * SF;
    e_len = (r == 0.0) ? 0.0 : r / 2.0 * (-1.0 + $sqrt(1.0 + 2.0 * m / (w * r)));
    $display("expected com (%0d,%0d) centre (%0d,%0d) angle %0d length %f", e_cx, e_cy, e_nx, e_ny, e_angle, e_len);
  endtask

  task automatic press(input logic [2:0] set);
    for (int i = 0; i < 3; i++) begin
      {btn3, btn2, btn1} = set; repeat (5) @(negedge clk_pixel);
      {btn3, btn2, btn1} = 3'b000; repeat (5) @(negedge clk_pixel);
    end
    {btn3, btn2, btn1} = set; repeat (DB + DB / 4) @(negedge clk_pixel);
    {btn3, btn2, btn1} = 3'b000; repeat (DB + DB / 4) @(negedge clk_pixel);
  endtask

  function automatic logic [7:0] card_byte(input logic [31:0] a);
    return 8'(a ^ (a >> 8) ^ (a >> 16) ^ 32'h5A);
  endfunction

  int n_samples = 0, n_bad = 0;
  // sample spacing: 24.75 MHz / 48 kHz = 515.6 clocks, so 515 or 516
  longint acycle = 0, last_sample = 0;
  int n_gap_bad = 0;
  always @(posedge clk_audio) begin
    acycle++;
    if (!dut.arst && dut.sample_valid) begin
      if (dut.sample != card_byte(32'(44 + n_samples))) n_bad++;
      if (n_samples > 0 && (acycle - last_sample < 515 || acycle - last_sample > 516)) n_gap_bad++;
      last_sample = acycle;
      n_samples++;
    end
  end

  // "ANGLE:" label: 90 lit font units of 4x4 pixels = 1440 white pixels a frame,
  // counted at the mux output inside the label's box (x 928..1119, y 624..655)
  int n_label = 0, label_frame = 0, label_frames = 0;
  xcoord_t hq; ycoord_t vq;
  always @(posedge clk_pixel) begin
    hq <= dut.hc2; vq <= dut.vc2;   // mux output lags its raster input by one clock
    if (dut.nf0) begin
      if (label_frames == 1) n_label = label_frame;
      label_frames++;
      label_frame = 0;
    end
    if (act && hq >= 928 && hq < 1120 && vq >= 624 && vq < 656 && rgb == 24'hFFFFFF) label_frame++;
  end

  // the math must finish in the vertical blanking (raster line >= 720)
  int n_math_in_active = 0;
  always @(posedge clk_pixel)
    if ((angle_v || len_v) && dut.vc0 < YW'(V_ACTIVE)) n_math_in_active++;

  initial begin
    int t;
    repeat (5) @(negedge clk_pixel);
    rst = 0;
    expect_results();
    send_frame();
    @(posedge dut.nf0); @(posedge dut.nf0);
    @(posedge angle_v);
    @(negedge clk_pixel);
    checks += 3;
    if (cx != XW'(e_cx) || cy != YW'(e_cy)) begin failures++; $display("FAIL com (%0d,%0d)", cx, cy); end
    if (nx != XW'(e_nx) || ny != YW'(e_ny)) begin failures++; $display("FAIL centre (%0d,%0d)", nx, ny); end
    if (angle != AW'(e_angle)) begin failures++; $display("FAIL angle %0d want %0d", angle, e_angle); end
    @(posedge len_v);
    @(negedge clk_pixel);
    checks++;
    if ((real'(len) - e_len > 2.0 + 0.02 * e_len) || (e_len - real'(len) > 2.0 + 0.02 * e_len)) begin
      failures++; $display("FAIL length %0d want %f", len, e_len);
    end
    $display("measured angle %0d length %0d", angle, len);

    t = 0;
    while (t < e_angle) begin press(3'b100); t = (t + 10 > 360) ? 360 : t + 10; end
    while (t > e_angle) begin press(3'b010); t--; end
    press(3'b110);
    checks++;
    if (dut.alarms[0] != AW'(e_angle)) begin failures++; $display("FAIL alarm 0 = %0d", dut.alarms[0]); end

    t = 0;
    while (!playing && t < 3_000_000) begin @(negedge clk_audio); t++; end
    checks++;
    if (!playing) begin failures++; $display("FAIL audio did not start"); end
    while (n_samples < 3 * 512 && t < 3_000_000) begin @(negedge clk_audio); t++; end
    checks += 3;
    if (n_samples < 3 * 512) begin failures++; $display("FAIL only %0d samples", n_samples); end
    if (n_bad != 0) begin failures++; $display("FAIL %0d wrong samples", n_bad); end
    if (underruns != 0) begin failures++; $display("FAIL underruns %0d", underruns); end
    checks += 3;
    if (n_label != 1440) begin failures++; $display("FAIL label %0d white pixels", n_label); end
    if (n_gap_bad != 0) begin failures++; $display("FAIL %0d sample gaps off 48 kHz", n_gap_bad); end
    if (n_math_in_active != 0) begin failures++; $display("FAIL results during active video"); end
    $display("played %0d samples, %0d sectors read", n_samples, sectors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60_000_000) @(posedge clk_pixel);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

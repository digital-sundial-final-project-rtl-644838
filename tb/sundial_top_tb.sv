// sundial_top_tb: end-to-end run of the whole sundial at a reduced frame size.
// A camera-bridge model sends a 64x40 image of a lit elliptical dial with a dark
// rectangular gnomon shadow, byte by byte. The raster (256x128 active, short
// blanking) shows it scaled by 3. The testbench works out, from the same image,
// the expected centre of mass, bounding-box centre, angle (octant ratio and
// rounded arctangent) and shadow length (quadratic formula in real arithmetic),
// and checks the design's results. It then counts overlay colours on the video
// output in camera and mask mode, sets alarm 0 to the measured angle and selects
// track 2 with bounced button presses, waits for the alarm to fire, and follows
// the audio: sector reads from the track's address on an SD-card model, every
// played sample against the card contents after the 44-byte WAV header, the
// FIR path, and PWM and PDM speaker drives. Each mechanism is counted and a
// mechanism that never happened is a failure.
module sundial_top_tb;
  import sundial_pkg::*;
  localparam int AH = 256, AV = 128, IW = 64, IH = 40, SF = 3, DB = 8;
  localparam int AUD_HZ = 1_000_000, SR = 25_000;
  localparam logic [31:0] STRIDE = 32'h0001_0000, TBYTES = 32'd2048;

  logic clk_pixel = 0, clk_audio = 0, rst = 1;
  always #5 clk_pixel = ~clk_pixel;
  always #13 clk_audio = ~clk_audio;
  int checks = 0, failures = 0;

  logic btn1 = 0, btn2 = 0, btn3 = 0, show_mask = 0, fir_enable = 0, use_pdm = 0;
  channel_t channel_sel = CH_LUMA;
  logic [7:0] pmod_data = 0; logic pmod_clk = 0, cam_href = 0, cam_vsync = 0;
  logic sd_ready, sd_rd, sd_bav; logic [31:0] sd_addr; logic [7:0] sd_dout;
  rgb888_t rgb; logic hs, vs, act, spk_l, spk_r;
  logic [7:0] an; logic [6:0] cat; logic [2:0] l0, l1;
  angle_t angle; logic angle_v; logic [LW-1:0] len; logic len_v;
  xcoord_t cx, nx; ycoord_t cy, ny; logic fired, playing; logic [15:0] underruns;
  int sectors;
  localparam int SHADOW_W = 6;

  sundial_top #(
    .ACTIVE_H(AH), .FP_H(8), .SYNC_H(8), .BP_H(8), .ACTIVE_V(AV), .FP_V(2), .SYNC_V(2), .BP_V(4),
    .IMG_W(IW), .IMG_H(IH), .SCALE_FACTOR(SF), .DEBOUNCE_CYCLES(DB), .SEG_SCAN_BITS(3),
    .AUDIO_CLK_HZ(AUD_HZ), .SAMPLE_HZ(SR), .TRACK_STRIDE(STRIDE), .TRACK_BYTES(TBYTES)
  ) dut (
    .clk_pixel, .clk_audio, .rst, .btn1, .btn2, .btn3, .channel_sel,
    .thresh_lower(8'd128), .thresh_upper(8'd255), .show_mask, .shadow_width(8'(SHADOW_W * SF)),
    .fir_enable, .use_pdm, .pmod_data, .pmod_clk, .cam_href, .cam_vsync,
    .sd_ready, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available(sd_bav),
    .video_rgb(rgb), .video_hsync(hs), .video_vsync(vs), .video_active(act),
    .spk_left(spk_l), .spk_right(spk_r), .ss_an(an), .ss_cat(cat), .led0_rgb(l0), .led1_rgb(l1),
    .sun_angle(angle), .sun_angle_valid(angle_v), .shadow_len(len), .shadow_len_valid(len_v),
    .com_x(cx), .com_y(cy), .cen_x(nx), .cen_y(ny), .alarm_fired(fired),
    .audio_playing(playing), .audio_underruns(underruns)
  );

  sd_card_model #(.BYTE_GAP(3)) u_sd (.clk(clk_audio), .rst(dut.arst), .rd(sd_rd), .addr(sd_addr),
    .ready(sd_ready), .dout(sd_dout), .byte_available(sd_bav), .sectors_read(sectors));

  // ---------------------------------------------------------------- image
  function automatic bit lit(input int x, input int y);
    real ex, ey, px, py, t, p;
    ex = (x - 30.0) / 26.0; ey = (y - 19.0) / 16.0;
    if (ex * ex + ey * ey > 1.0) return 0;
    // shadow: from (30,19) towards direction (0.8, 0.6), 20 long, 6 wide
    px = x - 30.0; py = y - 19.0;
    t = px * 0.8 + py * 0.6;
    p = -px * 0.6 + py * 0.8;
    if (t >= 0.0 && t <= 20.0 && p >= -3.0 && p <= 3.0) return 0;
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

  // ---------------------------------------------------------------- expectations
  int e_cx, e_cy, e_nx, e_ny, e_angle;
  real e_len;

  function automatic int angle_model(input int x, input int y);
    int base, a, b, r, t;
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

  task automatic expect_results();
    longint sx = 0, sy = 0, n = 0;
    int xmin = 100000, xmax = 0, ymin = 100000, ymax = 0;
    real r, m, w;
    for (int y = 0; y < IH * SF; y++)
      for (int x = 0; x < IW * SF; x++)
        if (lit(x / SF, y / SF)) begin
          sx += x; sy += y; n++;
          if (x < xmin) xmin = x; if (x > xmax) xmax = x;
          if (y < ymin) ymin = y; if (y > ymax) ymax = y;
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

  // ---------------------------------------------------------------- buttons
  task automatic press(input logic [2:0] set);
    for (int i = 0; i < 3; i++) begin
      {btn3, btn2, btn1} = set; repeat (2) @(negedge clk_pixel);
      {btn3, btn2, btn1} = 3'b000; repeat (2) @(negedge clk_pixel);
    end
    {btn3, btn2, btn1} = set; repeat (4 * DB) @(negedge clk_pixel);
    {btn3, btn2, btn1} = 3'b000; repeat (4 * DB) @(negedge clk_pixel);
  endtask

  // ---------------------------------------------------------------- monitors
  int n_angle = 0, n_len = 0, n_fire = 0, n_green = 0, n_blue = 0, n_white = 0, n_pink = 0;
  int n_samples = 0, n_sample_bad = 0, n_fir = 0, n_pwm_edges = 0, n_pdm_edges = 0, n_bad_addr = 0;
  int n_chord = 0, n_track = 0;
  logic spk_prev = 0;
  int played = 0;

  always @(posedge clk_pixel) if (!rst) begin
    if (angle_v) n_angle++;
    if (len_v) n_len++;
    if (fired) n_fire++;
    if (act) begin
      if (rgb == 24'h00FF00) n_green++;
      if (rgb == 24'h0000FF) n_blue++;
      if (rgb == 24'hFFFFFF) n_white++;
      if (rgb == 24'hFF80FF) n_pink++;
    end
  end

  function automatic logic [7:0] card_byte(input logic [31:0] a);
    return 8'(a ^ (a >> 8) ^ (a >> 16) ^ 32'h5A);
  endfunction

  always @(posedge clk_audio) if (!dut.arst) begin
    if (sd_rd && sd_ready && (sd_addr < 2 * STRIDE || sd_addr >= 2 * STRIDE + TBYTES)) n_bad_addr++;
    if (dut.sample_valid) begin
      if (dut.sample != card_byte(2 * STRIDE + 44 + 32'(played))) n_sample_bad++;
      played++;
      n_samples++;
    end
    if (dut.fir_valid && fir_enable) n_fir++;
    if (spk_l != spk_prev) begin
      if (use_pdm) n_pdm_edges++; else n_pwm_edges++;
    end
    spk_prev <= spk_l;
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    int t;
    repeat (5) @(negedge clk_pixel);
    rst = 0;
    expect_results();
    send_frame();
    // two full video frames so the stored image is measured completely
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

    // one frame in mask mode, one in camera mode
    show_mask = 1;
    @(posedge dut.nf0); @(posedge dut.nf0);
    show_mask = 0;
    @(posedge dut.nf0);

    // alarm 0 := measured angle, track 2
    t = 0;
    while (t < e_angle) begin press(3'b100); t = (t + 10 > 360) ? 360 : t + 10; end
    while (t > e_angle) begin press(3'b010); t--; end
    press(3'b110); n_chord++;
    checks++;
    if (dut.alarms[0] != AW'(e_angle) || l0 != 3'b010) begin failures++; $display("FAIL alarm 0 = %0d", dut.alarms[0]); end
    press(3'b001); press(3'b001); n_track += 2;
    checks++;
    if (dut.track != 2'd2) begin failures++; $display("FAIL track %0d", dut.track); end

    // the next angle update fires the alarm and starts the audio
    t = 0;
    while (!playing && t < 200000) begin @(negedge clk_audio); t++; end
    checks++;
    if (!playing) begin failures++; $display("FAIL audio did not start"); end
    // play with raw samples and PWM, then FIR and PDM
    repeat (30000) @(negedge clk_audio);
    fir_enable = 1; use_pdm = 1;
    $display("switching to FIR+PDM after %0d samples, playing %0d", n_samples, playing);
    t = 0;
    while (playing && t < 400000) begin @(negedge clk_audio); t++; end

    checks += 4;
    if (n_samples != int'(TBYTES) - 44) begin failures++; $display("FAIL samples %0d", n_samples); end
    if (n_sample_bad != 0) begin failures++; $display("FAIL %0d wrong samples", n_sample_bad); end
    if (n_bad_addr != 0) begin failures++; $display("FAIL sector address outside track"); end
    if (underruns != 0) begin failures++; $display("FAIL underruns %0d", underruns); end

    $display("mechanisms: angle %0d length %0d green %0d blue %0d sprite %0d mask %0d chord %0d track %0d fire %0d sectors %0d fir %0d pwm %0d pdm %0d",
             n_angle, n_len, n_green, n_blue, n_white, n_pink, n_chord, n_track, n_fire, sectors, n_fir, n_pwm_edges, n_pdm_edges);
    checks += 13;
    if (n_angle == 0) failures++;
    if (n_len == 0) failures++;
    if (n_green == 0) failures++;
    if (n_blue == 0) failures++;
    if (n_white == 0) failures++;
    if (n_pink == 0) failures++;
    if (n_chord == 0) failures++;
    if (n_track == 0) failures++;
    if (n_fire != 1) begin failures++; $display("FAIL alarm fired %0d times", n_fire); end
    if (sectors < 3) failures++;          // both halves used and reused
    if (n_fir == 0) failures++;
    if (n_pwm_edges == 0) failures++;
    if (n_pdm_edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk_pixel);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

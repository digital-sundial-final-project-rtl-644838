// sundial_top: the digital sundial with its alarm clock.
// Video side (clk_pixel): camera bytes from the microcontroller bridge are
// assembled into RGB565 pixels and stored in the frame buffer. The 720p raster
// reads the frame back through the scaler (two cycles of memory latency, matched
// by two pipeline stages on the raster signals), selects a colour channel and
// thresholds it into the dial mask. Edge detection (bounding box, true centre) and
// centre of mass accumulate over the active frame; at the first blanking line the
// centroid is divided out, and the angle and shadow-length units run in the
// vertical blanking, so each frame's results are shown on the next frame. The
// video mux draws both crosshairs, the "ANGLE:" label, the angle, the length and
// the four alarm angles over the camera image or the mask.
// Alarm side (clk_pixel): three buttons set four alarms in sun-angle degrees and
// pick one of four tracks; the seven-segment display shows the edited alarm and
// the track number (1..4). When the measured angle reaches an alarm, the trigger
// crosses to the audio clock.
// Audio side (clk_audio): the player streams the selected WAV track from the SD
// controller through the 1024-byte ping-pong buffer at 48 kHz, optionally through
// the 31-tap FIR, into the PWM or PDM speaker drive (both speaker pins carry the
// same mono signal).
// The clock wizard, HDMI TMDS encoder and SD-card SPI controller are outside this
// module: its clocks are inputs, its video output is 24-bit RGB with syncs, and
// the SD controller's byte interface is brought out as ports.
module sundial_top
  import sundial_pkg::*;
#(
  parameter int unsigned ACTIVE_H        = H_ACTIVE,
  parameter int unsigned FP_H            = H_FP,
  parameter int unsigned SYNC_H          = H_SYNC,
  parameter int unsigned BP_H            = H_BP,
  parameter int unsigned ACTIVE_V        = V_ACTIVE,
  parameter int unsigned FP_V            = V_FP,
  parameter int unsigned SYNC_V          = V_SYNC,
  parameter int unsigned BP_V            = V_BP,
  parameter int unsigned IMG_W           = CAM_W,
  parameter int unsigned IMG_H           = CAM_H,
  parameter int unsigned SCALE_FACTOR    = 3,
  parameter int unsigned DEBOUNCE_CYCLES = 742_500,
  parameter int unsigned SEG_SCAN_BITS   = 17,
  parameter int unsigned AUDIO_CLK_HZ    = 24_750_000,
  parameter int unsigned SAMPLE_HZ       = 48_000,
  parameter logic [31:0] TRACK_STRIDE    = 32'h0010_0000,
  parameter logic [31:0] TRACK_BYTES     = 32'h0007_6800
) (
  input  logic        clk_pixel,
  input  logic        clk_audio,
  input  logic        rst,
  // user controls
  input  logic        btn1,
  input  logic        btn2,
  input  logic        btn3,
  input  channel_t    channel_sel,
  input  logic [7:0]  thresh_lower,
  input  logic [7:0]  thresh_upper,
  input  logic        show_mask,
  input  logic [7:0]  shadow_width,
  input  logic        fir_enable,
  input  logic        use_pdm,
  // camera bridge
  input  logic [7:0]  pmod_data,
  input  logic        pmod_clk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  // SD-card controller byte interface
  input  logic        sd_ready,
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  // video out (to the TMDS encoder)
  output rgb888_t     video_rgb,
  output logic        video_hsync,
  output logic        video_vsync,
  output logic        video_active,
  // speaker, display, LEDs
  output logic        spk_left,
  output logic        spk_right,
  output logic [7:0]  ss_an,
  output logic [6:0]  ss_cat,
  output logic [2:0]  led0_rgb,
  output logic [2:0]  led1_rgb,
  // measurement results
  output angle_t      sun_angle,
  output logic        sun_angle_valid,
  output logic [LW-1:0] shadow_len,
  output logic        shadow_len_valid,
  output xcoord_t     com_x,
  output ycoord_t     com_y,
  output xcoord_t     cen_x,
  output ycoord_t     cen_y,
  output logic        alarm_fired,
  output logic        audio_playing,
  output logic [15:0] audio_underruns
);
  localparam int unsigned FB_DEPTH = IMG_W * IMG_H;
  localparam int unsigned FBA = $clog2(FB_DEPTH);

  // ------------------------------------------------------------ camera input
  rgb565_t    cam_pixel;
  logic [8:0] cam_h;
  logic [7:0] cam_v;
  logic       cam_valid;

  camera_byte_rx #(.WIDTH(IMG_W), .HEIGHT(IMG_H)) u_cam (
    .clk(clk_pixel), .rst, .pmod_data, .pmod_clk, .cam_href, .cam_vsync,
    .pixel(cam_pixel), .hcount(cam_h), .vcount(cam_v), .pixel_valid(cam_valid)
  );

  // ------------------------------------------------------------ raster
  xcoord_t hc0;
  ycoord_t vc0;
  logic    hs0, vs0, act0, nf0;
  logic [5:0] frame_count;

  video_sig_gen #(
    .ACTIVE_H(ACTIVE_H), .FP_H(FP_H), .SYNC_H(SYNC_H), .BP_H(BP_H),
    .ACTIVE_V(ACTIVE_V), .FP_V(FP_V), .SYNC_V(SYNC_V), .BP_V(BP_V)
  ) u_vsg (
    .clk(clk_pixel), .rst, .hcount(hc0), .vcount(vc0), .hsync(hs0), .vsync(vs0),
    .active(act0), .new_frame(nf0), .frame_count(frame_count)
  );

  logic [FBA-1:0] fb_raddr;
  logic           in_img0;
  logic [15:0]    fb_rdata;

  scale #(.FACTOR(SCALE_FACTOR), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_scale (
    .hcount(hc0), .vcount(vc0), .addr(fb_raddr), .in_image(in_img0)
  );

  frame_buffer #(.DEPTH(FB_DEPTH), .DW(16)) u_fb (
    .wclk(clk_pixel), .we(cam_valid),
    .waddr(FBA'(32'(cam_v) * IMG_W + 32'(cam_h))), .wdata(cam_pixel),
    .rclk(clk_pixel), .raddr(fb_raddr), .rdata(fb_rdata)
  );

  // two stages matching the frame-buffer read latency
  xcoord_t hc1, hc2;
  ycoord_t vc1, vc2;
  logic    hs1, hs2, vs1, vs2, act1, act2, nf1, nf2, img1, img2;
  always_ff @(posedge clk_pixel) begin
    {hc1, vc1, hs1, vs1, act1, nf1, img1} <= {hc0, vc0, hs0, vs0, act0, nf0, in_img0};
    {hc2, vc2, hs2, vs2, act2, nf2, img2} <= {hc1, vc1, hs1, vs1, act1, nf1, img1};
  end

  // ------------------------------------------------------------ mask
  logic [7:0] chan_value;
  logic       th_mask, mask;

  channel_select u_chsel (.pixel(rgb565_t'(fb_rdata)), .sel(channel_sel), .value(chan_value));
  threshold u_thresh (.value(chan_value), .lower(thresh_lower), .upper(thresh_upper), .mask(th_mask));
  assign mask = th_mask && img2 && act2;

  // ------------------------------------------------------------ sundial calculator
  xcoord_t x_top, x_bottom;
  ycoord_t y_top, y_bottom;
  logic    edge_valid, com_valid;
  logic [19:0] mass;

  edge_detection u_edge (
    .clk(clk_pixel), .rst, .x_in(hc2), .y_in(vc2), .valid_in(mask), .tabulate(nf2),
    .x_top, .x_bottom, .y_top, .y_bottom, .x_cen(cen_x), .y_cen(cen_y),
    .valid_out(edge_valid)
  );

  center_of_mass u_com (
    .clk(clk_pixel), .rst, .x_in(hc2), .y_in(vc2), .valid_in(mask), .tabulate(nf2),
    .x_out(com_x), .y_out(com_y), .valid_out(com_valid)
  );

  mass_estimate u_mass (
    .clk(clk_pixel), .x_top, .x_bottom, .y_top, .y_bottom, .mass
  );

  logic angle_busy, len_busy;

  angle_division u_angle (
    .clk(clk_pixel), .rst, .start(com_valid),
    .x_com(com_x), .y_com(com_y), .x_cen(cen_x), .y_cen(cen_y),
    .angle(sun_angle), .busy(angle_busy), .done(sun_angle_valid)
  );

  shadow_length u_len (
    .clk(clk_pixel), .rst, .start(com_valid),
    .x_com(com_x), .y_com(com_y), .x_cen(cen_x), .y_cen(cen_y),
    .mass, .width(shadow_width),
    .length(shadow_len), .busy(len_busy), .done(shadow_len_valid)
  );

  // ------------------------------------------------------------ alarm clock
  angle_t     alarms [N_ALARMS];
  angle_t     edit_value;
  logic [1:0] alarm_index, track, hit_index;

  user_interface #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_ui (
    .clk(clk_pixel), .rst, .btn1, .btn2, .btn3,
    .alarms, .edit_value, .alarm_index, .track, .led0_rgb, .led1_rgb
  );

  alarm_trigger u_trig (
    .clk(clk_pixel), .rst, .angle(sun_angle), .angle_valid(sun_angle_valid),
    .alarms, .trigger(alarm_fired), .hit_index
  );

  seven_segment_controller #(.SCAN_BITS(SEG_SCAN_BITS), .VAL_W(AW)) u_seg (
    .clk(clk_pixel), .rst, .upper_value(edit_value), .lower_value(AW'(track) + 1'b1),
    .an(ss_an), .cat(ss_cat)
  );

  // ------------------------------------------------------------ display
  localparam int unsigned N_SPR = 3 + N_ALARMS;
  logic [N_SPR-1:0] spr;

  number_sprite #(.BIN_W(AW), .DIGITS(3)) u_spr_angle (
    .hcount(hc2), .vcount(vc2), .x0(XW'(ACTIVE_H - 160)), .y0(YW'(ACTIVE_V - 96)),
    .value(sun_angle), .pixel_on(spr[0])
  );
  number_sprite #(.BIN_W(LW), .DIGITS(4)) u_spr_len (
    .hcount(hc2), .vcount(vc2), .x0(XW'(ACTIVE_H - 160)), .y0(YW'(ACTIVE_V - 56)),
    .value(shadow_len), .pixel_on(spr[1])
  );
  for (genvar i = 0; i < N_ALARMS; i++) begin : g_alarm_spr
    number_sprite #(.BIN_W(AW), .DIGITS(3)) u_spr_alarm (
      .hcount(hc2), .vcount(vc2), .x0(XW'(ACTIVE_H - 128)), .y0(YW'(16 + 40 * i)),
      .value(alarms[i]), .pixel_on(spr[2+i])
    );
  end

  // "ANGLE:" to the left of the angle (six 32-pixel cells); on a raster narrower
  // than 352 pixels the origin wraps past the line end and the label is not drawn
  text_sprite #(.NCHARS(6), .TEXT("ANGLE:")) u_spr_label (
    .hcount(hc2), .vcount(vc2), .x0(XW'(ACTIVE_H - 352)), .y0(YW'(ACTIVE_V - 96)),
    .pixel_on(spr[2+N_ALARMS])
  );

  video_mux #(.N_SPRITES(N_SPR)) u_mux (
    .clk(clk_pixel), .hcount(hc2), .vcount(vc2), .active(act2), .hsync_in(hs2), .vsync_in(vs2),
    .cam_pixel(rgb565_t'(fb_rdata)), .mask(mask), .show_mask,
    .x_com(com_x), .y_com(com_y), .x_cen(cen_x), .y_cen(cen_y),
    .sprite_on(spr), .rgb(video_rgb), .hsync(video_hsync), .vsync(video_vsync),
    .active_out(video_active)
  );

  // ------------------------------------------------------------ crossing to audio
  logic [1:0] play_track_px;
  always_ff @(posedge clk_pixel)
    if (rst)              play_track_px <= '0;
    else if (alarm_fired) play_track_px <= track;

  logic [1:0] arst_sync;
  logic       arst;
  always_ff @(posedge clk_audio) arst_sync <= {arst_sync[0], rst};
  assign arst = arst_sync[1];

  logic       play_start;
  logic [1:0] track_s1, track_s2;
  logic [1:0] sw_s1, sw_s2;          // {fir_enable, use_pdm}
  toggle_sync u_xing (
    .src_clk(clk_pixel), .src_rst(rst), .src_pulse(alarm_fired),
    .dst_clk(clk_audio), .dst_rst(arst), .dst_pulse(play_start)
  );
  always_ff @(posedge clk_audio) begin
    track_s1 <= play_track_px;
    track_s2 <= track_s1;
    sw_s1 <= {fir_enable, use_pdm};
    sw_s2 <= sw_s1;
  end

  // ------------------------------------------------------------ audio
  logic [7:0] sample;
  logic       sample_valid;
  logic signed [7:0] fir_y;
  logic       fir_valid;
  logic [7:0] level;
  logic       pwm_out, pdm_out;

  audio_playback #(
    .CLK_HZ(AUDIO_CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ),
    .TRACK_STRIDE(TRACK_STRIDE), .TRACK_BYTES(TRACK_BYTES)
  ) u_play (
    .clk(clk_audio), .rst(arst), .start(play_start), .track(track_s2),
    .sd_ready, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available,
    .sample, .sample_valid, .playing(audio_playing), .underrun_count(audio_underruns)
  );

  fir31 u_fir (
    .clk(clk_audio), .rst(arst), .ready(sample_valid), .x(signed'(sample ^ 8'h80)),
    .y(fir_y), .y_valid(fir_valid)
  );

  always_comb begin
    if (!audio_playing)  level = 8'h80;
    else if (sw_s2[1])   level = fir_y ^ 8'h80;
    else                 level = sample;
  end

  pwm u_pwm (.clk(clk_audio), .rst(arst), .level, .out(pwm_out));
  pdm u_pdm (.clk(clk_audio), .rst(arst), .level, .out(pdm_out));

  assign spk_left  = sw_s2[0] ? pdm_out : pwm_out;
  assign spk_right = spk_left;
endmodule

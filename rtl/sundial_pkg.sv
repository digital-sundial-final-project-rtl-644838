// sundial_pkg: constants and types shared by the sundial blocks.
// The video timing is standard 1280x720 at 60 Hz (74.25 MHz pixel clock), which the
// 11-bit x and 10-bit y coordinates of the design match. Camera frames are 320x240
// RGB565, the camera's default format. Angles are whole degrees 0..359 on 12 bits,
// lengths are pixels on 11 bits. Timing numbers are the usual CEA-861 values; the
// coordinate widths follow the block diagram of the design.
package sundial_pkg;
  localparam int unsigned H_ACTIVE = 1280;
  localparam int unsigned H_FP     = 110;
  localparam int unsigned H_SYNC   = 40;
  localparam int unsigned H_BP     = 220;
  localparam int unsigned V_ACTIVE = 720;
  localparam int unsigned V_FP     = 5;
  localparam int unsigned V_SYNC   = 5;
  localparam int unsigned V_BP     = 20;

  localparam int unsigned XW = 11;  // x coordinate width
  localparam int unsigned YW = 10;  // y coordinate width
  localparam int unsigned AW = 12;  // angle width (degrees)
  localparam int unsigned LW = 11;  // length width (pixels)

  localparam int unsigned CAM_W = 320;
  localparam int unsigned CAM_H = 240;

  localparam int unsigned N_ALARMS = 4;
  localparam int unsigned N_TRACKS = 4;
  localparam int unsigned ALARM_MAX = 360;

  typedef logic [XW-1:0] xcoord_t;
  typedef logic [YW-1:0] ycoord_t;
  typedef logic [AW-1:0] angle_t;

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

  typedef enum logic [1:0] {CH_RED = 2'd0, CH_GREEN = 2'd1, CH_BLUE = 2'd2, CH_LUMA = 2'd3} channel_t;
  typedef enum logic {MOD_PWM = 1'b0, MOD_PDM = 1'b1} modulation_t;
endpackage

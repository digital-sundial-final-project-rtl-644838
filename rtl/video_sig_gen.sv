// video_sig_gen: raster timing for the HDMI output.
// Counts pixels (hcount) and lines (vcount) over the full frame including
// blanking, and derives active-video, the two (active-high) syncs and a one-cycle
// new-frame pulse at the first blanking pixel after the last active line, where
// the sundial math starts. frame_count counts frames.
// Default timing is 1280x720 at 60 Hz (pixel clock 74.25 MHz); the sizes are
// parameters so a test can shrink the frame. The block is named in the design;
// its timing values are the standard 720p ones.
module video_sig_gen
  import sundial_pkg::*;
#(
  parameter int unsigned ACTIVE_H = H_ACTIVE,
  parameter int unsigned FP_H     = H_FP,
  parameter int unsigned SYNC_H   = H_SYNC,
  parameter int unsigned BP_H     = H_BP,
  parameter int unsigned ACTIVE_V = V_ACTIVE,
  parameter int unsigned FP_V     = V_FP,
  parameter int unsigned SYNC_V   = V_SYNC,
  parameter int unsigned BP_V     = V_BP
) (
  input  logic       clk,
  input  logic       rst,
  output xcoord_t    hcount,
  output ycoord_t    vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       active,
  output logic       new_frame,
  output logic [5:0] frame_count
);
  localparam int unsigned TOTAL_H = ACTIVE_H + FP_H + SYNC_H + BP_H;
  localparam int unsigned TOTAL_V = ACTIVE_V + FP_V + SYNC_V + BP_V;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      frame_count <= '0;
    end else if (hcount == XW'(TOTAL_H - 1)) begin
      hcount <= '0;
      if (vcount == YW'(TOTAL_V - 1)) begin
        vcount <= '0;
        frame_count <= frame_count + 1'b1;
      end else begin
        vcount <= vcount + 1'b1;
      end
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    active    = (hcount < XW'(ACTIVE_H)) && (vcount < YW'(ACTIVE_V));
    hsync     = (hcount >= XW'(ACTIVE_H + FP_H)) && (hcount < XW'(ACTIVE_H + FP_H + SYNC_H));
    vsync     = (vcount >= YW'(ACTIVE_V + FP_V)) && (vcount < YW'(ACTIVE_V + FP_V + SYNC_V));
    new_frame = (hcount == '0) && (vcount == YW'(ACTIVE_V));
  end
endmodule

// camera_byte_rx: receives the camera image from the microcontroller bridge.
// The bridge drives eight data wires, a byte strobe (pmod_clk) and the camera's
// line (href) and frame (vsync) signals. All five are asynchronous to clk and are
// passed through two flip-flops. A byte is taken on each rising edge of the
// synchronised strobe while href is high; two bytes form one RGB565 pixel, high
// byte first. pixel_valid pulses for one clock with the pixel and its position
// (hcount 0..CAM_W-1, vcount 0..CAM_H-1). The falling edge of href ends a line,
// vsync high restarts the frame at (0,0). Pixels beyond CAM_W x CAM_H are dropped.
// The wire set and the byte-per-strobe transfer of 16-bit pixels follow the
// design; byte order, edge polarity and the line/frame rules are this
// implementation's choice (the usual OV-camera convention). The block-mode wire
// of the bridge is not used.
module camera_byte_rx
  import sundial_pkg::*;
#(
  parameter int unsigned WIDTH  = CAM_W,
  parameter int unsigned HEIGHT = CAM_H
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] pmod_data,
  input  logic       pmod_clk,
  input  logic       cam_href,
  input  logic       cam_vsync,
  output rgb565_t    pixel,
  output logic [8:0] hcount,
  output logic [7:0] vcount,
  output logic       pixel_valid
);
  logic [7:0] d_s1, d_s2;
  logic [2:0] c_s;      // strobe synchroniser plus previous value
  logic [2:0] h_s;
  logic [1:0] v_s;
  logic       second;
  logic [7:0] high_byte;
  logic       strobe, href, href_fall, vsync;

  always_ff @(posedge clk) begin
    d_s1 <= pmod_data;
    d_s2 <= d_s1;
    c_s  <= {c_s[1:0], pmod_clk};
    h_s  <= {h_s[1:0], cam_href};
    v_s  <= {v_s[0], cam_vsync};
  end

  always_comb begin
    strobe    = c_s[1] && !c_s[2];
    href      = h_s[1];
    href_fall = !h_s[1] && h_s[2];
    vsync     = v_s[1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      second <= 1'b0;
      high_byte <= '0;
      hcount <= '0;
      vcount <= '0;
      pixel <= '0;
      pixel_valid <= 1'b0;
    end else begin
      pixel_valid <= 1'b0;
      if (pixel_valid) hcount <= hcount + 1'b1;
      if (vsync) begin
        second <= 1'b0;
        hcount <= '0;
        vcount <= '0;
      end else if (href_fall) begin
        second <= 1'b0;
        hcount <= '0;
        if (hcount != 0) vcount <= vcount + 1'b1;
      end else if (strobe && href) begin
        if (!second) begin
          high_byte <= d_s2;
          second <= 1'b1;
        end else begin
          second <= 1'b0;
          pixel <= {high_byte, d_s2};
          pixel_valid <= (32'(hcount) < WIDTH) && (32'(vcount) < HEIGHT);
        end
      end
    end
  end
endmodule

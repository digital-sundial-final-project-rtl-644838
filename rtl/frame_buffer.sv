// frame_buffer: one camera frame of RGB565 pixels between the camera side and
// the HDMI side. Simple dual-port memory, one write port and one read port, each
// on its own clock. The read data appears two read-clock cycles after the
// address (registered address, registered output), the latency the HDMI side
// matches with two pipeline stages on its coordinates.
// Default size 320x240 (the camera's default resolution); the memory is written
// as an array so synthesis maps it to block RAM.
module frame_buffer
  import sundial_pkg::*;
#(
  parameter int unsigned DEPTH = CAM_W * CAM_H,
  parameter int unsigned DW    = 16
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] raddr_q;

  always_ff @(posedge wclk) if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk) begin
    raddr_q <= raddr;
    rdata <= mem[raddr_q];
  end
endmodule

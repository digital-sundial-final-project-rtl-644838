// audio_buffer: 1024-byte ping-pong buffer between the SD card and the player.
// A simple dual-port byte memory: the SD side writes one half (512 bytes, one
// sector) while the player reads the other. Address bit 9 selects the half.
// Read data appears one clock after the read address. Single clock.
// The 1024-byte size split into two 512-byte halves follows the design.
module audio_buffer #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [7:0]               wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [7:0]               rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

// toggle_sync: carries a one-cycle pulse from one clock domain to another.
// Each src pulse flips a toggle flip-flop in the source domain; the toggle is
// synchronised by two flip-flops in the destination domain and every change of it
// gives one dst pulse, three to four destination clocks later. Source pulses must
// be further apart than that. Helper for the video-to-audio alarm crossing.
module toggle_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic       tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk)
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      sync <= '0;
      dst_pulse <= 1'b0;
    end else begin
      sync <= {sync[1:0], tog};
      dst_pulse <= sync[2] ^ sync[1];
    end
  end
endmodule

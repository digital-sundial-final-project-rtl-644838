// pdm: 8-bit pulse-density modulator (first-order sigma-delta) for the speaker.
// Each clock level is added to an 8-bit accumulator; out is the carry, so the
// density of ones is level/256 and the ones are spread as evenly as possible.
// out is registered.
// PDM as one of the two selectable speaker drives follows the design; the
// first-order structure is this implementation's.
module pdm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] level,
  output logic       out
);
  logic [7:0] acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      out <= 1'b0;
    end else begin
      {out, acc} <= {1'b0, acc} + {1'b0, level};
    end
  end
endmodule

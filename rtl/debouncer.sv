// debouncer: synchronises a push button and accepts a new level only after it
// has been stable for STABLE_CYCLES clocks. clean follows the button with that
// delay plus two synchroniser cycles. Default: about 10 ms at 74.25 MHz.
// Button debouncing is needed by the alarm interface; the method is this
// implementation's.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 742_500
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic clean
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);
  logic [1:0]    sync;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    sync <= {sync[0], btn};
    if (rst) begin
      clean <= 1'b0;
      count <= '0;
    end else if (sync[1] == clean) begin
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES - 1)) begin
      clean <= sync[1];
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule

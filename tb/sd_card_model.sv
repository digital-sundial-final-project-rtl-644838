// sd_card_model: behavioural model of the SD-card controller's byte interface
// (not synthesizable), standing in for the SPI controller and card in tests.
// While idle, ready is high. When rd is seen with ready high, ready falls and the
// 512 bytes of the sector starting at byte address addr follow, each presented on
// dout with byte_available high for two clocks, then low for BYTE_GAP clocks.
// After the last byte ready rises again after ready_delay clocks. The card
// content is a fixed function of the byte address, card_byte(a).
module sd_card_model #(
  parameter int unsigned BYTE_GAP = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rd,
  input  logic [31:0] addr,
  output logic        ready,
  output logic [7:0]  dout,
  output logic        byte_available,
  output int          sectors_read
);
  function automatic logic [7:0] card_byte(input logic [31:0] a);
    return 8'(a ^ (a >> 8) ^ (a >> 16) ^ 32'h5A);
  endfunction

  initial begin
    ready = 1'b0;
    byte_available = 1'b0;
    dout = '0;
    sectors_read = 0;
    forever begin
      @(posedge clk);
      if (rst) begin
        ready <= 1'b0;
      end else if (!ready) begin
        ready <= 1'b1;
      end else if (rd) begin
        logic [31:0] base;
        base = addr;
        ready <= 1'b0;
        repeat (3) @(posedge clk);
        for (int i = 0; i < 512; i++) begin
          dout <= card_byte(base + 32'(i));
          byte_available <= 1'b1;
          repeat (2) @(posedge clk);
          byte_available <= 1'b0;
          repeat (BYTE_GAP) @(posedge clk);
        end
        sectors_read++;
        repeat (4) @(posedge clk);
      end
    end
  end
endmodule

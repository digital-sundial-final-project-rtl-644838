// bcd_convert: binary to packed BCD by double dabble (shift and add 3).
// BIN_W input bits produce DIGITS decimal digits, least significant digit in
// bits [3:0]. Values too large for DIGITS digits keep only their low digits.
// Combinational; the loop unrolls to BIN_W stages of digit adjusters.
// Decimal conversion for the displays is done this way in the design.
module bcd_convert #(
  parameter int unsigned BIN_W  = 12,
  parameter int unsigned DIGITS = 4
) (
  input  logic [BIN_W-1:0]    bin,
  output logic [4*DIGITS-1:0] bcd
);
  always_comb begin
    logic [4*DIGITS-1:0] acc;
    acc = '0;
    for (int i = BIN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++)
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      acc = {acc[4*DIGITS-2:0], bin[i]};
    end
    bcd = acc;
  end
endmodule

// seven_segment_controller: drives the eight-digit multiplexed display.
// The upper four digits show upper_value and the lower four lower_value, both in
// decimal (double-dabble conversion), not hexadecimal. One digit is lit at a
// time; the digit advances every 2^SCAN_BITS clocks. Anodes (an) and segments
// (cat, bit 0 = segment a ... bit 6 = segment g) are active low.
// The decimal upper/lower split (alarm value, track number) follows the design;
// the scan rate and segment order are this implementation's.
module seven_segment_controller #(
  parameter int unsigned SCAN_BITS = 17,
  parameter int unsigned VAL_W     = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [VAL_W-1:0] upper_value,
  input  logic [VAL_W-1:0] lower_value,
  output logic [7:0]       an,
  output logic [6:0]       cat
);
  logic [15:0] upper_bcd, lower_bcd;
  logic [SCAN_BITS+2:0] count;
  logic [2:0] digit_sel;
  logic [3:0] nibble;
  logic [6:0] seg;

  bcd_convert #(.BIN_W(VAL_W), .DIGITS(4)) u_up (.bin(upper_value), .bcd(upper_bcd));
  bcd_convert #(.BIN_W(VAL_W), .DIGITS(4)) u_lo (.bin(lower_value), .bcd(lower_bcd));

  always_ff @(posedge clk)
    if (rst) count <= '0;
    else     count <= count + 1'b1;

  always_comb begin
    digit_sel = count[SCAN_BITS +: 3];
    nibble = digit_sel[2] ? upper_bcd[4*digit_sel[1:0] +: 4] : lower_bcd[4*digit_sel[1:0] +: 4];
    case (nibble)               //  gfedcba
      4'd0: seg = 7'b0111111;
      4'd1: seg = 7'b0000110;
      4'd2: seg = 7'b1011011;
      4'd3: seg = 7'b1001111;
      4'd4: seg = 7'b1100110;
      4'd5: seg = 7'b1101101;
      4'd6: seg = 7'b1111101;
      4'd7: seg = 7'b0000111;
      4'd8: seg = 7'b1111111;
      4'd9: seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
    cat = ~seg;
    an = ~(8'b1 << digit_sel);
  end
endmodule

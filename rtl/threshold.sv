// threshold: binary mask of the dial. A pixel whose selected channel value lies in
// [lower, upper] (inclusive) is part of the lit dial (mask = 1); background and the
// shadow fall outside the band (mask = 0). Combinational.
// Masking by brightness follows the design; the two-sided band and its runtime
// bounds are this implementation's choice.
module threshold (
  input  logic [7:0] value,
  input  logic [7:0] lower,
  input  logic [7:0] upper,
  output logic       mask
);
  always_comb mask = (value >= lower) && (value <= upper);
endmodule

// angle_lut: ratio-to-angle lookup for one octant.
// Input R is round(100*b/a) for 0 <= b <= a, so R runs 0..100 and covers angles
// 0..45 degrees. The output is the whole-degree angle nearest to atan(R/100).
// R = 100 maps to 45; inputs above 100 saturate at 45. Purely combinational.
// The lookup is written as 45 thresholds instead of 101 table rows: the angle is
// the number of k in 1..45 with R >= T[k], where T[k] = ceil(100*tan((k-0.5) deg))
// is the smallest ratio whose nearest degree is k. Every R in 0..100 gives the same
// angle as a 101-entry table built from round(atan(R/100)); the entry-per-degree
// resolution and the factor of 100 follow the design, the threshold form is this
// implementation's own.
module angle_lut (
  input  logic [7:0] ratio,   // R = round(100*small/large)
  output logic [5:0] angle    // 0..45 degrees
);
  localparam int unsigned NSTEP = 45;
  localparam logic [7:0] T [1:NSTEP] = '{
    8'd1,  8'd3,  8'd5,  8'd7,  8'd8,  8'd10, 8'd12, 8'd14, 8'd15, 8'd17,
    8'd19, 8'd21, 8'd23, 8'd25, 8'd26, 8'd28, 8'd30, 8'd32, 8'd34, 8'd36,
    8'd38, 8'd40, 8'd42, 8'd44, 8'd46, 8'd48, 8'd50, 8'd53, 8'd55, 8'd57,
    8'd59, 8'd62, 8'd64, 8'd67, 8'd69, 8'd72, 8'd74, 8'd77, 8'd80, 8'd83,
    8'd86, 8'd89, 8'd92, 8'd95, 8'd99};

  always_comb begin
    angle = '0;
    for (int k = 1; k <= NSTEP; k++)
      if (ratio >= T[k]) angle = 6'(k);
  end
endmodule

// isqrt: sequential integer square root, floor(sqrt(radicand)).
// Digit-by-digit (binary restoring) method: one result bit per clock, so done
// pulses WIDTH/2+2 cycles after a one-cycle start pulse; root holds until the
// next start. WIDTH must be even.
// The design's length pipeline takes square roots from reduced-resolution lookup
// tables; this iterative root is used instead and gives the exact integer root.
module isqrt #(
  parameter int unsigned WIDTH = 40
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [WIDTH-1:0]   radicand,
  output logic [WIDTH/2-1:0] root,
  output logic               busy,
  output logic               done
);
  localparam int unsigned HW = WIDTH / 2;
  localparam int unsigned CW = $clog2(HW + 1);
  logic [WIDTH-1:0] x;      // remaining radicand bits, shifted out two at a time
  logic [HW+1:0]    rem;    // partial remainder
  logic [HW-1:0]    q;      // partial root
  logic [CW-1:0]    count;
  logic [HW+1:0]    rem_sh, trial;

  always_comb begin
    rem_sh = {rem[HW-1:0], x[WIDTH-1:WIDTH-2]};
    trial  = rem_sh - {q, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      x <= '0;
      rem <= '0;
      q <= '0;
      count <= '0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x <= radicand;
        rem <= '0;
        q <= '0;
        count <= CW'(HW);
        busy <= 1'b1;
      end else if (busy) begin
        if (count == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= q;
        end else begin
          count <= count - 1'b1;
          x <= {x[WIDTH-3:0], 2'b00};
          if (!trial[HW+1]) begin
            rem <= trial;
            q <= {q[HW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            q <= {q[HW-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule

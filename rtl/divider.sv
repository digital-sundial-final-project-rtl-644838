// divider: sequential unsigned divider, one quotient bit per clock (restoring
// long division). A one-cycle start pulse loads dividend and divisor; done pulses
// for one cycle WIDTH+2 cycles later with quotient and remainder, which stay valid
// until the next start. busy is high in between. Division by zero returns an
// all-ones quotient and the dividend as remainder.
// The sundial math uses a shared sequential divider; its insides are this design's
// own choice (the simplest serial divider).
module divider #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy,
  output logic             done
);
  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [WIDTH-1:0] q, d;
  logic [WIDTH:0]   r;
  logic [CW-1:0]    count;
  logic [WIDTH:0]   trial;

  always_comb trial = {r[WIDTH-1:0], q[WIDTH-1]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      count <= '0;
      q <= '0;
      r <= '0;
      d <= '0;
      quotient <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy && divisor == '0) begin
        quotient <= '1;
        remainder <= dividend;
        done <= 1'b1;
      end else if (start && !busy) begin
        q <= dividend;
        d <= divisor;
        r <= '0;
        count <= CW'(WIDTH);
        busy <= 1'b1;
      end else if (busy) begin
        if (count == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= q;
          remainder <= r[WIDTH-1:0];
        end else begin
          count <= count - 1'b1;
          if (!trial[WIDTH]) begin
            r <= trial;
            q <= {q[WIDTH-2:0], 1'b1};
          end else begin
            r <= {r[WIDTH-1:0], q[WIDTH-1]};
            q <= {q[WIDTH-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule

// udiv: sequential unsigned divider, one quotient bit per clock.
//
// A `start` pulse loads dividend and divisor; WIDTH clocks later `done` pulses
// and `quotient` holds dividend / divisor (all ones if the divisor is zero).
// Restoring long division: the partial remainder is shifted left one bit of the
// dividend at a time and the divisor subtracted where it fits. `busy` is high
// from the clock after `start` until `done`.
module udiv #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic             busy,
  output logic             done
);
  localparam int unsigned SW = $clog2(WIDTH + 1);
  logic [WIDTH-1:0] rem, dvd, dvs;
  logic [SW-1:0]    steps;
  logic [WIDTH:0]   trial;

  assign trial = {rem, dvd[WIDTH-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      rem <= '0; dvd <= '0; dvs <= '0; steps <= '0;
      quotient <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem   <= '0;
        dvd   <= dividend;
        dvs   <= divisor;
        steps <= SW'(WIDTH);
        busy  <= 1'b1;
      end else if (busy) begin
        if (!trial[WIDTH]) begin
          rem <= trial[WIDTH-1:0];
          dvd <= {dvd[WIDTH-2:0], 1'b1};
        end else begin
          rem <= {rem[WIDTH-2:0], dvd[WIDTH-1]};
          dvd <= {dvd[WIDTH-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= !trial[WIDTH] ? {dvd[WIDTH-2:0], 1'b1} : {dvd[WIDTH-2:0], 1'b0};
        end
      end
    end
  end
endmodule

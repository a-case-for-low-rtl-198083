// timebase: horizontal time scale of the oscilloscope.
//
// Passes on one ADC result in every 2**sel, so the buffer, and with it the
// 512-pixel-wide trace, spans 512 * 2**sel sample periods (1.02 ms at sel = 0
// and 500 kS/s). `sample_en` is a one-clock pulse that coincides with the
// chosen `sample_valid`. Changing the time scale by the rate at which samples
// are written, selected by four switches, follows the document; the powers of
// two are this design's choice.
module timebase #(
  parameter int unsigned SEL_BITS = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_BITS-1:0] sel,
  input  logic                sample_valid,
  output logic                sample_en
);
  localparam int unsigned CW = (1 << SEL_BITS) - 1;
  logic [CW-1:0] cnt;
  logic [CW-1:0] mask;

  always_comb mask = CW'((64'(1) << sel) - 1);

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (sample_valid) cnt <= ((cnt & mask) == mask) ? '0 : cnt + 1'b1;
  end

  assign sample_en = sample_valid && ((cnt & mask) == mask);
endmodule

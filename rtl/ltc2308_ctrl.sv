// ltc2308_ctrl: serial interface to an LTC2308 12-bit SAR ADC.
//
// Every SAMPLE_PERIOD clocks the controller pulses CONVST high for two clocks,
// waits CONV_CYCLES clocks for the conversion to finish, then runs twelve SCK
// periods (SCK = clk/2). On each SCK high phase it shifts the next SDO bit in,
// MSB first, and drives the 6-bit configuration word for the next conversion on
// SDI (single-ended, unipolar, channel CHANNEL, no sleep), which the ADC takes on
// SCK rising edges. When the twelfth bit is in, `sample` is updated and
// `sample_valid` pulses for one clock.
//
// Timing at the defaults (50 MHz clock): 2 + 70 + 24 = 96 of 100 clocks, so one
// result every 2 us = 500 kS/s, the rate the document gives for the on-board ADC.
// The conversion wait (1.4 us) and the bit order and edges of the serial port are
// taken from the converter's usual data-sheet behaviour, not from the document.
// The first result after reset belongs to a conversion started with the chip's
// power-up configuration.
module ltc2308_ctrl
  import lab_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 100,  // clocks per conversion
  parameter int unsigned CONV_CYCLES   = 70,   // clocks to wait for the conversion
  parameter int unsigned CHANNEL       = 0     // input channel 0..7
) (
  input  logic    clk,
  input  logic    rst,
  // ADC pins
  output logic    adc_convst,
  output logic    adc_sck,
  output logic    adc_sdi,
  input  logic    adc_sdo,
  // result
  output sample_t sample,
  output logic    sample_valid
);

  localparam int unsigned PULSE      = 2;
  localparam int unsigned SHIFT_AT   = PULSE + CONV_CYCLES;
  localparam int unsigned CNT_W      = $clog2(SAMPLE_PERIOD);

  initial begin
    assert (SHIFT_AT + 2 * ADC_BITS <= SAMPLE_PERIOD)
      else $error("ltc2308_ctrl: SAMPLE_PERIOD too short for conversion and read-out");
  end

  // {S/D, O/S, S1, S0, UNI, SLP}: single-ended, odd/sign = channel bit 0.
  localparam logic [2:0] CH    = 3'(CHANNEL);
  localparam logic [5:0] CFG   = {1'b1, CH[0], CH[2:1], 1'b1, 1'b0};

  logic [CNT_W-1:0] cnt;
  logic [3:0]       bit_idx;     // bits received so far
  logic             shifting;
  logic [ADC_BITS-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      bit_idx      <= '0;
      shifting     <= 1'b0;
      shreg        <= '0;
      adc_convst   <= 1'b0;
      adc_sck      <= 1'b0;
      adc_sdi      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      cnt          <= (cnt == CNT_W'(SAMPLE_PERIOD - 1)) ? '0 : cnt + 1'b1;
      adc_convst   <= (cnt < CNT_W'(PULSE - 1)) || (cnt == CNT_W'(SAMPLE_PERIOD - 1));

      if (!shifting) begin
        adc_sck <= 1'b0;
        if (cnt == CNT_W'(SHIFT_AT - 1)) begin
          shifting <= 1'b1;
          bit_idx  <= '0;
          adc_sdi  <= CFG[5];
        end
      end else if (!adc_sck) begin
        adc_sck <= 1'b1;                       // rising edge: ADC takes SDI
      end else begin
        adc_sck <= 1'b0;                       // falling edge: ADC moves SDO on
        shreg   <= {shreg[ADC_BITS-2:0], adc_sdo};
        bit_idx <= bit_idx + 1'b1;
        adc_sdi <= (bit_idx < 4'd5) ? CFG[3'd4 - 3'(bit_idx)] : 1'b0;
        if (bit_idx == 4'(ADC_BITS - 1)) begin
          shifting     <= 1'b0;
          sample       <= {shreg[ADC_BITS-2:0], adc_sdo};
          sample_valid <= 1'b1;
        end
      end
    end
  end

endmodule

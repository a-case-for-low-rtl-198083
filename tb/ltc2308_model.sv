// ltc2308_model: behavioural model of an LTC2308 12-bit SAR ADC (not synthesizable).
//
// A rising edge on CONVST samples the input `vin_code` (the analogue input, given
// directly as its ideal 12-bit code) and starts a conversion of T_CONV_NS. The
// result is then shifted out on SDO MSB first: bit 11 is on SDO when the
// conversion ends, and each SCK falling edge moves to the next bit. SDI is taken
// on SCK rising edges, six bits per frame, and the last full word is kept in
// `cfg`. An SCK rising edge during a conversion counts as a timing violation.
`timescale 1ns/1ps
module ltc2308_model #(
  parameter real T_CONV_NS = 1300.0
) (
  input  logic        convst,
  input  logic        sck,
  input  logic        sdi,
  output logic        sdo,
  input  logic [11:0] vin_code,
  output logic [5:0]  cfg,
  output int          conversions,
  output int          timing_errors
);
  logic [11:0] data;
  int          idx;
  logic [5:0]  cfg_sh;
  int          cfg_n;
  realtime     t_start;
  logic        busy;

  initial begin
    sdo = 1'b0; cfg = 6'b100010; conversions = 0; timing_errors = 0;
    busy = 1'b0; idx = 0; data = '0; cfg_sh = '0; cfg_n = 0; t_start = 0;
  end

  always @(posedge convst) begin
    data    = vin_code;
    busy    = 1'b1;
    t_start = $realtime;
    idx     = 11;
    cfg_n   = 0;
    conversions++;
    #(T_CONV_NS);
    busy = 1'b0;
    sdo  = data[11];
  end

  always @(posedge sck) begin
    if (busy) timing_errors++;
    if (cfg_n < 6) begin
      cfg_sh = {cfg_sh[4:0], sdi};
      cfg_n++;
      if (cfg_n == 6) cfg = cfg_sh;
    end
  end

  always @(negedge sck) begin
    if (idx > 0) idx--;
    sdo = data[idx];
  end
endmodule

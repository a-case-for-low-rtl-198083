// lab_pkg: types and constants shared by the FPGA lab instrument.
//
// The instrument samples one channel of a 12-bit, 0-4.096 V ADC, so one code is
// one millivolt at the default full scale. Voltages travel through the design as
// raw ADC codes and are converted to millivolts only for the readouts.
// The nine trigger presets (0 V to 4 V in 0.5 V steps) follow the document; the
// code-to-millivolt scale and the Vmax/sqrt(2) constant are this design's own.
package lab_pkg;

  localparam int unsigned ADC_BITS = 12;
  typedef logic [ADC_BITS-1:0] sample_t;

  // Millivolt readouts: 13 bits hold up to 8191 mV.
  localparam int unsigned MV_BITS = 13;
  typedef logic [MV_BITS-1:0] mv_t;

  // Frequency readout in Hz: six decimal digits on the screen.
  localparam int unsigned FREQ_BITS = 20;
  localparam int unsigned FREQ_MAX  = 999_999;
  typedef logic [FREQ_BITS-1:0] freq_t;

  // Number of trigger presets and their spacing (500 mV).
  localparam int unsigned NUM_TRIG_PRESETS = 9;
  localparam int unsigned TRIG_STEP_MV     = 500;

  // Which instrument the display shows.
  typedef enum logic {
    MODE_SCOPE = 1'b0,
    MODE_DMM   = 1'b1
  } instrument_t;

  // ADC code for a millivolt value, at a full scale of FULL_SCALE_MV.
  function automatic sample_t mv_to_code(input int unsigned mv, input int unsigned full_scale_mv);
    int unsigned c;
    c = (mv * (1 << ADC_BITS)) / full_scale_mv;
    if (c > (1 << ADC_BITS) - 1) c = (1 << ADC_BITS) - 1;
    return sample_t'(c);
  endfunction

  // Millivolts for an ADC code: code * FULL_SCALE_MV / 4096.
  function automatic mv_t code_to_mv(input sample_t code, input int unsigned full_scale_mv);
    logic [31:0] p;
    p = 32'(code) * 32'(full_scale_mv);
    return mv_t'(p >> ADC_BITS);
  endfunction

  // RMS of a sine wave from its peak: Vmax * 46341 / 65536 (46341/65536 = 0.70711).
  localparam int unsigned INV_SQRT2_Q16 = 46341;
  function automatic mv_t peak_to_rms(input mv_t peak);
    logic [31:0] p;
    p = 32'(peak) * 32'(INV_SQRT2_Q16);
    return mv_t'(p >> 16);
  endfunction

  // Waveform area of the oscilloscope screen (pixels). 512 columns, one per
  // buffer word, and 386 rows, as the document gives; the position is this
  // design's choice.
  localparam int unsigned WAVE_X0 = 64;
  localparam int unsigned WAVE_Y0 = 40;
  localparam int unsigned WAVE_W  = 512;
  localparam int unsigned WAVE_H  = 386;

  // Screen row of an ADC code: 0 at the bottom row of the area, full scale at the top.
  function automatic logic [9:0] code_to_row(input sample_t code);
    logic [31:0] p;
    p = (32'(code) * 32'(WAVE_H)) >> ADC_BITS;
    return 10'(WAVE_Y0 + WAVE_H - 1 - p);
  endfunction

endpackage

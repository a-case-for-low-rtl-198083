// fpga_lab_instrument: an oscilloscope and a voltmeter in one FPGA, shown on VGA.
//
// Data path: ltc2308_ctrl reads the board's 12-bit ADC at 500 kS/s. The full-
// rate samples feed the frequency meter (period between trigger crossings) and
// the voltmeter (max, min, RMS). The timebase passes one sample in 2**sw[9:6]
// to the trigger controller, which, on a rising pass through the trigger level,
// writes the next 512 samples into one of two buffers (ram_ctrl) and then flips
// them, so the display always reads a complete capture. video_out draws the
// chart, trigger line, trace and readings, or the voltmeter's large readings.
//
// Controls (DE1-SoC switches and keys):
//   sw[0]   reset while high              sw[3]   0 = oscilloscope, 1 = voltmeter
//   sw[1]   0 = AC (triggered), 1 = DC (free-running capture, no frequency)
//   sw[9:6] time base, 2**n sample periods per point
//   key_n[3] steps the trigger level 0, 0.5, ... 4 V (active low)
// Reset, instrument select, time base and trigger button follow the document;
// the AC/DC switch is this design's choice for the AC/DC choice in the
// document's trigger and frequency flows. Everything runs on the 50 MHz clock.
module fpga_lab_instrument
  import lab_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 50_000_000,
  parameter int unsigned SAMPLE_RATE     = 500_000,
  parameter int unsigned CONV_CYCLES     = 70,
  parameter int unsigned DEPTH           = 512,
  parameter int unsigned CAPTURE_END     = 525,
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned METER_WINDOW_LOG2 = 17,
  parameter int unsigned FULL_SCALE_MV   = 4096,
  parameter int unsigned HYST            = 50
) (
  input  logic       clk_50,
  input  logic [9:0] sw,
  input  logic [3:0] key_n,
  // LTC2308 ADC
  output logic       adc_convst,
  output logic       adc_sck,
  output logic       adc_sdi,
  input  logic       adc_sdo,
  // VGA DAC
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n,
  output logic       vga_sync_n,
  output logic       vga_clk
);
  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == WAVE_W) else $error("buffer depth must match the 512-pixel trace");
  end

  // Switches are synchronised; sw[0] is the reset.
  logic [9:0] sw_q1, sw_q2;
  logic       rst;
  always_ff @(posedge clk_50) begin
    sw_q1 <= sw;
    sw_q2 <= sw_q1;
  end
  assign rst = sw_q2[0];

  instrument_t mode;
  logic        dc_mode;
  logic [3:0]  tb_sel;
  assign mode    = sw_q2[3] ? MODE_DMM : MODE_SCOPE;
  assign dc_mode = sw_q2[1];
  assign tb_sel  = sw_q2[9:6];

  // Acquisition
  sample_t sample;
  logic    sample_valid, sample_en;

  ltc2308_ctrl #(.SAMPLE_PERIOD(CLK_HZ / SAMPLE_RATE), .CONV_CYCLES(CONV_CYCLES), .CHANNEL(0))
    u_adc (.clk(clk_50), .rst, .adc_convst, .adc_sck, .adc_sdi, .adc_sdo,
           .sample, .sample_valid);

  timebase #(.SEL_BITS(4))
    u_timebase (.clk(clk_50), .rst, .sel(tb_sel), .sample_valid, .sample_en);

  // Trigger level
  sample_t    trig_level;
  logic [3:0] trig_index;
  logic       trig_pressed;
  trigger_preset #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .FULL_SCALE_MV(FULL_SCALE_MV))
    u_trig_preset (.clk(clk_50), .rst, .key_n(key_n[3]), .index(trig_index),
                   .level(trig_level), .pressed(trig_pressed));

  // Triggered capture into two alternating buffers
  logic          wr_en, wr_sel, capture_done, triggered;
  logic [AW-1:0] wr_addr, rd_addr;
  sample_t       wr_data, rd_data;

  trigger_ctrl #(.DEPTH(DEPTH), .CAPTURE_END(CAPTURE_END))
    u_trigger (.clk(clk_50), .rst, .dc_mode, .trig_level, .sample, .sample_en,
               .wr_en, .wr_addr, .wr_data, .wr_sel, .capture_done, .triggered);

  ram_ctrl #(.DEPTH(DEPTH))
    u_ram (.clk(clk_50), .wr_sel, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  // Measurements
  freq_t       freq_hz;
  logic [31:0] period_clks;
  logic        freq_valid;
  freq_meter #(.CLK_HZ(CLK_HZ), .HYST(HYST))
    u_freq (.clk(clk_50), .rst, .dc_mode, .trig_level, .sample, .sample_valid,
            .freq_hz, .period_clks, .freq_valid);

  mv_t  vmax_mv, vmin_mv, vrms_mv;
  logic meter_update;
  voltmeter #(.WINDOW_LOG2(METER_WINDOW_LOG2), .FULL_SCALE_MV(FULL_SCALE_MV))
    u_meter (.clk(clk_50), .rst, .sample, .sample_valid, .vmax_mv, .vmin_mv,
             .vrms_mv, .update(meter_update));

  // Display
  logic frame_start;
  video_out u_video (.clk(clk_50), .rst, .mode, .trig_level, .vmax_mv, .vmin_mv,
                     .vrms_mv, .freq_hz, .rd_addr, .rd_data, .vga_r, .vga_g, .vga_b,
                     .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_clk,
                     .frame_start);
endmodule

// video_out: the instrument display, 640 x 480 VGA from a 50 MHz clock.
//
// A pixel enable at half the clock rate (25 MHz) drives the raster counters.
// For each pixel the background chart, the trigger-level line, the waveform dot
// read from the capture buffer and the text are combined by priority (text over
// waveform over trigger line over chart over black) and registered together
// with the syncs, so colour and sync leave aligned, one pixel after the
// counters. In multimeter mode only the text is drawn. `vga_clk` is the pixel
// clock for the video DAC; its rising edge falls in the middle of each pixel.
// `vga_blank_n` is low outside the visible area and `vga_sync_n` (sync on
// green) is held low. The colours are this design's choice.
module video_out
  import lab_pkg::*;
#(
  localparam int unsigned AW = $clog2(WAVE_W)
) (
  input  logic          clk,
  input  logic          rst,
  input  instrument_t   mode,
  input  sample_t       trig_level,
  input  mv_t           vmax_mv,
  input  mv_t           vmin_mv,
  input  mv_t           vrms_mv,
  input  freq_t         freq_hz,
  // capture buffer read port (data one clock after the address)
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_data,
  // VGA
  output logic [7:0]    vga_r,
  output logic [7:0]    vga_g,
  output logic [7:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs,
  output logic          vga_blank_n,
  output logic          vga_sync_n,
  output logic          vga_clk,
  output logic          frame_start
);
  logic       pix_en;
  logic [9:0] hcount, vcount;
  logic       hsync_n, vsync_n, active, fs;
  logic       grid_on, trig_on, wave_on, title_on, text_on;
  logic [23:0] rgb;

  always_ff @(posedge clk) begin
    if (rst) pix_en <= 1'b0;
    else     pix_en <= !pix_en;
  end

  vga_timing u_timing (.clk, .rst, .pix_en, .hcount, .vcount, .hsync_n, .vsync_n,
                       .active, .frame_start(fs));
  grid_gen   u_grid   (.x(hcount), .y(vcount), .trig_level, .grid_on, .trig_on);
  wave_plot  u_wave   (.x(hcount), .y(vcount), .rd_addr, .rd_data, .wave_on);
  text_gen   u_text   (.x(hcount), .y(vcount), .mode, .vmax_mv, .vmin_mv, .vrms_mv,
                       .freq_hz, .title_on, .text_on);

  always_comb begin
    rgb = 24'h000000;
    if (!active)                          rgb = 24'h000000;
    else if (title_on)                    rgb = 24'hFFFF00;   // title: yellow
    else if (text_on)                     rgb = 24'h00FFFF;   // readings: cyan
    else if (mode == MODE_SCOPE) begin
      if (wave_on)                        rgb = 24'h00C0C0;   // trace: dark cyan
      else if (trig_on)                   rgb = 24'h00FF00;   // trigger level: green
      else if (grid_on)                   rgb = 24'hFFFFFF;   // chart: white
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      vga_clk     <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      vga_clk     <= !pix_en;
      frame_start <= 1'b0;
      if (pix_en) begin
        {vga_r, vga_g, vga_b} <= rgb;
        vga_hs      <= hsync_n;
        vga_vs      <= vsync_n;
        vga_blank_n <= active;
        frame_start <= fs;
      end
    end
  end

  assign vga_sync_n = 1'b0;
endmodule

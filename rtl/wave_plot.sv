// wave_plot: draws the captured samples as dots in the waveform area.
//
// Column x of the 512-pixel-wide area shows buffer word x - WAVE_X0: the
// address goes out combinationally from the pixel counter, the word comes back
// one clock later (well inside a 25 MHz pixel, i.e. two system clocks), and the
// pixel is lit when the current line equals the sample's row: full scale at the
// top row of the 386-row area, 0 V at the bottom. One dot per column, as on the
// document's screen; the mapping of codes to rows is this design's.
module wave_plot
  import lab_pkg::*;
#(
  localparam int unsigned AW = $clog2(WAVE_W)
) (
  input  logic [9:0]    x,
  input  logic [9:0]    y,
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_data,
  output logic          wave_on
);
  logic in_area;
  always_comb begin
    in_area = (x >= 10'(WAVE_X0)) && (x < 10'(WAVE_X0 + WAVE_W)) &&
              (y >= 10'(WAVE_Y0)) && (y < 10'(WAVE_Y0 + WAVE_H));
    rd_addr = AW'(x - 10'(WAVE_X0));
    wave_on = in_area && (y == code_to_row(rd_data));
  end
endmodule

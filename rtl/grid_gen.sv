// grid_gen: background graphics of the oscilloscope screen.
//
// For the pixel (x, y) it reports whether it lies on the graduated chart: the
// frame around the 512 x 386 waveform area and the two centre lines, one
// vertical and one horizontal. `trig_on` marks the horizontal line at the
// current trigger level, drawn at the row where a sample of that level would
// be plotted. Purely combinational. Drawing the chart from logic rather than
// from memory follows the document; the chart's exact lines are this design's.
module grid_gen
  import lab_pkg::*;
(
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  sample_t    trig_level,
  output logic       grid_on,
  output logic       trig_on
);
  localparam logic [9:0] X0 = 10'(WAVE_X0);
  localparam logic [9:0] X1 = 10'(WAVE_X0 + WAVE_W - 1);
  localparam logic [9:0] Y0 = 10'(WAVE_Y0);
  localparam logic [9:0] Y1 = 10'(WAVE_Y0 + WAVE_H - 1);
  localparam logic [9:0] XC = 10'(WAVE_X0 + WAVE_W / 2);
  localparam logic [9:0] YC = 10'(WAVE_Y0 + WAVE_H / 2);

  logic in_area;
  always_comb begin
    in_area = (x >= X0) && (x <= X1) && (y >= Y0) && (y <= Y1);
    grid_on = in_area && ((x == X0) || (x == X1) || (y == Y0) || (y == Y1) ||
                          (x == XC) || (y == YC));
    trig_on = in_area && (y == code_to_row(trig_level));
  end
endmodule

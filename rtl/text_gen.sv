// text_gen: the text layers of the two instrument screens.
//
// The readings are converted to decimal (bin2bcd) and laid out in character
// cells; font_rom gives the dots. Oscilloscope screen, characters drawn at twice
// the font size (16 x 16 pixel cells, 40 columns by 30 rows):
//   row 1,  column 3: AN FPGA BASED DIGITAL OSCILLOSCOPE        (title)
//   row 27, column 4: V1(V):d.dddMAX  F1(Hz):dddddd
//   row 28, column 4: V2(V):d.dddMIN  V3(V):d.dddRMS
// Multimeter screen: the title FPGA BASED DIGITAL VOLTMETER in row 1, column 6
// of the same grid, then three lines at eight times the font size (64 x 64
// pixel cells) starting at pixel (32, 112): d.dddVMAX, d.dddVMIN, d.dddVRMS.
// Voltages are shown in volts with three decimals (the millivolt value with a
// point after its thousands digit), the frequency in Hz with six digits.
// The labels and formats are those of the document's screens; positions and
// sizes are this design's. Purely combinational: `title_on` and `text_on` hold
// for the pixel (x, y).
module text_gen
  import lab_pkg::*;
(
  input  logic [9:0]  x,
  input  logic [9:0]  y,
  input  instrument_t mode,
  input  mv_t         vmax_mv,
  input  mv_t         vmin_mv,
  input  mv_t         vrms_mv,
  input  freq_t       freq_hz,
  output logic        title_on,
  output logic        text_on
);
  localparam logic [8*34-1:0] TITLE_SCOPE = "AN FPGA BASED DIGITAL OSCILLOSCOPE";
  localparam logic [8*28-1:0] TITLE_DMM   = "FPGA BASED DIGITAL VOLTMETER";

  logic [15:0] bcd_max, bcd_min, bcd_rms;
  logic [27:0] bcd_freq;

  bin2bcd #(.BIN_W(MV_BITS),   .DIGITS(4)) u_bcd_max  (.bin(vmax_mv), .bcd(bcd_max));
  bin2bcd #(.BIN_W(MV_BITS),   .DIGITS(4)) u_bcd_min  (.bin(vmin_mv), .bcd(bcd_min));
  bin2bcd #(.BIN_W(MV_BITS),   .DIGITS(4)) u_bcd_rms  (.bin(vrms_mv), .bcd(bcd_rms));
  bin2bcd #(.BIN_W(FREQ_BITS), .DIGITS(7)) u_bcd_freq (.bin(freq_hz), .bcd(bcd_freq));

  // "d.ddd" from four BCD digits, as ASCII.
  function automatic logic [39:0] volts(input logic [15:0] b);
    return {4'h3, b[15:12], ".", 4'h3, b[11:8], 4'h3, b[7:4], 4'h3, b[3:0]};
  endfunction

  // Character idx (0 = leftmost) of a string of len characters held in the low
  // bits of s, or a space when idx is past the end.
  function automatic logic [7:0] char_at(input logic [8*40-1:0] s, input logic [5:0] len,
                                         input logic [5:0] idx);
    logic [8:0] pos;
    if (idx >= len) return " ";
    pos = {3'(0), 6'(len - 6'd1 - idx)} << 3;
    return s[pos +: 8];
  endfunction

  logic [8*40-1:0] line1, line2, big0, big1, big2;
  logic [7:0]      ch;
  logic [2:0]      grow;
  logic [2:0]      gcol;
  logic            is_title;
  logic [7:0]      pixels;
  logic [5:0]      col, row;      // 16 x 16 cells
  logic [9:0]      bx, by;        // offset into the large-text area
  logic            in_big;

  always_comb begin
    line1 = 320'({"V1(V):", volts(bcd_max), "MAX  F1(Hz):",
                  4'h3, bcd_freq[23:20], 4'h3, bcd_freq[19:16], 4'h3, bcd_freq[15:12],
                  4'h3, bcd_freq[11:8],  4'h3, bcd_freq[7:4],   4'h3, bcd_freq[3:0]});
    line2 = 320'({"V2(V):", volts(bcd_min), "MIN  V3(V):", volts(bcd_rms), "RMS"});
    big0  = 320'({volts(bcd_max), "VMAX"});
    big1  = 320'({volts(bcd_min), "VMIN"});
    big2  = 320'({volts(bcd_rms), "VRMS"});

    col    = x[9:4];
    row    = y[9:4];
    bx     = x - 10'd32;
    by     = y - 10'd112;
    in_big = (x >= 10'd32) && (x < 10'd32 + 10'd576) && (y >= 10'd112) && (y < 10'd112 + 10'd192);
    grow   = y[3:1];
    gcol   = x[3:1];
    ch     = " ";
    is_title = 1'b0;

    if (mode == MODE_SCOPE) begin
      if (row == 6'd1 && col >= 6'd3) begin
        ch = char_at(320'(TITLE_SCOPE), 6'd34, col - 6'd3);
        is_title = 1'b1;
      end else if (row == 6'd27 && col >= 6'd4) begin
        ch = char_at(line1, 6'd29, col - 6'd4);
      end else if (row == 6'd28 && col >= 6'd4) begin
        ch = char_at(line2, 6'd30, col - 6'd4);
      end
    end else begin
      if (row == 6'd1 && col >= 6'd6) begin
        ch = char_at(320'(TITLE_DMM), 6'd28, col - 6'd6);
        is_title = 1'b1;
      end else if (in_big) begin
        grow = by[5:3];
        gcol = bx[5:3];
        unique case (by[7:6])
          2'd0:    ch = char_at(big0, 6'd9, 6'(bx[9:6]));
          2'd1:    ch = char_at(big1, 6'd9, 6'(bx[9:6]));
          default: ch = char_at(big2, 6'd9, 6'(bx[9:6]));
        endcase
      end
    end
  end

  font_rom u_font (.ch, .row(grow), .pixels);

  always_comb begin
    title_on = is_title && pixels[3'd7 - gcol];
    text_on  = !is_title && pixels[3'd7 - gcol];
  end
endmodule

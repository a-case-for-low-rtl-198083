// font_rom: 5 x 7 dot-matrix glyphs for the on-screen text.
//
// Given an ASCII code and a row 0..7 of its 8 x 8 character cell, returns the
// eight pixels of that row, bit 7 leftmost. The 5 x 7 glyph sits in columns
// 1..5 and rows 0..6 of the cell, so characters and lines are spaced by one
// blank column and row. Only the characters the two screens use are defined
// (digits, the capital letters of the titles and labels, 'z', '(', ')', ':',
// '.'); every other code is blank. Combinational. Holding the text in logic
// rather than in an initialised memory follows the document; the glyph shapes
// are this design's.
module font_rom (
  input  logic [7:0] ch,
  input  logic [2:0] row,
  output logic [7:0] pixels
);
  logic [34:0] g;   // rows 0..6, five bits each, row 0 in the top bits

  always_comb begin
    unique case (ch)
      8'h30: g = 35'b01110_10001_10011_10101_11001_10001_01110;  // '0'
      8'h31: g = 35'b00100_01100_00100_00100_00100_00100_01110;  // '1'
      8'h32: g = 35'b01110_10001_00001_00010_00100_01000_11111;  // '2'
      8'h33: g = 35'b11111_00010_00100_00010_00001_10001_01110;  // '3'
      8'h34: g = 35'b00010_00110_01010_10010_11111_00010_00010;  // '4'
      8'h35: g = 35'b11111_10000_11110_00001_00001_10001_01110;  // '5'
      8'h36: g = 35'b00110_01000_10000_11110_10001_10001_01110;  // '6'
      8'h37: g = 35'b11111_00001_00010_00100_01000_01000_01000;  // '7'
      8'h38: g = 35'b01110_10001_10001_01110_10001_10001_01110;  // '8'
      8'h39: g = 35'b01110_10001_10001_01111_00001_00010_01100;  // '9'
      8'h41: g = 35'b01110_10001_10001_11111_10001_10001_10001;  // 'A'
      8'h42: g = 35'b11110_10001_10001_11110_10001_10001_11110;  // 'B'
      8'h43: g = 35'b01110_10001_10000_10000_10000_10001_01110;  // 'C'
      8'h44: g = 35'b11100_10010_10001_10001_10001_10010_11100;  // 'D'
      8'h45: g = 35'b11111_10000_10000_11110_10000_10000_11111;  // 'E'
      8'h46: g = 35'b11111_10000_10000_11110_10000_10000_10000;  // 'F'
      8'h47: g = 35'b01110_10001_10000_10111_10001_10001_01111;  // 'G'
      8'h48: g = 35'b10001_10001_10001_11111_10001_10001_10001;  // 'H'
      8'h49: g = 35'b01110_00100_00100_00100_00100_00100_01110;  // 'I'
      8'h4c: g = 35'b10000_10000_10000_10000_10000_10000_11111;  // 'L'
      8'h4d: g = 35'b10001_11011_10101_10101_10001_10001_10001;  // 'M'
      8'h4e: g = 35'b10001_10001_11001_10101_10011_10001_10001;  // 'N'
      8'h4f: g = 35'b01110_10001_10001_10001_10001_10001_01110;  // 'O'
      8'h50: g = 35'b11110_10001_10001_11110_10000_10000_10000;  // 'P'
      8'h52: g = 35'b11110_10001_10001_11110_10100_10010_10001;  // 'R'
      8'h53: g = 35'b01111_10000_10000_01110_00001_00001_11110;  // 'S'
      8'h54: g = 35'b11111_00100_00100_00100_00100_00100_00100;  // 'T'
      8'h56: g = 35'b10001_10001_10001_10001_10001_01010_00100;  // 'V'
      8'h58: g = 35'b10001_10001_01010_00100_01010_10001_10001;  // 'X'
      8'h7a: g = 35'b00000_00000_11111_00010_00100_01000_11111;  // 'z'
      8'h28: g = 35'b00010_00100_01000_01000_01000_00100_00010;  // '('
      8'h29: g = 35'b01000_00100_00010_00010_00010_00100_01000;  // ')'
      8'h3a: g = 35'b00000_01100_01100_00000_01100_01100_00000;  // ':'
      8'h2e: g = 35'b00000_00000_00000_00000_00000_01100_01100;  // '.'
      default: g = '0;
    endcase
    pixels = (row == 3'd7) ? 8'h00 : {1'b0, g[34 - 5 * row -: 5], 2'b00};
  end
endmodule

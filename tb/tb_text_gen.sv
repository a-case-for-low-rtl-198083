// tb_text_gen: renders the text of both screens and compares whole character
// cells with 5 x 7 glyphs written out here as strings: the readings 4.173 V,
// 1.063 V, 2.950 V and 2000 Hz on the oscilloscope screen (twice-size cells)
// and 4.176 V, 1.060 V, 2.952 V on the multimeter screen (eight-times-size
// cells), and the first title characters. It also scans the oscilloscope screen
// to check that text appears only on the title and the two reading rows.
module tb_text_gen;
  import lab_pkg::*;
  logic [9:0] x, y;
  instrument_t mode;
  mv_t vmax, vmin, vrms;
  freq_t freq;
  logic title_on, text_on;
  int checks = 0, failures = 0;

  text_gen dut (.x, .y, .mode, .vmax_mv(vmax), .vmin_mv(vmin), .vrms_mv(vrms),
                .freq_hz(freq), .title_on, .text_on);

  // 35 dots, row by row from the top, "1" = lit
  function automatic string glyph(byte c);
    case (c)
      "0": return "01110100011001110101110011000101110";
      "1": return "00100011000010000100001000010001110";
      "2": return "01110100010000100010001000100011111";
      "3": return "11111000100010000010000011000101110";
      "4": return "00010001100101010010111110001000010";
      "5": return "11111100001111000001000011000101110";
      "6": return "00110010001000011110100011000101110";
      "7": return "11111000010001000100010000100001000";
      "8": return "01110100011000101110100011000101110";
      "9": return "01110100011000101111000010001001100";
      ".": return "00000000000000000000000000110001100";
      "A": return "01110100011000111111100011000110001";
      "V": return "10001100011000110001100010101000100";
      "M": return "10001110111010110101100011000110001";
      "X": return "10001100010101000100010101000110001";
      "N": return "10001100011100110101100111000110001";
      "I": return "01110001000010000100001000010001110";
      default: return "00000000000000000000000000000000000";
    endcase
  endfunction

  // Compare one character cell of size 8*scale at (x0, y0) with glyph c.
  string g;
  int bad, gx, gy;
  bit e, got;
  task check_cell(input int x0, input int y0, input int scale, input byte c, input bit is_title);
    g = glyph(c);
    bad = 0;
    for (int py = 0; py < 8 * scale; py++) begin
      for (int px = 0; px < 8 * scale; px++) begin
        gx = px / scale; gy = py / scale;
        e = (gx >= 1 && gx <= 5 && gy <= 6) ? (g[gy * 5 + gx - 1] == "1") : 1'b0;
        x = 10'(x0 + px); y = 10'(y0 + py);
        #1;
        got = is_title ? title_on : text_on;
        if (got != e) bad++;
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL cell at (%0d,%0d) '%c': %0d wrong pixels", x0, y0, c, bad);
    end
  endtask

  initial begin
    string s1, s2;
    mode = MODE_DMM; vmax = 0; vmin = 0; vrms = 0; freq = 0; x = 0; y = 0;
    #1;
    mode = MODE_SCOPE; vmax = 4173; vmin = 1063; vrms = 2950; freq = 2000;
    s1 = "V1(V):4.173MAX  F1(Hz):002000";
    s2 = "V2(V):1.063MIN  V3(V):2.950RMS";
    for (int i = 6; i <= 13; i++) check_cell(16 * (4 + i), 16 * 27, 2, s1[i], 0);
    for (int i = 23; i <= 28; i++) check_cell(16 * (4 + i), 16 * 27, 2, s1[i], 0);
    for (int i = 6; i <= 13; i++) check_cell(16 * (4 + i), 16 * 28, 2, s2[i], 0);
    for (int i = 22; i <= 26; i++) check_cell(16 * (4 + i), 16 * 28, 2, s2[i], 0);
    check_cell(16 * 3, 16, 2, "A", 1);
    check_cell(16 * 4, 16, 2, "N", 1);
    // text only where it belongs
    begin
      int stray;
      stray = 0;
      for (int yy = 0; yy < 480; yy++)
        for (int xx = 0; xx < 640; xx++) begin
          x = 10'(xx); y = 10'(yy);
          #1;
          if (title_on && !(yy >= 16 && yy < 32)) stray++;
          if (text_on && !(yy >= 432 && yy < 464)) stray++;
        end
      checks++;
      if (stray != 0) begin failures++; $display("FAIL %0d text pixels outside the text rows", stray); end
    end
    // multimeter screen
    mode = MODE_DMM; vmax = 4176; vmin = 1060; vrms = 2952;
    s1 = "4.176VMAX";
    s2 = "1.060VMIN";
    for (int i = 0; i < 9; i++) check_cell(32 + 64 * i, 112, 8, s1[i], 0);
    for (int i = 0; i < 6; i++) check_cell(32 + 64 * i, 176, 8, s2[i], 0);
    s1 = "2.952";
    for (int i = 0; i < 5; i++) check_cell(32 + 64 * i, 240, 8, s1[i], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

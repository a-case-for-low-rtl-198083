// tb_wave_plot: for random columns and codes checks that the buffer address is
// the column within the trace area, and that the dot is lit on exactly the row
// 425 - floor(code * 386 / 4096) of the area and on no other row, and never
// outside the area.
module tb_wave_plot;
  import lab_pkg::*;
  logic [9:0] x, y;
  logic [8:0] addr;
  sample_t data;
  logic on;
  int checks = 0, failures = 0;

  wave_plot dut (.x, .y, .rd_addr(addr), .rd_data(data), .wave_on(on));

  initial begin
    repeat (300) begin
      int xx, code, row, lit;
      xx   = $urandom_range(0, 639);
      code = $urandom_range(0, 4095);
      row  = 425 - (code * 386) / 4096;
      x = 10'(xx); data = 12'(code);
      lit = 0;
      for (int yy = 0; yy < 480; yy++) begin
        y = 10'(yy);
        #1;
        if (on) begin
          lit++;
          checks++;
          if (yy != row || xx < 64 || xx > 575) begin failures++; $display("FAIL dot at (%0d,%0d) for code %0d", xx, yy, code); end
        end
      end
      checks++;
      if ((xx >= 64 && xx <= 575) != (lit == 1)) begin failures++; $display("FAIL column %0d lit %0d rows", xx, lit); end
      if (xx >= 64 && xx <= 575) begin
        checks++;
        if (int'(addr) != xx - 64) begin failures++; $display("FAIL column %0d address %0d", xx, addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

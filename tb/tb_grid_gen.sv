// tb_grid_gen: scans the whole 640 x 480 screen and checks every pixel against
// the chart worked out here: frame at columns 64 and 575 and rows 40 and 425,
// centre lines at column 320 and row 233, nothing outside the area; and the
// trigger line at row 425 - floor(level * 386 / 4096) for several levels.
module tb_grid_gen;
  import lab_pkg::*;
  logic [9:0] x, y;
  sample_t level;
  logic grid_on, trig_on;
  int checks = 0, failures = 0;

  grid_gen dut (.x, .y, .trig_level(level), .grid_on, .trig_on);

  initial begin
    int levels[4] = '{0, 1000, 2000, 4000};
    foreach (levels[li]) begin
      int trow;
      level = 12'(levels[li]);
      trow = 425 - (levels[li] * 386) / 4096;
      for (int yy = 0; yy < 480; yy++) begin
        for (int xx = 0; xx < 640; xx++) begin
          bit in_a, eg, et;
          x = 10'(xx); y = 10'(yy);
          #1;
          in_a = xx >= 64 && xx <= 575 && yy >= 40 && yy <= 425;
          eg = in_a && (xx == 64 || xx == 575 || yy == 40 || yy == 425 || xx == 320 || yy == 233);
          et = in_a && yy == trow;
          checks++;
          if (grid_on != eg || trig_on != et) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d) level %0d: grid %0d/%0d trig %0d/%0d", xx, yy, levels[li], grid_on, eg, trig_on, et);
          end
        end
      end
    end
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

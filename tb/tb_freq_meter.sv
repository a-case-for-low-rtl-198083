// tb_freq_meter: feeds square, triangle and sine waves of whole-sample periods
// (one sample every 100 clocks, 500 kS/s at 50 MHz) and checks that each
// measured period is exactly the wave's period in clocks and the frequency is
// 50 MHz / period, for signals that start above and below the threshold band.
// It also checks the result appears within 40 clocks of the sample that ends the
// period (the 32-step division) and that DC mode produces no result.
module tb_freq_meter;
  import lab_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic dc_mode;
  sample_t level, sample;
  logic valid;
  freq_t freq;
  logic [31:0] period;
  logic fvalid;
  int checks = 0, failures = 0;

  freq_meter #(.CLK_HZ(50_000_000), .HYST(50)) dut (
    .clk, .rst, .dc_mode, .trig_level(level), .sample, .sample_valid(valid),
    .freq_hz(freq), .period_clks(period), .freq_valid(fvalid));

  int    shape = 0;        // 0 square, 1 triangle, 2 sine
  int    per   = 100;      // samples per period
  int    off   = 0;        // starting phase in samples
  int    n     = 0;
  longint cyc  = 0, last_valid_cyc = 0;

  function automatic sample_t wave(int i);
    int p;
    real x;
    p = (i + off) % per;
    case (shape)
      0: return (p < per / 2) ? 12'd3000 : 12'd1000;
      1: return 12'((p < per / 2) ? 1000 + (4000 * p) / per : 3000 - (4000 * (p - per / 2)) / per);
      default: begin
        x = 2000.0 + 1000.0 * $sin(2.0 * 3.14159265358979 * real'(p) / real'(per));
        return 12'(int'(x));
      end
    endcase
  endfunction

  always @(posedge clk) begin
    cyc++;
    valid <= 0;
    if (!rst && cyc % 100 == 0) begin
      valid  <= 1;
      sample <= wave(n);
      n++;
      last_valid_cyc = cyc;
    end
  end

  int results;
  always @(posedge clk) if (!rst && fvalid) results++;

  task automatic measure(input int s, input int p, input int o);
    int r0;
    shape = s; per = p; off = o;
    // discard the result of a measurement that may have straddled the change
    r0 = results;
    wait (results == r0 + 2);
    @(negedge clk);
    checks++;
    if (period != 32'(p * 100)) begin
      failures++; $display("FAIL shape %0d period %0d: counted %0d clocks", s, p, period);
    end
    checks++;
    if (freq != freq_t'(50_000_000 / (p * 100))) begin
      failures++; $display("FAIL shape %0d period %0d: %0d Hz, expected %0d", s, p, freq, 50_000_000 / (p * 100));
    end
    checks++;
    if (cyc - last_valid_cyc > 40) begin
      failures++; $display("FAIL result %0d clocks after the last sample", cyc - last_valid_cyc);
    end
  endtask

  initial begin
    dc_mode = 0; level = 12'd2000; valid = 0; sample = 0; results = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    measure(0, 250, 0);     // 2 kHz square, starts high
    measure(0, 250, 130);   // starts low
    measure(1, 64, 0);      // 7812 Hz triangle
    measure(1, 1000, 400);  // 500 Hz triangle
    measure(2, 50, 0);      // 10 kHz sine
    measure(2, 5000, 0);    // 100 Hz sine
    measure(0, 10, 3);      // 50 kHz square
    // DC mode: no results
    dc_mode = 1;
    repeat (200) @(posedge clk);
    begin
      int r0;
      r0 = results;
      repeat (100 * 2000) @(posedge clk);
      checks++;
      if (results != r0) begin failures++; $display("FAIL %0d results in DC mode", results - r0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

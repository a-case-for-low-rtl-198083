// tb_workloads: the instrument measuring the set of bench signals it was
// evaluated with: sine, triangle and square waves from 10 Hz to 2 MHz with
// levels between 0 and 4.2 V, fed through the ADC model into the whole design.
//
// For each signal the trigger preset nearest the middle of the swing is
// selected with push button 3. The bench then waits for two frequency results
// and for the next complete voltmeter window (four for the slowest signal).
//  - Frequency: checked when the signal is below the 250 kHz Nyquist limit and
//    crosses the preset by more than the meter's +/-50 mV thresholds. The
//    tolerance is one sample period of the measured period (f*f/500 kHz) plus
//    0.1 %.
//  - Vmax and Vmin: the extremes over the windows after the change. They are
//    checked against the signal's peaks, clipped to the 4.095 V full scale,
//    within 15 mV below 100 kHz and 40 mV above.
//  - Vrms: must equal Vmax / sqrt(2).
// Signals above Nyquist, and the 0.01-0.28 V sine that no preset can split,
// have their frequency readings printed but not checked. The voltmeter window is
// shortened to 2**14 samples (33 ms), and the debounce to 100 clocks, to keep
// the run short; everything else is at its default.
`timescale 1ns/1ps
module tb_workloads;
  import lab_pkg::*;
  logic clk = 0;
  always #10 clk = ~clk;      // 50 MHz

  logic [9:0] sw;
  logic [3:0] key_n;
  logic convst, sck, sdi, sdo;
  logic [7:0] r, g, b;
  logic hs, vs, blank_n, sync_n, vclk;
  logic [11:0] vin;
  logic [5:0] cfg;
  int conversions, timing_errors;
  int checks = 0, failures = 0;

  fpga_lab_instrument #(.DEBOUNCE_CYCLES(100), .METER_WINDOW_LOG2(14)) dut (
    .clk_50(clk), .sw, .key_n, .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi),
    .adc_sdo(sdo), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .vga_blank_n(blank_n), .vga_sync_n(sync_n), .vga_clk(vclk));

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin_code(vin), .cfg, .conversions,
                     .timing_errors);

  // signal source: 0 = sine, 1 = triangle, 2 = square, between lo_mv and hi_mv
  typedef enum int {SINE = 0, TRIANGLE = 1, SQUARE = 2} shape_t;
  shape_t shape = SINE;
  real lo_mv = 1000.0, hi_mv = 3000.0, f_hz = 1000.0;
  always @(posedge clk) begin
    real ph, u, v;
    ph = f_hz * $realtime * 1.0e-9;
    ph = ph - $floor(ph);                       // phase in cycles, 0..1
    case (shape)
      SINE:     u = $sin(2.0 * 3.14159265358979 * ph);
      TRIANGLE: u = 4.0 * ((ph < 0.5) ? ph : 1.0 - ph) - 1.0;
      default:  u = (ph < 0.5) ? 1.0 : -1.0;
    endcase
    v = (hi_mv + lo_mv) / 2.0 + (hi_mv - lo_mv) / 2.0 * u;
    if (v < 0.0) v = 0.0;
    if (v > 4095.0) v = 4095.0;
    vin <= 12'(int'(v));
  end

  task automatic press();
    key_n[3] <= 1'b0; repeat (300) @(posedge clk);
    key_n[3] <= 1'b1; repeat (300) @(posedge clk);
  endtask

  task automatic near(string what, int got, int exp, int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d +/- %0d", what, got, exp, tol);
    end
  endtask

  int preset = 0;   // preset index the design holds

  task automatic run(shape_t s, real f, real hi, real lo);
    int want, tol_v, exp_hi, exp_lo, fmeas, vmax, vmin, nwin;
    bit check_f;
    real fr, ftol;
    string name;
    shape = s; f_hz = f; hi_mv = hi; lo_mv = lo;
    name = $sformatf("%s %0.0f Hz %0.0f-%0.0f mV", s.name(), f, lo, hi);
    // nearest preset to the middle of the swing
    want = int'((hi + lo) / 2.0 / 500.0 + 0.5);
    if (want > 8) want = 8;
    while (preset != want) begin press(); preset = (preset + 1) % 9; end
    check_f = (f < 250000.0) && (real'(want * 500 - 50) > lo + 5.0) &&
              (real'(want * 500 + 50) < hi - 5.0);
    // frequency: two results after the change, with a time limit
    fmeas = -1;
    fork
      begin
        repeat (2) @(posedge dut.freq_valid);
        @(negedge clk);
        fmeas = int'(dut.freq_hz);
      end
      begin
        #(($rtoi(3.5e9 / f) > 400_000_000) ? 400_000_000 : 2_000_000 + $rtoi(3.5e9 / f));
      end
    join_any
    disable fork;
    if (check_f) begin
      fr = f;
      ftol = fr * fr / 500000.0 + fr * 0.001 + 1.0;
      near({name, ": frequency (Hz)"}, fmeas, int'(fr), int'(ftol));
    end
    // voltages: extremes over the windows that follow
    @(posedge dut.meter_update);
    vmax = 0; vmin = 99999; nwin = 0;
    while (nwin < 1 || (f < 60.0 && nwin < 4)) begin
      @(posedge dut.meter_update);
      @(negedge clk);
      nwin++;
      if (int'(dut.vmax_mv) > vmax) vmax = int'(dut.vmax_mv);
      if (int'(dut.vmin_mv) < vmin) vmin = int'(dut.vmin_mv);
      near({name, ": Vrms = Vmax/sqrt2 (mV)"}, int'(dut.vrms_mv),
           int'((longint'(dut.vmax_mv) * 46341) >>> 16), 0);
    end
    exp_hi = (hi > 4095.0) ? 4095 : int'(hi);
    exp_lo = int'(lo);
    tol_v = (f < 100000.0) ? 15 : 40;
    near({name, ": Vmax (mV)"}, vmax, exp_hi, tol_v);
    near({name, ": Vmin (mV)"}, vmin, exp_lo, tol_v);
    $display("%-40s  F=%0d Hz%s  Vmax=%0d  Vmin=%0d mV  (trigger %0d mV)", name, fmeas,
             check_f ? "" : " (not checked)", vmax, vmin, want * 500);
  endtask

  initial begin
    sw = 10'b00_0000_0001;  // reset, oscilloscope, AC, time base 0
    key_n = 4'hF;
    repeat (20) @(posedge clk);
    sw[0] = 1'b0;

    // low-frequency signals
    run(SINE,        100.0, 4120.0, 1080.0);
    run(SINE,        500.0, 4120.0, 1080.0);
    run(SINE,        500.0, 2100.0,   40.0);
    run(SINE,        955.0, 4160.0,  800.0);
    run(SINE,        956.0,  280.0,   10.0);
    run(SINE,        956.0, 1080.0,  130.0);
    run(SINE,        956.0, 2870.0, 1910.0);
    run(SINE,       9460.0, 2870.0, 1910.0);
    run(SINE,       9461.0, 4180.0,  800.0);
    run(TRIANGLE,    972.0, 3400.0, 1540.0);
    run(TRIANGLE,   2008.0, 4060.0,  840.0);
    run(TRIANGLE,   2008.0, 3380.0, 1520.0);
    run(TRIANGLE,   5000.0, 2100.0,   60.0);
    run(TRIANGLE,   5900.0, 2080.0,  100.0);
    run(SQUARE,       10.0, 2120.0,   40.0);
    run(SQUARE,      100.0, 2160.0,   40.0);
    run(SQUARE,      972.0, 3500.0, 1420.0);
    run(SQUARE,     5000.0, 2120.0,   60.0);
    run(SQUARE,     9634.0, 3500.0, 1420.0);
    // high-frequency signals
    run(SINE,      15000.0, 2100.0,   60.0);
    run(SINE,      94790.0, 4140.0,  820.0);
    run(SINE,     228100.0, 4160.0,  840.0);
    run(SINE,     985200.0, 4020.0,  960.0);
    run(SINE,    2011000.0, 3720.0, 1280.0);
    run(TRIANGLE,  14980.0, 2020.0,  140.0);
    run(TRIANGLE,  96620.0, 3380.0, 1540.0);
    run(SQUARE,    15000.0, 2120.0,   60.0);
    run(SQUARE,    96550.0, 3500.0, 1420.0);

    checks++;
    if (timing_errors != 0) begin failures++; $display("FAIL ADC timing errors: %0d", timing_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin   // watchdog: 4 s of simulated time
    #4_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpga_lab_instrument: end-to-end run of the whole instrument with the ADC
// model as the signal source, at a short debounce (100 clocks) and a short
// voltmeter window (4096 samples); all other parameters at their defaults.
//
// Steps and checks:
//  1. Oscilloscope, AC: a 2 kHz sine from 1.0 V to 3.0 V. Four presses of the
//     trigger button set the level to 2.0 V. Frequency must read 2000 Hz;
//     Vmax 3.000 V, Vmin 1.000 V, Vrms = Vmax / sqrt(2), all within 5 mV.
//  2. A completed capture starts at the trigger: first word within 40 mV of
//     2.0 V and rising; on screen the trace starts near row 237.
//  3. Time base 2**3: buffer writes are 8 sample periods (800 clocks) apart.
//  4. DC mode with a steady 1.5 V: captures keep completing without triggers
//     and no frequency is measured.
//  5. Multimeter mode: the frame holds large text and no trace or chart.
// Each mechanism (button press, trigger, buffer flip, frequency result,
// voltmeter update, decimated capture, DC capture, scope frame, meter frame) is
// counted, and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_fpga_lab_instrument;
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

  fpga_lab_instrument #(.DEBOUNCE_CYCLES(100), .METER_WINDOW_LOG2(12)) dut (
    .clk_50(clk), .sw, .key_n, .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi),
    .adc_sdo(sdo), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .vga_blank_n(blank_n), .vga_sync_n(sync_n), .vga_clk(vclk));

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin_code(vin), .cfg, .conversions,
                     .timing_errors);

  // signal source: sine (offset, amplitude in mV, frequency in Hz) or steady level
  real off_mv = 2000.0, amp_mv = 1000.0, f_hz = 2000.0;
  always @(posedge clk) begin
    real v;
    v = off_mv + amp_mv * $sin(2.0 * 3.14159265358979 * f_hz * $realtime * 1.0e-9);
    if (v < 0.0) v = 0.0;
    if (v > 4095.0) v = 4095.0;
    vin <= 12'(int'(v));
  end

  // mechanism counters
  int n_press = 0, n_trig = 0, n_flip = 0, n_freq = 0, n_meter = 0;
  int n_decim = 0, n_dc = 0, n_scope_frames = 0, n_dmm_frames = 0;
  always @(posedge clk) if (!dut.rst) begin
    if (dut.trig_pressed) n_press++;
    if (dut.triggered) n_trig++;
    if (dut.capture_done) begin
      n_flip++;
      if (dut.tb_sel != 0) n_decim++;
      if (dut.dc_mode) n_dc++;
    end
    if (dut.freq_valid) n_freq++;
    if (dut.meter_update) n_meter++;
  end

  // screen observer: counts trace and text pixels of one frame
  int px = -1, py = 0, n_trace, n_text, n_white, first_trace_row;
  always @(negedge clk) begin
    if (!vclk && dut.frame_start) begin px = 0; py = 0; end
    else if (!vclk && px >= 0) begin
      px++;
      if (px == 800) begin px = 0; py = (py + 1) % 525; end
    end
    if (!vclk && px >= 0) begin
      if ({r, g, b} == 24'h00C0C0) begin
        n_trace++;
        if (px == 64) first_trace_row = py;
      end
      if ({r, g, b} == 24'h00FFFF) n_text++;
      if ({r, g, b} == 24'hFFFFFF) n_white++;
    end
  end

  task automatic frame();
    @(posedge dut.frame_start);
    @(negedge clk);
    n_trace = 0; n_text = 0; n_white = 0; first_trace_row = -1;
    @(posedge dut.frame_start);
    @(negedge clk);
    if (dut.mode == MODE_SCOPE) n_scope_frames++; else n_dmm_frames++;
  endtask

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

  initial begin
    sw = 10'b00_0000_0001;  // reset, oscilloscope, AC, time base 0
    key_n = 4'hF;
    repeat (20) @(posedge clk);
    sw[0] = 1'b0;

    // 1. trigger level 2.0 V, then measure
    repeat (4) press();
    near("trigger level", int'(dut.trig_level), 2000, 0);
    repeat (2) @(posedge dut.freq_valid);
    near("frequency (Hz)", int'(dut.freq_hz), 2000, 0);
    repeat (2) @(posedge dut.meter_update);
    @(negedge clk);
    near("Vmax (mV)", int'(dut.vmax_mv), 3000, 5);
    near("Vmin (mV)", int'(dut.vmin_mv), 1000, 5);
    near("Vrms (mV)", int'(dut.vrms_mv), int'(real'(dut.vmax_mv) / $sqrt(2.0)), 1);

    // 2. a capture begins at the trigger
    @(posedge dut.capture_done);
    @(negedge clk);
    begin
      int w0, w8;
      if (dut.wr_sel) begin w0 = dut.u_ram.u_ram0.mem[0]; w8 = dut.u_ram.u_ram0.mem[8]; end
      else            begin w0 = dut.u_ram.u_ram1.mem[0]; w8 = dut.u_ram.u_ram1.mem[8]; end
      near("first captured sample (mV)", w0, 2000, 40);
      checks++;
      if (w8 <= w0) begin failures++; $display("FAIL capture does not start on a rising edge"); end
    end
    frame();
    near("trace row at the trigger column", first_trace_row, 425 - (2000 * 386) / 4096, 4);
    checks++;
    if (n_trace < 500) begin failures++; $display("FAIL %0d trace pixels", n_trace); end

    // 3. time base 2**3
    sw[9:6] = 4'd3;
    @(posedge dut.capture_done);
    @(posedge dut.triggered);
    begin
      longint t0;
      @(posedge dut.wr_en); t0 = longint'($realtime);
      @(posedge dut.wr_en);
      near("write interval at time base 3 (clocks)", int'((longint'($realtime) - t0) / 20), 800, 0);
    end
    @(posedge dut.capture_done);
    sw[9:6] = 4'd0;

    // 4. DC mode, steady input
    amp_mv = 0.0; off_mv = 1500.0;
    sw[1] = 1'b1;
    begin
      int f0, t0;
      f0 = n_freq; t0 = n_trig;
      repeat (4) @(posedge dut.capture_done);
      checks++;
      if (n_freq != f0 || n_trig != t0) begin failures++; $display("FAIL triggers or frequency results in DC mode"); end
    end

    // 5. multimeter screen
    sw[3] = 1'b1;
    frame();
    checks++;
    if (n_trace != 0 || n_white != 0 || n_text < 1000) begin
      failures++; $display("FAIL meter screen: trace %0d chart %0d text %0d", n_trace, n_white, n_text);
    end

    checks++;
    if (timing_errors != 0) begin failures++; $display("FAIL %0d ADC read-outs during conversion", timing_errors); end

    // every mechanism must have happened
    foreach (mech_name[i]) begin
      int n;
      case (i)
        0: n = n_press;  1: n = n_trig;  2: n = n_flip;  3: n = n_freq;  4: n = n_meter;
        5: n = n_decim;  6: n = n_dc;    7: n = n_scope_frames;  default: n = n_dmm_frames;
      endcase
      $display("%-28s %0d", mech_name[i], n);
      checks++;
      if (n == 0) begin failures++; $display("FAIL %s never happened", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string mech_name[9] = '{"trigger button presses", "triggered captures", "buffer flips",
                          "frequency results", "voltmeter updates", "time-base captures",
                          "DC-mode captures", "oscilloscope frames", "multimeter frames"};

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

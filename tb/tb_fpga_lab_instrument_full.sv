// tb_fpga_lab_instrument_full: one complete measurement of the instrument with
// every parameter at its default (20 ms debounce, 2**17-sample voltmeter
// window, 500 kS/s). A 2 kHz sine from 0.2 V to 2.2 V is applied; one press of
// the trigger button sets 0.5 V. Checks: frequency 2000 Hz; Vmax 2.200 V and
// Vmin 0.200 V within 5 mV and Vrms = Vmax / sqrt(2); a capture that starts at
// the trigger level on a rising edge; one oscilloscope frame with the trace.
`timescale 1ns/1ps
module tb_fpga_lab_instrument_full;
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

  fpga_lab_instrument dut (
    .clk_50(clk), .sw, .key_n, .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi),
    .adc_sdo(sdo), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .vga_blank_n(blank_n), .vga_sync_n(sync_n), .vga_clk(vclk));

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin_code(vin), .cfg, .conversions,
                     .timing_errors);

  always @(posedge clk) begin
    real v;
    v = 1200.0 + 1000.0 * $sin(2.0 * 3.14159265358979 * 2000.0 * $realtime * 1.0e-9);
    vin <= 12'(int'(v));
  end

  int px = -1, py = 0, n_trace, first_trace_row;
  always @(negedge clk) begin
    if (!vclk && dut.frame_start) begin px = 0; py = 0; end
    else if (!vclk && px >= 0) begin
      px++;
      if (px == 800) begin px = 0; py = (py + 1) % 525; end
    end
    if (!vclk && px >= 0 && {r, g, b} == 24'h00C0C0) begin
      n_trace++;
      if (px == 64) first_trace_row = py;
    end
  end

  task automatic near(string what, int got, int exp, int tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d +/- %0d", what, got, exp, tol);
    end
  endtask

  initial begin
    sw = 10'b00_0000_0001;
    key_n = 4'hF;
    repeat (20) @(posedge clk);
    sw[0] = 1'b0;
    // one press: 0.5 V (held and released for 25 ms each, above the 20 ms debounce)
    key_n[3] = 1'b0; repeat (1_250_000) @(posedge clk);
    key_n[3] = 1'b1; repeat (1_250_000) @(posedge clk);
    near("trigger level", int'(dut.trig_level), 500, 0);
    repeat (2) @(posedge dut.freq_valid);
    near("frequency (Hz)", int'(dut.freq_hz), 2000, 0);
    @(posedge dut.meter_update);
    @(negedge clk);
    near("Vmax (mV)", int'(dut.vmax_mv), 2200, 5);
    near("Vmin (mV)", int'(dut.vmin_mv), 200, 5);
    near("Vrms (mV)", int'(dut.vrms_mv), int'(real'(dut.vmax_mv) / $sqrt(2.0)), 1);
    @(posedge dut.capture_done);
    @(negedge clk);
    begin
      int w0, w8;
      if (dut.wr_sel) begin w0 = dut.u_ram.u_ram0.mem[0]; w8 = dut.u_ram.u_ram0.mem[8]; end
      else            begin w0 = dut.u_ram.u_ram1.mem[0]; w8 = dut.u_ram.u_ram1.mem[8]; end
      near("first captured sample (mV)", w0, 500, 40);
      checks++;
      if (w8 <= w0) begin failures++; $display("FAIL capture does not start on a rising edge"); end
    end
    @(posedge dut.frame_start);
    @(negedge clk);
    n_trace = 0; first_trace_row = -1;
    @(posedge dut.frame_start);
    @(negedge clk);
    near("trace row at the trigger column", first_trace_row, 425 - (500 * 386) / 4096, 4);
    checks++;
    if (n_trace < 500) begin failures++; $display("FAIL %0d trace pixels", n_trace); end
    checks++;
    if (timing_errors != 0) begin failures++; $display("FAIL %0d ADC read-outs during conversion", timing_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_voltmeter: runs windows of 256 samples (WINDOW_LOG2 = 8) of random data,
// each window drawn from its own random range, and checks that every published
// Vmax and Vmin are the window's extremes in millivolts (one code is one
// millivolt at the 4096 mV full scale), that Vrms is Vmax / sqrt(2) to within a
// millivolt, and that a result follows each window one clock after its last
// sample. A second instance with a 5000 mV full scale checks the scaling.
module tb_voltmeter;
  import lab_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  sample_t sample;
  logic valid;
  mv_t vmax, vmin, vrms, vmax5, vmin5, vrms5;
  logic upd, upd5;
  int checks = 0, failures = 0;

  voltmeter #(.WINDOW_LOG2(8), .FULL_SCALE_MV(4096)) dut (
    .clk, .rst, .sample, .sample_valid(valid), .vmax_mv(vmax), .vmin_mv(vmin),
    .vrms_mv(vrms), .update(upd));
  voltmeter #(.WINDOW_LOG2(8), .FULL_SCALE_MV(5000)) dut5 (
    .clk, .rst, .sample, .sample_valid(valid), .vmax_mv(vmax5), .vmin_mv(vmin5),
    .vrms_mv(vrms5), .update(upd5));

  int nvalid = 0;
  int wmax, wmin, exp_max, exp_min, windows = 0, updates = 0;
  longint cyc = 0, last_sample_cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (valid) begin
      nvalid++;
      if (nvalid % 256 == 0) last_sample_cyc = cyc;
    end
    if (!rst && upd) begin
      real r;
      updates++;
      checks += 4;
      if (int'(vmax) != exp_max) begin failures++; $display("FAIL vmax %0d exp %0d", vmax, exp_max); end
      if (int'(vmin) != exp_min) begin failures++; $display("FAIL vmin %0d exp %0d", vmin, exp_min); end
      r = real'(exp_max) / $sqrt(2.0);
      if (real'(vrms) < r - 1.0 || real'(vrms) > r + 1.0) begin failures++; $display("FAIL vrms %0d exp %f", vrms, r); end
      if (cyc - last_sample_cyc != 2) begin failures++; $display("FAIL update %0d clocks after the last sample", cyc - last_sample_cyc); end
      checks += 2;
      if (int'(vmax5) != exp_max * 5000 / 4096) begin failures++; $display("FAIL scaled vmax %0d", vmax5); end
      if (int'(vmin5) != exp_min * 5000 / 4096) begin failures++; $display("FAIL scaled vmin %0d", vmin5); end
    end
  end

  initial begin
    valid = 0; sample = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) begin
      int lo, hi;
      lo = $urandom_range(0, 2000);
      hi = $urandom_range(lo + 1, 4095);
      wmax = -1; wmin = 5000;
      for (int i = 0; i < 256; i++) begin
        int v;
        v = $urandom_range(lo, hi);
        if (v > wmax) wmax = v;
        if (v < wmin) wmin = v;
        sample <= 12'(v); valid <= 1;
        if (i == 255) begin exp_max = wmax; exp_min = wmin; end
        @(posedge clk);
        valid <= 0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      windows++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (updates != windows) begin failures++; $display("FAIL %0d updates for %0d windows", updates, windows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

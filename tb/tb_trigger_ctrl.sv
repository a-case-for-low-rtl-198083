// tb_trigger_ctrl: feeds a rising sawtooth (0..3960 in steps of 40, 100
// samples per period) and checks, for each capture in AC mode, that exactly 512
// consecutive samples are written at addresses 0..511, that the first one is the
// sample right after the rising pass through the 2000 trigger level (2040),
// never after the falling jump, that the buffer flips once per capture as the
// counter passes 525, and that the next capture only starts after that. Then,
// with a constant input that never crosses the level, it checks that AC mode
// captures nothing and DC mode captures back to back without a trigger.
module tb_trigger_ctrl;
  import lab_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic dc_mode;
  sample_t level, sample;
  logic en;
  logic wr_en, wr_sel, done, trig;
  logic [8:0] wr_addr;
  sample_t wr_data;
  int checks = 0, failures = 0;

  trigger_ctrl dut (.clk, .rst, .dc_mode, .trig_level(level), .sample, .sample_en(en),
                    .wr_en, .wr_addr, .wr_data, .wr_sel, .capture_done(done), .triggered(trig));

  // stimulus: one sample every 4 clocks
  int phase = 0, k = 0;
  bit constant_in = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 4;
    en    <= (phase == 0) && !rst;
    if (phase == 0) begin
      sample <= constant_in ? 12'd1000 : 12'((k % 100) * 40);
      k      <= k + 1;
    end
  end

  // write checker
  int writes, captures, flips, starts, last_data;
  bit in_capture;
  logic sel_at_start;
  always @(posedge clk) if (!rst) begin
    if (wr_en) begin
      if (wr_addr == 0) begin
        if (in_capture) begin failures++; $display("FAIL capture restarted after %0d writes", writes); end
        in_capture = 1; writes = 0; starts++;
        sel_at_start = wr_sel;
        if (!dc_mode) begin
          checks++;
          if (wr_data != 12'd2040) begin failures++; $display("FAIL first sample %0d, expected 2040", wr_data); end
        end
      end else begin
        checks++;
        if (int'(wr_addr) != writes) begin failures++; $display("FAIL address %0d after %0d writes", wr_addr, writes); end
        if (!constant_in) begin
          checks++;
          if (int'(wr_data) != (last_data + 40) % 4000) begin failures++; $display("FAIL non-consecutive sample %0d after %0d", wr_data, last_data); end
        end
      end
      checks++;
      if (wr_sel != sel_at_start) begin failures++; $display("FAIL buffer changed during capture"); end
      last_data = wr_data;
      writes++;
    end
    if (done) begin
      flips++;
      checks++;
      if (!in_capture || writes != 512) begin failures++; $display("FAIL capture done after %0d writes", writes); end
      in_capture = 0;
    end
  end

  initial begin
    dc_mode = 0; level = 12'd2000; sample = 0; en = 0;
    writes = 0; captures = 0; flips = 0; starts = 0; in_capture = 0; last_data = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    // AC mode, sawtooth: several captures
    wait (flips == 4);
    repeat (10) @(posedge clk);
    checks++;
    if (starts != 4 && starts != 5) begin failures++; $display("FAIL %0d starts for 4 completed captures", starts); end
    checks++;
    if (wr_sel != 1'b0) begin failures++; $display("FAIL buffer select %0d after 4 flips", wr_sel); end
    // constant input in AC mode: no capture starts
    wait (!in_capture);
    constant_in = 1;
    starts = 0;
    repeat (4 * 2000) @(posedge clk);
    checks++;
    if (starts != 0) begin failures++; $display("FAIL %0d captures without a trigger in AC mode", starts); end
    // DC mode: free running
    dc_mode = 1;
    repeat (4 * 2000) @(posedge clk);
    checks++;
    if (starts < 3) begin failures++; $display("FAIL only %0d captures in DC mode", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ltc2308_ctrl: drives the ADC controller against the LTC2308 model.
// Feeds random input codes, checks that each result equals the code sampled at
// the matching CONVST edge, that results arrive exactly every SAMPLE_PERIOD
// clocks (500 kS/s at 50 MHz), that the read-out never starts during a
// conversion, and that the configuration word selects channel 0, single-ended,
// unipolar.
`timescale 1ns/1ps
module tb_ltc2308_ctrl;
  import lab_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic convst, sck, sdi, sdo;
  logic [11:0] vin;
  sample_t sample;
  logic valid;
  logic [5:0] cfg;
  int conversions, timing_errors;
  int checks = 0, failures = 0;

  ltc2308_ctrl dut (.clk, .rst, .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi),
                    .adc_sdo(sdo), .sample, .sample_valid(valid));
  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin_code(vin), .cfg,
                     .conversions, .timing_errors);

  // Input codes in order of CONVST edges.
  logic [11:0] sent[$];
  always @(posedge convst) if (!rst) begin sent.push_back(vin); end
  always @(posedge clk) vin <= 12'($urandom);

  longint last_valid = -1, cyc = 0;
  int n = 0;
  always @(posedge clk) begin
    cyc++;
    if (valid && !rst) begin
      logic [11:0] exp;
      exp = sent.pop_front();
      checks++;
      if (sample !== exp) begin
        failures++;
        $display("FAIL sample %0d: got %h exp %h", n, sample, exp);
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 100) begin
          failures++;
          $display("FAIL period %0d clocks", cyc - last_valid);
        end
      end
      last_valid = cyc;
      n++;
    end
  end

  initial begin
    vin = '0;
    repeat (5) @(posedge clk);
    rst = 0;
    wait (n == 200);
    checks++;
    if (timing_errors != 0) begin failures++; $display("FAIL %0d SCK edges during conversion", timing_errors); end
    checks++;
    if (cfg != 6'b100010) begin failures++; $display("FAIL cfg %b", cfg); end
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

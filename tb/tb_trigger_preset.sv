// tb_trigger_preset: presses the trigger button (with contact bounce) twelve
// times and checks that each press advances the level by exactly one step of
// 500 mV through 0..4 V and wraps, that bounce shorter than the debounce time
// adds no presses, and that the level is 0 V after reset.
module tb_trigger_preset;
  import lab_pkg::*;
  localparam int DB = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic key_n;
  logic [3:0] index;
  sample_t level;
  logic pressed;
  int checks = 0, failures = 0;
  int presses = 0;

  trigger_preset #(.DEBOUNCE_CYCLES(DB), .FULL_SCALE_MV(4096)) dut (
    .clk, .rst, .key_n, .index, .level, .pressed);

  always @(posedge clk) if (!rst && pressed) presses++;

  task automatic bounce(input logic final_level);
    repeat (4) begin
      key_n <= !final_level; repeat (3) @(posedge clk);
      key_n <= final_level;  repeat (2) @(posedge clk);
    end
    key_n <= final_level;
    repeat (DB * 3) @(posedge clk);
  endtask

  initial begin
    key_n = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (level != 0) begin failures++; $display("FAIL reset level %0d", level); end
    for (int p = 1; p <= 12; p++) begin
      bounce(1'b0);   // press
      bounce(1'b1);   // release
      checks++;
      if (presses != p) begin failures++; $display("FAIL %0d presses counted after %0d", presses, p); end
      checks++;
      // 1 code = 1 mV at a 4096 mV full scale
      if (level != 12'((p % 9) * 500)) begin
        failures++; $display("FAIL press %0d: level %0d expected %0d", p, level, (p % 9) * 500);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_timebase: checks that the time base passes exactly one ADC result in
// 2**sel, only on a valid result, for every setting 0..5.
module tb_timebase;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] sel;
  logic valid, en;
  int checks = 0, failures = 0;

  timebase dut (.clk, .rst, .sel, .sample_valid(valid), .sample_en(en));

  int nv, ne, bad, first_en;
  always @(posedge clk) if (!rst) begin
    if (valid) nv++;
    if (en) begin
      ne++;
      if (!valid) bad++;
      if (first_en < 0) first_en = nv;
    end
  end

  initial begin
    valid = 0; sel = 0;
    repeat (3) @(posedge clk);
    for (int s = 0; s <= 5; s++) begin
      rst <= 1; sel <= 4'(s);
      @(posedge clk); rst <= 0;
      nv = 0; ne = 0; bad = 0; first_en = -1;
      repeat (256) begin
        @(posedge clk) valid <= 1;
        @(posedge clk) valid <= 0;
        @(posedge clk);
      end
      @(posedge clk);
      checks++;
      if (ne != (256 >> s)) begin failures++; $display("FAIL sel=%0d: %0d enables of 256", s, ne); end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL sel=%0d: enable without valid", s); end
      checks++;
      if (first_en != (1 << s)) begin failures++; $display("FAIL sel=%0d: first enable after %0d valids", s, first_en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

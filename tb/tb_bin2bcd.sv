// tb_bin2bcd: compares the converter with decimal digits obtained by division,
// for every 13-bit value (the millivolt readouts) and for 20000 random 20-bit
// values (the frequency readout).
module tb_bin2bcd;
  logic [12:0] b13;
  logic [15:0] d13;
  logic [19:0] b20;
  logic [27:0] d20;
  int checks = 0, failures = 0;

  bin2bcd #(.BIN_W(13), .DIGITS(4)) dut13 (.bin(b13), .bcd(d13));
  bin2bcd #(.BIN_W(20), .DIGITS(7)) dut20 (.bin(b20), .bcd(d20));

  function automatic logic [27:0] ref_bcd(int v);
    logic [27:0] r;
    for (int d = 0; d < 7; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 8192; v++) begin
      b13 = 13'(v);
      #1;
      checks++;
      if (d13 != ref_bcd(v)[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h", v, d13);
      end
    end
    repeat (20000) begin
      int v;
      v = $urandom_range(0, (1 << 20) - 1);
      b20 = 20'(v);
      #1;
      checks++;
      if (d20 != ref_bcd(v)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h", v, d20);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ram_ctrl: writes a random capture into the selected buffer while reading
// the other one every clock, and checks that reads always return the buffer not
// being written, with one clock of latency, and that after the select flips the
// display side sees the capture just written.
module tb_ram_ctrl;
  import lab_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_sel, wr_en;
  logic [8:0] wr_addr, rd_addr;
  sample_t wr_data, rd_data;
  int checks = 0, failures = 0;

  ram_ctrl dut (.clk, .wr_sel, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  sample_t model [2][512];

  // reader: random address each clock, compare one clock later
  logic [8:0] ra_q;
  logic       rsel_q;
  bit         rd_on = 0, rd_on_q = 0;
  always @(posedge clk) begin
    if (rd_on_q) begin
      checks++;
      if (rd_data != model[rsel_q][ra_q]) begin
        failures++;
        if (failures < 10) $display("FAIL read buf %0d addr %0d got %h exp %h", rsel_q, ra_q, rd_data, model[rsel_q][ra_q]);
      end
    end
    ra_q    <= rd_addr;
    rsel_q  <= !wr_sel;
    rd_on_q <= rd_on;
    rd_addr <= 9'($urandom);
  end

  task automatic fill(input logic sel);
    wr_sel <= sel;
    for (int a = 0; a < 512; a++) begin
      logic [11:0] d;
      d = 12'($urandom);
      wr_en <= 1; wr_addr <= 9'(a); wr_data <= d;
      @(posedge clk);
      model[sel][a] = d;
    end
    wr_en <= 0;
    @(posedge clk);
  endtask

  initial begin
    wr_en = 0; wr_sel = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    @(posedge clk);
    fill(0);            // prime both buffers before checking reads
    fill(1);
    rd_on = 1;
    repeat (3) begin
      fill(0);
      fill(1);
    end
    rd_on = 0;
    @(posedge clk);
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

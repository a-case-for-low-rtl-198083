// tb_video_out: renders whole frames from a capture buffer model holding a
// constant 2048 (1/2 full scale) and checks, pixel by pixel against the raster
// position, that:
//   - hsync and vsync follow 640 x 480 timing and blank is low outside 640 x 480;
//   - in oscilloscope mode the trace is on row 425 - 193 = 232 across the 512
//     columns, the trigger line (level 1000) on row 331, the chart frame and
//     centre lines are white, and text appears only in the title and reading rows;
//   - in multimeter mode there is no trace, chart or trigger line, and the large
//     readings appear;
//   - vga_clk runs at half the clock with its rising edge mid-pixel.
module tb_video_out;
  import lab_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  instrument_t mode;
  sample_t level;
  logic [8:0] rd_addr;
  sample_t rd_data;
  logic [7:0] r, g, b;
  logic hs, vs, blank_n, sync_n, vclk, fstart;
  int checks = 0, failures = 0;

  video_out dut (.clk, .rst, .mode, .trig_level(level), .vmax_mv(13'd3000),
                 .vmin_mv(13'd1000), .vrms_mv(13'd2121), .freq_hz(20'd2000),
                 .rd_addr, .rd_data, .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs),
                 .vga_vs(vs), .vga_blank_n(blank_n), .vga_sync_n(sync_n),
                 .vga_clk(vclk), .frame_start(fstart));

  // buffer model: one clock of read latency
  always_ff @(posedge clk) rd_data <= 12'd2048;

  // raster position kept here, advanced on each output pixel
  int px = -1, py = 0;
  int n_trace, n_trig, n_white, n_title, n_text, n_bad, n_hs_bad, n_vs_bad, n_blank_bad, n_pix;
  logic vclk_q;
  int vclk_bad;

  task automatic clear_counts();
    n_trace = 0; n_trig = 0; n_white = 0; n_title = 0; n_text = 0; n_bad = 0;
    n_hs_bad = 0; n_vs_bad = 0; n_blank_bad = 0; n_pix = 0;
  endtask

  // outputs change on clock edges where vga_clk falls
  always @(posedge clk) begin
    vclk_q <= vclk;
  end
  always @(negedge clk) if (!rst) begin
    if (vclk == vclk_q && px >= 0) vclk_bad++;
    if (!vclk && fstart) begin px = 0; py = 0; end
    else if (!vclk && px >= 0) begin
      px++;
      if (px == 800) begin px = 0; py = (py + 1) % 525; end
    end
    if (!vclk && px >= 0) begin
      logic [23:0] c;
      bit vis;
      c = {r, g, b};
      vis = px < 640 && py < 480;
      n_pix++;
      if (hs != !(px >= 656 && px < 752)) n_hs_bad++;
      if (vs != !(py >= 490 && py < 492)) n_vs_bad++;
      if (blank_n != vis) n_blank_bad++;
      if (!vis && c != 0) n_bad++;
      if (c == 24'h00C0C0) begin
        n_trace++;
        if (py != 232 || px < 64 || px > 575 || mode != MODE_SCOPE) n_bad++;
      end
      if (c == 24'h00FF00) begin
        n_trig++;
        if (py != 331 || px < 64 || px > 575) n_bad++;
      end
      if (c == 24'hFFFFFF) begin
        n_white++;
        if (!(px == 64 || px == 575 || px == 320 || py == 40 || py == 425 || py == 233)) n_bad++;
      end
      if (c == 24'hFFFF00) begin
        n_title++;
        if (py < 16 || py > 31) n_bad++;
      end
      if (c == 24'h00FFFF) begin
        n_text++;
        if (mode == MODE_SCOPE && (py < 432 || py > 463)) n_bad++;
        if (mode == MODE_DMM && (py < 112 || py > 303)) n_bad++;
      end
    end
  end

  task automatic one_frame();
    @(posedge fstart);
    @(negedge clk);
    clear_counts();
    @(posedge fstart);
    @(negedge clk);
  endtask

  initial begin
    mode = MODE_SCOPE; level = 12'd1000; vclk_bad = 0; clear_counts();
    repeat (5) @(posedge clk);
    rst <= 0;
    one_frame();
    checks += 6;
    if (n_pix != 800 * 525) begin failures++; $display("FAIL %0d pixels per frame", n_pix); end
    if (n_hs_bad + n_vs_bad + n_blank_bad != 0) begin failures++; $display("FAIL sync/blank errors %0d %0d %0d", n_hs_bad, n_vs_bad, n_blank_bad); end
    if (n_bad != 0) begin failures++; $display("FAIL %0d misplaced pixels (scope)", n_bad); end
    // trace: 512 columns minus where text/grid would win (none on row 232 but the frame columns)
    if (n_trace < 500) begin failures++; $display("FAIL only %0d trace pixels", n_trace); end
    if (n_trig < 500) begin failures++; $display("FAIL only %0d trigger-line pixels", n_trig); end
    if (n_white < 2 * 512 + 2 * 386 || n_title == 0 || n_text == 0) begin
      failures++; $display("FAIL chart %0d title %0d text %0d", n_white, n_title, n_text);
    end
    mode = MODE_DMM;
    one_frame();
    checks += 3;
    if (n_bad != 0) begin failures++; $display("FAIL %0d misplaced pixels (meter)", n_bad); end
    if (n_trace + n_trig + n_white != 0) begin failures++; $display("FAIL scope graphics in meter mode"); end
    if (n_text < 1000 || n_title == 0) begin failures++; $display("FAIL meter text %0d title %0d", n_text, n_title); end
    checks++;
    if (vclk_bad != 0) begin failures++; $display("FAIL vga_clk not toggling every clock (%0d)", vclk_bad); end
    checks++;
    if (sync_n != 1'b0) begin failures++; $display("FAIL sync_n"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

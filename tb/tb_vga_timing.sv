// tb_vga_timing: runs the raster for two frames with a pixel enable every
// other clock and checks the 640 x 480 at 60 Hz timing: 800 pixels per line
// with hsync low for pixels 656..751, 525 lines per frame with vsync low on
// lines 490..491, 640 x 480 active pixels, one frame start per frame.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pix_en;
  logic [9:0] h, v;
  logic hs, vs, act, fs;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst, .pix_en, .hcount(h), .vcount(v), .hsync_n(hs),
                  .vsync_n(vs), .active(act), .frame_start(fs));

  always @(posedge clk) pix_en <= rst ? 1'b0 : !pix_en;

  // reference raster, advanced on the same enables
  int rh = 0, rv = 0;
  longint nact = 0, nfs = 0, nhs_bad = 0, nvs_bad = 0, npix = 0;
  always @(negedge clk) if (!rst && pix_en) begin
    // values shown now belong to (rh, rv); they change at the coming edge
    npix++;
    if (h != 10'(rh) || v != 10'(rv)) begin
      failures++;
      if (failures < 5) $display("FAIL counter (%0d,%0d) expected (%0d,%0d)", h, v, rh, rv);
    end
    if (hs != !(rh >= 656 && rh < 752)) nhs_bad++;
    if (vs != !(rv >= 490 && rv < 492)) nvs_bad++;
    if (act != (rh < 640 && rv < 480)) failures++;
    if (act) nact++;
    if (fs) nfs++;
    rh = rh + 1;
    if (rh == 800) begin rh = 0; rv = (rv + 1) % 525; end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (npix == 2 * 800 * 525);
    @(negedge clk);
    checks += 5;
    if (nhs_bad != 0) begin failures++; $display("FAIL %0d hsync errors", nhs_bad); end
    if (nvs_bad != 0) begin failures++; $display("FAIL %0d vsync errors", nvs_bad); end
    if (nact != 2 * 640 * 480) begin failures++; $display("FAIL %0d active pixels", nact); end
    if (nfs != 2) begin failures++; $display("FAIL %0d frame starts", nfs); end
    if (h != 0 || v != 0) begin failures++; $display("FAIL not back at the origin"); end
    checks += int'(npix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

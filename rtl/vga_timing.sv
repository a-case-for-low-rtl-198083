// vga_timing: 640 x 480 at 60 Hz VGA raster counters and sync.
//
// Counts pixels and lines on each `pix_en` (25 MHz), 800 pixels by 525 lines
// per frame: 640 visible, 16 front porch, 96 sync, 48 back porch horizontally;
// 480 visible, 10 front porch, 2 sync, 33 back porch vertically. Both syncs
// are active low. `hsync_n`, `vsync_n` and `active` are decoded from the
// current counter values; `frame_start` is high for the first pixel of a frame.
// The 640 x 480 screen follows the document; the standard timing values are
// this design's.
module vga_timing #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       active,
  output logic       frame_start
);
  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (hcount == 10'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign hsync_n = !((hcount >= 10'(H_VISIBLE + H_FRONT)) &&
                     (hcount <  10'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vsync_n = !((vcount >= 10'(V_VISIBLE + V_FRONT)) &&
                     (vcount <  10'(V_VISIBLE + V_FRONT + V_SYNC)));
  assign active      = (hcount < 10'(H_VISIBLE)) && (vcount < 10'(V_VISIBLE));
  assign frame_start = (hcount == '0) && (vcount == '0);
endmodule

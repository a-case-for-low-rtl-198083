// ram_ctrl: the two capture buffers and the choice of which one is written.
//
// The capture side writes into buffer `wr_sel`; the display side always reads
// the other one, so a capture in progress is never shown half-written and the
// two sides never touch the same buffer. `wr_sel` comes from the trigger
// controller, which flips it when a capture is complete. Read latency is one
// clock; the buffer choice is registered with the address so that the data
// returned belongs to the buffer that was selected when the address was given.
// Two alternating buffers, written by the capture and read by the display,
// follow the document; the exact switching point is this design's choice.
module ram_ctrl
  import lab_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_sel,   // buffer being written (0 = RAM0, 1 = RAM1)
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  sample_t       wr_data,
  input  logic [AW-1:0] rd_addr,
  output sample_t       rd_data
);
  sample_t rd_data0, rd_data1;
  logic    rd_sel_q;

  sample_ram #(.DEPTH(DEPTH), .WIDTH(ADC_BITS)) u_ram0 (
    .clk, .wr_en(wr_en && !wr_sel), .wr_addr, .wr_data,
    .rd_addr, .rd_data(rd_data0));

  sample_ram #(.DEPTH(DEPTH), .WIDTH(ADC_BITS)) u_ram1 (
    .clk, .wr_en(wr_en && wr_sel), .wr_addr, .wr_data,
    .rd_addr, .rd_data(rd_data1));

  always_ff @(posedge clk) rd_sel_q <= !wr_sel;

  assign rd_data = rd_sel_q ? rd_data1 : rd_data0;
endmodule

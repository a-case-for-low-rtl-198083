// sample_ram: one capture buffer, DEPTH words of WIDTH bits.
//
// One write port and one read port on the same clock. The read is registered:
// rd_data holds mem[rd_addr] one clock after rd_addr is presented. Written as an
// array so that synthesis maps it to block RAM or registers as it sees fit.
// The depth (512 words, one per pixel column of the waveform area) follows the
// document; the port arrangement is this design's choice.
module sample_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

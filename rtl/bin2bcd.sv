// bin2bcd: binary to packed BCD, combinational (shift-and-add-3).
//
// For each input bit, MSB first, every BCD digit of 5 or more gets 3 added and
// the whole digit string shifts left taking in the bit. DIGITS must be enough
// for the largest input (ceil(BIN_W * log10(2)) digits); bcd[3:0] is the units.
module bin2bcd #(
  parameter int unsigned BIN_W  = 13,
  parameter int unsigned DIGITS = 4
) (
  input  logic [BIN_W-1:0]    bin,
  output logic [4*DIGITS-1:0] bcd
);
  // stage[i] holds the digits after the top i input bits have been shifted in
  logic [4*DIGITS-1:0] stage [BIN_W + 1];
  logic [4*DIGITS-1:0] adj   [BIN_W];

  assign stage[0] = '0;
  for (genvar i = 0; i < BIN_W; i++) begin : g_bit
    for (genvar d = 0; d < DIGITS; d++) begin : g_digit
      assign adj[i][4*d +: 4] = (stage[i][4*d +: 4] >= 4'd5) ? stage[i][4*d +: 4] + 4'd3
                                                              : stage[i][4*d +: 4];
    end
    assign stage[i+1] = {adj[i][4*DIGITS-2:0], bin[BIN_W-1-i]};
  end

  assign bcd = stage[BIN_W];
endmodule

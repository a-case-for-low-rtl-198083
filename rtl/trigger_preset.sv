// trigger_preset: push-button selection of the trigger level.
//
// The active-low button is synchronised, debounced (the level must stay put for
// DEBOUNCE_CYCLES clocks) and each press steps the level through nine presets,
// 0 V to 4 V in 0.5 V steps, wrapping from 4 V back to 0 V. The level is given
// as an ADC code for an input range of FULL_SCALE_MV. After reset the level is
// 0 V. The nine presets and the stepping on each press follow the document; the
// debounce time and the reset value are this design's choices.
module trigger_preset
  import lab_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,   // 20 ms at 50 MHz
  parameter int unsigned FULL_SCALE_MV   = 4096
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    key_n,       // raw push button, low when pressed
  output logic [3:0] index,    // 0..8
  output sample_t level,
  output logic    pressed      // one-clock pulse per accepted press
);
  localparam int unsigned DW = $clog2(DEBOUNCE_CYCLES + 1);

  logic [1:0]    sync;
  logic          stable;       // debounced, 1 = pressed
  logic [DW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b00;
      stable  <= 1'b0;
      cnt     <= '0;
      index   <= '0;
      pressed <= 1'b0;
    end else begin
      sync    <= {sync[0], !key_n};
      pressed <= 1'b0;
      if (sync[1] == stable) begin
        cnt <= '0;
      end else if (cnt == DW'(DEBOUNCE_CYCLES - 1)) begin
        cnt    <= '0;
        stable <= sync[1];
        if (sync[1]) begin
          pressed <= 1'b1;
          index   <= (index == 4'(NUM_TRIG_PRESETS - 1)) ? '0 : index + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb level = mv_to_code(32'(index) * TRIG_STEP_MV, FULL_SCALE_MV);
endmodule

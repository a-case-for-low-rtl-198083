// freq_meter: period count and frequency of the input signal.
//
// The trigger level, widened by +/-HYST codes into an upper threshold (max) and
// a lower one (min), gives the crossings that bound one period. The state
// machine follows the document's frequency flow: in DC mode it idles; in AC
// mode it takes the current trigger level, looks at where the signal is and
//  - if it is above max: waits for it to fall below min, starts counting clock
//    cycles, waits until it is above max, then stops at the next fall below min;
//  - otherwise: waits for it to rise above max, starts counting, waits until it
//    is below min, then stops at the next rise above max.
// The count is one period in clock cycles; a sequential divider then forms
// CLK_HZ / count, the frequency in Hz (saturated to 999999), and the machine
// starts over. `freq_valid` pulses with each new result, about 32 clocks after
// the period ends. Thresholds are compared with samples from the full-rate ADC
// stream, so the period resolution is one sample period (2 us at 500 kS/s).
// The hysteresis width, the symmetric second branch and abandoning a measurement
// when DC mode or a new trigger level is selected are this design's choices.
module freq_meter
  import lab_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned HYST   = 50           // codes (50 mV at full scale 4096 mV)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    dc_mode,
  input  sample_t trig_level,
  input  sample_t sample,
  input  logic    sample_valid,
  output freq_t   freq_hz,
  output logic [31:0] period_clks,
  output logic    freq_valid
);
  typedef enum logic [3:0] {
    S_MODE, S_UPDATE, S_DECIDE,
    S_H_WAIT_LOW, S_H_WAIT_HIGH, S_H_WAIT_LOW2,   // signal started high
    S_L_WAIT_HIGH, S_L_WAIT_LOW, S_L_WAIT_HIGH2,  // signal started low
    S_CALC
  } state_t;

  state_t      state;
  sample_t     th_max, th_min;
  sample_t     level_q;        // trigger level the thresholds were made from
  logic [31:0] cnt;
  logic        counting;
  logic        div_start, div_done;
  logic [31:0] quotient;

  udiv #(.WIDTH(32)) u_div (
    .clk, .rst, .start(div_start), .dividend(32'(CLK_HZ)), .divisor(cnt),
    .quotient, .busy(), .done(div_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_MODE;
      th_max      <= '0;
      th_min      <= '0;
      level_q     <= '0;
      cnt         <= '0;
      counting    <= 1'b0;
      div_start   <= 1'b0;
      freq_hz     <= '0;
      period_clks <= '0;
      freq_valid  <= 1'b0;
    end else begin
      div_start  <= 1'b0;
      freq_valid <= 1'b0;
      if (counting) cnt <= cnt + 1'b1;

      // Selecting DC mode or a new trigger level abandons a measurement in
      // progress; otherwise a level the signal never reaches would hold the
      // machine in a wait state for good.
      if ((dc_mode || trig_level != level_q) && state != S_CALC && state != S_MODE &&
          state != S_UPDATE) begin
        counting <= 1'b0;
        state    <= S_MODE;
      end else begin
      unique case (state)
        S_MODE: if (!dc_mode) state <= S_UPDATE;
        S_UPDATE: begin
          th_max <= (32'(trig_level) + HYST > 32'((1 << ADC_BITS) - 1)) ?
                    sample_t'((1 << ADC_BITS) - 1) : sample_t'(32'(trig_level) + HYST);
          th_min <= (32'(trig_level) < HYST) ? '0 : sample_t'(32'(trig_level) - HYST);
          level_q <= trig_level;
          state  <= S_DECIDE;
        end
        S_DECIDE: if (sample_valid) state <= (sample > th_max) ? S_H_WAIT_LOW : S_L_WAIT_HIGH;
        // signal started above max: period from one fall below min to the next
        S_H_WAIT_LOW: if (sample_valid && sample < th_min) begin
          cnt <= '0; counting <= 1'b1; state <= S_H_WAIT_HIGH;
        end
        S_H_WAIT_HIGH: if (sample_valid && sample > th_max) state <= S_H_WAIT_LOW2;
        S_H_WAIT_LOW2: if (sample_valid && sample < th_min) begin
          counting <= 1'b0; div_start <= 1'b1; state <= S_CALC;
        end
        // signal started at or below max: period from one rise above max to the next
        S_L_WAIT_HIGH: if (sample_valid && sample > th_max) begin
          cnt <= '0; counting <= 1'b1; state <= S_L_WAIT_LOW;
        end
        S_L_WAIT_LOW: if (sample_valid && sample < th_min) state <= S_L_WAIT_HIGH2;
        S_L_WAIT_HIGH2: if (sample_valid && sample > th_max) begin
          counting <= 1'b0; div_start <= 1'b1; state <= S_CALC;
        end
        S_CALC: if (div_done) begin
          freq_hz     <= (quotient > 32'(FREQ_MAX)) ? freq_t'(FREQ_MAX) : freq_t'(quotient);
          period_clks <= cnt;
          freq_valid  <= 1'b1;
          state       <= S_MODE;
        end
        default: state <= S_MODE;
      endcase
      end
    end
  end
endmodule

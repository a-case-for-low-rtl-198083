// trigger_ctrl: trigger state machine and capture write counter.
//
// In AC mode a capture of the next DEPTH samples (one per `sample_en`) starts
// when the input passes the trigger level on a rising edge, and only once the
// previous capture has finished, i.e. the write counter has passed CAPTURE_END
// (525). Samples with counter values below DEPTH are written to the buffer
// `wr_sel`; when the counter passes CAPTURE_END the buffer is complete and
// `wr_sel` flips, so the display turns to it and the next capture goes to the
// other buffer. In DC mode a new capture starts as soon as the last one ends,
// with no trigger, so a steady level is shown.
//
// "Equal to the trigger level" is taken as: the level lies between the previous
// and the current sample, both included, so a level crossed between two samples
// is not missed. "Rising" means the current sample is above the previous one.
//
// States follow the document's trigger flow: MODE picks AC or DC, WAIT looks
// for the level and the rising edge, RESTART resets the counter if the last
// capture is done, CLEAR forgets the previous sample, then back to MODE. The
// level-crossing test and the flip of the buffer at the end of a capture are
// this design's choices, as is leaving WAIT when DC mode is selected (otherwise
// a signal that never reaches the level would hold the machine there). All outputs are registered; a write happens one clock
// after its `sample_en`.
module trigger_ctrl
  import lab_pkg::*;
#(
  parameter int unsigned DEPTH       = 512,
  parameter int unsigned CAPTURE_END = 525,
  localparam int unsigned AW         = $clog2(DEPTH),
  localparam int unsigned CW         = $clog2(CAPTURE_END + 2)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          dc_mode,
  input  sample_t       trig_level,
  input  sample_t       sample,
  input  logic          sample_en,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output sample_t       wr_data,
  output logic          wr_sel,
  output logic          capture_done,   // one-clock pulse: buffer complete
  output logic          triggered       // one-clock pulse: AC capture started
);
  typedef enum logic [2:0] {S_MODE, S_WAIT, S_RESTART, S_CLEAR, S_DC} state_t;
  state_t  state;
  sample_t prev;
  logic    have_prev;
  logic [CW-1:0] cnt;
  logic    done;
  logic    hit, rise;

  assign done = cnt > CW'(CAPTURE_END);
  assign hit  = have_prev &&
                (((prev <= trig_level) && (sample >= trig_level)) ||
                 ((prev >= trig_level) && (sample <= trig_level)));
  assign rise = sample > prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_MODE;
      prev         <= '0;
      have_prev    <= 1'b0;
      cnt          <= CW'(CAPTURE_END + 1);
      wr_en        <= 1'b0;
      wr_addr      <= '0;
      wr_data      <= '0;
      wr_sel       <= 1'b0;
      capture_done <= 1'b0;
      triggered    <= 1'b0;
    end else begin
      wr_en        <= 1'b0;
      capture_done <= 1'b0;
      triggered    <= 1'b0;

      // Write counter: runs one step per sample until it passes CAPTURE_END.
      if (sample_en) begin
        prev      <= sample;
        have_prev <= 1'b1;
        if (!done) begin
          cnt <= cnt + 1'b1;
          if (cnt < CW'(DEPTH)) begin
            wr_en   <= 1'b1;
            wr_addr <= AW'(cnt);
            wr_data <= sample;
          end
          if (cnt == CW'(CAPTURE_END)) begin
            wr_sel       <= !wr_sel;
            capture_done <= 1'b1;
          end
        end
      end

      unique case (state)
        S_MODE: state <= dc_mode ? S_DC : S_WAIT;
        S_WAIT: begin
          if (dc_mode)                        state <= S_MODE;
          else if (sample_en && hit && rise)  state <= S_RESTART;
        end
        S_RESTART: begin
          if (done) begin
            cnt       <= '0;
            triggered <= 1'b1;
          end
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          have_prev <= 1'b0;
          state  <= S_MODE;
        end
        S_DC: begin
          if (done) cnt <= '0;
          if (!dc_mode) state <= S_MODE;
        end
        default: state <= S_MODE;
      endcase
    end
  end

  // A capture only restarts from a finished counter.
  assert property (@(posedge clk) disable iff (rst) triggered |-> $past(done));
endmodule

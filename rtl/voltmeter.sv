// voltmeter: the multimeter's readings, Vmax, Vmin and Vrms, in millivolts.
//
// Over a window of 2**WINDOW_LOG2 full-rate ADC samples (0.26 s at the default
// 2**17 samples and 500 kS/s, long enough to hold two periods of a 10 Hz
// signal) the highest and lowest codes are tracked. At the end of each window
// they are converted to millivolts (code * FULL_SCALE_MV / 4096), published, and
// tracking restarts. Vrms is computed from the peak as Vmax / sqrt(2)
// (Vmax * 46341 / 65536), the sine-wave relation that the instrument's published
// readings follow (4.173 V max with 2.950 V RMS). `update` pulses one clock
// after a window closes. Highest, lowest and RMS follow the document; the window
// length and the scaling are this design's choices.
module voltmeter
  import lab_pkg::*;
#(
  parameter int unsigned WINDOW_LOG2   = 17,
  parameter int unsigned FULL_SCALE_MV = 4096
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t sample,
  input  logic    sample_valid,
  output mv_t     vmax_mv,
  output mv_t     vmin_mv,
  output mv_t     vrms_mv,
  output logic    update
);
  logic [WINDOW_LOG2-1:0] n;
  sample_t run_max, run_min;
  sample_t win_max, win_min;
  logic    close;

  always_ff @(posedge clk) begin
    if (rst) begin
      n       <= '0;
      run_max <= '0;
      run_min <= '1;
      win_max <= '0;
      win_min <= '0;
      close   <= 1'b0;
    end else begin
      close <= 1'b0;
      if (sample_valid) begin
        n <= n + 1'b1;
        if (n == '1) begin
          // last sample of the window
          win_max <= (sample > run_max) ? sample : run_max;
          win_min <= (sample < run_min) ? sample : run_min;
          run_max <= '0;
          run_min <= '1;
          close   <= 1'b1;
        end else begin
          if (sample > run_max) run_max <= sample;
          if (sample < run_min) run_min <= sample;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vmax_mv <= '0;
      vmin_mv <= '0;
      vrms_mv <= '0;
      update  <= 1'b0;
    end else begin
      update <= close;
      if (close) begin
        vmax_mv <= code_to_mv(win_max, FULL_SCALE_MV);
        vmin_mv <= code_to_mv(win_min, FULL_SCALE_MV);
        vrms_mv <= peak_to_rms(code_to_mv(win_max, FULL_SCALE_MV));
      end
    end
  end
endmodule

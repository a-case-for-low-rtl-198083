# FPGA bench instrument: oscilloscope and voltmeter on a VGA screen

A student development board (Terasic DE1-SoC, Cyclone V) already carries a
12-bit, 500 kS/s ADC, switches, push buttons and a VGA output. This design
turns that board into a low-cost piece of lab equipment with two instruments
that share one acquisition path:

* a **triggered oscilloscope** that draws 512 samples of the input on a
  640 x 480 screen together with a graduated chart, the trigger level, the
  highest, lowest and RMS voltage, and the signal frequency; and
* a **digital voltmeter** screen that shows the same three voltages in large
  digits.

Everything is plain logic clocked at 50 MHz. There is no processor, no PLL
and no vendor IP, so the RTL can be simulated with plain Verilator.

```
 ADC chip ──SPI──► ltc2308_ctrl ──► sample @500 kS/s ─┬─► freq_meter ──► Hz ─────────┐
                                                      ├─► voltmeter  ──► Vmax/Vmin/Vrms
                                                      └─► timebase ──► trigger_ctrl ─► ram_ctrl
                                                                       (2 x 512 buffers) │
 key 3 ──► trigger_preset ──► trigger level ──► trigger_ctrl, freq_meter, display        │
                                                                                         ▼
                                                         video_out (timing, chart, trace, text) ──► VGA
```

## Controls

| Control  | Function |
|----------|----------|
| `sw[0]`  | reset while high (synchronised to the clock) |
| `sw[1]`  | 0 = AC: triggered capture and frequency meter; 1 = DC: free-running capture, no frequency |
| `sw[3]`  | 0 = oscilloscope screen, 1 = voltmeter screen |
| `sw[9:6]`| time base: one point every 2^n ADC samples (n = 0..15) |
| `key_n[3]` | each press steps the trigger level 0, 0.5, 1, ... 4 V and back to 0 V |

Only `sw[1]` is this design's own assignment. The other controls are
assigned as on the original instrument.

## Voltage scale

The converter runs unipolar from its internal 4.096 V reference. With
`FULL_SCALE_MV = 4096`, one ADC code is exactly one millivolt, so readings
are the codes themselves. The original instrument quotes its usable range as
"0 to 4 V, about 4.2 V" and has shown readings up to 4.176 V. If your board's
range differs, set `FULL_SCALE_MV` to match (for example 4200). The parameter
scales the trigger presets (`lab_pkg::mv_to_code`) and the voltmeter readings
(`code_to_mv`). Inputs outside 0..full scale need external clamping and
scaling, and that is not part of the RTL.

## Acquisition: `ltc2308_ctrl`

Every `SAMPLE_PERIOD` = 100 clocks (500 kS/s), the controller does four things:

1. It raises CONVST for 2 clocks.
2. It waits `CONV_CYCLES` = 70 clocks (1.4 µs) for the conversion.
3. It runs 12 SCK periods at 25 MHz (clk/2).
4. It shifts the 6-bit configuration word out on SDI and the previous
   result in from SDO, MSB first.

The configuration selects single-ended and unipolar, with sleep off, on channel
`CHANNEL`. `sample_valid` pulses for one clock when a result is ready. An
initial assertion checks that the frame fits inside the sample period. The
rest of the design only ever sees the `sample`/`sample_valid` pair.

## Triggered, double-buffered capture

This is the part that makes the screen stable. It is also the least obvious part.

**Time base (`timebase`).** Only one sample in 2^`sel` goes on to the
capture. This slows the horizontal sweep by powers of two, from 1 ms per
screen (512 points x 2 µs) up to about 33 s. The frequency meter and
voltmeter still see every sample.

**Trigger state machine (`trigger_ctrl`).** The controller cycles through
MODE → WAIT → RESTART → CLEAR → MODE:

* **MODE** chooses between AC and DC.
* **WAIT** (AC only) compares each new point with the one before it.
  It triggers when two conditions hold together:
  * the trigger level lies between the two points, ends included;
  * the new point is higher than the old one, so the signal is rising.

  A sampled signal almost never hits a 12-bit level exactly. Testing for a
  crossing between two points means a fast edge is never missed.
* **RESTART** clears the write counter, but only if the previous capture is
  complete. A trigger that arrives while a capture is still running is ignored.
* **CLEAR** forgets the previous point, so the next trigger needs two fresh
  points.

WAIT is left early if DC mode is switched on. Without that exit, a trigger
level that the signal never reaches would block the switch to DC.

**Write counter and buffer flip.** After a restart the counter advances once
per time-base point.

* Points with counter values 0..511 go to addresses 0..511 of the buffer
  selected by `wr_sel`.
* The counter then runs on, unwritten, to 525 (`CAPTURE_END`). That gives a
  short hold-off before the next trigger.
* When it passes 525, `wr_sel` flips and `capture_done` pulses.

In DC mode a new capture starts right away, so a steady level is still
redrawn.

**Buffers (`ram_ctrl`, `sample_ram`).** There are two 512 x 12-bit arrays,
each with one write port and one registered read port. The display always
reads the buffer *not* being written (`rd_sel = !wr_sel`, registered). It
therefore only ever shows a complete, triggered capture. A waveform that
stops triggering leaves its last capture on the screen.

The capture runs at sample rate and the display at 25 MHz pixel rate. They
share nothing except the `wr_sel` bit, which only changes between captures.
A buffer may change in the middle of a frame, which can tear one frame, and
that is accepted.

## Frequency meter: `freq_meter`

The meter measures the period with a counter running between crossings of
the trigger level, then divides. Two thresholds, **max** = level + `HYST` and
**min** = level − `HYST` (`HYST` = 50 codes, 50 mV), stop noise near the
level from causing false crossings. The state machine first latches the
current trigger level, then branches on where the signal is:

* **Signal above max.** Wait for a fall below min and start counting clock
  cycles. Wait for a rise above max, then stop at the next fall below min.
* **Otherwise.** Wait for a rise above max and start counting. Wait for a fall
  below min, then stop at the next rise above max.

Either way, the counter spans exactly one full period. A 32-step restoring
divider (`udiv`) then computes `CLK_HZ / count`. The result is saturated to
999 999 to fit the six-digit readout, and `freq_valid` pulses. A
measurement is dropped if DC mode is selected or the trigger level changes.
The signal must actually cross level ± 50 mV to be measured, so a preset
must lie inside the signal's swing with 50 mV to spare. A signal that stays
between 10 and 280 mV, for example, shows its voltages but no frequency: the
0 V preset cannot be undershot and the 0.5 V preset is never reached.

Resolution follows from the sampling. Crossings are seen only at sample
instants, so the period is known to ±1 sample (2 µs). At 1 kHz that is
±0.2 %. At 100 kHz the reading falls on 100 000 or 83 333 Hz. Above 250 kHz
(the Nyquist limit of 500 kS/s) readings are aliased and meaningless.

## Voltmeter: `voltmeter`

Over a window of 2^`WINDOW_LOG2` = 131 072 samples (0.26 s), the running
highest and lowest codes are kept. At the end of each window they are
converted to millivolts and published with an `update` pulse, and the window
restarts.

The RMS reading is **Vmax / √2** (Vmax · 46341 >> 16). This matches the
original instrument's published readings, for example 4.173 V max → 2.950 V
RMS. It is the RMS of a sine of peak Vmax centred on 0 V. It is *not* the RMS
of the signal the ADC actually sees. That signal is positive only, so it always
carries a DC offset. A 0–4 V sine, for instance, has a true RMS of 2.45 V, not
2.83 V. Other waveforms differ as well. A true RMS
would need a squaring accumulator and a square root, and is the obvious
extension.

## Display: `video_out` and helpers

`video_out` makes a 25 MHz pixel enable from the 50 MHz clock. `vga_timing`
generates the standard 640 x 480 at 60 Hz raster (800 x 525 total, negative
syncs). Each pixel is the OR of several layers, chosen in priority order:

| layer | module | where | colour |
|-------|--------|-------|--------|
| title | `text_gen` | top line, both screens | yellow |
| readings | `text_gen` | scope: two lines under the chart; voltmeter: large digits | cyan |
| trace | `wave_plot` | scope only | teal |
| trigger line | `grid_gen` | scope only | green |
| chart | `grid_gen` | scope only | white |

**Waveform area.** The area is 512 x 386 pixels at (64, 40), one column per
buffer word. For column x, `wave_plot` reads address x − 64 and lights the
pixel whose row is 425 − (code · 386 >> 12), so full scale sits at the top.
That gives one dot per column, with no joining lines. The RAM read takes one
clock, and the pixel enable is every second clock, so the data is ready in
time for the pixel.

**Chart.** The chart is drawn by comparing coordinates: the frame, one
vertical and one horizontal centre line, and a horizontal line at the trigger
level, which uses the same row mapping as the trace.

**Text.** `font_rom` is a 5 x 7 font held as a case statement on the
character code, with no memory file. `text_gen` maps each pixel to a
character cell and looks up the string character, then the font row. Digits
come from `bin2bcd` (shift-and-add-3). The oscilloscope screen uses 16-pixel
cells:

```
AN FPGA BASED DIGITAL OSCILLOSCOPE
V1(V):4.173MAX  F1(Hz):002000
V2(V):0.005MIN  V3(V):2.950RMS
```

The voltmeter screen shows `FPGA BASED DIGITAL VOLTMETER`, then
`d.dddVMAX`, `d.dddVMIN` and `d.dddVRMS` in 64-pixel cells.

Outputs are registered on the pixel enable. `vga_clk` is the inverted pixel
enable, so a video DAC latches in the middle of each pixel. `vga_blank_n`
follows the visible area, and `vga_sync_n` is held low (no sync on green).

## Parameters of the top, `fpga_lab_instrument`

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 50 000 000 | system clock |
| `SAMPLE_RATE` | 500 000 | ADC rate (sets `SAMPLE_PERIOD`) |
| `CONV_CYCLES` | 70 | ADC conversion wait |
| `DEPTH` | 512 | points per capture (= waveform width) |
| `CAPTURE_END` | 525 | counter value that ends a capture |
| `DEBOUNCE_CYCLES` | 1 000 000 | 20 ms button debounce |
| `METER_WINDOW_LOG2` | 17 | voltmeter window |
| `FULL_SCALE_MV` | 4096 | millivolts at full scale |
| `HYST` | 50 | frequency-meter threshold offset in codes |

Shared types, constants and conversion functions live in `rtl/lab_pkg.sv`.

## What follows the original instrument and what does not

These features come from the original instrument:

* the ADC rate and resolution
* the two alternating 512-word buffers
* the trigger and frequency flows (AC/DC mode, the wait on the trigger value
  with a rising edge, a counter reset past 525, thresholds max/min around the
  trigger)
* the nine trigger presets on push button 3
* reset on SW0, instrument select on SW3, time base on SW6–SW9
* the 512 x 386 waveform area on 640 x 480 VGA
* the screen texts
* the RMS-from-peak relation shown by the original readings

These are choices made here:

* the 50 MHz single-clock structure and ADC frame timing
* crossing-based triggering and the buffer flip at the end of a capture
* the AC/DC switch on `sw[1]`
* the ±50-code thresholds
* the mirrored second branch of the frequency flow
* the divider
* the exits from waiting states on a mode or level change
* debounce time
* voltmeter window
* the 4.096 V full scale
* the power-of-two time base
* layout, font, sizes and colours

Known limits:

* The frequency range is limited by 500 kS/s sampling, as described above.
* The RMS reading is Vmax/√2, which is exact only for a sine centred on 0 V.
* There is no input conditioning, so the usable range is 0 V to full scale.
* The buffers are written as arrays. A Cyclone V will map them to block RAM,
  whereas the original build used logic for them.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/ltc2308_model.sv` is a behavioural model
of the ADC's serial port. It checks the CONVST/SCK timing and returns a code
given by the testbench. For example:

```
verilator --binary -Irtl --top-module tb_trigger_ctrl \
    rtl/lab_pkg.sv rtl/trigger_ctrl.sv tb/tb_trigger_ctrl.sv
./obj_dir/Vtb_trigger_ctrl
```

The top has two testbenches:

* **`tb_fpga_lab_instrument`** runs the whole design end to end with a
  100-clock debounce and a 4096-sample voltmeter window. It drives a 2 kHz,
  1–3 V sine and sets a 2 V trigger level with four button presses. It then
  checks four things:
  * the frequency, Vmax, Vmin and Vrms readings;
  * that a finished capture starts at the trigger level on a rising edge, both
    in the buffer and on screen;
  * the 800-clock write spacing at time base 3;
  * free-running DC capture without a frequency result.

  It also checks that a voltmeter frame holds text and no trace. It counts
  each mechanism and fails on any that never happened: button presses, AC
  triggers, buffer flips, frequency results, voltmeter updates, a slow time
  base, DC free-running, and both screens.
* **`tb_fpga_lab_instrument_full`** uses every default parameter. It drives a
  2 kHz, 0.2–2.2 V sine, presses the button once (0.5 V) and checks one full
  2^17-sample voltmeter window, the frequency, a triggered capture and one
  oscilloscope frame. It takes about 20 s with Verilator.

* **`tb_workloads`** plays a bench-test sweep through the whole design. It
  covers 28 signals: sine, triangle and square waves from 10 Hz to 2 MHz,
  between 0.01 and 4.18 V. For each, it selects the nearest trigger preset
  with the button, then checks the frequency reading (below Nyquist) and
  Vmax, Vmin and Vrms. Below 100 kHz all voltages come out within 15 mV.
  Above Nyquist the voltages still hold and the frequency reading is aliased.
  The run takes about 1.5 minutes.

List every file of `rtl/` with `lab_pkg.sv` first, plus the model and the
testbench, and give `--timing` or `--binary` as above.

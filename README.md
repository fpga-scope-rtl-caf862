# FPGA-Scope: a single-channel digital oscilloscope on an FPGA

This is the RTL for a digital oscilloscope that runs entirely in FPGA fabric and
uses a plain VGA monitor as its screen. An AD574 12-bit converter samples the input
at up to 10 kHz, so it can show signals up to about 1 kHz with at least ten samples
per period. The FPGA does everything else:

* captures four screen widths of samples;
* finds a trigger point so the trace stands still;
* measures the signal's average, peak-to-peak voltage and frequency;
* draws the trace, a grid and the numeric read-outs as one-bit-per-pixel images in
  block RAM;
* composes those images into a 1024x768, 60 Hz VGA picture.

The design follows the FPGA-Scope project proposal (a 6.111 final project). The
proposal sets out the block structure, the memory sizes, the double-buffered
waveform image, the write-warning and select signals, and the menu behaviour. It
leaves most of the numbers and the internals open. Where this RTL had to choose, the
choice is noted below and in the first comment of each file.

## How a picture is made

```
 buttons -> debounce -> menu_fsm --dt--> adc_controller --R/C#--> AD574
                          |  \--dt/dv image--> delta_t_bram          | STS, data[11:0]
                          |dt, dv                                    v
                          |                     samples_bram (2992 x 12) --> math_module
                          v                          | read               |   | trigger address
                     scaling_module <----------------+--------------------+   | statistics
                          | write (hidden bank)                                v
                          v                                            decimal_module
                     waveform_bram (2 banks, select) ---+                     | write
                                                        |                     v
                     delta_t_bram --------------------> vga_controller <-- numbers_bram
                                                        |  write_warning, select
                                                        v
                                                   VGA monitor
```

One measurement cycle:

1. **Capture.** `adc_controller` pulses the AD574's R/C# line once per sample
   period. Each time the converter's STS line falls (conversion done),
   `samples_bram` writes the 12-bit result at the next address. The same
   sample goes to `math_module`. After 2992 samples (4 x 748) the buffer is
   full and ignores the converter.
2. **Measure and trigger.** When the last sample arrives, `math_module`
   already knows the trigger address. About 70 clocks later it has the
   statistics, and it publishes them in the next vertical blanking interval.
3. **Draw.** `scaling_module` reads the 748-sample window centred on the
   trigger. It writes the whole 748 x 700 image into the waveform bank that
   is not on screen, then re-arms the capture buffer.
4. **Show.** At the start of the next vertical blank, `vga_controller`
   toggles `select`, so the new image is shown from the next frame on.
   `scaling_module` draws nothing until that swap has happened.

Meanwhile `decimal_module` redraws the numbers image whenever new statistics arrive
or delta-V changes. `menu_fsm` redraws the time-scale image whenever delta-t
changes. Both write only while the VGA controller is not scanning visible lines.

At the fastest rate a capture takes 0.3 s (2992 x 100 us), so the picture
updates about three times a second. Drawing takes 748 x 702 clocks (8.1 ms at
65 MHz). The proposal expected drawing to take longer than one 1/60 s frame, and
used that to argue for two waveform banks. This implementation is faster than
that, but it keeps the two banks: without them a half-drawn image could still
be shown.

## Trigger and measurements (`math_module`)

This is the least obvious part of the design. Everything is computed on the fly
as samples stream into the buffer. Nothing is read back.

* **Mid level.** Triggering and peak detection work around a mid level: the
  value `(max + min) / 2` of the *previous* capture, or 2048 after reset. The
  mid level follows the signal's offset with one capture of delay.
* **Hysteresis.** The signal is "high" once it reaches `mid + 32`. It is
  "low" once it falls below `mid - 32`. A capture starts in an undecided
  state and must go low first, so a capture that begins partway through a
  peak does not produce a false maximum.
* **Trigger.** The trigger is the first low-to-high transition at an index
  from 374 up to, but not including, 2992 - 374. That leaves half a screen of
  samples on each side. If there is none (a flat signal, or one that never
  crosses the mid level), the trigger address is 374. The window then starts
  at the beginning of the capture, which is free running.
* **Maxima and frequency.** During each high excursion the largest sample and
  its index are tracked. When the excursion ends, that index is recorded as a
  maximum. The distance between the first two maxima is the period in
  samples, P. The frequency is `f = 1 000 000 / (P x sample period in us)`,
  in Hz, computed with a 32-cycle serial divider. With fewer than two maxima,
  f = 0. The period is measured in whole samples, so a frequency whose
  period is not a whole number of sample periods is read slightly off. At
  10 kHz sampling, 1 kHz reads exactly, but 900 Hz (11.1 samples per period)
  reads as 909 Hz.
* **Peak-to-peak.** The largest minus the smallest sample of the capture.
* **Average.** The running sum of the capture divided by 2992.
* **Units.** The converter is taken as bipolar +-5 V, offset binary (code 2048
  = 0 V). Millivolts are computed as `(code - 2048) * 625 / 256`, truncated
  toward zero.
* **Publishing.** New values only appear while `write_warning` is low, with a
  one-cycle `stats_stb`.

The proposal names the three statistics, max/min tracking, "time between two
maxima", and triggering by crossing a threshold. The mid level, the hysteresis,
the trigger window and the units are choices made here.

## Drawing the trace (`scaling_module`)

The image is drawn one column at a time, one pixel per clock. For column `x`:

* the sample index is `trigger - 374/zoom + x/zoom`, where zoom is 10, 5, 2 or
  1 (see the delta-t table);
* the row is `350 - ((sample - 2048) * gain) >>> 12`, clipped to 0..699. Here
  gain is the number of rows that the full 4096-code range would span;
* a pixel is lit if its row lies between the previous and the current
  column's rows (so steep edges are drawn as solid lines), or if it is on a
  grid line: every 70 rows (10 vertical divisions) and every 50 columns.

Every pixel of the bank is rewritten, so no clearing pass is needed. The image
is stored row-major (`address = row * 748 + column`), so each column's writes
step through the memory 748 addresses apart.

## Settings

Button one selects delta-t for editing and button two selects delta-V. The up
and down buttons then step the selected setting by one, and saturate at each
end of the table. "Up" always means more per division. Until a select button has
been pressed, up and down do nothing. The tables are this design's own:

| delta-t | sample period | columns per sample | time per division |
|--------:|--------------:|-------------------:|------------------:|
| 0 | 100 us | 10 | 0.5 ms |
| 1 | 100 us | 5 | 1 ms |
| 2 | 100 us | 2 | 2.5 ms |
| 3 (reset) | 100 us | 1 | 5 ms |
| 4 | 200 us | 1 | 10 ms |
| 5 | 500 us | 1 | 25 ms |
| 6 | 1 ms | 1 | 50 ms |
| 7 | 2 ms | 1 | 100 ms |

| delta-V | gain (rows per 10 V) | volts per division |
|--------:|---------------------:|-------------------:|
| 0 | 7000 | 100 mV |
| 1 | 3500 | 200 mV |
| 2 | 1400 | 500 mV |
| 3 (reset) | 700 | 1 V |
| 4 | 350 | 2 V |
| 5 | 140 | 5 V |

Both tables are functions in `scope_pkg.sv`. To change them, edit those functions.

## Screen, timing and the write warning (`vga_controller`)

* Mode: 1024x768 at 60 Hz with a 65 MHz pixel clock. Horizontal timing is
  1024 + 24 + 136 + 160 clocks, vertical is 768 + 3 + 6 + 29 lines. Both syncs
  are active low.
* The whole design runs on this one clock.
* Layout:
  * waveform image, 748 x 700, at column 0, row 0, in green;
  * numbers image, 242 x 700, at column 748, in white;
  * time-scale image, 100 x 34, at column 0, row 712, in yellow.
* Memory reads take one clock. All outputs are registered and lag the beam
  counters by two clocks; sync and blank are delayed to match.
* `write_warning` is high for all 768 visible lines. The image writers get
  the 38 blank lines (51,072 clocks) per frame. A full numbers redraw
  (18,432 pixel writes) fits in one blank period.
* `select` = 0 shows bank 1 and writes bank 2. At the first blank line, if the
  drawing side has a finished image (`render_done`), `select` toggles and
  `swapped` pulses for one clock.

## Read-outs (`decimal_module`, `menu_fsm`, `text_writer`)

Both image writers use `text_writer`. It copies 8x8 glyphs from `font_rom` into
an image, one pixel per clock, and pauses while `write_warning` is high.

* **Numbers image.** Eight lines, 2x scale, at (16, 16), 24 rows apart:
  `AVG`, the average as sign + 5 digits + `mV`, `VPP` and its value in mV,
  `FREQ` and its value in Hz, `V/DIV` and the volts per division in mV.
  Shift-and-add-3 converters (`bin2bcd`) produce the digits, with leading
  zeros blanked.
* **Time-scale image.** Two lines at 1x scale: `T/DIV` and the time per
  division in us.

A request that arrives during a redraw is queued and served when the redraw
ends.

## Top-level interface (`fpga_scope`)

| port | dir | width | meaning |
|------|-----|------:|---------|
| clk, rst | in | 1 | 65 MHz clock, synchronous active-high reset |
| btn_n | in | 4 | raw buttons, active low: [0] delta-t, [1] delta-V, [2] up, [3] down |
| adc_data, adc_sts | in | 12, 1 | AD574 data lines and STS |
| adc_ce, adc_cs_n, adc_rc_n, adc_a0, adc_12_8 | out | 1 | AD574 control (CE = 1, CS# = 0, A0 = 0, 12/8# = 1, R/C# pulses low) |
| vga_r/g/b | out | 8 each | colour |
| vga_hsync_n, vga_vsync_n, vga_blank | out | 1 | sync (active low), blank (active high) |
| editing | out | 2 | 0 none, 1 delta-t, 2 delta-V |

Parameters:

* `CYCLES_PER_US` (65) sets the sample periods.
* `DEBOUNCE_CYCLES` (650,000, which is 10 ms) sets the debounce time.

Testbenches lower both to shorten simulation. The screen geometry, the capture
depth and the tables are in `scope_pkg`.

## Memory

| memory | size | bits |
|--------|------|-----:|
| samples | 2992 x 12 | 35,904 |
| numbers image | 700 x 242 x 1 | 169,400 |
| waveform image, two banks | 2 x 700 x 748 x 1 | 1,047,200 |
| time-scale image | 34 x 100 x 1 | 3,400 |
| total | | 1,255,904 |

The total is 1.26 Mbit. That is within the proposal's budget of
2^16 + 2^18 + 2^20 + 2^12 bits, and within the 2.9 Mbit of block RAM it gives
for the target FPGA. The image memories are
initialised blank. Every memory uses a registered read, so they map onto block
RAM.

## Departures and limits

* Most numbers are this design's own: the setting tables, the grid spacing, the
  screen mode and layout, the colours, the voltage range, the hysteresis and
  the font. The proposal gives only the image and buffer sizes, the 10 kHz
  converter limit and the 60 Hz refresh.
* The proposal mentions triggering on peaks as a first step and on a threshold
  crossing as the goal. Only the threshold crossing is built.
* There is no delta-t input to the math module in the proposal's block
  diagram. One is added, because converting a period in samples to hertz needs
  the sample period.
* The capture freezes when full and restarts only after its image is drawn.
  Samples arriving in the meantime are dropped. The proposal does not say how
  capturing and drawing share the buffer.
* The multi-channel extension the proposal mentions as a possibility is not
  built.
* The AD574 itself, the buttons and the monitor are outside the FPGA.
  `tb/ad574_model.sv` is a simple behavioural model of the converter: it
  samples the input code when R/C# falls and lowers STS a fixed number of
  clocks later.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scope_pkg.sv tb/tb_fpga_scope.sv \
    --top-module tb_fpga_scope -Mdir obj_tb_fpga_scope -o sim
obj_tb_fpga_scope/sim
```

The end-to-end and workload testbenches:

* `tb_fpga_scope`: the whole design with the AD574 model, using a 2-clock
  microsecond and a 20-clock debounce. It covers:
  * capture time, trigger and statistics;
  * the picture on the VGA pins (grid, trace at the trigger level, text
    placement);
  * button bounce;
  * a slower sample rate and horizontal stretch;
  * a delta-V change;
  * free running on a constant input;
  * writers held by the write warning.

  It counts each of these mechanisms and fails if one never happened. It runs
  in about 30 s.
* `tb_fpga_scope_full`: one full measurement with all parameters at their
  defaults: 19.4 million clocks of capture at 10 kHz, then drawing, the swap
  and one checked frame. It runs in about 30 s.
* `tb_workloads`: square, sawtooth and sine waves at 50 Hz, 250 Hz and 1 kHz
  through the whole design. It checks exact frequency readings and plausible
  peak-to-peak and average values.

Concurrent assertions check the handshakes while any testbench runs with
`--assert`:

* a full capture buffer is never written;
* drawing waits for a complete capture;
* writes stay inside the image;
* the bank swap happens only in blanking and only for a finished image.

The unit testbenches check the following against values worked out
independently:

* `tb_scaling_module` compares every pixel of four full-size images, and the
  cycle count.
* `tb_vga_controller` checks every pixel and sync output over three frames.
* `tb_decimal_module` and `tb_menu_fsm` read back every glyph they draw.
* `tb_math_module` compares the statistics and trigger with a reference
  computed from the same samples.

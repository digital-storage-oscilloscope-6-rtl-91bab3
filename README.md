# Two-channel digital storage oscilloscope on an FPGA

This design turns an FPGA board into a small two-channel digital storage oscilloscope. The
board's dual 12-bit ADC samples both channels at 1 MS/s. An edge trigger decides when to keep
a snapshot. Each snapshot holds 1000 samples: 500 from before the trigger and 500 from after.
Each snapshot is turned into one trace point per column of a 1000 x 700-pixel grid, drawn on a
1024 x 768 VGA screen.

Four rotary knobs and the board's switches set:
- time per division (100 us to 1 s);
- volts per division (17 mV to 1 V);
- each channel's ground row;
- the trigger level, edge and source;
- an optional 100 kHz low-pass filter;
- a free-running mode;
- two relays on an external analog front end.

A text strip under the grid shows the settings and the selected channel's average, maximum,
minimum and RMS voltage.

The RTL is SystemVerilog-2017: one module per file in `rtl/`, shared types and constants in
`rtl/dso_pkg.sv`, and a self-checking testbench per module in `tb/`.

## Signal path

```
            100 MHz domain                                               | 65 MHz domain
 XADC DRP ─► xadc_handler ─► fir_lowpass (x2, optional) ─┬─► waveform_interpreter A ─► pixel_frame_buffer A ─┐
 (2 ch,      (decimation)                                │     circular_buffer_manager + sample RAM         │
  1 MS/s)                  trigger_monitor (x2) ─ select ┘     + waveform_math (rows, measurements)          ├─► waveform_drawer ─► VGA
                                                       └─► waveform_interpreter B ─► pixel_frame_buffer B ─┘    vga_timing +
 knobs, switches ─► interfacing_handler ─► settings (all stages)                                                scope_gui_gen
 display_text_handler ─► text bitmap RAM (1024 x 58 bits) ───────────────────────────────────────────────────────────┘
```

`dso_top` wires these together. Two things stay outside it:
- **Clock generator.** It supplies `clk_65mhz`, which comes in as a port.
- **ADC primitive.** Its DRP and end-of-conversion signals are ports of the top. In
  simulation, `tb/xadc_model.sv` stands in for it.

The analog front end is a separate board and is not logic. The top only drives its relay enables:
- `ac_coupling_enable`;
- `attenuation_enable1` and `attenuation_enable2`.

`btnc` resets the whole design. It passes through a two-flop synchroniser in each clock domain.

## Acquisition (`data_acquisition`)

**Reading the converter.** The ADC runs in simultaneous mode, so both channels convert at the
same instant and land in two status registers:
- channel A (auxiliary input 3) at address `0x13`;
- channel B (auxiliary input 11) at address `0x1B`.

After each end-of-conversion pulse, `xadc_handler` reads A and then B over the DRP. Each read
strobes `den` for one clock and waits for `drdy`. The sample is `do[15:4]`. Both samples are
emitted together with a one-clock `sample_valid`.

**Decimation.** The timescale setting (0..4) selects a skip count of 0, 10, 100, 1000 or
10000. The handler keeps one converted pair, then ignores that many. The sample spacing is
therefore (skip+1) us: 1, 11, 101, 1001 and 10001 us. A screen holds 100 samples per division,
so the settings read as 100 us, 1 ms, 10 ms, 100 ms and 1 s per division. The 1 ms setting
is really 1.1 ms per division; the slower ones are within 1 % of their labels. No anti-alias filtering comes with decimation.

**Low-pass filter.** `fir_lowpass` is a 31-tap FIR with a 100 kHz cutoff at 1 MS/s:
- The coefficients are `round(1024 * h)`, where `h` is the Hamming-windowed sinc of a
  30th-order filter with normalised cutoff 0.2:
  `0 1 3 4 4 0 -8 -19 -26 -22 0 41 94 149 189 204 189 149 94 41 0 -22 -26 -19 -8 0 4 4 3 1 0`.
  Their sum is 1024, so the DC gain is 1.
- It uses a single multiplier. The multiply-accumulate runs over the delay line once per
  input sample.
- The result, sum >> 10 clamped to 0..4095, is valid 31 clocks after the input. Samples must
  therefore arrive at least 32 clocks apart; at 1 MS/s they are 100 apart.
- `sw[0]` selects filtered or raw samples for both channels.

**Trigger.** Each channel has a `trigger_monitor`. It keeps the last three samples:
- The **oldest** and **newest** give the direction of the signal.
- The **middle** sample must lie within ±5 codes of the threshold.

It fires on the selected edge only. The selected channel's verdict (`sw[1]`) triggers both
channels' captures, so the two traces stay time-aligned.

There is no hysteresis. A noisy signal near the threshold can fire on either slope, so noisy
inputs need the filter.

## Capture and the frame cycle (`waveform_interpreter`)

Each channel has its own interpreter. Inside it, a `circular_buffer_manager` writes every
sample into a 1000-entry RAM (`dual_port_ram`):
1. It first gathers 500 samples.
2. It then stays armed, overwriting the oldest sample and advancing the window's start address.
3. The first sample that arrives while the trigger is high becomes sample 500.
4. After 500 post-trigger samples it stops writing and raises `frame_ready`. The RAM then holds
   1000 samples in order from `start_addr`.

The capture trigger is any of:
- the edge trigger;
- the manual-trigger button (`btnu`);
- run mode (`sw[15]`), which makes the scope free-running.

A change of timescale restarts both interpreters, so no snapshot mixes two sample rates.

`waveform_math` then reads the 1000 samples back in display order. This pass is the costliest
part of the design in clocks; roughly 17,000 per frame, which is small next to a 16.7 ms video
frame. For each sample it:
- updates the maximum (starting from 0) and the minimum (starting from 4095);
- adds the sample to a 22-bit sum and its square to a 34-bit sum;
- divides the sample by the voltage-scale divisor in a 13-clock bit-serial divider
  (`seq_divider`);
- stores that column's trace row.

| setting | divisor (codes per row) | label |
|---|---|---|
| 0..7 | 1, 3, 6, 12, 17, 29, 44, 59 | 17, 50, 100, 200, 300, 500, 750, 1000 mV/div |

With 0.244 mV per code and 70 rows per division, these divisors give roughly the labelled
scale. The 300 mV and 1 V settings are the furthest off, at 290 mV and 1.08 V per division.

The row is `ground_row - sample/divisor`. If that would be above the top grid line, the row is
stored as all ones, which is never drawn. After the last sample:
- both sums are divided by 1000;
- `int_sqrt` takes the floor square root of the mean square;
- average, minimum, maximum and RMS (in ADC codes) are updated together;
- `conversion_done` pulses once. This releases the capture manager for the next snapshot.

## Getting a frame onto the screen without tearing (`pixel_frame_buffer`)

This handshake is the subtlest part of the design. The drawer reads trace rows at 65 MHz for
every pixel, while the interpreter writes new rows at 100 MHz. If the two collide, the screen
shows half of one snapshot and half of the next, a "ghost" trace.

Each channel therefore has two row RAMs:
- The interpreter writes the **staging** RAM.
- The drawer reads the **display** RAM.

When a frame is complete, the frame buffer marks it pending. It then waits for `safe_to_copy`
from the drawer. That signal is high while the raster is on rows 710..789: below the grid, and
on through the vertical blanking interval. It crosses into the 100 MHz domain through two flops.

The buffer then copies the 1000 rows in 1001 clocks (10 us, about half a video line), so the
copy always ends long before the raster returns to the grid. From the moment a frame is done
until its copy ends, `busy` holds the interpreter. A capture that finishes in the meantime
waits with its samples intact; it is neither overwritten nor lost.
The rule that makes this work, that no trace row is written while `busy` is high, is an
assertion in `dso_top`; every simulation of the top checks it from the first reset on.

One consequence follows: the display updates at most once per video frame (60 Hz). At
100 us/div a 1 ms capture is much faster than that, so most of that time is spent holding.

## The screen (`waveform_drawer`, `scope_gui_gen`, `display_text_handler`)

**Timing.** `vga_timing` produces 1024 x 768 at 60 Hz from the 65 MHz clock:
- horizontal: 1024 visible, 24 front porch, 136 sync, 160 back porch;
- vertical: 768 visible, 3 front porch, 6 sync, 29 back porch.

The drawer registers the colour and the syncs. Both syncs are active low, and the colour is
black outside the visible area.

**Layout.** `scope_gui_gen` computes each pixel's colour combinationally:
- **Grid:** gray lines every 100 columns from column 10 and every 70 rows from row 8, giving a
  box of 1000 x 700.
- **Traces:** channel A is yellow and channel B is green. Sample i is drawn at column 10+i, on
  its stored row. Traces are drawn over everything else, and where they meet their colours OR.
- **Ground markers:** a small left-pointing arrow per channel just right of the grid, at that
  channel's ground row.
- **Text:** white, from a 1-bit bitmap covering rows 710..767.

Because RAMs answer one clock late, this block always addresses the trace and text RAMs for the
*next* pixel.

**Text.** `display_text_handler` redraws the whole 1024 x 58 bitmap every 59,392 clocks. It
writes one pixel per clock, so the text follows the settings within 0.6 ms. The values are
latched at the start of each sweep, so no sweep mixes two readings.

Characters are 5 x 7 glyphs from `glyph_rom`, drawn at twice size in 16 x 16 cells. There are
two lines of seven 9-character fields:

| line | field contents |
|---|---|
| labels | volts/div (e.g. `300mV/d`), `CH TRIG`, `AVERAGE`, `MAXIMUM`, `MINIMUM`, `RMS` |
| values | time/div (`100uS/d` .. `1S/d`), threshold (`500mV`), four measurements as `XX.XXXV`, `CH A`/`CH B` |

A code c is shown as `c * 1000 / 4096` mV. With the 1:50 attenuator on, it is 50 times that,
and so is the volts/div figure.

The front end adds a +0.5 V offset, and the read-out does not subtract it.

## Controls (`interfacing_handler`)

| control | setting |
|---|---|
| knob 1 | voltage scale 0..7; push: back to 17 mV/div |
| knob 2 | ground row of channel A (`sw[2]` low) or B (`sw[2]` high), 10 rows per step within rows 8..708; clockwise moves it up; push: back to row 288 (A) / 498 (B) |
| knob 3 | trigger threshold, ADC codes 0..4088 (0..998 mV) in steps of 8 codes (1.95 mV); push: back to code 2048 (500 mV) |
| knob 4 | timescale 0..4; push: back to 100 us/div |
| `sw[0]` | low-pass filter |
| `sw[1]` | channel that triggers and is measured (0 = A) |
| `sw[3]` | falling edge (0 = rising) |
| `sw[13]`, `sw[14]` | AC coupling and 1:50 attenuation relays; one switch drives both channels' attenuators |
| `sw[15]` | run mode (free-running) |
| `btnu` | manual trigger; `btnc` reset |

**Debouncing:**
- The knob buttons and `btnu` need 1,000,000 stable clocks (10 ms).
- The knob A/B lines need 10,000 clocks.
- All of them pass a two-flop synchroniser first; the switches pass only the synchroniser.

Both counts are parameters of `dso_top`.

**Knob decoding.** `rotary_encoder` counts one step per rising edge of A. B low means clockwise,
B high anticlockwise.

**Threshold.** The trigger compares against the threshold as an ADC code. The read-out shows
it as `code * 1000 / 4096` mV, rounded down; code 2432, for example, shows as 593 mV.

`led` shows `{sw[15:8], edge, channel, voltage scale, timescale}`.

## Top-level interface (`dso_top`)

| parameter | default | meaning |
|---|---|---|
| `N` | 1000 | samples per snapshot, one per grid column |
| `BUTTON_DEBOUNCE` | 1,000,000 | clocks a button must be stable |
| `ENCODER_DEBOUNCE` | 10,000 | clocks a knob line must be stable |

| port | dir | meaning |
|---|---|---|
| `clk_100mhz`, `clk_65mhz` | in | system clock; pixel clock |
| `btnc`, `btnu`, `sw[15:0]` | in | reset, manual trigger, switches |
| `enc_a[3:0]`, `enc_b[3:0]`, `enc_btn[3:0]` | in | knob lines; buttons are active low |
| `adc_drp_addr[6:0]`, `adc_drp_en` | out | DRP read request to the ADC |
| `adc_drp_do[15:0]`, `adc_drp_ready`, `adc_eoc` | in | DRP data, data valid, end of conversion |
| `ac_coupling_enable`, `attenuation_enable1/2` | out | front-end relays |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` | out | VGA, syncs active low |
| `led[15:0]` | out | status |

## Where this implementation makes its own choices

The overall architecture is taken from the original design:
- the block structure, the sample and screen sizes, and the decimation table;
- the trigger rule, the filter specification and the measurement method;
- the scaling table, the grid and colours, the VGA timing, the settings and their ranges;
- the debounce counts.

The following were decided here:
- **Vendor cores replaced.** The original used a vendor FIR compiler, divider and square-root
  cores. Here they are a sequential FIR, a restoring divider and a digit-by-digit square root.
  They compute the same values; only the latency differs.
- **Filter cutoff.** The filter's cutoff is read as 0.2 of Nyquist, the value consistent with
  the stated 100 kHz at 1 MS/s.
- **Decimation spacing.** Decimation keeps one pair and skips N, so the spacing is (N+1) us
  rather than N us.
- **Threshold step.** The threshold moves in steps of 8 codes, the nearest code step to the
  2 mV the original specifies. That step reaches exactly 998 mV (code 4088) at the top of the
  range. The original's own logic used 16-code steps.
- **Off-grid trace points.** A point above the grid gets an explicit "none" row. This avoids a
  wrap-around in the bound test.
- **Copy window.** The copy window extends from row 710 into vertical blanking (up to row 789),
  so a copy can never run into the visible grid.
- **Timescale restart.** Both channels restart on a timescale change, not only channel A.
- **Own components.** The text layout, the font, the ground-arrow shape, the knob direction and
  the knob-button actions are this design's own.
- **Clock crossings.** The ground rows are read by the 65 MHz drawer without synchronisation.
  They change only on a knob step, and a one-frame glitch of a marker is harmless. The frame
  buffer's safe-window flag is synchronised.

## Simulating

Each module has `tb/tb_<module>.sv`. Every testbench:
- prints `TB_RESULT checks=<n> failures=<n>`;
- ends with `$finish`;
- has a watchdog.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl -y tb \
    rtl/dso_pkg.sv tb/tb_dso_top.sv --top-module tb_dso_top
./obj_dir/Vtb_dso_top +verilator+rand+reset+2
```

Replace `tb_dso_top` with any other testbench name. The simulator is two-state, and
`+verilator+rand+reset+2` randomises everything that is not reset; the design must work from
that state.

The end-to-end test `tb_dso_top` runs the top at its default parameters. It has a behavioural
ADC (`tb/xadc_model.sv`) converting these signals:
- channel A: a 1 kHz sine of 500 mV peak to peak;
- channel B: a 2 kHz sine;
- during the filter test, a 250 kHz square is added to channel B.

It takes about 50 s to simulate about 365 ms of scope time. Its checks:
- Every sample reaching the interpreters equals the ADC's latest conversion.
- Every frame's 1000 rows match 1000 consecutive recorded samples under the expected divisor
  and ground row.
- The measurements equal values computed from those same samples.
- Triggered frames cross the threshold in the chosen direction at sample 500.
- The VGA output of whole frames shows both traces on exactly the copied rows.
- The text bitmap, decoded back into characters, names the right channel and the attenuated
  volts/div.

It counts each mechanism and fails if any never happened:
- rising and falling trigger;
- changes of voltage scale, ground row and timescale;
- channel select;
- filtering;
- run mode, manual trigger, and "no trigger, no frame";
- 11x decimation, with sample spacing checked to the clock;
- frame copies, and interpreter holds;
- text sweeps;
- relay outputs.

`tb_dso_workloads` also runs the top at its defaults, for about 10 s. At 100 us/div it shows
four 10 kHz signals and checks each frame's rows, period count, peak-to-peak value, average
and RMS against the signal:
- a sine, a square and a ramp, each 500 mV peak to peak;
- a sine of 900 mV peak to peak.

The square runs free, in run mode. Its steps jump straight over the trigger's ±5-code window,
so an ideal square never fires the edge trigger. A real signal with finite edges may or may
not land a sample there.

The module testbenches compare against models written in the testbench, mostly at reduced
sizes:
- `tb_fir_lowpass` computes its own coefficients from the window formula;
- `tb_scope_gui_gen` checks every pixel of a frame;
- `tb_display_text_handler` reads the text back off the bitmap.

## How far to trust it

The design has been simulated in Verilator and has passed lint in Verilator and slang. It
synthesises in Yosys to about 3,600 cells, 1,900 flip-flops and 130 kbit of RAM.

Not verified here:
- timing closure at 100 MHz and 65 MHz on a real device;
- behaviour with the real ADC primitive, whose DRP handshake is modelled from its documented
  protocol (a read strobe, data some clocks later with a ready flag);
- analog behaviour of the front end.

The widest combinational path is likely the text renderer's binary-to-BCD conversion of
the measurements. If it limits the clock, registering the field strings once per sweep is
the obvious fix.

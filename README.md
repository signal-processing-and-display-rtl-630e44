# LFM CW radar signal processor and B-scope display on one FPGA

A linear-frequency-modulated continuous-wave (LFM CW) radar sends a sawtooth
frequency sweep and mixes the echo with the signal it is sending. Because the
echo is delayed, the mix holds a *beat tone*. Its frequency is proportional to
the target's range:

    R = f_b * T_m * c / (2 * Δf)

This RTL does the digital half of such a radar:

- It samples the beat signal from a 6-bit ADC at 50 kHz.
- It takes a 128-point FFT of each sweep and keeps the 64 useful bins. Each
  bin is 18.75 m of range, so 64 bins cover 1200 m.
- It marks every bin whose magnitude is above a threshold set on switches.
- It draws the marks on a 640x480 VGA monitor as a **B-scope**: azimuth runs
  across the screen, range runs upwards, and each detected target is a green
  square.

It follows a published single-FPGA design that was built on a Spartan-3
XC3S200. The block structure and the rates below come from that design. Where
the original only names a block or states what it does, the inside is this
RTL's own. The last sections list those choices.

## How a target becomes a green square

```
 ADC (6 bit) ─► signal_processor ──────────────────────────────► pingpong_buffer ─► bscope_display ─► R G B HS VS
                 clk_divider /1000  (50 kHz strobe)                 2 × 64×1 RAM        cell memory 32×32
                 sweep_sync         (VCO trigger, 16.7 ms)          swap on vsync        time base, grid
                 start_delay        (+20 µs)                            ▲
                 fft_core           (128 points)                        │ range row
                 squarer ×2, mag_adder, isqrt  (|X|)                    │
                 threshold_comparator (|X| > thr·16)     clk_divider /2 ─► vga_timing ─► display_addr_gen
```

All of it runs on one 50 MHz clock (`clk`). The 50 kHz sampling rate and the
25 MHz pixel rate are one-cycle enables from `clk_divider`, not separate
clocks.

1. **Sweep control.** `sweep_sync` counts sampling periods. Every 835 of them
   (16.7 ms) it raises `vco_trig` for one period, which starts the VCO's
   sawtooth. `start_delay` repeats the trigger one sampling period (20 µs)
   later as the FFT start. The farthest echo (1200 m) needs only 8 µs, so by
   then every echo has arrived.

   ```
   vco_trig   ▔|▁▁▁▁▁▁▁▁▁ … ▁▁▁▁▁▁|▔|▁▁▁▁    period 835 × 20 µs = 16.7 ms
   fft_start  ▁▁|▔|▁▁▁▁▁▁ … ▁▁▁▁▁▁▁▁|▔|▁▁▁    one sampling period later, one period wide
   ```

2. **FFT** (`fft_core`, described below). It loads 128 samples, transforms
   them, and then puts out one bin per sampling period, in bin order 0..127.
   The bin number is the range cell.

3. **Magnitude and decision.** The real and imaginary parts are each squared
   (`squarer`), added (`mag_adder`) and square-rooted (`isqrt`). The result is
   compared with `threshold × 16` (`threshold_comparator`). The bin and its
   decision reach the buffer 21 clocks after the bin leaves the FFT.

4. **Ping-pong buffer.** The 64 lower bins are written into one RAM, using the
   bin number as the address. The display reads the other RAM (see below).

5. **Display.** `vga_timing` makes the 640x480 60 Hz raster.
   `display_addr_gen` turns each pixel into a cell (azimuth column, range row).
   The range row is also the address that is read from the buffer.
   `bscope_display` picks the colour.

## The FFT engine

`fft_core` is a burst radix-2 decimation-in-time FFT. It keeps its data in a
128-word complex working memory and runs in three phases:

| phase  | paced by              | what happens                                                                 | time at default rates |
|--------|-----------------------|------------------------------------------------------------------------------|-----------------------|
| LOAD   | `sample_en`           | sample *n* is written at address bitrev(*n*). The first sample is the one on the first strobe where `start` is high | 128 × 20 µs = 2.56 ms |
| CALC   | every `clk`           | 7 stages × 64 in-place butterflies, one butterfly per clock                  | 448 clocks = 8.96 µs  |
| UNLOAD | `sample_en`           | bin *k* = memory word *k*, in natural order, with `out_valid` and `out_idx`  | 128 × 20 µs = 2.56 ms |

In stage *s* (span = 2^s), butterfly *j* works on these words:

- `i0 = (j >> s) << (s+1) | (j mod span)`
- `i1 = i0 + span`
- twiddle `W^((j mod span) << (6-s))`, where `W = e^(-j2π/128)`.

The twiddles are computed when the design is elaborated:
`round(cos(2πk/128)·1024)` and `round(-sin(2πk/128)·1024)` for k = 0..63. Each
is 12 bits, with 1.0 = 1024. Every complex product is rounded to the nearest
integer.

The arithmetic does not scale. A 6-bit input can grow by at most 2^7 over the
seven stages, and the 16-bit data words hold that. Against a double-precision
DFT, the worst bin error seen was 5 LSB, where a full-scale tone gives about
2000.

If a start arrives while a frame is being processed, it is ignored. A whole
FFT run uses about 258 of a sweep's 835 sampling periods. The bins leave at the
sampling rate because the original design clocks its FFT at 50 kHz and writes
the buffer with the FFT's own output address.

The ADC works on 0–5 V, so its code is offset binary: a 0 V beat signal reads
32. The MSB is inverted to turn the code into two's complement before the FFT.
Without that, the analog offset would show up as a large bin 0, which reads as
a target at zero range.

## Buffering between 50 kHz and 25 MHz

The detections of one sweep are written at the sampling rate. The screen must
read them millions of times a second. `pingpong_buffer` solves this with two
single-port RAMs (`sp_ram`, 64 × 1 bit each):

- **Bank select.** `bank` is the vertical sync divided by two. It toggles at
  the start of every vsync pulse, once per frame.
- **Write side.** While `bank = 0`, RAM-1 gets the FFT's bin address and the
  write strobe, and RAM-2 gets the display's address and the pixel strobe.
  While `bank = 1`, the roles swap.
- **Read side.** An output multiplexer passes the RAM that is being read.
- **Dropped bins.** Bins 64–127 are not stored. A real input gives a mirrored
  spectrum, so they repeat bins 1–63.

So the screen always shows the last complete frame's worth of detections,
while the next ones are being collected.

A sweep lasts 16.70 ms and a VGA frame lasts 16.80 ms. The two are not locked
together, as in the original. Each frame receives the results of about one
sweep, but a sweep's 128 results sometimes straddle a swap. When that happens,
a bank holds part of the newest sweep and part of one two frames old. With
steady targets this cannot be seen. Right after a scene changes, it can last
for one or two frames.

## The B-scope picture

The screen is laid out as follows:

- **Grid.** The plot has 32 azimuth columns × 32 range rows of 16 × 12 pixels
  each. Its top-left corner is at (64, 48), so it covers 512 × 384 pixels. Range
  bin 0 is the bottom row, so the plot shows 32 × 18.75 m = 600 m.
- **Azimuth.** The antenna supplies a 9-bit count that runs up and down with
  the sector scan. Its top 5 bits select the current column. The column is
  taken once per frame, at the start of vsync.
- **Running time base.** The current column is drawn as a blue bar. Its cells
  are refreshed every frame from the buffer.
- **Cell memory.** A 32 × 32-bit memory keeps every other column's targets as
  they were when the antenna last pointed there. Without it, the picture would
  only ever show the column under the antenna.
- **Colours**, in priority order:
  1. black during blanking;
  2. the annotation pixel;
  3. inside the grid: red grid lines, green targets, the blue time base, and
     white empty cells;
  4. blue outside the grid.

  The output has one bit per channel, like the board's VGA port.
- **Annotations.** The title, logo, axis names and range labels are bitmap
  images stored in the original's block RAMs. Their contents are not part of
  this RTL. `pix_x`/`pix_y` go out of the top, and the annotation pixel comes
  back on `ovl_on`/`ovl_rgb` one pixel period (2 clocks) later.

`bscope_display` is a pipeline with two pixel stages. The buffer read and the
cell-memory read are issued for the current pixel. One pixel later, the colour
is chosen and registered. HS and VS are delayed by the same two pixels, so the
picture stays aligned with the syncs.

## Top level: `radar_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 50 MHz board clock; synchronous active-low reset |
| `adc_data` | in | 6 | ADC code, offset binary, taken on `adc_sample` |
| `adc_sample` | out | 1 | one-clock strobe every 20 µs: conversion clock for the ADC |
| `vco_trig` | out | 1 | sweep trigger to the VCO control circuit |
| `threshold` | in | 8 | switch setting; a target is declared when the magnitude exceeds `threshold × 16` |
| `azimuth` | in | 9 | antenna azimuth count |
| `pix_x`, `pix_y` | out | 10 | raster position, for the annotation image memories |
| `ovl_on`, `ovl_rgb` | in | 1, 3 | annotation pixel and colour, one pixel period after `pix_x/pix_y` |
| `vga_r/g/b`, `vga_hs`, `vga_vs` | out | 1 each | VGA signals, syncs active low |

The top has no parameters. The shared numbers are in `rtl/radar_pkg.sv`, and
each block has its own typed parameters with these defaults:

| number | value | origin |
|---|---|---|
| clock, sampling rate | 50 MHz, 50 kHz | original design |
| FFT size, useful bins | 128, 64 | original design |
| ADC width | 6 bits | original design |
| sweep period | 835 samples (16.7 ms) | original timing diagram |
| start delay | 1 sample (20 µs) | original design |
| trigger width | 1 sample | own choice |
| screen, grid | 640×480, 32 × 32 cells | original design |
| porches and syncs | 16/96/48 px, 10/2/33 lines | standard 640x480@60 timing |
| FFT data / twiddle width | 16 / 12 bits | own choice |
| threshold | 8 switches, scaled by 16 | own choice |
| cell size and grid position | 16×12 px at (64, 48) | own choice |
| azimuth to column | top 5 of 9 bits | own choice |

After generic synthesis, the design holds about 320 flip-flop bits and
6.8 Kbit of memory, and uses 6 multipliers. The memory is the FFT's working
store, the cell memory and the two buffer RAMs.

## Where this RTL departs from the original, and what it leaves out

**Departures:**

- One clock domain with enables replaces the separate 50 kHz, 25 MHz and
  50 MHz clocks of the original.
- The FFT's internals, the square root method and the comparator's scaling are
  this RTL's own. The original names these blocks without describing them.
- The B-scope cell memory is an addition. The original shows targets
  persisting at many azimuths but does not describe how it stores them.
- The 20 kHz low-pass filter, the amplifier, the DC-offset circuit, the CA3300
  flash ADC and the RF front end are analog or bought-in parts outside the
  FPGA. Only their digital interface appears as ports.

**Left out:**

- The annotation bitmaps.
- Doppler processing. The original also leaves it out.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and then finishes. Build and run one with
Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        --top-module tb_radar_top rtl/radar_pkg.sv tb/tb_radar_top.sv
    ./obj_dir/Vtb_radar_top

| testbench | what it checks |
|---|---|
| `tb_radar_top` | Full size, about 8.4 M clocks (10 frames, a few seconds). Two radar scenes with the antenna at two azimuths. Checks the control timing (ADC strobe, 16.7 ms sweep, 20 µs start, line and frame periods), the detected bins of every sweep, and the colour of all 1024 cells in two frames. Also checks that every mechanism happened: sweeps, FFT frames, detections, sub-threshold echoes, dropped mirror bins, bank swaps, time base, stored targets, annotation. |
| `tb_radar_range_limits` | Full size, about 4.2 M clocks. Two echoes at the ends of the range scale: a 20 kHz beat tone (1200 m, bin 51.2, off the bin grid) and bin 31 (581 m, the top row drawn). Checks that every sweep detects exactly bins 31 and 51, and that the screen shows only the top-row target. |
| `tb_signal_processor` | Shortened rates (40-clock sampling period, 300-sample sweep). Checks trigger period, start delay, bin order and rate, every magnitude against a floating-point DFT, and the detections. |
| `tb_fft_core` | Three frames (random, one tone, two tones) against a floating-point DFT. Checks output order, rate and latency, and that a start during a frame is ignored. |
| `tb_pingpong_buffer`, `tb_sp_ram` | Bank swapping, reading the previous sweep, dropped mirror bins; read-first RAM behaviour. |
| `tb_bscope_display` | Every pixel and sync of three frames, against a pixel model, as the azimuth moves. |
| `tb_vga_timing`, `tb_display_addr_gen` | Every pixel of the raster against independent models. |
| `tb_clk_divider`, `tb_sweep_sync`, `tb_start_delay`, `tb_squarer`, `tb_mag_adder`, `tb_isqrt`, `tb_threshold_comparator` | Each block's arithmetic and timing. |

To watch a run, add `--trace` and a `$dumpvars` to a testbench. The full-size
run is fast, so no reduced configuration of the top is needed.

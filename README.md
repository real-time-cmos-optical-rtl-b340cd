# Shack-Hartmann tilt sensor: 5 x 5 pixel array with on-chip centroid processor

A Shack-Hartmann wavefront sensor puts an array of small lenslets in front of
the light. Each lenslet focuses its part of the wavefront to a spot. The spot
moves away from its reference position in proportion to the local tilt of the
wavefront. This design is one *tilt sensor*: a 5 x 5 photodiode array behind one
lenslet, with its own converter and centroid processor. It reports where the
spot is as two 7-bit numbers, the x and y centroids, once per frame over an
RS-232 line. Many such sensors could run side by side. Each one sends only two
bytes per frame, so the total data rate does not grow with the size of any
sensor's image.

The RTL follows a published mixed-signal CMOS chip (0.7 um, 32 MHz clock). The
published description is partial, so many details here are this design's own
choices. They are marked as such below and in each file's header.

## Block structure

```
 photo[25] ─► aps_array_model ──vout──┬─► comparator_model ─comp1─┐
   (light)        ▲   ▲               │        ▲ vref1            │
                  │   │               └─► comparator_model ─comp2─┤
    pix_reset ────┘   │ row/col one-hot        ▲ vref2            │
                      │        ref_voltage_gen_model x2           │
                      │            ▲ 12-bit one-hot tap selects   ▼
                      └──────────────────────────────── adc_controller
                                                  (discharge_clk_gen inside)
                                                        │ light[10:0], idx
                                                        ▼
                                               centroid_processor
                  rxd ─► uart_rx ─► config_regs          │ cent_x/y, max, dividends
                                        │ mode registers ▼
                                        └──────────► tx_formatter ─► uart_tx ─► txd
```

`sh_tilt_sensor_top` wires this together. The pixel array, the reference
generators and the comparators are analogue on the chip. Here they are
behavioural models (`*_model.sv`): they let the digital part be simulated in a
closed loop, but they are not meant for synthesis. Everything from
`adc_controller` onwards is synthesizable RTL.

## How a pixel is digitised

This is the least obvious part of the design (`adc_controller.sv`).

Each pixel is an integrating active pixel. A global reset charges every
photodiode. Once the reset is released, each diode discharges through its own
photocurrent, so a brighter pixel falls faster. The converter has no
conventional ADC. Instead it measures **how long the selected pixel takes to
fall past reference voltages**, using two comparators and an 8-bit counter.

One *pixel period* is:

1. **Reset and calibration, 256 clocks (8 us).** All pixels are held in reset.
   The reference generators have twelve taps, from 1.00 V to 3.75 V in 0.25 V
   steps. Vref1 starts at 3.75 V and Vref2 at 3.50 V. Every 8 clocks both step
   down one tap together, until both comparators say the pixel's reset level is
   above its reference. The references then sit just below that pixel's own
   reset level, with Vref2 one tap (0.25 V) below Vref1. With the model's 3.2 V
   reset level, they settle at 3.00 V and 2.75 V.
2. **Timing.** The reset is released and the counter counts ticks of the
   discharge clock. That clock is clk/1, /2, /4 or /8, chosen by `dclk_sel`. A
   slower clock keeps dim pixels inside 8 bits, and a fast one gives bright
   pixels resolution. What is timed depends on the mode:

   | `mode` | counter starts | counter stops |
   |---|---|---|
   | 0 `MODE_RESET_TO_REF1` | reset release | pixel falls below Vref1 |
   | 1 `MODE_REF1_TO_REF2` (reset default) | pixel falls below Vref1 | pixel falls below Vref2 |
   | 2 `MODE_TWO_CYCLE` | as mode 1; then possibly a second reset and reading | |

   Modes 0, 1 and 2 are the published chip's first, second and third modes.
   Mode 1 measures a fixed 0.25 V swing below the reset level. Any difference
   in reset level between pixels therefore drops out. Mode 2 extends the range
   for bright pixels. If the first reading is short (below `BRIGHT_LIMIT` = 64
   ticks), the pixel is reset again and re-timed with Vref2 four taps (1.0 V)
   below Vref1. That gives about four times as many counts. First readings that
   do not qualify are multiplied by 4, so that all mode-2 readings share the
   scale of the four-tap swing.
3. **Result.** The count is converted to system clocks, `T = count << dclk_sel`
   (at most 2040). The output is `light = 2047 - T`, an 11-bit number that is
   larger for brighter pixels. It is monotonic in intensity but not
   proportional to it. A pixel that never reaches its threshold within 255
   ticks reads 0 and sets `light_sat`.

The 25 pixels are read in row-major order, so `light_idx = 5*row + col`. A 26th
period follows, with the pixels held in reset and no reading. It marks the end
of the frame (`frame_end`), and the centroid division runs during it. A pixel
period therefore lasts 257 to about 512 clocks at `dclk_sel = 0`. At 32 MHz the
frame rate is about 2.4 to 4.8 kHz, depending on the light: 4.1 kHz was
simulated for a bright uniform frame and 2.5 kHz for a spot with a dark
surround.

With `ext_en` high, the pixel reset and the row/column address come from the
`ext_*` pins, for observing a pixel's analogue behaviour directly. The
sequencer waits at the start of pixel 0 until `ext_en` drops.

## Centroid arithmetic

`centroid_processor.sv` computes the first moments

```
C(x) = sum(x_n * I_n) / sum(I_n)        C(y) = sum(y_n * I_n) / sum(I_n)
```

The position weights x_n and y_n come from two modulo-5 counters
(`mod_counter`): the column counter steps once per pixel, and the row counter
steps when the column counter wraps. A multiply-accumulate (`moment_unit`)
forms each moment, while a plain accumulator sums the intensities. After the
25th pixel, two serial restoring dividers (`seq_divider`, one quotient bit per
clock, 22 clocks) compute `(moment << 4) / sum`.

The centroid format is this design's own. It is unsigned, with 3 integer bits
and 4 fraction bits, in pixel pitches from the centre of pixel column (row) 0.
The range 0.0 to 4.0 is coded 0 to 64. Values above 127 saturate, and a dark
frame (sum = 0) gives 0 with `div_zero` set. The processor also tracks the
brightest pixel and its index (`max_finder`); on a tie the first pixel wins.

Word widths: light is 11 bits, the intensity sum 16 bits (25 x 2047) and the
moments 18 bits (4 x 25 x 2047).

## Serial link and commands

`uart_tx` and `uart_rx` use 8N1 framing. The bit time is `baud_div` clocks,
which sets the baud rate; 278 gives 115200 baud at 32 MHz. Once per frame,
`tx_formatter` sends the result chosen by the `tx_sel` register:

| `tx_sel` | bytes |
|---|---|
| 0 centroids | `{0, cent_x}`, `{1, cent_y}` (bit 7 tells x from y) |
| 1 maximum | `{max_idx[4:0], max_level[10:8]}`, `max_level[7:0]` |
| 2 divide | x-dividend (3 bytes), y-dividend (3 bytes), divisor (2 bytes), MSB first |
| 3 pixel | `{test_pixel, level[10:8]}`, `level[7:0]` of the chosen pixel |

At 115200 baud the two centroid bytes (20 bit times) fit within a frame even at
4.8 kHz. If a new result arrives while a packet is still being sent, the new
result is dropped (`tx_dropped`) rather than queued. This always happens with
the 8-byte divide packet.

Commands arrive on `rxd`, one byte each (`config_regs`):

| bits 7:6 | meaning |
|---|---|
| 0 | bits 1:0 = `dclk_sel`, bits 3:2 = `mode` (0-2; mode 3 is ignored) |
| 1 | bits 1:0 = `tx_sel` |
| 2 | bits 4:0 = test pixel (0-24) |
| 3 | read back: sends `{tx_sel, mode, dclk_sel, 2'b00}` once the link is free |

After reset the registers select the fastest discharge clock, mode 1 and
centroid output.

## Analogue models

- `aps_array_model`: During reset the output sits at 3.2 V. Afterwards each
  pixel falls linearly by `photo[i] * 40 uV` per clock, down to a 0.2 V floor.
  The one-hot row and column selects route one pixel to `vout_mv`. A `clk`
  input serves only as the model's time base. The `OFFSET_MV` parameter
  (default 0) spreads the reset levels from pixel to pixel. Source-follower
  nonlinearity and noise are not modelled.
- `ref_voltage_gen_model`: The one-hot tap select gives 1000 + 250·k mV.
- `comparator_model`: Ideal; `above = vpix > vref`.

All voltages are integers in millivolts.

## How far to trust it, and where it departs from the published chip

These parts follow the published chip: the 5 x 5 array, the 8 us global reset
at 32 MHz, the 8-bit discharge counter, the four discharge clock rates chosen
by two register bits, the twelve 0.25 V reference taps, the 3.75 V / 3.50 V
start of calibration, the three conversion modes, the 26-period frame, the
11-bit digitised light bus, the 7-bit centroids, the first-moment algorithm
with a mod-sqrt(N) counter, multiplier, adders and divider, the maximum and its
position, the test outputs (dividends, divisor, one pixel), adjustable baud up
to 115200 and external control of reset and addressing.

These are this design's own choices:

- The calibration step timing (8 clocks per tap).
- The inversion of discharge time into a light level, and its 11-bit scaling.
- The mode-2 threshold and four-tap swing.
- The handling of pixels that never cross a threshold.
- The centroid number format.
- The serial divider algorithm.
- 8N1 framing, the byte layouts and the command set.
- Dropping results while the link is busy.

The published chip's own encodings are not known. The pixel and comparator
models are idealised, so real analogue behaviour (settling, offsets,
nonlinearity below 1 V) has not been exercised. The published work suggests
sharing one divider among several arrays; that is not built here. Neither is
the wavefront-reconstruction processor a full sensor would need.

Every block has a self-checking testbench in `tb/`.
`tb_sh_tilt_sensor_top` runs the whole chip at its real sizes. It moves a
modelled light spot across the array in x and y and checks that the centroids
follow it. It checks every byte on `txd` against values computed from the
digitised pixels, and it drives every mode, every discharge clock, the second
cycle of mode 2, counter saturation, every transmit selection, read-back, a
dropped result, a dark frame, external control and a corrupted command.

Two testbenches exercise behaviour rather than single blocks:

- `tb_workload_beam_scan` repeats the published chip's main measurement. A
  beam narrower than a pixel is stepped across the array in 20 um steps, first
  in x and then in y. The centroid must form a five-level staircase, 16 codes
  per pixel, with every value also decoded from the 115200-baud serial line.
  With one lit pixel the frame rate is 2.5 kHz.
- `tb_adc_reset_offset` gives the pixels reset levels spread over +/-120 mV.
  In mode 0 the readings of equally lit pixels spread by about 47 codes; in
  mode 1 they agree to within 1.

## Simulating

Any testbench can be built with Verilator 5 from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/sh_pkg.sv tb/tb_sh_tilt_sensor_top.sv --top-module tb_sh_tilt_sensor_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The end-to-end
run takes about a second. The RTL is plain SystemVerilog-2017 with one module
or package per file. `sh_pkg.sv` holds the shared sizes, the mode and transmit
enums and the mode-register struct; read it first when changing a width.

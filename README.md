# Time-mode pixel ADCs with clock-stealing gain and offset correction

Every pixel of this image sensor digitises its own light level. The photodiode
discharges a sense node. A comparator watches that node against a reference
voltage, and a small counter in the pixel counts pixel clock pulses from the
moment the node crosses the reference until the end of the frame. Bright pixels
cross early and count many pulses; dark pixels cross late and count few. This
is *time-mode* conversion. Because the crossing time is inversely proportional
to the photocurrent, the pixel clock is not uniform: its periods grow during the
frame so that the count comes out proportional to the light.

Pixels differ in sensitivity (gain) and in dark level (offset). That difference
is fixed-pattern noise. This design removes it **inside the pixel, during the
conversion, without any arithmetic**. All pixels share a 9-line bus. Each bus
line carries a fixed pulse pattern, and each pixel stores a 9-bit coefficient
word. When a bus line pulses and the pixel's matching coefficient bit is 0, the
pixel's counter skips that clock pulse: the bus "steals" it. The pulse patterns
are arranged so that:

* during the main conversion, a pixel keeps `C` out of every 511 clock pulses,
  where `C` is its gain numerator. This scales its result by `C/511`.
* in a short phase after the conversion, a pixel counts exactly `off` extra
  pulses, where `off` is its offset value.

The 9 lines can be split at any point `k`. Lines `0..k-1` serve the offset and
lines `k..8` serve the gain. Moving `k` trades gain range against offset range
frame by frame.

The RTL covers the digital parts of the pixel row: the counter, the coefficient
shift register, the clock-enable logic and the output bus. It also covers the
controller that runs a frame: the variable-period pixel clock with its interval
memory, the pulse-pattern generator, the phase sequencer with the ramp DAC
codes, a register bank and a readout DMA. The analog front end (photodiode,
reset switch, comparator) is a behavioural model. The host processor, the DACs
and the voltage regulator are outside the design and appear as ports.

## The pixel ADC (`pixel_adc`, `pixel_counter`, `coef_shift_reg`)

```
            falling edge of pix_clk          rising edge of pix_clk
 comp ────►[ FF ]── en_cmp ─┐
                            ├─ AND ─► counter steps (up, or down if `down`)
 bus,Q ─► CE ─►[ FF ]── ce ─┘
 CE = NOT OR_n ( bus[n] AND NOT Q[n] )
```

* **Sampling and counting.** The comparator output and CE are sampled on the
  falling edge of the pixel clock. The counter moves on the next rising edge if
  both samples allow it. The counter counts while `Vs <= V_ramp`, that is,
  once the node has crossed the reference.
* **Gated clock as an enable.** In silicon the counter clock is gated. Here it
  is a clock enable on the counter flops, which behaves the same way and is
  safe for synthesis.
* **Counter encoding.** The counter is a reversible 9-bit LFSR,
  `x^9 + x^5 + 1`, shifting left. State 0 is never reached. The reset state
  `9'h001` is read as **value 1, the dark level**. Every forward step adds 1
  to the value, up to 511, and 511 steps on to 1. Stepping backwards undoes a
  forward step exactly, which phase 3 uses to count down.
  `imager_pkg::lfsr_next` / `lfsr_prev` give the step functions for decoding.
  The exact polynomial the chip uses is not known; this one is a standard
  maximal-length choice.
* **Coefficient chain.** The coefficient register is a 9-bit shift register.
  Its serial output feeds the next pixel's serial input, so the whole row loads
  like one long shift register. `coef_in` enters pixel 0.
* **Digital reset.** The digital reset sets the counter to value 1 and also
  clears the two sampling flops. The second part is a choice of this design,
  so that a frame never counts a stale sample.

### The coefficient word

| bus line `n` | role when `n < k` | role when `n >= k` |
|---|---|---|
| Q(n) | offset bit `n`: the pixel counts `2^n` extra clocks if set | gain bit: Q(n) = bit `8-n` of the numerator `C` |

So in gain mode Q(8) is the least significant bit of `C` and Q(k) the most
significant bit the gain part can hold. `imager_pkg::coef_word(C, off, k, 9)`
builds the word. For example, with `k = 3`, `C = 459` and `off = 3` the word
has Q(3), Q(4) and Q(6) cleared among the gain lines. Q(0) and Q(1) are set and
Q(2) is clear.

| k (offset lines) | gain numerator range | offset range |
|---|---|---|
| 0 | 0..511 of 511 | none |
| 1 | 256..511 | 0..1 |
| 2 | 384..511 | 0..3 |
| 3 | 448..511 | 0..7 |
| ... | ... | ... |
| 9 | 511 only | 0..511 |

When lines are taken for the offset, the top bits of `C` are forced to 1. This
is why the gain range shrinks as `k` grows.

## Pulse patterns on the bus (`clock_stop_gen`)

This is the core of the technique and the least obvious part.

**Gain pattern (phases 1a and 1b).** A step counter `t` runs 1, 2, ..., 511
and wraps, advancing once per pixel clock period. In step `t`, line `n` is
high exactly when `t` has `n` trailing zero bits.

* Bus(0) is high in every odd step: 256 times per 511 steps.
* Bus(1) is high 128 times, and so on.
* Bus(8) is high once, in step 256, the middle of the train.

A pixel whose gain bit on line `n` is 0 loses `2^(8-n)` of every 511 clocks.
Together it keeps exactly `C` of every 511, and the losses are spread evenly.

The train is a palindrome (`ctz(t) = ctz(512-t)`). A time-mode pixel counts from
some point until the end of the frame; a voltage-mode pixel counts from the
start until some point. Because of the symmetry, both see the same fraction of
stolen pulses. Lines below `k` stay low in this mode.

**What stealing costs in linearity.** Stolen pulses are spread evenly, but
not perfectly: after `N` counted clocks a pixel has kept a whole number of
them, not exactly `N*C/511`. The worst deviation over all codes and all
numerators is the integral non-linearity that the correction adds. It grows
only slowly with resolution, so as a fraction of full scale it shrinks:

| ADC bits | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|
| max INL (LSB) | 1.000 | 1.110 | 1.333 | 1.444 | 1.667 | 1.778 | 2.000 |
| % of full scale | 1.59 | 0.87 | 0.52 | 0.28 | 0.16 | 0.087 | 0.049 |

`tb_gain_inl` measures this on the RTL for 6 to 11 bits. It uses one pixel per
numerator, driven by `clock_stop_gen`. These values agree with the figures
published for the technique, which also confirms the coefficient bit mapping
above.

**Offset pattern (phase 2).** It lasts `2^k - 1` periods.

* Bus(k-1) is high for the first `2^(k-1)` periods.
* Bus(k-2) is high for the next `2^(k-2)`, and so on.
* Bus(0) is high for the last single period.

Only one line is high at a time. A pixel with offset bit `n` clear is blocked
during line `n`'s interval, so it counts exactly `off` of those periods. The
ramp is above every node in this phase, so every pixel is counting.

**Off (phase 3).** All lines are low.

The generator counts steps on the `tick` strobe of the pixel clock generator.
It changes the bus one system cycle after a rising pixel-clock edge. The bus is
therefore stable long before the pixels sample it on the falling edge.

## Frame sequence (`sensor_controller`)

| phase | duration | V_ramp | bus | purpose |
|---|---|---|---|---|
| RESET | `T_RESET` cycles | ramp[0] | off | analog reset holds Vs at V_reset; counters set to value 1 |
| BLANK | `T_BLANK` cycles (T_b) | ramp[0] | off | integration runs with no pixel clock; pixels brighter than full scale saturate here |
| 1A | `N_1A` periods from the interval memory | ramp[0] = V_ref | gain | time-mode conversion |
| 1B | `N_1B` periods of `P_CONST` | ramp[i] after the i-th clock | gain | voltage-mode conversion for dim pixels: the reference climbs towards V_reset |
| 2 | `2^k - 1` periods of `P_CONST` | ramp[N_1B+1], above V_reset | offset | per-pixel offset |
| 3 | `N_GLOBAL` periods | unchanged | off | global offset: all pixels count up, or down if `GLOBAL_DOWN` |
| FLUSH | 1 period | unchanged | off | the rising edge that counts phase 3's last slot |
| READOUT | 5 cycles per pixel | — | — | DMA copies each pixel's counter to memory |

Several design choices in this sequence:

* **Where changes happen.** Every change that a pixel samples (ramp, bus,
  direction) happens on `tick`. That is one system cycle after the rising edge
  that counted the previous slot.
* **Direction.** The direction changes on the first tick of phase 3. This is
  after the edge that counts phase 2's last slot, so that slot still counts
  up.
* **Global offset.** Counting down in phase 3 moves every pixel toward the
  dark level and can roll past value 1 to 511. Use it with care.
* **Clock stealing across phases.** Clock stealing covers phases 1a and 1b
  only. The gain train restarts at the beginning of each frame. The offset
  pattern starts from its first step at phase 2.

Coefficient words are loaded while the controller is idle. Each write to
`COEF_WORD` shifts one 9-bit word into the chain, MSB first, at two system
cycles per bit. After 128 writes, the last word written sits in pixel 0 and
the first in pixel 127.

## Pixel clock and interval memory (`pixel_clock_gen`, `interval_memory`)

* **Period sources.** The pixel clock generator emits a requested number of
  periods. In phase 1a each period, in 10 ns system cycles, comes from
  consecutive entries of the interval memory (512 x 24 bits). In all other
  phases the period is the constant `P_CONST`.
* **Waveform.** Periods below 4 cycles are stretched to 4. The clock is high
  for the first half of each period. `tick` is the first high cycle.
* **Linearity tuning.** The interval memory is the knob for linearity. For a
  code proportional to light, rising edge `j` of phase 1a must fall at
  `t_j = K / (511 - j)`. Entry `j-1` then holds `K/(510-j) - K/(511-j)`
  cycles. With `K = 336.6e6` cycles (3.366 s at 100 MHz):
  * T_b = K/510 ≈ 6.6 ms;
  * the periods grow from about 13 µs to 14 ms;
  * phase 1a ends about 225 ms after reset.
* **Voltage-mode clocks.** Phase 1b then adds 15 clocks of 1.33 µs. The ramp
  for phase 1b continues the same scale:
  `ramp[i] = V_ref + i * (V_reset - V_ref) / 16`.
* **Host-side tuning.** Measured non-linearity is corrected on the host by
  nudging each period in proportion to the measured differential
  non-linearity, then rescaling all periods so that their sum, the
  integration time, is unchanged. The new periods are written back to the
  memory between frames. That iteration runs on the host and is not part of
  this RTL.

## Row, readout and registers (`pixel_row`, `readout_dma`, `cfg_regs`)

`pixel_row` holds 128 pixel ADCs on the shared bus and direction lines, with
the coefficient chain running from pixel 0 to 127. An address decoder puts the
selected pixel's counter on the 9-bit output bus, `bus_out`. In the chip the
same wires carry the clock-stealing pulses and the readout; here the two
directions are separate signals. `readout_dma` walks the addresses. It waits
4 cycles for the bus to settle and writes each value, zero-extended, to word
address `DMA_BASE + i` with a valid/ready handshake. An assertion checks that
address and data hold while a write waits.

Register map (word addresses, 32-bit data, synchronous write, combinational
read):

| addr | name | reset | meaning |
|---|---|---|---|
| 0x000 | CTRL | — | write bit 0 = 1: start a frame |
| 0x001 | STATUS | — | bit 0 busy, bit 1 frame done (sticky), bits 7:4 phase |
| 0x002 | T_RESET | 100 | reset length, cycles |
| 0x003 | T_BLANK | 660000 | blanking T_b, cycles |
| 0x004 | N_1A | 495 | time-mode clocks |
| 0x005 | N_1B | 15 | voltage-mode clocks |
| 0x006 | P_CONST | 133 | period in phases 1b, 2, 3 (1.33 µs) |
| 0x007 | OFF_BITS | 3 | k, clamped to 9 |
| 0x008 | N_GLOBAL | 0 | phase-3 clocks |
| 0x009 | GLOBAL_DOWN | 0 | count down in phase 3 |
| 0x00A | DMA_BASE | 0 | frame address in memory |
| 0x00B | COEF_WORD | — | shift one coefficient word into the row |
| 0x020–0x03F | RAMP | — | V_ramp DAC codes (12 bit) |
| 0x200–0x3FF | IVM | — | interval memory, periods in cycles |

Phase codes in STATUS: 0 idle, 1 reset, 2 blank, 3 phase 1a, 4 phase 1b,
5 phase 2, 6 phase 3, 7 flush, 8 readout, 9 coefficient load.

## Top level (`imager_system`) and the analog model

`imager_system` connects the register bank, controller, clock generator,
interval memory, pattern generator, pixel row and DMA. It also contains 128
instances of `pixel_frontend`, the behavioural model of the photodiode and
comparator. The model holds Vs at `vreset` during reset and then lowers it by
`photo_current[i]` (in DAC codes with 24 fractional bits) every system cycle.
Its comparator compares Vs with the ramp DAC code directly, with no delay or
offset.

The ports for the processor (`cpu_*`), the system memory (`mem_*`), the ramp
DAC (`dac_data`) and the analog reset are where the outside parts connect. The
imager pins (`pix_clk`, `bus`, `down`, `digital_reset`, `comp`) are brought out
for observation.

For real silicon, replace `pixel_frontend` with the analog pixel, and use the
comparator output in place of the model's `comp`.

Sizes: 128 pixels (one row: the chip has clock stealing in one 128-pixel row),
9-bit ADCs, 100 MHz system clock. Parameters are in `imager_pkg`. The pixel
modules accept `BITS` from 4 to 12. The controller and register bank are built
for 9.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
  rtl/imager_pkg.sv tb/tb_pixel_adc.sv --top-module tb_pixel_adc
./obj_dir/Vtb_pixel_adc
```

Replace `pixel_adc` with any block name. `tb_gain_inl` (with its helper
`tb/inl_bench.sv`) is built the same way. It has about 4000 pixel instances
and takes a couple of minutes to compile. `tb_imager_system` runs the full
design at default size and real timing: two complete frames of about 0.23 s of
simulated time each, in under a minute of wall time. It checks every DMA'd
pixel value against an independent model of the pins, and linearity against
the ideal response. It also checks the phase lengths, and that each mechanism
occurred: stealing, offset counting and blocking, global up and down,
roll-over, time/voltage/dark pixels, DMA back-pressure and re-partitioning of
the bus.

`tb_flat_field` shows what the correction is for. It runs the whole system at
default size, with the clock schedule compressed 20 times through the
registers. Each pixel gets its own responsivity (0.88–1.0) and dark current.
The testbench then calibrates the row the way a user would:

1. It takes a dark frame and a uniformly lit frame without correction.
2. It derives offsets that lift every dark value to the largest one, and
   gains that scale every light response to the weakest one.
3. It counts everything down in phase 3 so that dark reads 2.
4. It takes both frames again with these coefficients.

A typical run:

| frame | uncorrected | corrected |
|---|---|---|
| dark | values 1..8, sd 1.39 | values 1..2, mean 1.99 |
| lit | sd 12.8 codes | sd 0.45 codes |

## What follows the sensor and what is this design's own

Taken from the sensor description:

* the pixel structure: sampled comparator and CE, gated counter, chained
  coefficient register;
* the CE rule, and the LFSR counter with 1 as the dark value;
* the shape and symmetry of the gain pulse train;
* the offset pattern in phase 2, with a final ramp step above V_reset;
* the phase order 1a / 1b / 2 / 3, and the 2^k-1 clocks of phase 2;
* the split of the bus into offset and gain lines, and the range trade-off in
  the table above;
* the timing figures: 6.6 ms blanking, 495 + 15 clocks, 1.33 µs, about
  225 ms;
* a writable interval memory for the time-mode clock.

This design's own:

* the LFSR polynomial;
* the mapping of `C` bits onto gain lines (derived from the pulse counts);
* the counter enable in place of a gated clock, and the reset of the sampling
  flops;
* sampling conventions (`tick`, one cycle after the rising edge), the flush
  clock and the 4-cycle minimum period;
* the register map, the bus protocol, memory widths and the ramp table size;
* the DMA word format, its settling wait and its handshake;
* the analog model;
* the MSB-first coefficient loading at two cycles per bit.

The host-side linearity algorithm, the processor, the Ethernet/USB links and
the analog supply parts are not included.

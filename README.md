# Sinusoidal PWM generator with a quarter-wave sine table

An inverter that switches a DC supply between +V and -V produces a square
wave, rich in harmonics. Sinusoidal pulse width modulation (SPWM) switches it
many times per output period instead, with pulse widths that follow a sine,
so that after filtering (or through a motor's inductance) the load sees a
sine. The classic way to get those switching instants is to compare a sine
*reference* with a much faster triangular *carrier*: the switch is on while
the reference lies above the carrier.

This RTL generates that switching signal digitally for a 50 Hz output. The
sine comes from a lookup table, and the main idea of the design is to keep
that table small: only the first quarter of a sine period is stored, and
the other three quarters are rebuilt from the symmetry of the sine with a
few inverters.

```
            +-------------------------- sine_reference -------------------------+
 clk ---+   |  phase accumulator --> quadrant bits --+--> address mirror --+    |
        |   |   (+4295 per clock)                    |                     v    |
        |   |                                        |           sine_quarter_rom|
        |   |                                        +--> sign --> offset-binary |--ref_sample--+
        |   +-------------------------------------------------------------------+              |
        |                                                                                      v
        +-- triangle_carrier (up/down counter, 0..255..0) ---------------carrier-----> pwm_comparator --> spwm
```

## The quarter-wave table and how the period is rebuilt

`sine_quarter_rom` holds 64 seven-bit magnitudes,

    rom[k] = round(127 * sin(pi * (2k + 1) / 256)),   k = 0 .. 63

that is, the sine sampled at 256 points per period, each half a step off the
axis (at angles (k + 0.5) * 2*pi/256). The half-step offset is what makes
the mirror exact: the sample at k + 0.5 in the second quarter equals the one
at 63 - k + 0.5 in the first, and 63 - k is simply the bitwise inverse of a
6-bit k. No sample lands on 0 or on the peak, so no entry is needed twice.
The table is computed at elaboration time by a constant function using
`$sin`; no data file is involved.

`sine_reference` takes an 8-bit sample index from the top of a phase
accumulator. Its two top bits are the quadrant (`spwm_pkg::quadrant_e`):

| quadrant | angle        | table address  | half     |
|----------|--------------|----------------|----------|
| 0        | 0 .. pi/2    | index          | positive |
| 1        | pi/2 .. pi   | ~index         | positive |
| 2        | pi .. 3pi/2  | index          | negative |
| 3        | 3pi/2 .. 2pi | ~index         | negative |

The output is offset binary, symmetric about mid-scale 127.5:

    positive half: 128 + mag   = {1, mag}
    negative half: 127 - mag   = {0, ~mag}

so the sign costs one inverter on the top bit and seven on the magnitude.
The samples run from 0 to 255, the same range as the carrier.

## Frequency and timing

All numbers are at the default parameters.

- Clock: 50 MHz (`CLK_HZ`).
- Reference: a 32-bit phase accumulator adds `round(F_OUT_HZ * 2^32 / CLK_HZ)`
  = 4295 every clock. Output frequency 50.0004 Hz; one period is 999,992 or
  999,993 clocks; each of the 256 samples is held for about 3,906 clocks.
  Changing `F_OUT_HZ` or `CLK_HZ` retunes it; no other logic changes.
- Carrier: an 8-bit up/down counter runs 0, 1, ..., 255, 254, ..., 1, 0 and
  steps every `CAR_DIV` = 20 clocks. Period 2 * 255 * 20 = 10,200 clocks,
  4.90 kHz, about 98 carrier periods per sine period. The carrier is free
  running, not locked to the reference.
- Duty cycle: for a reference value r held over one carrier period, the
  output is high for (2r - 1)/510 of the period.
- Latency: the table read takes one clock, so `ref_sample`, `quadrant` and
  `ref_wrap` follow the phase accumulator by one clock; `spwm` is registered
  and follows the compared values by one more.
- Reset: `rst_n` is active low and asynchronous. The reference restarts at
  the first sample of a period (`ref_wrap` is high on the first clock), the
  carrier at 0, rising; `spwm` is 0.

## Top level interface: `spwm_generator`

| port             | dir | width | meaning                                          |
|------------------|-----|-------|--------------------------------------------------|
| `clk`            | in  | 1     | clock, `CLK_HZ`                                  |
| `rst_n`          | in  | 1     | asynchronous reset, active low                   |
| `spwm`           | out | 1     | switching signal for the inverter                |
| `ref_sample`     | out | 8     | sine reference, offset binary                    |
| `quadrant`       | out | 2     | quadrant of `ref_sample`                         |
| `ref_wrap`       | out | 1     | high with the first sample of each sine period   |
| `carrier`        | out | 8     | triangular carrier                               |
| `carrier_up`     | out | 1     | carrier is rising                                |
| `carrier_valley` | out | 1     | high in the clock before the carrier reaches 0   |

Everything except `spwm` is there for observation and testing. The inverter
power stage itself (switches, DC bus) is off chip and not modelled.

Parameters: `CLK_HZ` (50,000,000), `F_OUT_HZ` (50), `ACC_W` (32),
`QADDR_W` (6, so 64 table entries and 256 samples per period), `SAMPLE_W`
(8, reference and carrier width; table magnitudes are `SAMPLE_W-1` bits),
`CAR_DIV` (20). Defaults are also in `spwm_pkg`.

## Files

| file                       | content                                          |
|----------------------------|--------------------------------------------------|
| `rtl/spwm_pkg.sv`          | default sizes, `quadrant_e`                      |
| `rtl/sine_quarter_rom.sv`  | quarter-wave table, synchronous read             |
| `rtl/sine_reference.sv`    | phase accumulator, mirroring, sign               |
| `rtl/triangle_carrier.sv`  | up/down counter carrier                          |
| `rtl/pwm_comparator.sv`    | registered reference > carrier                   |
| `rtl/spwm_generator.sv`    | top level                                        |
| `tb/tb_*.sv`               | one self-checking testbench per module           |

## What follows the original design and what is this design's own

Taken from the design this implements: an FPGA SPWM generator that compares
a sine reference with a triangular carrier; the sine held as discrete values
in a lookup table; the table made smaller by using the symmetry of the sine;
a single 50 Hz output frequency; a small logic footprint as a goal. The
original targets an Altera Cyclone II device.

Chosen here, because the description gives no figures for them: storing a
quarter (rather than a half) period; 64 entries of 7 bits and the half-step
sampling; 8-bit offset-binary samples; the 50 MHz clock; the phase
accumulator as the frequency source; the 4.9 kHz carrier and its divider;
the strict ">" comparison with a registered output; the reset behaviour.

Known differences and gaps:

- The original presents three variants of its generator. What separates
  them is not specified, so this is a single generator that combines the
  two size-saving ideas named for all of them.
- There is no modulation-index (amplitude) input, no complementary output
  and no dead time: none is described. The reference spans the full carrier
  range: it reaches 0 and 255, the carrier's own extremes.
- Resource figures of the original (logic-element counts on Cyclone II)
  are not reproduced; this RTL synthesises to roughly 50 flip-flops, a
  448-bit table and a few adders and comparators.

## Verification

Each testbench compares its module with a model written independently (the
reference model uses the full sine, not a quarter table) and prints
`TB_RESULT checks=N failures=M`; each has a watchdog.

- `tb_sine_quarter_rom`: all 64 entries against `round(127*cos(pi/2 - angle))`,
  the one-clock read latency, monotonic table.
- `tb_sine_reference`: with a 51,200 Hz clock one period is exactly 1,024
  clocks; every clock of three periods checks sample, quadrant and wrap,
  and every quadrant must be visited.
- `tb_triangle_carrier`: every clock of three carrier periods at the
  default divider, the 10,200-clock period and the time spent at the peak.
- `tb_pwm_comparator`: equal values, extremes and 2,000 random pairs.
- `tb_spwm_generator`: the whole generator at its default parameters over
  one full 50 Hz period (about 10^6 clocks, a few seconds). Besides the
  clock-by-clock comparison it checks the duty cycle of every carrier
  period against the reference (within 0.02), the sine period in clocks,
  and the 50 Hz Fourier component of the +/-1 switched waveform (in phase
  about 1.00, quadrature below 0.05). It also counts that all four
  quadrants, carrier peaks and valleys, spwm pulses and a period wrap
  occurred.

Each testbench was also run against a deliberately broken copy of its
module (no half-step offset in the table, no address mirroring, carrier
turning one step early, `>=` instead of `>`, reference and carrier swapped)
and reported failures in every case.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/spwm_pkg.sv \
        tb/tb_spwm_generator.sv --top-module tb_spwm_generator -o sim
    ./obj_dir/sim

Replace `spwm_generator` by `sine_quarter_rom`, `sine_reference`,
`triangle_carrier` or `pwm_comparator` for the block tests. The package must
come first on the command line; the other modules are found through `-Irtl`.

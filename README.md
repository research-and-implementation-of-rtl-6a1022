# A DDS-based digital PLL with a jitter-free forced-reset oscillator

Power-converter control often needs a pulse train that follows a reference
frequency. This design does that with an all-digital phase-locked loop. Its
oscillator is a direct digital synthesizer (DDS) cut down to a phase
accumulator. It is small enough for a CPLD.

A plain accumulator oscillator (a "pulsed-output DDS") overflows on average
N times every 2^k clocks. Each single period, though, must be a whole number
of clocks, so the output edges wander by up to one clock: this is phase
jitter. The oscillator used in this loop removes the jitter with a *forced
reset*. On every overflow the accumulator goes back to zero instead of
keeping the remainder. Every period then has the same length. The cost is
that the output frequency can no longer be set in equal steps.

```
            +-------------------+  EVENT  +-----------------------+   N   +------------------------+
  fin ----->| phase detector    |-------->| time-to-digital       |------>| forced-reset DDS       |--+
            | (XOR)             |         | converter (2 counters,|       |   (or pulsed DDS,      |  |
     +----->|                   |         |  rise + fall edge)    |       |    dco_sel = 1)        |  |
     |      +-------------------+         +-----------------------+       +-----------+------------+  |
     |                                                                                | carry          |
     |                                       +----------------+                       v                |
     +---------------------------- fout <----| T flip-flop    |<----------------------+                |
                                             +----------------+                                        |
                        pulsed DDS phase --> sine table (P2A) --> sine_code (to an external DAC + filter)
```

## The two oscillators

Both cores have a K-bit frequency register (N), a K-bit adder and a K-bit
phase register. The default is K = 8.

**Pulsed-output DDS** (`phase_accumulator`). The phase register takes
`phase + N mod 2^K` on every clock. The adder carry and the phase MSB can
both serve as the output. The average output frequency is

    fout = N * fclk / 2^K,   step fclk / 2^K,   maximum fclk/2 at N = 2^(K-1).

Each period is `floor(2^K/N)` or `ceil(2^K/N)` clocks long. Take K = 4 and
N = 5. The phase runs 0, 5, 10, 15, 4, 9, 14, 3, ... with a carry on 4, 3,
2, 1 and 0. The ideal carry spacing is 3.2 clocks. The real spacing is 4, 3,
3, 3, 3 clocks, so the edges are off the ideal ones by `remainder/N` of a
period (4/5, then 3/5, ...).

**Forced-reset DDS** (`dds_forced_reset`). This core has the same datapath.
When the adder carries, the register loads 0 and the remainder is thrown
away. Each period therefore starts from zero and lasts exactly

    B = ceil(2^K / N) clocks,   fout = fclk / B.

In the K = 4, N = 5 example every period is 4 clocks. Only the frequencies
fclk/B can be reached. Between B+1 and B the step is `fclk / (B(B+1))`. This
step is tiny for small N (large B) and grows quickly as N rises. With K = 16
and fclk = 80 MHz, for example:

| N    | B   | fout (forced reset) | N*fclk/2^16 |
|------|-----|---------------------|-------------|
| 200  | 328 | 243.9 kHz           | 244.1 kHz   |
| 1600 | 41  | 1.951 MHz           | 1.953 MHz   |
| 3000 | 22  | 3.636 MHz           | 3.662 MHz   |
| 4400 | 15  | 5.333 MHz           | 5.371 MHz   |

The oscillator is therefore only useful over the low end of N: roughly the
bottom 5% of its range, where the steps are still fine. The MSB output is
not symmetric, and its duty cycle changes with N. A T flip-flop after the
carry (`t_flip_flop_divider`) gives a 50% square wave at `fclk/(2B)`. The
same module with `STAGES = 2` is the divide-by-4 that is often used to
reduce the jitter of a plain pulsed-output DDS.

## Closing the loop: phase detector and time-to-digital converter

`digital_phase_detector` is an XOR of fin and fout. Its output (EVENT) is
high for as long as the two inputs differ. With 50%-duty inputs that gives
two pulses per period, and each pulse lasts as long as the phase
difference.

`tdc_converter` turns each EVENT pulse into the control word N. It has two
counters. One counts rising clock edges while EVENT is high. The other runs
on the inverted clock and counts falling edges. Their sum is the pulse
length in half clock periods, which is twice the resolution of a single
counter.

- **Result.** N is latched on the first rising edge at which EVENT is found
  low again, and `n_valid` pulses for one cycle.
- **Clearing.** The rising-edge counter is cleared on that same edge. The
  falling-edge counter is cleared on the next falling edge.
- **Limits.** N saturates at 2^K-1. Pulses or gaps shorter than half a
  clock can be lost. EVENT is not synchronized: fin is asynchronous, so on
  silicon the counters can go metastable, and the loop relies on the
  clock being much faster than EVENT.

Both DDS cores load N on every `n_valid`. The loop works like this:

- A larger phase lag gives a longer EVENT pulse. That gives a larger N and a
  faster oscillator.
- A smaller lag slows the oscillator down.
- There is no other filter: the converter is the loop filter.

In simulation (clock 10 ns, K = 8) the loop behaves as follows:

- **Locks.** With a 400 ns fin it settles to an average fout period of
  400 ns, using either oscillator. It also locks with a 480 ns fin. N then
  sits around 11 to 14 and alternates between the two pulses of each
  period. Single fout periods therefore alternate around the average (390
  and 410 ns, for example).
- **Does not lock.** With some other fin periods (600 ns and 800 ns, for
  example) this proportional, XOR-based loop settles at a different
  frequency. The lock range has not been characterized.

## Interfaces and timing

All blocks share one clock. Reset is asynchronous and active low. The
widths come from `dds_pkg`: `ACC_WIDTH = 8` and `AMP_WIDTH = 8`.

| module | key ports | timing |
|---|---|---|
| `dds_pll_top` | `fin`, `dco_sel` in; `fout`, `pd_event`, `n_word`/`n_valid`, `fr_pulse`, `fr_msb`, `pa_carry`, `pa_msb`, `sine_code` out | `fout` changes one clock after a carry of the selected core |
| `phase_accumulator` | `n_load`, `n_in[K]` → `phase[K]`, `carry`, `msb` | N is used from the edge after it is loaded; `carry` is registered with the sum, so it is high while `phase` holds a wrapped value |
| `dds_forced_reset` | same ports | `carry` is high for one clock at the start of each period, while phase = 0 |
| `t_flip_flop_divider` | `pulse` → `q` | toggles on the edge that samples `pulse` |
| `tdc_converter` | `event_i` → `n_word[K]`, `n_valid` | result at most one clock after EVENT falls |
| `digital_phase_detector` | `fin`, `fout` → `event_o` | combinational |
| `p2a_sine_rom` | `phase[PHASE_BITS]` → `amplitude[AMP_BITS]` | registered: one clock of latency |

The sine table is computed at elaboration:
`round(2^(A-1) + (2^(A-1)-1) * sin(2*pi*i/2^P))`. This is offset binary, with
mid-scale meaning zero. In the top it is addressed by the pulsed
accumulator's phase. The DAC and the reconstruction filter that would follow
it are analog and are not part of this RTL, so `sine_code` is a plain output
port.

## Where this RTL makes its own choices

The published description of this oscillator fixes the following:

- the loop structure (detector, converter as loop filter, DDS oscillator);
- the two-counter converter with one counter on the inverted clock;
- the adder-plus-register accumulator, 8 bits wide;
- the forced reset on the adder carry;
- the T flip-flop for a 50% duty cycle;
- the sine table of a full DDS.

Everything below is this RTL's own choice.

- **Period rounding.** The forced reset is a synchronous clear on the edge
  where the adder carries, which gives periods of `ceil(2^K/N)` clocks.
  The source gives its formula for the period with a round-down
  ("largest integer less than 2^k/N"). Its own worked example (k = 4,
  N = 5, period of 4 clocks) and its overflow condition `B*N >= 2^k`
  round up instead. This RTL follows the example. A clear driven
  asynchronously by the adder's carry would give the round-down
  behaviour: one clock shorter, with a combinational glitch. It was not
  used.
- **Phase detector.** The XOR detector is one possible circuit. The
  requirement is only a pulse as long as the phase difference. A
  set/reset (flip-flop) detector would fit too, but it would give one pulse
  per period and a different loop gain.
- **Converter sequencing.** When the counters start and stop, the `n_valid`
  strobe and the saturation are all choices of this design.
- **Second core and mode switch.** The `dco_sel` switch and the sine path
  exist so that the plain pulsed DDS can be compared in the same loop. The
  forced-reset core is the intended oscillator.
- **Reset values.** Reset clears every register. No reset state is
  prescribed.
- **16-bit results.** The 16-bit frequency curve in the table above was
  produced with `K = 16`. The default build is 8 bits.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **`tb_phase_accumulator`**
  - Reproduces the K = 4, N = 5 sequence exactly, including the carries.
  - For K = 8 and N = 0x13 and 0x48: checks every phase value against a
    reference, that every carry interval is floor or ceil of 256/N, and
    that there are exactly N carries per 256 clocks.
  - Checks the fclk/2 limit at N = 128.
- **`tb_dds_forced_reset`**
  - Checks the K = 4, N = 5 case.
  - For K = 8 it sweeps every N from 1 to 255: each period must be exactly
    `ceil(256/N)` clocks and the MSB must be high for `B - ceil(128/N)`
    clocks.
  - Checks that N = 0 produces no output.
- **`tb_t_flip_flop_divider`**: divide-by-2 and divide-by-4 with random
  pulses, and 50% duty cycle with evenly spaced pulses.
- **`tb_digital_phase_detector`**: checks the pulse width at several phase
  offsets.
- **`tb_tdc_converter`**: sends randomly timed EVENT pulses, placed off the
  clock grid. Checks the half-period count, one strobe per pulse, latency
  under one clock, and saturation.
- **`tb_p2a_sine_rom`**: checks all 256 entries against an independently
  computed sine, plus the quarter points and the symmetry.
- **`tb_freq_sweep_16bit`**: K = 16, N from 14 to 4700.
  - The forced-reset period must be exactly `ceil(65536/N)`.
  - The frequency step must be `fclk/(B(B+1))`.
  - The frequency must never exceed the linear value `N*fclk/2^16`.
  - The pulsed core must give exactly N carries in 2^16 clocks.
  - It prints fout for fclk = 20, 40 and 80 MHz.
- **`tb_dds_pll_top`**: the whole loop at its default size.
  - Locks to a 400 ns fin with the forced-reset oscillator, switches to the
    pulsed oscillator and locks again, then locks to a 480 ns fin.
  - Checks every N against its own count of the phase-detector pulses.
  - Checks every `fout` toggle against the selected carry.
  - Checks every forced-reset period that had a stable N against
    `ceil(256/N)`.
  - Requires that converter updates, forced resets, pulsed-DDS jitter, both
    mode switches, T flip-flop toggles and full-scale sine samples are all
    seen.

To run a testbench with Verilator 5:

```
verilator --binary -Wno-fatal --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_dds_pll_top rtl/dds_pkg.sv tb/tb_dds_pll_top.sv
./obj_dir/Vtb_dds_pll_top
```

Replace the top module and file to run another testbench. All of them finish
in well under a second. To change the accumulator width, override `K` on
the modules or change `ACC_WIDTH` in `dds_pkg`.

# STIC: an always-on stochastic computing core for energy-harvesting sensors

A battery-less or small-battery sensor node that lives on harvested energy
normally survives power loss by *intermittent computing*: it saves its state to
non-volatile memory before the supply collapses and restores it later. The
saving, restoring and sleeping cost energy and leave gaps in which no result
exists.

This core takes another route. It computes with **stochastic bit-streams**: a
number in [0,1] is a stream of bits whose fraction of ones is the number. Such
streams have *progressive precision*: the first 16 bits already give a rough
value, 256 bits give 8-bit accuracy, and no later bit matters more than an
earlier one. So a computation can be stopped at any of several lengths and
still give a usable result. The core looks at the harvester's **charging
rate** while it computes and stops each computation at the longest stream the
incoming energy can pay for. When energy is plentiful it computes at 8-bit
precision; when nothing is harvested it keeps going at 16-bit streams (about
4-bit precision) instead of stopping. There is no checkpoint, no non-volatile
state and no sleep state: the core is always on and the precision varies.

Stochastic arithmetic is also tiny. A multiplier is one AND gate, minimum and
maximum are AND and OR, an absolute difference is an XOR. That makes it cheap
to run several lanes in parallel to shorten the time a long stream takes.

## Block diagram

```
            in_x ──► BSC ─┐                              ┌─────────────┐
 sensor_v ─► ASC ────────►X                              │ stic_ctrl   │
            in_y ──► BSC ───►Y    ┌──────────┐           │ (loop with  │◄─ level ◄─ stic_precision_sel ◄─ charge_rate, th
            in_w ──► BSC ───►W ──►│ stic_spu │──┐        │ rate checks)│
   RNG1 (stic_rng) ──► X, Y, pixel converters   │        └─────┬───────┘
   RNG2 (stic_rng) ──► W, weight converters     ├─► stic_counter ─► out_ones, out_value
   in_pix[9] ─► 9 BSC ─► stic_roberts / stic_median9 ─┤        start / run / out_valid
   in_wt[9]  ─► 9 BSC ─► stic_mac9 ───────────────────┤
   in_x ─► 6 BSC (RNG1, RNG3, RNG4) ─► stic_gamma ─────┘
           7 coefficient BSC (RNG2) ─┘
```

Every converter, processing circuit and the counter handle **P = 4 stream bits
per clock** (four lanes). A 256-bit computation therefore takes 64 clocks.

## Stream generation: converters and random sources

A binary operand `v` (W = 8 bits) becomes a stream by comparing it, every bit,
with a random number `r`: the bit is `1` when `v > r` (`stic_bsc`). An analog
sensor voltage is converted the same way, with the random number turned into a
voltage by a DAC (`stic_asc`, a behavioural model with a `real` input).

Which random numbers are used decides what the gates compute:

* **Correlated streams** come from the *same* random numbers. For these,
  AND is the minimum, OR the maximum and XOR the absolute difference, exactly.
  X and Y, and the nine window pixels, all use RNG1.
* **Uncorrelated streams** come from *different* random numbers. For these,
  AND is the product. W and the nine weights use RNG2.

`stic_rng` is an 8-bit linear-feedback shift register extended to a de Bruijn
sequence: the all-zero state is inserted after `1000_0000`, so the register
walks through all 256 values. The core takes one number every 9 steps. Nine
is odd, so the numbers still cover all 256 values once per 256 numbers, and
consecutive numbers share no register bits, which a plain one-step LFSR
sequence does (each state is the previous one shifted). Two consequences
matter to the user:

* A full 256-bit stream represents an 8-bit value **exactly**, and min, max,
  |x−y|, conversion and the 3x3 median are exact at full length.
* Short prefixes are already well spread, so the 16-bit results are usable
  (see the accuracy table below).

For P lanes the register is unrolled P·9 steps per clock; lane j gets the
number 9·j steps ahead. The four lanes therefore carry exactly the numbers a
one-lane converter would use in four consecutive cycles, and the parallel
result is identical to the serial one. Both sources restart at fixed seeds
(119 for RNG1, 159 for RNG2) when a datum is accepted, so every computation
uses the same sequence. RNG2's numbers are bit-reversed, so they are not
correlated with RNG1's.

## The stochastic processing unit and window circuits

`stic_spu` applies one operation to the X, Y, W streams (opcode `in_op`,
`stic_pkg::spu_op_e`):

| code | name        | gate per lane                 | result        | needs                |
|------|-------------|-------------------------------|---------------|----------------------|
| 0    | `OP_MIN`    | X AND Y                       | min(X,Y)      | X,Y correlated       |
| 1    | `OP_MAX`    | X OR Y                        | max(X,Y)      | X,Y correlated       |
| 2    | `OP_ABSSUB` | X XOR Y                       | \|X−Y\|       | X,Y correlated       |
| 3    | `OP_MUL`    | X AND W                       | X·W           | uncorrelated         |
| 4    | `OP_ADDAPX` | X OR W                        | X+W−X·W ≈ X+W | small values         |
| 5    | `OP_DIV`    | Y ? X : previous output bit   | X/Y           | X ≤ Y, correlated    |
| 6    | `OP_SCALED` | W ? Y : X                     | (X+Y)/2       | `in_w` = 128 (0.5)   |
| 7    | `OP_PASS`   | X                             | X             | conversion only      |
| 8    | `OP_ROBERTS`| W ? (p1 XOR p3) : (p0 XOR p4) | (\|p0−p4\|+\|p1−p3\|)/2 | `in_w` = 128 |
| 9    | `OP_MEDIAN` | 19 AND/OR compare-exchanges   | median of p0..p8 | pixels correlated |
| 10   | `OP_MAC`    | wt[i] AND p[i], counted       | Σ p[i]·wt[i]  | uncorrelated         |
| 11   | `OP_GAMMA`  | coefficient stream picked by the count of six X bits | ≈ X^0.45 | six independent X streams |

The divider is the only circuit with state: a flip-flop holds the previous
output bit. In the four-lane version lane j uses lane j−1's output of the same
clock and only lane 3's output is stored, which keeps the lanes equal to a
serial divider. The window circuits use pixels p0..p8 of a 3x3 window
(row-major; Roberts uses the top-left 2x2 block). For the MAC the counter
adds all 36 product bits per clock, so `out_ones / L` is the dot product
(0..9) and is accumulated in binary, not in a stochastic adder.

### Gamma correction

`stic_gamma` computes y ≈ x^0.45 with a degree-6 Bernstein polynomial,
y = Σ b_k·C(6,k)·x^k·(1−x)^(6−k). Six streams of the same x, all mutually
independent, are summed bit by bit. The sum k (0..6) occurs with exactly the
binomial weight C(6,k)·x^k·(1−x)^(6−k). It selects the bit of coefficient
stream k, whose value is b_k. The coefficients are the least-squares fit of
this polynomial to x^0.45 over the 256 8-bit inputs. Scaled by 256 and
clamped to 0..255 they are 21, 194, 74, 255, 170, 252 and 254
(`stic_pkg::gamma_coef`). The fit alone is off by about 1% on average, and
most at x = 0, where it gives 21/256.

The six x streams need six unrelated random sequences. The core takes them
from RNG1 and two more LFSRs, RNG3 and RNG4 (seeds 60 and 200), each used
as-is and bit-reversed. The coefficient streams share RNG2: only one of them
is read per bit, so they may be correlated with each other.

## Precision control: the rate check and the controller loop

This is the part that makes the core "intermittent-safe".

`stic_precision_sel` compares `charge_rate` with four thresholds `th[0..3]`
(Th1 < Th2 < Th3 < Th4) and gives a **precision level**: 4 if the rate is
above Th4, 3 above Th3, 2 above Th2, 1 above Th1, else 0. A rate equal to a
threshold gives the lower level. Level 0 means even 16-bit streams cost more
than the harvester delivers; the battery covers the difference. The
thresholds are inputs; choosing them (the power a given stream length needs,
plus a margin so the battery stays full) is the system designer's job.

`stic_ctrl` runs one computation per datum:

1. In IDLE `in_ready` is high. The clock in which `in_valid && in_ready`
   (`start`) loads the operands, restarts the random sources and clears the
   divider flip-flop and the counter.
2. In RUN each clock processes 4 stream bits. The valid lengths are 16, 32,
   64, 128 and 256 bits, i.e. after **4, 8, 16, 32 and 64 clocks**. When the
   clock count reaches valid length *i*, the rate is checked (`rate_check`
   pulses) and the computation **ends if i ≥ level**. Otherwise it goes on to
   the next valid length. 256 bits always ends it.
3. The clock after the last RUN clock `out_valid` pulses with `out_ones`
   (ones counted), `out_idx` = *i* (length L = 16·2^i) and
   `out_value = out_ones·256/L` (saturated to 8 bits). The controller is
   already back in IDLE in that clock, so a datum offered then is taken at
   once.

So a datum of L bits takes **L/4 + 1 clocks** from acceptance to result, and
back-to-back data arrive every L/4 + 1 clocks. The level is sampled *at each
check*, not once per datum: if the rate rises during a computation, the
computation runs longer. If it falls, the computation ends at the next
check. There is no backpressure on the result. The producer must hold
`in_valid` until it is taken (checked by an assertion in `stic_ctrl`).

## Parameters

`stic_top` parameters (defaults are the main configuration):

| parameter    | default | meaning |
|--------------|---------|---------|
| `W`          | 8       | operand width; longest stream 2^W bits (RNG period) |
| `P`          | 4       | lanes, stream bits per clock (power of two) |
| `MIN_LOG2`   | 4       | shortest stream 2^MIN_LOG2 = 16 bits |
| `LEVEL_STEP` | 1       | valid lengths 2^(MIN_LOG2 + i·LEVEL_STEP) |
| `RATE_W`     | 16      | width of `charge_rate` and thresholds |
| `VREF`       | 1.0     | full-scale sensor voltage of the analog converter |

The number of levels is (W − MIN_LOG2)/LEVEL_STEP + 1 and `th` has one entry
fewer. `W = 10, LEVEL_STEP = 2` gives the four lengths 16, 64, 256 and 1024
bits with three thresholds (used by `tb_stic_trace`).

## Accuracy

Mean absolute error in percent of full scale, random operands, measured by
`tb_stic_table1` on this RTL (150 trials per entry up to 256 bits; the MAC is
normalised by its nine terms). The 512- and 1024-bit columns come from a second
core built with `W = 10` and 60 trials per entry:

| circuit                   | 16 bits | 32  | 64  | 128 | 256 | 512 | 1024 |
|---------------------------|---------|-----|-----|-----|-----|-----|------|
| 2-input multiplication    | 3.2     | 2.8 | 2.3 | 1.1 | 0.4 | 1.0 | 0.2  |
| 3x3 MAC                   | 1.1     | 1.0 | 0.7 | 0.3 | 0.2 | 0.8 | 0.1  |
| 3x3 median filter         | 3.0     | 2.6 | 1.8 | 1.1 | 0.0 | 1.7 | 0.0  |
| gamma correction (x^0.45) | 6.1     | 5.9 | 3.8 | 2.6 | 1.9 | 2.6 | 1.3  |
| Roberts cross             | 4.4     | 4.0 | 2.9 | 1.5 | 0.7 | 1.5 | 1.0  |

The seeds were tuned for the 8-bit core only. On the 10-bit core the first
512 numbers of each source are less even, so its 512-bit errors are higher
than the 8-bit core's at 128 bits.

The data are random, so repeated runs move these figures by a few tenths.
The 16-bit multiplication and median errors are close to published figures
for these circuits (about 3.7% and 3.1%), and so are the gamma-correction
errors (published: 7.75, 5.36, 3.53, 2.39 and 1.67%). Beyond 128 bits the gamma
error falls slowly, because the polynomial approximation and the six sources
are not exact. From 32 to 128 bits the errors
shrink more slowly than halving per doubling of the length, which a
low-discrepancy random source would give, because an LFSR prefix is less
even. The seeds were chosen so that every prefix of 16 to 128 numbers is
well spread. The median and conversion are exact at 256 bits, since the
sources then visit every 8-bit value once; the same holds at 1024 bits on
the 10-bit core. A different random source would
change these numbers, not the structure of the core.

### Images: an answer at any run time

`tb_stic_image` filters a 12x12 test image (a ramp and a bright square, with
10% salt-and-pepper noise) pixel by pixel through the core. It runs a 3x3
median for noise removal and a Roberts cross for edges, at each stream
length. It compares the result with a conventional processor given the same
share of the full (256-bit) run time. That processor finishes only that share
of the pixels, exactly, and leaves the rest empty. Mean absolute error against
the exactly filtered image, in percent:

| run time (stream length)      | 6% (16) | 12% (32) | 25% (64) | 50% (128) | 100% (256) |
|-------------------------------|---------|----------|----------|-----------|------------|
| median, stochastic            | 3.0     | 3.8      | 1.8      | 1.4       | 0.0        |
| median, partial conventional  | 46.3    | 43.3     | 36.9     | 24.6      | 0.0        |
| Roberts, stochastic           | 3.9     | 3.0      | 2.0      | 1.3       | 0.3        |
| Roberts, partial conventional | 17.2    | 16.1     | 13.7     | 9.2       | 0.0        |

The stochastic image is complete from the shortest stream on and only gains
detail. This is the property that lets the core give up checkpointing.

## Where this RTL departs from, or adds to, the design it follows

* **Random source.** The design asks only for an RNG such as an LFSR. The
  de Bruijn extension, the 9-step stride, the seeds, the restart per datum
  and the bit reversal for the second source are this implementation's.
* **Charging-rate rule.** The published procedure never returns level 0 as
  written (its level-1 branch covers every rate below Th2). The text says the
  battery is used only below Th1, so level 1 is returned above Th1 and level
  0 below it.
* **Window circuits.** Roberts cross, median and MAC are circuits the design
  evaluates but does not draw. They are built here from the same gate
  primitives. The MAC accumulates in binary. Gamma correction is also
  evaluated there only by name and cost. Its Bernstein selector, the
  exponent 0.45, the degree, the coefficients and the two extra random
  sources are this implementation's.
* **Interfaces.** The valid/ready input, the result pulse, `out_value`,
  operand registers and the operand select for the analog path are this
  implementation's. The analog sensor voltage is used live during the
  computation, not sampled.
* **Outside the core.** Harvester, battery, sensors, radio, host
  microcontroller, DSP and memory are not part of the RTL. Neither is the
  node's standby, sense, compute and transmit sequence, which the host runs.
  Without checkpoints it needs no sleep, load or store states. The charging rate
  arrives as a number and the sensor as a `real` voltage.
* **Analog parts.** `stic_dac` and `stic_asc` are behavioural models (ideal
  DAC, ideal comparator) and are not synthesizable. Because `stic_top`
  instantiates them, `stic_top` is not synthesizable as is. For synthesis,
  drive X from a binary converter and remove `u_asc_x`.

## Files

`rtl/` (one module or package per file):

| file | content |
|------|---------|
| `stic_pkg.sv` | opcode enum, level and valid-length functions, LFSR tap table |
| `stic_rng.sv` | P-lane de Bruijn LFSR random source |
| `stic_bsc.sv` | P-lane binary-to-stochastic comparator array |
| `stic_dac.sv`, `stic_asc.sv` | behavioural DAC and analog-to-stochastic converter |
| `stic_spu.sv` | stochastic processing unit |
| `stic_roberts.sv`, `stic_median9.sv`, `stic_mac9.sv` | 3x3 window circuits |
| `stic_gamma.sv` | gamma-correction Bernstein selector |
| `stic_counter.sv` | ones counter (stream back to binary) |
| `stic_precision_sel.sv` | charging rate to precision level |
| `stic_ctrl.sv` | computation loop with rate checks |
| `stic_top.sv` | the core |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`; the DAC is
covered by `tb_stic_asc`), plus

* `tb_stic_top.sv`: end to end at default size. Checks every result against
  a bit-serial reference model (`tb_stic_model_pkg.sv`), the latency, the
  length chosen from a rate profile, and that every operation, every level, a
  computation with no harvest, a precision change in mid-computation, the
  analog path and a back-to-back datum all occur.
* `tb_stic_table1.sv`: the accuracy table above (instantiates an 8-bit and a
  10-bit core).
* `tb_stic_image.sv`: the image comparison above.
* `tb_stic_trace.sv`: W = 10 / lengths 16..1024, three synthetic charging
  traces (normal, favourable, constrained with a stretch of zero harvest).
  Checks that results never stop, that only 16-bit streams are used while
  nothing is harvested, and that the length mix follows the energy.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5 (packages first, library search for the rest):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_stic_top rtl/stic_pkg.sv tb/tb_stic_model_pkg.sv tb/tb_stic_top.sv
./obj_dir/Vtb_stic_top
```

Replace `tb_stic_top` by any other testbench name. All testbenches finish in
well under a second. Testbenches that do not use the reference model can drop
`tb/tb_stic_model_pkg.sv`. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/stic_pkg.sv rtl/<module>.sv`.
Verilator reports one `SYNCASYNCNET` warning on `rst_n`: the asynchronous
reset is also the `disable iff` condition of the controller's assertions,
which is harmless.

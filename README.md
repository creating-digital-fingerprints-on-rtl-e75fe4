# Transition-based digital fingerprints for FPGAs

Two copies of the same circuit in the same FPGA product line never behave
quite the same. Small manufacturing variations shift gate and routing
delays, so an output that settles through several stages of logic glitches a
slightly different number of times on each device, and each edge arrives a
little earlier or later. This design turns that into a device identifier
without a dedicated puzzle circuit such as a PUF. It watches the outputs
of an ordinary logic block: here a 32-bit combinational multiplier, whose
64 product bits are the *signal lines*.

Two capture methods are attached to the same lines:

* **Nodal cumulative sampling (NCS).** Each line clocks its own 8-bit
  one-hot shift register. The register starts at `0000_0001`. Every rising
  transition on the line shifts a `0` in, so the `1` moves one place up. The
  final position of the `1` is the number of transitions the register
  *managed to catch*. A glitch too short for that flip-flop's setup and hold
  window is lost, and that is the device-dependent part. One base-8 digit
  per line gives a 192-bit ID for all 64 lines. A 54-bit ID uses only the
  18 lines that proved stable across runs and different between devices.
* **Transitional sampling (TS).** One line is used as a clock. On each of
  its rising transitions every line, the trigger line included, is shifted
  into a 4-deep register. This gives four 64-bit sample words, n0..n3.
  Lines whose edges fall close to the trigger edge are sampled old on one
  device and new on another.

## What RTL can and cannot show

The fingerprint lives in the analogue timing of a real device. RTL
simulation has zero delay, so each product bit changes at most once per
new operand pair and there are no glitches. The RTL therefore builds and
checks the *mechanism*: the registers, their clocking, counting,
overflow, sample windows and ID assembly. The values it produces in
simulation are the glitch-free counts. On silicon the same netlist gives
larger, device-specific counts. Expect these points when implementing it:

* The line-to-register connection must stay a direct clock connection.
  Keep the tools from turning the multiplier outputs into synchronised
  data, and expect timing tools to report many derived clocks.
* The multiplier must stay a ripple structure. A tool that maps it onto DSP
  blocks or fast carry logic removes most of the glitches. The measured
  values in the characterisation (counts 0 to 6 per bit, lowest at bits
  0-5 and 59-63) come from a ripple-adder array mapped into LUTs.
* Some counts and samples are unstable from run to run. Both the 18-line
  selection and any error tolerance come from characterising many devices.
  The ID is not error-corrected here.

## Block structure

```
            a_in,b_in,load ─► operand register (clk) ─► array_multiplier ─► product[63:0]
                                                              │  (ripple_adder rows)
                      ┌───────────────────────────────────────┼────────────────────┐
                      ▼                                       ▼                    │
            ncs_fingerprint                              ts_sampler                │
  64 × onehot_shift_reg (clock = product[i])   trig = product[trig_sel]            │
  64 × onehot_to_bin                           64 × ts_shift_reg (clock = trig)    │
        │ ncs_raw, ncs_id192, valid, overflow        │ ts_samples[0..3], ts_n_trig │
        ▼                                                                          │
     id_select ─► ncs_id54                                                         │
```

| File | Role |
|---|---|
| `rtl/fp_pkg.sv` | sizes (32-bit operands, 64 lines, 8-bit one-hot, 4 samples) and the 18-line ID list |
| `rtl/ripple_adder.sv` | W-bit full-adder chain |
| `rtl/array_multiplier.sv` | 32×32 unsigned array multiplier; each row is a ripple adder |
| `rtl/onehot_shift_reg.sv` | per-line transition counter clocked by the line |
| `rtl/onehot_to_bin.sv` | one-hot to 3-bit digit, with `valid` and `overflow` |
| `rtl/ncs_fingerprint.sv` | 64 counters plus encoders |
| `rtl/id_select.sv` | 18 chosen digits to the 54-bit ID |
| `rtl/ts_shift_reg.sv` | per-line 4-deep sample register clocked by the trigger |
| `rtl/ts_sampler.sv` | trigger multiplexer, 64 sample registers and a trigger counter |
| `rtl/fingerprint_top.sv` | operand register, multiplier and both methods |

## The multiplier as a glitch source

`array_multiplier` forms partial-product rows `a & {32{b[j]}}`. Row 0 is the
starting sum. Each further row is added to the upper 32 bits of the running
sum by a 32-bit `ripple_adder`, and its carry-out becomes the new top bit.
Each row retires its lowest bit as product bit `j`; the last row gives bits
32-63. A middle product bit sits behind many rows and long carry chains, so
it sees many intermediate values before it settles. The bits at both ends
pass through little logic and see few. This is why only the middle bits are
useful lines.

## Nodal cumulative sampling in detail

`onehot_shift_reg` uses the line as its clock (`always_ff @(posedge line or
posedge clear)`). `clear` is asynchronous. It must be released while the
lines are quiet, that is, before new operands are loaded.

* After k caught transitions, `q == 1 << k`.
* After 8 or more, the `1` has been shifted out and `q == 0`. `onehot_to_bin`
  then reports `overflow = 1` and digit 0. Eight 1-bits can hold the
  counts 0-7. The characterisation saw 0-6 at room conditions. Under
  temperature and voltage changes, one bit reached 8, which this register
  size reports as an overflow, not as a count.
* `valid` is high when exactly one bit is set. A register that is neither
  one-hot nor empty cannot arise from shifting. It would point to a metastable
  or disturbed capture.
* Parameter `FALLING = 1` counts 1→0 transitions instead; the default
  counts 0→1.

`ncs_id192` holds the digit of line i in bits `[3i+2:3i]`. `ncs_id54` holds
the digits of lines 51, 48, 47, 46, 42, 35, 34, 30, 27, 25, 21, 19, 17, 14,
13, 11, 10 and 9, with the first of these in the most significant digit. That
list is a measurement result for the device family in which the method was
characterised: ten devices, with lines kept only if their count did not
oscillate and did differ between devices. It lives in `fp_pkg::NCS_ID_LINES`
and should be re-derived for another device or another mapping of the
multiplier.

## Transitional sampling in detail

`ts_sampler` picks the trigger with a multiplexer, `trig = lines[trig_sel]`.
On each rising edge of `trig`, each `ts_shift_reg` shifts its line in from
the top. After four or more edges, `samples[0]` (n0) is the oldest of the
last four captures and `samples[3]` (n3) the newest. With fewer edges, the
low slots keep their cleared value of zero. `n_trig` counts edges since
`clear` and saturates at 4.

Timing points:

* Change `trig_sel` only while cleared or idle: a change can itself make an
  edge on `trig`.
* The trigger line samples itself. In simulation it reads `1`. On silicon it
  is a race, like every line that switches at about the same time as the
  trigger. Those races are what make the samples device-specific. They are
  also why TS samples are less repeatable than NCS counts.
* The original evaluation used nine output lines as triggers (among them
  19, 21, 24, 25, 28, 30, 34 and 40), with four samples each. It does not
  say how the trigger line was chosen. The run-time multiplexer here is a
  convenience. It adds a delay of its own, so a multiplexed trigger is not
  timing-identical to a hard-wired one.

## Top level and a measurement

`fingerprint_top` ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | operand register clock and asynchronous active-low reset |
| `load`, `a_in`, `b_in` | in | 1, 32, 32 | operands taken on the next `clk` edge when `load` is high |
| `clear` | in | 1 | asynchronous start of a measurement for both methods |
| `trig_sel` | in | 6 | TS trigger line |
| `product` | out | 64 | the signal lines |
| `ncs_raw` | out | 512 | all one-hot registers, line i in `[8i+7:8i]` |
| `ncs_id192`, `ncs_valid`, `ncs_overflow` | out | 192, 64, 64 | digits and flags |
| `ncs_id54` | out | 54 | short ID |
| `ts_samples` | out | 4×64 | n0..n3 |
| `ts_n_trig` | out | 3 | trigger edges seen (saturating at 4) |

A measurement:
1. Hold the operands steady.
2. Pulse `clear`.
3. Load one or more operand pairs.
4. Wait for the product to settle.
5. Read the outputs.

Counts add up over all operand changes until the next `clear`. The results
are read straight from the registers; the original evaluation read them
with a logic analyzer.

## Where this departs from the source method, or goes beyond it

* The source states the method's structure and sizes: a one-hot register per
  line starting at the LSB, base-8 digits, a 54-bit and a 192-bit ID, a line
  used as a sampling clock, and four samples. It does not describe the
  following, which are this design's choices: the operand register, the
  `clear` inputs, the `valid`/`overflow` flags, the sample order in the
  registers, the trigger multiplexer, `n_trig`, and the order of digits in
  the IDs.
* Multiplier operands are taken as unsigned.
* Not built:
  * the asynchronous-LFSR fingerprint, which was named but never specified;
  * error correction of unstable digits, which was suggested (Hamming
    distance) but not designed;
  * counting of level pulses rather than edges;
  * the per-sample error factors and the XOR differentiation across
    devices, which are offline analysis of captured data.

## A modelled device population

The zero-delay RTL cannot show a fingerprint. `tb/tb_device_fingerprints.sv`
therefore feeds the capture blocks from `glitch_multiplier`, a testbench-only
timing model of the same multiplier array. In this model, every full adder
(`delay_fa`) gets sum and carry delays of 300-419 ps. The delays are drawn
from a hash of a device number, and transport delay passes every
intermediate value through.

Each modelled device is measured the same way: operands 0, then `clear`,
then three fixed operand pairs. An observer in the testbench counts every
line's rising edges and records the lines at each trigger edge. Every
one-hot register and every TS sample bit must agree with that record. The
exception is a line that switched in the very picosecond of the trigger
edge. That is a genuine race, and the testbench skips it.

Results with 20 modelled devices:

* Counts per line are 0 to 7. They are lowest at both ends of the product
  and highest in the middle, as on silicon.
* All 20 192-bit IDs are different.
* Each of the eight trigger lines 19 to 40 yields samples that tell all 20
  devices apart.
* A repeated measurement of the same device gives an identical result.

The model has no setup/hold window and no noise, so it is more repeatable
than real parts. Real parts show digits that flip between runs.
Treat the model as a check of the capture logic and of the idea, not as a
prediction of real parts.

This testbench takes a few minutes to build and about two minutes to run.
It sets its time unit to 1 ns, with 1 ps precision, for the picosecond
delays.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with
Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/tb_fingerprint_top.sv --top-module tb_fingerprint_top
./obj_dir/Vtb_fingerprint_top
```

`tb_fingerprint_top` runs the whole design at its default sizes. It makes
three measurements with trigger lines 25, 24 and 40. For each one it
predicts every register from products computed with `*`. It also checks
that these things happened at least once: a counted transition, a counter
overflow, a sample window rolling past four edges, an idle cycle, and a
trigger change. The unit testbenches cover the rest:

* the adder and multiplier, against `+` and `*`;
* the counter, for both edge polarities and for overflow;
* the encoder, exhaustively;
* the ID order;
* the sample registers, with data changing while the trigger is high.

To change sizes, edit `fp_pkg` (operand width, one-hot length, sample depth,
ID line list). `ID_BITS` and the port widths follow from it.

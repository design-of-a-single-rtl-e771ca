# Temporal-sampling SEU/SET-hardened flip-flop

A particle strike can flip a stored bit, which is a single event upset (SEU).
It can also put a short glitch on a data, clock or control line, which is a
single event transient (SET), and the glitch gets stored if a clock edge
catches it. This design replaces each D flip-flop of a synchronous circuit with
a cell that resists both. The idea is to store the same data value several
times, at different instants, and to vote.

* **Temporal sampling.** Each bit is sampled at three instants, half a master
  clock cycle apart, by three clocks Clk-A, Clk-B and Clk-C. A glitch shorter
  than that spacing can corrupt at most one of the three samples. That holds
  whether the glitch is on the data line or on one of the clock lines.
* **Five copies, one vote.** Five flip-flops hold the three samples, two of
  them twice. A majority voter combines them, so any two wrong copies are
  outvoted.
* **A watched voter.** A watchdog checks the voter's result against the
  copies and overrides it when the voter itself has failed.

The price is speed: one computation cycle takes two master clock cycles. The
combinational logic of the circuit stays as it is; only its flip-flops are
replaced.

## The three sampling clocks (`tds_clock_gen`)

Clk-A, Clk-B and Clk-C all have a period of two master cycles and a 25% duty
cycle, so each is high for half a master cycle. They are 90 degrees apart:

| master half cycle | high (even cycle) | low (even cycle) | high (odd cycle) | low (odd cycle) |
|---|---|---|---|---|
| clock high        | Clk-A             | Clk-B            | Clk-C            | none            |

The generator ANDs the master clock with enable flip-flops. The enables for
the high-half pulses (A, C) change on the falling master edge. The enable for
the low-half pulse (B) changes on the rising edge. So no enable changes while
its pulse could be high, and the clocks cannot glitch. The Clk-C enable is
taken from the Clk-B enable. So Clk-C never fires unless Clk-A and Clk-B
have just fired, even when the reset is released on a clock edge. In reset
(`rst_n` low, asynchronous) all three clocks are low. The first Clk-A pulse
comes in the second master cycle after the release.

## Storing one bit (`tds_sampler`)

All five flip-flops capture on the **falling** edge of their clock, the end of
the clock's high "sampling" window.

| flip-flop | clock | takes | stage |
|---|---|---|---|
| L1 | Clk-A | data | sampling |
| L3 | Clk-B | data | sampling |
| L5 | Clk-C | data | sampling and release |
| L2 | Clk-C | L1   | release |
| L4 | Clk-C | L3   | release |

Take a data value that appears at time 0, just after a falling Clk-C edge, as
it does when an upstream cell releases it. Times are in master cycles:

| time | event | copies of the value |
|---|---|---|
| 1.0 | Clk-A falls: L1 samples | L1 |
| 1.5 | Clk-B falls: L3 samples | L1, L3 |
| 2.0 | Clk-C falls: L5 samples; L2 := L1, L4 := L3 | all five: the *voting window* starts |
| 3.0 | Clk-A falls: L1 takes the next value | L2, L3, L4, L5 |
| 3.5 | Clk-B falls: L3 takes the next value | L2, L4, L5 |
| 4.0 | Clk-C falls: next release | — |

So `q` shows the new value from the falling Clk-C edge at 2.0 on, one
computation cycle after the value arrived. It stays right until the next
release. Between 3.0 and 4.0 the vote still goes to the old value, but with a
smaller margin.

The five copies go to the voter under these names (type `tds_samples_t` in
`tds_pkg`): `d_t_a` (L2), `d_tm1_a` (L1), `d_t_b` (L4), `d_tm1_b` (L3) and
`d_t_c` (L5).

**Timing rule for the logic around the cells.** A cell's output changes at the
falling Clk-C edge. Whatever combinational logic it feeds must settle before
the next falling Clk-A edge, one master cycle later, less the setup time. That
is half the computation cycle. The value must then stay put until the next
falling Clk-C edge, which it does when its source is another cell. A cell may
feed itself: L5 captures the old value on the same edge that changes `q`, as
in any edge-triggered register.

## Voting (`tds_majority_voter`) and the watchdog (`tds_voter_recovery`)

The voter works in two steps. When the three release-stage copies (L2, L4, L5)
agree, their value is the result. When they disagree, the two sampling-stage
copies (L1, L3) are brought in, and the result is the majority of all five.
The result always equals a five-input majority. The two steps show which
copies decide, and `sampling_used` reports it when the second step was needed.

The original description gives only the watchdog's function. Here it counts how many of
the five copies agree with the voter's result. A working voter always has at
least three. If fewer agree, the voter has failed, and since the data is one
bit, the unit outputs the complement of the vote. `voter_fault` reports the
override. The watchdog is itself a counter with a compare; it guards against a
fault in the voter, not against one in itself.

`tds_cell` joins the sampler, voter and watchdog into one hardened bit.
`tds_top` is a bank of `N_FF` such cells (default 12) with one shared clock
generator.

## What is tolerated, and what is not

The claims below are what the testbenches check or measure. They differ
between a register whose input comes from outside and is held for the whole
computation cycle, and cells that feed each other, or themselves, through
logic.

**Register with held inputs.**

* **Any single fault is corrected.** That covers an SEU in any of L1..L5, a
  data-line SET at any of the three sampling edges, a glitch of either
  polarity on any one clock line, and a wrong voter output. The worst single
  fault is an SEU in L1 or L3, or a data SET at a Clk-A or Clk-B edge, during a
  value's sampling time. It spoils two copies, because the release stage then
  copies the bad sample. Three good copies remain.
* **Two flipped flip-flops in the voting window are corrected,** whether they
  are in the same bit or in different bits.
* **Three wrong copies of one bit beat the vote.** A triple upset in the voting
  window does this every time. So can a data SET at a Clk-A or Clk-B edge (two
  copies) plus one more upset in the same bit.

**Cells in a loop or a pipeline.** Here `q` of one cell feeds the samples of
the next value while the cell's own L1 and L3 already hold that next value.
When the next value's three samples are taken, `q` rests on five, four and
then three matching copies. So the vote at the Clk-C edge has no margin, and
this has three effects:

* **Single faults do not corrupt the state,** but they are not always cleaned
  up. In about one in ten single-fault runs of the counting test, a wrong copy
  is copied forward, cycle after cycle, for as long as the test runs. Until
  something rewrites it, that bit has lost its margin, and a second fault in it
  can corrupt the state.
* **A double upset in the voting window** can put the state off, in roughly 1
  to 5% of the runs. Flipped L3 and L4 copies outlive the window and side with
  the next Clk-A sample.
* **A glitch on Clk-C between the Clk-A and Clk-B sampling edges** releases a
  half-sampled value early (L1, L2, L5 new against L3, L4 old). In a loop this
  adds a step every time. Clk-C is shared by all cells of a register, so one
  glitch hits every bit at once.

Faults on the master clock or on `rst_n` are not covered. Nor are faults in
the clock generator's own flip-flops.

## Ports of `tds_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock |
| `rst_n` | in | 1 | asynchronous reset, active low: clears every flip-flop, stops the clocks |
| `d` | in | N_FF | data, sampled at the falling edges of Clk-A, Clk-B and Clk-C |
| `q` | out | N_FF | voted data, changes at the falling Clk-C edge |
| `sampling_used` | out | N_FF | per bit: the release stage disagreed |
| `voter_fault` | out | N_FF | per bit: the watchdog overrode the voter |
| `clk_a`, `clk_b`, `clk_c` | out | 1 each | the generated clocks, for timing the logic around the register |

To harden a circuit, wire its combinational logic from `q` to `d`, and keep its
paths within the timing rule above.

## Files

| file | contents |
|---|---|
| `rtl/tds_pkg.sv` | `tds_samples_t` (the five copies) and `maj5()` |
| `rtl/tds_clock_gen.sv` | Clk-A/B/C generator |
| `rtl/tds_sampler.sv` | flip-flops L1..L5 |
| `rtl/tds_majority_voter.sv` | two-step voter |
| `rtl/tds_voter_recovery.sv` | watchdog and override |
| `rtl/tds_cell.sv` | one hardened bit |
| `rtl/tds_top.sv` | `N_FF`-bit hardened register with its clock generator |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself;
a watchdog ends a hung run as a failure. For example, to build and run the
end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl \
  rtl/tds_pkg.sv tb/tds_top_tb.sv --top-module tds_top_tb
./obj_dir/Vtds_top_tb
```

The testbenches inject faults with `force`/`release`. A forced and released
flip-flop keeps the flipped value until its next clock edge, which is how an
SEU behaves. Clock and voter faults force the net for a short time.

* `tds_top_tb` runs the 12-bit register at its default size, in two phases.
  * **Held inputs.** 4000 random words. Every other word gets one fault: SEU,
    double upset, data SET, clock SET, voter fault, or triple upset, about 300
    of each. It checks `q` after every release and just before the next one. So
    it also checks the latency of one computation cycle (two master cycles). It
    checks the status flags, and that every fault class and both flags occurred.
  * **Feedback.** `d = q + 1` with no delay, so the register counts. It runs 300
    episodes of reset, 24 count steps, and one fault at step 10. It checks
    single faults, and reports the loop effects described above.
* `tds_cell_tb` does the same for one cell, with clocks made by the test.
* `tds_sampler_tb` checks which edge each flip-flop captures on, and the copy
  from L1/L3 to L2/L4.
* `tds_clock_gen_tb` checks the pulse order, the period, the 25% duty cycle, the
  pulse counts (so a glitch would show) and the clocks in reset. It also checks
  that Clk-A comes first after a reset released at any point of the master
  cycle.
* `tds_majority_voter_tb` and `tds_voter_recovery_tb` are exhaustive over the
  32 sample patterns.

## Design choices beyond the original description

* **Edge.** The flip-flops are edge-triggered on the falling clock edge. The
  original description calls them edge-sensitive, but also says they are
  transparent while their clock is high. Transparent latches would let a value race through two
  cells in one Clk-C pulse, so edge-triggered flip-flops were used. The falling
  edge is where the sampling window closes.
* **Five flip-flops.** The cell has five flip-flops, L1..L5, as in the block
  diagram. The original description mentions four memory elements in one place.
* **Clock generator circuit, reset, status outputs.** How the clocks are
  derived, the asynchronous reset, and the `sampling_used` and `voter_fault`
  outputs are this design's own choices.
* **Watchdog check.** The "fewer than three copies agree, so invert" check is
  this design's own.
* **Claims not reproduced.** The original work claims recovery from every
  single and double fault, so that scrubbing is not needed. This RTL meets that
  claim for a register with held inputs, with the exceptions listed under
  "What is tolerated". In loops it does not, as described there. No extra
  hardware was added to close the gap, since none is described.
* **Not included.** The original work applies the cell to an ISCAS'89 benchmark
  circuit, but its logic is not given, so only its 12-flip-flop register is
  modelled. It also compares area and power with a DICE-based,
  four-clock scheme; that scheme is not part of this design.

# Conditional stalling for a RAW-dependent stream pipeline

A stream of (address, value) samples updates a table in memory: read the
entry, compute, write it back. If computing takes DD cycles between the
read and the write becoming visible, a sample that hits the same entry
within those DD cycles reads a stale value. A statically scheduled pipeline
has to assume that every sample might do so. It then accepts only one
sample every DD + 1 cycles (the *baseline* initiation interval,
II_base = DD + 1), even when collisions are rare.

*Conditional stalling* removes that worst-case assumption from the
processing pipeline. A small **stall stage** ahead of it keeps the
addresses it sent in the last DD slots. A sample that matches one of them is
held back, and the stage sends *bubbles*, slots marked "do not process",
until the conflicting update has cleared. All other samples pass at once.
The processing pipeline behind it is then built as if there were no
dependency at all: it accepts a slot every cycle (II_p = 1). The average
cycles per sample (II_sys) lies between 1 and DD + 1. It depends only on
how often addresses repeat within a window of DD slots, not on what the
pipeline computes.

This repository has that system in synthesizable SystemVerilog. The
processing module is a groupwise float64 accumulator: each sample's value
is added to the running double-precision sum of its group. The defaults are
DD = 16 and 16-bit group addresses (65,536 groups). The technique and the
configuration follow the brief *"Enhancing conditional stalling to boost
performance of stream-processing logic with RAW dependencies"*. The RTL,
the handshakes and the float64 arithmetic are this implementation's own.

## Structure

```
in_* ──► stream_fifo ──► stall_stage ──► stream_fifo ──► accum_stage ──► res_*
         (input)         │  wait_list     (slots)         │  acc_mem (read-first RAM)
                         │                                │  fp64_add (DD-1 stages)
                         └── stall / issue                └── clear sweep after reset
```

| file | module | role |
|---|---|---|
| `rtl/cs_pkg.sv` | package | defaults (DD = 16, AW = 16, FIFO depth 16), float64 field struct |
| `rtl/cs_top.sv` | `cs_top` | the whole system |
| `rtl/stall_stage.sv` | `stall_stage` | conflict check, hold and bubble insertion |
| `rtl/wait_list.sv` | `wait_list` | DD-entry shift register of addresses with a parallel match |
| `rtl/stream_fifo.sv` | `stream_fifo` | first-word-fall-through FIFO, valid/ready on both sides |
| `rtl/accum_stage.sv` | `accum_stage` | read sum, add, write back; II = 1 with no dependency logic |
| `rtl/acc_mem.sv` | `acc_mem` | 2**AW x 64-bit simple dual-port RAM, 1-cycle read, read-first |
| `rtl/fp64_add.sv` | `fp64_add` | pipelined IEEE-754 binary64 adder |

## The stall stage and why one slot per cycle is safe

This is the part that needs the most care.

**Slots.** Every time the stall stage fires, it sends exactly one *slot*:
either a sample (`live = 1`) or a bubble (`live = 0`). It fires when the
slot FIFO has room and it has something to send: a held sample, or a new one
from the input FIFO. In each slot:

1. The candidate is the held sample if a conflict is pending, otherwise the
   next input sample.
2. Its read address is compared with all DD entries of the wait list. These
   are the write addresses of the live slots among the last DD slots sent.
3. On a match, the candidate is kept (held) and the slot goes out as a
   bubble, and an *empty* entry is shifted into the list. Otherwise the
   sample goes out live and its write address is shifted in.

So a sample leaves in slot `max(previous slot + 1, last slot of its address
+ DD + 1)`. Two live slots with the same address are always more than DD
slots apart. A sample is never held longer than that rule requires.

**From slots to cycles.** The accumulation stage takes at most one slot per
cycle. Slots that are k apart therefore arrive at least k cycles apart,
whatever the FIFO between the stages does. A gap can only grow on the way,
never shrink. When the stall stage cannot fire (input empty, FIFO full), its
list does not shift either. It counts slots, not cycles, so it stays on the
safe side. The cost is that an address can still block a sample after a long
idle gap, although it could not conflict any more.

**Where DD comes from.** In `accum_stage` a slot taken in cycle t reads the
sum at its address in that cycle. The value arrives in t + 1, goes through an
adder of `DD - 1` stages, and is written in cycle t + DD. The RAM is
read-first: a read in the same cycle as a write to the same word returns the
old word. So reads issued in cycles t + 1 … t + DD miss this update, and the
next sample to the same group must be taken in t + DD + 1 or later. That is
exactly the spacing the stall stage enforces. The adder latency is derived
from `DD`. Change `DD` and both sides move together.

**Rates to expect** (cycles per sample with the input kept full):

* one address repeated: DD + 1, the baseline;
* addresses cycling over more than DD groups: 1;
* i.i.d. addresses where two samples collide with probability Pc
  (Pc = sum of squared address probabilities; 1/C for C equally likely
  groups):
  * DD = 1: exactly `1 + Pc`;
  * any DD: at most `1 + (DD² + DD)·Pc/2` (every slot of the window
    occupied is the worst state);
  * closed-form estimate, close to the exact value for uniform addresses:

    ```
    DD_lim = (sqrt(8·(II_lim − 1)/Pc + 1) − 1)/2,   II_lim = 1.35
    b      = (2·DD_lim + 1)·Pc/2
    II_sys ≈ 1 + (DD² + DD)·Pc/2          if DD < DD_lim
             II_lim + b·(DD − DD_lim)     otherwise
    ```
  * exact for uniform addresses: the mean of a Markov chain over which of
    the last DD slots hold a sample. From a state with n samples in flight,
    a new sample collides with the one j slots back with probability 1/C
    and then costs `DD + 2 − j` cycles (wait, then go). Otherwise it costs 1.

Measured in simulation, 20,000 samples per point (uniform C groups, or Zipf
with exponent 1.8):

| DD | workload | II_sys measured | Markov chain | closed form | baseline |
|---|---|---|---|---|---|
| 1 | U(4) (stall stage alone) | 1.249 | 1.250 (exact 1 + 1/C) | 1.250 | 2 |
| 8 | U(4) | 4.33 | 4.35 | 4.30 | 9 |
| 8 | U(16) | 2.36 | 2.35 | 2.43 | 9 |
| 8 | U(64) | 1.465 | 1.464 | 1.538 | 9 |
| 8 | U(1024) | 1.037 | 1.035 | 1.035 | 9 |
| 8 | Zipf(1.8) over 8 | 5.61 | – | – | 9 |
| 8 | Zipf(1.8) over 1024 | 5.01 | – | – | 9 |

Even very skewed address streams run well below the baseline.

## The accumulation stage

`accum_stage` does not know about dependencies. It:

* clears all 2**AW sums to +0.0 after reset, one per cycle, and keeps
  `in_ready`/`ready` low until done (65,536 cycles at the default size);
* for each live slot reads the group's sum, adds the sample with `fp64_add`
  and writes the result back; bubbles do nothing;
* reports every written sum on `res_valid / res_addr / res_value`, in the
  order the samples were sent, DD cycles after the slot was taken.

`fp64_add` adds IEEE-754 binary64 numbers with round-to-nearest-even. It
has three logic steps, each followed by a register: align (order by
magnitude, shift the smaller significand right keeping guard, round and
sticky bits), 56-bit add/subtract, then normalise and round. A delay line
pads it to the requested latency. For latencies below 3 the steps are
chained and left to retiming. Simplifications:

* subnormal inputs read as zero, and results below the normal range flush
  to a signed zero;
* every NaN result is 0x7FF8000000000000;
* the pipeline registers are not reset, so the first LAT outputs after
  power-up are meaningless (`accum_stage` ignores them during its clear
  sweep).

### Slower processing modules (II_P)

`cs_top` and `accum_stage` take a parameter `II_P` (default 1). With
II_P > 1 the accumulation stage takes a slot at most every II_P cycles.
Slots k apart are then at least k·II_P cycles apart, so the stall stage is
built with only `DD / II_P` (rounded down) list entries. The resulting
cycles per sample are those of a DD / II_P system multiplied by II_P. The
measurements above repeat within 1 % at DD = 8, II_P = 2. This is a way to
trade throughput for a cheaper processing module. Here it only slows the
stage: the adder is not shared.

## Interface of `cs_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_tvalid` / `in_tready` | in / out | 1 | sample handshake (transfer when both high) |
| `in_addr` | in | AW | group address (read and write address are the same) |
| `in_value` | in | 64 | float64 sample |
| `ready` | out | 1 | sums cleared; until then samples queue in the FIFOs and `in_tready` drops when they are full |
| `res_valid`, `res_addr`, `res_value` | out | 1, AW, 64 | a group's new sum (no back-pressure) |
| `stall` | out | 1 | the stall stage sent a bubble this cycle |
| `issue` | out | 1 | the stall stage sent a sample this cycle |

Parameters: `DD` (16), `AW` (16), `IN_FIFO_DEPTH` (16), `LINK_FIFO_DEPTH`
(16), `II_P` (1). `DD / II_P` must be at least 1, `DD` at least 2, and 2**AW
larger than DD + 1. Latency from input to result is at least 2 (FIFOs) +
DD cycles, plus any bubbles and queueing.

## What follows the brief, and what does not

Taken from it: the separate stall stage with a shift-register wait list and
an unrolled match, hold-and-bubble behaviour, a stage that does not advance
while it has no input (blocking read); a processing stage pipelined for
II = 1 with no dependency logic; the float64 groupwise-accumulation example;
block RAM in read-first mode; DD = 16 with 16-bit addresses (the brief also
characterises DD = 8 with 8-bit addresses: set `DD = 8, AW = 8`); the
DD / II_p rule.

This implementation's own choices:

* valid/ready handshakes and 16-deep FIFOs;
* a live bit per list entry instead of a reserved "empty" address value,
  so that every address is usable;
* the split of DD into one RAM read cycle plus DD − 1 adder stages;
* the adder's internals and its subnormal/NaN simplifications;
* the clear sweep after reset;
* the result port and the `stall`/`issue` outputs.

Not built:

* hashing wide addresses before the comparison, which the brief mentions
  as an option without specifying a hash;
* a tightly coupled variant in which the stall stage sends nothing instead
  of bubbles and the processing stage reads without blocking;
* the merged variant in which conflict detection sits inside the processing
  loop. The brief uses it only as the slower comparison point.

Clock frequency and FPGA resource figures from the brief cannot be
reproduced by simulation, and none are claimed here.

## Testbenches and how to run them

Every testbench is self-checking. Each ends with one line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb/tb_wait_list.sv` | hits match a queue model; an entry lives exactly DD shifts |
| `tb/tb_stall_stage.sv` | live slots carry the inputs in order; same-address slots are > DD apart; a bubble only when the slot rule demands it; one address costs DD + 1 slots, a conflict-free pattern 1 |
| `tb/tb_stream_fifo.sv` | order, flags and count against a queue, at random rates |
| `tb/tb_acc_mem.sv` | one-cycle reads, read-first on collision |
| `tb/tb_fp64_add.sv` | 35k sums against the simulator's double arithmetic, with the exact latency, for LAT = 15 and LAT = 2 |
| `tb/tb_accum_stage.sv` | clear time; every sum and its latency (DD cycles); II_P = 3 pacing |
| `tb/tb_cs_top.sv` | the full system at its default size: back-pressure during the clear sweep, one-address and conflict-free blocks, uniform and Zipf blocks of 1000 samples; the slot of every sample and every sum are checked |
| `tb/tb_cs_workloads.sv` | the measurement table above at DD = 1 (stall stage only), 2, 4, 8 and DD = 8 with II_P = 2, against the Markov chain, the closed form and the bounds (uses `tb/cs_workload_runner.sv`) |

With Verilator 5 (adjust the top module name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
          rtl/cs_pkg.sv tb/tb_cs_top.sv --top-module tb_cs_top
./obj_dir/Vtb_cs_top
```

`tb_cs_top` runs the system with all parameters at their defaults and
finishes in a few seconds, including the 65,536-cycle clear sweep.
`tb_cs_workloads` simulates about 2.5 million cycles and takes around ten
seconds.

To change the design, keep two things in step. The stall stage's list
length must equal the number of slots within which the processing stage can
miss a write. The processing stage must never take two slots closer in time
than they were sent. If you give `accum_stage` a different memory or adder
latency, its DD changes: pass the new value to the stall stage.

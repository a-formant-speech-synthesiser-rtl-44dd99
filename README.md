# Two-phase bit-serial chip frame for a formant speech synthesiser

A bit-serial signal processor carries every data word on a single wire, one
bit per clock period. Wiring stays small, but every stage on the chip has to
agree about when a bit is valid. This RTL implements the clocking and
storage scheme that such a chip's primitives are built from. It covers a
standard-cell implementation of a multi-channel formant speech synthesiser:

* the whole chip is clocked by two **non-overlapping phases**, `phi1` and `phi2`;
* every primitive **takes data in while `phi1` is high** and **hands it on while
  `phi2` is high**;
* the storage cell used in most primitives is a **master-slave flip-flop made
  of two level-sensitive latches**, one opened by each phase;
* a **one-bit delay element sits in each I/O pad**, so data crossing the chip
  boundary is retimed into the same `phi1`/`phi2` discipline as everything
  inside.

The synthesiser datapath (its filters, channel multiplexing and coefficient
handling) is not part of this RTL. The frame brings out the core's serial
input and output and the two phases, so a core can be attached.

## Why two phases and not one clock

Take a chain of stages, each one's output wired to the next one's input.
With a single edge-triggered clock, correctness depends on clock skew being
smaller than the fastest stage-to-stage path. The margin then depends on the
cell library and the layout. With two phases that never overlap:

1. While `phi1` is high, every stage's input latch (master) is open and
   follows its data line. Every output latch (slave) is closed, so no data
   line can change.
2. Both phases are low for a gap. All latches are closed.
3. While `phi2` is high, every slave copies its master onto the data line to
   the next stage. Every master is closed, so a new value on a data line
   cannot race into the next stage.
4. Both phases are low again before the next `phi1`.

At no moment is there an open path from one stage's input to the next
stage's output. This is why a chain of cells shifts by exactly one bit per
period, whatever the wire delays. The scheme needs only two things: the
phases must not overlap, and the gaps must be longer than the skew between
the two phase nets.

```
 master clk  _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
 phi1        __|‾‾‾|___________|‾‾‾|__________
 phi2        __________|‾‾‾|___________|‾‾‾|__
 bit_tick    ______________|‾‾‾|___________|‾‾
             |<---- one bit period ---->|
```

## Blocks

| module        | what it is |
|---------------|------------|
| `dff2ph`      | Two-phase master-slave D flip-flop (ports `d`, `phi1`, `phi2`, `q`). |
| `bit_delay`   | Delay element: `N` chained `dff2ph`, delays a serial stream by `N` bit periods. |
| `clkgen_2ph`  | Non-overlapping two-phase generator driven by a master clock. |
| `mfss_top`    | Chip frame: the clock generator, an input pad delay element and an output pad delay element. |

### `dff2ph`: the storage cell

Two `always_latch` processes. The master is open while `phi1` is high and
the slave is open while `phi2` is high. `q` takes the value `d` had when
`phi1` fell. `q` changes only while `phi2` is high. The cell has no reset,
so its content is arbitrary until one `phi1`/`phi2` pair has passed. The
published cell is drawn at gate level from library gates. Here each latch is
written behaviourally and the synthesis tool maps it. Latch warnings from
lint or synthesis tools are expected, because the cell is meant to be built
from latches.

### `bit_delay`: delay element and chaining

`tap[0] = d`, `tap[i+1] = dff2ph(tap[i])`, `q = tap[N]`. This is the
stage-to-stage connection described above, repeated `N` times. With `N = 1`
it is the pad delay element.

### `clkgen_2ph`: phase generator

A counter modulo `PHI1_CYCLES + PHI2_CYCLES + 2*GAP_CYCLES` drives the phases.
Its registered outputs are `phi1` for the first `PHI1_CYCLES` master cycles,
then a gap, then `phi2` for `PHI2_CYCLES` cycles, then a second gap.
`bit_tick` is high in the last cycle of the period. The reset is active-low
and asynchronous. It forces both phases low, and `phi1` rises on the first
master edge after release. An assertion checks that the phases never
overlap. With the defaults (all 1), one bit period is 4 master cycles.

### `mfss_top`: the frame

```
 sdi ──► bit_delay (input pad) ──► core_sdi ──► [synthesiser core, outside] ──► core_sdo ──► bit_delay (output pad) ──► sdo
                         ▲                                                                        ▲
 clk, rst_n ──► clkgen_2ph ──► phi1, phi2 (also brought out for the core), bit_tick
```

Timing at the defaults:
* `sdi` must be stable while `phi1` is high. It may change in the gap after
  `phi1` or at any time while `phi2` is high.
* `core_sdi` changes while `phi2` of the same period is high.
* A core that is only a wire gives a bit on `sdo` 2 bit periods after it was
  sampled. That is 6 master cycles from the rise of `phi1` to the change of
  `sdo`.

Parameters: `PHI1_CYCLES`, `PHI2_CYCLES`, `GAP_CYCLES` (default 1 each) and
`PAD_DELAY_BITS` (default 1).

## What follows the source design and what is chosen here

These follow the source design:
* the two-phase, non-overlapping clocking and the "in on `phi1`, out on
  `phi2`" rule;
* the two-latch master-slave flip-flop and its `D`/`phi1`/`phi2`/`Q` ports;
* chaining stages with shared phases;
* a delay element in the I/O pads;
* clock generation kept inside the chip rather than brought in on extra
  pads.

These are choices made here:
* how the phases are generated (a counter on one master clock);
* the phase and gap lengths;
* the reset, which exists only in the clock generator and not in the data
  cells;
* the pad delay length of one bit;
* the `bit_tick` output.

The published latch and primitives were characterised at 40 MHz and 35 MHz
by switch-level simulation of the cells. These speeds describe the phase
clocks, not a master clock. With the default 4 master cycles per period, a
35 MHz bit rate would need a 140 MHz master clock. A slower master clock
with longer phases works equally well logically.

Not included:
* the synthesiser core;
* the off-chip long delay lines it uses;
* the rest of the bit-serial primitive set (arithmetic and other operators);
* the electrical pad cells.

None of these is specified in enough detail to write as RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench ends with
a `TB_RESULT checks=N failures=M` line.

* `tb_dff2ph` drives the phases by hand and changes `d` in every interval.
  It checks that `q` holds during `phi1` and in both gaps, and takes the
  value `d` had at the fall of `phi1`.
* `tb_clkgen_2ph` checks the exact phase sequence against a reference
  counter. It covers the default lengths and uneven lengths (2/3/2). It also
  checks that the phases never overlap, measures the bit period and tests an
  asynchronous reset in mid-period.
* `tb_bit_delay` checks delays of 1 and 5 bits on a random stream. It
  applies junk on `d` while `phi2` is high and checks that `q` stays still
  during `phi1`.
* `tb_mfss_top` checks the frame at its default parameters. The core is
  replaced by a wire. The test sends 400 random bits and checks `core_sdi`
  and `sdo`, the latency, the phase order and the absence of overlap. It
  also asserts reset in mid-stream, and checks that the phases stop while
  pad data is held. It counts phi1 and phi2 pulses, pad transfers, ignored
  `phi2`-time junk and reset events, and fails if any of them never
  happened.

Removing the output pad delay element is the mistake this frame exists to
avoid. It makes `tb_mfss_top` fail, because bits reach `sdo` one period
early.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_mfss_top tb/tb_mfss_top.sv
./obj_dir/Vtb_mfss_top
```

Replace `tb_mfss_top` with `tb_dff2ph`, `tb_clkgen_2ph` or `tb_bit_delay` to
run the others. Each takes well under a second.

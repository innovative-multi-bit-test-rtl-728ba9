# Multi-bit test pattern generator with selectable LFSR length

A built-in self-test (BIST) pattern generator has to match the circuit it tests.
A 4-input block needs all 15 non-zero 4-bit patterns. A 7-input block needs 127
7-bit patterns. This design meets both with one generator. A single chain of
seven D flip-flops is closed into a linear feedback shift register (LFSR) by one
XOR gate. Mux logic in front of that XOR is steered by two select lines, `s1` and
`s0`. They choose which polynomial the loop realises, so the same hardware runs
as a 4-, 5-, 6- or 7-bit maximal-length LFSR and can be switched while it runs.

The generator's pattern drives a circuit under test (CUT). A response comparator
checks the CUT's actual output against its calculated fault-free output and
reports every difference as a possible defect. The CUT itself is outside this
RTL.

## The four LFSRs

| `{s1,s0}` | length n | polynomial      | middle tap k | period 2^n - 1 |
|-----------|----------|-----------------|--------------|----------------|
| `00`      | 4        | x^4 + x + 1     | 1            | 15             |
| `01`      | 5        | x^5 + x^2 + 1   | 2            | 31             |
| `10`      | 6        | x^6 + x + 1     | 1            | 63             |
| `11`      | 7        | x^7 + x + 1     | 1            | 127            |

All four polynomials are primitive, so each LFSR visits every non-zero n-bit
state once before it repeats. The table lives in `rtl/tpg_pkg.sv`
(`sel_to_cfg`). Adding or changing a polynomial is a one-line edit there, as long
as it keeps the two-term form x^n + x^k + 1.

## How the loop is wired

Stages are numbered 1 to 7. On every clock:

- stage 1 takes **stage k XOR stage n**;
- stage i takes stage i-1 for i = 2..7.

The state therefore moves from stage 1 towards stage 7. In the RTL, `q[0]` is
stage 1. The pattern output uses the same order: `pattern[0]` is stage 1, which
drives the CUT's first input, A. `pattern[1]` drives B, and so on.

The stage numbering and the tap placement are what make the generated sequences
match the published example sequences. For instance, the 4-bit LFSR steps through
(A B C D) `1100 → 1110 → 1111 → 0111 → 1011`. Each new A is the old A XOR the old D.
The 5-bit LFSR steps through `10110 → 01011 → 00101`, where the new A is B XOR E.
The end-to-end testbench checks these sequences, and the 6-bit and 7-bit ones,
against the RTL.

For a length n below 7, stages n+1..7 keep shifting but take no part: the
feedback uses only stages k and n. The output multiplexers force `pattern` bits n
and above to 0, so a smaller CUT sees only its own LFSR.

The seed is stage 1 = 1 with all other stages 0 (`tpg_pkg::SEED`). It is a
non-zero state of all four LFSRs, and its successor is the first pattern of the
published 4-bit and 6-bit example sequences.

## Switching length while running

A shorter LFSR uses only the low stages of the shared chain. After a switch,
those stages may all be 0, for example when going from 7 to 4 bits while only
stages 5 to 7 hold ones. An all-zero LFSR never leaves
that state. The control logic therefore restarts the LFSR from the seed on
every change of length:

```
edge:            t            t+1                  t+2
{s1,s0}     --old--|--new------------------------------------
req_q (reg)  old   |  new      |  new
load                  1 (one cycle)
sel          old   |  old      |  new
pattern     P0     |  P1 (old LFSR step, old width) |  SEED (new width) | next ...
```

The request is registered at the first edge. During the next cycle `load` is
high, and at the second edge the chain takes the seed while the running
selection takes the new value. A change of `{s1,s0}` thus costs one clock and
one register stage, and the new LFSR's first pattern appears two edges after the
change. At reset the selection is taken directly from `{s1,s0}` and the chain
comes out holding the seed, with no extra cycle.

## Response comparison

`tpg_resp_cmp` compares `cut_vout` (the CUT's actual output) with `cut_vout_ref`
(its calculated fault-free output) for every pattern while `cmp_en` is high. It
samples both at the rising edge that ends the pattern's cycle. From that edge on:

- `mismatch` shows whether that pattern's outputs differed;
- `fail` is set by the first difference and stays set until reset;
- `mismatch_count` counts differences and stops at its maximum (`CNT_W` = 16 bits).

The expected output can come from a golden copy of the CUT, as in the testbench,
or from a stored response.

## Modules

```
multibit_tpg            top: generator + comparator
├── tpg_ctrl            control logic: request register, change detect, reseed
├── tpg_feedback_mux    mux logic + XOR: stage k XOR stage n for the selected length
├── tpg_dff_chain       seven-stage shift chain with parallel seed load
│   └── tpg_dff ×7      synchronous D flip-flop (synchronous reset)
├── tpg_out_mux         pattern output multiplexers, unused bits zeroed
└── tpg_resp_cmp        response comparator, sticky fail flag, counter
tpg_pkg                 MAX_W = 7, select encoding, polynomial table, seed
```

### Ports of `multibit_tpg`

| port             | dir | width | meaning |
|------------------|-----|-------|---------|
| `clk`            | in  | 1     | clock, rising edge |
| `rst`            | in  | 1     | synchronous reset, active high |
| `s1`, `s0`       | in  | 1, 1  | length select (table above) |
| `pattern`        | out | 7     | test pattern, bit 0 = input A |
| `pattern_width`  | out | 3     | length now running, 4..7 |
| `cmp_en`         | in  | 1     | compare the response to the current pattern |
| `cut_vout`       | in  | 1     | actual CUT output |
| `cut_vout_ref`   | in  | 1     | calculated fault-free CUT output |
| `mismatch`       | out | 1     | last compared pattern differed |
| `fail`           | out | 1     | some pattern differed since reset |
| `mismatch_count` | out | 16    | number of differing patterns since reset |

The generator produces one new pattern per clock. It has no run enable: it runs
whenever it is out of reset.

## What follows the original design and what was chosen here

These parts follow the original design:

- one D flip-flop chain closed by an XOR gate through mux logic steered by
  `s1`/`s0`;
- the four lengths and their polynomials;
- the synchronous D flip-flop;
- output multiplexers that pick the selected LFSR's pattern;
- comparing expected with actual CUT outputs to detect faults.

The tap placement and the shift direction are set so that the generated
sequences reproduce the published example sequences for all four lengths.

These are this design's own choices:

- the encoding of `{s1,s0}`. The original lists the four lengths but not their
  codes;
- the seed;
- the reset behaviour;
- the registered request and the one-cycle reseed on a length change;
- zeroing unused pattern bits and the `pattern_width` output;
- `cmp_en`, the sticky `fail` flag and the saturating 16-bit counter.

The original control logic is a small circuit of flip-flops, inverters and
gates. `tpg_ctrl` does the same job with its own internal structure.

In the original block diagram the select lines reach the mux logic directly.
Here the mux logic and the output multiplexers use the selection registered by
the control logic instead. The taps then change at the same clock edge as the
reseed, at the cost of one register stage of latency.

## Not included

- **The example circuits under test.** These are 4-, 5-, 6- and 7-input
  combinational circuits, each with stuck-at-1 or stuck-at-0 faults injected at
  two marked internal positions. Their gate networks are not reproduced here,
  and the few published input/output rows do not define their functions, so
  they are not provided as RTL. Connect a real CUT, or a
  fault-free copy and a faulty copy, to `pattern`, `cut_vout` and
  `cut_vout_ref`.
- **The source of `s1`/`s0`.** The block that decides which length to run is
  outside the generator. `s1` and `s0` are plain inputs.

## Simulating

Each testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs and
counts it as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/tpg_pkg.sv tb/tb_multibit_tpg.sv --top-module tb_multibit_tpg -Mdir obj_top
./obj_top/Vtb_multibit_tpg
```

Replace `tb_multibit_tpg` with any of the unit testbenches below:

| testbench             | checks |
|-----------------------|--------|
| `tb_multibit_tpg`     | Whole design at its default size (no parameter overrides). Covers all four lengths from reset and by switching in both directions, and the two-edge reseed timing. Each length runs a full period of exactly 2^n - 1 distinct non-zero patterns. The published example sequences appear as consecutive patterns. The comparator is checked against a stand-in CUT (XOR of all inputs) and a copy with inputs A and B stuck at 1 or at 0. The test counts each mechanism and fails if one never happened. |
| `tb_tpg_ctrl`         | Reset capture, one-cycle `load` on every change, switch timing, random changes including immediate reversals. |
| `tb_tpg_feedback_mux` | Exhaustive: all selections × all 128 chain states. |
| `tb_tpg_out_mux`      | Exhaustive: pattern masking and `width`. |
| `tb_tpg_dff_chain`    | Random reset, load and shift against a shift-register model. |
| `tb_tpg_dff`          | Random `d` and `rst`, both reset values. |
| `tb_tpg_resp_cmp`     | Random responses and enable, sticky flag, reset, and saturation with a 3-bit counter. |

All of these pass. Each was also shown to fail on a deliberately broken copy of
its module. The whole design is a few dozen cells and 29 flip-flops, so every
simulation finishes in well under a second.

## Trust and limits

- The polynomials, the lengths and the sequences are checked against the
  published data. The pattern sequence at each length is therefore the
  original's, given the seed chosen here.
- The timing of a length change, and everything about the comparator beyond
  "flag a difference", are this design's. Check them against your BIST
  controller before use.
- The stand-in CUT in the testbench only exercises the comparator. It says
  nothing about the fault coverage of any real circuit.

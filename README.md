# Reconfigurable multiplier blocks (ReMB) and a time-multiplexed Goertzel DCT loop

A filter or transform that is computed one coefficient at a time only ever
needs one of its constant products in a given clock cycle. A classic
multiplier block builds every constant in parallel from shared shift-and-add
terms and then picks one with a wide output multiplexer, so most of its adders
sit idle. A **reconfigurable multiplier block** instead puts small multiplexers
in front of the adder inputs. Each adder node then produces several partial
products, one per select setting, and the whole block produces one of its
constants per select word. A 2:1 multiplexer is smaller than an adder in
custom logic (and free in some FPGA cells), so the block is much smaller than
the multiplier block plus output multiplexer it replaces.

This repository contains synthesizable SystemVerilog for:

* the generic basic structures (an adder with multiplexed inputs, the
  two-input cell in its four operation types, a cascade of two cells in its
  five topologies);
* two concrete ReMBs: one for the 8-point Goertzel DCT loop (constants 473
  and 392, four cells) and one for a reconfigurable DCT kernel (constants 39,
  150 and 196, three cells);
* a Goertzel DCT recursion that serves all eight frequency bins through one
  loop and one ReMB, switching the constant every clock cycle;
* a top level, `remb_top`, that holds the DCT loop and, beside it, the
  kernel ReMB and two example structures, each with its own ports.

## The basic structure

The building block is a node `q = a op mux(b, c)`: one operand goes straight
into the adder, the other arrives through a multiplexer. All operands are
already-shifted copies of the block input `x` or of earlier nodes; shifts are
wiring. With one 2:1 multiplexer a node gives two results; with the
operation also switchable (add/subtract) it gives four.

`remb_general` is the general form: `N_PORTS` operands, port `p` behind a
`MUX_N[p]`-input multiplexer with its own select, one `add_sub` control
(0: sum of all operands, 1: operand 0 minus all others). A port with
`MUX_N[p] = 1` has no multiplexer. Two multiplexers on a two-input adder give
twice as many results as one; the testbench checks this (4 against 2).

`remb_cell` is the two-input form with a multiplexer on the second input. Its
parameter `CELL` picks the operation:

| `CELL`        | `s = 0` | `s = 1` |
|---------------|---------|---------|
| `CELL_1`      | a + b   | a + c   |
| `CELL_2`      | a - b   | a - c   |
| `CELL_3`      | a + b   | a - c   |
| `CELL_ADDSUB` | a +/- b (by `add_sub`) | a +/- c (by `add_sub`) |

`CELL_3` is the interesting one: the select line also flips the operation,
so one LUT-sized cell covers a sum and a difference.

`remb_basic_example` is the smallest useful example: `x + mux(4x, 2x)` with add/sub,
giving 5x, -3x, 3x or -x from one adder.

## Cascades of two cells

Stage 1 of `remb_cascade2` takes all of its inputs from `x` and so gives two
values of `n1`. Stage 2 takes its common input and its two multiplexer inputs
from `x` or `n1`; `FORM` selects which:

| form | common input | mux inputs | kind    | different outputs (addition only) |
|------|--------------|------------|---------|-----------------------------------|
| A    | n1           | n1, n1     | regular | 4 |
| B    | x            | n1, n1     | regular | 4 |
| C    | n1           | x, x       | regular | 4 |
| D    | x            | x, n1      | hybrid  | 3 |
| E    | n1           | x, n1      | hybrid  | 4 |

In a regular form both multiplexer inputs come from the same node; in a
hybrid form they come from different nodes. Form D gives only three results
because when its multiplexer picks `x`, the output no longer depends on `n1`.
Hybrid forms cover many more constants than regular ones, which is why both
concrete blocks below use them. The shift values (`SH_*` parameters) are free;
the defaults (stage 1 gives 5x or 9x, stage 2 weights 2, 1 and 4) are
arbitrary choices that make the counts above visible.

## The DCT loop multiplier (`remb_dct_loop_mult`)

This is the part that needs the most care. The block has four nodes; each
line lists the node, its inputs and the values it takes for `x = 1`:

```
n1 = x      + mux(s_n1 ; 4x   , 8x )    5, 9
n2 = 2*n1   + mux(s_n2 ; x    , n1 )    11, 15 (n1=5)   19, 27 (n1=9)
n3 = x      + mux(s_n3 ; n1   , -8x)    6, 10, -7
p  = 32*n2  + mux(s_out; 8*n1 , n3 )
```

n2 and n3 are hybrid cascades on n1, and the output node is a third
cascade level whose multiplexer mixes `n1` and `n3`. The select word is the
packed struct `loop_sel_t = {s_out, s_n3, s_n2, s_n1}`. The two constants the
loop uses are

* **473** = 32*15 + (-7): `n1 = 5`, `n2 = 15`, `n3 = -7`, output mux on
  n3: select `4'b1110`;
* **392** = 32*11 + 8*5: `n1 = 5`, `n2 = 11`, output mux on 8*n1: select
  `4'b0000` (`s_n3` does not matter).

The twelve constants the block can form at all are 345, 358, 392, 473, 486,
520, 601, 618, 680, 857, 874 and 936.

**Known gap: 362 is not formed.** The DCT loop also needs 2cos(pi/4) ~ 362/256
for bins 2 and 6. 362 = 32*11 + 10 would need `n1 = 5` (for n2 = 11) and
`n1 = 9` (for n3 = 10) in the same cycle. The published diagram lists 362
among the block's outputs, but no select word of the structure as drawn
produces it. Changing any single connection or shift to another source or
power-of-two weight does not fix this either. The RTL keeps the structure as
drawn and the loop flags the two bins concerned (below).

**Scaling.** 473/2^8 = 1.8477 ~ 2cos(pi/8) and 392/2^9 = 0.7656 ~ 2cos(3pi/8),
so the two products need different right shifts (8 and 9 bits) to become the
loop coefficients. The published description gives a single 9-bit shift. This
design follows the constants' values and stores a shift per bin in the
coefficient table (`remb_pkg::dct_coef`).

## The Goertzel DCT loop (`goertzel_dct_loop`)

For each bin k = 0..7 the loop runs

```
w_k[n] = (-1)^k * in[n] + 2cos(k*pi/8) * w_k[n-1] - w_k[n-2]
y_k[n] = w_k[n] - w_k[n-1]
```

One adder network and one ReMB serve all eight bins. A sample is held for
eight cycles. In cycle k the loop reads the state pair of bin k, forms
`w_k[n]` and `y_k[n]`, and writes the pair back, so the multiplier's
constant changes every cycle. This is the time-multiplexed use a ReMB exists
for. The coefficient table gives, per bin:

| k    | coefficient source                 | flag |
|------|------------------------------------|------|
| 0    | `w << 1` (coefficient 2)           |      |
| 1, 7 | ReMB 473, `>>> 8`, negated for 7   |      |
| 2, 6 | no constant available (see above)  | `out_coef_missing` |
| 3, 5 | ReMB 392, `>>> 9`, negated for 5   |      |
| 4    | 0                                  |      |

Bins 5..7 reuse the products of bins 3..1 because 2cos(k*pi/8) changes sign
there; the negation is folded into the following adder. For bins 2 and 6 the
loop still runs, with select word 0 (392 shifted by 8, about 1.53 instead of
1.414), and every result of those bins has `out_coef_missing` set. Treat
those two bins as unusable until a block that forms 362 is put in.

Arithmetic is two's-complement integer. State is `SW = W_IN + 8` bits, enough
for eight 12-bit samples at the worst-case growth of bin 0, whose
coefficient 2 puts a double pole at z = 1. After each shift the result is
rounded down (floor).

**Frames.** Samples are counted in frames of `FRAME_N = 8`. The first sample
of a frame starts every bin from zero state. The eight outputs of the last
sample carry `out_last`, and their `out_y` values are the frame's Goertzel
results, one per bin.

**Timing.**

* `in_valid` / `in_ready`: a sample is taken on a rising edge with both
  high. `in_ready` is high when the loop is idle and in its last slot, so a
  source that always has data gets one sample taken every 8 cycles, without
  a gap. A sample offered while `in_ready` is low must stay offered and
  unchanged (an assertion checks this).
* Outputs: `out_valid` is high for eight consecutive cycles, one per bin in
  order 0..7. Bin k's result is registered on the (k+1)-th rising edge after
  the one that took the sample.
* `rst_n` is synchronous and active low. It clears the control and the
  frame position. Bin state needs no reset, because the first sample of a
  frame ignores it.

## The kernel multiplier (`remb_dct_kernel_mult`)

```
n1 = 16x   + mux(sel[0]; 4x , -x  )     20, 15
n2 = 2*n1  + mux(sel[1]; -x , 8*n1)     39, 200 (n1=20)   29, 150 (n1=15)
p  = n2    + mux(sel[2]; -4x, 0   )
```

The three constants are 39 (`3'b100`), 150 (`3'b111`) and 196 = 200 - 4
(`3'b010`). The remaining select words give 35, 200, 25, 29 and 146. The DCT
kernel that would use this block is not part of this design. The block is
brought out on the `kern_*` ports of the top.

## Top level (`remb_top`)

| ports    | part | clocked |
|----------|------|---------|
| `dct_*`  | `goertzel_dct_loop` with `remb_dct_loop_mult` | yes |
| `kern_*` | `remb_dct_kernel_mult`, `kern_p = kern_x * constant(kern_sel)` | no |
| `bs_*`   | `remb_basic_example`, single cell 5x/-3x/3x/-x | no |
| `cas_*`  | `remb_cascade2` in form `CAS_FORM` (default E) | no |

Parameters: `W_IN = 12` (DCT sample width), `SW = W_IN + 8`, `FRAME_N = 8`,
`W = 16` (multiplicand width of the side blocks), `CAS_FORM = FORM_E`.
Shared types and the coefficient table are in `rtl/remb_pkg.sv`.

## What follows the published design and what does not

Taken from the published design: the basic structure and its
generalization, the cell operation table, the five cascade topologies and
their output counts, the node structure and partial products of both
concrete blocks, the Goertzel recursion, its input sign and the negation of
bins 5..7.

Choices made here, because the source gives nothing or is inconsistent:

* all word widths and the signed integer format; floor rounding;
* the order of inputs on every multiplexer (the upper input of each drawing
  is input 0), and with it every select word;
* the per-bin 8/9-bit shift in place of one 9-bit shift;
* coefficient 2 and 0 for bins 0 and 4 by shift and zero;
* sharing one loop among all eight bins, the frame counter, the handshake
  and the reset;
* add/sub semantics for more than two operands in `remb_general`;
* the cascade's default shifts.

Not included:

* a multiplier for 362, so bins 2 and 6 of the DCT are flagged, not
  computed;
* the DCT kernel around the second block;
* any FPGA-specific mapping. The published area figures are counted in
  Virtex half-slices; here every cell is plain adder and multiplexer logic
  left to synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_remb_general`, `tb_remb_cell`, `tb_remb_basic_example`: random operands against
  the operation tables, and the distinct-output count of one against two
  multiplexers.
* `tb_remb_cascade2`: all five forms. It checks the 4/4/4/3/4 output counts
  and the stage equations for random `x` and every control setting.
* `tb_remb_dct_loop_mult`, `tb_remb_dct_kernel_mult`: every select word with
  random and extreme `x`, against products computed from the node equations.
  The loop block's test also checks its full constant set, and that 362 is
  not in it.
* `tb_goertzel_dct_loop`: four frames, half of them offered back to back and
  half with idle gaps. Every output is compared with an integer reference
  model (`tb/dct_ref_pkg.sv`) for value and exact cycle. The test also checks
  the 8-cycle sample rate, `out_last` and `out_coef_missing`. Frame-end
  results of the six complete bins must lie within 48 LSB of a
  floating-point Goertzel recursion with exact cosines.
* `tb_remb_top`: the whole top at default parameters. It runs the same DCT
  traffic, drives every side block, and counts how often each mechanism
  occurs (stall, back-to-back samples, frame restart, k=0 shift, k=4 zero,
  negated bins, missing-coefficient flag, each kernel constant, each cell
  mode, the cascade's hybrid input). A mechanism that never occurs counts as
  a failure.

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/remb_pkg.sv tb/tb_remb_top.sv --top-module tb_remb_top
./obj_dir/Vtb_remb_top
```

Replace `tb_remb_top` with any other testbench name. Each one finishes in
well under a second.

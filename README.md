# Low-area carry-select adder built from selection cells

A carry-select adder normally computes every result twice: one ripple-carry
adder assumes a carry-in of 0, a second assumes 1, and a multiplexer keeps
the right one when the real carry arrives. The second adder (or the
binary-to-excess-1 converter that often replaces it) is the cost of the
speed.

This adder removes both duplicated adders. For a single bit, the two
candidate results do not need an adder at all:

| carry-in | sum            | carry   |
|----------|----------------|---------|
| 0        | `a ^ b`        | `a & b` |
| 1        | `~(a ^ b)`     | `a \| b` |

So each bit needs one XOR, one inverter on the XOR output, one AND, one OR
and two 2:1 multiplexers. The incoming carry drives both multiplexer
selects, and the selected carry becomes the select of the next bit. The
RTL is the 8-bit adder of the published design, with the width as a
parameter.

## Modules

| module          | what it is                                                     |
|-----------------|----------------------------------------------------------------|
| `csla_proposed` | the top: `WIDTH` cells chained through their carry multiplexers |
| `csla_bit`      | one bit: the four candidate gates and two multiplexers         |
| `csla_mux2`     | 2:1 multiplexer in AND-OR-inverter form                        |

Everything is combinational. There is no clock, no reset and no register.

### `csla_proposed #(WIDTH = 8)`

| port   | dir | width   | meaning                          |
|--------|-----|---------|----------------------------------|
| `a`    | in  | `WIDTH` | first operand                    |
| `b`    | in  | `WIDTH` | second operand                   |
| `cin`  | in  | 1       | carry-in, select of bit 0        |
| `sum`  | out | `WIDTH` | sum                              |
| `cout` | out | 1       | carry out of the top bit         |

`{cout, sum} = a + b + cin`, unsigned.

### `csla_bit`

Ports `a`, `b`, `cin` in; `sum`, `cout` out. Its function is exactly a full
adder. Only the way it is built differs.

### `csla_mux2`

Ports `s`, `i0`, `i1` in; `o` out. `o = i0` when `s = 0`, `o = i1` when
`s = 1`.

## Timing: where the carry goes

The XOR, NOT, AND and OR gates of every bit depend only on the operands, so
they settle in parallel. After that, the carry moves through one
multiplexer per bit, from `cin` to `cout`. The critical path is the
operand gates of bit 0 and then `WIDTH` carry multiplexers.

In practice this makes the adder a ripple-carry adder whose full-adder cell
is a pair of multiplexers. Nothing skips ahead: bits are not grouped into
blocks with a shared select. The speed claim rests on the short
select-to-output path of a multiplexer. The name "carry select" refers to
each bit choosing between two precomputed results.

Under the unit-gate model used to size the design, every AND, OR and
inverter is 1 unit of area and 1 unit of delay. An XOR is 5 units of area
and 3 of delay. A 2:1 multiplexer is 4 units of area and 3 of delay. So one
carry step costs 3 units of delay.

## Area budget

Unit-gate counts for 8 bits, as claimed by the published design:

| 8-bit adder                                         | gate units |
|-----------------------------------------------------|------------|
| conventional carry-select (two ripple adders + muxes) | 265      |
| carry-select with binary-to-excess-1 converter      | 176        |
| this adder: 8 XOR (40) + 16 MUX (64) + 8 NOT + 8 AND + 8 OR | 128 |

The published design also reports 0.328 mW, 0.258 mW and 0.158 mW for the
three adders, from a transistor-level layout. The two comparison adders
appear here only as reference points. The RTL does not contain them. The
layout and power figures belong to the silicon, not to the RTL.

The published comparison table lists 8 multiplexers for this adder. Its
own gate list, its 128-unit total and its drawing of the adder all have two
multiplexers per bit, 16 in all. This RTL has 16.

## What follows the published design, and what is this RTL's choice

Taken from the published design:
- the one-bit truth table and the mapping of candidates to the carry-in
  value (XOR/AND for 0, inverted XOR/OR for 1);
- the inverter placed on the XOR output;
- the 8-bit arrangement, with each bit's selected carry driving the next
  bit's multiplexers;
- the multiplexer built from AND, OR and inverter gates, and its port names.

Chosen here:
- `WIDTH` as a parameter, defaulting to 8. The cell is meant to be cascaded
  to 4, 16 and 32 bits, and those sizes are tested.
- the multiplexer polarity (`s = 0` passes `i0`). The cell wires the
  carry-in-0 candidates to `i0`.
- no registers, clock or reset. None are described.

## Verification

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench          | what it covers                                              |
|--------------------|-------------------------------------------------------------|
| `tb_csla_mux2`     | all 8 input combinations                                     |
| `tb_csla_bit`      | all 8 rows of the one-bit truth table, held as a constant    |
| `tb_csla_proposed` | all 131072 combinations of `a`, `b`, `cin` at the default 8 bits |
| `tb_csla_widths`   | 4 bits exhaustive; 16 and 32 bits: corner cases + 20000 random vectors |

The references are computed as `a + b + cin` in the testbench, one bit
wider than the adder. `tb_csla_proposed` also counts each mechanism and
fails if one never happens:
- bit 0 selecting each candidate pair;
- a carry rippling through all eight selects (`a ^ b` all ones, `cin = 1`);
- a carry out of the top bit.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
          --top-module tb_csla_proposed tb/tb_csla_proposed.sv
./obj_dir/Vtb_csla_proposed
```

Replace the top module and the file name to run another testbench. Lint
the RTL with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/csla_proposed.sv`.

## Changing it

- Width: override `WIDTH` on `csla_proposed`. Delay grows linearly, one
  multiplexer per bit. For wide operands, consider grouping the cells into
  blocks whose carry-in is selected once. That is a classic carry-select
  arrangement, and it is not part of this design.
- Subtraction: invert `b` and set `cin = 1`. The adder needs no change.

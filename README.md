# 8-bit Brent-Kung adder with a carry-skip last row

A ripple-carry adder waits for each carry to travel from bit 0 to the top.
This adder works out all eight carries in parallel with a parallel-prefix
network (Brent-Kung). It works out `s = a + b + cin` for 8-bit `a` and `b`
and a carry input `cin`, and gives a 9-bit result whose top bit is the
carry out.

The main idea is that the prefix tree never sees the carry input. The tree
only works out, for every bit `i`, two things about bits `i..0`:

- `G(i:0)`: the bits produce a carry on their own.
- `P(i:0)`: the bits pass an incoming carry through.

A last row of small "gray" cells then folds `cin` in:
`c[i] = G(i:0) | P(i:0) & cin`. The carry input skips over the whole tree
and reaches every carry through a single AND-OR. The tree's depth is set by
the operands alone.

The design is fully combinational. It has no clock, no registers and no
reset. A result is valid one propagation delay after the inputs change.

## Structure

```
 a,b ──► bk_pre_stage ──p,g──► bk_carry_stage ──c──► bk_post_stage ──► s[8:0]
                         │        (black-cell tree      ▲
                         │         + gray-cell row)     │
 cin ────────────────────┼──────────────►──────────────┤
                         └──────────── p ──────────────┘
```

| module            | stage                | what it does                                             |
|-------------------|----------------------|----------------------------------------------------------|
| `bk_pre_stage`    | pre-processing       | `p = a ^ b`, `g = a & b` per bit                         |
| `bk_carry_stage`  | carry generation     | prefix tree of black cells, then a row of 8 gray cells   |
| `bk_post_stage`   | post-processing      | `s[i] = p[i] ^ c[i-1]` (`cin` for bit 0), `s[8] = c[7]`  |
| `bk_black_cell`   | tree cell            | `G = Gh OR (Ph AND Gl)`, `P = Ph AND Pl` (three gates)          |
| `bk_gray_cell`    | last-row cell        | `G = Gh OR (Ph AND Gl)` only (two gates)                    |
| `cska_bk_adder`   | top                  | wires the three stages together                          |
| `bk_pkg`          | package              | `gp_t` (a generate/propagate pair), `ADDER_WIDTH = 8`    |

A black cell merges two adjacent groups. It keeps the group propagate
because a later cell still needs it. A gray cell drops the propagate. That
saves a gate, but its output can feed nothing else in the tree. This is
why gray cells are used only in the last row.

## The carry tree

This is the part that takes the most care to follow. `bk_carry_stage` has
three levels of black cells. Their outputs are ports, so they can be
watched in simulation. `u`, `x` and `m` are group propagates. `v`, `t` and
`n` are group generates.

| level | index 0 | index 1        | index 2 | index 3 | index 4 |
|-------|---------|----------------|---------|---------|---------|
| 1 `u/v` | (1:0) | bit 2, passed on | (3:2) | (5:4)   | (7:6)   |
| 2 `x/t` | (2:0) = bit 2 ∘ (1:0) | (3:0) = (3:2) ∘ (1:0) | (7:4) = (7:6) ∘ (5:4) | | |
| 3 `m/n` | (4:0) = bit 4 ∘ (3:0) | (5:0) = (5:4) ∘ (3:0) | (6:0) = bit 6 ∘ (5:0) | (7:0) = (7:4) ∘ (3:0) | |

Here `∘` is the black-cell operator with the more significant group on the
left. The prefixes `(i:0)` for i = 0..7 are then `bit 0`, `(1:0)`, `(2:0)`,
`(3:0)`, `(4:0)`, `(5:0)`, `(6:0)`, `(7:0)`. Each goes into one gray cell
together with `cin`.

Critical path, counted in cells: 1 (level 1), 2 (level 2), 3 (level 3),
4 for `(6:0)`, then one gray cell. `(6:0)` waits for `(5:0)`, as in the
usual Brent-Kung inverse tree, so it is one cell slower than the other
level-3 outputs. The tree has 11 black cells and the last row has 8 gray
cells.

Two worked examples, with `cin = 0`:

| a + b        | u     | v     | x   | t   | m    | n    | c        | s         |
|--------------|-------|-------|-----|-----|------|------|----------|-----------|
| 0xCC + 0x2A  | 10010 | 00100 | 000 | 010 | 0000 | 0000 | 00001000 | 011110110 |
| 0x35 + 0x2D  | 00000 | 01110 | 000 | 011 | 0000 | 0011 | 00111101 | 001100010 |

## Interface and timing

`cska_bk_adder #(WIDTH = 8)`:

| port  | dir | width | meaning                    |
|-------|-----|-------|----------------------------|
| `a`   | in  | 8     | operand                    |
| `b`   | in  | 8     | operand                    |
| `cin` | in  | 1     | carry input                |
| `s`   | out | 9     | `a + b + cin`; `s[8]` is the carry out |

All paths are combinational. The tree is laid out by hand for 8 bits.
`WIDTH` exists only to size the ports, and any value other than 8 stops
elaboration with an error. `bk_pre_stage` and `bk_post_stage` take any
`WIDTH` of 2 or more.

## How far it follows the source design, and where it is a reading

Taken from the published design:

- the three stages and what each produces (`p`, `g`, carries, a 9-bit sum);
- black cells with three gates and gray cells with two;
- gray cells in the last stage;
- the 8-bit width;
- `p` formed as XOR;
- the names and widths of the intermediate signals, and their values for
  the two examples above.

This design's own reading, where the source gives no wiring:

- Which cell feeds which. This was worked out so that the two examples come
  out exactly as above.
- Index 1 of level 1 carries bit 2 unchanged. The examples would equally fit
  a black cell over bits (2:1). The pass-through was chosen because it
  costs no gates and matches the usual Brent-Kung form.
- `cin` enters only through the gray-cell last row, as a carry skip over
  the tree. The examples all have `cin = 0`, so they do not confirm this
  path. The exhaustive tests below do show that the adder is correct with
  it.
- No registers. The adder is combinational.

Not included: the 32-bit version, which the source mentions only as future
work, and the carry-select and conditional-increment adders it compares
against.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the
module's outputs with values worked out in the testbench in a different
way: integer sums, or carries rippled bit by bit.

- `tb_bk_black_cell`, `tb_bk_gray_cell`: all input combinations.
- `tb_bk_pre_stage`: all 65,536 operand pairs.
- `tb_bk_post_stage`: all 2^17 cases of `a`, `b` and `cin`. The carries
  are rippled in the testbench, not taken from the tree.
- `tb_bk_carry_stage`: the two examples, signal by signal. Then all 2^17
  cases, checking every level output and every carry.
- `tb_cska_bk_adder`: end to end at the default size, over all 2^17 cases.
  It also counts how often each of the following happens, and fails if one
  never does:
  - a carry out;
  - `cin` skipping a fully propagating word;
  - `cin` changing a carry above bit 0;
  - a carry generated in bit 0 reaching bit 7.

Every testbench ends with a line `TB_RESULT checks=N failures=M`. A watchdog
fails the run if it hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/bk_pkg.sv tb/tb_cska_bk_adder.sv \
          --top-module tb_cska_bk_adder -o sim
./obj_dir/sim
```

To run another testbench, swap in its file and name. The package file has
to come first, because `-y rtl` finds the other modules by name.

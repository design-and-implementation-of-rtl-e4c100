# Self-checking rotator with a Berger code

A rotate register only moves bits around: a left or right rotation changes
where each 1 sits, but never how many 1s the word holds. This design uses
that invariant to check a 4-bit rotate left/right register while it runs
(concurrent error detection). The number of 1s in the word is its
**Berger check symbol**. The symbol is computed once, when a word is
loaded, and kept in inverted form. After every later clock the symbol is
computed again from the register outputs. A **two-rail checker** then
compares it bit by bit with the stored inverted copy. If the two disagree,
the word has gained or lost 1s and an error is flagged.

```
 din ──►┌──────────────┐ q[3:0]  ┌────────────┐ csb[2:0]
 rl  ──►│ rotator_reg  ├────────►│ berger_csg ├──────────┬──────────────┐
 rr  ──►│ (4 flip-flops│         │ count of 1s│          │              │ x
 clk ──►│  + AND-OR    │         └────────────┘          ▼              ▼
        │  selectors)  │                   sel1,sel2 ┌──────────────┐ ┌──────────────────┐
        └──────────────┘                   ─────────►│csb_ref_reg.  │ │ two_rail_checker │──► f
                                                     │ stores ~csb  ├►│  (trc_cell chain)│──► g
                                                     └──────────────┘y└──────────────────┘
                                                                    error = (f == g)
```

The top module is `sc_rotator` (`rtl/sc_rotator.sv`). The parameter defaults
are the design's own sizes: `WIDTH = 4` data bits and `CW = 3` check bits.

## The rotator register

`rotator_reg` is a ring of `WIDTH` D flip-flops. Position 1 (`q[0]`, called
Q1) is the left end, where the serial input `din` enters. Position 4
(`q[3]`, Q4) is the right end. In front of each flip-flop is a three-term
AND-OR selector, with one AND term per operation. Two control lines pick
the operation:

| rl | rr | operation    | effect at the next rising edge              |
|----|----|--------------|---------------------------------------------|
| 0  | 0  | clear        | all bits 0 (no AND term enabled)            |
| 0  | 1  | rotate right | Q1→Q2→Q3→Q4, Q4 wraps round to Q1           |
| 1  | 0  | rotate left  | Q4→Q3→Q2→Q1, Q1 wraps round to Q4           |
| 1  | 1  | serial load  | shift right, `din` enters at Q1             |

Loading is serial, so a word takes `WIDTH` clocks to enter, and the first
bit shifted in reaches Q4 on the fourth clock. To get the word
Q1..Q4 = 1,0,0,1, shift in Q4's bit first and Q1's last. The names are
in `sc_rotator_pkg::rot_op_e`, encoded as `{rl, rr}`.

There is no hold code: the register does something on every clock. There
is also no reset pin. The clear code acts as the reset.

## Check symbol and reference

`berger_csg` counts the 1s of the word into `CW = ceil(log2(WIDTH+1))`
bits, giving 0..4 in 3 bits. It is combinational, so `csb` always
describes the current register contents.

`csb_ref_register` keeps the **complement** of the symbol of the word just
loaded. In the original circuit the inverted symbol passes through three
tri-state buffers under one select line (`sel1`). A second select line
(`sel2`) makes the 3-bit parallel-in/parallel-out register take it in.
This RTL has no high-impedance bus. Instead, the register loads `~csb` at a
rising edge when `sel1 && sel2`, and otherwise holds its value.

Because there is no hold code, store the reference in a cycle in which the
word rotates (or is cleared after it). The symbol is sampled before the
edge, and a rotation does not change the count, so the stored value is
correct either way.

## The two-rail checker

A single "ok" wire cannot check itself: if it is stuck at "ok", nothing
notices. The checker therefore answers in two-rail code. A valid answer
`(f, g)` is `01` or `10`, and `00` or `11` means an error.

The checker takes 3 pairs `(x[i], y[i]) = (csb[i], ref_csb[i])`. With no
fault, every pair is complementary. The pairs are folded by a chain of
`trc_cell`s:

```
f = a1·b1 + a0·b0        g = a1·b0 + a0·b1
```

Each cell gives a complementary result only if both of its input pairs
are complementary. One bad pair anywhere therefore forces `f == g` at the
end. `sc_rotator` turns that into the `error` output, which is
`~(f ^ g)`.

Which of `01` and `10` appears depends on the data. Both occur in normal
use, and that is what lets a stuck `f` or `g` show up as an error.

## What is detected, and what is not

- **Detected:** any error that changes the number of 1s in the word
  between the reference store and a check. This includes every
  unidirectional error (any number of 1s turning into 0s, or of 0s
  turning into 1s) and every single-bit error.
- **Not detected:** errors that keep the count. Examples are one 1→0 flip
  together with one 0→1 flip, and any fault that only permutes bits, such
  as a rotation in the wrong direction or by the wrong amount. The Berger
  check protects the contents of the word, not the rotation logic.
- The reference is produced by the same `berger_csg` that later checks the
  word. A permanent fault in the generator corrupts both values the same
  way, and is seen only when its effect differs between the two words.
- Until the first reference store, `ref_csb` holds an arbitrary value and
  `error` has no meaning. After loading a new word, store a new reference.
  A reload whose count differs from the stored one is flagged as an error,
  which is exactly what the checker is for.

## Interface of `sc_rotator`

| port      | dir | width | meaning                                            |
|-----------|-----|-------|----------------------------------------------------|
| `clk`     | in  | 1     | clock, all state changes on the rising edge        |
| `rl`,`rr` | in  | 1     | operation select (table above)                     |
| `din`     | in  | 1     | serial data input                                  |
| `sel1`    | in  | 1     | drive the inverted symbol to the reference register|
| `sel2`    | in  | 1     | load the reference register                        |
| `q`       | out | WIDTH | register word, `q[0]` = Q1                         |
| `csb`     | out | CW    | live check symbol (count of 1s in `q`)             |
| `ref_csb` | out | CW    | stored inverted symbol                             |
| `f`,`g`   | out | 1     | two-rail checker answer                            |
| `error`   | out | 1     | `f == g`                                           |

Timing: `q` and `ref_csb` change on the rising edge. `csb`, `f`, `g` and
`error` follow them combinationally in the same cycle, so a corrupted word
is flagged in the cycle in which it appears.

The usual procedure is:
1. one clear cycle;
2. `WIDTH` load cycles;
3. one rotate cycle with `sel1 = sel2 = 1`;
4. any number of rotations, watching `error`.

## Where this RTL departs from, or adds to, the original design

- The rising clock edge is an assumption. So are the bit order of the `q`
  vector and the assignment of the three AND terms to the three operations.
- The gate structure of the check symbol generator and of the two-rail
  checker is not specified. The generator is an adder chain, and the
  checker is the standard cell chain shown above.
- The tri-state buffers are modelled as a gated register load. It is also
  an assumption that `sel1` drives the buffers and `sel2` loads the
  register.
- The `error` output decodes the "error alert" step of the checking
  procedure. It is not a pin of the original block diagram.
- The original simulation shows a few internal signals whose role is not
  explained. They are not reproduced.

## Files

| file | content |
|------|---------|
| `rtl/sc_rotator_pkg.sv`    | operation codes, `berger_width()` |
| `rtl/rotator_reg.sv`       | rotate left/right register with serial load |
| `rtl/berger_csg.sv`        | check symbol generator (count of 1s) |
| `rtl/csb_ref_register.sv`  | reference register for the inverted symbol |
| `rtl/trc_cell.sv`          | two-pair two-rail checker cell |
| `rtl/two_rail_checker.sv`  | N-pair two-rail checker |
| `rtl/sc_rotator.sv`        | top level |
| `tb/tb_*.sv`               | self-checking testbenches, one per module, plus `tb_sc_rotator_1001` |

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each also has a watchdog.

- `tb_rotator_reg` compares 2000 random operations against a model.
- `tb_berger_csg` and `tb_two_rail_checker` are exhaustive, including
  other widths.
- `tb_sc_rotator` runs 300 load/store/rotate sessions at the default size.
  It injects single-bit and unidirectional faults with `force`, reloads
  words without a new reference, and counts that every mechanism occurred.
- `tb_sc_rotator_1001` walks through the word 1001 step by step.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_rotator_pkg.sv \
          tb/tb_sc_rotator.sv --top-module tb_sc_rotator
./obj_dir/Vtb_sc_rotator
```

Replace `tb_sc_rotator` with any other testbench name. Each testbench runs
in well under a second.

To change the word width, override `WIDTH` on `sc_rotator`. `CW` follows
from it. The end-to-end testbenches run the default size. The unit testbenches of
`berger_csg` and `two_rail_checker` already cover other widths.

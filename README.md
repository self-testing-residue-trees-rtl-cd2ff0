# Self-checking residue trees

These modules compute the residue of a binary number modulo an odd modulus A,
|n|_A = n mod A. They also check themselves. Such residues are the usual way to
check a binary adder: if n1 + n2 = sum, then |n1|_A + |n2|_A = |sum|_A modulo A.
The weak point of such a check is a fault in the checker itself. The circuits
here are designed to be **totally self-checking** for single stuck-at faults:

* **Fault-free:** the output is always a valid code word, and it is the correct one.
* **Fault-secure:** no single stuck line can turn the output into a *wrong* valid
  code word.
* **Self-testing:** every single stuck line produces an *invalid* code word for
  at least one input number.

So a fault shows up as an invalid output, and until it does, every valid output
is correct.

This is done by coding every residue in the **1-out-of-A code**, on the output
and also on every wire between cells. Residue r is an A-bit vector with only bit
r set (bit i is called R^i). Whenever the fault-free logic works, exactly one
line is high. A fault can make zero lines high or several lines high, and the
cells pass that condition on to the output.

The RTL is purely combinational. It has no clock, no reset and no state.

## The 1-out-of-A code and why errors reach the output

A tree is built from two kinds of cell. The cell equations, read off
`mod_add_andor`, give the key property:

    R^i = OR over j of ( X^j AND Y^((i-j) mod A) )

* If one operand is all-zero, every product is zero, so the output is all-zero.
* If one operand has k lines high and the other operand is a valid code word,
  then k different products fire. Each has a different sum, so k output lines
  go high.

An invalid word therefore stays invalid all the way to the tree output. Each
output line has its own gates, so a fault inside a cell can flip at most one
output line. The code has distance 2, so a one-line error can never turn one
valid word into another. The only shared gates are the input inverters of the
first-rank cells. A stuck inverter makes the decoder select two values or none.
Two neighbouring byte values never share a residue when A is odd, so that also
gives an invalid word.

Self-testing depends on every line taking both values in normal use. Two rules
guarantee that:

* **A must be odd.** Multiplying by a byte weight 2^k is then a one-to-one
  mapping modulo A. So every byte residue can appear at every position.
* **Every byte must be at least ceil(log2 A) bits wide.** Then all A residues
  can occur.

## First rank: the |x|_A cell (`mod_reduce`)

Byte B sits at bit position SHIFT and contributes |B * 2^SHIFT|_A to the
residue. The cell works in three steps:

1. **Full decode.** A W-bit byte is decoded to one of 2^W lines.
2. **OR by residue.** The decoder lines whose values have the same residue are
   ORed together. This gives the unweighted residue |B|_A as a code word.
3. **Multiply by the weight.** The weight |2^SHIFT|_A is applied by
   re-labelling the A lines, with no gates at all. Line u[k] goes to output
   r[(k * |2^SHIFT|_A) mod A].

Example for modulo 5 with 3-bit bytes. The byte weights 1, 8, 64, 512 have the
residues 1, 3, 4, 2. For weight 8 the lines cross over like this:

| unweighted residue |B|_5 | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| output line (×3 mod 5)   | 0 | 3 | 1 | 4 | 2 |

For modulo 3 with 4-bit bytes every weight 2^(4m) is 1 modulo 3. So there is no
crossover, and all four first-rank cells of the 16-bit tree are identical.

## Second rank: +A cells

* **`mod_add_andor`**: the equation above. It uses A*A two-input ANDs and A
  ORs of A inputs each.
* **`mod_add_orand`**: the product-of-sums form used for *level merging*. Let
  Ybar^a be the OR of every Y line except Y^a. Then

      R^k = AND over j of ( X^j OR Ybar^((k-j) mod A) )

  For valid inputs this gives the same sum as the AND-OR cell. The first-rank
  cells and the AND-OR cell both end in an OR level, and the OR-AND cell starts
  with one. If OR-AND and AND-OR layers alternate, two OR levels or two AND
  levels meet at every layer boundary. Each such pair can be collapsed into one
  wider gate without losing the self-checking property. An m-layer tree then
  costs about m+1 gate delays instead of 2m. The price is A*A gates of A inputs
  per cell instead of A.

  Invalid inputs behave as follows:
  * All-zero on either input gives all-zero.
  * Two X lines high gives two output lines high.
  * Two Y lines high drives **all** A output lines high, because each OR term
    leaves out only one Y line.

  All of these are invalid words, which is all the checking needs.

## Building a tree (`residue_tree`)

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 16 | width of the input number |
| `A` | 3 | odd modulus |
| `BYTE_W` | 4 | byte width, counted from the least significant end |
| `WIDE` | 0 | number of most-significant bytes that are `BYTE_W+1` bits |
| `SHAPE` | `TREE_BALANCED` | `TREE_BALANCED`, `TREE_CHAIN` or `TREE_COMPLETE` (type `residue_pkg::tree_shape_e`) |
| `LEVEL_MERGE` | 0 | 1: OR-AND cells in layers 1, 3, …; AND-OR cells in layers 2, 4, … |

**Byte cutting.** Any bits left over at the top go into the most significant
byte. For example:

* `WIDTH=32, A=5, BYTE_W=3` gives nine 3-bit bytes plus one 5-bit byte.
* Adding `WIDE=2` gives eight 3-bit bytes plus two 4-bit bytes. This layout has
  the smallest first-rank gate count for 32-bit modulo 5. A cell of width w has
  2^w + 5 gates.

**Tree shapes.**

* `TREE_BALANCED` pairs neighbouring nodes level by level: byte 0 with byte 1,
  byte 2 with byte 3, and so on. An odd node at the end of a level passes down
  unchanged. With a power-of-two byte count, every bit sees the same depth.
* `TREE_CHAIN` adds the bytes one after another, least significant first. The
  most significant byte is then only one cell away from the output. This suits
  an operand from a ripple-carry adder, whose high bits settle last.
* `TREE_COMPLETE` gives a tree of minimum depth in which only the least
  significant bytes pass through the deepest level. Let N be the number of
  bytes and P2 the largest power of two not above N. The lowest 2(N−P2) bytes
  are first added in pairs. The P2 nodes that result then form a perfect
  pairwise tree. For 32-bit modulo 5 with a 5-bit top byte (N = 10, P2 = 8):
  * bytes 0+1 and 2+3 are added first;
  * the next level forms (0..1)+(2..3), 4+5, 6+7 and 8+9;
  * the level after that forms (0..3)+(4..5) and (6..7)+(8..9);
  * the root adds those two.

  With a power-of-two byte count this is the same as `TREE_BALANCED`.

Inside the tree, all nodes sit in one flat array `node[]`. The leaves (byte
cells) come first, then the cell outputs, and the last element is the result.
The helper functions in `residue_pkg` compute the array indices.

Configurations that have been simulated (all inputs for 16 bits, corner cases
plus 20000 random values for 32 bits):

| configuration | parameters |
|---|---|
| 16-bit mod 3, four 4-bit bytes | defaults |
| 32-bit mod 5, 9×3 + 5 bits | `WIDTH=32, A=5, BYTE_W=3` |
| 32-bit mod 5, 8×3 + 2×4 bits | `WIDTH=32, A=5, BYTE_W=3, WIDE=2` |
| 32-bit mod 5, eight 4-bit bytes (no crossovers) | `WIDTH=32, A=5, BYTE_W=4` |
| 32-bit mod 7, eight 4-bit bytes | `WIDTH=32, A=7, BYTE_W=4` |
| 32-bit mod 5, 9×3 + 5 bits, complete tree | `WIDTH=32, A=5, BYTE_W=3, SHAPE=TREE_COMPLETE` |
| chain, complete and level-merged variants | `SHAPE=TREE_CHAIN`, `SHAPE=TREE_COMPLETE`, `LEVEL_MERGE=1` |

## Large moduli: two trees and a translator (`biresidue_tree`, `residue_translator`)

A single tree modulo A needs A-input ORs in every +A cell. For a large A this is
impractical. Instead, build one small tree for each of two moduli P and Q, and
combine their outputs in a translator.

**Coprime case.** If P and Q are relatively prime and P*Q = A, the Chinese
remainder theorem gives each residue modulo A exactly one pair of residues
(mod P, mod Q). The translator then needs only one AND gate per output line:

    R^i = X^(i mod P) AND Y^(i mod Q)

This translator passes invalid words on as invalid words. The default builds
modulo 15 from a modulo-3 tree (4-bit bytes) and a modulo-5 tree (3-bit bytes).

**General case.** The translator also accepts any A that divides
L = lcm(P, Q). The moduli may then share a factor, for example 15 and 21 for
A = 35. Each value v below L is fixed by its residue pair. So line i becomes an
OR of one AND term per value v with v mod A = i, which is a two-level AND-OR
network per output line. Residue pairs that no value produces get no gate.
Whether invalid words still stay invalid depends on P, Q and A, and must be
checked for the chosen moduli.

Set `A` on `biresidue_tree` or `residue_translator` to use the general case.

**Three moduli (`residue_translator3`).** This is the same construction with a
third input Z of S lines. Each term is a three-input AND:

    R^i = OR over v < lcm(P,Q,S) with v mod A = i of ( X^(v mod P) AND Y^(v mod Q) AND Z^(v mod S) )

The default combines moduli 3, 5 and 7 into 105. Those moduli are pairwise
prime, so this is one AND gate per line. Its testbench wires three
`residue_tree`s to it and checks every 16-bit input against n mod 105.

## The checked adder (`checked_adder_top`)

```
n1 ──┬────────────────► ones_adder ──► sum ──┬──► (out)
n2 ──┼──┬─────────────►                      │
     │  │                                    ▼
     ▼  ▼                                 R(sum) ──► Y ─┐
   R(n1) R(n2) ──► +15 ──► X ────────────────────────► eq_checker ──► eq_out[1:0], err
```

**Adder (`ones_adder`).** A residue check modulo A is valid only if A divides
the adder's own modulus M.

* A two's complement adder has M = 2^WIDTH. No odd A divides that.
* A one's complement adder (end-around carry) has M = 2^WIDTH − 1. For 16 bits
  that is 65535 = 3·5·17·257, so A = 15 works.

The adder is therefore 16-bit one's complement. Both all-zeros and all-ones
represent zero.

**Checker (`residue_checker`).** Its three residue generators R(n1), R(n2) and
R(sum) are modulo-15 biresidue networks. Set `Q=1` to use a single tree modulo
`P` instead. A +15 AND-OR cell adds |n1| and |n2|, and `eq_checker` compares
the result with |sum|.

**Output.** `eq_out` is 2 wires:

* `01` or `10`: the check passed. Both values occur in normal operation.
* `00` or `11`: an error. `err` decodes this.

An adder error shows up as two different valid words at EQ, unless the error is
a multiple of 15. EQ flags that case. A fault in a residue generator or in the
+15 cell shows up as an invalid word at EQ for some inputs. EQ flags that word
only if it has no line high. It misses a word that has an extra line next to
the correct one. See the limits below.

**Level merging.** The top sets `LEVEL_MERGE=1`, so its trees alternate OR-AND
and AND-OR layers. The basic `residue_tree` default is AND-OR throughout.

The top's ports are `n1`, `n2` in, and out: `sum`, `eac` (an end-around carry
happened), the four intermediate 1-out-of-15 residues, `eq_out` and `err`.

## Files

| file | content |
|---|---|
| `rtl/residue_pkg.sv` | tree-shape enum; functions for weight residues, byte layout and tree indexing |
| `rtl/mod_reduce.sv` | first-rank \|x\|_A cell |
| `rtl/mod_add_andor.sv`, `rtl/mod_add_orand.sv` | +A cells |
| `rtl/residue_tree.sv` | configurable residue tree |
| `rtl/residue_translator.sv`, `rtl/biresidue_tree.sv` | two-modulus network |
| `rtl/residue_translator3.sv` | three-modulus translator |
| `rtl/ones_adder.sv`, `rtl/eq_checker.sv`, `rtl/residue_checker.sv` | addition checker parts |
| `rtl/checked_adder_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tree_workloads.sv` | the 32-bit configurations listed above |
| `tb/tb_tree_stuck_faults.sv` | stuck-at fault campaign (see below) |
| `tb/tb_*_harness.sv` | parameterised drivers shared by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops it if it hangs. To run one with Verilator 5, from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/residue_pkg.sv tb/tb_checked_adder_top.sv --top-module tb_checked_adder_top -o sim
./obj_dir/sim
```

Change the testbench name to run another one. `residue_pkg.sv` must be listed
first, because every other file imports it.

`tb_tree_stuck_faults` forces lines inside the tree's node array. Verilator
then reports circular logic (UNOPTFLAT), which only slows simulation. Add
`-Wno-fatal` when building that testbench.

What the testbenches cover:

* **`tb_checked_adder_top`** runs the top at its default size. It uses 10,000
  random and corner additions, which must all pass. It then forces 2,000 wrong
  sums into the checker. Each must be flagged exactly when the error is not a
  multiple of 15. The testbench counts each event and requires it to occur at
  least once: end-around carry, no carry, negative zero, both pass codes, all
  15 residues, a detected error and an aliased error.
* **The cell testbenches** check every pair of valid words. They also check the
  all-zero and two-hot inputs that the self-checking argument relies on.
* **`tb_tree_stuck_faults`** holds each line between cells stuck at 0 and then
  at 1, and applies every input each time. It does this for three trees: the
  16-bit mod-3 tree, a 12-bit mod-5 tree, and a 15-bit mod-5 complete tree
  with level merging, which puts the OR-AND cells under test too. For every
  fault it confirms that the output is never a wrong valid word, and that some
  input gives an invalid word. It takes about a minute.

## How far to trust it, and where it departs from the described design

* **Only the function is fixed, not the gates.** The modules are written as
  Boolean equations: decoder compares, sums of products, products of sums. A
  synthesis tool is free to restructure them. The self-checking proofs assume
  the two-level, separate-gates-per-output structure described above, and a
  synthesised netlist need not keep it. For a checker that really is
  self-checking, the cells must be mapped to gates by hand, or kept from being
  optimised.
  * The simulated fault campaign covers only the lines between cells.
  * The level-merging gate collapse is left to synthesis.
* **`eq_checker` is this design's own minimal comparator.** It splits the
  residues into even and odd classes.
  * It flags two different valid words, which covers every adder error that
    the residue can see.
  * It flags an all-zero word.
  * It does **not** flag a word with an extra line high when the other input is
    the matching valid word.

  So the residue generators are totally self-checking, but the complete
  checker with this EQ is not. Faults in a generator that add a line can go
  unnoticed. A totally self-checking comparator for A = 15 is possible in
  principle, but its design is not given here.
* **OR-AND cell with two Y lines high.** The design as described says two
  output lines rise in this case. Its own product-of-sums equations make all A
  lines rise. This RTL follows the equations. Either way the result is an
  invalid word.
* **Tree shapes with an uneven byte count.** For `TREE_BALANCED`, passing the
  odd node down is this design's own rule. `TREE_COMPLETE` generalises one
  worked 10-byte arrangement into a rule for any byte count, and that rule is
  this design's own.
* **OR-AND alternation starts with OR-AND in the first layer.** This follows
  from the first-rank cells ending in an OR level. Pass-through nodes break
  strict alternation on their paths. So do bytes that enter the perfect part of
  a `TREE_COMPLETE` tree directly.
* **Translator condition.** The general translator requires that A divide
  lcm(P, Q). Only then do the two residues determine the residue modulo A.
  A common multiple that is merely larger than A is not enough.
* **Own choices.** The 16-bit width and the modulus 15 of the checked adder,
  and the `eac` and `err` outputs, are this design's choices.
* **Not built.**
  * Translators for four or more moduli.
  * A packaged three-tree network module. Only the translator exists; wire
    the trees to it yourself, as its testbench does.
  * The commercial MSI decoder and PLA parts of the discrete-logic versions.
    Their functions are covered by `mod_reduce` with 4-bit bytes and by
    `mod_add_andor`.

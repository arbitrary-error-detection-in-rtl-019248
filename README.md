# Concurrent checking of a combinational unit without check bits

A combinational block that can only ever produce a handful of distinct output
words can be made self-checking without adding any redundant code bits to its
output. Two ideas make that work:

1. **Partition the outputs into two independent circuits.** Output bits are
   split into two groups, `c1` and `c2`, each built by a circuit that shares no
   gates with the other. A single fault, whatever error it causes (one bit or
   many, 0→1 and 1→0 mixed), can only corrupt one of the two groups.
2. **Give the checker the primary inputs as side information.** If two legal
   words agree in one group (they are at *distance one*), a fault in the other
   group can turn one into the other and the output still looks legal. The
   checker resolves that by also looking at the unit's inputs `X`: it knows for
   which inputs each word may appear.

The checker is a two-rail sum-of-products (SOP) circuit. It raises exactly one
of its rails `r0`/`r1` when the output word is the one the inputs call for,
and drops both when it is not.

This RTL implements the scheme for a small worked example: a function with 5
inputs and 5 outputs that produces only 6 distinct words. It comes with two
alternative checker tables, one with the fewest literals and one that reads the
fewest inputs.

## The example function

| word | y4..y0 | c1 = (y4,y3,y2) | c2 = (y1,y0) |
|------|--------|-----------------|--------------|
| Y1   | 01011  | 010             | 11           |
| Y2   | 00001  | 000             | 01           |
| Y3   | 00101  | 001             | 01           |
| Y4   | 10111  | 101             | 11           |
| Y5   | 11010  | 110             | 10           |
| Y6   | 11111  | 111             | 11           |

Which input gives which word, as cubes over `x4..x0` (`*` = don't care):

| word | input cubes |
|------|-------------|
| Y1   | `001*0`, `1*001` |
| Y2   | `10000`, `00*11`, `10110` |
| Y3   | `11*00` |
| Y4   | `00000` |
| Y6   | `1111*`, `01000`, `0*101` |
| Y5   | every other input (16 of the 32) |

`c1` alone tells all six words apart, so a fault in the `c2` circuit can never
turn one legal word into another. It can only produce a non-word, and any
minterm-based checker catches that. The other direction is the hard one. `Y2`
and `Y3` share `c2 = 01`, and `Y1`, `Y4`, `Y6` share `c2 = 11`. A fault in the
`c1` circuit can move a word onto one of these neighbours. No way of splitting
5 bits into two groups removes every such pair. That is why the checker needs
`X`.

## Characteristic functions: what the checker knows about X

For each word `Yj` the checker evaluates a *characteristic function*
`gj(X)`. It must be:

- 1 for every input where the fault-free unit produces `Yj`;
- 0 for every input where the unit produces a word at distance one from `Yj`;
- anything at all elsewhere.

Because of that last freedom the functions can be much simpler than the unit
itself. A word with no distance-one neighbour (`Y5`) gets `g = 1`.

Fewest literals (default, `CHAR_MIN_LITERALS`), 9 cubes and 16 literals:

| g  | cubes over x4..x0 | expression |
|----|-------------------|------------|
| g1 | `*01*0`, `**0*1`  | x3'·x2·x0' + x2'·x0 |
| g2 | `*0***`           | x3' |
| g3 | `*1***`           | x3 |
| g4 | `*00*0`           | x3'·x2'·x0' |
| g5 | `*****`           | 1 |
| g6 | `*1*1*`, `*1**0`, `**1*1` | x3·x1 + x3·x0' + x2·x0 |

Fewest inputs (`CHAR_MIN_INPUTS`): only `x3`, `x2` and `x0` reach the checker.
`g1` and `g4` are as above. The other functions are `g2 = x3'`,
`g3 = x3·x0'`, `g6 = x3·x2 + x3·x2'·x0' + x2·x0` and `g5 = 1`. In the cube
tables, `g5` is written as six cubes that together cover every input.

Both tables were checked exhaustively against the function above.

## The SOP checker

The six words are split into two disjoint sets: Π0 = {Y1, Y2, Y3} and
Π1 = {Y4, Y5, Y6}. Rail `i` computes

    R_i = OR over Yj in Π_i of  [c1 == c1(Yj)] · [c2 == c2(Yj)] · gj(X)

Each rail is its own circuit, so the checker is also made of two independent
parts. What the rails mean:

| (r1, r0) | meaning |
|----------|---------|
| 01       | correct word, from Π0 |
| 10       | correct word, from Π1 |
| 00       | error: the output is not a legal word, or it is a legal word that X rules out |
| 11       | cannot be caused by the unit; only a fault inside the checker gives it |

Why every single-circuit fault is caught: suppose the output is not the word
`Yi` that `X` calls for. If it is not a legal word, no minterm matches. If it
is a legal word `Yj`, then only one circuit is faulty, so `Yj` still matches
`Yi` in the other group. That puts `Yj` at distance one from `Yi`, so
`gj(X) = 0`. Either way every product is 0.

`aed_top` adds `err = ~(r0 ^ r1)`. This flag is a convenience of this design.
In a real self-checking system you would pass the rail pair on to a
two-rail checker.

## Modules

| module | what it is |
|--------|-----------|
| `aed_pkg` | word table, input cubes of the function, both characteristic tables, rail split, helper functions |
| `fu_subcircuit` | one output group of the unit, as a two-level sum of products (`LSB`, `WIDTH` pick the bits) |
| `functional_unit` | two `fu_subcircuit` instances: c1 = y[4:2], c2 = y[1:0] |
| `sop_rail` | one checker rail (`RAIL` = 0/1, `CHAR_SET`) |
| `sop_checker` | two `sop_rail` instances, plus an assertion that the rails are never both 1 |
| `aed_top` | unit + checker + `err`; ports `x[4:0]`, `y[4:0]`, `r0`, `r1`, `err` |

Everything is combinational. There is no clock and no reset, and every output
follows `x` after gate delay only.

To retarget the design to another function, change the package. Set the
sizes (`M_IN`, `K_OUT`, `K1`, `K2`, `NWORDS`, `MAXC`), the word table and the
cube tables with their counts, `DEFAULT_WORD` and `PI1_MASK`. The modules read
everything from there. Finding the partition and the characteristic cubes for
a new function is a design-time software job. This RTL does not do it.

## Where this follows the source scheme and where it chooses

Taken from the scheme:

- the two-circuit partition (3, 2);
- the six words and the function's input cubes;
- both sets of characteristic cubes;
- the SOP rail formula;
- the structure: inputs go both to the unit and straight to the checker, and
  the two checker circuits each see both output groups.

This design's own choices:

- The inside of each sub-circuit. Only its function is given; here it is a
  plain sum of products of the input cubes.
- The split of the words between the two rails.
- Reading the rails as a 1-out-of-2 code, and the `err` output.
- Treating `CHAR_MIN_INPUTS` as an option, with the fewest-literals table as
  the default. The fewest-literals table is the one used when the whole
  system's cost was evaluated.

Not covered:

- The larger benchmark circuits (ISCAS89 s27 … s1494, with 7 to 35 inputs and
  6 to 332 words). Their functions and checker tables are not available, so
  there is no RTL for them.
- Synthesis tools may merge logic between the two sub-circuits, or between
  the two rails, unless told to keep the hierarchy. Independence only holds if
  the instances stay separate in the netlist.

## Testbenches and simulation

All the testbenches are exhaustive and self-checking. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fu_subcircuit` | both output-group configurations for all 32 inputs, against the example's Karnaugh map |
| `tb_functional_unit` | `y` for all inputs, and how often each word occurs (4, 4, 2, 1, 16, 5) |
| `tb_sop_rail` | each rail for both tables, over all 32×32 (x, output word) pairs, against hand-written Boolean expressions |
| `tb_sop_checker` | the same for the pair; valid words give 01/10; every wrong `c1` with `c2` correct, and every wrong `c2` with `c1` correct, gives 00 |
| `tb_aed_top` | end to end at default settings: fault-free operation, then `force`s the output of each sub-circuit in turn to every value for every input (320 real errors, 64 harmless). Each error must raise `err`. It counts errors that land on non-words and on distance-one words; both kinds must occur |
| `tb_aed_top_min_inputs` | the same with `CHAR_SET = CHAR_MIN_INPUTS` |

`aed_tb_pkg` in `tb/` holds the reference model. It is written from the
Karnaugh map and plain Boolean expressions, not from the RTL tables.

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/aed_pkg.sv tb/aed_tb_pkg.sv tb/tb_aed_top.sv --top-module tb_aed_top
    ./obj_dir/Vtb_aed_top

Each one finishes in well under a second.

# A low-latency 6-bit S-box, built from NAND/NOR trees

An S-box in an unrolled block cipher sits on the critical path once per
round, so its delay sets the clock rate. This RTL implements a 6-bit
bijective S-box that was chosen so that every output bit can be computed by
**at most four levels of 2-input NAND or NOR gates**. Inverters at the inputs
are not counted, since they replace the input buffers. The S-box is also
cryptographically decent: linearity 16 and differential uniformity 4.

The RTL builds the S-box structurally, gate by gate, in three circuit
styles. It also contains the small gate-level building blocks of the same
method: fan-in 3/4 cells and XOR/XNOR rebuilt from 2-input NAND/NOR gates,
a low-latency 2:1 multiplexer, and a two-level AND-OR function. Everything
is combinational. There is no clock and no reset.

## Latency complexity and the canonical tree

On typical standard-cell libraries, 2-input NAND and NOR are the fastest
gates after the inverter. XOR2, MUX2, AND/OR and wide gates each cost
roughly one and a half to three NAND delays. The delay metric used here is
therefore *latency complexity*: the smallest possible number of NAND2/NOR2
gates on the longest input-to-output path, over all circuits made only of
NAND2, NOR2 and inverters. Two examples:

* XOR2 has latency complexity 2: `x0 ^ x1 = NAND(NAND(x0,~x1), NAND(~x0,x1))`.
* MUX2 also has latency complexity 2: `x0 ? x1 : x2 = NAND(NAND(x0,x1), NAND(~x0,x2))`.

Any function of latency complexity `d` can be written in one fixed shape
(`lc_tree`). The shape is a full binary tree of `d` levels of 2-input gates:

* Every gate is a NAND or a NOR.
* Every gate output feeds exactly one gate of the next level.
* The `2**d` leaves are input bits. Each leaf is taken either straight or
  through an inverter.

Inverters inside the tree are never needed. An inverter after a NAND can be
pushed into the NAND's two inputs, which turns it into a NOR, and the other
way round. Repeating this moves every inverter down to the leaves. A tree is
therefore fully described by three things:

| name    | width          | meaning                                                  |
|---------|----------------|----------------------------------------------------------|
| `G`     | `2**d - 1` bits | gate types, level by level: g1,0 .. g1,2^(d-1)-1, g2,0, ..., gd,0. 0 = NAND, 1 = NOR |
| `ALPHA` | `2**d` bits    | bit i set: leaf a_i is inverted                          |
| `PI`    | `2**d` indices | leaf a_i is input x_PI[i]                                |

Gate g_l,j takes the outputs of g_l-1,2j and g_l-1,2j+1. For l = 1 those
are the leaves a_2j and a_2j+1.

## The S-box

Input and output are numbered so that bit 0 is the most significant bit. All
ports are declared `[0:5]`, so `x[0]` is x0 and the vector read as a number
is the table index.

```
 x : 0  1  2  3  4  5  6  7  8  9  a  b  c  d  e  f
0x : 00 01 02 03 04 06 3e 3c 08 11 0e 17 2b 33 35 2d
1x : 19 1c 09 0c 15 13 3d 3b 31 2c 25 38 3a 26 36 2a
2x : 34 1d 37 1e 30 1a 0b 21 2e 1f 29 18 0f 3f 10 20
3x : 28 05 39 14 24 0a 0d 23 12 27 07 32 1b 2f 16 22
```

### Two functions make all six output bits

The key property of this S-box is that each output bit is one of only two
6-input functions. The inputs are reordered by wiring, and some are inverted
at the leaves. The two functions are:

```
f0(z) = z0 & ~z4  ^  z1 & ~z5  ^  z2 & z5  ^  z3 & z4           (quadratic)
f1(z) = ~z0 & z1 & z4  ^  z0 & ~z1 & z5  ^  z0 & z1  ^  z2 & z3  (cubic)
```

Both are balanced and both have latency complexity 4. Output bit y_i is built
as `f(z)` with `z_j = x_perm(j) ^ inv(j)`:

| out | function | z0 | z1 | z2  | z3  | z4  | z5  |
|-----|----------|----|----|-----|-----|-----|-----|
| y0  | f1       | x2 | x3 | x0  | ~x5 | x4  | x1  |
| y1  | f0       | x0 | x1 | x3  | x5  | x2  | x4  |
| y2  | f0       | x0 | x1 | x4  | x2  | ~x5 | x3  |
| y3  | f0       | x0 | x3 | x4  | x5  | x1  | x2  |
| y4  | f1       | x2 | x3 | ~x1 | x4  | x5  | x0  |
| y5  | f0       | x1 | x2 | x5  | x4  | x0  | ~x3 |

These wirings are not unique. Each f0 output can be wired in 16 ways and
each f1 output in 4 ways. The table uses the first wiring in lexicographic
order of the permutation. The inversions are folded into the leaf
inverters, so they add no delay. The wiring is stored in `ll_pkg` as
`COORD_PERM` and `COORD_CFG`.

### The depth-4 trees of f0 and f1

Leaves a0..a15, in tree order (each pair feeds one level-1 gate):

```
f0:  z1 z5 | z4 ~z0 | z2 ~z5 | ~z3 ~z4 | z0 z4 | z5 ~z1 | z3 ~z4 | ~z2 ~z5
f1:  z2 z3 | ~z0 ~z5 | ~z1 ~z4 | ~z0 ~z1 | z1 z5 | z0 z1 | z0 z4 | ~z2 ~z3
```

In both trees, levels 1 and 2 are NOR gates and levels 3 and 4 are NAND
gates. The one exception is f1's first level-1 gate (g1,0), which is a NAND.
These are the `F0_*` and `F1_*` constants in `ll_pkg`.

With these leaves and gate types, a second inverter pattern also realises
f0 (it inverts leaves 0, 4, 5, 7, 8, 12, 13 and 15). The pattern shown is
the one used.

### Three circuit styles (`sbox6_ll4`, parameter `STYLE`)

A pure NAND2/NOR2 tree is a good model but not always the fastest or
smallest netlist. Each three-gate sub-tree `G(G(a,b), G(c,d))` is a single
compound cell in disguise. For example:

* `NOR(NOR(a,b), NOR(c,d))` is `~OAI22(a,b,c,d)`.
* `NAND(NAND(p,q), NAND(r,s))` applied to four such outputs is `OAI22` of
  the four OAI22 outputs.

The three styles are:

* **`STYLE_TREE`**: the two trees exactly as listed above (`lc_tree`). Every
  path has four NAND/NOR levels.
* **`STYLE_OAI`** (default): `f0_oai` and `f1_oai`.
  * f0 is five OAI22 cells: four on the leaf groups of four, one at the
    output.
  * f1 uses an OAI22 at the output. Its four inputs come from:
    * `NAND(NOR(~z2,~z3), NAND(z0,z5))`;
    * two AOI21 cells. These are possible because z1 appears twice under the
      same level-2 gate, and `(a|b)&(c|a) = a|(b&c)`;
    * one OAI22.

  This is two compound cells deep.
* **`STYLE_XOR`**: f0 becomes `OAI22(z0,z4,z3,~z4) ^ OAI22(z1,z5,z2,~z5)`
  (`f0_xor`). Each OAI22 is the complement of a 2:1 multiplexer
  (`z4 ? z3 : z0` and `z5 ? z2 : z1`). f1 stays as in `STYLE_OAI`. This
  style is much smaller, and the input buffers carry less load, but an XOR
  sits on the output path.

Parameter `IMPL` chooses how the compound cells are built. `IMPL_LIBRARY`
writes each cell as one expression, standing for a single library cell.
`IMPL_NAND_NOR` builds each cell from its depth-2 NAND2/NOR2 sub-circuit.
Every style computes the same table. Which one is fastest depends on the
cell library, and only synthesis with that library can tell.

**Keeping the structure.** A synthesis tool that optimises this logic freely
will restructure it. The whole point of the structural description is lost
unless the flow preserves it, for example with keep or dont_touch
attributes, or by mapping the expressions one-to-one to cells. The RTL
states the structure but does not enforce it.

## Building blocks

* **`ll_compound_gate`**: NAND3, NOR3, AOI21, OAI21, NAND4, NOR4, AOI22 and
  OAI22 (parameter `CELL`).
  * Built either as a library cell or as a depth-2 sub-circuit
    (parameter `IMPL`).
  * In the sub-circuit, x0 and x1 (and x2, x3 in the 4-input cells) are
    inverted. A gate of the dual type combines each inverted pair. A gate of
    the cell's own kind finishes: NAND for NAND/OAI, NOR for NOR/AOI.
  * Example: `OAI22 = NAND(NAND(~x0,~x1), NAND(~x2,~x3))`.
  * The 3-input cells ignore `x[3]`.
* **`ll_xor2`**: XOR or XNOR (`XNOR`), built from three NAND or three NOR
  gates (`FORM`), or as one library gate (`IMPL`).
* **`ll_mux2`**: `y = x0 ? x1 : x2` in three forms (`FORM`):
  * 0: library MUX2.
  * 1: two NANDs, a NOR and inverters.
  * 2 (default): three NANDs.

  The NAND form trades some area for roughly a third less delay than a
  library MUX2. Note that the select convention is `x0 = 1` picks x1; some
  libraries' MUX2 cells use the opposite convention.
* **`ll_and_or`**: `y = x0 & (x1 | x2)` in its two depth-2 structures
  (`FORM`):
  * 0 (default): `NOR(~x0, NOR(x1,x2))`.
  * 1: `NAND(NAND(x0,x1), NAND(x0,x2))`.

  Both have the same gate depth, but the first is faster in practice. Its
  x0 branch is one gate shorter, and x0 drives one load instead of two.
  Where several minimum-depth structures exist, one with a short branch is
  the better choice.
* **`ll_pkg`**: all shared types and constants:
  * the gate, cell, implementation and style enums;
  * the tree constants of f0 and f1;
  * the coordinate wiring.

## Top level

`sbox6_top` drives three S-boxes from one input `x`:

* `y_tree`: trees.
* `y_oai`: OAI style with library cells.
* `y_xor`: XOR style with NAND/NOR sub-circuits.

Beside them are two unrelated examples, each on its own ports:

* `ll_mux2` on `mux_sel`, `mux_a`, `mux_b` and `mux_y`;
* `ll_and_or` on `ao_x0`, `ao_x1`, `ao_x2` and `ao_y`. The three outputs are always equal. The top exists to
compare the styles under one synthesis run. A design that needs the S-box
instantiates `sbox6_ll4` directly:

```systemverilog
sbox6_ll4 #(.STYLE(ll_pkg::STYLE_TREE)) u_sbox (.x(state[0:5]), .y(sub[0:5]));
```

## Files

| file | content |
|------|---------|
| `rtl/ll_pkg.sv` | shared types, tree constants, coordinate wiring |
| `rtl/lc_tree.sv` | general depth-D NAND/NOR tree |
| `rtl/ll_compound_gate.sv`, `rtl/ll_xor2.sv`, `rtl/ll_mux2.sv`, `rtl/ll_and_or.sv` | gate-level building blocks |
| `rtl/f0_oai.sv`, `rtl/f1_oai.sv`, `rtl/f0_xor.sv` | optimised circuits of f0 and f1 |
| `rtl/sbox6_ll4.sv` | the S-box |
| `rtl/sbox6_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference table, algebraic normal forms, linearity/uniformity |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench is self-checking. Each prints one line,
`TB_RESULT checks=N failures=M`, and stops by itself. A watchdog ends the
run with a failure if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ll_pkg.sv tb/tb_ref_pkg.sv tb/tb_sbox6_top.sv --top-module tb_sbox6_top
./obj_dir/Vtb_sbox6_top
```

Substitute any other `tb_*` name. Each run takes well under a second.

What the testbenches establish:

* **Testbench references.** All inputs are applied to every module. The
  references are independent of the RTL: the S-box table, and f0/f1 in
  algebraic normal form. For example, f0 = x0x4 ^ x1x5 ^ x2x5 ^ x3x4 ^ x0 ^ x1.
* **`tb_sbox6_ll4`:**
  * checks all six style/implementation combinations and the default;
  * confirms from the hardware outputs that each is a permutation;
  * recomputes linearity (16) and uniformity (4).
* **`tb_sbox6_top`:**
  * checks the three top-level outputs against the table and against each
    other, and checks the multiplexer and the AND-OR function;
  * counts that every style produced results, that the f0 and f1 outputs
    toggled, that the multiplexer selected each input, and that the AND-OR
    output took both values.
* **`tb_lc_tree`:** checks the f0 and f1 trees, plus small trees for MUX2,
  XOR and NOR, against their functions.
* **Fault detection.** For each testbench, a copy of its module was broken in
  one place, for example a missing leaf inverter or a swapped gate type, and
  the testbench failed against it.

Not verified: delay and area. The gate depths follow from the structure,
but actual timing needs synthesis against a real cell library.

## Design decisions

These are choices this RTL makes where the source design leaves a choice
open:

* **Coordinate wiring.** Several wirings realise each output bit. The first
  in lexicographic order is used. Which wiring is fastest after placement is
  not known.
* **f0 inverter pattern.** f0 has two valid inverter patterns, as described
  under the trees above.
* **Default style.** The default is `STYLE_OAI` with library cells. The
  published delay comparison (a structural netlist about 25 % faster than a
  synthesised lookup table in a 15 nm library, about 46 % in 45 nm) does not
  say which of the circuit variants it used.
* **f0_xor leaves.** The inverters on the second x4 and x5 leaves of
  `f0_xor` were derived from f0, not taken from a drawing.
* **MUX2 convention.** `ll_mux2` selects x1 when x0 = 1.
* **Combinational only.** No registers are included. In an unrolled or
  round-based datapath, the leaf inverters can be merged into the
  surrounding buffers or registers.

The same method produced many other S-boxes, of 3 to 8 bits. Their tables
are not part of this RTL. `lc_tree` can build any single output bit of them
once its `G`, `ALPHA` and `PI` are known.

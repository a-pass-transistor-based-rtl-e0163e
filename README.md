# Pass-transistor multifunction gate

One small cell that can be any of the eight common two-input functions
(AND, NAND, OR, NOR, XOR, XNOR, NOT, BUF). It has only two transmission gates
and an inverter. What it computes depends only on which programming contacts are
present, so every instance has the same layout. That makes the cell useful as
a universal building block. It can also camouflage a netlist: an observer sees
identical cells and cannot easily tell their functions apart.

This repository holds a Boolean (switch-level) SystemVerilog model of the cell.
It also has the gate-level reference model the cell was derived from and a
decoder that turns a function name into a cell configuration. A self-checking
testbench comes with each part.

## The one equation behind all eight functions

Every function is an instance of

    F = (A·X + A'·Y)'

X and Y are each one of the four literals A, A', B, B'. When A = 1 the output
is X'. When A = 0 it is Y'. Choosing the two literals therefore chooses the
function:

| function | X  | Y  | A=1 gives | A=0 gives |
|----------|----|----|-----------|-----------|
| AND      | B' | A' | B         | 0         |
| NAND     | B  | A  | B'        | 1         |
| OR       | A' | B' | 1         | B         |
| NOR      | A  | B  | 0         | B'        |
| XOR      | B  | B' | B'        | B         |
| XNOR     | B' | B  | B         | B'        |
| NOT      | A  | A  | 0         | 1         |
| BUF      | A' | A' | 1         | 0         |

Multiplying it out gives the same function as a sum of products,
F = A·X' + A'·Y' + X'·Y'. The model's testbench checks that the two forms agree
for all sixteen (X, Y) choices.

## The pass-transistor cell (`pt_mfgate`)

```
 A  --c1--+                                              +--c5-- A
 A' --c2--+     [TG: on when A=1]     [TG: on when A=0]  +--c6-- A'
 B  --c3--+---L-----------------+--M--+--------------R---+--c7-- B
 B' --c4--+                     |                        +--c8-- B'
                               INV
                                |
                                F
```

* The **left node L** is tied by exactly one of contacts c1..c4 to A, A', B
  or B'. That literal is X.
* The **right node R** is tied by exactly one of c5..c8 to A, A', B or B'.
  That literal is Y.
* The **left transmission gate** has A on its nMOS gate and A' on its pMOS
  gate, so it passes L to the middle node M when A = 1. The **right
  transmission gate** has the controls the other way round and passes R when
  A = 0. Exactly one of them conducts at any time, so M is never left floating
  and never driven from both sides.
* An **inverter** drives F = M'. That is the outer inversion in the equation.

The contact pairs for each function:

| function | left | right |
|----------|------|-------|
| AND      | c4   | c6    |
| NAND     | c3   | c5    |
| OR       | c2   | c8    |
| NOR      | c1   | c7    |
| XOR      | c3   | c8    |
| XNOR     | c4   | c7    |
| NOT      | c1   | c5    |
| BUF      | c2   | c6    |

Contacts that are not used are dummies. They take up space in the layout but
are not connected, so they do not change the function.

**Where this departs from the published tables.** The published contact table
gives c2/c5 for NOT. That pair makes F = 1 for both values of A. This design
uses c1/c5 (X = A, Y = A), which matches the published literal list and gives
F = A'. For NOR the published literal list gives X = B, Y = A. That is the NAND
entry and computes NAND. This design follows the contact table instead
(c1/c7, X = A, Y = B). All other entries are as published. The AND, OR and XOR
entries also agree with the published truth tables for those three
configurations.

**Modelling choices.** In silicon the contacts are fixed when the chip is made.
Here they are an 8-bit input, `contacts[8:1]`, where bit i = 1 means contact ci
is present. This lets one instance be driven through every configuration. To
model one fixed cell, tie `contacts` to a constant, for example
`mfg_pkg::contact_pair(3, 8)` for XOR.

The output `cfg_ok` is 1 only when each side has exactly one contact and
exactly one switch conducts. A node with no contacts would float in a real
circuit, and one with several would short two literals together. The model
cannot represent either state faithfully. It ORs the connected literals
instead, and `f` is then meaningless.

Each transmission gate is a separate module, `pt_tgate`. It conducts when its
nMOS gate is high or its pMOS gate is low, and then puts its input on the shared
node. When off it contributes 0, so the two switch outputs can simply be ORed.

## The gate-level model (`mf_logic_model`)

This is the reference that the cell replaces. It has:

* A 4:1 multiplexer with select `k1` that picks X.
* A second 4:1 multiplexer with select `k2` that picks Y.
* Two AND gates that form A·X and A'·Y.
* A NOR gate that combines them.

The multiplexer inputs are ordered as in the original drawing, and the first
input is select 0:

| select | k1 → X | k2 → Y |
|--------|--------|--------|
| 0      | A      | A'     |
| 1      | B      | A      |
| 2      | B'     | B'     |
| 3      | A'     | B      |

The numbers are this design's own choice; only the input order comes from the
source. In the cell, each multiplexer becomes a set of contacts.

## Configuration decoder (`mfg_cfg_decoder`) and top (`mfg_top`)

`mfg_cfg_decoder` maps a `mfg_pkg::gate_t` value to the contact pair from the
table above and to the matching `k1`/`k2` selects. The encoding is AND=0,
NAND=1, OR=2, NOR=3, XOR=4, XNOR=5, NOT=6, BUF=7 (own choice).

`mfg_top` ties the parts together. Its inputs `a`, `b` and `op` feed the
decoder, which configures both the pass-transistor cell and the gate-level
model. The top brings out the cell output `f`, the model output `f_model` and
`cfg_ok`. The two outputs agree for every function and input. Putting the two
side by side under one selector is this design's own arrangement.

Everything is combinational. There is no clock or reset.

## What is not modelled

The cell was characterised electrically in a circuit simulator, at roughly a
1 V swing over a few hundred nanoseconds. No transistor sizes, process or
netlist are available for it. This model therefore keeps only the logic
function. Left out:

* delays;
* the weak levels that a single device passes;
* charge sharing;
* drive strength.

A configuration that this model reports as correct may still need sizing work
in a real layout.

## Files

| file | content |
|------|---------|
| `rtl/mfg_pkg.sv` | `gate_t`, `contacts_t`, multiplexer select constants, `contact_pair()` |
| `rtl/pt_tgate.sv` | one transmission gate |
| `rtl/pt_mfgate.sv` | the pass-transistor multifunction cell |
| `rtl/mf_logic_model.sv` | gate-level model (two multiplexers, two ANDs, a NOR) |
| `rtl/mfg_cfg_decoder.sv` | function → contacts and selects |
| `rtl/mfg_top.sv` | top: decoder, cell and model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

* `tb_pt_tgate` tries all 8 control and data combinations.
* `tb_pt_mfgate` applies the eight named configurations against their truth
  tables. It then sweeps all 256 contact vectors and checks `f` for the legal
  ones and `cfg_ok` for every one.
* `tb_mf_logic_model` tries all 16 select pairs × 4 inputs against both forms
  of the equation, plus the eight named settings.
* `tb_mfg_cfg_decoder` checks every decoder entry.
* `tb_mfg_top` is the end-to-end test at default settings. It runs all
  8 functions × 4 inputs, then 4000 random function and input changes. It
  checks both outputs against reference gates. It fails if any function is
  never used, or if the function changes fewer than 8 times.

A broken version of each module makes its testbench fail. The broken versions
tested were:

* a pMOS that conducts on a high gate;
* the two switch controls swapped;
* the NOR replaced by an OR;
* NOT decoded as c2/c5;
* the cell's B input tied to A.

To run a testbench with Verilator, from the repository root:

```
verilator --binary --timing --assert rtl/mfg_pkg.sv \
          rtl/pt_tgate.sv rtl/pt_mfgate.sv rtl/mf_logic_model.sv \
          rtl/mfg_cfg_decoder.sv rtl/mfg_top.sv tb/tb_mfg_top.sv \
          --top-module tb_mfg_top -Mdir obj && ./obj/Vtb_mfg_top
```

Use the same command with another `tb_*.sv` file and its module name for the
other testbenches. The package must come first, and each file must be named
only once.

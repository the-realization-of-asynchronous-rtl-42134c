# Directional transition logic: asynchronous machines from K-elements

An asynchronous (fundamental-mode) sequential circuit is normally designed
from a level flow table, followed by a hunt for races and hazards that grows
quickly with the number of inputs. Directional transition logic avoids that
hunt. The designer describes the machine by the *transitions* of its inputs,
and for every input separates upward transitions (0→1) from downward ones
(1→0). The machine is then built, much like a pulse-mode circuit, from three
kinds of parts:

* **K-element**, a directional transition level-multiplier. It passes a
  transition of its input `x` to output `w1` (upward) or `w2` (downward), but
  only while its level input `d` is 1.
* **M-element**, a transition or-gate. Its output makes a transition whenever
  any of its inputs makes one. This is just an exclusive-or.
* **ordinary gates**, which compute the level functions fed to the `d`
  inputs from the state variables and the level inputs.

All race and hazard work is done once, inside the K-element. Every circuit
assembled from these parts is free of races and hazards as long as its
inputs obey the fundamental-mode rules (next section).

This repository holds synthesizable SystemVerilog for the elements, for the
general circuit structure, for two complete example machines, and for the
two networks that convert between K-elements and the older, non-directional
G-elements.

## Reading a transition circuit

A *transition variable* is 1 when a level signal changes. In the equations:

| notation | meaning | hardware |
|---|---|---|
| `X_i1`, `X_i2` | upward / downward transition of input `x_i` | the `w1` / `w2` output of a K-element on `x_i` |
| `X_i1 f` | that transition, taken while level `f` is 1 | a K-element with `x = x_i`, `d = f` |
| `A + B` | a transition of either | an M-element (xor) of the two levels |
| `Y_j` | "state variable `y_j` changes" | the M-element whose output level *is* `y_j` |
| `Z_k` | "output `z_k` changes" | the M-element whose output level is `z_k` |

For example, the modulo-four counter is fully described by:

    Y2 = X12 + X21          Z1 = X11 y2 + X21 y2'          Z2 = X11 + X21

So `z2` flips on every press of either button. `z1` flips on an up-press
while `y2=1` and on a down-press while `y2=0`. `y2` flips when the up button
is released and when the down button is pressed.

A state or output level is the xor of the K-element outputs that feed it.
Each of those outputs toggles once per transition it passes, so the level
flips exactly when the transition equation says it should.

## The K-element (`dtl_kelem`)

This is the one part with real sequential behaviour. Its function:

| `d` | `x` transition | effect |
|---|---|---|
| 1 | upward | `w1` toggles |
| 1 | downward | `w2` toggles |
| 0 | either | nothing |
| changes | (x steady) | nothing |

Internally it is a three-variable asynchronous machine with eight stable
rows. Its state code `y1 y2 y3` has `w1 = y2` and `w2 = y3`, and it is chosen
so that every transition changes exactly one state variable (no races):

    Y1 = d' (x^w1^w2) + d y1        + y1 (x^w1^w2)
    Y2 = w1 (d x)'    + d x (y1^w2)' + w1 (y1^w2)'
    Y3 = w2 (d x')'   + d x' (y1^w1) + w2 (y1^w1)

`y1` records the parity `x ^ w1 ^ w2` while `d=0` and freezes it while `d=1`.
`y1` differs from the present parity exactly when `x` has changed with `d=1`
and no output has answered yet. The `x` level then says which output must
answer. The third product of each sum is the consensus term that removes
static hazards.

Essential hazards are removed by delay elements in the three state branches,
each longer than the element's response time. **In this RTL those delays
are flip-flops on a free-running sampling clock `clk`.** The whole design
therefore becomes ordinary synchronous logic: the next-state logic sees an
input change at one edge, and the state moves at that edge. An output answers
on the first `clk` edge after the `x` transition.

`preset` (active high) gates `w1`, `w2` and `y1` low after the flip-flops.
Hold it for `dtl_pkg::SETTLE_CYCLES` edges with `x = 0` to reach the initial
state. Clearing `y1` as well is needed for elements whose `d` is tied to 1.

Two assertions are built in:
* at most one output changes per edge;
* `x` and `d` never change between the same two edges.

### Second gate structure (`dtl_kelem_nand`)

The same functions can be rearranged so that the `w1` and `w2` halves are
mirror images. Each half has three two-input NANDs feeding a final NAND:

    w1' = NAND( NAND(dx, (y^w2)'), NAND(w1, (dx)'), NAND(w1, (y^w2)') )
    w2' = NAND( NAND(dx', y^w1),   NAND(w2, (dx')'), NAND(w2, y^w1) )
    Y   = d' (x^w1^w2) + y (d + (x^w1^w2))

Here `dx = d x` and `dx' = d x'`. In this form the delay elements are in the
`y` branch and in the feedback paths of `w1` and `w2`. Preset acts ahead of
the delays. The module is interchangeable with `dtl_kelem`, and it runs the
same testbench.

## Rules for the environment

The logic is correct only in fundamental mode:

* Change one transition input of a circuit at a time.
* Change level inputs only while the transition inputs are steady.
* Hold every change for `dtl_pkg::SETTLE_CYCLES` (= 3) clock edges before the
  next one. Three edges cover these steps:
  * the K-elements respond;
  * the new state levels reach the `d` inputs of other K-elements;
  * those elements absorb the new level.
* Inputs must be synchronous to `clk`, or synchronised to it outside these
  modules. The modules contain no synchronisers.

Input changes that a flow table marks "don't care" produce no hazard, but
their result is unspecified.

## The circuits

### Modulo-four up/down counter (`dtl_mod4_counter`)

Two push buttons, never pressed together. Each press of `x1` adds one to the
count `{z1,z2}` and each press of `x2` subtracts one, modulo 4. The count
changes when the button goes down.

Built from four K-elements, three M-elements and one inverter:

| element | input | `d` | use |
|---|---|---|---|
| K1 | `x1` | `y2` | `w1` gives `X11 y2` |
| K2 | `x2` | `y2'` | `w1` gives `X21 y2'` |
| K3 | `x2` | 1 | `w1` gives `X21` |
| K4 | `x1` | 1 | `w1` gives `X11`, `w2` gives `X12` |

The M-elements form `y2`, `z2` and `z1`. The second state variable of the
state assignment, `y1`, would simply follow `x2`. Nothing reads it, so it is
not built.

### Eight-state machine (`dtl_example2`)

Two inputs and one output `z`. `z` rises when `x2` and then `x1` are raised
and `x1` is dropped first; it falls when `x2` is dropped. The header of
`rtl/dtl_example2.sv` lists the full state graph with the state code
`y1 y2 y3`. The state code is also brought out on `y` for observation.

Built from five K-elements, four M-elements and level gates: an AND-AND-OR
xor for `y2^y3` and a NOR for `y1' y2'`. The equations are:

    Y1 = X12 + X21
    Y2 = X11 + X21 (y1' y2') + X22 y2
    Y3 = X11 (y2^y3) + X21 y2 + X22
    Z  = X12 (y2^y3) + X22 (y1' y2')

### General circuit (`dtl_circuit`)

This module is the general structure itself. It has `S` transition inputs,
`T` level inputs, `R` state variables and `M` outputs. It is made of three
blocks:
* a level-logic block that evaluates every level function from `{l, y}`;
* a bank of K-elements, one per product term;
* banks of M-elements: one per state variable, and one each for the
  upward-answering outputs `z_up` (`Z_k1`) and the downward-answering outputs
  `z_dn` (`Z_k2`).

`z = z_up ^ z_dn` is the output that answers both directions.

The level functions are truth-table parameters, indexed by `{l, y}` with
`y_1` in bit 0:

| parameter | shape | entry `[i][j]` means |
|---|---|---|
| `F_UP` | `[S][R][2**(T+R)]` | `y_j` toggles on upward `x_i` when the entry is 1 |
| `F_DN` | `[S][R][2**(T+R)]` | same, for downward `x_i` |
| `G_UP` | `[S][M][2**(T+R)]` | `z_up[k]` toggles on upward `x_i` |
| `G_DN` | `[S][M][2**(T+R)]` | `z_dn[k]` toggles on downward `x_i` |

The defaults realise the modulo-four counter. For example, `G_UP[0][0] =
4'hC` is "`Z1` on `X11` when `y2 = 1`", which is true at indices 2 and 3.

K-elements are not shared between terms that have equal level functions.
The generic circuit is therefore larger than the hand-built ones: it uses 16
K-elements for the counter against 4. To configure it for a new machine:
* write the directional flow table;
* assign state codes;
* xor each present code with each next code (the excitation table);
* read the `F_*` and `G_*` tables off the result.

`tb/tb_dtl_circuit.sv` shows two further configurations: the eight-state
machine, and a circuit with a level input.

### G-element and conversions (`dtl_gelem`, `dtl_g_from_k`, `dtl_k_from_g`)

A G-element is the non-directional ancestor of the K-element. A transition
of `x` in either direction toggles `z1` if `d=1` and `z2` if `d=0`.
`dtl_gelem` is the simplest circuit with that behaviour: two flip-flops and
the detector `x ^ z1 ^ z2`.

* `dtl_g_from_k` builds a G-element from two K-elements, one on `d` and one
  on `d'`, plus two M-elements. It also brings out the four directional
  products `{X11 d, X12 d, X11 d', X12 d'}` on `wdir`.
* `dtl_k_from_g` builds a K-element from two G-elements. Their level inputs
  are `y1 y2` and `y1 y2'`, with `y1 = d` and `y2 = d ^ x`. `y1` and `y2` are
  held in flip-flops, so the G-elements see the state from before the
  transition.

### Top (`dtl_top`)

All of the above side by side. They share only `clk` and `preset`, and each
has its own prefixed ports (`cnt_`, `ex2_`, `gen_`, `gk_`, `kg_`, `kn_`).

## Where this RTL goes beyond or departs from the method

* **Clocked delays.** The delay elements are flip-flops on `clk`, and the
  settling time is a count of edges. The method itself uses unclocked pure
  or inertial delays.
* **K-element equations.** Both gate structures implement the excitation
  functions read off the element's reduced flow table and state assignment.
  The hazard terms are the consensus terms of those functions.
* **K-element preset.** The preset also clears `y1`, not only `w1` and `w2`.
* **NAND-structure preset.** Preset drives the element to the all-zero
  state. It acts ahead of the delays, so the element clears on the first
  edge of preset.
* **`dtl_k_from_g`.** This design adds the state flip-flops; the reference
  circuit draws none.
* **G-element.** Its gate-level insides and its preset are this design's
  own.
* **`dtl_circuit`.** The level functions are parameters. Each state variable
  merges its upward and downward terms into one level. This matches both
  worked examples.
* **Simultaneous input changes** are not supported. They would need a
  different, sequential M-element.
* **Not included.** The G-element-only versions of the two example machines,
  which serve only as a size comparison.

## Simulating

Every module header states its interface and timing. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
        rtl/dtl_pkg.sv tb/tb_ref_pkg.sv tb/tb_dtl_top.sv \
        --top-module tb_dtl_top -o sim && ./obj_dir/sim

Replace `tb_dtl_top` with any other testbench to run it. Every module has a
testbench of the same name with a `tb_` prefix:

| testbench | what it does |
|---|---|
| `tb_dtl_kelem`, `tb_dtl_kelem_nand`, `tb_dtl_k_from_g` | walk the six input/output cases of the K-element, then 400 random single changes |
| `tb_dtl_example2` | 600-step random walk through the flow table; fails unless all eleven transitions were taken |
| `tb_dtl_mod4_counter` | random presses, including both wrap-arounds |
| `tb_dtl_circuit` | the general circuit configured as the counter, as the eight-state machine and as a circuit with a level input |
| `tb_dtl_melem`, `tb_dtl_gelem`, `tb_dtl_g_from_k` | exhaustive xor check; random changes against a G-element model |
| `tb_dtl_top` | all circuits at default parameters for 800 steps; fails if any mechanism never occurred |

All checks compare against models written from the flow tables
(`tb/tb_ref_pkg.sv` and in-line reference counters). Each check is made one
edge after the input change, which tests the latency, and again after the
settling time.

# Reversible decoders built from OM, SOM and UM gates

A reversible circuit maps its input lines one-to-one onto its output lines. Nothing
is erased, which is what makes it interesting for low-power and quantum
computing. A decoder is not reversible on its own: n bits go in, 2^n lines come
out. To make it reversible, extra inputs held at a constant are added (*ancilla*
inputs), and any output that is not one of the 2^n decoded lines is left over as a
*garbage* output. Good reversible decoders keep both counts small, and the
number of gates too, because each ancilla and garbage line costs a qubit in a
quantum realisation.

This RTL implements three reversible gates, OM, SOM and UM, plus the six decoders
built from them:

| Decoder                 | module           | gates  | ancilla inputs  | garbage outputs  |
|-------------------------|------------------|--------|-----------------|------------------|
| 2-to-4, one SOM gate    | `dec2to4_som`    | 1      | 2               | 0                |
| 2-to-4, UM + 2 Feynman  | `dec2to4_um`     | 3      | 4               | 2                |
| 3-to-8, SOM + 4 OM      | `dec3to8_som_om` | 5      | 6               | 1                |
| 3-to-8, SOM + 2 UM + 2 Feynman | `dec3to8_som_um` | 5 | 8            | 3                |
| n-to-2^n, SOM/OM layers | `decn_som_om`    | 2^n-3  | 2^n-2           | n-2              |
| n-to-2^n, SOM/UM layers | `decn_som_um`    | 2^n-3  | 3·2^(n-1)-4     | 2^(n-1)+n-4      |

The SOM/OM family is the strongest. It needs the fewest ancilla and garbage lines
at every size.

The whole design is combinational: there is no clock, no reset and no state.
A synthesis tool flattens any of these decoders into ordinary AND/NOT logic.
The gate-level structure in the RTL is kept so that the reversible circuit itself
can be read, simulated and counted. Gate count, ancilla count and garbage count
are properties of that structure, not of the synthesized netlist.

## The three gates

Each gate is a bijection on its input patterns. The testbenches check this
exhaustively. `'` means NOT.

* **OM (3×3)**, `om_gate`: X = A, Y = A·B ⊕ C', Z = A'·B ⊕ C'.
  With C = 1, Y = A·B and Z = A'·B. The gate *splits* line B into two lines,
  steered by A, and passes A on through X to the next gate.
* **SOM (4×4)**, `som_gate`: W = A·B ⊕ C ⊕ D, X = A·B' ⊕ C,
  Y = A'·B ⊕ C ⊕ D, Z = A'·B' ⊕ C ⊕ D.
  With C = D = 0 the outputs are the four minterms of A and B. One gate is
  therefore a complete 2-to-4 decoder with no garbage.
* **UM (6×6)**, `um_gate`: U = A, V = A·B ⊕ C', W = A'·B ⊕ C', X = A ⊕ D,
  Y = D·E ⊕ F', Z = D'·E ⊕ F'.
  This is two OM-like halves. With C = F = 1 and D equal to a copy of A, it
  splits two lines (B and E) by A at once. X = A ⊕ D is then always 0 and is
  garbage.
* **Feynman (2×2)**, `feynman_gate`: P = A, Q = A ⊕ B, the ordinary controlled-NOT.
  A reversible circuit has no fan-out, so a bit needed twice is copied onto a
  constant-0 line with a Feynman gate.

## How the decoders grow: splitting layers

All four larger decoders use the same idea. A k-bit decoder has 2^k one-hot
lines. Adding input bit I_k means splitting every line into "line AND I_k" and
"line AND NOT I_k". Doing this for every line forms one *layer*:

* `om_layer` uses one OM gate per line (C = 1). The new bit enters the A input
  of the top gate. It travels down the layer through the X outputs, each gate
  handing it to the next. The copy that leaves the last gate is the layer's only
  garbage line. A layer over 2^(k-1) lines costs 2^(k-1) gates and 2^(k-1)
  constants.
* `um_layer` takes the lines in pairs, one UM gate per pair. The new bit drives
  A and is chained through U. A Feynman gate in front of each UM puts a copy of
  the bit on D. Each UM also produces an X output that is always 0. A layer over
  2^(k-1) lines costs 2^(k-2) UM plus 2^(k-2) Feynman gates, 3·2^(k-2) constants,
  and 2^(k-2)+1 garbage lines.

The decoders are then:

* `dec3to8_som_om` = `dec2to4_som` on I0, I1, then `om_layer` on I2.
* `dec3to8_som_um` = `dec2to4_som` on I0, I1, then `um_layer` on I2.
* `decn_som_om` = `dec3to8_som_om`, then one `om_layer` for each of I3 … I(N-1).
* `decn_som_um` = `dec3to8_som_um`, then one `um_layer` for each of I3 … I(N-1).

Each layer's select bit has to ripple through every gate in its layer. In a real
reversible or quantum implementation, the depth of a layer therefore grows with
the number of lines, not with log n. In the RTL this is only a wire chain, and
synthesis removes it.

### Counting lines

For any reversible circuit, inputs plus ancillas equals outputs plus garbage.
`decn_som_om` and `decn_som_um` compute their gate and ancilla counts as
localparams, `GATES` and `ANCILLAS`, from the layer structure. Each module stops
elaboration with an error if these counts do not match the closed forms in the
table above, or if the line balance does not hold.

## Interface conventions

* The input word `i` is written most-significant-first as I0, I1, …, I(N-1). So
  `i[N-1]` is I0 and `i[0]` is I(N-1). This is the order in which the product
  terms are usually written (I0·I1·I2 is the all-ones line).
* Every `y` output is one-hot. `y[v]` is 1 exactly when the input bits that
  decoder reads equal v.
* Every `g` output carries the garbage lines. These are not needed for decoding.
  They are brought out so that the reversible circuit is complete and can be
  checked. Their values are:
  * `dec2to4_um`: `g = {copy of I0, 0}`.
  * `dec3to8_som_um`: `g = {0, 0, copy of I2}`.
  * `dec3to8_som_om`: `g = copy of I2`.
  * `decn_som_om`: `g[j]` is the copy of I(j+2), one bit per layer.
  * `decn_som_um`: the core's three bits come first. Then, for each layer, its X
    lines (all 0) are followed by the copy of its select bit, packed upward from
    bit 3.
* Ancilla inputs are tied to their constants inside each decoder. They are not
  ports.

The top, `reversible_decoder_top` (parameter `N`, default 4), puts all six
decoders side by side on one input word:

* The 2-to-4 decoders read the top two bits.
* The 3-to-8 decoders read the top three bits.
* The n-to-2^n decoders read all N bits.

Every `y` and `g` output is brought out as a port.

## Where this RTL departs from the published circuits

* **UM 2-to-4 decoder, E line.** The published drawing puts the constant 0 on
  the UM's E input. With the UM equations, that cannot produce the drawn outputs
  A·B' and A'·B'. Here the Feynman gate copying B onto E has its target at
  constant 1, so E = B'. This yields all four minterms, with the drawn output
  assignment and the published ancilla and garbage counts (4 and 2). The circuit
  has 3 gates. Published gate counts for this design are inconsistent (1, 3 and 4
  are all given).
* **Garbage count of the SOM/OM n-to-2^n decoder.** It is published as a fixed 1.
  Built as drawn, every layer leaves its select-bit copy unused, so the count is
  n-2 (1 only at n = 3). A smaller count would break the line balance above,
  given the published ancilla count 2^n-2.
* **Garbage count of the SOM/UM n-to-2^n decoder.** It is published as
  2^(n-1)-1. Built as drawn, the count is 2^(n-1)+n-4. Both give 3 at n = 3, but
  at n = 4 they give 8 and 7. The line balance again supports 2^(n-1)+n-4.
* **3-to-8 ancilla and garbage counts.** Two different sets of figures are
  published for these. The circuits follow the drawings, which agree with the
  larger figures: 6/1 for SOM/OM and 8/3 for SOM/UM.
* **UM gate XOR output.** One description of the UM gate gives its XOR output as
  A ⊕ B. The gate equations and block diagram say A ⊕ D, and that is what is
  built.
* **Default size.** N = 4 (a 4-to-16 decoder) is this design's choice. N can be
  any value ≥ 3.
* **Not modelled.** Power (published from transistor-level simulation), quantum
  cost and hardware-complexity figures are not properties of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/om_gate.sv`, `rtl/som_gate.sv`, `rtl/um_gate.sv`, `rtl/feynman_gate.sv` | the gates |
| `rtl/om_layer.sv`, `rtl/um_layer.sv` | one splitting layer, parameter `K` = the decoder width after the layer |
| `rtl/dec2to4_som.sv`, `rtl/dec2to4_um.sv` | 2-to-4 decoders |
| `rtl/dec3to8_som_om.sv`, `rtl/dec3to8_som_um.sv` | 3-to-8 decoders |
| `rtl/decn_som_om.sv`, `rtl/decn_som_um.sv` | n-to-2^n decoders, parameter `N` (default 4, ≥ 3) |
| `rtl/reversible_decoder_top.sv` | all six decoders side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module above, except the layers |

## Simulating

Every testbench is exhaustive over its inputs:

* The gate testbenches compare against the gates' truth tables and check that
  each gate is a bijection.
* The decoder testbenches check the one-hot outputs and every garbage line.
* `tb_decn_*` run N = 3, 4 and 7 and check the gate and ancilla counts.
* `tb_reversible_decoder_top` runs the top at its default N = 4. It checks that
  the two designs of each size agree, and that every output line is selected and
  every garbage copy takes both values.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl tb/tb_reversible_decoder_top.sv \
          --top-module tb_reversible_decoder_top -Mdir obj
./obj/Vtb_reversible_decoder_top
```

Replace the testbench name to run any other testbench. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/<module>.sv`, adding `-GN=<n>` to
try another size.

Several outputs are constant or copies of an input by construction: the X
garbage of the UM gates and the select-bit copies. Lint and synthesis tools
report these as idle outputs. That is inherent to reversible circuits and
expected.

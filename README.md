# Seven-segment decoder from reversible logic gates

This is a BCD to seven-segment decoder made entirely of reversible logic gates. A reversible gate has as many outputs as inputs, and the mapping from input patterns to output patterns is one-to-one. That means no information is lost inside the gate, so in principle it dissipates no heat. This matters in low-power CMOS, nanotechnology and quantum circuits.

The decoder takes one BCD digit on four inputs, `A B C D` (`A` most significant). It lights the segments `a`–`g` of a common-cathode display, where a 1 turns a segment on. Every logic operation in it is one of three reversible gates: the Peres gate, the Fredkin gate and the CNOT gate. Each is used with one input tied to a constant.

```
        a
      -----
   f |     | b
     |  g  |
      -----
   e |     | c
     |     |
      -----
        d
```

## The three primitive gates

| gate | inputs | outputs | quantum cost | module |
|---|---|---|---|---|
| Peres | A, B, C | P = A, Q = A ⊕ B, R = AB ⊕ C | 4 | `peres_gate` |
| Fredkin | A, B, C | P = A, Q = A'B + AC, R = A'C + AB | 5 | `fredkin_gate` |
| CNOT (Feynman) | A, B | P = A, Q = A ⊕ B | 1 | `cnot_gate` |

The quantum cost of a gate is the number of elementary quantum operations it takes. The total is the usual measure of a reversible circuit's size. The Fredkin gate is a controlled swap: with A = 1 the B and C lines trade places. In its equations the two product terms of each output are never both 1, so "+" and "⊕" give the same gate. Fredkin and CNOT are each their own inverse. The Peres gate is undone by A = P, B = P ⊕ Q, C = R ⊕ AB.

The constants shared by these gates live in `rev_pkg`.

## Ordinary logic from reversible gates

Tying one input of a gate to a constant turns it into a familiar gate. The other outputs still exist; they are "garbage outputs" that the rest of the circuit ignores.

| cell | built from | constant | useful output | garbage outputs | module |
|---|---|---|---|---|---|
| NOT | CNOT | B = 1 | Q = A' | A | `rev_not` |
| AND | Peres | C = 0 | R = AB | A, A ⊕ B | `rev_and` |
| OR | Fredkin | C = 1 | Q = A + B | A, A' + B | `rev_or` |

The OR cell's third output is A'·1 + AB = A' + B. Some descriptions of this cell label it AB instead. The gate equation is what is built here, and the decoder never reads that output.

## The decoder network

Each segment is a minimised sum of products over the ten valid digits. Codes 10–15 are treated as don't-cares:

```
a = A + C + BD + B'D'
b = B' + C'D' + CD
c = B + C' + D
e = B'D' + CD'
d = e + BC'D + B'C + A
f = A + C'D' + BC' + BD'
g = A + BC' + B'C + CD'
```

`seven_segment_reversible` builds these from:

- 3 `rev_not` cells, for B', C' and D';
- 9 `rev_and` cells, one for each distinct product: BD, B'D', C'D', CD, BC', BD', B'C, CD', and BC'D, which is formed as (BC')·D;
- 17 two-input `rev_or` cells, chained per segment. Segment `d` reuses `e`.

The quantum cost is 3·1 + 9·4 + 17·5 = **124**, held as the localparam `QUANTUM_COST`. The longest path runs through segment `d`: one inverter, two ANDs and three ORs.

Glyphs: 0–9 are the usual shapes. 6 has its top bar (`a`) and 9 has its bottom bar (`d`). Codes 10–15 show whatever the equations produce:

| code | a b c d e f g |
|---|---|
| 10 | 1 1 0 1 1 1 1 |
| 11, 12, 15 | 1 1 1 1 0 1 1 |
| 13 | 1 0 1 1 0 1 1 |
| 14 | 1 0 1 1 1 1 1 |

Blank these outside the decoder if the display can see invalid codes.

The ten digit glyphs are all different. The BCD input can therefore be recovered from the segment pattern: the decoder as a whole loses no information on valid inputs.

### Garbage outputs and fan-out

The 29 cells produce 55 garbage outputs: one pass-through per cell, plus the second output of every AND and OR. They are collected in the vectors `not_garb`, `and_garb_p`, `and_garb_x`, `or_garb_p` and `or_garb_r` and left unread. Lint therefore reports them as unused signals. That is expected.

A strictly reversible netlist cannot fan a signal out directly. Each extra copy needs a CNOT with its target at 0, costing 1 each. This RTL reads signals such as `B`, `nD` and `p_bnc` several times instead. The copy gates are not modelled and are not included in the quantum cost above. The logic function is the same either way.

## Interface and timing

| port | dir | meaning |
|---|---|---|
| `A B C D` | in | BCD digit, `A` = bit 3 |
| `a b c d e f g` | out | segments, 1 = lit |

The design is purely combinational. It has no clock, no reset and no state. Outputs follow the inputs in the same evaluation. The display itself (LEDs and current limiting) is outside this design.

When synthesised for ordinary CMOS or an FPGA, the constant-tied gates collapse back to plain NOT/AND/OR/mux cells. The reversible structure is visible only in the RTL hierarchy. About 29 cells remain before technology mapping.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `peres_gate_tb`, `fredkin_gate_tb`, `cnot_gate_tb`: all input patterns against hand-written truth tables. They also check that every output pattern is distinct and that the inverse restores the inputs. The Fredkin test also checks conservation of ones.
- `rev_not_tb`, `rev_and_tb`, `rev_or_tb`: full truth tables, including the garbage outputs.
- `seven_segment_reversible_tb`: steps the input through 0–9 at 1 µs per digit and compares each pattern with a glyph table. It then applies codes 10–15, and recovers each digit from its segments by reverse lookup. It counts how often each digit was shown and recovered, and how often each segment was lit and dark. Any of these that never happened counts as a failure. This test runs the decoder in its only configuration.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/rev_pkg.sv tb/seven_segment_reversible_tb.sv \
    --top-module seven_segment_reversible_tb -Mdir obj
./obj/Vseven_segment_reversible_tb
```

Substitute another `*_tb` for the other blocks. `rev_pkg.sv` must be read first.

## Where this design fills gaps

- **Netlist.** The original design gives the gate library, the decoder's purpose and its external pins. It does not give the gate-level connection of the decoder. The equations, the cell count and the quantum cost of 124 are this implementation's own.
- **Bit order.** `A` is taken as the most significant input. In a counting test, `D` toggles every step and `A` rises last.
- **Glyphs.** 6 and 9 have tails. Codes 10–15 are don't-cares and are not blanked.
- **Backward operation.** The reversible gates can be run backwards to recover their inputs. No separate backward (segments-to-BCD) circuit is built. The testbenches check this property instead.
- **OR cell cost.** The OR cell is one Fredkin gate, so it is counted at cost 5.

# Reversible Vedic 16x16 multiplier

A combinational 16x16-bit unsigned multiplier built on the *Urdhva
Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic, with every
logic function expressed through two reversible gates, the 4x4 **BME** gate and
the 3x3 **Peres** gate.

The vertically-and-crosswise rule says that a product can be assembled from
the products of the operands' parts, all formed at once, followed by one
addition pass. Here the rule is applied recursively on halves:

```
A = {AH, AL}, B = {BH, BL}            (each half N/2 bits)

A*B = AL*BL                           vertical, low
    + (AH*BL + AL*BH) * 2^(N/2)       crosswise
    + AH*BH * 2^N                     vertical, high
```

The four half-size products are independent, so they are computed in
parallel by four half-size multipliers. Each of those splits again, down to a
2x2 multiplier made of four gates. Everything is combinational: there is no
clock, no register and no handshake. A product is valid one combinational
delay after the operands change.

A multiplier of this kind was reported, in a 45 nm standard-cell flow, at
about 5.35 ns delay and 0.28 mW total power for 16x16. That is faster and
lower in power than the same Vedic structure built from ordinary gates
(about 6.02 ns, 0.36 mW) and than a Wallace-tree multiplier (about 12.9 ns).
Those figures come from a particular cell library. This RTL does not
reproduce them.

## Hierarchy

```
rev_vedic_16x16                         top: a[15:0] * b[15:0] -> p[31:0]
├── 4 x rev_vedic_8x8
│   ├── 4 x rev_vedic_4x4
│   │   ├── 4 x rev_vedic_2x2            2 bme_gate + 2 peres_gate
│   │   └── rev_vedic_merge #(N=4)
│   └── rev_vedic_merge #(N=8)
└── rev_vedic_merge #(N=16)             3 x rev_rca #(16) + 1 peres_gate
                                        rev_rca: WIDTH x rev_full_adder
                                        rev_full_adder: 2 peres_gate
```

The whole 16x16 multiplier uses:

| part | count |
|---|---|
| 2x2 leaf multipliers | 64 |
| BME gates (all in the leaves) | 128 |
| Peres gates in the leaves (half adders) | 128 |
| adder stages (`rev_vedic_merge`) | 16 (N=4) + 4 (N=8) + 1 (N=16) = 21 |
| reversible full adders in RCAs | 16·12 + 4·24 + 48 = 336 (672 Peres gates) |
| Peres gates merging carries | 21 |
| **total** | 128 BME + 821 Peres |

## The two reversible gates

A reversible gate has as many outputs as inputs. Fan-out is not allowed in
reversible logic, so a value that is needed twice must be copied by a gate.
Outputs that the circuit does not need are *garbage*.

**Peres gate** (`peres_gate`), inputs A, B, C:

| output | function |
|---|---|
| X | A |
| Y | A ⊕ B |
| Z | A·B ⊕ C |

With C = 0 it is a half adder: Y is the sum and Z the carry.

**BME gate** (`bme_gate`), inputs A, B, C, D:

| output | function |
|---|---|
| P | A |
| Q | A·B ⊕ C |
| R | A·D ⊕ C |
| S | A'·B ⊕ C ⊕ D |

With C = 0, Q = A·B and R = A·D. One gate therefore forms two bit products
that share the same A operand, with no fan-out of A. The S equation given
here is the usual published form of this gate. None of the multipliers uses
S, so its exact form has no effect on any product.

**Full adder** (`rev_full_adder`): two Peres gates in cascade. The first,
with C = 0, gives a⊕b and a·b. The second takes (a⊕b, cin, a·b) and gives:

- sum = a⊕b⊕cin
- cout = (a⊕b)·cin ⊕ a·b

The two terms of cout are never both 1, so the XOR is the usual carry. This
cell is this design's own choice. It keeps the whole multiplier within the
two gate types above.

## The 2x2 leaf (`rev_vedic_2x2`)

For A = a1a0 and B = b1b0:

```
s0     = a0·b0            vertical
c1 s1  = a1·b0 + a0·b1    crosswise
s3 s2  = c1 + a1·b1       vertical, plus carry
P = s3 s2 s1 s0
```

| gate | inputs | outputs used |
|---|---|---|
| BME #0 | A=a0, B=b0, D=b1 | a0·b0 (= s0), a0·b1 |
| BME #1 | A=a1, B=b0, D=b1 | a1·b0, a1·b1 |
| Peres #0 | the two crosswise products | s1 and c1 |
| Peres #1 | a1·b1 and c1 | s2 and s3 |

Each BME gate leaves P and S as garbage. Each Peres gate leaves X as garbage.

## The adder stage (`rev_vedic_merge`)

This is the part of the design that needs the most care. For an NxN
multiplier the four sub-products q0 = AL·BL, q1 = AH·BL, q2 = AL·BH and
q3 = AH·BH are each N bits wide. They are added by three N-bit reversible
ripple-carry adders:

```
RCA1:  q1 + q2                              -> s1 (N bits), carry c1
RCA2:  s1 + {N/2 zeros, q0[N-1:N/2]}        -> s2 (N bits), carry c2
RCA3:  q3 + {N/2-1 zeros, c1⊕c2, s2[N-1:N/2]} -> s3 (N bits)

p = { s3, s2[N/2-1:0], q0[N/2-1:0] }
```

- **Low bits pass straight through.** The low half of q0 is the low half of
  the product: nothing else has weight below 2^(N/2).
- **Zero padding.** The high half of q0 is zero-extended to N bits so that
  it fits RCA2.
- **The two carries merge into one bit.** RCA1's carry c1 and RCA2's carry c2
  both have weight 2^(N+N/2). They can never both be 1, because
  q1 + q2 + q0[N-1:N/2] < 2·(2^(N/2)−1)² + 2^(N/2) < 2^(N+1). So their sum
  is c1⊕c2. That bit comes from the Y output of one Peres gate and enters
  RCA3 at bit N/2, just above the high half of s2.
- **RCA3 never overflows**, since A·B < 2^(2N). Its carry-out is unused.

The stage is valid for any even N ≥ 4. An assertion checks this at the
start of simulation. All three adders ripple in series. The critical path of the 16x16
multiplier is therefore the leaf gates, then three 4-bit, three 8-bit and
three 16-bit ripple adders: at most 84 full-adder carry steps.

## Choices made in this design

- **Four sub-multipliers at every level.** The structure is sometimes
  described as "two" half-size multipliers per level. A complete product
  needs all four cross products, so each level here has four.
- **The order of the three additions** and the Peres-gate carry merge
  described above are this design's own choices. The published structure
  fixes the rest: three N-bit RCAs, the direct pass of q0's low half, and
  zero padding into one RCA.
- **Ripple-carry cells** are the two-Peres full adder above.
- **Unsigned operands**, no registers, no reset.
- **`rev_rca` has a carry input.** The multiplier ties it to 0.
- **Garbage outputs are left unconnected.** In the RTL they are named signals
  that go nowhere. Synthesis removes the logic that only drives garbage, so a
  synthesized netlist is an ordinary irreversible circuit with the same
  function. Keeping a physically reversible netlist would need the garbage
  bits brought out as ports and the synthesizer prevented from optimising
  across gate boundaries (for example, keep or dont_touch attributes on
  `bme_gate` and `peres_gate`). Lint tools report these as unused signals,
  which is expected.

## Files

| file | contents |
|---|---|
| `rtl/bme_gate.sv` | BME gate |
| `rtl/peres_gate.sv` | Peres gate |
| `rtl/rev_full_adder.sv` | full adder from two Peres gates |
| `rtl/rev_rca.sv` | `WIDTH`-bit ripple-carry adder, default 16 |
| `rtl/rev_vedic_2x2.sv` | 2x2 leaf multiplier |
| `rtl/rev_vedic_merge.sv` | adder stage, parameter `N` (default 16) |
| `rtl/rev_vedic_4x4.sv`, `rtl/rev_vedic_8x8.sv` | intermediate multipliers |
| `rtl/rev_vedic_16x16.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design with values it computes itself in
integer arithmetic or from a truth table. Each ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bme_gate` | all 16 input combinations |
| `tb_peres_gate` | all 8 input combinations, against the gate's truth table |
| `tb_rev_full_adder` | all 8 input combinations |
| `tb_rev_rca` | 16-bit adder: carry-through-every-cell corners, walking ones, 20,000 random sums |
| `tb_rev_vedic_2x2`, `tb_rev_vedic_4x4`, `tb_rev_vedic_8x8` | exhaustive: every operand pair |
| `tb_rev_vedic_merge` | N = 16, fed with real 8x8 products: corners and 20,000 random operand pairs. It counts RCA1 and RCA2 carry-outs and fails if either never occurs. |
| `tb_rev_vedic_16x16` | full size: corners, all 256 walking-one pairs and 200,000 random pairs. It counts three carry cases of the top adder stage (cross-product carry, padded-adder carry, carry into the AH·BH adder) and fails if any never occurs. |

The 16x16 multiplier has 2^32 operand pairs, so it is not tested
exhaustively. Confidence in it rests on three things:

- the 8x8 multiplier is tested exhaustively;
- the adder stage is the same parameterised module at every level;
- the random run and the corner cases above.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    --top-module tb_rev_vedic_16x16 tb/tb_rev_vedic_16x16.sv
./obj_dir/Vtb_rev_vedic_16x16
```

Replace the module name to run any other testbench. The full-size run takes
a few seconds.

## Extending the width

A 32x32 multiplier follows the same pattern:

1. Copy `rev_vedic_16x16.sv` to `rev_vedic_32x32`.
2. Widen the ports to 32/32/64.
3. Instantiate four `rev_vedic_16x16` on the operand halves.
4. Instantiate `rev_vedic_merge #(.N(32))`.

Nothing else changes.

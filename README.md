# Reversible Urdhva Tiryakbhayam multipliers (2x2 and 4x4)

This is a 4x4 unsigned multiplier made only of *reversible* gates. A reversible
gate has as many outputs as inputs, and its inputs can always be recovered from
its outputs. In principle such logic loses no information, so it need not
dissipate the kT ln 2 per erased bit that ordinary logic does. Two rules follow
from this. Every gate must be a bijection. No net may drive more than one gate
input, so a signal needed twice must be copied by a gate.

The arithmetic follows the Vedic *Urdhva Tiryakbhayam* ("vertically and
crosswise") method. The operands are split into 2-bit halves, all four cross
products are formed at once by 2x2 multipliers, and adders then sum those
products.

The point of the design is cost, not speed or area in CMOS. A reversible circuit
is judged by four counts:

* **NG**: the number of gates.
* **CI**: constant inputs, meaning gate inputs tied to 0 or 1.
* **GO**: garbage outputs, meaning gate outputs that nothing uses.
* **QC**: quantum cost, the number of elementary 1x1/2x2 quantum operations.

Their sum is called **TRLIC**. Two multipliers are provided. They share the
same adders and differ only in the 2x2 core:

| 4x4 multiplier | NG | CI | GO | QC  | TRLIC |
|----------------|----|----|----|-----|-------|
| design 1 core  | 33 | 33 | 43 | 164 | 273   |
| design 2 core  | 33 | 33 | 39 | 168 | 273   |

The RTL is written so that these numbers can be read off the structure.
`rev_pkg` has a cost model that reproduces them, and the testbenches check it.

Everything is combinational: there is no clock, no reset and no handshake. A
product is valid one propagation delay after the operands change. In real
reversible hardware that delay grows with the quantum cost. The RTL models each
gate as ideal zero-delay logic.

## The five gates

Each gate is a module with inputs `a..e` and outputs `p..t`. The gates do
nothing but implement the equations below. What makes them useful is which
inputs get tied to constants.

| module         | size | outputs                                              | QC | used as                                         |
|----------------|------|------------------------------------------------------|----|-------------------------------------------------|
| `feynman_gate` | 2x2  | P=A, Q=A^B                                           | 1  | copy (B=0), XOR                                 |
| `peres_gate`   | 3x3  | P=A, Q=A^B, R=AB^C                                   | 4  | AND (partial product) with C=0; half adder      |
| `nft_gate`     | 3x3  | P=A^B, Q=B'C^AC', R=BC^AC'                           | 5  | with A=0: P=B, Q=B'C, R=BC                      |
| `hng_gate`     | 4x4  | P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D                     | 6  | full adder with D=0 (R sum, S carry)            |
| `bvppg_gate`   | 5x5  | P=A, Q=B, R=AB^C, S=D, T=AD^E                        | 10 | two partial products AB and AD, plus copies of B and D |

## The 2x2 cores: making fan-out inside the circuit

This is the least obvious part of the design. A 2x2 product needs each operand
bit in two partial products:

* q0 = a0b0
* q1 = a0b1 ^ a1b0
* q2 = a1b1 ^ c
* q3 = c, where the carry c is a0a1b0b1

Reversible logic forbids fan-out, so every reuse of an input has to come from a
gate's pass-through output. The BVPPG suits this well. It forms a0b0 and a0b1,
and it hands b0 and b1 on unchanged for the next gates.

**Design 1** (`ut2x2_d1`) has 5 gates, 5 constants, 5 garbage outputs and a
quantum cost of 23.

| gate    | inputs                  | outputs used                                     |
|---------|-------------------------|--------------------------------------------------|
| BVPPG   | a0, b0, 0, b1, 0        | R = q0 = a0b0; T = a0b1; Q = I1 (b0); S = I2 (b1) |
| Peres   | a1, I1, 0               | R = a1b0; P = I3 (a1)                            |
| Peres   | a0b1, a1b0, 0           | Q = q1; R = carry a0a1b0b1                       |
| Peres   | I3, I2, 0               | R = a1b1                                         |
| Feynman | carry, a1b1             | P = q3 (carry); Q = q2 = a1b1 ^ carry            |

**Design 2** (`ut2x2_d2`) has 5 gates, 5 constants, 4 garbage outputs and a
quantum cost of 24. It replaces the middle Peres gate and the Feynman gate with
a single NFT gate. With A tied to 0, the NFT gate produces q0, q2 and q3 from
a0b0 and a1b1 in one step. This works because the carry a0a1b0b1 is simply
a0b0 AND a1b1. A Feynman gate then forms q1 = a0b1 ^ a1b0.

The garbage outputs are brought out on a `garbage` port, so that no gate output
is dropped. Both testbenches check that the complete output vector (product plus
garbage) differs for every input, which is the circuit-level form of
reversibility.

Design 2 has one quirk. Its BVPPG also copies a0, but no later gate uses that
copy. The published garbage count of 4 does not include it. The RTL therefore
brings it out separately as `i1_unused`.

## Adders: a half adder in bit 0

`rev_rca #(WIDTH)` is a ripple carry adder that returns `WIDTH+1` bits. An
all-HNG adder would waste the first full adder, because the carry into bit 0 is
always 0. Bit 0 is therefore a Peres gate used as a half adder: Q gives the sum
and R gives the carry. Bits 1 and up are HNG gates, with D tied to 0 and the
carry on C.

This saves a quantum cost of 2 and one garbage output per adder, with the gate
and constant counts unchanged. For an adder of width w the cost is:

* NG = w
* CI = w
* GO = 2w - 1
* QC = 4 + 6(w-1)

The multiplier uses a 4-bit adder twice and a 5-bit adder once.

## The 4x4 multiplier and how its adders are arranged

`rev_ut4x4 #(DESIGN)` forms four cross products with four 2x2 cores:

* p0 = a[1:0]·b[1:0] (weight 1)
* p1 = a[3:2]·b[1:0] (weight 4)
* p2 = a[1:0]·b[3:2] (weight 4)
* p3 = a[3:2]·b[3:2] (weight 16)

Bits 1:0 of the product are p0[1:0]. The upper six bits are
p0[3:2] + p1 + p2 + 4·p3, formed by three adders:

```
adder A (4 bit):  sb = p1 + {00, p0[3:2]}        sb <= 11
adder C (5 bit):  sc = sb + {0, p2}              sc <= 20
adder B (4 bit):  sh = p3 + {0, sc[4:2]}         sh <= 14
product = {sh[3:0], sc[1:0], p0[1:0]}
```

**This is a deliberate departure from the block diagram this design is based
on.** That diagram feeds p3 and p2 into one 4-bit adder and p1 and {00, p0[3:2]}
into the other. It then sums both 5-bit results in the 5-bit adder to form
product bits 7:2. That tree adds p3 at weight 4 instead of 16, so it gives wrong
products (for example 13·7 would not come out as 91). The published simulation
results are correct products, so the arrangement above was chosen. It keeps the
same adders with the same widths, the same gates and the same costs. It also
keeps adder A's operands exactly. Only the operands of the 5-bit adder and of
the second 4-bit adder change.

The carry outputs sc[5] and sh[4] are always 0 given the ranges above. They are
left unconnected, which is why lint reports them as unused bits.

`DESIGN` selects the core: `rev_pkg::UT2_DESIGN1` (the default) or
`UT2_DESIGN2`. Both were proposed, and neither was named the main one.
`garbage` is 43 bits wide for either design. It holds 5 bits per core (for
design 2 these are 4 garbage bits plus the unused a0 copy), then 7 bits from
adder A, 7 from adder B and 9 from adder C.

## Top level

`rev_vedic_mult_top` instantiates both 4x4 multipliers on the same `a` and `b`.
Its outputs are `prod_d1` and `prod_d2`, together with each multiplier's
43-bit garbage bus. The two products must always agree. Only the costs in the
table at the top differ.

## Cost model (`rev_pkg`)

The package provides:

* `ut2_design_e`, the type that selects the core.
* `rev_cost_t`, a record of NG, CI, GO and QC.
* Cost functions `ut2_cost`, `rca_cost`, `ut4_cost` and `trlic`.

Each function is derived from the gate lists above. For example,
`ut4_cost(d) = 4·ut2_cost(d) + 2·rca_cost(4) + rca_cost(5)`. The functions
describe no hardware. They exist so that a change to the structure can be
checked against the cost targets.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* **Gates**: all input vectors are checked against integer arithmetic or
  case-by-case truth tables. The tests also check that every gate is a bijection
  (all output vectors distinct).
* **2x2 cores**: all 16 operand pairs, plus the four published simulation
  vectors (01·10, 11·10, 00·01, 11·11). The tests also check the garbage
  values, reversibility of the complete output, and the cost model.
* **Adder**: exhaustive at 4 bits (256 pairs) and 5 bits (1024 pairs). The test
  checks the garbage layout and that the carry out is exercised.
* **4x4 multiplier**: both cores against all 256 operand pairs, plus the nine
  published vectors (2·4, 3·2, 12·6, 13·7, 13·8, 15·11, 15·1, 12·13, 6·11).
  The test also checks reversibility and the published cost totals.
* **Top**: all 256 pairs in random order at default parameters. The test
  compares both designs with integer multiplication and with each other. It
  counts how often a 2x2 core sets its top bit (the case that needs the
  Feynman or NFT gate), and how often product bits 6 and 7 are set. It fails if
  either event never happens.

Each testbench has been shown to fail against a deliberately broken copy of its
module. One example is the 4x4 multiplier wired literally as the block diagram
draws it, which fails 294 checks.

To run a test with plain Verilator, from the repository root:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/rev_pkg.sv tb/rev_vedic_mult_top_tb.sv --top-module rev_vedic_mult_top_tb
./obj_dir/Vrev_vedic_mult_top_tb
```

Swap in any other `tb/*_tb.sv` and its module name to run that test. Every
test finishes in well under a second.

## Limits and departures

* The adder arrangement of the 4x4 multiplier differs from the block diagram,
  as explained above. Costs are unaffected.
* One description of the second 2x2 design names "three Peres gates and one
  NFT gate". The RTL follows the gate diagram instead: BVPPG, two Peres gates,
  NFT and Feynman. That diagram is the one consistent with the stated quantum
  cost of 24, whereas three Peres gates and an NFT gate would cost 27.
* Pin order inside the adder stages (which HNG outputs are the two garbage
  outputs) and the control input of design 1's Feynman gate are not given
  explicitly. They were chosen so that the circuit computes the product.
* Reversibility is modelled at the logic level only. This is ordinary
  synthesizable SystemVerilog, and a CMOS synthesis tool will merge and
  optimise the gates freely. Realising the energy benefit would need a
  reversible or adiabatic implementation technology, which is outside this RTL.
* Only the 2x2 and 4x4 sizes are built, because those are the sizes described.
  Wider multipliers would follow the same recursive scheme: four half-width
  multipliers and three adders. They are not provided here.

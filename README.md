# LNS 8-point DCT with shared adder tables

In the logarithmic number system (LNS) a number is held as a sign and the
base-2 logarithm of its magnitude. Multiplication then costs only an adder and
an XOR gate. Addition costs a table lookup: log2|X ± Y| = max(x, y) + φ(z)
with z = −|x − y|, where φ is one of two nonlinear functions kept in a ROM.
In a DCT built from LNS adders, these ROMs take most of the area.

This design implements an 8-point forward DCT (Chen's fast algorithm) in
which every table serves two additions. The 26 additions of the flow graph
run on 13 units, so the DCT has half the table area of a plain LNS design.
Two kinds of sharing are used:

* **Butterfly sharing** (`lns_addsub`). X+Y and X−Y of the same operands
  need the same z and the same max(x, y). When the signs are equal, one
  result uses s_b and the other uses d_b; when they differ, the roles swap.
  One lookup of both tables gives both results. The cost is one extra
  multiplexer and one extra adder.
* **Sign-complementary sharing** (`lns_dual_add`). Two unrelated additions
  can share a table if one of them is known to be an effective addition
  (operand signs equal, needs s_b) whenever the other is an effective
  subtraction (needs d_b). The two halves of the table are then steered
  between the two adders. In the DCT this holds for the three output
  adder pairs that come after the multipliers. The cost is one more
  multiplexer in the critical path.

The default word is W = 10 bits with F = 4 fraction bits. This is the
precision at which LNS DCT output is known to give visually acceptable
MPEG-1 video.

## Number format

An LNS word of W bits has three fields:

| bits | meaning |
|------|---------|
| W−1 | sign of the value, 1 = negative |
| W−2 … 0 | log2 of the magnitude, two's complement, F fraction bits |

With W = 10 and F = 4 the exponent runs from −16 to +15.9375 in steps of
1/16 octave, so each code step is a factor of 1.044. W = F + 6 throughout:
a sign bit, 5 integer bits, and F fraction bits.

No code is set aside for zero. The most negative exponent (2^−16) serves as
zero. Every adder in the design saturates to the exponent range rather than
wrapping:

* An exact cancellation (X − X) gives the zero code.
* A product too small for the range gives the zero code.
* A result too large for the range sticks at the largest code.

## The s_b/d_b table (`lns_sbdb_rom`)

For z ≤ 0 the two tables hold:

* s_b(z) = log2(1 + 2^z), used when the operand signs are equal. Its value
  lies in (0, 1], so it is stored in F bits.
* d_b(z) = log2|1 − 2^z|, used when the signs differ. Its value is negative
  and is stored in W − 1 bits.

The address is |z| = |x − y| in code units. |z| ≤ 2^(W−1) − 1 always, so
each table has 2^(W−1) entries. The total is (2F + 5)·2^(F+5) bits, which is
6656 bits at F = 4. The entries are computed at elaboration from the formulas
above, rounded to nearest. Two entries cannot be stored as computed:

* s_b(0) = 1 does not fit in F fraction bits and is stored as 1 − 2^−F.
* d_b(0) = −∞ is stored as the zero code.

The module has a separate read address for each table, which
`lns_dual_add` needs. `lns_addsub` ties the two addresses together.

## Combined adder/subtractor (`lns_addsub`)

Signals, numbered as the multiplexers of the original block diagram:

| element | function |
|---------|----------|
| subtractor | d = x − y at W bits; its sign bit `borrow` means \|Y\| > \|X\| |
| negator + MUX 1 | table address \|z\| = borrow ? −d : d |
| MUX 2 | max(x, y) = borrow ? y : x |
| control | same = (x_s == y_s) |
| MUX 3 / MUX 4 | w+ = same ? s_b : d_b, w− = same ? d_b : s_b |
| two adders | exponent of X+Y = max + w+, of X−Y = max + w− (saturating) |
| MUX 5 | sign of X+Y = borrow ? y_s : x_s |
| MUX 6 | sign of X−Y = borrow ? ¬y_s : x_s |

It is purely combinational and has the critical path of a single LNS adder.

## Shared-table dual adder (`lns_dual_add`)

This is the less obvious of the two units. It computes X1+Y1 and X2+Y2
(any subtraction is carried in an operand's sign). Each adder has its own
subtractor, negator, max multiplexer, output adder and sign multiplexer.
Only the table is shared:

```
same1  = (x1_s == y1_s)                 -- adder 1 is an effective addition
MUX 5: s_b address = same1 ? |z1| : |z2|
MUX 6: d_b address = same1 ? |z2| : |z1|
MUX 7: w1 = same1 ? s_b : d_b
MUX 8: w2 = same1 ? d_b : s_b
```

This is correct only when (x1_s ⊕ y1_s) ≠ (x2_s ⊕ y2_s). An immediate
assertion in the module checks the condition. When it does not hold, the
second result is wrong.

In Chen's flow graph the rule holds for structural reasons. For example,
outputs F(2) and F(6) are

```
F(2) =  sin(π/8)·a7 + cos(π/8)·a8
F(6) = −cos(π/8)·a7 + sin(π/8)·a8
```

Both sums take the same two intermediate values, and the constants differ in
sign in exactly one place. So whatever the signs of a7 and a8, one sum adds
magnitudes and the other subtracts them. The pairs (F1, F7) and (F5, F3)
follow the same pattern, with −sin(7π/16) and −sin(3π/16).

## The DCT datapath (`lns_dct8`)

The flow graph has 26 adders, numbered (1)…(26), and 16 constant
multipliers. Let h_n = f(n) − f(7−n), and let c = cos(π/4) = sin(π/4).

| adders | unit | computes |
|--------|------|----------|
| (1)/(13) … (4)/(16) | 4 × `lns_addsub` | g_n = f(n) + f(7−n), h_n = f(n) − f(7−n) |
| (5)/(8), (6)/(7) | 2 × `lns_addsub` | a5 = g0 + g3, a8 = g0 − g3, a6 = g1 + g2, a7 = g1 − g2 |
| (9)/(10) | `lns_addsub` | F(0) = sin(π/4)(a5 + a6), F(4) = cos(π/4)(a5 − a6) |
| (11)/(12) | `lns_dual_add` | F(2), F(6) as above |
| (17)/(18) | `lns_addsub` | m = c·(h1 + h2), n = c·(h1 − h2) |
| (19)/(20), (21)/(22) | 2 × `lns_addsub` | P = h0 + m, Q = h0 − m, S = h3 + n, R = h3 − n |
| (23)/(26) | `lns_dual_add` | F(1) = sin(π/16)S + cos(π/16)P, F(7) = −sin(7π/16)S + cos(7π/16)P |
| (24)/(25) | `lns_dual_add` | F(5) = sin(5π/16)R + cos(5π/16)Q, F(3) = −sin(3π/16)R + cos(3π/16)Q |

The 16 constants are quantized to LNS codes at elaboration. The outputs keep
the flow graph's scaling:

* F(k) = Σ f(n)·cos((2n+1)kπ/16) for k > 0.
* F(0) = Σ f(n)/√2.

This is twice the orthonormal DCT. The module is purely combinational: it is
the "one-cycle" DCT.

## Top level (`lns_dct8_top`)

```
in_f[8] (9-bit) ─► 8 × lns_from_fixed ─► reg ─► lns_dct8 ─► reg ─┬─► out_lns[8]
                                                                 └─► 8 × lns_to_fixed ─► out_F[8] (12-bit)
```

* `lns_from_fixed` converts a sample to LNS. Its table has 256 entries of
  9 bits, holding round(16·log2|v|), and the sign is passed through. The
  input is 9-bit two's complement; −256 is clamped to −255.
* `lns_to_fixed` converts back. Its table has 512 entries of 11 bits,
  holding round(2^e), clamped to 2047. The output is 12-bit two's
  complement.
* Timing:
  * At the clock edge where `in_valid` is high, the converted samples are
    registered.
  * At the next edge the DCT result is registered and `out_valid` rises.
  * The outputs hold until the next result.
  * Latency is two edges and throughput is one block per clock.
* `rst_n` is synchronous, active low, and clears only the valid flags.
* `out_lns` brings out the LNS result for a consumer that keeps LNS data.

## Accuracy

All of the following was measured in simulation.

* **Bit-exact match with a reference model.** Every module matches a
  model that computes each LNS operation from its mathematical definition
  (`tb/lns_ref_pkg.sv`) instead of from tables. This covers 3000 streamed
  blocks through the top and 20000 blocks through the datapath.
* **Error against the exact DCT.** Over 3000 random 9-bit blocks the mean
  coefficient error is about 6.6, which is 0.65% of the block's Σ|f|.
* **Flat blocks lose DC value.** This is the largest systematic error,
  caused by s_b(0) being held at 1 − 2^−F. X + X comes out as
  2^(15/16)·X, 4% low, and F(0) goes through three such additions. A block
  of eight 255s gives F(0) = 1272 against an exact 1442 (−12%). Widening
  the s_b output to F + 1 bits would remove this error, at a cost of
  2^(W−1) table bits per unit.
* **Precision sweep.** With the same random blocks at each precision, the
  worst error is:

  | F | W | table bits | worst \|error\| |
  |---|---|-----------|----------------|
  | 2 | 8 | 1152 | ≈ 407 |
  | 3 | 9 | 2816 | ≈ 270 |
  | 4 | 10 | 6656 | ≈ 151 |
  | 5 | 11 | 15360 | ≈ 62 |

## What follows the original design and what does not

**Taken from the original design:**

* The LNS addition algorithm and the s_b/d_b widths and sizes.
* The datapaths of the two shared units, including their multiplexer
  numbering.
* The flow graph's adder pairing and its 16 multiplier constants.
* The counts of 10 + 3 units.
* W = 10 and F = 4.
* The number and sizes of the conversion tables.

**Choices made in this implementation:**

* Two's complement exponents and the zero code.
* Saturation everywhere.
* Round-to-nearest tables, and the stored values of s_b(0) and d_b(0).
* The wiring of adders (17)–(22), which was fixed by the DCT equations
  because the source drawing's line crossings are ambiguous. Adder pairs and
  constants are unchanged.
* The input and output registers, the valid handshake and the reset.
* The fixed-point formats of the converters.

**Not implemented:**

* The two-cycle variant of the DCT, which reuses 14 adders over two
  cycles. Only its adder counts are known.
* The plain single LNS adder, which is only the point of comparison.
* A 2-D 8×8 DCT. This needs a transpose buffer that is not part of this
  design.

## Files

| file | contents |
|------|----------|
| `rtl/lns_pkg.sv` | W, F defaults; elaboration-time functions for table contents and constants |
| `rtl/lns_sbdb_rom.sv` | s_b/d_b table |
| `rtl/lns_addsub.sv` | butterfly unit, X+Y and X−Y |
| `rtl/lns_dual_add.sv` | sign-complementary shared-table pair |
| `rtl/lns_mul.sv` | LNS multiplier |
| `rtl/lns_dct8.sv` | combinational 8-point DCT |
| `rtl/lns_from_fixed.sv`, `rtl/lns_to_fixed.sv` | converters |
| `rtl/lns_dct8_top.sv` | top level with registers |
| `tb/lns_ref_pkg.sv` | reference model and mechanism counters |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lns_precision_sweep` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For
example, for the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_lns_dct8_top rtl/lns_pkg.sv tb/lns_ref_pkg.sv tb/tb_lns_dct8_top.sv
./obj_dir/Vtb_lns_dct8_top
```

To run another testbench, substitute its name. The top-level test also
reports how often each mechanism occurred, and fails if any of them never
did:

* s_b and d_b lookups
* exact cancellations
* clamping at the zero code
* both routings of the shared pairs
* back-to-back blocks and idle cycles

All tests run in well under a second.

## Changing the precision

Every module takes `W` and `F` parameters, with W = F + 6. Table contents
and constants are recomputed at elaboration. Table size grows as 2^F, while
the rest of the datapath grows linearly in F, so the share of area saved by
table sharing rises with precision. For the top level, `M` (input magnitude
bits) and `B` (output magnitude bits) set the converter sizes.

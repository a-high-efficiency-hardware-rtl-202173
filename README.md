# Composite-field AES S-box

The AES SubBytes step replaces every byte `x` by `S(x) = A·x⁻¹ ⊕ 63h`, where
`x⁻¹` is the multiplicative inverse in GF(2⁸) (`m(x) = x⁸+x⁴+x³+x+1`, with
`0⁻¹ = 0`) and `A` is a fixed 8×8 bit matrix. A lookup table needs 256 bytes of
ROM per S-box. Inverting directly in GF(2⁸) gives deep logic. This design does
neither. It moves the byte into a *tower field*, where an inverse in GF(2⁸)
becomes a few operations on 4-bit and 2-bit numbers. Then it moves the result
back and applies the affine step.

Every stage has been flattened by hand into a sum-of-products or XOR
expression, and the stages are placed one after another as a single
combinational path. There are no registers: one byte in, one byte out, latency
zero. The published synthesis result for this structure is about 565 NAND2
gate equivalents with a 0.96 ns path in a 90 nm library. That is roughly
1 GHz, or 8.3 Gbit/s for a single S-box instance.

## The tower field

| level | field | defining polynomial | constant |
|---|---|---|---|
| GF(2²) | GF(2)[x] | x² + x + 1 | |
| GF(2⁴) = GF((2²)²) | GF(2²)[x] | x² + x + φ | φ = `10b` |
| GF(2⁸) ≅ GF((2⁴)²) | GF(2⁴)[x] | x² + x + λ | λ = `1100b` |

An element of the composite field is written `q' = b·x + c`. The high nibble
`b` and the low nibble `c` are GF(2⁴) elements, and each nibble is
`{high GF(2²), low GF(2²)}`. The linear coefficient of the top-level
polynomial is β = 1. That choice removes one multiplier from the inverse:

```
(b·x + c)⁻¹ = b·e⁻¹ · x + (b ⊕ c)·e⁻¹,     e = λ·b² ⊕ b·c ⊕ c²
```

If `q' = 0` then `e = 0`, `e⁻¹` is taken as 0, and the result is 0. So the
zero byte needs no special case.

## Data path

```
 q ──► iso_map ──► q'={b,c} ──┬─► f1 ──► e ──► f2 ──► y ──┐
        (δ·q)                  │  (norm)         (e⁻¹)     ▼
                               └──────────────► d-terms ─► f3 ──► q'⁻¹ ──► inv_iso_affine ──► a = S(q)
                                                (b,c XORs)  (b·y ‖ (b⊕c)·y)      (B·q'⁻¹ ⊕ 63h)
```

| module | function | logic depth (published estimate) |
|---|---|---|
| `iso_map` | `q' = δ·q`: GF(2⁸) → GF((2⁴)²) | 3 XOR |
| `f1` | `e = λb² ⊕ bc ⊕ c²` | 4 XOR + AND + INV |
| `f2` | `y = e⁻¹` in GF(2⁴) | AND3 + 3 XOR + INV |
| `f3` | `q'⁻¹ = {b·y, (b⊕c)·y}` | AND + 2 XOR after `y` |
| `comp_inv` | wrapper: `f1` → `f2` → `f3` | |
| `inv_iso_affine` | `a = (A·δ⁻¹)·q'⁻¹ ⊕ 63h` | 3 XOR |
| `sbox` | top: the three stages in series | 15 XOR + 2 AND + AND3 + 2 INV |

`sbox_pkg` holds the shared types: `gf256_t` (8 bits), `gf16_t` (4 bits) and
the packed struct `comp_t {b, c}`.

### iso_map

This stage is a fixed GF(2) matrix. Rows drive `b3 … c0`, and columns read
`q7 … q0`:

```
b3 1010_0000   b2 1101_1110   b1 1010_1100   b0 1010_1110
c3 1100_0110   c2 1001_1110   c1 0101_0010   c0 0100_0011
```

Several matrices map GF(2⁸) onto this tower field, because any root of the AES
polynomial can be chosen. This one is picked so that its rows are short.

### f1: the norm

A direct implementation would use a squarer, a constant multiplier by λ, and a
general multiplier for `c·(b⊕c)`. In this design all three are expanded to
bit level and merged into one expression per output bit. Inverted literals
such as `b0·~c3` absorb XOR terms that would otherwise need their own gate. The
intermediate steps, which the comments describe, are:

- `k = b²`: `k = {b3, b2⊕b3, b1⊕b2, b0⊕b1⊕b3}`.
- `t = k·λ`: `t = {k0⊕k2, k0⊕k1⊕k2⊕k3, k3, k2}`.
- `s = c·(b⊕c)`.

None of them exists as a net.

### f2: the GF(2⁴) inverse

This stage repeats the same tower trick one level down:

- `G1 = φ·eH² ⊕ eL·(eH⊕eL)`.
- `G2 = G1⁻¹`, which in GF(2²) is `(h1,h0) → (h1, h1⊕h0)`.
- `G3 = {eH·G2, (eH⊕eL)·G2}`.

These steps are merged and minimised into four two-level functions of
`e3..e0`. Each complement in them covers one literal. Here is the complete map,
for reference:

```
e : 0 1 2 3 4 5 6 7 8 9 A B C D E F
y : 0 1 3 2 F C 9 B A 6 8 7 5 E D 4
```

### f3: two products that share work

Both halves of `q'⁻¹` are products by the same `y`. Each output bit has the
form `y3·u ⊕ y2·v ⊕ y1·w ⊕ y0·z`, where `u … z` are XORs of bits of `b` and
`c`. Fourteen distinct XORs (`d0 … d13`) cover all of them. They depend only
on `b` and `c`, so they settle while `f1` and `f2` are still working. Once
`y` arrives, only one AND level and a 4-input XOR remain.

### inv_iso_affine: one matrix instead of two

Returning to GF(2⁸) (`δ⁻¹`) and applying the AES affine matrix `A` are both
linear, so the design premultiplies them into `B = A·δ⁻¹`:

```
a7 1000_1100   a6 1111_0000   a5 1000_0100   a4 1001_0011
a3 0000_0111   a2 0111_1101   a1 1000_0001   a0 1100_0111
```

The constant `63h` flips bits 6, 5, 1 and 0. Each of those rows contains
`q'⁻¹[7]`, so one inverter on that bit replaces four XOR gates with a
constant.

## Worked example

These are the intermediate values for `q = F0h`, all checked by the top-level
testbench:

| q | q' = {b,c} | e | y | q'⁻¹ | a |
|---|---|---|---|---|---|
| F0 | 41 | C | 5 | 27 | 8C |

The intermediates for inputs 00h…08h are:

| q | 00 | 01 | 02 | 03 | 04 | 05 | 06 | 07 | 08 |
|---|---|---|---|---|---|---|---|---|---|
| b | 0 | 0 | 5 | 5 | 7 | 7 | 2 | 2 | 7 |
| c | 0 | 1 | F | E | C | D | 3 | 2 | 4 |
| e | 0 | 1 | 2 | 6 | 3 | 5 | B | 8 | 1 |
| y | 0 | 1 | 3 | 9 | 2 | C | 7 | A | 1 |
| a | 63 | 7C | 77 | 7B | F2 | 6B | 6F | C5 | 30 |

## How far it can be trusted

Every stage has been compared exhaustively against textbook field arithmetic
that shares no equations with the RTL. That arithmetic uses shift-and-add
multiplication, inverses found by search, and the affine step as byte
rotations, and it lives in `tb/gf_ref_pkg.sv`. Each testbench checks the
following:

- `iso_map_tb`: the map is one-to-one and maps 1 to 1. It is additive and
  multiplicative for all 65 536 pairs, which makes it a field isomorphism.
  Known images pin which isomorphism it is.
- `f1_tb`: all 256 `(b, c)` pairs.
- `f2_tb`: all 16 inputs.
- `f3_tb`: all 4096 `(b, c, y)` triples.
- `comp_inv_tb`: all 256 inputs. `q'·q'⁻¹ = 1`, and the result equals the
  inverse found by search.
- `inv_iso_affine_tb`: all 256 inputs, against the affine step applied to
  `δ⁻¹(v)`.
- `sbox_tb` (end to end):
  - all 256 bytes and 20 000 random bytes, one per clock cycle;
  - each result checked 1 time unit after the input changes, and again at
    the next clock edge;
  - the intermediate values in the tables above;
  - coverage: the zero byte, both values of `q'⁻¹[7]`, and all 16 inputs
    of `f2`.

For each module, a copy with one deliberate error was run against its
testbench, and every copy was caught.

Nothing here has been synthesised to a cell library, so the area and delay
figures above are published estimates and were not measured.

## Design choices

These points are not fixed by the published architecture:

- **No clock.** The S-box is purely combinational, as the published
  throughput figure (8 bits per path delay) implies. If it is used inside a
  clocked AES round, register `q` and/or `a` outside it. To pipeline it,
  the natural cut points are `q'`, `e`/`d`, `y` and `q'⁻¹`.
- **Forward S-box only.** The inverse S-box, which AES decryption needs, is
  not part of this design.
- **Typing.** The packed struct `comp_t` and the package of shared types are
  choices made for this RTL.
- **Where the d-terms live.** The shared XOR terms are formed inside `f3` and
  depend only on `b` and `c`. A synthesis tool sees that they run in
  parallel with `f1` and `f2`.

## Simulating

No module has parameters. The package must be read first. To run a
testbench with Verilator 5:

```
RTL="rtl/sbox_pkg.sv rtl/iso_map.sv rtl/f1.sv rtl/f2.sv rtl/f3.sv \
     rtl/comp_inv.sv rtl/inv_iso_affine.sv rtl/sbox.sv"
verilator --binary --timing --assert -Wall --top-module sbox_tb \
    $RTL tb/gf_ref_pkg.sv tb/sbox_tb.sv
./obj_dir/Vsbox_tb
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. To run a
block's own testbench, replace `sbox_tb` in both places, for example with
`f2_tb` or `iso_map_tb`. A whole run takes well under a second.

To lint only the design:

```
verilator --lint-only -Wall $RTL --top-module sbox
```

## Files

- `rtl/sbox_pkg.sv`: field element types.
- `rtl/iso_map.sv`, `rtl/f1.sv`, `rtl/f2.sv`, `rtl/f3.sv`, `rtl/comp_inv.sv`
  and `rtl/inv_iso_affine.sv`: the stages.
- `rtl/sbox.sv`: the top.
- `tb/gf_ref_pkg.sv`: reference arithmetic.
- `tb/*_tb.sv`: one self-checking testbench per module.

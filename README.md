# Add-Multiply operator with modified Kogge-Stone adders

Many DSP kernels compute a product of a sum, `P = (A + B) * Y`. The direct
way to build this Add-Multiply (AM) operator is an adder followed by a
multiplier. This design keeps that structure but builds every adder in it,
both the pre-adder and the adders that sum the multiplier's partial
products, as a *modified Kogge-Stone* parallel-prefix adder. A conventional AM
unit uses carry-lookahead (CLA) and carry-save (CSA) adders in those places.
The multiplier itself is a signed radix-4 Modified Booth multiplier.

The default configuration is 8-bit signed `A`, `B` and `Y` and a 16-bit
signed product `P`. The whole operator is combinational: no clock, no
registers, no reset.

```
 a[7:0] ─┐
         ├─ ks_adder (8) ── X[7:0] ─┐
 b[7:0] ─┘                          │
                                    ├─ mb_multiplier ── p[15:0]
 y[7:0] ────────────────────────────┘
             mb_multiplier:
               y ─ 4 x mb_encoder ─ digits ─┐
               X ───────────────────────────┴─ 4 x pp_gen ─ rows ─ tree of 4 x ks_adder (16)
```

## Datapath

1. **Pre-adder.** `X = A + B` comes from an 8-bit `ks_adder`. `X` stays
   8 bits wide: a sum that overflows the signed 8-bit range wraps, and the
   carry out is dropped. `P` is therefore exact only when `A + B` fits in
   8 signed bits. This width is this implementation's reading of the design,
   which shows an 8-bit `X` and a 16-bit `P`.
2. **Booth encoding of Y.** `Y` is read in four overlapping three-bit groups
   `{y[2j+1], y[2j], y[2j-1]}` with `y[-1] = 0`. Each group is worth
   `d_j = -2*y[2j+1] + y[2j] + y[2j-1]`, which is one of -2, -1, 0, +1, +2.
   This gives `Y = sum d_j * 4^j`.
3. **Partial products.** Each digit selects 0, `X` or `2X` and inverts the
   row if the digit is negative. This forms a 9-bit row `d_j*X - cin_j`.
4. **Accumulation.** The rows are summed by a tree of 16-bit `ks_adder`s.

### Digit encoding

| y[2j+1] y[2j] y[2j-1] | digit | sign | one | two | cin |
|---|---|---|---|---|---|
| 000 | 0  | 0 | 0 | 0 | 0 |
| 001 | +1 | 0 | 1 | 0 | 0 |
| 010 | +1 | 0 | 1 | 0 | 0 |
| 011 | +2 | 0 | 0 | 1 | 0 |
| 100 | -2 | 1 | 0 | 1 | 1 |
| 101 | -1 | 1 | 1 | 0 | 1 |
| 110 | -1 | 1 | 1 | 0 | 1 |
| 111 | 0  | 1 | 0 | 0 | 0 |

`sign` is always `y[2j+1]`, so the group `111` is a zero digit whose sign
bit is 1. `cin` ("negative and non-zero") is the signal that matters for the
arithmetic:

- the partial-product row is XORed with `cin`, not with `sign`;
- a `111` group therefore gives an all-zero row with no correction.

If the row were XORed with `sign`, a `111` group would give an all-ones row
(-1) with nothing to correct it. The gate equations in `mb_encoder` are:

```
one  = y[2j] ^ y[2j-1]
two  = (y[2j+1] ^ y[2j]) & ~one
cin  = y[2j+1] & ~(y[2j] & y[2j-1])
```

### Summing the rows and the +1 corrections

A negative row is only inverted. The `+1` that completes its two's
complement is the bit `cin_j`, and it must be added at weight `2^(2j)`:

- Row `j` is sign-extended to 16 bits and shifted left by `2j`.
- Row `j+1` is zero at bit `2j`, so `cin_j` is placed in that slot.
- The last digit's `cin_3`, at weight 2^6, has no row below it. It forms a
  fifth operand that is otherwise zero.

The five 16-bit operands are summed by a balanced binary tree of `ks_adder`s
written in heap order: node `i` adds nodes `2i+1` and `2i+2`. For N = 8 the
tree has 4 adders in 3 levels. All sums are taken modulo 2^16. This is exact
because a signed 8 x 8 product always fits in 16 bits. The tree shape and the
placement of the correction bits are this implementation's choices. The
original design says only that the partial products are added with modified
Kogge-Stone adders.

## The modified Kogge-Stone adder

`ks_adder` works in three steps:

1. Each bit forms a propagate `p = a ^ b` and a generate `g = a & b`. The
   carry-in is folded into bit 0: `g0 |= p0 & cin`.
2. `ceil(log2 WIDTH)` prefix levels follow. Level `k` combines each
   position's (G, P) pair with the pair `2^k` positions lower, as a plain
   Kogge-Stone network does. Every cell drives at most two others.
3. The sum is `s[i] = p[i] ^ carry[i-1]`.

The modification removes redundant black cells. A black cell computes both
a group generate and a group propagate. Once a position's group reaches
bit 0, its G is already the final carry and its group P is never read again:

- At the level where a group is completed, that position uses a gray cell,
  which computes G only.
- In later levels the position is just a wire.

The last prefix level therefore has no black cells at all. The original
design describes the modified adder as a Kogge-Stone network with redundant
black cells removed (and wires rerouted, which has no logical effect). The
exact choice of which cells are redundant is this implementation's reading
of that description.

## Files

| file | module | role |
|---|---|---|
| `rtl/am_pkg.sv` | `am_pkg` | `mb_digit_t` struct (sign, one, two, cin), digit-count helper |
| `rtl/ks_adder.sv` | `ks_adder #(WIDTH=16)` | modified Kogge-Stone adder, `s = a + b + cin`, `cout` |
| `rtl/mb_encoder.sv` | `mb_encoder` | one Booth digit from a three-bit group |
| `rtl/pp_gen.sv` | `pp_gen #(WIDTH=8)` | one partial-product row, WIDTH+1 bits |
| `rtl/mb_multiplier.sv` | `mb_multiplier #(N=8)` | signed N x N Booth multiplier, 2N-bit product |
| `rtl/am_unit.sv` | `am_unit #(N=8)` | top: `p = (a + b) * y` |

`N` must be even and at least 2; `ks_adder` needs `WIDTH >= 2`. All
operands are two's complement.

## Verification

Each testbench checks its block against integer arithmetic computed in the
testbench. Each one prints `TB_RESULT checks=N failures=M` and has a
cycle-count watchdog.

| testbench | what it covers |
|---|---|
| `tb_ks_adder` | 16-bit: the vector 0xF007 + 0xFBE7 = 0xEBEE with carry out, corner cases (full carry chains), 100,000 random triples. 8-bit and 5-bit: all input combinations. |
| `tb_mb_encoder` | all eight groups; the byte `Y = 11111110` must give sign = 1111, one = 0000, two = 0001 (digit 3 first) |
| `tb_pp_gen` | every 8-bit and 4-bit `x` with every digit, including both encodings of zero; checks `signed(pp) + cin == d*x` |
| `tb_mb_multiplier` | all signed operand pairs for N = 8, 6 and 4 |
| `tb_am_unit` | default size: the vector `a=0xF6, b=0xFE, y=0xC0 -> p=0x0300` (-12 * -64), extreme operands, 300,000 random triples. It also counts how often each digit value, each zero encoding, a wrapping pre-adder sum and a pre-adder carry without overflow occur, and fails if any never does. |
| `tb_am_exhaustive` | all 2^24 input combinations of the 8-bit operator (about 15 s) |

All of them run at the default parameters except where a second, smaller
instance is added for exhaustive coverage. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/am_pkg.sv tb/tb_am_unit.sv \
          --top-module tb_am_unit -Mdir obj_am
./obj_am/Vtb_am_unit
```

Lint with `verilator --lint-only -Wall -Irtl rtl/am_pkg.sv rtl/am_unit.sv`.
The remaining warnings are unused signals that stay by design:

- the `cout` outputs of the pre-adder and of the tree adders;
- the `sign` field, which `pp_gen` does not use;
- the pass-through propagate wires of the adder's last prefix level.

## Where this departs from, or goes beyond, the original design

- **Area and delay are not reproduced.** The original design was compared
  on an FPGA against CSA- and CLA-based versions of the same operator. It
  reported 132 LUTs and 28.97 ns for the Kogge-Stone version, against
  177 LUTs / 32.24 ns (CSA) and 143 LUTs / 33.03 ns (CLA). The baselines are
  not included here, and the figures depend on the original synthesis flow.
- **Chosen here, not specified by the original design:**
  - the 8-bit wrap-around pre-adder;
  - the inversion of a row by `cin` rather than `sign`;
  - the adder-tree shape;
  - the placement of the correction bits;
  - the exact set of removed black cells.
- **No pipelining.** The operator is purely combinational. Registers at
  its inputs or outputs are left to the user.

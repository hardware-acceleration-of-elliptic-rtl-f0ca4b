# Elliptic-curve point multiplier over GF(2^163)

This RTL computes the scalar multiple Q = kP of a point P on a binary
elliptic curve. The curve is y² + xy = x³ + ax² + b over GF(2^163), by default
the NIST curve B-163. Scalar multiplication is the expensive core of ECDH and
ECDSA. Here it is done in hardware with the Montgomery ladder of López and
Dahab, in projective x-only coordinates. Two digit-serial field multipliers
run side by side, and a squarer and XOR adders work in the cycles the
multipliers are busy anyway. One ladder step therefore costs three multiplier
passes plus one add cycle ("3M + A"). A single field inversion at the end
returns the affine result.

At the default digit size G = 32, a full 163-bit scalar takes **3836 clock
cycles** from start to done. The field units beneath it can be used on their
own: adder, digit multiplier core, digit-serial multiplier, single-cycle
squarer and Itoh–Tsujii inverter.

The architecture follows a published FPGA design: the Montgomery ladder with
merged key paths, two multipliers, the data flow of the coordinate converter,
the digit-serial multiplier, the squarer and the inverter's addition chain.
The cycle-level schedule, the handshakes, register use and special-case
handling are this implementation's own. The places where it departs from the
published design are listed under "Departures and limits" below.

## Field arithmetic

Elements of GF(2^m) are bit vectors. Bit i is the coefficient of x^i.
Reduction is modulo F(x) = x^m + r(x). For m = 163, r(x) = x^7 + x^6 + x^3 + 1
(`163'hC9`), and d = deg r = 7. Addition is XOR (`gf_add`).

### The digit multiplier core (`gf_digit_mul`)

This is the workhorse shared by the multiplier and the squarer. It computes
R(x)·W(x) mod F(x) in one combinational pass, for a G-bit digit R and a
reduced element W:

* A chain of G−1 *shift-and-reduce* stages produces x^i·W mod F for
  i = 0 … G−1. Each stage shifts left by one bit. If a bit falls out of
  position m−1, the stage XORs in r(x), which is the identity x^m ≡ r(x).
* A G-input XOR adder sums the stage outputs whose digit bit r_i is 1.

The chain is the critical path. Its depth grows with G, so G trades area and
clock rate against the number of cycles per product.

### Digit-serial multiplier (`gf_mul`)

The multiplier b is split into s = ⌈m/G⌉ digits. The top digit holds the
m mod G leftover bits. The accumulator C processes one digit per clock, most
significant digit first:

```
C <- V1 + V2 + V3
V1 = (C mod x^(m-G)) * x^G           shift of the low m-G bits, no reduction
V2 = (C div x^(m-G)) * r(x)          the G high bits, reduced through x^m = r(x)
V3 = B_t(x) * A(x) mod F             gf_digit_mul
```

V2 needs no further reduction because d + G < m. The unit checks this at
elaboration. C starts at zero, so the first clock leaves B_(s−1)·A in C.

**Timing:** one load cycle, then s compute cycles. `done` pulses in cycle
s+1 after the start cycle (7 cycles at G = 32). A new `start` is accepted in
the done cycle, so a caller can feed `c` straight back as an operand.

### Squarer (`gf_sqr`)

Squaring spreads the bits apart: a_i moves to position 2i. For odd m, the
expanded polynomial E splits at x^(m+1) into:

* a low part, already reduced;
* a high part A_h, which is multiplied by x^(m+1) ≡ x·r(x).

That product is `gf_digit_mul` with the constant digit x·r(x), which has
d+2 = 9 bits. A squaring is therefore one combinational pass. The module
rejects even m at elaboration. All NIST binary fields have odd m.

### Inverter (`gf_inv`)

The inverter computes a⁻¹ = a^(2^m − 2) = (β(m−1))², with β(e) = a^(2^e − 1).
It follows the Itoh–Tsujii chain:

```
beta(2e)  = beta(e)^(2^e) * beta(e)      e squarings + 1 multiplication
beta(e+1) = beta(e)^2 * a                1 squaring  + 1 multiplication
```

The controller walks the bits of m−1 from the top. Each bit doubles e, and a
set bit then adds one. For m = 163 this gives the chain
1, 2, 4, 5, 10, 20, 40, 80, 81, 162: 9 multiplications and 162 squarings.

The unit holds T0 = a, T1 = β(e) and the squaring register T2. It contains
its own `gf_mul` and `gf_sqr`. Two paths save cycles:

* The squarer output is fed back through T2, so a run of squarings costs one
  cycle each.
* A product that has just finished goes straight into the squarer in the same
  cycle, so the first squaring of the next step costs nothing.

**Latency:** 1 + 9(s+2) + 152 cycles, which is **225** at G = 32. The inverse
of 0 is returned as 0.

## The Montgomery ladder (`ecc_point_mul`)

The ladder needs only the x coordinates. Let l be the bit length of k. After
the leading one bit, the ladder holds two projective points,
P1 = (X1:Z1) and P2 = (X2:Z2), with P2 − P1 = P. They start at P and 2P:

```
X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2
Madd:    Z2' = (X1 Z2 + X2 Z1)^2,  X2' = x Z2' + (X1 Z2)(X2 Z1)
Mdouble: X1' = X1^4 + b Z1^4,      Z1' = X1^2 Z1^2
```

### Merged key paths and the swap

The textbook ladder updates (P1, P2) differently for a 0 bit and a 1 bit.
Here every iteration runs the same computation: (X2:Z2) ← Madd and
(X1:Z1) ← Mdouble(X1:Z1). Only the role of the two registers changes. The
points are exchanged by `ecc_swap` at these moments:

* before the first iteration, if k_(l−2) = 1;
* after iteration i > 0, if k_i ≠ k_(i−1);
* after the last iteration (i = 0), if k_0 = 1.

Each swap is the pair "swap back after bit i" and "swap in for bit i−1"
merged into one, and two swaps that would cancel are skipped. The swap
happens in the write-back cycle.

### Schedule of one iteration

| cycles  | multiplier 0       | multiplier 1       | squarer / adders                       |
|---------|--------------------|--------------------|----------------------------------------|
| 1       | issue X1·Z2        | issue X2·Z1        | X1²                                    |
| s+1     | running            | running            | Z1², X1⁴, Z1⁴ (one per cycle)          |
| (end)   | issue (X1Z2)(X2Z1) | issue X1²·Z1²      | Z2' = (X1Z2 + X2Z1)²                   |
| s+1     | running            | running            |                                        |
| (end)   | issue x·Z2'        | issue b·Z1⁴        | keep (X1Z2)(X2Z1); Z1' = X1²Z1²        |
| s+1     | running            | running            |                                        |
| (end)   | —                  | —                  | X2' = x·Z2' + …, X1' = X1⁴ + bZ1⁴, swap |

One iteration takes 3(s+1) + 1 cycles, which is 22 at G = 32. Both
multipliers always start together. An assertion checks that they stay in
lock step.

### Coordinate conversion

After the last iteration, the projective pair is mapped back to affine
coordinates:

```
t3 = Z1 Z2,    t = 1 / (x t3)                 (the only inversion)
xk = X1 (x Z2) t
yk = (x + xk) [ (x^2 + y) t3 + (X2 + x Z2)(X1 + x Z1) ] t + y
```

The products use the same two multipliers and squarer, and the inversion uses
`gf_inv`. While the inverter runs (225 cycles), the multipliers finish
(X2 + xZ2)(X1 + xZ1) and (x² + y)·t3. Four dependent products then give xk
and yk. The conversion keeps its intermediate values in the ladder's
temporary registers, which are free once the ladder has finished, and writes
xk straight into `xq`. The conversion takes 6s + 7 + 225 cycles.

### Special cases

* **k = 0 or x = 0:** the result is returned two cycles after start, as the
  point at infinity (`q_infinity` = 1, xq = yq = 0).
* **Ladder ends with Z1 = 0** (kP is the point at infinity, for example when
  k is the group order n): `q_infinity` is also raised.
* **k = 1:** the ladder runs no iterations and returns P.
* **Z2 = 0** (kP = −P, for example k = n − 1): this case is **not handled**
  and gives a wrong y.

## Interfaces and timing

All sequential units have the same handshake:

* Reset is synchronous and active low (`rst_n`).
* Pulse `start` while `busy` is low. The operands are captured on that edge.
* `done` is high for exactly one cycle, with the result valid.
* The result holds until the next `start`. While busy, a result output may
  already change (the point multiplier writes `xq` before `yq`), so read it
  at `done`.
* A start given while busy is an error, caught by an assertion.

| unit            | ports                                         | latency, start cycle to done cycle                                 |
|-----------------|-----------------------------------------------|--------------------------------------------------------------------|
| `gf_mul`        | a, b → c                                      | s + 1 (7 at G = 32)                                                |
| `gf_inv`        | a → c                                         | 1 + 9(s+2) + 152 for m = 163 (225 at G = 32)                       |
| `ecc_point_mul` | xp, yp, k → xq, yq, q_infinity; busy          | 4 + (l−1)(3s+4) + 6s + 232 (3836 at G = 32, l = 163); one less for k = 1 |
| `gf_sqr`, `gf_add`, `gf_digit_mul`, `ecc_swap` | combinational  | —                                                                  |

Measured latencies for the published digit sizes (s = ⌈163/G⌉):

| G  | multiply | invert | kP (163-bit k) |
|----|----------|--------|----------------|
| 1  | 164      | 1638   | 82493          |
| 4  | 42       | 540    | 21371          |
| 14 | 13       | 279    | 6842           |
| 16 | 12       | 270    | 6341           |
| 28 | 7        | 225    | 3836           |
| 32 | 7        | 225    | 3836           |
| 33 | 6        | 216    | —              |
| 41 | 5        | 207    | —              |

## Parameters

All modules take their defaults from `gf2m_pkg`:

* `M` = 163: the field degree.
* `RPOLY` = `163'hC9`: r(x), the reduction polynomial without its x^m term.
* `D` = 7: the degree of r(x).
* `G` = 32: the digit size.
* `B`: the curve coefficient b of B-163. It is a parameter of
  `ecc_point_mul`, not a port.

The package also holds the B-163 base point and group order, which the
testbenches use.

The units are written for any odd M with D + 2 < M and D + G < M. This covers
every NIST binary field. Only GF(2^163) has been simulated, and the package
holds curve constants for B-163 only. The curve coefficient a does not enter
the x-only ladder or the conversion, so it is not a parameter.

## Departures and limits

* **Latency:** the published results give about 46.7 µs at 166 MHz for
  G = 32, which is roughly 7770 cycles or about 48 per ladder step. This
  schedule needs 22 cycles per step and 3836 in total. The published cycle
  breakdown is not known, so the two cannot be compared step by step. For the
  published inversion, 230 cycles are reported; this one takes 225.
* **Flip-flops:** the design uses about 4300 flip-flop bits. The published
  implementation reports 1918. The reasons:
  * every multiplier registers both operands;
  * the inverter has its own multiplier and its own operand and result
    registers;
  * the input point and key are held in registers for the whole operation.

  The difference is in register use, not in the arithmetic.
* **Squarer count:** the ladder uses one time-shared squarer; the published
  data-flow graph has five squaring nodes.
* **Inverter sharing:** the inverter keeps its own multiplier rather than
  borrowing one of the two ladder multipliers.
* **Special cases:** the Z2 = 0 case is not handled (see "Special cases"
  above). No host bus interface is provided: the unit has plain
  start/done ports.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against `tb_gf_ref_pkg`, a slow reference written independently of the RTL:

* bit-serial multiplication;
* Fermat inversion;
* affine double-and-add scalar multiplication.

Each testbench prints `TB_RESULT checks=N failures=F`.

| testbench                | what it covers                                                                                                 |
|--------------------------|----------------------------------------------------------------------------------------------------------------|
| `tb_gf_add`              | GF(2^4) worked example; random XORs; subtraction = addition                                                    |
| `tb_gf_digit_mul`        | G = 32 and G = 8 against the reference; corner digits                                                          |
| `tb_gf_sqr`              | published vector 66748f…92e² = 6237e7…43a; random operands                                                     |
| `tb_gf_mul`              | published vector 57h · 6237e7…43a = 1; random operands at G = 32 and G = 4; latency; back-to-back start        |
| `tb_gf_inv`              | 57h⁻¹ = 6237e7…43a; random operands; latency from the chain of m−1                                             |
| `tb_ecc_swap`            | both settings                                                                                                  |
| `tb_ecc_point_mul`       | default parameters; published key × G; random full and short keys on G and 2G; k = 0, 1, 2, 3, n; x = 0; latency; counts of every swap kind and of each exit path |
| `tb_digit_sizes`         | multiplier and inverter at G = 1, 4, 14, 16, 28, 32, 33, 41; scalar multiplier at G = 1 … 32                    |

The expected kP for the published key,
k = 6237e711bf388df9c46fce237e711bf388df9c43a times the B-163 base point, is:

```
x = 44f853643f0e22b8e075b59189b93cb964185fb0f
y = 71e650e3bcf041c554e3314512321899ddbe2d283
```

The testbenches hard-code this value, which comes from a separate software
model. The affine reference in `tb_gf_ref_pkg` agrees with it.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_ecc_point_mul \
  -y rtl -y tb rtl/gf2m_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_ecc_point_mul.sv \
  -Mdir obj -o sim && obj/sim
```

Replace the top module and file for any other testbench. `tb_ecc_point_mul`
builds in about a minute and runs in seconds. `tb_digit_sizes` elaborates 22
units and takes a few minutes to build.

## Files

* `rtl/gf2m_pkg.sv`: field and curve constants.
* `rtl/gf_add.sv`, `rtl/gf_digit_mul.sv`, `rtl/gf_mul.sv`, `rtl/gf_sqr.sv`,
  `rtl/gf_inv.sv`: field arithmetic.
* `rtl/ecc_swap.sv`, `rtl/ecc_point_mul.sv`: the ladder and the top level.
* `tb/`: the testbenches and the reference package.

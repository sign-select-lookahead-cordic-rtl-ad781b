# SSL-CORDIC QR decomposition for MIMO receivers

A MIMO receiver has to factor its complex channel matrix `H` into `Q·R`
(unitary `Q`, upper-triangular `R`) every time the channel changes, often every
few microseconds and per sub-carrier. Givens-rotation QR maps naturally onto
CORDIC units, but a CORDIC is a chain of dependent add/shift iterations: each
iteration has to wait for the sign of the previous `y` before it can start its
own carry propagation.

This RTL implements a QR pipeline built from **Sign-Select Lookahead CORDICs
(SSL-CORDIC)**. Within a group of 4 iterations it does not wait for the signs:
it computes every result the group *could* produce (one per sign pattern) in
parallel from the group input, each with a carry-save adder tree and a single
carry propagation. Multiplexers then pick the right candidates as the sign
bits (MSBs of `y`) become known. A whole 12-iteration CORDIC fits in one short
clock cycle, and one column of CORDICs forms one pipeline stage.

## Top level: `ssl_qrd`

```
ssl_qrd #(N=4, W=16, ITER=12, LA=4, G=4)
  clk, rst_n                     clock, synchronous active-low reset
  in_valid, h_re[N][N], h_im[N][N]   input matrix (W-bit signed integers)
  out_valid, r_re[N][N], r_im[N][N]  R, valid STAGES cycles later
```

* One matrix per clock cycle can be accepted. There is no back-pressure.
* Latency is `STAGES = sum_k (1 + ceil(log2(N-k)))` cycles: 3, 6 and 9 cycles
  for 2×2, 3×3 and 4×4. `in_valid` sampled at edge *t* gives `out_valid` high
  after edge *t+STAGES*.
* `R` has a real, non-negative diagonal. Elements below the diagonal and the
  imaginary parts of the diagonal are exact zeros. Because the CORDIC gain is
  compensated, `R` has the same scale as `H`, so `H = Q·R` holds for a unitary
  `Q`.
* Range: every column norm of `H` must stay below about `2^(W-1)/1.7`
  (≈19000 for W=16), or the results saturate. Random entries up to
  `19000/sqrt(2N)` in magnitude are always safe.
* Only `R` is produced. `Q^H·y` and the back substitution for `R^-1` are
  not part of this design.

## How the matrix is reduced

`R = Q^H·H` is built from unitary row operations, column by column. For column `k`:

1. **Phase stage.** Every row `r ≥ k` is multiplied by `exp(-j·arg h[r][k])`.
   An SSL-CORDIC vectors `(Re h[r][k], Im h[r][k])` to its magnitude, and the
   rest of the row's elements `(Re, Im)` are rotated by the same angle, as
   companion vectors. Column `k` is then real and non-negative.
2. **Elimination stages.** Rows `k..N-1` are paired as a binary tree. Level
   `l` pairs row `t` with row `t+2^l`. One SSL-CORDIC vectors the two real
   column-`k` values, which leaves their norm in row `t` and a zero in the
   partner row. It rotates the pairs `(Re a[t][j], Re a[p][j])` and
   `(Im a[t][j], Im a[p][j])` for `j > k`, which is a real Givens rotation
   applied to complex rows. Rows without a partner pass through.

The last column needs only its phase stage, done by a vectoring-only CORDIC.
For 2×2 this is exactly three CORDIC columns:

```
stage 0: SSL(h11 -> |h11|, rotate h12)   SSL(h21 -> |h21|, rotate h22)
stage 1: SSL(|h11|,|h21| -> r11; rotate (Re h12,Re h22) and (Im h12,Im h22))
stage 2: VEC(h22 -> r22 real)
```

For 4×4 the stages are: phase, pairs (0,1)(2,3), pair (0,2) | phase, pair
(1,2), pair (1,3) | phase, pair (2,3) | phase. That is 9 stages. The
binary-tree order is this design's choice. It is the schedule that gives 3, 6
and 9 cycles for 2×2, 3×3 and 4×4.

## The SSL-CORDIC (`ssl_cordic`, `ssl_group`, `la_cand`, `csa_tree`)

### Iterations

The iteration sequence starts with a ±90° step and then shifts from 0:

```
iteration 1:   x1 = -s1·y0                   y1 = s1·x0
iteration i≥2: xi = x(i-1) - si·2^-(i-2)·y(i-1)   yi = y(i-1) + si·2^-(i-2)·x(i-1)
```

In vectoring mode `si = +1` when `y(i-1)` is negative (its MSB is 1), and
`si = -1` otherwise. This drives `y` to zero. The 90° step first brings any
vector into the right half plane, so all four quadrants converge. With 12
iterations the last micro-rotation is `atan(2^-10)` ≈ 1e-3 rad, which sets
the precision, about 0.1 % of the vector length.

### Lookahead group (the hard part)

A group covers `LA` iterations (4 by default) starting at global iteration `F`.
Each micro-rotation is `I + s_m·t_m·J`, with `t_m = 2^-shift` and `J` the 90°
matrix (`J² = -I`); the 90° step is `s·J` alone. The product over the group
expands into one term per subset `S` of the group's iterations:

```
prod_m (I + s_m t_m J) = sum_S ( prod_{m in S} s_m t_m ) · J^|S|
J^|S| = (-1)^(|S|/2) I      for even |S|   -> x from x0, y from y0
      = (-1)^((|S|-1)/2) J  for odd  |S|   -> x from -y0, y from x0
```

Every term is therefore `±(x0 or y0) >>> (sum of the subset's shifts)`. For a
fixed sign pattern the sign and the shift of every term are fixed, so each
candidate is a sum of shifted, possibly complemented copies of the group
input. For the first group, only subsets containing the 90° step occur: 8
terms for `x4`, as in the 4-iteration lookahead matrix.

`la_cand` builds one such candidate. Subtracted terms are one's
complements, and their missing `+1`s go into one extra operand. All operands
are summed by `csa_tree`: 3:2 compressors, then a single carry-propagate
adder. Terms shifted past the word width are dropped. Each term is truncated
on its own, so a candidate can differ from the step-by-step CORDIC by a few
LSBs. This is why the datapath has 4 guard fraction bits.

`ssl_group` wires the candidates into the sign-selection chain:

| stage | computes | selected by |
|---|---|---|
| 1 | `y1` with one ordinary add (plain iteration) | MSB of `y0` |
| 2 | 4 candidates of `y2` | MSBs of `y0, y1` (4:1 mux) |
| 3 | 8 candidates of `y3` | MSBs of `y0..y2` (8:1 mux) |
| 4 | 16 candidates of `(x4, y4)`, and of every companion vector | MSBs of `y0..y3` (16:1 mux) |

All candidates depend only on the group input, so they are computed at the
same time. The serial part is only the mux chain, one mux level per sign. The
last stage acts as rotation mode: the companion vectors reuse the vectoring
signs, so no angle is computed and no arctangent table is needed.

`ssl_cordic` cascades `ceil(ITER/LA)` groups (3 × 4 by default; `LA=3` gives
4 × 3). It then multiplies by the constant `1/K`, with
`K = prod_{i=2..ITER} sqrt(1+2^-2(i-2))` ≈ 1.6468. It rounds and saturates the
result to W bits. `1/K` is computed at elaboration, in Q16. The unit also
outputs the 12 sign bits `sigma`, which encode the angle:
`atan2(y,x) = -sum_i (2·sigma[i-1]-1)·a_i`, where `a_1 = 90°` and
`a_i = atan(2^(2-i))`.

### Hardware size

The 4-step lookahead is fast because it is wide. Every companion vector needs
3 groups × 16 candidates × 2 components. A 4×4 pipeline holds 16 CORDICs with
48 companion vectors in total: about 6,700 candidate adders of up to 17
operands each. Choosing `LA=3` or `LA=2` trades speed for area in the same
way, and gives the same results within rounding.

## What follows the published architecture and what was chosen here

Follows it:
* the iteration recurrence with a leading 90° step;
* the 4-iteration sign-select lookahead structure: a plain first stage, 4/8/16
  CSA candidates, 4:1/8:1/16:1 muxes, and a final stage that selects (x, y);
* sign-bit sharing instead of an angle;
* 12 iterations per CORDIC;
* the 2×2 data flow (two SSLs, one SSL, one VEC);
* one CORDIC column per clock cycle, and the cycle counts 3/6/9.

Chosen here, because the source is silent:
* the 16-bit words, 2 guard integer bits and 4 guard fraction bits;
* gain compensation, rounding and saturation;
* the binary-tree elimination order for N > 2;
* the VEC unit built as an SSL-CORDIC without companions;
* a register after every stage, with valid-qualified loading;
* the synchronous active-low reset, and the in/out valid interface;
* dropping (not rounding) the over-width terms.

Not reproduced: the clock period, area and gate counts of a 0.25 µm
standard-cell implementation.

## Verification

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=… failures=…` line.

* `tb_csa_tree`: sums of 1, 3, 7 and 17 operands against plain addition.
* `tb_ssl_group`: first, middle and 3-step groups. The iterations are
  replayed in floating point with the block's signs. Each sign must agree with
  the exact `y`, and the outputs must match within 24 LSB of a 22-bit word.
* `tb_ssl_cordic`: LA=4 with 2 companions, LA=3 with 1, and vectoring-only.
  Magnitude, rotated companions and the angle from `sigma` are checked against
  `sqrt`, `atan2`, `sin` and `cos`, within 1.5e-3 of the length plus 4 LSB.
* `tb_qr_stage`: 3×3 elimination stages at both tree levels, and the
  vectoring-only phase stage, against a floating-point Givens model. It also
  checks the 1-cycle latency, the valid behaviour and that data holds when
  `in_valid` is low. It uses 8 iterations to keep the build small.
* `tb_ssl_qrd` with `qr_checker`: end-to-end runs of 2×2 (default CORDIC)
  and 3×3 (12 iterations, LA=2). Each `R` is compared with a floating-point
  modified Gram-Schmidt QR. The latency must be exactly 3 and 6 cycles, and
  there must be exact zeros below the diagonal. The stream mixes back-to-back
  and gapped inputs, plus identity, diagonal and real-first-column matrices.

The default 4×4 pipeline has been linted and elaborated, but **not
simulated**. Its Verilator model is several million lines of C++ and takes
too long to build. The largest simulated configurations are 3×3 (12
iterations, 2-step lookahead) and 2×2 with the default 12-iteration, 4-step
CORDIC. The 4×4 pipeline is made of the same stage kinds and generators as
those.

## Simulating

With plain Verilator 5 (all packages first):

```
verilator --binary --timing -j 4 -Wno-fatal --top-module tb_ssl_qrd \
  rtl/ssl_pkg.sv rtl/csa_tree.sv rtl/la_cand.sv rtl/ssl_group.sv \
  rtl/ssl_cordic.sv rtl/qr_stage.sv rtl/ssl_qrd.sv \
  tb/qr_checker.sv tb/tb_ssl_qrd.sv
./obj_dir/Vtb_ssl_qrd
```

The block testbenches need only the files below their block, for example
`rtl/ssl_pkg.sv rtl/csa_tree.sv rtl/la_cand.sv rtl/ssl_group.sv
tb/tb_ssl_group.sv`.

Parameters you may change:
* `N`: matrix size. The stage schedule is derived automatically.
* `ITER`: CORDIC iterations. More iterations give higher precision.
* `LA`: lookahead depth. It must leave no single-iteration group.
* `W`: data width.
* `G`: guard fraction bits.

Build time grows quickly with `N` and `LA`. For experiments, `LA=2` gives
the same numbers with a far smaller model.

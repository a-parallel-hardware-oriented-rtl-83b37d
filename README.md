# Constant matrix-vector multiplier with Winograd's inner product

This design computes `Y = A·X` fully in parallel. `A` is an M×N matrix of
constants fixed when the hardware is built. `X` is a data vector that changes
every cycle. A direct parallel build needs one multiplier per matrix element,
so M·N general multipliers. This design needs **N(M+1)/2**: 36 instead of 64
for the default 8×8 case. It pays for the saving with more adders. Most of
those adders add a constant, so they are cheap.

That trade suits FPGAs. Embedded multiplier blocks there are a scarce, fixed
resource, while adders are built from plentiful logic. Each multiplier in
this design is a general data×data multiplier, not a constant multiplier, so
it maps directly onto those blocks.

## The idea: Winograd's inner product

Each output is an inner product `y_m = Σ_n a_{m,n} x_n`. Pair the elements
two by two and expand one product of sums:

```
(a_{m,2k} + x_{2k+1}) (a_{m,2k+1} + x_{2k})
      = a_{m,2k} x_{2k} + a_{m,2k+1} x_{2k+1}     <- the two wanted terms
      + a_{m,2k} a_{m,2k+1}                        <- constants only
      + x_{2k} x_{2k+1}                            <- data only
```

Sum over k = 0 … N/2−1 and remove the two unwanted sums:

```
y_m = Σ_k (a_{m,2k} + x_{2k+1})(a_{m,2k+1} + x_{2k})  −  c_m  −  ξ
c_m = Σ_k a_{m,2k} · a_{m,2k+1}        constant, computed when the design is built
ξ   = Σ_k x_{2k} · x_{2k+1}            depends only on X, shared by all M rows
```

Each row now needs N/2 multiplications instead of N. The N/2 multiplications
for ξ are done once for the whole vector. That gives M·N/2 + N/2 = N(M+1)/2.
N must be even.

## Data flow

```
            x_1,x_3,..  ┌──────────────┐ s[k][m] = a_{m,2k} + x_{2k+1}
  X ─┬─ odd ──────────▶│ preadd ODD=0 │───────────────┐
     │                  └──────────────┘               ▼
     │      x_0,x_2,..  ┌──────────────┐ t[k][m]  ┌───────────┐ p[k][m] ┌─────────┐ rsum[m]
     ├─ even ─────────▶│ preadd ODD=1 │────────▶│ M·N/2 mul │───────▶│ M row   │──────┐
     │                  └──────────────┘          └───────────┘        │ adders  │      ▼
     │                                                                  └─────────┘ ┌────────────┐
     │                  ┌───────────────────────────────┐      ξ                   │ correction │─▶ Y
     └─────────────────▶│ ξ unit: N/2 mul + N/2-in add │─────────────────────────▶│ −c_m −ξ    │
                        └───────────────────────────────┘                           └────────────┘
```

| Module | Role | Count (M = N = 8) |
|---|---|---|
| `cmvp_preadd` (ODD_A = 0) | `s_m^(k) = a_{m,2k} + x_{2k+1}`: each odd data element is sent to M adders, one per row | M·N/2 constant adders (32) |
| `cmvp_preadd` (ODD_A = 1) | `t_m^(k) = a_{m,2k+1} + x_{2k}`: the same for the even data elements | M·N/2 constant adders (32) |
| `cmvp_mult_array` | `p = t · s`, element by element | M·N/2 multipliers (32) |
| `cmvp_row_sum` | `rsum_m = Σ_k p[k][m]` | M adders with N/2 inputs (8) |
| `cmvp_xi_unit` | `ξ = Σ_k x_{2k} x_{2k+1}` | N/2 multipliers (4), one N/2-input adder |
| `cmvp_correction` | `y_m = rsum_m − c_m − ξ` | M constant adders + M two-input adders |
| `cmvp_winograd` | top: registers, valid flags, wiring | |
| `cmvp_pkg` | width rules, demonstration matrix | |

In total there are M(N+1) adders with one constant input, M two-input
adders, M+1 adders with N/2 inputs, and N(M+1)/2 multipliers. The direct
method needs M·N multipliers and M adders with N inputs.

In the vector form of the algorithm, the products of the multiplier array are
a diagonal matrix `D = diag(s)` applied to the vector `t`. The row adders are
the summing matrix `Σ = 1_{1×N/2} ⊗ I_M`. The element index k·M + m used
there is the `[k][m]` order of the arrays between the modules.

Constants reach the pre-adders in a crossed pattern: the **odd** data
elements meet the **even** matrix columns, and the even elements meet the odd
columns. Swapping the two banks' inputs gives wrong results that still look
plausible, so this pairing is the first thing to check after a change.

## Number formats and word widths

The algorithm fixes no word widths, so the sizes below are choices of this
design. Data and coefficients are signed two's-complement integers, 16 bits
each by default. A fixed-point interpretation only moves the binary point
and changes no logic. The widths, with D = `DATA_W`, C = `COEF_W`:

| Signal | Width | Default |
|---|---|---|
| pre-add sums `s`, `t` | max(D, C) + 1 | 17 |
| products `p` | 2·(max(D, C) + 1) | 34 |
| row sums and correction | products + clog2(N) | 37 |
| ξ | 2·D + clog2(N) | 35 |
| output `y` | D + C + clog2(N) | 35 |

Every stage keeps full precision. The row sum and c_m can be larger than
y_m, because the product of sums contains the extra constant and data terms.
Both are subtracted again, so the final value always equals the exact
`Σ a·x`, which fits in D + C + clog2(N) bits. Two's-complement arithmetic is
exact modulo 2^width. Cutting the result to the output width therefore loses
nothing, even if the wide intermediate values wrapped.

The multipliers are 17×17 bits at the default widths, so each fits one
18×18 embedded multiplier block.

## Interface and timing (`cmvp_winograd`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low; clears the valid flags and the data registers |
| `in_valid` | in | 1 | `x` holds a vector this cycle |
| `x[N]` | in | N × DATA_W | data vector, signed |
| `out_valid` | out | 1 | `y` holds a result this cycle |
| `y[M]` | out | M × (D + C + clog2 N) | result vector, signed |

The whole arithmetic is one combinational stage between an input register
and an output register. A vector sampled on clock edge *t* appears on `y`
with `out_valid` after edge *t+2*. A new vector can be given every cycle, and
there is no back-pressure. A reset drops any vectors in flight. The register
stages are a choice of this design. Deeper pipelining would go between the
pre-adders and the multipliers, and between the multipliers and the row
adders; it is not built.

## Parameters and the constant matrix

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 8 | rows of A, length of Y |
| `N` | 8 | columns of A, length of X; must be even |
| `DATA_W` | 16 | bits per data element |
| `COEF_W` | 16 | bits per matrix element |
| `A_FLAT` | demonstration matrix | the matrix: `a_{m,n}` is the signed field `A_FLAT[(m*N+n)*COEF_W +: COEF_W]` |

The default matrix is a fixed pseudo-random pattern with no meaning of its
own. Element (m, n) takes the top COEF_W bits of
`(m·N + n + 1) · 0x9E3779B1 mod 2^32`. It exists so that the design
elaborates and can be tested on its own. In real use, pass the matrix through
`A_FLAT`. The demonstration generator needs M·N·COEF_W ≤ 65536 and
COEF_W ≤ 32; an explicit `A_FLAT` has no such limit. The constants c_m are
computed from `A_FLAT` during elaboration, so a new matrix only needs a new
parameter value.

## Verification

Each module has a self-checking testbench in `tb/`. The references are
worked out independently in 64-bit integers. Each testbench ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

- `tb_cmvp_preadd`, `tb_cmvp_mult_array`, `tb_cmvp_xi_unit`,
  `tb_cmvp_row_sum`: random and extreme operands (most negative, most
  positive, zero).
- `tb_cmvp_correction`: feeds row sums and ξ made by the Winograd identity
  and requires the output to equal the direct product `Σ a·x`. It also feeds
  arbitrary values and checks `rsum − c_m − ξ`.
- `tb_cmvp_winograd`: the whole design at its default parameters, 8×8 with
  16-bit data. The reference is the direct product, not the Winograd
  identity. It checks the two-cycle latency of every result. It counts, and
  requires, back-to-back vectors, bubbles, a reset with vectors in flight,
  and extreme vectors that give the largest |y|.
- `tb_cmvp_winograd_shapes`: three more shapes (3×6, 8×2, 5×10) with data
  narrower and wider than the coefficients, using the helper
  `cmvp_shape_runner`.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cmvp_pkg.sv tb/tb_cmvp_winograd.sv --top tb_cmvp_winograd
./obj_dir/Vtb_cmvp_winograd
```

All of them finish in well under a second.

## What follows the method and what is this design's own

Taken from the method:
- the Winograd formulation;
- the split of X into even and odd elements;
- the crossed pairing of data with matrix columns;
- the count and kind of every multiplier and adder;
- c_m computed in advance;
- one ξ shared by all rows.

Chosen here:
- all word widths and the signed integer format;
- the input and output registers;
- the valid handshake and the reset;
- the flat encoding of the matrix and the demonstration matrix;
- writing each multi-input adder as a plain sum, leaving its tree structure
  to synthesis.

The correction is built as a subtraction of c_m and ξ, which is what makes
the result equal `A·X`. A formulation that adds these terms works with their
negated values and gives the same hardware.

Not covered:
- odd N (the formula works on pairs of elements);
- pipelining inside the arithmetic;
- splitting the design over several devices.

Synthesis may merge a row's multipliers and adders into multiply-accumulate
cells. Whether it keeps the count of N(M+1)/2 multipliers depends on the
tool's mapping, so check it in the target tool's report.

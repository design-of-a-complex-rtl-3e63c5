# Complex multiplication as an 8-point cyclic convolution

This is a combinational multiplier for two complex numbers with unsigned N-bit real and
imaginary parts (N = 4 by default). It does not use the usual four real multipliers and two
adders. Each operand is rewritten as a polynomial of degree 7, and the product becomes a cyclic
convolution of the two coefficient vectors: a polynomial product modulo x^8 - 1. After that, the
circuit needs only tiny multipliers on N/4+1-bit coefficients, fixed power-of-two weights, and
multi-operand additions. The addition structure is the same whatever the operand width. This is
the decomposition of Skavantzos and Stouraitis, worked out down to gates for 4-bit operands.

For x = 5 + j11 and y = 12 + j9 the unit returns −39 + j177.

## The main idea: evaluating a polynomial at k = e^(jπ/4)

Take k = (1 + j)/√2, a primitive 8th root of unity, so k^8 = 1. Products of polynomials in k
therefore wrap around modulo x^8 − 1. The even powers of k are 1, j, −1 and −j. The odd powers,
scaled by √2/2, are (±1 ± j)/2.

Cut each part of x into four segments of S = N/4 bits: r3 r2 r1 r0 for the real part and i3 i2 i1 i0
for the imaginary part, most significant first. Then x = W(k), where

    W(k) = Σ_m a_m · w_m · k^m

The scale factors a_m and the coefficients w_m are:

| m | a_m | w_m |
|---|---|---|
| 0 | 2^(3S) | r3 |
| 1 | 2^(2S)·√2/2 | r2 + i2 |
| 2 | 2^(3S) | i3 |
| 3 | 2^(2S)·√2/2 | i2 − r2 |
| 4 | 2^S | −r1 |
| 5 | √2/2 | −(r0 + i0) |
| 6 | 2^S | −i1 |
| 7 | √2/2 | r0 − i0 |

Each pair of coefficients rebuilds one pair of segments. For example, the m = 5 and m = 7 terms
sum to r0 + j·i0. A coefficient is at most S+1 bits plus a sign. w0, w1 and w2 are never negative
and w4, w5 and w6 never positive, so only w3 and w7 have a data-dependent sign. Coefficients are
kept in sign-magnitude form.

The coefficients v_m of y are formed the same way. Then x·y = W(k)·V(k) mod (k^8 − 1). Write
that product as Q(k) = Σ c_i q_i k^i, with c_i = 1 for even i and √2/2 for odd i. Its
coefficients are

    q_i = Σ_j g_ij · w_((i−j) mod 8) · v_j,       g_ij = a_(i−j) · a_j / c_i.

Every g_ij is an exact power of two, from 2^−1 up to 2^(6S). So each q_i is a sum of eight small
signed products, each shifted by a fixed amount. For N = 4 the weight exponents are:

| q_i | j = 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| q0 | 6 | 1 | 4 | 1 | 2 | 1 | 4 | 1 |
| q1 | 5 | 5 | 3 | 3 | 1 | 1 | 3 | 3 |
| q2 | 6 | 3 | 6 | 1 | 2 | −1 | 2 | 1 |
| q3 | 5 | 5 | 5 | 5 | 1 | 1 | 1 | 1 |
| q4 | 4 | 3 | 6 | 3 | 4 | −1 | 2 | −1 |
| q5 | 3 | 3 | 5 | 5 | 3 | 3 | 1 | 1 |
| q6 | 4 | 1 | 4 | 3 | 4 | 1 | 4 | −1 |
| q7 | 3 | 3 | 3 | 3 | 3 | 3 | 3 | 3 |

Putting k back in gives the result:

    Re z = q0 − q4 + (q1 − q3 − q5 + q7)/2
    Im z = q2 − q6 + (q1 + q3 − q5 − q7)/2

### Why the datapath carries 2·q_i

Rows q2, q4 and q6 have weights of 2^−1. q2 and q6 can therefore be half-integers; only their
difference is always an integer. The hardware does not use fractions. Every q_i is carried as
P_i = 2·q_i, so each weight becomes a left shift of log2(g_ij) + 1 ≥ 0. The odd-index q_i are
multiples of 2^S, so P_odd/2 is an exact arithmetic shift. The final adders then form 2·Re z and
2·Im z, and drop the bit 0, which is always zero. The package function `g_shift()` derives all
shifts from the scale factors, so the same RTL works for any N that is a multiple of 4.

## Datapath

```
 xr,xi ──► cc_coeff ──► w[0..7] ─┐
                                 ├─► wv_products ──► z[8][8] ──► q_block ──► 2q[0..7] ──► pr_block ──► zr, zi
 yr,yi ──► cc_coeff ──► v[0..7] ─┘     (64 pp_mult)             (8 q_adder)            (2 × csa_tree + rca)
```

| stage | module | what it does |
|---|---|---|
| CC | `cc_coeff` | Turns segments into sign-magnitude coefficients. For N = 4 this is only two-input gates: \|w1\| = {r2·i2, r2⊕i2}, sign(w3) = r2·¬i2, \|w5\| = {r0·i0, r0⊕i0}, and so on. |
| WV | `wv_products`, `pp_mult` | Computes the 64 products z_ij = w_((i−j) mod 8)·v_j. Each magnitude product is at most 2×2 bits, and the sign is an XOR. |
| Q | `q_block`, `q_adder` | Computes one weighted 8-term signed sum per q_i (next section). |
| PR | `pr_block` | Two 6-operand Wallace trees, each followed by a ripple-carry adder. |
| helpers | `csa_tree`, `rca` | A K-operand carry-save tree built from full-adder rows, and a ripple-carry adder. |
| shared | `prns_pkg` | Derives the widths and the weight shifts from N. |

There is no clock, register or handshake. `prns_cmult` is one combinational cone, so a result is
valid one propagation delay after the inputs settle. Adding pipeline registers between CC/WV, Q
and PR would be the obvious change for a clocked system. Those are the natural cut points.

## The coefficient adders: sign steering instead of two's complement

Each partial product is a magnitude of a few bits with a sign bit. Converting all of them to
two's complement would need wide sign extension for very few non-zero bits. Instead, `q_adder`
does this:

1. It shifts each magnitude by its weight.
2. A demultiplexer controlled by the product's sign sends the shifted magnitude to a **positive
   group** or a **negative group**, and drives the other output with zero.
3. It adds each group separately, with a carry-save tree and then a ripple-carry adder.
4. It inverts the negative sum and adds it to the positive sum with carry-in 1. This subtracts in
   two's complement.

A product of two fixed-sign coefficients has a constant sign. One demultiplexer output is then
constantly zero, and synthesis removes it. So each group in the netlist contains only the terms
that can actually land there. Only products involving w3, w7, v3 or v7 are really steered.

Output widths come from `q_w(N)`, the largest possible |2·q_i| over all rows plus a sign bit.
That is 10 bits for N = 4.

## The final adders

`pr_block` computes 2·Re z = P0 + P1/2 − P3/2 − P4 − P5/2 + P7/2, and 2·Im z in the same way.
Each is a single 6-operand carry-save tree (three levels: 6 → 4 → 3 → 2) followed by a
ripple-carry adder.

Subtracted operands enter the tree inverted, and each inversion needs a +1 to complete the
negation. These three +1s are supplied without a seventh operand:

- One is the carry-in of the ripple-carry adder.
- The other two are forced into bit 0 of two added operands that are always even: q1 and q7 for the
  real part, q1 and q3 for the imaginary part.

## Interface and parameters

`prns_cmult #(N = 4)`

| port | dir | width | meaning |
|---|---|---|---|
| `xr`, `xi` | in | N | real and imaginary parts of x, unsigned |
| `yr`, `yi` | in | N | real and imaginary parts of y, unsigned |
| `zr` | out | 2N+2 | Re(x·y), two's complement |
| `zi` | out | 2N+2 | Im(x·y), two's complement, never negative |

N must be a multiple of 4. Widths inside the unit scale automatically with N:

- coefficients are N/4+1 bits;
- products are 2(N/4+1) bits;
- the 2·q_i values are `q_w(N)` bits.

At N = 4 the design is 64 small multipliers, 16 8-operand carry-save trees and two 6-operand
trees, with 1,757 word-level cells after generic synthesis and no flip-flops.

## Where this RTL departs from, or adds to, the published algorithm

- **Multiplier cells.** The algorithm names five hand-optimised multiplier types for N = 4. This
  RTL uses one generic cell: a magnitude product and a sign XOR. It computes the same function on
  every input that can occur. The magnitudes never exceed 2, so the special cases of the 2×2 type
  are covered.
- **Coefficient adders.** The published q_0 adder is a hand-placed array of full and half adders.
  This RTL uses the same grouping, sign steering and two's-complement step, with a regular
  word-level carry-save tree inside each group. The exact cell placement of that array is not
  reproduced.
- **Half-weight terms.** Carrying 2·q_i to handle the 2^−1 weights is this design's choice.
- **Final-adder corrections.** Injecting the +1 corrections in `pr_block` is also this design's
  choice.
- **Larger N.** Any N that is a multiple of 4 works. For N > 4 the coefficient formation uses
  small adders and a comparator instead of the N = 4 gate equations.
- **Not reproduced.** The published area estimate is about 223 full-adder equivalents and the
  delay about 19.4 full-adder delays. Neither figure is reproduced or checked here.

## Verification

Every module has a self-checking testbench in `tb/`. Expected values are computed independently
in `tb_ref_pkg`:

- coefficients come from the segment formulas;
- the weights g_ij are evaluated in floating point with √2;
- products are computed as plain integers.

| testbench | what it checks |
|---|---|
| `tb_prns_cmult` | The whole unit at default parameters. All 65,536 operand pairs for N = 4, and the worked example including its eight q_i values. It also counts, and requires at least once: a steered term going to the negative group and to the positive group, a non-zero 2^−1 term, a non-integer q_i, a negative real part and a zero real part. |
| `tb_prns_cmult_n8` | The whole unit at N = 8: corner values and 20,000 random operand pairs. |
| `tb_cc_coeff` | Coefficients for all 4-bit inputs and random 8-bit inputs. It also checks that Σ a_m w_m k^m rebuilds the operand. |
| `tb_pp_mult`, `tb_wv_products` | All products, plus the worked example's W and Z matrices. |
| `tb_q_adder`, `tb_q_block` | Each row's weights, the example's q vector, and random consistent inputs. |
| `tb_csa_tree`, `tb_rca` | Arithmetic identities for several sizes. |
| `tb_pr_block` | The example, all 4-bit operand pairs, and random 8-bit pairs, driven with reference q values. |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The design
is purely combinational, so there is no latency to check.

Simulating with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/prns_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_prns_cmult.sv --top-module tb_prns_cmult
./obj_dir/Vtb_prns_cmult
```

Replace the testbench name to run another test. Linting a module works the same way:
`verilator --lint-only -Wall -y rtl rtl/prns_pkg.sv rtl/prns_cmult.sv`. The remaining lint
warnings are intentional and harmless:

- unconnected carry-outs of adders whose result cannot overflow;
- the always-zero bit 0 of the doubled results.

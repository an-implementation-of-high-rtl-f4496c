# Genus-3 hyperelliptic curve scalar multiplier over GF(2^54)

This is a hardware engine for the core operation of hyperelliptic curve
cryptography: the scalar multiplication k·P. P is an element of the Jacobian
of a genus-3 curve over the binary field GF(2^54), and k is a 162-bit
integer. A genus-3 curve over a 54-bit field gives a group of about 2^162
elements. That is roughly the security of 160-bit elliptic-curve
cryptography, with operands only a third as long.

The engine never does polynomial arithmetic. Group addition and doubling are
written out as *explicit formulae*: straight-line sequences of field
multiplications, additions and one inversion. The hardware is therefore a
small number of field units, driven by two fixed schedules and a
double-and-add loop. It follows the organisation of J. Xu's FPGA genus-3
HECC processor, in its variant with *shared multipliers and inverter*.
Where this RTL departs from that design, the sections below say so.

```
                 k, P, naf_mode                                   r = k*P
                      |                                              ^
   +------------------v----------------------------------------------+----+
   | main_control  (scalar multiplication level)                          |
   |   naf_conv: NAF / binary digits of k      double-and-add loop         |
   +-------+-----------------------------------------+--------------------+
           | dbl_start / dbl_done                    | add_start / add_done
   +-------v-----------------+           +-----------v---------------------+
   | point_dbl                |           | point_add                        |
   |  schedule FSM, registers |           |  schedule FSM, registers         |
   |  4 lane adders (gf_add)  |           |  4 lane adders (gf_add)          |
   +-------+-----------------+           +-----------+---------------------+
           | fau_if                                  | fau_if
   +-------v-----------------------------------------v---------------------+
   | fau_shared  (field arithmetic level, owned by one point unit at a time)|
   |   gf_mul_lsd x4 (digit size 4, 16 clocks)      gf_inv (<= 213 clocks)  |
   +-----------------------------------------------------------------------+
```

## Field, curve and divisors

* **Field:** GF(2^54) in polynomial basis, reduced by F(x) = x^54 + x^9 + 1.
  An element is a 54-bit vector, and addition is XOR.
* **Curve:** y^2 + y = x^7 + x^5 + x^4 + x + 1. So h(x) = 1, and
  f5 = f4 = f1 = f0 = 1 while f6 = f3 = f2 = 0. The explicit formulae used
  here are written for h(x) = 1 and f6 = 0. The other coefficients are
  constants in `hecc_pkg`.
* **Divisors:** a reduced divisor of weight three is held in Mumford form
  (u, v). Here u = x^3 + u2·x^2 + u1·x + u0 is monic, and
  v = v2·x^2 + v1·x + v0. The type `divisor_t` in `hecc_pkg` packs
  {u2, u1, u0, v2, v1, v0}, which is 324 bits. Negation on this curve is
  (u, v + 1), so it flips bit 0 of v0.

## Field arithmetic level

**`gf_mul_lsd`: digit-serial multiplier.** It works least-significant digit
first. B is consumed four bits per clock. Each clock does three things:
- it adds A·B_i, a 4×54 carry-free product, into a 57-bit accumulator;
- it replaces A by A·x^4 mod F;
- it shifts B right by 4.

After ceil(54/4) = 14 digits, the accumulator is reduced once. With one load
clock and one reduction clock, a product takes exactly 16 clocks from the
`start` edge to `done`.

**`gf_inv`: inverter.** It uses the binary extended Euclidean algorithm, with
shifts and XORs only. It starts from u = a, v = F, b = 1, c = 0. Each step
does the following:
- it computes j = deg u − deg v;
- if j < 0, it swaps u with v and b with c;
- it sets u += v·x^|j| and b += c·x^|j|.

The loop stops at u = 1. Each step takes two clocks: one registers the two
degrees, and the other shifts and adds. At most 2·54 − 2 steps are needed,
so the latency is at most 213 clocks. Random inputs take about 100 to 150
clocks. The inverse of 0 is returned as 0.

**`gf_add`: adder.** It is 54 XOR gates. Each point unit has four of them,
one in front of the first operand of each multiplier. A multiplier can
therefore be fed a sum such as (inv0 + inv2) in the same clock.

**`fau_shared`: the shared field arithmetic unit.** It holds the four
multipliers and the inverter. A left-to-right double-and-add never needs a
doubling and an addition at once, so the two point units time-share this
unit:
- `sel` picks the owner, which is set by `main_control`;
- the owner's start pulses and operands are multiplexed in;
- `done` goes only to the owner.

The adders are not shared: a 54-bit XOR costs less than the multiplexer that
sharing it would need. The four multipliers always start together, and
unused lanes multiply zeros. Assertions check that nothing starts a busy
unit and that the four lanes stay in step.

## Point arithmetic level: the explicit-formula schedules

This is the part of the design that most needs explaining. Each point unit
is a state machine that runs one fixed *round* program:

1. **ISSUE.** Select up to four operand pairs, (ax + ay)·b, and pulse
   `mul_start`.
2. **WAIT.** Wait 16 clocks for `mul_done`, then store the products in named
   registers.
3. **Next round.** Go to the next round, or to the inversion.

A round costs 18 clocks. All additions of the formula are XORs of stored
products and inputs. A few feed the multipliers through the lane adders. The
rest are combinational `always_comb` terms where a value is formed. The
register and wire names are the variable names of the formula (M_ij, t_k,
T_k, inv_i, q_i, u_T,i, v_T,i, …). You can check the RTL against the formula
line by line.

**Doubling (`point_dbl`)** costs I + 11M + 11S. A squaring is just a
multiplication here. The schedule has nine rounds:

| round | products |
|---|---|
| R0 | uc0=a0², uc2=a1², uc4=a2², t0=c0² |
| R1 | t1=c1², t2=c2², t5=vc3² → then inversion T3 = 1/vc5 |
| R2 | uT1=T3², t4=vc4² |
| R3 | t6=uT1·t4, t7=uT1·t5 |
| R4 | (t9, T10, T11) = uT2·(uc4, vc5, vc4) |
| R5 | t12=vc4·uT0, t15=(vc4+vc5)·(uT0+uT1) |
| R6 | e2=vT3², t17=vT2² |
| R7 | t18=e2·uT2, t20=vT3·e1, t21=vT3·e2 |
| R8 | t19=vT3·e0 |

The result is u3 = (e2, e1, e0) and v3 = (t21+vT2, t20+vT1, t19+T16).
Here vc_i = f_i + (square terms), uT2 = t6 + uc4, uT0 = uc2 + t7 + t9, and
so on, as written in the `always_comb` block.

**Addition (`point_add`)** costs I + 57M + 6S, which is 63 products in
twenty rounds. The formula has nine steps:

1. An almost-inverse of u1 modulo u2, by Cramer's rule (rounds R0–R3).
2. The resultant r (R3–R4).
3. s'(x) = r·s(x) (R5–R6).
4. A single inversion of r·s'2. It yields 1/r, the leading coefficient s2
   and the monic s̄(x) (R7, inversion, R8–R9).
5. The intermediate u_T of degree 4 (R10–R13).
6. z = s̄·u1 (R10–R13).
7. v_T (R14–R15).
8. The reduced u3 (R16–R18).
9. The reduced v3 (R17–R19).

The source comments of `point_add.sv` list the products of each round.

**Exceptional cases.** The formulae cover the generic case only. A random
input fails with probability about 2^-54. A point unit stops and raises
`fail` when:
- in doubling, vc5 = f5 + a2² is zero;
- in addition, r = 0 (u1 and u2 share a root);
- in addition, r·s'2 = 0.

The general algorithm (Cantor's) that would handle these cases is not built.
The caller is expected to retry with other inputs.

## Scalar multiplication level

**`naf_conv`** stores k and, once, 3k = k + 2k. The non-adjacent form digit
i is s_i = (3k)_{i+1} − k_{i+1}. Every digit is then a two-bit function of
stored words, and `main_control` can walk the digits from the top down with
no carry chain. The unit also provides the plain binary digits.

**`main_control`** runs one of two methods, chosen by `naf_mode` at `start`:

* **`naf_mode = 1` (main method): left-to-right NAF double-and-add.** The
  leading non-zero digit (always +1) sets R = P. Each later digit doubles R
  and then, for a digit of ±1, adds ±P. A 162-bit scalar needs about 161
  doublings and 54 additions. Starting from P rather than from the neutral
  element keeps the neutral element away from the formulae, which cannot
  take it.
* **`naf_mode = 0`: right-to-left binary expansion.** B = P. For each bit
  k_i from the bottom, R = R + B when k_i = 1, and the first such bit simply
  copies B. Then B = 2B while higher bits remain. On the shared unit the
  addition and the doubling of one bit run one after the other.

`k = 0` ends at once with `fail`, because there is no weight-three result.

## Interface and timing of `hecc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low; samples `k`, `p`, `naf_mode` |
| `naf_mode` | in | 1 | 1: NAF left-to-right, 0: binary right-to-left |
| `k` | in | 162 | scalar |
| `p` | in | 324 | base divisor `divisor_t` (deg u = 3) |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; `r` and `fail` valid |
| `fail` | out | 1 | k = 0 or an exceptional case |
| `r` | out | 324 | k·P |

The following figures are measured in simulation. The reported figures are
those of the original state-machine design.

| operation | this RTL | reported |
|---|---|---|
| field multiplication | 16 clocks | 16 |
| field inversion | ≤ 213 clocks (about 100–150 typical) | 218 |
| point doubling | 250–300 clocks | 435 |
| point addition | 460–495 clocks | 817 |
| k·P, 162-bit k, NAF | 68,622 clocks (average of 6 random k; 66,800–70,700) | 52,461 (55,156 in another table), average over a set of scalars of unstated length |
| k·P, 162-bit k, binary | 84,868 clocks (same scalars) | not reported |

The schedules here are tighter than the original ones, which were not
published. The scalar length behind the reported total is not stated. At
the reported per-operation costs, that total matches a NAF scalar of about 74
bits rather than 162 (435 + 817/3 clocks per bit).

## Where this RTL departs from the original design, and what is its own

* **Round packing.** The round packing of both formulae, and the use of one
  register per stored product, are this RTL's own. The original used state
  machines with 14 intermediate registers, but its allocation is not
  published.
* **What is shared.** Only the multipliers and the inverter are shared.
  Each point unit keeps its own registers and adders. One summary of the
  original says the shared variant also shares the registers. Its detailed
  description and its block diagram keep them separate, and this RTL follows
  those.
* **Operand adders.** The four adders per point unit sit in front of the
  multiplier operands. The remaining additions are XOR terms.
* **Scalar width.** The 162-bit scalar width is inferred from the group
  order.
* **NAF digits.** They are read from 3k instead of a digit-serial carry
  recurrence. The digits are identical.
* **Inverter timing.** It takes two clocks per step, with a data-dependent
  latency.
* **Exceptional cases.** They raise `fail`. There is no fallback to Cantor's
  algorithm.
* **Handshakes.** The start/done pulses, the `fau_if` bundle and the reset
  style are this RTL's choices.
* **Reduction polynomial.** The original was evaluated with two
  polynomials without saying which one its figures use: the trinomial, and
  the 19-term x^54 + x^34 + x^32 + x^31 + x^30 + x^29 + x^27 + x^25 + x^21
  + x^18 + x^17 + x^16 + x^15 + x^13 + x^7 + x^4 + x^2 + x + 1. The
  trinomial is the default here. Both work through the `POLY` parameter of
  `hecc_top`, which is passed down to `fau_shared`, `gf_mul_lsd` and
  `gf_inv`. Only the reduction logic changes; the cycle counts stay the
  same.
* **Not built.** Two architectures are not built: the variant with separate
  field units per point operation, and the ROM/RAM instruction-driven
  variant.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* **Reference vectors.** The vectors in `tb_vectors_pkg` were computed with
  Cantor's general algorithm: polynomial extended GCD and reduction over
  GF(2^54). That is independent of the explicit formulae in the RTL. The
  random divisors are sums of three random curve points.
* **Field references.** Field results are compared with a bit-serial
  reference multiplier (`tb_gf_ref_pkg`). An inverse is checked by a·a⁻¹ = 1.
* **`tb_point_dbl`, `tb_point_add`.** The first checks twelve reference
  doublings. The second checks four reference sums, each in both operand
  orders. Both check the exceptional-case flags, and the cycle counts
  against 435 and 817.
* **`tb_main_control`.** It uses integer stand-ins for the point units. It
  checks the result, the exact number of doublings and additions expected
  from the digits of k in both modes, and the ownership of the field unit.
* **`tb_hecc_top`.** It runs the whole design at full size. It computes
  k·P for a 14-bit scalar in both modes, and for a random 162-bit scalar in
  NAF mode. It then runs an exceptional case and k = 0. It counts doublings,
  additions of +P and −P, binary-mode runs, hand-overs of the field unit and
  exceptional cases, and fails if any of them never occurred. It takes well
  under a second.
* **`tb_hecc_kset`.** It runs k·P for six random 162-bit scalars
  (`tb_kset_pkg`) in both modes, and reports the average clock count of
  each mode. The testbench derives the NAF digits itself, with the
  right-to-left recurrence. It checks each result, and checks that the
  design starts exactly one doubling per digit after the leading one and
  one addition per further non-zero digit.
* **`tb_hecc_poly19`.** It builds the multiplier, the inverter, a point
  adder and the whole top with the 19-term polynomial. It checks them
  against a reference multiplication and Cantor results computed in that
  field (`tb_vectors19_pkg`), including a 162-bit k·P in both modes.

To simulate with Verilator (5.x):

```
verilator --binary --assert -Irtl -Itb \
  rtl/hecc_pkg.sv tb/tb_vectors_pkg.sv rtl/fau_if.sv rtl/gf_add.sv \
  rtl/gf_mul_lsd.sv rtl/gf_inv.sv rtl/fau_shared.sv rtl/point_dbl.sv \
  rtl/point_add.sv rtl/naf_conv.sv rtl/main_control.sv rtl/hecc_top.sv \
  tb/tb_hecc_top.sv --top-module tb_hecc_top
./obj_dir/Vtb_hecc_top
```

Other testbenches need other packages:
- the field-level testbenches need `tb/tb_gf_ref_pkg.sv` in place of
  `tb/tb_vectors_pkg.sv`;
- `tb_hecc_poly19` needs `tb/tb_vectors19_pkg.sv`;
- `tb_hecc_kset` needs `tb/tb_vectors_pkg.sv` and `tb/tb_kset_pkg.sv`.

## Changing the design

* **Another curve.** Change `CURVE_F0`…`CURVE_F5` in `hecc_pkg`. The
  formulae assume h(x) = 1 and a zero x^6 coefficient, so keep those.
* **Another reduction polynomial.** Set `POLY` on `hecc_top` (the terms
  below x^54), or change the default `POLY_LOW` in `hecc_pkg`. The field
  degree `N` is used throughout. A different degree also needs new test
  vectors.
* **Digit size.** `DIGIT` sets the multiplier's digit size. The latency
  becomes ceil(54/D) + 2 clocks, and the schedules adapt by themselves,
  because they wait for `done`.
* **Scalar width.** `KBITS` sets the width of the scalar.

## Files

`rtl/`: `hecc_pkg` (constants and types), `fau_if` (the field-unit
bundle), `gf_add`, `gf_mul_lsd`, `gf_inv`, `fau_shared`, `point_dbl`,
`point_add`, `naf_conv`, `main_control`, `hecc_top`.

`tb/`: one `tb_<module>` per module, plus the workload testbenches
`tb_hecc_kset` and `tb_hecc_poly19`, and the packages `tb_gf_ref_pkg`,
`tb_vectors_pkg`, `tb_vectors19_pkg` and `tb_kset_pkg`.

# Elliptic-curve point multiplication over GF(2^m): two processors

This RTL computes the elliptic-curve scalar multiplication Q = k·P, the core
operation of ECC key generation and key exchange, on binary curves

    y² + xy = x³ + ax² + b      over GF(2^m), polynomial basis

It contains two processors that solve the same problem with different
trade-offs between clock-cycle count and critical path:

| processor | multipliers | cycles per ladder step | cycles for m = 163 |
|-----------|-------------|------------------------|--------------------|
| **LLECC** (`llecc_processor`), low latency | 3 × full-precision, single-cycle | 2 | 448 |
| **HPECC** (`hpecc_processor`), high clock rate | 1 × segmented, two-stage pipelined | 6 | 1129 |

`ecc_top` places both side by side. They share only the clock and the reset.
The default field is GF(2^163) with f(x) = x^163 + x^7 + x^6 + x^3 + 1. The
width `M` and the low terms `POLY` of the reduction polynomial are parameters.

## Algorithm

Both processors use the Lopez–Dahab Montgomery ladder in projective
coordinates. Only X and Z are tracked, so no inversion is needed inside the
loop. The ladder keeps two points P1 = (X1:Z1) and P2 = (X2:Z2), and their
difference is always P. Each iteration, for scalar bit kᵢ, does one addition
and one doubling:

    A = P1, D = P2 if kᵢ = 1;   A = P2, D = P1 if kᵢ = 0
    Madd    ZA' = (XA·ZD + XD·ZA)²          XA' = x·ZA' + (XA·ZD)(XD·ZA)
    Mdouble ZD' = XD²·ZD²                   XD' = XD⁴ + b·ZD⁴

One iteration therefore costs six multiplications, some squarings and some
additions. The ladder starts from (P1, P2) = (P, 2P) = (x : 1, x⁴ + b : x²).
It runs over bits k[m-2] … k[0], so **k[m-1] must be 1**. A scalar below the
group order n can be brought to this form by adding n, or 2n, before use.

The affine result comes from one inversion:

    T  = (x·Z1·Z2)⁻¹
    xk = X1·(x·Z2)·T
    yk = (x + xk)·[(X1 + x·Z1)(X2 + x·Z2) + (x² + y)·Z1·Z2]·T + y

This takes ten multiplications, six additions and one squaring. The list of
steps is in `ecc_pkg::conv_prog`, and both processors run it.

If Z1 = 0 after the ladder, k·P is the point at infinity. The `q_inf` output
is then set, and `qx`/`qy` are meaningless. The curve constant `a` does not
appear in any of these formulas, so there is no `a` input.

### Inversion (`gf2m_inv`)

The inversion uses the Itoh–Tsujii method: a⁻¹ = a^(2^m − 2). Let
βₖ = a^(2^k − 1). Then β_(i+j) = β_i^(2^j) · β_j. The unit works in two phases:

1. It builds β₁, β₂, β₄, … up to β_(2^t), where t = ⌊log₂(m−1)⌋. It saves
   each β_(2^i) whose bit i is set in m−1 in a small local memory.
2. It joins the lower set bits of m−1, from the highest down.

The last multiplication's output goes through a squarer in the same cycle.
This gives β_(m−1)² = a⁻¹ without an extra step. The method needs
⌊log₂(m−1)⌋ + h(m−1) − 1 multiplications, where h is the Hamming weight:
9 for m = 163 and 13 for m = 571.

The repeated squarings go through a quad-squarer, two per cycle. A single
squaring takes one cycle. For m = 163 there are 81 squaring cycles. The
multiplier sits outside the unit, on ports `mul_a`/`mul_b`/`mul_p`, so a
processor can lend the unit its own multiplier. Parameter `MUL_LAT` gives the
multiplier's latency in cycles: 0 for LLECC, 2 for HPECC. Each multiplication
step therefore lasts `MUL_LAT + 1` cycles. The inversion takes
81 + 9 = 90 cycles in LLECC and 81 + 27 = 108 cycles in HPECC.

## LLECC: three single-cycle multipliers, two cycles per step

`llecc_ladder` holds X1, Z1, X2 and Z2 in local registers. It also holds
three `gf2m_mult` instances, each a full product in one cycle. Squarers and
adders sit directly on the multiplier inputs and outputs, so one ladder
iteration takes two cycles:

| step | multiplier 0 | multiplier 1 | multiplier 2 | written at the edge |
|------|--------------|--------------|--------------|---------------------|
| 0 | XA·ZD | XD·ZA | XD²·ZD² | ZA' = (p0+p1)², ZD' = p2; keep p0, p1, XD⁴, ZD⁴ |
| 1 | x·ZA' | p0·p1 (kept) | b·ZD⁴ | XA' = p0+p1, XD' = XD⁴ + p2 |

The critical path is multiplier → adder → squarer → register.

`llecc_ctrl` is an FSM. It emits one control word (`ecc_pkg::llecc_ctrl_t`)
per cycle. Its phases, in cycles for m = 163:

| phase | cycles | what happens |
|-------|--------|--------------|
| INIT | 5 | write x, y, b to main memory; Z2 = x², X2 = x⁴ + b |
| LOAD | 4 | load X1 = x, Z1 = 1, X2 and Z2 into the ladder registers |
| LOOP | 2·(m−1) = 324 | ladder iterations |
| STORE | 4 | write X1, Z1, X2, Z2 back to main memory |
| CONV | 111 | 17 field operations, 1 + 90 + 1 for the inversion, 2 outputs |

The total is 448 cycles. During conversion and inversion, multiplier 0 of the
ladder is lent to the rest of the processor. Main memory (`ecc_regfile`) has
16 words, two asynchronous read ports and one write port. The word map is in
`ecc_pkg`.

## HPECC: one pipelined multiplier, six cycles per step

`gf2m_mult_seg` cuts operand b into `SEGS` segments (default 4). Stage 1 forms
the partial products a·bₛ in parallel and registers them, without reduction.
Stage 2 aligns them, adds them, reduces the sum and registers the result. A
new product can start every cycle, and it appears two cycles later. The
segment width decides which stage is longer.

Around the multiplier there is one squarer, one quad-squarer and two adders.
There are also four registers: R1 and R2 for the two cross products, R6 for
(XA·ZD)(XD·ZA), and Q1 for XD⁴. The quad-square therefore never goes through
main memory. The coordinates themselves stay in main memory, which is why
HPECC has no load/store phases.

This is the hardest part of the design to follow. `hpecc_ctrl` issues one
multiplication per cycle. The last two results of an iteration arrive while
the next iteration has already started. The orderings below make every
operand ready in time:

* p is the pair doubled in the previous iteration. Its X was written in slot
  5, so it is already in memory.
* q is the pair added in the previous iteration. Its X is still being formed
  in the adder.
* For the first iteration, p = P1 and q = P2.

| slot | issued | result arriving → action |
|------|--------|--------------------------|
| s0 | Xp·Zq | (XA·ZD)(XD·ZA) of the previous iteration → R6 |
| s1 | Xq·Zp, Xq taken from the adder output (bypass) | x·ZA of the previous iteration; + R6 → X of the previous A |
| s2 | XD·ZD | Xp·Zq → R1 |
| s3 | b·(ZD)⁴ | Xq·Zp → R2; (R1 + it)² → ZA' |
| s4 | R1·R2; Q1 ← XD⁴ | XD·ZD; squared → ZD' |
| s5 | x·ZA' | b·ZD⁴; + Q1 → XD' |

{Xp·Zq, Xq·Zp} is the same pair of products as {XA·ZD, XD·ZA}. Because Madd
is symmetric in them, the order does not depend on the scalar bit.

Each slot needs at most two memory reads and one memory write. Two drain
cycles after the last iteration complete the last X of the added pair.

Initialisation takes 5 cycles. It writes x, b, X1 = x, Z2 = x² and
X2 = x⁴ + b. Until Z1 is first written, reads of Z1 return 1. The y
coordinate is written at the start of conversion. In conversion each
multiplication takes 3 cycles, issue to write-back. The total for m = 163 is
5 + 972 + 2 + 150 = 1129 cycles.

## Interface of each processor

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control state |
| `start` | in | 1 | accepted when `busy` is low |
| `x`, `y` | in | M | affine base point P |
| `b` | in | M | curve constant |
| `k` | in | M | scalar, with k[M−1] = 1 |
| `busy` | out | 1 | high from the cycle after `start` until the result is written |
| `done` | out | 1 | one-cycle pulse; `qx`, `qy`, `q_inf` are valid from then on |
| `qx`, `qy`, `q_inf` | out | M, M, 1 | k·P, or the infinity flag |

Hold `x`, `y`, `b` and `k` stable while `busy` is high. They are read during
the run, not captured at `start`, except for k. Only control state is reset:
data registers and main memory are always written before they are read. In
`ecc_top` the ports of the two processors carry the prefixes `ll_` and `hp_`.

## Where this differs from the published cycle counts

The processors were published with 450 cycles (LLECC) and 1119 cycles (HPECC)
for m = 163, and 3783 cycles for HPECC at m = 571. Several counts match
exactly:

* the phase lengths: 5 init, 4 load, 2·(m−1) or 6·(m−1) loop, 4 store
* the inversion: 81 squaring cycles plus 9 multiplications of 1 or 3 cycles
* the operation mix of the conversion

The internal schedule of the conversion was not given, and this design's own
schedule gives different totals:

* **LLECC: 448 instead of 450.** Besides its 17 field operations, the
  conversion here spends only 4 cycles: inversion start, inversion result
  write, and two outputs. The published count has 6.
* **HPECC: 1129 instead of 1119.** The conversion runs its multiplications
  one after another, 3 cycles each, instead of overlapping independent ones
  in the pipeline. The pipeline drain is 2 cycles instead of 3. The extra
  3 inversion cycles of the published count are not reproduced. For m = 571
  the schedule gives 3793 cycles instead of 3783.

The following are this design's own choices:

* the reduction polynomial
* the segment count
* the main-memory size and ports
* the order of operations inside the iterations
* the handshake

The FPGA results (Virtex-4/5/7 clock rates) are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/ecc_pkg.sv` | defaults, memory map, control-word types, conversion program |
| `rtl/gf2m_add.sv`, `gf2m_sqr.sv`, `gf2m_quad.sv`, `gf2m_reduce.sv` | field addition, squaring, quad-squaring, reduction |
| `rtl/gf2m_mult.sv` | single-cycle full-precision multiplier |
| `rtl/gf2m_mult_seg.sv` | segmented two-stage pipelined multiplier |
| `rtl/gf2m_inv.sv` | Itoh–Tsujii inversion unit |
| `rtl/ecc_regfile.sv` | main memory |
| `rtl/llecc_ladder.sv`, `llecc_ctrl.sv`, `llecc_processor.sv` | LLECC |
| `rtl/hpecc_ctrl.sv`, `hpecc_processor.sv` | HPECC |
| `rtl/ecc_top.sv` | both processors side by side |
| `tb/gf_ref_pkg.sv` | independent reference arithmetic and curve constants |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. The reference model in `gf_ref_pkg` does
not share code with the RTL. It multiplies least-significant bit first,
inverts by Fermat's little theorem, and does affine double-and-add on the
NIST B-163 and K-163 curves. For example, the end-to-end test of both
processors at full size:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ecc_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/ecc_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecc_top.sv
    ./obj_dir/Vtb_ecc_top

`tb_ecc_top` runs both processors together on three scalars:

* a random scalar on B-163
* a random scalar on K-163
* the B-163 group order, which must give the point at infinity

It checks both results and both latencies. It also counts how often each
mechanism was used, and fails if one was never used: the ladder step for
either bit, local loads and stores, the lent multiplier, the HPECC bypass,
the drain and the Z1 = 1 read, and the single and double squarings of the
inversion. `tb_hpecc_m571` runs HPECC at m = 571, the larger field of the
published results. It uses a random curve and point and an
extended-Euclid reference. The unit testbenches cover each arithmetic block
against the reference, the pipeline timing of the segmented multiplier, the
phase lengths and slot-by-slot write addresses of both controllers, and one
ladder iteration for both bit values.

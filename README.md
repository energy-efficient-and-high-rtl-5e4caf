# RoBA: a rounding-based approximate multiplier

A multiplier spends most of its area and energy on the array of partial
products. RoBA ("rounding-based approximate") removes that array. Each operand
is rounded to its nearest power of two, `Ar = 2^sa` and `Br = 2^sb`, and the
exact identity

    A*B = (Ar - A)(Br - B) + Ar*B + Br*A - Ar*Br

is evaluated without its first term:

    P = Ar*B + Br*A - Ar*Br = (B << sa) + (A << sb) - (Ar << sb)

The dropped term is the product of the two rounding errors, so it is small
whenever the operands are close to powers of two. What remains is three
shifts, one addition and one subtraction. The whole circuit is combinational.

This repository holds synthesizable SystemVerilog for the multiplier in its
three forms (unsigned, signed with exact negation, and signed with cheaper
approximate negation), plus self-checking testbenches that compare every
output against an integer reference model.

## How accurate it is

The result's error is exactly `-(Ar - A)(Br - B)`. So:

- If both operands are rounded the same way (both up or both down), the result
  is **below** the exact product.
- If one operand is rounded up and the other down, the result is **above** it.
- If either operand is already a power of two, the result is exact.

The worst case is when both operands lie halfway between two powers of two,
`A = 3*2^k`, `B = 3*2^m`. Each is then off by a third of its value, and the
relative error is `(1/3)*(1/3) = 1/9`, or 11.1 %. The testbenches confirm, over
all 8-bit operand pairs, that the error never goes above 1/9 and that it reaches
1/9 (144 pairs for signed 8-bit). The mean relative error over all 8-bit pairs
is about 2.8 %.

The approximate-negation form (AS-RoBA, below) adds a further error of about
one unit for each negated operand and for a negated result. That error matters
only for small magnitudes. Its worst case is 100 %, for an operand of -1: its
approximate magnitude is 0, so the product collapses. Over all 8-bit pairs the
extra mean error is about 2.9 %. For a random sample of 16-bit pairs it is
about 0.01 %.

## Rounding to the nearest power of two

This is the one block with any subtlety (`rtl/rounding.sv`). Let `k` be the
position of the leading one of the magnitude `x`. The candidates are `2^k`
and `2^(k+1)`, and their midpoint is `3*2^(k-1)`, the value with bits `k` and
`k-1` set and all lower bits clear.

- Below the midpoint (bit `k-1` clear) the value rounds down to `2^k`.
- Above the midpoint it rounds up to `2^(k+1)`.
- **At** the midpoint both choices are equally near, and both give the same
  worst-case error. The block rounds up, so bit `k-1` alone decides and the
  lower bits need not be looked at. This gives smaller logic.
- The exception is `x = 3` (`k = 1`), which rounds **down** to 2.
- Zero stays zero.

Per output bit this becomes: bit `j` of the one-hot result `xr` is set if the
leading one is at `j` and bit `j-1` is clear (or `j < 2`), or if the leading one
is at `j-1`, bit `j-2` is set and `j-1 >= 2`. A prefix-OR chain finds the
leading one. The block also encodes `xr` into its exponent `shamt`, which drives
the shifters. An N-bit value can round up to `2^N`, so `xr` has N+1 bits and
`shamt` has `clog2(N+1)` bits (5 bits for N = 16).

Examples: 90 → 64, 145 → 128, 4280 → 4096, 3960 → 4096, 6 → 8, 3 → 2, 255 → 256.

## Datapath

```
 a ─┬─ modulus ── am ─┬─ rounding ── ar, sa ─┐
    │                 │                      │
 b ─┼─ modulus ── bm ─┼─ rounding ── br, sb ─┤
    │                 │                      ▼
    │      barrel_shifter: bm << sa  = Ar*B  ─┐
    │      barrel_shifter: am << sb  = Br*A  ─┴─ kogge_stone_adder ─┐
    │      barrel_shifter: ar << sb  = Ar*Br ──────── subtractor ◄──┘
    │                                                     │ umag (2N bits)
    └─ sign_detector (a[N-1] ^ b[N-1]) ── neg ──► sign_set ──► p
```

| Module | Role |
|---|---|
| `roba_pkg` | `roba_variant_e`: `U_ROBA`, `S_ROBA`, `AS_ROBA` |
| `modulus` | operand magnitude; `~x + 1`, or `~x` when `EXACT = 0` |
| `rounding` | nearest power of two, as one-hot value and exponent |
| `barrel_shifter` | `data << shamt` in `clog2` multiplexer stages; `en = 0` gives 0 (used when the rounded factor is zero) |
| `kogge_stone_adder` | parallel-prefix adder, `log2 W` levels |
| `subtractor` | `a + ~b + 1` on the Kogge-Stone adder |
| `sign_detector` | product sign, `a_msb ^ b_msb` |
| `sign_set` | negates the result when `neg`; `~x + 1`, or `~x` when `EXACT = 0` |
| `roba_multiplier` | the top level: it wires the blocks above and selects the form |

The shifted terms, their sum and the difference are `2N+1` bits wide. The sum
`Ar*B + Br*A` of the unsigned form can exceed `2^(2N)`. The final difference
always fits in `2N` bits. An assertion in the top level checks that the top
bit, the adder carry and the subtractor borrow are always zero.

## The three forms

`roba_multiplier` has two parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 8 | operand width; the product is `2N` bits |
| `VARIANT` | `S_ROBA` | `U_ROBA`, `S_ROBA` or `AS_ROBA` |

- **S-RoBA** (default): two's complement operands. Magnitudes are taken
  exactly, the unsigned product is computed, and `sign_set` negates it exactly
  when the operand signs differ. Its error is the same as U-RoBA's for the
  same magnitudes.
- **AS-RoBA**: as S-RoBA, but both negations drop the `+1` (one's complement).
  This shortens the path by an incrementer at each end, at the cost of the
  error described above. A negative result comes out one lower than the
  S-RoBA result. A zero product with a negative sign comes out as -1.
- **U-RoBA**: unsigned operands. There is no modulus, no sign detector and no
  sign set. Rounded values can reach `2^N` (for example 255 → 256).

The form is fixed when the design is built. To get more than one form,
instantiate more than one multiplier.

## Interface and timing

```
roba_multiplier #(.N(8), .VARIANT(roba_pkg::S_ROBA)) u_mul (
  .a(a),   // [N-1:0]   operand A
  .b(b),   // [N-1:0]   operand B
  .p(p)    // [2N-1:0]  approximate A*B
);
```

There is no clock, reset or handshake. `p` is valid one propagation delay after
`a` or `b` changes. The critical path runs through the modulus incrementer,
the leading-one chain of the rounding block, `clog2(N+1)` shifter stages, two
`log2(2N+1)`-level prefix adders, and the output incrementer. To run the
design at a higher clock rate, add registers around it or between the
shifters and the adder.

## Worked example (N = 16)

For `4280 x 3960`, both operands round to 4096 (`sa = sb = 12`):

| Signal | Value |
|---|---|
| `Ar*B` (`arb`) | 16 220 160 |
| `Br*A` (`bra`) | 17 530 880 |
| `Ar*Br` (`arbr`) | 16 777 216 |
| `p` | 16 973 824 (exact: 16 948 800, error +0.15 %) |

Other 16-bit products checked this way: `21767 x 3925 = 86 355 968` and
`26176 x 30507 = 783 646 720`. With `90 x 145` (rounded to 64 and 128), the
result is 12 608; the exact product is 13 050.

## Verification

Every module has a testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` at the end. Each testbench has a watchdog.
`tb/roba_ref_pkg.sv` is the reference model. It finds the nearest power of two
by comparing distances to every candidate, not by the bit rule, and it
computes the product in 64-bit integers.

| Testbench | What it covers |
|---|---|
| `tb_rounding` | every 8-bit and 16-bit input |
| `tb_modulus`, `tb_sign_detector`, `tb_sign_set` | exhaustive or edge and random values, exact and approximate forms |
| `tb_barrel_shifter`, `tb_kogge_stone_adder`, `tb_subtractor` | exhaustive at small widths, edge cases (full carry ripple), random values |
| `tb_roba_multiplier` | all 8-bit pairs in all three forms; the 16-bit worked examples, including internal products and exponents; 20 000 random 16-bit pairs; the 1/9 bound; a count of each mechanism (round up, round down, halfway rounded up, 3 → 2, zero operand, negated product, two negative operands, result above, below and equal to the exact product, worst-case error, AS-RoBA -1 operand), each of which must occur |
| `tb_roba_full` | the default build (8-bit S-RoBA, no parameter overrides), all 65 536 pairs, with the 1/9 bound |
| `tb_roba_error_workload` | maximum and mean error of each form over all 8-bit pairs; checks 1/9 for U- and S-RoBA, 100 % (only with a -1 operand) for AS-RoBA, and that AS-RoBA's extra error shrinks from 8 to 16 bits |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/roba_pkg.sv tb/roba_ref_pkg.sv -y rtl -y tb +libext+.sv \
  tb/tb_roba_multiplier.sv --top-module tb_roba_multiplier -o sim
./obj_dir/sim
```

Each testbench finishes in under a second.

## Where this RTL makes its own choices

These points are not fixed by the algorithm. They were chosen here:

- **Product width.** The product is `2N` bits, as in the 16-bit examples above
  (32-bit results).
- **Form selection.** The form is a build-time parameter, not a run-time mode
  input. The unsigned form drops the sign blocks altogether.
- **AS-RoBA.** The `+1` is dropped in both the operand and the result
  negation. This is what makes an operand of -1 give a 100 % error.
- **Block structure.** The one-hot-plus-exponent output of the rounding block,
  the shifter enable, the internal `2N+1`-bit width and the subtractor built
  on the Kogge-Stone adder are all implementation choices.
- **Sign of a zero product.** The sign detector looks only at the operand
  MSBs. A zero operand times a negative operand therefore gives -1 in AS-RoBA
  (0 in S-RoBA).
- **No pipelining.** The design has no registers, clock or reset.

## Numbers that do not follow from the equation

Some published example values for this multiplier do not agree with
`Ar*B + Br*A - Ar*Br`, and the RTL does not reproduce them:

- For `4280 x 3960`, a result of 17 498 112 appears alongside a sum
  `Ar*B + Br*A` of 34 275 328. Both are 2^19 above what the equation gives
  (33 751 040 and 16 973 824). The products `Ar*B`, `Br*A` and `Ar*Br` and the
  shift of 12 do agree.
- For `32767 x 32575`, a result of 1 066 860 544 appears. That is 2^19 below
  the equation's 1 067 384 832.
- A table of 8-bit examples lists results for the pair `-210, 165` that match
  no choice of rounding. Both values are also outside the 8-bit range.

The RTL follows the equation.

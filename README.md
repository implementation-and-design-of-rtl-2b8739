# 128-bit parallel-prefix MAC unit and single precision floating-point unit

A multiply-accumulate (MAC) unit repeats one step, `acc <- acc + a * b`, and
so computes dot products `sum(A_i * B_i)` for filters, transforms and
convolutions. This design makes that step wide and fast: two 128-bit
operands are multiplied into a 256-bit product, the product is added to the
accumulator by a 256-bit **parallel prefix adder** whose carry network is
only log2 deep, and the 257-bit sum is stored in a parallel-in parallel-out
register. Every clock edge with `en` high does one complete MAC step.

Beside the integer MAC sits a **single precision floating-point unit**
(IEEE 754 binary32 format) that adds, subtracts and multiplies, with four
rounding modes and the flags sNaN, qNaN, Inf and Ine. Its multiplier path is
the "single precision multiplier" of the original description. The two
units share clock and reset only; they are not connected to each other.

```
                 128          128
   mac_a ────────┐    ┌──────── mac_b
                 ▼    ▼
            ┌──────────────┐
            │ m1 precise_128│  256-bit product (combinational)
            └──────┬───────┘
                   ▼ 256
            ┌──────────────┐◄──── acc[255:0]  (feedback)
            │ a1 adder_256 │  parallel prefix, cin = 0
            └──────┬───────┘
                   ▼ 257
            ┌──────────────┐
            │ a2 accum     │  PIPO register, en / clr
            └──────┬───────┘
                   ▼ 257
                 mac_y
```

## The MAC datapath (`mac_128`)

| instance | module        | function                                   |
|----------|---------------|--------------------------------------------|
| `m1`     | `precise_128` | `y[255:0] = a[127:0] * b[127:0]`, unsigned |
| `a1`     | `adder_256`   | `y[256:0] = a[255:0] + b[255:0]`           |
| `a2`     | `accum`       | `y[256:0] <= a[256:0]` when `en`           |

The operands come straight from the top-level ports. The original
description says they are read from a memory but gives no size or
organisation for it, so none is built; such a memory would drive
`mac_a`/`mac_b`.

Timing: the operands present before a rising edge with `en = 1` are
multiplied and added in the same cycle; the new accumulator value is on
`y` right after that edge. `clr = 1` clears the accumulator on the edge
(it wins over `en`); `rst_n = 0` clears it at once. With `en = 0` it holds.

**Width of the running sum.** Only the low 256 accumulator bits are fed
back into the adder. The accumulator therefore holds the dot product
modulo 2^256 in `y[255:0]`, and `y[256]` is the carry-out of the most
recent addition, i.e. it says that this step wrapped. It is not sticky: the
next step without a wrap clears it. A product of two 128-bit numbers can
reach almost 2^256, so two full-scale terms can already wrap; an
application that needs the exact sum must keep the operands small enough,
or count the carry bits itself. This feedback width is taken from the
original design's netlist; keeping a larger accumulator would be a change
to the design.

`precise_128` cuts `b` into four 32-bit digits, forms four 160-bit partial
products and adds them at their digit positions. Only the function of this
multiplier is given by the original description, so this is the simplest
structure that does it; a synthesis tool is free to rebuild it.

## The parallel prefix adder (`adder_256`)

An N-bit adder (N = 256 by default, any N works) in three stages:

1. **Pre-computation.** For every bit, generate `g_i = a_i & b_i` and
   propagate `p_i = a_i ^ b_i`. The carry-in becomes an extra column -1
   with `g_-1 = cin`, so the prefix tree delivers carries that already
   include it.
2. **Prefix stage.** Group signals are combined with the operator
   `(G, P)_hi o (G, P)_lo = (G_hi | P_hi & G_lo, P_hi & P_lo)`.
   A *black cell* (`pp_black_cell`) computes both halves; a *gray cell*
   (`pp_gray_cell`) computes only `G`. The network is Kogge-Stone: at level
   `l` each column combines with the column `2^l` to its right, for
   `ceil(log2(N+1))` levels (9 for N = 256). A column whose group already
   reaches the carry-in column only needs its `G` from then on, so the
   cell that completes it is a gray cell and columns already complete pass
   straight through.
3. **Final computation.** `s_i = p_i ^ G_{i-1:-1}` and
   `cout = G_{N-1:-1}`, giving the N+1-bit result `{cout, sum}`.

Kogge-Stone has the smallest depth and fan-out of the classic prefix
networks at the price of the most cells and wires (about N·log2 N cells).
The original description names several topologies (Kogge-Stone, Sklansky,
Brent-Kung, Han-Carlson, Knowles, sparse Kogge-Stone) without fixing one for
the MAC; the dense Kogge-Stone default is this implementation's choice.

**Sparse form (`SPARSE = 1`).** The one prefix adder the original
description details at cell level is a sparse Kogge-Stone adder: the tree
produces only every fourth carry and 4-bit ripple-carry blocks of full
adders (`pp_full_adder`) finish the sum. With `SPARSE = 1`, `adder_256`
builds exactly that: two levels of black cells reduce each 4-bit block to
one group (G, P), the Kogge-Stone tree runs over the N/4 block columns plus
the carry-in column, and block k ripples from the tree's carry into bit 4k.
A 16-bit instance uses 16 full adders. This roughly quarters the prefix
cells and trades them for a four-full-adder ripple at the end. N must be a
multiple of 4. The MAC instantiates the dense default; pass
`.SPARSE(1'b1)` to `a1` in `mac_128.sv` to switch.

## The floating-point unit (`fpu_sp`)

Operands are 32-bit: sign in bit 31, 8-bit exponent in bits 30:23 with bias
127, 23-bit fraction in bits 22:0.

```
 opa, opb ─┬─► fpu_pre_norm_addsub ─► fpu_addsub ─────────┐
           ├─► fpu_pre_norm_mul ───► fpu_mul24 (2 cycles) ─┼─► fpu_post_norm ─► result, zero
           └─► fpu_except ─────────────────────────────────┘   (rmode)           snan qnan inf ine
```

| signal   | encoding |
|----------|----------|
| `op`     | 0 add, 1 subtract, 2 multiply (3 also multiplies) |
| `rmode`  | 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf |

**Pipeline.** Three register stages, one new operation per cycle:

| edge | what is registered |
|------|--------------------|
| 1 | pre-normalised operands of both paths, exception decision |
| 2 | add/sub magnitude and sign; the two 24x12 partial products of the multiplier |
| 3 | final result and flags, after the multiplier's second cycle and the post-normaliser |

An operation sampled with `start = 1` at edge k appears with `ready = 1`
after edge k+2. `ready` follows `start`; there is no back-pressure.

**One internal number format.** Both paths hand the post-normaliser the
same thing: a sign, a signed 12-bit exponent `E` and a 50-bit raw
significand `M`, meaning `(-1)^s * M * 2^(E - 127 - 48)`. Bit 48 of `M` is
the hidden-bit position at exponent `E`; bit 49 catches a carry.

- *Multiply:* `M = {ma * mb, 2'b00}` where `ma`, `mb` are the 24-bit
  significands with hidden bit, and `E = ea + eb - 127`.
- *Add/subtract:* the operands are ordered by magnitude; the larger
  significand sits at `M[48:25]`, the smaller is shifted right by the
  exponent difference, and every bit that falls off the bottom is ORed into
  bit 0 (sticky). `E` is the larger exponent. With 25 bits below the
  significand, a subtraction that cancels many leading bits (possible only
  when the exponents differ by 0 or 1) is still exact, and one that loses
  bits to the sticky cancels at most one leading bit.

Subnormal inputs are read with exponent 1 and hidden bit 0, so no special
path is needed for them.

**Post-normalise and round (`fpu_post_norm`).** A leading-zero count moves
the leading one to bit 49. If that would push the exponent below 1, the
shift stops at exponent 1 (a right shift with sticky when `E` is negative),
which yields a subnormal result — gradual underflow. The top 24 bits are
the significand, the next bit is the guard bit, everything below is ORed
into the sticky bit. The four rounded candidates (nearest-even, truncate,
up for positive, up for negative) are formed in parallel and `rmode`
selects one. A carry out of rounding bumps the exponent; a subnormal that
rounds up to 2^-126 becomes normal on its own. At exponent 255 or more the
result is infinity, or the largest finite number when the mode rounds
toward zero for that sign.

**Exceptions (`fpu_except`) and flags.**

| case | result |
|------|--------|
| any NaN operand | quiet NaN `0x7FC00000` |
| inf - inf (effective), 0 * inf | quiet NaN `0x7FC00000` |
| other infinite operand | infinity with the IEEE sign |
| exact zero sum of opposite signs | +0, or -0 in mode 3 |

- `snan`: an operand is a signalling NaN (exponent all ones, fraction MSB 0);
  a quiet NaN has the fraction MSB set.
- `qnan`: the result is a NaN.
- `inf`: the result is an infinity (from an operand or from overflow).
- `ine`: the rounded result differs from the exact one (includes overflow).
- `zero`: the result is +0 or -0.

Every NaN result is the one canonical quiet NaN; NaN payloads are not
propagated. Division, which the block diagram of the original design
mentions next to multiplication, is not described there and is not built.

## Where this RTL departs from, or adds to, the original description

- Reset and clear of the accumulator, the adder carry-in port and the
  unsigned reading of the MAC operands are additions.
- The original description is inconsistent about the MAC output: one
  drawing takes it from the accumulator, the netlist from the adder. Here
  `mac_y` is the accumulator.
- Dense Kogge-Stone prefix network in the MAC (the topology is left open
  there); the sparse form with 4-bit ripple blocks that it details is
  available through `SPARSE` but not used by default.
- The floating-point significand adder is 50 bits wide instead of 24 so
  that guard and sticky information survive alignment.
- Pipelining, encodings of `op` and `rmode`, the canonical NaN,
  subnormal support and the `ready` output are this
  implementation's choices. Only the two-cycle multiplier is given.
- The modified Wallace multiplier and the carry save adder that the
  original work compares against are baselines and are not part of this
  design.

## Size

Coarse synthesis (yosys, word-level cells) of the top: about 5,400 cells
and 640 flip-flop bits. The 256-bit Kogge-Stone adder alone is about
5,100 one-bit cells; the 128-bit multiplier is kept as four word-level
multipliers and the real gate count depends on how the target maps them.
No timing or FPGA figures are claimed for this RTL.

## Files

| file | content |
|------|---------|
| `rtl/pp_mac_top.sv` | top: MAC and FPU side by side |
| `rtl/mac_128.sv` | MAC datapath (`m1`, `a1`, `a2`) |
| `rtl/precise_128.sv` | 128 x 128 multiplier |
| `rtl/adder_256.sv` | parallel prefix adder, parameter `N` |
| `rtl/pp_black_cell.sv`, `rtl/pp_gray_cell.sv` | prefix cells |
| `rtl/pp_full_adder.sv` | full adder of the sparse form's ripple blocks |
| `rtl/accum.sv` | PIPO accumulator, parameter `W` |
| `rtl/fpu_pkg.sv` | FPU types, encodings, operand classification |
| `rtl/fpu_sp.sv` | pipelined FPU |
| `rtl/fpu_pre_norm_addsub.sv`, `rtl/fpu_pre_norm_mul.sv` | pre-normalisers |
| `rtl/fpu_addsub.sv`, `rtl/fpu_mul24.sv` | significand adder/subtractor, 2-cycle multiplier |
| `rtl/fpu_post_norm.sv`, `rtl/fpu_except.sv` | normalise/round, exceptions |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/fp_ref_pkg.sv` | exact floating-point reference model for the testbenches |

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. Expected values are computed independently:
integer results with the simulator's own wide arithmetic, floating-point
results by `fp_ref_pkg`, which forms the exact sum or product as a
320-bit integer times a power of two and rounds it once. Operand
generators favour zeros, infinities, both NaN kinds, subnormals, extreme
exponents and near-cancellation. The 8-bit instance of the prefix adder
is checked exhaustively (all 2^17 input combinations), and the sparse form
is checked against the dense one at 256 and 8 bits.

`tb_pp_mac_top` runs the top at its default sizes: 40 dot products of
random length, some with all-ones operands that make the sum wrap, with
holds and clears, while the FPU takes an operation almost every cycle. It
counts every mechanism (accumulate, hold, clear, wrap; add, subtract,
multiply, each rounding mode, subnormal and zero results, overflow, NaN,
sNaN, infinity, inexact, back-to-back issue) and fails if one never
occurred. Result latency is checked in the FPU and MAC testbenches.

Not verified: timing closure at any clock frequency, and gate-level
behaviour.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_pp_mac_top.sv --top-module tb_pp_mac_top
./obj_dir/Vtb_pp_mac_top
```

Replace `tb_pp_mac_top` by any other `tb_<module>` to test one block. The
packages are listed first because they are imported, not instantiated.

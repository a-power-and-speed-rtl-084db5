# RoBA: a rounding-based approximate multiplier and MAC unit

A full multiplier spends most of its area and energy on reducing partial
products. The rounding-based approximate (RoBA) multiplier avoids that work.
It rounds each operand to its nearest power of two, `Ar` and `Br`, and uses

    A * B  ~=  Ar*B + Br*A - Ar*Br

Each of the three products on the right has a power-of-two factor, so each is
a left shift. The product therefore costs three shifts, one addition and one
subtraction. The result is exact when either operand is a power of two. In
general the error is

    A*B - (Ar*B + Br*A - Ar*Br) = (A - Ar)(B - Br)

Over all non-zero 8-bit unsigned operand pairs, the mean relative error is
about 2.9% and the worst is 11.1% (3 x 3 gives 8).

The repository has the multiplier (`roba_multiplier`) and a multiply-accumulate
unit built on it (`roba_mac`, the top level). Both are SystemVerilog-2017 and
synthesizable.

## Datapath of the multiplier

```
 a, b ──► sign_detector x2 ──► |A|, |B| ─────────────────────────────┐
               │                   │                                 │
               │                   └──► rounding x2 ──► Ar, ka, Br, kb
               │                                              │
               │            shifters:  Br*A = |A| << kb  ◄────┤
               │                       Ar*B = |B| << ka  ◄────┤
               │                       Ar*Br = Ar << kb  ◄────┘
               │                              │
               │     (Br*A + Ar*B) ── prefix_adder ──► subtractor (- Ar*Br)
               │                                              │
               └────────── signs ──────────────────────► sign_set ──► p
```

The whole multiplier is combinational:

| stage | module | what it does |
|---|---|---|
| 1 | `sign_detector` (x2) | The operand's MSB is its sign. A negative operand is negated in two's complement to give the magnitude \|A\|. |
| 2 | `rounding` (x2) | Rounds \|A\| to the one-hot `Ar` and gives its exponent `ka` (`Ar = 2^ka`). |
| 3 | `barrel_shifter` (x3) | `Br*A = abs(A) << kb`, `Ar*B = abs(B) << ka` and `Ar*Br = Ar << kb`. A zero rounded value forces a zero product. |
| 4 | `prefix_adder` | Adds `Br*A + Ar*B`. |
| 5 | `subtractor` | Subtracts `Ar*Br`. Internally this is `a + ~b + 1` on the same prefix adder. |
| 6 | `sign_set` | Negates the magnitude when exactly one operand was negative. |

### The rounding rule

The rounding rule is the subtle part of the multiplier. Output bit `i` of the
rounded value is set when every input bit above `i` is zero and one of these
holds:

- `x[i] = 1` and `x[i-1] = 0`: the value lies in `[2^i, 1.5*2^i)`, so it rounds down to `2^i`;
- `x[i] = 0` and `x[i-1] = x[i-2] = 1`: the value lies in `[1.5*2^(i-1), 2^i)`, so it rounds up to `2^i`.

Bits outside the word read as zero. For example, 46 (`0101110`) becomes 32,
and 48 (`0110000`), the exact half-way point between 32 and 64, becomes 64.
The half-way value `3*2^(k-2)` always rounds up. That tie rule keeps the logic
to these two cases.

Rounding up can carry out of the word. For example, an unsigned 255 becomes
256. The rounded value is therefore `N+1` bits wide, and the exponent needs
`clog2(N+1)` bits.

### Widths

With `N`-bit operands:

- `Br*A` and `Ar*B` are each below `2^(2N)`;
- their sum, and `Ar*Br` (up to `2^(2N)`), need `2N+1` bits.

The internal datapath, and so the product port `p`, is therefore `2N+1` bits
wide. At the default `N = 8` that is 17 bits.

The difference is never negative. Rounding up never moves an operand by more
than a quarter of its rounded value, so the subtractor never borrows. The
adder's carry-out and the subtractor's borrow are computed but left unused.

### The parallel-prefix adder

`prefix_adder` is a Kogge-Stone tree. First, every bit forms its generate and
propagate signals. Then `clog2(W)` levels combine them using

    G[i:j] = G[i:k] | P[i:k] & G[k-1:j]
    P[i:j] = P[i:k] & P[k-1:j]

and the sum is `S[i] = p[i] ^ G[i-1:0]`. The carry-in is folded into bit 0's
generate. The same adder is used in the multiplier, in the subtractor and in
the accumulator.

## The MAC unit

```
 a,b ─► roba_multiplier ─ prod ─► accumulator (prefix_adder + register) ─► acc
                                         ▲                         │
                                         └──────── feedback ───────┘
```

On each rising edge with `en` high, `acc <= acc + prod`. The product is
sign-extended to the accumulator width.

- `clr` empties the register synchronously and has priority over `en`.
- `rst_n` empties it asynchronously.
- A product applied in cycle `t` shows up in `acc` right after the edge that
  ends cycle `t`.
- The unit accepts one product per cycle.
- The sum wraps modulo `2^ACC_W`.

### Ports of `roba_mac`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `clr` | in | 1 | clear the sum at the next edge |
| `en` | in | 1 | add this cycle's product at the next edge |
| `a`, `b` | in | N | operands; two's complement when `SIGNED = 1` |
| `prod` | out | 2N+1 | approximate product of the current `a`, `b` (combinational) |
| `acc` | out | ACC_W | running sum |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | operand width |
| `SIGNED` | 1 | 1: signed operands, with the sign detector and sign set active; 0: unsigned operands |
| `ACC_W` | 2N+1+8 = 25 | accumulator width; 8 guard bits hold 256 worst-case unsigned products, or 1024 signed ones (largest signed 8-bit magnitude is 2^14) |

## Where this RTL makes its own choices

- **Operand width.** The default is 8 bits with a 17-bit product, the size at
  which the design was simulated and implemented on an FPGA. The design is
  also described as a 64-bit multiplier. Set `N = 64` for that; the
  multiplier's testbench checks that size.
- **Signed and unsigned.** The method works for both. The signed datapath
  above is the default. `SIGNED = 0` removes the sign handling and gives the
  unsigned multiplier. No other variant is built.
- **Own choices.** These are not fixed by the method:
  - forming \|A\| by two's-complement negation (-128 gives 128);
  - the two's-complement product output;
  - the Kogge-Stone tree, out of the possible parallel-prefix adders;
  - the logarithmic barrel shifters;
  - the binary exponent output of `rounding`;
  - the accumulator width, its wrap-around, and the `en`, `clr` and reset
    controls.
- **No pipelining.** The multiplier is one combinational path, and the MAC
  adds one register stage.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
ends by printing `TB_RESULT checks=<n> failures=<m>`. The expected values come
from behavioural models that share no logic with the RTL:

- the rounding model finds `k` with `2^k <= x < 2^(k+1)` and compares `2x`
  with `3*2^k`;
- the products are formed with `*`, not with shifts.

| testbench | what it covers |
|---|---|
| `sign_detector_tb` | all 256 8-bit values, signed and unsigned |
| `rounding_tb` | all 8-bit inputs, hand-worked ties, random 16-bit inputs |
| `barrel_shifter_tb`, `prefix_adder_tb`, `subtractor_tb`, `sign_set_tb` | random operands and corner cases (full carry chains; 17 and 64 bits for the adder) |
| `roba_multiplier_tb` | all 65,536 8-bit pairs, signed and unsigned; exactness for power-of-two operands; hand-worked values (36 x 120 gives 4352, 46 x 35 gives 1568, -128 x -128 gives 16384); random pairs at N = 16 and N = 64 |
| `accumulator_tb` | 3000 random cycles of add, hold and clear, including wrap-around, checked after every edge |
| `roba_mac_tb` | end-to-end at the default size, described below |

`roba_mac_tb` runs the top at its default parameters:

- 2000 random cycles;
- a 3x3 smoothing kernel (1 2 1 / 2 4 2 / 1 2 1) and a 3x3 sharpening kernel
  (centre 9, neighbours -1) as dot products over a generated 8x8 image of
  7-bit pixels.

It checks `prod` every cycle and `acc` after every edge. It also counts how
often each mechanism happens: accumulate, hold, clear, negative product,
operand rounded up, operand rounded down, and exact product. If any of them
never happens, the test fails.

The smoothing weights are powers of two, so that kernel is computed exactly.
The sharpening kernel's weight 9 rounds to 8, and the mean absolute error per
output pixel is then about 11.

Full-range 8-bit pixels (0 to 255) do not fit the default signed 8-bit
operands. Use `N = 9`, or `SIGNED = 0` for kernels without negative weights.
`roba_image_tb` does the first. It builds the MAC with `N = 9` and filters a
16x16 image of full-range pixels with both kernels (196 output pixels each),
checking every raw sum against the model:

- Smoothing stays exact.
- Sharpening comes out at about 20 dB PSNR against exact convolution, after
  scaling and clamping to 0..255.

Running a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module roba_mac_tb tb/roba_mac_tb.sv
./obj_dir/Vroba_mac_tb
```

All testbenches finish in a few seconds.

## Files

- `rtl/sign_detector.sv`, `rtl/rounding.sv`, `rtl/barrel_shifter.sv`,
  `rtl/prefix_adder.sv`, `rtl/subtractor.sv`, `rtl/sign_set.sv`: the
  multiplier's stages
- `rtl/roba_multiplier.sv`: the multiplier
- `rtl/accumulator.sv`: register and adder
- `rtl/roba_mac.sv`: the top-level MAC unit
- `tb/*_tb.sv`: one testbench per module

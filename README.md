# Split classical/Montgomery multiplier over GF(2^n)

A bit-serial polynomial-basis multiplier for binary fields GF(2^n) normally
takes one coefficient of the operand `a` per clock cycle, so a product costs
n cycles. Two such serial multipliers are well known:

* the **classical** one walks `a` from the most significant coefficient down,
  shifting its partial result left and reducing whenever a coefficient falls
  off the top;
* the **Montgomery** one walks `a` from the least significant coefficient up,
  shifting its partial result right and adding `f(x)` whenever the bottom
  coefficient is 1, so that the result comes out scaled by x^-n.

Both compute the same polynomial product, only from opposite ends. This design
runs them **at the same time on the two halves of `a`**: the classical half
eats `a_{n-1}, a_{n-2}, ...` while the Montgomery half eats `a_0, a_1, ...`.
They meet in the middle after ceil(n/2) cycles, and the XOR of the two
partial results is the product. The price is a second n-bit result register
and a second reduction network; the gain is a 2x shorter multiplication.
Because the field multiplier dominates the run time of elliptic-curve point
arithmetic, that speed-up carries over almost entirely to a scalar
multiplier built around it.

The field size n is fixed when the design is built (parameter `N`, default
163). The field polynomial f(x) is an input, so one build serves every
degree-n polynomial (any irreducible one, or in fact any with f_0 = 1).

## The arithmetic

Write `a = a_hi * x^M + a_lo`, with

* `M = floor(n/2)` low coefficients in `a_lo` (the Montgomery half),
* `K = ceil(n/2)` high coefficients in `a_hi` (the classical half).

After K cycles the classical register holds `rc = a_hi * b mod f`. After M
cycles the Montgomery register holds `rm = a_lo * b * x^-M mod f`. Hence

    r = rc xor rm = (a_hi * x^M + a_lo) * b * x^-M = a * b * x^-M   (mod f)

So the output is the product scaled by x^-M, the same kind of scaling a
Montgomery multiplier has, but with half the exponent. For odd n, K = M + 1:
the classical half needs one more cycle, during which the Montgomery half
idles.

### Working with the x^-M scaling

Represent each field element a by `M(a) = a * x^M mod f`. Then the
multiplier maps `M(a), M(b)` to `M(a) M(b) x^-M = M(ab)`, so whole
computations (point additions, doublings, inversion by exponentiation) can
run in this representation without ever correcting the scale. Conversions
are ordinary multiplications:

* into the representation: multiply `a` by the constant `x^(2M) mod f`;
* out of it: multiply `M(a)` by `1`.

Additions are XORs and are unaffected by the scaling. The constant
`x^(2M) mod f` depends only on f and is computed once, off line, by whoever
drives the multiplier.

## One iteration of each half

Field elements are n-bit vectors, bit i = coefficient of x^i. The input `f`
holds f_0 ... f_{n-1}; the leading f_n = 1 is implicit.

**Classical half** (`gf2n_classical_core`), coefficient `a_i`, i falling:

    rc <- (rc << 1) xor (rc[n-1] ? f : 0) xor (a_i ? b : 0)

The bit shifted out of position n-1 stands for x^n, which equals
f_{n-1} x^{n-1} + ... + f_0 modulo f; hence the XOR with `f`.

**Montgomery half** (`gf2n_montgomery_core`), coefficient `a_i`, i rising:

    t  = rm xor (a_i ? b : 0)
    t' = t  xor (t[0] ? f(x) : 0)      -- bit 0 becomes 0 because f_0 = 1
    rm <- t' / x                        -- shift right by one

`f(x)` here includes its x^n term. That term never sits in an n-bit register:
after the right shift it lands in bit n-1, so the new top bit is simply
`t[0]`. Only `f[n-1:1]` is read; `f[0]` is taken to be 1, which holds for
every irreducible f.

Both iterations are one clock cycle each, built from an n-bit shift, two
n-bit AND/XOR layers and a register; there is no carry chain, so the clock
rate does not depend on n beyond fan-out of the top/bottom bit.

## Block structure

    gf2n_modified_mult            top: operand registers, result XOR
    ├── gf2n_mult_ctrl            two-state sequencer, iteration counter
    ├── gf2n_classical_core       rc register + MSB-first step
    └── gf2n_montgomery_core      rm register + LSB-first step
    gf2n_pkg                      K/M split functions, state type

The operand `a` is captured into two shift registers: `a_hi` (K bits) shifts
left and presents its top bit to the classical half; `a_lo` (M bits) shifts
right and presents its bit 0 to the Montgomery half. `b` and `f` are
captured alongside and held for the whole operation, so the input buses may
change as soon as the start has been accepted.

## Interface and timing of `gf2n_modified_mult`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1 | clock |
| `rst_n` | in  | 1 | asynchronous active-low reset |
| `start` | in  | 1 | begin a product; sampled only while idle |
| `a`,`b` | in  | N | operands |
| `f`     | in  | N | f_0..f_{n-1} of the field polynomial (f_n = 1 implicit, f_0 must be 1) |
| `busy`  | out | 1 | iterations in progress |
| `done`  | out | 1 | one-cycle pulse: `r` holds the new result |
| `r`     | out | N | `a*b*x^-M mod f`, held until the next start |

Cycle by cycle, with edge 0 the rising edge that samples `start = 1` while
idle:

* edge 0: `a`, `b`, `f` captured; both result registers cleared.
* edges 1..K: one iteration per edge; `busy` is high in the cycles before
  them. The Montgomery half steps on edges 1..M only.
* `done` is high in the cycle after edge K (i.e. K+1 edges after edge 0);
  `r` is valid from then on.
* A `start` that is high in the `done` cycle is accepted at once, so products
  can run back to back every K+1 cycles. A `start` while busy is ignored.

At the default N = 163: K = 82, M = 81, one product every 83 cycles,
against 163 (+1) for either serial multiplier alone.

`r` is the XOR of the two result registers, so it is a register output
followed by one XOR level.

## Parameters and sizes

`N` (default 163) is the only parameter. Any N >= 2 works; the testbenches
run 8, 96, 163, 192, 233, 283, 304 and 384. Cost grows linearly: 5N flip-flops
(two result registers, `b`, `f` and the split `a`) plus a few for the
counter, and per half two N-bit layers of AND/XOR gates.

## What is this design's own choice

The split of `a`, the two iteration rules, the ceil(n/2) cycle count and the
x^-floor(n/2) scaling are the published method. These are choices made here
where it is silent:

* an explicit load cycle in front of the K iterations, with operand
  registers for `a`, `b` and `f`;
* the start/busy/done handshake, ignoring start while busy, and holding `r`
  until the next start;
* for odd n, the Montgomery half idles in the *last* cycle;
* asynchronous active-low reset of all state to zero;
* the field size is a build-time parameter, not selectable at run time.

Not included: the elliptic-curve scalar (point) multiplier for which this
field multiplier was made. Its point-arithmetic schedule, register file and
control were not specified, so only the field multiplier is provided here;
its ports are the top-level ports. Nor are the stand-alone classical and
Montgomery multipliers included as separate designs, though either core fed
all n coefficients of `a` is exactly that multiplier.

## Verification

Each testbench is self-checking and prints one line
`TB_RESULT checks=<n> failures=<n>`. The reference model
(`tb/gf2n_ref_pkg.sv`) forms the full carry-less product and reduces it by
long division from the top degree down, independently of the hardware's
interleaved reduction. Results scaled by x^-k are checked without any
inverse, as `r * x^k == a * b (mod f)`.

| testbench | what it covers |
|-----------|----------------|
| `tb_gf2n_classical_core` | n=163, full MSB-first runs against `a*b mod f`, NIST-style pentanomial and random f; hold and clear |
| `tb_gf2n_montgomery_core` | n=163, LSB-first runs of k = 1..n steps against `a_lo*b*x^-k`; hold and clear |
| `tb_gf2n_mult_ctrl` | n=163 and n=8: step counts, Montgomery-first ordering, idle cycle for odd n only, done latency, ignored and back-to-back starts |
| `tb_gf2n_modified_mult` | top at its default n=163: random products, latency K+1, representation round trip (in, multiply, out), starts while busy, back-to-back products; counts that both halves actually reduce |
| `tb_gf2n_field_sizes` | top built at n = 8, 96, 163, 192, 233, 283, 304, 384: products and latency at each size |

The field polynomials used for n = 163, 233, 283 are the standard binary-field
ones x^163+x^7+x^6+x^3+1, x^233+x^74+1 and x^283+x^12+x^7+x^5+1; other sizes
use random polynomials with f_0 = 1, for which the checked congruence holds
just the same.

## Simulating

All sources are plain SystemVerilog; packages must come first. For example,
the top-level test with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/gf2n_pkg.sv tb/gf2n_ref_pkg.sv tb/tb_gf2n_modified_mult.sv \
        --top-module tb_gf2n_modified_mult
    ./obj_dir/Vtb_gf2n_modified_mult

Swap the testbench file and `--top-module` for the others; `-y rtl -y tb`
lets Verilator find the remaining modules by file name. To change the field
size, set `N` on `gf2n_modified_mult`; the controller and both cores follow.
Lint with `verilator --lint-only -Wall rtl/gf2n_pkg.sv rtl/<module>.sv -y rtl`.
Two lint warnings remain by design: `f[0]` is unread in the Montgomery core,
and `rst_n` is used both as an asynchronous reset and to disable an
assertion.

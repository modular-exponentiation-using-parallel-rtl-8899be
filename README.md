# Radix-2^17 Montgomery modular exponentiator on a semi-systolic multiplier array

This is RTL for a hardware unit that computes `C^E mod M` for a 1024-bit odd
modulus. RSA encryption and decryption are built on this operation. The whole
exponentiation is a chain of modular multiplications. These run on a
*semi-systolic array* of small processing elements, one per 17-bit digit. Each
element has one 17x17 multiplier, the size of the dedicated multiplier blocks
in FPGAs of the Virtex-II generation. The radix is therefore beta = 2^17.

Three ideas keep the array fast:

* **Montgomery multiplication.** Modular reduction is folded into the
  multiplication one digit at a time. No division is needed, only shifts by
  one digit.
* **Orup's quotient simplification.** The modulus is scaled so that the
  quotient digit of each step is simply the lowest digit of the running sum.
  The dependent "compute q" multiplication disappears from the loop.
* **Carry-save accumulation.** Each element keeps its own carry instead of
  propagating it across all 63 digits. Every cycle's additions are therefore
  17 bits wide.

The result is one digit iteration every two cycles, with one multiplier per
digit doing useful work in every cycle.

## The arithmetic

Let `beta = 2^17` and `N` be the number of digits (62 for a 1024-bit modulus),
and let `R = beta^N`. For an odd modulus `M`:

* `m' = -M^-1 mod beta` (a 17-bit constant);
* the scaled modulus is `Mt = M * m'`. It satisfies `Mt = -1 (mod beta)`, i.e.
  its lowest digit is all ones, and `Mt < 2^(K+17)`.

The Montgomery product `MM(A, B) = A*B*R^-1` is computed over `N+1`
iterations, `i = 0..N`, with `a_N = 0`:

```
S = 0
for i = 0 .. N:
    q = S mod beta                  -- just the lowest digit, no multiplication
    z = (q != 0)
    S = floor(S/beta) + floor(q*Mt/beta) + z + a_i*B
```

The lowest digit of `q*Mt` is `beta - q`, or `0` when `q = 0`. So
`S + q*Mt` is divisible by beta, and its quotient is the three floor and
`z` terms above. Hence `S*R = A*B (mod Mt)` and therefore also `(mod M)`.

`N` is chosen so that `4*Mt < R`. Then `A, B < 2*Mt` gives `S < 2*Mt`, so
results can be fed straight back as operands with no final subtraction. The
unrounded value stays below `beta^(N+1)` throughout. With `K = 1024` this gives
`N = 62`, i.e. 1054-bit operands. With `K = 512` it gives `N = 32`, i.e. 544
bits. `mm_pkg::ndigits` computes this value.

An exponentiation is then (left-to-right binary method, all in Montgomery
form):

```
CR = MM(R^2 mod M, C)          -- C*R mod M
P  = MM(R^2 mod M, 1)          -- R mod M, the Montgomery form of 1
for each of the N*17 bits e_i of E, most significant first:
    P = MM(P, P)
    if e_i: P = MM(P, CR)
P  = MM(P, 1)                  -- leave Montgomery form
result = P reduced below M
```

All `N*17` exponent-register bits are scanned, leading zeros included, and the
squarings of those zeros leave `P` congruent to `R`. That is
`N*17 + ones(E) + 3` multiplications. The last `MM(P,1)` yields a value
congruent to the answer but possibly as large as `2*Mt` (about `2^18 * M`).
A short shift-and-subtract stage brings it below `M`.

## The processing element (`mm_pe`)

Cell `j` holds digit `b_j` of the multiplicand, digit `m_{j+1}` of `Mt`
(one place up, see below), the digit register `s_j`, an intermediate register
`W` and four saved carry bits. The single 17x17 multiplier is shared over two
cycles. The array broadcasts `a_i` on the even cycle and `q` on the odd one.
Write `<x>` for `x mod beta` and `hi(x)` for `floor(x/beta)`:

| cycle | multiplier    | ADD1 (17 bit)                       | ADD2 (17 bit)                  | register |
|-------|---------------|-------------------------------------|--------------------------------|----------|
| even  | `a * b_j`     | `(ab)_j = <a*b_j> + phi_{j-1}`      | `(ab)_j + s_{j+1}`             | `W`      |
| odd   | `q * m_{j+1}` | `(qm)_{j+1} = <q*m_{j+1}> + theta_j` | `(qm)_{j+1} + W`              | `s_j`    |

The high half of the product goes to cell `j+1`: `phi_j = hi(a*b_j)` on the
even cycle and `theta_{j+1} = hi(q*m_{j+1})` on the odd one. A multiplexer
driven by `odd_even` picks ADD2's second operand: the upper neighbour's digit
`s_{j+1}` or `W`. Over one iteration this gives

```
s_j(new) = s_{j+1} + (qm)_{j+1} + (ab)_j
```

Taking `s_{j+1}` from the neighbour is the division by beta. Cell `j` holds
`m_{j+1}` rather than `m_j`, so the `q*M` term arrives already shifted. No
cell has to pass a sum sideways, and the only links between cells are the
17-bit high halves and the digits.

**Carries.** This is the least obvious part. Both adders are 17 bits wide. The
carry-out of each is not sent to the next cell. It goes into a two-register
loop and re-enters the same adder two cycles later, i.e. in the same half of
the next iteration. A carry produced in cell `j` has weight `beta^(j+1)`.
After the next division by beta, that is exactly cell `j`'s own weight, so
adding it back locally is exact. Nothing ever propagates along the array, and
the critical path does not grow with the key size. The running sum is held as
`sum s_j*beta^j + sum (pending carries of j)*beta^(j+1)`.

**The quotient and Orup's `z`.** `q` is `s_0` itself, always a true digit
because the carries sit one place higher. `m_0` is always `beta - 1`, so no
cell multiplies by it. The product `q*m_0` has low half `beta - q` (or 0),
which cancels `s_0` and carries out `z`, and high half `theta_0 = q - z`. Cell
0 therefore receives `theta_0 + z` on its lower-neighbour input in the odd
cycle.

## The array (`mont_mult`)

There are `N+1` cells, numbered 0 to `N`. Cells `0..N-1` each have a
multiplier. Cell `N` only ever sees zero digits and has none, so a 1024-bit
unit has 62 multipliers. `A` sits in an `(N+1)`-digit shift register that is
read least significant digit first. An odd/even multiplexer puts either `a_i`
or `q` on the broadcast bus that feeds every multiplier. This broadcast is what
makes the array *semi*-systolic. It removes the skew, and the fill latency, of
a fully systolic array in which operands ripple from cell to cell.

After the last iteration, one wide addition turns the digits and pending
carries into a plain binary number.

Timing: `start` captures `a`, `b`, `m`. `done` pulses `2(N+2)` cycles later,
which is 128 cycles at `N = 62`. `s` is then valid until the next start.
Operands must be below `2*Mt`, and `m` must be a scaled modulus (lowest digit
all ones, which is asserted).

## The exponentiator (`modexp`, `modexp_ctrl`)

`modexp` holds the operand registers. The multiplier's serial `a` input is fed
from `R^2`, `P` or 1. Its parallel `b` input is fed from `C`, `CR`, `P` or 1.
Its `m` input comes from the registered `Mt`, and its result is written back
to `P` or `CR`. The exponent register shifts left and hands its top bit to the
control unit. `modexp_ctrl` is a small state machine:

```
IDLE -> PREP -> PRE_CR -> PRE_P -> SQ <-> MUL ... -> POST -> RED -> IDLE
```

`SQ` goes to `MUL` when the current bit is 1. Both return to `SQ` while bits
remain. `mont_precompute` derives `m'` by Newton iteration
(`x <- x*(2 - M*x) mod 2^17`, four steps from `x = M`). It also forms `Mt`.
`mod_reduce` does the final `X mod M` in 18 restoring shift-and-subtract steps
(`j = 17..0`).

### Host interface

| port                         | use                                                                 |
|------------------------------|---------------------------------------------------------------------|
| `ld_valid, ld_sel, ld_idx, ld_data[63:0]` | write word `ld_idx` (LS word = 0) of operand `ld_sel` (`LD_R2`, `LD_M`, `LD_C`, `LD_E`) |
| `start`                      | one-cycle pulse, ignored while `busy`                               |
| `busy`                       | exponentiation or result unload in progress                         |
| `done`                       | one-cycle pulse, followed by the result words                       |
| `out_valid, out_data[63:0]`  | `ceil(17N/64)` result words (17 at K = 1024), least significant first |

The host supplies `R^2 mod M` with `R = 2^(17N)`, which is `2^1054` at
`K = 1024`. It also supplies `M` (odd, `K` bits), `C < M` and `E`. The
exponent may use up to `17N` bits. Loading takes `4 x 17` write cycles plus
the start pulse. Unloading takes one done cycle plus 17 words.

### Cycle counts

From `start` to `done`:
`2 + (2N+5) * (3 + 17N + ones(E)) + 20` cycles.

| K    | N  | cycles per multiplication | exponentiation, random E |
|------|----|---------------------------|--------------------------|
| 512  | 32 | 68 (+1 between)           | about 58,600             |
| 1024 | 62 | 128 (+1 between)          | about 202,400            |

## Where this RTL departs from the original architecture

* **Shorter multiplier pipeline.** The original PE registers the multiplier
  operands and the ADD1 inputs. Its multiplication takes `2(n+5)` cycles (134
  at 1024 bits). Here the product feeds ADD1 directly, so a multiplication
  takes `2(n+2)` (128). This means a longer combinational path per cycle: a
  17x17 multiply and two 17-bit adds, and on the odd cycle also the `q`
  broadcast from cell 0. The original reaches 90 MHz on its FPGA. This RTL
  makes no frequency claim.
* **Cell `j` holds `m_{j+1}`.** This is how this RTL reconciles the cell
  equations with a PE that has no sideways `(qm)` input. Folding `z` into cell
  0's input is also this design's own.
* **Operand loading.** The original feeds `b_j` and `m_j` to the cells over a
  shared 17-bit input to save wiring. Here they are loaded in parallel when a
  multiplication starts.
* **Carry resolution.** It is done with one wide adder at the end of each
  multiplication. How the original converts the carry-save result back is not
  known.
* **Precomputation of `m'` and `Mt` and the final reduction below `M`.** These
  are additions of this design. The original input list is `R^2`, `M`, base
  and exponent. Its flow ends at `MM(P,1)`, which with the scaled modulus is
  not yet fully reduced.
* **The constant-1 operand** is a multiplexer input here.
* **Host bus.** The 64-bit word-addressed load port and the unload sequence
  match the original word counts. Their exact protocol is this design's own.
* **Not included.** The Chinese-remainder recombination used for fast RSA
  decryption (two half-size exponentiations) is left to the host.

## Files

| file                     | contents |
|--------------------------|----------|
| `rtl/mm_pkg.sv`          | digit width, `ndigits`, operand-select enums |
| `rtl/mm_pe.sv`           | processing element |
| `rtl/mont_mult.sv`       | semi-systolic Montgomery multiplier |
| `rtl/mont_precompute.sv` | `m'` and `Mt` from `M` |
| `rtl/mod_reduce.sv`      | final reduction below `M` |
| `rtl/modexp_ctrl.sv`     | exponentiation sequencer |
| `rtl/modexp.sv`          | top: registers, host interface, blocks |
| `tb/tb_mm_pe.sv`         | cell against a model of its adders and carry loops, plus value conservation |
| `tb/tb_mont_mult.sv`     | exact Orup recurrence and Montgomery congruence, 64- and 1024-bit, latency |
| `tb/tb_modexp_ctrl.sv`   | operation sequence for random exponents, with stand-in multiplier |
| `tb/tb_modexp.sv`        | end to end at K = 512: results, cycle counts, mechanism coverage |
| `tb/tb_modexp_full.sv`   | end to end at the default K = 1024 |

Every testbench checks against arithmetic done independently with wide
integers. It prints `TB_RESULT checks=N failures=F` and has a watchdog.

## Simulating

Verilator 5 with `--timing`:

```
verilator --binary --timing --assert -Irtl rtl/mm_pkg.sv rtl/mm_pe.sv \
    rtl/mont_mult.sv rtl/mont_precompute.sv rtl/mod_reduce.sv \
    rtl/modexp_ctrl.sv rtl/modexp.sv tb/tb_modexp_full.sv \
    --top-module tb_modexp_full
./obj_dir/Vtb_modexp_full
```

The full-size run does four 1024-bit exponentiations (a toy one and three
random ones). It simulates in about a second and compiles in about ten. The
testbenches use two-state simulation and reset everything they read.

To change the key size, set `K` on `modexp`. `N`, the register widths and the
word counts follow from it. The digit width is fixed at 17 in `mm_pkg`.
`CW = 3` is wide enough to count the four pending carry bits of a cell.

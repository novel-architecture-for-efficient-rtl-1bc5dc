# Modular exponentiation with compact signed-digit Montgomery multipliers

This RTL computes `C = M^E mod N` for an odd 1024-bit modulus `N`, the core
operation of RSA-style public-key cryptography. Exponentiation is repeated
Montgomery multiplication. The idea behind this design is to rewrite the
*multiplier* operand of each Montgomery product in a compact signed-digit
(CSD) form. Each digit is one of +1 or -1 together with a count of zeros, or a
run of three zeros. One clock then retires up to three multiplier bits, and
each clock does only a shift, one addition or subtraction of the multiplicand,
and one addition of a small multiple of `N`. There is no high-radix partial
product.

Two exponentiators are provided, following the architecture described in the
article *Novel Architecture for Efficient Implementation of Modular
Exponentiation Algorithm*:

* **RtL CSDME** (`csdme_rtl`) scans the exponent from right to left. It has
  two multipliers, one squaring and one multiplying, that run side by side
  on the same CSD digits.
* **LtR CSDME** (`csdme_ltr`) scans the exponent from left to right. It has
  one multiplier and a 2-bit `Select` that picks the operand pair.

`csdme_top` holds one of each. They share only the clock and the reset.

## Montgomery arithmetic used here

Let `n = NBITS` (1024 by default) and `R = 2^(n+2)`. A multiplication
computes

    S = X * Y * R^-1 mod N

`R` is at least `4N`. So if both operands are below `2N`, the result is also
below `2N` and no final subtraction is ever needed. Every intermediate value
in the exponentiators stays in `[0, 2N)`. Only the very last step,
`C = S * 1 * R^-1`, brings the value into `[0, N]`. It gives exactly `N` only
when the true result is 0, and the exponentiators report that case as 0.

The exponentiation runs in the Montgomery domain:

* `F = M * R mod N` is formed as `Mont(M, R^2 mod N)`.
* `S` starts at `R mod N`, the Montgomery form of 1.
* `C = Mont(S, 1)` at the end.

The caller supplies `R^2 mod N` and `R mod N` (ports `r2`, `r1`), computed in
software once per modulus, together with the operands. Note that `R` is
`2^(n+2)`, not `2^n`.

## The compact signed-digit operand

This is the part that needs the most care.

**Digit format.** A digit is 3 bits, `{typ, len}` (`csd_pkg::csd_digit_t`):

| `len` | meaning | value added to the running sum | positions covered |
|---|---|---|---|
| 0, 1, 2 | `len` zero bits, then a nonzero digit on top | `(-1)^typ * Y * 2^len` | `len + 1` |
| 3 | three zero bits | nothing | 3 |

Digits are listed least significant first. The digits of any operand must
cover **exactly `n+2` bit positions**. This is what makes every product
divide by the same `R = 2^(n+2)`.

**Conversion** (`csd_converter`). The operand `x < 2^(n+1)` is first put in
non-adjacent form (NAF), the canonical signed-digit recoding. With `h = 3x`,
NAF digit `i` is `h[i+1] - x[i+1]`, which takes one adder. The NAF is then
scanned upward, two positions per clock:

* A nonzero NAF digit closes a CSD digit. Its `len` is the number of zeros,
  0 to 2, seen since the previous digit.
* Every third zero in a row closes a zero group (`len = 3`).

**The top of the operand.** The zeros above the most significant nonzero
digit `d` at position `t` number `n+1-t`. If that count is not a multiple of
three, the scan cannot end exactly on position `n+1`. The converter then
rewrites the top of the operand, keeping its value:

* `(n+1-t) mod 3 = 1`: `d·2^t` becomes `-d·2^t + d·2^(t+1)`.
* `(n+1-t) mod 3 = 2`: it becomes `-d·2^t - d·2^(t+1) + d·2^(t+2)`.

The zeros left above the new top digit now come in threes.

**Digits are written in order.** The converter writes digits least
significant first and counts them in `ndig`. A multiplier can therefore use
the first digits while later ones are still being produced (next section).

**Zero.** A zero operand has no nonzero digit, so its positions cannot
always be filled. The converter converts `N` instead, which is congruent to 0.

**Digit count.** The digit register holds `max_digits(n) = (n+2)/2 + 4`
digits (517 for `n = 1024`). Alternating bit patterns need the most digits.
An assertion flags an overflow.

Example with `n = 4` (6 positions). `x = 7 = 8 - 1` has the NAF `+1 at 3,
-1 at 0`. The scan emits `{-,len 0}` at position 0 and `{+,len 2}` at
positions 1..3. The top then has two zeros, positions 4 and 5, so the top
digit is rewritten: `{-,len 2}` at 1..3, then `{-,0}` at 4 and `{+,0}` at 5.
These digits stand for `-1 - 8 - 16 + 32 = 7` over exactly 6 positions.

## The CSD Montgomery multiplier (`csdm2`)

For each digit, with `k = len`, or `k = 2` for a zero group:

    P  = S ± Y·2^k          (P = S for a zero group)
    q  = P[k:0] · (-N^-1) mod 2^(k+1)
    S  = (P + q·N) / 2^(k+1)   (exact, arithmetic shift)

`-N^-1 mod 8` equals `-N mod 8` for odd `N`, so it is just 3 bits taken from
`N`. The datapath follows the source block diagram in the following order:

1. A NAND of the two `len` bits tests for a zero group and selects 0 or `Y`.
2. A shifter multiplies by `2^k`.
3. An XOR with `typ`, plus `typ` as carry-in, negates.
4. An adder forms `P`.
5. A `q·N` generator (`qm_gen`) works from `P[2:0]` and `k`. It returns
   `q·N` as two shifted copies of `N`, `q1m ± q2m`: 3N = 4N − N,
   5N = 4N + N, 6N = 4N + 2N and 7N = 8N − N.
6. A second adder adds `q1m`, plus `q2m` XOR `cin`, plus `cin`.
7. A second shifter divides by `2^(k+1)`.

The accumulator is signed and `n+6` bits wide, because partial sums can be
negative. One digit is retired per clock. The result is below `2N`, and
assertions check both the exact division and the result range.

**Consuming digits during conversion.** The multiplier is told how many
digits are available (`navail`) and whether the list is `complete`. It
stalls when it reaches a digit that has not been written yet. The
exponentiators start each product one clock after the conversion of its
multiplier. Conversion (`ceil((n+2)/2)` clocks) and multiplication (one clock
per digit, at most about `n/2`) then run together, so each product costs
about one multiplication time, not a conversion plus a multiplication. This
is how the architecture hides the format conversion.

## Right-to-left exponentiator (`csdme_rtl`)

| step | F multiplier | S multiplier | then |
|---|---|---|---|
| start | | | convert `R^2 mod N` to CSD |
| 1 | `F = Mont(M, R^2_CSD)` (Select1 = 1) | | convert F → `M_CSD` |
| each bit `i = 0..KE-1` | `F = Mont(F, M_CSD)` (Select1 = 0) | if `e_i`: `S = Mont(S, M_CSD)` (Select2 = 0) | convert F → `M_CSD` (not after the last bit) |
| end | | `C = Mont(S, 1_CSD)` (Select2 = 1) | |

The two multipliers use the same digit list, so they run in lockstep.
`1_CSD` is a constant digit list, and `R^2_CSD` and `M_CSD` share the
converter's register. One exponentiation costs `KE + 2` multiplication
times. The `KE + 1` conversions are hidden inside them.

## Left-to-right exponentiator (`csdme_ltr`)

| Select | multiplier digits | multiplicand | use |
|---|---|---|---|
| 00 | `R^2_CSD` | `M` | `F = M·R mod N`, once |
| 01 | `S_CSD` | `S` | square, every bit |
| 10 | `S_CSD` | `F` | multiply, when `e_i = 1` |
| 11 | `S_CSD` | 1 | `C`, once at the end |

The sequence is:

1. Convert `R^2`, then form `F` with Select 00.
2. Convert `R mod N` into the initial `S_CSD`, with `S = R mod N`.
3. For each bit from the most significant: square (01) and convert. If
   `e_i = 1`, multiply (10) and convert.
4. Finish with Select 11.

The counts are `KE + popcount(E) + 2` products and as many conversions.
Each conversion runs alongside the product that uses it.

## Interfaces and timing

Every module uses the same handshake:

* Pulse `start` for one clock with the inputs valid. The exponentiators
  register their inputs.
* `busy` stays high until `done` pulses for one clock.
* The result holds until the next start.
* The reset `rst_n` is asynchronous and active low.

Latencies, counted from the clock edge that samples `start`:

* **Converter:** `ceil((NBITS+2)/2)` clocks.
* **Multiplier, complete list:** one clock per digit of its multiplier.
  That is at most about `NBITS/2` clocks; `1_CSD` needs about `NBITS/3`.
* **Multiplier, list still being converted:** one more clock per stall.
* **Exponentiator:** about `ceil((NBITS+2)/2) + 3` clocks per product.
  - RtL: `KE + 2` products in sequence.
  - LtR: `KE + popcount(E) + 2` products.

Measured for `NBITS = KE = 1024`, with an exponent of weight 519:

| unit | clocks | published figure, converted to clocks |
|---|---|---|
| RtL | 529 k | about 549 k (1.31 ms at 419 MHz) |
| LtR | 797 k | about 369 k (0.88 ms at 419 MHz) |

The RtL figure agrees. No reading of the source explains why its
single-multiplier LtR unit would need fewer clocks than its RtL unit, so
that gap is not resolved here.

## Where this RTL departs from the source architecture

* **How the conversion is overlapped.** The source says only that
  conversion runs in parallel with the neighbouring step. Here it works by
  streaming: the multiplier consumes digits as the converter writes them,
  two bit positions per clock.
* **Carry-propagate adders replace the carry-save adders.** The two
  additions of the multiplier are plain `+` on a signed accumulator. The
  two-term recoding of `q·N` is this design's own, because the source shows
  only the generator's outputs.
* **The current digit is picked by an index.** The source shifts it out of
  a 3-bit shift register. Indexing lets one digit register feed both RtL
  multipliers.
* **Shared digit register.** `R^2_CSD` and `M_CSD` (RtL), and `R^2_CSD` and
  `S_CSD` (LtR), occupy the converter's one register at different times.
  `1_CSD` is a constant.
* **`R^2 mod N` and `R mod N` are inputs.** They are not computed on chip.
* **Operand roles.** The source's step for `F` is taken as `Mont(M, R^2)`, as
  its block diagrams show.
* **Additions of this design.** The top-digit rewrite and the zero-operand
  substitution in the converter, the reporting of `N` as 0, and the omitted
  (unused) last conversion of F in RtL.

## Files

| file | contents |
|---|---|
| `rtl/csd_pkg.sv` | digit type, `max_digits`, accumulator width |
| `rtl/csd_converter.sv` | binary → CSD converter with digit register |
| `rtl/csdm2.sv` | CSD Montgomery multiplier |
| `rtl/qm_gen.sv` | quotient digit and `q·N` generator of the multiplier |
| `rtl/exp_shift_reg.sv` | exponent shift register (LSB- or MSB-first) |
| `rtl/csdme_rtl.sv` | right-to-left exponentiator |
| `rtl/csdme_ltr.sv` | left-to-right exponentiator |
| `rtl/csdme_top.sv` | both exponentiators side by side |
| `tb/tb_ref_pkg.sv` | reference modular arithmetic and reference CSD recoding |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_csdme_full` |

Parameters: `NBITS` (modulus width, default 1024) and `KE` (exponent width,
default 1024). Both can be lowered freely for simulation.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a run that hangs. Build and run one, for example the end-to-end
test, with:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/csd_pkg.sv tb/tb_ref_pkg.sv tb/tb_csdme_top.sv --top-module tb_csdme_top
    ./obj_dir/Vtb_csdme_top

Use the same command with another testbench name for the others.

What each testbench checks:

* **`tb_csd_converter`** (64 bits): compares every digit list with an
  independent NAF recoding. It also checks each list's value, its position
  count and the latency.
* **`tb_qm_gen`** (64 bits): checks the quotient digit and `q1m ± q2m = q·N`
  for every `P[2:0]` and `k`.
* **`tb_csdm2`** (64 bits): checks `S·2^(n+2) ≡ X·Y (mod N)`, `S < 2N` and one
  clock per digit, on random and edge operands. It also feeds digits while
  they are still arriving and checks that the multiplier stalls as needed.
* **`tb_csdme_rtl` and `tb_csdme_ltr`** (64-bit modulus and exponent):
  compare results with a reference square-and-multiply. They also check the
  operation counts above.
* **`tb_csdme_top`** (63-bit): runs both units at once and counts every
  mechanism. That covers both exponent-bit cases, all Select codes,
  subtracting digits, zero groups, both top rewrites, zero operands and the
  `N`-to-0 report.
* **`tb_csdme_full`**: one full 1024-bit exponentiation on each unit at the
  default parameters. It takes a few seconds.

# A dual-field elliptic-curve processor with a random-domain countermeasure

This is the RTL of an elliptic-curve cryptographic (ECC) coprocessor. It
computes scalar multiplications `Q = [k]P` over prime fields GF(p) and binary
fields GF(2^m), for any field size up to 521 bits, on one datapath. It is
built to resist power analysis. Every multiplication and division in a scalar
multiplication is done in a *random domain*: each value `X` is held as
`X·2^λ mod p`, where `λ` comes from a fresh random number `r` drawn for each
scalar multiplication. The intermediate values, and so the power trace,
change from run to run even when the key and base point do not. This costs no
extra cycles over the Montgomery-domain version of the same processor.
Attacks on simple power traces are handled separately:
- the scalar multiplication performs a point addition after every doubling,
  even for zero key digits;
- the adder's idle doubling path is fed random data.

The default build uses a radix-2 arithmetic unit: one operand bit of
multiplication, or one binary-GCD step of division, per clock cycle. A
parameter swaps in a radix-4 unit instead (see "The radix-4 unit" below).
That unit takes up to two bits per cycle, but it has no random domain. The
processor is a 32-bit AMBA AHB slave that a host CPU loads, starts and
polls.

## The random domain

A Montgomery multiplier computes `X·Y·2^-m`, and a Montgomery divider (based
on the binary extended GCD) computes `X·Y^-1·2^m`. Both go through `m`
iterations. In each iteration the running value is either halved or the
other operand doubled, modulo `p`. The arithmetic unit makes that per-step
choice a run-time input, the mask `r`:

| operation | bit `r_i` = 1 | bit `r_i` = 0 | result |
|---|---|---|---|
| multiplication, step i | `R = (R + x_i·S)/2` | `R = R + x_i·S; S = 2S` | `X·Y·2^-λ` |
| division, step i < m | raise the domain (e.g. `R = R − S; S = 2S`) | keep it (e.g. `R = (R − S)/2`) | `X·Y^-1·2^λ` |

Here `λ = popcount(r[m-1:0])`.
- `r = 0` gives the plain product and quotient (MM, MD).
- `r = all ones` gives the Montgomery forms (MMM, MMD).
- Any other value gives a random domain. There are 2^m possible masks.

Products and quotients of values in the `2^λ` domain stay in it:
- `(A·2^λ)(B·2^λ)·2^-λ = AB·2^λ`
- `(A·2^λ)/(B·2^λ)·2^λ = (A/B)·2^λ`

So a whole scalar multiplication runs in one domain.
- Entry is a division by 1 (`X·2^λ`). Exit is a multiplication by 1.
- Additions and subtractions are domain-neutral.
- Only the mask `r` needs to be random. The formulas do not change.

With the countermeasure bit off, `r` is all ones, and the processor behaves
as a plain Montgomery-domain dual-field processor.

## Arithmetic unit (`gfau`)

The unit holds four registers:
- `U`, `V`: the GCD pair;
- `R`, `S`: the accumulators;
- `r`: the mask, shifted one bit per step;
- a thermometer step counter.

It is built from three datapath cells, each one combinational stage wide:

- **U,V cell** (`gfau_uv_dp`) takes one binary-GCD step.
  - If U is even, halve U.
  - Otherwise, if V is even, halve V.
  - Otherwise, if U > V, then U = (U − V)/2.
  - Otherwise, V = (V − U)/2.

  "Minus" is XOR in GF(2^m). In both fields the magnitude comparison is an
  integer comparison.
- **R cell** (`gfau_r_dp`) computes `(A ± B) mod p`, then optionally halves
  the result modulo p.
  - GF(p): add `p` if the value is odd, then shift.
  - GF(2^m): XOR `p` if bit 0 is set, then shift.

  The sum is reduced before the halving, so every output lies in `[0, p−1]`.
- **S cell** (`gfau_s_dp`) computes `2A mod p`. For GF(2^m), the reduction
  tests bit `m` of the shifted value with the degree checker.

**Division step table.** The U,V decision of step k is registered. The R,S
cells apply it one cycle later, in the random or the plain mode chosen by
`r_k`:

| decision | plain (`r_k`=0 or k ≥ m) | raise (`r_k`=1, k < m) |
|---|---|---|
| U even | `R = R/2` | `S = 2S` |
| V even | `S = S/2` | `R = 2R` |
| U > V | `R = (R − S)/2` | `R = R − S`, `S = 2S` |
| U ≤ V | `S = (S − R)/2` | `S = S − R`, `R = 2R` |

Registering the decision ("data-path separation") splits the long path
(compare U,V, then add/sub R,S, then reduce) into two short ones. The cost is
one extra cycle per division.

Division starts with `U = p`, `V = Y`, `R = 0`, `S = X`. It stops when `V`
reaches 0. At that point `R` holds `X·Y^-1·2^λ`.

This RTL keeps stepping after `V = 0` until every mask bit below `m` has been
used. Those extra steps only double. They make `λ` exactly the popcount of
`r`. Over GF(p) the GCD loop already takes at least `m` steps in practice, so
this rarely costs anything.

**Degree checker** (`degree_checker`). This is the AND of a value with the
one-hot field-length word (bit `m` set), ORed down to one bit. It answers two
questions with the same small gate:
- "has this polynomial reached degree m?" This replaces a wide multiplexer
  indexed by `m`.
- "has the step counter reached m?" The counter is a thermometer code that
  shifts in a one each step.

**Masking the idle path.** Whenever the S cell has nothing to double, its
input is the current random-generator word instead of a real operand. This
happens in plain-mode division steps, and in multiplication steps with
`r_i = 1`. Its switching activity is then random.

**Latency**, from the cycle `start` is sampled to the cycle `done` rises:

| operation | cycles |
|---|---|
| add / subtract | 2 |
| multiply | m + 1 |
| divide | max(GCD steps, index of highest set mask bit + 1) + 2 |

## EC controller (`ec_ctrl`)

The controller runs each command as a micro-program: a fixed list of field
operations `dst = op(srcA, srcB)`. Each micro-operation:
1. reads two register-file entries;
2. starts the arithmetic unit;
3. waits for `done`;
4. writes the result back.

Points are affine (x, y), which needs one division per point operation:

| program | GF(p) | GF(2^m) |
|---|---|---|
| ECDBL | `L=(3x²+a)/2y; x3=L²−2x; y3=L(x−x3)−y` (1 D, 3 M, 9 A/S) | `L=x+y/x; x3=L²+L+a; y3=L(x+x3)+x3+y` (1 D, 2 M, 7 A) |
| ECADD | `L=(y2−y1)/(x2−x1); x3=L²−x1−x2; y3=L(x1−x3)−y1` (1 D, 2 M, 7 A/S) | `L=(y1+y2)/(x1+x2); x3=L²+L+x1+x2+a; y3=L(x1+x3)+x3+y1` (1 D, 2 M, 10 A) |
| NEG | `y = 0 − y` | `y = x + y` |
| PRE | `Px, Py, a := X / 1` (into the domain) | same |
| POST | `Qx, Qy := X · 1` (out of the domain) | same |

Point subtraction negates `P` in place, adds it, and negates it back, so it
needs no extra point register.

**Scalar multiplication (ECSM).** The key is a non-adjacent form (NAF)
supplied by the host as two masks:
- `key_pos` has bit i set where digit i is +1;
- `key_neg` has bit i set where digit i is −1.

The controller runs these steps:
1. If the countermeasure is on, fill `r` from ⌈N/32⌉ random words.
2. Run PRE on `Px`, `Py` and `a`.
3. Copy P to Q.
4. Skip leading zero digits, at one cycle each. The top digit must be +1;
   otherwise the error flag is set.
5. For each lower digit, run ECDBL on Q, then:
   - digit +1: ECADD, giving `Q = Q + P`;
   - digit −1: NEG, ECADD, NEG;
   - digit 0: ECADD with its results redirected into the dummy registers
     `RX`, `RY`, so the power profile of an addition is still present.
     With the countermeasure off, the addition is skipped instead, which
     gives a plain NAF double-and-add/subtract.
6. Run POST on `Qx`, `Qy`.

The whole scalar multiplication uses the same `r`. After it, `Px`, `Py` and
`a` are still in the random domain, and the host must reload them before
reusing them.

## The radix-4 unit (`r4_gfau`, `RADIX = 4`)

The radix-4 unit halves the cycle count of multiplication and of most
division steps. It costs about twice the R,S operation logic.

**Multiplication** takes two bits of X per cycle. Each cycle it computes
`R = R + x0·S + x1·2S`, then either `R = R/4` (Montgomery form) or
`S = 4S` (plain form). If m is odd, the last step takes one bit.

**Division** takes one step per cycle. The step is chosen from `c = U mod 4`
and `d = V mod 4`. Each step has a mirror image with U↔V and R↔S. The R,S
column below is for the U-side step; the mirror swaps R and S.

| condition | U,V step | R,S (plain) | R,S (Montgomery, while bits < m) |
|---|---|---|---|
| c = 0 | U/4 | R/4 | S = 4S |
| c = d | (U−V)/4 | (R−S)/4 | R = R−S, S = 4S |
| c = 2, U/2 > V | (U/2 − V)/2 | (R/2 − S)/2 | R = R−2S, S = 4S |
| d = 2, U > V/2 | (U − V/2)/2, V/2 | (R − S/2)/2, S/2 | R = 2R−S, S = 2S |
| otherwise | (U−V)/2 | (R−S)/2 | R = R−S, S = 2S |
| Montgomery, one bit left | — | — | R = 2R, S = 2S |

The larger of U and V is the one replaced. The mirrored step is implemented
by swapping R and S in front of a single operation set, and swapping the
results back. Every Montgomery step equals its plain step scaled by 4 (a
two-bit step) or by 2 (a one-bit step). This keeps the invariants exact. A
thermometer bit counter stops the scaling after m bits.

| operation | cycles |
|---|---|
| add / subtract | 2 |
| multiply | ⌈m/2⌉ + 1 |
| divide | steps + 2 |

Division over GF(p) averages about 0.85m steps.

With `RADIX = 4`, the countermeasure bit is ignored. The processor then works
in the Montgomery domain, with no dummy additions.

## Register file and random generator

`ecc_regfile` holds 14 storage entries of N bits, plus the constants 0 and
1:

| index | entries |
|---|---|
| 0–4 | Px, Py, Qx, Qy, a |
| 5–7 | T1, T2, L (temporaries) |
| 8–9 | RX, RY (dummy point) |
| 10–13 | G0–G3 (general purpose) |
| 14 | constant 0 |
| 15 | constant 1 |

It has two combinational read ports and one write port for the datapath. A
32-bit word port serves the host. An engine write has priority over a host
write.

`chaos_prng` produces one 32-bit word per cycle. Its state is a Q0.32
fixed-point logistic map `x' = 4x(1−x)`, and each step XORs in a 32-bit
maximal-length LFSR. The LFSR stops the finite-precision map from collapsing
into short cycles or the fixed point 0. Writing SEED reloads both.

## Host interface (`ahb_slave`) and register map

The slave has zero wait states, accepts word transfers only, and uses a
12-bit byte address.

| address | register |
|---|---|
| 0x000–0x7FF | register file: entry = A[10:7], 32-bit word = A[6:2] (word 0 is least significant) |
| 0x800 | modulus p, ⌈(N+1)/32⌉ words. For GF(2^m) this is the irreducible polynomial including x^m |
| 0x880 | `key_pos` |
| 0x900 | `key_neg` |
| 0xA00 | CMD (write starts a command): [3:0] command, [5:4] field op, [7:6] domain, [11:8] dst, [15:12] src A, [19:16] src B |
| 0xA04 | CFG: [10:0] m, [16] 1 = GF(2^m), [17] countermeasure on |
| 0xA08 | STATUS: [0] busy, [1] done (sticky, write 1 to clear, also drives `irq`), [2] error |
| 0xA0C | SEED (write) |

Command codes:

| code | command |
|---|---|
| 0 | NOP |
| 1 | single field operation |
| 2 | PRE |
| 3 | POST |
| 4 | ECDBL |
| 5 | ECADD |
| 6 | ECSUB |
| 7 | ECSM |

For a single field operation (command 1):
- The field op is 0 add, 1 subtract, 2 multiply, 3 divide.
- The domain is 0 plain (`r = 0`), 1 Montgomery (`r = 1…1`), 2 random (the
  current `r`).

While busy, the slave ignores:
- writes to the register file, p, the keys and CFG;
- new commands.

All resets are synchronous and active low.

A typical scalar multiplication:
1. Write p, CFG and SEED.
2. Write `key_pos` and `key_neg`.
3. Write `Px`, `Py` and `a`.
4. Write CMD = 7.
5. Poll STATUS, or wait for `irq`.
6. Read `Qx` and `Qy`.

## Files

| file | contents |
|---|---|
| `rtl/ecc_pkg.sv` | shared types: field, operation, register, command and domain encodings, micro-op struct |
| `rtl/decpac.sv` | top level |
| `rtl/ahb_slave.sv`, `rtl/chaos_prng.sv`, `rtl/ec_ctrl.sv`, `rtl/ecc_regfile.sv` | host interface, random generator, EC controller, register file |
| `rtl/gfau.sv` | radix-2 arithmetic unit |
| `rtl/r4_gfau.sv` | radix-4 arithmetic unit |
| `rtl/gfau_uv_dp.sv`, `rtl/gfau_r_dp.sv`, `rtl/gfau_s_dp.sv`, `rtl/degree_checker.sv` | its cells |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end runs |
| `tb/ec_ref.svh` | behavioural reference for both fields and for point arithmetic |

The top has two parameters:
- `N`, the maximum field size, default 521;
- `RADIX`, 2 (default, with the countermeasure) or 4.

## Simulating

Every testbench prints `TB_RESULT checks=… failures=…` and stops by itself.
With Verilator 5, the package must come first:

```sh
verilator --binary -j 0 --top-module tb_decpac -Itb \
    rtl/ecc_pkg.sv $(ls rtl/*.sv | grep -v ecc_pkg) tb/tb_decpac.sv
./obj_dir/Vtb_decpac
```

Replace `tb_decpac` with any other testbench name. The testbenches of the
small blocks override `N` to 32–70 bits. They compare against independent
arithmetic on random operands, and check latencies exactly.

The two end-to-end testbenches run the processor at N = 521 through the AHB
port. They take about 10 s and 40 s of wall time.
- `tb_decpac`:
  - a P-256 scalar multiplication with the countermeasure on;
  - a GF(2^233) scalar multiplication with it off;
  - 521-bit field operations.

  It counts every mechanism: mask gathering, dummy additions, point
  subtractions, PRE/POST, masked S-path cycles and the interrupt.
- `tb_decpac_workloads`:
  - 256-bit unit operations over GF(p256) and GF(2^256);
  - a 521-bit GF(p) scalar multiplication;
  - a GF(2^409) scalar multiplication.
- `tb_decpac_r4`: the `RADIX = 4` build, running 160-bit and 256-bit
  scalar multiplications over both field types.

The end-to-end testbenches use random points. This is valid because the
affine formulas never use the curve constant `b`.

## Measured performance

Cycle counts of scalar multiplications at N = 521 with the countermeasure
on, next to the figures published for the reference design:

| workload | this RTL | published |
|---|---|---|
| 256-bit GF(p), P-256 | ≈ 512,000 | 539,134 |
| 521-bit GF(p), p = 2^521−1 | 2,162,199 | 2,020,494 |
| 409-bit GF(2^m), x^409+x^87+1 | 1,254,206 | 1,224,496 |
| 256-bit random multiplication | 257 | 257 |
| 256-bit random division, GF(p) / GF(2^256) (one sample) | 362 / 435 | 316 / 427 (average) |
| add / subtract | 2 | 2 |

The same comparison for the `RADIX = 4` build (Montgomery domain, no dummy
additions):

| workload | this RTL | published |
|---|---|---|
| 256-bit GF(p) | 208,078 | 193,386 |
| 256-bit GF(2^m) | 186,704 | 165,354 |
| 160-bit GF(p) | 85,341 | 79,528 |
| 160-bit GF(2^m) | 76,952 | 56,698 |

These counts depend on the key's digit pattern and, for division, on the
operands.

## Departures and limitations

- **Micro-programs.** The point formulas are sequenced by this design.
  ECDBL over GF(p) takes five more add/subtract steps than the minimum, for
  two reasons: the separate `3x²` and `2y` additions, and a final copy of
  `x3`.
- **Exceptional point cases.** `Q = ±P`, or the point at infinity as an
  operand, are not handled. A key whose running sum meets one of them gives
  a wrong result. Such keys are practically impossible for random keys on a
  prime-order curve.
- **Point subtraction is visible.** −1 digits cost two extra subtraction
  micro-operations (the NEG steps). The pattern of +1/0 digits versus −1
  digits is therefore visible in timing.
- **Key format.** The host must convert the key to NAF. The top digit must
  be +1.
- **Random generator.** The chaotic map of the generator is this design's
  own: a logistic map with LFSR perturbation. It has not been put through a
  statistical test suite.
- **Host-owned state.** The register map, the command encoding and the
  host-visible register-file layout are this design's.
- **Radix-4 division in GF(2^m) is slower than published.** It takes
  about m steps on average, against about 0.84m for the published unit.
  The binary-field scalar multiplications are therefore 13–36% slower than
  the published figures.
- **Radix-4 R,S operations follow the invariants.** The R,S operations of
  the two half-step cases are derived from the invariant, not taken over
  case by case.
- **Radix-4 output selection is plain.** The output multiplexing is a plain
  case statement, not an area-optimised selection network.
- **Tool warnings.** Verilator's lint reports only unused bits, all of them
  deliberate:
  - padding above N in the 32-bit-word views of the register file and
    mask;
  - the discarded bits of the PRNG product and of the halving and
    doubling cells;
  - the unused fields of the micro-operation look-ahead;
  - `HTRANS[0]`, because SEQ and NONSEQ transfers are treated alike;
  - the package constant when the package is linted alone.

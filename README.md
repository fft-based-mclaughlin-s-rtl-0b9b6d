# FFT-based McLaughlin Montgomery exponentiation (FMLE)

This RTL computes RSA-style modular exponentiation `x^e mod n` for large
moduli (1,024 bits at the default size). The whole computation has no
data-dependent branch and no conditional correction step, so the running time
depends only on the exponent length. It never depends on the value of `x`,
`e` or `n`.

It combines two ideas:

* **McLaughlin's Montgomery multiplication without conditional selections.**
  Choose `r = 2^l - 1` and `h = 2^l + 1`, both greater than `4n`. Then
  `m = x*y*n' mod r`, `g = (x*y + m*n) mod h` and `t = (h - g)/2` give
  `t = x*y*r^-1 (mod n)` with `t < 2n`. The usual final "if `t >= n`
  subtract `n`" step never happens. Inputs and outputs stay below `2n`, so
  results can be chained without a correction.
* **Number-theoretic FFTs over a Fermat-like ring.** The two reductions
  need a cyclic product modulo `2^l - 1` and a nega-cyclic product modulo
  `2^l + 1`. With `l = u*s`, split the operands into `s` digits of `u` bits.
  Both products are then length-`s` cyclic and nega-cyclic convolutions with
  no zero padding. They are computed with transforms over `Z_q`, where
  `q = 2^(c*s) + 1`. In that ring `omega = 2^(2c)` and `phi = 2^c`, so every
  twiddle factor is a shift and every reduction modulo `q` is one
  subtraction.

## One multiplication (FMLM)

A Montgomery product `t = FMLM(x, y)` takes these steps. CT/ICT are the
cyclic transform and its inverse. NCT/INCT are the nega-cyclic ones. `(.)` is
the element-wise product modulo `q`.

| step | operation | hardware |
|---|---|---|
| 1 | `A' = CT(x) (.) N'`, `a' = ICT(A')` | FFT operator, multiply-adder |
| 2 | `a = sum a'_k 2^(uk) mod r` | digit conversion, long adder |
| 3 | `M' = CT(y) (.) CT(a)`, `m' = ICT(M')` | FFT operator, multiply-adder |
| 4 | `m = sum m'_k 2^(uk) mod r` | digit conversion, long adder |
| 5 | `G = NCT(x) (.) NCT(y) + NCT(m) (.) N^` then `g' = INCT(G)` | multiply-adder (multiply and add) |
| 6 | restrict each `g'_k`: above its bound `B_u[k] = 2(k+1)(b-1)^2`, it is negative (`g'_k - q`) | digit conversion |
| 7, 8 | `t = (h - (sum g'_k 2^(uk) mod h)) / 2` | long subtractor |

`N' = CT(n')` and `N^ = NCT(n)` are computed once per modulus, where
`n' = -n^-1 mod r`.

Two special forms save work:
* **Squaring**, where `x = y`, needs one transform of the operand.
* **Common multiplicand.** Once `A = CT(y*n' mod r)` and `Y^ = NCT(y)` exist
  for a value `y`, a second product with `y` skips steps 1 and 2.

**All-at-once.** When the ring is large enough, the first half runs as
one three-operand product instead of steps 1 to 4:
`m' = ICT(CT(x) (.) CT(y) (.) N')`, then step 4. This needs
`q > s^2 (b-1)^3`, which holds when `c*s >= 2v + 3u`. It saves two
transforms and one reduction per multiplication. The default set meets the
condition (`64 >= 63`), so the design uses this flow by default (parameter
`ALL_AT_ONCE`).

Steps 7 and 8 are merged. Because `h = 2^l + 1`, `h - g` equals
`1 + floor(g'/2^l) - (g' mod 2^l)` with the sign bit dropped. This is one
short addition, one long subtraction and a one-bit right shift.

The modulo-`r` reductions use `2^l = 1 (mod r)`. First add the low and high
halves, `m_r = low + high`. Then add `m_r[l]` back at the bottom. An all-one
check `epsilon` catches the case `m_r = r`, which must become 0:
`m = (m_r mod 2^l + (m_r[l] | epsilon)) mod 2^l`.

## Exponentiation schedule

Two processing elements, PEA and PEB, run in parallel. A control unit
drives both, and a RAM holds the precomputed vectors. The FSM has four
states:

| state | right-to-left binary method (`spa = 0`) | Montgomery powering ladder (`spa = 1`) |
|---|---|---|
| S0 | PEA: `y = FMLM(x, r^2 mod n)` (into Montgomery form); PEB idle | PEA the same; PEB `t = FMLM(t, t)` (dummy, `t = r mod n`) |
| S1 (per bit) | PEA `y = FMLM(y, y)`; PEB `t = FMLM(t, y)` only if `e[i] = 1`, using PEA's `A` (all-at-once: `Y`) and `Y^` | `e[i] = 1`: PEA `y = y^2`, PEB `t = t*y` with PEA's `Y`, `Y^`; `e[i] = 0`: PEA `y = y*t` with PEB's `T`, `T^`, PEB `t = t^2` |
| S2 | PEB `t = FMLM(t, 1)` (out of Montgomery form); PEA idle | PEB the same; PEA `FMLM(y, y)` (dummy) |

Bit order:
* The right-to-left method reads `e[0]` first.
* The ladder reads `e[tau-1]` first.

In the right-to-left method, PEB is idle in an iteration with `e[i] = 0`. The
control unit still waits for PEA's squaring, so every iteration takes the
same number of cycles. In the ladder both elements do the same work every
iteration, so the power profile is regular as well. The dummy operations
keep S0 and S2 the same length in both modes.

Two multiplications use special modes of the same element:
* **`FMLM(y, r_1)` (S0)** reads its common multiplicand from the RAM:
  `R_2 = CT(r_1*n' mod r)` and `R1^ = NCT(r_1)`, where `r_1 = r^2 mod n`.
* **`FMLM(t, 1)` (S2)** needs no stored vector. `CT(1*n' mod r) = N'`, which
  is already in the RAM, and `NCT(1)` is all ones.

## Processing element (`fmle_pe`)

Each element contains:
* one FFT operator (`fft_operator`, two butterflies);
* one multiply-adder (`multiply_adder`);
* one long adder (`long_adder`);
* one long subtractor (`long_subtractor`);
* registers for the operand `y` or `t`, the reduced value `m`, and the
  vectors `Y`, `A`, `Y^`, `W` and `Z`.

The control unit issues one *micro-operation* at a time to both elements,
with the same `op` code on a start/done handshake:

```
CT_Y  MUL_AN  ICT_A  MODR_A  CT_A  MUL_YA  ICT_M  MODR_M
NCT_Y  MUL_YY  NCT_M  MAD_MN  INCT_Z  FINAL
```

`mode` decides where the second operand of each product comes from:

| mode | source |
|---|---|
| `MODE_SQ` | own vectors (squaring) |
| `MODE_CM_PE` | `A` and `Y^` of the other element |
| `MODE_CM_RAM` | `R_2` and `R1^` from the RAM |
| `MODE_CM_ONE` | `N'` and all ones |
| `MODE_LAD_EXT` | own `A`; the other element's `Y` and `Y^` |

In the three common-multiplicand modes the element skips `MUL_AN` to `CT_A`
and answers one cycle later.

With `ALL_AT_ONCE = 1` the sequence shrinks to eleven operations, because
`ICT_A`, `MODR_A` and `CT_A` are never issued:
* `MUL_AN` forms `W = Y' (.) N'`. `Y'` is the element's own `Y` when
  squaring, and the other element's `Y` when forwarded or in the ladder.
* `MUL_YA` forms `M' = Y (.) W`.
* The RAM and times-one modes work as before.

The high part of `m'` then has up to `2u + 2v + 1` bits. It is added over
the two lowest segments. An element that is not started in an FMLM keeps
its value.

The conversion of a convolution result `sum d_k 2^(uk)` to binary takes two
digits per cycle with a signed carry. For `g'` each digit is first compared
with its bound `B_u[k]`, which is read from the RAM two bounds per cycle.
The carry left at the end is the high part `floor(value / 2^l)`. After that:
* a modulo-`r` reduction takes two passes of the long adder, `low + high`
  and then the fold;
* the final step takes one pass of the subtractor, whose shifted output is
  written straight back into the operand register.

### Building blocks

* **`fft_operator`** is a constant-geometry radix-2 decimation-in-time
  transform. Stage `j` reads elements `2i` and `2i+1` and writes `i` and
  `i + s/2`, with the twiddle `2^(2cJ*floor(i/J))`, where `J = 2^(v-j-1)`.
  The nega-cyclic transform adds `cJ` to the exponent. The inverse uses the
  negated exponent. Input is taken in bit-reversed order and output comes in
  natural order. The inverse transform also takes bit-reversed input, so
  element-wise products of spectra can be fed straight back. The inverse then
  runs a scaling pass that multiplies element `k` by `s^-1` (cyclic) or by
  `s^-1 * phi^-k` (nega-cyclic), which is the shift `2^(2cs - v - c*k)`.
  Two butterflies handle four elements per cycle:
  * forward transform: `1 + v*s/4` cycles;
  * inverse transform: `s/2` more cycles.
* **`ntt_butterfly`** computes `x_e +/- x_o * 2^e mod q` with a shift. The
  shifted value is split at bit `c*s` and folded as `low - high`.
* **`multiply_adder`** handles one element per cycle with a 4-cycle latency.
  It is a one-level Karatsuba product, reduced modulo `q` as
  `P0 - P1 + P2` (since `2^(cs) = -1`), followed by an optional modular add
  for step 5.
* **`long_adder`** works on `2u`-bit segments, least significant first. It
  has two cascaded adders (`x + y`, then `+ z`), a carry register `z` and the
  all-one check. A `carry_ctrl` code travels with each segment: clear,
  propagate, fold (`z = MSB | epsilon`) or hold. Latency is 3 cycles.
* **`long_subtractor`** has two cascaded subtractors with a borrow register.
  Each segment of the difference and the LSB of the next segment give the
  right-shifted output. After the last segment it flushes with MSB 0.

## Control unit (`fmle_control`)

* **FSM.** `IDLE -> S0` on `en` (loads `x` into PEA and `r mod n` into PEB),
  then `S0 -> S1`, `S1 -> S1` (tau times) and `S1 -> S2`. `S2 -> IDLE`
  raises `done` for one cycle.
* **Exponent RAM.** It is `TAU` bits, written in 32-bit words.
* **Control signal generator.** For every FMLM it:
  * chooses the activity and mode of each element from the state and the
    exponent bit;
  * issues the micro-operations: 14, or 11 with all-at-once;
  * waits for `op_done` from every started element;
  * drives the RAM read addresses.

RAM read timing: for element `k` of an operation that reads the RAM, the
address goes out in cycle `start + k` and the word arrives in cycle
`start + 1 + k`.

## RAM of precomputed vectors (`precomp_ram`)

The RAM holds `5s` words of `c*s + 1` bits in five regions of `s` words:

| region | contents |
|---|---|
| 0 | `N' = CT(n')` |
| 1 | `N^ = NCT(n)` |
| 2 | `B_u[k] = 2(k+1)(2^u - 1)^2` |
| 3 | `R_2 = CT(r_1 n' mod r)` |
| 4 | `R1^ = NCT(r_1)` |

It has one write port, for the host, and two synchronous read ports.

The host computes all of these before the run, together with
`r mod n`:
* `n` must be odd and coprime to `r`;
* `r, h > 4n` and `0 < x < n`.

`tb/fmle_tb_pkg.sv` shows one way to compute them. It uses extended Euclid
for `n'` and direct transform sums for the vectors.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `U` | 17 | digit width `u` (`b = 2^u`) |
| `V` | 6 | `s = 2^v = 64` transform points |
| `C` | 1 | `q = 2^(c*s) + 1 = 2^64 + 1` |
| `TAU` | 1024 | maximum exponent length |
| `EXPW` | 32 | exponent RAM word |

The defaults give `l = u*s = 1,088`, which suits 1,024-bit moduli. Other key
sizes are a matter of parameters, provided these hold:
* `q > 2s(b-1)^2`, for the sum of two nega-cyclic products;
* `u + v + 3 < 2u`, so the short additions fit in one segment.

| key size | `U` | `V` | `C` | flow | cycles per iteration | published cycles per FMLM | `e = 2^16 + 1` total |
|---|---|---|---|---|---|---|---|
| 2,048 bits | 33 | 6 | 2 | all-at-once | 1,031 | 849 | 19,456 |
| 3,072 bits | 49 | 6 | 2 | sequential | 1,370 | 1,266 | 25,243 |
| 4,096 bits | 33 | 7 | 1 | all-at-once | 2,151 | 1,632 | 40,608 |
| 7,680 bits | 121 | 6 | 4 | sequential | 1,370 | 1,274 | 25,243 |

The cycle counts come from `tb_fmle_keysizes`. At each of these sizes it
runs one `e = 2^16 + 1` exponentiation with the right-to-left method and one
random 24-bit exponent with the ladder. The flow is the default of
`ALL_AT_ONCE`. Exponents as long as the key were not simulated at these
sizes, but the iteration time does not depend on the exponent. As in the
published design, the cycle count depends only on `s` and the flow: sets
with the same `s` and flow take the same number of cycles. This design takes
1.08 to 1.32 times the published counts (see the departures below). `TAU` must be
raised to the key length for private-key use.

Only integer `c` is supported, so parameter sets with `c = 1/2` (`sqrt(2)`
twiddles) cannot be built.

Cycle counts at the default size, measured in simulation:

| operation | cycles |
|---|---|
| one S1 iteration (a squaring, plus the parallel multiplication) | 1,031 |
| one common-multiplicand FMLM (S0, S2) | 964 |
| exponentiation with `e = 2^16 + 1` | 19,455 |
| 1,024-bit exponent with the ladder | 1,057,806 |

With `ALL_AT_ONCE = 0`, the sequential flow, the iteration takes 1,370
cycles at the default size.

The total is `T_S0 + tau * T_iter + T_S2` for any exponent value.

## Departures from the published architecture

* **Full modulo-`r` reduction.** In the sequential flow, the reduction of
  step 2 uses the same two-pass adder scheme as step 4. The published
  design replaces it with one short carry-save addition. The all-at-once
  flow has no step 2.
* **Segment width.** Long additions use `2u`-bit segments, `s/2` cycles per
  pass. For `u = 17`, 68-bit segments would be possible.
* **Fewer overlapped operations.** The butterflies are not pipelined and
  micro-operations do not overlap.

These points explain the cycle gap. An iteration takes 1,031 cycles here,
against 822 in the published design.

Other departures:
* **Memories.** All storage, including the FFT buffers and vector stores, is
  register arrays, not FPGA block RAMs.
* **Multiplier structure.** The modular multiplier's internal structure
  (one Karatsuba level, four pipeline stages) is this design's own.
* **One top for both methods.** The right-to-left method and the SPA ladder
  are one design selected by the `spa` input.
* **Last ladder step.** The ladder ends with `t = FMLM(t, 1)`, the
  conversion out of Montgomery form, not a squaring of `t`.
* **Multiplication in the right-to-left all-at-once flow.** PEA forwards
  `Y` and `Y^`, and PEB forms `CT(t) (.) Y (.) N'`.
* **Own choices.** Micro-operation encoding, handshake, RAM region order,
  the second RAM read port and the exponent word width are all this design's
  own.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
wide-integer reference arithmetic and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_fft_operator` | all four transforms against direct transform sums (`V = 3`, `C = 3`), cycle counts |
| `tb_multiply_adder` | random and extreme operands at `q = 2^64 + 1`, with and without the add, latency 4 |
| `tb_long_adder` | two-pass modulo-`r` reductions including `m_r = r` and a carry into bit `l`, plain sums, latency 3 |
| `tb_long_subtractor` | random differences and the shifted output |
| `tb_precomp_ram` | both read ports against a model |
| `tb_fmle_pe` | default size (all-at-once): every mode (squaring, forwarded, RAM, times one, ladder) against `x*y*r^-1 mod n`, results `< 2n`, constant cycle count |
| `tb_fmle_control` | control unit with stub elements: FSM path, all-at-once operation sequence, modes per state and exponent bit, bit order, RAM addresses |
| `tb_fmle_top` | two copies of the whole design at `U = 8, V = 3, C = 4` (60-bit moduli), one per flow: random exponents, `2^16 + 1`, all ones and `e = 1`, both methods (see below) |
| `tb_fmle_full` | whole design at the default parameters with a 1,024-bit modulus: `e = 2^16 + 1` and a random 1,024-bit exponent with the ladder |
| `tb_fmle_keysizes` | four copies of the whole design set up for 2,048-, 3,072-, 4,096- and 7,680-bit keys: a random modulus of the key length each, `x^(2^16+1) mod n` with the right-to-left method and a random 24-bit exponent with the ladder, constant iteration time |

`tb_fmle_top` also:
* counts that every mechanism occurred in each copy: each FSM state, idle
  PEB, forwarded operands, RAM multiplicand, times one, and ladder
  forwarding in both directions;
* checks that the skipped transforms of the all-at-once flow are never
  issued in that copy, and are issued in the other;
* checks that all iterations take the same time.

`tb_fmle_full` runs in about 30 s with Verilator. `tb_fmle_keysizes` takes
about 2 minutes to compile and a few seconds to run. Its reference class
forms products bit by bit, because Verilator limits multiplication and
division to about 4,096 bits.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-WIDTH -Irtl -Itb \
  rtl/fmle_pkg.sv tb/fmle_tb_pkg.sv rtl/ntt_butterfly.sv rtl/fft_operator.sv \
  rtl/multiply_adder.sv rtl/long_adder.sv rtl/long_subtractor.sv \
  rtl/precomp_ram.sv rtl/fmle_pe.sv rtl/fmle_control.sv rtl/fmle_top.sv \
  tb/tb_fmle_full.sv --top-module tb_fmle_full
./obj_dir/Vtb_fmle_full
```

For a block testbench, replace the last file and the top module name. Files
a block does not use can stay in the list.

Lint leaves warnings for unused bits, where the modules use only part of a
wider vector. There is also a note that `rst_n` is used both as an
asynchronous reset and in assertion `disable iff` clauses.

# Residue Polynomial Multiplier for RLWE homomorphic encryption

Homomorphic schemes of the RLWE family, such as FV, spend most of their time in
ciphertext multiplication. That operation is a stream of polynomial products in
`Z_q[X]/(X^n + 1)`, where `n` is in the thousands and `q` is hundreds of bits wide.
With a residue number system (RNS), the wide modulus `q` is split into `k + k'` primes
`q_i` of about 30 bits. One wide product then becomes many independent *residue
polynomial products* modulo each `q_i`. This RTL is a hardware unit for that inner
operation: the **Residue Polynomial Multiplier (RPM)**.

The RPM computes `c = a * b mod (X^n + 1, q_i)` by *negative wrapped convolution*:

```
c = psi^-i * n^-1 * INTT( NTT(psi^i * a)  .  NTT(psi^i * b) )
```

Here `psi` is a primitive 2n-th root of unity modulo `q_i` (so `psi^n = -1`), which
exists when `2n | q_i - 1`. The NTT root is `omega = psi^2`. The whole unit is one
dataflow pipeline. It takes two coefficients of each operand per cycle and returns
two result coefficients per cycle, without stalls or bubbles. It finishes one product
every `n/2` cycles. Each product may use a different prime: the unit holds the data
of `G` prime fields at once and reloads them while running.

Default configuration: `n = 2^14`, 30-bit primes, `G = 4` field slots. At 200 MHz
that gives 24.4 residue products per millisecond.

## Data path

```
 in_a[0..1] ─┐   ┌───────────┐   ┌──────────────────────┐   ┌──────────┐
             ├──►│ psi_weight├──►│ ntt_stream (forward) ├──►│pointwise │
 in_b[0..1] ─┘   │  x psi^t  │   │ 2 polys, shared TWBs │   │  a . b   │
                 └───────────┘   └──────────────────────┘   └────┬─────┘
                                                                 │
 out_c[0..1] ◄── psi_weight (x n^-1 psi^-t) ◄── ntt_stream (inverse) ◄┘
```

| step | module | latency (cycles) |
|---|---|---|
| pre-weighting by `psi^t` | `psi_weight` (NPOLY = 2) | 1 |
| two forward NTTs in lockstep | `ntt_stream` (DIT = 0, NPOLY = 2) | `2 log2 n + n/2 - 1` |
| pointwise product | `pointwise_mul` | 1 |
| inverse NTT | `ntt_stream` (DIT = 1, NPOLY = 1) | `2 log2 n + n/2 - 1` |
| post-weighting by `n^-1 psi^-t` | `psi_weight` (NPOLY = 1) | 1 |

Total latency is `3 + 2(2 log2 n + n/2 - 1)` cycles: 16441 cycles at `n = 2^14`, and
53 cycles at `n = 32`. The two forward transforms run in lockstep, so they share one
set of twiddle banks.

Every beat carries a tag (`rpm_pkg::tag_t`): valid, start of frame, end of frame, and
the field slot. Each stage reads its prime, its Barrett constant and its twiddles by
the slot in the tag that arrives with the data. That is why the field can change from
one frame to the next with no gap.

## Frame format and the order of coefficients

A *frame* is one polynomial pair: `n/2` consecutive beats with `in_valid` high and
`in_sop` on the first beat. Frames may follow each other back to back or with idle
cycles between them. There is no back-pressure. A frame, once started, must not be
interrupted (an assertion checks this).

Beat `t` (0 <= t < n/2) carries the coefficients **`t` and `t + n/2`**:

```
in_a[0] = a[t]      in_a[1] = a[t + n/2]      (likewise in_b)
out_c[0] = c[t]     out_c[1] = c[t + n/2]
```

This "two halves side by side" order suits the two-lane transform: the first
butterfly stage pairs exactly these two coefficients. The result comes out in the
same order.

## The streaming NTT (`ntt_stream`)

This is the part that needs the most care. The transform is radix 2 with
`log2 n` stages. Each stage has one butterfly per polynomial (`ntt_stage`) and its
own twiddle bank. A *commutator* (`stream_commutator`) sits between consecutive
stages.

**Forward transform (DIF).** It uses decimation in frequency with Gentleman-Sande
butterflies: `x = a + b`, `y = (a - b) w`. Stage `k` has span `H = n / 2^(k+1)`, and
the commutator after it has delay `D = H/2`. The input is in natural order, as in the
frame format. Output beat `t` carries `X[bitrev(2t)]` and `X[bitrev(2t+1)]`, where
`X[j] = sum_i x_i omega^(ij)`.

**Inverse transform (DIT).** It uses decimation in time with Cooley-Tukey butterflies:
`x = a + b w`, `y = a - b w`. The spans are `1, 2, ..., n/2`, and each commutator delay
equals the span. It takes its input in exactly the bit-reversed order the forward
transform produces. It returns natural order in the frame format, and it leaves out
the `1/n` factor. Pairing the two forms this way removes any reordering memory
between the pointwise product and the inverse transform.

**Commutator.** It delays lane 1 by `D`, crosses the two lanes during the second half
of every `2D`-beat period, then delays the new lane 0 by `D`. Within each 2D-beat block
of output:

* beats `u` with `u mod 2D < D` carry lane 0 of input beats `u` and `u + D`;
* the other beats carry lane 1 of input beats `u - D` and `u`.

Each butterfly therefore sees partners that are `H` positions apart. The switch phase
restarts at each start-of-frame tag. Delays are circular buffers of `D - 1` words plus
an output register, the kind of structure that maps to block RAM. The delays add up to
`n/2 - 1`, and each stage adds 2 register cycles.

**Twiddles of a stage.** A stage of span `H` needs `omega^(j n/(2H))` for
`j = tau mod H`, where `tau` counts beats since the start of the frame. Its bank
(`twiddle_bank`) holds `H` words per slot, so a transform stores `n - 1` words per
slot.

## Multi-field operation: slots, twiddle banks and reloading

Each of the `G` slots holds one prime field:

* the forward twiddle set `omega^e` (e < n/2), kept in every forward stage bank;
* the inverse set `omega^-e`, kept in the inverse banks;
* eight constants (`field_table`): `q`, the Barrett constant `mu = floor(2^(2S)/q)`,
  and the weighting constants listed in `rpm_pkg::const_e`.

All of these are written through one programming port, one word per cycle:

| `prog_sel` | `prog_addr` | `prog_data` |
|---|---|---|
| `PROG_CONST` | `C_Q`, `C_MU`, `C_PRE0` (= 1), `C_PRE1` (= psi^(n/2)), `C_PRESTEP` (= psi), `C_POST0` (= n^-1), `C_POST1` (= n^-1 psi^(-n/2)), `C_POSTSTEP` (= psi^-1) | the constant |
| `PROG_TW` | exponent `e` | `omega^e mod q`; the inverse twiddle is derived from it |
| `PROG_FWD_TW` | exponent `e` | `omega^e mod q` (forward set only) |
| `PROG_INV_TW` | exponent `e` | `omega^-e mod q` (inverse set only) |

**Paired twiddle writes.** `PROG_TW` fills both sets with one write per exponent. It
relies on `omega^(n/2) = -1`, which gives `omega^-(n/2-e) = q - omega^e`. A write of
`omega^e` for `e > 0` therefore also stores `q - omega^e` as inverse exponent `n/2 - e`.
Exponent 0 stores 1 in both sets. The slot's `C_Q` must be written before its
twiddles.

**Dispatch.** The twiddle write bus goes to every stage of a transform. A bank keeps
a write only when the exponent is a multiple of its step `n/(2H)`, and stores it at
address `e / step`. One pass over the `n/2` exponents fills all stages.

**Reloading.** A slot can be rewritten while frames of *other* slots run.
`slot_busy[g]` is high while a frame of slot `g` is anywhere in the pipeline. Writing
a busy slot corrupts that frame and sets the sticky `prog_conflict` flag.

A complete reload with paired writes takes `n/2 + 8` cycles: 8 constants and `n/2`
twiddles. That is only 8 cycles more than one frame. Even when every product uses a
new prime, the stream stays within a fraction of a percent of one product per `n/2`
cycles. The 30-residue test at `n = 2^14` finishes its 30 products in 262673 cycles,
against 30 x 8192 + 16441 = 262201 for an unbroken stream. Loading the two sets
separately takes `n + 8` cycles.

Up to `LATENCY / (n/2) + 1`, about 3 frames, are in flight at once. With `G = 4`
slots, one slot is always free for loading.

## Weighting by powers of psi (`psi_weight`)

No weight table is stored. At the start of a frame, the two running weights load the
slot's start constants. Every beat multiplies them by the slot's step:

* lane 0: `start0 * step^t`
* lane 1: `start1 * step^t`

Before the forward transform, the start constants are `1` and `psi^(n/2)` and the step
is `psi`. After the inverse transform, the start constants are `n^-1` and
`n^-1 psi^(-n/2)` and the step is `psi^-1`.

## Modular arithmetic

* `mod_add` and `mod_sub` work on `S + 1` bits and apply one conditional correction.
* `mod_mul` uses Barrett reduction. The prime must have exactly `S` bits. With
  `x = a b`, it computes `qhat = floor(floor(x / 2^(S-1)) * mu / 2^(S+1))` and
  `r = x - qhat q`. This leaves `r < 3q`, so at most two subtractions finish the job.
* All three are combinational. Each pipeline step registers its result.

## Using it

Parameters of `rpm`:

| parameter | default | meaning |
|---|---|---|
| `N` | 16384 | polynomial degree `n` (power of two; tested at 32 and 2^11 to 2^15) |
| `S` | 30 | bits of each prime `q_i` (`2^(S-1) < q_i < 2^S`, `q_i = 1 mod 2n`) |
| `G` | 4 | field slots (at most 8) |

Size at the defaults:

* twiddle banks: `2 G (n-1) S` bits, about 3.93 Mbit;
* commutator delay lines: about 1.5 Mbit;
* total memory: about 5.5 Mbit, and about 7.5 kbit of flip-flops.

To use the unit:

1. Load a slot: the 8 constants, then `n/2` paired twiddle writes.
2. Stream frames that name that slot.

The host computes the twiddles and constants. See `load_slot` in `tb/tb_rpm.sv` for
the formulas.

Simulation with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rpm rtl/rpm_pkg.sv tb/rpm_tb_pkg.sv tb/tb_rpm.sv
./obj_dir/Vtb_rpm
```

Every testbench ends with the line `TB_RESULT checks=<n> failures=<m>`.

| testbench | what it shows |
|---|---|
| `tb_rpm` | `n = 32`, 4 primes, 9 frames. Every coefficient is checked against a naive negacyclic product. Also checked: latency, one product per `n/2` cycles, field switches, back-to-back frames and gaps, a slot reload during traffic, several busy slots, and the conflict flag. |
| `tb_rpm_full` | Default size (`n = 2^14`), 3 products over 2 fields, 128 coefficients checked per product, plus latency and throughput. |
| `tb_rpm_rns` | Default size, all 30 residue products of a depth-20 parameter set (`k + k' = 30` primes of 30 bits), rotating the 4 slots with reloads overlapped with traffic. Checks that the rate stays within 1 % of one product per `n/2` cycles. |
| `tb_rpm_sizes` | The same run at `n = 2^11, 2^12, 2^13, 2^15` (harness `rpm_size_check`), the degrees of the smaller and larger parameter sets. |
| `tb_rpm_primes` | The same run at `n = 2^14` with 41-, 51-, 58- and 62-bit primes (harness `rpm_prime_check`), the prime sizes of the wider-prime projection. |
| `tb_ntt_stream` | Forward and inverse transforms at `n = 32` against naive transforms, 3 fields. |
| others | One per building block (`tb_<module>`). |

The reference arithmetic in `tb/rpm_tb_pkg.sv` uses 64-bit integers and covers
primes of up to 31 bits. `tb/rpm_wide_tb_pkg.sv` does the same with 128-bit integers
(Miller-Rabin prime search) for primes of up to 63 bits.

## What follows the reference architecture and what is this design's own

This design follows the reference architecture in these points:

* The product is computed by negative wrapped convolution.
* The NTTs are fully streaming and dataflow oriented, with a streaming width of 2
  coefficients per cycle.
* It is multi-field, switching twiddle sets on the fly from reprogrammable per-stage
  twiddle banks that hold `G` fields, with `G = 4`.
* The sizes are `n = 2^14` and 30-bit primes, with a throughput of one product per
  `n/2` cycles.
* Modular multiplication uses a precomputed reciprocal.

These are this design's own choices:

* the two-lane delay-commutator structure, and the pairing of a DIF forward
  transform with a DIT inverse transform;
* the coefficient order and frame and tag format;
* the rule that dispatches twiddles to the banks;
* the slot bookkeeping and the programming port;
* computing the `psi` weights by recurrence;
* the exact Barrett variant;
* synchronous active-high reset.

Known departures and limits:

* **Streaming width is fixed at 2.** The reference architecture also scales to 4, 8
  and 16 coefficients per cycle, which needs wider permutation networks. Those are
  not built.
* **Twiddle memory is twice the reference figure.** The reference twiddle path uses
  `G n s` bits (1.97 Mbit at the default size). This design keeps separate `n - 1`
  word banks for each direction, `2 G (n-1) s` bits, because every stage has its own
  read port.
* **Reload bandwidth.** One word per cycle. A slot reload (`n/2 + 8` cycles with
  paired writes) is slightly longer than a frame (`n/2` cycles).
* **Timing.** The modular multipliers are combinational inside a one-cycle step.
  Reaching 200 MHz on an FPGA would need extra pipeline registers in `mod_mul` and in
  the `psi_weight` recurrence. Those registers add latency and change no function.
* **Not included.** The host link (PCIe) and its wrapper, the host-side RNS
  conversions and the rest of FV are not part of this RTL. The same goes for
  generating twiddle sets for new primes: the host supplies them.
* **Prime width is a build parameter.** Wider primes (41 to 62 bits, checked in
  `tb_rpm_primes`) need the RPM elaborated with that `S`. The defaults are 30 bits.

## Files

`rtl/`:

* `rpm_pkg.sv`: shared types and constants.
* `rpm.sv`: the top.
* `ntt_stream.sv`, `ntt_stage.sv`, `ntt_butterfly.sv`: the transform.
* `twiddle_bank.sv`, `stream_commutator.sv`, `delay_line.sv`: banks, commutators and
  delays.
* `psi_weight.sv`, `pointwise_mul.sv`, `field_table.sv`: the rest of the data path and
  the field constants.
* `mod_add.sv`, `mod_sub.sv`, `mod_mul.sv`: modular arithmetic.

`tb/`:

* one testbench per module;
* `rpm_tb_pkg.sv`: the reference arithmetic (prime search, roots of unity, modular
  power);
* `rpm_wide_tb_pkg.sv`: the same on 128-bit integers, for primes of up to 63 bits;
* `tb_rpm_full.sv`, `tb_rpm_rns.sv`, `tb_rpm_sizes.sv`, `tb_rpm_primes.sv`: the
  system-level runs, with the harnesses `rpm_size_check.sv` and
  `rpm_prime_check.sv`.

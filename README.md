# Fault-tolerant parallel FFTs: one parity FFT plus Parseval checks

Systems such as MIMO-OFDM receivers run several FFTs side by side on
different data. A radiation-induced soft error, such as one flipped bit in
a stage memory or a coefficient register, silently corrupts one of those
transforms. Triplicating every FFT fixes this, but it triples the cost.

This design exploits two properties of the DFT:

* **It is linear.** One extra *parity* FFT transforms the sum of the K
  inputs, x1+…+xK. Its output equals X1+…+XK. If exactly one FFT `m` is
  wrong, its output can be rebuilt as `Xm = Xp − Σ(others)`.
* **It preserves energy (Parseval).** With the right scaling,
  Σ|x|² = Σ|X|² over a block. A cheap running sum-of-squares (SOS)
  comparison between an FFT's input and output therefore detects that the
  FFT went wrong, without a second FFT.

So the parity FFT supplies the **correction**, and SOS checks supply the
**detection and location**. Two ways of placing the checks are built:

| scheme | extra FFTs | SOS checks (K = 4) | how the faulty FFT is found |
|---|---|---|---|
| `PARITY_SOS` | 1 | K (4) | one check per FFT; the check that fires names it |
| `PARITY_SOS_ECC` | 1 | C (3), with 2^C − 1 − C ≥ K | checks on sums of FFTs, arranged as a Hamming code; the syndrome names it |

Both schemes assume at most one fault is present at a time. The default
configuration is four parallel 1024-point FFTs with 12-bit inputs and
14-bit outputs.

## Hierarchy

```
ft_fft_top                     both schemes side by side (ports a_* and b_*)
└─ ft_parallel_fft (x2)        one protected group of K FFTs
   ├─ stream_combiner          sum of the inputs -> parity FFT; check adders
   ├─ fft_r4_core (K+1)        iterative radix-4 DIF FFT
   │  ├─ fft_ram               in-place sample memory
   │  ├─ r4_butterfly          four-point DFT
   │  └─ twiddle_gen           CORDIC rotation-coefficient generator
   ├─ sos_check (NC)           Parseval energy comparison per block
   ├─ fft_ram (K+1)            output block buffers
   ├─ fault_corrector (x3)     syndrome decode + rebuild from the parity FFT
   └─ tmr_voter                majority of the three correctors (and flags)
ft_fft_pkg                     scheme enum, Hamming-column and mask functions
```

Dataflow through one `ft_parallel_fft`:

```
 x1..xK ──┬──────────────────────► FFT1..FFTK ──┬──► block buffers ──┐
          │                                      │                    ▼
          └─► Σ ──► parity FFT ──────────────────┼──► buffer ──► 3x corrector ─► vote ─► y1..yK
          │                                      │                    ▲
          └─► (Σ per check) ─► SOS check c ◄─────┘ (Σ per check)      │
                                   └──── flags at end of block ──► 3x flag registers
```

## The two protection schemes

### Parity-SOS

Each data FFT `m` has its own `sos_check`, fed with that FFT's input and
output streams. At the end of a block, flag `m` is set if
|Σ|x_m|² − Σ|X_m|²| > τ. One set flag means "rebuild FFT m from the
parity". No flag means "pass through". More than one flag cannot come from a
single fault. That case is reported on `st_uncorrectable`, and the data
pass unchanged.

### Parity-SOS-ECC

Each FFT gets a C-bit code column with at least two ones. The columns are
taken counting down from all-ones and skipping weight-one values. For C = 3
this gives 111, 110, 101, 011 for FFTs 1–4. Check `c` watches the *sum* of
the FFTs whose column has bit `c` set:

* For K = 4: c1 = {1,2,3}, c2 = {1,2,4}, c3 = {1,3,4}.
* Its input stream is x1+x2+x3 (for c1).
* Its output stream is X1+X2+X3.

An error in FFT `m` disturbs exactly the checks in its column, so the flag
pattern (the syndrome) equals the column and names `m`. A weight-one
syndrome (100, 010, 001) can only come from an upset inside one check. It
is reported on `st_check_fault` and nothing is corrected. C is 3 for K ≤ 4,
4 for K ≤ 11, and 5 above.

`ft_fft_pkg::hamming_code`, `num_checks` and `check_mask` compute all of
this from K, so any K works: K = 6, 8 and 11 are exercised in the tests.

### Correction

`fault_corrector` applies `y_m = xp − Σ_{j≠m} x_j` to the located FFT, bin by
bin, as the buffered block is read back. The result is saturated to the
14-bit output range. A rebuilt output carries the rounding of all K+1
transforms, so it is a few LSB noisier than a directly computed one:
about √(K+1) times the usual error.

## The Parseval (SOS) check and its tolerance

`sos_check` keeps two 39-bit saturating accumulators:

* The input accumulator adds re²+im² of each input sample and is set aside
  at the block's last input.
* The output accumulator does the same for each output bin.

One cycle after the last output bin, the check raises `done` with
`fault = |in − out| > tau`. The 39-bit width leaves headroom for 1024
samples of 16-bit data.

For this comparison to be exact in theory, the FFT must be unitary. Each
of the S radix-4 stages therefore divides by 2. The transform is DFT/√N,
with energy Σ|X|² = Σ|x|², and no scale factor is needed in the check.

In practice it is not exact, because every stage rounds. The difference
between input and output energy of a fault-free block is roughly
2·Re⟨X, e⟩, where `e` is the accumulated rounding error. It grows with
signal amplitude and with N. For uniformly random 12-bit data at
N = 1024, it reaches the order of 10⁵ squared LSBs. It is largest in the
parity-SOS-ECC checks, which watch a sum of three FFTs and so see a larger
signal: about 2.5 times the single-FFT value in the tests.

A tolerance of one LSB² is therefore unusable. `tau` is a run-time input in
squared output LSBs summed over the block. It must be chosen above the
rounding floor of the expected signal. The tests use 2^20 for the
functional checks and 2^18 for the coverage campaign.

The check then ignores errors e for which |2·Re⟨X,e⟩ + |e|²| ≤ τ. For
τ = 2^18 that means a single-bin error of up to a few hundred LSB can go
unnoticed if it happens to lower the energy. This is the main limit on
coverage (next section).

## How much protection you get

`tb_fault_campaign` injects one random upset per block into each scheme.
The upset is a bit flip either in a word of any core's stage RAM (random
core including the parity core, address, bit and time) or in a rotation
coefficient register. The test then compares every output bin with an
exact DFT. Runs of 250 upsets per scheme at τ = 2^18 give:

| outcome | parity-SOS | parity-SOS-ECC |
|---|---|---|
| masked (no flag, outputs correct) | 55–60% | 50–60% |
| detected and corrected | 25–30% | 20–27% |
| an output off by more than 6 LSB | 15–20% | ~22% |

Most of the "wrong" cases are flips of low and middle bits. Their error
(6 to a few hundred LSB in some bins) stays under the tolerance. This is
inherent to an energy check sitting on top of rounding noise.

Coverage here is much lower than the ~99.9% the source publication reports
for τ = 1. That figure cannot be reproduced with these word widths, and
the units of its τ are not known. Treat the protection as "large errors are
corrected, small ones may pass".

Three effects are specific to the design:

* **Coefficient upsets hit one sample.** A corrupted coefficient register
  is used for one multiplication only, so the energy change scales with
  that one sample. When the sample is small, even a high-order flip stays
  under τ. The end-to-end test therefore retries a coefficient upset up to
  eight times, and counts the escapes, before it requires a correction.
* **Partial syndromes in parity-SOS-ECC.** The energy change an error
  causes in a check depends on the error's correlation with the *summed*
  signal of that check. Three checks see three different sums, so an error
  near τ can trip only some of the checks of its column. The syndrome then
  names the wrong FFT, or looks like a check fault. Parity-SOS has no such
  failure mode: the few "flagged but wrong" cases in the campaign all come
  from the ECC scheme.
* **Faults that need no correction.** An upset in the parity FFT never
  reaches the outputs. An upset in an SOS check causes a needless but
  correct rebuild in parity-SOS, and an ignored weight-one syndrome in
  parity-SOS-ECC. An upset in one of the three flag/corrector copies is
  outvoted (`st_tmr_mismatch` reports it).

## TMR on the decision logic

The location and correction logic is the one place where a single upset
would reach the outputs directly. Two parts are tripled:

* The flag registers are tripled.
* `fault_corrector` is instantiated three times, and one `tmr_voter`
  takes the bitwise majority of their outputs and status.

In parity-SOS-ECC the adders that form each check's input and output sums
are also tripled and voted, because an error there would make a
healthy FFT look faulty.

Two parts are not tripled:

* The adder feeding the parity FFT. An error there only spoils the parity
  FFT, which is harmless.
* The voters. They are assumed small enough to be hardened by other means.

## The iterative radix-4 FFT core (`fft_r4_core`)

One core computes N = 4^S points, with S set per block by `cfg_stages`
(1…5 by default, so 4 to 1024 points; 0 means the maximum). It uses one
four-point butterfly and one in-place RAM with one read and one write per
cycle.

**Block phases.**

1. *Load*: N samples in natural order, one per cycle while `in_ready`.
2. *Compute*: S stages. Stage s (span L = 4^(S−1−s)) reads, for each
   butterfly b with g = b / L and n = b mod L, the four samples at
   `g·4L + n + q·L`, q = 0..3. Reads are consecutive, one sample per
   cycle. The four-point DFT of the group is formed. Output q is multiplied
   by `exp(−j2π·q·n/(4L))`, halved with round-half-to-even and
   saturation, and written back to the address it came from.
3. *Output*: N bins in natural order, read from digit-reversed addresses
   (`out_last` on the final one).

**Timing.** A stage takes N cycles, so a 1024-point block computes in
5·1024 = 5120 cycles. The butterfly pipeline is five cycles deep from read
to write. A stage could therefore read a word that the previous stage has
not yet written back.

The read order rules this out for N ≥ 64:

* The last five reads of a stage all lie in the last group of 4L words.
* The first five reads of the next stage lie below L.

These ranges meet only in the first stage of a 16-point block. For N ≥ 64
the stages run back to back, and so do the last stage and the output
phase. Blocks of 16 and 4 points wait five cycles after each stage for
the pipeline to drain, taking S·(N+5) cycles.

The core does not overlap blocks. Load, compute and output follow one
another, and the next load starts after the last output bin.

**Coefficients.** `twiddle_gen` computes `exp(−j2πp)` for a 10-bit phase p
on line:

* The top two bits of p select the quadrant.
* The rest of p drives a 16-step unrolled CORDIC. It starts from a
  gain-compensated unit vector and carries four guard bits.
* The arctangent table is `round(atan(2^−i)/(2π)·2^24)`.

Outputs are 16 bits with 14 fraction bits, with a worst-case error of 1 LSB
against the exact value. A result appears two cycles after its phase. The
core then holds it in a register until the multiply. That register is
where coefficient upsets are injected. Twiddles equal to 1 (q = 0 or
n = 0) bypass the multiplier and are not injectable.

**Accuracy.** At 1024 points with 12-bit data the worst bin error against
an exact scaled DFT is under 3 LSB. Rounding half to even matters here:
rounding half up biases the DC bin by around 10 LSB over five stages.

## System timing (`ft_parallel_fft`)

All K+1 cores share one handshake and run in lockstep (assertions check
this). The checks finish only after the last output bin of a block, so
every core's output is written into a block buffer while the checks
accumulate. The flags are latched, three times, at the checks' `done`.
The buffers are then read back through the three correctors and the
voter.

From the last input sample of a block to the first corrected output bin
takes **S·N + N + 5 cycles** (S·(N+5) + N + 5 below 64 points): 6149 at
1024 points, 261 at 64 and 18 at 4. The status outputs (`st_flags`, `st_corrected`, `st_loc`,
`st_check_fault`, `st_uncorrectable`, `st_tmr_mismatch`) describe the block
being output, and are valid with `out_valid`.

## Parameters and ports

`ft_parallel_fft` (and both halves of `ft_fft_top`):

| parameter | default | meaning |
|---|---|---|
| `SCHEME` | `PARITY_SOS_ECC` | `PARITY_SOS` or `PARITY_SOS_ECC` (not on `ft_fft_top`, which has one of each) |
| `K` | 4 | number of protected FFTs |
| `IN_W` / `OUT_W` | 12 / 14 | data FFT input / output width; the parity FFT uses `+clog2(K)` (14 / 16) |
| `LOG4_NMAX` | 5 | largest size 4^5 = 1024 |
| `TW_W` | 16 | coefficient width |
| `ACC_W` | 39 | SOS accumulator width |

Main ports:

* `cfg_stages`: points per block, N = 4^cfg_stages.
* `tau`: the check tolerance.
* `in_valid` / `in_ready` with `in_re[K]` / `in_im[K]`: the input streams.
* `out_valid`, `out_last`, `out_re[K]`, `out_im[K]`: the corrected outputs.
* The status outputs above.

The `fi_*` inputs are for testing only; tie them to 0 in use. They flip a
stage-RAM bit at its next read, a coefficient-register bit, an SOS
accumulator bit, or one copy of the tripled flags.

Generic yosys synthesis (word-level cells, so a multiplier counts as one
cell) gives the following sizes at the defaults:

| block | cells | flip-flop bits | memory bits |
|---|---|---|---|
| `fft_r4_core` (one 1024-point FFT) | 495 | 280 | 28 912 |
| `sos_check` | 49 | 126 | 0 |
| `fault_corrector` | 112 | 0 | 0 |
| `ft_parallel_fft` (K = 4, parity-SOS-ECC) | 2 965 | 1 985 | 296 128 |
| `ft_fft_top` (both schemes) | 5 862 | 4 098 | 592 256 |

The SOS check is an order of magnitude smaller than an FFT core, which is
what makes replacing redundant FFTs by checks pay off. Memory dominates:
every core's sample RAM is matched by an equally large output block
buffer.

## Departures from the published design

* **Tolerance units.** `tau` is a run-time value in squared output LSBs.
  It has to sit above the rounding floor; τ = 1 is not meaningful here.
  Coverage is correspondingly lower (see above).
* **Cycle count.** Computation matches the N cycles per stage, but load
  and output are not overlapped with it. A block therefore occupies a core
  for N + S·N + N cycles. Blocks below 64 points add a 5-cycle drain per
  stage.
* **Output buffering.** Holding each FFT's block until its check finishes
  is this design's own arrangement. It costs one block RAM per core and N
  cycles of latency.
* **Choices where the source gives no detail:**
  * the scaling (÷2 per stage);
  * the CORDIC coefficient generator and its widths;
  * the internal word width (equal to the output width);
  * the handshake;
  * the reset (asynchronous, active low, control only);
  * saturation;
  * the status and fault-injection ports.
* **Not built.** The reference scheme that uses C redundant FFTs (a Hamming
  code over whole FFTs) is the baseline the two schemes are compared with.
  It is not part of this design.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on its own or on a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/ft_fft_pkg.sv tb/tb_ft_fft_top.sv --top-module tb_ft_fft_top -Mdir obj_top
./obj_top/Vtb_ft_fft_top
```

Replace the testbench name for the others:

| testbench | what it covers | run time |
|---|---|---|
| `tb_ft_fft_top` | both schemes at full default size: clean blocks; RAM upsets in every FFT; coefficient, parity-FFT, SOS-check and TMR upsets; 1024/64/4-point blocks; latency | < 1 s |
| `tb_ft_parallel_fft` | K = 4, 6, 8, 11 in both schemes, clean and faulty blocks | ~1 s |
| `tb_fault_campaign` | random single-upset campaign, 250 upsets per scheme, coverage report | ~16 s |
| `tb_fft_r4_core` | the core against an exact DFT at 1024, 64 and 4 points; energy preservation; compute latency | < 1 s |
| `tb_twiddle_gen`, `tb_r4_butterfly`, `tb_fft_ram`, `tb_sos_check`, `tb_stream_combiner`, `tb_fault_corrector`, `tb_tmr_voter` | the leaf blocks | < 1 s each |

Verilator starts unreset registers at random values with
`+verilator+rand+reset+2 +verilator+seed+<n>`. All testbenches are written
to pass that way. Random stimulus follows the same seed.

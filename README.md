# Fault-tolerant parallel FFTs with a parity FFT and Parseval checks

Systems that run several FFTs side by side on independent channels can protect
them against soft errors more cheaply than by protecting each FFT on its own.
Two properties of the FFT make this work:

* **Linearity.** An extra *parity FFT* that transforms the sum of all K inputs
  produces the sum of all K outputs. If one FFT's output is known to be wrong,
  it can be rebuilt as the parity output minus the other K-1 outputs:
  `X1c = X - X2 - X3 - X4` for K = 4.
* **Parseval's theorem.** The energy (sum of squares, "SOS") of an input block
  equals the energy of its output block up to a fixed scale factor. Comparing
  the two is a cheap error *detector*: two multiplications per sample on each
  side, plus an accumulator.

The parity FFT corrects and the SOS checks locate. This RTL implements both
published ways of combining them, for K = 4 parallel FFTs. They sit side by side
in `ft_parallel_fft_top`:

| scheme | extra FFTs | SOS checks | module |
|---|---|---|---|
| **parity-SOS** | 1 (parity) | K, one per FFT (4) | `parity_sos_fft` |
| **parity-SOS-ECC** | 1 (parity) | R, on Hamming-coded sums of FFTs (3 for K = 4) | `parity_sos_ecc_fft` |

The second scheme needs fewer checks, so it costs less. This is also how the
technique is presented: parity-SOS-ECC is the lowest-complexity option. The
plain ECC scheme that came before it (K FFTs plus three redundant check FFTs) is
not implemented. Both schemes here improve on it.

## How the errors are located

**parity-SOS.** Each original FFT i has its own check Pi. If exactly one check
fails, that FFT is rebuilt from the parity FFT. If none fails, the outputs pass
unchanged. If two or more fail, the block is flagged *uncorrectable* and passed
unchanged, because one parity FFT can repair only one output. The parity FFT
itself is not checked. An error confined to it changes no output, since its
result is used only for a correction.

**parity-SOS-ECC.** Each of the R checks watches the *sum* of a subset of FFTs.
The check compares the energy of the summed inputs with the energy of the summed
outputs. Linearity makes this valid. The subsets follow a single-error-correcting
Hamming code. An error in FFT i fails exactly the checks in its column, so the
pattern of failed checks (the syndrome, written c1 c2 c3) names the FFT:

| syndrome c1 c2 c3 | meaning | checks covering it |
|---|---|---|
| 000 | no error | |
| 111 | FFT1 | c1, c2, c3 |
| 110 | FFT2 | c1, c2 |
| 101 | FFT3 | c1, c3 |
| 011 | FFT4 | c2, c3 |
| 100, 010, 001 | no original FFT: flagged uncorrectable | |

So c1 watches FFT1+FFT2+FFT3, c2 watches FFT1+FFT2+FFT4 and c3 watches
FFT1+FFT3+FFT4. The partial sums are formed by `partial_sum`, once on the input
streams and once on the output streams. For other K (a parameter), the columns
are the R-bit values of weight two or more, counted down from all-ones. R is the
smallest number with 2^R - 1 - R >= K. That gives log2(K)+1 checks for K = 4,
8, 16, ... If every check covering the faulty FFT sees the error, a single-bit
syndrome cannot come from one faulty FFT. That is why it is reported rather than
acted on.

## Arithmetic, and what the checks can and cannot see

This is the part that most needs care when changing the design.

**Widths.** An original FFT takes 12-bit complex samples and delivers 14-bit
ones. The parity FFT's input is the sum of four inputs, so it takes 14 bits and
delivers 16. The FFT scales its output by 1/N. With complex input, `X(k)/N` can
reach twice the input full scale in each component, so two extra bits are exact:
nothing saturates. Internally each FFT keeps the full unscaled growth plus 4
guard fraction bits (24 bits for the originals). The rounding to the 1/N scale
happens once, at the output.

**The Parseval identity used.** With 1/N scaling, `sum|x|^2 = N * sum|X|^2`.
`sos_check` sums `re^2 + im^2` on each side in a 39-bit accumulator. At the end
of the block it compares `acc_in` with `acc_out << log2(N)`. The compare uses a
46-bit word, so the shift cannot overflow. The accumulators saturate instead of
wrapping, so a huge error cannot alias to a small difference.

**Why a tolerance is needed.** Each output sample is rounded to the 1/N grid, so
a fault-free block never matches exactly. A check fails only when
`|sum|x|^2 - N*sum|X|^2| > THRESH`, in units of input LSB squared. The defaults
were set from a simulation of this rounding over 3000 random full-scale blocks:

| check on | largest fault-free difference seen | default THRESH |
|---|---|---|
| one FFT (parity-SOS) | 2.6e5 | 2^21 = 2.1e6 |
| sum of three FFTs (parity-SOS-ECC) | 6.8e5 | 2^22 = 4.2e6 |

A larger THRESH gives fewer false alarms, but more small errors go undetected.
Errors below the tolerance pass through uncorrected. They are errors of about
the size of the rounding noise, and that is the coverage cost of a Parseval
check.

**Detection is data dependent, more so for sums.** An error E added to an output
X changes the energy by `2*Re(X*conj(E)) + |E|^2`. For a check on a single FFT
output, a bit flip of weight 2^b always moves the energy by at least 2^(2b). The
flip moves the value away from zero on the side where the cross term adds.
Tests confirm this. For a check on a *sum* of FFTs, X is the sum of several
outputs and the cross term can cancel `|E|^2`. A ±1024 LSB error in FFT1 is then
missed by c1 whenever `X1+X2+X3` is near -512 at that frequency bin. That check
drops out of the syndrome, and the error can be pinned on the wrong FFT. The
parity-SOS-ECC testbenches therefore inject errors of 4096 LSB. That is about
eight standard deviations of such a sum for full-scale random data. The
parity-SOS testbenches inject 1024 LSB. This weakness belongs to the scheme, not
to this RTL, but it matters when judging the cheaper scheme's coverage.

**Correction accuracy.** A rebuilt output is `parity - sum of others`. Each of
the five FFTs rounds independently, so the rebuilt value may differ from a
fault-free result by up to about 2.5 LSB. The corrector saturates to 14 bits.

## Data flow and timing

```
 x1..x4 ─┬──────────────► FFT1..FFT4 ─┬─► out buffer ─► corrector ─► X1..X4
         └─► Σ ─► parity FFT ─────────┘   (one block)    (X - ΣXj)
   inputs ──► SOS checks ◄── outputs        ▲
                   └─► locator / syndrome decoder ─┘
```

* `fft_core` is a memory-based radix-2 decimation-in-time FFT with one
  butterfly per clock. It loads N samples at bit-reversed addresses and runs
  log2(N) stages of N/2 butterflies in place. It then streams X(0)..X(N-1) out,
  one per clock. Twiddles are computed at elaboration (`ft_pkg`), so any
  power-of-two N works without a table file. All K+1 FFTs are loaded in the
  same cycles and run in lock step. Assertions check this, and also that the
  buffer is never overwritten during a replay and that no FFT output overflows
  its 14 bits. Simulate with `--assert` to enable them.
* The checks can judge a block only after its last output. So `fft_out_buffer`
  stores the whole block of K+1 outputs and replays it when the decision is
  available. The corrector then applies the decision to every sample of the
  block.
* Cycle counts at the defaults (N = 64):
  * Last input sample to X(0) of one FFT: log2(N)*N/2 + 1 = 193 cycles.
  * Last input sample of a block to its first corrected output: log2(N)*N/2 + N + 4 = 260 cycles.
  * `in_ready` returns right after an FFT's output burst, so a new block
    loads while the previous one is being replayed.
  * One block per 2N + log2(N)*N/2 = 320 cycles per stream (load, transform, output burst).

## Interfaces

Both schemes have the same ports. In the top they are prefixed `ps_`
(parity-SOS) and `pse_` (parity-SOS-ECC). Stream i uses element `[i]` of a
packed array. Samples are signed two's complement.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state |
| `in_valid`, `in_ready` | in/out | 1 | one sample of every stream per accepted cycle, N per block; `in_ready` is high while the FFTs load |
| `in_re`, `in_im` | in | K x 12 | input samples |
| `out_valid`, `out_first`, `out_last` | out | 1 | N consecutive cycles per block, no back-pressure |
| `out_re`, `out_im` | out | K x 14 | corrected X_i(k)/N |
| `chk_flags` | out | K or R | P1..PK (parity-SOS) or syndrome {c1..cR} (parity-SOS-ECC) of the block on the output |
| `err_detected`, `err_corrected`, `err_uncorrectable` | out | 1 | block status, stable during the output burst |
| `err_idx` | out | log2 K | the FFT that was rebuilt |
| `fi_en` | in | K+1 | fault injection: bit i is FFT i, bit K is the parity FFT |
| `fi_addr`, `fi_mask` | in | 6, 24 | the working-memory word whose real part is XORed with `fi_mask` (internal units, 4 guard bits, unscaled) |

The fault-injection port models a soft error inside an FFT for testing. Tie
`fi_en` low in use. An error injected in an early butterfly stage spreads over
many output bins. One injected in the last stage hits a single bin.

## Files

* `rtl/ft_pkg.sv`: twiddle and Hamming-column functions, accumulator width.
* `rtl/fft_core.sv`: the sequential-I/O FFT, used for all K+1 FFTs.
* `rtl/partial_sum.sv`: masked sum of the K streams (parity input, check sums).
* `rtl/sos_check.sv`: the Parseval check.
* `rtl/parity_error_locator.sv`: locator for parity-SOS.
* `rtl/sos_syndrome_decoder.sv`: decoder for parity-SOS-ECC.
* `rtl/fft_out_buffer.sv`: the one-block output buffer.
* `rtl/parity_corrector.sv`: the correction `X - ΣXj`.
* `rtl/parity_sos_fft.sv`, `rtl/parity_sos_ecc_fft.sv`: the two schemes.
* `rtl/ft_parallel_fft_top.sv`: both schemes side by side.
* `tb/tb_<module>.sv`: one self-checking testbench per module, plus
  `tb/tb_ft_parallel_fft_k8.sv` for eight parallel FFTs. Each prints
  `TB_RESULT checks=N failures=M`.

At the defaults, coarse generic synthesis gives about 800 word-level cells,
750 to 880 flip-flop bits and 30 kbit of memory per scheme. Most of the memory is the
five FFT working memories and the output buffer.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/ft_pkg.sv tb/tb_ft_parallel_fft_top.sv --top tb_ft_parallel_fft_top
./obj_dir/Vtb_ft_parallel_fft_top
```

Replace the testbench name to run another one. `tb_ft_parallel_fft_top` runs the
top at its default parameters. It streams 24 back-to-back blocks through both
schemes with these faults:

* none;
* each FFT in turn, early and late in the transform;
* the parity FFT alone;
* for parity-SOS, two FFTs at once.

It checks every output sample against a double-precision DFT: within 1 LSB, or
3 LSB for a rebuilt FFT. It checks every block's status, counts each mechanism
(detections, corrections of each FFT, ignored parity-FFT faults, the
uncorrectable block, overlapped load and replay) and fails if any never
happened. It takes well under a second.

`tb_ft_parallel_fft_k8` runs the same top with eight parallel FFTs (`K = 8`).
parity-SOS then has 8 checks and parity-SOS-ECC has 4, with syndromes 1111,
1110, 1101, 1100, 1011, 1010, 1001 and 0111 for FFT1..FFT8. The first
parity-SOS-ECC check then covers seven FFTs, and seven roundings add up, so that
testbench raises `PSE_THRESH` to 2^23. Keep this in mind when changing K: the
tolerance of a check must grow with the number of FFTs it sums. The largest
fault-free differences seen for sums of 1 to 7 FFTs were 2.4e5, 4.5e5, 6.6e5,
1.05e6, 1.2e6, 1.4e6 and 1.8e6.

## Choices made in this implementation

The two scheme structures, the 12/14 and 14/16-bit widths, the 39-bit
accumulators, sequential checking and the syndrome table follow the published
technique. The following are this implementation's own choices:

* **FFT size** N = 64 and the FFT architecture (memory-based radix-2, one
  butterfly per clock). The technique does not depend on either; change `N`
  freely (power of two, at least 4).
* **Transform sign.** The forward transform uses exp(-j2πkn/N). The checks
  and the correction work for either sign.
* **Tolerances** `THRESH` of the SOS checks (see above). They are parameters.
* **The output buffer** and its extra N + 3 cycles of latency. A design that
  can pass outputs on before the decision, with a flag to follow, could drop it.
* **Handshakes**, reset and status ports, and the fault-injection port.
* **Saturation** of the accumulators and of the corrector.
* **Multiple errors:** flagged uncorrectable (parity-SOS; single-bit syndromes in
  parity-SOS-ECC) and passed through unchanged.
* **K = 2** with parity-SOS-ECC uses 3 checks, not log2(K)+1 = 2, because
  columns of weight one are not used.

Not covered by any check: errors in the parity FFT *during* a block that also
has an error in an original FFT (the rebuilt output is then wrong), and errors
in the checks, the buffer or the corrector themselves. The scheme as described
does not address these either.

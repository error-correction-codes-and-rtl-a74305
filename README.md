# Parity-SOS-ECC: four parallel FFTs that correct their own soft errors

A radiation-induced soft error inside an FFT datapath corrupts the spectrum
it produces. Triplicating every FFT (TMR) fixes that, at three times the
area. When several FFTs run side by side, as in a MIMO-OFDM receiver, the
group can share its protection. This RTL protects four parallel FFTs with
**one** extra FFT and **three** cheap energy checks:

* A **parity FFT** transforms the sum of the four input blocks. The DFT is
  linear, so its output equals the sum of the four spectra. Any single
  spectrum can be rebuilt from it and the other three.
* Three **Parseval checks** find the faulty FFT. Parseval's theorem says a
  block and its spectrum carry the same energy, up to a known factor. Each
  check applies it to a *sum* of channels: check 1 compares the energy of
  `x1+x2+x3` with that of `z1+z2+z3`, check 2 covers channels 1, 2, 4 and
  check 3 covers 1, 3, 4. Together the checks form a small Hamming-style
  code, and the set of failing checks names the FFT in error.

The scheme is the "parity-SOS-ECC" technique (SOS = sum of squares). It
needs fewer extra FFTs and checks than a Hamming code over whole FFTs, or
a parity FFT with one Parseval check per FFT. Those two alternatives are
not implemented here.

## Locating and correcting an error

| c1 c2 c3 | meaning | action |
|---|---|---|
| 0 0 0 | no error | outputs pass unchanged |
| 1 1 1 | FFT 1 | `y1 = xp - z2 - z3 - z4` |
| 1 1 0 | FFT 2 | `y2 = xp - z1 - z3 - z4` |
| 1 0 1 | FFT 3 | `y3 = xp - z1 - z2 - z4` |
| 0 1 1 | FFT 4 | `y4 = xp - z1 - z2 - z3` |
| 1 0 0, 0 1 0, 0 0 1 | not a single-FFT error | nothing corrected, `loc = 5` |

Here `xp` is the parity FFT's output bin. `z1..z4` are the bins of the
four channel FFTs.

The other patterns mean:

* An error in the **parity FFT** changes no check. No correction uses its
  output then, so it never reaches the outputs.
* An error in a **check** can trigger a correction that was not needed. The
  rebuilt spectrum is still correct, because the FFT it replaces was fine.
* The single-bit syndromes (100, 010, 001) cannot come from one faulty FFT.
  The source design does not say how to handle them. This design reports
  them and changes nothing.

The adders that form the input and output sums, and the decoder/corrector,
are each built three times, with a bitwise majority vote (`tmr_voter`). A
soft error in them could otherwise reach the outputs directly. These
blocks are tiny next to an FFT. If the copies disagree, `vote_mismatch`
is set. The block buffer memory (below) is not triplicated; in silicon it
would carry a memory ECC.

## The Parseval check and its tolerance

This is the part that decides what gets caught. Each FFT core scales its
output to `Y = DFT(x) / (S/2)`, where `S` is the number of points (see
below). For that scaling Parseval reads

    S * sum|Y|^2  =  4 * sum|x|^2

`sos_check` squares and accumulates the input samples while a block is
loaded (`E_in`). It does the same for the output bins as they stream out
(`E_out`). The cycle after the last bin it compares `lhs = 4*E_in` with
`rhs = S*E_out`. An error is flagged when

    |lhs - rhs|  >  lhs / 2^TOL_SHIFT  +  TOL_ABS * S^2

The FFT rounds at every stage, so the two sides never agree exactly, and
the tolerance must absorb that rounding. Defaults are `TOL_SHIFT = 7`
(0.8 %) and `TOL_ABS = 4`. On random full-scale blocks, at both 64 and
1024 points, clean data stays below 0.1 % mismatch.

What this means in practice (fault campaign at 64 points, one single-bit
upset in the real part of one 14-bit output bin per block):

* upsets of bit 11 and above (a change of ±2048 or more) are always
  detected, located and corrected;
* near the threshold (bits 9–10) most are detected. A few are located
  wrongly: only two of the three checks fire, and the wrong FFT is
  rebuilt;
* small upsets are not detected and stay in the output. They are the
  errors "within tolerance".

An energy check can also miss a large error that leaves a bin's energy
unchanged. For example, a bin near −1024 hit by +2048 becomes +1024. That
is inherent to any sum-of-squares check.

## The FFT core (`fft_r4_iter`)

Each of the five cores is an iterative, in-place radix-4
decimation-in-frequency FFT with sequential input and output.

* **Memory and schedule.** Each core has one N-entry complex memory with
  one read port and one write port. A butterfly's four operands are read
  over four cycles. The previous butterfly's four results go back over the
  same four cycles, each rotated by its twiddle factor on a single shared
  complex multiplier. The core keeps one sample per cycle flowing, so a
  stage costs S cycles plus a drain of about 6 cycles. A stage cannot
  start before the previous one has written back all its results. A
  1024-point block computes in **5152 cycles**. The published core takes
  5 × 1024 = 5120.
* **Addressing.** In stage `s` of an S-point transform, butterfly `b` has
  `q = S/4^(s+1)`, `j = b mod q` and `g = b / q`. Its operands are at
  `g*4q + j + k*q` for k = 0..3. Output `k` is multiplied by `W_S^(j*k*4^s)`.
  After the last stage the spectrum sits in base-4 digit-reversed order.
  The read-out addresses undo this, so bins leave in natural order.
* **Twiddles.** A quarter-wave cosine table for the largest size,
  `C[r] = round(cos(2*pi*r/N) * 2^14)` for r = 0..N/4, is computed at
  elaboration. Cosine and sine of any angle come from symmetry. Smaller
  sizes index the table with a stride. The published core instead
  recomputes its coefficients for each stage into registers.
* **Scaling.** An input of `IN_W` bits is stored in `OUT_W = IN_W + 2` bits,
  shifted left by one to leave a guard bit. Every stage divides by 4 with
  rounding and saturates. The magnitude therefore never grows, and the
  output is `DFT/(S/2)`. The channel cores are 12 bits in and 14 bits out.
  The parity core is 14 in and 16 out, because its input is a sum of four
  channels. These widths are the published ones; the scaling scheme is
  this design's own.
* **Programmable size.** `log4_n` selects a transform of `4^log4_n` points
  (4 to 1024) for each block. It is taken with the block's first sample,
  and out-of-range values are clamped. The checks and the correction unit
  follow the size of the block they are judging.
* **Fault injection.** `fi_en`, `fi_idx` and `fi_mask` XOR a mask into the
  real part of one output bin. This models a soft error for experiments.
  Keep `fi_en` low in normal use.

## Timing of one block

All five cores run in lockstep from one `in_valid`.

1. **Load:** S beats of `in_valid` while `in_ready` is high. The input
   sums feed the three checks' input accumulators.
2. **Compute:** `log4_n` stages, each taking S cycles plus the drain.
   `in_ready` is low.
3. **Stream:** for S cycles all five cores emit one bin per cycle. The
   bins go into the block buffer, and their sums go to the checks' output
   accumulators.
4. **Verdict:** one cycle after the last bin the checks compare, and one
   cycle later their results reach the correction unit.
5. **Read-back:** the buffer is read in order through the corrector.
   `y_valid` carries one bin of all four channels per cycle, starting two
   cycles after the verdict. `syndrome`, `loc` and `corrected` describe
   the block and stay valid until the next verdict.

The cores accept the next block as soon as step 3 ends, so its load
overlaps the read-back. From the last input sample to the first output
takes `log4_n*(S + ~6) + S + 4` cycles (280 at 64 points).

## Top-level ports (`parity_sos_ecc_fft`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `log4_n` | in | 3 | block size 4^log4_n (5 = 1024 points) |
| `in_valid` | in | 1 | one sample of each channel |
| `in_re[4]`, `in_im[4]` | in | 12 | channel samples, signed |
| `in_ready` | out | 1 | a block may be loaded |
| `y_valid`, `y_idx`, `y_last` | out | 1, 10, 1 | corrected bin valid, bin number, last bin |
| `y_re[4]`, `y_im[4]` | out | 14 | corrected spectra, `DFT/(S/2)` |
| `syndrome` | out | 3 | {c1,c2,c3} of the block being output |
| `loc` | out | 3 | 0 none, 1–4 FFT corrected, 5 check-side error |
| `corrected` | out | 1 | one spectrum was rebuilt |
| `vote_mismatch` | out | 1 | triplicated copies disagreed |
| `fi_en[5]`, `fi_idx`, `fi_mask` | in | 5, 10, 16 | fault injection (index 4 = parity FFT); tie to 0 |

Parameters: `N` = 1024 (largest size, a power of 4), `IN_W` = 12,
`OUT_W` = `IN_W`+2, `TOL_SHIFT` = 7, `TOL_ABS` = 4.

## Source files

| file | contents |
|---|---|
| `rtl/psecc_pkg.sv` | which check covers which FFT, syndrome decoding, `loc_t` |
| `rtl/fft_r4_iter.sv` | radix-4 FFT core |
| `rtl/ecc_input_encoder.sv` | `x5, x6, x7` and parity input `xp` |
| `rtl/ecc_output_combiner.sv` | `z1+z2+z3, z1+z2+z4, z1+z3+z4` |
| `rtl/sos_check.sv` | Parseval check |
| `rtl/sos_ecc_corrector.sv` | syndrome decoder and rebuild of one bin |
| `rtl/ecc_correction_unit.sv` | block buffer, three correctors and vote, output stream |
| `rtl/tmr_voter.sv` | bitwise majority |
| `rtl/parity_sos_ecc_fft.sv` | top level |

Every module has its own self-checking testbench `tb/tb_<module>.sv`. Each
one compares against values it computes itself: double-precision DFTs,
integer sums and the tolerance rule. There are also these testbenches:

* `tb/tb_parity_sos_ecc_fft.sv`: end to end at 64 points. It covers a
  clean block, an upset in each FFT, an upset in the parity FFT, a
  sub-tolerance upset, back-to-back blocks, and switching to 16 and 4
  points. The 4-point block uses inputs 1, 2, 3, 4, whose scaled spectrum
  is 5, −1+j, −1, −1−j.
* `tb/tb_parity_sos_ecc_fft_full.sv`: the top with every parameter at its
  default (1024 points). It runs one clean block and one block with an
  upset in FFT 2, and checks the 5152-cycle compute phase.
* `tb/tb_fault_campaign.sv`: 300 random single-bit upsets, with detection
  and recovery reported per bit.

All of them pass and print `TB_RESULT checks=<n> failures=0`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/psecc_pkg.sv tb/tb_parity_sos_ecc_fft_full.sv \
        --top-module tb_parity_sos_ecc_fft_full -o sim
    ./obj_dir/sim

Change the file and top name to run another testbench. The full-size run
takes a few seconds. The testbenches read no files.

## Where this departs from the published design

* Only the four-FFT parity-SOS-ECC configuration is built. A six-FFT
  group would need a fourth check, because three checks have only four
  syndromes with two or more bits set.
* A 1024-point compute phase takes 5152 cycles instead of 5120, because
  of the stage drains. Within one core, load, compute and read-out do not
  overlap.
* Outputs wait one block in a buffer until the checks have judged it. The
  source does not say how outputs are held back; this adds S + 4 cycles of
  latency.
* The choices the source leaves open are this design's own: twiddles
  from an elaborated table, the fixed-point scaling, the tolerance rule
  and its values, handling of single-bit syndromes, reset and handshakes.
* The source reports FPGA resource counts for its VHDL. Those figures do
  not describe this RTL.

# Radix-4 FFT processors for real-valued data

Most signals that reach an FFT are real. A complex FFT wastes much of its
work on them. The imaginary inputs are all zero, and half of the outputs are
complex conjugates of the other half (X[N-k] = X*[k]). This RTL computes the
spectrum of N real samples in two ways. Both are built on the same
memory-based radix-4 FFT engine:

* **Butterfly approach**: keep the full N-point radix-4 transform but drop the
  work that real input makes useless. No imaginary input is stored.
  Butterflies whose operands are known to be real skip their imaginary
  arithmetic. Sub-transforms whose results are conjugates of others are not
  computed at all. Only bins 0..N/2 are unloaded.
* **Formula approach**: pack pairs of real samples into one complex sample,
  run a complex FFT of half the size, then recover the N-point spectrum with a
  short post-processing step.

The design targets the sizes at which the two approaches are compared: 64 and
256 points, 8- or 16-bit input samples, and 16-bit twiddle factors. Defaults
are N = 256 and 16-bit input. Everything is parameterised: `N` (a power of two,
at least 16) and `IN_W`.

## The shared engine: `cfft_r4`

`cfft_r4` is a memory-based, in-place, radix-4 decimation-in-frequency (DIF)
FFT. It has one data memory, one butterfly unit and a controller. It works in
three phases:

1. **Load.** `N` samples arrive, one per cycle, and are written to memory. The
   write address is the sample index.
2. **Compute.** Each radix-4 stage walks through the memory, doing one
   butterfly per clock cycle. A butterfly reads four words and writes its four
   results back to the same four addresses. A stage therefore takes N/4
   cycles, and there are log4 N stages.
3. **Unload.** Results leave in natural order, one per cycle. The DIF
   transform leaves bin k at the address whose base-4 digits are those of k
   reversed, so the unload reads address `digit_rev4(k)`.

### Addressing inside a stage

In stage s a group of the current sub-transform has length Ls = N/4^s. Its
butterflies take operands a quarter of that apart: `base`, `base+q`,
`base+2q` and `base+3q`, with q = Ls/4. For butterfly j inside its group, the
unit first forms the 4-point DFT. It then multiplies branch m (m = 1, 2, 3) by
W_Ls^(m·j) = W_N^(m·j·4^s). Branch 0 needs no multiplication. One twiddle
table of N entries therefore serves every stage. Its three read ports are
three copies of `twiddle_rom`.

### Sizes that are not powers of four

The Formula approach needs complex FFTs of 32 and 128 points, which are not
powers of four. When log2 N is odd, the engine writes the even-indexed
samples to the lower half of memory and the odd-indexed samples to the upper
half. It then runs the radix-4 stages on both halves, giving two N/2-point
transforms E and O. One extra stage of N/2 radix-2 butterflies (`r2_combine`)
joins them:

    X[k]       = E[k] + W_N^k · O[k]
    X[k + N/2] = E[k] − W_N^k · O[k]

The results are written back in place. E[k] and O[k] sit at rev(k) and
N/2 + rev(k), so the unload knows where X[k] and X[k + N/2] are.

### Memory

`fft_mem` is one array of complex words with four asynchronous read ports and
four write ports. This lets one radix-4 butterfly finish every cycle, and it
keeps the datapath free of pipeline hazards: a butterfly reads, computes and
writes back within one clock. An assertion checks that no two ports write
the same word in one cycle. On an FPGA the array maps to registers. For block
RAM it would have to be split into four banks with conflict-free addressing,
which this RTL does not do.

### Controller

`fft_ctrl` has five states: `S_IDLE`, `S_LOAD`, `S_R4`, `S_R2` and `S_UNLOAD`.
It generates the load address, the four butterfly addresses, the three
twiddle exponents, the real-operand flag and the unload address. `S_R2` is
entered only when log2 N is odd.

## Butterfly approach: `rfft_butterfly`

This is `cfft_r4` with `REAL_INPUT = 1` and `OUT_BINS = N/2 + 1`. Real
input makes three kinds of work unnecessary, and the design cancels each.

**Real-only butterflies.** In a DIF stage, branch 0 of a butterfly carries no
twiddle. So if a butterfly's inputs are real, its branch-0 output stays real.
By induction, the first group of every stage (addresses 0 .. Ls−1) holds only
real data. For those butterflies the controller raises `real_bfly`, and
`r4_butterfly` forces the imaginary operands to zero. No imaginary input is
stored at load.

**Redundant sub-transforms.** Take a butterfly with real inputs. Its branch 1
feeds the bins 4k+1 of its transform, and its branch 3 feeds the bins 4k+3.
For a real sequence, X[4k+3] = X*[L−4k−3], and L−4k−3 is again of the form
4k′+1. So everything below branch 3 repeats what branch 1 computes, in
conjugated form, and is never computed. In group-index terms: group g of
stage s is skipped when the first non-zero base-4 digit of g is 3. These are
the groups [3·4^i, 4^(i+1)), and the controller's counter jumps over them.

| N | radix-4 cycles, complex | radix-4 cycles, real |
|---|---|---|
| 64 | 16+16+16 = 48 | 16+12+11 = 39 |
| 256 | 64·4 = 256 | 64+48+44+43 = 199 |

At unload, bin k lies in a skipped part exactly when the lowest non-zero
base-4 digit of k is 3. It is then read from the location of bin N−k, and its
imaginary part is negated (`ud_conj`).

**Upper half.** Only bins 0..N/2 are unloaded.

The skipping needs N to be a power of four, as 64 and 256 are. For other N,
only the other savings apply.

## Formula approach: `rfft_formula` and `rfft_post`

With M = N/2, the samples are paired as z[n] = x[2n] + j·x[2n+1]. The even
sample waits in a register until its odd partner arrives. The M complex
samples go through `cfft_r4` (M points: a mixed radix-4/radix-2 transform for
both M = 32 and M = 128), which gives Z[k]. `rfft_post` stores Z, then
produces X[0..N/2] from pairs Z[k] and Z[M−k]:

    A = Z[k mod M],    B = conj(Z[(M−k) mod M])
    X[k] = (A + B)/2 − j · W_N^k · (A − B)/2

This takes one complex multiplier, a few adders and an M-word buffer, so
that Z[k] and Z[M−k] can be read in the same cycle. The halving is an
arithmetic shift with rounding.

## Number formats and accuracy

* **Twiddles** are 16-bit Q2.14 words: round(cos·2^14) and round(sin·2^14).
  The table is computed when the design is elaborated, so there is no data
  file. Q2.14 represents +1 and −1 exactly.
* **Data** is not scaled between stages. Instead the engine carries
  W = IN_W + log2 N + 2 bits, enough for the full growth of the transform
  (|X[k]| ≤ N · max|x|), so nothing can overflow. The Formula output is
  IN_W + log2 N + 1 bits wide (its engine is half the size).
* **Products** are rounded to nearest (`cmult`). The radix-4 adders are exact.

The testbenches compare each bin with a double-precision DFT and measure the
error as |Δre| + |Δim|. They accept up to 4 + √N + 2·10⁻⁵·N·2^(IN_W−1) LSB.
For N = 256 and 16-bit input, that is 188 LSB on outputs of up to about
8·10^6. The largest error seen there is under 100 LSB.

## Interfaces and timing

Each processor (and `cfft_r4`) has the same interface. Samples come in on
`in_valid`/`in_ready`, one per cycle while `in_ready` is high; gaps in
`in_valid` are allowed. `in_ready` is low from the last sample until the
FFT engine has unloaded its results. Results come out as `out_valid`, `out_re`, `out_im`,
`out_idx` and `out_last`, in natural order on consecutive cycles, with no
back-pressure. Reset (`rst_n`) is asynchronous and active low. The memories
are not reset.

The latency below runs from the clock edge that takes the last sample to the
edge after which X[0] is valid. X[N/2] follows N/2 cycles later.

| processor | N | compute cycles | latency to X[0] |
|---|---|---|---|
| Butterfly | 64 | 39 (16+12+11, redundant groups skipped) | 40 |
| Butterfly | 256 | 199 (64+48+44+43) | 200 |
| Formula | 64 | 16 + 16 (2 × 8 radix-4, 16 radix-2) | 66 |
| Formula | 256 | 96 + 64 (3 × 32 radix-4, 64 radix-2) | 290 |

For complex data, `cfft_r4` delivers its first result (N/4)·log4 M + (N/2 if
log2 N is odd) + 1 cycles after the last sample, where M = N (or N/2 if
log2 N is odd). The Formula approach adds N/2 + 1 cycles: it collects Z and then
registers the first result.

`rfft_system` places both processors side by side with separate ports
(`bf_*` and `fm_*`). It also brings out each controller's state (and the
`real_bfly` and `post_busy` flags) for observation.

## Module map

| file | role |
|---|---|
| `rtl/fft_pkg.sv` | twiddle format, state type, base-4 digit reversal |
| `rtl/twiddle_rom.sv` | W_N^k table, computed at elaboration |
| `rtl/cmult.sv` | complex × twiddle multiplier, rounded |
| `rtl/r4_butterfly.sv` | radix-4 DIF butterfly with real-operand mode |
| `rtl/r2_combine.sv` | radix-2 butterfly joining two half transforms |
| `rtl/fft_mem.sv` | 4-read/4-write in-place data memory |
| `rtl/fft_ctrl.sv` | FSM and address/twiddle generation |
| `rtl/cfft_r4.sv` | complex FFT engine |
| `rtl/rfft_butterfly.sv` | Butterfly-approach real FFT |
| `rtl/rfft_post.sv` | Formula-approach post-processing |
| `rtl/rfft_formula.sv` | Formula-approach real FFT |
| `rtl/rfft_system.sv` | top: both real-FFT processors |

## Simulation

Each module in `rtl/` has a self-checking testbench in `tb/` with the same
name and a `tb_` prefix. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. The processor testbenches compare every bin
with a double-precision DFT (`tb/tb_fft_ref_pkg.sv`) and check the latency
above. `tb_rfft_butterfly` and `tb_rfft_formula` each run 64 and 256 points,
both with 8- and 16-bit input. `tb_cfft_r4` also checks that the engine is
linear: the transforms of two random frames must add up to the transform of
their sum, bin by bin, within the rounding of the twiddle products.

`tb_rfft_system` runs the top at its default size (256 points, 16-bit
input). It feeds both processors impulse, constant, Nyquist, cosine and
random frames, and one frame with gaps in the input. It fails if any of these
never happens: loading, radix-4 stages, the radix-2 stage, real-operand
butterflies, skipped sub-transforms, bins read as conjugates,
post-processing, half-spectrum unloading, or input gaps. To run
one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/tb_fft_ref_pkg.sv tb/tb_rfft_system.sv \
        --top-module tb_rfft_system -Mdir obj_sys
    ./obj_sys/Vtb_rfft_system

All of them finish in well under a second. The shared driver for the
real-FFT testbenches is `tb/tb_rfft_frame.svh`.

## Own choices and limits

What the design fixes, and this RTL follows: a memory-based processor, the
radix-4 DIF algorithm, 64- and 256-point sizes, 8- and 16-bit input, 16-bit
twiddles, the two real-FFT approaches with N/2 + 1 output bins, and a
half-size transform made of two quarter-size radix-4 transforms plus a
radix-2 stage. A 50 MHz single-clock target is intended, but nothing in the
RTL enforces it.

This RTL's own choices:

* the memory organisation (one 4R/4W array, one butterfly per cycle);
* the controller's states and the load/compute/unload schedule;
* unscaled growing word lengths, Q2.14 twiddles and round-to-nearest;
* which operations the Butterfly approach cancels: the stored imaginary
  input, the imaginary arithmetic of all-real butterflies, the branch-3
  sub-transforms under real butterflies, and the upper half of the output;
* the pairing register and Z buffer of the Formula approach;
* the valid/ready streaming interface and the asynchronous reset.

Not covered:

* The power and accuracy comparisons between the approaches are FPGA
  measurements and are not reproduced.
* The board around the processors (what supplies the samples and reads the
  results) is not part of this RTL. The top brings both sample and result
  streams out as ports.
* Multipliers are written as `*` and tables as arrays. Mapping them to the
  FPGA's embedded multipliers and memory blocks is left to synthesis. The
  four-port data memory maps to registers (see Memory).
* The processor size is a build parameter. A build for 256 points does not
  also run 64-point transforms.
* The single-cycle butterfly (memory read, four-point DFT, multiply, write)
  is one long combinational path. A faster clock would need the butterfly
  split over pipeline stages, with a drain between stages.

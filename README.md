# Large-point reconfigurable FFT for wideband digital receivers

A wideband electronic-warfare receiver looks for pulsed emitters anywhere in a
wide band. To do that it needs very long FFTs: 2^20 points gives fine frequency
resolution and long integration. A pipelined radix-4 FFT of that length would
need twenty levels and a twiddle table of a million entries, which will not fit
in one FPGA. This design computes an N-point FFT, with N = 1024 x 4^n for
n = 0..5 (1K to 1M points), as a two-dimensional transform. A fixed 1024-point
FFT handles the columns, a 4^n-point FFT handles the rows, and between them
sits one multiplication by a twiddle factor. The twiddle factors come from a
small table by linear interpolation. A block-floating-point scheme keeps
precision without wide words. Two stages follow the transform:

- an optional stage that splits the spectra of two real signals carried in one
  complex FFT;
- a CMLD/GO CFAR detector that flags spectral lines standing out of the noise.

The architecture follows the paper "Implementing EW Receivers Based on Large
Point Reconfigured FFT on FPGA Platforms". That paper gives the architecture
but not the widths, the handshakes or the memory organisation. Those were
chosen here, and the section *Where this RTL departs or chooses* lists them.

## The decomposition

Write the input index as n = M*n1 + n0 and the output index as
k = L*k1 + k0, with L = 1024 and M = 4^n. Then

    X(L*k1 + k0) = sum over n0 of  W_M^(n0*k1) * [ W_N^(n0*k0) * sum over n1 of x(M*n1 + n0) * W_L^(n1*k0) ]
                                   \_ row FFT _/   \_ twiddle _/  \________ column FFT of column n0 ________/

The hardware follows this formula from left to right on the data stream:

    samples --> col_fetch --> fft_fixed1024 --> twiddle_mult --> row_fetch --> fft_var --> out_order_dss --> X(k)
                (N words,     (1024 points,     (x W_N^(n0 k0))  (1024 x M     (M = 4^n     (natural order,      |
                 ping-pong)    M times)                           transpose)    points,      optional split)      v
                                                                                1024 times)                    cfar_detector

| Step | Block | What happens |
|---|---|---|
| 1 | `col_fetch` | The N samples are stored in arrival order and read back column by column: column n0 is x(n0), x(M+n0), x(2M+n0), ... (1024 samples). |
| 2 | `fft_fixed1024` | Each column gets a 1024-point FFT, M times in succession. |
| 3 | `twiddle_mult` | Result k0 of column n0 is multiplied by W_N^(n0*k0) and written to place k0*M + n0 of the middle array. |
| 4 | `row_fetch`, `fft_var` | The middle array is read row by row. Each row (M words) gets an M-point FFT, 1024 times in succession. |
| 5 | `out_order_dss` | Row k0's result k1 is X(1024*k1 + k0). It is written at that address and the block is read out in natural order. |

With n = 0 the row transform is one point and the design is a plain 1024-point
FFT. At n = 5 it is a 1M-point FFT. `cfg_n` selects n at run time, and only
between blocks.

## The radix-4 pipeline (`r4_stage`, `fft_fixed1024`, `fft_var`)

Both FFTs are decimation-in-time radix-4 pipelines of five levels. Each level
owns a ping-pong memory (`bfp_pingpong`). While the previous level fills one
bank, this level works through the other bank. Each level reads one word per
cycle, so a 1024-point frame takes 1024 cycles per level. Up to five frames are
in flight.

**Addressing.** Level s (s = 1..5) has butterflies of span Q = 4^(s-1). The
level counts c = 0..len-1, with butterfly b = c/4 and input q = c%4. It reads
address `g*4^s + n + q*Q`, where n = b mod Q and g = b / Q. In bits, this puts
the two bits of q into b at bit position 2(s-1). Once it has four inputs, it
computes the butterfly:

    y_q = x_q * W_(4^s)^(q*n)            q = 1..3
    X_m = sum_q y_q * (-j)^(m*q)         m = 0..3

It then writes X_m to the address that x_m came from (in place). The next level
writes each result at its tagged address, so no reordering logic is needed
between levels. The first level's memory is written at the base-4
digit-reversed address of each incoming sample, and the last level's output
comes out tagged with its natural index k.

**Twiddles of the levels.** W_(4^s)^(q*n) equals W_1024^(q*n*4^(5-s)). The
twiddle address unit forms this exponent in step with the data address. The
factor comes from the same interpolating generator as the inter-transform
twiddle. Indices that are multiples of 1024 in the 2^20-point index space land
exactly on table entries, so these factors are exact to table precision.

**Variable length.** `fft_var` is the same five levels plus a configuration
unit. For 4^n points, only the first n levels receive data. Their frames are
4^n long, the input is digit-reversed over n base-4 digits, and the output is
taken from level n. The unused levels stay idle. With n = 0, data passes
straight through.

## Block floating point: how the exponents travel

Every word in the chain is a mantissa (re, im) plus a block exponent e, and its
value is `mantissa * 2^e`. The mechanism lives in `bfp_pingpong` and is used
the same way everywhere:

- **On write**, the memory ORs together the magnitude patterns of all words of
  a sub-frame. At the sub-frame's last word it knows how many bits the largest
  word needs. It then computes `need = e_subframe + max(0, bits - DW)`, the
  exponent the sub-frame would have after shifting it into DW = 16 bits. The
  bank's common exponent E is the largest `need` of its sub-frames.
- **On read**, each word is shifted right by `E - e_subframe` (truncation) and
  leaves in 16 bits with exponent E.

Inside an FFT level a bank is one frame with one exponent. The butterfly takes
16-bit inputs and produces 19-bit outputs, which cannot overflow (the gain is
at most 4*sqrt(2)). The next level's memory rescales them. So each frame is
scaled only by what it actually needs, and the exponent grows by 0 to 3 per
level.

Between the two transforms this is harder. The M column frames leave the column
FFT with different exponents, yet a row mixes one word from every column. The
middle buffer is therefore split into M sub-frames (one per column, the low
2n address bits), and each word is aligned to the block's largest exponent on
the way out. The output buffer does the same with the 1024 rows (low 10
address bits). The final output is one exponent per N-point block, `out_exp`,
so that comparing lines, separating two sequences and running CFAR all work on
a single scale.

## Twiddle factors by interpolation (`twiddle_interp`)

W_N^(n0*k0) for N = 2^20 would need 2^20 complex factors (2M x 18 bits).
Instead, the generator:

1. folds the index into the first octant (0..pi/4) using the symmetries of sine
   and cosine;
2. splits the octant into 1024 segments of P = 128 index steps;
3. stores, for each segment, the start value and the rise over the segment of
   both cosine and sine: two 32-bit words of {18-bit Q1.16 start, 14-bit rise};
4. computes `start + rise * offset / 128`, one multiplication and one addition.

The table is 2048 x 32 bits. It is computed at elaboration from `$cos`/`$sin`
rather than read from a file. Over a segment of 7.7e-4 rad, the error of
linear interpolation is below 1e-7, well under the 18-bit LSB. The testbench
finds all factors within 2 LSB of exact. For a smaller N the index is
`n0*k0 * 2^(10-2n)`, so one table serves every size.

## Ping-pong buffers and flow control

Each buffer has two banks of 2^len_log words. The writer fills one while the
reader drains the other. A bank becomes readable when its last word is written
and writable again when the reader releases it.

The FFT levels, the twiddle stage and the fetch units cannot stall in the
middle of a frame, because they are fixed pipelines. Flow control is therefore
per frame, through a **claim**. A producer may start a (sub-)frame only while
the downstream buffer's `can_claim` is high, and it pulses `claim` as it
starts. The buffer allows two banks' worth of sub-frames to be claimed, and
gives a bank's claims back when the bank is released. After that, the producer
streams the whole frame without looking back. Only the external input has a
per-word `in_ready`, and it drops only when both input banks still hold unread
data.

Each reader spends one idle cycle between frames. A 1024-point frame therefore
moves at 1024/1025 words per cycle. For short rows the row side is slower:
at n = 1, a 4-word row costs 5 cycles, so the 1024 rows take 5/4 of the
block's 4096 cycles. At n = 0 (1-word rows) the row side takes about twice
the block time.

## Output ordering and two-real-sequence separation (`out_order_dss`)

With `cfg_dss = 0`, the output is X(k) for k = 0..N-1 in natural order, one word
per cycle. With `cfg_dss = 1`, the input is taken to be x1(n) + j*x2(n) for
two real signals. For k = 0..N/2 the buffer reads X(k) and X(N-k) and emits:

    X1(k) = ( (R(k) + R(N-k)) + j*(I(k) - I(N-k)) ) / 2      on out_re / out_im
    X2(k) = ( (I(k) + I(N-k)) + j*(R(N-k) - R(k)) ) / 2      on out2_re / out2_im

The upper half of each spectrum is the conjugate mirror of the lower half, so it
is not emitted. The output still takes about N cycles per block: two reads per
line.

## CFAR detection (`cfar_detector`)

The detector computes the power p(k) = re^2 + im^2 of each output line and
slides a 73-cell window over the stream. The window holds 32 reference cells,
4 guard cells, the cell under test, 4 guard cells and 32 reference cells.

- **CMLD-CFAR** drops the 8 largest of the 64 reference cells, so that
  harmonics and neighbouring signals do not raise the noise estimate. It sums
  the other 56 (Z) and uses the threshold T*Z with T = 0.125.
- **GO-CFAR** uses the larger of the two half sums times 40/256.
- The threshold is the larger of the two. A line is detected if its power
  exceeds it.

The censoring is done by ranking: each reference cell counts the cells above it
(ties broken by position), and the cells ranked 0..7 are subtracted from the
total. That is 64 x 63 comparators working every cycle. A sorted-window
structure would be smaller if area matters.

The detector sees the mantissas. Within a block they share one exponent, so the
comparisons are unaffected. Its window runs across block boundaries, so the
first and last 36 lines of a block see cells of the neighbouring block.

## Top-level interface (`large_fft_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge), asynchronous active-low reset |
| `cfg_n` | in | 3 | N = 1024 x 4^cfg_n, 0..5; change only when empty |
| `cfg_dss` | in | 1 | 1 = two-real-sequence mode |
| `in_valid`, `in_ready` | in/out | 1 | input handshake; a word is taken when both are high |
| `in_re`, `in_im` | in | 16 | input sample, two's complement |
| `out_valid`, `out_last` | out | 1 | output word valid; last word of a block |
| `out_k` | out | 20 | spectral index k |
| `out_re`, `out_im` | out | 16 | X(k) (or X1(k)) mantissa |
| `out2_re`, `out2_im` | out | 16 | X2(k) mantissa when `cfg_dss = 1`, else 0 |
| `out_exp` | out | 6 | block exponent: X = mantissa * 2^out_exp |
| `det_valid`, `det_k` | out | 1, 20 | CFAR result and its line |
| `det_power`, `det_thr`, `det_hit` | out | 33, 48, 1 | line power, threshold, detection |

Parameters: `DW` = 16 (data width) and `NMAX` = 5 (largest N = 1024 x 4^NMAX).
With NMAX = 5, the three N-word ping-pong buffers take 2 x 2^20 words each.
That is about 230 Mbit in total, which in practice means external memory. A
smaller NMAX shrinks them.

**Latency.** A block goes through four buffer passes (input, column, middle,
row/output) of about N cycles each. The 1M-point test takes 4.2M cycles from
the first input sample to the last output word. Blocks can follow each other
back to back.

## Files

| File | Contents |
|---|---|
| `rtl/fft_pkg.sv` | shared constants (twiddle format, exponent width) and a bit-count helper |
| `rtl/bfp_pingpong.sv` | ping-pong memory with block floating point and claim handshake |
| `rtl/twiddle_interp.sv` | interpolating twiddle generator, 2048 x 32-bit table |
| `rtl/cmul.sv` | complex multiplier by a Q1.16 twiddle |
| `rtl/r4_butterfly.sv` | radix-4 DIT butterfly |
| `rtl/r4_stage.sv` | one FFT level: memory, address units, butterfly, serialiser |
| `rtl/fft_fixed1024.sv` | 1024-point column FFT |
| `rtl/fft_var.sv` | 4^n-point row FFT with level enable |
| `rtl/col_fetch.sv` | input buffer, column fetch and repetition control |
| `rtl/twiddle_mult.sv` | multiplication by W_N^(n0 k0) |
| `rtl/row_fetch.sv` | transposition buffer, row fetch |
| `rtl/out_order_dss.sv` | output ordering and sequence separation |
| `rtl/cfar_detector.sv` | CMLD/GO CFAR detector |
| `rtl/large_fft_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_large_fft_full.sv` | one complete 1M-point transform at default parameters |

## Verification

Every testbench checks its module against values it computes independently (a
direct DFT in floating point, exact integer models of the buffers and of the
CFAR). Each has a watchdog, and each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

- `tb_large_fft_top`: N = 1024, N = 4096, and N = 4096 with sequence
  separation. Each runs three random blocks back to back. Every output line is
  compared with a direct DFT to within 0.4 % of the RMS spectrum (49,171
  checks). The test also counts, and requires at least once: input
  back-pressure, both ping-pong banks in use, block-floating-point shifts,
  exponent alignment in the transposition buffer, an idle level, both output
  modes, and a CFAR detection.
- `tb_large_fft_full`: a 1M-point block of two tones plus noise. Both peaks
  must come out within 0.5 % of A*N in amplitude and phase, and every other
  bin must stay below 1e-3 of the stronger tone. The worst other bin measures
  66 dB below it. The CFAR flags both tones with 0.08 % false alarms. It runs in
  about 40 s.
- Unit tests: every length 4^n from 1 to 1024 against a DFT; the butterfly and the
  level against floating-point models; the twiddle generator within 2 LSB over
  20,000 indices; exact models for the buffers (ordering, exponent alignment,
  claims, stalls) and for the CFAR thresholds.

Simulate one with Verilator 5 from the repository root. The testbenches and
`fft_pkg` name their files, and `-Irtl` finds the rest:

    verilator --binary --timing --assert -Irtl -Wno-fatal rtl/fft_pkg.sv \
        tb/tb_large_fft_top.sv --top-module tb_large_fft_top -o sim
    ./obj_dir/sim

The smaller buffer tests set `NMAX = 1` to keep memory and run time down. The
top tests use the defaults.

## Where this RTL departs or chooses

- **Widths and formats.** These are not given by the source: 16-bit data,
  19-bit butterfly outputs, 6-bit block exponents, and Q1.16 for the 18-bit
  twiddles. Rounding is truncation in the block scaling and round-to-nearest in
  the twiddle products.
- **Butterfly weights.** The fourth butterfly input is weighted by W^(3n), as a
  radix-4 DFT requires.
- **Variable FFT structure.** The source describes the variable FFT two ways:
  five radix-4 levels of which the first n are enabled, and a 64-point unit,
  twiddle multiplier and 4/16-point unit. The first reading is built.
- **Block floating point between the transforms** (per-column and per-row
  exponents aligned to the largest) is this design's own way of carrying the
  block floating point across the decomposition.
- **Output order.** Only natural order is produced; a reverse-order output is
  mentioned as an option in the source but not built.
- **CFAR.** The GO-CFAR scale factor (40/256 of the larger half sum) and the
  split of the 8 guard cells (4 per side) are choices. The detector is placed on
  the FFT output.
- **Not included:** windowing ahead of the FFT, the pulse-parameter measurement
  (RF, TOA, PRI, PW) and the analog front end. These are named in the receiver
  overview but not specified.
- **Throughput:** one idle cycle per frame in each reader. This is negligible
  for 1024-point frames, but it slows the row side for the smallest sizes, see
  above.

# Recursive parallel short-time Fourier transform

A short-time Fourier transform (STFT) computes the DFT of a window that slides along the
signal one sample at a time. Recomputing each window's N-point DFT from scratch costs
O(N^2) multiplies per sample with a filter bank, or O(N log N) with an FFT, whose
butterflies also need global wiring. This RTL uses the fact that two neighbouring windows
share N-1 samples. With a rectangular window, the spectrum of the window starting at
n0+1 follows from the one starting at n0:

    X(n0+1, k) = W_k * ( X(n0, k) + x(n0+N) - x(n0) ),    W_k = exp(+j*2*pi*k/N)

So one subtractor is shared by all channels, and each channel has one adder, one complex
rotation and one register. With N channels the array needs N-1 rotators (channel 0
rotates by 1), N+1 adders and purely local wiring. It delivers all N bins of a new
spectrum on every clock. The same idea extends to two and three dimensions without a
transpose.

This package contains:

* a 1-D sliding STFT array (`stft1d`),
* a DFT analysis filter bank built on it (`stft_filterbank`), with decimation and a
  multiplier-free Hanning window,
* a 2-D sliding STFT (`stft2d`),
* a 3-D sliding STFT (`stft3d`), the next step of the same dimension recursion,
* a small, unrelated digital part of a multiplierless adaptive filter: a PN generator
  and a binary delay line.

`stft_top` puts all of them side by side.

One result matters for anyone who uses the 2-D or 3-D transform: see
[Why the inner transform is restarted](#why-the-inner-transform-is-restarted).

## How the recursion works, and its conventions

Each channel is a comb filter (`1 - z^-N`, shared by all channels) followed by a one-pole
resonator `W_k / (1 - W_k z^-1)`. The resonator's pole is on the unit circle. After N
samples the comb has removed every sample older than the window, and the state is exactly

    X(n0, k) = sum_{i=0}^{N-1} x(n0+i) * exp(-j*2*pi*k*i/N)

The phase reference is the **first sample of the window**, not absolute time.

* After reset all state is zero. Until N samples have arrived, the output is the DFT of a
  window padded with zeros at the front.
* Latency: a sample taken with `in_valid` at a clock edge is part of `out_re/out_im`
  right after that edge (`out_valid` follows `in_valid` by one clock).

### Fixed point and stability

A pole exactly on the unit circle does not forget rounding errors, and a coefficient
that rounds up would push the pole outside the circle. The coefficients are therefore
`cos` and `sin` of `2*pi*k/N`, each **truncated toward zero** to `CF` fraction bits
(`CF = 16`, coefficient width `CF+2`). Both parts shrink, so `|W_k| <= 1` in every channel
and the loop cannot grow. The values +1, -1 and +/-j stay exact. The coefficients are
computed with `$cos`/`$sin` during elaboration (`stft_pkg`), so there is no table file.

The cost of this choice is that `W_k^N` is not exactly 1. The comb then leaves a tiny
residue of each old sample, which dies away slowly. The state carries `GF = 4` extra
fraction bits. It is `AW = DW + log2(N) + 2 + GF` bits wide, which is 26 bits at the
defaults. The rotation is rounded half up.

Measured with random full-scale 16-bit input and N = 16: the largest error of any bin
over several hundred samples is about 200 input LSBs. That is about 0.04 % of the
largest possible bin value, N * 2^15. The testbenches allow 0.2 %. The error grows
slowly with run time, like a random walk that the slightly-inside poles keep bounded. A
larger `CF` reduces it if needed.

## 1-D array: `stft1d`

`comb_diff` holds the last N samples in a shift register and forms
`x(n0+N) - x(n0)` combinationally. `stft_channel` with index K adds that difference,
shifted up by GF, to its real part and then rotates the sum:

* K = 0 has no rotator.
* Otherwise the rotator is `complex_rotator`: four products, two sums and rounding,
  all combinational inside the one-clock loop.
* With `USE_CORDIC = 1` the rotator is `cordic_rotator` instead: shifts and adds only.
  Because the angle is a constant, all CORDIC directions are fixed at elaboration. A
  quarter-turn swap comes first, then 18 micro-rotations, then a constant gain
  correction truncated so the gain stays below one.

The multiplier version is the default. Both versions are checked against the same
floating-point reference.

Every channel has a long combinational path: an adder, then a multiplier or an 18-stage
CORDIC, back to its own register. The architecture gives one spectrum per clock, so this
path sets the clock rate. Pipelining it would change the recursion (interleaved channels
would be needed), so it is not done here.

## Filter bank: `stft_filterbank`

The filter bank chains `stft1d` -> `downsampler` -> `window_net`.

* **Decimation.** `downsampler` keeps every D-th spectrum (default D = N). These are the
  spectra of non-overlapping windows, i.e. a critically sampled DFT analysis filter
  bank. The first kept frame is the one completed by the D-th sample after reset.
* **Windowing without multipliers.** For the Hanning window
  `w(i) = (1 - cos(2*pi*i/N))/2`, the windowed spectrum is a three-tap combination of
  neighbouring rectangular bins, taken circularly in k:

      XH(k) = X(k)/2 - X(k-1)/4 - X(k+1)/4

  `window_net` computes `(2X(k) - X(k-1) - X(k+1)) >>> 2` with shifts and adds, and
  registers the result. The shift rounds toward minus infinity. `win_sel = 0` bypasses
  the network (rectangular window). The network only connects neighbouring bins.

Windowing after decimation gives the same result as the other order (both act frame by
frame) and runs the network once per kept frame. The output appears three clocks after
the sample that completes the frame.

## 2-D sliding STFT: `stft2d`

The window is N x N and slides along m, one column at a time. The strip is N rows high:
the row index n runs over 0..N-1. Removing the column that leaves the window and adding
the new one gives:

    X(m0+1, k, l) = W_k * ( X(m0, k, l) + D(l) )
    D(l) = sum_n ( x(m0+N, n) - x(m0, n) ) * exp(-j*2*pi*n*l/N)

D is the 1-D DFT of a *difference column*. The hardware:

1. **Load phase, N clocks.** The new column arrives one sample per clock
   (`in_valid`/`in_ready`). `column_buffer` is a circular memory of N*N words with one
   pointer: the word it returns is the same row N columns earlier, and it is overwritten
   in the same clock. It returns zero until it has been filled once, so the memory needs
   no reset. The difference goes into an ordinary `stft1d`, which is restarted (its
   `clear` input) with the first sample of every column. After the N samples of the
   column its outputs are D(0..N-1).
2. **Update phase, N clocks.** `update_loop` keeps the N x N spectrum as N linear arrays,
   one per l. Each array is a shift register of N complex words in k order. In update
   cycle k, every array takes its head word X(k, l), adds D(l), rotates by W_k (a shared
   coefficient table indexed by k) and shifts the result in at the tail. After N cycles
   every array is back in order. This costs one adder and one rotator per array. The
   spectrum is never transposed.

`in_ready` is low during the update phase, so the input stalls. The result is one new
2-D spectrum every **2N clocks**. The spectrum leaves row by row: `out_valid`, `out_k = k`
and `X(m0+1, k, l)` for all l in parallel, on N consecutive clocks. Each row appears one
clock after its update cycle. The phase reference is the window origin in both
dimensions. Columns before the first N count as zero.

Timing for one column, with `in_valid` held high:

    clock        0 .. N-1        N        N+1 .. 2N-1      2N
    in_ready     1 (load)        0        0 (update)       1 (next column)
    update k     -               0        1 .. N-1         -
    out_valid    -               -        rows 0 .. N-2    row N-1

Operator count: `stft1d` has N-1 rotators and N+1 adders, and the update loop has N of
each. That gives 2N-1 rotators and 2N+1 adders, plus the subtractor that forms the
difference column. Word widths: the difference is DW+1 bits, the column spectra are
`acc_width(DW+1)` = 27 bits and the 2-D bins are `acc_width(DW+log2 N)` = 30 bits, all with
GF fraction bits.

The two phases run one after the other, which gives the 2N-clock period. Overlapping
them would need a second copy of D.

### Why the inner transform is restarted

The restart is not needed in exact arithmetic. The 1-D array's window after N samples
covers exactly the current column, so a free-running array gives the same D. In fixed
point it does not:

* The free-running array carries a small rounding residue that changes slowly from
  column to column.
* Update row k = 0 rotates by exactly 1, so it adds every column's D, and that residue,
  without any decay.
* The error of the 2-D spectrum therefore grows linearly with the number of columns.

In simulation this was clearly visible. With a free-running inner 2-D array, the 3-D
transform's error passed 0.1 % of full scale after 19 slices. With the restart, each
column's D carries only the fresh rounding of N steps. Over 24 columns (2-D) or
14 slices (3-D at N = 8), the worst errors were about 330 and 280 input LSBs.

The k = 0 row still integrates these independent small errors like a random walk. A
very long run therefore drifts slowly in that row. The sliding 1-D array on its own
has no such problem: its channel 0 adds integers exactly, and every other channel's
pole is strictly inside the unit circle.

## 3-D sliding STFT: `stft3d`

The construction repeats one level up. The window is N x N x N, sliding along m. Each
new slice arrives as N columns (index n1) of N samples (index n2).

* A `column_buffer` of N^3 words returns the sample N slices older, and the difference
  stream goes into a `stft2d`.
* That `stft2d` is restarted with the first sample of each slice (its `clear` input
  empties its column memory and zeroes its stored spectrum for the first update pass).
  The N rows it emits after the slice's last column are the 2-D DFT F2 of the
  difference slice.
* These rows are collected into an N x N register file. An `update_loop` with N*N
  linear arrays then computes `X(k, l1, l2) <- W_k (X + F2(l1, l2))` in N clocks.

The 3-D update reads only the collected copy, so it runs while the next slice is
already loading. A slice therefore takes 2N^2 clocks, the 2-D array's rate. Output:
N rows of N*N bins, `out_re[l1*N + l2]`. Size at N = 16: 256 rotators in the update
loop and 4096 complex state words, so this block dominates the area of `stft_top`.

## PN source for a multiplierless adaptive filter: `lfsr10`, `binary_delay_line`

This is an independent small design. It is the digital part of an LMS adaptive FIR
filter whose input is a binary pseudo-random sequence instead of white noise. Because
each input value is +1 or -1, every tap "multiplication" becomes a sign switch.

* `lfsr10` is a 10-bit maximal-length Fibonacci LFSR with taps at stages 10 and 7, a
  period of 1023, and a nonzero reset seed.
* `binary_delay_line` delays the bit stream and outputs the tap signs `d1..dn`
  (`TAPS = 16`; a 1 bit means +1).

The weights, their integrators and the output summer are switched-capacitor analog
circuits and are not part of this RTL. In `stft_top` the taps leave the chip as
`pn_taps` for that analog core.

## Files and hierarchy

    stft_top
    ├── stft_filterbank
    │   ├── stft1d ── comb_diff, stft_channel x N ── complex_rotator | cordic_rotator
    │   ├── downsampler
    │   └── window_net
    ├── stft2d
    │   ├── column_buffer
    │   ├── stft1d (on the difference column)
    │   └── update_loop ── complex_rotator x N
    ├── stft3d
    │   ├── column_buffer (N^3 words)
    │   ├── stft2d (on the difference slice)
    │   └── update_loop ── complex_rotator x N*N
    ├── lfsr10
    └── binary_delay_line

`stft_pkg` holds the width function `acc_width`, the coefficient functions and the CORDIC
helpers.

| parameter    | default | meaning |
|--------------|---------|---------|
| `N`          | 16      | DFT size, i.e. the number of channels (1-D) and the window side (2-D, 3-D) |
| `DW`         | 16      | input sample width |
| `D`          | 16      | filter bank decimation factor |
| `GF`         | 4       | extra fraction bits of the state |
| `CF`         | 16      | coefficient fraction bits |
| `USE_CORDIC` | 0       | 1 selects the CORDIC rotators in `stft1d` |
| `TAPS`       | 16      | binary delay line length |

The published architecture gives no channel count or word widths. It mentions
applications with hundreds or thousands of channels. `N = 16` keeps simulation fast.
The RTL is written for any N of at least 4; only power-of-two N has been simulated.
Resources grow linearly with N in 1-D. In 2-D they also grow linearly in operators, plus
the N x N state and the N*N-word column memory.

## Simulating

Every testbench in `tb/` is self-checking. It prints `TB_RESULT checks=<n> failures=<m>`,
and a watchdog ends a hung run. The references are computed independently in floating
point: direct DFT sums, direct 2-D DFT sums, and explicit window products. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/stft_pkg.sv tb/tb_stft_top.sv --top-module tb_stft_top -o sim
    ./obj_dir/sim

`tb_stft_top` runs the whole top at its default parameters:

* 700 samples through the filter bank, with the window mode changing every frame,
* 24 columns through the 2-D STFT,
* 19 slices through the 3-D STFT, so that slices also leave the window,
* 1500 steps of the PN line.

It counts the kept and dropped frames, the frames in each window mode, the input stalls,
the update passes, the 3-D updates that overlap loading, and the PN shifts. It fails if
any of them never occurs. It also checks that every 2-D column takes exactly 2N clocks
and every 3-D slice exactly 2N^2. It runs in under a minute, plus the build.

The other testbenches, `tb_<module>`, exercise each module alone:

* `tb_stft1d` also runs a CORDIC instance.
* `tb_stft3d` uses N = 8.
* `tb_stft_channel` checks channel 0 for exact accumulation.
* `tb_lfsr10` checks the period, the balance of ones and zeros, and the recurrence.

## What is this design's own choice

The recursion, the shared comb, the per-channel adder/rotator/register, truncating the
coefficients to keep the poles inside the unit circle, the CORDIC alternative, the
decimator, the Hanning shift-add formula, the 2-D scheme (difference column, 1-D array,
N linear arrays with one adder and one rotator each, 2N-clock throughput, no transpose)
the 3-D instance of the dimension recursion, and the 10-bit maximal-length PN generator
all follow the published architecture. These were decided here:

* all word widths, the rounding modes, `N = 16`, `CF = 16`, `GF = 4`;
* the valid/ready handshakes and the synchronous active-low reset `rst_n`;
* the decimation factor and phase, and decimating before windowing;
* the bypass mode of the window network;
* the column memory organisation;
* the strip height equal to N;
* the restart of the inner 1-D array at every column (and of the inner 2-D array at every
  slice in 3-D), with the `clear` inputs that provide it;
* running the 3-D update concurrently with loading of the next slice;
* the coefficient table of the update loop indexed by k, and the row-by-row output
  order;
* the unrolled CORDIC with its gain correction;
* the LFSR polynomial x^10 + x^7 + 1, the seed, and the 16 tap delay line.

## Not included

* Windows other than rectangular and Hanning. Other shift-add windows exist, but no
  coefficients were specified for them.
* Dimensions above three. The construction repeats the same way (an (M-1)-D transform of
  the difference, then an update loop with N^(M-1) arrays), but only 1-D, 2-D and 3-D are
  built.
* The analog switched-capacitor weights and summer of the adaptive filter.

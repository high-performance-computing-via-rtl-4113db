# FPGA accelerators for an FMCW radar and for database joins

This RTL implements the hardware case studies of the thesis *High Performance
Computing via High Level Synthesis Xilinx FPGA* (M. Roozmeh, 2018) as
hand-written, synthesizable SystemVerilog. In the thesis these units were
produced by high-level synthesis (Simulink/HDL Coder, Vivado HLS and OpenCL
with SDAccel). Three independent accelerators are built here:

* **Radar DSP unit.** The digital back end of a 77 GHz FMCW automotive radar.
  It takes ADC samples of the beat signal and reports the range and velocity
  of the strongest target for every up-ramp/down-ramp pair.
* **Sort-merge join.** Two tables of 8192 keys are each sorted by a bitonic
  sorting network. The network runs as three kernels that a controller
  launches in turn. A linear merge then emits every pair of rows with equal
  keys.
* **Nested-loop join.** The brute-force join. It compares each key of table B
  with every key of table A, 16 keys per cycle. For every (B, A) position it
  writes either the match or a -99 "hole".

The three units share nothing. `hpc_top` places them side by side, and each
unit brings out its own ports.

```
             hpc_top
 ┌──────────────────────────────────────────────────────────────────────┐
 │ fmcw_radar_dsp:  fir_decim ─► fft_stream ─► peak_interp ─► range_velocity
 │ join_accel:      bitonic_sorter (A) ┐
 │                  bitonic_sorter (B) ┴► merge_join
 │                  (each bitonic_sorter = global_buf + bitonic_local_cu
 │                                        + bitonic_pair_cu + controller)
 │ nested_loop_join
 └──────────────────────────────────────────────────────────────────────┘
```

## Radar signal chain

All radar constants are in `radar_pkg`:

* carrier 77 GHz
* ramp rate 1 GHz/s
* ADC rate 40 MS/s

The package also has the functions that compute the filter taps and the FFT
twiddles during elaboration. No coefficient tables are stored in files.

### Decimating low-pass filter (`fir_decim`)

The filter has 32 taps and decimates by 8, taking 40 MS/s down to 5 MS/s.
The taps are a Hamming-windowed sinc with its cutoff at the new Nyquist
frequency, in Q1.15 and normalised to unity DC gain. Only every eighth input
produces an output, so the filter evaluates its dot product only on those
cycles. Each output is rounded and saturated to 16 bits, two cycles after the
eighth input sample.

The tap count, window and widths are this design's choices. The reference
gives only the decimation factor and the rates. It states 40 MS/s to 8 MS/s,
which a factor of 8 cannot give. Its block diagram shows 5 MS/s, and this
design follows the factor of 8 and the 5 MS/s.

### Constant-geometry FFT (`fft_stream`, `fft_cg_stage`)

This is the largest and least obvious block. It is a 2048-point radix-2 FFT
that accepts one complex sample per cycle. It is built from 11 identical
stages, chosen so that the wiring between stages is the same for every stage.

The design uses the *constant-geometry* (Pease) signal-flow graph. Every stage
computes the same data movement:

```
stage s, butterfly i (0 <= i < N/2):
    y[2i]   = x[i] + x[i + N/2]
    y[2i+1] = (x[i] - x[i + N/2]) * W_N^e,   e = (i >> s) << s
```

After log2(N) stages, output position k holds frequency bin bitrev(k).

Each `fft_cg_stage` stores one incoming frame in two half-size memories:

* the "lo" half holds x[0 .. N/2-1]
* the "hi" half holds x[N/2 .. N-1]

It then reads both halves in step, one butterfly every two cycles. On each of
those two cycles it outputs either the sum y[2i] or the twiddled difference
y[2i+1]. A second pair of memories (ping-pong) takes the next frame while the
current one is being read. This gives the stage a sustained rate of one sample
per cycle. 11 stages × 2 memory banks makes 22 memory arrays. That matches the
22 memory blocks the reference reports for its HLS FFT, although the
reference does not describe its memory mapping.

Data format:

* data grows at full precision to `DW = IN_W + log2(N) + 2` = 29 bits, so
  nothing overflows
* twiddles are Q2.14
* the product is rounded back by 14 bits

The outputs leave in bit-reversed bin order, each labelled with its bin
(`out_bin`). The next block does not care about order, so no reorder buffer
is used.

Latency: about log2(N)·(N+2) cycles from a frame's first input to its first
output. Each stage holds one frame.

### Peak detection and interpolation (`peak_interp`)

For each bin between 1 and N/2-2, the block computes a magnitude estimate.
The estimate is `max(|re|,|im|) + min(|re|,|im|)/2`, which needs no multiplier
and no square root. The block stores these magnitudes and tracks the
strongest bin; on a tie it keeps the lowest bin. Bin 0 (DC) and the mirrored
upper half of the real-input spectrum are ignored.

After the frame it reads the two neighbours α and γ of the peak β. It then
divides to get the parabolic vertex offset:

```
p = (α − γ) / (2 (α − 2β + γ))
```

The division is a restoring divider that produces FRAC = 8 fractional bits,
truncated toward zero. `peak_pos = peak_bin + p` is ready within FRAC + 6
cycles of the frame's last bin.

### Range and velocity (`range_velocity`)

Frames alternate between up-ramp and down-ramp, starting with an up-ramp after
reset. With f1 the up-ramp peak and f2 the down-ramp peak:

```
range    = c / (4 · ramp_rate) · (f1 − f2)
velocity = c / (4 · f_carrier) · (f1 + f2)
```

A bin is 5 MS/s / 2048 ≈ 2441 Hz. Both formulas are therefore a constant
times a difference or sum of bin positions. The constants are computed during
elaboration in Q16 (cm per bin). One multiply and shift per output gives
`range_cm` and `vel_cms`, one cycle after the down-ramp peak.

### Radar unit (`fmcw_radar_dsp`)

This module chains the four blocks. The filter output is the real part of the
FFT input; the imaginary part is zero. Frames are counted from reset. There is
no chirp-synchronisation input, so the ADC stream must start on a ramp
boundary.

## Bitonic sorting with three kernels

The sorter follows the structure of the OpenCL bitonic sort: a host loop and
three kernels. Here the host loop is a hardware controller, and each kernel
is a compute unit. All data stays in an on-chip "global" buffer
(`global_buf`) of N (key, original index) records, with two read ports and two
write ports. Records keep their original index because the join must report
rows of the unsorted tables.

Sort direction: element g belongs to a bitonic sequence of size 2^k. Its
compare-exchange sorts ascending when bit k of g is 0, and descending
otherwise. At the final size the whole array is ascending.

**Block unit (`bitonic_local_cu`).** This unit is a work-group with its local
memory partitioned into registers. It copies a block of BLOCK = 512 records
from the buffer, two per cycle. It then executes one complete compare-exchange
step per cycle, using BLOCK/2 = 256 comparators in parallel. Finally it writes
the block back. Each comparator selects its operand pair through a small
multiplexer indexed by the stride. It has two modes:

* **sort** (`merge_mode = 0`, the *SORT LOCAL* kernel): the whole bitonic
  sort of each block. That is log2(BLOCK)·(log2(BLOCK)+1)/2 = 45 steps.
* **merge** (`merge_mode = 1`, the *MERGE GLOBAL* kernel): for one sequence
  size, all strides from `stride_log` down to 1, in each block.

**Pair unit (`bitonic_pair_cu`).** This is the *MERGE LOCAL* kernel, one work
item per pair. For one (size, stride) step it visits all N/2 pairs. Pair p
starts at element `2p − (p & (stride−1))`, and its partner is one stride
higher. It reads, compares and writes back one pair per cycle, fully
pipelined. The step takes N/2 + 2 cycles.

**Controller (`bitonic_sorter`).** The launch order is:

```
SORT LOCAL (every block)
for size = 2·BLOCK .. N (doubling):
    for stride = size/2, size/4, ... while stride >= BLOCK:
        MERGE LOCAL(size, stride)          -- pair unit, one launch per stride
    MERGE GLOBAL(size, stride = BLOCK/2)   -- block unit finishes the size
```

A stride of BLOCK or more reaches outside a block, so the pair unit handles
it. Smaller strides stay inside a block, so one block-unit launch finishes
them. The controller counts the launches of each kind, and the testbenches
check the counts.

A mux gives the buffer ports to whichever unit is busy, or otherwise to the
external load/read port. An assertion checks that the two units never own the
buffer at the same time.

For N = 8192 and BLOCK = 512 the launches are:

* 1 SORT LOCAL
* 10 MERGE LOCAL
* 4 MERGE GLOBAL

## Merge join (`merge_join`)

This is a two-pointer walk over sorted tables A and B:

* if A[i] > B[j], advance j
* if A[i] < B[j], advance i
* if they are equal, emit the pair, then scan a run cursor t = j+1, j+2, …
  while B[t] still equals A[i], emitting each pair; then advance i and leave
  j where it was

Leaving j in place lets the next A record with the same key meet the same run
of B records. Each comparison takes two cycles: a synchronous buffer read,
then the compare. Pairs leave on a valid/ready handshake, and the
`n_stalls` counter counts stalled cycles.

`join_accel` sorts both tables at once with two sorters, then runs the merge
join on their buffers. Keys are loaded through `ld_*`, and the row address is
stored as the original index.

## Nested-loop join (`nested_loop_join`)

Table A (up to NA = 8192 keys) is held on chip as rows of LANES = 16 keys.
The 16 lanes mirror a 512-bit memory word of 16 × 32-bit keys. B keys arrive
one at a time on a valid/ready stream.

For each B key i, the unit outputs one beat per A row. Lane l of the beat
belongs to output slot `i·NA + j` with j = row·16 + l:

* on a match the lane carries (j, i, A[j])
* otherwise it carries (−99, −99, −99)

`a_len` gives the number of valid A keys. Lanes beyond it are flagged invalid
in `out_lane_valid`. With `out_ready` held high, the unit delivers one beat
per cycle.

## How far to trust it, and where it departs from the reference

Each block has a self-checking testbench against an independent model:

* a direct DFT for the FFT
* real-valued formulas for range and velocity
* exhaustive pair sets for the joins
* sortedness and permutation checks for the sorters

Each testbench has also been shown to fail on a deliberately broken copy of
its block. `tb_hpc_full` runs the complete top with every parameter at its
default:

* two 2048-point radar frames
* a sort-merge join of two 8192-row tables
* a nested-loop join of an 8184-key table A with 6 B keys

That run takes about 157,000 clock cycles.

Departures and limits:

* **Parallelism.** The reference replicates work-groups: 65 to 400
  nested-loop units and 20 to 122 sort/merge units, depending on the FPGA.
  This RTL builds one unit of each kind. More throughput needs more
  instances, plus a splitter for the work.
* **Memory system.** The off-chip DDR, the AXI interconnect, the PCIe bridge
  and the host CPU are not built. Tables are loaded, and results read,
  through plain ports, and the "global memory" of the sort is an on-chip
  buffer.
* **Chosen sizes, not given by the reference:**
  * 32 FIR taps
  * all fixed-point widths
  * the magnitude estimate
  * BLOCK = 512 records per sort block
  * the search range of the peak detector
  * frame alignment from reset
  * ramps alternating up then down
* **Radar accuracy.** With the radar constants as given (1 GHz/s ramp,
  2441 Hz bins), one FFT bin of difference is about 183 m of range. A 30 m
  target therefore shifts the peak by only about 0.16 bin. A stationary
  target at short range falls into bin 0, which the detector excludes. The
  ADC stream is real, so the sign of a beat frequency is lost, and with it
  the sign of an approaching target's velocity. `tb_radar_workload` shows
  the effect for a target at 30 m:
  * -50 km/h is estimated as R = -4.3 m, V = +51.1 km/h
  * 0 km/h as R = 0 m, V = 8.4 km/h
  * +100 km/h as R = 6.4 m, V = 102.3 km/h

  Velocity magnitudes come out within a few percent; range does not. The
  chain computes the formulas exactly as stated, but it does not reach the
  range accuracy quoted for the original model.
* **Synthesis.** `bitonic_local_cu` with BLOCK = 512 is a large block:
  256 comparators on 48-bit records, each with a 9-way operand multiplexer.
  Open-source synthesis of it and of the blocks that contain it is slow.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and calls
`$finish`. Each also has a cycle watchdog. To build and run one with Verilator
(5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/radar_pkg.sv rtl/join_pkg.sv tb/tb_hpc_top.sv --top-module tb_hpc_top
./obj_dir/Vtb_hpc_top
```

| testbench | what it runs |
|---|---|
| `tb_fir_decim` | DC, tones in and out of band, output rate and latency |
| `tb_fft_stream` | 64-point FFT, three back-to-back frames against a direct DFT |
| `tb_peak_interp` | synthetic spectra: exact bin, fraction and latency |
| `tb_range_velocity` | up/down pairs against the formulas |
| `tb_fmcw_radar_dsp` | 64-point radar chain, four frames of tones |
| `tb_bitonic_local_cu`, `tb_bitonic_pair_cu` | single kernels against a reference step |
| `tb_bitonic_sorter` | 256 records, all three kernels, launch counts |
| `tb_merge_join`, `tb_join_accel` | joins with repeated keys and random back-pressure |
| `tb_nested_loop_join` | partial last row, holes, stalls, full-rate timing |
| `tb_hpc_top` | whole top at reduced sizes, counts every mechanism |
| `tb_hpc_full` | whole top at default sizes (about 45 s with Verilator) |
| `tb_nlj_workload` | nested-loop join of two 8192-key tables, all 4,194,304 beats checked |
| `tb_radar_workload` | radar at default sizes on targets at 30 m, -50 / 0 / +100 km/h |

`tb_hpc_top` and `tb_hpc_full` count how often each mechanism occurs:

* radar peaks and ramp pairs
* fractional interpolation
* each kernel launch kind
* join output stalls and runs of equal keys
* nested-loop stalls, holes, matches and partial rows

A mechanism that never occurs counts as a failure.

To change a size, override the parameters. All defaults are the sizes of the
reference, or the choices listed above. Useful overrides:

* `RADAR_N`: FFT size, a power of two
* `JOIN_N`: table size, a power of two
* `BLOCK`: power of two, at most `JOIN_N / 2`
* `LANES`: must divide `JOIN_N`

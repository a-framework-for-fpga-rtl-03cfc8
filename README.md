# 9/7 biorthogonal wavelet transform architectures

This is a small library of hardware architectures for the discrete
biorthogonal wavelet transform (DBWT), in synthesizable SystemVerilog. It
covers the one-dimensional transform, used for signals, and the
two-dimensional transform, used for images. All of them use the CDF 9/7 filter
pair, the biorthogonal pair of JPEG 2000. Its 9-tap low-pass filter h and its
7-tap high-pass filter g are both symmetric. Each level of the transform
filters its input with h and g and keeps every second result, giving an
approximation (a^j, or LL^j in 2-D) and a detail (d^j, or LH/HL/HH in 2-D).
The next level transforms the approximation again.

The library has four architectures:

| name | module | idea |
|---|---|---|
| Arc1D-I | `arc1d_pipe` | balanced pipeline: one processing element (PE) per level. PE_j has ceil(9/2^j) multipliers, so every stage is just fast enough for its halved input rate |
| Arc1D-II | `arc1d_hybrid` | two PEs: PE_1 computes level 1 at full rate, and PE_2 computes all higher levels by recursive pyramid scheduling |
| Arc2D-I | `arc2d_sep` | separable 2-D transform on one filter bank shared by rows, columns and all levels; register blocks of rows are read column by column, so the image is never transposed |
| Arc2D-II | `arc2d_nonsep` | non-separable (direct) 2-D transform: rows arrive in pairs, rows symmetric about the kernel centre are pre-added, 1-D filter processors run the rows of the 2-D kernels, and a row adder sums them. One such unit serves all levels in turn |

`dbwt_top` places all four side by side, each with its own ports. A real
system would instantiate only the one it needs.

## Arithmetic and conventions

These conventions hold in every block, and the testbench reference model
(`tb/dbwt_ref_pkg.sv`) implements them directly.

* **Word lengths.** Input samples are 9-bit two's complement. Every
  coefficient, at every level, is 16 bit (`dbwt_pkg::W_I`, `W_O`). For 9-bit
  input these 16 bits are enough. Results are rounded half-up and saturated,
  although the tests never reach saturation.
* **Filter coefficients.** The coefficients are quantised to 12 bits with 10
  fractional bits (`dbwt_pkg::H_Q`, `G_Q`). Only the unique halves are
  stored: h[0..4] and g[0..3]. The normalisation gives the low-pass filter a
  DC gain of 1, so sum(h) = 1 and sum(g) = 0, and approximations keep the
  range of the input.
  * h (×1024): 27, −17, −80, 273, 617, 273, −80, −17, 27
  * g (×1024): 93, −59, −605, 1142, −605, −59, 93
* **Alignment and boundaries.** Samples are numbered from zero. Output pair m
  of a level is formed when sample x[2m+1] arrives:
  * `low[m] = Σ_{k=0..8} h[k]·x[2m+1−k]`
  * `high[m] = Σ_{k=0..6} g[k]·x[2m+1−k]`

  Samples before the start of a frame count as zero. In 2-D this holds for
  every row and every column, so a frame of N samples gives exactly N/2
  pairs. This zero padding is simple in hardware, but it is not the
  symmetric extension that gives perfect reconstruction at the edges. A
  synthesis filter bank that inverts this output must use the same
  convention.
* **2-D subband names.** Names are written as <horizontal filter><vertical
  filter>. LH means low-pass along the rows and high-pass along the columns.
  Subbands come out in row-major order.
* **Streams.** Inputs use valid/ready plus a `first` flag on the first sample
  of a frame, which restarts the history. Outputs use valid only, again with
  a `first` flag. Reset is asynchronous and active-low (`rst_n`).

## The processing element: folding a symmetric, decimating filter

This is the part everything else is built on. It is `dwt_pe`, with
`dwt_fold_core` as its arithmetic engine.

A level produces one (low, high) pair for every two input samples. Because
both filters are symmetric, the window is first pre-added:
x[n]+x[n−8], x[n−1]+x[n−7], … for h, and x[n]+x[n−6], … for g. That leaves
5 + 4 = 9 products per output pair instead of 16.

`dwt_fold_core` latches these nine operands when a job starts. It then spends
C = ceil(9/M) cycles on them with M multipliers and accumulates both sums.
One cycle after the last group it pulses `done` with the full-precision sums.
A new job can start in the same cycle as the last group, so jobs can follow
each other every C cycles. A small tag (a first flag, or a level number)
travels with each job.

With M = 5, C = 2: the PE can start one job every two samples, so it accepts
one sample per clock and never stalls. This is PE_1. With fewer multipliers
the PE drops `in_ready` when an odd sample arrives while the engine is still
busy.

Latency is C + 1 cycles from the odd sample to the output pair. That is 3
cycles for M = 5.

`dwt_pe` takes the coefficient sets as parameters, as `int` arrays with a
width `CW` and a rounding shift. That is how the non-separable architecture
reuses it with 2-D kernel coefficients.

## Arc1D-I: balanced pipeline (`arc1d_pipe`)

J PEs form a chain. PE_j gets the approximation of PE_{j−1} and M_j =
ceil(9/2^j) multipliers: 5, 3, 2, 1, ….

* Stage j receives a sample at most every 2^(j−1) cycles.
* It needs ceil(9/M_j) ≤ 2^j cycles per pair (2 ≤ 2, 3 ≤ 4, 5 ≤ 8, 9 ≤ 16).
* So no stage ever stalls, and the inner stages need no ready signal. An
  assertion checks this.

A frame of N0 samples is read in N0 cycles. The d^j stream carries N0/2^j
coefficients. The pipeline has 5 + 3 + 2 = 10 multipliers for J = 3.

## Arc1D-II: hybrid pipeline with a recursive-pyramid PE (`arc1d_hybrid`, `dwt_rpa_pe`)

A pure pipeline leaves its later stages mostly idle. Here PE_1 (5
multipliers) does level 1, and a single PE_2 with ceil(9/4) = 3 multipliers
does levels 2..J:

* PE_2 keeps a 9-sample window for every level it serves.
* A window becomes *pending* when it receives its odd sample.
* Whenever the engine can start a job, it takes the **highest** pending
  level.
* The a^j result of level j < J is fed back into the window of level j+1.
  This is the multiplexer loop in front of PE_2.

Serving the highest level first guarantees that a fed-back coefficient never
overwrites a window that is still waiting for the engine: when level j
starts, level j+1 cannot be pending, and nothing else writes into level j+1
before level j's result returns. An assertion checks this.

PE_2's outputs carry their level number (`out_level`), so d^j and a^j of
different levels interleave on one port.

**Throughput.** PE_1's a^1 output has no back-pressure, so an 8-entry FIFO
sits between the PEs. The input is throttled (`x_ready` low, `stall` high)
while the FIFO might not have room for the pairs PE_1 still has in flight.
With 3 multipliers PE_2 needs 3 cycles per pair. Levels 2..J hold about N0/2
pairs in total, so PE_2 needs about 1.5·N0 cycles of engine time per frame.
A continuous stream is therefore slowed to about two samples every three
cycles.

Set the PE_2 multiplier count to 5 (parameter `M` of `dwt_rpa_pe`) to reach
full rate.

## Arc2D-I: separable 2-D transform on one shared filter bank (`arc2d_sep`)

The separable transform filters the rows of an image and then the columns of
the row-filtered result. The architecture does both, for every level, on a
single filter bank: one folded engine (M = 5) that produces a low-pass and a
high-pass coefficient every two cycles. A multiplexer feeds the engine from
one of two sources, and the bank works through a list of jobs.

**Row job (level j, row r).** The N_j = N/2^(j−1) samples of one row pass,
one per cycle, through an 8-word delay line. The delay line is cleared
before each row, so every row starts from zero history. Every second sample
the engine filters the nine-sample window. The N_j/2 L and N_j/2 H
coefficients are written as one row into the register block R_j. Level 1
reads image pixels from the input. Higher levels read a stored LL row.

**Register block R_j.** This holds the last nine row-filtered rows of level
j, N_j words each, in nine banks written cyclically. Because every row has
its own bank, the nine coefficients of one column can be read in a single
cycle. The column pass therefore sees the data in column order without any
transposition memory.

**Column job (level j, after odd row r).** For each of the N_j coefficient
columns, rows r, r−1, …, r−8 are read from R_j, with zeros above the image.
The engine filters them vertically, taking two cycles per column:

* The first half of the columns (the L columns) gives LL and LH.
  - The LL row goes into the level's one-row LL buffer. It is the input of a
    later row job of level j+1.
  - LH waits in a half-row buffer.
* The second half (the H columns) gives HL and HH. These leave together
  with the buffered LH and, at the last level, with LL.

**Scheduling.** This is a row-based recursive pyramid. After each job the
bank waits for the engine to drain. It then takes, in order:

1. the pending job of the highest level, with a column job before a row job
   of the same level;
2. otherwise, a row job on the next input row.

`x_ready` is high only while an input row is being read. The image input
therefore stalls during column jobs and higher levels.

The priority order ensures that a pending column job or LL row is consumed
before the next row of its level overwrites it. Two assertions check the
filter bank and column-job handshakes.

**Cycle count.** Level j needs N_j² cycles of row jobs and N_j² cycles of
column jobs, so a frame takes about 2·N²·(1 + 1/4 + 1/16) cycles plus a few
per job. That is about 176 k cycles at N = 256, J = 3. Level 1 alone accounts
for the 2·N² of the original description.

At N = 256 the register blocks hold 9 · (256+128+64) words of 16 bits. The LL
row buffers hold 128+64+32 words.

## Arc2D-II: non-separable 2-D transform on one shared unit (`arc2d_nonsep`)

Each subband is a direct 2-D convolution followed by decimation by 2 in both
directions. The kernels are the outer products of the 1-D filters: 9×9 for
LL, 9×7 and 7×9 for LH and HL, and 7×7 for HH. They are stored as 24-bit
coefficients with 20 fractional bits, and the result is rounded only once.
It therefore differs slightly from the separable architecture, which rounds
after the row pass.

**Row pairs.** The image enters two rows at a time: each cycle brings column
c of row 2m and of row 2m+1. With both rows of a decimated output row
present at once, the decimated output can be computed directly, and every
output row needs just one pass over NJ columns.

**Row delay circuits.** Every level has two pipes holding its earlier rows:

* one for odd rows: 2m−1, 2m−3, 2m−5, 2m−7
* one for even rows: 2m−2, 2m−4, 2m−6

At level j each row-delay element is N/2^(j−1) words. The levels are packed
into memories of 2N words, level j starting at word 2N − 2N/2^(j−1). On
every column the pipes of the level being processed shift by one row at
that column.

**Vertical pre-adders.** For the 9-tap vertical low-pass, rows symmetric
about the centre row 2m−3 are added. This gives five row sums:

| sum | rows |
|---|---|
| (2m+1)+(2m−7) | from the odd pipe |
| (2m)+(2m−6) | from the even pipe |
| (2m−1)+(2m−5) | from the odd pipe |
| (2m−2)+(2m−4) | from the even pipe |
| 2m−3 | from the odd pipe |

**Filter processors.** Each row sum feeds a 1-D filter processor P_i, a
`dwt_pe` whose coefficients are row i of the 2-D kernels: h[i]·h[u] for LL
and h[i]·g[u] for HL. Four more processors Q_0..Q_3 do the same with the
7-tap vertical high-pass, whose row sums are centred on 2m−2, to give LH and
HH.

**Row adder.** The row adder sums the nine processors' unrounded outputs and
rounds them by 20 bits.

All nine processors run in lock step with M = 5, so the unit has 45
multipliers. It serves every level.

**Feedback of LL.** The LH, HL and HH rows leave at once. Each LL row of a
level below J is written back into the row-pair buffer of the next level,
which holds two rows: the even one and the odd one. Once the odd row is
complete, that level has a row pair pending.

**Scheduling the shared unit.** The unit processes one row pair at a time;
call it a job. A job of level j streams N/2^(j−1) columns and produces one
output row of every subband. Between jobs the unit waits until the previous
job's outputs have left the pipeline, which takes a few cycles. It then
takes the pending row pair of the highest level. If no pair is pending it
takes the next input row pair. `x_ready` is high only during input jobs, so
the input stalls while higher levels are computed.

The priority rule guarantees that a pending pair is consumed before its
level can produce the next even row into the same buffer. An assertion
checks this.

Waiting for the drain keeps the bookkeeping simple. Only one job is ever in
flight, so the level of the outputs is simply that of the last job started.

**Cycle count.** One frame needs N²/2 · (1 + 1/4 + 1/16 + …) cycles of
useful work, which tends to (2/3)·N². On top of that come about six cycles
per job. At N = 32 and J = 3 a frame takes about 750 to 790 cycles against
683 for (2/3)·N². At N = 256 the overhead is about 2 %.

## Top level (`dbwt_top`)

| parameter | default | meaning |
|---|---|---|
| `J1` | 3 | levels of both 1-D architectures |
| `N`  | 256 | image size of both 2-D architectures |
| `J2` | 3 | levels of both 2-D architectures |

The port prefixes are:

* `p1_` for Arc1D-I
* `h1_` for Arc1D-II
* `s2_` for Arc2D-I
* `n2_` for Arc2D-II

Per-level outputs are unpacked arrays indexed by level − 1.

The 1-D architectures have no frame length parameter: they stream, and a
frame lasts from one `first` sample to the next.

## Cycle counts and resources

| architecture | multipliers (J = 3) | cycles to read a frame | stalls |
|---|---|---|---|
| Arc1D-I | 5 + 3 + 2 = 10 | N0 | never |
| Arc1D-II | 5 + 3 = 8 | ≈1.5·N0 for long frames | PE_2-bound |
| Arc2D-I | 5, shared by all levels | ≈2·N²·(1 + 1/4 + 1/16) + a few per job | during column jobs and higher levels |
| Arc2D-II | 9 × 5 = 45, shared by all levels | ≈(2/3)·N² + 6 per row pair | while higher levels run |

The multiplier counts of the 1-D architectures, ceil(L/2^j) per stage and
ceil(L/2) + ceil(L/4), are those of the original architecture descriptions.
Those descriptions quote a processing time of N0/2 cycles for both 1-D
architectures, 2·N² for Arc2D-I and (2/3)·N² for Arc2D-II.

## Where this RTL departs from the published architectures

* **Filter constants, widths and boundaries.** The 9/7 coefficient values,
  the 12-bit coefficient width, rounding and saturation, and zero-padded
  boundaries are choices of this implementation. So are the stream
  handshakes and the reset.
* **1-D sample rate.** The 1-D PEs take one sample per clock. The published
  processing time of N0/2 cycles would need two samples per clock.
* **Multiplier count per stage.** The published formula for the stage
  multiplier count appears both as floor(L/2^j) and as ceil(L/2^j). This RTL
  uses ceil: 5, 3, 2.
* **Arc1D-II scheduling.** The scheduling of PE_2 (highest pending level
  first) and the FIFO in front of it are this implementation's. With
  ceil(L/4) multipliers, PE_2 throttles a continuous input.
* **Arc2D-I schedule and memory.** The shared filter bank, the multiplexed
  bank input, the register blocks per level and the one-row LL buffers
  follow the original description. Three things are this implementation's:
  - the exact job order, since the schedule is only named as row-based
    recursive pyramid;
  - the drain between jobs;
  - the LH half-row buffer.
  The register blocks hold nine rows rather than L−1 = 8, because with a
  single bank the newest row is stored before its column job runs.
* **Arc2D-II processors and schedule.** The published diagram shows only
  the five LL processors. The four Q processors for the vertical high-pass
  subbands are this implementation's reading. The published interleaving
  schedule is only outlined, as one that differs from the recursive pyramid.
  The priority rule and the drain between row pairs are this
  implementation's.
* **Arc2D-II row delays.** These are 4 + 3 row delays, not a pipe of L−1 = 8
  per level, because the current row pair is used directly.
* **Outside the RTL.** The framework around the architectures is not part of
  the RTL: the parameter GUI, the design-file generator, the FPGA board with
  its SRAM banks and host link, and the vendor tool flow.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares every
output coefficient with the reference model in `tb/dbwt_ref_pkg.sv`. That
model computes the transform from its definition: direct convolution,
decimation and rounding. For the non-separable transform it uses a direct 2-D
convolution with the outer-product kernels.

| testbench | what it runs |
|---|---|
| `tb_dwt_pe` | random frames with and without gaps into PEs with M = 5 and M = 2; checks the M = 5 PE never stalls and has a 3-cycle latency, and that M = 2 stalls |
| `tb_arc1d_pipe` | J = 3, 64-sample frames; checks every d^j and a^3, and N0 cycles per frame with no throttling |
| `tb_arc1d_hybrid` | J = 3 and J = 4, 64-sample frames; checks every level, that J = 4 throttles, and under 2·N0 cycles per frame |
| `tb_arc2d_sep` | three levels at N = 32 on the shared filter bank: two random images (one with input gaps) and an extreme checkerboard, every subband of every level, and the cycles per frame against the row and column job count |
| `tb_arc2d_nonsep` | three levels at N = 32 on the shared unit, the same three images as row pairs, every subband of every level, and the cycles per frame against N²/2·(1 + 1/4 + 1/16) plus 8 per row pair |
| `tb_dbwt_top` | all four architectures running at once at reduced size (N = 32) |
| `tb_dbwt_top_full` | the same at the default parameters: two 256 × 256 images and two 1024-sample signals, about 353 k cycles |

The two top-level benches also count how often each mechanism occurs and
fail if one never does:

* outputs of every pipeline stage
* throttling of Arc1D-II
* PE_2 results computed from fed-back coefficients
* Arc2D-I column-job outputs at every level, read column-wise from the register blocks
* Arc2D-I input stalls while the bank runs column jobs or higher levels
* Arc2D-II outputs of levels 2 and up, read from the LL row-pair buffers
* Arc2D-II input stalls while the shared unit runs a higher level
* frame restarts

Every bench ends with one line `TB_RESULT checks=<n> failures=<n>` and has a
cycle watchdog.

To simulate a bench with Verilator, list the packages first:

```
verilator --binary --timing --assert -Irtl \
    rtl/dbwt_pkg.sv tb/dbwt_ref_pkg.sv rtl/*.sv tb/tb_dbwt_top.sv \
    --top tb_dbwt_top -o sim
./obj_dir/sim
```

Replace `tb_dbwt_top` with any other bench name.

**Limits of the testing.**

* The benches check the architectures against a model of the same
  arithmetic. They do not check it against a floating-point wavelet or
  against reconstruction.
* Timing closure, area and the clock frequencies reachable on an FPGA have
  not been evaluated.

## Changing the design

* **Filter pair.** Change `H_Q`/`G_Q` in `dbwt_pkg` and the default `CL`/`CH`
  of `dwt_pe` and `dwt_fold_core`. The structure assumes a symmetric 9-tap
  low-pass and a symmetric 7-tap high-pass (5 + 4 unique coefficients).
* **Speed against area.** `M` of `dwt_pe` and `dwt_rpa_pe` trades one for
  the other. Any M from 1 to 9 is valid, and the valid/ready protocol absorbs
  the slower rate.
* **Image size.** `N` must be a power of two. Each 2-D level then works on
  N/2^(j−1) columns.

# SBI-PTS: low-complexity PAPR reduction for OFDM, in SystemVerilog

An OFDM symbol is the sum of many subcarriers. Now and then they add up in
phase and give a peak far above the average power. A high peak-to-average
power ratio (PAPR) forces the transmitter's power amplifier to run inefficiently.
Partial transmit sequences (PTS) are a common remedy. The subcarriers are split
into Q subblocks, each subblock is taken to the time domain on its own, and the
subblocks are added back with a phase weight each. The weights are chosen so
that the sum has the lowest peak.

This design is a PTS variant with two simplifications:

* **Subblock interleaving (SBI).** Before weighting, the Q time-domain
  subblocks are mixed sample by sample into Q new rows. This spreads each
  subblock's peaks over several rows, so one flip of sign is less likely to
  line two peaks up.
* **Weights of +1 and -1 only, chosen greedily.** Each weight is (-1)^w_q with
  w_q in {0, 1}, so weighting is just passing or negating a sample. The
  search does not try all 2^Q sequences. It measures w = 0...0, then flips w_1
  and keeps the flip only if the PAPR drops, then does the same for w_2, and
  so on. That is Q comparisons (Q + 1 PAPR measurements) instead of an
  exponential search.

The RTL implements the transmitter-side hardware for N = 256 subcarriers and
Q = 4 subblocks, with 16-bit fixed-point samples. An oversampling factor L
(default 1) can zero-pad every subblock to L·N points before its IFFT.

## Data path

```
 X_k (Fix_16_15) ──► subblock_partition ──► 4 × ifft ──► subblock_interleaver
                                                               │ (Q rows, re-readable)
                                                               ▼
     out (Fix_20_15), index ◄── phase_optimizer: phase_sequence_gen
                                                 optimisation_block  (Σ ±x_q)
                                                 papr_calc           (10·log10 max/mean)
```

| Module | Role |
|---|---|
| `sbi_pkg` | Sample formats and the complex sample structs |
| `subblock_partition` | Counts samples 0..255 and sends sample k to subblock k/64. The other three subblocks get zero, which zero-pads each to 256. With L > 1 it then adds (L−1)·N all-zero beats |
| `ifft` | 256-point inverse FFT scaled by 1/256, one per subblock |
| `subblock_interleaver` | Builds the four interleaved rows as the subblock samples arrive and holds them for repeated reading |
| `phase_sequence_gen` | Maps each phase bit w_q to the weight +1 or −1 |
| `optimisation_block` | Multiplies each row by its weight and adds the rows in a two-level adder tree |
| `papr_calc` | Computes instantaneous power, running maximum, mean and 10·log10(max/mean) |
| `phase_optimizer` | Controls the greedy search, then streams out the winning sum |
| `sbi_pts_top` | Wires the chain together |

Number formats (`FixW_F` = W-bit two's complement with F fraction bits):
input, IFFT outputs and interleaved rows Fix_16_15; weights Fix_2_0;
products Fix_18_15; first adder level Fix_19_15; combined output Fix_20_15.
PAPR results are unsigned 8.8 fixed point, in dB.

## The subblock interleaver

This is the least obvious part. Take the Q × N matrix whose row q is subblock q.
Read it column by column: sample 0 of every subblock, then sample 1, and so
on. Write that sequence column by column into a matrix of R = Q·B rows and
C = N/B columns. Transpose that matrix, read it column by column, and fill a
new Q × N matrix column by column. Row m of the result is interleaved output m.
In closed form, for position j of output row m:

```
t = j·Q + m,   r = t / C,   c = t mod C,   s = c·R + r
source subblock q = s mod Q,   source sample k = s / Q
```

Small example (N = 8, Q = 4, B = 4), with AFqk the k-th sample of subblock q:

```
row 1: AF11 AF31 AF12 AF32 AF13 AF33 AF14 AF34
row 2: AF15 AF35 AF16 AF36 AF17 AF37 AF18 AF38
row 3: AF21 AF41 AF22 AF42 AF23 AF43 AF24 AF44
row 4: AF25 AF45 AF26 AF46 AF27 AF47 AF28 AF48
```

At the default N = 256, Q = 4, B = 8, output row m draws, from every
subblock, the samples whose group of eight is m mod 4:

| Row 1 | Row 2 | Row 3 | Row 4 |
|---|---|---|---|
| A0–A7, B0–B7, C0–C7, D0–D7 | A8–A15, B8–B15, … | A16–A23, … | A24–A31, … |
| A32–A39, B32–B39, … | A40–A47, … | A48–A55, … | A56–A63, … |

Each row then holds these samples in the order the formula gives. The
hardware builds the rows as the samples arrive:

* Subblock q is delayed by 8·q samples (0, 8, 16 and 24). In every write step
  the four delayed streams then belong to four different rows.
* One multiplexer per row picks the stream that belongs to it in that step.
* An address computed from the step counter writes the sample at its final
  position j in that row's memory bank: j = ((k mod B)·Q + q)·(C/Q) + ⌊k/B⌋/Q.
  This form needs C mod Q = 0.

A symbol takes N + 24 steps. The last 24 steps empty the delays and accept
no input. The banks are then read in natural order, so the four rows come out
together, one cycle after the address. A read with `rd_en` low gives zero.
Once a symbol is stored, `full` rises and writes are refused until `release`,
so the optimiser can read the same symbol several times.

## The greedy phase search

`phase_optimizer` makes Q + 2 passes over the stored symbol:

1. Pass 0 uses w = 0000 (all weights +1). Its PAPR becomes the best so far.
2. Passes 1..Q each use the best sequence with bit w_q flipped. If the PAPR
   is strictly lower, the flip is kept and the best PAPR is updated.
   Otherwise the flip is dropped.
3. The final pass uses the winning sequence. It streams the N combined samples
   out (`out_valid`, with `out_last` on the last one) and shows the sequence on
   `index` (bit q = w_(q+1)).

Each pass first clears `papr_calc`, then feeds it N samples from
`optimisation_block`, and then waits for the PAPR result. `papr_valid` /
`papr_db` on the top report every candidate's PAPR, and `flip_kept` pulses
when a flip was kept.

## PAPR calculation

Each sample's real and imaginary parts are squared and added. The power keeps
20 fraction bits, and its integer part is wide enough for any sum of four
subblocks. An accumulator adds the N powers, and a right shift by log2 N = 8
gives the mean. A greater-than comparison holds the maximum. Then:

* a restoring divider forms max/mean with 16 fraction bits, one bit per
  cycle;
* a leading-one search gives the integer part of log2;
* 12 fraction bits follow by repeated squaring of the normalised mantissa;
* the result is multiplied by 10·log10(2) and rounded to 1/256 dB.

The result is 10·log10(max/mean), the same value as the usual floating-point
chain ln → ÷ ln 10 → × 10, to within 0.01 dB. A ratio below 1 reports 0 dB.
A zero mean reports the largest value. Latency is about 65 cycles after the
last sample.

## The IFFT

Each subblock goes through an N-point inverse FFT whose scaling schedule is
the radix-4 word 107 = `01 10 10 11`. Read from the first stage, that is right
shifts of 3, 2, 2 and 1, eight bits in all, i.e. a 1/N scale. The
implementation is a compact in-place radix-2 decimation-in-time engine on a
register array:

* **Load:** N cycles. Samples are stored at bit-reversed addresses.
* **Compute:** (N/2)·log2 N = 1024 cycles, one butterfly per cycle. Each pair
  of radix-2 stages shifts by one field of the schedule, the larger half
  first.
* **Unload:** N cycles, natural order. Results are saturated to Fix_16_15.

Internally samples are 18 bits. Twiddles are 16-bit cos/sin values computed
at elaboration. Against an exact IDFT the error stays within 7 LSB on
full-scale random input.

## Timing and flow control

All blocks run on one clock `clk` with an active-low synchronous reset
`rst_n`. The design handles one symbol at a time:

| Phase | Cycles (N = 256, Q = 4) |
|---|---|
| Input / IFFT load | 256 |
| IFFT compute | 1024 |
| IFFT unload into the interleaver | 256 + 24 |
| Q + 1 PAPR passes | 5 × (258 + ~65) |
| Output pass | ~258 |

That is about 3,400 cycles per symbol. `in_ready` is low while the IFFTs
compute, and while the interleaver still holds the previous symbol. The input
of the next symbol overlaps the search on the current one. The output stream
has no ready signal: a consumer must take one sample per `out_valid`.

## Departures and choices

* **The IFFT** is a compact iterative engine, not a fully pipelined streaming
  core. Hence the 1024-cycle compute phase and the back-pressure on the
  input. The transform and its scaling are the intended ones.
* **The PAPR arithmetic** is fixed point (divider, log2, constant multiply)
  instead of floating-point divide and logarithm. The power word is wider in
  its integer part than the 22-bit format the original diagram gives.
* **The interleaver** has the delays, multiplexers and computed write
  addresses of the original structure. Its exact address arithmetic is not
  copied bit for bit; the addresses come from the closed form above. B = 8 is
  inferred from the groups of eight samples in the first interleaving round.
* **The search** is sequential: one PAPR calculator is reused for all Q + 1
  candidates. Ties keep the unflipped sequence.
* **Only the main configuration is built:** time-domain interleaving,
  N = 256, Q = 4. The adder tree in `optimisation_block` is written for
  Q = 4. Partition, IFFT, interleaver and PAPR calculator are parameterised in
  N (a power of two).
* **Oversampling** is a parameter `L` of the top, default 1 as in the
  hardware. The padding zeros follow the N points of each subblock. The IFFT
  keeps its 1/256 scale, so output sample L·n equals sample n of the L = 1
  output.
* **Outside the RTL:** the host link that fed samples in and read results
  back, and the source and framing blocks on the host side. The top's plain
  ports stand in for them.

## Measured PAPR reduction

`tb_workload_ccdf` sends random symbols through the whole design. For each
symbol it compares the PAPR of the design's output with the PAPR of plain
OFDM, i.e. one IDFT of the whole symbol, padded to L·N points in the same
way, with no partition and no weighting. One run gave:

| N | L | Constellation | Symbols | Mean PAPR, plain OFDM | Mean PAPR, SBI-PTS | P(PAPR > 8 dB), plain / SBI-PTS |
|---|---|---|---|---|---|---|
| 256 | 1 | QPSK | 200 | 7.78 dB | 6.46 dB | 0.37 / 0.00 |
| 128 | 4 | 16-QAM | 40 | 7.87 dB | 6.11 dB | 0.38 / 0.00 |
| 256 | 4 | 16-QAM | 40 | 8.53 dB | 6.83 dB | 0.75 / 0.00 |
| 512 | 1 | 16-QAM | 40 | 8.29 dB | 6.93 dB | 0.68 / 0.03 |
| 1024 | 1 | 16-QAM | 40 | 8.63 dB | 7.72 dB | 0.75 / 0.25 |

Oversampling shows peaks between the L = 1 sample points, so the PAPR rises.
N = 512 and 1024 run without oversampling, because this IFFT at 2048 and
4096 points is too slow to build and simulate. The sample counts are far
too small for the 1e-4 tail of the distribution, so the numbers only show
the trend. Other sizes need only the `N` and `L` parameters of
`sbi_pts_top`.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. For
example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sbi_pkg.sv rtl/sbi_pts_top.sv tb/tb_sbi_pts_top.sv --top tb_sbi_pts_top
./obj_dir/Vtb_sbi_pts_top
```

Replace the top and testbench names to run another block. Everything runs
in seconds once built. The workload testbench needs `-Itb -y tb` and about a
minute to compile.

| Testbench | What it checks |
|---|---|
| `tb_subblock_partition` | Range routing, zero padding (also with L = 2), last flag, under random back-pressure |
| `tb_ifft` | Three symbols against a floating-point IDFT, and the 1024-cycle compute time |
| `tb_subblock_interleaver` | The N = 8 worked example (for the reference builder); N = 32 and N = 256 against the order rebuilt step by step; the groups of eight; flush length; full/release; re-reading; `rd_en` |
| `tb_phase_sequence_gen` | All 16 selector patterns |
| `tb_optimisation_block` | Exact sums, including full-scale values |
| `tb_papr_calc` | Constant envelope (0 dB), single spike (24.08 dB), random symbols, restart mid-symbol |
| `tb_phase_optimizer` | Candidate PAPRs, greedy choice and output samples against a floating-point model |
| `tb_workload_ccdf` (with helper `ccdf_run`) | PAPR statistics as above. Per symbol: the output's PAPR is not above the first candidate's, and it equals the lowest PAPR the design reported |
| `tb_sbi_pts_top` | Four QPSK symbols end to end against a floating-point model: candidate PAPRs, chosen index, output samples. Requires an input stall, a kept flip and a rejected flip to occur |

# Linear systolic arrays for the discrete Fourier transform

This RTL computes discrete Fourier transforms (DFTs) on linear arrays of
multiply-add cells. It streams: one sample goes in and one frequency comes
out per clock. There are three engines:

* **Prime-length engine** (`rader_dft`). An N-point DFT for prime N (default
  5) on a row of N-1 cells. The samples stay in place, and a single periodic
  twiddle stream serves every transform. Each cell needs only two real
  multipliers, because the input is real. A new transform starts every N-1
  clocks and the transforms overlap.
* **Scheme 1, the folded Horner array** (`scheme1_array`). A long DFT, N = P·Q
  (default 4·5 = 20), on only Q cells. Partial results loop back through a
  FIFO for P passes.
* **Scheme 2, the prime-factor engine** (`scheme2_dft`). A long DFT,
  N = N1·N2 with N1 and N2 coprime primes (default 5·3 = 15). It splits the
  transform into short DFTs along rows and columns. One prime-length array
  does the rows, a buffer transposes the results, and two more prime-length
  arrays do the columns.

The top module `dft_arrays_top` holds the three engines side by side with
separate ports. They share only the clock and reset.

The hardest parts to follow are how the prime-length array is scheduled and
why its links run at different speeds. Most of this document covers those
two points.

---

## 1. The prime-length array

### 1.1 From DFT to circular convolution

For prime N, the nonzero indices 1..N-1 form a cyclic group under
multiplication mod N. A primitive root π generates the group: its powers
π^0, π^1, …, π^(N-2) run through every nonzero index once. For N = 5, π = 2
gives 1, 2, 4, 3.

Write every nonzero input index as π^-q and every nonzero output index as
π^k. Then W^(ik) depends only on k − q:

    y(0)    = x(0) + Σ_{i=1..N-1} x(i)
    y(π^k)  = x(0) + Σ_{q=1..N-1} a_q · c_{k−q}     k = 1..N-1
    a_q     = x(π^-q mod N)
    c_m     = W^(π^m mod N),  m taken mod N-1,  W = e^(−j2π/N)

The (N-1)×(N-1) core of the DFT matrix is now circulant. A circular
convolution maps onto a linear systolic array in a natural way:

* cell q holds a_q;
* the twiddles c_m flow past as one stream that repeats every N-1 clocks;
* the partial results y flow past as well.

### 1.2 Cells and link speeds (`rader_pe`)

White cell q computes `y' = y + a_q · w`. Four links enter each cell on the
left and leave on the right:

| link | carries | registers per cell |
|------|---------|--------------------|
| y    | complex partial result | the adder's TA pipeline stages, nothing else |
| w    | complex twiddle stream | TA + 1 |
| tp   | real sample stream (loads a_q) | TA + 1 |
| tc   | 1-bit tag | TA |

The multiplier has TM pipeline stages. It reads w and the stored sample TM
clocks before the partial result arrives.

The speed difference is the key. The twiddle stream is one register per cell
slower than the partial results. So partial result y(π^k) meets the twiddle
that entered one clock later at each successive cell. That gives
c_{k−q} at cell q, which is exactly the circulant pattern. With TA = 1 and
TM = 0 this is the plain systolic cell. With TA = 2 and TM = 3 (the default)
the adder and multiplier are pipelined inside the cell.

In the RTL the whole delay is written as registers after the arithmetic.
Synthesis retiming can move those registers into the operators.

### 1.3 Tag-controlled loading

A cell does not get its sample a_q from a dedicated wire. The sample stream
tp passes every cell at the twiddle's speed. The tag tc travels at the
partial result's speed and marks the last sample of a bundle (one
transform's worth of samples). Because tag and samples move at different
speeds, the tag reaches each cell in the clock when that cell's own sample
is on tp. The cell then loads the sample.

A multiplexer lets the cell use the new sample in the load clock itself. So
bundle b+1 follows bundle b with no idle clock, while the last partial
results of bundle b are still moving through the cells to the right.

### 1.4 The zero index (`rader_sum_pe`)

Index 0 is not part of the cyclic group, so one extra cell at the left end
handles it:

* It latches x(0) in the tag clock. For the next N-1 clocks it drives x(0),
  delayed TM clocks, as the starting value of the y link. It is scaled to the
  twiddle format (2^(CW-2)).
* It forms y(0) = x(0) + Σ x(i) from the tp stream. The adder has TA pipeline
  stages but takes one sample per clock. The running sum therefore exists as
  TA interleaved partial sums inside the adder.
  * After the tag, the TA partial sums drain out.
  * A separate accumulator adds them, one per clock, to x(0).
  * Meanwhile the adder's feedback is held at zero, so the next bundle
    starts clean.
  * y(0) is ready TA + 1 clocks after the tag.

### 1.5 Boundary schedule (`rader_ctrl`)

A free-running slot counter r = 0..N-2 drives the array's left end:

* **Slot r:** tp takes x(π^r mod N). The engine sends that index out on
  `x_idx_o`, and the source returns the sample in the same clock.
* **Slot N-2:** the tag clock. The source must also supply x(0).
* **Every clock:** the twiddle is c_{(r+1) mod (N-1)}. It comes from a
  table that is computed at elaboration.
* **Outputs:** y(π^1), y(π^2), …, y(π^(N-1)), one per clock. They start
  TM + TA·(N-1) clocks after the tag.

Worked example, N = 5, π = 2, default TA = 2, TM = 3, tag in clock t0:

| clock | t0−3 | t0−2 | t0−1 | t0 | t0+3 | … | t0+11 | t0+12 | t0+13 | t0+14 |
|-------|------|------|------|----|------|---|-------|-------|-------|-------|
| sample in | x(1) | x(2) | x(4) | x(3), x(0) | | | | | | |
| output | | | | | y(0) | | y(2) | y(4) | y(3) | y(1) |

The input and output orders are both scrambled, by powers of π. The engine
tells the source which sample it wants and labels every output with its
frequency (`y_k_o`). The user never has to apply the permutation.

### 1.6 Rate and latency

| quantity | this RTL | plain array (TA=1, TM=0) | default (TA=2, TM=3) |
|----------|----------|------|------|
| outputs per clock | 1 | 1 | 1 |
| clocks per transform | N − 1 | 4 | 4 |
| first sample to last output, inclusive | (N−1)·TA + TM + 2N − 3 | 3N − 4 = 11 | 18 |

These match the standard analysis of this array. The testbenches check both
numbers at both settings.

---

## 2. Scheme 1: a long DFT on Q cells (`horner_pe`, `scheme1_array`)

Horner's rule writes a DFT bin as a chain of multiply-adds:

    y(k) = (…((x(N−1)·W^k + x(N−2))·W^k + x(N−3)) … )·W^k + x(0)

A linear array of cells `y' = y·W^k + x` runs this chain. Each cell holds one
stationary sample, and W^k travels with its partial result. A new k enters
every clock.

With only Q cells the chain is cut into P passes of Q steps. In pass s the
cells hold segment P−1−s of the input. The partial results that leave the
right-most cell go through a FIFO of N − Q words back to the left-most cell,
together with their tags. So the loop is exactly N clocks long. Partial
result y(k) re-enters the array just as W^k comes round again, and after P
passes every y(k) is complete.

* **Start of a transform.** A multiplexer in front of the first cell
  selects 0 instead of the FIFO in pass 0.
* **Reloading samples.** The recirculated tag makes the cells load the next
  segment's samples at the head of every pass.
* **Sample stream speed.** Samples enter on one channel at half speed (two
  registers per cell), so each cell's sample arrives just in time.
* **Outputs.** They leave in natural order, one per clock, during the final
  pass.
* **Rate.** One transform every P·N clocks.
* **Latency.** P·N + 2Q − 1 clocks from the first sample to the last output
  (89 for P=4, Q=5).

**Pipelined cells (parameter T).** With T > 1 each cell takes T clocks:
the operation is followed by T registers. T = t_a + t_m for an adder of t_a
and a multiplier of t_m stages. The cell's links then carry:

* y, w and tc: T registers each;
* tp: T + 1 registers.

The tag therefore still meets each cell's sample at the right time, and the
input schedule does not change. The FIFO shrinks to N − Q·T words, so the
loop stays N clocks long. This needs Q·T ≤ N, that is P ≥ T. The exception
is P = 1, the plain single-pass Horner array, where nothing recirculates and
any T works. The latency becomes P·N + Q·T + Q − 1. The rate is still one
transform per P·N clocks.

After each complex multiplication the partial result is rounded to sample
units. This engine is therefore accurate only to rounding, not exact. Its
testbench compares it bit for bit with a fixed-point model and within an
error bound against the exact DFT.

---

## 3. Scheme 2: prime-factor DFT from prime-length arrays (`scheme2_dft`)

When N = N1·N2 with gcd(N1, N2) = 1, the Chinese remainder theorem turns the
1-D DFT into a 2-D DFT with no twiddles between the stages:

    x(n1, n2) = x((N2·n1 + N1·n2) mod N)
    Z(n1, k2) = Σ_{n2} x(n1, n2) · W_N2^(n2·k2)          rows
    X(k1, k2) = Σ_{n1} Z(n1, k2) · W_N1^(n1·k1)          columns
    X(k)  with  k ≡ k1 (mod N1),  k ≡ k2 (mod N2)

### 3.1 Stages and frame

* **Stage 1.** One N2-point prime-length engine (default 3 points)
  transforms the N1 rows one after another. The rows are real, so the
  real-input array applies.
* **Buffer.** The row results Z are complex. They are rounded to sample units
  and written into a buffer bank.
* **Stage 2.** The column transforms have complex input. Two N1-point engines
  (default 5 points) do them: one takes Re Z and one takes Im Z, in
  lockstep. Their outputs A and B combine as X = A + jB. This uses the same
  multipliers as one complex-input array.
* **Output mapping.** A table built at elaboration maps (k1, k2) to k.

Everything runs on a frame of F clocks. F is the smallest multiple of both
bundle periods (N2−1 and N1−1) that holds both stages' work. For 5·3 that is
F = 12:

* stage 1 needs 5 rows × 2 clocks = 10 clocks and is idle for 2;
* stage 2 needs 3 columns × 4 clocks = 12 clocks.

### 3.2 The three-bank buffer

Stage 2 works on a frame two frames after stage 1 read it in. A row's
results leave stage 1 some clocks after its samples went in, and part of the
last row's results fall in the next frame. Three banks of N complex words
therefore keep the stages apart: one bank is being written, one is
complete, and one is being read.

Each output stream uses a small frame counter, offset by the known fixed
latency. That counter gives the bank and the row or column an output
belongs to. No tags travel with the data.

One valid bit per bank carries the user's `in_valid_i`. An invalid frame
still flows through, but stage 2 marks it invalid, so it produces no
outputs.

### 3.3 Rate and latency (defaults)

* N outputs per frame: 15 outputs in 12 clocks, on two output ports.
* 50 clocks from the first sample of a frame to its last output (43 with
  TA = 1, TM = 0).

Outputs with k1 = 0 (k a multiple of N1) come from the column arrays' zero
cell. They leave on their own port (`y0_*`), as in the prime-length engine.

---

## 4. Interfaces

All engines use the same style. The engine runs freely from reset and, in
every clock, tells the source which sample index it wants. The source answers
in the same clock (a combinational read of its frame buffer). Invalid bundles
or frames still go through the array, but they produce no `*_valid` outputs.

| engine | inputs from source | valid flag sampled | outputs |
|--------|--------------------|--------------------|---------|
| `rader_dft` | `x_i = x(x_idx_o)` each clock; `x0_i = x(0)` when `x_tag_o` | in the tag clock | `y_re/y_im/y_k/y_valid`, and `y0_o/y0_valid_o` |
| `scheme1_array` | `x_i = x(x_idx_o)` when `x_req_o` | last input clock of a transform | `y_re/y_im/y_k/y_valid`, natural order |
| `scheme2_dft` | `x_i = x(x_idx_o)` when `x_req_o`; `x0_i = x(x0_idx_o)` when `x_tag_o` | first clock of a frame (`x_first_o`) | `y_*` for k mod N1 ≠ 0, `y0_*` for k mod N1 = 0 |

The top module prefixes the ports with `r_`, `s_` and `g_` respectively.

## 5. Number formats

| signal | format |
|--------|--------|
| samples | L = 16 bit two's complement integers |
| twiddles | CW = 16 bits, CW−2 = 14 fractional bits, rounded to nearest. Computed at elaboration with `$cos`/`$sin` in `dft_pkg` |
| prime-length y(k), k ≠ 0 | exact, 14 fractional bits, YW = L + CW + ⌈log2 N⌉ + 1 = 36 bits |
| prime-length y(0) | exact integer, L + ⌈log2 N⌉ + 1 = 20 bits |
| scheme 1 y(k) | integer, rounded after every multiplication, 23 bits for N = 20 |
| scheme 2 buffer | integer rows, rounded once, ZW = L + ⌈log2 N2⌉ + 1 = 19 bits |
| scheme 2 X(k) | integer, rounded once, XW = 23 bits |

## 6. Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `rader_dft`, `rader_array`, `rader_pe` | N | 5 | prime transform length |
| | TA / TM | 2 / 3 | adder / multiplier pipeline stages; 1 / 0 gives the plain systolic array |
| | L / CW | 16 / 16 | sample / twiddle width |
| `scheme1_array` | Q | 5 | number of cells |
| | P | 4 | passes; N = P·Q |
| `scheme1_array`, `horner_pe` | T | 1 | clocks per cell; T > 1 pipelines the cell (needs P ≥ T, or P = 1) |
| `scheme2_dft` | N1 / N2 | 5 / 3 | column / row lengths, distinct primes |
| | TA / TM | 2 / 3 | passed to its three arrays |

Derived widths (`YW`, `Y0W`, `IW`, `ZW`, `XW`) are parameters too. Their
defaults are wide enough for full-scale inputs.

The engines have some structural limits:

* `rader_sum_pe` needs TA ≤ N − 1.
* `scheme2_dft` needs prime factors of at least 3.
* `scheme1_array` also works with P = 1, and then it has no FIFO.

## 7. Files

| file | content |
|------|---------|
| `rtl/dft_pkg.sv` | modular power, primitive root, twiddle tables, modular inverse, CRT index, frame length |
| `rtl/rader_pe.sv` | white cell of the prime-length array |
| `rtl/rader_sum_pe.sv` | zero-index cell: x(0) seed and y(0) |
| `rtl/rader_array.sv` | the array: one sum cell and N−1 white cells |
| `rtl/rader_ctrl.sv` | slot counter, sample index, tag, twiddle stream, output labels |
| `rtl/rader_dft.sv` | prime-length engine: control plus array |
| `rtl/horner_pe.sv` | Horner cell `y' = y·W^k + x` with tag loading |
| `rtl/scheme1_array.sv` | Q Horner cells, FIFO loop, pass control |
| `rtl/scheme2_dft.sv` | prime-factor engine: three prime-length engines, three-bank buffer, index maps |
| `rtl/dft_arrays_top.sv` | the three engines side by side |

## 8. Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rader_pe` | one cell against a model of its link delays, at TA/TM 2/3 and 1/0 |
| `tb_rader_sum_pe` | y(0) and the x(0) seed, at TA = 2, 1, 4 |
| `tb_rader_array` | full array against a direct DFT, N = 5 (TA 2, TM 3) and N = 11 (TA 3, TM 2) |
| `tb_rader_ctrl` | index, tag, twiddle and output-label sequences, N = 5 and 7 |
| `tb_rader_dft` | engine end to end: bit-exact outputs, latency, back-to-back spacing, invalid bundles; N = 5 at both TA/TM settings, and N = 7 |
| `tb_horner_pe` | one Horner cell against a rounding model, plain (T = 1) and pipelined (T = 3) |
| `tb_scheme1_array` | P·Q = 4·5, 1·5, 3·4 with plain cells; 4·5 with T = 3, 5·5 with T = 5 (no FIFO), and 1·5 with T = 5. Checks are bit-exact against a fixed-point Horner model, within bound of the exact DFT, plus latency and spacing |
| `tb_scheme2_dft` | 5·3 at both TA/TM settings, and 3·7: bit-exact against a two-stage model, within 64 LSB of the exact DFT, every frequency exactly once, latency and frame spacing |
| `tb_dft_arrays_top` | all three engines at their default sizes, running together on random data with invalid transforms |

`tb_dft_arrays_top` also counts each mechanism and fails if one never
happens:

* tag loads;
* back-to-back bundles;
* y(0) results;
* suppressed invalid bundles and frames;
* FIFO recirculations;
* new transforms started by the pass-0 multiplexer;
* final-pass outputs;
* buffered row results;
* column transforms read from the buffer;
* idle input clocks.

To run a test with Verilator 5:

    verilator --binary --timing --assert --top-module tb_scheme2_dft \
        rtl/dft_pkg.sv rtl/rader_pe.sv rtl/rader_sum_pe.sv rtl/rader_array.sv \
        rtl/rader_ctrl.sv rtl/rader_dft.sv rtl/scheme2_dft.sv \
        tb/scheme2_harness.sv tb/tb_scheme2_dft.sv
    ./obj_dir/Vtb_scheme2_dft

For the full design use `rtl/dft_pkg.sv` first, then the other files in
`rtl/`, then `tb/tb_dft_arrays_top.sv`. The multi-configuration testbenches
need their harness file from `tb/` (`rader_array_harness.sv`,
`rader_dft_harness.sv`, `scheme1_harness.sv`, `scheme2_harness.sv`). Every
test finishes in well under a second.

## 9. Departures from the published analysis, and what is not here

Where this RTL differs from the analysis it is built on, or where that
analysis is silent:

* **Place of the zero-index cell.** Here it sits at the left end, where x(0)
  enters, and y(0) has its own output port. The analysis drains the outputs
  at the right-hand end, but it does not say how x(0) would reach a cell
  there.
* **Scheme 1 latency** is P·N + 2Q − 1 clocks, one more than the published
  P·N + 2Q − 2. The first cell of pass 0 multiplies the initial zero. With
  pipelined cells it is P·N + Q·T + Q − 1, again one more than the published
  figure.
* **Scheme 2 rate and latency.** The frame is 12 clocks. That matches the
  published average time for the pipelined arrays, N − N2 = 12, while the
  published figure for the plain arrays is N − N1 = 10. The second stage
  alone needs N2·(N1−1) = 12 clocks, so 12 is used in both cases. Latency is
  50 clocks (43 for the plain arrays). The published formulas give 82 and
  31. They leave out the cost of storing and reordering data between the
  stages, which is counted here.
* **Input reordering.** The scrambled input order is left to the source.
  Each engine names the index it wants, so no reordering memory is built in.
* **Pipelined operators** are modelled as the operation followed by TA or TM
  registers, not as pipelined adder and multiplier circuits.
* **Word lengths, twiddle format, rounding, reset and handshake** are this
  design's choices. Everything resets asynchronously, active low.
* **Input data is real**, the case the area figures assume. Scheme 2 handles
  its complex intermediate data with two real arrays.
* **I/O.** The analysis counts I/O channels by word, and this RTL uses the
  same number of data buses. It also adds index and valid signals.
* **Not built:** the other systolic arrays the analysis compares against
  (Horner arrays with other mappings, and arrays for two other DFT
  formulations), in plain and pipelined form. Only their performance and
  register counts are known, not their cells. So scheme 1 and scheme 2 use
  only the arrays built here.

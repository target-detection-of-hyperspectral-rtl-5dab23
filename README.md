# RX hyperspectral anomaly detector in integer arithmetic

A hyperspectral image holds, for every pixel, a spectrum of N bands (169 in
the default configuration). The Reed-Xiaoli (RX) detector scores each pixel by
its Mahalanobis distance from the image background:

    rx(x) = (x - mu)^T K^-1 (x - mu)

where `mu` is the vector of band means and `K` the N x N band covariance
matrix. Pixels with the highest scores are the anomalies. This RTL computes
the inverse of `K` and the score of every pixel on the FPGA. It then returns
the N highest-scoring pixels, with their coordinates, highest first.

The key idea is that RX only needs the *ranking* of the scores, not their
absolute values. So every fraction can be dropped, and the whole computation
(matrix inversion included) runs in integer arithmetic with DSP-friendly
operand widths. Precision is kept by scaling with powers of two (shifts) at
the points where values become very small or very large.

The host processor does the work that needs the whole image in memory: the
band means and the covariance matrix. It streams those to the detector,
followed by the pixels.

## Data flow

```
host ──► input FIFO ──► rx_control ─┬─► rx_inverter  (K -> K^-1, Gauss-Jordan)
                                    │        │ K^-1 rows
                                    ├─► rx_mean_sub ─► rx_matmul ─► rx_sorter ─┐
host ◄── output FIFO ◄──────────────┴──────────────────────────────────────────┘
```

For one image, `rx_control` steps through:

1. **Covariance load.** N*N covariance words, row-major, go into the
   inverter. The first word, K(0,0), is checked; if it is zero, `cov00_zero`
   is raised.
2. **Inversion.** The inverter runs for about N^2 cycles. The host keeps
   writing the means and pixels meanwhile. Once the input FIFO is full,
   `host_wr_ready` holds the host off.
3. **Streaming.** N band means, then all pixels (band-interleaved: the N
   samples of pixel 0, then pixel 1, ...) pass through the mean subtractor
   into the matrix multiplier. The multiplier reads rows of K^-1 from the
   inverter's memory; control grants it that memory only in this step. Each
   score goes to the sorter.
4. **Readout.** The sorted list goes into the output FIFO, one word
   `{score, y, x}` per pixel, highest score first.
5. **Done.** `done` stays high until the first word of the next image arrives.

### Host word format

| words          | content                                                     |
|----------------|-------------------------------------------------------------|
| N*N            | K(r,c) as a signed 64-bit integer, row-major                |
| N              | band mean, unsigned 16 bits in bits [15:0]                  |
| N*IMG_W*IMG_H  | pixel sample, unsigned 16 bits in bits [15:0], pixel by pixel, band 0 first |

The host computes `mean[b] = sum / pixels` and
`K(i,j) = sum((x_i - mean_i)(x_j - mean_j)) / (pixels - 1)`, in integers.
Output word: `{score (RX_W bits, signed), y (log2 IMG_H bits), x (log2 IMG_W bits)}`.
Pixels are numbered row by row: x is the column and y the row.

## The matrix inverter (rx_inverter)

The inverter is by far the largest block, and the one that most affects
accuracy. It uses Gauss-Jordan elimination: the row operations that turn A
into the identity, applied at the same time to a second matrix that starts as
the identity, leave that second matrix equal to A^-1.

### Row-wide organisation

Both matrices are stored one **row per memory word** (N elements of 42 bits).
Each cycle, one operation reads a whole row, updates all N elements of A and
all N elements of A^-1 in parallel, and writes the row back. That takes 2N
multipliers and 2N subtractors.

| phase     | pivots          | rows updated   | operation |
|-----------|-----------------|----------------|-----------|
| forward   | i = 0 .. N-2    | j = i+1 .. N-1 | `row_j -= (pivot_row * f) >>> FWD_SHIFT`, `f = (A[j][i] << FWD_SHIFT) / A[i][i]` |
| backward  | i = N-1 .. 1    | j = i-1 .. 0   | the same with `BWD_SHIFT` |
| diagonal  | -               | i = 0 .. N-1   | `row_i = (row_i * f) >>> OUT_SHIFT`, `f = 2^DIAG_SHIFT / A[i][i]` |

A^-1 starts as `2^ID_SHIFT * I`. When the inverter finishes, the result port
returns

    2^(ID_SHIFT + DIAG_SHIFT - OUT_SHIFT) * K^-1      (2^48 * K^-1 by default)

A constant scale factor does not change the ranking of the scores.

### Pipeline

```
counter ─► read (1) ─┬─► row-j FIFO ─────────────────┐
                     └─► shift, divide (77) ─► multiply (6) ─► shift ─► subtract (2) ─► write
                          f = A[j][i]·2^s / A[i][i]   pivot_row · f
```

* The **counter** issues at most one memory read per cycle. At the start of
  each pivot it first reads the pivot row into one of two **pivot register
  banks**. The rows of that pivot then follow, one per cycle. Each row
  operation carries the bank it belongs to. So a new pivot can start while
  the rows of the previous pivot are still in the multipliers.
* Row j is needed twice: its column-i element for the division now, and the
  whole row for the subtraction about 83 cycles later. The memory port is busy
  with later reads, so the row is copied into a **FIFO** when it is read. It
  is popped when its factor comes out of the divider.
* The **divider** (`rx_div`) takes one division per cycle and has a latency of
  77 cycles. Its operands are made positive first. Their sign difference
  travels down the pipe as a tag and is applied to the result ("div_fix").
  The quotient is saturated to the 35-bit multiplier operand.
* **Multipliers** (`rx_mult`) are 42 x 35 bits with a latency of 6. In the
  diagonal phase they scale the row itself rather than the pivot row.
* **Subtractors** (`rx_sub`) have a latency of 2. In the diagonal phase they
  pass the scaled row through unchanged.
* A **scoreboard** bit per memory row marks rows that are in flight. A read of
  such a row waits; each waiting cycle pulses `stall_o`. In practice only the
  next pivot row ever waits: it must be completely updated by the previous
  pivot before it can be used.

Each pivot therefore takes about `max(N - i, 89)` cycles. For N = 169 the
inversion takes about 37,000 cycles; for N = 8 it takes 1,330.

### Zero pivots and the renaming table

A zero pivot element would make the divisor zero. Each row written during the
forward phase is checked:

* If the row that will be the next pivot arrives with a zero in the next
  pivot column, a swap becomes *pending*.
* The next written row with a non-zero entry in that column is exchanged with
  it in a **renaming table** (logical row -> memory row). No data moves.
* The next pivot does not start until the swap is resolved.
* Loading applies the same check to the first pivot. This is how a zero
  K(0,0) is handled.
* If no candidate row exists, `singular_o` is set and the zero divisor
  saturates the factor.

Rows are written in order, so the chosen row is the first later row with a
non-zero entry. This is the same choice textbook Gauss-Jordan makes.

The renaming table is kept after the inversion, and the result port
translates through it, so rows come out in natural order. This differs from
the original design, which reorders the rows in RAM during the backward pass.
That approach only works when the two swapped rows are in the pipeline at the
same time. The read-through table has no such limit.

### Choosing the shifts

The shift parameters are data dependent: they have to be tuned to the range
of the covariance values. The guiding rules are:

* `|A[j][i]| << FWD_SHIFT` must fit in 64 bits.
* The factor `f` must fit in 35 bits (it saturates otherwise).
* Every element of A and A^-1 must stay within 42 bits (it wraps otherwise).

The multiplier shift of 20 comes from the original width study. The other
defaults suit covariances around 2^18..2^24, which is what 16-bit sensor data
gives:

* `ID_SHIFT` = 24
* `BWD_SHIFT` = 20
* `DIAG_SHIFT` = 48
* `OUT_SHIFT` = 24

For data far outside that range, use `COV_SHIFT` (an arithmetic right shift
of the incoming covariance) or retune the other shifts.

## Mean subtraction (rx_mean_sub)

The first N samples after a clear are the band means. They are stored in an
N-entry array used as a circular buffer. Every later sample is returned as
`sample - mean[band]`, a 17-bit signed deviation, with `band` advancing
modulo N. There is one register of latency and one sample per cycle.

## Dual matrix multiplier (rx_matmul)

The score is computed in two halves that overlap on consecutive pixels:

* **first_mac.** For deviation element `d[k]` it reads row k of K^-1 and
  updates N accumulators: `y[c] += K^-1[k][c] * d[k]`. After N cycles,
  `y = d^T K^-1`. Taking one element per cycle means the deviation never has
  to be presented as a whole vector, and no adder tree is needed. `d[k]` is
  also written into a FIFO.
* **second_mac.** It loads `y` into a shift register. Each cycle it adds
  `y[0] * d[k]`, with `d[k]` popped from the FIFO, and shifts.
* **write_proc.** It attaches the pixel coordinates and flags the last pixel.

Both halves take N cycles per pixel, so the multiplier sustains one pixel
every N cycles. The first half only stalls (and repeats its memory read) when
the second half cannot take a new `y` yet. No precision is dropped: `y` has
`42 + 17 + log2 N` bits and the score `RX_W = 42 + 2*(17 + log2 N)` bits (92
for N = 169).

## Coordinate sorter (rx_sorter)

The sorter keeps a list of the N highest scores in a memory with one-cycle
read latency. A new score is *carried* down the list:

* At each position it is compared with the stored entry.
* The higher of the two is written back and the lower is carried on.
* The sweep stops at the first empty position, where the carried entry is
  stored, or at the end of the list, where the carried entry is dropped.

A sweep takes at most N cycles, which matches the multiplier's rate of one
score every N cycles. Equal scores keep their arrival order: a new score
loses ties, and an entry pushed out of its place wins them. After the last
pixel, the list is streamed out highest first.

## Top-level interface (rx_top)

| port | dir | meaning |
|------|-----|---------|
| `host_wr_valid/data/ready` | in/in/out | input words (ready = input FIFO not full) |
| `host_rd_valid/data/ready` | out/out/in | result words `{score, y, x}` |
| `busy`, `done` | out | image in progress / results complete |
| `cov00_zero` | out | K(0,0) was zero (a row exchange handled it) |
| `singular` | out | a pivot column had no non-zero candidate |
| `ev_swap`, `ev_stall` | out | pulse per inverter row exchange / stall cycle |

Main parameters, with their defaults:

* `N` = 169: bands. This also sets the length of the result list.
* `IMG_W`, `IMG_H` = 64: image size.
* `COV_SHIFT` = 0, plus the five inverter shifts described above.
* `DIV_LAT` = 77 and `MUL_LAT` = 6: divider and multiplier latencies.
* `IN_DEPTH` = 512 and `OUT_DEPTH` = 256: FIFO depths.

The clock is a single rising-edge clock, and `rst_n` is an asynchronous,
active-low reset. Fixed widths live in `rtl/rx_pkg.sv`:

* 42-bit matrix elements
* 35-bit factors
* 64-bit dividend
* 16-bit samples

### Throughput

For one image of P pixels, with the host writing at full rate, the detector
needs about:

    N*N (load) + ~2*sum_i max(N-i, 89) (inversion) + N + N*P (stream) + readout

cycles. At the default size (N = 169, 64 x 64 pixels) that is 758,274 cycles,
about 4.2 ms at the 5.5 ns clock period of the original implementation. Input
and output time is included, since the pixels arrive one sample per cycle.

## Resources

The inverter uses 2N multipliers of 42 x 35 bits (four DSP48 slices each on
7-series parts) and 2N subtractors, which is 10N DSP slices. Its memories are
two N x (42N)-bit arrays, plus a row FIFO of about 81 x 84N bits. At N = 169
that is 2.4 Mbit for the matrices and 1.15 Mbit for the FIFO.

## Where this RTL departs from the original design

* The renaming table is read through at the output instead of reordering rows
  in RAM (see above).
* The zero check of K(0,0) raises a flag in control. The row exchange itself
  is done by the inverter's renaming table.
* The vendor divider is replaced by a restoring divider padded to the same
  77-cycle latency.
* The multiply-accumulates of the matrix multiplier are single-cycle rather
  than DSP-pipelined.
* The mean buffer is a small array with asynchronous read.
* Per-pixel scores are not stored. Only the sorter's list of the N highest
  scores is kept and returned to the host.

The following are this implementation's own choices:

* FIFO depths
* host word format
* sample width
* image size
* all shift values except the multiplier shift of 20
* quotient saturation
* tie order in the sorter

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against a reference model written directly from the algorithm
(`tb/rx_ref_pkg.sv`): integer Gauss-Jordan, RX score and ordered list.
`tb/rx_host_pkg.sv` plays the host. It generates a scene with planted
anomalies and computes the means and covariance.

| testbench | what it covers |
|-----------|----------------|
| `tb_rx_fifo` | random traffic, flags, non-power-of-two depth |
| `tb_rx_div` | signed/corner divisions, saturation, divide by zero, exact 77-cycle latency |
| `tb_rx_mult`, `tb_rx_sub` | results and exact latency |
| `tb_rx_mean_sub` | deviations and band index under gaps and back-pressure |
| `tb_rx_matmul` | scores, coordinates, one pixel per N cycles |
| `tb_rx_sorter` | list order including ties, list overflow, acceptance rate |
| `tb_rx_inverter` | bit-exact results for a covariance-like matrix, zero K(0,0), a zero pivot appearing mid-elimination, and a singular matrix; K * K^-1 close to the scaled identity; cycle bound |
| `tb_rx_control` | two images through the controller with gaps and back-pressure |
| `tb_rx_top` | 12 bands, 8 x 8 image. Covers input FIFO full, output FIFO full, row exchange, stalls, sorter dropping scores and `cov00_zero`, each counted. Checks planted anomalies rank first, plus a cycle bound |
| `tb_rx_top_full` | two complete images, one after the other, through `rx_top_image_run`. First the default build: 169 bands, 64 x 64, 758,274 cycles. Then a build for 224 bands (the AVIRIS band count) on a 32 x 32 image, 339,096 cycles. Each is bit-exact against the model, and the four planted anomalies rank first. About a minute of simulation |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/rx_pkg.sv tb/rx_ref_pkg.sv tb/rx_host_pkg.sv tb/tb_rx_top.sv \
  --top-module tb_rx_top -o sim && obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

### How far the results can be trusted

The hardware matches the integer reference model bit for bit in every test.
The reference is the same integer algorithm, so the two agree on
arithmetic. Whether the ranking matches a floating-point RX depends on the
shift values and the data. For the generated scenes, the planted anomalies
always rank first, and K * K^-1 is within 1e-3 of the identity. Real sensor
data has far more strongly correlated bands, so its covariance is much worse
conditioned. Expect to retune the shifts for it. No real image data was run.

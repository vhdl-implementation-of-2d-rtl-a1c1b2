# Stripe-parallel 2-D wavelet transform with boundary exchange

This design computes a multi-level 2-D discrete wavelet transform (DWT) of an
N x N image with the (9,7) wavelet, using S identical processors that work in
parallel. The image is cut into S horizontal stripes, and each processor
transforms its own stripe. Cutting an image into blocks usually leaves
artefacts at the block borders, because the wavelet filters near a border need
pixels from the neighbouring block. Here each processor hands the rows it
shares with its neighbour across a small link. The result is therefore
bit-exact: it equals the transform of the whole image computed in one piece.

Inside each processor, row and column filtering are cascaded. Each row is
transformed by a row kernel and streamed straight into a column kernel that
keeps a few lines of lifting state. Row-transformed data never go back to main
memory: the image is read once per level and each coefficient is written once.

Defaults: a 512 x 512 image, 4 stripes of 128 rows, 3 decomposition levels,
8-bit pixels and 16-bit coefficients.

## Block structure

```
                 +---------------------------- dwt_unit (one per stripe) ----------------------+
 link to  <----- | outgoing boundary buffer <--+          dwt_controller (scheduler)            |
 block b-1       |  (own first 8 rows)         |                                                |
                 |                             |                                                |
 main    ------> |  dma_engine --row load--> row kernel --+                                     |
 memory port     |      |  ^                              |                                     |
         <------ |      |  +-------- row feed ------------+                                     |
   (results)     |      +----------> column kernel (5 line buffers) --results--> memory port    |
                 |      ^ incoming-buffer feed                                                  |
 link from ----> | receiver -> incoming boundary buffer (8 rows of block b+1)                   |
 block b+1       +------------------------------------------------------------------------------+

 dwt_top: S units side by side, links b+1 -> b, and a barrier that starts each
 level only when every unit has finished the previous one.
```

| module | role |
|---|---|
| `dwt_pkg` | word widths, lifting coefficients, DMA command type |
| `lifting_kernel` | row kernel: 1-D (9,7) lifting of one whole row (up to N words) in its own buffer |
| `column_engine` | column kernel: the same lifting down the columns, one line at a time, with five line buffers of N words |
| `boundary_buffer` | 8 lines x N words with (line, column) addressing. Each unit has two: outgoing and incoming. |
| `dma_engine` | row load from memory, row feed from the row kernel into the column kernel, feed of the incoming buffer, boundary send |
| `dwt_controller` | per-unit scheduler: the level loop, the cascaded row pass, the exchange, the flush, the barrier |
| `dwt_unit` | one stripe processor: all of the above, the link receiver, and the shared memory port |
| `dwt_top` | S processors, the links between them, the level barrier, and start/busy/done |

Main memory is outside the design. Each processor has its own port
(`mem_*[b]`) into one shared N x N array of 16-bit words. A read returns its
data on the clock after the request.

## How the stripes stay exact

This is the part of the design that needs the most care.

**Dependency radius.** Each lifting step updates a sample from its two direct
neighbours, and there are four steps. So a low-pass output (even index)
depends on input samples up to 4 away, and a high-pass output (odd index) on
samples up to 3 away. A column transform started at an artificial edge, with
mirrored samples there, is correct from 4 samples inside that edge onward.
This holds bit for bit, including the rounding, because every output sample is
computed by the same operations on the same values.

**Windows and ownership.** At level j a stripe has `R = (N/S) >> j` rows
starting at row `p = b*R`, in that level's sample grid. Processor b runs its
column transform over a window of `R + 8` rows: its own R rows, then the first
8 rows of stripe b+1, both already transformed along the rows. It writes back only the rows it computes correctly:

* from `p + 4` up to `p + R + 3`;
* processor 0 starts at row 0, where the mirror is the real image edge;
* the last processor has no window extension and ends at the image's last row.

So ownership is shifted 4 rows down from the stripes. The 4 rows at the top of
stripe b are finished by processor b-1.

**One-way links.** Because of that shift, data only ever flows upward. As its
first 8 rows come out of the row kernel, processor b copies them into its
outgoing buffer, and after row 8 it sends them to processor b-1. These are
partially computed: transformed along the rows, not yet along the columns.
Processor b-1 feeds them into its column kernel after its own rows, then
writes the top 4 rows of stripe b. By then processor b has long read those
rows, since it sends only after loading them. The incoming buffer collects
the 8 rows from processor b+1. The link is valid/ready and one word
wide. The receiver accepts words at any time, so a fast neighbour never waits
for a slow one.

**Level barrier.** Level j+1 reads low-pass rows that the neighbouring
processor wrote at level j (the shifted rows). The top level therefore starts
a level only when all processors wait at the barrier. The stripes are split
the same way at every level (the stripe height halves), so the same 8-row
exchange repeats with lines half as long each time.

**Constraint:** the stripe must still have at least 8 rows, and an even
number of them, at the last level: `(N/S) >> (J-1) >= 8`. The top level
rejects sizes that break this at elaboration.

## The row kernel

The row is loaded into the kernel buffer. Then four lifting steps run in
place, one target sample per clock:

| step | targets | update |
|---|---|---|
| predict 1 | odd n | `x[n] += round(alpha * (x[n-1] + x[n+1]))` |
| update 1 | even n | the same form, with beta |
| predict 2 | odd n | the same form, with gamma |
| update 2 | even n | the same form, with delta |

After the four steps, a scaling pass multiplies even samples by 1/K and odd
samples by K. Both kernels define their results as follows:

* **Coefficients:** the JPEG2000 Part 1 (9,7) values, with 12 fraction bits:
  alpha = -6497, beta = -217, gamma = 3616, delta = 1817, 1/K = 3330,
  K = 5039 (each is the real value x 4096, rounded).
* **Rounding:** `round(v) = (v + 2048) >>> 12`. The sum `x[n-1] + x[n+1]` is
  formed at 17 bits, and results wrap to 16 bits.
* **Vector ends:** whole-sample symmetric extension, `x[-1] = x[1]` and
  `x[len] = x[len-2]`.
* **Gains:** the low pass has a DC gain of 1 and the high pass a Nyquist
  gain of 2.

The row kernel takes `3*len + 1` clocks from start to done. Its results stay
interleaved: low-pass samples at even indices, high-pass at odd indices.

## The column kernel

The column kernel computes exactly the same lifting steps down each column.
It sees one line at a time, so it keeps per column only the state that the
next lines still need, in five line buffers of N words:

| buffer | holds, after even line k |
|---|---|
| E | input line k |
| O | input line k+1 (stored when it arrives) |
| D1 | predict-1 result of row k-1 |
| S1 | update-1 result of row k-2 |
| D2 | predict-2 result of row k-3 |

An odd line is only stored. When even line k arrives, each column runs the
whole chain in one clock: predict 1 of row k-1, update 1 of row k-2,
predict 2 of row k-3, and update 2 of row k-4. It then emits row k-4 (low
pass, scaled by 1/K) and, on a second clock, row k-5 (high pass, scaled by K,
from D2). So the output trails the input by four or five rows. At the first
window rows the missing neighbours are mirrored (`d1[-1] = d1[1]` at k = 2,
`d2[-1] = d2[1]` at k = 4). After the last line, a flush computes the last
four rows with the mirror at the bottom edge, at 5 clocks per column.

Each output carries its window row and column. It is written to memory only
if the row is one the processor owns. A window of L rows therefore makes
exactly one memory write per owned sample and no other writes.

## Result layout in memory

Every level is computed in place, on every 2^j-th row and column. So level j
reads and writes address `(r << j) * N + (c << j)` for its sample (r, c).

After J levels, the word at (row, col) belongs to the highest level j < J for
which row and col are both multiples of 2^j. Within that level:

* an even `row >> j` is vertical low pass, an odd one vertical high pass;
* an even `col >> j` is horizontal low pass, an odd one horizontal high pass.

The words with row and col both multiples of 2^J hold the final LL band. To
get the usual quadrant (Mallat) arrangement, reorder with these rules.

## Schedule and throughput

For each level, each processor runs these steps in order:

1. **Open a window** in the column kernel: line width W = N >> j and the
   owned rows.
2. **Cascaded row pass.** For each stripe row: load the row from memory
   (W+2 clocks), transform it (3W+1 clocks), and feed it into the column
   kernel (W to 2W clocks). The column kernel writes finished coefficients
   while it takes the row. The first 8 rows are also copied to the outgoing
   buffer. After row 8 they are sent to the previous processor (2 clocks
   per word).
3. **Boundary rows.** Wait for the next processor's 8 rows, then feed them
   into the column kernel.
4. **Flush** the column kernel (5 clocks per column), then wait at the
   level barrier.

The steps of one row run one after another. Overlapping the next row's load
with the current row's feed would shorten the row pass further.

Measured at the defaults (512 x 512, S = 4, J = 3): **505,045 clocks** from
start to done. Other measured sizes, all on 512 x 512:

| stripes S | levels J | clocks |
|---|---|---|
| 2 | 5 | 981,387 |
| 4 | 4 | 512,969 |
| 8 | 3 | 267,773 |
| 16 | 3 | 149,137 |

The time falls almost in proportion to S. The extra work per processor is the
8-row window extension and the boundary send.

Main-memory traffic per level is one read of each input sample and one write
of each coefficient, from the processors together.

On-chip storage per processor, at the defaults:

* row kernel buffer: 512 words;
* column kernel line buffers: 5 x 512 words;
* two boundary buffers: 2 x 8 x 512 words.

That is 11,264 16-bit words per processor, or 45,056 words (90 KB) for four.

## Interface of `dwt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse while not busy: transform the image now in memory |
| `busy` | out | 1 | high from the clock after `start` until the end |
| `done` | out | 1 | one-clock pulse at the end |
| `mem_en[S]`, `mem_we[S]` | out | 1 | access request and write enable, per processor |
| `mem_addr[S]` | out | 2*log2(N) | word address |
| `mem_wdata[S]` | out | 16 | write data |
| `mem_rdata[S]` | in | 16 | read data, one clock after the read request |

Before `start`, load the pixels into memory as 16-bit words at
`row * N + col`. After `done`, memory holds the coefficients, as described
above. The memory must ignore the request strobes while `rst_n` is low.

Parameters: `N` (image size, a power of two, default 512), `S` (stripes,
default 4) and `J` (levels, default 3). The package sets `DATA_W` = 16,
`COEF_FRAC` = 12 and `OVL` = 8 (boundary rows).

## What follows the source description and what does not

These parts follow the source description:

* stripe partitioning into S line processors;
* the (9,7) wavelet computed by lifting;
* rows then columns at each level, with J levels;
* the block set of one processor: DMA, row kernel, column kernel, line and
  boundary buffers, buffer address control, switches, and a scheduler;
* row and column filtering cascaded through line buffers of the image
  width, so that intermediate results stay on chip;
* boundary data passed from each block to the previous one;
* 16-bit coefficient storage;
* the 512 / 4 / 3 example configuration.

These parts are this design's own choices, and where they depart from it:

* **Five line buffers instead of a 9-line FIFO.** The cascade is built on
  lifting state (five lines of N words) rather than on F_l = 9 lines of
  input for a convolution filter. Within one processor, row load, row
  transform and row feed run one after another rather than overlapped.
* **The boundary exchange protocol is new.** It uses 8 row-transformed rows,
  ownership shifted by 4 rows, a one-way valid/ready link, and a level
  barrier. Storage is one 8 x N buffer per direction, reused at every level.
  The source sizes its boundary memory as F_l words per boundary column,
  summed over the levels.
* **The transform is the irreversible (9,7) one, not lossless.** Lossless
  JPEG2000 coding would need the (5,3) integer wavelet, which is not built.
* **Multipliers.** The row kernel has two multipliers and computes one
  sample per clock. The column kernel computes a whole lifting chain for one
  column in a clock, with about ten constant multipliers (the four lifting
  steps, the scalings, and the bottom-edge variants used by the flush). The
  source's resource table lists 16 multipliers for one processor on an FPGA;
  how it uses them is not described.
* **Unspecified details chosen here:** fixed-point format, rounding,
  symmetric extension, memory port timing, the DMA command set, and the
  in-place result layout.

The convolution form of the same filters (two-channel FIR filter bank) is
mathematically equivalent up to rounding. It is not built separately.

## Verification

Every testbench checks its outputs against values computed independently,
prints `TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_column_engine` | windows of 6 to 48 lines and 2 to 64 columns with random owned ranges and input gaps: every emitted word against the reference lifting of its column; each owned word emitted exactly once, nothing else |
| `tb_lifting_kernel` | lengths 2 to 512, random and signed data, against the reference model; latency 3*len+1; constant input gives low = constant, high = 0 |
| `tb_boundary_buffer` | random writes and reads, one-clock read latency, read data held |
| `tb_dma_engine` | each transfer kind: strided row loads and their latency, row feeds with and without the outgoing-buffer copy, the incoming-buffer feed and the link, both under random back-pressure |
| `tb_dwt_controller` | the exact command sequence for a middle stripe over two levels; window width and owned rows; no incoming-buffer feed before the boundary rows arrive; flush after it; no commands at the barrier |
| `tb_dwt_unit` | one middle processor with the testbench acting as both neighbours: owned rows equal the whole-image transform, outgoing link words are correct under back-pressure, other rows untouched, one memory write per owned word |
| `tb_dwt_top` | 128 x 128, 4 stripes, 3 levels, two images back to back: every word against the whole-image reference; counts of barriers, boundary words, row-kernel runs, column windows and coefficient writes |
| `tb_dwt_top_full` | the same checks at the default parameters (512 x 512, 4, 3) |
| `tb_dwt_workloads` | 512 x 512 with S/J = 2/5, 4/4, 8/3 and 16/3, in parallel, word for word |

`tb_dwt_ref_pkg` holds the reference: a plain in-place lifting of the whole
image, with no stripes. `tb_dwt_workload_case` is one configuration of
`tb_dwt_workloads`.

To run a testbench with Verilator 5 from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -y rtl -y tb \
    rtl/dwt_pkg.sv tb/tb_dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
./obj_dir/Vtb_dwt_top
```

The two packages are named first; Verilator finds every module in `rtl/` and
`tb/` by its file name.

Replace `tb_dwt_top` with any other testbench name. Run times:

* unit testbenches and `tb_dwt_top`: under a second;
* `tb_dwt_top_full`: about 15 seconds;
* `tb_dwt_workloads`: about 10 seconds.

Their builds take up to a minute.

Known limits:

* No timing or area has been measured on a target device.
* The valid/ready link and the barrier are not stressed with random
  neighbour speeds beyond the back-pressure in `tb_dma_engine` and
  `tb_dwt_unit`.

# Data reuse buffers for loop-nest accelerators

A hardware loop that walks over arrays usually reads the same array element
many times. A 3x3 image filter reads every pixel up to eight times, and a
matrix product reads every element of A and B N times. If each of those reads
goes to external memory, memory bandwidth sets the speed, not the datapath.
This RTL implements the alternative. Each array element crosses the memory
interface **exactly once**. A small on-chip *data reuse buffer* keeps the
element from its first use to its last. A *loop controller* knows, for each
iteration, whether to:

- fetch a new element,
- reuse a buffered one,
- push or pop a FIFO,
- run the loop body,
- write a result back.

The controller works this out from the iteration domains of the loop nest,
which are computed ahead of time with polyhedral (integer set) analysis.

Every accelerator here has the same three parts:

```
              +-----------------+
 start/done --| loop controller |--- fetch / shift / push / pop / exec / store
              +-----------------+            |                     |
                                             v                     v
 external   rd  +----------------------+  taps  +----------+  wr  external
 memory  ------>| data reuse buffer(s) |------->| datapath |-----> memory
                +----------------------+        +----------+
```

All of them start one loop iteration per clock cycle (II = 1), with no stalls.
The buffers come from two templates, and each template has a constant-distance
and a variable-distance form:

| template | used when | constant distance | variable distance |
|---|---|---|---|
| single access function | every reference to the array uses the same index expression, e.g. `A[i][k]` | `reuse_buf_const` | `reuse_buf_var` |
| sliding window | several references differ only by constant offsets, e.g. the 8 neighbours of a stencil | `sw_chain` | `sobel_tri_buffer` |

Arrays that are written as well as read get read/write versions of both
templates: `reuse_buf_rw` and `sw_rw_chain`.

The top module `reuse_top` places six complete accelerators side by side. Each
has its own ports, and they share only the clock and reset:

| prefix | accelerator | buffers |
|---|---|---|
| `sr_` | Sobel edge detector, rectangular 100 x 100 image | constant-distance sliding window |
| `st_` | Sobel edge detector on a triangular domain | sliding window with two FIFOs |
| `rw_` | Sobel variant that also modifies two input pixels per iteration | sliding window with write taps and write-back |
| `co_` | correlation of a 13-sample pulse against a signal, 1000 offsets | two constant-distance loops |
| `mm_` | 100 x 100 matrix product | constant-distance loops, read/write Q register |
| `mt_` | 100 x 100 matrix product, A upper triangular | variable-distance FIFOs |

## Reuse distance: the one number that sizes a buffer

The *reuse distance* of a reference is the number of loop iterations between
two uses of the same element. Equivalently, it is the number of other
elements that pass by in between.

- **Constant distance D.** A word that comes back after exactly D iterations
  can sit in a delay line of D-1 words behind the register the datapath reads.
- **Variable distance.** When the distance changes over the loop nest (for
  example on triangular domains), a FIFO replaces the delay line. The FIFO is
  sized by the upper bound of the distance minus one. For sliding windows, it
  is sized by the peak of pushes minus pops over the loop nest.

Delay lines (`shift_reg`) are built as a chain of registers up to
`RAM_THRESH` = 16 words. Longer ones are a circular buffer in a RAM with an
asynchronous read, which maps to distributed or block RAM.

## The pipeline

All accelerators use the same three-stage timing, and each controller's
signals are combinational from its loop counters:

| cycle | what happens |
|---|---|
| t | the controller is at an iteration and raises the read request for any element fetched in that iteration |
| t+1 | the memory returns the word and the buffers shift (or push and pop) at the end of the cycle |
| t+2 | the datapath reads the buffer taps, and the read/write buffers take the datapath's writes |
| t+3 | results are written; `done` pulses with the last write |

External memories are modelled as synchronous memories with one cycle of
read latency. Every control signal that belongs to an iteration is delayed
inside the top to the stage that uses it.

## Single-access-function buffers

**`reuse_buf_const`** (matrix product A and B, correlation A and B):

- `data` is the active register the datapath reads.
- `nshift` loads it from memory. This is the first use of the element.
- `lshift` reloads it from the end of a DIST-1 word loop. This is a reuse.
- Either way, the old active word enters the loop. The word that falls out of
  the loop on an `nshift` is never needed again.
- For a matrix product with loop order i, j, k:
  - `A[i][k]` has distance N (it is reused at the next j).
  - `B[k][j]` has distance N*N (it is reused at the next i).

**`reuse_buf_var`** (triangular matrix product):

- It uses the same `nshift`/`lshift` as the constant version, but `lshift`
  pops a FIFO.
- A third control, `rbpush`, marks an iteration whose word will be used again.
  Only marked words are pushed, so words with no later use never take FIFO
  space.
- The push happens when the next shift moves the marked word out of the active
  register. A one-bit flag remembers the mark until then.
- The FIFO (`rb_fifo`) forwards a word that is pushed and popped in the same
  cycle while empty. That is a reuse in the very next iteration.
- With A upper triangular, the inner loop runs k = i..N-1:
  - `A[i][k]` is kept while j < N-1.
  - `B[k][j]` is kept while k > i, because the next row of A starts one
    column later.
  - The FIFO bounds are N-1 and N*N-1 words.

**`reuse_buf_rw`** (the Q accumulator of both matrix products):

- The datapath can overwrite the active word (`we`, `wdata`).
- In the pipelined loop, the write of one iteration falls in the same cycle as
  the shift of the next. So the word that moves on is the freshly written one.
- `store` is raised at the iteration of the element's last write. It sends
  that word to memory, so no dirty bits are needed.
- Q is *write-first*: its initial value is never read. This variant has no
  memory read port, and a first use starts from zero.
- With distance 1, the whole buffer is a single register. Q is written to
  memory once per element and never read.
- `VARIABLE = 1` gives the variable-distance form. The loop becomes a FIFO
  with `rbpush`, as in `reuse_buf_var`, and the word pushed carries this
  cycle's write. None of the evaluated designs needs it, so only its unit test
  runs it.

## Sliding-window chains and the extended iteration domain

For the Sobel filter, the eight references `P[r±1][c±1]` (the centre pixel is
not used) access the image in the same order, shifted in time. Sorted by when
they touch a pixel, they form a *reuse chain*. The chain runs from the head
`P[r+1][c+1]`, which sees each pixel first, to `P[r-1][c-1]`, which sees it
last:

```
P[r+1][c+1] -1-> P[r+1][c] -1-> P[r+1][c-1] -(COLS-2)-> P[r][c+1] -2-> P[r][c-1]
            -(COLS-2)-> P[r-1][c+1] -1-> P[r-1][c] -1-> P[r-1][c-1]
```

`sw_chain` builds this directly:

- One register per tap.
- A `shift_reg` of DIST-1 words between two taps DIST apart.
- For a 100-column image, the two long gaps are 97-word RAMs. The chain holds
  203 words in all.
- Pixels are fetched in row-major order, one per iteration, and only at the
  head.

The loop cannot start at the first output pixel. The head must run ahead of
the window by one row and one column. `sobel_rect_ctrl` therefore walks the
*extended iteration domain*: r = -1..ROWS-2, c = -1..COLS-2, which is the
union of two domains:

- the *fetch domain*: iterations whose head element exists in the image;
- the *execute domain*: 1 <= r <= ROWS-2, 1 <= c <= COLS-2.

The extra iterations fetch without executing (buffer prefill and the wrapped
row ends). In a 100 x 100 image that is 10,000 iterations: every pixel is read
once and 98 x 98 results are written. The last result is written 10,003 cycles
after `start`.

The datapath (`sobel_datapath`) computes the usual 1-2-1 Sobel gradients and
outputs |Gx| + |Gy| saturated to 255. It is registered, so results follow
`exec` by one cycle.

## Triangular domain: FIFOs in the chain

This is the most delicate part of the design. When outputs are needed only
for the triangle 1 <= r <= N-2, 1 <= c <= r-1, the data domain (every pixel
some window touches) is triangular too:

- Data row i holds L(i) pixels, columns 0..L(i)-1.
- L(0) = 0 and L(i) = min(i+2, N-1) otherwise.

The two long gaps of the chain, between the rows, now change length from row
to row. `sobel_tri_buffer` therefore splits the chain into three
shift-register segments joined by two FIFOs:

```
fetch ->[tap1 tap2 tap3]-> FIFO 3->4 ->[tap4 . tap5]-> FIFO 5->6 ->[tap6 tap7 tap8]
        shift on fetch                 shift on pop4                shift on pop6
```

The rules that make it work:

1. **All stages of a segment shift together** with the signal that feeds the
   segment: `fetch` for the first segment, or the pop of the FIFO upstream.
   Any other timing duplicates or loses words.
2. **Each FIFO is pushed with the word leaving the segment upstream, whenever
   that segment shifts.** The exception is the first three shifts after a
   start, which only flush the segment's three start-up stages. The `sfn`
   blocks implement this: each is a small saturating counter that suppresses
   the first N pulses.
3. **Pop domains are inverse projections.** The iterations in which tap k must
   receive a new word are exactly those whose access function at tap k maps to
   an element of the data domain. Every tap has the form
   `P[row offset][c+1 or c-1]`. Using `c = column - 1`, the controller
   (`sobel_tri_ctrl`) gets, in row r:
   - `fetch` (head `P[r+1][c+1]`): -1 <= c <= L(r+1)-2
   - `pop4` (tap `P[r][c+1]`): -1 <= c <= L(r)-2
   - `pop6` (tap `P[r-1][c+1]`): -1 <= c <= L(r-1)-2

   Row r runs c = -1..L(r+1)-2, the widest of the three, and execution is
   raised inside the triangle.
4. **FIFO depth is the peak of pushes minus pops** over the whole loop nest.
   For an N x N image both FIFOs peak at N-4 words: 96 for N = 100. The
   full-size test checks that this peak is reached and never exceeded.
5. The pops are delayed by one cycle, like the fetch, so that each segment
   shifts in the same cycle as the memory data it is aligned with.
6. Pops of data that no later iteration reads are left out. They would only
   drain the last two data rows, after the last result.

For N = 100 this gives 5,145 iterations: one per pixel of the data domain, no
idle cycles. The last result is written 5,148 cycles after `start`. Both FIFOs
assert on overflow and underflow, so a timing error in the pop domains stops a
simulation at once.

## Writes inside a sliding window

The `rw_` accelerator is a Sobel filter whose loop body also modifies two of
its inputs. It adds 1 (mod 256) to `P[r+1][c-1]` and `P[r][c-1]` after
computing `Q[r][c]` from the unmodified window. The order is the same as a
sequential loop: later windows see earlier modifications. Three changes make a
reuse chain handle this:

- **Write taps** (`sw_rw_chain`):
  - A multiplexer in front of a tap register lets the datapath replace the
    word there.
  - The replaced word is what moves on down the chain. Every later tap
    therefore sees the modification, exactly as the sequential loop would.
  - As in `reuse_buf_rw`, the write of one iteration coincides with the shift
    of the next. The word leaving a tap is `cur`, the tap value with this
    cycle's write applied.
- **Write-back from the last write tap:**
  - Here the write taps are tap 2 (`P[r+1][c-1]`) and tap 4 (`P[r][c-1]`).
  - A pixel's value is final once it has passed tap 4. It is written back to
    memory from `cur[4]` right there, not at the end of the chain, which saves
    latency.
  - The *write iteration domain* is the set of written pixels (rows 1..N-1,
    columns 0..N-3) projected back through tap 4's access function:
    1 <= r <= N-1, 1 <= c <= N-2.
- **Shift-only iterations:**
  - The bottom image row is modified only at tap 2, during the last executed
    row. So the controller (`sobel_rw_ctrl`) runs one extra row of iterations.
  - These iterations shift the chain without reading memory or executing,
    until that row has passed tap 4.
  - For 100 x 100 that is 100 extra iterations: 10,100 in total.
  - The run ends with 99 x 98 = 9,702 write-backs. The last write is 10,103
    cycles after `start`.

Only pixels that the loop really wrote are stored, so no dirty bits are
needed. Every pixel is read from memory more than COLS cycles before it is
written back, so the read and write-back ports may be two ports of one memory.

## Correlation and matrix products

- **`corr_top`**
  - Computes `corr(i) = sum_j A[i+j] * B[j]` for i < 1000 and j < 13, and
    keeps the largest |corr(i)| and its offset.
  - `A[i+j]` has constant distance 12 and is fetched when i = 0 or j = 12.
    `B[j]` has distance 13 and is fetched only for i = 0.
  - 13,000 iterations. The maximum is final 13,002 cycles after `start`.
  - 1,025 memory reads: 1,012 samples of A plus 13 of B.
- **`matmul_top`**
  - One multiply-accumulate per cycle.
  - Rectangular: 1,000,000 iterations, last Q write 1,000,002 cycles after
    start, 30,000 memory accesses (A, B and Q once each).
  - `TRIANGULAR = 1`: 505,000 iterations, 505,002 cycles, 25,050 accesses.

## What follows the source method and what is this design's own

This RTL follows the approach published as "Data Reuse Buffer Synthesis Using
the Polyhedral Model". That approach generates buffers and controllers
automatically from C loop nests. The modules here are the buffer templates and
the generated instances for its evaluation examples, written by hand at the
structure and sizes the method prescribes. The analysis tool itself, which
derives the domains from source code, is not hardware and is not part of this
RTL. The domains are worked out and written as counter comparisons in each
controller.

Taken from the method:

- the three-part architecture;
- the buffer templates;
- nshift, lshift and rbpush;
- the reuse chain order and distances;
- the extended iteration domain;
- FIFO sizing by upper bound or peak occupancy;
- push suppression with `sfn`;
- write taps and write-back from the last write tap;
- shift-only iterations;
- the evaluation sizes: 100 x 100 images, 8-bit pixels, 100 x 100 matrices,
  13-tap correlation over 1000 offsets.

Choices made here:

| item | choice |
|---|---|
| Sobel arithmetic | 1-2-1 kernels, \|Gx\|+\|Gy\|, saturation to 255 (the method names the filter only) |
| word widths | 16-bit signed matrix operands, 40-bit Q; 8-bit signed correlation samples, 24-bit accumulator |
| memory model | synchronous read, one cycle latency, one port per array |
| handshake and reset | `start` / `busy` / `done` handshake, active-low asynchronous reset |
| RAM threshold | `RAM_THRESH` = 16 |
| FIFO forwarding | FIFOs forward a word pushed and popped in the same cycle while empty |
| read/write loop body | the +1 modification (the method names only which pixels are modified) |
| correlation | the maximum starts at 0 for each run and is replaced only by a strictly larger value |

Measured against the published figures:

| design | published latency | this RTL |
|---|---|---|
| rectangular Sobel | 10,002 | 10,003 (start to last write, including the write stage) |
| triangular Sobel | theoretical minimum 5,145; pipelined 5,152 | 5,148 |
| correlation | 13,002 | 13,002 |
| matrix product | 1,000,002 | 1,000,002 |
| triangular matrix product | 505,002 | 505,002 |

The published memory-access count for the correlation is 1,013. Reading
`A[i+j]` for every i < 1000, j < 13 touches 1,012 samples of A plus 13 of B,
so this design makes 1,025 reads.

Not built: the five benchmark designs that the method was compared on against
another tool (bicubic interpolation, 2-D/3-D denoise, 3-D segmentation and a
Sobel variant). Their loop nests and data windows are not given, and their
datapaths were placeholders.

## Files

Shared package: `rtl/rb_pkg.sv` (pixel type, the Sobel window struct, a
`$clog2` helper).

| level | modules |
|---|---|
| top | `reuse_top` |
| accelerators | `sobel_rect_top`, `sobel_tri_top`, `sobel_rw_top`, `corr_top`, `matmul_top` |
| controllers | `sobel_rect_ctrl`, `sobel_tri_ctrl`, `sobel_rw_ctrl`, `corr_ctrl`, `matmul_ctrl` |
| buffers | `reuse_buf_const`, `reuse_buf_var`, `reuse_buf_rw`, `sw_chain`, `sw_rw_chain`, `sobel_tri_buffer` |
| primitives | `shift_reg`, `rb_fifo`, `sfn` |
| datapath | `sobel_datapath` (the correlation and matrix-product datapaths are a few lines inside their tops) |

Every file opens with a comment on its function, interface and timing. Every
parameter defaults to the evaluation size.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Controllers and accelerators without one of their own are covered by their
top's test. Each testbench:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- compares against a model written independently in the testbench: direct
  Sobel on the image, sequential loop execution for the read/write variant,
  plain matrix and correlation arithmetic, and a word-position model for the
  chains and buffers.

Where a cycle count is known, the testbenches also check it. Each testbench
has been checked to fail on a deliberately broken copy of its module.
`tb/sobel_ref_pkg.sv` holds the reference Sobel function.

The full-size test runs all six accelerators at their default sizes, started
together, about 1,000,000 cycles:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_reuse_top \
  -y rtl -y tb +libext+.sv rtl/rb_pkg.sv tb/sobel_ref_pkg.sv tb/tb_reuse_top.sv
./obj_dir/Vtb_reuse_top
```

It takes a few seconds. Any other test is built the same way with its own top
module. `tb_reuse_top` checks:

- every output value;
- every latency in the table above;
- the memory-read counts;
- that each mechanism actually happened:
  - prefetch iterations;
  - FIFO occupancy reaching 96;
  - reuse hits in every single-access-function buffer;
  - Q stores;
  - write-backs of modified pixels;
  - exactly 100 shift-only iterations.

Sizes are parameters: `SOBEL_N`, `CORR_NI`, `CORR_NJ` and `MM_N` on
`reuse_top`, or `ROWS`/`COLS`/`N` on each accelerator. The controllers derive
every domain and FIFO bound from them. The controller tests run at 5 x 7.

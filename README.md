# Four floating-point and integer kernels for an FPGA co-processor

This RTL implements four compute kernels for an FPGA co-processor board: a
single-precision matrix product, a double-precision Jacobi solver for linear
systems, a two-level 2-D Haar wavelet transform of 8-bit images, and a CORDIC
sine/cosine generator. The board is a Virtex-II class FPGA running at 100 MHz
beside a host processor. It has four external SRAM banks, and each bank
delivers one 64-bit word per clock (the wavelet and CORDIC kernels use 128-bit
words). That narrow path to memory shapes every kernel. The two linear-algebra
kernels copy their matrix into many small on-chip RAM banks first. They then
read a whole chunk of a row in a single clock and feed a wide
multiply-and-sum pipeline. The two streaming kernels read each input word
once, at one word per clock, and keep as much work in flight as that rate
allows.

Each kernel is a separate accelerator with its own start/busy/done handshake
and its own memory ports. `hpc_accel_top` places the four side by side, and
they share only the clock and reset. The default parameters are the sizes the
kernels were designed and measured at:

| kernel | default size | parallelism | clocks at default size | time at 100 MHz |
|---|---|---|---|---|
| matrix product (`mm_engine`) | 128 x 128, IEEE single | 32 products per clock | 2 x 2048 preload + 65 536 compute + 40 = 69 672 | 0.697 ms |
| Jacobi solver (`jacobi_engine`) | 64 x 64, IEEE double | 8 products per clock | 1024 preload + 647 per sweep (648 028 for 1000 sweeps) | 6.48 ms for 1000 sweeps |
| Haar transform (`haar_dwt2`) | 1024 x 768 pixels, 2 levels | 16 pixels per clock | 49 152 reads + 12 288 copies + 13 = 61 453 | 0.615 ms |
| CORDIC (`cordic_unit`) | any count, 20 iterations | 2 angles per clock | count/2 + 25 (1025 for 2000 angles) | 10.25 us for 2000 angles |

The published measurements for these kernels on the original platform were
0.682 ms, 7.6 ms, 0.614 ms and 11.19 us.

## Conventions shared by all kernels

* **External memory.** Each kernel sees its external RAMs as read ports
  (`*_rd_en`, `*_rd_addr`, `*_rd_data`) and write ports (`*_wr_en`,
  `*_wr_addr`, `*_wr_data`). A read returns its data on the clock after the
  address, and the kernels rely on that fixed one-clock latency. There is no
  back-pressure: the SRAMs are assumed to accept a request every clock. The
  RAMs themselves are not part of the RTL, and the testbenches model them as
  arrays.
* **Handshake.** A one-clock `start` pulse starts a run. Base addresses and
  counts are sampled with `start`. `busy` stays high until `done` pulses for
  one clock, and a new `start` is accepted from that clock on.
* **Reset** is asynchronous and active low (`rst_n`). Only control state is
  reset. Data registers and RAM contents are not reset.
* **Floating point** is IEEE-754 with round-to-nearest-even. Subnormal inputs
  and results are flushed to zero. The units are parameterized by exponent and
  mantissa width (`EXP_W`, `MAN_W`), so the same code serves single precision
  (8/23) and double precision (11/52). NaN and infinity are handled simply:
  an overflow gives infinity, and NaN or infinity inputs propagate. The kernels
  never produce either on sensible data.

## Floating-point building blocks

* `fp_mul`: a combinational multiplier. It takes the full mantissa product,
  normalizes it by one place at most, and rounds with a guard bit and a sticky
  bit.
* `fp_add`: a combinational adder/subtractor (`sub` selects a - b). It aligns
  the smaller operand with guard/round/sticky bits, adds or subtracts, and
  normalizes with a leading-zero count. Then it rounds.
* `fp_div`: a pipelined restoring divider that produces one quotient bit per
  stage. It accepts a new division every clock, and its latency is MAN_W+5
  clocks (57 for double). A tag travels along with each division, so a client
  can tell which row a quotient belongs to.
* `fp_sum_chain`: the summation pipeline behind both linear-algebra kernels.
  N values enter together. Stage s adds lane s to the running sum, and the
  lanes not yet added ride along in the same stage register. The sum therefore
  comes out N clocks later, added strictly in lane order 0, 1, ..., N-1. This
  is the chain of adders drawn in the kernels' dependency graphs, not a
  reduction tree. A tree would save only a few clocks of latency and would
  give a different rounding order.

The order of the additions matters because floating-point addition is not
associative. The testbenches recompute the same order in IEEE double (or
single) and expect results that match bit for bit.

## Banked preloading (`matrix_preload`, `bank_ram`)

The matrix sits in external memory as a flat sequence of elements. Word t of
RAM r holds elements `VPC*t + r*VPW ...`, where VPW is the number of values
per 64-bit word (2 single or 1 double) and VPC = 4 x VPW is the number of
values per clock. Element e goes to bank `e mod NBANKS` at word
`e div NBANKS`. For a row-major matrix whose width is a multiple of NBANKS,
every run of NBANKS consecutive elements of a row therefore lies in NBANKS
different banks, at the same word address. Such a run is exactly one
"chunk" that the compute pipeline reads in one clock. VPC divides NBANKS, so
each bank receives at most one write per clock.

Preloading takes one clock per external word: N*N/8 clocks for a
single-precision matrix and N*N/4 clocks for a double-precision one. The
element stream is also brought out (`elem_valid`, `elem_idx`, `elem_vals`).
The Jacobi solver uses it to pick off the diagonal while A streams past.

`bank_ram` is a plain simple-dual-port RAM with a registered read. On a
same-address collision it returns the old data. Synthesis maps it onto block
RAM.

## Matrix product (`mm_engine`)

A (row-major) and then B are preloaded into two sets of NPAR banks. B must be
supplied transposed, that is, stored column by column. After that, for every
(i, j, c) the NPAR operands `A[i][c*NPAR+k]` and `B[c*NPAR+k][j]` come out of
the banks together. The loops run i, then j, then chunk c, with one chunk per
clock:

```
banks A ─┐
         ├─ NPAR x fp_mul ─ fp_sum_chain (NPAR stages) ─ accumulator (fp_add) ─ C port
banks B ─┘                    tag {first, last, i, j} travels along
```

Each chunk carries a tag through the chain. The tag says whether the chunk is
the first or the last of its entry. On a `first` chunk the accumulator loads
the chunk sum. On other chunks it adds the chunk sum to the accumulator. On
the `last` chunk, C[i][j] goes out on `c_wr_*` at address `i*N + j`. The
default has N/NPAR = 4 chunks per entry. The accumulator adds one chunk per
clock with a combinational adder in the loop. That keeps the issue rate at one
chunk per clock without reordering the sums.

Timing: 2 x N*N/8 preload clocks, then N^3/NPAR compute clocks, then a
short pipeline tail. With the defaults this is 69 672 clocks. The estimate
(n/n_par) x n^2 covers only the compute part.

## Jacobi solver (`jacobi_engine`)

This is the most intricate kernel. A single pass over the matrix per sweep
(one sweep is one Jacobi iteration) must deliver each new `x[i]`, including
the subtraction of the diagonal term. A plain Jacobi loop skips j = i inside
the sum. Skipping inside a chunk would break the regular NPAR-wide pipeline,
so the engine sums the whole row and takes the diagonal term out afterwards:

```
S        = sum over all j of A[i][j] * x[j]          (chunked, as in mm_engine)
x_new[i] = (b[i] - (S - A[i][i] * x[i])) / A[i][i]
```

**Preload.** A (N x N doubles, row-major, one double per 64-bit word) goes into
NPAR banks in N*N/4 clocks. On the way, the preloader's element stream copies
each diagonal element into a separate diagonal RAM, and x is cleared to zero.

**Issue.** For row i and chunk c, NPAR elements of A and of x are read in the
same clock. The x banks use the same modulo-NPAR layout as A, and a second
copy of x is read by row index to supply `x[i]`. On chunk 0 of each row,
`b[i]` is read from external RAM 0 at `b_base + i` (b is never preloaded).
`A[i][i]` is read from the diagonal RAM. All three travel in the tag together
with `first`, `last` and `i`.

**Row pipeline.** NPAR fp_mul feed the fp_sum_chain, and an accumulator adds
the N/NPAR chunk sums. When the `last` chunk of a row arrives, three
registered post stages compute `A[i][i]*x[i]`, then `S - that`, then
`b[i] - that`. The result enters the divider, and the quotient comes out 57
clocks later with row i in its tag.

**Buffer and write-back.** New values go to a result buffer, not into x. The
sweep must keep using the old x, which is what makes this Jacobi and not
Gauss-Seidel. When all N quotients of a sweep are in, the buffer is copied into
the x banks and the x copy, one element per clock (N clocks). Only then does
the next sweep start. During the last sweep's write-back, each element also
goes out on `x_wr_*` to address `x_base + i`, and then `done` pulses.

Timing per sweep: N*N/NPAR issue clocks, a pipeline tail of about 70 clocks
(chain, accumulator, post stages, divider), and N write-back clocks. With the
defaults that is 512 + 71 + 64 = 647 clocks. The rough per-iteration estimate
(n/n_par) x n covers only the first term. The 16-bit `iterations` input gives
the number of sweeps, and 0 is treated as 1. The matrix must be strictly
diagonally dominant for the iteration to converge. The hardware does not
check this.

## Two-level Haar wavelet (`haar_lift`, `haar_chunk`, `haar_dwt2`)

**Arithmetic.** The transform is integer-only on 8-bit pixels. For a pair
(a, b), the sum output is `s = floor((a + b) / 2)` and the difference output is
`d = (b - a) mod 256`. `haar_lift` does this on 8-bit lanes in parallel.
`haar_chunk` applies it to a 2 x 2 block of 128-bit words, rows first and then
columns. From words w00, w01 (upper row) and w10, w11 (lower row), the row
step pairs pixels 2k and 2k+1 within each row into L and H halves. The column
step then pairs the two rows. The result is one word each of LL, HL (H rows
averaged), LH and HH (L and H rows differenced). Each output word holds 16
coefficients, 8 from each input word of the row pair.

**Reading order.** The image is read from one RAM, 16 pixels per clock, in
blocks of 4 rows x 4 words. Each block is four 2 x 2-word chunks in raster
order, and each chunk is read upper-left, upper-right, lower-left, lower-right.
Every fourth clock a chunk completes and yields one 128-bit word of each
level-1 band. The HL, LH and HH words are written straight to their quarter of
the target RAM over the next three clocks. One write port suffices because a
read takes four clocks per chunk.

**Second level.** The four LL words of a block form a 2 x 2-word chunk of the
LL image, so at the end of each block they go through a second `haar_chunk`.
The results (LLLL, LLHL, LLLH, LLHH) cannot go to the target yet, because
their final places are only known once the whole image is read. They go into
an internal buffer RAM of IMG_W x IMG_H / 64 words (12 288 words at
1024 x 768). After the last read, this buffer is copied to the top-left
quarter of the target, one word per clock.

**Layout of the result**, with WPR = IMG_W/16 words per row:

```
+-------------+-------------+
| LLLL | LLHL |             |
+------+------+     HL      |
| LLLH | LLHH |             |
+-------------+-------------+
|     LH      |     HH      |
+-------------+-------------+
```

Timing: IMG_W*IMG_H/16 read clocks, then a short pipeline flush, then
IMG_W*IMG_H/64 copy clocks. At the default size that is 61 453
clocks, or 0.615 ms.

## CORDIC sine and cosine (`cordic_stage`, `cordic_pipe`, `cordic_unit`)

Angles are integers: degrees scaled by 10^10, as signed 64-bit values in
0..360 degrees. Results use the same 10^10 scale. `cordic_pipe` first picks a
start point. For angles above 180 degrees it starts at 270 degrees with
(x, y) = (0, -K). Otherwise it starts at 90 degrees with (0, +K). K is the
aggregate constant, the product of 1/sqrt(1 + 2^-2i) over the 20 iterations
(about 0.6072529), times 10^10. Starting from 90 or 270 degrees puts every
target within 180 degrees of the start, inside the range the iterations can
cover. Each of the 20 `cordic_stage`s compares the current angle with the
target. It rotates by +atan(2^-i) if the current angle is below the target
and by -atan(2^-i) otherwise, using shifts only:

```
x' = x -+ (y >>> i),   y' = y +- (x >>> i),   phi' = phi +- atan(2^-i)
```

The atan table and K are computed at elaboration from `$atan`/`$sqrt` in
constant functions. There is no table file. After 20 stages the angle error
is at most about atan(2^-19), roughly 1e-4 degrees, and the measured sine and
cosine error stays below 2e-6.

`cordic_unit` reads one 128-bit word of two angles per clock and feeds two
pipelines. It writes the two sines and the two cosines to separate RAMs at the
same word address. Latency is 22 clocks: one for the RAM read and 21 for the
pipeline. `count` must be even.

## Top level (`hpc_accel_top`)

The top instantiates the four kernels with the default sizes and brings out
each kernel's handshake and RAM ports under a prefix: `mm_`, `jc_`, `hw_` and
`cd_`. Nothing is shared except `clk` and `rst_n`. On the original platform
each kernel is a separate FPGA configuration, so combining them in one top is
a packaging choice. The original matrix-product configuration alone used
about 61% of a Virtex-II's flip-flops, and the wavelet configuration about
63% of its block RAMs, so the four kernels together will not fit one device of
that class. Build one kernel at a time for a real device.

## What follows the source design and what is this design's own choice

Follows the source:

* the four algorithms and their default sizes;
* 4 x 64-bit external RAMs, with 8 single or 4 double values per clock;
* preloading into NPAR banks, with A row-wise and B column-wise;
* NPAR parallel multipliers followed by a chained, not tree-shaped, adder;
* accumulating n/NPAR partial sums per matrix entry;
* the Jacobi dependency graph, including the diagonal-term correction with
  copies of the diagonal and of x;
* b left in external memory, and the result buffer written back after each
  sweep;
* the wavelet's 16-pixels-per-clock read from one RAM, its 4 x 4 reading
  blocks, its integer average/difference, and its level-2 buffer of
  512 x 384 pixels copied out at the end;
* the CORDIC start at 90 or 270 degrees, the 20 shift-and-add iterations, the
  10^10 integer scaling, and the two parallel pipelines.

This design's own choices:

* all port lists, handshakes and address layouts;
* the one-clock RAM latency;
* B supplied transposed;
* pixel and value packing inside a word (lowest element in the low bits);
* the order of words inside a wavelet block, and the placement of the level-2
  bands inside the LL quarter;
* the floating-point units' internals (restoring divider, flush-to-zero) and
  their pipelining;
* the Jacobi post-stage pipelining and the sweep-by-sweep stall for the
  write-back;
* the wavelet difference taken as b - a (second minus first) modulo 256.

The source gives the difference in both orders in different places. Swapping
it means exchanging the `a` and `b` operands in `haar_lift`.

Two sizes differ from the source's rough estimates on purpose. Preloading a
double-precision matrix takes N*N/4 clocks, not N*N/8, because four 64-bit
words hold only four doubles. The 32 x 32 "whole row in one clock" variant of
the matrix product is not a separate design: it is `mm_engine` with
`N = NPAR = 32`.

Not implemented: Gaussian elimination was studied for the same platform but
never designed as hardware, so there is nothing to follow. The host interface
and the board's SRAMs are outside this RTL.

## Simulation

Every module has its own self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a hung run with
a failure. `tb/tb_fp_pkg.sv` holds small real-to-single helpers that some
testbenches import. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_mm_engine \
    tb/tb_fp_pkg.sv tb/tb_mm_engine.sv -y rtl -y tb -Mdir obj_mm
./obj_mm/Vtb_mm_engine
```

| testbench | what it checks |
|---|---|
| `tb_fp_mul`, `tb_fp_add` | random and special operands in single and double against the simulator's IEEE arithmetic |
| `tb_fp_div` | double division bit-exact against real division, and a latency of MAN_W+5 |
| `tb_fp_sum_chain` | in-order sum bit for bit, a latency of N, and tags |
| `tb_bank_ram`, `tb_matrix_preload` | read-old-data behaviour, the element-to-bank mapping, and NWORDS+1 clocks |
| `tb_mm_engine` | 16 x 16 product with 8 lanes, exact against the integer product, and the clock count |
| `tb_jacobi_engine` | 16 x 16 system, 4 lanes, 3 sweeps, bit-exact against the same operation order in double, and the clock count |
| `tb_haar_lift`, `tb_haar_chunk` | random pixel vectors, inverse recovery, and band assignment |
| `tb_haar_dwt2` | 128 x 16 image, both levels, the whole target layout, single writes, and the clock count |
| `tb_cordic_stage`, `tb_cordic_pipe`, `tb_cordic_unit` | stage equations, sin/cos within 3e-6 over 0..360 degrees, and latency |
| `tb_hpc_accel_top` | all four kernels at reduced size running at once, with a count of each mechanism (preload, chunk accumulation, diagonal correction, b reads per sweep, x write-back, detail writes, level-2 copy, both CORDIC start points, both lanes) |
| `tb_hpc_full` | the same test with the top at its default sizes: 128 x 128 product, 64 x 64 Jacobi (1000 sweeps), 1024 x 768 image, 2000 angles, with the run time of each engine checked; about 30 s in Verilator |

To test an engine at another size, change the localparams at the head of its
testbench. Sizes must keep N a multiple of NPAR (and of 8 for the matrix
product), the image width a multiple of 64 and its height a multiple of 4.

# Reshaping addresses instead of data: tiled MxM and 3x3 convolution accelerators

Matrix multiplication and convolution both need their input data *reshaped*
before it reaches the arithmetic. Rows of one operand must be repeated once
per row of the other. Tiles must be cut out of a larger matrix, which takes
transpositions. Convolution needs overlapping sliding windows. Doing this on
the data costs a lot of hardware. Repeating a stream means sending a "repeat"
request back up a pipeline, so the pipeline stalls. Transposing or windowing
a vector takes a permutation network that grows with its size, or a large
shift register.

This RTL uses the approach of the paper *Optimizing Data Reshaping Operations
in Functional IRs for High-Level Synthesis*: **do the reshaping on the read
addresses, not on the data.** Every data stream comes out of an on-chip
buffer. The buffer is read by an address stream from a small nest of
counters. Repetition, transposition, tiling and sliding all become counter
configurations. The data path holds only buffers and multiplier arrays. It
produces a new operand every clock cycle and never stalls.

Two accelerators are built this way. Each matches a configuration evaluated in
the paper with all optimizations enabled:

| accelerator | workload | parallel hardware |
|---|---|---|
| `mxm_engine` | tiled matrix multiplication, 8-bit, 512x2048 operand tiles | 2048 multipliers, one 2048-term dot product per cycle |
| `conv_engine` | tiled 3x3 convolution, 8-bit, 128x128 tiles, 3 input / 64 output channels | 126 dot products of 9 terms per cycle (1134 multipliers) |

`reshape_accel_top` places the two side by side; they share nothing.

## Counters as the reshaping engine

The basic part is `stream_counter`: **one dimension** of a counter with a
start value, a step and a length. It always shows its current value. An
`advance` input moves it to the next value. After the last value it wraps to
the start and pulses `wrap`. To build an n-dimensional counter, connect each
dimension's `wrap` to the `advance` of the next dimension out. The address is
the sum of the dimensions' values. **A dimension with step 0 adds nothing to
the address and only counts passes: it is a repeat.**

The three address generators are such counter nests:

| generator | dimensions, innermost first | address |
|---|---|---|
| `repeat_addr_gen` | column (step 1, `cols`), repeat (step 0, `repeat`), row (step `row_step`, `rows`) | `base + r*row_step + c`, each row emitted `repeat` times |
| `transpose_addr_gen` | inner (step `inner_step`, `inner_count`), outer (step `outer_step`, `outer_count`) | `base + i*outer_step + j*inner_step` |
| `slide_addr_gen` | element (step `step`, `W`), window (step `S*step`, `(n-W)/S+1`), repeat (step 0) | `start + (w*S + e)*step` |

**Repetition.** Suppose a row must be used N times. A naive data path repeats
it after the read, so the repeat logic sits several pipeline stages after
the counter. When the counter reaches the end of a row, it must wait for the
repeat decision to come back. It loses as many cycles as there are registers
in between, and this happens on every row. In `repeat_addr_gen` the repeat
decision is a counter dimension in the same stage as the column counter. At
the last column, the step-0 dimension decides in the same cycle whether the
column count goes back to the row start (`repeat_row` pulses) or the row
counter advances. The testbench checks the 8x8 example with each row emitted
8 times. It takes exactly 512 cycles for 512 addresses.

**Transposition.** An M x N row-major matrix is read in transposed order
with an outer counter `0, 1, ..., N-1` and an inner counter
`0, N, 2N, ..., (M-1)N`, added together. This replaces the permutation
`i -> i/N + (i mod N)*M` on the data, which would be M*N crossing wires. The
same generator with outer step = row pitch and inner step 1 fetches a tile
out of a larger matrix. Both engines load their tiles this way.

**Sliding windows.** Windows of W elements with stride S over n elements
become a window counter stepping by S and an element counter walking W. The
shift register or window-wiring mesh disappears. The extra step-0
dimension re-runs the whole sweep. It serves an input that an outer loop
reuses, such as the same image tile for every output channel.

All generators use the same handshake: `start` latches the configuration,
`out_valid` rises the next cycle, and one address leaves per cycle while
`out_ready` is high. `out_last` marks the final address and `done` pulses
when it is taken. Inside both engines `out_ready` is tied high. The only
stalls are in host memory.

## Read: buffers at compute width

`vec_ram` is the read side of every buffer. It takes one address per cycle
with a valid bit and a side-band tag. One cycle later it returns the word
with the delayed valid and tag. The tags carry the counters' "last" flags and
indices along with the data. Words are as wide as the multiplier array
consumes per cycle: 2048 bytes for MxM, one 128-pixel, 3-channel image row
(384 bytes) for convolution. There is therefore no stream-to-vector or
vector-to-stream conversion between memory and compute. The paper removes
such conversion pairs because they throttle a parallel data path.

## Dot products

`dot_prod` multiplies VEC pairs of signed 8-bit values in parallel and adds
the products. It accumulates across a stream of vectors until one arrives
with `in_last`. The total then appears on `out_sum` and the accumulator
restarts. Latency is 2 cycles: products are registered, then the sum. A new
reduction can start every cycle. Results are 32-bit signed. The 4096-term
dot products of the full 4096x4096 product need 28 bits.

## Matrix multiplication engine (`mxm_engine`)

Computes one C tile, `C[i][j] (+)= sum_k A[i][k] * B^T[j][k]`, for a TM x TK
tile of A and a TN x TK tile of B^T. B must be stored transposed in host
memory: row j of B^T is column j of B. One command runs these phases (output
`phase`):

1. **LOAD_A, LOAD_B**: `transpose_addr_gen` walks TM (then TN) rows of
   TK/VEC words each, at host addresses `base + r*row_pitch + w`. The
   responses fill the A and B buffers in order.
2. **COMPUTE**: two `repeat_addr_gen`s start together and run in lockstep:
   - A's generator emits each row of A TN times.
   - B's generator treats the whole B tile as one "row" and emits it TM times.

   Each pair of words goes through the buffers into `dot_prod`. A's
   row-last flag closes each dot product after TK/VEC words. Results are
   written to the on-chip C tile in row-major order. They either replace C
   or, with `cmd_accumulate`, are added to it. Accumulating lets the k-tiles
   of one output tile be summed on chip.
3. **DRAIN** (if `cmd_drain`): C is streamed out row-major on
   `res_valid/res_ready` with its row and column.

COMPUTE takes `TM*TN*TK/VEC + 3` cycles: one dot-product step per cycle plus
the pipeline tail. At the default sizes one tile job (both k-tiles of a
4096-long shared dimension) is 2 x 262,147 compute cycles. A full
4096x4096 product is 8 x 8 output tiles x 2 k-tiles = 128 commands.
Loading is not overlapped with compute. The paper names double buffering as
future work.

Host port: requests `mem_req_valid/ready/addr` (word addresses); responses
`mem_rsp_valid/data` must arrive in request order. There is no backpressure
on responses. Host words are VEC*8 bits wide.

## Convolution engine (`conv_engine`)

Convolves one tile of TILE_H rows x TILE_W pixels x CIN channels with COUT
kernels of K x K x CIN. The convolution is valid (no padding) with stride 1.
Each tile gives `COUT x (TILE_H-K+1) x (TILE_W-K+1)` results (64 x 126 x 126
at the defaults). Neighbouring tiles must overlap by K-1 pixels to cover an
image.

Data layout: one word = one tile row, pixel-major, channel-minor (element
`p*CIN + c`). Weights are written beforehand on `w_wr_*`. Word `co*K + i`
holds kernel row `i` of output channel `co`, K pixels x CIN channels in the
same order.

1. **LOAD**: `transpose_addr_gen` fetches the TILE_H rows at
   `base + r*row_pitch` into the input buffer.
2. **COMPUTE**: `slide_addr_gen` (W=K, S=1) emits the row addresses. For
   each output row y they are `y, y+1, ..., y+K-1`, and the whole sweep is
   repeated once per output channel. The weight row `(channel, kernel row)`
   is read in the same cycle from the counters' indices. The input row is
   cut into TILE_W-K+1 overlapping slices of K*CIN elements; this is the
   column slide, done as fixed wiring because K is small. Each slice feeds
   its own `dot_prod`, which accumulates over the K kernel rows.

Every K cycles one output row of one channel (126 x 32-bit) appears on
`res_valid/res_ch/res_row/res_data`, channel-major. This port has no
backpressure. COMPUTE takes `COUT*(TILE_H-K+1)*K + 3` cycles (24,195 at the
defaults).

## Top level (`reshape_accel_top`)

Instantiates both engines with all parameters at the evaluated sizes. The
MxM ports have the prefix `mxm_` and the convolution ports `cv_`. The host
processor, its memory and the PCIe link that would serve these ports are
outside the design.

| parameter | default | meaning |
|---|---|---|
| `MXM_TM`, `MXM_TN` | 512 | rows of the A and B^T tiles (C tile is TM x TN) |
| `MXM_TK` | 2048 | shared-dimension length per tile; must be a multiple of `MXM_VEC` |
| `MXM_VEC` | 2048 | multipliers = elements per buffer word |
| `CV_TILE_W`, `CV_TILE_H` | 128 | tile width and height in pixels |
| `CV_CIN`, `CV_COUT` | 3, 64 | input and output channels |
| `CV_K` | 3 | kernel size |

On-chip storage at the defaults: MxM 1 MiB each for the A, B and C tiles.
Convolution 48 KiB for the input tile and 1.7 KiB of weights.

## What comes from the paper and what does not

Taken from the paper:
- The principle of address-side repetition, transposition and sliding, and
  the counter structures (Counter2D with the repeat next to it; two counters
  plus an adder for transposition and sliding).
- The one-cycle memory read.
- Memory width matched to compute.
- The workload sizes: 4096x4096 8-bit matrices, 512x2048 tiles, 2048
  multipliers; a 1024x1024 image, 128x128 tiles, 3x3 kernels, 3 and 64
  channels.
- On-chip accumulation of MxM tiles.
- The parallel convolution layout: a row group goes through a vector slide
  into parallel dot products that share one weight.

Choices of this design, where the paper is silent:
- Reading "512x2048 tile" as operand tiles of 512 rows by 2048 elements. This
  gives a 512x512 C tile and one dot product per cycle.
- 32-bit signed results and signed 8-bit inputs.
- Valid/ready handshakes, the command and host interfaces, in-order host
  responses.
- The phase sequencing (load, then compute, then drain).
- Valid convolution with stride 1 and no padding.
- The split of each convolution dot product into K per-row steps.
- The weight write port.
- Asynchronous active-low reset of control state; memories are not reset.
- Counter lengths. The paper's counter notation mixes a maximum value and
  an element count. Here the third counter argument is always a length.
- The number of windows, (n-W)/S+1, follows the definition of the slide
  itself rather than the counter bound printed for the rewritten slide,
  which differs by one.

Not verified: the paper's designs close timing at 200 MHz on an Arria 10.
Here the 2048-term product sum of `dot_prod` is one combinational stage
after the multiplier registers. A real implementation at that clock would
pipeline the adder tree. Adding stages changes only the engines' latency,
not their throughput. No timing analysis was done.

Not built:
- The baseline designs the paper compares against: repeat signals sent back
  along the pipeline, permutation-network transposition, shift-register
  slides, stream/vector converters.
- The host and PCIe side.
- Double buffering.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/reshape_pkg.sv \
    tb/tb_reshape_accel_top.sv -y rtl --top-module tb_reshape_accel_top -Mdir obj
obj/Vtb_reshape_accel_top
```

| testbench | what it covers |
|---|---|
| `tb_stream_counter` | values, wrap, restart, step-0 dimension |
| `tb_repeat_addr_gen` | 8x8 rows x 8 repeats at one address per cycle; pitch/base under random stalls |
| `tb_transpose_addr_gen` | 3x5 and 8x8 transposition; tile fetch with stalls |
| `tb_slide_addr_gen` | W=3,S=1 with repeated sweeps; W=4,S=2 with address step 2 and stalls |
| `tb_vec_ram` | one-cycle reads with tags, concurrent writes |
| `tb_dot_prod` | random reductions of 1-4 vectors, extremes, latency 2 |
| `tb_mxm_engine` | 4x3 C tile over two k-tiles at small sizes; compute-cycle count |
| `tb_conv_engine` | 8x6 tile, 4 channels; every output, order, row spacing, cycle count |
| `tb_mxm_workload` | a whole 16x64 by 64x12 product, tile by tile (4x3 output tiles x 2 k-tiles), every result checked |
| `tb_conv_workload` | a whole 20x20x3 image in 3x3 overlapping 8x8 tiles, 4 channels; every output checked and produced exactly once |
| `tb_reshape_accel_top` | both engines at full default size: a complete 512x512 C tile over a 4096-long shared dimension (262,144 results checked) and a 128x128 tile with 64 channels (1,016,064 results checked) |

`tb_reshape_accel_top` also counts how often each mechanism occurred and
fails if any never did:
- row-address repeats and B-tile re-reads
- tile-fetch row jumps
- host stalls
- accumulation into C
- result backpressure
- window slides
- per-channel sweep repeats

It also checks that both COMPUTE phases run at one step per cycle. It takes
under a minute with Verilator. Host memory in the testbenches is a formula of
the address, so no data files are needed.

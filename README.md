# HEVC inverse integer transform, 4x4 to 32x32, two samples per cycle

An HEVC decoder turns every transform unit (TU) of dequantised coefficients
back into a block of prediction residuals with a 2-D inverse integer
transform. TUs are square, 4, 8, 16 or 32 samples wide, and the transform is
separable: a 1-D inverse transform over every column, a transposition, and the
same 1-D transform over every column of the intermediate block. This RTL does
exactly that, bit-exact with the HEVC reference decoder for 8-bit video. Its
parts are:

- a size decoder;
- four 1-D "partial butterfly" cores, one per size, each fully pipelined;
- one transpose buffer of 1024 x 16 bits;
- a controller that sequences the two passes behind a Vivado-HLS style block
  handshake (`ap_start` / `ap_done` / `ap_idle` / `ap_ready`).

The core that matches the TU size is used twice: first on the coefficients,
then on the transpose buffer. The other three cores stay idle.

Every memory port moves two 16-bit samples per cycle. Each 1-D pass over an
N x N block therefore streams in N*N/2 cycles. That is the rate of the
pipelined high-level-synthesis designs this structure is modelled on.

## Block structure

```
 tu_size --> iit_size_decoder --> iit_controller (FSM, addresses, handshake)
                                        |
 coef_q (2 samples) --+                 |
                      +--> iit_input_mux --> iit_line_gather --> 4 x iit_partial_butterfly
 transpose buffer ----+                                          (N = 4, 8, 16, 32)
        ^                                                              |
        |                                                   select by TU size
        |                                                              |
        +---- pass 1 writes ---- iit_line_scatter <--------------------+
                                        |
                                        +---- pass 2 writes --> res_d (2 samples)
```

| file | role |
|---|---|
| `rtl/iit_pkg.sv` | Sample and line types. The size enum. The transform-matrix functions, shift-add multiply, and round/clip. |
| `rtl/iit_size_decoder.sv` | Maps a width of 4/8/16/32 to a 2-bit code and a one-hot core select. Any other width is flagged invalid. |
| `rtl/iit_controller.sv` | Handshake, the two-pass sequence, and read addresses for both passes. Waits for the last write of each pass. |
| `rtl/iit_input_mux.sv` | Chooses the coefficient port (pass 1) or the transpose buffer (pass 2). Steers a completed line to the selected core only. |
| `rtl/iit_line_gather.sv` | Collects N/2 read pairs into one line of N samples. |
| `rtl/iit_partial_butterfly.sv` | N-point 1-D inverse transform of one line per cycle. Two register stages. |
| `rtl/iit_line_scatter.sv` | Splits a result line into N/2 write pairs. |
| `rtl/iit_transpose_buffer.sv` | True dual-port RAM, 1024 x 16, registered read. |
| `rtl/iit_top.sv` | Wires it all together and brings out the memory ports. |

## Interface

`iit_top` has one parameter, `SHIFT_ADD` (default 1). It is described under
[Constant multiplication](#constant-multiplication).

| port | dir | width | meaning |
|---|---|---|---|
| `ap_clk`, `ap_rst` | in | 1 | Clock. Synchronous active-high reset, which clears the control state only. |
| `ap_start` | in | 1 | Start a TU. Sampled while `ap_idle` is high. |
| `ap_idle` | out | 1 | High while no TU is in progress, including the start cycle. |
| `ap_done`, `ap_ready` | out | 1 | Pulse together in the last cycle of a TU. |
| `tu_size` | in | 6 | TU width: 4, 8, 16 or 32. Sampled with `ap_start`. |
| `coef_address[1:0]`, `coef_ce[1:0]` | out | 2x10, 2 | Two read ports into the coefficient array. |
| `coef_q[1:0]` | in | 2x16 | Read data, one cycle after `coef_ce`. |
| `res_address[1:0]`, `res_ce[1:0]`, `res_we[1:0]`, `res_d[1:0]` | out | | Two write ports into the residual array. |

Memory layout:

- Both arrays hold the TU in raster order. Coefficient (row r, column c) is
  read from address `r*N + c`, and residual (r, c) is written to `r*N + c`.
- Addresses start at 0 for every size.
- The two ports of a pair always address neighbouring columns of the same
  row.

Timing, in cycles counted from the start cycle (the cycle in which `ap_start`
is high while `ap_idle` is high) to the `ap_done` cycle:

| N | latency N*N+N+9 | TU interval with `ap_start` held high |
|---|---|---|
| 4 | 29 | 30 |
| 8 | 81 | 82 |
| 16 | 281 | 282 |
| 32 | 1065 | 1066 |

- Residuals leave in a burst of N*N/2 consecutive cycles, two per cycle,
  ending just before `ap_done`.
- If `ap_start` stays high through `ap_done`, the next TU starts in the
  following cycle. Successive TUs do not overlap.
- An invalid `tu_size` (anything but 4, 8, 16, 32) raises `ap_done` and
  `ap_ready` in the start cycle itself, and neither memory is touched.

## Pass order, rounding and clipping

Pass 1:

- Reads column j of the coefficient block, one pair of rows per cycle.
- Transforms it.
- Rounds with a shift of 7 and clips to 16 bits.
- Writes the result as row j of the transpose buffer (address `j*32 + k`).

Pass 2:

- Reads column j of the transpose buffer (address `k*32 + j`), which is row j
  of the first-pass result transposed.
- Transforms it.
- Rounds with a shift of 12 (20 - bit depth, for 8-bit video) and clips to
  16 bits.
- Writes the N results as row j of the residual block.

This is the order of the reference decoder, so the clipping of intermediate
values happens at the same points, and out-of-range coefficients give the
reference's answer too.

Rounding is `(v + 2^(s-1)) >>> s`, followed by saturation to
[-32768, 32767].

## The 1-D core

`iit_partial_butterfly #(.N(N))` holds the whole even/odd factorisation for
one size.

The N-point inverse transform of a line `s` splits in two:

- The even-indexed inputs form an N/2-point inverse transform E.
- The odd-indexed inputs form a dense N/2 x N/2 product O.

The outputs are

```
out[k]     = E[k] + O[k]
out[N-1-k] = E[k] - O[k]        k = 0 .. N/2-1
```

This is applied recursively down to the 2-point core,
`64*s[0] ± 64*s[N/2]`. Level m of the cascade (m = 4, 8, ..., N) uses the
inputs at stride N/m.

Pipeline stages:

- Stage 1 registers the input line.
- The cascade is combinational.
- Stage 2 registers the rounded and clipped outputs.

A new line can enter every cycle. In the top, a line is delivered every N/2
cycles, because the memory ports carry only two samples per cycle.

The whole cascade sits between two registers. That is simple and short in
latency, but it sets the clock: no timing closure has been done. To raise the
clock, add register stages between the levels of the `for (m ...)` loop. The
latency grows by one cycle per stage, and the controller needs no change
beyond its write-wait, because it waits for the last write of each pass.

### Transform matrices

No coefficient tables are stored. Entry (r, n) of the 32-point matrix comes
from one list of 33 integers:

```
BASE = 90 90 90 90 89 88 87 85 83 82 80 78 75 73 70 67
       64 61 57 54 50 46 43 38 36 31 25 22 18 13  9  4  0
```

BASE[j] is close to 64*sqrt(2)*cos(j*pi/64), rounded as the HEVC standard
rounds it. The index is folded as a cosine:

```
j = r*(2n+1) mod 128
c = BASE[j]       j <= 32
    -BASE[64-j]   32 < j < 64
    -BASE[j-64]   64 <= j <= 96
    BASE[128-j]   j > 96
```

Row 0 is 64. Row r of the M-point matrix is row r*32/M of the 32-point one.
All of this is evaluated at elaboration time.

### Constant multiplication

With `SHIFT_ADD = 1` (the default), every product of a sample with a matrix
constant is written as a sum of shifted copies of the sample, one per set bit
of the constant (`x*3 = (x<<1) + x`). No multiplier is described.

With `SHIFT_ADD = 0` the products are plain `*` with a constant operand.
Synthesis tools often turn those into the same adders, or map them onto DSP
blocks.

Both settings give identical results. The core testbenches run both.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=<n> failures=<n>` line. They are:

| testbench | what it checks |
|---|---|
| `tb_iit_top` | End to end at the default parameters. TUs of every size are run with four stimulus kinds: DC only, small random, full 16-bit random, and sparse. Every residual is compared with a reference that uses plain matrix products, with its own tables and symmetry rules (`tb_iit_ref_pkg`). It also checks the latency N*N+N+9, that the N*N residual writes are consecutive at two per cycle, and that there are N*N/2 coefficient reads. Four invalid sizes are checked for immediate `ap_done` and no memory traffic. Finally it runs a back-to-back sequence 8 -> 32 -> 4 with `ap_start` held high. Sizes, invalid starts, clipping events and back-to-back starts are counted, and each must occur. |
| `tb_iit_pb4/8/16/32` | One core of each size, with both `SHIFT_ADD` settings. 200 lines each, in both passes, streamed back to back. Checks the values, the 2-cycle latency, the tag and pass flag, and that clipping was exercised. |
| `tb_iit_controller` | The controller against a model of the datapath delay. Checks every read address, read counts, that pass 2 starts only after the last pass-1 write, the handshake, and the latency. |
| `tb_iit_transpose_buffer` | Row-wise fill and column-wise read of the buffer. Mixed use of the two ports. |
| `tb_iit_size_decoder` | All 64 input values. |
| `tb_iit_input_mux` | Random selection and steering. |
| `tb_iit_workload` | 200 TUs per TU-size mix, for eight mixes, streamed back to back. Every residual is checked. The total cycle count must equal sum(N*N+N+10) - 1. Prints the sustained residuals per cycle. |

`iit_top` also carries assertions:

- only the selected core produces a line;
- the transpose buffer is never read and written in the same cycle;
- coefficients are never read while residuals are written.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Wno-TIMESCALEMOD -y rtl --top-module tb_iit_top \
    rtl/iit_pkg.sv tb/tb_iit_ref_pkg.sv tb/tb_iit_top.sv
./obj_dir/Vtb_iit_top
```

Packages are listed first, and `-y rtl` finds the modules. For the core
testbenches, add `-y tb` so that `tb/tb_pb_harness.sv` is found. The
full-size end-to-end test runs in well under a second.

## Where this design departs from its HLS model

The block structure follows the high-level-synthesis design it is modelled on:

- a 2-to-4 size decoder;
- four mutually exclusive 1-D sub-modules, each behind an input multiplexer;
- one transpose buffer, a single block RAM;
- an FSM with the standard block handshake;
- an immediate finish on an invalid size;
- shift-add constant multiplication;
- two samples per cycle in the pipelined configuration.

The following are this design's own choices:

- **Shared gather and multiplexer.** One pair-wide multiplexer and one line
  gatherer serve all four cores. Only the core valid is steered per core. The
  data path that a per-core multiplexer would select is the same.
- **Output path.** Second-pass results go straight from the core to the
  residual ports. They are not stored in the transpose buffer a second time.
- **Latency.** The cycle counts above come from this pipeline (two core stages
  plus memory and gather/scatter registers). They do not reproduce the HLS
  reports, whose latencies depend on the HLS schedule and clock.
- **One TU at a time.** Consecutive TUs do not overlap. Overlapping pass 2 of
  one TU with pass 1 of the next would need a second buffer or a ping-pong
  buffer.
- **Data ports.** The two-port memory interface, the 16-bit widths, and the
  synchronous reset are choices. The model specifies only the handshake.
- **Bit depth.** The shifts are for 8-bit video. For bit depth B, the
  second-pass shift is 20 - B (`SHIFT_2ND` in `iit_pkg`).
- **No DST.** The 4x4 DST that HEVC uses for intra luma 4x4 TUs is not built.
- **No transform skip.** Transform-skip and lossless bypass are not built.
- **Pipelined variant only.** The non-pipelined and loop-unrolled
  alternatives of the HLS exploration are different schedules of the same
  arithmetic and are not provided.

## Throughput

A TU of size N yields N*N residuals every N*N+N+10 cycles. That is 0.53, 0.78,
0.91 and 0.96 residuals per cycle for N = 4, 8, 16, 32.

A real stream mixes the four sizes. Small TUs dominate at low resolution and
low QP, and large ones at high resolution and high QP. There are two ways to
average:

- **Sustained rate.** This is the rate actually delivered. It is weighted by
  samples, not by TU count, so large TUs count for more. `tb_iit_workload`
  measures it on 200 shuffled TUs per mix, for eight typical mixes (240p to
  1080p, QP 22 and QP 37). It comes out at 0.75 to 0.94 residuals per cycle.
- **Mean of the per-size rates.** Weighting the per-size rates by TU count
  gives a lower, more pessimistic figure of 0.61 to 0.86.

For 4:2:0 video at W x H and F frames/s, the required rate is W*H*F*1.5
samples/s. The clocks needed at 60 frames/s, from the sustained rate
(measured):

| video | rate | clock needed |
|---|---|---|
| 416x240 | 9.0 Msamples/s | 10 to 12 MHz |
| 832x480 | 35.9 Msamples/s | 40 to 43 MHz |
| 1280x720 | 82.9 Msamples/s | 89 to 96 MHz |
| 1920x1080 | 186.6 Msamples/s | 199 to 203 MHz |
| 3840x2160 | 746.5 Msamples/s | at least 777 MHz, even with only 32x32 TUs |

Several instances working on different TUs scale the rate linearly.

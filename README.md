# Streaming convolution-layer accelerator with a read-once memory controller

This is a parameterized hardware accelerator for one convolution layer of a
convolutional neural network, written in synthesizable SystemVerilog for FPGA
targets. It computes

    out[co][y][x] = pool( relu( bias[co] + sum over ci, ky, kx of
                                in[ci][y+ky][x+kx] * w[co][ci][ky][kx] ) )

with stride 1, no padding, optional ReLU and optional P x P max pooling.

A direct implementation fetches each window from memory, so every input pixel
is read up to K*K times. In this design the memory controller reads each input
pixel exactly once per pass. Line buffers hold the last K-1 image rows on chip,
so a new K x K x C_IN window is ready every clock cycle. Several output channels
are computed side by side on every window. The multiply-add over a window is
fully unrolled and pipelined. ReLU and max pooling are fused onto the output
stream, so no intermediate map is written back to memory.

The general scheme comes from a published description of an FPGA CNN
accelerator. That scheme covers convolution, ReLU as the only activation, max
pooling as the only pooling, a memory controller that removes redundant reads,
loop unrolling, pipelining, and parameters for trading speed against area and
power. The description does not give the internal structure, bit widths, sizes
or interfaces. Everything of that kind here is this design's own choice, listed
in "Departures and choices" below.

## Dataflow

```
 host writes ──► input memory ──► mem_ctrl ─────────────► PAR_OUT lanes ─────────────► output memory ──► host reads
 (image)         (feature_mem)    address counter +        conv_pe ► relu ► max_pool    (feature_mem)
                                  line_buffer              (one lane per output
                                  (one window / cycle)      channel of the group)
 host writes ──► weight_mem ── kernels + biases of the current group ──┘
                 accel_ctrl: passes, group select, output addresses, counters
```

A run has `NG = ceil(C_OUT / PAR_OUT)` passes. In pass `g`, lanes
`l = 0 .. PAR_OUT-1` compute output channel `g*PAR_OUT + l`. In the last pass,
lanes past `C_OUT` get zero weights and their results are ignored.

## The memory controller and line buffer

This is the core of the design and the part that takes the most care.

`mem_ctrl` is an address counter. After `start` it issues addresses
`0 .. IMG_W*IMG_H-1`, one per cycle, to the input memory. The memory has one
cycle of read latency. Each word holds all `C_IN` channels of one pixel, and
the words go into `line_buffer` in raster order.

`line_buffer` has two kinds of storage:

* **K-1 row memories** (`lines[i][col]`), each `IMG_W` words deep. `lines[0]`
  holds the row above the current one, and `lines[i]` holds the row `i+1`
  above. When the pixel at column `col` arrives, the K values of column `col`
  are read in the same cycle: the K-1 stored rows plus the new pixel. The
  memories then shift down by one row at that column: `lines[0][col]` takes the
  new pixel, and `lines[i][col]` takes `lines[i-1][col]`. Each memory is read
  and written at a single address per cycle, which suits an FPGA block or
  distributed RAM.
* **A K x K window register per channel.** Each cycle it shifts one column to
  the left, and the column just read enters on the right.

After the pixel at (r, c) arrives, the window holds the K x K block whose
bottom-right corner is (r, c). That block is a whole window inside the image
when `r >= K-1` and `c >= K-1`; `win_valid` is raised in those cases only.
After the first K-1 rows, a valid window appears on every cycle except the
first K-1 cycles of each row.

Taps are numbered `ci*K*K + ky*K + kx` (channel, window row from the top,
window column from the left). The processing elements and the weight store use
the same numbering.

**Reads saved.** `rd_count` reports the reads of the last pass. It is always
`IMG_W*IMG_H`. At the default size that is 1024 reads per pass. Fetching each
window directly would take 784 windows x 25 = 19 600 reads. With C_IN channels
packed in one word, both counts are per word.

**Timing.** The first window comes out `(K-1)*IMG_W + K-1 + 3` cycles after
the cycle in which `start` is sampled. `done` comes `IMG_W*IMG_H + 2` cycles
after that cycle. The image is read again in every pass, once per group of
output channels. On-chip storage therefore stays at K-1 rows no matter how many
channels there are.

## Processing elements

`conv_pe` multiplies all `N = C_IN*K*K` taps in parallel, with 8 x 8 to
32-bit products. An adder tree then sums the products together with the bias.
The PE has two register stages: the products, then the sum. It takes a window
every cycle, and each result comes out two cycles after its window. There are
`PAR_OUT` PEs, all fed the same window; each PE gets the kernels of its own
output channel from `weight_mem`. So the window loop is fully unrolled, and
the output-channel loop is unrolled `PAR_OUT` times.

## ReLU and max pooling

`relu` computes `max(0, x)` through one register stage. When `relu_en` is 0 it
passes the value through unchanged.

`max_pool` pools a stream of values arriving in raster order, with no frame
buffer. The running maximum along a block's P columns is kept in a register.
The running maximum down the block's rows is kept in a row memory of
`OW/P` entries. When the last value of a block arrives (block row P-1,
block column P-1), the block maximum comes out one cycle later. Rows and
columns that do not fill a whole block are dropped. When `pool_en` is 0 every
value passes through, one cycle later.

Pipeline depth from window to result: PE 2 cycles, ReLU 1 cycle, pool 1 cycle.

## Control and timing of a run

`accel_ctrl` captures `cfg` (`relu_en`, `pool_en`) at `start`. Then, for each
group:

1. It selects the group in `weight_mem`.
2. It starts `mem_ctrl` and clears the pooling counters.
3. It writes each result to the output memory at `g*NOUT + index`.
4. It waits until all results are in and the memory controller is idle, then
   waits `DRAIN` more cycles.

`done` pulses for one cycle at the end. `cycle_count` holds the length of the
run, from the `start` edge to `done`. `pass_count` holds the number of passes.

A pass takes about `IMG_W*IMG_H + 14` cycles. At the default size a whole
layer takes 2076 cycles (2 passes). `rd_count`, the memory controller's read
counter, is also brought out of the top.

## Host interface (`cnn_accel_top`)

| Port group | Use |
|---|---|
| `img_we, img_waddr, img_wdata` | Write the input image. Address `y*IMG_W + x`; channel `ci` is in bits `ci*8 +: 8`. |
| `w_we, w_addr, w_wdata` | Write kernels. Address `((co*C_IN + ci)*K + ky)*K + kx`. |
| `b_we, b_addr, b_wdata` | Write the 32-bit bias of channel `co`. |
| `cfg, start` | Start a layer with its ReLU and pooling options. |
| `busy, done` | Run status. |
| `out_raddr, out_rdata` | Read results, with one cycle of latency. Word `g*NOUT + y*OW' + x`; lane `l` (bits `l*32 +: 32`) is channel `g*PAR_OUT + l`. `OW'` and `NOUT` are the pooled map's width and size when pooling is on, and the convolution output's otherwise. |
| `cycle_count, pass_count, rd_count` | Performance counters. |

Do not write the image, kernels or biases while `busy` is high. Reset is
asynchronous and active low.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 32, 32 | Input image size |
| `C_IN` | 1 | Input channels |
| `C_OUT` | 6 | Output channels (kernels) |
| `K` | 5 | Kernel size (K x K) |
| `POOL` | 2 | Pooling block size and stride |
| `PAR_OUT` | 3 | Output channels computed in parallel (PEs) |
| `DATA_W`, `ACC_W` (`cnn_pkg`) | 8, 32 | Data/weight width, accumulator width |

The defaults describe the first convolution layer of LeNet-5: a 32 x 32
grey-scale image, six 5 x 5 kernels and 2 x 2 pooling. At those defaults the
design holds that layer completely. Raising `PAR_OUT` cuts the number of passes
and costs `C_IN*K*K` multipliers per lane. Setting `PAR_OUT = C_OUT` computes
the whole layer in one pass over the image.

## Departures and choices

* **Number format.** Pixels and weights are signed 8-bit integers. Sums are
  exact in 32 bits, with no rounding, scaling or saturation. The output is
  32 bits wide, so results match an integer reference bit for bit. Feeding one
  layer's output into the next layer would need a requantization step, which
  is not built.
* **Window geometry.** Stride is 1 and there is no padding. Layers with larger
  strides (for example AlexNet's first layer) are not supported.
* **Pooling.** The pooling block is `POOL x POOL` with stride `POOL`. Leftover
  rows and columns are dropped.
* **Optional stages.** ReLU and pooling can each be switched off for a run.
* **Weights.** Kernels and biases sit in a register file, which makes all
  weights of a group readable in one cycle. Large layers would want a banked
  block-RAM store instead.
* **Passes.** The input image is re-read in each pass. Reads per pass are
  minimal; reads per layer are `NG * IMG_W*IMG_H`.
* **Host interface.** The memories are loaded and read through plain memory
  ports. There is no bus interface or DMA.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_cnn_pkg` | Pass-count function and type widths |
| `tb_feature_mem` | Read latency and read-before-write |
| `tb_line_buffer` | Every window of two random multi-channel frames, with input gaps |
| `tb_mem_ctrl` | Window contents and order, one read per pixel, first-window and done latencies |
| `tb_weight_mem` | Group or lane selection, and zero lanes past `C_OUT` |
| `tb_conv_pe` | Exact sums and the two-cycle latency at one window per cycle |
| `tb_relu` | Clamping, bypass and latency |
| `tb_max_pool` | Block maxima, the floor rule, bypass and output cycle |
| `tb_accel_ctrl` | Pass sequence, output addresses, held configuration, cycle counter |
| `tb_cnn_accel_top` | End to end on an 11 x 9 x 3 image with five 3 x 3 kernels and 2 lanes (so the last pass is partly used), in three modes |
| `tb_cnn_accel_top_full` | The same checks at the default parameters (LeNet-5 layer 1) |

The two top-level tests count the mechanisms they exercised: multiple passes,
ReLU clamping, negative values with ReLU off, pooling, pooling bypass, and a
partly used group. A test fails if an expected mechanism never occurs. It also
fails if a pass reads any pixel more than once, or if a run takes more than
`IMG_W*IMG_H + 16` cycles per pass.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cnn_pkg.sv \
          tb/tb_cnn_accel_top_full.sv --top-module tb_cnn_accel_top_full
./obj_dir/Vtb_cnn_accel_top_full
```

Use the same command for any other testbench, with its name substituted. To
lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/cnn_pkg.sv
rtl/<module>.sv`.

Verilator reports `SYNCASYNCNET` warnings. They come from the assertions'
`disable iff (!rst_n)` clauses, which read the asynchronous reset
synchronously, and they do not affect the hardware.

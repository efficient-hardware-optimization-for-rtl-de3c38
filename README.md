# Convolution-layer accelerator with unrolled channel and kernel loops

This is an FPGA-style engine for one convolutional layer of a CNN. It
unrolls the two loops that a single output pixel depends on: the loop over
input channels and the loop over kernel positions. Every clock cycle,
`N x K x K` multipliers work on one K x K patch of every input channel at
once. N processing elements (PEs), one per input channel, each reduce their
K x K products with an adder tree. A final adder combines the N partial sums
into one output pixel. A line-buffer and window-buffer cache feeds the PEs
from a plain raster stream of the input. It reads each input pixel from
memory once per output map, and it produces one output pixel per cycle
once its buffers have filled.

The default configuration is the first layer of a small LeNet-style network:

| parameter | meaning                         | default |
|-----------|---------------------------------|---------|
| `N`       | input channels                  | 3       |
| `M`       | output maps (kernel sets)       | 6       |
| `K`       | kernel size (K x K)             | 5       |
| `H`, `W`  | input height, width             | 28, 28  |
| `S`       | stride                          | 1       |
| `P`       | zero padding on each border     | 0       |
| `DATA_W`  | pixel, weight and bias width    | 16      |
| `ACC_W`   | accumulator and output width    | 40      |

The output maps are `R x C` with `R = (H + 2P - K)/S + 1` and
`C = (W + 2P - K)/S + 1`. At the defaults that is 24 x 24.

## What is computed

```
OFM[m][y][x] = max(0, bias[m] + sum over n, ky, kx of
                      IFMp[n][S*y + ky][S*x + kx] * Wt[m][n][ky][kx])
```

`IFMp` is the input with `P` rows and columns of zeros added on every side.
All values are signed two's-complement integers. The caller chooses the
binary point. The products and their sum are kept at full precision in
`ACC_W` bits. The bias is sign-extended and added at the binary point of the
products. The result is stored unrounded and unsaturated. At the default
widths, the worst case is 75 products of 2^30 each, which needs 38 bits, so
40 bits cannot overflow.

## Block structure

```
 load port ──► input_bram (N banks) ──► zero-pad mux ──► i_buffers ──────────┐
          │                                             (line_buffer +       │
          │                                              window_buffer       ▼
          └──► weight_bram ──► w_buffers ─────────────── per channel) ──► computation_unit
                   │ bias                                                 (N x pe + channel adder)
                   └────────────────────────────────────► act_func ◄─────────┘
                                                          (bias + ReLU)
                                                              │
                              conv_ctrl sequences it all      ▼
                                                          ofm_bram ──► host read port
```

* **Input layer.** `input_bram` holds the input maps, one memory bank per
  channel. A single read address therefore returns the same pixel position
  of all N channels together. `weight_bram` holds the `M*N*K*K` kernel words
  and the `M` biases.
* **Data cache unit.** `w_buffers` holds the `N x K x K` kernel of the
  output map being computed, in registers. `i_buffers` holds one
  `line_buffer` and one `window_buffer` per channel (see the next section).
* **Computation unit.** `computation_unit` contains N instances of `pe`.
  Each PE has `K*K` multipliers, a balanced adder tree of `K*K - 1` adders
  and an accumulator register. A registered adder then sums the N PE
  results.
* **Activation.** `act_func` adds the bias of the current map and applies
  ReLU.
* **Output.** `ofm_bram` holds the M output maps.
* **Control.** `conv_ctrl` computes the output maps one after another.

## How the input stream becomes K x K patches

This part takes the most care to follow.

The controller walks the padded image in raster order, one position per
cycle. At each position inside the stored image, it reads the input memory.
At each border position it raises `ifm_pad` instead, and a multiplexer feeds
zeros. The padded zeros are never stored.

For each channel, the pixel stream passes through two buffers:

* **`line_buffer`** is a chain of K-1 shift registers, each one padded row
  long. The tail of register `j` is the pixel exactly `j+1` rows above the
  incoming one. Its K taps therefore form one vertical column of K pixels:
  `taps[K-1]` is the incoming pixel and `taps[0]` is the pixel K-1 rows
  above it.
* **`window_buffer`** is a K x K register array. On every pixel, each row
  shifts left by one place and takes the new column on the right. After the
  pixel at padded position (y, x) has been shifted in, `win[ky][kx]` holds
  the pixel at `(y-K+1+ky, x-K+1+kx)`. That is the patch whose bottom-right
  corner is (y, x).

`i_buffers` counts the raster position and marks a patch valid when all
three of these hold:

1. **Warm-up is over.** At least K-1 full rows have passed (`y >= K-1`).
2. **The row is past its left edge.** At least K-1 columns of the current
   row have passed (`x >= K-1`). Before that, the window still holds pixels
   from the end of the previous row.
3. **The stride grid is met.** `(y-K+1)` and `(x-K+1)` are both multiples
   of `S`.

Outside these conditions the window content is simply ignored. So the line
buffers never need clearing between output maps, because stale rows never
form part of a valid patch. The patch is output together with its
coordinates (`out_y`, `out_x`). These become the output-memory address
`m*R*C + out_y*C + out_x`, which travels down the pipeline with the data.

With stride 1, a valid patch therefore appears on every cycle of the last
`R` rows, except for the first K-1 columns of each row. This gives C
back-to-back output pixels per row.

## Schedule and timing

For each output map `m`, `conv_ctrl` runs three phases:

| phase  | cycles                | what happens                                                                                   |
|--------|-----------------------|------------------------------------------------------------------------------------------------|
| WLOAD  | `N*K*K`               | copies kernel `m` from `weight_bram` to `w_buffers`, one word per cycle; holds the bias address at `m`; restarts the raster |
| STREAM | `(H+2P)*(W+2P)`       | one input position per cycle                                                                   |
| DRAIN  | 6                     | waits until the last result of map `m` is in `ofm_bram`                                        |

The drain keeps map `m+1`'s kernel and bias away from pixels of map `m`
that are still in flight. `start` is taken only while idle. `busy` is high
from the cycle after `start` until `done`. `done` is a one-cycle pulse.
From the cycle `start` is high to the cycle `done` is high, a pass takes:

```
M * (N*K*K + (H+2P)*(W+2P) + 6) + 1  cycles        (5191 at the defaults)
```

The pipeline from an input-memory read to the output-memory write is:

| stage | register                                                 |
|-------|----------------------------------------------------------|
| 1     | `input_bram` read data                                   |
| 2     | `i_buffers` window, valid and coordinates                |
| 3     | `pe` product registers                                   |
| 4     | `pe` adder tree into accumulator                         |
| 5     | `computation_unit` channel sum                           |
| 6     | `act_func` result; written to `ofm_bram` on the next edge |

At the defaults the layer takes `6*3*24*24*25 = 259,200` multiply-accumulates.
At a 100 MHz clock, 5191 cycles is 51.9 µs, or about 5.0 GMAC/s. Almost
all of the time is spent streaming. The pass spends `N*K*K` cycles per map
on reloading kernels, plus the row edges and the warm-up rows that produce
no output.

## Host interface (`cnn_accel_top`)

| port                       | dir | meaning                                                                   |
|----------------------------|-----|---------------------------------------------------------------------------|
| `clk`, `rst_n`             | in  | clock; synchronous active-low reset of the control state                  |
| `ld_valid`, `ld_sel`, `ld_addr`, `ld_data` | in | one word per cycle into the memory chosen by `ld_sel` (`cnn_pkg::ld_sel_e`) |
| `start`                    | in  | begin a layer pass (taken while idle)                                     |
| `busy`, `done`             | out | pass running; one-cycle end-of-pass pulse                                 |
| `ofm_rd_addr`              | in  | `m*R*C + y*C + x`                                                         |
| `ofm_rd_data`              | out | output word, one cycle after the address                                  |

Load addresses:

* IFM (`LD_IFM`): `n*H*W + y*W + x`.
* Weights (`LD_WEIGHT`): `((m*N + n)*K + ky)*K + kx`.
* Biases (`LD_BIAS`): `m`.

Load only while `busy` is low. Memories and data registers have no reset;
only the control state does.

## Design choices, and where this departs from the source design

The block structure follows the source design. So do the unrolling (N PEs
of K x K multipliers each, `(K*K-1)*N` adders in the trees) and the
schedule of one output pixel per cycle for each map in turn. The
following are this design's own choices:

* **Input size and output size.** The source lists 25 x 25 outputs for this
  layer, but its implementation loads a 3 x 28 x 28 input. A 5 x 5 kernel on
  a 28 x 28 input gives 24 x 24 without padding. This design defaults to the
  28 x 28 input and so to 24 x 24 outputs. The 25 x 25 case is the same
  hardware with `H = W = 29`. The stride and padding are not given for the
  layer; they default to 1 and 0.
* **Activation.** The source does not fix the activation function. ReLU is
  used. The bias is added just before the activation.
* **Cross-channel adder.** The adder that combines the N PE results is not
  drawn in the source's PE diagram. It is added here, with its own pipeline
  register.
* **PE accumulator.** Each PE keeps the accumulator (adder plus register
  with feedback) of the source's PE. In this schedule each patch is a
  complete channel contribution, so the top clears it on every patch
  (`acc_clr = 1`). The accumulate path works and is tested in the PE alone.
* **Memories and control.** Widths, memory partitioning (by channel), the
  word-serial kernel load, the load port, the address orders, the
  controller state machine and the drain are all this design's own.
* **Padding.** Padding is generated on the fly rather than stored.
* **Cycle count.** The source's own high-level-synthesis build of this
  structure takes about 1.8 million cycles for the layer. This RTL keeps the
  pipeline full and takes about 5,200.
* **Not built.** The source's sequential baseline is not part of this
  design: one multiplier and one accumulator doing all MACs in turn. Nor are
  pooling and fully connected layers, which the source describes only as
  CNN background.

## Files

`rtl/` (synthesizable; one module or package per file):

| file                   | contents                                                           |
|------------------------|--------------------------------------------------------------------|
| `cnn_pkg.sv`           | default sizes, load-target enum, output-size function              |
| `cnn_accel_top.sv`     | the accelerator                                                    |
| `conv_ctrl.sv`         | pass sequencer                                                     |
| `input_bram.sv`        | channel-banked input memory                                        |
| `weight_bram.sv`       | kernel and bias memories                                           |
| `i_buffers.sv`         | line + window buffers per channel, valid and coordinate logic      |
| `line_buffer.sv`       | K-1 row shift registers, K-tap column                              |
| `window_buffer.sv`     | K x K shifting window                                              |
| `w_buffers.sv`         | kernel registers                                                   |
| `pe.sv`                | K x K multipliers, adder tree, accumulator                         |
| `computation_unit.sv`  | N PEs and the channel adder                                        |
| `act_func.sv`          | bias + ReLU                                                        |
| `ofm_bram.sv`          | output memory                                                      |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
one compares the module with a model computed in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`. In addition:

* `tb_cnn_accel_top.sv` runs a full pass at the default size with random
  16-bit data. It checks every output word, the exact pass length, one
  output per cycle along each row and `R*C` results per map. It also checks
  that warm-up, kernel reloads, row changes and ReLU clamping all occurred.
* `tb_cnn_accel_workloads.sv` uses `conv_run.sv` to run three shapes side by
  side:
  * the 25 x 25-output layer (29 x 29 input);
  * the 28 x 28 layer with 2 pixels of padding (28 x 28 output);
  * a small layer with stride 2 and padding 1.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnn_pkg.sv \
    tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top -Mdir obj_top
./obj_top/Vtb_cnn_accel_top
```

Replace `tb_cnn_accel_top` with any other testbench name to run that test.
Every testbench finishes in well under a second. The simulator is
two-state; the testbenches initialise or reset everything they read.

## Changing it

All sizes are parameters of `cnn_accel_top` with defaults from `cnn_pkg`,
and every sub-block derives its widths from them. To change the layer,
override `N, M, K, H, W, S, P`. Note the following:

* `ACC_W` must hold `2*DATA_W + ceil(log2(N*K*K))` bits plus one for the
  bias.
* The cross-channel adder and the PE adder trees are single-cycle
  combinational trees. For large `N*K*K` at high clock rates, add pipeline
  registers there. If you do, increase `PIPE` and `ADLY` in
  `cnn_accel_top` to match.
* The line buffers are registers, `(K-1) * (W+2P)` words per channel. For
  wide images, a memory-based line buffer would be cheaper.

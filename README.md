# Tiny Darknet layer accelerator for a Zynq-class FPGA

This is a small accelerator that runs the Tiny Darknet image classifier
(224 x 224 RGB input, 1000 classes) one layer at a time. The ARM processor on the
same chip keeps the network's parameters, sends one layer's work to the FPGA fabric
and reads the result back. All values are 8-bit signed fixed point, packed four
to a 32-bit word, so every transfer over the 32-bit bus carries four values. Inside
the fabric a single pipelined loop engine does 3x3 and 1x1 convolutions, 2x2
max-pooling and global average pooling. It completes one loop iteration (a
"tap") per clock cycle. A small separate unit computes the final softmax.

The design deliberately holds very little on chip. Whole-network feature maps
reach 800 KB, which is more block RAM than a ZedBoard-class device has. Only the
current layer's input map and one filter's weights stay in the fabric, and the
host chains the layers.

## System view

```
 ARM (Linux, network parameters, images)
        |  32-bit AXI + DMA, through a vendor FIFO bridge core (not included)
        v
 h2f_wr_en/h2f_data/h2f_full          f2h_rd_en/f2h_data/f2h_empty
        |                                        ^
   app_fifo (in, 512 x 32)                 app_fifo (out, 512 x 32)
        |                                        ^
   layer_ctrl ──> banked_buffer (map, 401,408 B)  |
        |    └──> banked_buffer (filter, 576 B)   |
        |              | 1 byte/cycle each        |
        └──tags──> reduce_pipe ──byte──> byte_pack
        └─start──> softmax_unit ─(reads map buffer)─┘
```

`cnn_accel` is the top. Its ports are the FIFO signals that the host's bridge core
drives: a write strobe, data and `full` into the input FIFO, and a read strobe,
data and `empty` from the output FIFO, where the data arrives one cycle after the
read strobe. The top also brings out three status signals. `busy` is high while a
layer runs. `layer_done` is a one-cycle pulse after a layer's last output word is
in the FIFO. `hdr_error` is sticky and reports a layer that does not fit the
buffers. The design uses one clock and a synchronous, active-high reset.

## What the host sends for one layer

Everything is 32-bit words. When a word holds bytes, value *n* sits in bits
`8n+7:8n`, and the last word of a block is filled with zeros.

| order | content |
|---|---|
| 1 | header word 0: `[1:0]` kind (0 conv, 1 max-pool, 2 average, 3 softmax), `[2]` 3x3 kernel (else 1x1), `[3]` leaky activation, `[8:4]` shift (for softmax: fraction bits of the scores), `[19:9]` input channels, `[30:20]` output channels |
| 2 | header word 1: `[8:0]` height, `[17:9]` width |
| 3 | input map, `in_ch x height x width` bytes in channel, row, column order |
| 4 | convolution only, repeated for each output channel: one bias word (signed 32-bit), then that filter's `in_ch x K x K` weight bytes in channel, kernel-row, kernel-column order |

The results come back packed in the same way, in channel, row, column order:

- a convolution returns `out_ch x H x W` bytes;
- a max-pool returns `in_ch x H/2 x W/2` bytes;
- an average pool returns `in_ch` bytes;
- a softmax (sent as an `in_ch x 1 x 1` map) returns `in_ch` unsigned
  probabilities in units of 1/256.

Weights stream in per output channel, so the FPGA never needs more than one filter
at a time. This matters for layer 19, whose weights come to 128 KB in total.

## The loop engine

The reference computation for a convolution is the six-deep loop nest

```
for o, for i, for x, for y, for u, for v:  out[o][x][y] += in[i][x+u][y+v] * w[o][i][u][v]
```

The engine runs the loops in the order o, x, y, i, u, v. Each output value is then
finished before the next one starts, so it can be written straight to the output
stream without an output buffer. The pooling layers reuse the same counters:

| kind | outer loops (one output each) | taps per output |
|---|---|---|
| conv KxK | row, column (output channel = current filter) | in_ch x K x K |
| max 2x2/2 | channel, row, column | 4 (the window) |
| average | channel | height x width |

The loop body is pipelined into three one-cycle stages, with a new tap entering
every cycle:

1. **READ** (`layer_ctrl`) computes the byte address `ch*H*W + row*W + col` and
   the weight index, and reads both buffers. It also marks whether the tap is the
   first or last of its output, and whether it falls in the one-pixel zero border
   of a 3x3 kernel (a *pad* tap).
2. **COMP** (`reduce_pipe`) applies the operation for the layer kind:
   - convolution: `acc = first ? a*w : acc + a*w`, with pad taps contributing 0;
   - max-pool: a running maximum;
   - average pool: a running sum.
3. **WRITE** (`reduce_pipe`) turns the finished accumulator into one byte, which
   `byte_pack` adds to the outgoing word.

When the output FIFO is full, `stall` freezes all three stages. The buffers' read
registers are frozen as well, so no tap is lost or repeated. The loads don't
overlap with computation. After the last tap of a filter, the controller waits
two cycles for the pipeline to empty, then reads the next bias and filter. At the
end of a layer it flushes a partly filled output word.

A convolution layer therefore takes about

    taps + map_words + out_ch x (1 + filter_words) + ~5 x out_ch + a few

cycles. For example, Tiny Darknet layer 0 (224 x 224, 3 -> 16 channels, 3x3) takes
21,713,846 cycles for 21,676,032 taps. All 21 layers together come to about 495
million cycles, or roughly 5 s per image at 100 MHz. The clock rate is assumed;
nothing here has been through place and route.

## Fixed-point arithmetic

Inputs, weights and outputs are signed 8-bit. The convolution's multiply-accumulate
uses a 32-bit accumulator, and the bias is a signed 32-bit word. A convolution
output is produced in three steps:

1. `v = (sum + bias + 2^(shift-1)) >> shift`, an arithmetic shift that rounds to
   nearest with ties going up (no rounding term when `shift` = 0);
2. if the layer is leaky and `v < 0`, then `v = (13 * v) >> 7`, a slope of about
   0.1;
3. saturate `v` to [-128, 127].

The average pool returns `sum / (H*W)`, rounded to nearest with ties away from
zero. Max-pool returns the maximum unchanged.

The host is expected to fold batch normalisation into the weights and bias, and
to pick each layer's `shift` from its quantisation scales.

## Softmax

The last layer turns the 1000 averaged class scores into confidences. The host
sends the scores back as a kind-3 layer, and `softmax_unit` borrows the
map buffer's read port for three passes of one byte per cycle:

1. it finds the maximum score `m`;
2. it sums `e_i = 2^16 * exp(-(m - x_i) / 2^F)`, where `F` is the header's shift
   field read as the scores' fraction bits;
3. it divides once, `R = 2^40 / sum`, with a 41-cycle restoring divider, then
   emits `min(255, round(e_i * R / 2^32))` for every score.

Each exponential is computed as a power of two. The unit first forms
`t = (m - x_i) * log2(e) / 2^F` in 16-bit fixed point. The top eight fraction
bits of `t` index a 256-entry table of `2^(-k/256)`, and the integer part of `t`
becomes a right shift. The table is computed during elaboration. Because the
maximum is subtracted first, every `e_i` lies in [0, 2^16] (the largest score
gives exactly 2^16), so the sum cannot overflow. Against floating point the result is within two 1/256 units. A softmax
over 1000 scores takes about 3,050 cycles, plus its stalls.

## Buffers and sizes

| parameter | default | why |
|---|---|---|
| `FMAP_BYTES` | 401,408 | largest convolution input in Tiny Darknet (layer 6: 56 x 56 x 128) |
| `WBUF_BYTES` | 576 | largest filter (layers 15 and 17: 64 x 3 x 3) |
| `FIFO_DEPTH` | 512 | 32-bit words per direction |

Both buffers are `banked_buffer` instances, split cyclically into four byte-wide
banks. A packed word from the FIFO is therefore stored in one cycle, and the
engine reads one byte per cycle. Together with the two FIFOs, the buffers come to
about 100 of the 140 36-Kb block RAMs of a ZedBoard's Zynq-7020 (about 71 %).
They would not fit a Zybo Z7-10 (270 KB of block RAM).

One Tiny Darknet layer is too large for the map buffer: the first max-pool (layer
1) has an 802,816-byte input. Max-pooling treats every channel on its own, so the
host sends that layer as two 8-channel halves. Every other layer fits whole.
`hdr_error` rises if a header asks for more than the buffers hold.

## Files

The files are in `rtl/`:

| file | content |
|---|---|
| `cnn_pkg.sv` | shared types: header structs, layer-kind enum, requantisation functions |
| `app_fifo.sv` | synchronous FIFO (parameter `SHOW_AHEAD` selects the read timing), with overflow and underflow assertions |
| `banked_buffer.sv` | four-bank byte buffer |
| `layer_ctrl.sv` | header, loads, loop nest, READ stage |
| `reduce_pipe.sv` | COMP and WRITE stages |
| `softmax_unit.sv` | final softmax layer |
| `byte_pack.sv` | packs result bytes four to a word |
| `cnn_accel.sv` | top |

## Simulation

The testbenches are in `tb/`. Each one checks itself and ends with a line
`TB_RESULT checks=N failures=M`. `cnn_ref_pkg.sv` holds an integer reference
model of convolution and pooling, a floating-point softmax, and the host-side
stream builder.

| testbench | what it does |
|---|---|
| `tb_app_fifo` | random traffic in both FIFO modes against a queue model; checks the flags |
| `tb_banked_buffer` | word writes and byte reads, including the read-hold behaviour |
| `tb_byte_pack` | runs of random length, checks the flush |
| `tb_reduce_pipe` | random taps, stalls and configurations for all three kinds; checks values and the one-cycle latency |
| `tb_layer_ctrl` | checks the buffer writes and the exact sequence of issued taps against an independently written loop nest, and the hand-over to the softmax unit |
| `tb_softmax_unit` | score vectors of 1 to 1000 entries, stalled and unstalled, against floating point |
| `tb_cnn_accel` | end to end: a small seven-layer network (conv 3x3 leaky, max-pool, conv 1x1, conv 3x3 with saturation, conv 1x1 linear, average pool, softmax), chained through the host; pauses the reader to force output stalls; counts every mechanism; checks the cycle count of each convolution |
| `tb_cnn_accel_full` | the top at default parameters on full-size Tiny Darknet layers: 0, 1 (as two halves), 6 (fills the map buffer exactly), 8 filters of 15 (fills the filter buffer), 20 and 21; about 30 M cycles, 20 s of simulation |
| `tb_cnn_accel_net` | the whole 224 x 224 network, layers 0 to 21, each layer's output fed back as the next one's input, with random weights; every output of every layer checked; about 495 M cycles, 6 minutes of simulation |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_accel.sv --top-module tb_cnn_accel
./obj_dir/Vtb_cnn_accel
```

The simulator has no X state, and the buffers are not reset. They are always
written before they are read.

## How far it can be trusted, and what is this design's own

The following points come from the Tiny Darknet network and the system it runs in:

- the network structure (layer kinds, kernel sizes, strides, map sizes);
- the FIFO interface, with `full` and `wr_en` on the write side and `empty` and
  `rd_en` on the read side;
- the 32-bit bus carrying four 8-bit values per word;
- 8-bit fixed-point data;
- loop pipelining, with read, compute and write overlapped;
- input buffers partitioned for more ports;
- network parameters held by the host.

These points are this design's own choices:

- the split of work into one layer per transaction;
- the stream and header format;
- the loop order and the throughput of one MAC per cycle;
- the buffer sizes and FIFO depth;
- the rounding, the shift-based scaling, the leaky slope of 13/128, zero padding
  for 3x3 kernels and the average-pool rounding;
- the fixed-point softmax method and its 8-bit output format. The network names
  a softmax layer but does not say how it should be computed.

The original accelerator was produced by high-level synthesis from C++. This RTL
is a hand-written equivalent of that computation, not a copy of generated code.
Its cycle counts are therefore not comparable to the original measured prediction
time of about 27 s, which includes host-side work.

The reference model is a separate integer implementation of the same arithmetic
rules, and the RTL matches it on every value tested. That includes a complete
full-size pass through all 22 layers. The softmax is instead checked against
floating point, within two units. The tests do not compare against a
floating-point Darknet, so accuracy against the original network is not
established here. The design has been linted and elaborated, but it has not been
timed, placed or run on hardware.

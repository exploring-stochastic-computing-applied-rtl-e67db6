# Modified LeNet-5 on sequential fixed-point logic, with a stochastic-computing multiplier

This RTL classifies one 28x28 handwritten digit (MNIST format) using a cut-down
LeNet-5. The network has two 5x5 convolution layers with four filters each, two
2x2 max-pool layers and one dense layer of ten neurons. It was built as the
first step towards a network that computes with stochastic bitstreams, so it is
deliberately plain:

- Every layer is one multiply-accumulate (or one comparison) per clock.
- The layers run one after another.
- Each layer writes all of its results to its own RAM before the next layer
  starts.

Next to the network sits a small stochastic-computing circuit. It multiplies two
8-bit numbers by turning them into random bitstreams, ANDing the streams and
counting the ones. It is the building block that a stochastic version of the
layers would use. It is not wired into the network.

The design does not include trained weights. The ROMs are empty unless you load
them, and the biases default to zero. All tests use random images and weights
and compare every layer's result with an integer reference model.

## Top level

`sc_cnn_top` holds two independent circuits that share only `clk` and `rst_n`
(active low):

| port | dir | width | meaning |
|---|---|---|---|
| `class_o` | out | 10 | one-hot class (bit i = digit i), valid when `cnn_done` |
| `data_out` | out | 19 | D6 value of the winning neuron, signed Q.5 |
| `c1_count2304` | out | 12 | number of C1 results written so far (progress indicator) |
| `state` | out | 3 | layer being run: 0 C1, 1 S2, 2 C3, 3 S4/F5, 4 D6, 5 classification |
| `cnn_done` | out | 1 | classification finished; stays high |
| `sc_start` | in | 1 | one-cycle pulse that starts a stochastic multiplication |
| `sc_x`, `sc_y` | in | 8 | operands, standing for x/255 and y/255 |
| `sc_ones`, `sc_zeros` | out | 8 | ones and zeros counted in the product stream |
| `sc_done` | out | 1 | 255 clocks after `sc_start`; held until the next start |

Releasing reset starts one classification. The controller classifies one image
per reset.

## Number format and layer widths

- Pixels, weights and biases are 8-bit signed fixed point with 5 fraction bits
  (Q2.5). The range is -4.0 to +3.97.
- A pixel times a weight has 10 fraction bits.
- After a window's sum is complete, `bias_add` does the following:
  - shifts the sum right by 5 (arithmetic shift, so it rounds toward minus
    infinity);
  - adds the 8-bit bias;
  - clamps the result to the layer's width.
- Every stored value therefore keeps 5 fraction bits and grows only in its
  integer part.

| stage | stored width | memory |
|---|---|---|
| image | 8 | ROM, 784 words |
| C1, S2 | 13 | RAM_C1 2304 words, RAM_S2 576 words |
| C3, S4/F5 | 16 | RAM_C3 1024 words, RAM_S4 256 words |
| D6 | 19 | RAM_D6 10 words |

These widths are the bus widths the network was specified with. Another table
of the original gives Q8.5, Q11.5 and Q19.5, which is wider. This design uses
the 13/16/19-bit buses. With trained weights the extra integer bits are meant
to make overflow impossible. With random test data the saturation in `bias_add`
keeps the arithmetic defined, and the reference model clamps in the same way.

The accumulators in `mac_block` are as wide as the largest possible sum. For
example, C1 uses 8+8+5 = 21 bits. The sum never wraps before the rescale.

## The layer pipeline

Each compute layer is the same chain. Only the address generator and the
combining block differ:

```
address gen --> input RAM/ROM --+
            --> weight ROM  ----+--> MAC (2 accumulators) --> bias_add --> ReLU --> FIFO --> RAM writer --> output RAM
```

- **Convolutions** (`conv_layer`: C1, C3) use `conv_addr_gen`, `mac_block`,
  `bias_add`, `relu`, `sync_fifo` and `fifo_ram_writer`.
- **Pools** (`pool_layer`: S2, S4/F5) use `pool_addr_gen`, `maxpool`,
  `sync_fifo` and `fifo_ram_writer`.
- **Dense** (`dense_layer`: D6) uses `dense_addr_gen`, `mac_block` with
  N_TERMS = 256, `bias_add`, `sync_fifo` and `fifo_ram_writer`. It has no ReLU:
  the class is the arg-max of the raw sums.

The memories (`sync_rom`, `sdp_ram`) sit outside the layers, in `lenet5_cnn`.
All of them have a one-clock registered read. Each layer RAM is written by the
layer that produces its contents and read by the layer after it.

### The two-accumulator MAC

`mac_block` has two accumulators. Each incoming product carries an index,
`k_elm`, from 1 to N:

- `k_elm` = 1 loads the selected accumulator with the product instead of
  adding to it.
- `k_elm` = N completes the sum. The block then does two things:
  - the output multiplexer points at the finished accumulator and `out_valid`
    pulses;
  - the input demultiplexer switches the next sum to the other accumulator.

The output therefore holds a finished sum while the next one is being
collected. No clear cycle is needed between windows.

### Why a FIFO before every RAM

The compute chain produces a result every 26 clocks (convolution) or every 4
clocks (pooling), with a few clocks of pipeline delay. The RAM writer writes at
its own pace to addresses 0, 1, 2 and so on. The FIFO (depth 8) separates the
two. A result is never dropped or written twice, and the write address is
simply the count of results so far. That count is what `c1_count2304` shows for
C1. Assertions in `sync_fifo` flag any overflow or underflow.

## Address generation

The network's layout in memory is fixed. The address generators walk it as
follows.

**C1** (`conv_addr_gen`, IMG_W 28, one channel, 4 filters):

- For each output pixel it issues a 5x5 window of image addresses: 0..4, then
  a jump of 24 to 28..32, and so on.
- Alongside, it issues weight addresses f*25 .. f*25+24. Filter 0 starts at
  0x00, then 0x19, 0x32 and 0x4B.
- Loop order, outermost first: filter, output row (24), output column (24).
- After the 25th term it spends one idle cycle moving to the next window. That
  gives 26 clocks per output and 4 x 576 x 26 = 59,904 clocks for the layer.

**C3** (`conv_addr_gen`, IMG_W 12, 4 channels, 4 filters):

- The generator is the same, except that each input channel is convolved
  separately with its own four filters.
- Channel ch starts at ch x 144: 0x000, 0x090, 0x120, 0x1B0.
- The weights of (ch, f) start at (4ch + f) x 25.
- Loop order: channel, filter, row (8), column (8).
- The 16 output maps are stored in the order map = 4ch + f.

**S2 and S4** (`pool_addr_gen`):

- Each output issues the four addresses of its 2x2 block in the order
  top-left, top-right, bottom-left, bottom-right. For a 24-wide map these are
  0x00, 0x01, 0x18, 0x19, then 0x02, 0x03, 0x1A, 0x1B, and so on.
- The slot number `mp_cont` tells `maxpool` where each value goes. The maximum
  is emitted after the fourth value.
- S4 reads the 16 maps of 8x8 in order, so its 256 outputs are already the
  flattened vector that the dense layer expects. The flatten step (F5) needs no
  logic.

**D6** (`dense_addr_gen`):

- For neuron n it reads all 256 flattened inputs j = 0..255.
- It pairs input j with weight n x 64 + (j mod 64). Neuron n's weights start
  at n x 0x40.
- In other words, each neuron has 64 weights, reused for each of the four
  64-value quarters of the input vector. This is how the original network is
  defined, and it keeps the dense ROM at 640 bytes.

## Sequencing and timing

`layer_controller` is a six-state Moore machine:
CONV1 -> MAXP1 -> CONV2 -> MAXP2 -> DNSE1 -> CLASS.

- In each state exactly one layer's enable is high.
- The machine moves to the next state on that layer's `done`.
- A layer starts on the rising edge of its enable.
- Its RAM writer raises `done` after it has written the last word.
- CLASS is final.

`classification` reads the ten D6 words and keeps the largest (signed). On a
tie the lower index wins. It then drives `class_o`, `data_out` and `done`. The
address it reads is delayed by one clock so that it lines up with the RAM's
registered output.

Clock cycles per layer, measured at the top level:

| layer | this RTL | reference cycle table |
|---|---|---|
| C1 | 59,911 | 59,909 |
| S2 | 2,310 | 2,306 |
| C3 | 26,631 | 26,627 |
| S4/F5 | 1,030 | 1,030 |
| D6 | 2,567 | 2,572 |
| classification | 12 | - |
| total, reset to `cnn_done` | 92,461 | |

The reference numbers are the cycle counts published for the original
implementation. The small differences come from this design's pipeline depths.
The published counts imply 26 clocks per convolution output and one clock per
pool or dense term, and the generators use exactly those rates. The full-size
testbenches check every layer within 12 clocks of the reference.

## The stochastic multiplier

`sc_mult` is built from three kinds of block:

- **Two `bin2sto` converters.** Each is an 8-bit LFSR (`lfsr`) and a
  comparator. The bit is `a >= lfsr`, so an 8-bit value `a` gives a stream whose
  fraction of ones is about a/255.
  - The LFSR is a Fibonacci register with taps 8, 6, 5, 4. The new bit is the
    XOR of stages 4, 5, 6 and 8 and enters stage 1.
  - It steps through all 255 non-zero states.
  - The two converters start from the seeds 59 (`00111011`) and 139
    (`10001011`) so that their streams are not correlated.
- **An AND gate.** It multiplies the two streams: P(a AND b) = P(a) P(b) for
  independent streams.
- **A `sto2bin` converter.** It has one counter for ones and one for zeros.

A `sc_start` pulse reloads the seeds and clears the counters. After 255 clocks
`ones`/255 approximates (x/255)(y/255), and `sc_done` rises.

The length is the parameter LEN (default 255). Over a full LFSR period a single
stream is exact: with y = 255 the ones count equals x. The product is not
exact, because the two streams come from LFSRs of the same period and are only
roughly independent. Across the 9x9 grid of operands 0.1..0.9 the error stays
well inside ±0.05 of x·y.

The grid results of the original hardware could not be matched bit for bit.
Its tables show small differences (for example, a 0.2 stream over 255 bits that
is not exact), which point to a different LFSR phase or comparator convention.
The tests therefore check each result against an independent bit-level model of
the circuit described above, plus the accuracy bound.

## Loading weights and images

- **ROMs.** Each `sync_rom` has a string parameter `INIT_FILE`. A non-empty
  name is read with `$readmemh` at start-up. The default is empty, which gives
  an all-zero ROM. For simulation you can also write the `mem` array of each ROM
  before releasing reset, as the testbenches do:
  - `u_cnn.u_rom_img.mem` holds 784 pixels, row by row.
  - `u_cnn.u_rom_c1w.mem` holds 100 weights, filter by filter, each 5x5 row by
    row.
  - `u_cnn.u_rom_c3w.mem` holds 400 weights, in the order channel, filter,
    5x5.
  - `u_cnn.u_rom_d6w.mem` holds 640 weights, neuron by neuron, 64 each.
- **Biases.** They are parameters of `lenet5_cnn`: `C1_BIAS` (32 bits),
  `C3_BIAS` (32 bits) and `D6_BIAS` (80 bits). Bias i occupies bits
  [8i+7:8i].
- **C3 filters.** All four input channels use the same four C3 biases: bias f
  belongs to filter f.

## Simulating

Every testbench is self-contained. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- generates its own data, except `tb_sync_rom`, which reads
  `tb/tb_sync_rom.hex`.

Run the commands from the directory that holds `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sc_cnn_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cnn_pkg.sv tb/tb_sc_cnn_top.sv
./obj_dir/Vtb_sc_cnn_top
```

Replace `tb_sc_cnn_top` with any other testbench name. The package must be
listed first.

| testbench | what it runs |
|---|---|
| `tb_sc_cnn_top` | Top level at default parameters. One full classification plus several stochastic multiplications. Every layer RAM, `class_o` and `data_out` are compared with the reference model in `tb/cnn_ref.svh`, with cycle counts per layer and counts of each mechanism: layer hand-overs, ReLU clipping, both MAC accumulators, pooling, classification. About 12 s. |
| `tb_lenet5_cnn` | Full network with non-zero biases and the same checks. |
| `tb_sc_mult` | The 9x9 product grid and end points, with latency. |
| `tb_sc_conversion` | Conversion error against stream length 8..255 for 0.0157, 0.2, 0.498, 0.8 and 0.9843. Prints the error per length. |
| `tb_conv_layer`, `tb_pool_layer`, `tb_dense_layer`, `tb_classification` | Each layer alone, with its memories, at reduced sizes. |
| `tb_<block>` for the rest | Unit tests: address sequences, MAC, bias/saturation, ReLU, max-pool, FIFO, RAM writer, memories, LFSR sequence, converters, controller. |

`cnn_ref.svh` is the reference: a plain integer model of the whole network with
the same shift, bias and clamp.

## Departures and choices

- **Rounding.** Rescaling truncates toward minus infinity, and every layer
  saturates. The original does not specify either.
- **Pipeline gap.** The idle cycle per convolution window and the FIFO depth of
  8 are choices of this design. The gap was picked so that the cycle counts
  match the published ones.
- **Tie-break.** Classification breaks ties toward the lower index, and
  `class_o` is one-hot.
- **One image per reset.** The controller stops in CLASS. To classify another
  image, load it and reset again (about 92,500 clocks per image).
- **Memory writes.** The published implementation lost and shifted words when
  writing the C1 results. This design's writer takes one FIFO word per clock and
  writes it at the next sequential address one clock later. The testbenches
  check every RAM word, so that failure does not occur here.
- **Not built.** The ideas for stochastic versions of the convolution, pooling
  and ReLU layers are only surveyed, not designed, so none of them are built.
  The FPGA board and its I/O are not part of the RTL.

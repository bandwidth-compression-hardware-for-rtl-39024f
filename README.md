# Bandwidth compressor for FPGA stream computing

A stream-computing accelerator (for example a lattice-Boltzmann fluid solver)
reads every grid point from external memory, updates it in a deep pipeline and
writes it back in each time step. Its speed is set by the memory bandwidth,
not by its arithmetic. This design sits between the memory and the computing
core and moves compressed data over the memory interface:

- On the write path, every channel's float stream is compressed losslessly.
  The blocks of all channels are merged into one memory stream.
- On the read path, that stream is split back into channels and decompressed.
  The core receives one complete grid point (one value per channel) per cycle.

With 30 channels of 32-bit floats at 150 MHz the core needs 18 GB/s. The
memory delivers about 8 GB/s. At a typical compression ratio of about 2.6 the
compressed stream fits.

The RTL follows the area-oriented design of a published thesis on bandwidth
compression hardware, in the multi-channel configuration that thesis built
around a 2D lattice-Boltzmann core. The computing core and the memory
controllers are not part of this RTL. Their streams are ports of the top
module, `bwc_top`.

## The per-value algorithm

Every channel is compressed on its own. Each step handles one 32-bit value:

1. **Binary translation (`btu`).** A float's bit pattern does not order like
   its value, so the pattern is mapped to an unsigned integer F that does.
   For a positive value the sign bit is set. For a negative value all bits are
   inverted. Close floats then become close integers. `ibtu` undoes this.
2. **Prediction (`predictor`).** The value is predicted from the previous four
   translated values with the cubic extrapolation
   `P = 4·F[i-1] − 6·F[i-2] + 4·F[i-3] − F[i-4]`. The arithmetic wraps modulo
   2^32, and the history starts at zero. The coefficients are binomial
   coefficients of the `ORDER` parameter. They are constants, so the unit is
   shifts and adds.
3. **Difference (`dcu`).** The unit outputs `D = |P − F|` and a flag `ex`
   that is set when P > F. `dru` inverts this in the decompressor:
   `F = ex ? P − D : P + D`.
4. **Residual length (`lrbu`).** LRB, the length of residual bits, is W minus
   the number of leading zeros of D. The count is built from 4-bit leading-zero
   units (`lzcu4`), a 16-bit level (`lrbu16`) and a segment selector (`lss`).
   W may be 16, 32 or 64.
5. **Limited length (`llrb_enc`).** Rather than storing the exact length,
   each residual is rounded up to one of three lengths, L1/L2/L3 = 8/16/32
   bits, using a 2-bit code (1, 2, 3). Code 0 is reserved as the block
   terminator.

So a value costs 3 bits (code and ex) plus 8, 16 or 32 residual bits. That is
11 bits at best and 35 bits at worst.

## Compressed data block (CDB)

All compressed data travels in 512-bit blocks. Each block holds data of one
channel only:

```
 511      507 506                    369 368                          0
+------------+-------------------------+-------------------------------+
| channel    | LRB-ex field            | residual field                |
| number (5) | 46 entries x 3 bits     | 369 bits, residuals packed    |
|            | entry i = {code, ex}    | from bit 0 upwards            |
+------------+-------------------------+-------------------------------+
```

- Entry i of the LRB-ex field sits at bits `369 + 3i`, with `ex` in its bit 0.
- The number of entries is `N = floor((512 − 5 − 1) / (3 + L1)) = 46`: the most
  values of the shortest length that fit.
- The residual field takes the rest. An unused entry is `000`, which ends the
  block.

Keeping the two fields apart is the main idea of the area-oriented design:

- **Compressor (`vfc`).** The LRB-ex buffer always advances by 3 bits. Only
  the residual buffer needs a variable shift. Residual lengths are all
  multiples of 8, so its write pointer counts bytes and its shifter moves in
  8-bit steps. The residual buffer is also divided into 32-bit regions. The
  pointer's upper bits choose a region, and its lower bits (0 to 3 bytes)
  drive a shifter only 64 bits wide. The shifted window is ORed into the
  chosen region and the region above it.
- **Decompressor (`fvc`).** The next value is always in the bottom 3 bits of
  the LRB-ex buffer and the bottom bits of the residual buffer. After each
  value both buffers shift by a fixed amount (3, and 8, 16 or 32). There is no
  barrel shifter and no pointer.

At most 46 values fit in a block, so the best possible ratio is
32·46/512 = 2.875.

## Compressor and decompressor pipelines

`compressor` has four stages:

1. translation and prediction;
2. difference;
3. residual length and code;
4. the variable-to-fixed converter.

All stages share one enable, and the compressor takes one value per cycle.

- **Closing a block.** When a value does not fit, the converter raises
  `cdb_valid` with the full block and stops taking data until the block is
  taken. The waiting value enters the emptied buffers in the cycle the block
  leaves. The input therefore loses exactly one cycle per block (about 2 % for
  46-value blocks).
- **Flush.** `flush` closes a partly filled block at the end of a stream, once
  the first three stages are empty.

`decompressor` has three stages:

1. `fvc`;
2. prediction and reconstruction;
3. inverse translation.

Stage 2 is a one-cycle loop: the reconstructed F enters the predictor history
in the same cycle it is produced. This is why the cubic predictor, which needs
only registers, suits a one-value-per-cycle decoder.

- **Rate.** A new block is loaded in the cycle that hands out the last value
  of the previous one, so output runs at one value per cycle across block
  boundaries.
- **Latency.** Three cycles from the block load to the first value.

Both sides start from a zeroed history. A stream must therefore be
decompressed from its start, with the same block boundaries the compressor
produced.

## Many channels: serializer, deserializer and synchronisation

The core consumes and produces all channels of a grid point together. Channels
compress differently, though: a smooth field fills a block with 46 values, a
noisy one with as few as 14. Handing out memory bandwidth round-robin would
starve the poorly compressed channels. Instead, blocks are stored in memory in
the order they were produced.

**Write side (`mcs`, multi-channel serializer).**

- The compressors of all channels take a grid point together.
- Each compressor raises a request when it has a full block.
- A tree of `mcs_sel` nodes, four inputs each with one register per level,
  merges the requests into the write stream.
- Each node takes a snapshot of the requests present, serves them lowest port
  first, and only then takes a new snapshot. A channel that fills blocks
  quickly therefore cannot lock out the others.
- The 30-channel tree has three levels and passes one block per cycle.

**Read side (`mcd`, multi-channel deserializer).**

- Blocks come back in production order.
- A tree of `mcd_demux8` nodes routes each block by the channel number in its
  top 5 bits. Each level decodes one octal digit.
- Each channel's decompressor is fed through an 8-block FIFO (`sync_fifo`).
- The core's input is valid only when every decompressor has a value, and
  then all decompressors advance together.
- The FIFOs absorb the skew between production order and consumption order.
  A channel whose next block arrives early holds it while the grid point
  waits for slower channels.

**Uncompressed route.** The first iteration reads uncompressed initial data
and the last writes uncompressed results. With `bypass` high, two gearboxes
(`width_conv`) carry the data around the compressors:

- 512-bit memory words become 960-bit grid points, and 960-bit grid points
  become 512-bit words.
- Channel 0 is in the low bits.
- `bypass` should change only while both routes are idle.

**Measurement.** Two `cycle_counter`s count operating cycles and transfer
cycles on the core's input and output. Transfer cycles times 960 bits, divided
by the operating time, gives the bandwidth seen by the core. Comparing it with
the bytes moved on the memory side gives the achieved compression ratio.

## Parameters of `bwc_top`

| Parameter    | Default | Meaning |
|--------------|---------|---------|
| `NCH`        | 30      | channels (three 10-channel LBM cores) |
| `W`          | 32      | bits per value (single precision) |
| `W_OUT`      | 512     | memory word and block width |
| `W_I`        | 5       | channel-number bits in a block (up to 32 channels) |
| `L1,L2,L3`   | 8,16,32 | residual lengths; L3 must equal W; (2,4,32) and (4,8,32) also verified |
| `ORDER`      | 4       | predictor order (4 = cubic) |
| `FIFO_DEPTH` | 8       | blocks per channel FIFO in the deserializer |
| `CW`         | 48      | cycle-counter width |

All streams use valid/ready handshakes. Reset is synchronous and active low
(`rst_n`).

## Where this RTL makes its own choices

The overall structure follows the thesis:

- the compression algorithm;
- the (8, 16, 32) limited residual lengths;
- the separate LRB-ex and residual buffers;
- the four- and three-stage pipelines;
- production-order block placement;
- serializer and deserializer trees with per-channel FIFOs;
- the bypass route and the two cycle counters.

The following points are this design's own:

- **Block layout.** The field order, the bit position of `ex` in an entry and
  the channel number at the top are chosen here.
- **Block capacity.** The entry count follows the formula above (46). The
  thesis quotes a maximum ratio of 2.6875, which corresponds to 43 entries.
  The formula was kept.
- **Region width.** The residual-buffer region width is 32 bits (the longest
  residual).
- **Converter timing.** The converter loses one input cycle per closed block.
  A fully overlapped design would need a second block buffer.
- **Serializer tree.** The radix 4, the snapshot rule with lowest-port-first
  order, and one register per level are chosen here.
- **Deserializer behaviour.** Blocks carrying a channel number the design does
  not have are dropped.
- **Bypass gearbox.** The gearbox is a generic shift buffer with bits in
  least-significant-first order.
- **Counters.** Counters saturate rather than wrap.
- **Other details.** Reset values, the flush handshake, and the FIFO depth
  (the thesis gives none).

Not included:

- the lattice-Boltzmann core;
- the DDR3 memory, its controllers, DMA and the PCIe host link;
- the faster but larger single-buffer block converters, which the
  area-oriented design replaces.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5 a
testbench builds and runs like this:

```
verilator --binary --timing -Wno-fatal --top-module tb_bwc_top \
    -Irtl -Itb -y rtl -y tb rtl/bwc_pkg.sv tb/tb_ref_pkg.sv tb/tb_bwc_top.sv
./obj_dir/Vtb_bwc_top
```

The simulator starts with random register contents
(`+verilator+rand+reset+2`), and the design resets everything it reads.
`tb/tb_ref_pkg.sv` holds the independent reference models:

- the translation, prediction and length rules;
- a block packer and a full encoder and decoder written as classes;
- a generator of smooth, noisy, negative and jumping test signals.

The testbenches check:

- **Unit tests.** Each unit has one (`tb_btu`, `tb_lrbu`, …). These compare
  with the reference rules over random and corner-case operands.
- **`tb_vfc`, `tb_fvc`.** Packing and unpacking of random residuals of all
  three lengths, including flushed short blocks. Rate checks: the converter
  loses one cycle per block, and the unpacker runs one value per cycle with
  no gap between blocks.
- **`tb_compressor`.** Blocks are bit-exact against the reference encoder,
  with input gaps, output stalls and flushes.
- **`tb_decompressor`.** Values come back exactly, at one per cycle.
- **`tb_mcs_sel`, `tb_mcs`.** Order per channel, the snapshot order, fairness,
  and one block per cycle at 30 channels.
- **`tb_mcd_demux8`, `tb_mcd`, `tb_sync_fifo`.** Routing, FIFO filling, and
  one block per cycle.
- **`tb_width_conv`.** Both gearboxes against a bit-stream model.
- **`tb_bwc_top`.** The whole design at its default size (30 channels). It
  runs a raw read, a compressed write of 1500 grid points, a compressed read
  of that same block stream, and a raw write, with random readiness on every
  side. Each channel's blocks must match the reference encoder. Every grid
  point must come back unchanged, and the cycle counters must agree with the
  transfers. It also counts the mechanisms below and fails if any never
  occurred:
  - every residual length used;
  - a stall on a full block;
  - flushed blocks;
  - serializer contention;
  - memory backpressure;
  - a deserializer FIFO above one entry;
  - waits for channel synchronisation;
  - both bypass directions.
- **`tb_workload_testdata`.** Compresses and restores a 32768-point chirp
  `sin(2πα i²/32768²) + β` for three (α, β) settings. It runs three chains in
  parallel, one for each residual-length set (2,4,32), (4,8,32) and (8,16,32),
  and prints each ratio. Results:
  - smooth settings: about 5.4, 4.5 and 2.87;
  - a fast chirp near zero: 0.52, 0.95 and 1.32.

  Short residual lengths pay off only when predictions are good.

  A fourth chain runs the same function in double precision (W = 64, lengths
  8/16/64) and also restores every value exactly. Its smooth-setting ratio is
  5.74.

The top was also synthesised with Yosys (about 6300 cells and 48,600
flip-flops at the default size). Most of the flip-flops are the 512-bit block
buffers of the 60 converters and the deserializer FIFOs.

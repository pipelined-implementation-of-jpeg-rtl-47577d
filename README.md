# Streaming JPEG baseline encoder

This is a JPEG baseline encoder that compresses a live camera stream without
storing a frame. Pixels arrive in raster order from an image signal processor,
one 8-bit YCbCr 4:2:2 sample per clock. They leave as a complete JFIF file
(header, entropy-coded data, EOI) in 32-bit words. Every stage runs at the
input rate of one sample per clock, so a frame takes about as many clocks as
it has input samples. The output is 4:2:2 or 4:2:0, chosen per frame.

The architecture follows the pipelined encoder of "Pipelined Implementation of
JPEG Baseline Encoder IP": line buffer, 2-D DCT built from two 1-D DCTs with a
transpose memory, zig-zag memory, pipelined non-restoring divider as
quantiser, run-length coder, Huffman encoder and a packer that adds the header
and 0xFF stuffing. That description fixes:

- the stages and their order;
- the LIFO-based 1-D DCT;
- the clock counts of the pipeline (table below);
- the 16-stage quantiser;
- the 32-bit output.

The word widths, memory organisation, handshakes, header contents and symbol
format are this implementation's own. Each file's opening comment says which
parts are which.

## Data path

```
 ISP samples      line_buffer        dct_2d                       zigzag_scan   quantizer
 Cb Y Cr Y ... -> (2 strips of  ->  level shift, dct_1d (rows), -> (2 banks,  -> 17-clock
 8 bit / clock     MCU rows)        transpose_buffer, dct_1d      zig-zag      divider
                                    (columns)                     read)        + quant_table
      -> rlc -> sync_fifo -> huffman_encoder -> packer -> 32-bit words
         (DC diff,  (symbols)  + huffman_table    + jfif_header
          zero runs)
```

`jpeg_encoder` is the top. All modules share types and constants from
`jpeg_pkg`:

- the symbol struct;
- the zig-zag order;
- DCT constants;
- the standard tables;
- the Huffman code builder.

### Block pipeline timing

These clock counts come from the published design. The RTL reproduces each
one, and the testbenches check them.

| stage | clocks | how it is met here |
|---|---|---|
| LIFO in front of the row DCT | 4 | x0..x3 are pushed, then popped against x4..x7 |
| row 1-D DCT | 6 | X[0] leaves 10 clocks after x[0] |
| transpose memory | 64 | read-out starts after word 62 of a block is written |
| LIFO + column 1-D DCT | 4 + 6 | same module as the row DCT |
| zig-zag memory | 63 | read-out starts after word 61 |
| quantiser | 17 | 16 divider stages and a sign/saturation stage |
| **line buffer output to quantiser output** | **164** | measured by the end-to-end test |

The two block memories do not wait for a whole block before reading it.

- In the transpose memory, column order reads word 63 last and word 62 at step 55.
- In the zig-zag memory, words 62 and 63 come at steps 61 and 63.

So both memories can start one or two clocks early, and blocks still stream
without gaps. This early start is what gives exactly 64 and 63 clocks. It
relies on a block arriving in 64 consecutive clocks, which the line buffer
and the DCT guarantee.

## Input and the line buffer

- **Input order.** Each line is `Cb0 Y0 Cr0 Y1 Cb1 Y2 Cr1 Y3 ...`, that is 2 x width samples.
- **Sorting and banks.** `line_buffer` sorts the samples into separate Y, Cb and Cr memories. It has two banks, each one MCU row high: 8 lines in 4:2:2, 16 lines in 4:2:0.
- **Read-out order.** When a strip is complete it is read MCU by MCU:
  - 4:2:2: Y-left, Y-right, Cb, Cr;
  - 4:2:0: Y top-left, top-right, bottom-left, bottom-right, then Cb, Cr.

  Each block is read row by row. Meanwhile the next strip fills the other bank.
- **4:2:0 chroma.** Chroma is taken from the even lines only. There is no vertical filter.
- **Size limits.** Width must be a multiple of 16 and at most `MAX_WIDTH` (1024 by default, enough for XGA 1024x768). Height must be a multiple of the MCU height. Edges are not padded.
- **Memory.** At the default width the line buffer holds 2 x 16 x 1024 bytes of Y and 2 x 8 x 512 bytes each of Cb and Cr.

Reading a strip takes exactly as long as writing one. The pipeline therefore
keeps up with continuous input and never needs more than two banks.
`err_overrun` reports input that outruns it.

## DCT arithmetic

`dct_1d` computes X[k] = c(k)/2 · Σ x[n] cos((2n+1)kπ/16).

1. The LIFO pairs each of the last four samples with its butterfly partner (x4 with x3, ... x7 with x0).
2. Four even accumulators take the sums, four odd accumulators take the differences.
3. Each accumulator runs four multiply-accumulate steps with 13-bit constants (12 fraction bits).

Precision:

- The row pass keeps 3 fraction bits (15-bit words).
- The column pass rounds to 12-bit signed coefficients.
- Against a floating-point DCT, each output of the full 2-D transform is within ±1 (the largest error seen in the tests is 0.58).

The level shift (pixel - 128) is an inversion of the MSB.

## Quantiser

The quantiser works in zig-zag order and computes
`sign(x) · floor((|x| + floor(q/2)) / q)`, which rounds to nearest with halves
away from zero. The division is non-restoring, one quotient bit per pipeline
stage over a 16-bit dividend. Depending on the sign of the previous remainder,
each stage subtracts or adds the divisor, so no correction step is needed.

A counter tracks the block's place in the MCU and uses it to select the
luminance or chrominance table. `quant_table` holds both tables in zig-zag
order:

- Reset loads the JPEG standard's example tables (Annex K).
- Any entry can be rewritten through `qt_we/qt_chroma/qt_addr/qt_data` between frames.
- A second read port feeds the DQT segment of the header, so the file always describes the tables actually used.

## Entropy coding

**`rlc`** turns each block into symbols:

- **DC:** the difference from the previous DC of the same component. There is one predictor each for Y, Cb and Cr, and all three are cleared at frame start.
- **AC:** `{run, size, amplitude}` for each non-zero value.
- **Runs of 16 zeros:** these are not separate symbols. They are counted in a 2-bit `zrl` field of the next non-zero symbol; at most 3 can occur.
- **Block ending in zeros:** pending ZRLs are dropped and an EOB is sent, as the standard requires.
- **End of frame:** the last symbol of a frame carries `eof`.

Any block produces at most one symbol per coefficient clock.

**`sync_fifo`** (64 entries) buffers symbols. Only the Huffman side can stall,
because the packer emits at most one byte per clock. The FIFO absorbs those
stalls. `fifo_max_level` and `fifo_overflow` show how close a stream came to
the limit.

**`huffman_encoder`** takes the FIFO head and emits one code word per clock:

- first the pending ZRL codes;
- then `{Huffman code, amplitude bits}`, right-aligned, up to 27 bits.

The codes come from `huffman_table`. It holds the standard's typical DC and AC
tables for luminance and chrominance, built at elaboration from their
BITS/HUFFVAL lists by the canonical construction. After synthesis they are
ROMs, and the same lists go into the DHT segment.

**`packer`** handles the output side:

1. It first sends the 607 header bytes produced by `jfif_header`: SOI, APP0 (JFIF 1.01), DQT with both tables, SOF0, DHT with four tables, and SOS.
2. It then shifts code words into a 64-bit buffer and takes out one byte per clock. Every 0xFF data byte is followed by a stuffed 0x00.
3. After `eof` it pads the last byte with 1s and appends EOI.

Bytes are packed big-endian into 32-bit words. The last word carries
`out_last` and `out_nbytes` (1..4).

**Throughput limit.** Compressed data can leave at no more than 8 bits per
clock, and the input arrives at one sample per clock. A stream that needs more
than about 8 bits per input sample for a long stretch will overflow the FIFO.
At normal quantisation this is far away: the QVGA test image needs about 1
bit per sample. With all table entries set to 1 it is reachable.

## Using the top

Frame sequence:

1. Optionally rewrite table entries.
2. Set `mode`, `width` and `height`, then pulse `start` for one clock.
3. The header leaves in 607 clocks; wait for `hdr_sent`.
4. Stream the 2·W·H samples on `isp_valid/isp_data`. Idle clocks are allowed.
5. Collect words on `out_valid`. `done` pulses with the last word.

Frames can follow each other directly.

| parameter | default | meaning |
|---|---|---|
| `MAX_WIDTH` | 1024 | widest line the line buffer holds (XGA) |
| `FIFO_DEPTH` | 64 | symbol FIFO entries |

### Frame time

A frame takes 2·W·H input clocks. On top of that comes:

- the header;
- reading out the last strip, about 16·W clocks in 4:2:2 (the other strips overlap with input);
- the pipeline tail.

These frame times are all simulated, and converted to frame rates at 60 MHz:

| size | clocks | frame rate at 60 MHz | published figure |
|---|---|---|---|
| QVGA 320x240, 4:2:2 | 158,894 | 377 fps | about 154,000 clocks, over 389 fps |
| QVGA 320x240, 4:2:0 | 161,452 | 371 fps | |
| VGA 640x480, 4:2:2 | 624,813 | 96 fps | (no number given) |
| XGA 1024x768, 4:2:2 | 1,589,420 | 37.7 fps | over 37 fps |

The QVGA count is 3% above the published one. The difference is the header
plus the drain of the last strip, which this implementation counts from the
first input sample to the last output word.

## Where this differs from the published design or goes beyond it

- The published design only names the interfaces. Everything here is this design's choice:
  - the input sample order;
  - the handshakes;
  - the configuration ports;
  - the output word format.
- 4:2:0 is made inside the encoder from the 4:2:2 stream by dropping odd-line chroma.
- The Huffman tables are fixed; the quantisation tables are programmable.
- There are no restart markers.
- Width must be a multiple of 16 and height a multiple of the MCU height.
- The 10 KB result quoted for the Lena image is not reproduced, because that image is not part of this package. The tests use generated images with a noisy texture, which compress to about 19 KB at QVGA with the default tables.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dct_1d` | 8-point DCT against floating point (±2/8 LSB), 10-clock latency, gap-free output |
| `tb_transpose_buffer`, `tb_zigzag_scan` | reordering, 64 / 63 clock latency, continuous streaming |
| `tb_dct_2d` | 2-D DCT within ±1 of floating point, 84-clock latency, extreme blocks |
| `tb_quant_table` | reset tables against the standard's, writes, both read ports |
| `tb_quantizer` | rounding division for steps 1..255, table choice per block in both modes, 17 clocks |
| `tb_rlc` | DC prediction per component, ZRL/EOB rules, amplitude coding, eof |
| `tb_huffman_table` | codes printed in the standard, prefix-free and complete tables |
| `tb_huffman_encoder` | code words, ZRL expansion, handshake under random stalls |
| `tb_jfif_header` | every header segment, for several sizes and both modes |
| `tb_packer` | stuffing, padding, EOI, word packing, header timing, random back-pressure |
| `tb_line_buffer` | MCU reordering in both modes, full 1024 width, strip timing |
| `tb_jpeg_encoder` | three frames end to end (see below) |
| `tb_jpeg_encoder_full` | one QVGA 4:2:2 frame at default parameters, frame time within 5% of 154,000 clocks |
| `tb_jpeg_encoder_workloads` | VGA and XGA 4:2:2 and QVGA 4:2:0 frames at default parameters, all 35,976 blocks decoded; XGA above 37 frames/s at 60 MHz |

`tb_jpeg_encoder` runs three frames:

- 4:2:2 with default tables;
- 4:2:0 with default tables;
- 4:2:2 with very fine tables written through the table port.

It decodes each output file with a small JPEG decoder in `tb_jpeg_ref_pkg`:

- The decoder rebuilds the Huffman codes from the DHT segment in the file.
- It compares every coefficient with a floating-point reference encoder.
- A coefficient may be off by one, where rounding of the fixed-point DCT differs.

The testbench also checks the 164-clock pipeline latency. It fails if any of
these never happens:

- a ZRL;
- an EOB;
- a stuffed byte;
- padding;
- a packer stall;
- FIFO buffering;
- a partial last word;
- either sampling mode.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/jpeg_pkg.sv tb/tb_jpeg_ref_pkg.sv \
          tb/tb_jpeg_encoder_full.sv --top-module tb_jpeg_encoder_full -Mdir obj
./obj/Vtb_jpeg_encoder_full
```

The other testbenches build the same way: pass `tb/tb_jpeg_ref_pkg.sv` as
well where a testbench imports it. The QVGA frame simulates in under a second, and the three larger frames take about ten seconds.

# Pipelined JPEG encoder core: RGB pixels in, Huffman-coded bytes out

This is a baseline JPEG encoder written as one long hardware pipeline. A host streams 24-bit RGB
pixels in raster order. Out of the core comes the byte-stuffed, Huffman-coded scan of the image.
Every stage has its own hardware and works on a different block at the same time:

- colour conversion and chroma down sampling
- a 2-D DCT
- zig-zag reordering and quantization
- run-length coding
- Huffman coding and byte stuffing

Once the pipeline is full it takes in one new sample on almost every clock. A 640x480 image
takes about 2.0 clocks per pixel, which is 6.2 ms at 100 MHz. The aim was 2.3 clocks per pixel
(7.3 ms).

```
 host pixels ──► buf_fifo ──► colour_conv ──► dct_2d ──► zigzag ──► quantizer ──► rle
 (pix_wr,        16-line      RGB→YCbCr,      level shift,  reorder     ROUND(x/q),   (run,size,amp)
  almost_full)   buffer       2:1 chroma      row DCT,      memory      pipelined     symbols
                   ▲                          transpose,                divider          │
                   │                          column DCT                                  ▼
               ctrl_sm ── tags {component,last} ──────────────────────────────► symbol double FIFO
               (16x8 data units,                                                          │
                Y1 Y2 Cb Cr)                                                               ▼
 host regs ──► host_if ── quantization table ──► quantizer          huffman (4 code ROMs, bit packer)
                                                                                           │
                                    jpg_data ◄── byte_stuffer ◄── output double FIFO ◄────┘
```

## Data units and the line buffer

The encoder works on **data units** of 16x8 pixels. Each unit becomes four 8x8 blocks, always in
this order:

- **Y1**: the luminance of the left 8 columns
- **Y2**: the luminance of the right 8 columns
- **Cb** and **Cr**: each sample is the mean of one horizontal pixel pair

Chroma is therefore halved horizontally and kept at full resolution vertically. Two luminance
blocks share one Cb and one Cr block, so the data is cut by half. In JPEG terms this is H=2, V=1
sampling for Y and H=1, V=1 for Cb and Cr.

`buf_fifo` holds 16 image lines. They form two bands of 8 lines, so the host fills one band
while the other is being encoded. Pixels are stored in pairs, as 48-bit words. One read gives
the two neighbours that a chroma sample needs, or the one pixel a Y sample needs. The host may
write one pixel per clock while `pix_almost_full` is low. When it rises, the host must wait for
it to fall. It rises 4 free slots early (`AF_MARGIN`), so a host that reacts one or two clocks
late loses nothing.

`ctrl_sm` walks the image band by band, and within a band one data unit at a time, left to
right. For each block it reads the buffer row by row and tells the colour converter two things:

- which component to compute;
- for Y, which pixel of the pair to use.

Down sampling is therefore only a matter of addressing. The converter is never asked for a Cb or
Cr value that would be thrown away. At the first sample of a block, the controller pushes a tag
{component, last block of image} into a small FIFO. The run-length coder picks the tag up when
that block reaches it, many clocks later.

## Colour conversion

`colour_conv` computes

    Y  =  0.299 R + 0.587 G + 0.114 B
    Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
    Cr =  0.5 R - 0.4187 G - 0.0813 B + 128

The constants have 14 fraction bits plus a sign bit (`jpeg_pkg::CSC`). Each row is rounded so
that its sum is exact: 2^14 for Y and 0 for the chroma rows.

For chroma, the R, G and B of the pair are added first. The sum goes through the same
multipliers with one extra fraction bit, which gives the pair's mean directly. The result is
rounded to nearest and clamped to 0..255. The converter has two register stages.

## The 2-D DCT and why its output is transposed

`dct_2d` first subtracts 128 from each sample (the level shift to -128..127). It then runs two
`dct_1d` units with a `transpose_buffer` between them.

Each `dct_1d` is an 8-point DCT, X(u) = c(u)/2 · Σ x(k) cos((2k+1)uπ/16). It uses eight
multiply-accumulate lanes, one per output frequency. The constants are
round(2^12 · c(u)/2 · cos(...)), computed in the package. Eight samples go in serially. Eight
clocks later the eight results come out serially while the next vector accumulates.

Fixed-point path:

| stage | shift | width | notes |
|---|---|---|---|
| first pass | 10 | 13 bits | 2 fraction bits kept |
| second pass | 14 | 12 bits | final coefficient, −2048..2047 |

The transpose buffer has two 64-word banks. It takes the first pass's output for one block in row
order while it gives out the previous block in column order.

The second pass runs over columns of the transposed data, so coefficients leave `dct_2d` in
**column-major** order: (u,v) = (0,0), (1,0), (2,0), and so on. The design does not spend a
second transpose memory on this. The zig-zag stage writes each coefficient to the address that
the zig-zag table gives for its natural position, and reads its memory sequentially. Swapping the
row and column of the write index therefore undoes the transpose for free.

Latency from the last sample of a block in to its first coefficient out is 19 enabled clocks.
Blocks follow each other without gaps.

## Zig-zag and quantization

`zigzag` is a two-bank 64-word memory. One bank is written with the current block at address
`ZIGZAG[natural position]` while the other is read out in order 0..63. The zig-zag index travels
with each coefficient from there on.

`quantizer` divides each coefficient by the table entry at the same zig-zag index and rounds to
nearest. The rounding is exact: |out| = floor((2|x| + q) / 2q), so halves round away from zero.
The division runs in `div_pipe`, a restoring divider with one quotient bit per stage (13 stages),
so a new coefficient can enter every clock. Total latency is 15 clocks.

The table is a 64 x 8-bit RAM written by the host in zig-zag order. All three components share
it. It has no reset contents, so the host must load all 64 entries before the first image. An
entry of 0 is treated as 1.

## Run-length symbols

`rle` turns the 64 quantized values of a block into symbols
`{is_dc, comp, last_blk, last_img, run, size, amp}`:

- **DC.** The value is coded as the difference from the previous block of the same component.
  There is one predictor each for Y, Cb and Cr, cleared at the start of an image. The difference
  is saturated to ±2047, so it always fits in size category 11.
- **AC.** A non-zero coefficient gives (run of zeros before it, size, amplitude). `run` is
  6 bits and carries the whole run (up to 62). Splitting long runs is left to the Huffman coder.
- **End of block.** If the block ends in zeros, an EOB symbol (run 0, size 0) closes it.
  `last_blk` marks the block's final symbol either way.

Symbols go into the **symbol double FIFO** (`double_fifo`, 64 entries per side). While the
Huffman coder reads block k from one side, the run-length coder writes block k+1 into the other.

## Stalls and back-pressure

Everything from the line-buffer read through the run-length coder advances on one enable, `ce`.
`ce` drops only when the symbol FIFO is full. While it is low, every register in that part of the
pipeline holds its value. This includes the controller, so no sample is ever dropped. It also
means no stage needs its own handshake.

From the symbol FIFO onwards the stages use FIFO flags:

- The Huffman coder waits when the output FIFO is full.
- The byte stuffer waits when `jpg_ready` is low.

A slow sink therefore fills the output FIFO, then the symbol FIFO, and then stops the front end.
The line buffer then fills and raises `pix_almost_full` to the host.

## Huffman coding and bit packing

`huffman` looks each symbol up in one of four `huff_rom` tables: DC or AC, luminance (Y) or
chrominance (Cb, Cr). These are the example tables of the JPEG standard. `jpeg_pkg::huff_build`
builds them at elaboration time from the standard BITS/HUFFVAL lists: canonical codes, assigned
in order of length.

For each symbol the coder appends two things to a 64-bit bit buffer:

- the code word;
- `size` amplitude bits: the value if it is positive, or value − 1 if it is negative (its one's
  complement).

A run of 16 or more zeros before an AC value first emits one ZRL code (symbol 0xF0) per 16 zeros,
one per clock.

A symbol is accepted only while the buffer holds 37 bits or fewer, so the longest item always
fits (16-bit code plus 11 amplitude bits). Whole bytes leave MSB first, one per clock. At the end
of the image the last byte is padded with 1 bits and `done` is raised.

The bytes go into the **output double FIFO**: two FIFOs of 128 bytes. The coder marks the first
byte written after a block's last symbol, and at that mark the writer and the reader swap FIFOs.
A block longer than 128 bytes is not lost. The writer simply waits until the reader has drained
the other side.

`byte_stuffer` reads that FIFO and inserts a 0x00 after every 0xFF, as JPEG requires, so that no
marker can appear inside coded data. It drives a valid/ready byte port.

## Host interface

| address | register | access |
|---|---|---|
| 0x00 | CTRL: write bit 0 = 1 to start an image (ignored while busy) | W |
| 0x01 | STATUS: bit 0 busy, bit 1 done | R |
| 0x02 | WIDTH in pixels, a multiple of 16, at most `MAX_WIDTH` (reset 640) | R/W |
| 0x03 | HEIGHT in pixels, a multiple of 8, up to 65535 (reset 480) | R/W |
| 0x40-0x7F | quantization table entry (address − 0x40), zig-zag order | W |

Writes take effect on the clock edge with `hp_wr` high, and reads are combinational. To encode an
image:

1. Program WIDTH, HEIGHT and the table.
2. Write 1 to CTRL.
3. Stream the pixels `{R,G,B}` with `pix_wr` while `pix_almost_full` is low.
4. Collect bytes from `jpg_data` whenever `jpg_valid` and `jpg_ready` are both high.

`done` rises after the last byte has left, and stays high until the next start.

### Top-level parameters (`jpeg_encoder`)

| parameter | default | meaning |
|---|---|---|
| `MAX_WIDTH` | 640 | widest image; sets the line-buffer size (16 × MAX_WIDTH/2 × 48 bits) |
| `BUF_LINES` | 16 | lines in the line buffer (two 8-line bands) |
| `SYM_DEPTH` | 64 | symbols per side of the symbol double FIFO |
| `OUT_DEPTH` | 128 | bytes per side of the output double FIFO |

## Where this design goes beyond, or departs from, its source architecture

The architecture this core implements fixes the following:

- the chain of stages;
- the 16x8 data unit;
- 8-bit DCT input and 12-bit output, by row-column decomposition with a transpose buffer;
- 14-bit colour constants;
- a host-loaded 64 x 8 quantization RAM and a pipelined divider;
- the run-length symbol format and its ranges;
- double FIFOs of 2 × 64 × 8 bits between the entropy stages;
- the almost-full protocol of the line buffer;
- a target of 2.3 clocks per sample.

The rest is this design's own:

- **Chroma sampling.** The architecture calls its sampling "4:1:1". It also says that sampling
  halves the data, and it builds every data unit from 16x8 pixels. Those last two facts only fit
  2:1 horizontal sampling (two Y blocks, one Cb and one Cr per unit), and that is what is built
  here.
- **Tables.** The Huffman tables are the JPEG standard's example tables. One quantization table
  serves all components, since the RAM holds 64 entries.
- **Internals.** The register map, line-buffer organisation, controller states, DCT internals,
  divider type, ZRL splitting in the Huffman coder, DC saturation, and the global-enable stall
  scheme are all this design's own.
- **Streaming instead of stage handshakes.** The source architecture gives each stage read and
  write counters and a ping-pong buffer, and starts each stage per block from a central state
  machine. Here the samples stream from stage to stage with their block position attached, and
  one global enable stalls them all together. Only the zig-zag stage keeps a two-bank buffer.
  The result is the same coded data with less control logic. A block's latency through the
  quantizer is 15 clocks rather than a whole block time.
- **No headers.** There is no JFIF/marker generator. The output is the scan data only. To make a
  viewable file, a host writes SOI, DQT (the same table for all components), SOF0 (Y 2x1, Cb 1x1,
  Cr 1x1), DHT (the four standard tables) and SOS before it, and EOI after it.
- **One image at a time.** Width must be a multiple of 16 and height a multiple of 8. There is no
  edge padding.

## Results

| measure | value |
|---|---|
| image | 640x480 synthetic image (noise, single-frequency patterns, gradients and flat areas per data unit) |
| quantization | standard luminance table (quality 50) |
| sink | always ready |
| time | 619,929 cycles = 2.02 clocks per pixel = 6.2 ms at 100 MHz (161 images/s) |
| output | 62,820 bytes (14.7:1, 1.64 bits per pixel), 1431 stuffed zero bytes |

Compression depends on the picture. This test image is deliberately harder to compress than a
photograph.

Synthesis with yosys at default parameters gives about 1,600 cells and 1,660 flip-flop bits plus
310 kbit of memory. Most of the memory is the line buffer.

## Testbenches

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each compares against
values computed independently in the testbench, mostly from `tb/tb_jpeg_ref_pkg.sv`:

- floating-point colour conversion and DCT;
- exact rounding division;
- a small JPEG scan decoder.

Each testbench ends with a `TB_RESULT checks=… failures=…` line and has a watchdog.

- **`tb_jpeg_encoder`** runs a 32x24 image twice with small FIFOs. It decodes the whole byte
  stream back to quantized coefficients, checks every coefficient within ±1 of the
  floating-point reference, and checks the EOB/ZRL structure. It counts each mechanism and fails
  if any of them never happened:
  - front-end stall
  - host almost-full back-pressure
  - output back-pressure
  - ZRL
  - EOB
  - byte stuffing
  - line-buffer band wrap
  - double-FIFO switch
- **`tb_jpeg_encoder_full`** encodes a full 640x480 image at the default parameters. It checks
  all 614,400 coefficients of its 9,600 blocks and checks the cycle count against 2.3 clocks per pixel.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y tb -y rtl +libext+.sv \
    rtl/jpeg_pkg.sv tb/tb_jpeg_ref_pkg.sv tb/tb_jpeg_encoder_full.sv \
    --top-module tb_jpeg_encoder_full -Mdir obj_full
obj_full/Vtb_jpeg_encoder_full
```

Run it from the repository root. Replace the testbench name to run any other one. The full-size
run takes a few seconds.

# Block C4 / Block GC3 layout decoders for a maskless-lithography writer chip

A direct-write maskless lithography tool has to feed its writing elements
about 12 Tb/s of pixel data: 5-bit grey-level pixels on a 22 nm grid, one
wafer layer a minute. Storing and moving that much data is not feasible
uncompressed, so the rasterised layout is kept compressed and expanded on the
writer chip itself, by hundreds of small decoders working in parallel, each
turning a few compressed streams into one stream of pixels for its share of
the writers.

This repository holds synthesizable SystemVerilog for those decoders in the
two forms of the *Block Context Copy Code* family:

* **Block GC3** – error locations Golomb run-length coded. Small, no stalls.
* **Block C4** – error locations coded by a three-level hierarchical
  combinatorial code (HCC). Compresses better, larger, can stall.

and a top level, `writer_chip`, that holds an array of each (200 + 200 by
default).

## The idea in one paragraph

Layouts consist of Manhattan shapes, which a three-neighbour linear predictor
gets right almost everywhere except at corners, and of repeated cells, which
are best reproduced by copying pixels from a fixed distance to the left or
above. The encoder cuts the image into 8 x 8 blocks and labels each block
*predict* or *copy (direction, distance)*; this label map is the
**segmentation**. Every pixel is then guessed (predicted or copied according
to its block), and the encoder only transmits where the guess is wrong
(the **error-location map**, one bit per pixel) and what the right value is
(the **error values**, Huffman coded). The decoder repeats the same guesses
from the pixels it already has and applies the corrections, so decoding is
lossless and needs only selections, additions and subtractions.

## Decoder structure

```
  segmentation  ──► region_decoder ──(predict/copy, dir, d)──► address_generator
  (sl_*, sv_*)                                                    │ addresses
                                   history_buffer ◄───────────────┘
                                    │ above        │ copy value
                                    ▼              ▼
                             linear_predictor     │
                                    │ predict value│
  error values (hv_*) ─► huffman_decoder ──────────┼──► control_merge ──► pix_*
  error locations ─► golomb_rld (GC3) / hcc_decoder (C4) ──┘    │
                                                                  └──► written back
```

`decoder_core` holds everything except the error-location decoder;
`blockgc3_decoder` adds `golomb_rld`, `blockc4_decoder` adds `hcc_decoder`.

### The pixel pipeline (`decoder_core`)

Pixels come out in raster order, image after image (`IMG_W` x `IMG_H`, 1024 x
1024 by default). There are two stages:

* **Stage A** holds the raster position. It asks the region decoder for the
  segmentation of the current block; the address generator turns it into two
  history-buffer read addresses (upper neighbour, copy source) and the reads
  are issued.
* **Stage B** gets the read data one cycle later, forms the left, upper and
  upper-left neighbours (zero outside the image), predicts, and
  `control_merge` picks the pixel:
  error value if the error-location bit is 1, else the copied value for a
  copy block, else the predicted value. The pixel leaves on `pix_*` and is
  written back to the history buffer.

Stage A moves when stage B is empty or leaves in the same cycle. A pixel
waits in stage B until its error-location bit is there, its error value (if
the bit is 1) has been Huffman decoded, and the writer is ready. With steady
input and no error values pending the pipeline delivers **one pixel per
clock** (checked by the testbenches).

One hazard needs care: a copy from the pixel immediately to the left
(distance 1) reads a pixel that is still in stage B when stage A issues the
read. Such a copy takes stage B's previous output register instead of the
buffer (`copy_left1` from the address generator).

### History buffer and copy addressing

`history_buffer` is a circular store of the last `HIST_DEPTH` pixels (2048 x
5 bits = 1.25 KB), one write port and two synchronous read ports (upper
neighbour and copy source in the same cycle). `address_generator` keeps the
write pointer; the pixel *n* positions back is at pointer − *n* modulo
`HIST_DEPTH`. The copy offset is *d* for a copy from the left and *d* x
`IMG_W` for a copy from above. **Every offset must be below `HIST_DEPTH`**:
with the defaults a copy from above can only reach one row up, while a copy
from the left can reach 1023 pixels back, possibly into the previous row.
Copies must not reach back into the previous image; nothing checks this, the
encoder has to respect it.

### Segmentation and the region decoder

The segmentation value of a block is 11 bits (`c4_pkg::seg_t`):

| bits | field | meaning |
|------|-------|---------|
| 10   | `dir` | 0 = copy from the left, 1 = copy from above |
| 9:0  | `d`   | distance in pixels (left) or rows (above); **0 = predict** |

Segmentation maps are themselves Manhattan, so each block is predicted from
its upper-left (a), upper (b) and left (c) blocks:

```
  a b      if c == a then z = b    (vertical boundary: continue the block above)
  c z      else       z = c        (otherwise continue the block to the left)
```

Blocks outside the image count as *predict*. The segmentation error-location
stream (`sl_*`, Golomb coded with a fixed bucket of 2**`SEG_LOG2_BUCKET` = 16)
holds one bit per block in raster block order; a 1 replaces the prediction by
the next value of the `sv_*` stream. `region_decoder` keeps one row of block
values (`IMG_W/8` entries): it supplies the upper neighbours while the next
block row is decoded and the block values for the other seven pixel rows of
the current block row. A new value is decoded at the first pixel of each
block in the first pixel row of a block row, so the region decoder works at
1/64 of the pixel rate.

### Error locations, Block GC3: Golomb run-length code (`golomb_rld`)

With bucket size B = 2**`log2_bucket` there are two codewords, first bit in
the MSB of each 8-bit input word:

| codeword | length | expands to |
|----------|--------|------------|
| `0` | 1 bit | B zeros |
| `1` n | 1 + log2 B bits (n MSB first, n < B) | n zeros, then a one |

The decoder keeps a 16-bit barrel-shifter buffer so the next codeword always
starts at its top bit; a counter of emitted zeros is compared with n and
with B to decide when to emit the one and when the codeword ends. The next
codeword is decoded in the cycle the current one ends, so the output is one
bit per clock with no bubbles. B is an input (`log2_bucket`, up to 7, i.e. B
up to 128) so it can follow the layer: about 16 for poly and metal 1, 64 for
metal 2 and n-active, 128 for p-active. Change it only between streams.

Example, B = 2: the map `0100010000110000` is
(1,1)(0)(1,1)(0)(0)(1,0)(1,0)(0)(0) = `11 0 11 0 0 10 10 0 0`.

### Error locations, Block C4: hierarchical combinatorial code (`hcc_decoder`)

Combinatorial coding describes an 8-bit block by *k*, its number of ones, and
its *rank*: the number of 8-bit words with the same *k* that are numerically
smaller (`01000100` is (2, 17), `00110000` is (2, 14)). `cc_decoder`
reverses this combinationally, MSB first, with a binomial table built at
elaboration.

HCC stacks three such levels. A bit of level *L*+1 says whether the
corresponding level-*L* block is all zeros (0) or coded by a token (1). Every
top-level block is coded, so one level-2 token covers 512 pixels. Tokens are
11 bits (`c4_pkg::hcc_tok_t`: `k` in bits 10:7, `rank` in 6:0) and come in
three separate sub-streams, `tok[0]` (lowest level) to `tok[2]`; a level's
stream holds tokens only for blocks whose parent bit is 1, in order.

The decoder is the parallel form: each level has its own control-bit
source (the level above, or a constant 1 at the top), turns one control bit
into one byte (eight zeros, or the decoded token) and pushes it into a
2-byte FIFO, from which a serializer hands bits to the level below (or to
the output). Levels only wait on a full output FIFO or an empty input, so
after the start-up fill the output runs at one bit per clock while the token
streams keep up. An image must cover a whole number of 512-pixel top-level
blocks (1024 x 1024 does).

### Error values (`huffman_decoder`)

The error value is the correct 5-bit pixel value, coded with a canonical
Huffman code supplied through `huff_count[len]` (number of codewords of each
length 1..12; entry 0 unused) and `huff_symbol[]` (the 32 symbols sorted by
code length, then code). The decoder reads one code bit per clock, so a
codeword of *n* bits takes *n* cycles, and it runs ahead of the pipeline, one
symbol deep. A burst of error pixels is therefore where the pipeline stalls.

## Writer chip top (`writer_chip`)

`NUM_GC3` Block GC3 decoders and `NUM_C4` Block C4 decoders (200 each: at
about 2.5 Gb/s per decoder that is about 500 Gb/s, three wafer layers an
hour). The two arrays are alternatives placed side by side. Every decoder has
its own streams, as unpacked-array ports indexed by decoder (`gc3_el_data[i]`,
`c4_tok[i][level]`, …). The Huffman table and, for GC3, the bucket size are
shared per array, as all decoders write the same layer. The pixel outputs
(`gc3_pix`, `c4_pix`) are where the D/A converters of the writing elements
would connect; those and the off-chip storage are not part of this RTL.

## Interfaces and conventions

* One clock, synchronous active-low reset `rst_n` clearing all control state.
* Every stream is valid/ready: a word moves in a cycle where both are high.
* Coded bit streams arrive as 8-bit words, first bit in bit 7.
* Default parameters: `IMG_W = IMG_H = 1024`, `HIST_DEPTH = 2048`,
  `SEG_LOG2_BUCKET = 4`, `HUFF_MAX_LEN = 12`, HCC 3 levels of 8 with 2-byte
  FIFOs. `IMG_W` must be a multiple of 8 and below `HIST_DEPTH`, which must be
  a power of two.

## What follows the source design and what is this design's own

Taken from the published architecture: the block set and data flow (region
decoder, address generator, history buffer, linear prediction, Huffman
decoder, control/merge, Golomb or HCC error locations); 8 x 8 segmentation
blocks; the three-block segmentation predictor rule; Golomb coding of the
segmentation error locations; the 11-bit segmentation value and 8-bit coded
input words; the Golomb codeword lengths and the layer-dependent bucket size;
the three-level H = 8 HCC with per-level sub-streams and 2-byte FIFOs; the
two-mux merge; 1.25 KB of pixel buffer; 1024 x 1024 5-bit images; 200
decoders.

Chosen here because the source does not say: the bit layout of the
segmentation value and of HCC tokens; the rank order (numerically ascending,
counted from 0); the predictor formula (left + above − upper-left, clipped to
0..31); that the Huffman symbol is the pixel value itself and the code is
canonical and loadable; the segmentation bucket size (16); the two-stage
pipeline, the two read ports and the forwarding path; zero neighbours at the
image border; all handshakes and reset behaviour; a FIFO after HCC level 0.

Known differences in behaviour: the published throughput estimates (about
0.71 pixels/cycle for Block C4, limited by HCC, and 0.94 for Block GC3,
limited by address-generator stalls at predict/copy transitions) are not
reproduced. This address generator needs no stall at transitions, and the
HCC decoder here sustains one bit per cycle once filled; the stalls that
remain come from error values (the bit-serial Huffman decoder) and from
input streams that run dry. No timing, area or power figures are claimed for
this RTL.

## Verification

Each module has a self-checking testbench in `tb/` (`<module>_tb.sv`); each
prints `TB_RESULT checks=N failures=M`. The testbenches share
`tb/c4_enc_pkg.sv`, a reference encoder written independently of the RTL:
it generates random segmentations and layout-like images that follow them
(with scattered errors, copies at distance 1, copies from above, segmentation
prediction misses), and produces every coded stream (Golomb, HCC token
streams, canonical Huffman). The decoders must return the generated image
exactly. `tb/stream_source.sv` plays a queue of words onto a valid/ready
stream, with random gaps when asked.

* Unit tests: exhaustive (`cc_decoder`, `linear_predictor`) or random
  (`seg_predictor`, `control_merge`, `sync_fifo`, `history_buffer`,
  `address_generator`); stream tests with random gaps and back-pressure for
  `golomb_rld` (all bucket sizes 1..128, plus the one-bit-per-cycle rate),
  `hcc_decoder` (densities from empty to 50 %, plus the no-stall rate),
  `huffman_decoder` (plus one code bit per cycle) and `region_decoder`.
* `decoder_core_tb`, `blockgc3_decoder_tb`, `blockc4_decoder_tb`: two 64 x 32
  images each with a 256-pixel buffer, random gaps and back-pressure, then a
  steady run that must reach one pixel per clock (`blockgc3_decoder_tb` runs
  buckets 4, 64 and 128).
* `writer_chip_tb`: 2 + 2 decoders, two layers (bucket 16, then 64, new
  Huffman table), and a count of every mechanism (error values, each block
  kind, distance-1 forwarding, transmitted segmentation values, all-zero and
  coded HCC blocks, stalls, back-pressure, image wrap, bucket change); it fails
  if any of them never happened.
* `writer_chip_frame_tb`: the top with image size and buffer depth at their
  defaults (1024 x 1024, 2048 pixels) and one decoder of each kind; each
  decodes three complete random 1024 x 1024 layout images, one layer each
  with Golomb buckets 16, 64 and 128, under random gaps and back-pressure,
  and must reproduce every pixel (about 1.33 M cycles per 1,048,576-pixel
  image with the writer ready 80 % of the time). This is the
  largest configuration simulated. The full array of 200 + 200 decoders
  elaborates and lints, but its Verilator model (every decoder flattened
  into C++) takes well over ten minutes to compile, so it is not part of
  the regular tests; the decoders are identical instances, so a one-of-each
  run exercises the same logic.

Running a testbench with plain Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/c4_pkg.sv tb/c4_enc_pkg.sv tb/writer_chip_tb.sv --top-module writer_chip_tb
./obj_dir/Vwriter_chip_tb
```

Replace the testbench file and top module name for any other test. The
simulator is two-state; the testbenches reset everything they read.

# Reconfigurable approximate JPEG encoder

Baseline JPEG compression is lossy by design. The eye does not notice small
errors in the transform coefficients, and quantisation throws most of the
precision away anyway. This encoder uses that slack. Every adder and
multiplier in the DCT and in the quantiser is an **approximate** unit. Each
unit drops work on the low bits of its result, which makes it smaller, lower
in power and faster. The number of approximated bits is a parameter for each
unit type, so one RTL description covers everything from an exact encoder to
a heavily approximated one. The user trades image quality (PSNR) for area,
power and clock speed.

The core turns a stream of 24-bit RGB pixels into a baseline
Huffman-coded JPEG scan. The scan uses 4:4:4 sampling and the standard
Annex K tables. An FPGA-style system wrapper feeds the core from an image
memory and stores the scan in a bitstream memory.

## Dataflow

```
 image_rom ──► addr_counter-driven read ──► jpeg_encoder ──► bitstream_ram
                                          │
   jpeg_encoder:                          ▼
   rgb2ycbcr ─┬─► dct_2d ─► quantizer ─► zigzag_rle ─► huffman_encoder ─► sync_fifo ─┐
              ├─► dct_2d ─► quantizer ─► zigzag_rle ─► huffman_encoder ─► sync_fifo ─┼─► stream_merger ─► bit_packer ─► 32-bit words
              └─► dct_2d ─► quantizer ─► zigzag_rle ─► huffman_encoder ─► sync_fifo ─┘
                 (Y, Cb, Cr each have their own DCT, quantiser and coder)
```

Pixels must arrive in block order: the 64 pixels of an 8x8 block in raster
order, then the next block. The image memory is loaded in that order.

| File | Role |
|---|---|
| `rtl/jpeg_pkg.sv` | Shared types, fixed-point constants, DCT basis, quantisation tables, zigzag order, Huffman tables built at elaboration |
| `rtl/approx_adder.sv` | Approximate adder with carry prediction |
| `rtl/approx_mult.sv` | Approximate multiplier with operand truncation |
| `rtl/rgb2ycbcr.sv` | Exact colour transform, one register stage |
| `rtl/dct_2d.sv` | 8x8 DCT built from approximate units |
| `rtl/quantizer.sv` | 64 approximate multipliers by reciprocal, one register stage |
| `rtl/zigzag_rle.sv` | Zigzag scan, DC difference, run/size/amplitude symbols |
| `rtl/huffman_encoder.sv` | Symbol to code word plus amplitude bits |
| `rtl/sync_fifo.sv` | Code FIFO per component |
| `rtl/stream_merger.sv` | Y, Cb, Cr block interleave |
| `rtl/bit_packer.sv` | Bit buffer, 0xFF stuffing, padding, 32-bit words |
| `rtl/jpeg_encoder.sv` | The encoder core |
| `rtl/image_rom.sv`, `rtl/addr_counter.sv`, `rtl/bitstream_ram.sv` | System memories and address generation |
| `rtl/jpeg_fpga_top.sv` | System top |

## The approximate units

These two modules are the point of the design. The rest is a conventional
JPEG pipeline.

### Approximate adder (`approx_adder`)

A ripple or lookahead adder is slow because a carry may travel the full
width. This adder cuts the carry chain. It is split into independent
sub-adders:

* Bits `APPROX_LSB` and up form one exact adder.
* The low `APPROX_LSB` bits are cut into sub-adders of `SUB_W` = 4 bits.

The carry into each sub-adder, and into the exact upper part, is not
rippled. Instead it is *predicted* by a carry-lookahead over the `WINDOW` = 4
bits just below the cut. The carry into that window is assumed to be 0. The
prediction is wrong only when all four window bits propagate and a real
carry arrives from further down. The error therefore stays small and grows
with `APPROX_LSB`. No carry chain is longer than the window plus one
sub-adder in the low field. With `APPROX_LSB = 0` the adder is exact.

Example with `APPROX_LSB = 8`, so the cuts are at bits 4 and 8:

* `0x1234 + 0x0567` gives `0x179B`. This is exact, because no carry
  crosses a fully propagating window.
* `0x0F8 + 0x008` gives `0x000`, not `0x100`:
  * Bits 4..7 of the operands are `1111 + 0000`, so all four bits propagate.
  * The real carry out of bits 0..3 does reach bit 4, so bits 4..7 wrap to
    `0000`.
  * The prediction for bit 8 looks only at bits 4..7 with an incoming carry
    of 0, so it predicts no carry. The result is 256 low.

### Approximate multiplier (`approx_mult`)

To approximate `L = APPROX_LSB` bits, the multiplier works as follows:

1. It drops `ceil(L/2)` low bits of the multiplicand and `floor(L/2)` low
   bits of the multiplier, using arithmetic shifts so negative operands stay
   correct.
2. It multiplies the shorter operands.
3. It shifts the product back left by `L`, so the low `L` result bits are
   zero.

The partial-product array shrinks by roughly `L/2` rows and columns.

Example with `L = 8`: `1000 x 300` becomes `(1000>>4) x (300>>4) << 8`, which
is `62 x 18 x 256 = 285696` instead of 300000.

Both units are purely combinational. The approximation is fixed at
elaboration by parameters. There is no run-time mode pin, because a mode pin
would keep the exact hardware and save nothing.

## DCT and quantiser arithmetic

**Basis.** The DCT computes `DY = T · Y · Tᵀ` on the level-shifted block
`Y = pixel − 128`. `T[k][n] = c(k)·cos((2n+1)kπ/16)`, with `c(0)=√(1/8)` and
`c(k)=½` otherwise, stored as integers scaled by 2^11 (`COS_FRAC`). For
example, `T[0][n] = 724`.

**Schedule.** Samples arrive one per cycle, row by row.

* Row pass: eight 32x8 multipliers form `x[r][c]·T[v][c]` for the eight
  output frequencies `v`. Eight approximate accumulators sum over the row.
* Each finished row is shifted right by 3 (`ROW_SHIFT`), from 2^11 to 2^8.
* Column pass: in the next cycle, sixty-four 32x32 multipliers and
  sixty-four accumulators add `T[u][r]·Z[r][v]` into all 64 outputs at once.
* After row 7 the coefficients, scaled by 2^19 (`DCT_FRAC`), go to an output
  register.

**Units per DCT.** Each DCT uses 72 multipliers and 72 adders. The
whole core therefore uses 3·72 + 3·64 = 408 approximate multipliers and
3·72 = 216 approximate adders. The original design reports 73 multipliers
(64 of 32x32 and nine of 32x8) and 64 adders per DCT, and 411 or 412 multipliers and 192 adders in total.
Its exact partitioning is not known, so this schedule is this design's own.

**Quantiser.** It multiplies by a reciprocal instead of dividing:

```
R[k] = round(2^16 / Q[k])                      (elaboration time)
q[k] = clip( (DY[k]·R[k] + 2^34) >>> 35 , ±1023 )
```

The 64 products use 64 approximate 32x32 multipliers. The rounding addition
is exact.

**Tables.** The default table is the standard luminance table, which gives
about 15:1. A coarser table (`Q_HIGH`, about 46:1) is in the package. The
core uses one table for Y (`QTAB_Y`) and one for Cb/Cr (`QTAB_C`). By
default both are the standard table.

**Colour transform.** It uses the JFIF equations with 14-bit integer
weights and rounding. It is exact.

## Entropy coding and scan format

* **Zigzag and run-length coding.** `zigzag_rle` reads each quantised block in
  zigzag order. It emits one symbol per cycle:
  * The DC difference against the previous block of the same component.
  * Run/size/amplitude symbols for non-zero AC coefficients.
  * ZRL (sixteen zeros) when a run reaches 16 and a non-zero value follows.
  * EOB when only zeros remain. No EOB is sent when coefficient 63 is
    non-zero.
* **Huffman coding.** `huffman_encoder` looks each symbol up in the four
  baseline Annex K tables: DC/AC × luminance/chrominance. The code tables
  are generated at elaboration from the standard BITS/HUFFVAL lists by the
  canonical-code rule. The module appends the amplitude bits (one's
  complement for negative values) and outputs up to 27 bits per symbol.
* **Interleave.** Each component has a 64-entry code FIFO. `stream_merger`
  forwards one whole block of Y, then Cb, then Cr. This is the 4:4:4
  minimum coded unit.
* **Packing.** `bit_packer` packs codes MSB first:
  * It inserts `0x00` after every `0xFF` byte.
  * It gathers bytes big-endian into 32-bit words.
  * At the end of the image it pads the last byte with 1 bits and emits a
    final partial word whose unused bytes are zero.
  * `byte_count` gives the exact scan length, stuffed bytes included.
* **Output format.** The output is the entropy-coded scan only. No SOI,
  DQT, DHT, SOF, SOS or EOI segments are produced. To view the image,
  prepend a standard baseline header with the same tables and 4:4:4
  sampling, and append `FFD9`.

## Flow control and timing

Every stage uses a valid/ready handshake.

**Throughput.** With no back-pressure the core accepts one pixel per clock.
The three DCTs work in parallel, and a block takes 64 cycles.

**Latency per stage:**

* `rgb2ycbcr`: 1 cycle.
* `dct_2d`: output valid 2 cycles after the last sample of a block.
* `quantizer`: 1 cycle.
* `zigzag_rle`, `huffman_encoder`: one symbol per cycle.
* `bit_packer`: one byte per cycle.

**Stalls.** A busy block with many non-zero coefficients can need more
than 64 cycles to code:

1. The FIFOs fill.
2. `zigzag_rle` stops taking blocks.
3. The quantiser and DCT output registers stay full.
4. The DCT refuses the last sample of its next block, and `pix_ready`
   drops.

**Results.** On the 512x512 test image of the full-size testbench, the
262144 pixels took 270613 cycles, of which 8099 were stall cycles. The scan
was 47083 bytes, about 16.7:1.

**End of image.** `pix_last` marks the final pixel. The core counts blocks
accepted and blocks written. When the two counts are equal after the last
pixel, it flushes the packer and raises `done`.

## System wrapper (`jpeg_fpga_top`)

* **`image_rom`.** A 262144 x 24-bit memory with synchronous read. A load
  port (`load_en/addr/data`) stands in for the memory initialisation file.
  It can also read an optional `$readmemh` file given by `INIT_FILE`.
* **Start.** A `start` pulse makes `addr_counter` step through the image. It
  presents the next read address ahead of time, so the ROM delivers one
  pixel per clock while the core is ready.
* **`bitstream_ram`.** Each scan word is written to the next address of this
  dual-port memory of 2^17 x 32 bits. The second port (`probe_addr`,
  `probe_q`) reads the result back. On a read-during-write the old word is
  returned. Words beyond the memory size are dropped, but still counted in
  `word_count`.
* **Clocking and board I/O.** A single clock drives everything. The clock
  generator, push buttons, switches, LEDs and processor system of an FPGA
  board are outside this RTL. `start`, `rst_n` and `done` are the signals
  they would drive or show.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `DCT_MULT_APPROX` | core, top | 8 | Approximated result bits in every DCT multiplier (0 = exact) |
| `DCT_ADD_APPROX` | core, top | 8 | Approximated result bits in every DCT accumulator |
| `Q_MULT_APPROX` | core, top | 8 | Approximated result bits in every quantiser multiplier |
| `QTAB_Y`, `QTAB_C` | core, top | `Q_STD` | Quantisation tables (`Q_STD` ≈15:1, `Q_HIGH` ≈46:1) |
| `FIFO_DEPTH` | core | 64 | Code FIFO depth per component |
| `IMG_W`, `IMG_H` | top | 512, 512 | Image size (multiples of 8) |
| `OUT_DEPTH` | top | 2^17 | Bitstream memory words |
| `SUB_W`, `WINDOW` | `approx_adder` | 4, 4 | Sub-adder width and carry-prediction window |
| `ROW_MULT_LSB`, `ROW_ADD_LSB`, `COL_MULT_LSB`, `COL_ADD_LSB` | `dct_2d` | common value | Per-unit approximation |
| `MULT_LSB` | `quantizer` | `MULT_APPROX` | Per-multiplier approximation |

At the core and top level one parameter covers all units of one type. Each
unit can also be set on its own, one level down:

* `dct_2d` takes `ROW_MULT_LSB[8]` and `ROW_ADD_LSB[8]` for the row-pass
  units of output frequency `v`.
* It takes `COL_MULT_LSB[64]` and `COL_ADD_LSB[64]` for the column-pass
  units of coefficient `u*8+v`.
* `quantizer` takes `MULT_LSB[64]`.

These arrays default to the common value. To use a per-unit mix, pass the
arrays in the `dct_2d` and `quantizer` instantiations inside
`jpeg_encoder`.

## Quality versus approximation

`tb/tb_psnr_sweep.sv` runs five core configurations on a synthetic 64x64
image (smooth gradients plus texture). For each one it decodes the scan,
reconstructs the image with an exact inverse DCT, and measures PSNR over
the three components:

| Table | Approximated bits (all units) | Scan bytes | PSNR (dB) |
|---|---|---|---|
| 15:1 | 0 | 526 | 42.0 |
| 15:1 | 4 | 531 | 36.7 |
| 15:1 | 8 | 756 | 23.2 |
| 46:1 | 0 | 196 | 30.8 |
| 46:1 | 8 | 224 | 23.0 |

Quality falls steadily with the number of approximated bits. The original
design reports the same trend on photographs: around 40 dB exact, falling
to 15–19 dB at 8 bits. The absolute numbers depend on the image. At high
approximation the scan grows, because approximation noise turns into extra
non-zero coefficients.

## Departures from the original design

* The DCT schedule and the unit counts are this design's own (see above).
* The adder's sub-adder and window widths (4 and 4) are chosen here. The
  original fixes only the principle.
* The multiplier's split of truncated bits between the two operands is
  chosen here.
* The encoder core and top take one approximation setting per unit type.
  Per-unit settings exist only on `dct_2d` and `quantizer`.
* The design uses 4:4:4 sampling, block-ordered input and no JPEG headers.
  The original produced a JPEG bitstream in RAM, but its header handling
  and sampling are not specified.
* The system wrapper has no clock generator and no board I/O logic. The
  image is loaded through a port or an init file.
* The 2.5:1 quantisation table used in one of the original comparisons is
  not available. Only the 15:1 and 46:1 tables are built in.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference models in `tb/jpeg_ref_pkg.sv` are written independently of the
RTL:

* A segment-wise model of the approximate adder.
* A truncating multiplier model.
* A floating-point-basis DCT that repeats the approximations step by step.
* A quantiser model.
* A colour transform model.
* A complete scan decoder (`scan_decoder`) that undoes the stuffing,
  Huffman coding and run-length coding.

The testbenches check:

* **Units.** `tb_approx_adder` and `tb_approx_mult` compare against the
  models over random and directed operands and several approximation
  levels. They include the exact case, `APPROX_LSB = 0`, against `+`/`*`.
* **DCT.** `tb_dct_2d` compares the exact DCT with a real-valued DCT and
  the approximate DCT with the model. A third instance gives every unit its
  own setting and is compared with a per-unit model. It also checks the 2-cycle latency,
  the one-sample-per-cycle rate and back-pressure.
* **Quantiser and coding stages.** `tb_quantizer`, `tb_zigzag_rle` and
  `tb_huffman_encoder` check the rounding, clipping, ZRL/EOB rules and the
  Annex K code words.
* **Core.** `tb_jpeg_encoder` decodes the scan of 32 blocks and compares
  every coefficient with the model. It also counts the mechanisms it
  exercises, and fails if any of them never happens:
  * input stalls,
  * ZRL symbols,
  * EOB symbols,
  * stuffed bytes.
* **Full system.** `tb_jpeg_fpga_top` runs the system at its default
  parameters. It loads a 512x512 image, encodes it and reads the bitstream
  memory back through the probe port. It decodes all 12288 blocks and
  compares each coefficient with the model. A run takes about 10 seconds of
  simulation after roughly a minute of compilation.

Each testbench has been checked against a deliberately broken copy of its
block, and fails against it.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/jpeg_pkg.sv tb/jpeg_ref_pkg.sv tb/tb_jpeg_encoder.sv \
  --top-module tb_jpeg_encoder -j 4
./obj_dir/Vtb_jpeg_encoder
```

Only the two packages and the testbench are named; Verilator finds every
module in `rtl/` by its file name through `-I`. Width warnings from the
reference models are harmless, hence `-Wno-fatal`. Any other testbench works the same way.
To try another operating point, override the approximation parameters or
the tables on `jpeg_encoder` or `jpeg_fpga_top`. For example,
`-GDCT_MULT_APPROX=4` applies when that module is the top; otherwise set the
parameters in the instantiation.

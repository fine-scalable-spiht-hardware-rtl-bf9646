# Fine-scalable SPIHT frame-memory compression (FMC) codec

A video codec reads and writes reference frames all the time, and that
external-memory traffic costs bandwidth and power. This design sits between
the codec and the AXI bus to its frame memory. It compresses every 8x8 block
of 8-bit pixels to a fixed number of bits:

| `cr_mode` | target compression ratio | bits per block | 64-bit words per block | AXI beats per 2-block burst |
|---|---|---|---|---|
| 0 | 25 %  | 384 | 6 | 12 |
| 1 | 37.5 % | 320 | 5 | 10 |
| 2 | 50 %  | 256 | 4 | 8 |
| 3 | (treated as 50 %) | 256 | 4 | 8 |

Because every block has a fixed size, its address in memory is known without
any table. The burst the codec issues (16 beats, two blocks of 8 rows) stays
at the same address. Only its length changes.

The coder is a 2-level 5/3 wavelet transform followed by a bit-plane coder in
the SPIHT family. The coder visits the sets of coefficients in a fixed order
rather than a data-dependent one. A fixed order lets the hardware code one
whole bit-plane per clock, and the stream can be cut at any bit. The
compression ratio is therefore a single number (the target bit length), not
a choice between a few hard-wired modes. Both encoder and decoder handle 8
pixels per cycle, which is one 64-bit bus word.

## Block coding

### Wavelet transform

Each block goes through a reversible integer 5/3 lifting transform with
symmetric extension, applied to rows and then columns, at two levels:

```
predict: d[i] = x[2i+1] - floor((x[2i] + x[2i+2]) / 2)
update : s[i] = x[2i]   + floor((d[i-1] + d[i] + 2) / 4)
```

The second level transforms the 4x4 LL1 quadrant only. The result is in the
usual Mallat layout, with coefficient index `r*8+c`:

```
 LL2 HL2 | HL1 HL1
 LH2 HH2 | HL1 HL1
 --------+--------
 LH1 LH1 | HH1 HH1
 LH1 LH1 | HH1 HH1      (each letter pair = 2x2 coefficients)
```

Coefficients fit in 13 signed bits. For coding, magnitudes are saturated
at 511. This gives one sign plane and nine magnitude planes, 8 down to 0.
Saturation only affects magnitudes above 511, which appear only with
extreme inputs, and the 384-bit stream ends long before the low planes of
such a block anyway.

### Sets and coding order

- A level-2 band (HL2, LH2, HH2) is one set of 4 coefficients, coded in
  raster order.
- A level-1 band (HL1, LH1, HH1) is one band set that splits into four groups
  of 2x2. Each group holds the children of one coefficient of the matching
  level-2 band. Groups are coded group by group, in raster order inside each
  group.
- LL2 is significant from the start.

The significance state has three parts: a bit per band, a bit per group in
the level-1 bands, and a bit per coefficient.

### Passes of one bit-plane `n`

For each band, in the order LL2, HL2, LH2, HH2, HL1, LH1, HH1:

1. **Sorting pass (SP)**, which does not exist for LL2:
   - If the band is still insignificant, emit one bit: does any coefficient of
     the band have bit `n` set? A 1 makes the band significant.
   - In a level-1 band that is now significant, emit one bit for each group
     that is still insignificant: does the group have bit `n` set?
2. **Merged refinement pass (MRP)**:
   - For every coefficient in a significant set (the band for LL2 and level 2,
     the group for level 1), emit bit `n` of its magnitude.
   - This one pass does the work of both SPIHT's "list of insignificant pixels"
     test and its refinement pass. The decoder can tell the two cases apart
     because it keeps the same per-coefficient state.
   - A coefficient whose first 1 appears here becomes significant, and its sign
     is queued.

After the last band come seven sign segments, one per band in the same order.
Each holds the signs queued in this plane, in coding order.

Per plane, the stream is therefore made of 20 segments:

```
LL2.MRP | HL2.SP HL2.MRP | LH2.SP LH2.MRP | ... | HH1.SP HH1.MRP | sign LL2 ... sign HH1
```

The planes follow each other from 8 down to 0. Bit 0 of a block's bitstream
is its first bit, and bit 0 of a bus word is the earliest bit of that word.
The stream is cut at the target bit length. If the stream is shorter, it is
padded with zeros. A block that is short enough is stored losslessly.

### Decoding

The decoder replays the same state machine on the bits it reads. Any bit at
or past the target length reads as 0. A magnitude bit that is not known is
taken as zero, so reconstruction truncates towards zero. The inverse
transform then rebuilds the pixels and clamps them to 0..255.

## Encoder pipeline (`fmc_encoder`)

Everything is scheduled on a **pipe time** of 8 cycles. A free-running counter
`pc` goes from 0 to 7, and one block enters per pipe time.

| pipe | stage | module |
|---|---|---|
| k   | row `r` of the block enters in cycle `r`. Each row is transformed as it arrives; on row 7 the columns and level 2 are computed | `fmc_dwt2d` |
| k+1 | the 64 coefficients are written, one row per cycle, into a store organised by bit-plane | `fmc_transpose` |
| k+2 | the core of this block's parity receives the sign plane and planes 8..4, one per cycle. Planes 3..0 go to that core's 64x4-bit bit-plane buffer | `fmc_transpose`, `spiht_core`, `fmc_bitplane_buffer` |
| k+3 | the same core receives planes 3..0 from its buffer, then drains for 2 cycles. The other core starts the next block | `spiht_core` |
| k+4 | the finished bitstream is latched and sent as 6/5/4 words | `fmc_enc_outmux` |

A `spiht_core` needs 12 active cycles per block, which is more than one pipe
time. Even blocks therefore go to core 0 and odd blocks to core 1, and the two
cores overlap by one pipe time. Inside a core, each plane passes through
three stages:

1. All six sorting passes run on the arriving plane (`spiht_sp_pass`), and
   the band and group states are updated.
2. The seven refinement passes (`spiht_mrp_pass`) run on the new states. The
   packer (`spiht_packer`) then merges the 20 segments into one word by
   shifting each segment by the running bit count.
3. That word is shifted to the current stream length and OR-ed into the
   384-bit block stream. Bits past the target length are masked off.

Measured at the block's ports: one block every 8 cycles, and 32 cycles from
the first input row to the first output word.

**Input handshake.** `in_ready` is high only when `pc` equals the number of
the next row. Row `r` of a block is therefore accepted only in cycle `r` of a
pipe time, which keeps every stage aligned without any further flow control.
A source that sends continuously is never stalled. A source that pauses loses
at most until the matching cycle comes round again.

**Output.** The encoder has no back-pressure: a word is sent every cycle
while `out_valid` is high, and `out_last` marks the last word of a block.

## Decoder pipeline (`fmc_decoder`)

1. **Input buffer.** It collects the 6/5/4 words of one block. `in_ready`
   drops while the buffer holds a complete block that has not been handed on.
2. **Hand-off.** At the end of the pipe time in which the block became
   complete (`pc == 7`), the block goes to `ispiht_core` 0 or 1, in turn.
3. **Decoding.** The core decodes one magnitude plane per cycle. It uses
   `ispiht_parser`, a single combinational cycle that reproduces all SP and
   MRP decisions of one plane and finds the position of the plane's sign
   segments. The signs are read one cycle after their plane. `done` comes 11
   cycles after start, which is within the two pipe times the core has.
4. **Output multiplexer.** `fmc_dec_outmux` holds the finished coefficients.
5. **Inverse transform.** `fmc_idwt2d` loads them at the next pipe boundary.
   It computes level 2 and the level-1 columns, then sends one clamped row of
   8 pixels per cycle.

Measured: one block every 8 cycles, and 24 cycles from the first accepted
input word to the first output row at the 25 % ratio.

## System top (`fmc_top`)

- **Write path.** The codec's write address request (normally 16 beats)
  passes through `fmc_axi_bl_adapter`. This is a one-entry register slice
  that rewrites a length field of 15 (16 beats) to 11, 9 or 7 according to
  `cr_mode`, and keeps the address. The 16 pixel words go through the
  encoder. They carry the 8 rows of the first block, then the 8 rows of the
  second block. Chroma planes are cut into 8x8 blocks like luma. The compressed words leave on `mw_*`, and `mw_last` marks the end
  of each block.
- **Read path.** A second adapter shortens the codec's read request in the
  same way. The words returned from memory (`mr_*`) go through the decoder,
  and the pixel rows come back on `cr_*`.

Only the address request (valid, ready, address, length) and the data words
are modelled. Write responses, byte strobes, IDs and the other side signals
of AXI are left to the surrounding bus logic. `cr_mode` is shared by both
paths and must not change while blocks are in flight, and a frame must be
read with the mode it was written with.

### Interfaces

| port group | direction | width | meaning |
|---|---|---|---|
| `cr_mode` | in | 2 | ratio selection, see the table at the top |
| `cw_aw_valid/ready/addr/len` | in/out/in/in | 1/1/32/8 | codec write request |
| `cw_valid/ready/data` | in/out/in | 1/1/64 | pixel words, 8 pixels, pixel 0 in bits 7:0 |
| `mw_aw_valid/ready/addr/len` | out/in/out/out | 1/1/32/8 | shortened write request to memory |
| `mw_valid/data/last` | out | 1/64/1 | compressed words, no back-pressure |
| `cr_ar_valid/ready/addr/len` | in/out/in/in | 1/1/32/8 | codec read request |
| `mr_ar_valid/ready/addr/len` | out/in/out/out | 1/1/32/8 | shortened read request to memory |
| `mr_valid/ready/data` | in/out/in | 1/1/64 | compressed words from memory |
| `cr_valid/data` | out | 1/64 | decoded pixel rows, no back-pressure |

All logic is on the rising edge of `clk`, with a synchronous active-low
`rst_n`.

## Files

| file | contents |
|---|---|
| `rtl/fmc_pkg.sv` | sizes, types, band map `coef_idx`, target lengths, 1-D 5/3 lifting functions |
| `rtl/fmc_dwt2d.sv`, `rtl/fmc_idwt2d.sv` | forward and inverse 2-level 2-D transform of one block |
| `rtl/fmc_transpose.sv`, `rtl/fmc_bitplane_buffer.sv` | coefficient-to-bit-plane store and the 64x4 lower-plane buffers |
| `rtl/spiht_sp_pass.sv`, `rtl/spiht_mrp_pass.sv`, `rtl/spiht_packer.sv`, `rtl/spiht_core.sv` | encoder core |
| `rtl/fmc_enc_outmux.sv`, `rtl/fmc_encoder.sv` | encoder output and encoder top |
| `rtl/ispiht_parser.sv`, `rtl/ispiht_core.sv` | decoder core |
| `rtl/fmc_dec_outmux.sv`, `rtl/fmc_decoder.sv` | decoder output and decoder top |
| `rtl/fmc_axi_bl_adapter.sv` | burst-length rewriting of an address request |
| `rtl/fmc_top.sv` | system top |
| `tb/fmc_ref_pkg.sv` | plain sequential reference models: DWT, IDWT, encoder, decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fmc_frame.sv` | whole-frame workload through `fmc_top` |

## Departures and design choices

The overall structure comes from the published design. This includes the
fixed-order SPIHT with one bit-plane per cycle, sorting passes plus merged
refinement passes, LL2 with a refinement pass only, and the shift-and-merge
packer. It also includes two encoder cores and two decoder cores on an
8-cycle pipe time, the 64x4 bit-plane buffers, the target lengths and the
shortened bursts. The points below are this implementation's own, or differ
from the original:

- **Wavelet filter.** The 5/3 reversible lifting filter with symmetric
  extension was chosen for this design.
- **Set structure.** A level-1 band is split into its four 2x2 child groups,
  and there are no zero-tree links between levels. These choices, together
  with the exact bit order inside a plane (SP before MRP for each band, and
  all signs at the end of the plane), define the bitstream format. A
  different set partition would give a different format and a different
  compression result.
- **Reconstruction.** Bits that were not transmitted are taken as zero.
  There is no mid-point reconstruction.
- **Decoder timing.** The decoder core takes 11 cycles per block (the
  original design needs 13). Both fit in two pipe times.
- **Flow control.**
  - The encoder input is aligned to the pipe counter through `in_ready`.
  - Neither output has back-pressure: the bus side must accept one word per
    cycle.
  - The burst adapter keeps the codec's address. The layout of compressed
    blocks in memory is left to the system.
- **Frame sizes.** Frame sizes that are not a multiple of 8, such as
  4:2:0 chroma of 1080-line video, must be padded outside this unit.
- **Not built.** The quad-core variant with a 128-bit bus and 16 pixels per
  cycle was not built. It would need four cores and a 4-cycle pipe time.

## Simulation

Every testbench compares the RTL with the reference models in
`tb/fmc_ref_pkg.sv` on random, smooth and textured blocks, and with random
coefficients. It prints `TB_RESULT checks=<n> failures=<n>` and has a
cycle-count watchdog. The testbenches check:

- **Bitstreams.** Streams are compared bit for bit at all three ratios.
- **Pixels.** Decoded pixels are compared exactly.
- **Cycle counts.** The tests check the 12-cycle core occupancy, the 11-cycle
  decoder core, one block per 8 cycles for both encoder and decoder, and
  constant latencies.
- **End to end.** `tb_fmc_top` runs the whole unit at its default sizes:
  - A codec model writes 16 blocks per ratio in 16-beat bursts into a memory
    model, then reads them back.
  - Memory contents, burst lengths and pixels are all checked.
  - The test counts events such as both cores of each side in use, a
    truncated stream, a stream shorter than the target, stalls on every input
    and on the address channels, and all three ratios. An event that never
    happens is a failure.

- **Frame workload.** `tb_fmc_frame` streams a complete synthetic 1280x720
  YUV 4:2:0 frame (21,600 blocks) through `fmc_top` at each ratio. It checks
  every compressed word and every decoded pixel against the references. It
  also checks the sustained rate: 172,800 cycles in and 172,800 cycles out,
  which is 8 pixels per cycle. It then prints the PSNR per plane. On its test
  picture the whole frame reaches about 58, 51 and 44 dB at 25 %, 37.5 % and
  50 %. The test picture is made of ramps, edges, noise and flat areas, so
  these numbers say nothing about natural video.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fmc_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fmc_pkg.sv tb/fmc_ref_pkg.sv tb/tb_fmc_top.sv
./obj_dir/Vtb_fmc_top
```

Replace `tb_fmc_top` with any other `tb_*` module to test a single block.
Each block test runs in under a second; the frame workload takes a few
seconds.

## Status

- All blocks are implemented and pass their testbenches.
- The design compiles cleanly with Verilator lint and with the slang front
  end of Yosys. Yosys maps the whole unit to about 18,500 generic cells.
- Compression quality (PSNR) at the three ratios was not measured on video
  sequences. The bitstream format is this design's own, so its quality will
  not exactly match published results.
- Clock frequency and area in a real technology were not evaluated.

# Fixed-tag BPC and FPC memory compression for a GPU memory controller

GPU memory bandwidth grows more slowly than compute, so compressing data on
its way between the L2 cache and DRAM can stretch the bandwidth. That only
pays off if the compressor and decompressor keep pace with the memory bus.
Two good compressors, Bit-Plane Compression (BPC) and Frequent Pattern
Compression (FPC), are slow in hardware for one reason: they run-length encode
runs of zero words (ZRLE). That makes the tag section variable in length, so
the words of a block have to be handled one after another.

This RTL drops ZRLE from both techniques. It gives every symbol of a block a
fixed 3-bit tag, so the tag section has a fixed size and a fixed place. All
payload positions can then be computed at once with an adder, and 32 words can
be compressed or decompressed in parallel. Zero runs are not worth much anyway:
DRAM moves data in 32-byte memory-access granules (MAGs), so a block squeezed
to a few bits still costs one full MAG.

The top level, `gpu_mc_compression`, holds two independent memory-controller
channels, one per technique. Each channel compresses 128-byte blocks from L2,
stores them in DRAM as 1 to 4 MAGs, and decompresses them on the way back.

## Data path of one channel

```
 L2 write (128 B) ──► compressor ──► mag_packer ──► write queue ──► DRAM, nmag beats of 32 B
                        (BPC or FPC)   (round to MAGs,
                                        raw if 4 MAGs)

 DRAM read beats ──► block buffer ──┬─► decompressor ──┬─► return queue ──► L2 read (128 B)
                                    └──── bypass (raw) ─┘
```

* **Compressor.** It has two stages: pattern matching of all words, then
  concatenation behind the fixed header. BPC runs the block through the DBX
  transform first.
* **mag_packer.** It rounds the compressed size up to whole 256-bit MAGs:
  `nmag = ceil(bits / 256)`. If that comes to 4 MAGs or more, compressing saves
  nothing. The raw block is then stored (4 MAGs), with the compressed flag clear.
* **Write queue and serializer.** The write queue holds the images. The
  serializer sends each one as `nmag` beats of 256 bits. Every beat carries the
  block id, `nmag` and the compressed flag, and `last` marks the final beat.
* **Read side.** The beats are gathered into a block buffer. A compressed
  block goes through the decompressor. A raw block bypasses it, but only when
  the decompressor is empty, so that blocks reach L2 in the order DRAM
  returned them.
* **Side queues.** The compression engines carry data only. Each block's id,
  and the raw block needed for the fall-back, travel in small queues that run
  beside the engines.

The channel does not store the per-block metadata (`nmag` and the compressed
flag). The surrounding controller has to keep it and hand it back with the
read beats.

## Bit-Plane Compression with fixed 3-bit tags

### DBX transform (`bpc_dbx_transform`)

A block is 32 words of 32 bits; word *i* is at bits `[32i +: 32]`. The
transform works as follows:

1. Word 0 is the **base**.
2. The 31 differences `w[i] - w[i-1]` are formed as 33-bit signed **deltas**.
3. **Bit plane** *j* (DBP *j*, *j* = 0..32) collects bit *j* of every delta.
   Delta *i* goes to plane bit *i*-1, so each plane is 31 bits wide.
4. **DBX plane** *j* = DBP *j* XOR DBP *j*+1. The top plane, 32, stays as it is.

Arrays of similar values (indices, coordinates, pointers) turn into mostly-zero
DBX planes. The transform also reports, for each plane, whether its DBP plane
was zero.

### Symbol codes (`bpc_symbol_encoder`, `bpc_pattern_decoder`)

Every one of the 33 DBX planes gets exactly one code:

| code | meaning                                        | payload                 | total bits |
|------|------------------------------------------------|-------------------------|-----------:|
| 000  | plane is zero                                   | –                       | 3  |
| 001  | plane is all ones                               | –                       | 3  |
| 010  | DBX ≠ 0 but the DBP plane is zero               | –                       | 3  |
| 011  | a single 1                                      | its position (5)        | 8  |
| 100  | two adjacent 1s                                 | lower position (5)      | 8  |
| 101  | two 1s anywhere                                 | `{upper, lower}` (10)   | 13 |
| 110  | a single 0                                      | its position (5)        | 8  |
| 111  | anything else                                   | the plane (31)          | 34 |

Codes 101 and 110 use the two slots that the zero-run codes no longer need.

When several codes fit, the encoder takes the shortest one. Among 3-bit codes
it tries zero, then all-ones, then DBP-zero. Among 8-bit codes it tries
single 1, then two adjacent 1s, then single 0.

Code 010 carries no plane bits. The decoder outputs zero for such a plane and
raises its DBP-zero flag. The back transform then sets that DBP plane to zero
instead of XORing it with the plane above.

### Back transform (`bpc_dbx_back_transform`)

The back transform works from plane 32 down:
`DBP[j] = dbp_zero[j] ? 0 : DBX[j] ^ DBP[j+1]`. It then reassembles the deltas
and adds them up from the base. In RTL both steps are plain loops. Synthesis
sees a ripple of XORs and a chain of 31 32-bit adders. That chain is the
longest combinational path in the decompressor. A prefix-sum adder would
shorten it if timing needs that.

### Compressed image

The image is written LSB first:

```
bits [31:0]           base word, stored raw
bits [32 + 3j +: 3]   code of DBX plane j, j = 0..32   (fixed 99-bit tag section)
bits [131 ...]        payloads of planes 0..32, back to back, each as long as its code says
```

The largest image is 131 + 33·31 = 1154 bits. Such a block is stored raw.

## Frequent Pattern Compression with fixed 3-bit prefixes

Each 32-bit word is matched on its own (`fpc_pattern_matcher`,
`fpc_pattern_decoder`). Prefix 000 now means a single zero word; it no longer
starts a zero run.

| prefix | pattern                                          | payload bits |
|--------|--------------------------------------------------|-------------:|
| 000    | zero word                                         | 0  |
| 001    | 4-bit value, sign-extended                        | 4  |
| 010    | byte, sign-extended                               | 8  |
| 011    | halfword, sign-extended                           | 16 |
| 100    | upper halfword, lower halfword zero               | 16 |
| 101    | two halfwords, each a sign-extended byte          | 16 |
| 110    | one byte repeated four times                      | 8  |
| 111    | uncompressed                                      | 32 |

The matcher takes the shortest pattern that fits. Repeated bytes (8 bits) is
tried before the 16-bit patterns.

The image is the 96-bit tag section (prefix *i* at bits `[3i +: 3]`), followed
by the payloads of words 0..31. The largest image is 1120 bits.

## Placing and finding payloads in parallel

Because the tags have a fixed size, both directions use the same building
block, `word_length_adder`. It produces the exclusive running sum of the
payload lengths, offset by the header size, which is each payload's start bit.

* **Compressing** (`bit_concatenator`): each payload is masked to its length
  and shifted to its start bit. The image is the OR of the header and all
  shifted payloads.
* **Decompressing** (`tag_decoder` → `word_length_adder` →
  `parallel_shift_registers`): the tags are read from their fixed place and
  turned into lengths, then into start bits. One barrel shifter per word pulls
  its payload out. Shifts past the end of the image read zeros.

## Timing: 32 or 16 word engines

`NUM_WC` is the number of parallel word (de)compressors. It must divide 32.

| NUM_WC | compressor latency | decompressor latency | new block accepted |
|-------:|-------------------:|---------------------:|-------------------:|
| 32 (default) | 2 cycles: match, concatenate | 2 cycles: start positions, decode | every cycle |
| 16     | 3 cycles: match ×2, concatenate | 3 cycles: start positions, decode ×2 | every 2 cycles |

Latency counts from the clock edge that accepts the input to the first edge at
which `out_valid` is seen high.

With `NUM_WC = 16`, a 3-bit pass counter (`pass_q`) reuses one bank of
encoders or decoders on successive halves of the block. Results of the earlier
passes wait in a register. BPC has 33 planes, so each pass handles 17 planes.

Every stage uses valid/ready handshakes. Outputs hold steady while
`out_valid && !out_ready`, and an assertion checks that.

At `NUM_WC = 32` a channel moves 128 bytes per cycle in each direction. At that
rate, about 0.9 GHz is enough for the 112 GB/s that each of the 16 memory
controllers of a 1.79 TB/s GPU has to carry.

## Top-level ports

`gpu_mc_compression #(NUM_WC = 32, FIFO_DEPTH = 4, ID_W = 8)` has `clk`,
`rst_n` (asynchronous, active low), and two copies of the channel ports, one
with the prefix `bpc_` and one with `fpc_`:

| group | signals | direction at the top |
|-------|---------|-----------|
| L2 write | `l2_wr_valid/ready/id/block[1023:0]` | in (ready out) |
| DRAM write beats | `dram_wr_valid/ready/id/data[255:0]/nmag[2:0]/comp/last` | out (ready in) |
| DRAM read beats | `dram_rd_valid/ready/id/data[255:0]/nmag[2:0]/comp/last` | in (ready out) |
| L2 read return | `l2_rd_valid/ready/id/block[1023:0]` | out (ready in) |

`nmag` is 1 to 4. `comp` says whether the stored image is compressed. Beats
go out lowest MAG first. The read side must return the `nmag` and `comp` that
were written.

## Files

All files are in `rtl/`, one module or package per file.

| file | content |
|------|---------|
| `comp_pkg.sv` | sizes, tag enums, length tables |
| `gpu_mc_compression.sv` | top: BPC and FPC channels side by side |
| `mc_comp_channel.sv` | one memory-controller channel (parameter `ALGO`) |
| `bpc_opt_compressor.sv`, `fpc_opt_compressor.sv` | compressors |
| `bpc_opt_decompressor.sv`, `fpc_opt_decompressor.sv` | decompressors |
| `bpc_dbx_transform.sv`, `bpc_dbx_back_transform.sv` | DBX transform and its inverse |
| `bpc_symbol_encoder.sv`, `bpc_pattern_decoder.sv` | BPC plane codes |
| `fpc_pattern_matcher.sv`, `fpc_pattern_decoder.sv` | FPC word patterns |
| `bit_concatenator.sv`, `tag_decoder.sv`, `word_length_adder.sv`, `parallel_shift_registers.sv` | packing and unpacking |
| `mag_packer.sv` | MAG rounding and raw fall-back |
| `sync_fifo.sv` | the queues |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

The expected values come from `tb/comp_ref_pkg.sv`. It builds compressed
images bit by bit with plain loops, so it shares no structure with the
parallel RTL. It also generates test blocks of ten kinds: zero, constant,
strided, small integers, sparse, repeated bytes, padded halfwords, noisy
pointers, shared upper bits, and random.

* **Engines.** The compressor and decompressor testbenches run the 32-word and
  16-word versions side by side. They check every image and size, the
  latencies (2 and 3 cycles) and the accept intervals (1 and 2 cycles), and
  they run under random stalls.
* **Channel and top.** `tb_mc_comp_channel` and `tb_gpu_mc_compression` pair
  each channel with `tb/chan_harness.sv` and a behavioural DRAM
  (`tb/dram_model.sv`). They check what is stored in DRAM: the MAG count, the
  flag and every stored bit. They read all blocks back in random order, under
  back-pressure on all four ports, and compare them with the originals.
* **Coverage.** The harness counts a failure if any of these never happened:
  1-, 2-, 3- or 4-MAG blocks, raw fall-back and bypass, a raw block arriving
  behind blocks still inside the channel, or a stall on any port.
* **Default size.** `tb_gpu_mc_compression` runs the top at its default
  parameters, with 200 blocks per channel. It finishes in seconds.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/comp_pkg.sv tb/comp_ref_pkg.sv rtl/*.sv tb/dram_model.sv tb/chan_harness.sv \
  tb/tb_gpu_mc_compression.sv --top-module tb_gpu_mc_compression
./obj_dir/Vtb_gpu_mc_compression
```

In the end-to-end run, BPC stored 200 mixed blocks in 441 MAG beats instead
of 800. FPC used 581 beats.

## What follows the source design and what is this implementation's

These parts follow the design this RTL implements:

* ZRLE is removed and every symbol has a fixed 3-bit tag.
* The BPC code table, with its two new codes.
* 16 or 32 parallel word engines.
* The compressor split into pattern matching and concatenation.
* The decompressor steps: tag decoding, start-position adder, parallel
  shifters, pattern decoding, and for BPC the DBX back transform.
* The 2- and 3-cycle latencies.
* 128-byte blocks and 32-byte MAGs.
* Queues after the compressor and after the decompressor.

These parts are this implementation's own choices:

* **BPC base word.** It is stored raw in 32 bits. The classic BPC encodes it
  in a variable-size field.
* **33 BPC encoders.** A block has 33 DBX planes, so there are 33 encoders,
  not 32.
* **Uncompressed BPC plane.** It takes 34 bits: the 3-bit code plus 31 plane
  bits.
* **Tie-break order** between codes of the same length.
* **FPC pattern set.** It is the classic one, which the design keeps
  unchanged.
* **Pipelining.** The decompressors accept a block every cycle at
  `NUM_WC = 32`, just as the compressors do.
* **Raw fall-back** at 4 MAGs, the read bypass, and keeping blocks in order.
* **Interfaces and sizes.** The beat format, the metadata carried with the
  beats, the handshakes, the queue depths and the id width.
* **Barrel shifters** in place of clocked shift registers.

Not built:

* The original ZRLE-based 8-word engines and the M-BDI compressor. They are
  only points of comparison.
* The L2 cache and the DRAM.
* Clock frequency, area and power. These depend on the target process. The
  RTL has not been synthesized or timed for any process, so it does not show
  whether the 2-cycle split meets a given clock.

The per-block metadata store of a real memory controller is also missing.

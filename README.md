# JPEG-LS lossless block codec IP for a Zynq-class SoC

This design compresses and restores 24-bit RGB images without loss, in FPGA
logic beside an ARM processor. The CPU splits an image into small blocks
(8×8 pixels by default) and places them in DDR. A **compression IP** reads
each block over AXI and codes it with the JPEG-LS lossless algorithm (LOCO-I).
It writes a compact block stream back to DDR. A **decompression IP** reverses
this. A small **register module** on AXI4-Lite lets the CPU point the two IPs
at their buffers, start them, and poll for completion.

JPEG-LS suits hardware for three reasons:

- Each sample is predicted from only four neighbours.
- Statistics are kept in a 365-entry context table, plus 2 entries for run interruption.
- Prediction errors are coded with a Golomb code whose parameter adapts to each context.

Flat areas switch to run mode, which sends roughly one bit per run segment instead of one code per sample.

## System view

```
            AXI4-Lite                       AXI4 (16-beat bursts)
   CPU ───────────────► jls_regs ──start/addr──► jls_enc_ip ◄────────► DDR
                           ▲   └──start/addr──► jls_dec_ip ◄────────► DDR
                           └── busy/done/counts ─┘
```

`jls_codec_top` holds these three parts:

| Part | Contents |
|---|---|
| `jls_regs` | the registers |
| `jls_enc_ip` | compression IP: encoder, a raw-block RAM, a compressed-block RAM and a DMA engine |
| `jls_dec_ip` | decompression IP: the same structure around the decoder |

Each IP has its own AXI4 master port. The CPU, DDR and image source sit outside the design.

### Registers (byte offsets)

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0 starts compression, bit 1 starts decompression (self-clearing) |
| 0x04 | STATUS | R | bit 0 enc busy, bit 1 enc done, bit 2 dec busy, bit 3 dec done |
| 0x08 | ENC_SRC | RW | DDR byte address of the raw blocks |
| 0x0C | ENC_DST | RW | DDR byte address for the block stream |
| 0x10 | ENC_NBLK | RW | number of blocks |
| 0x14 | ENC_BYTES | R | bytes written by the last compression (headers included) |
| 0x18 | ENC_RAW | R | blocks that were stored uncompressed |
| 0x1C | DEC_SRC | RW | DDR byte address of the block stream |
| 0x20 | DEC_DST | RW | DDR byte address for the restored blocks |
| 0x24 | DEC_NBLK | RW | number of blocks |
| 0x28 | DEC_BYTES | R | stream bytes consumed by the last decompression |

How the done bits behave:

- A done bit is set when its core finishes and cleared when that core is started again.
- Unmapped offsets read as zero.

### Data formats in DDR

**Raw block.** A block is 3·BLK·BLK bytes: the R plane, then G, then B, each in raster order. That is 192 bytes for 8×8, stored four samples per 32-bit word with the first sample in the low byte. Raw blocks are consecutive: block *n* starts at `SRC + n·192`.

**Block stream.** Each block is one header word followed by its payload:

- The header holds the payload length in bytes.
- The next block follows immediately after the payload.

If coding would not make a block shorter than 192 bytes, the block is stored raw instead, with header 192. The decoder copies any block whose header is 192 or more. The worst-case growth is therefore 4 bytes per block.

**Payload.** The code bits of the three planes follow each other, MSB first, in 32-bit words. The last word is zero padded.

- Each plane is coded as a separate tiny JPEG-LS image: contexts and the run index are reset at the start of each plane, and the row above the first row reads as zero. Any block can therefore be decoded on its own.
- There are no JPEG-LS markers or byte stuffing. The stream is private to the two IPs.

## The coding rules, briefly

For a sample x with left neighbour a, upper b, upper-left c and upper-right d:

1. **Gradients.** Compute d−b, b−c and c−a. Quantise each to −4…4 with thresholds 3/7/21. Fold the sign so that the first non-zero value is positive. The context is Q = 81·Q1 + 9·Q2 + Q3 (1…364), plus a sign bit.
2. **Mode.** If all three gradients are zero, the sample starts a **run**. Otherwise it is a **regular** sample.
3. **Regular sample.**
   - The median edge detector predicts min(a,b), max(a,b) or a+b−c.
   - The context's bias C is added (subtracted for a negative sign) and the result is clamped to 0…255.
   - The error is reduced modulo 256 into −128…127.
   - The Golomb parameter is the smallest k with N·2^k ≥ A.
   - The error is mapped to a non-negative value, with the mapping flipped when k = 0 and 2B ≤ −N.
   - The value is sent as a limited-length Golomb code. The limit is 32 bits; above it, an escape of 23 zeros, a one and 8 literal bits is sent.
   - A, B, C and N are then updated, and halved every 64 occurrences.
4. **Run.** A run continues while samples equal a.
   - A '1' is sent each time the run fills a segment of 2^J(index) samples, and the index then grows.
   - At the end of a row, a partial run sends one more '1'.
   - A run broken by a different sample sends '0' and the leftover count in J bits.
   - The breaking sample is coded in one of two extra contexts (a = b or not), with a shorter code limit 31−J.

The decoder applies the same rules in reverse and keeps identical state, so both sides always agree.

## Encoder pipeline (`jls_encoder`)

The encoder accepts one sample per clock with no stall, so a 192-sample block takes 192 cycles plus a short drain. Its six stages follow the order of the algorithm:

| Stage | Work |
|---|---|
| 1 | `jls_neighbors` returns a, b, c, d for the incoming sample from a two-row buffer |
| 2 | `jls_gradq` computes the gradients, context number, sign and run test |
| 3 | the context is read from `jls_ctx_mem`; `jls_predictor` forms the prediction; k is found |
| 4 | the error is computed, mapped and written back to the context; run counting happens here |
| 5 | `jls_golomb_enc` assembles the code word(s) for the sample |
| 6 | `jls_bitpack` packs the code words into 32-bit words and reports the block length |

Three parts are the hardest to follow.

**Context forwarding.** Two samples only one cycle apart can use the same context. When that happens, stage 3 would read a value that stage 4 is still writing. A comparator on the two context numbers makes stage 3 take stage 4's new value instead of the memory's. A plane start resets the contexts: stage 3 then treats every context as fresh while `jls_ctx_mem` clears its valid bits in one cycle.

**Run counting without look-ahead.** Textbook JPEG-LS scans ahead to the end of a run before coding it. Here the run is counted one sample at a time in stage 4: the '1' bit is sent the moment a segment fills. The bit stream is therefore identical to the textbook one, and the pipeline never waits.

**Prefix merging.** At a run interruption, the '0' and the J count bits are sent in the same code word as the interruption sample. This keeps every sample to one code of at most 32 bits.

## Decoder (`jls_decoder`)

Decoding cannot be pipelined the same way: the next sample's context depends on the sample being decoded. The decoder is a state machine:

1. `S_CTX` reads the context.
2. `S_REG` decodes a regular sample.
3. `S_RUN` consumes run bits.
4. `S_FILL` writes out a counted run.
5. `S_RI` decodes a run-interruption sample.

`jls_bitreader` keeps a 32-bit look-ahead window over the compressed words and refills it from the block RAM. `jls_golomb_dec` parses one Golomb code per cycle with a leading-zero count. Measured cost, including the IP's DMA:

- decoding: about 520 cycles per 8×8 RGB block;
- encoding: about 380 cycles per block, mostly the DMA: read, one sample per cycle, then burst write.

## DMA and AXI behaviour (`jls_axi_dma`)

All transfers use INCR bursts of 16 beats × 4 bytes. A transfer of *w* words uses ⌈w/16⌉ bursts.

- Write beats past the end carry a zero byte strobe, so nothing beyond the transfer is overwritten.
- Read beats past the end are discarded.
- One burst per direction is in flight at a time.
- Write beats take three cycles each (fetch from RAM, load, handshake).
- Assertions check that AW, W and AR hold valid and payload stable until accepted.

The decompression IP first reads one burst to get the block header. If the block is longer than 15 payload words, it reads the rest in more bursts.

## Parameters

| Name | Default | Where | Meaning |
|---|---|---|---|
| `BLK` | 8 | top, IPs, cores | block edge; 16 is also supported and tested end to end |
| `AW` | per IP | bit reader, decoder, DMA | RAM word-address width |
| T1/T2/T3, RESET, LIMIT | 3/7/21, 64, 32 | `jls_pkg` | JPEG-LS defaults for 8-bit lossless coding |
| `AXI_BURST`, `AXI_BYTES` | 16, 4 | `jls_pkg` | burst shape |

## Departures from the original design and open points

- **Block stream.** The exact block header, per-plane reset, padding and word order are choices made here. The original only says that the block size is recorded in a block header and that blocks which do not shrink are stored raw.
- **Raw-fallback threshold.** Blocks that compress to exactly the raw size are stored raw. The original speaks of "larger than".
- **Registers.** The register map, the AXI4-Lite bus and the sticky done bits are this design's own.
- **Throughput.** The original reports whole-system times, which include CPU work. For comparison, a 512×512 image is 4096 blocks. At 100 MHz that is about 1.6 ms to encode and 2.1 ms to decode in these cores (without DDR wait states), against 8.9 ms and 72 ms end to end in the original evaluation.
- **Overlap.** The IPs process blocks one at a time: read, code, then write. Nothing overlaps, which is the simplest correct choice.
- **Not included.** The CPU software, SD card access and DDR are outside the RTL.

## Verification

Every module has a self-checking testbench in `tb/`:

- Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
- `tb/jls_ref_pkg.sv` is an independent, software-style JPEG-LS reference coder. It scans runs ahead, as the standard describes. The encoder, decoder and both IPs are compared word for word against it.
- `tb/axi_mem_model.sv` is a behavioural DDR with optional random wait states.

`tb_jls_codec_top` runs at the default parameters and acts as the CPU:

1. It programs the registers.
2. It compresses 24 blocks of varied content (flat, ramps, noise, stripes, mixed) and checks the stream against the reference.
3. It decompresses them and checks that the result is bit-exact.

It also counts each mechanism and fails if any never occurred:

- regular samples, runs and run interruptions;
- escape codes;
- context forwarding;
- raw and compressed blocks;
- multi-burst block reads;
- AXI back-pressure.

Running a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/jls_pkg.sv tb/jls_ref_pkg.sv tb/tb_jls_codec_top.sv --top-module tb_jls_codec_top
./obj_dir/Vtb_jls_codec_top
```

`tb_jls_codec_blk16` repeats the same end-to-end test with the top built for 16×16 blocks (12 blocks, bit-exact).

`tb_jls_codec_image` runs a whole 200×200 synthetic RGB image (625 blocks) through both cores. It reassembles the result and checks it pixel for pixel. With DDR wait states, encoding takes 2.30 ms and decoding 3.75 ms at 100 MHz, and the stream is 38.7 % of the raw size.

Replace the testbench name to run any other test. The small combinational tests (`tb_jls_gradq`, `tb_jls_predictor`, `tb_jls_golomb_enc`, `tb_jls_golomb_dec`) sweep corner cases and tens of thousands of random inputs.

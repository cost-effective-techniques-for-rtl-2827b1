# Patching faults with what the processor already has: iPatch and COP

This repository holds synthesizable SystemVerilog for two low-cost reliability mechanisms:

* **iPatch** lets the L1 caches run at a voltage low enough for some SRAM cells to fail. Every
  8-byte subblock holding a failing cell is disabled. A read that lands on a disabled subblock
  would normally be sent to the L2 (a *false hit*). iPatch serves many of those reads from copies
  already sitting in structures the core has anyway:
  * the store queue,
  * the miss-status holding registers (MSHRs) and their fill buffers,
  * the micro-op cache.

  Those structures are built from robust cells and are fault-free.
* **COP** (and its extension **COP-ER**) protects main memory with SECDED ECC without ECC DIMMs.
  Most 64-byte blocks can be squeezed by just 34 bits. The freed room holds four SECDED check
  bytes inside the block itself.
  * The few blocks that do not compress are stored raw.
  * COP-ER replaces the low 34 bits of each raw block with a pointer to an entry in a small
    ECC region in DRAM. That entry holds the displaced bits and the block's check bits.

The two mechanisms are independent. `reliability_top` puts them side by side: iPatch on the core
side, COP and COP-ER on the memory-controller side. The core pipeline, the L2, the LLC arrays and
DRAM are outside the design, and the top connects to them through ports.

## File map

| File | Block |
|------|-------|
| `rtl/ecc_pkg.sv` | Hamming helper functions (check-bit count, data-bit positions) |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | parameterised Hamming / extended-Hamming encoder and decoder |
| `rtl/cop_pkg.sv` | COP sizes, types, scheme codes, the per-segment static hash |
| `rtl/cop_txt_codec.sv`, `rtl/cop_msb_codec.sv`, `rtl/cop_rle_codec.sv` | the three compressors and their expanders |
| `rtl/cop_cw_counter.sv` | counts valid code words in a block and corrects them |
| `rtl/cop_encoder.sv` | write-back path: choose a scheme, compress, add ECC, hash; flag aliases |
| `rtl/cop_decoder.sv` | read path: detect a compressed block, correct, expand (4-cycle pipeline) |
| `rtl/llc_alias_victim.sv` | LLC victim choice that never evicts an incompressible alias |
| `rtl/coper_pkg.sv` | COP-ER sizes, the pointer and ECC-entry formats |
| `rtl/coper_codec.sv` | embeds and recovers the pointer; builds and checks the ECC entry |
| `rtl/coper_allocator.sv` | finds, fills and frees ECC entries through a three-level valid-bit tree |
| `rtl/ipatch_pkg.sv` | address, word, line and fault-pattern types |
| `rtl/sbd_remap.sv` | periodic L1 flush and set-index remapping |
| `rtl/sbd_l1_cache.sv` | subblock-disable L1 (used for both L1D and L1I) |
| `rtl/ipatch_mshr.sv` | MSHR file with patch and reference bits |
| `rtl/ipatch_store_queue.sv` | unordered store queue that keeps completed stores and patches |
| `rtl/sq_patch_inserter.sv` | copies the disabled segments of a filled line into the store queue |
| `rtl/ipatch_uop_cache.sv` | micro-op cache with patch-aware replacement |
| `rtl/ipatch_load_select.sv`, `rtl/ipatch_fetch_select.sv` | source priority for loads and fetches |
| `rtl/reliability_top.sv` | everything wired together |

Every file opens with a comment covering:

* what the block does and how;
* its ports and timing;
* which parts come from the published description and which are choices made here.

## iPatch

### Subblock-disable L1 (`sbd_l1_cache`)

The default is 64 sets × 8 ways × 64-byte lines (32 KB), with eight 8-byte subblocks per line.

* **Fault map.** An 8-bit map per way says which subblocks are disabled. It is written through a
  port after a memory test at the chosen voltage.
* **False hit.** A read whose line is present but whose subblock is disabled is a false hit. The
  line is made most-recently-used, so the refill from L2 goes to a different way (relocation).
* **Replacement** is true LRU.
* **Writes.** The cache is write-through with no write-allocate. Writes to disabled subblocks are
  dropped.
* **Timing.** Reads are combinational. The three-cycle hit latency of a real L1 is not modelled;
  all iPatch sources are searched in the same cycle, so only relative priority matters.

`sbd_remap` flushes both L1s every 500,000 cycles and increments a counter. The counter is XORed
into the set index, so a chip's faulty ways move around over time and performance is less
sensitive to where its faults happen to fall.

### Data side: store queue and MSHR patches

A load looks in three places at once and takes the first hit, in this order:

1. the store queue;
2. the D-MSHRs;
3. the L1D.

`ipatch_load_select` makes the choice. A load that hits a disabled subblock and is served by the
store queue or an MSHR is reported as *patched*.

**MSHR patches (`ipatch_mshr`).** Ten entries (four on the I-side). Each holds a line address,
8 subblock-valid bits, the fill data and three flags:

* *patch*: the entry no longer tracks a miss but keeps its line as a patch;
* *ref*: a load was served from it;
* *written*: marks a completed line.

What happens to an entry:

* **When a line completes,** it is written into the L1. If the destination way has any disabled
  subblock, the entry stays behind as a patch; otherwise it is freed.
* **A new miss** takes a free entry if there is one. Otherwise it overwrites an unreferenced
  patch. If every patch has been referenced, all reference bits are cleared first.
* **A miss to a line already being fetched** merges with that entry.
* **A store to a patched line** invalidates the patch, because the patch would become stale.

**Store-queue patches (`ipatch_store_queue`, `sq_patch_inserter`).** The queue (36 entries) is
unordered.

* **Forwarding.** A load carries a *colour*, the sequence number of the youngest older store.
  Pending stores forward to a load only if they are older than that colour, and the youngest
  such store wins. Completed entries and patches are older than anything pending, so they forward
  when no pending store matches.
* **Completed stores stay.** A store that has been written to the L1 is kept as a completed
  entry. When it completes, an older completed entry for the same word is removed, and its patch
  bit passes to the new entry.
* **Patch insertion.** When a line from the D-MSHRs is written into the L1, the fault pattern of
  its destination way tells which 8-byte segments sit on disabled subblocks. The inserter writes
  those segments into the queue as completed *patch* entries, one per cycle. It only uses cycles
  in which no store is being allocated, so the queue needs no extra write port.
* **Freeing room.** A new store takes a free slot if there is one. Otherwise it frees a completed
  entry in this order of preference:
  1. untouched non-patch;
  2. touched non-patch;
  3. untouched patch;
  4. touched patch.

  "Touched" means the entry has forwarded to a load. If every patch has been touched, the
  patches' reference bits are cleared. The queue reports full only when every entry is still
  pending.
* **Coherence.** An invalidation by line address removes all completed entries for that line.

### Front end: micro-op cache and I-MSHR patches

A fetch looks in three places and takes the first hit, in this order:

1. the micro-op cache (32 sets × 8 ways);
2. the I-MSHRs;
3. the L1I.

`ipatch_fetch_select` makes the choice and flags fetched words that lie on a disabled subblock.
The decoder, which is outside this design, returns that flag with the micro-ops it fills into
the micro-op cache, where it becomes the entry's *patch* bit.

The replacement policy is steered by a run-time *patch threshold*:

* while a set holds fewer patch entries than the threshold, the least-recently-used non-patch
  entry is replaced;
* otherwise plain LRU applies.

The best threshold depends on the fault rate, so it is an input port.

## COP: ECC inside compressed blocks

### Block format

A compressed block is 512 bits. The 480-bit payload is:

* a 2-bit scheme code: `00` raw, `01` TXT, `10` MSB, `11` RLE;
* a 478-bit compressed body.

The payload is cut into four 120-bit pieces, and each piece gets 8 check bits of a (128,120)
extended-Hamming code. Each resulting 128-bit code word is XORed with its own fixed 128-bit
constant (the *static hash*). Without the hash, a block of repeated values would repeat a valid
code word and could look compressed.

The hash constants come from a small multiply/add recurrence in `cop_pkg::seg_hash`: start with
`w = 0x9E3779B9·(k+1) + 0x7F4A7C15`, then four times take `w = w·0x0019660D + 0x3C6EF35F` to give
the four 32-bit words of segment k.

### Compression schemes

Each scheme must free at least 34 bits: 32 for the check bytes and 2 for the scheme code.

* **TXT.** Every byte has its top bit clear (ASCII text). The body keeps 7 bits per byte, which
  frees 64 bits.
* **MSB.** All eight 64-bit words share bits 62:58, as similar pointers and small integers do.
  Word 0 is kept whole, and the other seven drop those five bits, which frees 35 bits.
* **RLE.** Runs of two or three equal bytes, all `0x00` or all `0xFF`, that start on a 16-bit
  boundary are each replaced by a 7-bit descriptor: the value, the length and the 16-bit position.
  * A three-byte run frees 17 bits and a two-byte run 9.
  * A greedy scan from the low end takes three-byte runs where it can and stops as soon as
    34 bits are freed.
  * The body is the descriptors followed by the remaining bytes in order.

The encoder tries MSB, then RLE, then TXT, and writes the block raw if none fits.

### Telling compressed from raw blocks

There is no per-block flag in DRAM. `cop_cw_counter` removes the hash from each 128-bit segment
and decodes it. If three or more segments are valid code words, the block is treated as
compressed. That still holds with one segment damaged beyond repair. The decoder then:

1. corrects single errors in each segment;
2. reports a double error as uncorrectable;
3. expands the body by its scheme.

Otherwise the block passes through raw. `cop_decoder` registers its result through a four-stage
pipeline.

A raw block that happens to contain three valid code words (an *alias*) cannot be written to
DRAM, because it would be misread. The encoder flags it, and the LLC must keep such lines:
`llc_alias_victim` picks the oldest valid line that is not an alias, and raises `overflow` if
every way of the set holds an alias.

## COP-ER: an ECC region for incompressible blocks

A raw block written by COP-ER keeps bits 511:34. Its low 34 bits become:

| bits | field |
|------|-------|
| 33:6 | 28-bit pointer: 24-bit ECC block number, 4-bit slot |
| 5:0 | 6-bit Hamming code of the pointer |

The pointer names one of eleven 46-bit entries in a 64-byte ECC-region block. Each entry holds:

* a valid bit;
* the 34 displaced bits;
* the 11 check bits of a (523,512) extended-Hamming code over the original 512-bit block.

On a read:

1. the decoder sees a raw block;
2. `coper_codec` corrects and brings out the pointer;
3. the entry is fetched;
4. the original block is rebuilt and checked.

`coper_allocator` manages the region as a three-level tree of valid-bit blocks. Each valid-bit
block holds 501 valid bits and 11 check bits, which exactly fills 64 bytes.

* **L3 bit:** set when its block of 11 entries is full.
* **L2 bit:** set when its L3 block is all ones.
* **L1 bit:** set when its L2 block is all ones.

Allocation works like this:

1. Look in the L3 block used last.
2. If that block is all ones, walk L1, then L2, then L3 to find a block with room.
3. Fill a free slot in that block.
4. Propagate "full" upwards as needed.

Freeing clears the entry and propagates "not full" upwards. Every valid-bit block read is
corrected and written back re-encoded.

The region layout, in 64-byte blocks:

| Block | Offset |
|---|---|
| L1 | 0 |
| L2 block j | `1 + j·G2` |
| L3 block (j,k) | `2 + j·G2 + k·G3` |
| ECC block (j,k,m) | `3 + j·G2 + k·G3 + m` |

Here `G3 = 502` and `G2 = 1 + 501·502`. The ECC block number is `(j·501 + k)·501 + m`. Only the
66 L2 groups that a 24-bit block number can reach are used. That still gives 182 million entries,
more than the 134 million 64-byte blocks of an 8 GB memory.

The allocator has one command in flight (req/ack) and one simple memory port: a request is held
until `mem_ready_i`, and read data comes back later with `mem_rvalid_i`.

## Where this design departs from, or goes beyond, the description it follows

* **(128,120) code.** The check matrix is not reproduced. A classic extended-Hamming layout is
  used instead, and the static-hash constants are this design's own.
* **Bit-level formats are this design's own.** This covers:
  * the scheme codes and their priority;
  * the MSB and RLE formats;
  * the greedy RLE scan;
  * the pointer position and format;
  * the ECC-region layout.
* **Three choices of this design's own:**
  * the valid-bit blocks use a (512,501) extended-Hamming code;
  * an MSHR stays as a patch only when its line lands on a faulty way;
  * store-queue entries and fetch blocks are 8 bytes.
* **Not built:**
  * adjusting the pointer so that an incompressible alias stops being an alias;
  * what to do on an LLC alias overflow, beyond raising the flag;
  * the LLC's "was uncompressed" bit and the reuse of an entry on write-back. The allocator has
    an UPDATE command for the entry rewrite.
* **Latency.** The L1s are combinational, so their latency is not modelled. The COP decoder's
  four-cycle latency is a choice made here.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. Shared reference models (Hamming check bits, scheme tests,
block generators, the hash) are in `tb/tb_ref_pkg.sv`. To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/*_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_cop_decoder.sv --top-module tb_cop_decoder -Mdir obj -o sim
./obj/sim
```

`tb_reliability_top` runs the whole design at its default sizes and checks every returned value.
It makes each mechanism happen at least once and counts it, failing for any that never happens:

* data side: misses, store-queue and MSHR patches, forwarding, false hits, MSHR and store-queue
  eviction;
* front end: I-MSHR patches, micro-op cache patches and their eviction;
* COP: all three compression schemes, raw blocks, aliases, corrected and uncorrectable errors,
  and LLC alias skipping and overflow;
* COP-ER: allocation, rebuild, correction, free and a tree walk;
* the 500,000-cycle remap.

It takes about a minute with Verilator.

The design is written for synthesis, with no vendor memories. At the default sizes the two L1
arrays and the micro-op cache are large register arrays, so a generic flow such as Yosys takes a
long time on `sbd_l1_cache` and `reliability_top`. A reduced configuration synthesises the same
top in about a minute: 4×2 L1s, 2 MSHRs per side, a 4-entry store queue, a 2×2 micro-op cache and
an allocator fan-out of 8.

Some block testbenches shrink the block to keep the run short:

* the allocator runs with a fan-out of 4;
* the L1 runs as 4 sets × 4 ways;
* the remap period is 100 cycles.

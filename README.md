# PCM — a precision-controlled memory path for low-precision DNN training

Neural-network training tolerates far less numerical precision than FP16: 9 bits, or 7 bits
early in training, are often enough. A GPU memory system cannot profit from that. It moves
data in byte-aligned formats, so a 9-bit value costs as much as a 16-bit one. It also keeps
refreshing every DRAM bit, including bits nobody reads.

PCM stores data **transposed**. A 1 KB block of 256 32-bit words is kept as 32 *bit-slices*
of 256 bits (32 B) each: slice 0 holds bit 31 (the sign) of all 256 words, slice 1 holds
bit 30, and so on. Once data is laid out this way:

* **Hard approximation.** To train at *n* bits, fetch only the first *n* slices of a line. The
  traffic between DRAM and the core then scales with the precision. The L1 cache puts the
  missing low bits back as a software-chosen constant (the *fill mask*) and rebuilds words
  before the core sees them.
* **Soft approximation.** DRAM refresh works on whole rows, and each slice has DRAM arrays of
  its own. So the refresh period can be set per bit position. Sign and exponent slices are
  refreshed normally. Mantissa slices in use are refreshed at a stretched period and may pick
  up rare bit errors. Slices that are not fetched at all are not refreshed.

This repository holds synthesizable SystemVerilog for the parts that make this work inside one
GPU core's memory path:

* the transposed address mapping onto HBM channels and banks;
* the modified L1 data cache: sub-request generator, MSHRs, bit-slice data array, shuffle
  logic, next-line prefetcher and write buffer;
* the per-channel refresh controller;
* the software-visible configuration registers;
* a CTA (thread-block) admission limiter.

## Bit-slices, masks and numbering

| term | meaning |
|---|---|
| line | 1 KB, 256 words of 32 bits, address bits [31:10] (`line_t`, 22 bits) |
| slice *k* | 256 bits = bit (31−*k*) of each of the line's 256 words; bit *j* of the slice belongs to word *j* |
| sector | 8 consecutive words (32 B), the unit a core read or write handles |
| fetch mask | 32-bit **word-bit** mask: bit *i* set = word bit *i* is fetched. 9-bit training: `0xFF800000` |
| fill mask | 32-bit word-bit mask ORed into every word delivered to the core. With `0x00400000`, the bit just below a 9-bit value is forced to 1, which rounds the truncated value to the middle of its interval |
| slice mask | inside the L1 the fetch mask is used bit-reversed (bit *k* = slice *k*); `pcm_pkg::slice_mask()` converts |

Slice 0 is the most significant bit. Refresh modes are set per slice, so "slices 0–5 protected"
means the sign and 5 exponent bits of an FP16-style value held in the upper half of the word.

## Where slices live in HBM (`pcm_addr_map`)

Suppose all 32 slices of a line sat in one bank: a line fetch would then open 32 different rows
one after another. Instead, each slice gets a DRAM array of its own:

| field | value |
|---|---|
| channel | *k* mod 16 |
| bank | `{line[7:5], k div 16}`: slices 0–15 in the even bank of a bank pair, slices 16–31 in the odd bank |
| column (32 B) | `line[4:0]` (32 columns of a 1 KB row) |
| row | `line[21:8]` |

Any number of slices up to 16 is therefore fetched with one row activation per channel, in
parallel. All 32 slices take at most two activations per channel, in different banks.
Neighbouring slices never share a channel. Because refresh works per bank, every slice can also
be refreshed on its own schedule. A line's slices always stay on one die.

Choosing the bank pair from `line[7:5]` is this design's own choice: the mapping only fixes
that the slices of a line use bank 0 and bank 1 of every channel. Using the pair bits makes the
whole of a 16-channel, 16-bank, 16 K-row, 1 KB-row device reachable. Each (line, slice) pair has
exactly one place.

## The L1 data cache (`pcm_l1d`)

32 KB, 4 sets × 8 ways of 1 KB lines, kept in slice order. Its parts:

```
 core ──req──► FSM ──► tag array (2 lookup ports) ──hit──► data SRAM ──► shuffle (2 stages) ──► core
                 │                                   miss
                 │                                    ▼
                 │         MSHRs ◄── slices ◄── memory        sub-request generator ──► memory
                 │                                                ▲
                 └──write──► write buffer ──32 slice writes──► (arbiter, writes first)
                 prefetcher (line L+1 after a miss on L) ──► same allocation path
```

**Read miss.** The FSM picks a victim way and marks it *pending*. It allocates an MSHR entry
and gives the line to the sub-request generator. The victim is an invalid way, or else the LRU
way; pending ways are never chosen. For each slice selected by the fetch mask, MSB slice first,
the generator emits one sub-request per cycle. A sub-request carries R/W, the slice address
(line base + *k*·32 B) and the slice index *k*. All slices of the line share one MSHR entry.
The entry starts with its *arrived* mask set to the slices **not** fetched, and each returning
slice sets its own bit. When the mask is all ones, the tag becomes valid in that same cycle.
Each returning slice goes straight into the data array. A read miss holds the core port until
its line is valid, and the request then completes as a hit.

**Read hit.** The data array has one 256-bit-wide bank per slice. A read takes the addressed
sector's 8 bits from each of the 32 banks in one cycle, still in slice order. The shuffle logic
then works in two registered stages:

1. Slices outside the current fetch mask, or not held by the line, are forced to 0. The fill
   mask is then ORed in.
2. Fixed wiring moves bit *j* of slice *k* to bit (31−*k*) of word *j*.

Example with 2 words of 4 bits, slice 1 not fetched, fill `0100`. The slices are `01, xx, 00,
00`. The OR gives `01, 11, 00, 00`. Read out as words, that is `0100` and `1100`
(`tb_pcm_shuffle` checks this case).

**Precision changes.** Each tag stores the slice mask its line was filled with. A lookup hits
only if the line holds every slice the current fetch mask asks for. A line cached at 9 bits
therefore misses when software raises the precision to 10 bits. It is refetched into the same
way, so there is never a second copy. A line held at higher precision than now requested hits,
and is cut down to the current mask on the way out. Software can change the precision between
epochs, mini-batches or layers with one register write.

**Writes.** Core writes bypass the data array; a matching line is invalidated. A write to a
line whose fill is still in flight waits for the fill to finish. A single 32 B write to
transposed memory would become 32 one-byte slice writes. The write buffer
(`pcm_write_buffer`, 4 lines) therefore gathers words in place inside whole 1 KB lines, and
evicts a line:

* when a write hits it and the line becomes fully written;
* as the LRU victim when a write misses and no line is free;
* when a read misses on a line it holds (a flush). The read waits for the flush, so it sees the
  new data.

Eviction sends 32 write sub-requests, one per slice. Each carries 256 data bits and a 256-bit
word-enable mask, so a partly written line does not overwrite the other words. The data is kept
at full precision in memory. Write sub-requests take priority over read sub-requests on the
memory port.

**Prefetcher.** A demand miss on line L makes L+1 a candidate, held in one register. The
candidate is dropped if L+1 is already cached, pending, in an MSHR or in the write buffer.
Otherwise it is fetched like a miss, at the current precision, whenever an MSHR and the
generator are free. A demand read that finds its line already in flight waits for it.

**Timing.** A hit returns data 3 clock edges after the edge that accepted the request: lookup
and SRAM read, then the two shuffle stages. The core port takes one request at a time. On a
miss, the generator issues one sub-request per cycle when the memory port is ready.

## Refresh control (`pcm_refresh_ctrl`, one per channel)

Channel *c* holds slice *c* in its even banks and slice *c*+16 in its odd banks. Every
`REF_INTERVAL` cycles (default 3900, i.e. 3.9 µs at 1 GHz) the controller visits the next bank
in round-robin order. It then acts according to that bank's slice mode:

| mode | action |
|---|---|
| `REF_PROTECT` | refresh every round (normal period) |
| `REF_SKIP` | refresh only in rounds where `round mod skip_ratio == 0`, which stretches the period `skip_ratio` times |
| `REF_IGNORE` | never refresh |

A refresh is a `ref_valid`/`ref_bank` request, held until `ref_ready`. Counters report
refreshes issued and omitted. For the 9-bit scheme the modes are: slices 0–5 protected, 6–8
stretched, 9–31 ignored. The default stretch of 12 comes from a 768 ms mantissa period over an
assumed 64 ms normal period; 1024 ms would be 16.

## Configuration registers (`pcm_csr`)

| addr | register | reset |
|---|---|---|
| 0 | fetch mask | `0xFFFFFFFF` (full precision) |
| 1 | fill mask | `0` |
| 2 | refresh mode of slices 0–15, 2 bits each, slice 0 in [1:0] | all `REF_PROTECT` |
| 3 | refresh mode of slices 16–31 | all `REF_PROTECT` |
| 4 | refresh stretch factor, bits [7:0] | 12 |

Writes take effect on the next cycle. Register reads are combinational.

## Thread throttling (`pcm_cta_throttle`)

Large lines mean few lines, so many warps would thrash the L1. The core therefore admits a new
CTA only while fewer than `MAX_CTAS` (2) CTAs are resident and the CTA's threads fit under
`MAX_THREADS` (1024). Only this admission check is provided; the CTA scheduler is the GPU's.

## Top level (`pcm_top`)

The top wires together the CSRs, the CTA limiter, the L1, the address mapper and 16 refresh
controllers. Everything beyond the L1 is left to the surrounding system: interconnect, L2, the
DRAM command scheduler and the HBM itself. The top's ports:

| port group | content |
|---|---|
| `cfg_*` | register write and read |
| `cta_*` | launch and completion |
| `core_req_*` / `core_resp_*` | 32 B sector reads and writes |
| `mem_req_*` | `subreq_t` sub-request: rw, slice byte address, line, kth, data, wmask, plus its HBM channel, bank, row and column (valid/ready) |
| `mem_resp_*` | returned slice (line, kth, 256 data bits), always accepted |
| `ref_valid[c]`, `ref_bank[c]`, `ref_ready[c]` | per-channel refresh requests, with counters |
| `l1_events[0..8]` | L1 event counters: hits, misses, prefetches issued and dropped, cycles waiting on in-flight lines, cycles waiting on flushes, write-buffer evictions (full, victim, flush) |

A returning slice must belong to a line that has an MSHR entry; an assertion in `pcm_mshr`
checks this.

## What follows the published design, and what does not

Taken from the published architecture:

* the transposed layout and slice-per-channel/bank mapping;
* the 1 KB line and 32 B slice;
* the L1 geometry (4 sets, 8 ways, 32 KB);
* sub-requests generated sequentially from the fetch mask, each with a slice-index field;
* one MSHR entry per line, completing when all mask bits are 1;
* slice-ordered storage in the data array;
* the fill mask ORed in by the shuffle logic, and its two-cycle latency;
* the next-line prefetcher;
* the write buffer's two eviction rules;
* the protect / stretch / ignore refresh treatment;
* the 1024-thread / 2-CTA limits;
* the example masks.

Choices made here, where the published material is silent:

* the widths and handshakes;
* MSB-first issue order and the slice offset *k*·32 B;
* MSHR, write-buffer and prefetch-queue sizes (4, 4, 1);
* LRU replacement in the L1;
* the pending bit and the rule for a lower-precision hit;
* gating vacant slices to 0 before the fill OR;
* all data is held transposed, so the slice-to-word reordering is fixed wiring with no bypass for
  untransposed data;
* 8-word (one-sector) core accesses and the blocking core port;
* write-invalidate on a write hit, and flush-on-read for buffered lines;
* word enables on slice writes, and write-first arbitration;
* the bank-pair, row and column bits of the mapping;
* per-bank round-robin refresh, the 3.9 µs slot, the 64 ms base period and the register map.

The published L1 hit latency (30 cycles, against 28 for a conventional L1) is a simulator
figure for a full GPU pipeline. This RTL keeps only the two extra shuffle cycles.

Not included: the GPU core, interconnect, L2, the FR-FCFS DRAM scheduler and the HBM device.
The testbenches use a behavioural HBM model (`tb/tb_hbm_model.sv`) in their place. Its contents
are a hash of the address until written, and its read latency is fixed.

## Parameters

| module | parameter | default |
|---|---|---|
| `pcm_l1d` | `SETS`, `WAYS`, `MSHR_ENTRIES`, `WB_ENTRIES` | 4, 8, 4, 4 |
| `pcm_addr_map` | `NUM_CH`, `NUM_BANKS`, `COL_BITS`, `ROW_BITS` | 16, 16, 5, 14 |
| `pcm_refresh_ctrl` | `NUM_BANKS`, `REF_INTERVAL` | 16, 3900 |
| `pcm_cta_throttle` | `MAX_THREADS`, `MAX_CTAS` | 1024, 2 |
| `pcm_shuffle` | `NSL`, `NWORDS` | 32, 8 |

Word size, line size and slice count are package constants in `pcm_pkg`. The mapper assumes
32 slices over 16 channels; an elaboration-time assertion checks this.

## Simulating

Every testbench is self-checking and ends by printing `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcm_pkg.sv tb/tb_pcm_top.sv \
          --top-module tb_pcm_top -Mdir obj_top -o sim
./obj_top/sim
```

The files named inside each testbench are found through `-Irtl -Itb`, or list them
explicitly. `tb_pcm_top` runs the complete design at its default parameters and takes about
10 s. It does the following:

* sets the 9-bit refresh modes;
* runs a streaming read/write workload at 7, 9, 16 and 32 bits and compares every read with a
  reference memory;
* checks every sub-request's channel, bank, row and column;
* checks that the number of slices read equals bits × lines fetched (for example 9 × 25 = 225
  at 9 bits);
* counts refreshes per bank over four full rounds;
* requires every mechanism (hits, misses, prefetch issue and drop, in-flight waits, flushes,
  each kind of write-buffer eviction, protected, stretched and ignored refresh, CTA
  throttling) to happen at least once.

`tb_pcm_schedule` runs the precision schedule used for training on the whole path, with a
shortened refresh slot:

1. one FP16 reference epoch;
2. three epochs at 7 bits;
3. two epochs at 9 bits.

An epoch streams 24 weight lines and 16 activation lines and writes 8 output lines. The test
checks that:

* memory read traffic is 7/16 and 9/16 of the FP16 epoch (280 and 360 slice reads against 640);
* the banks of slices 7 and 8 are not refreshed at 7 bits and start being refreshed at 9 bits;
* the stretched slice gets half the refreshes of a protected one.

Each block also has its own testbench, `tb/tb_<module>.sv`. The ones for `pcm_l1d`,
`pcm_write_buffer` and `pcm_tag_array` run random traffic against reference models.

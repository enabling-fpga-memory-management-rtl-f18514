# Paged virtual memory for FPGA-attached memory

An accelerator that processes large data sets often does not know in advance how big its
output will be. With plain physical addresses the host must pick a buffer size up front.
Growing a buffer later means copying it, or chaining separate buffers that the hardware
must then manage itself.

This design gives the accelerator the same tool a CPU has: **paged virtual memory**.
- FPGA kernels use virtual addresses inside a reserved window of the 64-bit address space.
- A hardware **allocator** on the FPGA handles `malloc`, `realloc` and `free`. Both the host
  (over MMIO registers) and FPGA logic (over a command port) can use it.
- Hardware **address translators** sit between each kernel port and the memory bus. They
  turn virtual addresses into physical ones by walking two-level page tables kept in the
  board's own memory.

Physical memory is handed out lazily. An allocation only reserves virtual pages. A page gets
a physical frame the first time anything touches it. So a buffer can be allocated far larger
than needed, and growing it with `realloc` never copies data: only page-table entries move.

Everything runs in one clock domain and passes one 64-byte bus beat per cycle. The
translation path is built so that a sequential stream, once translated, reads at the full
bus rate.

## Address space and page tables

| Quantity | Default | Parameter |
|---|---|---|
| Virtual window | `0x8000_0000_0000_0000` + 8 TiB | `VM_BITS = 43` |
| Page (frame) size | 64 MiB | `PAGE_BITS = 26` |
| Entries per page table | 8192 × 64 bit = 64 KiB | `L2_BITS = 13` |
| Physical memory | 64 GiB = 1024 frames | `PHYS_BITS = 36` |
| Memory regions (channels) | 4, each 256 frames | `NUM_REGIONS = 4` |

Addresses with bit 63 set and bits 62..43 clear are virtual. Any other address bypasses
translation unchanged, so physical and virtual traffic can share a port.

A virtual address splits into three parts, from the top: the first-level (L1) index, the
second-level (L2) index, and the page offset. L1 holds 2^(VM_BITS−PAGE_BITS−L2_BITS)
entries, which is 16 at the defaults. Each L1 entry covers 8192 pages, which is 512 GiB.

Entry layout (defined in `rtl/vm_pkg.sv`):

| Entry | Bit | Meaning |
|---|---|---|
| Leaf (L2) | 0 | present: a frame is assigned |
| | 1 | reserved: the page belongs to an allocation |
| | 2 | last page of the allocation |
| | 4:3 | memory region the frame must come from |
| | 63:16 | frame address (only bits ≥ `PAGE_BITS` are meaningful) |
| L1 | 0 | present |
| | 63:16 | address of the 64 KiB-aligned L2 table |

A walk returns a **mask** along with the physical address. Bits set in the mask come from the
physical address. Bits clear in the mask come from the virtual address. The translator's cache
matches and substitutes under that mask.

### Packing page tables into frames

A frame (64 MiB) is far larger than a page table (64 KiB), so page tables are packed, up to
1023 per frame.
- Slot 0 of a page-table frame holds a bitmap of which slots are in use.
- The frames that hold page tables are listed in the **page table rolodex**.
- Frame 0 is the first page-table frame. Its slot 1, at physical `0x10000`, is the L1 table.
  This address is fixed, so walkers never need to be told where L1 lives.

To create a table, the allocator flips through the rolodex. For each frame it reads the bitmap
and searches it with a gap finder for one free slot. Only when every listed frame is full does
it take a new frame from the frame store.

Deleting a table clears its bitmap bit. A frame that ends up with no tables is removed from the
rolodex and freed. Frame 0 is never freed.

At the default sizes, all page tables together fit in frame 0: at most 1 + 16 tables. The
new-frame and delete-frame paths only run with smaller pages or larger memories. The
allocator testbench runs them that way.

## The translation path

```
kernel port ─► translator ─► bus read arbiter ─► memory
                   │ miss
                   ▼
          translation arbiter ─► page table walker ─► (its own bus master)
                                        │ leaf has no frame yet
                                        ▼
                          allocator: authoritative lookup ─► frame store
```

### Translator (`rtl/translator.sv`)

Each kernel read port has its own translator. The translator has three parts:
- **Cache.** A small, fully associative cache in registers. Each entry holds a virtual
  address, a physical address and a mask. Replacement is first-in first-out. The default is
  one entry, which is enough for a buffer read sequentially.
- **Slice.** A register slice sits behind the cache.
- **Request queue.** Requests wait here in order. Their translation is either already known
  (a cache hit or a bypass) or still pending from the walker.

On a miss, the translator sends a lookup to the walker, and the request enters the queue
anyway. Requests behind it keep flowing: a hit can be queued behind a miss, and further
misses send further lookups, so a pipelined walker can work on several at once. At the
queue output a missed request waits for its answer, which comes back in request order. The
request is translated with it and the answer is written into the cache.

Several requests to one page can miss while that page's walk is still in flight. Each gets
its own answer, but only the first is cached. Duplicates would otherwise push other pages
out of a small cache.

Timing:
- A hit or a bypass leaves three cycles after it is accepted.
- A miss costs one walk more.
- Throughput is one request per cycle.

A burst is translated by its first address, so it must not cross a page boundary.

Faults (an address outside any allocation) are not handled. The request is passed on
untranslated and the answer is not cached. `flush` invalidates the cache; use it after a
`free` or `realloc` that moved pages a kernel may have cached.

### Page table walker (`rtl/pt_walker.sv`)

The walker does two dependent reads, L1 then L2, through one read master.

Its structure is a chain of "sync" points joined by queues:
1. The first sync issues the L1 read and queues the request.
2. A second sync pairs the L1 response with its request and issues the L2 read.
3. A third sync pairs the leaf with its request:
   - If the leaf holds a frame, the walker answers directly.
   - If not, it asks the allocator.
4. A last sync merges the allocator's answers back in request order.

A token counter limits how many walks can be between the first sync and the leaf at once
(`SLOTS`). Every response queue is sized to hold all reads that can be outstanding. The
walker can therefore always accept read data and never stalls the shared bus.
- `SLOTS = 1` is the non-pipelined walker. It is the main configuration.
- Larger values overlap walks. Random-access workloads benefit from about 20 slots.

A walk costs two memory round trips plus about six cycles.

With `WIDE_MASK` set, the walker checks the whole 64-byte leaf beat it has just read. That
beat holds the leaves of eight neighbouring pages. If all eight are present and map to eight
contiguous frames aligned to eight, it answers with a mask three bits wider. One translator
entry then covers all eight pages.

## The allocator (`rtl/allocator.sv`)

The allocator is the largest and most intricate part. It is a group of units around one
command state machine:

| Unit | Role |
|---|---|
| `virtual_allocator` | command state machine: `malloc`, `realloc`, `free`, initialisation |
| `pt_reader` | read-ahead reader that streams page-table entries, one per cycle |
| `gap_finder` ×2 | finds a run of free entries; one for L1 entries, one for table slots in a bitmap |
| `pt_rolodex` | list of page-table frames, with a "flip to next" cursor |
| `frame_store` | one bit per physical frame, in on-chip memory |
| `req_resp_arbiter` | "frame arbiter": shares the frame store between the allocator and the lookup unit |
| `auth_lookup` | resolves walker misses and assigns frames on first access |
| `write_barrier` ×2 | count unacknowledged writes: one for the allocator, one for the lookup unit |
| `bus_read_arbiter`, `bus_write_arbiter` | share the allocator's bus masters between its units |

### Commands

**malloc(size, region)**
1. Scan the L1 table for a run of free entries large enough for `size` (first fit).
   Every allocation takes whole L1 entries. At the defaults that is a multiple of 512 GiB of
   virtual space. Virtual space is plentiful; this keeps allocations from sharing a table.
2. For each entry, create an L2 table and write the L1 entry.
3. Write every page's leaf as *reserved*, with its region. The final page is also marked
   *last*, so `free` needs no size.
4. Answer with the virtual pointer.

No frames are touched.

**realloc(ptr, size)**
1. Find a new gap for the new size.
2. Copy the old leaves, frames included, to the new tables.
3. Append reserved pages, or drop the surplus.
4. Unmap the old range. This frees only the frames of dropped pages and deletes the old
   tables.

Data never moves; it just appears at the new virtual address.

**free(ptr)**
1. Stream the allocation's leaves.
2. Free every assigned frame, stopping at the *last* mark.
3. Delete the tables and clear the L1 entries.

A `free` of an address with no allocation answers `ok = 0`.

**Initialisation**, after reset:
1. Clear the frame store, which takes one cycle per frame.
2. Reserve frame 0 and write its slot bitmap.
3. Add frame 0 to the rolodex.
4. Create the first table, which lands at `0x10000`: the L1 table.

`alloc_ready` rises when this is done.

The state machine is built from routines: find-gap, set-entries, unmap, new-table,
delete-table, read and write. A small return stack lets one state call a routine and resume
afterwards.

### Physical memory on first access (`rtl/auth_lookup.sv`)

When a walker finds a reserved leaf with no frame, it defers the lookup to the
**authoritative lookup** unit:
1. The unit waits until all of its own earlier writes are acknowledged.
2. It reads L1 and the leaf again.
3. If the leaf now has a frame, because an earlier miss to the same page assigned one, it
   answers with that frame. Otherwise it takes a frame from the frame store in the leaf's
   region.
4. It answers the walker immediately, and only then writes the updated leaf.

Answering first keeps the latency of a first touch low. Re-reading the table after the barrier
is what stops one page from getting two frames when two misses race. Addresses outside any
allocation get a fault answer.

The frame store keeps a roving pointer per region: the next search starts where the last
one stopped. It examines one frame per cycle.

### Ordering

The design has no caches that snoop page tables. Correctness rests on two barriers:
- The allocator starts no page-table read, and gives no command response, until all its
  writes are acknowledged (`write_barrier`). A kernel that receives a pointer can therefore
  use it at once.
- `free` and `realloc` first wait until the lookup unit has no write outstanding. A frame the
  lookup unit just wrote into a leaf is therefore seen and freed.

This is why the allocator's memory port needs a write-response channel.

### Cost of each operation

The page-table reader delivers one entry per cycle. All counts below are in cycles.
- A new table must be cleared with 1024 beat writes.
- Unmapping or copying streams the whole 8192-entry table.
- At the default sizes with a 64-cycle memory: initialisation takes about 2 200, `malloc` of
  256 MiB about 1 300, and `realloc` about 18 000. The `realloc` time is mostly two full-table
  streams.

For very large allocations, time grows with the number of L1 entries touched.

## Command interfaces

**Host MMIO** (`rtl/mmio_alloc.sv`): 32-bit registers selected by a 4-bit word index.

| Index | Register | Access |
|---|---|---|
| 0, 1 | SIZE low/high | r/w |
| 2, 3 | PTR low/high | r/w |
| 4 | CMD: [1:0] op (0 malloc, 1 realloc, 2 free), [5:4] region. Writing issues the command | w |
| 5 | STATUS: [0] command pending, [1] response waiting, [2] response ok, [3] allocator ready | r |
| 6, 7 | RESP pointer low/high | r |
| 8 | RESP_ACK: clears the response | w |

Read data appears one cycle after `mmio_rd_valid`. The host must acknowledge each response
before the next one can be shown.

**FPGA command port**: `ucmd`/`uresp` carry the same `alloc_cmd_t`/`alloc_resp_t` structs
with valid/ready handshakes. A round-robin multiplexer merges it with the MMIO path.

## Buses and arbitration

All memory buses are ID-less and in order, AXI-like:
- A request channel carries an address and `len` (beats − 1, 8 bits).
- A data channel carries 512-bit beats with `last`.
- Writes also carry byte strobes and have a response channel.

The arbiters:
- **Read.** `bus_read_arbiter` grants round-robin and records each granted master in a
  routing queue. Data is routed by the queue head, which is popped on `last`.
- **Write.** `bus_write_arbiter` keeps two routing queues, one for data order and one for
  response order.
- **Lookups.** `req_resp_arbiter` is the translation arbiter. It is the same idea for
  single-beat request/response pairs.

`stream_fifo` is the common queue. Assertions in the arbiters and FIFOs check the handshake
rules: valid must be held until ready, and there must be no overflow.

## Top level (`rtl/vm_top.sv`)

`vm_top` is an example system:
- Two benchmark readers (`read_benchmarker`), each behind its own translator.
- The translation arbiter, the walker and the allocator.
- The MMIO block and the user command port.
- A four-port read arbiter: reader 0, reader 1, walker, allocator.

Parameters of `vm_top` beyond the address-space ones listed earlier:

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_ENTRIES` | 1 | translator cache entries per reader (up to 32 is sensible for timing) |
| `MAX_OUTSTANDING` | 8 | requests a translator can hold while walks are pending |
| `PTW_SLOTS` | 1 | walks in flight in the walker (1 = non-pipelined) |
| `PTW_WIDE_MASK` | 0 | widen answers over eight contiguous frames |
| `PT_FRAMES` | 16 | frames the rolodex can list for page tables |

The read bus, the write bus (allocator only) and the MMIO registers are ports. Memory, its
controller and the interconnect are outside.

Each reader can run linearly or randomly. It has these controls:
- base address
- window size for random offsets, 2^`bm_window` bytes
- burst length
- number of bursts

It reports beats, cycles and an XOR checksum of the data. Counters for cache hits, misses,
bypasses, walks, deferred lookups, page-table and frame events are also ports.

## Measured behaviour on the evaluation workloads

`tb_vm_workload` allocates a 2 GiB buffer (32 pages) and reads it at random, in bursts of 4
beats. It runs three configurations side by side, each with a 64-cycle memory model. The
second, warm pass of 400 bursts gives:

| Translator cache | Walker slots | Cycles for 1600 beats | Misses |
|---|---|---|---|
| 1 entry | 1 | about 53 000 | 97–98 % of bursts |
| 1 entry | 8 | about 7 800 | same |
| 32 entries | 1 | about 1 670 | none |

With one entry almost every random burst needs a walk. A non-pipelined walker then
serialises them, at roughly three memory round trips per burst. Eight walker slots overlap
the walks. A 32-entry cache holds the whole buffer, so reads run at the full rate of one
beat per cycle. Linear reads reach the full rate even with one entry: 4096 beats take
4162 cycles in `tb_vm_top`.

`tb_alloc_latency` measures the allocator on its own at 256 KiB and 1 MiB pages, with 64 GiB
of memory and a 64-cycle memory. A `malloc` starts from an empty space; a `realloc` grows a
buffer that was one eighth smaller. All numbers are cycles:

| Pages | Size | L2 tables | malloc | realloc | free |
|---|---|---|---|---|---|
| 256 KiB | 128 MiB | 1 | 6 057 | 22 290 | 8 421 |
| 256 KiB | 1 GiB | 1 | 10 985 | 23 634 | 8 421 |
| 256 KiB | 8 GiB | 4 | 54 116 | 88 731 | 33 678 |
| 1 MiB | 1 GiB | 1 | 3 689 | 19 410 | 8 421 |
| 1 MiB | 8 GiB | 1 | 13 545 | 22 111 | 8 421 |
| 1 MiB | 256 GiB | 32 | 400 860 | 644 863 | 269 360 |

The cost of an operation has three parts:
- `free` costs about 8 400 cycles per L2 table, because each table is streamed whole
  (8 192 entries).
- `malloc` pays for the L1 scan, about 1 000 cycles to clear each new table, and the writing
  of every leaf.
- `realloc` adds a full-table copy and an unmap on top of that.

Compared with the figures published for the original hardware at the same page sizes,
`malloc` is two to three times slower, `free` is somewhat faster, and `realloc` for small
buffers is about twice as slow.

## Where this departs from the original design

- Page-table entry layout, register map, queue depths, arbitration policy and the virtual
  window are this design's choices.
- The translator passes faults through untranslated. The original leaves error handling open.
- The frame store ignores an initial-frame hint, as the original does too.
- Page-table frames always come from region 0.
- There are no writer translators, because the example top has only readers. `translator` is
  direction-agnostic: it works on a request channel and could front a write port too.
- Arbiters have no extra timing registers, so results on a real FPGA may need them for
  250 MHz.
- Latency in simulation, with a 64-cycle memory model: 67 cycles untranslated, and about 197
  cycles for a read that misses the translator. That is one memory read plus a two-read walk.
  The original hardware reported about 71 and 233 cycles. The difference is the memory and
  the interconnect.
- Unmap and copy stream whole tables at one entry per cycle, even for small allocations.
- The free-space search reads the L1 table at one entry per cycle. With 256 KiB pages the L1
  table has 4096 entries, so even a small `malloc` costs about 5 300 cycles in simulation,
  several times what the original hardware reported for that page size.
- The original allows a walker to look up neighbouring pages and widen the mask when their
  frames are contiguous. Here this is limited to the eight leaves that arrive in the same
  beat as the requested one: when all eight map to eight contiguous frames aligned to eight,
  the answer's mask is three bits wider. It is off by default (`WIDE_MASK`, `PTW_WIDE_MASK`
  on the top), because frames are allocated one by one and rarely line up.
- Lookup answers are not broadcast to other translators; a `flush` input takes the place of
  such invalidation.
- The rolodex holds `PT_FRAMES = 16` page-table frames. That never limits the default
  configuration, but with small pages it caps the total mapped size: about 94 GiB with
  256 KiB pages and 1.9 TiB with 1 MiB pages.

Two limits come from the allocation policy itself and are kept on purpose:
- Because every allocation takes whole L1 entries, there can be at most as many live
  allocations as L1 entries: 16 at the defaults, 4096 with 256 KiB pages.
- `realloc` and `free` are only safe when nobody uses the old pointer any more. Readers and
  writers of a buffer must be paused, with their requests past the translator, before the
  command is issued. They resume with the pointer that `realloc` returns.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vm_pkg.sv tb/tb_vm_top.sv --top-module tb_vm_top -Mdir obj_tb_vm_top
./obj_tb_vm_top/Vtb_vm_top
```

Replace `tb_vm_top` with any other testbench in `tb/`.

`tb/mem_model.sv` is a behavioural memory:
- It has a fixed read latency (`RD_LAT`, default 64 cycles) and write latency.
- Burst reads are in order.
- Write responses are in order.
- Unwritten memory reads as a pattern derived from the beat address.

**tb_vm_top** runs the top at its default parameters. It:
1. waits for initialisation;
2. allocates over MMIO and over the user port;
3. runs linear and random reads through the translators, comparing checksums with a
   reference model of the page tables built from memory;
4. measures bypass and miss latency and linear throughput;
5. exercises `realloc`, `free` and the translator flush.

It counts each mechanism: hits, misses, bypasses, walks, deferred lookups, frames assigned
and freed, page-table creation and deletion, fault answers, write-barrier waits and both command paths. A mechanism that never
happened counts as a failure. A run takes a few seconds after compilation.

The block testbenches (`tb_<block>`) use reduced sizes where the defaults would be slow.
For example, `tb_allocator` uses 256 KiB pages and 64 MiB of memory, so that page-table frames
fill up and are freed. Where a latency or rate is known, they also check cycle counts:
- 1024 entries in 1056 cycles from `pt_reader`;
- one request per cycle through the arbiters;
- the clear time of the frame store;
- walk latency and slot overlap in the walker.

## Files

`rtl/`
- `vm_pkg.sv`: types and the entry format
- `vm_top.sv`
- translation: `translator.sv`, `pt_walker.sv`
- allocator: `allocator.sv`, `virtual_allocator.sv`, `auth_lookup.sv`, `frame_store.sv`,
  `pt_rolodex.sv`, `gap_finder.sv`, `pt_reader.sv`, `write_barrier.sv`
- buses: `bus_read_arbiter.sv`, `bus_write_arbiter.sv`, `req_resp_arbiter.sv`,
  `stream_fifo.sv`
- `mmio_alloc.sv`
- `read_benchmarker.sv`

`tb/`
- one testbench per block (`tb_<block>.sv`); `tb_vm_top.sv` is the full-size end-to-end test
- `tb_vm_workload.sv` and `tb_alloc_latency.sv`: the evaluation workloads described above
- `mem_model.sv`

# Impulse main memory controller in SystemVerilog

Impulse is a memory controller that adds a second level of address translation
on the memory side. A program can ask the operating system to remap a data
structure that is scattered through memory, such as a matrix column, a
transposed matrix, elements picked by an index vector, or pages with the wrong
cache colour. The program then sees a dense, contiguous region. Addresses in
that region are *shadow addresses*, and no DRAM backs them. When the CPU cache
misses on a shadow line, the controller works out where each piece of that line
really lives. It reads the pieces, packs them into one 128-byte line and
returns it on the bus as if it were ordinary memory. A write to a shadow line
is taken apart the same way and each piece is written back to where it lives.
The CPU caches and the bus
see only dense lines, so cache space and bus bandwidth are not wasted on data
the program does not use.

This repository holds synthesizable RTL for the controller:

| block | file | what it is |
|---|---|---|
| top | `rtl/impulse_mmc.sv` | address decode, routing, arbitration |
| shadow controller | `rtl/shadow_ctrl.sv` | one per remapped region: queue, SRAM buffer, gather/scatter FSM |
| control registers | `rtl/shadow_regs.sv` | one set per shadow controller |
| AddrCalc | `rtl/addr_calc.sv` | shadow offset to pseudo-virtual address arithmetic |
| MTLB | `rtl/mtlb.sv` | pseudo-virtual to physical translation from an in-memory page table |
| MCache | `rtl/mcache.sv` | small FIFO cache with next-line prefetch |
| DRAM scheduler | `rtl/dram_sched.sv` | round-robin merge of all DRAM traffic |
| shared types | `rtl/impulse_pkg.sv` | widths, register map, structs |

## Address spaces

The system has 40-bit physical addresses, 4 KiB pages and 128-byte lines. A
bus address is one of two kinds:

* **physical**: it goes straight to the MCache.
* **shadow**: bits 39:38 are `11`, bits 37:32 select a shadow controller, and
  bits 31:0 are the offset inside that controller's shadow region. One region
  is at most 4 GiB.

A shadow controller turns a shadow offset into **pseudo-virtual (pv)**
addresses. A pv address is 34 bits wide, so a remapped data structure can be
up to 16 GiB. pv space is the virtual image of the original data structure. The
MTLB translates pv pages to physical frames with a flat page table that the
operating system builds in DRAM. The remapping itself never needs a physical
address. The OS can therefore hand out shadow regions over data whose pages are
not physically contiguous.

## How a shadow read flows

```
bus ──► decode ──► shadow_ctrl[idx] ──pv──► MTLB ──pa──► MCache ──► DRAM scheduler ──► DRAM
                        ▲                                  │
                        └──────── object lines ◄───────────┘
bus ◄── assembled line ─┘
```

1. The top decodes the address and pushes the offset into the selected
   controller's waiting queue.
2. The controller looks the line up in its SRAM buffer. On a hit, the line is
   returned at once.
3. On a miss, the controller reserves a buffer block and computes the first pv
   address. Each further object's pv address is one add away, or for
   indirection-vector mapping one table lookup away. It sends one pv address
   per cycle to the MTLB, tagged with the object's slot in the line.
4. The MTLB forms the physical address and passes the access to the MCache.
5. On a miss, the MCache reads the line from DRAM. It also prefetches the next
   line.
6. Each returned line is routed back to its controller by tag. The controller
   cuts the object out and puts it in its slot. When all objects are in, the
   controller returns the assembled line to the bus.

Physical reads and writes use only steps 4–5 without the MTLB. Physical writes
are full-line writes and are not answered.

A shadow write runs the same steps backwards (scatter). The controller keeps
the written line in a buffer block. It sends the same pv addresses as a read,
marked as writes. When the MCache takes one of these writes, it fetches that
object's bytes and byte mask from the controller's block, using the tag to
find them. The write then goes to DRAM as a masked write. Shadow writes are not
answered.

## Shadow controller (`shadow_ctrl`)

This block holds the most logic and needs the most care. It contains:

* `shadow_regs`
* `addr_calc`
* a QDEPTH-entry waiting queue of line offsets
* an SRAM buffer of SBUF_LINES (4) line-sized blocks
* a one-line SRAM holding the current line of the indirection vector

Each buffer block has its own bookkeeping:

* a tag and a valid bit
* a count of objects returned against objects expected; the block is *filling* while they differ
* a *return* flag
* an error flag
* the object size
* a table of up to 32 byte offsets, one per object slot

Address generation and data collection are decoupled. The FSM only generates
addresses. Data fills blocks in the background, and finished blocks leave on
their own.

| state | action |
|---|---|
| IDLE | takes the next offset from the waiting queue |
| CHECK | checks the region bounds and the map type, then looks the line up in the buffer. **Hit:** sets the block's return flag; if the block is still filling, it leaves when its last object arrives. **Miss:** reserves a free block (round robin; never one that is filling or waiting to be returned) and loads the first pv address, object count and object size from AddrCalc. With no free block, a demand access waits here |
| IVCHK / IVREQ / IVWAIT | indirection-vector mapping only. Checks whether the line holding `iv[index]` is in the IV SRAM; if not, reads that line from DRAM and waits |
| ISSUE | offers `pv` to the MTLB, tagged `{block, slot}`, with `tlb_write` set for a scatter. When accepted, records `pv[6:0]` as the object's offset in its physical line, then steps `pv` (or `index`). After the last object the controller is free again; it does not wait for data |
| PREF | after every demand access, if `pref_info` is 1 (forward) or 2 (backward), the line `pref_count` bytes ahead or behind goes through CHECK/ISSUE as a *prefetch*. The block is not marked for return. A prefetch is dropped if the line is outside the region, already buffered, or no block is free |
| ERR | answers an out-of-region access or an unknown map type with an all-zero line and `err` |

Returned object lines come back tagged `{block, slot}`. The object is cut out
with a shift by its recorded offset and a mask of its size. It is merged into
its block at `slot × object_size`. The return path presents the lowest-numbered
block that is complete and marked for return. An error answer from ERR takes
precedence.

Points to watch:

* **Objects.** An object is a power of two from 4 to 128 bytes and never
  crosses a line. A 128-byte line therefore holds 1 to 32 objects, and every
  object comes from exactly one physical line. Direct and page-colour mapping
  always move one whole line (one object of 128 bytes).
* **Answer order.** Objects return in any order, because the MCache answers
  hits before misses; the tag makes the order irrelevant. Lines can also leave
  the controller in a different order from the requests. The bus response
  carries the line address.
* **Scatter.** In CHECK, a write first waits until any buffered copy of its
  line is neither filling nor waiting to be returned. It then drops that copy
  and reserves a block with the write data. ISSUE sends the pv addresses with
  `tlb_write` set. The memory side reads object `{wsel_blk, wsel_slot}` from
  the block combinationally. The object is shifted to its recorded offset
  within the line (`wobj_data`), with a byte mask of the object's size
  (`wobj_mask`). Each `wr_ack` counts toward the block's object count, and
  the block is freed once every object is written. So a later read of the
  line cannot overtake the write: its copy is gone, and the MCache serves
  accesses in order. A write outside the region is dropped.
* **Duplicate reads.** A second read of a line that is still waiting to be
  returned waits in CHECK until the first copy has left.
* **Errors.** If any object comes back with an error (invalid or faulting
  PTE), the line is returned with `err` set and then dropped from the buffer.
* **Reconfiguration.** Any write to a control register invalidates the SRAM
  buffer and the IV SRAM. Blocks in flight still complete, using the object
  size recorded when they were reserved.
* **Block-number width.** Tags carry the block number in BLK_W = 2 bits, so
  SBUF_LINES can be at most 4.

Timing:

* A buffer hit on a complete block answers 2 + LAT_HIT cycles (3 by default)
  after the request is accepted.
* A miss spends 1 + LAT_HIT cycles, plus LAT_PV cycles per object issued, before
  the controller is free again. The answer comes when the last object
  returns.
* LAT_HIT and LAT_PV stretch the stages the original leaves at a configurable
  length. A counter holds the FSM in CHECK or ISSUE for the extra cycles; the
  MTLB request is only offered once the count reaches zero.

## Remapping arithmetic (`addr_calc`)

This block is purely combinational. With `off = saddr − saddr_start` (low 7
bits of `saddr` ignored):

| mapping | first pv address | next pv address |
|---|---|---|
| direct (superpage) | `off` | – (one 128-byte object) |
| page colour | `(off / way_size) × color_size + off % way_size − color_offset` | – |
| stride | `(off / object_size) × stride_size + object_offset` | previous + `stride_size` |
| indirection vector | `(iv[off / object_size] − fortran_sub) × object_size` | next element of `iv` |
| transpose | with `o = off / elem_size`: `(o % row_num) × row_size + (o / row_num) × elem_size` | previous + `row_size` |

Every divisor is a power of two, so all divisions and remainders are shifts
and masks. The log2 values are derived from the size registers by a priority
encoder; nothing has to be preset. The ALU widths are 32 bits, as in the
original design. Two results are wider:

* The stride product keeps `stride_size/4` and then appends `00`.
* Indirection-vector and transpose results append `log2(size)` zero bits.

Both come out as 34-bit pv addresses.

`in_range` is false when `saddr < saddr_start`, which the subtractor's borrow
detects, or when `off ≥ saddr_size`. The indirection vector starts at physical
page `iv_paddr`. Element `i` sits at byte `iv_paddr·4096 + i·iv_elemsize`, with
`iv_elemsize` in bytes (1, 2 or 4).

Transpose steps by `row_size` from the first element. This is exact when one
line's elements all fall in one column, i.e. `row_num × elem_size ≥ 128`.

## Control registers (`shadow_regs`)

Each register is a 32-bit word written by the processor. The fields and widths
are those of the mapping types. The register numbers and `map_type` codes are
this design's own and are listed in `impulse_pkg`:

* `map_type`: DIRECT=1, PAGECOLOR=2, STRIDE=3, INDIRVECTOR=4, TRANSPOSE=5
* registers 0–19: `map_type`, `pref_info`, `pref_count` (18 bits),
  `saddr_start`, `saddr_size`, `ptable_ptr`, `color_size`, `way_size`,
  `color_offset`, `stride_size`, `object_size`, `object_count`,
  `object_offset`, `iv_paddr`, `iv_elemsize`, `iv_objcount`, `fortran_sub`,
  `elem_size`, `row_size`, `row_num`

Writes truncate to the field width. Reads return the field zero-extended. A
write pulses `cfg_changed`.

## MTLB (`mtlb`)

The MTLB maps `{shadow controller index, pv page}` to a physical frame. It is
SETS × WAYS (16 × 2 by default), with a PBUF-line buffer of page-table lines.

* **Page table.** A PTE is 4 bytes: `valid[31] ref[30] modify[29] fault[28]
  frame[27:0]`. PTE `n` of a controller lies at `ptable_ptr·4096 + 4n`, so one
  128-byte page-table line holds 32 consecutive PTEs.
* **Lookup (LOOK, 1 cycle).** The TLB and the PTE buffer are checked in
  parallel.
  * On a TLB hit, the physical address goes out next cycle (OUT). Hit latency
    is 2 cycles.
  * On a buffer hit, the PTE is loaded into the TLB in one extra cycle (LOAD).
    Latency is 3 cycles.
  * On a miss in both, a buffer line is replaced round robin, the page-table
    line is read from DRAM (FILL/FWAIT), and the access repeats LOOK and hits
    the buffer.
* **ref/modify.** Loading a PTE sets `ref`. A write access sets `modify`. If
  either bit changes, the PTE is written back to DRAM as a 4-byte masked write
  (WB). The entry's `locked` bit keeps it from being victimised until then. The
  PTE buffer copy is updated too.
* **Replacement.** Each entry has a RC_W-bit reference counter. A hit
  increments it. When a hit finds its counter already saturated, all counters
  of the set are cleared and the hit entry's counter is set to 1. The victim is an invalid way, otherwise the
  unlocked way with the lowest counter. This gives not-recently-used
  replacement.
* **Faults.** A PTE with `valid = 0` or `fault = 1` produces an access with
  `err` set. The MCache answers it at once with zeros and the error flag.
* **Queueing.** Accesses wait in a QDEPTH-entry queue. Misses are blocking:
  one access is handled at a time, in order.

## MCache (`mcache`)

The MCache is SETS × WAYS lines (8 × 4 by default), physically indexed and
tagged. Each line has `used`, `state` (Fetching/Valid), `pref` and `tag` bits
plus its data.

* **FIFO replacement.** A per-set pointer names the next victim. It skips lines
  still Fetching, because their data has not arrived and may not be lost.
* **Reserve first.** On a miss, the line is claimed (tag set, Fetching) before
  the DRAM read goes out. A second access to the same line then hits, waits
  for the data and issues no duplicate read. DRAM reads return out of order,
  tagged `{set, way}`.
* **Next-line prefetch** (`pref_en`). After a demand miss, and after a demand
  hit on a line whose `pref` bit is still set, line + 1 is looked up. If it is
  absent, it is reserved with `pref = 1` and read. If every way of its set is
  Fetching, the prefetch is dropped. A demand miss in the same situation
  stalls until a way becomes free.
* **Write-invalidate.** A write carries a byte mask: a whole line from the
  bus, or one object when a controller scatters. It clears `used` on a
  matching line and goes straight to DRAM as a masked write. A write whose
  translation failed is dropped. If the matching line is still Fetching, the
  write first waits for the fill. Lines are never dirty, so victims are
  dropped without write-back.

Timing: a read hit on a Valid line answers 2 cycles after acceptance. The
cache handles one request at a time.

## DRAM scheduler (`dram_sched`)

The scheduler has NPORT request ports with a round-robin arbiter. The DRAM side
is a single valid/ready port of `dram_req_t`: a read, or a byte-masked line
write. The port number is prepended to the 8-bit tag. Read data coming back is
sent to the port named in its tag, without a ready. In the top, the ports are:

* 0: MCache
* 1: MTLB page-table traffic
* 2…: one indirection-vector port per shadow controller

## Top level (`impulse_mmc`)

The top instantiates NUM_SC shadow controllers, one MTLB, one MCache and one
DRAM scheduler. Arbitration:

* **Into the MTLB:** the shadow controllers take turns, round robin.
* **Into the MCache:** the MTLB and the bus alternate when both are waiting.
* **To the bus:** an MCache answer goes first; otherwise the lowest-numbered
  controller with a finished line.

MCache answers carry a `req_tag_t` that says where they go: the bus, or slot
`slot` of buffer block `blk` of controller `sc`.

Ports:

* `bus_req_*`: line address, write flag, write data.
* `bus_resp_*`: line address, data, `err`.
* `cfg_*`: register write and read-back, selected by `cfg_sc`.
* `dram_*`: the DRAM transaction port.
* `pref_en`: turns MCache prefetching on.
* `ev`: a struct of one-cycle event pulses for statistics counters.
* `sc_busy`: each controller's busy bit.

Shadow writes go to their controller and are scattered. Shadow reads and
writes of a controller index ≥ NUM_SC are accepted and dropped.

## Parameters

| parameter | default | meaning |
|---|---|---|
| NUM_SC | 4 | shadow controllers |
| SC_QDEPTH | 4 | waiting queue per controller |
| SBUF_LINES | 4 | SRAM buffer blocks per controller (at most 4) |
| SC_LAT_HIT | 1 | cycles of a controller's buffer lookup and block reservation |
| SC_LAT_PV | 1 | cycles per pv address generated by a controller |
| TLB_SETS, TLB_WAYS | 16, 2 | MTLB geometry |
| TLB_RC_W | 2 | reference counter bits (2–4 in the original design) |
| TLB_PBUF | 2 | page-table lines in the MTLB buffer |
| MC_SETS, MC_WAYS | 8, 4 | MCache geometry (4 KiB) |

The original design fixes only the widths and formats: address sizes, PTE and
entry formats, and register fields. Every size in this table is this design's
choice. All sizes must be powers of two except NUM_SC, which can be 1 to 64.

## Departures from the original design

* **Prefetch policy.** The original names the prefetch registers (direction
  and distance) but not when a prefetch is made. Here one prefetch follows
  every demand access to the controller.
* **Scatter flow.** The original gives only the read flow. The write flow
  (scatter through a buffer block, objects fetched by the memory side) is this
  design's.
* **Unused counts.** `object_count` and `iv_objcount` are stored but unused.
  Only `saddr_size` bounds a region.
* **Blocking MTLB.** The MTLB serves accesses in order and blocks on a miss.
  The original continues with other accesses while a fill is pending.
* **Wider MCache tag.** The MCache tag covers the full 40-bit physical line
  address, not a 25-bit field.
* **Stage latencies.** The original says some controller stages take a
  configurable number of cycles but gives no numbers. Here the buffer lookup
  (SC_LAT_HIT) and pv-address generation (SC_LAT_PV) are parameters, 1 by
  default. The queue and return stages take one cycle.
* **pref_count width.** The original gives `pref_count` as 16 bits for four
  mapping types and 18 bits for stride. The register is 18 bits.
* **Register-only faults.** Page faults are only reported (`err`); there is no
  path to notify the operating system.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. Shared helpers:

* `tb/dram_model.sv`: a behavioural DRAM with random latency, out-of-order
  returns and optionally very slow lines.
* `tb/tb_util_pkg.sv`: the deterministic initial memory image,
  `word(a) = (a>>2)·0x9E3779B1 ^ 0x0BADF00D`.

| testbench | what it checks |
|---|---|
| `tb_addr_calc` | every mapping against a reference model, random configurations, range errors |
| `tb_shadow_regs` | write/read of every register with field truncation, change pulse |
| `tb_dram_sched` | routing of requests and tagged responses, round-robin fairness |
| `tb_mcache` | hit latency (2), miss, prefetch, prefetch hit, dropped prefetch, stall, write-invalidate, random byte-masked writes, a dropped failed write, random traffic against a memory model (2×2 cache to force conflicts) |
| `tb_mtlb` | hit latency (2), buffer-hit latency (3), fills, ref/modify write-backs read back from DRAM, invalid PTEs, 1500 random accesses |
| `tb_shadow_ctrl` | run with LAT_HIT = 2 and LAT_PV = 3: all five mappings against a model, buffer-hit latency (2 + LAT_HIT), pv-address spacing (exactly LAT_PV when the MTLB is ready, never less), queueing, the controller being free while data is outstanding, IV fetches, forward and backward prefetch (a prefetched line needs no new memory access), reads of a block still being filled, out-of-range errors, scatter writes through stride, transpose and indirection vector (memory bytes, neighbouring line untouched, read-back), an out-of-region write dropped |
| `tb_impulse_mmc` | the whole controller at default parameters. Physical reads and writes; shadow reads through all four controllers with different mappings; a random mix; a remap to page colour; slow DRAM lines to force a dropped prefetch and a stall; a run of shadow reads with forward prefetch on; shadow writes through the stride and indirection-vector controllers, checked in DRAM and read back. It counts every event kind and fails if any never happened |

To run one with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/impulse_pkg.sv tb/tb_util_pkg.sv tb/tb_impulse_mmc.sv \
    --top-module tb_impulse_mmc -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `tb_util_pkg.sv` is needed by the
testbenches that use the DRAM model.

Every RTL file lints cleanly with `verilator --lint-only -Wall`, apart from
unused-signal notes, and elaborates in yosys with the slang front end.

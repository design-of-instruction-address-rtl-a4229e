# Instruction address queue for a degree-5 x86 superscalar fetcher

A superscalar x86 core needs an instruction's own address now and then. Branch
targets and misprediction recovery need it. So do BTB updates, and so does the
return address after an exception. Most instructions never use it. Carrying a
32-bit address with every instruction costs a 32·n-bit bus through an n-wide
pipeline. An x86 instruction may also split into several micro-ops, which each
carry a copy.

This RTL keeps the addresses in a queue at the fetcher instead. Each
instruction carries only a 7-bit **queue pointer**. A unit that needs an
address reads it back through its own access port. Addresses leave the queue
in order, in step with the reorder buffer's retirement. The queue also
compares every data write against the stored instruction addresses. This
catches self-modifying code.

The default size serves a fetcher that delivers up to five x86 instructions
per cycle, with a 64-entry reorder buffer. The queue has 20 sets of 6 cells,
so 120 cells and a 7-bit pointer.

## What a cell stores: the line-offset scheme

The queue keeps two addresses for every instruction:

* **EIP**, the effective address: the program counter inside the code segment.
* **PC**, the linear address: EIP + CS_Base. The L1 cache is indexed with it.

Each fetch cycle fills one **set**. A set has six cells: up to five
instructions, plus the address that follows the last one. If the fetcher
delivers x instructions, cells 0..x-1 get the instructions and cell x gets the
next sequential address. The cells after that hold don't-care values.

A fetch never crosses a cache line, except that its first instruction may have
started on the previous line. So all addresses of one set share at most two
27-bit line addresses (32-byte lines). Each set stores those lines once, in
four 27-bit registers:

| register  | holds                                                           |
|-----------|-----------------------------------------------------------------|
| PC line 1 | cache line of the first instruction (the previous line if it was split) |
| PC line 2 | the current cache line                                          |
| EIP line 1, EIP line 2 | the two EIP lines that overlap the current cache line (next section) |

A cell keeps only low-order bits:

* a 5-bit EIP offset;
* one bit that picks EIP line 1 or EIP line 2;
* a 5-bit PC offset.

Cell 0 keeps one more bit, the split flag. That is 175 bits per set, against
384 bits for six full 32-bit address pairs.

## EIP lines, and why a cache line has two of them

EIP = linear − CS_Base. CS_Base need not be a multiple of 32, so the EIP
lines and the cache lines are not aligned. Write CS_Base = {Bh, b}, where b is
its five low bits. Cache line L then holds the end of one EIP line and the
start of the next:

```
offset o <  b :  EIP line 1 = L - Bh - 1
offset o >= b :  EIP line 2 = L - Bh
EIP offset    =  (o - b) mod 32
```

`aq_eip_line_gen` computes both EIP lines of the current cache line. For each
instruction it also computes the 6-bit EIP offset {o >= b, (o − b) mod 32}.
A cell rebuilds its EIP as {selected EIP line, offset}. If b = 0, every
instruction is on EIP line 2.

**Split-line instructions.** Suppose the first instruction started on the
previous cache line L−1. If it started in the upper part of that line
(o ≥ b), its EIP line is EIP line 1 of line L, which this set holds. If it
started in the lower part, its EIP line is EIP line 1 of line L−1. This set
does not store that line. The set written in the previous cycle does, because
it fetched line L−1. Each set therefore passes its EIP line 1 to the next set
in the ring as **EIP0**.

The first cell of a set (`aq_first_cell`) has a four-input multiplexer,
selected by {split, !line2}:

| select | EIP line used |
|--------|---------------|
| 0      | EIP2          |
| 1      | EIP1          |
| 2      | EIP1          |
| 3      | EIP0          |

For an instruction that is not split, this gives the same result as the other
cells. EIP0 is read when the cell is read, not copied when it is written.
This saves 27 bits per set, but it has the lifetime limit described under
*Limits*.

## Sizing: why 20 sets

A set is used every fetch cycle, whether the fetch brings one instruction or
five. The queue only has to cover the instructions that are already fetched
but not yet retired. The reorder buffer bounds those: once it is full,
fetching stops anyway. The number of sets is therefore estimated as

```
sets = ceil( ROB entries / (x86 instructions per fetch × micro-ops per instruction) )
       × (1 − fraction of reservation-station stalls) + fetch stages + decode stages
```

The design point is a 64-entry reorder buffer, 2.68 instructions per fetch
and 1.39 micro-ops per instruction (SPEC95 averages), negligible
reservation-station stalls, and one fetch and one decode stage. That gives
ceil(17.18) + 2 = 20 sets. Each set has fetch width + 1 = 6 cells.

`tb/tb_aq_sizing_workload.sv` drives the queue with that mix, with these
choices of its own: execution latencies of 1–12 cycles (3 % of instructions
take 40–80), and in-order retirement of up to five instructions per cycle.
The result over 20 000 cycles:

* the reorder buffer was full in about 58 % of cycles;
* the queue alone held up the fetcher, while the reorder buffer still had
  room, in about 5–6 % of cycles.

Part of that margin is retirement by age: a set stays allocated until an
instruction in a *newer* set retires, so one extra set is always held. Raise
`NUM_SETS` (on `address_queue`) by one or two if that matters. The pointer
width must then grow once 6 · NUM_SETS exceeds 128.

## Controller: allocation in sets, retirement by age

* **Allocation.** A 20-bit one-hot ring names the set to write. Reset loads
  it with 0…01, and it rotates left on every cycle the fetcher is not stalled.
  In that cycle the set's Set_ENABLE is high: the storage captures the fetch
  at the clock edge, and the set becomes valid with age 0. While the set is
  enabled, its cells 0–4 put their pointers (6·set + cell) on `qptr`. The
  fetcher hands those pointers on with the instructions.
* **Queue full.** The queue is full when the ring points at a set that is
  still valid. The queue then stalls allocation itself, whatever the fetcher
  does.
* **Aging.** Every valid set adds 1 to its 5-bit age on each cycle that is not
  stalled. A larger age therefore means earlier in program order. At most 19
  newer sets can exist, so the age never wraps.
* **Retirement.** The reorder buffer asserts `rab_req_n` (active low) with
  the pointer of the last instruction it retired. The retire set selector
  decodes the pointer and names the set holding it (EN_i). That set puts its
  age on the AC bus. Every valid set whose age is *strictly greater* frees
  itself at the next edge. The named set stays valid because a later
  instruction in the same set may not have retired yet. It is freed by a
  later retirement that points into a newer set. A retirement pointer of
  120–127 raises `ptr_exception` and frees nothing.

## Access and snoop

The branch unit port (`bu_ptr`) and the reorder buffer port (`rab_ptr`) are
independent. Each decodes its pointer to one cell and returns that cell's
32-bit EIP and PC in the same cycle. The reorder buffer uses one pointer for
both access and retirement. The cell after the last instruction can be read
too, which gives the fall-through address.

For snooping, every cell compares its rebuilt PC with `smc_addr`.
`smc_exception` is the OR of the hits over all valid sets, gated by
`smc_valid`.

## Top-level interface (`address_queue`)

All outputs are combinational from the inputs and the registers. All state
changes at the rising edge of `clk`. The reset is synchronous and active low:
it clears the ring, the valid bits and the ages. The address storage is not
reset.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `stall` | in | 1 | fetcher stall: no set is used this cycle |
| `queue_full`, `alloc` | out | 1 | next set still valid / a set is written this cycle |
| `cs_base` | in | 32 | code segment base |
| `pc_line1`, `pc_line2` | in | 27 | line of the first instruction; current line |
| `split_prev` | in | 1 | first instruction started on the previous line |
| `last` | in | 4 | `last[k]`: instruction k is the last delivered; all low means five |
| `cur_ofs[5]`, `nxt_ofs[5]` | in | 5 each | linear offset of each instruction and of the address after it |
| `qptr[5]` | out | 7 each | pointers for the five instruction slots, valid while `alloc` |
| `bu_ptr` → `bu_eip`, `bu_pc` | in/out | 7 → 32 | branch unit access |
| `rab_ptr`, `rab_req_n` → `rab_eip`, `rab_pc`, `ptr_exception` | in/out | 7 → 32 | reorder buffer access and retirement |
| `smc_addr`, `smc_valid` → `smc_exception` | in/out | 32 → 1 | write snoop |

Fetcher rule: every instruction after the first, and every next address,
must lie on `pc_line2`. Only the first instruction may lie on `pc_line1`.

## Modules

| module | role |
|--------|------|
| `aq_pkg` | widths and sizes (32-bit address, 27/5 line/offset, 20 sets × 6 cells, 7-bit pointer, 5-bit age), shared types |
| `address_queue` | top: controller + EIP-line generator + storage |
| `aq_controller` | ring, 20 set controllers, AC bus, retire set selector, two access decoders |
| `aq_alloc_shift_reg` | one-hot allocation ring |
| `aq_set_controller` | valid bit, age, AC bus compare, Set_ENABLE, Queue_Full per set |
| `aq_retire_set_selector` | retire pointer → EN_i, CMP_EN, pointer exception |
| `aq_ptr_decoder` | 7-bit pointer → 120 one-hot match lines |
| `aq_eip_line_gen` | EIP line 1/2 and EIP offsets from the linear line and CS_Base |
| `aq_storage` | input routing, 20 sets in a ring (EIP0 chain), read buses, snoop OR |
| `aq_input_select` | the `last`-controlled multiplexers that place instructions and the next address into cells |
| `aq_set` | four line registers, one first cell, five cells |
| `aq_first_cell`, `aq_cell` | offset storage, address rebuild, read gating, snoop compare |

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops. For example, the end-to-end test
at the default size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/aq_pkg.sv tb/tb_address_queue.sv --top-module tb_address_queue
./obj_dir/Vtb_address_queue
```

`tb_address_queue` acts as the fetcher, reorder buffer, branch unit and
load/store unit. It runs about 6000 cycles in two phases, with different
low bits of CS_Base. The traffic includes random fetch groups, split-line
instructions, jumps, stalls, and slow retirement that fills the queue.

A reference model holds the full 32-bit EIP and PC of every cell. Every cycle
it checks:

* the pointers handed out;
* both read ports;
* the snoop result against every cell of every valid set;
* queue_full;
* the valid bit of every set after each retirement.

The test also counts each mechanism and fails if one never occurs:
allocation, stall, full, retirement, split, EIP line 1, EIP line 2, EIP0,
next-address read, snoop hit and miss, and bad pointer. It runs in well under
a second.

`tb_aq_sizing_workload` runs the sizing workload described above for 20 000
cycles, with the same address checks. It prints the delivered mix and the
stall counts.

## Limits and choices to be aware of

* **EIP0 lifetime.** The EIP of a split first instruction depends on the
  preceding set's EIP line 1. That set can be freed and written again while
  the split instruction's set is still live. This happens only when 19 sets
  are live. The EIP then read is wrong; the PC is unaffected. The end-to-end
  test sees this a few dozen times in 6000 cycles and excludes those reads.
  A user who needs the EIP of such an instruction in that window should
  declare the queue full one set earlier.
* **Next address on the following line.** The next-address cell stores only
  an offset on the current line. If the last instruction ends exactly at the
  end of the line, its next address cannot be stored correctly.
* **No flush.** Nothing frees sets on a misprediction. Wrong-path sets are
  freed when a later retirement points past them.
* **Snoop.** The snoop compares all 32 bits of the instruction's start
  address. A write into the middle of a longer instruction is not caught.
  The unused cells of a live set can give false hits, which is conservative.
* **Implementation style.** The sets are described with enabled latches and
  three-state read buses. Here they are clock-enabled flip-flops and AND-OR
  gated read buses with the same contents.
* **Our own choices.** Two behaviours have no counterpart in the
  description: the queue stalls itself when full, and the AC bus carries a
  valid flag, so a retirement that names a free set frees nothing.
* **Scheme 1 not built.** The simpler full-address storage (six 32-bit
  EIP/PC pairs per set) is only a baseline for the line-offset scheme, so it
  is not included.
* **Synthesis.** Gate counts and delays in the original 0.6 µm library are
  not reproduced. With generic synthesis the design has 3640 flip-flops:
  175 per set plus 140 in the controller.

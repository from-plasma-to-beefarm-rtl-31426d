# BeeFarm: an eight-core MIPS multiprocessor with write-through coherent caches

BeeFarm is a shared-memory multiprocessor built to run parallel software on
an FPGA much faster than an instruction-set simulator can run it. It was
designed for research on (software) transactional memory. Its main idea is
to keep every part small enough that many cores fit on one chip. Each core,
called *Honeycomb*, is the small Plasma MIPS core extended into a MIPS
R3000-class CPU. Each core has an 8 KB write-through L1 cache. The caches
stay coherent only by invalidation: every write goes out on one shared bus,
and every other cache drops its copy of that line. A round-robin arbiter
orders all bus traffic, so all cores see memory in one global order. LL/SC
provides the atomic read-modify-write that lock-free and transactional
software needs.

This RTL describes the eight-core configuration without floating-point
units, in one clock domain. The DDR2 memory controller is not included: its
command and read-data FIFOs are ports of the top module.

```
                 +-----------+      +---------+
   DDR2 FIFOs <--|  arbiter  |<---->| bootmem |  boot ROM at 0x1FC0_0000
   (top ports)   | round-    |      +---------+
                 | robin     |<---->  uart, perf counters  (I/O, 0x1F00_0000)
                 +-----------+
                   ^  |  snoop (every write, to all caches)
        bus_req[i] |  v  bus_ack[i], bus_rdata
     +------------+------------+-- ... --+
     | l1_cache 0 | l1_cache 1 |         |   8 KB, 16-byte lines, direct mapped
     +------------+------------+-- ... --+
     | honeycomb 0| honeycomb 1|         |   MIPS R3000-class core with TLB
     +------------+------------+-- ... --+
```

## Physical address map

| Range (physical)              | Target                                          |
|-------------------------------|-------------------------------------------------|
| `0x0000_0000 - 0x0000_1FFF`   | the requesting core's own cache data array      |
| `0x1F00_0000 - 0x1F00_0FFF`   | UART registers                                  |
| `0x1F00_1000 - 0x1F00_1FFF`   | performance counters                            |
| `0x1FC0_0000 - 0x1FC0_FFFF`   | boot ROM (4 KB used)                            |
| everything else               | DDR2, through the controller FIFOs              |

The cores use the R3000 segments. `kseg0` (`0x8000_0000-0x9FFF_FFFF`) is
unmapped and cached. `kseg1` (`0xA000_0000-0xBFFF_FFFF`) is unmapped and
uncached. Both segments see the low 512 MB. `kuseg` (`0x0000_0000-0x7FFF_FFFF`)
and `kseg2` (`0xC000_0000` and up) go through the TLB, whose 20-bit page frame
numbers reach the full 4 GB. The reset vector `0xBFC0_0000` hits the boot
ROM.

The first 8 KB of physical memory is a window onto the core's own cache data
array, not onto DDR. A word access there reads or writes the array directly
and never touches the bus or the tags. This gives each core private RAM
before DDR is set up. The boot stub puts the stack there (`$sp = 0xA000_1FF0`).
The window also holds the exception vectors (`0x8000_0000` and
`0x8000_0080` are physical `0x0` and `0x80`), so boot software must copy its
handlers into the window. Software can also inspect the cache through it.
Note that a line held in the cache at the same index is overwritten by direct
writes to the window. Software that uses both must keep them apart.

## Coherence, ordering and atomics

This is the part of the design that needs the most care.

**Write-through plus invalidation.** Caches never hold dirty data. Every store
becomes a bus write. The cache also updates its own copy if the line is
present; it does not allocate a line on a store miss. So a line is either
valid (possibly shared by many caches) or invalid. The protocol is MSI
without a reachable M state.

**One order for all writes.** The arbiter serves one transaction at a time. A
write to DDR counts as done in the cycle the controller's command FIFO
accepts it. In that same cycle the arbiter drives `snoop` (address and
source core) to every cache. Every cache except the writer clears the valid
bit of a matching line through the second port of its tag array. The next
read of that line by another core misses and fetches the line again.
Reads block until the line comes back, and the bus is not released
meanwhile. Together these give sequential consistency: every core sees the
writes in the order the arbiter issued them.

**LL/SC.** `LL` is a normal load that also records a link (the line address)
in the cache. The link breaks on any of these:

- a snooped write by another core to that line;
- an exception or `ERET` (the core pulses `c_clr_link`);
- a successful `SC`.

An `LL` that completes in the same cycle as another core's snooped write to
its line has read the value from before that write. Its link is therefore
never set. Without this rule the new link would escape the snoop: the snoop
compares against the link address of the previous cycle. A lost increment
would follow.

`SC` is put on the bus only while the link holds. The link is checked
combinationally while the cache waits for the bus. If another core's write
breaks the link first, the cache withdraws its request, and the arbiter drops
a request that disappears before it is served. The SC then returns 0 and
nothing is written. A successful SC is an ordinary bus write, so it
invalidates the other copies and breaks the other cores' links. The
testbench `tb_beefarm` runs a fetch-and-add on one counter from all eight
cores. It checks the final count (32) and that some SCs failed along the way.

**Spinning is cheap.** A core polling a flag keeps hitting in its own cache.
It only goes to the bus again after another core's write invalidates the
line.

## The Honeycomb core

`honeycomb` connects the units of the original Plasma organisation:

- `pc_next`: program counter, delay slots, redirects;
- `mem_ctrl`: the single memory port, byte lanes, load extension;
- `control`: decoder to a control word, `beefarm_pkg::ctrl_t`;
- `reg_bank`: 32 registers, two read ports and one write port;
- `bus_mux`: operand, write-back and branch selection;
- `alu`, `shifter`;
- `mult`: iterative multiply/divide with HI/LO;
- `cp0`: system registers and the 64-entry TLB `tlb`.

**Sequencing.** Each instruction goes through up to three stages:

1. **Fetch.** The PC goes through the MMU to the cache, and the core waits
   for `c_done`.
2. **Execute.** The instruction is decoded and the registers are read. The
   ALU, shifter, branch logic or CP0 operation runs, and the result is
   written back.
3. **Data access.** Only for loads and stores. The address is translated,
   the cache is accessed, and a load writes back when it completes.

Fetch of the next instruction overlaps execute of the current one when the
current one meets all of these conditions:

- it retires in execute, so it is not a load or store;
- it performs no CP0 operation, which could change address translation;
- no exception or interrupt is about to be taken.

In that case the core already knows the next address: `pc + 4`, or the
pending branch target after a delay slot. So it starts that fetch in the
execute cycle, and the fetch stage then holds the same request. Otherwise
the stages run one after the other.

A register is written at the end of execute, and the next instruction's
registers are read in its own execute stage. So there are no data hazards
and no forwarding paths. With 2-cycle cache hits, an ALU instruction takes
2 cycles and a load or store takes 5. `MULT`/`DIV` start in execute and iterate for 32 cycles in the
background. A following `MFHI`/`MFLO` (or another multiply) waits in execute
until the unit is done.

**Delay slots.** Branches and jumps keep MIPS delay-slot semantics.
`pc_next` holds a taken target until the delay-slot instruction retires.
`ERET` has no delay slot.

**Register file.** A LUT RAM gives one write port and one read port. To get
two reads and one write per cycle, the file is duplicated: both copies take
every write, and each copy serves one read port.

**CP0 and exceptions.** The R3000 registers are implemented: Index, Random,
EntryLo, BadVAddr, EntryHi, Status, Cause, EPC and PRId. PRId bits 7:0 hold
the core number. The core supports `MFC0`, `MTC0`, `TLBR`, `TLBWI`, `TLBWR`,
`TLBP` and `ERET`.

Translation is combinational, in the same cycle as the access. The TLB
raises the following faults:

- a miss gives TLBL or TLBS, using the refill vector `0x8000_0000` for kuseg;
- an entry with V=0 gives TLBL or TLBS;
- a store to an entry with D=0 gives Mod;
- a user-mode access to a kernel segment is an address error.

Misaligned accesses also raise address errors. `SYSCALL`, `BREAK`, reserved
instructions (including all COP1 and LWL/LWR/SWL/SWR) and the interrupt
input (IP2, masked by IM2 and IEc) are taken precisely, and EPC points at
the faulting instruction. If the faulting instruction sits in a delay slot,
EPC points at its branch and Cause.BD is set. On entry the KU/IE stack in
Status is pushed. `ERET` pops it and jumps to EPC. The TLB compares only the
20-bit virtual page number; the ASID is stored but not matched.

## Bus, boot ROM, UART and the DDR2 boundary

**Bus transaction** (`beefarm_pkg::bus_req_t`). A cache holds `valid` with
`we`, `addr`, one word of `wdata` and byte enables `be` until `bus_ack`
pulses for one cycle. A read returns the whole 16-byte line on `bus_rdata`.
Word *w* of a line (address bits 3:2) is at bits `[32*w +: 32]`. Byte lanes
are big-endian: `be[3]` is the byte at offset 0.

**Arbiter.** A request is picked in the cycle after it appears. The arbiter
searches round-robin, starting from the core after the one served last. Then
it routes the request by address:

- **Boot ROM read:** acknowledged one cycle later. Writes to the boot ROM
  are ignored.
- **I/O access (UART or counters):** completes in the cycle it is issued.
- **DDR write:** acknowledged and snooped when `ddr_cmd_ready` accepts it.
- **DDR read:** acknowledged when `ddr_rd_valid` returns the line.

**DDR2 FIFO ports.**

- **Commands:** `ddr_cmd_valid/ready` handshake, with `ddr_cmd_we`, the
  16-byte-aligned `ddr_cmd_addr`, and for writes `ddr_cmd_wdata` with a
  16-bit byte mask `ddr_cmd_wmask`. The data word is repeated in all four
  positions; the mask selects its bytes.
- **Read data:** comes back in order on `ddr_rd_valid` / `ddr_rd_data`
  (128 bits).

**Boot ROM** (`bootmem`). This is 4 KB of 128-bit lines. By default it holds
a six-instruction stub: set `$sp` to `0xA000_1FF0`, then jump to `ENTRY`
(default `0x8000_4000`, DDR physical `0x4000`). Another image can be loaded
with the `BOOT_FILE` parameter: `$readmemh`, one 128-bit line per row.

**UART** (`uart`). The port is 8N1, with `CLKS_PER_BIT` clocks per bit. The
default of 217 gives 115200 baud at 25 MHz. Registers:

| Offset | Register | Use                                                |
|--------|----------|----------------------------------------------------|
| `0x0`  | TX       | write a byte to send it; dropped while busy        |
| `0x4`  | status   | bit 0 transmitter busy, bit 1 byte received        |
| `0x8`  | RX       | reading it takes the received byte                 |

**Performance counters** (`perf_counters`). These are free-running counters
that software can read at any time. Each counts one event per cycle and
wraps around. All reads complete in the cycle they are issued.

| Offset          | Register                                           |
|-----------------|----------------------------------------------------|
| `0x000`/`0x004` | cycle counter, low/high 32 bits                    |
| `0x008`         | write any value to clear all counters              |
| `0x100 + 4*i`   | instructions retired by core *i*                   |
| `0x200 + 4*i`   | L1 hits of core *i*                                |
| `0x300 + 4*i`   | L1 misses of core *i*                              |
| `0x400 + 4*i`   | lines of core *i* invalidated by other cores' writes |

The same per-core events also leave the top module as one-cycle pulses:
`retire`, `exception`, `l1_hit`, `l1_miss` and `l1_inval`.

## Timing summary

| Event                                    | Cycles                              |
|------------------------------------------|-------------------------------------|
| L1 hit (request to `c_done`)             | 2                                   |
| direct cache-window access               | 2                                   |
| L1 miss / uncached read                  | 2 + arbitration + DDR latency + 1   |
| store (write-through)                    | 2 + arbitration + FIFO accept       |
| ALU instruction, fetch hit               | 2 (fetch overlaps execute)          |
| load/store, all hits                     | 5                                   |
| `MULT`/`DIV`                             | 32 (background), `MFHI`/`MFLO` wait |
| boot ROM read on the bus                 | 2 after the arbiter picks it        |

## How far this follows the original BeeFarm

**Taken from the original system description:**

- the core count (8);
- the cache: 8 KB, direct mapped, 16-byte blocks, write-through, shared by
  instructions and data, snoop invalidation on writes, a dual-ported tag
  array;
- the window of the lowest 8 KB onto the cache;
- the round-robin arbiter in front of the DDR2 FIFOs, with invalidation at
  the moment a write enters the FIFO;
- the boot ROM next to the arbiter;
- the units of the core;
- the 64-entry, 20-bit-wide TLB CAM with a RAM behind it;
- ERET, LL and SC;
- 4 GB physical addressing;
- the duplicated register file;
- the 32-cycle iterative multiply/divide.

**Choices made here** (where the description is silent):

- the address map bases;
- the events counted by the performance counters and their register layout;
- the exact bus and FIFO handshakes;
- the register layouts (taken from the R3000);
- the exception vectors;
- the UART register map;
- the boot stub;
- the LL/SC link held in the cache;
- no write-allocate;
- synchronous reset.

**Known departures:**

- **Only fetch and execute overlap.** The original runs a short pipeline.
  Here the only overlap is the fetch of the next instruction during execute.
  After a load, a store or a CP0 instruction the stages run in turn.
- **No half-cycle clock for the TLB.** The original translates on a clock
  shifted by half a cycle; here the lookup is combinational.
- **Reads are not split.** The bus holds a read transaction until its data
  returns, instead of using a split-transaction bus.
- **Smaller control word.** It is 33 bits, not 60.
- **One clock domain.** The arbiter, bus, caches and cores run on one clock.
  Crossing into the DDR controller's 125 MHz domain is left to the FIFOs
  outside this RTL.
- **The UART is shared.** One UART sits in the I/O region next to the
  arbiter. The original core's area figure includes a UART controller in
  each core.
- **No debug registers.** The original memory map has a segment for debug
  registers. Their contents are not known, so that segment is not built.
- **No FPU.** There is no floating-point coprocessor (CP1) and no FP
  register file, so the configuration with four cores and FPUs is not
  available. COP1 instructions trap as reserved instructions.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Testbench-only files are
`tb/mips_asm_pkg.sv` (instruction encoders used to build programs) and
`tb/ddr2_model.sv` (a FIFO-level DDR2 stand-in with fixed latency and
periodic back-pressure). Example with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_beefarm -y rtl -y tb \
  +libext+.sv rtl/beefarm_pkg.sv tb/mips_asm_pkg.sv tb/tb_beefarm.sv
./obj_dir/Vtb_beefarm
```

| Testbench        | What it shows                                                       |
|------------------|---------------------------------------------------------------------|
| `tb_beefarm`     | full 8-core system at default size. Boot, LL/SC counter from all cores, per-core results, barrier, syscall/ERET, TLB-mapped store, UART "OK", performance counters read by software. Counts hits, misses, invalidations, failed SCs, bus contention, DDR back-pressure, window and mapped accesses (about 8 k cycles). |
| `tb_intruder`    | Intruder-style intrusion-detection kernel on all eight cores at default size. 1024 flows are cut into 4096 fragments and shuffled. Cores claim packets with LL/SC, reassemble each flow under LL/SC-guarded counters, and flag "attacks". Every flow result and counter is checked. About 380 k cycles, with about 13 k aborted (failed) SCs. |
| `tb_scalparc`    | integer part of a ScalParC decision-tree step on all eight cores at default size: 125,000 records of 32 attributes and 2 classes. Cores claim records with LL/SC and update shared class histograms (one LL/SC increment per attribute). They then split the records into two partitions with LL/SC slot allocation. Every histogram bin and both partitions are checked. The gini split choice needs floating point and is fixed instead. About 75 M cycles, a few minutes of simulation. |
| `tb_ssca2`       | graph-construction kernel of SSCA2 (problem scale 13) on all eight cores at default size. It builds adjacency lists for 8192 vertices from 32768 random edges: degree count with LL/SC, a barrier, a prefix sum on core 0, then adjacency fill with LL/SC slot allocation. Every degree, offset and neighbour list is checked. About 6.8 M cycles. |
| `tb_honeycomb`   | one core on a flat memory. ALU, shifts, MULT/DIV, byte loads/stores, delay slots, SYSCALL/ERET, TLBWI mapping, LL/SC, JAL/JR, an interrupt in the middle of a loop, and ALU instructions retiring every 2 cycles. |
| `tb_l1_cache`    | miss/fill, 2-cycle hits, write-through, snoop invalidation, uncached, direct window, LL/SC, and an LL hit racing another core's write to its line. |
| `tb_arbiter`     | round-robin order, data routing, snoop on writes, byte masks, boot ROM/I/O decoding, back-pressure. |
| `tb_cp0`, `tb_tlb` | segments, TLB faults and instructions, exception entry/return, PRId; CAM lookups and priority. |
| `tb_alu`, `tb_shifter`, `tb_mult`, `tb_reg_bank`, `tb_pc_next`, `tb_control`, `tb_bus_mux`, `tb_mem_ctrl`, `tb_bootmem`, `tb_uart`, `tb_perf_counters` | each unit against an independent reference. |

To run your own program, build it with the encoders in `mips_asm_pkg`, or
with a big-endian MIPS I toolchain. Place it in the DDR model at physical
`0x4000`, as `tb_beefarm` does, or give a boot image through `BOOT_FILE`.

## Parameters

Top module `beefarm`:

| Parameter      | Default        | Meaning                                   |
|----------------|----------------|-------------------------------------------|
| `NCORES`       | 8              | number of cores                           |
| `CACHE_BYTES`  | 8192           | L1 size per core                          |
| `BOOT_LINES`   | 256            | boot ROM size in 16-byte lines            |
| `ENTRY`        | `0x8000_4000`  | jump target of the boot stub              |
| `BOOT_FILE`    | empty          | optional boot ROM image                   |
| `CLKS_PER_BIT` | 217            | UART bit time in clocks                   |

The line size (16 bytes) and the address map are constants in
`rtl/beefarm_pkg.sv`.

# ParaNut multi-core RISC-V system in SystemVerilog

ParaNut is a scalable RISC-V processor. It has one fully featured control core,
the **CePU**, and several smaller co-processor cores, the **CoPUs**. All cores
share a single cached memory unit, which is the only master of a Wishbone
system bus. This repository is a synthesizable SystemVerilog model of such a
system in its default configuration:

- four RV32IM cores: core 0 is the CePU at capability level 3, cores 1–3 are
  CoPUs at capability level 2;
- a shared set-associative write-back cache with 4 banks, 512 sets and 4 ways
  (32 KiB);
- a Wishbone interconnect to main memory, a machine timer, a UART and a GPIO
  block.

The design follows the published ParaNut structure: the capability levels,
the module partitioning, the port priorities and the cache geometry. Its
inner workings are simple, and those are this design's own. The sections
below say where each part comes from.

## Cores and capability levels

A core (`cpu`) is made of five parts:

- `exu`: execution unit, a multi-cycle RV32I(M) sequencer;
- `ifu`: instruction fetch unit with a one-word buffer;
- `lsu`: load/store unit;
- `csr`: control and status registers;
- `mextension`: optional multiply/divide unit.

The `CAP_LEVEL` parameter selects one of two core types:

| | level 3 (CePU, core 0) | level 2 (CoPU, cores 1..3) |
|---|---|---|
| own IFU | yes | yes |
| exceptions / interrupts | full machine-mode trap handling, timer and external interrupts | none: an exception halts the core |
| CoPU control | owns the `pnce` CSR (0x7C0); bit *c* enables core *c* | runs while its `pnce` bit is set |
| after reset | runs from 0x1000_0000 | halted until enabled, then starts at 0x1000_0000 |

A CoPU stopped by an exception shows this on `ex_halted`. It stays stopped
until the CePU clears its enable bit and sets it again, and then it restarts
from the reset address. `mhartid` tells the cores apart, so all of them can
start in the same program.

The EXU state names follow the ParaNut EXU state machine:

- ExecuteInsn, Jump, Branch, CSR, Mem, MemWB;
- Div, MulDivWB, LSUFlush;
- ExOrIrq, ExJumpTvec, XRETFinish, Halt.

The transitions between these states are this design's own.

Timing with an ideal (one-cycle) fetch:

- An ALU instruction takes 2 cycles.
- Loads and stores add the memory-unit latency.
- Multiply and divide take 33 cycles in `mextension`, which works one bit per
  cycle.

Misaligned loads, stores and jump targets raise the standard RISC-V
exceptions. So do ECALL, EBREAK, illegal instructions and CSRs, and accesses
that end in a bus error (see below).

Not modelled:

- capability level 1 cores, and a level-2 core switched onto the CePU's IFU
  (SIMD mode);
- the A extension;
- debug support;
- supervisor mode and paging.

## The memory unit

`memu` is the hardest part of the design. Each core has three ports into it,
and each port is a small buffer (`memu_readport`, `memu_writeport`):

- an IFU read port;
- an LSU read port;
- an LSU write port.

A port takes a request, holds it while the request waits, and answers with a
one-cycle `ack`.

**Arbitration (`memu_arbiter`).** The memory unit serves one request at a time.

- Within a core, the order is LSU read, then IFU read, then LSU write. This is
  the ParaNut order.
- Between cores, the arbiter goes round robin, starting after the core it
  served last.

**Cache organisation.** The cache has 2^BANKS_LD banks, 2^SETS_LD sets and
2^WAYS_LD ways. A line holds one 32-bit word per bank. A byte address is split
like this:

```
 31 ............... 13 | 12 ...... 4 | 3 .. 2 | 1 0
        tag (19)       |  set (9)    | bank   | byte
```

- **Bank RAMs.** There is one `memu_bankram` per bank: 32 bits × 2048 entries,
  indexed by {set, way}. It is true dual-port with byte write enables.
- **Tag memory.** `memu_tagram` holds one `block_ram` per way. Each entry is
  {valid, dirty, tag}, and all ways of a set are read in one cycle.
- **LRU memory.** A 6-bit LRU word per set records, for each pair of ways,
  which of the two was used more recently.
- **Clearing after reset.** The tag memory clears itself in 2^SETS_LD cycles.
  Requests wait until `ready`.

**Controller.** The controller's state machine in `memu` serves these cases:

- **Hit:** read or write the bank RAM of the word's bank, then mark the way
  most recently used. A write sets the line's dirty bit.
- **Miss:** pick a victim. An invalid way is chosen first, otherwise the least
  recently used way. Then:
  1. if the victim is dirty, write its words back one Wishbone transfer at a
     time;
  2. fetch the new line one word at a time;
  3. write the tag;
  4. repeat the lookup, which now hits.

  This is write-back with write-allocate.
- **Direct access:** the access goes straight to the bus through
  `memu_busif`, which does Wishbone classic single transfers. This happens
  when `cache_en` is low or the address lies outside main memory
  (0x1000_0000–0x1FFF_FFFF).

**Timing.**

- Read hit: the port's `ack` comes 5 cycles after the core raises `rd`.
- Write hit: 3 cycles in the controller.
- Miss: costs 2^BANKS_LD bus transfers, plus as many again if the victim is
  dirty.

Because the controller serves one request at a time, several cores can
produce contention. This shows in `tb_paranut_top`.

Differences from the published ParaNut memory unit:

- There is a single shared tag memory. ParaNut replicates the tag and bank
  memories so that several ports can be served in parallel.
- A tag entry is 21 bits wide, against 25 in ParaNut. The extra bits are not
  described.
- There is no MMU: no TLB, no page table walker, and no bus controller to
  share the bus with the walker.
- There is no AXI bridge: main memory is a Wishbone slave outside the top
  module.

## System bus and peripherals

`pn_interconnect` decodes the address into one of four regions:

| region | base | mask | slave sees |
|---|---|---|---|
| main memory | 0x1000_0000 | 0xF000_0000 | full address (`mem_*` ports of the top) |
| machine timer | 0x5000_0000 | 0xFFFF_0000 | offset |
| UART | 0x5001_0000 | 0xFFFF_0000 | offset |
| GPIO | 0x5002_0000 | 0xFFFF_0000 | offset |

An access to any other address is answered at once with a one-cycle
`bus_err` pulse instead of an acknowledge, and zero data. This is the
Wishbone ERR signal. The memory unit hands the error back to the port that
made the request, and the core raises an access-fault exception:

- instruction access fault (cause 1) for a fetch;
- load access fault (cause 5) for a load;
- store access fault (cause 7) for a store.

Only direct accesses can fail this way, because the cache covers main
memory only. Bus errors during line fills and write-backs are not reported.

The interconnect also collects the interrupts. The UART receive interrupt and
the `ext_irq` pin are ORed into the CePU's machine external interrupt. The
lowest line number has priority in `irq_id`.

Peripheral registers (word offsets):

- **`mtimer`:**
  - mtime: 0x0 (low word), 0x4 (high word); counts every clock.
  - mtimecmp: 0x8 (low), 0xC (high); resets to all ones.
  - The timer interrupt goes straight to the CePU while mtime ≥ mtimecmp.
- **`uart`:**
  - TX 0x0: a write sends one byte.
  - RX 0x4: a read returns the byte and clears "received".
  - STAT 0x8: {overrun, received, tx busy}.
  - DIV 0xC: clocks per bit; the reset value 217 gives 115200 baud at 25 MHz.
  - The frame is 8N1 and there are no FIFOs.
- **`gpio`:**
  - Inputs at 0x0, passed through a two-flop synchroniser.
  - Output register at 0x4.
  - The widths are parameters, 8/8 by default.

All register maps are this design's own.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `paranut_top` | `CORES` | 4 | number of cores (core 0 is the CePU) |
| | `M_EXT` | 1 | include the multiply/divide unit |
| | `BANKS_LD`, `SETS_LD`, `WAYS_LD` | 2, 9, 2 | log2 of cache banks, sets, ways (the ParaNut defaults) |
| | `GPIO_IN`, `GPIO_OUT` | 8, 8 | GPIO widths |
| `uart` | `DIV_RESET` | 217 | reset value of the baud divider |

Shared constants (address map, opcodes, CSR numbers, trap causes, EXU states)
are in `rtl/pn_pkg.sv`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Memories:** `tb_block_ram`, `tb_memu_bankram` and `tb_memu_tagram` compare
  against reference arrays. The tag memory test also checks the length of the
  clearing sweep.
- **Ports, arbiter and bus interface:**
  - `tb_memu_readport` and `tb_memu_writeport` check the port handshakes.
  - `tb_memu_arbiter` checks priority and round robin against a reference
    model.
  - `tb_memu_busif` checks the Wishbone handshake, its latency and the ERR
    answer.
- **Memory unit:** `tb_memu` runs two cores with random LSU traffic and
  instruction fetches, in a small cache (8 sets) so that evictions are
  frequent. It checks:
  - every load against a reference memory;
  - the read-hit latency;
  - main memory after the final write-backs;
  - the error flag of a load and a store to an address the bus rejects.
- **Memory benchmark:** `tb_memu_workload` runs the classic memory-benchmark
  access patterns on the memory unit at its default size and prints clocks
  per operation:
  - one port: 2048 sequential words, written cold, written warm, then read;
  - four ports at once: adjacent, spread, shared and random words.

  The measured costs, per operation:

  | pattern | clocks |
  |---|---|
  | one port: cold write | 12.74 |
  | one port: warm write | 6.00 |
  | one port: read | 7.00 |
  | four ports: write | 3.00 |
  | four ports: read | 4.00 |

  With four ports busy, the controller's own rate sets the pace.
- **Bus and peripherals:** `tb_pn_interconnect`, `tb_mtimer`, `tb_gpio` and
  `tb_uart` (UART looped back, with independent line decoding).
- **Core parts:**
  - `tb_mextension` checks 800 random and corner-case operations and the
    33-cycle latency.
  - `tb_csr`, `tb_ifu` and `tb_lsu` test those blocks on their own.
  - `tb_exu` runs a random 1500-instruction RV32IM program against a
    reference model.
  - `tb_cpu` runs a directed program with branches, loads and stores, traps
    and a timer interrupt on a CePU. It also checks a CoPU's
    enable/halt/restart behaviour.
- **Whole system:** `tb_paranut_top` runs the four-core system at its default
  size:
  - It assembles an RV32IM program in the testbench.
  - It runs the program cached and then in direct mode.
  - It compares the results the program reports through GPIO.
  - It decodes the UART output.
  - It counts that every mechanism happens at least once: cache hit, miss,
    dirty write-back, direct access, port contention, CoPU execution,
    exception, interrupt, M-extension operation, UART transfer and mode
    switch.
  - It checks that the cached run is faster than the direct run (about 10.8k
    against 17.7k cycles with a 10-cycle memory).
  - A load from an unmapped address must end in a load access fault.

`tb/wb_mem_model.sv` and `tb/port_mem_model.sv` are behavioural memories used
only by the testbenches.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pn_pkg.sv tb/tb_paranut_top.sv --top-module tb_paranut_top
./obj_dir/Vtb_paranut_top
```

For any other block, replace `tb_paranut_top` with that block's testbench.

To run your own software, load `wb_mem_model.mem` (word index = (address −
0x1000_0000)/4) with an RV32IM machine-mode program linked at 0x1000_0000. It
must use the register maps above. The CePU starts there. The CoPUs start at
the same address once enabled, so use `mhartid` to branch to per-core code.

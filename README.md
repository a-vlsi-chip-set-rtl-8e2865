# SPUR: a tagged RISC processor and a coherent, self-translating cache controller

SPUR is a shared-bus multiprocessor workstation built for symbolic (LISP) and
parallel work. Each processor node has three parts:

- a 32-bit RISC CPU whose registers and memory words carry an 8-bit tag, for 40 bits per word;
- a large private cache (128 KB by default);
- an MMU/CC chip that runs the cache.

The MMU/CC keeps its cache coherent with the caches of the other nodes by
snooping the shared bus. It also does all address translation inside that
same cache: page table entries are cached like data, so there is no separate
TLB.

This RTL models a whole workstation of `NPROC` such nodes (default 6) on one
bus. Main memory and the floating-point chips are left outside the top and
reached through ports.

## The CPU (`spur_cpu`)

### Pipeline

There are four stages: **I-Fetch, Execute, Mem Acc, Write**. One instruction
issues per cycle unless something stalls.

- **I-Fetch** reads the on-chip instruction cache, `spur_iu`.
- **Execute** does the following:
  - decodes the instruction (`spur_master_ctrl`);
  - reads two registers through the window decoder (`spur_regfile`);
  - picks forwarded operands (`spur_fwd`);
  - runs the ALU, the 0–3 bit shifter, byte extract/insert and the tag checks in parallel.

  A compare-and-branch compares in the ALU while the upper datapath
  (`spur_upper_dp`) adds the 9-bit offset to the PC, so a branch resolves in
  Execute.
- **Mem Acc** sends loads and stores to the MMU/CC (`spur_cc_if`). It is also
  where every trap is decided (`spur_trap_logic`).
- **Write** writes the register file.

**Delayed transfers.** Branches, calls, jumps, returns and RETT have exactly
one delay slot.

**Forwarding.** A result stays in two destination registers before it reaches
the register file: D1 in Mem Acc and D2 in Write. Four comparators on
physical register rows choose between them, and D1 wins if both match.
Loaded data only reaches D2, so:

- the instruction right after a load must not use the loaded value (one load delay slot);
- there is no load interlock.

An instruction that takes both of its operands from forwarding is reported
on `fwd_double`.

**Stalls.**

- **Data stall:** while the MMU/CC holds `cc_busy` for a data reference, the whole pipeline freezes.
- **Instruction-cache miss:** an internal "miss" bubble enters Execute until the word arrives.
- **FPU stall:** a busy FPU freezes the pipeline on an FPU instruction.

### Register windows

There are 138 rows of 40 bits:

- 10 globals (r0–r9);
- 8 windows, each with 10 locals (r16–r25) and 6 registers shared with the caller (r10–r15) and 6 with the callee (r26–r31).

A call advances the current window pointer (CWP). The caller's r26–r31
become the callee's r10–r15. CALL writes its own address into the caller's r26,
so a return jumps to `r10 + 8`.

The saved window pointer (SWP) marks the oldest window still in the file.
Two traps keep the windows from overrunning each other:

- a call that would make CWP+1 equal SWP traps with **window overflow**;
- a return with CWP equal to SWP traps with **window underflow**.

Reset sets SWP = 7.

### Tags and LISP support

A word is `{gen[1:0], type[5:0], data[31:0]}`. Three checks use the tag:

- **Tag check:** ADDT and SUBT trap unless both operands carry the fixnum type (0).
- **Pointer check:** LDCAR traps unless its base is a cons (1).
- **Generation check:** ST40 traps when the stored object is younger, i.e. it has a higher generation than the object it is stored into. This is the write barrier of a generation-scavenging collector.

CMPBRT branches on a 6-bit tag immediate. Overflow traps cover ADD and SUB.
The tag, generation and overflow traps each have an enable bit in the user PSW.

### Traps

A trap is taken in Mem Acc:

- the two younger instructions are annulled;
- the saved KPSW and trap PC are loaded;
- traps are disabled and kernel mode is entered;
- fetch restarts at `{TBR[31:8], type, 4'b0}`.

The trap types, from highest priority to lowest:

| Trap | Type |
|---|---|
| MMU fault | 1 |
| illegal instruction | 2 |
| FPU exception | 3 |
| window overflow | 4 |
| window underflow | 5 |
| tag | 6 |
| generation | 7 |
| overflow | 8 |
| interrupt | 9 |

RETT jumps to `rs1 + imm` and restores the KPSW.

An interrupt is never taken on a delay-slot instruction or on RETT itself.
It is taken one instruction later, because the single trap PC could not
resume the pending transfer. A synchronous trap in a delay slot does lose the
branch. Software must not place a trapping instruction in a delay slot.

### Instruction cache (`spur_iu`)

The cache holds 512 bytes: 16 blocks of 8 words, direct mapped. It has a
24-bit tag (23 address bits plus the physical/virtual mode bit) and a valid
bit per word. Two KPSW bits select the mode:

| KPSW bits | Mode |
|---|---|
| 00 | off |
| 01 | on |
| 1x | on with prefetch |

On a demand miss the missing word is fetched through the MMU/CC port. Then,
in prefetch mode, the rest of the block is requested with the lowest priority
at that port. The MMU/CC answers a prefetch only when it hits in the external
cache, and ignores it otherwise. A demand fetch for exactly the word the
prefetcher is about to load is counted as that prefetch.

### Coprocessor port (`spur_fpu_if`)

Every instruction goes to the FPU on 22 pins (opcode and three register
numbers). Two control lines go with it: issue and squash. Three status bits
come back: busy, exception and unused.

- **FPU disabled:** FPU instructions are illegal.
- **FPU enabled:** they are no-ops for the CPU, except FPU load and store, for which the CPU forms the address and the FPU moves the data.

### Instruction formats (this design's encoding)

| Format | Fields |
|---|---|
| register | `{op7, rd5, rs1 5, 0, rs2 5, 9'b0}` |
| immediate | `{op7, rd, rs1, 1, imm14}` (sign-extended) |
| store | `{op, off[13:9], rs1, 0, rs2, off[8:0]}` |
| compare-and-branch | `{op, cond5, rs1, i, rs2/imm5, off9}` (offset in words from the branch) |
| CALL | `{4'b1110, target28}` |
| JUMP | `{4'b1111, target28}` |

The opcode values are in `spur_pkg`. They are this design's own.

## The MMU/CC (`mmu_cc`)

### In-cache translation (`mmu_xlate_dp`, `pcc_sequencer`)

**Global virtual address.** A 32-bit process address becomes a 38-bit global
virtual address (GVA). The top two bits select one of four 8-bit segment
registers, which replace them: `GVA = {seg, va[29:0]}`.

**Cache lookup.** The cache is indexed and tagged by the GVA. A hit therefore
needs no translation at all.

**Miss.** The processor cache controller (PCC) looks for the page table entry
(PTE), again in the cache, at the virtual address `{PTbase10, seg, vpn18, 00}`.

**PTE miss.** If the PTE misses too, the controller looks for the root PTE at
`{RPTbase_v20, seg, vpn[17:10], 00}`. If the root PTE also misses, it is
fetched from physical memory at `{RPTbase_p20, 00, vpn[17:10], 00}`.

**Resolving the address.**

- The root PTE gives the physical page of the PTE: `{RPTE[31:12], vpn[9:0], 00}`.
- The PTE gives the data address: `{PTE[31:12], offset}`.

Each entry fetched is placed in the cache, so the cache serves as the TLB.

**Push-down automaton.** This recursion runs on a 4-deep state stack
(`pcc_stack`). A miss at any level pushes the state that will use the answer.
A snooped bus request from the bus controller (SBC) pushes a snoop state on
top of whatever is in progress. A PTE with bit 0 clear faults the reference.

**Physical mode.** When KPSW.VIRT is 0, addresses are physical and are cached
under segment `6'h3F`.

### Coherency: Berkeley Ownership (`coh_state`)

Each block is in one of four states: Invalid, UnOwned, OwnShared or
OwnPrivate. The owner supplies data on the bus and writes the block back when
it leaves. The processor side works like this:

| Access | State before | Bus transaction | State after |
|---|---|---|---|
| read miss | Invalid | ReadShared | UnOwned |
| write miss | Invalid | ReadForOwnership | OwnPrivate |
| write | UnOwned or OwnShared | WriteForInvalidation | OwnPrivate |
| read-private (cache-control load) | — | ReadForOwnership, as for a write | OwnPrivate |
| flush | owned | write-back | Invalid |
| flush | not owned | none | Invalid |

On the snoop side, another node's ReadShared demotes OwnPrivate to OwnShared.
Any ReadForOwnership or WriteForInvalidation invalidates the block. An owner
answers with its data, and memory is then not used.

A pending WriteForInvalidation is turned into a ReadForOwnership in the SBC
when another node's RFO/WFI to the same block wins the bus first. The local
copy has just been invalidated, so it needs fresh data.

### Two clocks and the asynchronous interface (`async_channel`)

The PCC runs on the processor clock and the SBC runs on the bus clock. They
talk through two channels:

- requests, with their acknowledges;
- snoops, with their acknowledges.

Each channel carries a one-cycle request pulse as a toggle through a
two-flip-flop synchronizer. The request code is registered beside it and needs
no synchronizer, because it is stable before the toggle is seen. The
acknowledge returns the same way.

The SBC never writes the cache RAMs itself. The PCC does the update on its
behalf when the acknowledge arrives.

### Bus controller and bus (`sbc`, `spurbus_arb`)

**Master side.** The SBC requests the bus and drives its command the cycle
after the grant.

**Slave side.** It snoops every foreign transaction. It asks the PCC to look
up and update the block, and reports `s_done` and whether it responds as
owner.

**Arbiter.** `spurbus_arb` is round robin with one idle cycle between
tenures. A transaction ends when memory and every snooper have said done.

### On-chip peripherals

Registers are reached by physical-mode loads and stores to `0xFFFFF0xx`.

| Offset | Contents |
|---|---|
| 0x00–0x0C | segment registers |
| 0x10 | PT base |
| 0x14 | RPT base (virtual) |
| 0x18 | RPT base (physical) |
| 0x40 + 8i | performance counter i (4 counters) |
| 0x44 + 8i | event select (32 events) and user/kernel enables for counter i |
| 0x80 | interval timer period |
| 0x84 | timer enable |
| 0x88 | timer count |
| 0xC0 | interrupt pending (`{ext_irq[6:0], timer}`, write one to clear) |
| 0xC4 | interrupt mask |

## The system (`spur_system`)

The top instantiates `NPROC` nodes (CPU + MMU/CC + `cache_ram`) and the arbiter.

**Parameters.**

- `NPROC = 6`
- `CACHE_BYTES = 131072`
- `BLOCK_WORDS = 8`

**Ports.**

- `clk_p` (processor clock), `clk_b` (bus clock), `rst_n` (active-low reset).
- The memory port: `mem_cmd`, `mem_pa`, `mem_wblock`, `mem_owner`, `mem_done`, `mem_rblock`. Blocks are `8 x 40` bits.
- The FPU pins of every CPU.
- Seven external interrupt lines per node.
- Observation outputs: `bus_pc`, `trap_taken`, `iu_miss`, `iu_prefetch`, `fwd_double`.

## How far it follows the original, and where it departs

These parts follow the original design closely:

- the pipeline structure and its stalls;
- delayed branches and forwarding;
- register windows;
- tag, pointer and generation checks;
- the prefetching instruction cache's size and modes;
- the FPU pin budget;
- the translation address formats;
- the four-state ownership protocol;
- the push-down controller and its stack depth;
- the one-cycle request and acknowledge pulses between the two clock domains;
- the set of on-chip peripherals.

These are this design's own choices:

- all encodings (opcodes, condition codes, trap numbers, PSW bits, register map);
- the 32-byte block size;
- the bus signalling, which is a plain request/grant bus standing in for the backplane protocol;
- the trap priority;
- a toggling flag and two-flip-flop synchronizer in place of the original edge detector and RS latch;
- the peripheral register layout.

These are not built:

- the analog clock generators and PLA sense amplifiers;
- the scan registers and the IU/EU diagnostic separation pins;
- the NuBus side of the bus controller, and error acknowledges from the bus (every transaction completes);
- the full 40-instruction set (a working subset is decoded);
- the FPU and the memory board.

The four-phase clock is replaced by one rising edge per cycle.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator:

```
verilator --binary --timing -Irtl rtl/spur_pkg.sv tb/tb_spur_system.sv -y rtl \
          --top-module tb_spur_system -o sim && obj_dir/sim
```

### End-to-end test (`tb_spur_system`)

`tb_spur_system` runs all six nodes at full size. Each processor:

- finds its number in its interrupt-pending register;
- takes a timer interrupt;
- switches to virtual addressing over page tables the testbench builds (so PTE and root-PTE misses happen);
- writes, reads back and reads the neighbour's word of 16 falsely shared blocks;
- flushes them and reports.

The test then checks memory. It also requires each mechanism to have
occurred at least once:

- freezes;
- double forwarding;
- delayed transfers;
- instruction misses and prefetches;
- traps;
- translation misses;
- every bus command;
- owner responses;
- clock-domain handshakes.

### CPU test (`tb_spur_cpu`)

`tb_spur_cpu` runs a diagnostic program against a behavioural cache model.
The program covers:

- arithmetic and branches;
- deep recursion through the windows, with both window traps;
- tag, generation and overflow traps;
- an MMU fault;
- an interrupt;
- the FPU port.

# Host-multithreaded SPARC v8 functional model

This is an FPGA-oriented SPARC v8 integer processor that emulates many target
CPUs with few physical pipelines. Each pipeline holds 64 complete SPARC
contexts and switches between them every clock cycle. A strict round-robin
schedule issues one thread per cycle. Since the pipeline has only 11 stages,
no thread ever has two instructions in flight. That removes forwarding,
interlocks and hazard logic. A long-latency event such as a cache miss does
not stall anything: the instruction simply does not commit, and it is
replayed on the thread's next turn, 64 cycles later, by which time the miss
has normally been served in the background.

The full configuration (`sparc_mt_top`) is eight such pipelines in two
clusters of four: 512 SPARC contexts. Each cluster shares one DDR2 memory
controller port. The controller is not part of this RTL; its request and
response ports are the top-level ports. Memory is not coherent between
threads, which suits the use case: emulating a distributed-memory machine
such as a cluster of servers, where each thread runs its own program in its
own memory.

## Threads, stages and replay

| Stage | Work |
|-------|------|
| TS   | `thread_sel` picks thread `t` (round robin, no exceptions) |
| IF1  | read the thread's special registers (PC, nPC, PSR, WIM, Y, microcode state); start the I-cache read; address the microcode ROM |
| IF2  | I-cache hit check; in microcode mode the synthesized instruction replaces the fetched word |
| DE   | `decode`: control, branch resolution, window mapping of register numbers, trap detection |
| RF1, RF2 | two-cycle register file read (`mt_regfile`) |
| RF3  | operand select: rs2 or the immediate |
| EX   | `alu` or `muldiv_shf`, special register reads, address generation |
| MEM1 | `lsu_align` (alignment trap, store lanes and mask); D-cache access issued |
| MEM2 | D-cache hit check and word select |
| WB   | load alignment and sign extension; commit or discard; trap entry |

The key rule is that **all architectural state is written in WB only**: the
register file write, and one write of the thread's whole special-register
record. Everything before WB is speculative and can be dropped. WB sees one
of four outcomes for the instruction of thread `t`:

* **replay** – I-cache or D-cache miss (or a full miss queue). Nothing is
  written; the PC stays, and the same instruction is fetched next round.
* **trap** – anything from an illegal instruction to a window overflow, a
  `Ticc` or an interrupt. WB enters the trap microcode (below). If traps are disabled
  (`PSR.ET = 0`) the thread enters SPARC error mode and halts; a halted thread
  keeps its slot but does nothing. This is also how a program ends.
* **microcode entry** – complex instructions start a microcode sequence.
* **commit** – registers, condition codes, Y, PSR, WIM and PC/nPC are updated.

Branches are resolved in DE, from condition codes that are always current,
because the thread's previous instruction has already committed. Delayed
branches and annulment follow SPARC v8. The decoder computes the new
(PC, nPC) pair directly.

The pipeline needs `NTHREADS >= 11` (the stage count). This is checked at
elaboration.

## Register windows and scratch registers

Each thread owns a 64-word chunk of the register file, addressed as
`{thread, word}`:

| Words | Use |
|-------|-----|
| 0–7   | globals `%g0`–`%g7` (`%g0` reads zero) |
| 8–55  | three register windows of 16 words each |
| 56–63 | scratch words seen only by microcode; word 56 holds the trap base address (`%tbr`) |

A windowed register `r` (8–31) in window `cwp` maps to
`8 + ((r - 8) + 16*cwp) mod 48`. So the `%o` registers of window `w` are the
`%i` registers of window `w-1`, as SAVE/RESTORE require. Three windows is
the most that fits the 64-word chunk. SAVE and RESTORE check WIM and raise
window overflow and underflow traps. Spilling is left to trap software.

The register file has two read ports and one write port. Every word carries
a parity bit, and a parity error on a used operand is reported on
`err_parity`.

## Microcode

A thread in microcode mode fetches nothing from the I-cache. On each of its
turns `microcode_rom` supplies one simple SPARC instruction, built from a ROM
template and fields of the original instruction (rd, rs1, rs2 or immediate,
op3). A micro-instruction can name scratch words as rd or rs1. The
sequences:

| Sequence | Steps |
|----------|-------|
| store with reg+reg address | `s1 = rs1 + rs2`; `st rd, [s1]` |
| LDD | `s1 = address`; `ld [s1] -> rd(even)`; `ld [s1+4] -> rd(odd)` |
| STD | `s1 = address`; two word stores |
| SWAP | `s1 = address`; `ld [s1] -> s2`; `st rd, [s1]`; `rd = s2` |
| LDSTUB | `s1 = address`; `ldub [s1] -> s2`; `s3 = 0xff`; `stb s3, [s1]`; `rd = s2` |
| trap entry | `%l1 = trapped PC`; `%l2 = trapped nPC`; `jmpl TBA + 16*tt` |

Because only stores with reg+reg addresses need a third operand, the
register file gets by with two read ports. SWAP and LDSTUB are atomic here
because a thread has at most one instruction in flight and owns its memory
region.

Microcode state (sequence, step, original instruction) is part of the
thread's special-register record. A micro-instruction that misses in the
D-cache is replayed like any other. Trap entry saves PSR.S into PSR.PS,
sets S, clears ET and decrements CWP in WB. The microcode then writes the
trapped PC and nPC (read through `%asr30` and `%asr31`, visible only to
microcode) and jumps. `RETT` restores the state.

## Host caches

Each pipeline has an I-cache and a D-cache (`host_cache`). Both are 16 KB,
direct-mapped, write-back and write-allocate, with 32-byte lines. The cache
is **partitioned by thread**: thread `t` owns lines `8t` to `8t+7` (256 bytes).
The line index is `{t, addr[7:5]}` and the tag is `addr[31:8]`. Threads
therefore never evict each other's data.

| Cycle | Pipeline port |
|-------|---------------|
| 0 | tag RAM and the four 512×72 data banks are read |
| 1 | tag compare; SECDED check of all four 64-bit quarters; word select; `resp_hit` |
| 2 | a store hit writes back the merged, re-encoded quarter and sets the dirty bit |

On a miss the cache pushes one command into its memory command FIFO and marks
the thread pending. The command holds: write back the dirty victim (yes or
no), victim line, fill line, and victim data. While a thread is pending, its
accesses just replay. Each thread may have one miss outstanding, so up to
64 misses per cache are in flight.

A small sequencer sends each command as two 128-bit write beats (only for a
dirty victim) followed by one read request. The two refill beats return on a
separate write port of the RAMs, so refills never compete with pipeline
accesses. The second beat writes the tag and clears the pending bit. Two
corner cases are handled:

* an access that reads a line in the same cycle a refill beat writes it is
  replayed rather than trusted;
* after reset the tags are invalidated one per cycle (512 cycles), and all
  accesses replay until that is done.

Tags carry even parity. A bad tag is reported and treated as a clean miss.
Data is protected by a (72,64) SECDED code (`ecc_secded`). Corrected and
uncorrectable errors are reported; corrected data is used but not written
back.

Memory IDs are 10 bits: `{pipeline[2:0], I/D, thread[5:0]}`. `mem_arbiter`
routes refill beats back to the right cache using bits 6 and up. It shares
the cluster's controller port round-robin between the eight caches. A write
burst keeps the grant for both of its beats.

## Instruction set coverage

Implemented: all integer ALU and shift operations with and without condition
codes, ADDX/SUBX, tagged add/subtract (TADDcc, TSUBcc and the trapping
TADDccTV/TSUBccTV), the MULScc multiply step, SETHI, UMUL/SMUL, UDIV/SDIV
(with Y and overflow saturation), Bicc with annul, CALL, JMPL, RETT, Ticc,
SAVE/RESTORE, RD/WR of Y, PSR, WIM and TBR, all loads and stores including
LDD/STD, SWAP and LDSTUB, and the traps for illegal or privileged
instructions, misalignment, window overflow/underflow, tag overflow and
division by zero. FLUSH and STBAR are no-ops.
`rd %asr16` returns the hardware thread number `{pipeline, thread}`.

Not implemented (they trap as illegal instructions):

* alternate-space loads and stores;
* floating-point and coprocessor instructions.

Writes to PSR, WIM and Y take effect at once, which the architecture
allows.

Interrupts use the SPARC request-level scheme. Every thread has a 4-bit
`irq_level` input (0 means no request), which is level-sensitive: the source
holds it until software clears it. A request is taken when the thread has
`ET = 1` and the level is 15 or above `PSR.PIL`. It becomes trap `0x10 +
level` in place of the thread's next instruction. The interrupted
instruction has not executed, and RETT returns to it. A microcode sequence
is never interrupted, so LDD, SWAP and the others stay atomic. The decision
is made in MEM1 and recorded in MEM2, and trap entry is the same as for any
other trap.

## Differences from the FPGA implementation it describes

* The original runs its BRAMs, LUTRAMs and DSPs at twice the logic clock to
  get extra ports. Here every RAM is single-clocked and simply has the ports
  it needs. Frequency and FPGA mapping (DSP-based ALU, BRAM counts) are
  outside the RTL.
* The original uses the BRAMs' built-in ECC. Here the code is written in
  logic, so the bit layout differs from the vendor's.
* Error status goes to output ports. The monitor circuit that would collect
  it is not included.
* The memory controller and DDR2 interface are external.

## Storage at the default size, per pipeline

| Storage | Size |
|---------|------|
| Register file | 4096 × 33 bits |
| Special registers | 64 records |
| Each cache: data | 4 × 512 × 72 bits |
| Each cache: tags | 512 × 27 bits |
| Each cache: command FIFO | 64 × 317 bits |

Expected throughput: one issue slot per cycle per pipeline. At the miss rates
of 10% for instructions and 30% for data, with 30% loads and stores, about
1.19 slots are used per instruction, since each miss costs one replayed
slot. At 150 MHz that is about 1 G instructions per second for eight
pipelines.

## Files

`rtl/`:

| File | Contents |
|------|----------|
| `sparc_pkg.sv` | shared types: thread state record, decoded-instruction struct, memory beat format, opcode constants, window mapping |
| `sparc_mt_top.sv` | clusters, pipelines and arbiters |
| `mt_pipeline.sv` | the 11-stage pipeline, commit and trap logic |
| `thread_sel.sv` | round-robin thread scheduler |
| `special_regs.sv` | per-thread special registers |
| `mt_regfile.sv` | register file |
| `decode.sv` | instruction decoder |
| `microcode_rom.sv` | microcode ROM and instruction builder |
| `alu.sv` | ALU |
| `muldiv_shf.sv` | multiply, divide and shift unit |
| `lsu_align.sv` | load/store alignment |
| `host_cache.sv` | host cache |
| `mem_cmd_fifo.sv` | memory command FIFO |
| `ecc_secded.sv` | SECDED code |
| `mem_arbiter.sv` | cluster arbiter |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
these helpers:

* `mem_model.sv`: a behavioural memory controller with fixed latency;
* `sparc_asm_pkg.sv`: SPARC instruction encoders;
* `sparc_prog_pkg.sv`: a SPARC test program.

Every thread runs the test program in its own data area. It covers a
counted loop, SMUL, a reg+reg store, SAVE/RESTORE, a software trap and its
return, LDD/STD, SWAP, LDSTUB, byte loads, TADDcc, a MULScc step, a
TADDccTV tag-overflow trap, and evictions of dirty lines.
The program ends by halting in error mode. The testbench then compares each
thread's memory with the expected image.

`tb_sparc_mt_top` runs the full default design: 8 pipelines, 512 threads,
two memory models. It also requires that each mechanism happened at least
once:

* I- and D-cache replays;
* misses;
* dirty write-backs;
* traps;
* microcode steps;
* interrupts (one thread per pipeline requests level 15);
* contention at the memory port.

It also checks that no thread commits twice within one round. It finishes in
about 10,000 cycles.

`tb_throughput` is a rate workload: one default-size pipeline (64 threads)
runs a tight loop in which the only misses are cold misses. It measures
0.98 committed instructions per cycle, which is 1.17 G instructions per
second for eight pipelines at 150 MHz. A miss costs on average 1.55 replayed
slots, because the cold misses of all 64 threads queue together at the
memory port.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/sparc_pkg.sv tb/sparc_asm_pkg.sv tb/sparc_prog_pkg.sv \
    tb/tb_sparc_mt_top.sv --top-module tb_sparc_mt_top -Mdir obj -o sim
./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`. For unit testbenches,
replace the testbench name. `sparc_asm_pkg.sv` is needed by `tb_decode`,
`tb_microcode_rom`, `tb_throughput`, `tb_mt_pipeline` and `tb_sparc_mt_top`;
`sparc_prog_pkg.sv` only by the last two. `NTHREADS`, `NCLUSTERS`,
`CORES_PER_CLUSTER` and `RESET_PC` are parameters of the top.
`tb_mt_pipeline` runs one pipeline with 16 threads for a faster turnaround.

# SPUR-style RISC CPU with tagged registers, prefetching instruction cache and coprocessor port

This is synthesizable SystemVerilog for the CPU chip of the SPUR multiprocessor
workstation: a 32-bit RISC processor that issues one instruction per cycle through a
four-stage pipeline, keeps 138 registers of 40 bits in eight overlapping windows, checks
LISP type tags and garbage-collection generation numbers in hardware, fetches from a
512-byte on-chip instruction cache that prefetches the rest of a block after a miss, and
talks to an external MMU/cache controller and a floating-point coprocessor through narrow
interfaces.

The chip's structure, sizes and mechanisms follow the published description of the SPUR
CPU. That description does not give the instruction set encoding, the PSW bit layout, the
trap vector table, the cache-opcode values or the exact pin protocols, so those are this
design's own and are listed below. Treat the RTL as a faithful model of the organisation
and the cycle behaviour, not as a binary-compatible SPUR.

## The 40-bit word

Every register and every memory word has 40 bits:

| bits  | field       | use                                          |
|-------|-------------|----------------------------------------------|
| 39:34 | type tag    | LISP object type (0 = fixnum, 1 = pair/list cell in this design) |
| 33:32 | generation  | age of the object for generation scavenging  |
| 31:0  | data        | integer or pointer                           |

Tags and data are handled independently: no carry or other signal crosses between them.
Arithmetic works on bits 31:0 while the tag checker looks at the tags in parallel:

* data type check (`add_t`, `sub_t`): both operands must be fixnums;
* pointer check (`ld_t`): the base register must be a pair;
* generation check (`st_40`): storing a younger object (larger generation) into an older
  one is an error.

Each check raises a trap if its UPSW enable bit (and the global trap enable) is set.
`rd_tag` moves a tag into the data part through the byte extractor, `wr_tag` moves data
bits into the tag through the byte inserter, so software can compute on tags.

## Register windows

138 physical registers = 10 globals + 8 windows x 16. A 5-bit specifier is mapped with the
current window pointer `cwp` (`spur_window_dec`):

| specifier | meaning | physical register |
|-----------|---------|-------------------|
| 0-9   | globals | 0-9 |
| 10-15 | ins (the caller's outs) | 10 + 16*(cwp-1) + 10 + (s-10) |
| 16-25 | locals | 10 + 16*cwp + (s-16) |
| 26-31 | outs | 10 + 16*cwp + 10 + (s-26) |

A call increments `cwp`, so the caller's r26-r31 are the callee's r10-r15. The call
writes its own byte address into the caller's r26 (callee r10); `return rs1, imm` jumps to
`(rs1 + imm) / 4`, so `return r10, 8` resumes after the call's delay slot. The delay slot of
a call already runs in the callee's window.

The saved window pointer `swp` marks the oldest window still in the file. A call with
`cwp + 2 == swp` traps as window overflow; a return with `cwp == swp` traps as window
underflow. The handlers are expected to spill or refill windows and move `swp`.

## Pipeline

```
 fetch  ->  execute  ->  memory  ->  write
 (IU)       regs, ALU,   external    register
            shifter,     cache via   file
            tag check,   MMU/CC,
            branch       traps
```

* **Fetch.** The EU offers a word address every cycle. If the IU has the word, it enters
  execute; if not, a bubble ("miss" no-op) enters and the PC holds.
* **Execute.** Both source registers are read. The results of the two instructions ahead
  sit in destination registers 1 (memory stage) and 2 (write stage); four comparisons of
  the two source numbers against the two destination numbers select, per operand, the
  register file, destination 1 or destination 2 (`spur_forward`). Both operands may come
  from forwarding at once (double forwarding). Comparisons use physical register numbers,
  so forwarding is correct across window changes.
* **Memory.** Loads and stores go to the external cache. A loaded word comes back in the
  same cycle and is forwarded straight to the next instruction, so loads need neither a
  stall nor a delay slot when the external cache hits. All traps are decided here.
* **Write.** The result is written into the register file.

Control transfers (compare-and-branch, call, jump, return) are delayed by one instruction.
Compare-and-branch is one cycle: the ALU subtracts to compare while a separate 30-bit
address adder (a Manchester-style carry chain) forms the target.

The whole pipeline freezes while the MMU/CC holds a data access with its busy line, or
while a coprocessor instruction sits in execute and the FPU reports busy.

With the program in the instruction cache and no data-cache misses the CPU completes one
instruction per cycle; the end-to-end testbench checks that a three-instruction loop takes
three cycles per iteration.

## Traps

Traps are taken in the memory stage, so only one instruction can trap per cycle. Priority,
highest first: MMU/CC fault, illegal instruction, window overflow, window underflow, tag
type, generation, integer overflow, FPU exception, interrupt. The first four always trap;
the others need KPSW bit 0 (trap enable) and their own enable bit.

On a trap the instruction in memory and those behind it are cancelled and, in one cycle,
the KPSW is saved and then set to kernel mode with traps disabled, the trapping
instruction's address and the cause are recorded, `cwp` advances by one (the handler gets a
fresh window) and fetching restarts at word `0x40 + 4*cause`. `rett rs1, imm` restores the
KPSW, steps `cwp` back and jumps like `return`; with the trap PC read into a register,
`imm = 0` retries the instruction and `imm = 4` skips it.

Limitation: an instruction that traps in a branch's delay slot returns to the slot only, so
the branch itself is not repeated.

## Special registers

Read with `rd_spec rd, n` and written with `wr_spec n, rs1` (`spur_special_regs`):

| n | register | bits |
|---|----------|------|
| 0 | KPSW | 0 trap enable, 1 interrupt enable, 2 FPU exception enable, 3 I-cache enable, 4 prefetch enable, 5 FPU enable, 6 kernel, 7 virtual |
| 1 | UPSW | 0 overflow trap enable, 1 tag trap enable, 2 generation trap enable |
| 2 | CWP  | current window |
| 3 | SWP  | saved window |
| 4 | trap PC | byte address of the trapping instruction |
| 5 | trap cause | 0 fault, 1 illegal, 2 window overflow, 3 underflow, 4 tag, 5 generation, 6 overflow, 7 FPU, 8 interrupt |
| 6 | FPU status | read only |
| 7 | saved KPSW | |

Reset leaves the CPU in kernel mode with traps and the instruction cache disabled, both
window pointers 0, fetching from word 0.

## Instruction formats and opcodes

Field positions: opcode 31:25, Rd or condition 24:20, Rs1 19:15, immediate flag 14, Rs2
13:9 or a 14-bit signed immediate 13:0. Stores use a 14-bit immediate split as
{24:20, 8:0} and take the data register in 13:9. Compare-and-branch: condition 24:20,
Rs1, then either Rs2 or a 5-bit signed immediate in 13:9, and a 9-bit signed word offset
in 8:0 relative to the branch. The tag branch compares Rs1's 6-bit type with bits 14:9.
Call (top nibble `0xE`) and jump (`0xF`) carry a 28-bit word address within the current
quarter of the address space.

| opcode | instruction | opcode | instruction |
|--------|-------------|--------|-------------|
| 00 | nop | 10 / 11 | ld / ld_t |
| 01-05 | add sub and or xor | 12 / 13 | st / st_40 |
| 06-08 | sll srl sra (by 0-3) | 18-1E | seven special loads |
| 09 / 0A | extract / insert byte | 20-22 | three special stores |
| 0B / 0C | rd_tag / wr_tag | 28 / 29 | rd_spec / wr_spec |
| 0D / 0E | add_t / sub_t | 2A / 2B | return / rett |
| 30 / 31 | cmp-branch / tag branch | 40-53 | coprocessor (52 load, 53 store) |

That is 37 integer instructions (the published set has 40; which three are missing
is not known, since the published list is not given) and 20 coprocessor opcodes, as published.

Branch conditions: 0 eq, 1 ne, 2 lt, 3 le, 4 gt, 5 ge, 6-9 the unsigned forms, 10 always.
Other opcodes trap as illegal; so do the coprocessor opcodes while KPSW bit 5 is clear.

## Instruction unit

`spur_iu` holds 128 instruction words as 16 direct-mapped blocks of 8, addressed by the
virtual word address. Every word has its own valid bit, so a block may be partly
present. Each block's tag is 24 bits: 23 address bits plus the kernel-mode bit, which
keeps user and kernel code at the same virtual address apart.

Two state machines run it:

* **Fetch machine** (idle / miss). On a hit the word goes to the EU in the same cycle. On
  a miss it asks the external cache for that one word in the next cycle; the word is
  written and delivered one cycle later, so a miss costs two cycles. A new tag clears the
  other valid bits of the block.
* **Prefetch machine** (idle / active). After a demand miss it fetches the following
  words of the block, one per cycle, at the lowest priority on the external port, while
  the EU runs from the cache. It stops at the end of the block, at the next demand miss,
  when a data access takes the port, or when the MMU/CC ignores the prefetch because it
  missed in the external cache. If the prefetches keep ahead, a whole block costs only the
  first miss's two cycles.

Modes, chosen by KPSW bits 3 and 4: disabled (every fetch goes outside through a one-word
buffer, three cycles per instruction, valid bits are cleared), enabled without prefetching,
and enabled with prefetching (normal).

## External interfaces

**MMU/CC** (`spur_mmucc_if`). One port shared with priority data access > demand fetch >
prefetch. Outputs: a 4-bit cache opcode (0 none, 1 instruction fetch, 2 prefetch, 3 load,
4 store, 5-11 special loads, 12-14 special stores), a 32-bit byte address, 40-bit write
data, and two mode bits (kernel, virtual). Status out: {trap taken, stalled, IU miss, data
access}. Status in: {error, interrupt, prefetch ignored, fault, busy}. An access completes
in the cycle its opcode is driven unless busy is high; read data are expected in that same
cycle. Instruction words are returned on data bits 31:0.

**FPU** (`spur_fpu_if`). 27 lines: 22 instruction lines {opcode, rd, rs1, rs2} showing the
instruction that entered execute the cycle before, two controls (issue, and cancel when a
trap squashed it), and three status inputs {condition, exception, busy}. Coprocessor
instructions are otherwise no-ops to the CPU: they write no CPU register; coprocessor loads
and stores only give the address (the FPU takes the data off the bus).

**Test pins** on `spur_cpu`: `bus_pc` (fetch address bits 10:2), `iu_state` (fetching,
prefetching), and `diag_sep`, which disconnects the IU and lets `diag_inst` /
`diag_inst_valid` feed the EU directly; a tester answers each `bus_pc` with the instruction
at that address, so the EU runs even if the instruction cache is broken.

**Scan chain** (`spur_scan`). A passive 150-bit shadow register copies, every cycle, the
address of the instruction in execute (30 bits), operand buses A and B after forwarding and
the execute result bus (40 bits each). Raising `scan_shift` stops the copying and shifts the
chain out on `scan_out`, most significant bit (address bit 29) first, one bit per clock, with
`scan_in` entering at the bottom; the processor keeps running meanwhile. The chain order is
{address, A, B, result}.

## Departures from the published chip

* One rising-edge clock instead of the four-phase non-overlapping clock and its PLL-based
  clock generator; one cycle here is one four-phase cycle. Latches and dynamic logic
  become flip-flops and static logic.
* The instruction list (37 integer instructions instead of 40), opcode values, condition codes, PSW bit layout, trap causes, vector addresses, cache
  opcodes and the split of the nine MMU/CC status lines are this design's.
* The two internal instructions the chip issues on a trap (trap call, read PC) are merged
  into one trap-entry cycle.
* The opcode PLA becomes a case statement; the ALU's four 8-bit lookahead groups are kept.
* The FPU, the MMU/cache controller and the external cache RAMs are separate chips and
  are not included; the testbenches model them behaviourally.
* The published chip puts scan registers on all major buses; here one chain covers the
  execute-stage address, both operand buses and the result bus only.

## Files

`rtl/spur_pkg.sv` holds the shared types (`word40_t`, opcodes, `ctrl_t` control word) and
constants. Top level is `rtl/spur_cpu.sv`: `spur_iu`, `spur_eu`, `spur_mmucc_if`,
`spur_fpu_if`. Inside `spur_eu`: `spur_decode`, `spur_window_dec`, `spur_regfile`,
`spur_forward`, `spur_alu`, `spur_shifter`, `spur_byte_extract`, `spur_byte_insert`,
`spur_tag_check`, `spur_branch_cond`, `spur_addr_adder`, `spur_special_regs`,
`spur_trap_logic`. `spur_scan` is the test chain. Each file opens with a comment on what it does and its timing.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/spur_pkg.sv \
    $(ls rtl/*.sv | grep -v spur_pkg) tb/tb_spur_cpu.sv --top-module tb_spur_cpu
./obj_dir/Vtb_spur_cpu +verilator+rand+reset+2
```

`tb_spur_cpu` is the end-to-end test. It assembles a program with small functions, runs it
against a behavioural external cache (random busy cycles, randomly ignored prefetches, a
fault region, one interrupt) and a small FPU model, and checks the stored results, the
number of traps of each cause, the loop timing, and that each mechanism occurred (disabled
and prefetching cache modes, misses, prefetches and stopped prefetches, single and double
forwarding, taken branches, calls and returns, busy and FPU stalls, special cache opcodes,
FPU issue and cancel). Add `+trace` for a cycle-by-cycle listing.

`tb_spur_cpu_diag` runs the chip with the instruction unit separated, feeding
instructions by `bus_pc`, and reads the scan chain while a known subtraction is in execute.

`tb_spur_tak` runs the Gabriel benchmark TAK, tak(18, 12, 6) = 7, with 63,609 calls.
The recursion is far deeper than eight windows, so the bench includes real overflow and
underflow handlers. Each handler stores or loads a window's sixteen 40-bit registers on a
spill stack, moves `swp` and returns with RETT to retry the call or return that trapped.
The run takes about one million cycles, with 2,518 spills and as many fills.

`tb_spur_eu` runs the execution unit alone on a long random program with a reference
model; `tb_spur_iu` checks the cache's cycle counts in each mode and the data it delivers
under random port conflicts.

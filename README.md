# DIVA PIM node scalar processor

A processing-in-memory (PIM) chip puts logic next to DRAM or SRAM banks so
that data-intensive code (multimedia kernels, pointer chasing, sparse
matrices) runs where the data lives instead of across a memory bus. In the
DIVA architecture each PIM node has a few megabytes of memory, a 256-bit
SIMD "WideWord" datapath and a small 32-bit scalar processor. The scalar
processor runs the instruction stream, drives the WideWord unit, handles
exceptions and interrupts, and sends and receives *parcels* (lightweight
messages that invoke a function at a memory object) through a memory-mapped
parcel buffer.

This repository is synthesizable SystemVerilog for that node: a
single-issue, in-order, five-stage RISC pipeline in the style of DLX, with
its instruction cache, memory bus arbiter, node memory and parcel buffer.
The WideWord datapath, the host SDRAM interface and the chip-to-chip router
are not included. Their connections are ports of the node.

## Block map

```
                 +-------------------- diva_node ---------------------+
 host_req/rsp -->| memory port ---+                                   |
 ww_mem_req/rsp->| WideWord ------+--> diva_mem_arbiter --> diva_node_memory (32768 x 256)
                 | scalar data ---+      |  lock, 2-cycle access       |
                 | I-cache fill --+      +--> diva_pbuf <--> parcel_in/out
                 |      ^                                              |
                 |  diva_icache <-- fetch --+                          |
                 |                          |                          |
                 |        diva_core (IF ID EX MEM WB)  <--> ww_* (WideWord exchange)
                 |          diva_regfile, diva_hazard_unit, diva_branch_unit,
                 |          diva_alu (+ diva_leftmost_one), diva_exc_unit, diva_timer
                 +-----------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/diva_pkg.sv` | opcodes, function codes, condition codes, PSW, special registers, bus structs |
| `rtl/diva_node.sv` | top: one node, wires everything, places 32-bit scalar accesses on the 256-bit bus |
| `rtl/diva_core.sv` | the five-stage pipeline and its control |
| `rtl/diva_regfile.sv` | 32 x 32-bit register file, 2 read ports, 1 write port |
| `rtl/diva_hazard_unit.sv` | forwarding selection, load-use interlock, memory stall |
| `rtl/diva_branch_unit.sv` | the eight branch conditions, BA/BN, branch targets |
| `rtl/diva_alu.sv`, `rtl/diva_leftmost_one.sv` | ALU with condition codes; ELO/CLO |
| `rtl/diva_exc_unit.sv` | PSW, shadow registers, exception priority, interrupt levels, entry, RFE |
| `rtl/diva_timer.sv` | interval timer (interrupt line 0) |
| `rtl/diva_icache.sv` | direct-mapped instruction cache with line invalidate |
| `rtl/diva_mem_arbiter.sv` | memory bus control and arbiter, PBUF address decode, bus lock |
| `rtl/diva_node_memory.sv` | node SRAM array |
| `rtl/diva_pbuf.sv` | memory-mapped parcel buffer |

## The pipeline

The stages are fetch, decode/register read, execute, memory and writeback.
Most of the design's complexity lies in how these stages interact.

**Operands are read in decode, and forwarding feeds decode.** Branches
resolve in the second stage. A register-based branch therefore needs its
base register there, so the bypass network delivers values to the decode
stage, not to execute. For each source register the youngest writer wins:

1. the execute stage's result of the current cycle (ALU, special register,
   WideWord result or link address);
2. the memory stage's result, or the load data arriving that cycle;
3. the writeback value;
4. otherwise the register file.

The only dependence that cannot be bypassed is a load in execute whose
target the next instruction reads. The hazard unit then holds fetch and
decode for one cycle and sends a bubble into execute (`load_use`). One
instruction later the loaded value is forwarded from the memory stage.

**Condition codes and delayed branches.** Instructions with the C bit
update four flags: EQ (result zero), LT (result negative, i.e. the sign
bit), GT (positive) and OV (signed overflow). The flags live in the PSW. A
branch in decode sees the flags of the instruction in execute through a
bypass, so compare-and-branch pairs run back to back. The same bypass
carries the flag field of an `MTSR` that writes the PSW. Every branch has one
delay slot. The instruction after it always executes, and branches never
stall. Fetch can miss in the cache while a taken branch leaves decode. In
that case the target is held in `br_pend_target` and applied once the
delay-slot instruction has been fetched. With the link bit set, a branch
writes the address after its delay slot (branch + 8) to R31.

**Stalls.** A cache miss stalls only fetch: decode receives bubbles. There
is no data cache. Every load and store holds the whole pipeline in the
memory stage until the bus returns `done` (`stall_all`). At least two cycles
pass from request to completion, and more when other masters hold the bus.

**Exceptions** are taken when the faulting instruction is in execute. In
that single cycle `diva_exc_unit`:

- picks the cause;
- saves the PSW, the instruction address and (for address faults) the data
  address in shadow registers;
- points the PC at `EVEC + 16*cause`;
- switches to supervisor mode with interrupts disabled.

The execute instruction and everything younger are squashed. Older
instructions in the memory and writeback stages complete. An exception in
a delay slot records the branch's address and sets `ECAUSE[31]`, so the
branch is re-executed on return. Interrupts wait for an instruction that is
not a branch, a delay slot or an RFE. `RFE` (in execute) copies the saved
PSW back and resumes at `EPC`. A handler for a synchronous exception adds 4
to `EPC` itself when it wants to skip the faulting instruction, as the test
handler does.

Priority: synchronous causes come first, in the order illegal
instruction, privileged instruction in user mode, address fault
(misaligned access), divide by zero, TRAP. Interrupt lines 0 (timer),
1 (PBUF) and 2 (external) follow. Each line has a programmable 2-bit level
in `IPRI` (bits `2i+1:2i`, all 1 after reset). A line is accepted when the
PSW interrupt-enable bit is set, its `IMASK` bit is set, and its level is
above the current level `PSW.ilvl`. The highest level wins; ties go to the
lower line number. Entry copies the line's level into `PSW.ilvl`, and RFE
restores the old PSW. A handler that has saved `EPC` and `EPSW` may set
`PSW.ie` again: only a line with a higher level can then preempt it.
Synchronous exceptions are taken at any level and leave it unchanged.

## Instruction set as implemented

The two formats and their field widths are those of the architecture:

```
R: opcode[31:26] rD[25:21] rA[20:16] rB[15:11] C[10] reserved[9:6] function[5:0]
I: opcode[31:26] rD[25:21] rA[20:16] immediate[15:0]
```

No opcode numbers or branch layout were published, so all of the following
is this implementation's own encoding (`diva_pkg`):

| Opcode | Instructions |
|---|---|
| 0x00 | R-format ALU: ADD 0, SUB 1, MUL 2, DIV 3, AND 4, OR 5, XOR 6, NOT 7, SLL 8, SRL 9, SRA 10, ELO 11, CLO 12 |
| 0x01-0x0A | ADDI SUBI MULI DIVI ANDI ORI XORI SLLI SRLI SRAI (0x21-0x2A: same, updating CC) |
| 0x10-0x15 | LW LH LHU LB LBU LWL (locked) - address rA + sext(imm) |
| 0x18-0x1B | SW SH SB SWL (locked) - data register in the rD field |
| 0x30 | BR: `cond[25:23] L[22] offset[21:0]`, target = branch + 4*offset |
| 0x31 | BRR: `cond L rA[20:16] offset[15:0]`, target = rA + 4*offset |
| 0x32 / 0x33 | BA / BN: branch if all / no active WideWord subfields meet cond |
| 0x38 / 0x39 | MFSR rD, sr / MTSR rA, sr (supervisor) |
| 0x3A / 0x3B / 0x3C | RFE (supervisor) / TRAP / ICINV rA+imm (supervisor) |
| 0x3D | PROBE: raises illegal instruction (there is no address translation) |
| 0x3E / 0x3F | WW / WWMV: WideWord instruction with rA, rB values; WWMV writes a scalar result to rD |

Conditions 0-7: always, EQ, NE, LT, LE, GT, GE, OV. Register 0 reads as
zero. Arithmetic immediates are sign-extended. Logical and shift
immediates are zero-extended.

Special registers: 0 PSW (`[0]` supervisor, `[1]` interrupt enable,
`[3:2]` current interrupt level, `[7:4]` OV GT LT EQ), 1 EPSW, 2 EPC, 3 EBAD, 4 ECAUSE, 5 EVEC (reset
0x100), 6 IMASK, 7 TLOAD, 8 TCTRL (`[0]` enable, `[1]` pending / write 1
to clear), 9 TCOUNT, 10 SCRATCH, 11 IPRI. Reset starts at PC 0 in supervisor mode
with interrupts off.

## WideWord exchange

In execute, `ww_valid` pulses with the instruction word and the two scalar
operands, which carries data into the WideWord unit. For WWMV, `ww_rdata`
must answer in the same cycle and is written to rD. This path is also how
register values act as WideWord subfield indices. The WideWord condition
codes come in as four 32-bit vectors (EQ, LT, GT, OV, one bit per byte
subfield) plus `ww_mask`, the subfields in use for the current operand
size. BA and BN evaluate them in decode.

ELO returns the bit number (0 = LSB) of the most significant one of rA.
CLO clears that bit. Both help scan WideWord condition masks moved into
scalar registers.

## Memory system

- **Bus**: 256 bits wide, one master at a time. Each master holds a
  `bus_req_t` until it sees `bus_rsp_t.done`. An access takes two cycles:
  grant, then done with read data.
- **Arbiter**: fixed priority, in this order:
  1. memory port (host);
  2. WideWord;
  3. scalar data;
  4. instruction-cache fill.

  Addresses from `0x8000_0000` up go to the PBUF, all others to the node
  memory; address bits above the array size wrap.
- **Locked load/store**: LWL makes the scalar master the lock owner. Until
  its SWL, the host and WideWord masters are refused. Instruction fills
  still proceed, so the processor cannot deadlock itself.
- **Instruction cache**: 128 direct-mapped lines of 256 bits (4 KB). A hit
  answers in the fetch cycle. A miss fetches the line with one bus access.
  ICINV clears the single line that holds an address.
- **Node memory**: 32768 rows x 256 bits = 8 Mbit, with byte write enables
  and one-cycle read latency. This is plain RTL standing in for an SRAM
  macro.
- **PBUF** (16-word inbound and outbound FIFOs of 32-bit parcel words):

  | Word | Address | Access | Function |
  |---|---|---|---|
  | 0 | `0x8000_0000` | read | STATUS = `{out_free, in_count}` |
  | 1 | `0x8000_0004` | read | pops an inbound word |
  | 2 | `0x8000_0008` | write | queues an outbound word |

  Its interrupt is high while inbound words wait.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| diva_node | MEM_ROWS | 32768 | 8 Mbit of SRAM at 256 bits per row |
| diva_node | IC_LINES | 128 | own choice |
| diva_node | PB_DEPTH | 16 | own choice |
| diva_node | RESET_PC | 0 | own choice |
| diva_regfile | NREGS x XLEN | 32 x 32 | architecture |

## How far this follows the architecture

Taken from the architecture:

- five stages and full forwarding, with a one-cycle load-use interlock;
- condition codes EQ/LT/GT/OV with a C bit;
- eight branch conditions and a single delay slot, with branches resolved
  in decode;
- word-granular branch offsets, PC-relative and base-register targets, and
  a link to R31;
- a 32 x 32 register file with 2 read ports and 1 write port;
- add/sub/mul/div, AND/OR/NOT/XOR, shifts, ELO/CLO;
- BA/BN;
- supervisor and user modes, shadow registers and a single-cycle exception
  entry into supervisor mode with interrupts disabled;
- return from exception;
- timer and PBUF as interrupt sources;
- stalls on cache misses and on every load/store;
- locked load/store, single-line cache invalidate, the 8 Mbit memory, and
  the memory-mapped PBUF.

Choices made here, not published for the original design:

- all encodings;
- where forwarding enters;
- the exception priority order, the interrupt-level scheme and the vector formula;
- the special-register map;
- the bus width and protocol;
- the arbitration order;
- the cache organisation;
- the parcel word format;
- the timer's behaviour;
- how the lock works.

Known departures and limits:

- The original design names a flexible priority scheme and a
  non-recursive handler dispatch with preemption, without details. Here
  the hardware side is the level scheme above. The dispatch software is
  not written, and synchronous causes keep a fixed order.
- There is no address translation. PROBE traps as illegal, as the
  prototype chip also lacked translation.
- Multiply and divide complete in one cycle. A real implementation would
  likely iterate.
- A branch placed in another branch's delay slot is not supported.
- Re-executing a linking branch after an exception in its delay slot
  writes R31 again. This is harmless unless the branch reads R31 itself.
- The WideWord datapath (32 x 256-bit registers, 8/16/32-bit subfield
  operations) is not built: only its exchange ports exist. The same holds
  for the host SDRAM interface, the memory-port logic, the parcel router,
  the PLL and the pads.
- Performance: the reported chip figure of 640 MOPS at 80 MHz (8
  operations per cycle) comes from the WideWord unit. This scalar-only
  node reaches at most one operation per cycle.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- Unit benches: `tb_diva_regfile`, `tb_diva_alu`, `tb_diva_leftmost_one`,
  `tb_diva_branch_unit`, `tb_diva_hazard_unit`, `tb_diva_exc_unit`,
  `tb_diva_timer`, `tb_diva_icache`, `tb_diva_mem_arbiter`,
  `tb_diva_node_memory`, `tb_diva_pbuf`. These compare against reference
  models written in the benches. `tb_diva_exc_unit` also walks through a
  nested interrupt: a level-2 handler re-enables interrupts, a level-1
  line is held off, a level-3 line preempts, and RFE returns to level 2.
- `tb_diva_core` runs the test program of `tb/diva_asm_pkg.sv` on the
  pipeline. Instruction misses are random and data latency is random. It
  checks all registers and memory words against hand-worked values. It
  also requires the following to occur: forwarding, the load-use bubble,
  fetch and memory stalls, taken branches, CC bypass (from an ALU result
  and from an `MTSR` to the PSW), five exceptions, one
  timer interrupt, six RFEs, WideWord transfers, locked accesses and a
  cache invalidate.
- `tb_diva_node` runs the same program on the full node at default sizes,
  while host and WideWord stand-ins compete for the bus. It also passes a
  parcel word in and out through the PBUF and reads results back through
  the memory port. It counts cache misses, bus contention and lock cycles.
- `tb_diva_nested_irq` runs nested interrupts through the pipeline. A
  level-1 handler re-enables interrupts and must not re-enter itself while
  its line stays high. A level-2 line then preempts it. The bench checks the
  PSW, EPC and EPSW each handler reads, and that both handlers and the main
  loop resume in order.
- `tb_diva_transpose` runs a 16 x 16 word matrix transpose on the scalar
  processor at default sizes. It checks every element and reports 12
  cycles per element.

Simulate with Verilator 5 (two-state; testbenches initialise what they read):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/diva_pkg.sv tb/diva_asm_pkg.sv rtl/*.sv tb/tb_diva_node.sv \
  --top-module tb_diva_node -o sim && ./obj_dir/sim
```

Replace `tb_diva_node` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/diva_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused bits: the cache's write-data fields
are constant, and some status signals are observed only by testbenches.

# WISC-F07: a 16-bit five-stage pipelined load/store processor

WISC-F07 is a small teaching processor: sixteen 16-bit registers, a
three-bit condition register and fifteen instructions, every one a single
16-bit word. This RTL implements it as a classic five-stage pipeline
(fetch, decode, execute, memory, writeback) without operand forwarding. The
pipeline resolves every hazard by stalling or flushing. It fetches from a
small direct-mapped instruction cache that refills from main memory over a
two-word bus. Its data memory is an idealised data cache that always hits.

## Instruction set

Every instruction is one word, and bits [15:12] are the opcode.

| opcode | instruction        | format                | effect |
|--------|--------------------|-----------------------|--------|
| 0000   | `ADD rd, rs, rt`   | `0000 dddd ssss tttt` | rd = rs + rt; sets Z V N |
| 0001   | `SUB rd, rs, rt`   | `0001 dddd ssss tttt` | rd = rs − rt; sets Z V N |
| 0010   | `NAND rd, rs, rt`  | `0010 dddd ssss tttt` | rd = ~(rs & rt); sets Z, clears V N |
| 0011   | `XOR rd, rs, rt`   | `0011 dddd ssss tttt` | rd = rs ^ rt; sets Z, clears V N |
| 0100   | `INC rd, rs, imm`  | `0100 dddd ssss iiii` | rd = rs + sext(imm4); sets Z V N |
| 0101   | `SRA rd, rs, imm`  | `0101 dddd ssss iiii` | arithmetic right shift by imm4 |
| 0110   | `SRL rd, rs, imm`  | `0110 dddd ssss iiii` | logical right shift by imm4 |
| 0111   | `SLL rd, rs, imm`  | `0111 dddd ssss iiii` | left shift by imm4 |
| 1000   | `LW rt, off`       | `1000 tttt oooo oooo` | rt = M[$14 + sext(off8)] |
| 1001   | `SW rt, off`       | `1001 tttt oooo oooo` | M[$14 + sext(off8)] = rt |
| 1010   | `LHB rt, imm`      | `1010 tttt uuuu uuuu` | rt[15:8] = imm8 |
| 1011   | `LLB rt, imm`      | `1011 tttt uuuu uuuu` | rt[7:0] = imm8 |
| 1100   | `B cond, off`      | `1100 xccc oooo oooo` | if cond: PC = PC+1 + sext(off8) |
| 1101   | `CALL target`      | `1101 gggg gggg gggg` | M[SP] = PC+1; SP −= 1; PC = {(PC+1)[15:12], g} |
| 1110   | `RET`              | `1110 xxxx xxxx xxxx` | SP += 1; PC = M[SP] |
| 1111   | (unassigned)       |                       | executes as a no-operation |

Register $14 is the data segment (DS) base for LW and SW. Register $15 is
the stack pointer (SP). The stack grows downwards, and SP always points at
the first free word. Shifts, loads, stores and control instructions leave
the flags alone. N is the sign bit of the 16-bit result.

Branch conditions (`ccc`):

| ccc | name | taken when        | ccc | name | taken when          |
|-----|------|-------------------|-----|------|---------------------|
| 000 | EQ   | Z                 | 100 | NE   | !Z                  |
| 001 | LT   | N & !V            | 101 | GEQ  | !(N & !V)           |
| 010 | GT   | !Z & !N & !V      | 110 | LEQ  | (N & !V) \| Z       |
| 011 | OV   | V                 | 111 | —    | always              |

LT is literally "N set and V clear". It is not the textbook N ⊕ V.
Programs that compare values far enough apart to overflow must take that
into account.

Reset is synchronous and active high, and one cycle is enough. It sets
PC = 0 and SP = FFFF. This design also clears the other registers, the flags,
the pipeline and the instruction-cache valid bits.

## The pipeline (`wisc_cpu`)

```
  IF ──► IF/ID ──► ID ──► ID/EX ──► EX ──► EX/MEM ──► MEM ──► MEM/WB ──► WB
  PC     IR        decode,          ALU,             data cache          register
  icache           read regs,       flags,           read/write          write,
                   interlock        branch/CALL                          RET target
```

| stage | work |
|-------|------|
| IF  | The PC addresses the instruction cache. On a hit the word enters IF/ID and the PC advances. On a miss a bubble goes down and the PC waits. |
| ID  | The `decoder` produces a control word (`wisc_pkg::ctrl_t`) and two registers are read. `hazard_unit` decides whether the instruction can leave. |
| EX  | The `alu` computes the result or the address: DS + offset for LW/SW, SP − 1 for CALL, SP + 1 for RET. `flag_unit` writes Z V N and evaluates branch conditions. Branches and CALL are resolved here. |
| MEM | The data cache is read (LW, RET) or written (SW, and CALL writing its return address at SP). |
| WB  | The register is written: the loaded word for LW, the ALU result otherwise. For CALL and RET the ALU result is the new SP. A RET loads the PC with the word it read. |

### Hazards: the hard part

There is no forwarding. Three rules keep the pipeline correct:

1. **Register read-after-write: stall in ID.** An instruction in ID waits
   while an older instruction in EX or MEM will write a register it reads.
   While it waits, bubbles enter EX. The register file is write-through, so
   a writer in WB is seen in the same cycle. A dependent instruction right
   behind its producer therefore loses two cycles, and one two places behind
   loses one. A load followed by a use costs the same two cycles.
   The registers each instruction "reads" include the implicit ones. LW and
   SW read $14, and SW also reads its data register. CALL and RET read $15.
   LHB and LLB read the register they partly overwrite.
2. **Flags need no interlock.** Flags are written at the end of EX, and a
   branch reads them in EX, so a branch always sees the flags of the
   instruction just ahead of it.
3. **Control transfers flush.** Fetch continues at PC+1 (predict not taken).
   A taken branch or a CALL is known in EX. The two younger instructions in
   IF and ID are discarded, which costs 2 cycles. Nothing has been written
   by then, because the flags, memory and registers are all written later in
   the pipe. RET learns its target only in WB, when the data cache returns
   it. While a RET is in ID, EX or MEM, fetch holds and sends bubbles. No
   instruction behind a RET can change state, and a RET costs 4 cycles. An
   assertion in `wisc_cpu` checks that a RET reaching WB is alone in the
   pipeline.

Cycle costs with an instruction cache that always hits (all checked by the
testbenches):

| situation | cycles |
|-----------|--------|
| independent instructions | 1 each (CPI 1) |
| use right after a producer or after LW | +2 |
| use two instructions after a producer | +1 |
| taken branch, CALL | +2 |
| untaken branch | 0 |
| RET | +4 |
| instruction-cache miss | +MEM_LATENCY + 5 |

## Memory system

| part | size | behaviour |
|------|------|-----------|
| `main_memory` | 64K × 16 bit | Read by the instruction cache one word pair at a time over a 32-bit bus. Each request is answered after `LATENCY` cycles (default 4), and one request may start every cycle. |
| `icache` | 64 words, 8 blocks × 8 words, direct mapped | The address splits into tag [15:6], index [5:3] and offset [2:0]. Lookup is combinational. A miss refills the whole block: four pair requests go out back to back, and the block becomes valid after the last one returns. The refill always completes. A fetch that misses in cycle t hits in cycle t + LATENCY + 5. The cache is never written by stores. |
| `data_cache` | 64K × 16 bit | Always hits. Writes take effect at the clock edge. Read data comes one cycle later, in WB. |

Instructions and data share one 16-bit word address space. The system's
load port (`load_we`, `load_addr`, `load_data` on `wisc_f07`) writes each word
of the initial image into both main memory and the data cache. Load the
image while reset is high. After that, stores change only the data cache,
so a program that overwrites its own code keeps executing the original code.

## Files

| file | content |
|------|---------|
| `rtl/wisc_pkg.sv` | opcodes, condition codes, ALU operations, flag struct, control word |
| `rtl/wisc_f07.sv` | top level: core + instruction cache + main memory + data cache |
| `rtl/wisc_cpu.sv` | the five-stage pipeline |
| `rtl/decoder.sv`, `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/flag_unit.sv`, `rtl/hazard_unit.sv` | core parts |
| `rtl/icache.sv`, `rtl/main_memory.sv`, `rtl/data_cache.sv` | memory system |
| `tb/wisc_tb_pkg.sv` | instruction encoders, an instruction-set reference model, a random program generator |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Parameters of `wisc_f07` and their defaults: `MEM_ADDR_W = 16` (64K-word
memories), `ICACHE_WORDS = 64`, `ICACHE_BLOCKS = 8` and `MEM_LATENCY = 4`.
The observation outputs (`dbg_*`, `ev_*`) show the fetch PC, the instruction
register, the ALU output, the flags, writeback, retirement and pipeline
events. They do not affect execution.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

- `wisc_f07_tb` runs the full system at its default sizes. It first runs a
  directed program with a loop, a store and load, a load-use stall, and
  nested calls into routines whose blocks collide in the cache. It then
  runs 20 random 400-instruction programs. Every program also runs on the
  reference model in `wisc_tb_pkg`, and these must match: the sequence of
  retired instruction addresses, all registers, the flags and all 64K data
  words. The testbench also checks the miss penalty and the cycles per loop
  iteration once the loop is cached. It counts stalls, flushes, RET
  redirects, fetch holds, cache misses, evicting refills, hits, loads,
  stores and flag writes, and fails if any of them never happened.
- `wisc_cpu_tb` runs the core against ideal memories. It checks the cycle
  costs in the table above exactly. It also runs random programs, half of
  them with random fetch misses.
- The unit testbenches compare each block with values computed
  independently in the testbench.

Programs end with `B true, -1` (`C7FF`), a branch to itself, which the
testbenches treat as "halt".

To simulate with Verilator 5, for example the full system:

```
verilator --binary --timing --assert -Wno-fatal --top-module wisc_f07_tb \
  -Irtl -y rtl -y tb rtl/wisc_pkg.sv tb/wisc_tb_pkg.sv tb/wisc_f07_tb.sv
obj_dir/Vwisc_f07_tb
```

For the other testbenches, replace the module and file name. Packages must
come first on the command line.

## Choices made where the specification leaves room

- **Stack direction.** CALL is specified as store-then-decrement. The
  sentence on RET also says "decremented". Because SP starts at FFFF and
  points at the first free word, RET here does the inverse of CALL: it
  increments SP, then reads. Stack accesses use SP directly, not DS.
- **Branch offset.** The branch offset is the 8-bit field [7:0]. Bit 11 is
  ignored.
- **Opcode 1111** is unassigned and executes as a no-operation.
- **Sizes and organisation** follow the specification. Main-memory latency
  is not specified, so `MEM_LATENCY` defaults to 4 cycles. The refill order,
  the combinational cache lookup and the one-cycle registered data-cache
  read are this design's choices.
- **Stage placement, hazard handling and the RET fetch hold** are this
  design's choices within a five-stage, no-forwarding pipeline.
- **The load port** is an addition, needed to give the memories their
  initial contents.

## Not covered

- The specification targets a gate-level schematic implementation. It
  costs the design with a table of primitive gates and measures a minimum
  clock period from component delays. Neither is part of this RTL; a
  synthesis tool's area and timing reports replace them.
- A configuration without the instruction cache (ideal single-cycle
  instruction memory) has no top of its own. `wisc_cpu` with an always-hit
  instruction port behaves that way, and `wisc_cpu_tb` uses it so.
- Optional extras the specification suggests are not built: forwarding, a
  small real data cache, exceptions and new instructions.

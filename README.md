# A 16-bit MIPS-subset processor with a five-stage pipeline

This is a small load/store processor in the MIPS style. It cuts MIPS down to
a 16-bit word, eight registers and a handful of instructions, and keeps the
classic five-stage pipeline. The pipeline resolves its own data dependences,
so programs need no NOP padding. Every instruction and data item is 16 bits
wide. The program counter is an 8-bit word address.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Each block has a
self-checking testbench. One end-to-end testbench runs the whole processor
at its default sizes.

## Instruction set

Every instruction is one 16-bit word. Bits [15:12] hold the opcode.

| format | [15:12] | [11:9] | [8:6] | [5:3] | [2:0] |
|--------|---------|--------|-------|-------|-------|
| R-type | op | rd | rs | rt | unused |
| I-type | op | rt | rs | imm[5:3] | imm[2:0] |

| opcode | mnemonic | effect |
|--------|----------|--------|
| 0001 | `ADD rd, rs, rt` | rd ← rs + rt |
| 0010 | `SUB rd, rs, rt` | rd ← rs − rt |
| 1001 | `ADDI rt, rs, imm` | rt ← rs + imm |
| 1010 | `LD rt, rs, imm` | rt ← mem[rs + imm] |
| 1011 | `ST rt, rs, imm` | mem[rs + imm] ← rt |
| 1100 | `BZ rt, rs, imm` | if rs = 0, branch to (address of BZ) + 1 + imm |
| 0000 and all others | NOP | nothing |

- `imm` is a 6-bit two's-complement value (−32..31). It is sign-extended to 16 bits.
- All arithmetic wraps modulo 2^16.
- R0 always reads 0. Writes to R0 are dropped.
- Memory is word-addressed. A data address is the low 8 bits of rs + imm.
- **BZ has one delay slot.** The instruction right after a BZ always
  executes, whether or not the branch is taken. The `rt` field of BZ is not used.

How sure each part of this is:

- The I-type opcodes and the operand order `OP rt, rs, IMM` are given by the specification this design follows.
- The R-type field layout, the ADD and SUB opcodes, the 6-bit immediate, the choice of rs as the BZ test register and the delay slot were all worked out from the encoded demonstration program below. They are the only reading under which that program gives its published results.
- SUB could in principle be another operation that gives 0 for equal operands, such as XOR.
- NOP = 0000 is this design's choice.

## The demonstration program

After reset, instruction memory holds this loop. The processor runs it forever:

```
0: 9201  ADDI R1, R0, 1
1: 9442  ADDI R2, R1, 2
2: 9683  ADDI R3, R2, 3
3: 1898  ADD  R4, R2, R3
4: b842  ST   R4, R1, 2      mem[3] <- 9
5: aa42  LD   R5, R1, 2      R5 <- mem[3]
6: 2d28  SUB  R6, R4, R5     R6 <- 0
7: c1b8  BZ   R0, R6, -8     taken: next fetch after the slot is 0
8: 9fc5  ADDI R7, R7, 5      delay slot, runs on every pass
```

The fetch order is 0..8, 0..8, and so on. After three passes the registers
R0..R7 hold 0, 1, 3, 6, 9, 9, 0, 15. On this pipeline each pass takes 11
clocks: nine instructions plus two one-cycle stalls. The end-to-end
testbench checks all three facts.

## Pipeline

```
  IF            ID                      EX             MEM            WB
  pc ─► imem ─► decode, reg read,   ─►  ALU        ─►  data mem   ─►  reg write
                BZ test + target        (bypass        (LD / ST)
                stall decision          muxes)
```

These pipeline registers are packed structs from `mips16_pkg`:
`if_id_t`, `id_ex_t`, `ex_mem_t` and `mem_wb_t`. Each one carries a `valid`
bit and the instruction's address. With no stalls the pipeline completes one
instruction per clock. The instruction memory and the data memory are read
asynchronously, so IF and MEM each take one clock.

### Dependences, the part that needs the most care

A result becomes available at one of three points. It can be read in three
places. The design handles each pairing as follows.

| producer → consumer | how it is handled |
|---------------------|-------------------|
| ALU result in MEM → operand in EX | bypass `FWD_EXMEM` |
| any result in WB → operand in EX | bypass `FWD_MEMWB` |
| any result in WB → register read in ID | register file writes through (a read of the register being written returns the new value) |
| LD in EX → any operand of the instruction in ID | **load-use stall**, 1 cycle; then `FWD_MEMWB` |
| ALU result in MEM → BZ test in ID | BZ bypass (`br_fwd`) |
| ALU result in EX → BZ test in ID | **branch stall**, 1 cycle; then the BZ bypass |
| LD in MEM → BZ test in ID | **branch stall**, 1 cycle; then write-through |
| LD in EX → BZ test in ID | **branch stall**, 2 cycles (the two rows above in turn) |

If the MEM and WB stages both write the register an EX operand needs, the
bypass picks the MEM-stage value, because it is the more recent write.

During a stall:

- the PC and `if_id` hold their values;
- a bubble (all-zero `id_ex`, `valid` = 0) enters EX;
- a BZ waiting in ID does not act until its operand is ready.

The decoder turns every write to R0 into "no write". As a result, neither
the bypass logic nor the stall logic can ever match R0.

The demonstration program exercises every row of the table except a load
feeding a branch: ADDI R3 → ADD is a MEM-stage bypass, LD R5 → SUB is a
load-use stall, and SUB R6 → BZ is a branch stall.

### Branches

BZ is resolved in ID. When it is decoded, the next instruction is already
being fetched: that instruction is the delay slot. Nothing is ever flushed.
If the branch is taken, the PC loads the target `pc(BZ) + 1 + imm`. A BZ in
the delay slot of another BZ behaves like the standard MIPS case: the first
target executes, followed by the second target.

## Blocks

| file | role |
|------|------|
| `rtl/mips16_pkg.sv` | widths, opcode and bypass enums, decode and pipeline structs, the demonstration program |
| `rtl/program_counter.sv` | 8-bit PC. Priority: reset to 0, then hold on stall, then load the branch target, then +1 |
| `rtl/instr_mem.sv` | `DEPTH` × 16 instruction ROM, asynchronous read. Preloaded with the demonstration program; `INIT_FILE` can replace it via `$readmemh` |
| `rtl/reg_file.sv` | 8 × 16 registers, two read ports, one write port, R0 = 0, write-through, cleared by reset |
| `rtl/control_unit.sv` | instruction decoder → `decode_t` |
| `rtl/alu.sv` | 16-bit add and subtract |
| `rtl/data_mem.sv` | `DEPTH` × 16 data RAM. Synchronous write, asynchronous read, starts at zero |
| `rtl/forward_unit.sv` | bypass selection for EX operands and for the BZ test |
| `rtl/hazard_unit.sv` | load-use and branch-operand stall detection |
| `rtl/mips16_top.sv` | the pipeline: wires the blocks together and holds the stage registers |

### Top-level interface (`mips16_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high. Clears the PC, the pipeline valid bits and the registers |
| `pc`, `instr` | out | 8, 16 | address and word being fetched |
| `wb_we`, `wb_addr`, `wb_data` | out | 1, 3, 16 | register-file write port |
| `retire_valid`, `retire_pc` | out | 1, 8 | an instruction (not a bubble) leaves WB this cycle |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 8, 16 | data-memory write port (a store in MEM) |

| parameter | default | |
|-----------|---------|--|
| `IMEM_DEPTH` | 256 | the full reach of the 8-bit PC |
| `DMEM_DEPTH` | 256 | this design's choice |
| `IMEM_FILE` | `""` | optional hex image for the instruction memory |

The processor has no port for loading programs. A program is set through
`IMEM_FILE`, or written into `u_imem.mem` from a testbench.

## Where this design makes its own choices

The specification gives these points:

- the 16-bit data width, the eight registers, the five stages and the 8-bit PC;
- the I-type opcodes;
- the demonstration program and its results.

This design chose the following on its own:

- **Hazard handling**: the bypass network, the two stall rules and register-file write-through. The specification requires that dependent instructions run back to back and give correct results, but it does not say how.
- **The delay-slot branch resolved in ID.** This is inferred from the fetch order 7, 8, 0.
- **Memory sizes and timing**: 256-word memories with asynchronous read; data memory and registers start at zero.
- **Reset**: synchronous and active high.
- **Decoding**: NOP = 0000, and unlisted opcodes execute as NOP.
- **Debug outputs**: the register-write, retire and store observation ports.
- **The ALU** provides only add and subtract, the operations the instruction encodings reveal. A larger R-type set (AND, OR, shifts and the like) may have been intended, but its encodings are unknown, so it is not built.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/mips16_pkg.sv tb/tb_mips16_top.sv \
          --top-module tb_mips16_top -o sim && obj_dir/sim
```

To run a block testbench, substitute its name, e.g. `tb_alu`, `tb_hazard_unit`.
Run from the repository root: `tb_instr_mem` reads `tb/imem_test.hex` by a
relative path.

`tb_mips16_top` runs the processor at its default sizes and takes about a
second. It has two parts:

1. **The demonstration program.** It prints the fetch trace in the form
   `Program Counter: n ,Instruction: hhhh` and checks:
   - the fetch order;
   - the register values after three passes;
   - the 11-clock pass time.
2. **Random programs.** Thirty random 256-word programs run against an
   instruction-level reference model inside the testbench. For every retired
   instruction it compares:
   - the instruction's address;
   - its register write;
   - each store's address and data.

   At the end of each program it compares the full register file and data memory.

The testbench also counts how often each mechanism occurs: both EX bypasses,
the BZ bypass, write-through, both kinds of stall, taken and untaken
branches, loads and stores. A mechanism that never occurs counts as a failure.

The block testbenches compare each unit with an independent reference:

- the ALU against a 17-bit computation;
- the decoder against a decoder written from the format table;
- the bypass and stall units against their rules;
- the register file and data memory against shadow arrays;
- the PC against a reference counter.

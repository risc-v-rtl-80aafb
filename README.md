# RV32I single-cycle core with triple modular redundancy on its storage

A single bit that flips in a register or a memory cell (a cosmic-ray hit, electrical noise, a
marginal cell) can silently change what a processor computes. This core protects the four places
where an RV32I processor keeps state: the **program counter**, the **register file**, the
**instruction memory** and the **data memory**. Each is built three times, all three copies see the
same writes, and every read goes through a bitwise **2-of-3 majority voter**
(`y = a&b | a&c | b&c`). As long as at most one copy of any given bit is wrong, the voter's output is
right and the rest of the core never sees the error.

Everything else, the decoder, the ALU and the adders, is ordinary single-cycle RV32I logic: every
instruction is fetched, executed and retired in one clock cycle.

The design follows a seminar report on applying TMR to an RV32I core for FPGA data-analysis
systems. The report measured the timing, power and temperature cost of the voters on a Virtex-7
board. This RTL reproduces the architecture, not those measurements.

## What the voters do and do not do

This is the part that needs the most care. TMR here **masks** errors; it only **repairs** them where
the datapath happens to rewrite the storage anyway.

| Component | Copies | Voted where | What happens to a flipped bit in one copy |
|---|---|---|---|
| Program counter (`pc_tmr`) | 3 x 32 flip-flops | on the PC output | Masked, and **repaired at the next clock edge**: the next PC is computed from the voted PC and written into all three copies. The disagreement is visible for exactly one cycle. |
| Register file (`regfile_tmr`) | 3 x 32 x 32 bits | on both read ports | Masked on every read. The bad copy stays bad until the program writes that register again. |
| Instruction memory (`imem_tmr`) | 3 x 16384 x 32 bits | on the fetched word | Masked on every fetch. The bad word stays bad until it is reloaded through the load port. |
| Data memory (`dmem_tmr`) | 3 x 256 x 8 bits | on the load result | Masked on every load. The bad byte stays bad until a store overwrites it. |

Consequences:

* Two upsets in the **same bit of the same word** in two different copies defeat the vote: the wrong
  value wins. Upsets in different bits, or in different words, are masked however many there are,
  because the vote is taken bit by bit. Since nothing scrubs the memories, such errors can pile up
  over a long run. The unit testbenches check this limit on purpose.
* The voters, the ALU, the decoder and the wiring are **not** replicated. A fault in the
  combinational logic or in a voter is not covered. The protected set is the storage only.
* Each TMR wrapper also reports a `mismatch` flag: some bit differs between its copies. The core
  brings the four flags out as `mismatch[3:0]` = {dmem, imem, rf, pc}. They show that an error was
  masked. Nothing in the core acts on them.

Register-file voting is done at the two read ports, not register by register. A read returns the
same value either way, and this needs two 32-bit voters instead of thirty-two.

## Datapath

```
 +--------+  pc   +----------+ instr +--------------+ ctrl_t
 | PC  x3 |------>| IMEM  x3 |------>| control_unit |------------------------------+
 | +voter |       |  +voter  |   |   +--------------+                              |
 +--------+       +----------+   |   +---------+  imm                            |
     ^  |                        +-->| imm_gen |-------+------------------+      |
     |  |                        |   +---------+       |                  |      |
     |  |                        |   +---------+ rs1   v                  |      |
     |  |                        +-->|  RF x3  |----->[ALU]--result--+    |      |
     |  |                            |  +voters|-rs2->[mux]          |    |      |
     |  |                            +---------+  |    | flags       v    |      |
     |  |                                 ^       |    v        +----------+     |
     |  |                                 |       +------------>| DMEM x3  |     |
     |  |                       rd_select-+                     |  +voter  |     |
     |  |                       (ALU / load / imm / PC+4 / PC+imm)----------+     |
     |  +--> PC+4, PC+imm --> branch_control / jump / hold muxes <---------------+
     +------------------------------------ next PC --+
```

* **Fetch.** The voted PC addresses the instruction memory with its low 16 bits (bits [1:0] are
  ignored). The read is combinational.
* **Decode.** `control_unit` decodes bits [6:2] of the instruction into the control word `ctrl_t`.
  `imm_gen` rebuilds the I/S/B/U/J immediate. The register file reads rs1 = [19:15] and rs2 = [24:20]
  combinationally, through the voters.
* **Execute.** `alu_control` turns the 3-bit ALUop, funct3 and instruction bit 30 into an ALU
  operation. `alu` computes the result and the flags Z, C, N and V. The shifter is a sub-block of the
  ALU, and the shift amount is the low five bits of the second operand. `branch_control` evaluates
  BEQ/BNE/BLT/BGE/BLTU/BGEU from the flags of rs1 - rs2.
* **Memory.** The low 8 bits of the ALU result address the byte-organised, little-endian data
  memory. The memory does the sizing itself: LB/LH/LW/LBU/LHU and SB/SH/SW, selected by funct3.
  Loads are combinational. Stores happen at the clock edge.
* **Write-back.** `rd_select` chooses the value by opcode: the U-immediate for LUI, PC+4 for
  JAL/JALR, PC+immediate for AUIPC, and otherwise the ALU result or the loaded value. It is written
  to all three register-file copies at the clock edge. Writes to x0 are dropped.
* **Next PC.** PC+4 or the branch target, then the JAL target (PC+imm) or the JALR target
  ((rs1+imm) with bit 0 cleared), then a final mux that keeps the current PC while a SYSTEM
  instruction (ECALL/EBREAK) executes. So ECALL **halts** the core: it stays on that instruction
  until reset, and `halted` is high.

### Control table

| opcode | RegWrite | MemRead | MemToReg | MemWrite | Branch | ALUSrc | ALUop | jump | terminate |
|---|---|---|---|---|---|---|---|---|---|
| BRANCH | 0 | 1 | 0 | 0 | 1 | 0 | 001 (sub) | 00 | 0 |
| LOAD | 1 | 1 | 1 | 0 | 0 | 1 | 000 (add) | 00 | 0 |
| STORE | 0 | 0 | 1 | 1 | 0 | 1 | 000 | 00 | 0 |
| JALR | 1 | 0 | 0 | 0 | 0 | 1 | 000 | 10 | 0 |
| JAL | 1 | 0 | 0 | 0 | 0 | 1 | 000 | 01 | 0 |
| OP-IMM | 1 | 0 | 0 | 0 | 0 | 1 | 111 (I-type) | 00 | 0 |
| OP | 1 | 0 | 0 | 0 | 0 | 0 | 010 (R-type) | 00 | 0 |
| AUIPC | 1 | 0 | 0 | 0 | 0 | 0 | 000 | 00 | 0 |
| LUI | 1 | 0 | 0 | 0 | 0 | 1 | 100 (pass imm) | 00 | 0 |
| SYSTEM | 0 | 0 | 0 | 0 | 0 | 0 | 110 | 00 | 1 |
| other (FENCE, ...) | all 0: no operation | | | | | | | | |

The table follows the source report. Its values that do not matter (MemRead on branches, MemToReg
on stores) are kept.

## Top level: `rv32i_tmr_core`

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_ADDR_W` | 16 | byte-address bits of the instruction memory (16384 words per copy) |
| `DMEM_ADDR_W` | 8 | byte-address bits of the data memory (256 bytes per copy) |
| `TMR_PC`, `TMR_RF`, `TMR_IMEM`, `TMR_DMEM` | 1 | 1: three copies and a voter. 0: one plain copy. |

Clearing the `TMR_*` parameters gives the variants that the source report compares against: no
voters at all, or a voter on one component only. The default, all four, is the design itself.

| Port | Dir | Width | Use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock. Synchronous active-high reset: clears the PC and all registers, and blocks stores. |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 14, 32 | instruction-memory load port (word address), written to all copies. Use it while `rst` is high. |
| `seu` | in | `seu_req_t` | upset injection: `{en, target (PC/RF/IMEM/DMEM), copy (0..2), addr, bit_idx}`. It flips one bit of one copy at the next clock edge. |
| `halted` | out | 1 | a SYSTEM instruction is executing and the PC is being held |
| `pc`, `instr` | out | 32 | voted PC and voted instruction of the current cycle |
| `mismatch` | out | 4 | {dmem, imem, rf, pc}: the copies disagree somewhere in what is being read |
| `wb_en`, `wb_rd`, `wb_data` | out | 1, 5, 32 | register write performed at the end of this cycle (x0 excluded) |
| `st_en`, `st_addr`, `st_funct3`, `st_data` | out | 1, 8, 3, 32 | store performed at the end of this cycle |

**Timing.** The whole core is one combinational path per cycle: PC, instruction memory, register
read, ALU, data memory, write-back mux, then the register and PC inputs. All state changes on the
rising edge. CPI is exactly 1. A program of N instructions up to its ECALL reaches `halted` in
cycle N after reset is released.

**Using it.** Hold `rst` high and write the program words through `prog_*`. Then release `rst`: the
core starts at address 0. Memory contents are not reset, so a program should not load data it has
not stored. Upsets are injected with `seu`. When an upset and a write hit the same word in the same
cycle, the write wins.

Memory reads are asynchronous because the core is single-cycle. On an FPGA the three memories
therefore map to distributed (LUT) RAM, not block RAM. The all-voters configuration holds
1,582,080 memory bits.

## Files

`rtl/` holds one module per file, plus `rv_pkg.sv` with the shared types: opcodes, ALUop and ALU
operation enums, the control-word struct and the upset-request struct.

| Module | Role |
|---|---|
| `rv32i_tmr_core` | top: the datapath above |
| `pc_tmr`, `imem_tmr`, `regfile_tmr`, `dmem_tmr` | the triplicated components with their voters |
| `program_counter`, `instr_mem`, `reg_file`, `data_mem` | one copy of each component |
| `tmr_voter` | bitwise majority voter with a mismatch flag |
| `control_unit`, `alu_control`, `imm_gen`, `alu`, `shifter`, `branch_control`, `adder`, `word_mux`, `rd_select` | single-cycle datapath and control |

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/rv32i_test_pkg.sv` provides instruction
encoders, a 53-word test program and an independent instruction-set reference model.

* `tb_rv32i_tmr_core` runs the core at its default size. It loads the program, which covers every
  instruction class, all six branch conditions taken and not taken, a loop, a call and return, every
  load and store size, and ECALL. Every cycle it compares PC, instruction, write-back and store with
  the reference model. Meanwhile it injects upsets into one copy each of the instruction memory
  (twice), the data memory, the register file (twice) and the PC. It requires the trace to stay
  exact, the halt to come at cycle 76, and every mechanism to occur: masking at each of the four
  voters, PC self-repair, branches, jumps, loads, stores and the halt.
* `tb_tmr_configs` builds the six configurations: no voters, each single voter, and all voters. It
  runs the program four times on each, with one upset in a different component each time. An upset
  in a protected component must leave the trace exact. One in an unprotected component must change
  it. Only the all-voters configuration masks all four.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rv_pkg.sv tb/rv32i_test_pkg.sv tb/tb_rv32i_tmr_core.sv --top-module tb_rv32i_tmr_core
./obj_dir/Vtb_rv32i_tmr_core +verilator+rand+reset+2
```

Replace the testbench name to run another. Every testbench, the full-size one included, finishes in
a few seconds.

## Where this RTL departs from, or fills in, the source

The source report gives the architecture, the voter, the choice of protected components and the
control table. It also names the datapath blocks and shows how they are wired. What follows was
decided here:

* **The shift amount** is the low 5 bits of the second ALU operand, as RV32I requires. The source
  wires the instruction's shamt field to the ALU, which gives wrong results for register shifts
  (SLL/SRL/SRA).
* **The JALR target** has bit 0 cleared, as RV32I requires. The source uses the raw sum.
* **The register-file voters** sit on the read ports instead of on each register, with the same
  result.
* **These parts are new:** the program load port, the upset-injection port, the mismatch flags, the
  retire-trace outputs and the per-component `TMR_*` switches.
* **These choices are open in the source:** reset style and values, the decoding of unknown opcodes
  (no-op), misaligned data accesses (allowed, consecutive bytes, with wrap-around) and the encoding
  of the ALU operations.
* **The block diagram the source borrows** is a MIPS-style single-cycle datapath (RegDst mux,
  16-to-32-bit sign extension, shift-left-2 before the branch adder). This core uses the RV32I
  equivalents: no RegDst, a full immediate generator, and no shift because RV32I offsets already
  count bytes.
* **Not reproduced:** the source's FPGA timing, power and junction-temperature figures. They are
  properties of a vendor implementation flow, not of the RTL.

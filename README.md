# An 8-bit five-stage pipelined RISC processor

This is a small 8-bit processor. It is built to show how a five-stage pipeline (fetch, decode,
execute, memory, write-back) lets one instruction finish every clock cycle. It uses a Harvard
organisation: instructions and data sit in separate memories, so a fetch and a load or store
never compete for a port. The datapath has 32 registers of 8 bits, an ALU, a unit for
miscellaneous operations and a 4-bit flag register. A program control unit holds the PC and a
two-entry return-address stack.

The sizes and the list of units come from a published description of the processor: the
memory sizes, the 24-bit instruction, the 32 registers, the flag width, the misc operations and
the three PC registers. That description gives no instruction encoding and no hazard
handling, so both are this design's own, and so are a few other details. The section
"What is taken from the source and what is not" lists them all.

## The machine at a glance

| Item | Size | Notes |
|---|---|---|
| Data word | 8 bits | |
| Instruction | 24 bits, fixed format | |
| Instruction memory | 256 x 24 bits | addressed by the 8-bit PC; has a load port |
| Data memory | 16K x 8 bits | 14-bit address, synchronous read and write |
| Registers | 32 x 8 bits | 2 read ports, 1 write port, write-through |
| Flags | 4 bits `{V,N,C,Z}` | written in EX |
| PC unit | PC, PCR, PCS, 8 bits each | PCR/PCS hold return addresses |
| Pipeline | IF, ID, EX, MEM, WB | one instruction per cycle when there are no hazards |

## Instruction set

The opcode is bits `[23:19]`. There are five formats:

| Format | Fields | Instructions |
|---|---|---|
| R | `op rd[18:14] rs1[13:9] rs2[8:4] 0000` | `ADD SUB AND OR XOR` (rd = rs1 op rs2), `CMP` (flags only) |
| I | `op rd rs1 0 imm8[7:0]` | `ADDI SUBI ANDI ORI XORI` (rd = rs1 op imm), `CMPI` |
| U | `op rd rs1 ...` | `INC DEC NEG MOV` (rd = f(rs1)), `PUSHF` (rd = {0000, flags}) |
| U | `op rd ... imm8` | `MOVI` (rd = imm), `SETF` (flags = imm[3:0]) |
| M | `op rd addr14[13:0]` | `LD rd,[addr]`, `ST rd,[addr]` |
| J | `op 0... target[7:0]` | `JMP JZ JNZ JC JNC JN CALL`, then `RET`, `NOP` and `HLT` |

The opcode values are the `opcode_t` enum in `rtl/risc8_pkg.sv`. The same package has the
functions `ins_r`, `ins_i`, `ins_m` and `ins_j`, which build instruction words. Opcode `0x1E`
is reserved and runs as `NOP`.

The flags work like this:

* Z: the result is zero.
* N: bit 7 of the result.
* C: the carry out of an addition, or the borrow of a subtraction. After `CMP a,b`, C = 1
  means a < b unsigned.
* V: signed overflow.

`ADD SUB CMP` and their immediate forms set all four flags. So do `INC DEC NEG`. The logic
operations set Z and N and clear C and V. `MOV`, `MOVI`, `PUSHF`, the loads, the stores and the
jumps leave the flags alone.

Data addresses are direct: a 14-bit field reaches all of the 16K data memory. A register is
only 8 bits wide, so there is no register-indirect addressing.

## The pipeline

```
 IF   PC -> instruction memory (combinational read) ----------------> IRX (IF/ID)
 ID   decoder, control signal generator, register file read --------> ID/EX
 EX   forwarding muxes -> ALU | misc ops; flag register write;
      jump condition, target, CALL/RET ----------------------------> EX/MEM
 MEM  data memory read or write ------------------------------------> MEM/WB
 WB   register write: the ALU/misc result or the loaded byte
```

Every instruction carries a control word (`ctrl_t`) down the pipeline. The control signal
generator makes it in ID. The ID/EX, EX/MEM and MEM/WB registers are one generic module,
`pipe_reg`, with a struct type parameter. Each stage struct has a `valid` bit, so an all-zero
value is a bubble. The IF/ID register is `irx`, the instruction register.

### Timing without hazards

Instruction *k* of a straight-line program is fetched in cycle *k* and writes back in cycle
*k+4*. So seven instructions take 11 cycles. The register file is written in WB and read in
ID in the same cycle, with write-through. This means a value written back is visible to an
instruction decoded in the same cycle.

### Data hazards: forwarding and the load-use stall

Operands are read in ID, but they may still be in flight. The hazard unit checks the two
source registers of the instruction in EX against the destinations of older instructions:

* **EX/MEM forwarding.** The instruction now in MEM writes the register and is not a load.
  Its ALU or misc result goes straight to EX.
* **MEM/WB forwarding.** The instruction now in WB writes the register. The write-back value
  goes to EX. For a load this is the byte just read from data memory.
* When both older instructions write the register, the younger one (in MEM) wins.

A load has its data only at the end of MEM. If the instruction right after a load uses the
loaded register, the hazard unit raises `stall` for one cycle:

* The PC and IRX hold.
* A bubble goes into ID/EX.
* The next cycle, the loaded byte reaches EX through MEM/WB forwarding.

A store reads its data register through the second read port. That register can be forwarded
or stall like any other source.

### Control hazards: jumps resolved in EX

Jumps, `CALL` and `RET` are decided in EX:

* A conditional jump tests the flag register. The flag register is written at the end of EX,
  so a jump sees the flags of the instruction just before it, with no extra delay.
* A taken jump loads the PC from the target. `RET` takes its target from PCR.
* A taken jump flushes IRX and ID/EX, so it costs two cycles. Nothing is predicted.
* The flushed instructions have not reached EX yet, so they have not changed the flags, the
  registers, memory or the return stack.

For a program that halts, the total time is:

```
cycle in which HLT writes back = instructions executed (HLT included)
                               + 2 x taken jumps + load-use stalls + 4
```

### Halting

`HLT` flushes the younger instructions when it reaches EX, the same way a taken jump does. It
also stops the PC and fetch. The older instructions still finish. The `halted` output rises
once they have all left WB. Only reset starts the processor again.

### Structural hazards

There are none. Instruction and data memory are separate. The register file has its own ports
for ID and WB.

## Program control unit: PC, PCR, PCS

* PC is the fetch address. It counts up by one, holds during a stall or after a halt, or loads
  a jump target. A jump target wins over a hold.
* PCR and PCS are a two-entry return stack.
  * `CALL` pushes: PCS gets PCR, and PCR gets the address after the `CALL`.
  * `RET` pops: it jumps to PCR, then moves PCS back into PCR and clears PCS.
* Two levels of call nest correctly. A third nested `CALL` loses the oldest return address.
* A `RET` with nothing on the stack jumps to address 0.

## Memories and loading a program

The instruction memory starts as all zero words, which are `NOP`. It is read-only while the
processor runs. To load a program:

1. Hold `rst` high.
2. Write each word through `prog_we`, `prog_addr` and `prog_data`, one per clock.
3. Release `rst`. The PC starts at 0.

The data memory is not cleared by reset. A load from a byte that was never stored returns
whatever the memory held.

Reset is synchronous and active high. It clears the PC, PCR, PCS, the flags, all 32 registers
and every pipeline register.

## Top-level ports (`risc8_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 8, 24 | instruction memory load port |
| `pc_out` | out | 8 | current fetch address |
| `instruction_out` | out | 24 | word in IRX (the instruction in ID) |
| `alu_result_out` | out | 8 | result being computed in EX |
| `jump_taken_out` | out | 1 | a taken jump/CALL/RET is in EX this cycle |
| `flags_out` | out | 4 | flag register `{V,N,C,Z}` |
| `retire` | out | 1 | an instruction is in WB this cycle |
| `halted` | out | 1 | `HLT` executed and the pipeline has drained |

The processor has no data-memory port of its own. Testbenches look at registers and memory
through the hierarchy: `u_rf.regs`, `u_dmem.mem`.

## Files

| File | Contents |
|---|---|
| `rtl/risc8_pkg.sv` | sizes, opcode/op enums, `dec_t`, `ctrl_t`, stage structs, instruction builders |
| `rtl/risc8_top.sv` | the processor: the five stages wired together |
| `rtl/pcu.sv` | PC and the PCR/PCS return stack |
| `rtl/imem.sv` | 256 x 24 instruction memory with load port |
| `rtl/irx.sv` | IF/ID instruction register with stall and flush |
| `rtl/decoder.sv` | splits the instruction into fields |
| `rtl/ctrl_gen.sv` | opcode to control word |
| `rtl/regfile.sv` | 32 x 8 register file |
| `rtl/alu.sv` | ADD SUB AND OR XOR, pass-through, flags |
| `rtl/misc_ops.sv` | INC DEC NEG MOV SETF PUSHF |
| `rtl/flag_reg.sv` | 4-bit flag register |
| `rtl/dmem.sv` | 16K x 8 data memory |
| `rtl/hazard_unit.sv` | forwarding selects, load-use stall, flush |
| `rtl/pipe_reg.sv` | generic pipeline register |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Simulating

Each testbench checks itself. It ends by printing `TB_RESULT checks=N failures=M` and fails if
it runs past a watchdog limit. With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/risc8_pkg.sv tb/tb_risc8_top.sv --top-module tb_risc8_top
./obj_dir/Vtb_risc8_top
```

Replace `tb_risc8_top` with any other testbench name to run that one.

`tb_risc8_top` runs the processor at its full size. It has its own instruction-level model of
the machine, which runs each program one instruction at a time with no pipeline. For every
program the testbench compares with that model: all 32 registers, the flags, PCR and PCS, all
16K bytes of data memory, and the cycle count from the formula above. The programs are:

* 300 cycles from an instruction memory that holds only `NOP` words. `pc_out` must step by
  one and wrap at 256. `instruction_out` and `alu_result_out` must stay zero.
* Seven independent instructions. Each must write back in cycle k+4.
* A counting loop with a store and load at the last data address, plus forwarding cases. The
  results are also worked out by hand.
* Nested `CALL`/`RET`, with `SETF`, `PUSHF`, `NEG`, `CMPI` and conditional jumps.
* 150 random programs with forward jumps.

The testbench counts each mechanism: both forwarding paths, the stall, taken jumps, CALL, RET,
flag writes, loads, stores and halts. It fails if any of them never happened.

The other testbenches test one module each, against reference values worked out in the
testbench. These are random or exhaustive stimulus, plus corner cases (overflow at
0x7F/0x80, borrow, wrap-around, write-through).

## What is taken from the source and what is not

These follow the published description:

* an 8-bit processor, Harvard organisation;
* a 256 x 24 instruction memory and a 16K x 8 data memory;
* 32 registers of 8 bits and a 4-bit flag register;
* an ALU with addition, subtraction, AND, OR, XOR and compare;
* a misc unit named INC, DEC, NEG, MOV, SETF, PUSHF;
* a PC unit with 8-bit PC, PCR and PCS;
* an instruction register, a decoder and a control signal generator;
* the five stages IF, ID, EX, MEM and WB with pipeline registers between them;
* one instruction per cycle once the pipeline is full;
* the observation signal names `pc_out`, `instruction_out`, `alu_result_out` and
  `jump_taken_out`.

These are this design's own choices:

* **Instruction encoding and opcode table.** `MOVI`, `NOP`, `HLT` and the jump set were added
  so programs can load constants, branch and end.
* **Meaning of the misc operations.**
  * `PUSHF` copies the flags into a register. No stack was described, so none was built.
  * `SETF` loads the flags from an immediate.
* **PCR and PCS as a two-entry return stack.** Only their names and widths were given.
* **The data-memory address port is 14 bits.** The source labels this bus as 24 bits wide but
  also gives a 16K depth. 14 bits are what 16K needs.
* **Hazard handling.** The source names data, control and structural hazards without saying
  how they are resolved. Forwarding, the one-cycle load-use stall, resolving jumps in EX with
  a two-cycle flush, and write-through in the register file are all choices made here.
* **Memory timing and loading.** The instruction memory reads combinationally. The data
  memory reads synchronously. The program is loaded through a write port.
* **Reset, flag rules and bit order.** Reset is synchronous. Flag bit order, carry-as-borrow
  and which instructions set which flags are choices made here.

The source also gives an FPGA power estimate for its own implementation. It has nothing to
check against this RTL and is not reproduced.

## Changing the design

* The sizes are `localparam`s in `risc8_pkg`. The modules themselves have parameters (`DEPTH`,
  `W`, `NREGS`, `AW`) whose defaults are the sizes above.
* Changing the instruction width or the register count means changing the field positions in
  `decoder.sv` and the builder functions in `risc8_pkg.sv`.
* New instructions need three changes:
  * an `opcode_t` value;
  * a row in `ctrl_gen`;
  * if they read registers, `use_rs1`/`use_rs2` set correctly. The hazard unit relies on those
    two bits to forward and stall.
* The reference model in `tb_risc8_top` must learn each new instruction too.

# A 16-bit single-cycle teaching processor

This is a complete processor small enough to follow wire by wire. It
implements a toy 16-bit instruction set of nine instructions, used to teach
how an instruction set maps onto a datapath and a control unit. Each
instruction takes exactly one clock cycle. Within one cycle the processor
fetches the instruction, decodes it, reads two registers, computes in the
ALU, accesses data memory and picks the next PC. At the clock edge it
commits the register write, the memory store and the new PC together.

The RTL follows the classic single-cycle datapath of this instruction set:
a register file, an ALU, a sign extender, separate instruction and data
memories, three multiplexers steered by one "Mem" control bit, and a
next-PC path with a shift-left-by-one and a branch adder. The lecture
version of the datapath leaves out the insides of the control unit, the
jump and halt. This design supplies all three, listed under "Departures and
additions" below.

## Machine state

| State | Size | Notes |
|---|---|---|
| PC | 16 bits | byte address of the current instruction; reset to 0 |
| R0..R15 | 16 x 16 bits | R0 always reads 0x0000 and R1 always reads 0x0001; writes to them are dropped |
| Instruction memory | 64 KiB, byte-addressed | separate from data; one 16-bit instruction per aligned byte pair |
| Data memory | 64 KiB, byte-addressed | every access moves one 16-bit word, little-endian |

Little-endian means the byte at the even address is the word's low byte.
Storing 0x0002 at address 4 puts 0x02 in byte 4 and 0x00 in byte 5.

## Instruction set

Every instruction is one word in one of three formats. Bits [15:12] are
always the opcode.

```
 15   12 11    8 7     4 3     0
+-------+-------+-------+-------+
|opcode |  Rs   |  Rt   |  Rd   |   ADD SUB AND OR
|opcode |  Rs   |  Rt   | offset|   LW SW BEQ   (offset: signed, -8..7)
|opcode |        offset         |   JMP         (offset: unsigned, 0..4095)
+-------+-------+-------+-------+
```

| Assembly | Opcode | Effect |
|---|---|---|
| `LW Rt, off(Rs)` | 0000 | R[t] <- M[R[s] + off] |
| `SW Rt, off(Rs)` | 0001 | M[R[s] + off] <- R[t] |
| `ADD Rs, Rt, Rd` | 0010 | R[d] <- R[s] + R[t] |
| `SUB Rs, Rt, Rd` | 0011 | R[d] <- R[s] - R[t] |
| `AND Rs, Rt, Rd` | 0100 | R[d] <- R[s] & R[t] |
| `OR Rs, Rt, Rd` | 0101 | R[d] <- R[s] \| R[t] |
| `BEQ Rs, Rt, off` | 0111 | if R[s] == R[t] then PC <- PC + 2 + off*2 |
| `JMP off` | 1000 | PC <- off*2 |
| `HALT` | 1111 | stop |

Every other instruction sets PC <- PC + 2. The assembly operand order puts
the destination last for arithmetic, so `SUB R9, R1, R9` computes
R9 <- R9 - R1. Some encodings as a check:

* `ADD R3, R6, R8` is 0010 0011 0110 1000.
* `SW R6, -8(R3)` is 0001 0011 0110 1000.
* `BEQ R1, R2, -2` is 0111 0001 0010 1110.

## The single-cycle datapath

```
PC ──► instr_mem ──► instr ─┬─ [15:12] ─► control_unit ──► ctrl (alu_op, reg_write, mem_store, mem, branch, jump, halt)
 ▲                          ├─ Rs ─► reg_file.ra1 ─► rd1 ──────────────► ALU.a
 │                          ├─ Rt ─► reg_file.ra2 ─► rd2 ─┬─[0]┐
 │                          │                             │    mux(mem) ─► ALU.b
 │                          ├─ [3:0] ─► sign_extend ─► imm ┼─[1]┘
 │                          │                              │     ALU ─► result ─┬─► data_mem.addr ─► rdata ─[1]┐
 │                          │                              └─────────────────────┼─► data_mem.wdata            mux(mem) ─► reg_file.wd
 │                          │                                                    └───────────────────────[0]──┘
 │                          └─ write address: mux(mem) of Rd [0] / Rt [1]
 └── next_pc: PC+2, PC+2+(imm<<1) if branch & zero, {off,0} if jump
```

The key to the datapath is the **Mem** control bit. Arithmetic and memory
instructions share the register file and the ALU. They differ in three
places, and one bit switches all three:

| Mux | Mem = 0 (ADD/SUB/AND/OR, BEQ) | Mem = 1 (LW/SW) |
|---|---|---|
| register write address | Rd | Rt |
| ALU operand B | Read Data 2 | sign-extended offset |
| write-back value | ALU result | data-memory read data |

The ALU therefore computes the effective address R[s] + offset for LW and
SW. Read Data 2 goes straight to the memory's write-data input, so SW stores
R[t].

BEQ reuses the ALU as a comparator. The control unit selects subtraction,
and the ALU's `zero` flag ANDed with the Branch bit picks the branch
target. The branch target is PC + 2 plus the sign-extended offset shifted
left by one, because offsets count instructions (2-byte words), not bytes.

The ALU opcode is deliberately not the instruction opcode. The control unit
translates the opcode into a 2-bit ALU operation: ADD for ADD, LW and SW;
SUB for SUB and BEQ; AND; and OR.

### Control word

| Opcode | alu_op | reg_write | mem_store | mem | branch | jump | halt |
|---|---|---|---|---|---|---|---|
| LW | ADD | 1 | 0 | 1 | 0 | 0 | 0 |
| SW | ADD | 0 | 1 | 1 | 0 | 0 | 0 |
| ADD/SUB/AND/OR | op | 1 | 0 | 0 | 0 | 0 | 0 |
| BEQ | SUB | 0 | 0 | 0 | 1 | 0 | 0 |
| JMP | - | 0 | 0 | 0 | 0 | 1 | 0 |
| HALT | - | 0 | 0 | 0 | 0 | 0 | 1 |
| unused (0110, 1001-1110) | - | 0 | 0 | 0 | 0 | 0 | 0 |

### Timing

All reads are combinational: the instruction memory, both register read
ports and the data-memory read port. All state changes happen at the rising
clock edge: the register write, the memory store and the PC load. Every
instruction, HALT included, completes in exactly one cycle. A register
written by one instruction is visible to the next with no hazard, because
nothing is in flight. The clock period has to cover the longest path,
which is LW: fetch, register read, ALU add, memory read, then the
write-back mux into the register file setup.

## Branches, jumps and halt

`next_pc` forms three candidates: PC + 2, the BEQ target and the JMP target
{3'b000, offset[11:0], 1'b0}. The first mux picks the BEQ target when
`branch & zero`. The second mux, after it, picks the JMP target when `jump`
is set. A JMP can reach only the first 8 KiB of instruction memory, because
its 12-bit offset is unsigned and scaled by 2.

HALT would simply stop the clock in the lecture version. Here it freezes
the PC and sets a sticky `halted` output, which only reset clears. The
processor keeps presenting the HALT instruction, which writes nothing, so
the machine state stays exactly as the program left it.

## Ports of `simple_cpu`

| Port | Dir | Width | Function |
|---|---|---|---|
| clk | in | 1 | clock, one instruction per rising edge |
| rst_n | in | 1 | asynchronous active-low reset: PC <- 0, R2..R15 <- 0, halted <- 0; data-memory stores are blocked while it is low |
| im_we, im_addr, im_wdata | in | 1, 16, 16 | write one instruction word at a byte address |
| dm_we, dm_addr, dm_wdata | in | 1, 16, 8 | write one data-memory byte |
| dm_rdata | out | 8 | data-memory byte at dm_addr (combinational) |
| dbg_reg / dbg_data | in / out | 4 / 16 | read any register (combinational) |
| pc, instr | out | 16, 16 | current PC and instruction |
| overflow | out | 1 | ALU signed overflow for the current ADD/SUB |
| branch_taken | out | 1 | the current instruction is a taken BEQ |
| halted | out | 1 | HALT has executed |

The usual way to run a program is as follows.

1. Hold `rst_n` low.
2. Write the program with `im_we` and the initial data bytes with `dm_we`.
3. Release reset.
4. Wait for `halted`.
5. Read the results through `dbg_reg` and `dm_addr`.

Neither memory is reset. Anything the program reads must be written first.
The load ports also work while the processor runs: a write lands at the
clock edge, after the current instruction has been fetched.

Parameters `IM_ADDR_W` and `DM_ADDR_W` (default 16) set the byte-address
width of each memory. The word width is fixed at 16 in `cpu_pkg`.

## Departures and additions

These follow the instruction set and the lecture datapath:

* the instruction formats, opcodes and semantics;
* R0 and R1 hard-wired to 0 and 1;
* the register file ports and bus widths (4-bit addresses, 16-bit data);
* the 4-to-16-bit sign extender and the three Mem-steered muxes with their 0/1 input assignment;
* the +2 adder, the shift-left-by-one, the branch adder and the Branch mux;
* the ALU flags `zero` and `overflow`;
* little-endian byte order and the list of control signals.

These are this design's own choices, where the lecture material is silent
or stops short:

* the control unit's ALU-operation encoding;
* the JMP path (a second mux after the branch mux);
* HALT as a PC freeze with a sticky flag;
* unused opcodes executing as no-operations;
* 64 KiB for each memory, derived from the 16-bit address;
* address bit 0 ignored on word accesses, so odd addresses act as the aligned pair;
* the ALU overflow rule (signed two's-complement), with the flag only brought out;
* the asynchronous active-low reset, which clears R2..R15;
* the program-load, data-memory host and register read-out ports, plus the `instr` and `branch_taken` outputs.

## Files

| File | Contents |
|---|---|
| `rtl/cpu_pkg.sv` | widths, opcode and ALU-op enums, control-word and instruction-field structs |
| `rtl/simple_cpu.sv` | top level: the datapath wiring, plus two assertions (PC stays even; no instruction writes both a register and memory) |
| `rtl/pc_reg.sv` | PC register and halt |
| `rtl/next_pc.sv` | PC+2, branch and jump targets, branch decision |
| `rtl/instr_mem.sv` | instruction memory with load port |
| `rtl/control_unit.sv` | opcode decoder |
| `rtl/reg_file.sv` | 16 x 16 register file |
| `rtl/sign_extend.sv` | 4-to-16-bit sign extension |
| `rtl/alu.sv` | ADD/SUB/AND/OR with zero and overflow |
| `rtl/data_mem.sv` | little-endian data memory with host byte port |
| `rtl/mux2.sv` | two-input mux |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks the outputs against values it works out on its own.
Each ends by printing `TB_RESULT checks=N failures=M`.

`tb_simple_cpu` runs the whole processor at its default size. It contains
an instruction-level model of the machine. Every cycle it compares the
PC and all sixteen registers with that model, which also checks the
one-instruction-per-cycle timing. It runs the following programs:

* **Program 1** (ADD, SW, HALT) leaves R2 = 2 and the bytes 02 00 at address 4.
* **Program 2** (two loads, AND, store) turns the bytes EB CA / BD 56 into R5 = 0x42A9, stored at address 4.
* **Program 3** is a countdown loop with BEQ and JMP, starting from R9 = 2 and R10 = 3. It takes 11 cycles and halts at 0x000A with R8 = R9 = R10 = 0.
* **Program 4** executes the three encoding examples above bit for bit.
* **Program 5** is an ADD/SUB overflow case.
* **Programs 6 onwards** are random programs over the full 64 KiB instruction memory. Each runs until HALT or for at most 20,000 cycles.

The testbench counts every mechanism and fails if any of them never
happened:

* each instruction type;
* taken and untaken branches, jumps and halt;
* dropped writes to R0/R1;
* negative offsets;
* signed overflow;
* unused opcodes.

It also cross-checks the `branch_taken` and `overflow` outputs against the
model.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu_pkg.sv tb/tb_simple_cpu.sv \
          --top-module tb_simple_cpu -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own name in place of
`tb_simple_cpu`. The full-size processor test takes about a second.

// cpu_pkg: types and constants shared by the blocks of the 16-bit
// single-cycle processor.
//
// The instruction set has one 16-bit instruction format with four 4-bit
// fields: opcode [15:12], Rs [11:8], Rt [7:4], Rd/offset [3:0]. JMP uses
// [11:0] as an unsigned 12-bit word offset. Opcode values follow the
// instruction set table. The ALU operation code is a separate, smaller
// encoding produced by the control unit (the ALU operation is deliberately
// not the instruction opcode); its values are this design's own choice.
package cpu_pkg;

  localparam int unsigned WORD_W = 16;  // word, register and ALU width
  localparam int unsigned REG_AW = 4;   // 16 registers R0..R15
  localparam int unsigned NUM_REGS = 16;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  // Instruction opcodes, bits [15:12].
  typedef enum logic [3:0] {
    OP_LW   = 4'b0000,
    OP_SW   = 4'b0001,
    OP_ADD  = 4'b0010,
    OP_SUB  = 4'b0011,
    OP_AND  = 4'b0100,
    OP_OR   = 4'b0101,
    OP_BEQ  = 4'b0111,
    OP_JMP  = 4'b1000,
    OP_HALT = 4'b1111
  } opcode_e;

  // ALU operation selected by the control unit.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_OR  = 2'b11
  } alu_op_e;

  // Control word driven by the control unit for the current instruction.
  typedef struct packed {
    alu_op_e alu_op;     // ALU Op
    logic    reg_write;  // Reg Write: write the register file
    logic    mem_store;  // Mem Store: write the data memory
    logic    mem;        // Mem: memory-format instruction (LW/SW) mux select
    logic    branch;     // Branch: BEQ
    logic    jump;       // JMP
    logic    halt;       // HALT
  } ctrl_t;

  // Decoded instruction fields.
  typedef struct packed {
    logic [3:0] opcode;
    reg_addr_t  rs;
    reg_addr_t  rt;
    logic [3:0] rd;  // destination register or 4-bit signed offset
  } instr_t;

endpackage

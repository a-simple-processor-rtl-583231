// control_unit: decodes the 4-bit opcode into the datapath control word.
//
// Signals (cpu_pkg::ctrl_t):
//   alu_op    ADD for ADD/LW/SW, SUB for SUB/BEQ, AND, OR
//   reg_write ADD, SUB, AND, OR, LW
//   mem_store SW
//   mem       LW, SW: selects Rt as write address, the sign-extended offset
//             as ALU operand B, and the memory read data for write-back
//   branch    BEQ
//   jump      JMP
//   halt      HALT
// The signal list and which instructions set Reg Write, Mem Store, Mem and
// Branch follow the document; jump and halt are added here because the
// datapath drawing leaves JMP and HALT out. Unused opcodes (0110, 1001-1110)
// decode to an all-zero control word and behave as no-operations, which is
// this design's own choice. Purely combinational.
module control_unit
  import cpu_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    case (opcode)
      OP_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; end
      OP_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.reg_write = 1'b1; end
      OP_AND: begin ctrl.alu_op = ALU_AND; ctrl.reg_write = 1'b1; end
      OP_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.reg_write = 1'b1; end
      OP_LW: begin
        ctrl.alu_op    = ALU_ADD;
        ctrl.mem       = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_op    = ALU_ADD;
        ctrl.mem       = 1'b1;
        ctrl.mem_store = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.branch = 1'b1;
      end
      OP_JMP:  ctrl.jump = 1'b1;
      OP_HALT: ctrl.halt = 1'b1;
      default: ;
    endcase
  end

endmodule

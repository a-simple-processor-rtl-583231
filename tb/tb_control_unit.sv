// tb_control_unit: applies all sixteen opcodes and compares the control
// word with a table written out in the testbench from the instruction set:
// which instructions write a register, store to memory, use the memory
// format, branch, jump or halt, and which ALU operation each needs.
module tb_control_unit;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] opcode;
  ctrl_t      ctrl;

  control_unit dut (.opcode, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      // expected: {alu_op, reg_write, mem_store, mem, branch, jump, halt}
      logic [7:0] e;
      case (v)
        4'b0000: e = {2'b00, 6'b101000};  // LW
        4'b0001: e = {2'b00, 6'b011000};  // SW
        4'b0010: e = {2'b00, 6'b100000};  // ADD
        4'b0011: e = {2'b01, 6'b100000};  // SUB
        4'b0100: e = {2'b10, 6'b100000};  // AND
        4'b0101: e = {2'b11, 6'b100000};  // OR
        4'b0111: e = {2'b01, 6'b000100};  // BEQ
        4'b1000: e = {2'b00, 6'b000010};  // JMP
        4'b1111: e = {2'b00, 6'b000001};  // HALT
        default: e = {2'b00, 6'b000000};  // unused: no operation
      endcase
      opcode = 4'(v);
      #1;
      checks++;
      if (ctrl.alu_op !== alu_op_e'(e[7:6]) ||
          {ctrl.reg_write, ctrl.mem_store, ctrl.mem, ctrl.branch, ctrl.jump, ctrl.halt} !== e[5:0]) begin
        failures++;
        $display("FAIL opcode=%b ctrl=%b expected %b", opcode, ctrl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu: self-checking test of the ALU. Directed corner cases plus random
// operands for all four operations. Expected results are computed with
// 32-bit integer arithmetic; overflow is checked by testing whether the
// exact signed sum or difference fits in 16 bits.
module tb_alu;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e     op;
  logic [15:0] a, b, y;
  logic        zero, ovf;

  alu dut (.op, .a, .b, .result(y), .zero, .overflow(ovf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input alu_op_e o, input logic [15:0] x, input logic [15:0] z);
    int signed sx, sz, exact;
    logic [15:0] ey;
    logic eovf;
    op = o; a = x; b = z;
    #1;
    sx = $signed(x); sz = $signed(z);
    eovf = 1'b0;
    case (o)
      ALU_ADD: begin exact = sx + sz; ey = 16'(exact); eovf = (exact > 32767 || exact < -32768); end
      ALU_SUB: begin exact = sx - sz; ey = 16'(exact); eovf = (exact > 32767 || exact < -32768); end
      ALU_AND: ey = x & z;
      default: ey = x | z;
    endcase
    checks++;
    if (y !== ey || zero !== (ey == 16'h0) || ovf !== eovf) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h z=%b o=%b expected y=%h o=%b", o, x, z, y, zero, ovf, ey, eovf);
    end
  endtask

  initial begin
    check(ALU_ADD, 16'h0001, 16'h0001);
    check(ALU_ADD, 16'h7fff, 16'h0001);   // positive overflow
    check(ALU_ADD, 16'h8000, 16'hffff);   // negative overflow
    check(ALU_ADD, 16'hffff, 16'h0001);   // wraps to zero, no signed overflow
    check(ALU_SUB, 16'h0005, 16'h0005);   // zero
    check(ALU_SUB, 16'h8000, 16'h0001);   // overflow
    check(ALU_SUB, 16'h0000, 16'h8000);   // overflow
    check(ALU_SUB, 16'h0001, 16'h0002);   // -1
    check(ALU_AND, 16'hcaeb, 16'h56bd);
    check(ALU_OR,  16'hcaeb, 16'h56bd);
    check(ALU_AND, 16'hf0f0, 16'h0f0f);   // zero
    for (int i = 0; i < 2000; i++)
      check(alu_op_e'(2'($urandom)), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_next_pc: checks the next-PC selection against the instruction-set
// definitions: PC+2 by default, PC + 2 + offset*2 for a taken BEQ (Branch
// and zero both set), offset*2 for JMP with an unsigned 12-bit offset.
// Directed cases include the negative-offset example BEQ R1, R2, -2.
module tb_next_pc;
  int checks = 0, failures = 0;
  logic [15:0] pc, offset_ext, pc_next;
  logic [11:0] jmp_offset;
  logic        branch, zero, jump, branch_taken;

  next_pc dut (.pc, .offset_ext, .jmp_offset, .branch, .zero, .jump, .branch_taken, .pc_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] p, input logic [3:0] off4, input logic [11:0] j,
                       input logic b, input logic z, input logic jp);
    int e;
    int signed off;
    off = (off4 >= 8) ? int'(off4) - 16 : int'(off4);
    pc = p; offset_ext = 16'(off); jmp_offset = j; branch = b; zero = z; jump = jp;
    if (jp)          e = int'(j) * 2;
    else if (b && z) e = int'(p) + 2 + off * 2;
    else             e = int'(p) + 2;
    #1;
    checks++;
    if (pc_next !== 16'(e) || branch_taken !== (b && z)) begin
      failures++;
      $display("FAIL pc=%h off=%0d j=%h b=%b z=%b jp=%b next=%h expected %h", p, off, j, b, z, jp, pc_next, 16'(e));
    end
  endtask

  initial begin
    check(16'h0000, 4'h0, 12'h000, 0, 0, 0);       // 0 -> 2
    check(16'h0002, 4'd3, 12'h000, 1, 1, 0);       // BEQ +3 taken: 2+2+6 = 10
    check(16'h0002, 4'd3, 12'h000, 1, 0, 0);       // BEQ not taken
    check(16'h0002, 4'd3, 12'h000, 0, 1, 0);       // zero without Branch
    check(16'h0010, 4'he, 12'h000, 1, 1, 0);       // BEQ -2: 0x10+2-4 = 0x0e
    check(16'h0008, 4'h0, 12'h001, 0, 0, 1);       // JMP 1 -> 2
    check(16'h0008, 4'h0, 12'hfff, 0, 0, 1);       // JMP 4095 -> 0x1ffe (unsigned)
    check(16'hfffe, 4'h0, 12'h000, 0, 0, 0);       // wraps to 0
    for (int i = 0; i < 2000; i++)
      check({15'($urandom), 1'b0}, 4'($urandom), 12'($urandom),
            1'($urandom), 1'($urandom), (($urandom % 4) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

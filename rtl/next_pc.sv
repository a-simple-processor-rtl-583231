// next_pc: next-PC logic of the single-cycle processor.
//
//   pc_plus2   = pc + 2                       (default fetch increment)
//   br_target  = pc_plus2 + (offset_ext << 1) (BEQ: PC + 2 + offset*2)
//   jmp_target = {3'b0, jmp_offset, 1'b0}     (JMP: offset*2, offset unsigned)
//
// The branch is taken when the control unit flags a BEQ and the ALU, which
// subtracts the two registers, reports zero. A two-input mux picks the
// branch target over PC+2, and a second one picks the jump target for JMP.
// The +2 adder, the shift-left-by-one, the branch adder and the branch mux
// follow the datapath drawing; the jump path is this design's own, since the
// drawing leaves JMP out. Purely combinational.
module next_pc
  import cpu_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] pc,
  input  logic [W-1:0] offset_ext,
  input  logic [11:0]  jmp_offset,
  input  logic         branch,
  input  logic         zero,
  input  logic         jump,
  output logic         branch_taken,
  output logic [W-1:0] pc_next
);

  logic [W-1:0] pc_plus2, br_target, jmp_target, seq_or_br;

  always_comb begin
    pc_plus2     = pc + W'(2);
    br_target    = pc_plus2 + (offset_ext << 1);
    jmp_target   = W'({jmp_offset, 1'b0});
    branch_taken = branch & zero;
  end

  mux2 #(.W(W)) u_branch_mux (
    .sel(branch_taken), .in0(pc_plus2),  .in1(br_target),  .out(seq_or_br)
  );

  mux2 #(.W(W)) u_jump_mux (
    .sel(jump),         .in0(seq_or_br), .in1(jmp_target), .out(pc_next)
  );

endmodule

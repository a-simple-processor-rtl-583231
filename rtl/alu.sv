// alu: 16-bit arithmetic logic unit.
//
// Computes a + b, a - b, a & b or a | b as selected by op (cpu_pkg::alu_op_e).
// Besides the result it reports two flags: zero (result is all zeros), which
// the processor uses for the BEQ decision, and overflow (two's-complement
// signed overflow of ADD or SUB; always 0 for AND and OR). The flag outputs
// follow the datapath drawing; the overflow rule is the usual signed one,
// chosen here because the instruction set does not say how overflow is
// detected. Purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         overflow
);

  always_comb begin
    overflow = 1'b0;
    unique case (op)
      ALU_ADD: begin
        result   = a + b;
        overflow = (a[W-1] == b[W-1]) && (result[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        result   = a - b;
        overflow = (a[W-1] != b[W-1]) && (result[W-1] != a[W-1]);
      end
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule

// pc_reg: the Program Counter register.
//
// Holds the byte address of the instruction being executed. At each rising
// clock edge it loads pc_next (PC+2, a branch target or a jump target). The
// asynchronous active-low reset sets it to 0, where the first instruction
// lives.
//
// HALT: when the current instruction is HALT (halt = 1), the PC is not
// updated and the sticky halted flag is set. From then on the PC stays
// frozen until reset, so the processor keeps presenting HALT, which changes
// no state; this stands in for stopping the clock. Holding the PC is this design's
// reading of "stops program execution".
module pc_reg
  import cpu_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] pc_next,
  input  logic         halt,
  output logic [W-1:0] pc,
  output logic         halted
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (halt || halted) begin
      halted <= 1'b1;
    end else begin
      pc <= pc_next;
    end
  end

endmodule

// mux2: two-input multiplexer of the datapath.
//
// The processor uses four of these: the register write-address select (Rd
// or Rt), the ALU second-operand select (Read Data 2 or the sign-extended
// offset), the write-back select (ALU result or data memory read data) and
// the next-PC select. sel = 0 passes in0, sel = 1 passes in1, as the 0/1
// labels on the datapath drawing show. Purely combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule

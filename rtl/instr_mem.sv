// instr_mem: instruction memory, separate from the data memory.
//
// Byte-addressed like the data memory; each instruction is one 16-bit word
// occupying a byte pair, low-order byte at the even address. The processor
// reads the instruction at the PC combinationally (PC bit 0 is ignored).
// Storage is 2**(ADDR_W-1) words.
//
// The program is loaded through a word-wide write port (ld_we, ld_addr as a
// byte address, ld_data) at the rising clock edge, normally while the
// processor is held in reset. The document does not say how programs get
// into instruction memory; this port is this design's choice. The memory is
// not reset.
module instr_mem
  import cpu_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned W      = WORD_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] pc,
  output logic [W-1:0]      instr,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [W-1:0]      ld_data
);

  localparam int unsigned NWORDS = 2 ** (ADDR_W - 1);

  logic [W-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[ADDR_W-1:1]] <= ld_data;
  end

  always_comb instr = mem[pc[ADDR_W-1:1]];

endmodule

// reg_file: register file of sixteen 16-bit registers R0..R15.
//
// Two combinational read ports (Read Addr 1/2 -> Read Data 1/2) and one
// write port (Write Addr, Write Data, Write Enable) that is written on the
// rising clock edge, so in the single-cycle processor an instruction reads
// its operands during the cycle and its result is stored at the end of it.
// R0 always reads 0x0000 and R1 always reads 0x0001; writes to them are
// ignored. Only R2..R15 are storage.
//
// A third read port (dbg_addr/dbg_data) lets a host or testbench inspect the
// registers; it is this design's addition. R2..R15 are cleared by the
// asynchronous active-low reset, also this design's choice.
module reg_file
  import cpu_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned AW    = REG_AW,
  parameter int unsigned NREGS = NUM_REGS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic [AW-1:0] dbg_addr,
  output logic [W-1:0]  dbg_data
);

  logic [W-1:0] regs [2:NREGS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 2; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa > AW'(1)) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [W-1:0] read_reg(input logic [AW-1:0] a);
    if (a == AW'(0))      return W'(0);
    else if (a == AW'(1)) return W'(1);
    else                  return regs[a];
  endfunction

  always_comb begin
    rd1      = read_reg(ra1);
    rd2      = read_reg(ra2);
    dbg_data = read_reg(dbg_addr);
  end

endmodule

// data_mem: data memory of the processor.
//
// The address space is byte-addressed but every processor access moves a
// whole 16-bit word (a byte pair). Words are stored little-endian: the byte
// at the even address is bits [7:0] of the word, the byte at the following
// odd address is bits [15:8]. Storage is an array of 2**(ADDR_W-1) words;
// address bit 0 of a processor access is ignored, so a word access always
// uses an aligned byte pair (the handling of odd addresses is this design's
// choice).
//
// Processor port: addr/rdata read combinationally; wdata is written at the
// rising clock edge when we (Mem Store) is set.
// Host port: one byte at a time, h_addr selects word and byte lane; h_rdata
// reads combinationally, h_wdata is written at the rising edge when h_we is
// set. It exists to load and inspect memory from outside and is this
// design's addition. A host write in the same cycle as a processor write to
// the same word wins for its byte lane. The memory is not reset.
module data_mem
  import cpu_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned W      = WORD_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      wdata,
  input  logic              we,
  output logic [W-1:0]      rdata,
  input  logic              h_we,
  input  logic [ADDR_W-1:0] h_addr,
  input  logic [7:0]        h_wdata,
  output logic [7:0]        h_rdata
);

  localparam int unsigned NWORDS = 2 ** (ADDR_W - 1);

  logic [W-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[ADDR_W-1:1]] <= wdata;
    if (h_we) begin
      if (h_addr[0]) mem[h_addr[ADDR_W-1:1]][15:8] <= h_wdata;
      else           mem[h_addr[ADDR_W-1:1]][7:0]  <= h_wdata;
    end
  end

  logic [W-1:0] h_word;

  always_comb begin
    rdata   = mem[addr[ADDR_W-1:1]];
    h_word  = mem[h_addr[ADDR_W-1:1]];
    h_rdata = h_addr[0] ? h_word[15:8] : h_word[7:0];
  end

endmodule

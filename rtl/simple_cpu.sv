// simple_cpu: single-cycle processor for a small 16-bit instruction set.
//
// Every instruction completes in one clock cycle. During the cycle the
// instruction at PC is read from instruction memory, its opcode drives the
// control unit, Rs and Rt are read from the register file, the ALU combines
// Read Data 1 with either Read Data 2 or the sign-extended 4-bit offset, the
// data memory is addressed by the ALU result, and the next PC is formed. At
// the rising edge the register file (Reg Write), the data memory (Mem Store)
// and the PC are updated together.
//
// The Mem control bit steers three muxes at once: write address Rt instead
// of Rd, ALU operand B from the sign extender instead of Read Data 2, and
// write-back from memory read data instead of the ALU result. BEQ subtracts
// its two registers and branches to PC + 2 + offset*2 when the ALU's zero
// flag is set; JMP goes to offset*2 with a 12-bit unsigned offset; HALT
// freezes the PC and raises halted.
//
// The datapath follows the document's drawing. The JMP and HALT paths, the
// program-load port, the byte-wide data-memory host port, the register
// debug port, the reset style and the instr/overflow/branch_taken observation outputs are
// this design's own.
//
// Ports:
//   clk, rst_n             clock, asynchronous active-low reset (PC = 0)
//   im_we/im_addr/im_wdata write one instruction word (byte address)
//   dm_we/dm_addr/dm_wdata write one data-memory byte (host side)
//   dm_rdata               data-memory byte at dm_addr (combinational)
//   dbg_reg/dbg_data       register read-out (combinational)
//   pc, instr              current PC and instruction
//   overflow               ALU signed-overflow flag of the current instruction
//   branch_taken           the current instruction is a BEQ that is taken
//   halted                 set once HALT has executed, cleared by reset
module simple_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IM_ADDR_W = 16,
  parameter int unsigned DM_ADDR_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 im_we,
  input  logic [IM_ADDR_W-1:0] im_addr,
  input  logic [WORD_W-1:0]    im_wdata,
  input  logic                 dm_we,
  input  logic [DM_ADDR_W-1:0] dm_addr,
  input  logic [7:0]           dm_wdata,
  output logic [7:0]           dm_rdata,
  input  logic [REG_AW-1:0]    dbg_reg,
  output logic [WORD_W-1:0]    dbg_data,
  output logic [WORD_W-1:0]    pc,
  output logic [WORD_W-1:0]    instr,
  output logic                 overflow,
  output logic                 branch_taken,
  output logic                 halted
);

  instr_t      ins;
  ctrl_t       ctrl;
  reg_addr_t   wr_addr;
  word_t       rd1, rd2, imm, alu_b, alu_y, mem_rdata, wb_data;
  word_t       pc_next;
  logic        zero, dm_store;

  // Instruction fetch
  pc_reg u_pc (
    .clk, .rst_n, .pc_next, .halt(ctrl.halt), .pc, .halted
  );

  instr_mem #(.ADDR_W(IM_ADDR_W)) u_imem (
    .clk,
    .pc(pc[IM_ADDR_W-1:0]),
    .instr,
    .ld_we(im_we), .ld_addr(im_addr), .ld_data(im_wdata)
  );

  always_comb ins = instr_t'(instr);

  // Decode
  control_unit u_ctrl (.opcode(ins.opcode), .ctrl);

  mux2 #(.W(REG_AW)) u_wa_mux (
    .sel(ctrl.mem), .in0(ins.rd), .in1(ins.rt), .out(wr_addr)
  );

  reg_file u_rf (
    .clk, .rst_n,
    .ra1(ins.rs), .ra2(ins.rt), .rd1, .rd2,
    .we(ctrl.reg_write), .wa(wr_addr), .wd(wb_data),
    .dbg_addr(dbg_reg), .dbg_data
  );

  sign_extend #(.IN_W(4), .OUT_W(WORD_W)) u_sext (.in(ins.rd), .out(imm));

  // Execute
  mux2 #(.W(WORD_W)) u_alub_mux (
    .sel(ctrl.mem), .in0(rd2), .in1(imm), .out(alu_b)
  );

  alu u_alu (
    .op(ctrl.alu_op), .a(rd1), .b(alu_b), .result(alu_y), .zero, .overflow
  );

  // Memory. Stores are blocked while reset is held, so that memories can be
  // loaded under reset whatever instruction sits at address 0.
  always_comb dm_store = ctrl.mem_store && rst_n;

  data_mem #(.ADDR_W(DM_ADDR_W)) u_dmem (
    .clk,
    .addr(alu_y[DM_ADDR_W-1:0]), .wdata(rd2), .we(dm_store),
    .rdata(mem_rdata),
    .h_we(dm_we), .h_addr(dm_addr), .h_wdata(dm_wdata), .h_rdata(dm_rdata)
  );

  // Write-back
  mux2 #(.W(WORD_W)) u_wb_mux (
    .sel(ctrl.mem), .in0(alu_y), .in1(mem_rdata), .out(wb_data)
  );

  // Next PC
  next_pc u_npc (
    .pc, .offset_ext(imm), .jmp_offset(instr[11:0]),
    .branch(ctrl.branch), .zero, .jump(ctrl.jump),
    .branch_taken, .pc_next
  );

  // The PC only ever holds even (word-aligned) addresses.
  a_pc_aligned: assert property (@(posedge clk) disable iff (!rst_n) pc[0] == 1'b0);
  // An instruction never writes both the register file and the data memory.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(ctrl.reg_write && ctrl.mem_store));

endmodule

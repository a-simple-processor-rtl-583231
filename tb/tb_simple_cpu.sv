// tb_simple_cpu: end-to-end test of the single-cycle processor at its
// default size (64 KiB instruction memory, 64 KiB data memory).
//
// The testbench holds its own instruction-level model of the machine
// (PC, R0..R15, byte-addressed little-endian data memory, instruction
// memory) written from the instruction-set definitions. Every cycle it
// compares the processor's PC and all sixteen registers with the model,
// then steps the model by one instruction: one instruction per clock is
// the processor's defining timing, so any stall or extra cycle shows up as
// a mismatch. At the end of each program the touched data memory is
// compared too, and for the fixed programs the final state is also
// compared with values worked out by hand.
//
// Programs:
//   1. Exercise 0: ADD R1,R1,R2; SW R2,4(R0); HALT
//   2. Exercise 1: two loads, AND, store
//   3. Exercise 2: a BEQ/JMP countdown loop, started with R9 = 2, R10 = 3.
//      A setup program loads R9 and R10 from memory and spins on a
//      self-branch while the exercise is written to address 0, then the
//      spin is replaced with a jump to 0.
//   4. The three encoding examples (ADD R3,R6,R8 / SW R6,-8(R3) /
//      BEQ R1,R2,-2), checked bit for bit and then executed.
//   5. Random programs over the whole instruction memory.
// Each mechanism of the design is counted (each instruction type, taken
// and untaken branches, jumps, halt, ignored writes to R0/R1, negative
// offsets, ALU overflow, unused opcodes); one that never happens counts as
// a failure.
module tb_simple_cpu;
  import cpu_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        im_we = 0, dm_we = 0;
  logic [15:0] im_addr = 0, im_wdata = 0, dm_addr = 0;
  logic [7:0]  dm_wdata = 0, dm_rdata;
  logic [3:0]  dbg_reg = 0;
  logic [15:0] dbg_data, pc, instr;
  logic        overflow, branch_taken, halted;

  simple_cpu dut (
    .clk, .rst_n, .im_we, .im_addr, .im_wdata, .dm_we, .dm_addr, .dm_wdata, .dm_rdata,
    .dbg_reg, .dbg_data, .pc, .instr, .overflow, .branch_taken, .halted
  );

  always #50 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- encoder
  function automatic logic [15:0] enc_r(input logic [3:0] op, input int s, input int t, input int d);
    return {op, 4'(s), 4'(t), 4'(d)};
  endfunction
  function automatic logic [15:0] enc_j(input int off);
    return {4'b1000, 12'(off)};
  endfunction
  localparam logic [15:0] HALT = 16'hf000;

  // ------------------------------------------------------------------ model
  logic [15:0] m_pc;
  logic [15:0] m_r [16];
  logic [7:0]  m_dm [65536];
  logic [15:0] m_im [32768];
  bit          m_touched [65536];
  logic        m_halted;

  // mechanism counters
  int n_lw, n_sw, n_add, n_sub, n_and, n_or, n_beq_taken, n_beq_not, n_jmp, n_halt;
  int n_nop, n_hardwired_write, n_neg_offset, n_overflow, n_dut_branch, n_dut_overflow;

  function automatic int sx4(input logic [3:0] v);
    return (v >= 8) ? int'(v) - 16 : int'(v);
  endfunction

  task automatic model_step();
    logic [15:0] ins, a, b, addr, res;
    logic [3:0]  op, s, t, d;
    int          off, exact;
    if (m_halted) return;
    ins = m_im[m_pc[15:1]];
    {op, s, t, d} = ins;
    a = m_r[s]; b = m_r[t]; off = sx4(d);
    case (op)
      4'b0010, 4'b0011, 4'b0100, 4'b0101: begin
        case (op)
          4'b0010: begin res = a + b; n_add++; exact = int'($signed(a)) + int'($signed(b)); end
          4'b0011: begin res = a - b; n_sub++; exact = int'($signed(a)) - int'($signed(b)); end
          4'b0100: begin res = a & b; n_and++; exact = 0; end
          default: begin res = a | b; n_or++;  exact = 0; end
        endcase
        if (exact > 32767 || exact < -32768) n_overflow++;
        if (d > 1) m_r[d] = res; else n_hardwired_write++;
        m_pc = m_pc + 2;
      end
      4'b0000: begin
        addr = a + 16'(off);
        addr[0] = 1'b0;
        if (t > 1) m_r[t] = {m_dm[addr + 1], m_dm[addr]}; else n_hardwired_write++;
        if (off < 0) n_neg_offset++;
        n_lw++;
        m_pc = m_pc + 2;
      end
      4'b0001: begin
        addr = a + 16'(off);
        addr[0] = 1'b0;
        m_dm[addr] = b[7:0]; m_dm[addr + 1] = b[15:8];
        m_touched[addr] = 1; m_touched[addr + 1] = 1;
        if (off < 0) n_neg_offset++;
        n_sw++;
        m_pc = m_pc + 2;
      end
      4'b0111: begin
        if (a == b) begin m_pc = m_pc + 2 + 16'(off * 2); n_beq_taken++; end
        else begin m_pc = m_pc + 2; n_beq_not++; end
        if (off < 0) n_neg_offset++;
      end
      4'b1000: begin m_pc = {3'b000, ins[11:0], 1'b0}; n_jmp++; end
      4'b1111: begin m_halted = 1; n_halt++; end
      default: begin m_pc = m_pc + 2; n_nop++; end
    endcase
  endtask

  // ------------------------------------------------------------ host access
  task automatic host_im(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); im_we = 1; im_addr = a; im_wdata = d;
    @(negedge clk); im_we = 0;
    m_im[a[15:1]] = d;
  endtask

  task automatic host_dm(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); dm_we = 1; dm_addr = a; dm_wdata = d;
    @(negedge clk); dm_we = 0;
    m_dm[a] = d;
  endtask

  // load instruction memory from the model copy, one word per clock
  task automatic load_all_im();
    for (int w = 0; w < 32768; w++) begin
      @(negedge clk); im_we = 1; im_addr = 16'(w * 2); im_wdata = m_im[w];
    end
    @(negedge clk); im_we = 0;
  endtask

  task automatic load_all_dm();
    for (int b = 0; b < 65536; b++) begin
      @(negedge clk); dm_we = 1; dm_addr = 16'(b); dm_wdata = m_dm[b];
    end
    @(negedge clk); dm_we = 0;
  endtask

  task automatic reset_both();
    rst_n = 0;
    m_pc = 0; m_halted = 0;
    foreach (m_r[i]) m_r[i] = 16'h0;
    m_r[1] = 16'h0001;
    foreach (m_touched[i]) m_touched[i] = 0;
  endtask

  // ------------------------------------------------------------- comparison
  task automatic compare_state(input string tag);
    checks++;
    if (pc !== m_pc || halted !== m_halted) begin
      failures++;
      $display("FAIL %s: pc=%h halted=%b, model pc=%h halted=%b", tag, pc, halted, m_pc, m_halted);
    end
    for (int r = 0; r < 16; r++) begin
      dbg_reg = 4'(r); #1;
      checks++;
      if (dbg_data !== m_r[r]) begin
        failures++;
        $display("FAIL %s: pc=%h R%0d=%h, model %h", tag, pc, r, dbg_data, m_r[r]);
      end
    end
  endtask

  task automatic compare_touched_dm(input string tag);
    for (int b = 0; b < 65536; b++) if (m_touched[b]) begin
      dm_addr = 16'(b); #1;
      checks++;
      if (dm_rdata !== m_dm[b]) begin
        failures++; $display("FAIL %s: M[%h]=%h, model %h", tag, b, dm_rdata, m_dm[b]);
      end
    end
  endtask

  // Release reset and run up to max_cycles, comparing with the model every
  // cycle. Returns the number of instructions executed, HALT included: one
  // clock edge each.
  task automatic run(input string tag, input int max_cycles, output int cycles);
    @(negedge clk); rst_n = 1; #1;
    cycles = 0;
    while (cycles < max_cycles) begin
      compare_state(tag);
      if (m_halted) break;
      if (branch_taken) n_dut_branch++;
      if (overflow && instr[15:13] == 3'b001) n_dut_overflow++;
      model_step();
      cycles++;
      @(negedge clk);
    end
    compare_state(tag);
    if (m_halted) begin   // a halted processor stays where it is
      @(negedge clk);
      compare_state(tag);
    end else begin
      rst_n = 0;          // stop a program that has not halted (memory is kept)
    end
  endtask

  task automatic expect_reg(input string tag, input int r, input logic [15:0] v);
    dbg_reg = 4'(r); #1;
    checks++;
    if (dbg_data !== v) begin failures++; $display("FAIL %s: R%0d=%h expected %h", tag, r, dbg_data, v); end
  endtask

  task automatic expect_byte(input string tag, input logic [15:0] a, input logic [7:0] v);
    dm_addr = a; #1;
    checks++;
    if (dm_rdata !== v) begin failures++; $display("FAIL %s: M[%h]=%h expected %h", tag, a, dm_rdata, v); end
  endtask

  task automatic expect_cycles(input string tag, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", tag, got, want); end
  endtask

  task automatic clear_memories();
    // Fill both memories with known data so that every read is defined.
    foreach (m_im[w]) m_im[w] = HALT;
    foreach (m_dm[b]) m_dm[b] = 8'h00;
    load_all_im();
    load_all_dm();
  endtask

  int cyc;

  initial begin
    n_lw = 0; n_sw = 0; n_add = 0; n_sub = 0; n_and = 0; n_or = 0; n_beq_taken = 0;
    n_beq_not = 0; n_jmp = 0; n_halt = 0; n_nop = 0; n_hardwired_write = 0;
    n_neg_offset = 0; n_overflow = 0; n_dut_branch = 0; n_dut_overflow = 0;
    reset_both();
    clear_memories();

    // ------------------------------------------------ encoding examples
    checks++;
    if (enc_r(4'b0010, 3, 6, 8) !== 16'b0010_0011_0110_1000) failures++;
    checks++;
    if (enc_r(4'b0001, 3, 6, -8) !== 16'b0001_0011_0110_1000) failures++;
    checks++;
    if (enc_r(4'b0111, 1, 2, -2) !== 16'b0111_0001_0010_1110) failures++;

    // ------------------------------------------------------- Exercise 0
    reset_both();
    host_dm(16'h0000, 8'heb); host_dm(16'h0001, 8'hca);
    host_dm(16'h0002, 8'hbd); host_dm(16'h0003, 8'h56);
    host_im(16'h0000, enc_r(4'b0010, 1, 1, 2));   // ADD R1, R1, R2
    host_im(16'h0002, enc_r(4'b0001, 0, 2, 4));   // SW R2, 4(R0)
    host_im(16'h0004, HALT);
    run("ex0", 100, cyc);
    compare_touched_dm("ex0");
    expect_cycles("ex0", cyc, 3);
    expect_reg("ex0", 2, 16'h0002);
    expect_byte("ex0", 16'h0004, 8'h02);
    expect_byte("ex0", 16'h0005, 8'h00);

    // ------------------------------------------------------- Exercise 1
    reset_both();
    host_im(16'h0000, enc_r(4'b0000, 0, 3, 0));   // LW R3, 0(R0)
    host_im(16'h0002, enc_r(4'b0000, 0, 4, 2));   // LW R4, 2(R0)
    host_im(16'h0004, enc_r(4'b0100, 3, 4, 5));   // AND R3, R4, R5
    host_im(16'h0006, enc_r(4'b0001, 0, 5, 4));   // SW R5, 4(R0)
    host_im(16'h0008, HALT);
    run("ex1", 100, cyc);
    compare_touched_dm("ex1");
    expect_cycles("ex1", cyc, 5);
    expect_reg("ex1", 3, 16'hcaeb);
    expect_reg("ex1", 4, 16'h56bd);
    expect_reg("ex1", 5, 16'h42a9);
    expect_byte("ex1", 16'h0004, 8'ha9);
    expect_byte("ex1", 16'h0005, 8'h42);

    // ------------------------------------------------------- Exercise 2
    reset_both();
    host_dm(16'hfff8, 8'h02); host_dm(16'hfff9, 8'h00);
    host_dm(16'hfffa, 8'h03); host_dm(16'hfffb, 8'h00);
    host_im(16'h0000, enc_r(4'b0000, 0, 9, -8));   // LW R9, -8(R0)
    host_im(16'h0002, enc_r(4'b0000, 0, 10, -6));  // LW R10, -6(R0)
    host_im(16'h0004, enc_j(32'h40));              // JMP 0x40 -> 0x80
    host_im(16'h0080, enc_r(4'b0111, 0, 0, -1));   // BEQ R0, R0, -1 (spin)
    @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (pc !== 16'h0080) begin failures++; $display("FAIL ex2 setup spin pc=%h", pc); end
    n_lw += 2; n_jmp++; n_neg_offset += 2; n_beq_taken++; n_dut_branch++;
    host_im(16'h0000, enc_r(4'b0011, 8, 8, 8));    // SUB R8, R8, R8
    host_im(16'h0002, enc_r(4'b0111, 9, 0, 3));    // BEQ R9, R0, 3
    host_im(16'h0004, enc_r(4'b0010, 8, 8, 10));   // ADD R10, R8, R8
    host_im(16'h0006, enc_r(4'b0011, 9, 1, 9));    // SUB R9, R1, R9
    host_im(16'h0008, enc_j(1));                   // JMP 1
    host_im(16'h000a, HALT);
    expect_reg("ex2 setup", 9, 16'h0002);
    expect_reg("ex2 setup", 10, 16'h0003);
    // model: exercise state at PC 0
    m_pc = 16'h0000; m_halted = 0;
    m_r[9] = 16'h0002; m_r[10] = 16'h0003;
    m_touched[16'hfff8] = 1; m_touched[16'hfffa] = 1;
    // leave the spin with a jump to 0; the CPU is at 0x80 until then
    @(negedge clk); im_we = 1; im_addr = 16'h0080; im_wdata = enc_j(0);
    @(negedge clk); im_we = 0;   // the CPU now sees JMP 0 at 0x80
    m_im[15'h0040] = enc_j(0);
    @(negedge clk);              // the jump has executed
    n_jmp++;
    cyc = 0;
    while (cyc < 200) begin
      compare_state("ex2");
      if (m_halted) break;
      if (branch_taken) n_dut_branch++;
      if (overflow && instr[15:13] == 3'b001) n_dut_overflow++;
      model_step();
      cyc++;
      @(negedge clk);
    end
    compare_touched_dm("ex2");
    // SUB, twice round BEQ/ADD/SUB/JMP, the taken BEQ, HALT: 1+4*2+1+1
    expect_cycles("ex2", cyc, 11);
    checks++;
    if (pc !== 16'h000a) begin failures++; $display("FAIL ex2 final pc=%h", pc); end
    expect_reg("ex2", 8, 16'h0000);
    expect_reg("ex2", 9, 16'h0000);
    expect_reg("ex2", 10, 16'h0000);

    // ------------------------------------------ encoding examples executed
    reset_both();
    host_dm(16'h0000, 8'h0a); host_dm(16'h0001, 8'h00);   // M[0] = 10
    host_im(16'h0000, enc_r(4'b0000, 0, 3, 0));           // LW R3, 0(R0)  R3 = 10
    host_im(16'h0002, enc_r(4'b0010, 3, 1, 6));           // ADD R3, R1, R6 R6 = 11
    host_im(16'h0004, 16'b0010_0011_0110_1000);           // ADD R3, R6, R8 R8 = 21
    host_im(16'h0006, 16'b0001_0011_0110_1000);           // SW R6, -8(R3)  M[2] = 11
    host_im(16'h0008, enc_r(4'b0010, 1, 1, 2));           // ADD R1, R1, R2 R2 = 2
    host_im(16'h000a, 16'b0111_0001_0010_1110);           // BEQ R1, R2, -2 (not taken)
    host_im(16'h000c, enc_r(4'b0011, 2, 1, 2));           // SUB R2, R1, R2 R2 = 1
    host_im(16'h000e, enc_r(4'b0111, 1, 2, 1));           // BEQ R1, R2, 1 -> 0x12 (taken)
    host_im(16'h0010, HALT);
    host_im(16'h0012, 16'b0111_0001_0010_1110);           // BEQ R1, R2, -2 -> 0x10 (HALT)
    run("enc", 100, cyc);
    compare_touched_dm("enc");
    expect_reg("enc", 6, 16'd11);
    expect_reg("enc", 8, 16'd21);
    expect_byte("enc", 16'h0002, 8'd11);
    expect_cycles("enc", cyc, 10);

    // ---------------------------------------------------- ALU overflow
    reset_both();
    host_dm(16'h0000, 8'hff); host_dm(16'h0001, 8'h7f);   // M[0] = 0x7fff
    host_im(16'h0000, enc_r(4'b0000, 0, 2, 0));           // LW R2, 0(R0)
    host_im(16'h0002, enc_r(4'b0010, 2, 1, 3));           // ADD R2, R1, R3
    host_im(16'h0004, enc_r(4'b0011, 0, 3, 4));           // SUB R0, R3, R4
    host_im(16'h0006, HALT);
    run("ovf", 100, cyc);
    expect_reg("ovf", 3, 16'h8000);
    expect_reg("ovf", 4, 16'h8000);
    expect_cycles("ovf", cyc, 4);

    // ------------------------------------------------- random programs
    for (int p = 0; p < 6; p++) begin
      reset_both();
      foreach (m_im[w]) begin
        logic [3:0] op;
        int k;
        k = $urandom_range(0, 999);
        if (k < 2)        op = 4'b1111;                     // HALT, rare
        else if (k < 12)  op = 4'b1000;                     // JMP
        else if (k < 30)  op = (($urandom % 2) == 0) ? 4'b0110 : 4'b1010; // unused
        else if (k < 150) op = 4'b0111;                     // BEQ
        else if (k < 330) op = 4'b0000;                     // LW
        else if (k < 460) op = 4'b0001;                     // SW
        else              op = 4'($urandom_range(2, 5));    // ADD..OR
        m_im[w] = {op, 12'($urandom)};
        // Random branches go forward only, so that they do not form endless
        // loops (backward branches are covered by the directed programs);
        // half of them compare a register with itself and are always taken.
        if (op == 4'b0111) begin
          m_im[w][3] = 1'b0;
          if (($urandom % 2) == 0) m_im[w][7:4] = m_im[w][11:8];
        end
      end
      foreach (m_dm[b]) m_dm[b] = 8'($urandom);
      load_all_im();
      load_all_dm();
      run($sformatf("random%0d", p), 20000, cyc);
      compare_touched_dm($sformatf("random%0d", p));
      $display("random program %0d: %0d instructions, halted=%b", p, cyc, halted);
    end

    // ------------------------------------------------- mechanism coverage
    $display("LW=%0d SW=%0d ADD=%0d SUB=%0d AND=%0d OR=%0d BEQ taken=%0d not=%0d JMP=%0d HALT=%0d",
             n_lw, n_sw, n_add, n_sub, n_and, n_or, n_beq_taken, n_beq_not, n_jmp, n_halt);
    $display("unused-opcode=%0d R0/R1-write=%0d neg-offset=%0d overflow=%0d dut-branch=%0d",
             n_nop, n_hardwired_write, n_neg_offset, n_overflow, n_dut_branch);
    checks++; if (n_lw == 0) begin failures++; $display("FAIL never: LW"); end
    checks++; if (n_sw == 0) begin failures++; $display("FAIL never: SW"); end
    checks++; if (n_add == 0) begin failures++; $display("FAIL never: ADD"); end
    checks++; if (n_sub == 0) begin failures++; $display("FAIL never: SUB"); end
    checks++; if (n_and == 0) begin failures++; $display("FAIL never: AND"); end
    checks++; if (n_or == 0) begin failures++; $display("FAIL never: OR"); end
    checks++; if (n_beq_taken == 0) begin failures++; $display("FAIL never: BEQ taken"); end
    checks++; if (n_beq_not == 0) begin failures++; $display("FAIL never: BEQ not taken"); end
    checks++; if (n_jmp == 0) begin failures++; $display("FAIL never: JMP"); end
    checks++; if (n_halt == 0) begin failures++; $display("FAIL never: HALT"); end
    checks++; if (n_nop == 0) begin failures++; $display("FAIL never: unused opcode"); end
    checks++; if (n_hardwired_write == 0) begin failures++; $display("FAIL never: R0/R1 write"); end
    checks++; if (n_neg_offset == 0) begin failures++; $display("FAIL never: negative offset"); end
    checks++; if (n_overflow == 0) begin failures++; $display("FAIL never: ALU overflow"); end
    checks++; if (n_dut_branch != n_beq_taken) begin
      failures++; $display("FAIL branch_taken seen %0d times, model %0d", n_dut_branch, n_beq_taken);
    end
    checks++; if (n_dut_overflow != n_overflow) begin
      failures++; $display("FAIL overflow seen %0d times, model %0d", n_dut_overflow, n_overflow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

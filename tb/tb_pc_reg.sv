// tb_pc_reg: checks that reset clears the PC to 0, that the PC loads
// pc_next at each rising edge, and that HALT freezes it and sets the sticky
// halted flag, both until the next reset.
module tb_pc_reg;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, halt = 0, halted;
  logic [15:0] pc_next = 0, pc;

  pc_reg dut (.clk, .rst_n, .pc_next, .halt, .pc, .halted);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input logic [15:0] p, input logic h);
    checks++;
    if (pc !== p || halted !== h) begin
      failures++; $display("FAIL pc=%h halted=%b expected %h %b", pc, halted, p, h);
    end
  endtask

  initial begin
    pc_next = 16'h1234;
    @(negedge clk); expect_state(16'h0000, 1'b0);   // held in reset
    @(negedge clk); expect_state(16'h0000, 1'b0);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [15:0] n;
      n = {15'($urandom), 1'b0};
      @(negedge clk); pc_next = n;
      @(negedge clk); expect_state(n, 1'b0);
    end
    @(negedge clk); pc_next = 16'h0040;
    @(negedge clk); expect_state(16'h0040, 1'b0);
    halt = 1; pc_next = 16'h0042;
    @(negedge clk); expect_state(16'h0040, 1'b1);
    @(negedge clk); expect_state(16'h0040, 1'b1);
    halt = 0; pc_next = 16'h0100;                   // stays frozen once halted
    @(negedge clk); expect_state(16'h0040, 1'b1);
    rst_n = 0; #1 expect_state(16'h0000, 1'b0);     // asynchronous reset
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_instr_mem: loads instruction words through the load port at random
// even addresses of the full 64 KiB space and reads them back at those PCs,
// checking that a load takes effect at the clock edge.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [15:0] pc, instr, ld_addr, ld_data;
  logic        ld_we;
  logic [15:0] shadow [int];

  instr_mem dut (.clk, .pc, .instr, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_addr = 0; ld_data = 0; pc = 0;
    for (int i = 0; i < 400; i++) begin
      logic [15:0] a, d;
      a = {15'($urandom), 1'b0}; d = 16'($urandom);
      @(negedge clk); ld_we = 1; ld_addr = a; ld_data = d; pc = a;
      #1;
      if (shadow.exists(a) && d !== shadow[a]) begin
        checks++;
        if (instr !== shadow[a]) begin failures++; $display("FAIL load visible before edge"); end
      end
      @(negedge clk); ld_we = 0;
      shadow[a] = d;
      checks++;
      if (instr !== d) begin failures++; $display("FAIL @%h = %h expected %h", a, instr, d); end
    end
    foreach (shadow[k]) begin
      pc = 16'(k); #1;
      checks++;
      if (instr !== shadow[k]) begin failures++; $display("FAIL readback @%h", pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg_file: self-checking test of the register file. Checks reset
// values, that R0 and R1 always read 0 and 1 even after writes, that a
// write becomes visible after the clock edge and not before, that Write
// Enable low blocks a write, and random traffic against a shadow array.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra1, ra2, wa, dbg_addr;
  logic [15:0] rd1, rd2, wd, dbg_data;
  logic        we;
  logic [15:0] shadow [16];

  reg_file dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_reads();
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); ra2 = 4'(15 - r); dbg_addr = 4'(r);
      #1;
      checks++;
      if (rd1 !== shadow[r] || rd2 !== shadow[15-r] || dbg_data !== shadow[r]) begin
        failures++;
        $display("FAIL R%0d rd1=%h rd2=%h dbg=%h expected %h/%h", r, rd1, rd2, dbg_data, shadow[r], shadow[15-r]);
      end
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; dbg_addr = 0;
    foreach (shadow[i]) shadow[i] = 16'h0;
    shadow[1] = 16'h0001;
    #12 rst_n = 1;
    expect_reads();
    // writes to hardwired registers are ignored
    @(negedge clk); we = 1; wa = 0; wd = 16'hdead;
    @(negedge clk); wa = 1; wd = 16'hbeef;
    @(negedge clk); we = 0;
    expect_reads();
    // write visible only after the edge
    @(negedge clk); we = 1; wa = 4'd7; wd = 16'h1234; ra1 = 4'd7; #1;
    checks++;
    if (rd1 !== 16'h0000) begin failures++; $display("FAIL write visible before edge"); end
    @(negedge clk); we = 0;
    shadow[7] = 16'h1234;
    expect_reads();
    // write enable low blocks a write
    @(negedge clk); we = 0; wa = 4'd7; wd = 16'hffff;
    @(negedge clk);
    expect_reads();
    // random traffic
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      ra1 = 4'($urandom); ra2 = 4'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++; $display("FAIL random read ra1=%0d rd1=%h exp %h", ra1, rd1, shadow[ra1]);
      end
      @(posedge clk);
      if (we && wa > 1) shadow[wa] = wd;
    end
    @(negedge clk); we = 0;
    expect_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

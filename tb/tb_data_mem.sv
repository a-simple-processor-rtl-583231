// tb_data_mem: self-checking test of the data memory at its full 64 KiB
// size. Loads bytes through the host port and reads them back as words
// (little-endian: the even-address byte is the low byte), stores words
// through the processor port and reads them back as bytes, checks that a
// store waits for the clock edge and for Mem Store, and runs random word
// traffic against a shadow byte array.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [15:0] addr, wdata, rdata, h_addr;
  logic        we, h_we;
  logic [7:0]  h_wdata, h_rdata;
  logic [7:0]  shadow [int];

  data_mem dut (.clk, .addr, .wdata, .we, .rdata, .h_we, .h_addr, .h_wdata, .h_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_we = 0;
    shadow[a] = d;
  endtask

  task automatic cpu_write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
    shadow[{a[15:1], 1'b0}] = d[7:0];
    shadow[{a[15:1], 1'b1}] = d[15:8];
  endtask

  task automatic check_word(input logic [15:0] a, input logic [15:0] e);
    addr = a; #1;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL word @%h = %h expected %h", a, rdata, e); end
  endtask

  task automatic check_byte(input logic [15:0] a, input logic [7:0] e);
    h_addr = a; #1;
    checks++;
    if (h_rdata !== e) begin failures++; $display("FAIL byte @%h = %h expected %h", a, h_rdata, e); end
  endtask

  initial begin
    we = 0; h_we = 0; addr = 0; wdata = 0; h_addr = 0; h_wdata = 0;
    // bytes EB CA at 0..1 and BD 56 at 2..3 read as words 0xCAEB and 0x56BD
    host_write(16'h0000, 8'heb);
    host_write(16'h0001, 8'hca);
    host_write(16'h0002, 8'hbd);
    host_write(16'h0003, 8'h56);
    check_word(16'h0000, 16'hcaeb);
    check_word(16'h0002, 16'h56bd);
    check_word(16'h0003, 16'h56bd);   // odd address uses the same pair
    // word 0x0002 stored at 4 puts 0x02 at 4 and 0x00 at 5
    cpu_write(16'h0004, 16'h0002);
    check_byte(16'h0004, 8'h02);
    check_byte(16'h0005, 8'h00);
    // store only at the edge, and only with Mem Store
    @(negedge clk); we = 1; addr = 16'h0006; wdata = 16'ha5a5; #1;
    checks++;
    if (rdata === 16'ha5a5) begin failures++; $display("FAIL store visible before edge"); end
    @(negedge clk); we = 0; shadow[6] = 8'ha5; shadow[7] = 8'ha5;
    @(negedge clk); addr = 16'h0006; wdata = 16'h1111;
    @(negedge clk);
    check_word(16'h0006, 16'ha5a5);
    // top of the 64 KiB space
    cpu_write(16'hfffe, 16'h7e57);
    check_byte(16'hffff, 8'h7e);
    check_byte(16'hfffe, 8'h57);
    // random word traffic
    for (int i = 0; i < 300; i++) begin
      logic [15:0] a, d;
      a = 16'($urandom); d = 16'($urandom);
      cpu_write(a, d);
      check_word({a[15:1], 1'b0}, d);
    end
    foreach (shadow[k]) check_byte(16'(k), shadow[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

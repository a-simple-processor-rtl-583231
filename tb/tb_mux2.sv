// tb_mux2: self-checking test of the two-input datapath mux. Random inputs
// at the 16-bit width and at the 4-bit width used for the register write
// address; the expected output is chosen by the testbench from sel.
module tb_mux2;
  int checks = 0, failures = 0;
  logic        sel;
  logic [15:0] a, b, y;
  logic [3:0]  a4, b4, y4;

  mux2 #(.W(16)) dut   (.sel, .in0(a),  .in1(b),  .out(y));
  mux2 #(.W(4))  dut4  (.sel, .in0(a4), .in1(b4), .out(y4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = i[0];
      a = 16'($urandom); b = 16'($urandom);
      a4 = 4'($urandom); b4 = 4'($urandom);
      #1;
      checks++;
      if (y !== (i[0] ? b : a)) begin
        failures++; $display("FAIL mux16 sel=%0d a=%h b=%h y=%h", sel, a, b, y);
      end
      checks++;
      if (y4 !== (i[0] ? b4 : a4)) begin
        failures++; $display("FAIL mux4 sel=%0d y=%h", sel, y4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

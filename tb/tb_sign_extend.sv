// tb_sign_extend: exhaustive test of the 4-to-16-bit sign extender. The
// expected value is the field read as a signed integer in -8..7.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [3:0]  in;
  logic [15:0] out;

  sign_extend dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int signed expect_val;
      in = 4'(v);
      expect_val = (v >= 8) ? v - 16 : v;
      #1;
      checks++;
      if ($signed(out) != expect_val) begin
        failures++; $display("FAIL in=%h out=%h expected %0d", in, out, expect_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

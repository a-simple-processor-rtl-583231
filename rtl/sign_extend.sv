// sign_extend: widens the 4-bit signed offset field of LW, SW and BEQ to a
// 16-bit two's-complement value by replicating bit 3. Offsets therefore
// range from -8 to +7. Purely combinational; in gates it is only wiring,
// every output bit being a copy of an input bit.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};

endmodule

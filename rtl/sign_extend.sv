// sign_extend: widens an IN_W-bit two's-complement number to OUT_W bits by
// copying its sign bit into the new upper bits, so the value is unchanged
// (0011 becomes 00000011, 1011 becomes 11111011). In the processor it extends the
// 16-bit immediate of addi, lw, sw and beq to 32 bits. Combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  assign out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule

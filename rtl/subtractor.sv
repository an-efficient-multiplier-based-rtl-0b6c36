// subtractor: W-bit two's-complement difference, out = a - b (modulo 2**W).
//
// Combinational, no clock. In the multiplier it forms the final ROBA step,
// (Ar*B + A*Br) - Ar*Br, and inside the sign detector it forms 0 - x to
// negate a negative operand. The operation and its place after the adder
// follow the design's flow; the width is a parameter so that one module
// serves the product-width and the operand-width subtractions.
module subtractor #(
  parameter int unsigned W = 128   // operand and result width
) (
  input  logic [W-1:0] a,          // minuend
  input  logic [W-1:0] b,          // subtrahend
  output logic [W-1:0] out         // a - b, wrapping modulo 2**W
);
  always_comb out = a - b;
endmodule

// adder: W-bit sum, out = a + b (modulo 2**W).
//
// Combinational, no clock. In the multiplier it adds the two shifted
// partial products Ar*B and A*Br. The carry out of the top bit is dropped:
// the final ROBA result always fits W bits, so arithmetic modulo 2**W gives
// the exact value once the subtractor has removed Ar*Br.
module adder #(
  parameter int unsigned W = 128   // operand and result width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] out         // a + b, wrapping modulo 2**W
);
  always_comb out = a + b;
endmodule

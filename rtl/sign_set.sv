// sign_set: gives the unsigned approximate product its sign.
//
// out = sign ? -mag : mag, in W-bit two's complement. It is the last step
// of the multiplier and undoes the sign detector's split into magnitudes.
// Combinational, no clock.
module sign_set #(
  parameter int unsigned W = 128                   // product width
) (
  input  logic [W-1:0] mag,                        // unsigned approximate product
  input  logic         sign,                       // 1: product is negative
  output logic [W-1:0] out                         // signed product
);
  always_comb out = sign ? (~mag + 1'b1) : mag;
endmodule

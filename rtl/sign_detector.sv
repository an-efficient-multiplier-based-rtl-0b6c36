// sign_detector: splits two operands into magnitudes and a product sign.
//
// With SIGNED_OPS set, the operands are two's-complement numbers: the sign
// of the product is the XOR of their top bits, and each negative operand is
// replaced by its magnitude, formed by a subtractor as 0 - x. The magnitude
// of the most negative number, 2**(N-1), still fits N unsigned bits. With
// SIGNED_OPS clear the operands pass on as unsigned numbers and the sign is
// 0. The design detects the sign before rounding and sets it again at the
// end; how the magnitude is formed, and the parameter that selects unsigned
// operation, are this implementation's choices. Combinational, no clock.
module sign_detector #(
  parameter int unsigned N          = 64,          // operand width
  parameter bit          SIGNED_OPS = 1'b1         // 1: two's-complement operands
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] data_a,                     // |a|
  output logic [N-1:0] data_b,                     // |b|
  output logic         sign                        // 1: product is negative
);
  logic [N-1:0] neg_a, neg_b;

  subtractor #(.W(N)) u_neg_a (.a('0), .b(a), .out(neg_a));
  subtractor #(.W(N)) u_neg_b (.a('0), .b(b), .out(neg_b));

  always_comb begin
    if (SIGNED_OPS) begin
      sign   = a[N-1] ^ b[N-1];
      data_a = a[N-1] ? neg_a : a;
      data_b = b[N-1] ? neg_b : b;
    end else begin
      sign   = 1'b0;
      data_a = a;
      data_b = b;
    end
  end
endmodule

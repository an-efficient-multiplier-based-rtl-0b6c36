// shifter: multiplies a value by a power of two, dout = din * 2**amt.
//
// Because a rounded operand is a power of two, every product that involves
// one (Ar*B, A*Br, Ar*Br) is a left shift of the other factor by the rounded
// operand's exponent; this replaces a full multiplier. When the rounded
// operand is zero (the operand itself was zero) the enable input is low and
// the output is zero. The input is zero-extended to WO bits and the shifted
// result is truncated to WO bits. Combinational, no clock.
module shifter #(
  parameter int unsigned WI = 64,                  // width of the value shifted
  parameter int unsigned WO = 128,                 // width of the product
  parameter int unsigned SW = 7                    // width of the shift amount
) (
  input  logic [WI-1:0] din,                       // factor to be multiplied
  input  logic [SW-1:0] amt,                       // exponent of the power of two
  input  logic          en,                        // 0: power of two is zero
  output logic [WO-1:0] dout                       // din * 2**amt, or 0
);
  logic [WO-1:0] din_ext;

  always_comb begin
    din_ext = '0;
    for (int i = 0; i < WI && i < WO; i++) din_ext[i] = din[i];
    dout = en ? (din_ext << amt) : '0;
  end
endmodule

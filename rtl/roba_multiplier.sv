// roba_multiplier: N x N rounding-based approximate multiplier (ROBA).
//
// Main idea: round each operand to its nearest power of two, Ar and Br. The
// product is then approximated as
//     A*B ~= Ar*B + A*Br - Ar*Br
// which drops only the term (A-Ar)*(B-Br). Every remaining product has a
// power of two as a factor, so it is a shift, and the multiplier needs no
// partial-product array: three shifters, one adder and one subtractor.
//
// Datapath (combinational, no clock, no registers):
//   sign_detector  -> magnitudes data_a, data_b and the product sign
//   rounding (x2)  -> ar, br (as exponent and non-zero flag)
//   shifter  (x3)  -> brxa = A*Br, arxb = Ar*B, arxbr = Ar*Br
//   adder          -> adder_out = brxa + arxb
//   subtractor     -> sub_out   = adder_out - arxbr
//   sign_set       -> out = +/- sub_out
// The internal names follow the design's own signal names. All product
// arithmetic is modulo 2**(2N); the approximate product always lies in
// [0, 2**(2N)), so the wrapped intermediate values give it exactly.
//
// Interface: a and b are N-bit operands (two's complement when SIGNED_OPS is
// set, the default; unsigned otherwise), out is the 2N-bit approximate
// product. The default N = 64 is the design's main configuration. Whether
// operands are signed is a parameter here, not a port; the rounding tie
// rule (midpoints round up) is this implementation's choice. The value br
// is kept for observation only: the datapath uses its exponent, so a lint
// tool reports it as unused.
module roba_multiplier #(
  parameter int unsigned N          = 64,          // operand width
  parameter bit          SIGNED_OPS = 1'b1         // 1: two's-complement operands
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] out                       // approximate a*b
);
  localparam int unsigned P  = 2 * N;              // product width
  localparam int unsigned EW = $clog2(N + 1);      // exponent width

  logic [N-1:0]  data_a, data_b;
  logic          sign;
  logic [N:0]    ar, br;                          // rounded |a| and |b|
  logic [EW-1:0] exp_a, exp_b;
  logic          nz_a, nz_b;
  logic [P-1:0]  brxa, arxb, arxbr;
  logic [P-1:0]  adder_out, sub_out;

  sign_detector #(.N(N), .SIGNED_OPS(SIGNED_OPS)) u_sign_detector (
    .a(a), .b(b), .data_a(data_a), .data_b(data_b), .sign(sign)
  );

  rounding #(.N(N), .EW(EW)) u_round_a (.x(data_a), .xr(ar), .exp_o(exp_a), .nz(nz_a));
  rounding #(.N(N), .EW(EW)) u_round_b (.x(data_b), .xr(br), .exp_o(exp_b), .nz(nz_b));

  // A*Br: shift A by the exponent of Br
  shifter #(.WI(N), .WO(P), .SW(EW)) u_brxa (
    .din(data_a), .amt(exp_b), .en(nz_b), .dout(brxa)
  );
  // Ar*B: shift B by the exponent of Ar
  shifter #(.WI(N), .WO(P), .SW(EW)) u_arxb (
    .din(data_b), .amt(exp_a), .en(nz_a), .dout(arxb)
  );
  // Ar*Br: shift Ar by the exponent of Br
  shifter #(.WI(N+1), .WO(P), .SW(EW)) u_arxbr (
    .din(ar), .amt(exp_b), .en(nz_b), .dout(arxbr)
  );

  adder      #(.W(P)) u_adder      (.a(brxa), .b(arxb), .out(adder_out));
  subtractor #(.W(P)) u_subtractor (.a(adder_out), .b(arxbr), .out(sub_out));
  sign_set   #(.W(P)) u_sign_set   (.mag(sub_out), .sign(sign), .out(out));
endmodule

// rounding: rounds an unsigned operand to its nearest power of two.
//
// For an operand whose leading one is at bit p, the two candidates are 2**p
// and 2**(p+1); the midpoint between them is 3*2**(p-1), which has bits p
// and p-1 set. So the operand rounds up to 2**(p+1) exactly when bit p-1 is
// set, and down to 2**p otherwise; the midpoint itself rounds up. Zero stays
// zero. The result is given both as its value xr (N+1 bits, because an
// N-bit operand can round up to 2**N) and as the exponent plus a non-zero
// flag, which is what the shifters use. Rounding to the nearest power of two
// is the design's rounding step; the tie rule and the output encoding are
// this implementation's choices. Combinational, no clock.
module rounding #(
  parameter int unsigned N  = 64,                  // operand width
  parameter int unsigned EW = $clog2(N + 1)        // exponent width, holds 0..N
) (
  input  logic [N-1:0]  x,                         // unsigned operand
  output logic [N:0]    xr,                        // rounded value: 0 or 2**exp
  output logic [EW-1:0] exp_o,                     // exponent of xr
  output logic          nz                         // 1 when x (and xr) is non-zero
);
  logic [EW-1:0] lead;                             // position of the leading one
  logic          up;                               // round up to the next power

  always_comb begin
    lead = '0;
    up   = 1'b0;
    for (int i = 1; i < N; i++) begin
      if (x[i]) begin
        lead = EW'(i);
        up   = x[i-1];                             // bit just below the leading one
      end
    end
    nz    = |x;
    exp_o = up ? lead + 1'b1 : lead;
    xr    = nz ? ((N+1)'(1) << exp_o) : '0;
  end
endmodule

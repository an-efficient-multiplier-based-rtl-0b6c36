// tb_rounding: self-checking test of nearest-power-of-two rounding.
// Exhaustive at N = 8 and directed plus random at the default N = 64. The
// reference picks, among 2**0 .. 2**N, the power of two at the smallest
// distance from x (the larger one on a tie), and checks value, exponent and
// non-zero flag.
module tb_rounding;
  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [8:0]  xr8;
  logic [3:0]  e8;
  logic        nz8;
  logic [63:0] x64;
  logic [64:0] xr64;
  logic [6:0]  e64;
  logic        nz64;

  rounding #(.N(8))  dut8  (.x(x8),  .xr(xr8),  .exp_o(e8),  .nz(nz8));
  rounding #(.N(64)) dut64 (.x(x64), .xr(xr64), .exp_o(e64), .nz(nz64));

  // nearest power of two by distance; returns exponent, -1 for zero
  function automatic int ref_exp(logic [64:0] x, int n);
    logic [65:0] best_d, d, p;
    int best;
    if (x == 0) return -1;
    best = 0;
    best_d = '1;
    for (int k = 0; k <= n; k++) begin
      p = 66'd1 << k;
      d = ({1'b0, x} > p) ? ({1'b0, x} - p) : (p - {1'b0, x});
      if (d <= best_d) begin
        best_d = d;
        best = k;
      end
    end
    return best;
  endfunction

  int rounded_up = 0, rounded_down = 0;

  task automatic check64(logic [63:0] x);
    int k;
    x64 = x; #1;
    k = ref_exp({1'b0, x}, 64);
    checks++;
    if (k < 0) begin
      if (xr64 !== '0 || nz64 !== 1'b0) begin
        failures++;
        $display("FAIL64 zero: xr=%h nz=%0d", xr64, nz64);
      end
    end else begin
      if ({1'b0, x} < (65'd1 << k)) rounded_up++; else rounded_down++;
      if (xr64 !== (65'd1 << k) || int'(e64) != k || nz64 !== 1'b1) begin
        failures++;
        $display("FAIL64 x=%h: xr=%h e=%0d, expected 2**%0d", x, xr64, e64, k);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int k;
      x8 = 8'(v); #1;
      k = ref_exp(65'(v), 8);
      checks++;
      if (k < 0 ? (xr8 !== '0 || nz8 !== 1'b0)
                : (xr8 !== (9'd1 << k) || int'(e8) != k || nz8 !== 1'b1)) begin
        failures++;
        $display("FAIL8 x=%0d: xr=%0d e=%0d nz=%0d, expected 2**%0d", v, xr8, e8, nz8, k);
      end
    end
    // 8-bit spot values: 96 = 3*2**5 is a midpoint and rounds up to 128
    x8 = 8'd96;  #1; checks++; if (xr8 !== 9'd128) begin failures++; $display("FAIL 96"); end
    x8 = 8'd95;  #1; checks++; if (xr8 !== 9'd64)  begin failures++; $display("FAIL 95"); end
    x8 = 8'd200; #1; checks++; if (xr8 !== 9'd256) begin failures++; $display("FAIL 200"); end
    check64('0);
    check64('1);
    check64(64'h0000_0000_0000_aaff);
    check64(64'h0000_0000_0000_bbcc);
    check64(64'hc000_0000_0000_0000);
    check64(64'hbfff_ffff_ffff_ffff);
    check64(64'h8000_0000_0000_0000);
    for (int k = 0; k < 64; k++) begin
      check64(64'd1 << k);
      check64((64'd1 << k) | (64'd1 << k) >> 1);
      check64(((64'd1 << k) | (64'd1 << k) >> 1) - 1);
    end
    for (int i = 0; i < 2000; i++)
      check64({$urandom, $urandom} >> $urandom_range(0, 63));
    if (rounded_up == 0 || rounded_down == 0) begin
      failures++;
      $display("FAIL: rounding up (%0d) and down (%0d) must both occur", rounded_up, rounded_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

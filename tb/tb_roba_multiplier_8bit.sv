// tb_roba_multiplier_8bit: exhaustive test of the ROBA multiplier at N = 8
// (8-bit operands, 16-bit product), once with two's-complement operands and
// once with unsigned operands: all 65536 operand pairs for each.
//
// The reference rounds each magnitude to the nearest power of two with
// integer arithmetic (distance comparison, larger power on a tie) and
// evaluates Ar*B + A*Br - Ar*Br as plain integers. Besides checking every
// product it reports the mean relative error of the approximation against
// the exact product for both modes.
module tb_roba_multiplier_8bit;
  int checks = 0, failures = 0;
  real err_s = 0.0, err_u = 0.0;
  int  cnt_s = 0, cnt_u = 0;

  logic [7:0]  a, b;
  logic [15:0] out_s, out_u;

  roba_multiplier #(.N(8))                    dut_s (.a(a), .b(b), .out(out_s));
  roba_multiplier #(.N(8), .SIGNED_OPS(1'b0)) dut_u (.a(a), .b(b), .out(out_u));

  function automatic int ref_round(int x);
    int best, best_d, d;
    if (x == 0) return 0;
    best = 1;
    best_d = 1 << 30;
    for (int p = 1; p <= 512; p *= 2) begin
      d = (x > p) ? x - p : p - x;
      if (d <= best_d) begin
        best_d = d;
        best = p;
      end
    end
    return best;
  endfunction

  function automatic int roba(int x, int y);
    int xr, yr;
    xr = ref_round(x);
    yr = ref_round(y);
    return xr * y + x * yr - xr * yr;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int sx, sy, ps, pu;
        a = 8'(x); b = 8'(y); #1;
        // signed mode
        sx = (x >= 128) ? x - 256 : x;
        sy = (y >= 128) ? y - 256 : y;
        ps = roba(sx < 0 ? -sx : sx, sy < 0 ? -sy : sy);
        if ((sx < 0) != (sy < 0)) ps = -ps;
        checks++;
        if (out_s !== 16'(ps)) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d x %0d = %0d, expected %0d", sx, sy, $signed(out_s), ps);
        end
        if (sx * sy != 0) begin
          err_s += ((ps > sx * sy) ? real'(ps - sx * sy) : real'(sx * sy - ps)) / real'((sx * sy > 0) ? sx * sy : -sx * sy);
          cnt_s++;
        end
        // unsigned mode
        pu = roba(x, y);
        checks++;
        if (out_u !== 16'(pu)) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned %0d x %0d = %0d, expected %0d", x, y, out_u, pu);
        end
        if (x * y != 0) begin
          err_u += real'((pu > x * y) ? pu - x * y : x * y - pu) / real'(x * y);
          cnt_u++;
        end
      end
    end
    // spot value worked out by hand: 200 x 100 -> Ar = 256, Br = 128,
    // 256*100 + 200*128 - 256*128 = 18432
    a = 8'd200; b = 8'd100; #1;
    checks++;
    if (out_u !== 16'd18432) begin
      failures++;
      $display("FAIL 200 x 100 = %0d, expected 18432", out_u);
    end
    $display("mean relative error: signed %f, unsigned %f", err_s / real'(cnt_s), err_u / real'(cnt_u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_roba_multiplier: end-to-end test of the ROBA multiplier at its default
// size (64-bit two's-complement operands, 128-bit product).
//
// The reference works in 132-bit arithmetic: it takes the operand
// magnitudes, rounds each to the nearest power of two by comparing
// distances, evaluates Ar*B + A*Br - Ar*Br with real multiplications and
// applies the sign. It covers the 0xaaff x 0xbbcc vector, zero and
// power-of-two operands, midpoint ties, the most negative operand and
// random operands of all magnitudes. Each mechanism of the datapath is
// counted (rounding up, rounding down, a zero operand, an exact product
// from a power-of-two operand, sign setting of a negative product) and a
// mechanism never seen counts as a failure. The mean relative error of
// the approximation against the exact product is printed for information.
module tb_roba_multiplier;
  localparam int unsigned N = 64;
  localparam int unsigned P = 2 * N;
  localparam int unsigned R = P + 4;       // reference width

  int checks = 0, failures = 0;
  int n_round_up = 0, n_round_down = 0, n_zero = 0, n_exact = 0, n_negative = 0;
  real err_sum = 0.0;
  int  err_n = 0;

  logic [N-1:0] a, b;
  logic [P-1:0] out;

  roba_multiplier dut (.a(a), .b(b), .out(out));

  function automatic logic [R-1:0] ref_round(logic [N-1:0] x);
    logic [R-1:0] best, best_d, d, p;
    if (x == 0) return '0;
    best = '0;
    best_d = '1;
    for (int k = 0; k <= N; k++) begin
      p = R'(1) << k;
      d = (R'(x) > p) ? (R'(x) - p) : (p - R'(x));
      if (d <= best_d) begin
        best_d = d;
        best = p;
      end
    end
    return best;
  endfunction

  function automatic logic [N-1:0] ref_abs(logic [N-1:0] x);
    logic signed [N:0] s;
    s = $signed({x[N-1], x});
    if (s < 0) s = -s;
    return s[N-1:0];
  endfunction

  function automatic real to_real(logic [R-1:0] v);
    real r;
    r = 0.0;
    for (int i = R - 1; i >= 0; i--) r = r * 2.0 + (v[i] ? 1.0 : 0.0);
    return r;
  endfunction

  task automatic check_one(logic [N-1:0] x, logic [N-1:0] y);
    logic [N-1:0] ma, mb;
    logic [R-1:0] ar, br, approx, exact;
    logic [P-1:0] expected;
    logic         neg;
    a = x; b = y; #1;
    ma = ref_abs(x);
    mb = ref_abs(y);
    neg = x[N-1] ^ y[N-1];
    ar = ref_round(ma);
    br = ref_round(mb);
    approx = ar * R'(mb) + R'(ma) * br - ar * br;
    exact  = R'(ma) * R'(mb);
    expected = neg ? P'(-approx) : P'(approx);
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h: out=%h expected=%h", x, y, out, expected);
    end
    // mechanism counters
    if (ma == 0 || mb == 0) n_zero++;
    if (ma != 0 && R'(ma) < ar) n_round_up++;
    if (mb != 0 && R'(mb) < br) n_round_up++;
    if (ma != 0 && R'(ma) > ar) n_round_down++;
    if (mb != 0 && R'(mb) > br) n_round_down++;
    if (exact != 0 && approx == exact && (R'(ma) == ar || R'(mb) == br)) n_exact++;
    if (neg && approx != 0) n_negative++;
    if (exact != 0) begin
      real e;
      e = (to_real(approx) - to_real(exact)) / to_real(exact);
      err_sum += (e < 0.0) ? -e : e;
      err_n++;
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
    // vector 0xaaff x 0xbbcc: both round to 0x8000, product 0x7365_8000
    a = 64'h0000_0000_0000_aaff; b = 64'h0000_0000_0000_bbcc; #1;
    checks++;
    if (out !== 128'h7365_8000) begin
      failures++;
      $display("FAIL aaff x bbcc = %h, expected 73658000", out);
    end
    $display("aaff x bbcc: approximate %h, exact product %h", out, 128'h7d70_8834);
    check_one(64'h0000_0000_0000_aaff, 64'h0000_0000_0000_bbcc);
    check_one('0, '0);
    check_one('0, 64'd12345);
    check_one(64'd1, 64'd1);
    check_one('1, '1);                               // -1 x -1
    check_one('1, 64'd7);                            // -1 x 7
    check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check_one(64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff);
    check_one(64'h7fff_ffff_ffff_ffff, 64'h7fff_ffff_ffff_ffff);
    check_one(64'h6000_0000_0000_0000, 64'h5fff_ffff_ffff_ffff);
    check_one(64'd96, 64'd95);                       // tie rounds up, other rounds down
    check_one(64'd1024, 64'd3000);                   // power-of-two operand: exact
    check_one(-64'sd1024, 64'd3000);
    for (int k = 0; k < 63; k++) begin
      check_one(64'd1 << k, {$urandom, $urandom} >> $urandom_range(1, 63));
      check_one((64'd3 << k) >> 1, -(64'd3 << k) >> 1);
    end
    for (int i = 0; i < 5000; i++)
      check_one({$urandom, $urandom} >> $urandom_range(0, 62),
                ($urandom_range(0, 1) == 1) ? -({$urandom, $urandom} >> $urandom_range(1, 63))
                                            : ({$urandom, $urandom} >> $urandom_range(1, 63)));
    $display("mechanisms: round_up=%0d round_down=%0d zero_operand=%0d exact_pow2=%0d sign_set_negative=%0d",
             n_round_up, n_round_down, n_zero, n_exact, n_negative);
    if (n_round_up == 0 || n_round_down == 0 || n_zero == 0 || n_exact == 0 || n_negative == 0) begin
      failures++;
      $display("FAIL: a datapath mechanism was never exercised");
    end
    $display("mean relative error %f over %0d products", err_sum / real'(err_n), err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

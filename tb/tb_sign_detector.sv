// tb_sign_detector: self-checking test of the sign detector at N = 64.
// One instance in signed mode (the default) and one in unsigned mode. The
// reference forms the magnitude from a 65-bit signed extension of the
// operand and the sign from comparisons with zero.
module tb_sign_detector;
  localparam int unsigned N = 64;
  int checks = 0, failures = 0;

  logic [N-1:0] a, b, da_s, db_s, da_u, db_u;
  logic         sign_s, sign_u;

  sign_detector #(.N(N))                    dut_s (.a(a), .b(b), .data_a(da_s), .data_b(db_s), .sign(sign_s));
  sign_detector #(.N(N), .SIGNED_OPS(1'b0)) dut_u (.a(a), .b(b), .data_a(da_u), .data_b(db_u), .sign(sign_u));

  function automatic logic [N-1:0] ref_abs(logic [N-1:0] x);
    logic signed [N:0] s;
    s = $signed({x[N-1], x});
    if (s < 0) s = -s;
    return s[N-1:0];
  endfunction

  task automatic check_one(logic [N-1:0] x, logic [N-1:0] y);
    logic exp_sign;
    a = x; b = y; #1;
    exp_sign = ($signed(x) < 0) != ($signed(y) < 0);
    checks += 2;
    if (da_s !== ref_abs(x) || db_s !== ref_abs(y) || sign_s !== exp_sign) begin
      failures++;
      $display("FAIL signed a=%h b=%h: %h %h %0d", x, y, da_s, db_s, sign_s);
    end
    if (da_u !== x || db_u !== y || sign_u !== 1'b0) begin
      failures++;
      $display("FAIL unsigned a=%h b=%h", x, y);
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
    check_one('0, '0);
    check_one('1, 64'd1);
    check_one(64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff);
    check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check_one(64'h0000_0000_0000_aaff, 64'h0000_0000_0000_bbcc);
    check_one(-64'sd5, 64'd7);
    for (int i = 0; i < 2000; i++) check_one({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

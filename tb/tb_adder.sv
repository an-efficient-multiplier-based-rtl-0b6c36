// tb_adder: self-checking test of the W-bit adder.
// Directed carries across word boundaries and random operands at the
// default width (128 bits); the reference adds 32-bit words with an
// explicit ripple carry.
module tb_adder;
  localparam int unsigned W = 128;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, out;

  adder #(.W(W)) dut (.a(a), .b(b), .out(out));

  function automatic logic [W-1:0] ref_add(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r;
    logic [32:0]  t;
    int carry;
    carry = 0;
    for (int i = 0; i < W / 32; i++) begin
      t = {1'b0, x[32*i +: 32]} + {1'b0, y[32*i +: 32]} + 33'(carry);
      r[32*i +: 32] = t[31:0];
      carry = int'(t[32]);
    end
    return r;
  endfunction

  task automatic check_one(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y; #1;
    checks++;
    if (out !== ref_add(x, y)) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, out, ref_add(x, y));
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
    check_one('1, 1);
    check_one(128'h0000_0000_ffff_ffff_ffff_ffff_ffff_ffff, 1);
    check_one({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    for (int i = 0; i < 3000; i++)
      check_one({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

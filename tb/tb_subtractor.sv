// tb_subtractor: self-checking test of the W-bit subtractor.
// Drives directed corner values and random operands at the default width
// (128 bits) and at 8 bits, comparing against a - b computed in the bench
// from 32-bit unsigned pieces, so the reference does not reuse the
// module's single-expression subtraction.
module tb_subtractor;
  localparam int unsigned W = 128;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, out;
  logic [7:0]   a8, b8, out8;

  subtractor #(.W(W)) dut   (.a(a),  .b(b),  .out(out));
  subtractor #(.W(8)) dut8  (.a(a8), .b(b8), .out(out8));

  // reference: ripple borrow over 32-bit words
  function automatic logic [W-1:0] ref_sub(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r;
    logic [32:0]  t;
    int borrow;
    borrow = 0;
    for (int i = 0; i < W / 32; i++) begin
      t = {1'b0, x[32*i +: 32]} - {1'b0, y[32*i +: 32]} - 33'(borrow);
      r[32*i +: 32] = t[31:0];
      borrow = int'(t[32]);
    end
    return r;
  endfunction

  task automatic check_one(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y; #1;
    checks++;
    if (out !== ref_sub(x, y)) begin
      failures++;
      $display("FAIL %h - %h = %h, expected %h", x, y, out, ref_sub(x, y));
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
    check_one('0, 1);
    check_one(1, '0);
    check_one('1, '1);
    check_one({1'b1, {(W-1){1'b0}}}, 1);
    check_one(128'h0000_0000_0000_0001_0000_0000_0000_0000, 128'h1);
    for (int i = 0; i < 2000; i++)
      check_one({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y += 7) begin
        a8 = 8'(x); b8 = 8'(y); #1;
        checks++;
        if (out8 !== 8'((x - y) & 255)) begin
          failures++;
          $display("FAIL8 %0d - %0d = %0d", x, y, out8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

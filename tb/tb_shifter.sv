// tb_shifter: self-checking test of the power-of-two shifter.
// Uses the multiplier's three configurations at N = 64: a 64-bit and a
// 65-bit value shifted into 128 bits by 0..64. The reference multiplies by
// 2**amt through repeated doubling (addition), with truncation to 128 bits.
// With the enable low the output must be zero.
module tb_shifter;
  localparam int unsigned WO = 128;
  localparam int unsigned SW = 7;
  int checks = 0, failures = 0;

  logic [63:0]    din64;
  logic [64:0]    din65;
  logic [SW-1:0]  amt;
  logic           en;
  logic [WO-1:0]  dout64, dout65;

  shifter #(.WI(64), .WO(WO), .SW(SW)) dut64 (.din(din64), .amt(amt), .en(en), .dout(dout64));
  shifter #(.WI(65), .WO(WO), .SW(SW)) dut65 (.din(din65), .amt(amt), .en(en), .dout(dout65));

  function automatic logic [WO-1:0] ref_mul_pow2(logic [WO-1:0] x, int k);
    logic [WO-1:0] r;
    r = x;
    for (int i = 0; i < k; i++) r = r + r;
    return r;
  endfunction

  task automatic check_one(logic [64:0] x, int k, logic e);
    logic [WO-1:0] exp64, exp65;
    din64 = x[63:0]; din65 = x; amt = SW'(k); en = e; #1;
    exp64 = e ? ref_mul_pow2({64'd0, x[63:0]}, k) : '0;
    exp65 = e ? ref_mul_pow2({63'd0, x}, k) : '0;
    checks += 2;
    if (dout64 !== exp64) begin
      failures++;
      $display("FAIL64 %h << %0d en=%0d: %h, expected %h", x[63:0], k, e, dout64, exp64);
    end
    if (dout65 !== exp65) begin
      failures++;
      $display("FAIL65 %h << %0d en=%0d: %h, expected %h", x, k, e, dout65, exp65);
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
    for (int k = 0; k <= 64; k++) begin
      check_one({1'b1, 64'hffff_ffff_ffff_ffff}, k, 1'b1);
      check_one(65'd1, k, 1'b1);
      check_one({1'b0, $urandom, $urandom}, k, 1'b1);
      check_one({1'($urandom), $urandom, $urandom}, k, 1'b0);
    end
    for (int i = 0; i < 1000; i++)
      check_one({1'($urandom), $urandom, $urandom}, int'($urandom_range(0, 64)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

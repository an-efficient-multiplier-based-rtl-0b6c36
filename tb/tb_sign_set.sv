// tb_sign_set: self-checking test of sign_set at the default 128-bit width.
// With sign = 0 the output must equal the magnitude; with sign = 1 the sum
// of output and magnitude must be zero modulo 2**128.
module tb_sign_set;
  localparam int unsigned W = 128;
  int checks = 0, failures = 0;

  logic [W-1:0] mag, out;
  logic         sign;

  sign_set #(.W(W)) dut (.mag(mag), .sign(sign), .out(out));

  task automatic check_one(logic [W-1:0] m, logic s);
    logic [W-1:0] sum;
    mag = m; sign = s; #1;
    checks++;
    sum = out + m;
    if (s ? (sum !== '0) : (out !== m)) begin
      failures++;
      $display("FAIL sign=%0d mag=%h out=%h", s, m, out);
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
    check_one('0, 1'b0);
    check_one('0, 1'b1);
    check_one(1, 1'b1);
    check_one({1'b1, {(W-1){1'b0}}}, 1'b1);
    for (int i = 0; i < 2000; i++)
      check_one({$urandom, $urandom, $urandom, $urandom}, 1'($urandom));
    // a known value: -5 in two's complement ends in hex ...fffb
    mag = 128'd5; sign = 1'b1; #1;
    checks++;
    if (out !== {{(W-4){1'b1}}, 4'hb}) begin
      failures++;
      $display("FAIL -5 = %h", out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

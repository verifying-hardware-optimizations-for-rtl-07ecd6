// tb_int32Mult: self-checking test of the 32-bit multiplier primitive.
// Applies corner operands (0, 1, all ones, powers of two) and random pairs,
// and compares C with the low word of a 64-bit product computed here.
module tb_int32Mult;
  import covoh_pkg::*;

  word_t a, b, c;
  int checks = 0, failures = 0;

  int32Mult dut (.A(a), .B(b), .C(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t x, input word_t y);
    longint unsigned full;
    a = x; b = y;
    #1;
    full = longint'(x) * longint'(y);
    checks++;
    if (c !== full[31:0]) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, c, full[31:0]);
    end
  endtask

  initial begin
    check(0, 0);
    check(1, 32'hdead_beef);
    check(32'hffff_ffff, 32'hffff_ffff);
    check(32'h0001_0000, 32'h0001_0000);
    check(3, 7);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    for (int i = 0; i < 100; i++) check($urandom & 32'hffff, $urandom & 32'hff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mac: self-checking test of the multiply-accumulate block.
// sum must equal addend + fac_a * fac_b modulo 2^32; the reference is
// computed here with 64-bit arithmetic.
module tb_mac;
  import covoh_pkg::*;

  word_t addend, fa, fb, sum;
  int checks = 0, failures = 0;

  mac dut (.addend(addend), .fac_a(fa), .fac_b(fb), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t n, input word_t x, input word_t y);
    longint unsigned full;
    addend = n; fa = x; fb = y;
    #1;
    full = longint'(n) + longint'(x) * longint'(y);
    checks++;
    if (sum !== full[31:0]) begin
      failures++;
      $display("FAIL %h + %h * %h = %h, expected %h", n, x, y, sum, full[31:0]);
    end
  endtask

  initial begin
    check(0, 0, 0);
    check(5, 0, 9);
    check(5, 9, 0);
    check(2, 3, 4);
    check(32'hffff_ffff, 1, 1);
    for (int i = 0; i < 500; i++) check($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

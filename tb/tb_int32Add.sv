// tb_int32Add: self-checking test of the 32-bit adder primitive.
// Corner operands (carry out of bit 31 must be dropped) and random pairs are
// compared with a 33-bit sum computed here.
module tb_int32Add;
  import covoh_pkg::*;

  word_t a, b, c;
  int checks = 0, failures = 0;

  int32Add dut (.A(a), .B(b), .C(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t x, input word_t y);
    logic [32:0] full;
    a = x; b = y;
    #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (c !== full[31:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, c, full[31:0]);
    end
  endtask

  initial begin
    check(0, 0);
    check(32'hffff_ffff, 1);
    check(32'h8000_0000, 32'h8000_0000);
    check(12, 30);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

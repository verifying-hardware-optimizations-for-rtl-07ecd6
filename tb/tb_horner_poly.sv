// tb_horner_poly: self-checking test of the Horner polynomial evaluator.
// The reference evaluates the polynomial term by term, sum of a[i] * x^i with
// explicit powers (the unoptimized form), modulo 2^32. Tested: the default
// cubic, including the small worked example and random operands, and a
// degree-6 instance.
module tb_horner_poly;
  import covoh_pkg::*;

  localparam int N3 = 3;
  localparam int N6 = 6;

  word_t x3, y3, x6, y6;
  word_t [N3:0] a3;
  word_t [N6:0] a6;
  int checks = 0, failures = 0;

  horner_poly               u3 (.x(x3), .a(a3), .y(y3));
  horner_poly #(.N(N6))     u6 (.x(x6), .a(a6), .y(y6));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t power_form(word_t x, word_t c[], int n);
    word_t s = 0;
    for (int i = 0; i <= n; i++) begin
      word_t p = 1;
      for (int k = 0; k < i; k++) p = p * x;
      s = s + c[i] * p;
    end
    return s;
  endfunction

  task automatic run3(word_t x, word_t c0, word_t c1, word_t c2, word_t c3);
    word_t c[] = new[4];
    c[0] = c0; c[1] = c1; c[2] = c2; c[3] = c3;
    x3 = x; a3 = {c3, c2, c1, c0};
    #1;
    checks++;
    if (y3 !== power_form(x, c, 3)) begin
      failures++;
      $display("FAIL cubic x=%0d -> %0d expected %0d", x, y3, power_form(x, c, 3));
    end
  endtask

  initial begin
    word_t c[] = new[N6 + 1];
    // 1 + 2x + 3x^2 + 4x^3 at x = 2: 1 + 4 + 12 + 32 = 49
    run3(2, 1, 2, 3, 4);
    checks++;
    if (y3 !== 49) begin failures++; $display("FAIL worked example %0d", y3); end
    run3(0, 7, 5, 3, 1);
    run3(1, 7, 5, 3, 1);
    for (int i = 0; i < 300; i++) run3($urandom % 50, $urandom % 100, $urandom % 100, $urandom % 100, $urandom % 100);
    for (int i = 0; i < 300; i++) run3($urandom, $urandom, $urandom, $urandom, $urandom);
    for (int i = 0; i < 300; i++) begin
      x6 = $urandom;
      for (int k = 0; k <= N6; k++) begin c[k] = $urandom; a6[k] = c[k]; end
      #1;
      checks++;
      if (y6 !== power_form(x6, c, N6)) begin
        failures++;
        $display("FAIL degree 6 x=%h -> %h expected %h", x6, y6, power_form(x6, c, N6));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_avionics_monitor: self-checking test of the sliding-window monitor.
//
// Multiplier instances with every window from 2 to 256 samples (N = 1 to 7,
// and the default 8 as its own instance) and adder instances with windows of 8 and 256 see the same
// random stream. The reference keeps the whole input history
// and multiplies the last 2^N samples one after another, the direct
// (2^N - 1 operator) form, taking missing samples before the first one as
// the identity (1 for products, 0 for sums).
// Outputs are checked every cycle after the new sample is applied, since
// the monitor is combinational from x to y. Samples are drawn from small
// odd numbers part of the time so that products do not collapse to zero.
module tb_avionics_monitor;
  import covoh_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  word_t x = 1;
  word_t y1, y4, y8, s3, s8;
  word_t hist [$];
  int checks = 0, failures = 0;

  word_t ys [1:7];              // ys[n]: multiplier, window 2^n

  for (genvar n = 1; n <= 7; n++) begin : g_sweep
    avionics_monitor #(.N(n)) u_m (.clk, .rst_n, .x, .y(ys[n]));
  end
  assign y1 = ys[1];
  assign y4 = ys[4];
  avionics_monitor          u8 (.clk, .rst_n, .x, .y(y8));
  avionics_monitor #(.N(3), .S_OP(S_ADD)) a3 (.clk, .rst_n, .x, .y(s3));
  avionics_monitor #(.N(8), .S_OP(S_ADD)) a8 (.clk, .rst_n, .x, .y(s8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t window_product(int m);
    word_t p = 1;
    for (int k = 0; k < m; k++) begin
      int idx = hist.size() - 1 - k;
      if (idx >= 0) p = p * hist[idx];
    end
    return p;
  endfunction

  function automatic word_t window_sum(int m);
    word_t s = 0;
    for (int k = 0; k < m; k++) begin
      int idx = hist.size() - 1 - k;
      if (idx >= 0) s = s + hist[idx];
    end
    return s;
  endfunction

  task automatic chk(string name, word_t got, int m);
    checks++;
    if (got !== window_product(m)) begin
      failures++;
      $display("FAIL %s cycle %0d: got %h expected %h", name, hist.size(), got, window_product(m));
    end
  endtask

  task automatic chk_sum(string name, word_t got, int m);
    checks++;
    if (got !== window_sum(m)) begin
      failures++;
      $display("FAIL %s cycle %0d: got %h expected %h", name, hist.size(), got, window_sum(m));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      rst_n = 1'b1;   // released together with the first sample
      if (t % 3 == 0) x = $urandom;
      else            x = ($urandom % 8) * 2 + 1;
      hist.push_back(x);
      #1;
      chk("window2",   y1, 2);
      chk("window16",  y4, 16);
      for (int n = 2; n <= 7; n++) if (n != 4) chk($sformatf("window%0d", 1 << n), ys[n], 1 << n);
      chk("window256", y8, 256);
      chk_sum("sum8",   s3, 8);
      chk_sum("sum256", s8, 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

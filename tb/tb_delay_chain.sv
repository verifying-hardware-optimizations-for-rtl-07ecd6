// tb_delay_chain: self-checking test of the delay element chain.
// Three chains (DEPTH 0, 1 and 5) are fed the same random stream. Each output
// is compared, every cycle, with the input DEPTH cycles earlier; before that
// many cycles have passed since reset it must show the reset value.
module tb_delay_chain;
  localparam int W = 16;
  localparam logic [W-1:0] RV = 16'h00a5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [W-1:0] din = '0;
  logic [W-1:0] d0, d1, d5;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_chain #(.W(W), .DEPTH(0), .RESET_VAL(RV)) u0 (.clk, .rst_n, .din, .dout(d0));
  delay_chain #(.W(W), .DEPTH(1), .RESET_VAL(RV)) u1 (.clk, .rst_n, .din, .dout(d1));
  delay_chain #(.W(W), .DEPTH(5), .RESET_VAL(RV)) u5 (.clk, .rst_n, .din, .dout(d5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] past(int d);
    // value applied d cycles before the newest one, reset value if none
    int idx = hist.size() - 1 - d;
    return (idx < 0) ? RV : hist[idx];
  endfunction

  task automatic expect_eq(string name, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d: got %h expected %h", name, hist.size(), got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      rst_n = 1'b1;   // released together with the first sample
      din = W'($urandom);
      hist.push_back(din);
      #1;
      expect_eq("depth0", d0, past(0));
      expect_eq("depth1", d1, past(1));
      expect_eq("depth5", d5, past(5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

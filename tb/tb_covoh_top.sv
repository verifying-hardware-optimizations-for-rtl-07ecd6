// tb_covoh_top: end-to-end test of the top level at its default sizes
// (cubic Horner evaluator, 128-block XOR reduction in 128 pipeline levels,
// 256-sample multiplier monitor).
//
// Every cycle all three datapaths get new random operands. The references are
// written independently of the RTL structure: the polynomial in power form,
// the XOR of all reduction operands captured exactly RDR_K edges earlier, and
// the product of the last 256 monitor samples taken one by one. The test
// counts each behaviour the designs are built around and fails if one never
// occurs: Horner evaluations, pipelined reduction results emerging after
// the full pipeline latency, monitor outputs over a partially filled window
// (right after reset) and over a full sliding window.
module tb_covoh_top;
  import covoh_pkg::*;

  localparam int HN = 3;
  localparam int RN = 128;
  localparam int RK = 128;
  localparam int MW = 256;   // monitor window, 2^8

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  word_t horner_x = '0;
  word_t [HN:0] horner_a = '0;
  word_t horner_y;
  logic [RN-1:0] rdr_a = '0;
  logic rdr_b = 1'b0;
  logic rdr_y;
  word_t mon_x = 1;
  word_t mon_y;

  logic  rdr_hist [$];       // reference reduction of each captured operand set
  word_t mon_hist [$];
  int checks = 0, failures = 0;
  int n_horner = 0, n_pipe_results = 0, n_window_filling = 0, n_window_full = 0;

  covoh_top dut (
    .clk, .rst_n,
    .horner_x, .horner_a, .horner_y,
    .rdr_a, .rdr_b, .rdr_y,
    .mon_x, .mon_y
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string name, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", name, $time, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      // reduction: record what was captured on the edge just passed
      if (t == 0) rst_n = 1'b1;
      else        rdr_hist.push_back((^rdr_a) ^ rdr_b);

      // monitor: apply a sample, check the same cycle
      mon_x = (t % 4 == 0) ? $urandom : (($urandom % 8) * 2 + 1);
      mon_hist.push_back(mon_x);

      // polynomial: new operands
      horner_x = (t % 2 == 0) ? ($urandom % 20) : $urandom;
      for (int i = 0; i <= HN; i++) horner_a[i] = $urandom;
      #1;

      begin : chk_horner
        word_t s, p;
        s = 0;
        p = 1;
        for (int i = 0; i <= HN; i++) begin
          s = s + horner_a[i] * p;
          p = p * horner_x;
        end
        expect_eq("horner", horner_y, s);
        n_horner++;
      end

      begin : chk_mon
        word_t p;
        p = 1;
        for (int k = 0; k < MW && k < mon_hist.size(); k++)
          p = p * mon_hist[mon_hist.size() - 1 - k];
        expect_eq("monitor", mon_y, p);
        if (mon_hist.size() < MW) n_window_filling++;
        else                      n_window_full++;
      end

      if (rdr_hist.size() >= RK) begin
        expect_eq("reduction", word_t'(rdr_y), word_t'(rdr_hist[rdr_hist.size() - RK]));
        n_pipe_results++;
      end

      for (int i = 0; i < RN / 32; i++) rdr_a[i*32 +: 32] = $urandom;
      rdr_b = 1'($urandom);
    end

    $display("horner evaluations %0d, pipelined reductions %0d, monitor filling %0d, monitor full window %0d",
             n_horner, n_pipe_results, n_window_filling, n_window_full);
    if (n_horner == 0)         begin failures++; $display("FAIL no Horner evaluation"); end
    if (n_pipe_results == 0)   begin failures++; $display("FAIL no pipelined reduction result"); end
    if (n_window_filling == 0) begin failures++; $display("FAIL no partial monitor window"); end
    if (n_window_full == 0)    begin failures++; $display("FAIL no full monitor window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

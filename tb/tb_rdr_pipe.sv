// tb_rdr_pipe: self-checking test of the partially pipelined XOR reduction.
//
// Several instances with different cluster counts K (1 = unpipelined,
// K = N = fully pipelined, and in between), with and without the latency
// padding chain, the full-size 128-block reduction at every power-of-two
// cluster count from 1 to 128, and one multi-bit element instance, are fed the same new random operands every cycle. Each output is
// compared with XOR-reducing, here, the operands applied exactly "latency"
// cycles earlier, where latency is K (or N with the padding chain). That
// checks the function, the one-result-per-cycle throughput and the latency.
module tb_rdr_pipe;
  localparam int AW = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [AW-1:0] a = '0;
  logic [3:0]    b = '0;
  logic [AW-1:0] a_hist [$];
  logic [3:0]    b_hist [$];
  int checks = 0, failures = 0;

  logic y_8_1, y_8_2, y_8_4, y_8_8, y_8_2p, y_128_128;
  logic [7:0] y_128;            // y_128[j]: N = 128, K = 2^j
  logic [3:0] y_16_4w;

  rdr_pipe #(.N(8), .K(1))                    u_8_1   (.clk, .rst_n, .a(a[7:0]), .b(b[0]), .y(y_8_1));
  rdr_pipe #(.N(8), .K(2))                    u_8_2   (.clk, .rst_n, .a(a[7:0]), .b(b[0]), .y(y_8_2));
  rdr_pipe #(.N(8), .K(4))                    u_8_4   (.clk, .rst_n, .a(a[7:0]), .b(b[0]), .y(y_8_4));
  rdr_pipe #(.N(8), .K(8))                    u_8_8   (.clk, .rst_n, .a(a[7:0]), .b(b[0]), .y(y_8_8));
  rdr_pipe #(.N(8), .K(2), .OUT_CHAIN(1'b1))  u_8_2p  (.clk, .rst_n, .a(a[7:0]), .b(b[0]), .y(y_8_2p));
  rdr_pipe                                    u_128   (.clk, .rst_n, .a(a[127:0]), .b(b[0]), .y(y_128_128));
  for (genvar j = 0; j < 8; j++) begin : g_sweep
    rdr_pipe #(.N(128), .K(2**j)) u_sweep (.clk, .rst_n, .a(a[127:0]), .b(b[0]), .y(y_128[j]));
  end
  rdr_pipe #(.N(16), .K(4), .W(4))            u_16_4w (.clk, .rst_n, .a(a[63:0]), .b(b), .y(y_16_4w));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: XOR of the n elements of width w and the seed captured lat
  // clock edges ago. The newest history entry was captured on the edge just
  // passed, so it is the one a latency-1 design shows now.
  function automatic logic [3:0] ref_red(int n, int w, int lat);
    int idx = a_hist.size() - lat;
    logic [3:0] r;
    logic [3:0] mask = 4'((1 << w) - 1);
    r = b_hist[idx] & mask;
    for (int i = 0; i < n; i++) r ^= 4'(a_hist[idx] >> (i * w)) & mask;
    return r;
  endfunction

  task automatic chk(string name, logic [3:0] got, int n, int w, int lat);
    if (a_hist.size() - lat < 0) return;
    checks++;
    if (got !== ref_red(n, w, lat)) begin
      failures++;
      $display("FAIL %s cycle %0d: got %h expected %h", name, a_hist.size(), got, ref_red(n, w, lat));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // record the operands captured on the edge just passed, check the
      // outputs, then apply the next operands
      a_hist.push_back(a);
      b_hist.push_back(b);
      #1;
      chk("N8K1",     {3'b0, y_8_1},     8,   1, 1);
      chk("N8K2",     {3'b0, y_8_2},     8,   1, 2);
      chk("N8K4",     {3'b0, y_8_4},     8,   1, 4);
      chk("N8K8",     {3'b0, y_8_8},     8,   1, 8);
      chk("N8K2pad",  {3'b0, y_8_2p},    8,   1, 8);
      chk("N128K128", {3'b0, y_128_128}, 128, 1, 128);
      for (int j = 0; j < 8; j++)
        chk($sformatf("N128K%0d", 1 << j), {3'b0, y_128[j]}, 128, 1, 1 << j);
      chk("N16K4W4",  y_16_4w,           16,  4, 4);
      for (int i = 0; i < AW / 32; i++) a[i*32 +: 32] = $urandom;
      b = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rdr_pipe: right reduction of N two-input XOR blocks, partially pipelined
// into K clusters.
//
// Function. With inputs a[0..N-1] and seed b, the reduction is
//
//     y = a[0] ^ (a[1] ^ (... ^ (a[N-1] ^ b)))
//
// evaluated as a column of N 2-input-1-output blocks: the seed enters the top
// block together with a[N-1], and each block's output feeds the next block
// down, which adds the next lower element.
//
// Pipelining. The column is cut into K clusters of N/K consecutive blocks,
// counted from the top (cluster 0 holds a[N-1] .. a[N-N/K]). A register
// follows every cluster, so the running value reaches cluster c c cycles
// after it entered. The elements of cluster c are therefore delayed by c
// cycles before they are combined (a skewed "triangle" of input delays,
// 0 + 1 + ... + (K-1) stages per element position). This is the retiming
// that Horner's Rule licenses when both of its side blocks are delays:
//   K = 1  one combinational chain of N blocks and one output register;
//   K = N  fully pipelined, one block per stage.
// All operands of one reduction are applied in the same cycle, and the
// result appears K cycles later (throughput one reduction per cycle).
//
// OUT_CHAIN = 1 adds N-K further output delays so that every K gives the same
// latency N and the designs are cycle-for-cycle interchangeable; the default
// drops that chain for the lowest latency. Both variants follow the document;
// the default choice and the reset (all registers cleared, asynchronously,
// active low) are this implementation's. K must divide N.
//
// Ports:  clk, rst_n  clock and asynchronous active-low reset
//         a           N elements of W bits, a[i] is element i
//         b           seed of the reduction
//         y           result, valid K cycles (N with OUT_CHAIN) after a, b
module rdr_pipe #(
  parameter int unsigned N         = 128,  // number of XOR blocks
  parameter int unsigned K         = 128,  // number of clusters (pipeline levels)
  parameter int unsigned W         = 1,    // bit width of one element
  parameter bit          OUT_CHAIN = 1'b0  // pad the latency to N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][W-1:0]  a,
  input  logic [W-1:0]         b,
  output logic [W-1:0]         y
);

  localparam int unsigned C = N / K;       // blocks per cluster

  initial begin
    assert (K >= 1 && K <= N && (N % K) == 0)
      else $error("rdr_pipe: K=%0d must divide N=%0d", K, N);
  end

  // chain[c] is the running value entering cluster c (chain[0] = seed);
  // chain[c+1] is the register after cluster c.
  logic [K:0][W-1:0] chain;
  assign chain[0] = b;

  for (genvar c = 0; c < int'(K); c++) begin : g_cluster
    // Element a[N-1-c*C-j] is the j-th block of cluster c; delay it c cycles.
    logic [C-1:0][W-1:0] a_skew;
    logic [W-1:0]        comb_out;

    for (genvar j = 0; j < int'(C); j++) begin : g_elem
      delay_chain #(.W(W), .DEPTH(c)) u_skew (
        .clk  (clk),
        .rst_n(rst_n),
        .din  (a[N-1-c*C-j]),
        .dout (a_skew[j])
      );
    end

    // The C blocks of the cluster, one after another.
    always_comb begin
      comb_out = chain[c];
      for (int j = 0; j < int'(C); j++) comb_out = a_skew[j] ^ comb_out;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chain[c+1] <= '0;
      else        chain[c+1] <= comb_out;
    end
  end

  delay_chain #(.W(W), .DEPTH(OUT_CHAIN ? N - K : 0)) u_out_chain (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (chain[K]),
    .dout (y)
  );

endmodule : rdr_pipe

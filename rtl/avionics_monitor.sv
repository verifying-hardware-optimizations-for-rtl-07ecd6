// avionics_monitor: sliding-window monitor over the last 2^N samples, built
// with N operator blocks.
//
// Function. For the input stream x(t) the output is
//
//     y(t) = x(t) S x(t-1) S ... S x(t - 2^N + 1)
//
// where S is an associative two-input operator: by default (S_OP = S_MUL) the
// 32-bit unsigned multiplier, products wrapping modulo 2^32; S_OP = S_ADD
// selects the 32-bit adder, giving a running sum over the window. A direct implementation needs
// 2^N - 1 operator blocks along a delay line; this one uses the logarithmic
// doubling recurrence
//
//     y_0 = x,   y_{i+1}(t) = y_i(t) S y_i(t - 2^i),   y = y_N
//
// i.e. level i forks its input, delays one branch by 2^i cycles and combines
// the two with S. Level i therefore holds a window of 2^(i+1) samples; N
// operator blocks and 2^N - 1 word registers in total. The restructuring is
// valid for any associative S; only the two operators above are provided.
//
// Timing. The operators are combinational, so y(t) depends on x(t) in the
// same cycle; the only registers are the delay chains. After reset the
// window is treated as filled with the identity of S (1 for the product, 0
// for the sum), the reset value of every delay register and this
// implementation's choice, so during the first 2^N - 1 cycles y combines
// just the samples seen so far. Reset is asynchronous, active low.
//
// Ports:  clk, rst_n  clock and asynchronous active-low reset
//         x           input sample (32 bit), one per cycle
//         y           S over the last 2^N samples including x (32 bit)
//
// Timing note: one multiplier per level in series, so the combinational path
// from x to y passes N operator blocks.
module avionics_monitor
  import covoh_pkg::*;
#(
  parameter int unsigned N    = 8,      // window 2^N samples, N operator blocks
  parameter s_op_e       S_OP = S_MUL   // associative operator S
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t x,
  output word_t y
);

  localparam word_t S_IDENTITY = s_identity(S_OP);

  word_t [N:0] lvl;                     // lvl[i] = y_i
  assign lvl[0] = x;

  for (genvar i = 0; i < int'(N); i++) begin : g_level
    word_t delayed;

    delay_chain #(.W(WORD_W), .DEPTH(2**i), .RESET_VAL(S_IDENTITY)) u_delay (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (lvl[i]),
      .dout (delayed)
    );

    if (S_OP == S_MUL) begin : g_mul
      int32Mult u_s (.A(lvl[i]), .B(delayed), .C(lvl[i+1]));
    end else begin : g_add
      int32Add  u_s (.A(lvl[i]), .B(delayed), .C(lvl[i+1]));
    end
  end

  assign y = lvl[N];

endmodule : avionics_monitor

// horner_poly: polynomial evaluation by Horner's Rule.
//
// Evaluates  y = a[0] + a[1] x + a[2] x^2 + ... + a[N] x^N  in the nested form
//
//     y = a[0] + x (a[1] + x (a[2] + ... + x (a[N-1] + x a[N])))
//
// which needs N multiplications instead of the N(N+1)/2 of the term-by-term
// (triangular) form. Structurally it is a right reduction over the
// coefficient vector a[0..N-1] whose seed is the leading coefficient a[N];
// each reduction step is one multiply-accumulate block with the running value
// in the "multiply by x" path (snd (mult x) ; add):
//
//     acc_N = a[N];   acc_i = a[i] + x * acc_{i+1};   y = acc_0
//
// The default N = 3 is the cubic used as the worked example. Arithmetic is
// 32-bit unsigned and wraps modulo 2^32 (the word width is this
// implementation's choice, shared with the other integer datapaths).
// Combinational: y follows x and a within the same cycle, no clock.
//
// Ports:  x   evaluation point        a   coefficients, a[i] multiplies x^i
//         y   polynomial value
module horner_poly
  import covoh_pkg::*;
#(
  parameter int unsigned N = 3      // polynomial degree, number of mac stages
) (
  input  word_t         x,
  input  word_t [N:0]   a,
  output word_t         y
);

  // acc[i] is the running value entering the stage that adds a[i-1];
  // acc[N] is the seed a[N].
  word_t [N:0] acc;

  assign acc[N] = a[N];

  for (genvar i = 0; i < int'(N); i++) begin : g_stage
    mac u_mac (
      .addend(a[i]),
      .fac_a (x),
      .fac_b (acc[i+1]),
      .sum   (acc[i])
    );
  end

  assign y = acc[0];

endmodule : horner_poly

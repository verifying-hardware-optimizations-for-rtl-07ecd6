// int32Add: 32-bit unsigned adder primitive, C = A + B (mod 2^32).
//
// The library two-input adder (ADD2 at integer level). The carry out of bit
// 31 is dropped so the block maps a pair of words to a word. Purely
// combinational, no clock.
//
// Ports:  A, B  operands (32 bit)   C  low word of A+B (32 bit)
module int32Add
  import covoh_pkg::*;
(
  input  word_t A,
  input  word_t B,
  output word_t C
);

  always_comb C = A + B;

endmodule : int32Add

// int32Mult: 32-bit unsigned multiplier primitive, C = A * B (mod 2^32).
//
// This is the library multiplier used wherever a design needs a product: the
// "mult" half of the multiply-accumulate block and the associative operator S
// of the avionics monitor. Only the low 32 bits of the product are kept, so
// the block stays a word -> word operator that is associative and commutative
// (multiplication modulo 2^32), which is what the monitor's restructuring
// relies on. Purely combinational, no clock.
//
// Ports:  A, B  operands (32 bit)   C  low word of A*B (32 bit)
module int32Mult
  import covoh_pkg::*;
(
  input  word_t A,
  input  word_t B,
  output word_t C
);

  always_comb C = A * B;

endmodule : int32Mult

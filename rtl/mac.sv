// mac: multiply-accumulate block, "snd mult ; add".
//
// The block takes an addend and a pair of factors. The pair goes through the
// multiplier (the "snd mult" step acts on the second component only) and the
// product is then added to the addend:
//
//     sum = addend + fac_a * fac_b          (all mod 2^32)
//
// It is built structurally from one int32Mult and one int32Add, joined by the
// internal product word. Combinational, no clock. The structure follows the
// document; port names are this implementation's (the document numbers the
// nets: addend = n4, fac_a = n1, fac_b = n2, product = n3, sum = n5).
//
// In the Horner polynomial evaluator this is one stage: addend is the
// coefficient, fac_a the evaluation point x and fac_b the running value.
module mac
  import covoh_pkg::*;
(
  input  word_t addend,
  input  word_t fac_a,
  input  word_t fac_b,
  output word_t sum
);

  word_t product;

  int32Mult u_mult (.A(fac_a),  .B(fac_b),   .C(product));
  int32Add  u_add  (.A(addend), .B(product), .C(sum));

endmodule : mac

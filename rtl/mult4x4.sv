// 4x4 unsigned multiplier built around 4:2 compressors.
//
// The product is formed in the three classic levels: sixteen AND gates make
// the partial products, one reduction level of a half adder, three chained
// 4:2 compressors and a full adder brings every column down to at most two
// bits, and a short carry-propagating adder (one half adder, three full
// adders) sums the two rows. All adders and compressors are made of the
// XOR-XNOR module and 2:1 multiplexers. The three levels and the cells used
// in each column follow the design's dot diagram; the wiring of carries
// between columns is this implementation's choice (see pp_reduce).
//
// Interface: a, b (4 bits) in; p = a * b (8 bits) out. Purely combinational,
// no clock or reset: the product is valid one propagation delay after the
// operands settle.
module mult4x4
  import mult_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);

  pp_matrix_t pp;
  reduced_t   red;

  pp_gen u_pp_gen (
    .a (a),
    .b (b),
    .pp(pp)
  );

  pp_reduce u_pp_reduce (
    .pp (pp),
    .red(red)
  );

  final_adder u_final_adder (
    .red(red),
    .p  (p)
  );

endmodule

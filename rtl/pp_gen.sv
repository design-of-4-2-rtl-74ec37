// Partial product generation for the 4x4 multiplier.
//
// Sixteen AND gates combine the eight operand bits: pp[i][j] = a[i] & b[j],
// which has weight 2**(i+j). Combinational.
//
// Interface: a, b (4 bits each) in; pp (4x4 matrix of bits) out.
module pp_gen
  import mult_pkg::*;
(
  input  operand_t   a,
  input  operand_t   b,
  output pp_matrix_t pp
);

  always_comb begin
    for (int i = 0; i < OP_W; i++)
      for (int j = 0; j < OP_W; j++)
        pp[i][j] = a[i] & b[j];
  end

endmodule

// Shared types for the 4x4 compressor-based multiplier.
//
// The multiplier of this design works on 4-bit unsigned operands and yields an
// 8-bit product. Its partial products form a 4x4 matrix, indexed
// pp[i][j] = a[i] & b[j], so element (i, j) has weight 2**(i+j). After the
// reduction level every column 0..6 holds at most two bits: one in the "sum"
// row and, for columns 3..6, one in the "carry" row. The widths follow the
// 4x4 example the design is drawn for; they are not parameters because the
// placement of the adders and compressors is specific to that size.
package mult_pkg;

  localparam int unsigned OP_W   = 4;            // operand width
  localparam int unsigned PROD_W = 2 * OP_W;     // product width

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;

  // pp[i][j] = a[i] & b[j]
  typedef logic [OP_W-1:0][OP_W-1:0] pp_matrix_t;

  // Output of the reduction level: two rows that the final adder sums.
  typedef struct packed {
    logic [6:0] sum_row;    // one bit in each of columns 0..6
    logic [6:3] carry_row;  // second bit of columns 3..6
  } reduced_t;

endpackage

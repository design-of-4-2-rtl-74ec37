// Partial product reduction level of the 4x4 multiplier.
//
// Brings the sixteen partial products down to at most two bits per column
// in one level, using one half adder, three 4:2 compressors and one full
// adder, placed column by column (column k holds bits of weight 2**k):
//
//   col 0  a0b0                         -> passes straight down
//   col 1  a0b1 a1b0                    -> half adder
//   col 2  a0b2 a1b1 a2b0 + HA carry    -> 4:2 compressor, cin = 0
//   col 3  a0b3 a1b2 a2b1 a3b0          -> 4:2 compressor, cin = cout of col 2
//   col 4  a1b3 a2b2 a3b1 (x4 = 0)      -> 4:2 compressor, cin = cout of col 3
//   col 5  a2b3 a3b2 + cout of col 4    -> full adder
//   col 6  a3b3                         -> passes straight down
//
// The cell in each column and the number of bits each column leaves for the
// final adder (1,1,1,2,2,2,2 for columns 0..6) follow the multiplier's
// dot diagram. Where each carry goes is this design's choice, made so those
// bit counts come out: a compressor's cout feeds cin of the next column's
// cell, and its carry is left as the second bit of the next column.
//
// Interface: pp (pp[i][j] = a[i] & b[j]) in; red.sum_row[6:0] and
// red.carry_row[6:3] out. Combinational; cout chains one cell deep per
// column, never along the row, because cout does not depend on cin.
module pp_reduce
  import mult_pkg::*;
(
  input  pp_matrix_t pp,
  output reduced_t   red
);

  logic ha1_c;
  logic c2_carry, c2_cout;
  logic c3_carry, c3_cout;
  logic c4_carry, c4_cout;
  logic fa5_c;

  // column 0
  always_comb red.sum_row[0] = pp[0][0];

  // column 1
  half_adder u_ha_c1 (
    .a(pp[0][1]),
    .b(pp[1][0]),
    .s(red.sum_row[1]),
    .c(ha1_c)
  );

  // column 2
  compressor_4_2 u_cmp_c2 (
    .x1   (pp[0][2]),
    .x2   (pp[1][1]),
    .x3   (pp[2][0]),
    .x4   (ha1_c),
    .cin  (1'b0),
    .sum  (red.sum_row[2]),
    .carry(c2_carry),
    .cout (c2_cout)
  );

  // column 3
  compressor_4_2 u_cmp_c3 (
    .x1   (pp[0][3]),
    .x2   (pp[1][2]),
    .x3   (pp[2][1]),
    .x4   (pp[3][0]),
    .cin  (c2_cout),
    .sum  (red.sum_row[3]),
    .carry(c3_carry),
    .cout (c3_cout)
  );

  // column 4
  compressor_4_2 u_cmp_c4 (
    .x1   (pp[1][3]),
    .x2   (pp[2][2]),
    .x3   (pp[3][1]),
    .x4   (1'b0),
    .cin  (c3_cout),
    .sum  (red.sum_row[4]),
    .carry(c4_carry),
    .cout (c4_cout)
  );

  // column 5
  full_adder u_fa_c5 (
    .a   (pp[2][3]),
    .b   (pp[3][2]),
    .cin (c4_cout),
    .s   (red.sum_row[5]),
    .cout(fa5_c)
  );

  // column 6
  always_comb red.sum_row[6] = pp[3][3];

  // second bits of columns 3..6
  always_comb red.carry_row = {fa5_c, c4_carry, c3_carry, c2_carry};

endmodule

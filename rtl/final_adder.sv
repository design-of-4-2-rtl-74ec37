// Final carry-propagating addition of the 4x4 multiplier.
//
// After reduction, columns 0..2 hold one bit each and columns 3..6 hold two.
// Columns 0..2 are product bits directly. Column 3 is added by a half adder,
// columns 4..6 by a ripple of full adders, and the carry out of column 6 is
// product bit 7. This is the only place in the multiplier where a carry runs
// across columns. The cell per column follows the multiplier's dot diagram.
//
// Interface: red (sum_row[6:0], carry_row[6:3]) in; p[7:0] out.
// Combinational; the critical path is the half adder plus three full adders.
module final_adder
  import mult_pkg::*;
(
  input  reduced_t red,
  output product_t p
);

  logic [7:4] c;   // c[k] is the carry into column k

  always_comb p[2:0] = red.sum_row[2:0];

  half_adder u_ha_c3 (
    .a(red.sum_row[3]),
    .b(red.carry_row[3]),
    .s(p[3]),
    .c(c[4])
  );

  for (genvar k = 4; k <= 6; k++) begin : g_fa
    full_adder u_fa (
      .a   (red.sum_row[k]),
      .b   (red.carry_row[k]),
      .cin (c[k]),
      .s   (p[k]),
      .cout(c[k+1])
    );
  end

  always_comb p[7] = c[7];

endmodule

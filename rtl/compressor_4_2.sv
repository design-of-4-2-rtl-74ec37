// 4:2 compressor made of two full adders in series.
//
// Adds five bits of the same weight, x1..x4 and cin, and returns
// sum (weight 1) plus two bits of weight 2, carry and cout:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// The first full adder adds x1, x2 and x3; its carry leaves the cell as
// cout, and its sum goes with x4 and cin into the second full adder, which
// yields carry and sum. Because cout depends only on x1, x2 and x3, a row of
// compressors can pass cout of one column into cin of the next column
// without any carry rippling along the row. The two-full-adder structure and
// the cout/cin chaining follow the design; the choice of which full adder
// takes x4 (the second one) follows its block drawing.
//
// Interface: x1..x4, cin in; sum, carry, cout out. Combinational; the cin
// path goes through the second full adder only.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s_mid;

  full_adder u_fa_top (
    .a   (x1),
    .b   (x2),
    .cin (x3),
    .s   (s_mid),
    .cout(cout)
  );

  full_adder u_fa_bot (
    .a   (s_mid),
    .b   (x4),
    .cin (cin),
    .s   (sum),
    .cout(carry)
  );

endmodule

// Full adder (3:2 compressor) built from one XOR-XNOR module and two 2:1
// multiplexers.
//
// The XOR-XNOR module forms d = a ^ b and its complement. The sum is
// d ^ cin, taken by a multiplexer that selects the XNOR output when cin is 1
// and the XOR output when cin is 0. The carry is selected by d: when a and b
// differ the carry equals cin, when they agree it equals a (= b). This is the
// usual XOR-XNOR-plus-MUX construction; the exact cell netlist is this
// design's choice, the use of these two cell kinds is the design's premise.
//
// Interface: a, b, cin in; s (weight 1) and cout (weight 2) out.
// Combinational; the path from cin to s and cout is a single multiplexer.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic d, dn;

  xor_xnor u_xx (
    .x1   (a),
    .x2   (b),
    .xo_r (d),
    .xn_or(dn)
  );

  // s = cin ? ~(a^b) : (a^b)
  mux2 u_sum_mux (
    .sel(cin),
    .d0 (d),
    .d1 (dn),
    .y  (s)
  );

  // cout = (a^b) ? cin : a
  mux2 u_carry_mux (
    .sel(d),
    .d0 (a),
    .d1 (cin),
    .y  (cout)
  );

endmodule

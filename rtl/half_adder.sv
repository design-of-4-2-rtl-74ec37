// Half adder: adds two bits of equal weight.
//
// The sum comes from the XOR output of the XOR-XNOR module; the carry is the
// AND of the two inputs. Using the XOR-XNOR cell here, and a plain AND for the
// carry, is this design's choice; only the role of the half adder in the
// multiplier's reduction is given.
//
// Interface: a, b in; s (weight 1) and c (weight 2) out. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  logic xnor_unused;

  xor_xnor u_xx (
    .x1   (a),
    .x2   (b),
    .xo_r (s),
    .xn_or(xnor_unused)
  );

  always_comb c = a & b;

endmodule

// Dual-output XOR-XNOR module.
//
// Produces both XOR and XNOR of its two inputs at once. Every adder and the
// 4:2 compressor of this design are built from this cell plus 2:1
// multiplexers: having the true and the complemented difference available at
// the same time lets a following multiplexer form a second XOR or XNOR
// without an inverter in the path. The cell is specified here by its logic
// function only; the transistor-level circuit (pass transistors plus
// full-swing restoring devices) is a physical-design matter that RTL does not
// capture.
//
// Interface: x1, x2 in; xo_r = x1 ^ x2, xn_or = ~(x1 ^ x2). Purely
// combinational, no clock.
module xor_xnor (
  input  logic x1,
  input  logic x2,
  output logic xo_r,
  output logic xn_or
);

  always_comb begin
    xo_r  = x1 ^ x2;
    xn_or = ~(x1 ^ x2);
  end

endmodule

// 2:1 multiplexer, the second kind of cell (next to the XOR-XNOR module) the
// adders and the 4:2 compressor are made of.
//
// y = sel ? d1 : d0. Purely combinational.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule

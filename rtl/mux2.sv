// 2:1 multiplexer, the building block of the MUX-based full adder.
// y follows d1 when sel is 1 and d0 when sel is 0. In the original circuit
// each such multiplexer is a two-transistor pass gate; at the logic level it
// is this plain selector. Purely combinational, no timing of its own.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule

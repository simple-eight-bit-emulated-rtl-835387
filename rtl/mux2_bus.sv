// mux2_bus: a W-bit 2:1 bus multiplexer, the building block of the
// multiplexer arrays of both example computers (each array there is eight
// one-bit 2:1 mux slices sharing one select line).
//
// y = sel ? in1 : in0, purely combinational.
module mux2_bus #(
  parameter int unsigned W = 8
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule

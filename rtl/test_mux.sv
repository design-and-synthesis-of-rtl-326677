// test_mux: multiplexer in front of the primary inputs of the circuit under
// test. In normal mode (`test_mode` low) the CUT sees its functional inputs
// `normal_in`; in test mode it sees the generated patterns `test_in`. Purely
// combinational. Its place in the BIST structure follows the design; its
// width follows the pattern generator.
module test_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             test_mode,
  input  logic [WIDTH-1:0] normal_in,
  input  logic [WIDTH-1:0] test_in,
  output logic [WIDTH-1:0] cut_in
);

  always_comb cut_in = test_mode ? test_in : normal_in;

endmodule

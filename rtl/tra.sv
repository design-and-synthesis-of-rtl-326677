// tra: test response analyzer.
//
// Compares the compressed response (the MISR signature) with the expected
// signature and holds the verdict. A one-cycle `compare` pulse samples
// `signature == expected` on its clock edge; from the next cycle `valid` is
// high and `pass` holds the result until `clear` or reset. `mismatch` gives
// the bits that differed, for diagnosis.
//
// Comparing against an expected response is the design's function; holding
// the result in registers, the mismatch vector and the clear input are this
// implementation's choices.
module tra #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             compare,
  input  logic [WIDTH-1:0] signature,
  input  logic [WIDTH-1:0] expected,
  output logic             valid,
  output logic             pass,
  output logic [WIDTH-1:0] mismatch
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      pass     <= 1'b0;
      mismatch <= '0;
    end else if (clear) begin
      valid    <= 1'b0;
      pass     <= 1'b0;
      mismatch <= '0;
    end else if (compare) begin
      valid    <= 1'b1;
      pass     <= (signature == expected);
      mismatch <= signature ^ expected;
    end
  end

endmodule

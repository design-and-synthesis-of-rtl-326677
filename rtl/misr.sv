// misr: multiple-input signature register.
//
// Compresses a stream of WIDTH-bit response words into one WIDTH-bit
// signature. It is an LFSR with the same characteristic polynomial as the
// pattern generator (default x^32 + x^22 + x^2 + x + 1) whose every stage
// also XORs in one bit of the response word:
//   sig' = {sig[WIDTH-2:0], ^(sig & TAPS)} ^ data
// Different response streams give different signatures except with a
// probability of about 2^-WIDTH (aliasing).
//
// Interface: `clear` (synchronous, priority) sets the signature to INIT;
// `en` compresses `data` on that clock edge. `signature` is the register.
// Asynchronous active-low reset also loads INIT.
//
// The function (signature analysis of the response stream) follows the
// design; the polynomial reuse, the Fibonacci form and INIT = 0 are this
// implementation's choices.
module misr #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(lfsr_pkg::default_taps(WIDTH)),
  parameter logic [WIDTH-1:0] INIT  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] signature
);

  logic [WIDTH-1:0] shifted;

  always_comb shifted = {signature[WIDTH-2:0], ^(signature & TAPS)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= INIT;
    else if (clear) signature <= INIT;
    else if (en)    signature <= shifted ^ data;
  end

endmodule

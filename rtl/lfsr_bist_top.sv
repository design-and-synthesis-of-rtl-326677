// lfsr_bist_top: built-in self-test wrapper around a circuit under test,
// with the low-power 32-bit LFSR as its test-pattern generator.
//
// Blocks:
//   lp_lfsr   test-pattern generator (TPG): 32-bit LFSR with characteristic
//             polynomial x^32 + x^22 + x^2 + x + 1 plus three intermediate
//             vectors between successive states (low switching activity).
//   test_mux  selects the CUT's primary inputs: functional or generated.
//   misr      multiple-input signature register compressing the CUT outputs.
//   tra       test response analyzer: signature against expected signature.
//   bcu       BIST controller: Normal/Test input, sequencing, Go/No-go.
// The circuit under test itself is outside: its inputs leave on `cut_pi`
// and its outputs come back on `cut_po`. For a pipelined CUT set
// CUT_LATENCY to its depth in clock cycles.
//
// Operation: with `test` low the CUT sees `normal_pi`. Raising `test` loads
// `seed` into the generator, applies N_PATTERNS vectors (one per clock),
// compresses the responses and compares the signature with `expected`;
// `done` then rises, with `go` high for a pass and low for a fail, and both
// hold until `test` falls; `mismatch` shows the signature bits that differed.
// `tpg_phase` (0 = true LFSR state, 1..3 = intermediate vector) and
// `tpg_step` (LFSR advances on this edge) expose the generator's progress. `done` rises N_PATTERNS + CUT_LATENCY + 2 clock
// edges after the edge that samples `test` high.
//
// The BIST structure and the generator follow the design; the number of
// patterns, the external expected-signature input, the MISR polynomial and
// the latency parameter are this implementation's choices.
module lfsr_bist_top #(
  parameter int unsigned      WIDTH       = 32,
  parameter logic [WIDTH-1:0] TAPS        = WIDTH'(lfsr_pkg::default_taps(WIDTH)),
  parameter int unsigned      N_PATTERNS  = 4096,
  parameter int unsigned      CUT_LATENCY = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Normal/Test and result
  input  logic                 test,
  input  logic [WIDTH-1:0]     seed,
  input  logic [WIDTH-1:0]     expected,
  output logic                 done,
  output logic                 go,
  output logic [WIDTH-1:0]     signature,
  output logic [WIDTH-1:0]     mismatch,
  output lfsr_pkg::bcu_state_e bist_state,
  output logic [1:0]           tpg_phase,
  output logic                 tpg_step,
  // Circuit under test
  input  logic [WIDTH-1:0]     normal_pi,
  output logic [WIDTH-1:0]     cut_pi,
  input  logic [WIDTH-1:0]     cut_po
);

  logic             test_mode, tpg_load, tpg_en;
  logic             misr_clear, misr_en, tra_clear, tra_compare;
  logic             tra_valid, tra_pass;
  logic [WIDTH-1:0] pattern;

  bcu #(.N_PATTERNS(N_PATTERNS), .CUT_LATENCY(CUT_LATENCY)) u_bcu (
    .clk         (clk),
    .rst_n       (rst_n),
    .test        (test),
    .tra_valid   (tra_valid),
    .tra_pass    (tra_pass),
    .test_mode   (test_mode),
    .tpg_load    (tpg_load),
    .tpg_en      (tpg_en),
    .misr_clear  (misr_clear),
    .misr_en     (misr_en),
    .tra_clear   (tra_clear),
    .tra_compare (tra_compare),
    .done        (done),
    .go          (go),
    .state       (bist_state)
  );

  lp_lfsr #(.WIDTH(WIDTH), .TAPS(TAPS)) u_tpg (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (tpg_load),
    .seed      (seed),
    .en        (tpg_en),
    .pattern   (pattern),
    .phase     (tpg_phase),
    .lfsr_step (tpg_step)
  );

  test_mux #(.WIDTH(WIDTH)) u_mux (
    .test_mode (test_mode),
    .normal_in (normal_pi),
    .test_in   (pattern),
    .cut_in    (cut_pi)
  );

  misr #(.WIDTH(WIDTH), .TAPS(TAPS)) u_misr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (misr_clear),
    .en        (misr_en),
    .data      (cut_po),
    .signature (signature)
  );

  tra #(.WIDTH(WIDTH)) u_tra (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (tra_clear),
    .compare   (tra_compare),
    .signature (signature),
    .expected  (expected),
    .valid     (tra_valid),
    .pass      (tra_pass),
    .mismatch  (mismatch)
  );

endmodule

// lp_lfsr: low-power LFSR test-pattern generator.
//
// A plain LFSR changes about half of its bits on every clock. This generator
// spreads each such change over four clocks: between two successive LFSR
// states T1 and T2 it outputs three intermediate vectors Ta, Tb, Tc, so the
// output sequence is T1, Ta, Tb, Tc, T2, ... Every output bit changes at most
// once in those four steps, and the total number of bit transitions over the
// five vectors equals the transitions between T1 and T2 alone; the switching
// activity per applied vector, and with it the dynamic power in the pattern
// path and the circuit under test, drops to about a quarter.
//
// Structure, two levels:
//   1. select logic: for every bit decide whether the present state (T1) or
//      the next state (T2) of its flip-flop is propagated. The bits are split
//      into four interleaved groups g = i mod 4; in phase p (0..3) the bits of
//      groups g < p take the next state. So Ta updates group 0, Tb groups
//      0-1, Tc groups 0-2, and T2 (phase 0 after the LFSR step) all.
//   2. a 2:1 multiplexer per bit between present and next state.
// The LFSR itself advances only on the last phase, so its flip-flops toggle
// four times less often than in the plain generator.
//
// Interface: `load` loads `seed` and restarts at phase 0; `en` advances one
// output vector per clock. `pattern` is combinational from the registers and
// valid in the cycle it is shown. `lfsr_step` is high in the cycle whose
// clock edge advances the LFSR (pattern Tc showing). `phase` is the index
// of the vector shown (0 = a true LFSR state).
//
// The three intermediate vectors, the equal-transition property and the
// two-level select/multiplex structure follow the design; the grouping of
// bits into interleaved quarters is this implementation's choice.
module lp_lfsr #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(lfsr_pkg::default_taps(WIDTH)),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] pattern,
  output logic [1:0]       phase,
  output logic             lfsr_step
);

  logic [WIDTH-1:0] present_q;
  logic [WIDTH-1:0] next_q;
  logic [WIDTH-1:0] take_next;

  assign lfsr_step = en && !load && (phase == 2'(lfsr_pkg::LP_PHASES - 1));

  lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load),
    .seed       (seed),
    .en         (lfsr_step),
    .state      (present_q),
    .next_state (next_q),
    .serial_out ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (load) phase <= '0;
    else if (en)   phase <= phase + 2'd1;
  end

  // Level 1: per-bit present/next selection.
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      take_next[i] = (2'(i % lfsr_pkg::LP_PHASES) < phase);
    end
  end

  // Level 2: per-bit multiplexer.
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      pattern[i] = take_next[i] ? next_q[i] : present_q[i];
    end
  end

endmodule

// lfsr: generic maximal-length linear feedback shift register (Fibonacci form).
//
// WIDTH flip-flops form a shift chain on one common clock. Each enabled
// clock the register shifts one place towards the MSB and the new LSB is the
// XOR of the tap bits selected by TAPS, the characteristic polynomial written
// as a mask (bit k-1 set for the term x^k). With the default 32-bit
// polynomial x^32 + x^22 + x^2 + x + 1 every non-zero seed runs through all
// 2^32 - 1 non-zero states, one new state per clock, before it repeats.
//
// Interface: `load` copies `seed` into the register (synchronous, has
// priority over `en`); `en` advances it by one state. `state` is the present
// state, `next_state` the state the next enabled clock will produce (used by
// the low-power generator), `serial_out` the MSB as a pseudo-random bit
// stream. Asynchronous active-low reset loads the SEED parameter.
//
// The polynomial, XOR feedback and one-state-per-clock rate follow the
// design; the Fibonacci orientation, the reset value and the load/enable
// controls are this implementation's choices. The all-zero state is a fixed
// point of any XOR LFSR: a zero seed is the user's responsibility.
module lfsr #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(lfsr_pkg::default_taps(WIDTH)),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] state,
  output logic [WIDTH-1:0] next_state,
  output logic             serial_out
);

  logic feedback;

  always_comb begin
    feedback   = ^(state & TAPS);
    next_state = {state[WIDTH-2:0], feedback};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= seed;
    else if (en)   state <= next_state;
  end

  assign serial_out = state[WIDTH-1];

endmodule

// bcu: BIST controller unit.
//
// Sequences one self-test. While the Normal/Test input `test` is low the
// controller sits in NORMAL: the CUT multiplexer selects the functional
// inputs and the pattern generator is idle. Raising `test` starts a run:
//   SEED     one cycle: load the generator seed, clear MISR and analyzer.
//   RUN      N_PATTERNS cycles: the generator advances one vector per clock
//            (`tpg_en`); the MISR compresses the CUT response (`misr_en`),
//            delayed by CUT_LATENCY cycles for a pipelined CUT.
//   FLUSH    CUT_LATENCY cycles: the last responses reach the MISR.
//   COMPARE  one cycle: the analyzer compares signature and expected value.
//   DONE     `done` high, `go` = pass (Go) or low (No-go); held until `test`
//            falls, which returns to NORMAL.
// `test_mode` (multiplexer select) is high in every state but NORMAL.
// Timing: `done` is high from the first cycle of DONE, when the analyzer's
// registered verdict is valid; it rises N_PATTERNS + CUT_LATENCY + 2 clock
// edges after the edge that samples `test` high (one for SEED, N_PATTERNS
// for RUN, CUT_LATENCY for FLUSH, one for COMPARE).
//
// The controller's role (started by Normal/Test, drives TPG, TRA and the
// multiplexer, gives Go/No-go) follows the design; the state sequence,
// pattern count and latency handling are this implementation's choices.
module bcu #(
  parameter int unsigned N_PATTERNS  = 4096,
  parameter int unsigned CUT_LATENCY = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test,
  input  logic                 tra_valid,
  input  logic                 tra_pass,
  output logic                 test_mode,
  output logic                 tpg_load,
  output logic                 tpg_en,
  output logic                 misr_clear,
  output logic                 misr_en,
  output logic                 tra_clear,
  output logic                 tra_compare,
  output logic                 done,
  output logic                 go,
  output lfsr_pkg::bcu_state_e state
);

  import lfsr_pkg::*;

  localparam int unsigned CW = (N_PATTERNS > CUT_LATENCY ? $clog2(N_PATTERNS + 1)
                                                         : $clog2(CUT_LATENCY + 1)) + 1;

  bcu_state_e       state_d;
  logic [CW-1:0]    count_q, count_d;
  logic             run_en;

  always_comb begin
    state_d     = state;
    count_d     = count_q;
    tpg_load    = 1'b0;
    misr_clear  = 1'b0;
    tra_clear   = 1'b0;
    tra_compare = 1'b0;
    run_en      = 1'b0;
    unique case (state)
      BCU_NORMAL: begin
        if (test) state_d = BCU_SEED;
      end
      BCU_SEED: begin
        tpg_load   = 1'b1;
        misr_clear = 1'b1;
        tra_clear  = 1'b1;
        count_d    = '0;
        state_d    = BCU_RUN;
      end
      BCU_RUN: begin
        run_en  = 1'b1;
        count_d = count_q + 1'b1;
        if (count_q == CW'(N_PATTERNS - 1)) begin
          count_d = '0;
          state_d = (CUT_LATENCY == 0) ? BCU_COMPARE : BCU_FLUSH;
        end
      end
      BCU_FLUSH: begin
        count_d = count_q + 1'b1;
        if (count_q == CW'(CUT_LATENCY - 1)) state_d = BCU_COMPARE;
      end
      BCU_COMPARE: begin
        tra_compare = 1'b1;
        state_d     = BCU_DONE;
      end
      BCU_DONE: begin
        if (!test) state_d = BCU_NORMAL;
      end
      default: state_d = BCU_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= BCU_NORMAL;
      count_q <= '0;
    end else begin
      state   <= state_d;
      count_q <= count_d;
    end
  end

  // Response-capture enable follows the pattern enable through the CUT's
  // pipeline depth.
  generate
    if (CUT_LATENCY == 0) begin : g_no_delay
      assign misr_en = run_en;
    end else begin : g_delay
      logic [CUT_LATENCY:0] pipe_in;
      logic [CUT_LATENCY:1] pipe_q;
      assign pipe_in = {pipe_q, run_en};
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) pipe_q <= '0;
        else        pipe_q <= pipe_in[CUT_LATENCY-1:0];
      end
      assign misr_en = pipe_q[CUT_LATENCY];
    end
  endgenerate

  assign tpg_en    = run_en;
  assign test_mode = (state != BCU_NORMAL);
  assign done      = (state == BCU_DONE) && tra_valid;
  assign go        = done && tra_pass;

endmodule

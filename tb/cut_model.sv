// cut_model: behavioural stand-in for a circuit under test, used only by
// the testbenches. A 32-bit datapath: the low half of the output is the sum
// of the two input halves, the high half their XOR rotated by 3. LATENCY
// register stages follow the logic. `fault_en` flips output bit `fault_bit`
// to emulate a defect.
module cut_model #(
  parameter int unsigned LATENCY = 0
) (
  input  logic        clk,
  input  logic [31:0] x,
  input  logic        fault_en,
  input  logic [4:0]  fault_bit,
  output logic [31:0] y
);
  logic [31:0] f;
  logic [15:0] h;
  always_comb begin
    h = x[31:16] ^ x[15:0];
    f = {h[12:0], h[15:13], x[31:16] + x[15:0]};
    if (fault_en) f[fault_bit] = ~f[fault_bit];
  end
  generate
    if (LATENCY == 0) begin : g_comb
      assign y = f;
    end else begin : g_pipe
      logic [31:0] stage [LATENCY];
      always_ff @(posedge clk) begin
        stage[0] <= f;
        for (int i = 1; i < int'(LATENCY); i++) stage[i] <= stage[i-1];
      end
      assign y = stage[LATENCY-1];
    end
  endgenerate
endmodule

// tb_lfsr_bist_top_pipe: the BIST wrapper with a pipelined circuit under
// test (3 register stages, CUT_LATENCY = 3) and 1000 patterns. The
// controller's flush phase must let the last three responses reach the
// MISR: a fault-free run gives Go with the signature computed from the
// reference models, `done` comes N_PATTERNS + 3 + 2 clocks after start, and
// a one-cycle CUT defect, also on the last pattern (still in the pipeline
// when the generator stops), gives No-go.
module tb_lfsr_bist_top_pipe;
  import lfsr_pkg::*;
  import lfsr_ref_pkg::*;

  localparam int unsigned N = 1000, L = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;

  logic        test, done, go, step, fault_en;
  logic [4:0]  fault_bit;
  logic [31:0] seed, expected, signature, mismatch, normal_pi, cut_pi, cut_po;
  logic [1:0]  phase;
  bcu_state_e  bist_state;
  int unsigned n_flush;

  lfsr_bist_top #(.N_PATTERNS(N), .CUT_LATENCY(L)) dut (
    .clk, .rst_n, .test, .seed, .expected, .done, .go, .signature, .mismatch,
    .bist_state, .tpg_phase(phase), .tpg_step(step),
    .normal_pi, .cut_pi, .cut_po);

  cut_model #(.LATENCY(L)) u_cut (.clk, .x(cut_pi), .fault_en, .fault_bit, .y(cut_po));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] golden(logic [31:0] s);
    logic [63:0] t1 = 64'(s), sig = '0, v;
    for (int i = 0; i < int'(N); i++) begin
      v   = ref_lp(t1, ref_step(t1, 32, TAPS32), i % 4, 32);
      sig = ref_misr(sig, 64'(ref_cut(32'(v))), 32, TAPS32);
      if (i % 4 == 3) t1 = ref_step(t1, 32, TAPS32);
    end
    return 32'(sig);
  endfunction

  task automatic self_test(logic [31:0] s, logic [31:0] exp_sig, int fault_at, bit exp_go);
    int unsigned cycles, vec;
    seed = s; expected = exp_sig;
    @(negedge clk);
    test = 1'b1;
    @(negedge clk);
    cycles = 0; vec = 0;
    while (!done && cycles < N + 100) begin
      if (bist_state == BCU_FLUSH) n_flush++;
      if (bist_state == BCU_RUN) begin
        fault_en = (int'(vec) == fault_at);
        vec++;
      end
      fault_bit = 5'd19;
      @(negedge clk);
      fault_en = 1'b0;
      cycles++;
    end
    check(cycles == N + L + 2, $sformatf("done %0d clocks after start, expected %0d", cycles, N + L + 2));
    check(go == exp_go, $sformatf("Go/No-go = %0b, expected %0b", go, exp_go));
    if (exp_go) check(signature == exp_sig, "signature equals expected");
    test = 1'b0;
    @(negedge clk);
    check(bist_state == BCU_NORMAL, "back to normal mode");
  endtask

  initial begin
    logic [31:0] g;
    n_flush = 0;
    rst_n = 1'b0; test = 1'b0; fault_en = 1'b0; fault_bit = '0;
    seed = '0; expected = '0; normal_pi = 32'hCAFE_F00D;
    #25 rst_n = 1'b1;
    @(negedge clk);
    check(cut_pi == normal_pi, "normal mode");
    g = golden(32'h1);
    self_test(32'h1, g, -1, 1'b1);
    self_test(32'h1, g, 500, 1'b0);
    self_test(32'h1, g, int'(N) - 1, 1'b0);
    self_test(32'h1, g, -1, 1'b1);
    $display("flush cycles seen: %0d", n_flush);
    check(n_flush == 4 * L, "flush phase exercised, CUT_LATENCY cycles per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr_bist_top: end-to-end test of the BIST wrapper at its default
// parameters (32-bit generator, 4096 patterns, combinational CUT), with the
// behavioural CUT model attached to the CUT ports.
//
// The expected signature of every run is computed by the testbench from
// reference models of the generator (LFSR + intermediate vectors), the CUT
// and the MISR. Runs:
//   1. normal mode: the CUT sees the functional inputs;
//   2. self-test with the right expected signature: Go, after
//      N_PATTERNS + 2 clocks, every applied vector checked;
//   3. same seed with a one-cycle defect injected in the CUT: No-go;
//   4. another seed: Go; 5. a wrong expected signature: No-go with the
//      mismatch vector showing the wrong bits.
// Each mechanism (normal mode, seed load, intermediate vectors, LFSR steps,
// signature compaction, Go, No-go) is counted and must occur. The applied
// vectors' bit transitions are also compared with those of a plain LFSR.
module tb_lfsr_bist_top;
  import lfsr_pkg::*;
  import lfsr_ref_pkg::*;

  localparam int unsigned N = 4096;   // the top's default pattern count

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;

  logic        test, done, go, step, fault_en;
  logic [4:0]  fault_bit;
  logic [31:0] seed, expected, signature, mismatch, normal_pi, cut_pi, cut_po;
  logic [1:0]  phase;
  bcu_state_e  bist_state;

  lfsr_bist_top dut (
    .clk, .rst_n, .test, .seed, .expected, .done, .go, .signature, .mismatch,
    .bist_state, .tpg_phase(phase), .tpg_step(step),
    .normal_pi, .cut_pi, .cut_po);

  cut_model u_cut (.clk, .x(cut_pi), .fault_en, .fault_bit, .y(cut_po));

  int unsigned n_normal, n_seed, n_inter, n_steps, n_compact, n_go, n_nogo;
  longint unsigned lp_toggles, plain_toggles;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected signature for a seed (fault-free CUT).
  function automatic logic [31:0] golden(logic [31:0] s);
    logic [63:0] t1 = 64'(s), sig = '0, v;
    for (int i = 0; i < int'(N); i++) begin
      v   = ref_lp(t1, ref_step(t1, 32, TAPS32), i % 4, 32);
      sig = ref_misr(sig, 64'(ref_cut(32'(v))), 32, TAPS32);
      if (i % 4 == 3) t1 = ref_step(t1, 32, TAPS32);
    end
    return 32'(sig);
  endfunction

  // One self-test. fault_at < 0: no defect injected.
  task automatic self_test(logic [31:0] s, logic [31:0] exp_sig, int fault_at, bit exp_go);
    int unsigned cycles, vec;
    logic [63:0] t1, t2, v;
    logic [31:0] prev;
    seed = s; expected = exp_sig;
    @(negedge clk);
    test = 1'b1;
    @(negedge clk);           // edge that sampled test
    cycles = 0; vec = 0;
    t1 = 64'(s);
    prev = s;
    while (!done && cycles < N + 100) begin
      if (bist_state == BCU_SEED) n_seed++;
      if (bist_state == BCU_RUN) begin
        t2 = ref_step(t1, 32, TAPS32);
        v  = ref_lp(t1, t2, int'(vec % 4), 32);
        if (cut_pi != 32'(v)) check(1'b0, $sformatf("vector %0d applied %h exp %h", vec, cut_pi, v[31:0]));
        else checks++;
        if (phase != 2'd0) n_inter++;
        if (step) begin
          n_steps++;
          plain_toggles += 64'(popcount(t1 ^ t2));
          t1 = t2;
        end
        if (vec > 0) lp_toggles += 64'(popcount(64'(cut_pi ^ prev)));
        prev = cut_pi;
        fault_en = (int'(vec) == fault_at);
        fault_bit = 5'd7;
        n_compact++;
        vec++;
      end
      @(negedge clk);
      fault_en = 1'b0;
      cycles++;
    end
    check(vec == N, $sformatf("%0d vectors applied", vec));
    check(cycles == N + 2, $sformatf("done %0d clocks after start, expected %0d", cycles, N + 2));
    check(go == exp_go, $sformatf("Go/No-go = %0b, expected %0b", go, exp_go));
    check(mismatch == (signature ^ exp_sig), "mismatch vector");
    if (exp_go) check(signature == exp_sig, "signature equals expected");
    if (go) n_go++; else n_nogo++;
    repeat (3) @(negedge clk);
    check(done && go == exp_go, "verdict held while test is high");
    test = 1'b0;
    @(negedge clk);
    check(!done && bist_state == BCU_NORMAL, "back to normal mode");
  endtask

  initial begin
    logic [31:0] g1, g2;
    {n_normal, n_seed, n_inter, n_steps, n_compact, n_go, n_nogo} = '0;
    lp_toggles = 0; plain_toggles = 0;
    rst_n = 1'b0; test = 1'b0; fault_en = 1'b0; fault_bit = '0;
    seed = '0; expected = '0; normal_pi = '0;
    #25 rst_n = 1'b1;

    // 1. normal mode
    for (int i = 0; i < 200; i++) begin
      normal_pi = $urandom();
      @(negedge clk);
      check(cut_pi == normal_pi && bist_state == BCU_NORMAL && !done, "normal mode passes functional inputs");
      n_normal++;
    end

    g1 = golden(32'hACE1_0001);
    g2 = golden(32'h0BAD_F00D);
    check(g1 != g2, "different seeds give different signatures");

    self_test(32'hACE1_0001, g1, -1, 1'b1);       // 2. pass
    self_test(32'hACE1_0001, g1, 1234, 1'b0);     // 3. CUT defect
    self_test(32'h0BAD_F00D, g2, -1, 1'b1);       // 4. other seed
    self_test(32'h0BAD_F00D, g2 ^ 32'h0000_8001, -1, 1'b0);  // 5. wrong expectation
    check(mismatch == 32'h0000_8001, "mismatch shows the wrong bits");

    // normal mode again after testing
    normal_pi = 32'h1234_5678;
    @(negedge clk);
    check(cut_pi == normal_pi, "functional path restored");

    $display("mechanisms: normal=%0d seed_load=%0d intermediate_vectors=%0d lfsr_steps=%0d compactions=%0d go=%0d nogo=%0d",
             n_normal, n_seed, n_inter, n_steps, n_compact, n_go, n_nogo);
    $display("applied-vector transitions: %0d; plain LFSR would apply %0d vectors with about %0d",
             lp_toggles, n_compact, plain_toggles * 4);
    check(n_normal > 0,  "normal mode exercised");
    check(n_seed > 0,    "seed load exercised");
    check(n_inter > 0,   "intermediate vectors exercised");
    check(n_steps > 0,   "LFSR steps exercised");
    check(n_compact > 0, "signature compaction exercised");
    check(n_go > 0,      "Go verdict exercised");
    check(n_nogo > 0,    "No-go verdict exercised");
    check(n_inter == 3 * n_steps, "three intermediate vectors per LFSR step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

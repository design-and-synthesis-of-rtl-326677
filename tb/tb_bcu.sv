// tb_bcu: self-checking testbench for the BIST controller. Two instances:
// N_PATTERNS = 37 with a combinational CUT (CUT_LATENCY = 0) and
// N_PATTERNS = 20 with a 3-stage CUT. For each, several runs with the
// analyzer's verdict modelled by the testbench (pass and fail) check:
// the state sequence, one-cycle seed/clear and compare pulses, exactly
// N_PATTERNS generator enables, MISR enables equal to them delayed by
// CUT_LATENCY, `done` after N_PATTERNS + CUT_LATENCY + 2 edges, Go/No-go,
// the multiplexer select, and the return to normal mode.
module tb_bcu;
  import lfsr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

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

  // Instance A: N = 37, latency 0. Instance B: N = 20, latency 3.
  localparam int unsigned NA = 37, LA = 0, NB = 20, LB = 3;
  logic test_a, test_b;
  logic tv_a, tp_a, tv_b, tp_b;
  logic tm_a, ld_a, te_a, mc_a, me_a, tc_a, cmp_a, dn_a, go_a;
  logic tm_b, ld_b, te_b, mc_b, me_b, tc_b, cmp_b, dn_b, go_b;
  bcu_state_e st_a, st_b;
  logic pass_a, pass_b;   // verdict the modelled analyzer will give

  bcu #(.N_PATTERNS(NA), .CUT_LATENCY(LA)) dut_a (
    .clk, .rst_n, .test(test_a), .tra_valid(tv_a), .tra_pass(tp_a),
    .test_mode(tm_a), .tpg_load(ld_a), .tpg_en(te_a), .misr_clear(mc_a), .misr_en(me_a),
    .tra_clear(tc_a), .tra_compare(cmp_a), .done(dn_a), .go(go_a), .state(st_a));
  bcu #(.N_PATTERNS(NB), .CUT_LATENCY(LB)) dut_b (
    .clk, .rst_n, .test(test_b), .tra_valid(tv_b), .tra_pass(tp_b),
    .test_mode(tm_b), .tpg_load(ld_b), .tpg_en(te_b), .misr_clear(mc_b), .misr_en(me_b),
    .tra_clear(tc_b), .tra_compare(cmp_b), .done(dn_b), .go(go_b), .state(st_b));

  // Analyzer model: verdict registered on the compare pulse, dropped on clear.
  always_ff @(posedge clk) begin
    if (!rst_n || tc_a) begin tv_a <= 1'b0; tp_a <= 1'b0; end
    else if (cmp_a)     begin tv_a <= 1'b1; tp_a <= pass_a; end
    if (!rst_n || tc_b) begin tv_b <= 1'b0; tp_b <= 1'b0; end
    else if (cmp_b)     begin tv_b <= 1'b1; tp_b <= pass_b; end
  end

  // One run on one instance, observed cycle by cycle.
  task automatic run(bit which, bit verdict);
    int unsigned n, l, edges, tpg_cnt, misr_cnt, load_cnt, clr_cnt, cmp_cnt;
    int unsigned first_tpg, first_misr, last_tpg, last_misr;
    n = which ? NB : NA;
    l = which ? LB : LA;
    edges = 0; tpg_cnt = 0; misr_cnt = 0; load_cnt = 0; clr_cnt = 0; cmp_cnt = 0;
    first_tpg = 0; first_misr = 0; last_tpg = 0; last_misr = 0;
    if (which) pass_b = verdict; else pass_a = verdict;
    @(negedge clk);
    check(which ? (st_b == BCU_NORMAL && !tm_b) : (st_a == BCU_NORMAL && !tm_a), "idle in normal mode");
    if (which) test_b = 1'b1; else test_a = 1'b1;
    @(negedge clk);   // edge that sampled test
    while (!(which ? dn_b : dn_a) && edges < 1000) begin
      check(which ? tm_b : tm_a, "test_mode high during run");
      if (which ? te_b : te_a)  begin tpg_cnt++;  if (tpg_cnt == 1) first_tpg = edges;  last_tpg = edges; end
      if (which ? me_b : me_a)  begin misr_cnt++; if (misr_cnt == 1) first_misr = edges; last_misr = edges; end
      if (which ? ld_b : ld_a)  load_cnt++;
      if (which ? (mc_b && tc_b) : (mc_a && tc_a)) clr_cnt++;
      if (which ? cmp_b : cmp_a) begin
        cmp_cnt++;
        check(which ? st_b == BCU_COMPARE : st_a == BCU_COMPARE, "compare in COMPARE state");
      end
      @(negedge clk);
      edges++;
    end
    check(edges == n + l + 2, $sformatf("done %0d edges after the sampling edge, expected %0d", edges, n + l + 2));
    check(load_cnt == 1 && clr_cnt == 1 && cmp_cnt == 1, "one seed, clear and compare pulse");
    check(tpg_cnt == n, $sformatf("generator enables %0d", tpg_cnt));
    check(misr_cnt == n, $sformatf("MISR enables %0d", misr_cnt));
    check(first_misr == first_tpg + l && last_misr == last_tpg + l, "MISR enable delayed by CUT latency");
    check((which ? go_b : go_a) == verdict, "Go/No-go follows verdict");
    check(which ? st_b == BCU_DONE : st_a == BCU_DONE, "DONE state");
    // result held while test stays high
    repeat (5) @(negedge clk);
    check(which ? (dn_b && go_b == verdict) : (dn_a && go_a == verdict), "result held");
    if (which) test_b = 1'b0; else test_a = 1'b0;
    @(negedge clk);
    check(which ? (st_b == BCU_NORMAL && !tm_b && !dn_b) : (st_a == BCU_NORMAL && !tm_a && !dn_a),
          "back to normal mode");
  endtask

  initial begin
    rst_n = 1'b0; test_a = 1'b0; test_b = 1'b0; pass_a = 1'b0; pass_b = 1'b0;
    #12 rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      run(1'b0, r[0] ^ 1'b1);
      run(1'b1, r[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

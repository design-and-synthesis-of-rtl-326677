// tb_lp_lfsr: self-checking testbench for the low-power generator.
//  - 32-bit default instance, random seed: every output vector is compared
//    with T1, Ta, Tb, Tc, T2 built from a reference LFSR and the group rule
//    (bit i of vector p comes from the next state when i mod 4 < p).
//  - Over each T1..T2 window the output's bit transitions must equal the
//    Hamming distance between T1 and T2, and no bit may toggle twice.
//  - The LFSR steps exactly once every four clocks (lfsr_step, phase).
//  - Enable low holds the output; load restarts at phase 0.
//  - An 8-bit instance covers a full period: 4 * 255 clocks.
//  - Output transitions are totalled against a plain LFSR running one state
//    per clock over the same number of vectors.
module tb_lp_lfsr;
  import lfsr_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;

  logic        load, en, step;
  logic [31:0] seed, pat;
  logic [1:0]  phase;
  logic        load8, en8, step8;
  logic [7:0]  seed8, pat8;
  logic [1:0]  phase8;

  lp_lfsr dut (.clk, .rst_n, .load, .seed, .en, .pattern(pat), .phase, .lfsr_step(step));
  lp_lfsr #(.WIDTH(8)) dut8 (.clk, .rst_n, .load(load8), .seed(seed8), .en(en8),
                             .pattern(pat8), .phase(phase8), .lfsr_step(step8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] t1, t2, prev, exp_v;
    int unsigned lp_toggles, plain_toggles, window_toggles, steps, vectors, n;
    logic [31:0] toggled;
    logic [63:0] s8;

    lp_toggles = 0; plain_toggles = 0; steps = 0; vectors = 0;
    rst_n = 1'b0;
    {load, en, load8, en8} = '0;
    seed = '0; seed8 = '0;
    #25 rst_n = 1'b1;
    @(negedge clk);
    check(pat == 32'h1 && phase == 2'd0, "reset shows SEED at phase 0");

    seed = 32'h1357_9BDF; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(phase == 2'd0 && pat == seed, "load shows T1 = seed");
    t1 = 64'(seed);
    prev = t1;
    en = 1'b1;
    for (int w = 0; w < 5000; w++) begin
      t2 = ref_step(t1, 32, TAPS32);
      plain_toggles += popcount(t1 ^ t2);
      window_toggles = 0;
      toggled = '0;
      for (int p = 0; p < 4; p++) begin
        exp_v = ref_lp(t1, t2, p, 32);
        if (pat != 32'(exp_v) || phase != 2'(p)) check(1'b0, $sformatf("vector p=%0d got %h exp %h", p, pat, exp_v[31:0]));
        else checks++;
        check(step == (p == 3), "lfsr_step only in last phase");
        if (p != 0) begin
          window_toggles += popcount(64'(pat) ^ prev);
          if ((toggled & (pat ^ 32'(prev))) != 0) check(1'b0, "bit toggled twice in a window");
          toggled |= pat ^ 32'(prev);
        end
        prev = 64'(pat);
        // occasional stall
        if ($urandom_range(0, 15) == 0) begin
          en = 1'b0;
          @(negedge clk);
          check(pat == 32'(exp_v) && phase == 2'(p), "enable low holds vector");
          en = 1'b1;
        end
        @(negedge clk);
        vectors++;
      end
      // now showing T2
      window_toggles += popcount(64'(pat) ^ prev);
      toggled |= pat ^ 32'(prev);
      lp_toggles += window_toggles;
      prev = 64'(pat);
      check(window_toggles == popcount(t1 ^ t2), "window transitions equal T1->T2 distance");
      check(toggled == 32'(t1 ^ t2), "every differing bit toggles exactly once");
      steps++;
      t1 = t2;
    end
    en = 1'b0;
    $display("32-bit: %0d vectors, low-power output transitions %0d (%.3f per vector);",
             vectors, lp_toggles, real'(lp_toggles) / vectors);
    $display("        plain LFSR over %0d vectors would give about %.0f (%.3f per vector)",
             vectors, real'(plain_toggles) * 4.0, real'(plain_toggles) / steps);
    check(lp_toggles * 3 < plain_toggles * 4, "low-power generator switches less per vector");

    // load in mid-window restarts at phase 0
    en = 1'b1;
    @(negedge clk); @(negedge clk);
    seed = 32'hDEAD_BEEF; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(phase == 2'd0 && pat == seed, "load restarts at phase 0");
    en = 1'b0;

    // 8-bit full period: the seed returns after 4 * 255 clocks.
    seed8 = 8'h5A; load8 = 1'b1;
    @(negedge clk);
    load8 = 1'b0; en8 = 1'b1;
    begin
      n = 0;
      s8 = 64'(seed8);
      do begin
        if (pat8 != 8'(ref_lp(s8, ref_step(s8, 8, TAPS8), int'(phase8), 8))) check(1'b0, "8-bit vector");
        if (phase8 == 2'd3) s8 = ref_step(s8, 8, TAPS8);
        @(negedge clk); n++;
      end while (!(pat8 == 8'h5A && phase8 == 2'd0) && n < 2000);
      check(n == 4 * 255, $sformatf("8-bit low-power period %0d clocks", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

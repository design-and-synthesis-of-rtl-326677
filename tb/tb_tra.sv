// tb_tra: self-checking testbench for the response analyzer. Random
// signature/expected pairs, equal and unequal, are compared; valid, pass
// and the mismatch vector are checked one clock after the compare pulse,
// and clear must drop the verdict.
module tb_tra;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n, clear, compare, valid, pass;
  logic [31:0] sig, expd, mism;
  always #5 clk = ~clk;

  tra dut (.clk, .rst_n, .clear, .compare, .signature(sig), .expected(expd),
           .valid, .pass, .mismatch(mism));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s, e;
    rst_n = 1'b0; clear = 1'b0; compare = 1'b0; sig = '0; expd = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(!valid && !pass, "reset: no verdict");
    for (int i = 0; i < 2000; i++) begin
      s = $urandom();
      e = (i % 2 == 0) ? s : s ^ (32'h1 << $urandom_range(0, 31)) ^ (i % 3 == 0 ? $urandom() : 32'h0);
      sig = s; expd = e; compare = 1'b1;
      @(negedge clk);
      compare = 1'b0;
      sig = ~s;   // verdict must be held, not follow the inputs
      @(negedge clk);
      check(valid, "valid after compare");
      check(pass == (s == e), "pass iff equal");
      check(mism == (s ^ e), "mismatch vector");
      if (i % 100 == 0) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        check(!valid && !pass, "clear drops verdict");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

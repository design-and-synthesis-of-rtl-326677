// tb_misr: self-checking testbench for the signature register. Random
// response words are compressed and the signature is compared every clock
// with a reference model built from the tap positions {32,22,2,1}. Also
// checked: clear, hold while disabled, and that a single flipped response
// bit gives a different final signature.
module tb_misr;
  import lfsr_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n, clear, en;
  logic [31:0] data, sig;
  always #5 clk = ~clk;

  misr dut (.clk, .rst_n, .clear, .en, .data, .signature(sig));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] model;
    logic [31:0] stream [1000];
    logic [31:0] sig_good;
    rst_n = 1'b0; clear = 1'b0; en = 1'b0; data = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(sig == '0, "reset signature 0");
    model = '0;
    for (int c = 0; c < 20000; c++) begin
      en   = ($urandom_range(0, 7) != 0);
      data = $urandom();
      clear = (c == 10000);
      @(negedge clk);
      if (clear) model = '0;
      else if (en) model = ref_misr(model, 64'(data), 32, TAPS32);
      check(sig == 32'(model), "signature matches model");
    end
    // two streams differing in one bit give different signatures
    for (int i = 0; i < 1000; i++) stream[i] = $urandom();
    for (int run = 0; run < 2; run++) begin
      clear = 1'b1; en = 1'b0;
      @(negedge clk);
      clear = 1'b0; en = 1'b1;
      for (int i = 0; i < 1000; i++) begin
        data = stream[i];
        if (run == 1 && i == 437) data[9] = ~data[9];
        @(negedge clk);
      end
      en = 1'b0;
      if (run == 0) sig_good = sig;
    end
    check(sig != sig_good, "single-bit response error changes signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

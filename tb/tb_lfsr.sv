// tb_lfsr: self-checking testbench for lfsr.
//  - 32-bit default instance: compared clock by clock with a reference model
//    built from the tap positions {32,22,2,1}, with random enable gaps and
//    seed loads; next_state and serial_out are checked too.
//  - The polynomial x^32+x^22+x^2+x+1 is shown primitive (x has order
//    2^32-1 modulo it), so every non-zero seed has period 2^32-1.
//  - 8- and 16-bit instances run a full period on a 20 ns clock: the seed
//    must come back after exactly 2^n-1 clocks (5100 ns and 1310700 ns),
//    with every state in between distinct.
module tb_lfsr;
  import lfsr_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;   // 20 ns period

  logic        load32, en32;
  logic [31:0] seed32, st32, nx32;
  logic        so32;
  logic        load16, en16;
  logic [15:0] seed16, st16, nx16;
  logic        load8, en8;
  logic [7:0]  seed8, st8, nx8;

  lfsr dut32 (.clk, .rst_n, .load(load32), .seed(seed32), .en(en32),
              .state(st32), .next_state(nx32), .serial_out(so32));
  lfsr #(.WIDTH(16)) dut16 (.clk, .rst_n, .load(load16), .seed(seed16), .en(en16),
              .state(st16), .next_state(nx16), .serial_out());
  lfsr #(.WIDTH(8)) dut8 (.clk, .rst_n, .load(load8), .seed(seed8), .en(en8),
              .state(st8), .next_state(nx8), .serial_out());

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Full-period run of a small instance; returns through the counts.
  task automatic full_period_8();
    bit seen [256];
    int unsigned n = 0;
    realtime t0;
    seed8 = 8'h01; load8 = 1'b1; @(posedge clk); #1; load8 = 1'b0; en8 = 1'b1;
    t0 = $realtime;
    seen[st8] = 1'b1;
    do begin
      check(nx8 == 8'(ref_step(64'(st8), 8, TAPS8)), "lfsr8 next_state");
      @(posedge clk); #1; n++;
      if (st8 != 8'h01) begin
        check(!seen[st8], "lfsr8 state repeated inside period");
        seen[st8] = 1'b1;
      end
    end while (st8 != 8'h01 && n < 300);
    en8 = 1'b0;
    check(n == 255, $sformatf("lfsr8 period %0d", n));
    check($realtime - t0 == 5100.0, "lfsr8 period time 5100 ns");
    $display("8-bit LFSR: period %0d clocks, %0.0f ns", n, $realtime - t0);
  endtask

  task automatic full_period_16();
    bit seen [65536];
    int unsigned n = 0;
    realtime t0;
    seed16 = 16'h0001; load16 = 1'b1; @(posedge clk); #1; load16 = 1'b0; en16 = 1'b1;
    t0 = $realtime;
    seen[st16] = 1'b1;
    do begin
      if (nx16 != 16'(ref_step(64'(st16), 16, TAPS16))) check(1'b0, "lfsr16 next_state");
      @(posedge clk); #1; n++;
      if (st16 != 16'h0001) begin
        if (seen[st16]) check(1'b0, "lfsr16 state repeated inside period");
        seen[st16] = 1'b1;
      end
    end while (st16 != 16'h0001 && n < 70000);
    en16 = 1'b0;
    check(n == 65535, $sformatf("lfsr16 period %0d", n));
    check($realtime - t0 == 1310700.0, "lfsr16 period time 1310700 ns");
    $display("16-bit LFSR: period %0d clocks, %0.0f ns", n, $realtime - t0);
  endtask

  initial begin
    logic [63:0] model;
    logic [63:0] poly;
    static int unsigned factors [5] = '{3, 5, 17, 257, 65537};

    rst_n = 1'b0;
    {load32, en32, load16, en16, load8, en8} = '0;
    seed32 = '0; seed16 = '0; seed8 = '0;
    #25 rst_n = 1'b1;
    #1;
    check(st32 == 32'h1 && st16 == 16'h1 && st8 == 8'h1, "reset loads SEED");

    // Primitivity of the 32-bit characteristic polynomial.
    poly = 64'd1;
    foreach (TAPS32[k]) poly |= 64'd1 << TAPS32[k];
    check(gf2_xpow(64'hFFFF_FFFF, poly, 32) == 64'd1, "x^(2^32-1) = 1 mod P");
    foreach (factors[k])
      check(gf2_xpow(64'hFFFF_FFFF / 64'(factors[k]), poly, 32) != 64'd1,
            $sformatf("x^((2^32-1)/%0d) != 1 mod P", factors[k]));

    // 32-bit: clock-by-clock comparison with the model.
    @(negedge clk);
    seed32 = 32'hACE1_2468; load32 = 1'b1;
    @(negedge clk);
    load32 = 1'b0;
    model = 64'(seed32);
    check(st32 == seed32, "lfsr32 load");
    for (int c = 0; c < 200000; c++) begin
      en32 = ($urandom_range(0, 9) != 0);
      if (c % 50000 == 49999) begin
        seed32 = $urandom() | 32'h1;
        load32 = 1'b1;
      end
      if (nx32 != 32'(ref_step(model, 32, TAPS32))) check(1'b0, "lfsr32 next_state");
      if (so32 != model[31]) check(1'b0, "lfsr32 serial_out");
      @(negedge clk);
      if (load32) model = 64'(seed32);
      else if (en32) model = ref_step(model, 32, TAPS32);
      load32 = 1'b0;
      if (st32 != 32'(model)) check(1'b0, $sformatf("lfsr32 state %h exp %h", st32, model[31:0]));
      else checks++;
    end
    en32 = 1'b0;
    @(negedge clk);
    check(st32 == 32'(model), "lfsr32 holds without enable");

    fork
      full_period_8();
      full_period_16();
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

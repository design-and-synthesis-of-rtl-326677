// tb_test_mux: self-checking testbench for the CUT input multiplexer:
// random functional and test inputs in both modes.
module tb_test_mux;
  int checks = 0, failures = 0;
  logic        mode;
  logic [31:0] a, b, y;

  test_mux dut (.test_mode(mode), .normal_in(a), .test_in(b), .cut_in(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      mode = i[0];
      a = $urandom();
      b = $urandom();
      #1;
      checks++;
      if (y != (mode ? b : a)) begin
        failures++;
        $display("FAIL mode=%0b a=%h b=%h y=%h", mode, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sign_calculator: all four sign combinations against the rule that
// equal signs give a positive quotient and different signs a negative one.
module tb_sign_calculator;
  logic s1d, s2d, sc;
  int checks = 0, failures = 0;

  sign_calculator dut (.*);

  // expected quotient sign indexed by {dividend sign, divisor sign}
  logic expected[4] = '{1'b0, 1'b1, 1'b1, 1'b0};

  initial begin
    for (int i = 0; i < 4; i++) begin
      {s1d, s2d} = 2'(i);
      #1;
      checks++;
      if (sc != expected[i]) begin
        failures++;
        $display("FAIL %b %b -> %b", s1d, s2d, sc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

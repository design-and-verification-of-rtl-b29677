// tb_exponent_subtractor: all 32 x 32 exponent pairs.
//
// Expected values: e = exp1 - exp2 + 15 computed as an integer, overflow when
// above 30, underflow when below 0, otherwise normal with the low five bits of
// e on the output.
module tb_exponent_subtractor;
  import fp16_div_pkg::*;

  logic [4:0] exp1, exp2, e;
  status_e    exception;
  int checks = 0, failures = 0;
  int n_of = 0, n_uf = 0, n_ok = 0;

  exponent_subtractor dut (.*);

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        int d;
        exp1 = 5'(a);  exp2 = 5'(b);
        #1;
        d = a - b + 15;
        checks++;
        if (d > 30) begin
          n_of++;
          if (exception != ST_OVERFLOW) failures++;
        end else if (d < 0) begin
          n_uf++;
          if (exception != ST_UNDERFLOW) failures++;
        end else begin
          n_ok++;
          if (exception != ST_NORMAL || int'(e) != d) failures++;
        end
      end
    checks++;
    if (n_of == 0 || n_uf == 0 || n_ok == 0) failures++;
    $display("overflow %0d underflow %0d normal %0d", n_of, n_uf, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

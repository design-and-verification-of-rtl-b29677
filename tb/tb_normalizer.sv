// tb_normalizer: every exponent (0..31) with every 11-bit quotient.
//
// The expected shift is found by doubling the quotient until it reaches 1024;
// the expected exponent is e3d minus that count, underflow when it would go
// below 0, and a zero quotient gives zero outputs with ST_ZERO.
module tb_normalizer;
  import fp16_div_pkg::*;

  logic [4:0]  e3d, en;
  logic [10:0] m5d, mn;
  status_e     exception;
  int checks = 0, failures = 0;
  int n_shift = 0, n_uf = 0;

  normalizer dut (.*);

  initial begin
    for (int e = 0; e < 32; e++)
      for (int m = 0; m < 2048; m++) begin
        int sh, mm;
        e3d = 5'(e);  m5d = 11'(m);
        #1;
        checks++;
        if (m == 0) begin
          if (mn != 0 || en != 0 || exception != ST_ZERO) failures++;
        end else begin
          sh = 0;  mm = m;
          while (mm < 1024) begin mm = mm * 2; sh++; end
          if (sh > 0) n_shift++;
          if (int'(mn) != mm) failures++;
          if (e - sh < 0) begin
            n_uf++;
            if (exception != ST_UNDERFLOW) failures++;
          end else if (exception != ST_NORMAL || int'(en) != e - sh) begin
            failures++;
          end
        end
      end
    checks++;
    if (n_shift == 0 || n_uf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

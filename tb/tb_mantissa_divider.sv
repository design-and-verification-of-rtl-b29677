// tb_mantissa_divider: exhaustive check of the restoring mantissa divider.
//
// Every pair of normalised 11-bit mantissas (1024..2047 each) is divided and
// Q compared with the integer quotient floor(MA * 1024 / MB). Zero operands
// (exponent and fraction 0) are checked for the forced zero quotient and the
// ST_ZERO / ST_DIV_BY_ZERO exception, divide by zero taking precedence.
module tb_mantissa_divider;
  import fp16_div_pkg::*;

  logic [10:0] MA, MB, Q;
  logic [4:0]  exp1, exp2;
  status_e     exception;
  int checks = 0, failures = 0;

  mantissa_divider dut (.*);

  initial begin
    for (int a = 1024; a < 2048; a++)
      for (int b = 1024; b < 2048; b++) begin
        // exponents vary with the operands but never mark a zero operand
        exp1 = 5'(1 + a % 31);  exp2 = 5'(1 + b % 31);
        MA = 11'(a);  MB = 11'(b);
        #1;
        checks++;
        if (int'(Q) != (a * 1024) / b || exception != ST_NORMAL) begin
          failures++;
          if (failures < 10) $display("FAIL %0d / %0d -> %0d", a, b, Q);
        end
      end
    // exponent 0 with a non-zero fraction is not a zero operand
    exp1 = 5'd0;  MA = 11'd1025;  exp2 = 5'd0;  MB = 11'd1030;
    #1;
    checks++;
    if (int'(Q) != (1025 * 1024) / 1030 || exception != ST_NORMAL) failures++;
    // zero dividend
    exp1 = 5'd0;  MA = 11'd1024;  exp2 = 5'd3;  MB = 11'd1500;
    #1;
    checks++;
    if (Q != 0 || exception != ST_ZERO) failures++;
    // zero divisor
    exp1 = 5'd20; MA = 11'd1500;  exp2 = 5'd0;  MB = 11'd1024;
    #1;
    checks++;
    if (exception != ST_DIV_BY_ZERO) failures++;
    // both zero: divide by zero wins
    exp1 = 5'd0;  MA = 11'd1024;
    #1;
    checks++;
    if (exception != ST_DIV_BY_ZERO) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

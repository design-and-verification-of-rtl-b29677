// mantissa_divider: combinational restoring division of two 11-bit mantissas.
//
// An array of 11 identical restoring-division cells produces the quotient
// MA/MB one bit per cell, most significant bit first. Q[10] is the integer
// bit, so Q = floor(MA * 2^10 / MB); with both mantissas in [1024, 2047] the
// quotient lies between 0.5 and 2 and Q[10] or Q[9] is always set. Remaining
// bits are truncated (no rounding).
//
// The exponents are inputs only to recognise zero operands (exponent and
// fraction both 0): a zero dividend forces Q to 0 and reports ST_ZERO, a zero
// divisor reports ST_DIV_BY_ZERO (taking precedence), otherwise ST_NORMAL.
// Combinational; second pipeline layer of the divider. Restoring division,
// truncation, the port names and the zero checks follow the reference
// design; the single generic cell is this design's choice.
module mantissa_divider
  import fp16_div_pkg::*;
(
  input  logic [MANT_W-1:0] MA,        // dividend mantissa, hidden bit in [10]
  input  logic [MANT_W-1:0] MB,        // divisor mantissa, hidden bit in [10]
  input  logic [EXP_W-1:0]  exp1,      // dividend exponent
  input  logic [EXP_W-1:0]  exp2,      // divisor exponent
  output logic [MANT_W-1:0] Q,         // quotient, integer bit in [10]
  output status_e           exception
);

  // Partial dividends between the cells; pd[MANT_W] is the initial dividend.
  logic [MANT_W:0]   pd [MANT_W+1];
  logic [MANT_W-1:0] q_raw;
  logic              a_zero, b_zero;

  assign pd[MANT_W] = {1'b0, MA};

  for (genvar i = MANT_W - 1; i >= 0; i--) begin : g_step
    mantissa_divider_cell #(.W(MANT_W)) u_cell (
      .a      (pd[i+1]),
      .b      (MB),
      .q      (q_raw[i]),
      .a_next (pd[i])
    );
  end

  always_comb begin
    a_zero = (exp1 == '0) && (MA[FRAC_W-1:0] == '0);
    b_zero = (exp2 == '0) && (MB[FRAC_W-1:0] == '0);
    Q      = a_zero ? '0 : q_raw;
    if (b_zero)      exception = ST_DIV_BY_ZERO;
    else if (a_zero) exception = ST_ZERO;
    else             exception = ST_NORMAL;
  end

endmodule

// packer: assembles the binary16 quotient and resolves the status.
//
// Collects the exceptions of the exponent subtractor, the mantissa divider
// and the normaliser and chooses by priority, highest first:
//   divide by zero -> result 16'hFFFF (all ones),          status 100
//   zero dividend  -> result +/-0,                          status 000
//   overflow       -> result +/-65504 (largest magnitude),  status 001
//   underflow      -> result +/-0 (either source),          status 010
//   otherwise      -> {sign, exponent, mantissa[9:0]},      status 011
// The hidden bit of the mantissa is dropped here. Combinational; the fourth
// pipeline layer of the divider. The priority order and the special values
// follow the reference design; keeping the sign on zero and underflow
// results is this design's choice.
module packer
  import fp16_div_pkg::*;
(
  input  logic              sed,                         // quotient sign
  input  logic [EXP_W-1:0]  ecd,                         // normalised exponent
  input  logic [MANT_W-1:0] mcd,                         // normalised mantissa
  input  status_e           exception_exponent_sub,
  input  status_e           exception_mantissa_divider,
  input  status_e           exception_normalizer,
  output logic [15:0]       out,
  output status_e           exception
);

  always_comb begin
    if (exception_mantissa_divider == ST_DIV_BY_ZERO) begin
      out       = DIV_BY_ZERO_RESULT;
      exception = ST_DIV_BY_ZERO;
    end else if (exception_mantissa_divider == ST_ZERO) begin
      out       = {sed, 15'b0};
      exception = ST_ZERO;
    end else if (exception_exponent_sub == ST_OVERFLOW) begin
      out       = {sed, MAX_MAGNITUDE};
      exception = ST_OVERFLOW;
    end else if (exception_exponent_sub == ST_UNDERFLOW ||
                 exception_normalizer == ST_UNDERFLOW) begin
      out       = {sed, 15'b0};
      exception = ST_UNDERFLOW;
    end else begin
      out       = {sed, ecd, mcd[FRAC_W-1:0]};
      exception = ST_NORMAL;
    end
  end

endmodule

// exponent_subtractor: biased exponent of a quotient, with range check.
//
// Computes e = exp1 - exp2 + 15 in a signed intermediate wide enough for the
// whole range (-16 .. 45). A value above 30 cannot be represented as a finite
// binary16 exponent and is reported as ST_OVERFLOW, a value below 0 as
// ST_UNDERFLOW, anything else as ST_NORMAL. The 5-bit e output carries the
// low bits of the sum; it is only meaningful with ST_NORMAL. The check is
// made before normalisation, as in the reference design, so a quotient whose
// exponent would come back into range after the normaliser's one-place shift
// is still reported as an overflow. Combinational; second pipeline layer.
module exponent_subtractor
  import fp16_div_pkg::*;
(
  input  logic [EXP_W-1:0] exp1,       // dividend exponent
  input  logic [EXP_W-1:0] exp2,       // divisor exponent
  output logic [EXP_W-1:0] e,          // biased quotient exponent
  output status_e          exception   // ST_OVERFLOW, ST_UNDERFLOW or ST_NORMAL
);

  logic signed [EXP_W+1:0] diff;

  always_comb begin
    diff = $signed({2'b00, exp1}) - $signed({2'b00, exp2}) + (EXP_W+2)'(BIAS);
    e    = diff[EXP_W-1:0];
    if (diff > $signed((EXP_W+2)'(EXP_TOP)))
      exception = ST_OVERFLOW;
    else if (diff < 0)
      exception = ST_UNDERFLOW;
    else
      exception = ST_NORMAL;
  end

endmodule

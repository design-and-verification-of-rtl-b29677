// normalizer: brings a quotient back to the 1.xxx form.
//
// The mantissa quotient m5d is shifted towards its most significant bit until
// bit 10 holds a 1 (zeros enter at the bottom) and the number of places
// shifted is taken off the exponent e3d. If the shifted exponent would fall
// below 0 the result is reported as ST_UNDERFLOW, otherwise ST_NORMAL. An
// all-zero quotient (zero dividend) gives mn = 0, en = 0 and ST_ZERO. For
// quotients of two normalised mantissas the shift is 0 or 1, but the shifter
// handles any position of the leading 1. Combinational; it is the whole third
// pipeline layer of the divider. Shift, exponent correction and the underflow
// rule follow the reference design; the ST_ZERO code for an all-zero quotient
// is this design's choice.
module normalizer
  import fp16_div_pkg::*;
(
  input  logic [EXP_W-1:0]  e3d,       // biased exponent from the subtractor
  input  logic [MANT_W-1:0] m5d,       // quotient from the mantissa divider
  output logic [EXP_W-1:0]  en,        // normalised exponent
  output logic [MANT_W-1:0] mn,        // normalised mantissa, leading 1 in [10]
  output status_e           exception
);

  logic [$clog2(MANT_W+1)-1:0] shift;

  // Count leading zeros: the last (lowest) match wins, so scan upwards.
  always_comb begin
    shift = '0;
    for (int i = 0; i < MANT_W; i++)
      if (m5d[i]) shift = ($bits(shift))'(MANT_W - 1 - i);
  end

  always_comb begin
    if (m5d == '0) begin
      mn        = '0;
      en        = '0;
      exception = ST_ZERO;
    end else begin
      mn        = m5d << shift;
      en        = e3d - EXP_W'(shift);
      exception = ({1'b0, e3d} < {2'b00, shift}) ? ST_UNDERFLOW : ST_NORMAL;
    end
  end

endmodule

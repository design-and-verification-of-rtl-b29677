// sign_calculator: sign of a quotient.
//
// Equal operand signs give a positive quotient, different signs a negative
// one, so the result sign is the XOR of the two sign bits. Combinational; one
// of the three blocks of the divider's second pipeline layer. The XOR rule
// and the port names follow the reference design.
module sign_calculator (
  input  logic s1d,   // dividend sign
  input  logic s2d,   // divisor sign
  output logic sc     // quotient sign
);

  assign sc = s1d ^ s2d;

endmodule

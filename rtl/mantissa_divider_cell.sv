// mantissa_divider_cell: one step of restoring division.
//
// Given the current partial dividend a (kept below 2*b) and the divisor b,
// produces one quotient bit (1 when a >= b) and the next partial dividend,
// which is twice the remainder (a - b when the bit is 1, a unchanged when it
// is 0). Because the remainder is always below b, the doubled value fits in
// one bit more than the divisor. Combinational. The reference design uses
// separate first, middle and last cell variants; one parameterised cell used
// for every step is this design's choice.
module mantissa_divider_cell #(
  parameter int unsigned W = 11   // divisor width
) (
  input  logic [W:0]   a,        // partial dividend, a < 2*b
  input  logic [W-1:0] b,        // divisor
  output logic         q,        // quotient bit
  output logic [W:0]   a_next    // 2 * remainder
);

  logic [W:0]   diff;
  logic [W-1:0] r;     // remainder, always below b

  always_comb begin
    diff   = a - {1'b0, b};
    q      = (a >= {1'b0, b});
    r      = q ? diff[W-1:0] : a[W-1:0];
    a_next = {r, 1'b0};
  end

endmodule

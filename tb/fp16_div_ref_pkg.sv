// fp16_div_ref_pkg: reference model of the binary16 divider for testbenches.
//
// div_ref() computes the expected result and status with plain integer
// arithmetic (one integer division instead of the bit-serial cell array):
// exponent e = ea - eb + 15 with overflow above 30 and underflow below 0,
// quotient floor((1024+fa) * 1024 / (1024+fb)), a one-place normalising
// shift when it is below 1024, then the special cases by priority.
// fp16_value() gives the real value a binary16 word stands for under the same
// number model (hidden bit always 1), used for an arithmetic cross-check.
package fp16_div_ref_pkg;

  typedef struct packed {
    logic [15:0] result;
    logic [2:0]  status;
  } ref_t;

  function automatic ref_t div_ref(logic [15:0] a, logic [15:0] b);
    ref_t r;
    int   ea, eb, fa, fb, e, q;
    logic s;
    s  = a[15] ^ b[15];
    ea = int'(a[14:10]);  fa = int'(a[9:0]);
    eb = int'(b[14:10]);  fb = int'(b[9:0]);
    if (eb == 0 && fb == 0) begin
      r.result = 16'hFFFF;  r.status = 3'd4;
      return r;
    end
    if (ea == 0 && fa == 0) begin
      r.result = {s, 15'd0}; r.status = 3'd0;
      return r;
    end
    e = ea - eb + 15;
    if (e > 30) begin
      r.result = {s, 15'h7BFF}; r.status = 3'd1;
      return r;
    end
    if (e < 0) begin
      r.result = {s, 15'd0}; r.status = 3'd2;
      return r;
    end
    q = ((1024 + fa) * 1024) / (1024 + fb);
    if (q < 1024) begin
      q = q * 2;
      e = e - 1;
    end
    if (e < 0) begin
      r.result = {s, 15'd0}; r.status = 3'd2;
      return r;
    end
    r.result = {s, e[4:0], q[9:0]};
    r.status = 3'd3;
    return r;
  endfunction

  function automatic real fp16_value(logic [15:0] w);
    real m;
    int  e;
    m = 1.0 + real'(int'(w[9:0])) / 1024.0;
    e = int'(w[14:10]) - 15;
    for (int i = 0; i < e; i++) m = m * 2.0;
    for (int i = 0; i > e; i--) m = m / 2.0;
    return w[15] ? -m : m;
  endfunction

endpackage

// floating_point_division: pipelined IEEE-754 binary16 divider.
//
// Divides operand_a by operand_b in four layers separated by register sets:
//   1. unpacking of the operand fields  -> register set 1
//   2. sign calculator, exponent
//      subtractor, mantissa divider     -> register set 2
//   3. normaliser                       -> register set 3
//   4. packer                           -> output registers
// The mantissa quotient is computed by an 11-step combinational restoring
// divider and truncated; the result may therefore differ from a correctly
// rounded quotient in the last bit. Subnormal inputs are treated as if their
// hidden bit were 1, and exponent 31 (infinity / NaN) is not treated
// specially; the only special results are the ones listed in the packer.
//
// Interface and timing: operands are sampled on the rising clock edge at
// which enable is high, and their result appears on division_result/status
// together with valid = 1 after the fourth rising edge (latency 4). A new
// operand pair can be accepted on every edge, so back-to-back results come
// out one per clock. When enable is low no new operation enters; a valid bit
// travels with each operation and each register set loads only when its
// incoming valid bit is set, so idle layers hold their contents. valid is
// high for exactly one cycle per accepted operand pair, and division_result
// and status keep the last result while valid is low. Holding the same
// operands with enable high for several cycles therefore yields that many
// (identical) results. rst is active high and synchronous and clears every
// register.
//
// Following the reference design: the layer split, the latency, the status
// codes and priorities, the special result values, the restoring division and
// truncation. This design's own choices: the valid-bit handshake and how
// enable gates the registers, the synchronous reset, the extra register stage
// that carries the layer-2 exceptions alongside the normaliser output.
module floating_point_division
  import fp16_div_pkg::*;
#(
  parameter int unsigned LATENCY = 4   // fixed by the four layers; documents the timing
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [15:0] operand_a,        // dividend
  input  logic [15:0] operand_b,        // divisor
  output logic [15:0] division_result,
  output logic [2:0]  status,
  output logic        valid
);

  // ---- layer 1: unpacking ---------------------------------------------
  // Sign, exponent and fraction fields are split out and the hidden 1 is
  // placed in front of each fraction. The hidden bit is 1 for every
  // exponent, 0 included; zero operands are recognised in layer 2.
  stage1_t l1, r1;
  logic    v1;
  fp16_t   in_a, in_b;

  always_comb begin
    in_a  = fp16_t'(operand_a);
    in_b  = fp16_t'(operand_b);
    l1.s1 = in_a.sign;
    l1.s2 = in_b.sign;
    l1.e1 = in_a.exp;
    l1.e2 = in_b.exp;
    l1.m1 = {1'b1, in_a.frac};
    l1.m2 = {1'b1, in_b.frac};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r1 <= '0;
      v1 <= 1'b0;
    end else begin
      v1 <= enable;
      if (enable) r1 <= l1;
    end
  end

  // ---- layer 2: sign, exponent, mantissa ------------------------------
  stage2_t l2, r2;
  logic    v2;

  sign_calculator u_sign (
    .s1d (r1.s1),
    .s2d (r1.s2),
    .sc  (l2.sc)
  );

  exponent_subtractor u_exp (
    .exp1      (r1.e1),
    .exp2      (r1.e2),
    .e         (l2.e),
    .exception (l2.ex_es)
  );

  mantissa_divider u_mdiv (
    .MA        (r1.m1),
    .MB        (r1.m2),
    .exp1      (r1.e1),
    .exp2      (r1.e2),
    .Q         (l2.q),
    .exception (l2.ex_md)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      r2 <= '0;
      v2 <= 1'b0;
    end else begin
      v2 <= v1;
      if (v1) r2 <= l2;
    end
  end

  // ---- layer 3: normaliser ----------------------------------------------
  stage3_t l3, r3;
  logic    v3;

  normalizer u_norm (
    .e3d       (r2.e),
    .m5d       (r2.q),
    .en        (l3.en),
    .mn        (l3.mn),
    .exception (l3.ex_nm)
  );

  always_comb begin
    l3.sc    = r2.sc;
    l3.ex_es = r2.ex_es;
    l3.ex_md = r2.ex_md;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r3 <= '0;
      v3 <= 1'b0;
    end else begin
      v3 <= v2;
      if (v2) r3 <= l3;
    end
  end

  // ---- layer 4: packer ----------------------------------------------------
  logic [15:0] l4_out;
  status_e     l4_status;

  packer u_packer (
    .sed                        (r3.sc),
    .ecd                        (r3.en),
    .mcd                        (r3.mn),
    .exception_exponent_sub     (r3.ex_es),
    .exception_mantissa_divider (r3.ex_md),
    .exception_normalizer       (r3.ex_nm),
    .out                        (l4_out),
    .exception                  (l4_status)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      division_result <= '0;
      status          <= ST_ZERO;
      valid           <= 1'b0;
    end else begin
      valid <= v3;
      if (v3) begin
        division_result <= l4_out;
        status          <= l4_status;
      end
    end
  end

  // A finished result always carries one of the five defined status codes,
  // and nothing comes out in the cycles right after a reset.
  assert property (@(posedge clk) disable iff (rst) valid |-> status <= 3'b100)
    else $error("floating_point_division: undefined status code %b", status);
  assert property (@(posedge clk) $past(rst) |-> !valid)
    else $error("floating_point_division: valid right after reset");

  // The pipeline depth is fixed by the four layers above.
  initial assert (LATENCY == 4)
    else $error("floating_point_division: LATENCY must be 4");

endmodule

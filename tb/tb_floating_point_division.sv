// tb_floating_point_division: end-to-end test of the pipelined binary16 divider.
//
// A driver and a monitor work through a scoreboard queue: every rising edge at
// which enable is high pushes the reference result (fp16_div_ref_pkg) and the
// edge number; every cycle with valid high pops one entry and compares result,
// status and latency (the result must be registered at the fourth rising edge,
// counting the edge that sampled the operands). Normal results are also
// checked against real arithmetic: the truncated quotient q must satisfy
// q <= a/b < q + 2 ulp.
//
// Phase 1 uses the one-at-a-time protocol: operands and enable held for four
// cycles, then one idle cycle; directed operands reach all five status codes
// and the normaliser's underflow. Phase 2 streams random operands back to back
// with occasional idle cycles. Each mechanism (five status codes, normalising
// shift, normaliser underflow, back-to-back results, idle cycles with work in
// flight, reset) is counted and must occur at least once.
module tb_floating_point_division;
  import fp16_div_ref_pkg::*;

  localparam int N_RANDOM = 4000;

  logic        clk = 1'b0;
  logic        rst;
  logic        enable;
  logic [15:0] operand_a, operand_b;
  logic [15:0] division_result;
  logic [2:0]  status;
  logic        valid;

  int checks = 0, failures = 0;
  int cyc = 0;

  floating_point_division dut (.*);

  always #5 clk = ~clk;

  // ---- scoreboard ----------------------------------------------------------
  typedef struct {
    ref_t        exp;
    logic [15:0] a, b;
    int          cyc;
  } entry_t;
  entry_t sb[$];

  int n_status[5];
  int n_shift = 0, n_norm_uf = 0, n_back_to_back = 0, n_idle_in_flight = 0;
  int n_reset = 0;
  logic valid_q = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      sb.delete();
      valid_q <= 1'b0;
    end else begin
      if (enable) begin
        entry_t e;
        e.exp = div_ref(operand_a, operand_b);
        e.a = operand_a;  e.b = operand_b;  e.cyc = cyc;
        sb.push_back(e);
        // mechanism bookkeeping, from the operands only
        if (e.exp.status == 3'd3 || e.exp.status == 3'd2) begin
          if ((operand_a[9:0] < operand_b[9:0])) n_shift++;
          if (e.exp.status == 3'd2 &&
              int'(operand_a[14:10]) - int'(operand_b[14:10]) + 15 == 0 &&
              operand_a[9:0] < operand_b[9:0]) n_norm_uf++;
        end
      end else if (sb.size() != 0) begin
        n_idle_in_flight++;
      end
      valid_q <= valid;
      if (valid) begin
        if (valid_q) n_back_to_back++;
        if (sb.size() == 0) begin
          check(1'b0, "valid with no operation in flight");
        end else begin
          entry_t e;
          e = sb.pop_front();
          check(division_result == e.exp.result,
                $sformatf("%h / %h: result %h, expected %h", e.a, e.b,
                          division_result, e.exp.result));
          check(status == e.exp.status,
                $sformatf("%h / %h: status %0d, expected %0d", e.a, e.b,
                          status, e.exp.status));
          check(cyc - e.cyc == 4,
                $sformatf("latency %0d edges, expected 4", cyc - e.cyc));
          n_status[status]++;
          if (status == 3'd3) begin
            real q, t, ulp;
            q   = fp16_value(division_result);
            t   = fp16_value(e.a) / fp16_value(e.b);
            ulp = fp16_value({1'b0, division_result[14:10], 10'd0}) / 1024.0;
            if (q < 0) begin q = -q; t = -t; end
            check(q <= t && t < q + 2.0 * ulp,
                  $sformatf("%h / %h = %h not within truncation of %f",
                            e.a, e.b, division_result, t));
          end
        end
      end
    end
  end

  // ---- stimulus -------------------------------------------------------------
  task automatic drive_held(logic [15:0] a, logic [15:0] b);
    // one-at-a-time protocol: one operation accepted, inputs held for four
    // cycles, enable raised only on the first so a single result is produced
    @(negedge clk);
    operand_a = a;  operand_b = b;  enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  logic [15:0] directed_a[] = '{16'h4600, 16'h3C00, 16'hBC00, 16'h0000, 16'h4500,
                                16'h0000, 16'h7B53, 16'h0400, 16'h0400, 16'hC880,
                                16'h3C00, 16'h7BFF, 16'h7800};
  logic [15:0] directed_b[] = '{16'h4000, 16'h4200, 16'h3800, 16'h4500, 16'h0000,
                                16'h0000, 16'h1419, 16'h7800, 16'h4001, 16'hC000,
                                16'h3C00, 16'h3C00, 16'h3A00};
  // hand-worked expectations for the directed pairs (6/2, 1/3 truncated,
  // -1/0.5, 0/5, 5/0, 0/0, overflow, underflow, normaliser underflow,
  // -9/-2, 1/1, 65504/1, 32768/0.75 which overflows because the exponent
  // is checked before normalisation)
  logic [15:0] hand_result[] = '{16'h4200, 16'h3554, 16'hC000, 16'h0000, 16'hFFFF,
                                 16'hFFFF, 16'h7BFF, 16'h0000, 16'h0000, 16'h4480,
                                 16'h3C00, 16'h7BFF, 16'h7BFF};
  logic [2:0]  hand_status[] = '{3, 3, 3, 0, 4, 4, 1, 2, 2, 3, 3, 3, 1};

  initial begin
    rst = 1'b1;  enable = 1'b0;  operand_a = '0;  operand_b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // the reference model itself is held against hand-worked values
    foreach (directed_a[i]) begin
      ref_t r;
      r = div_ref(directed_a[i], directed_b[i]);
      check(r.result == hand_result[i] && r.status == hand_status[i],
            $sformatf("reference model disagrees on %h / %h", directed_a[i], directed_b[i]));
    end

    // phase 1: one operation at a time
    foreach (directed_a[i]) drive_held(directed_a[i], directed_b[i]);

    // reset with work in flight: nothing may come out afterwards
    @(negedge clk);
    operand_a = 16'h4600;  operand_b = 16'h4000;  enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;  rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n_reset++;
    repeat (5) begin
      @(negedge clk);
      check(!valid, "valid after reset with nothing accepted");
    end

    // phase 2: back-to-back random operands with occasional idle cycles
    for (int i = 0; i < N_RANDOM; i++) begin
      @(negedge clk);
      operand_a = 16'($urandom);
      operand_b = 16'($urandom);
      // bias some operands towards nearby exponents so normal results dominate
      if ($urandom_range(0, 1) != 0) operand_b[14:10] = 5'($urandom_range(10, 20));
      if ($urandom_range(0, 1) != 0) operand_a[14:10] = 5'($urandom_range(10, 20));
      if ($urandom_range(0, 63) == 0) operand_a = {operand_a[15], 15'd0};
      if ($urandom_range(0, 63) == 0) operand_b = {operand_b[15], 15'd0};
      enable = ($urandom_range(0, 7) != 0);
    end
    @(negedge clk);
    enable = 1'b0;
    repeat (8) @(negedge clk);

    check(sb.size() == 0, "operations still outstanding at the end");
    foreach (n_status[s]) begin
      $display("status %0d seen %0d times", s, n_status[s]);
      check(n_status[s] > 0, $sformatf("status %0d never produced", s));
    end
    $display("normalising shifts %0d, normaliser underflows %0d, back-to-back %0d, idle-in-flight %0d, resets %0d",
             n_shift, n_norm_uf, n_back_to_back, n_idle_in_flight, n_reset);
    check(n_shift > 0, "normalising shift never happened");
    check(n_norm_uf > 0, "normaliser underflow never happened");
    check(n_back_to_back > 0, "no back-to-back results");
    check(n_idle_in_flight > 0, "no idle cycle with work in flight");
    check(n_reset > 0, "no reset with work in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

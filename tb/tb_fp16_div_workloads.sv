// tb_fp16_div_workloads: the divider's two characterisation runs.
//
// 1. One-at-a-time run: each operand pair is applied with enable held high for
//    four clock cycles and then one cycle low, the way a bus-functional driver
//    that waits for each result would apply it. Directed pairs cover all five
//    status codes. Each held cycle starts one (identical) division, so valid
//    must stay high for four cycles, beginning four edges after the first
//    sampling edge, with the same result and status throughout.
// 2. Pipelined run: ten random operand pairs on ten consecutive clock edges
//    with enable held high; ten results must come out on ten consecutive
//    cycles, the first one four edges after the first pair was sampled.
// Expected values come from fp16_div_ref_pkg.
module tb_fp16_div_workloads;
  import fp16_div_ref_pkg::*;

  localparam int N_PIPE = 10;

  logic        clk = 1'b0;
  logic        rst;
  logic        enable;
  logic [15:0] operand_a, operand_b;
  logic [15:0] division_result;
  logic [2:0]  status;
  logic        valid;
  int checks = 0, failures = 0;
  int seen_status[5];

  floating_point_division dut (.*);

  always #20 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] basic_a[] = '{16'h5640, 16'h0000, 16'h7A00, 16'h0800, 16'hB266, 16'h4D00};
  logic [15:0] basic_b[] = '{16'h0000, 16'h4248, 16'h0C00, 16'h7400, 16'h3A00, 16'hC500};

  initial begin
    rst = 1'b1;  enable = 1'b0;  operand_a = '0;  operand_b = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // ---- one-at-a-time run ----
    foreach (basic_a[i]) begin
      ref_t r;
      int   n_valid;
      r = div_ref(basic_a[i], basic_b[i]);
      @(negedge clk);
      operand_a = basic_a[i];  operand_b = basic_b[i];  enable = 1'b1;
      // sampling edges 1..4 while enable is held; the first result is
      // registered on the fourth edge
      repeat (3) begin
        @(negedge clk);
        check(!valid, "valid before the fourth edge");
      end
      @(negedge clk);
      enable = 1'b0;
      n_valid = 0;
      repeat (6) begin
        if (valid) begin
          n_valid++;
          check(division_result == r.result && status == r.status,
                $sformatf("%h / %h -> %h/%0d, expected %h/%0d", basic_a[i], basic_b[i],
                          division_result, status, r.result, r.status));
          seen_status[status]++;
        end
        @(negedge clk);
      end
      check(n_valid == 4, $sformatf("valid high %0d cycles, expected 4", n_valid));
    end
    foreach (seen_status[s]) check(seen_status[s] > 0, $sformatf("status %0d not reached", s));

    // ---- pipelined run ----
    begin
      logic [15:0] pa[N_PIPE], pb[N_PIPE];
      foreach (pa[i]) begin
        pa[i] = 16'($urandom);
        pb[i] = 16'($urandom);
      end
      for (int i = 0; i < N_PIPE + 4; i++) begin
        @(negedge clk);
        // results of pair i-4 are visible after the edge that sampled pair i-1
        if (i >= 4) begin
          ref_t r;
          r = div_ref(pa[i-4], pb[i-4]);
          check(valid, $sformatf("no result for pair %0d", i - 4));
          check(division_result == r.result && status == r.status,
                $sformatf("pair %0d: %h / %h -> %h/%0d, expected %h/%0d", i - 4, pa[i-4], pb[i-4],
                          division_result, status, r.result, r.status));
        end else begin
          check(!valid, "result before the pipeline filled");
        end
        if (i < N_PIPE) begin
          operand_a = pa[i];  operand_b = pb[i];  enable = 1'b1;
        end else begin
          enable = 1'b0;
        end
      end
      @(negedge clk);
      check(!valid, "extra result after the pipelined run");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

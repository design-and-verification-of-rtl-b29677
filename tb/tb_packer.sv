// tb_packer: exception priority and result packing.
//
// Random sign, exponent and mantissa are combined with every combination of
// the three incoming exception codes the other blocks can produce. The
// expected output follows the priority divide by zero > zero > overflow >
// underflow > normal, with results FFFF, signed zero, signed 65504, signed
// zero and the packed number respectively.
module tb_packer;
  import fp16_div_pkg::*;

  logic        sed;
  logic [4:0]  ecd;
  logic [10:0] mcd;
  status_e     exception_exponent_sub, exception_mantissa_divider, exception_normalizer;
  logic [15:0] out;
  status_e     exception;
  int checks = 0, failures = 0;

  packer dut (.*);

  status_e es_codes[3] = '{ST_OVERFLOW, ST_UNDERFLOW, ST_NORMAL};
  status_e md_codes[3] = '{ST_DIV_BY_ZERO, ST_ZERO, ST_NORMAL};
  status_e nm_codes[3] = '{ST_ZERO, ST_UNDERFLOW, ST_NORMAL};

  initial begin
    for (int rep = 0; rep < 200; rep++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          for (int k = 0; k < 3; k++) begin
            logic [15:0] exp_out;
            logic [2:0]  exp_st;
            sed = 1'($urandom);  ecd = 5'($urandom);  mcd = {1'b1, 10'($urandom)};
            exception_exponent_sub     = es_codes[i];
            exception_mantissa_divider = md_codes[j];
            exception_normalizer       = nm_codes[k];
            #1;
            if (j == 0)      begin exp_out = 16'hFFFF;                exp_st = 3'b100; end
            else if (j == 1) begin exp_out = 16'(sed) << 15;          exp_st = 3'b000; end
            else if (i == 0) begin exp_out = (16'(sed) << 15) | 16'd31743; exp_st = 3'b001; end
            else if (i == 1 || k == 1)
                             begin exp_out = 16'(sed) << 15;          exp_st = 3'b010; end
            else begin
              exp_out = (16'(sed) << 15) + 16'(ecd) * 16'd1024 + 16'(mcd) - 16'd1024;
              exp_st  = 3'b011;
            end
            checks++;
            if (out != exp_out || exception != exp_st) begin
              failures++;
              if (failures < 10)
                $display("FAIL es=%0d md=%0d nm=%0d -> %h/%0d, expected %h/%0d",
                         i, j, k, out, exception, exp_out, exp_st);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_array_multiplier: exhaustive check of the 10x5 sign-magnitude multiplier
// (all 1024 data words times all 32 coefficient words).
module tb_array_multiplier;
  import dwt_pkg::*;
  sm_data_t          data;
  sm_coef_t          coef;
  logic              prod_sign;
  logic [PROD_W-1:0] prod_mag;
  int checks = 0, failures = 0;

  array_multiplier dut (.*);

  initial begin
    for (int d = 0; d < 1024; d++) begin
      for (int c = 0; c < 32; c++) begin
        data = sm_data_t'(d);
        coef = sm_coef_t'(c);
        #1;
        checks++;
        if (prod_mag != PROD_W'((d % 512) * (c % 16)) || prod_sign != ((d >= 512) ^ (c >= 16))) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d c=%0d -> s=%0b m=%0d", d, c, prod_sign, prod_mag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_computation_core: W = X + Bi*Y + Bj*Z against the integer reference,
// with random operands, the default coefficients, and overflow cases.
module tb_computation_core;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  sm_data_t x, y, z, w, exp_w;
  sm_coef_t bi, bj;
  int checks = 0, failures = 0, wraps = 0;

  computation_core dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x = rand_sm(); y = rand_sm(); z = rand_sm();
      if (i % 2 == 0) begin
        bi = ref_coef($urandom_range(7)); bj = ref_coef($urandom_range(7));
      end else begin
        bi = sm_coef_t'($urandom); bj = sm_coef_t'($urandom);
      end
      if (i == 1) begin   // largest positive sum: wraps
        x = '{0, 511}; y = '{0, 511}; z = '{0, 511}; bi = '{0, 15}; bj = '{0, 15};
      end
      #1;
      exp_w = ref_step(x, y, z, bi, bj);
      if (sm2int(x) + ref_prod(y, bi) + ref_prod(z, bj) > 511 ||
          sm2int(x) + ref_prod(y, bi) + ref_prod(z, bj) < -512) wraps++;
      checks++;
      if (w !== exp_w) begin
        failures++;
        if (failures < 10) $display("FAIL x=%p y=%p z=%p bi=%p bj=%p w=%p exp=%p", x, y, z, bi, bj, w, exp_w);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no overflow case exercised"); end
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

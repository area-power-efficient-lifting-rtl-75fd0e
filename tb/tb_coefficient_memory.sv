// tb_coefficient_memory: reads every coefficient through both ports and
// checks the Bj zero-enable.
module tb_coefficient_memory;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  logic [2:0] bi_addr, bj_addr;
  logic       bj_en;
  sm_coef_t   bi, bj;
  int checks = 0, failures = 0;

  coefficient_memory dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int e = 0; e < 2; e++) begin
        bi_addr = 3'(i); bj_addr = 3'(7 - i); bj_en = e[0];
        #1;
        checks += 2;
        if (bi !== ref_coef(i)) begin
          failures++; $display("FAIL B%0d = %b", i, bi);
        end
        if (bj !== (e ? ref_coef(7 - i) : sm_coef_t'('0))) begin
          failures++; $display("FAIL Bj addr %0d en %0d = %b", 7 - i, e, bj);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

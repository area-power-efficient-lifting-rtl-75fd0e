// tb_three_term_adder: three-term 10-bit adder against integer sums mod 1024.
module tb_three_term_adder;
  logic [9:0] x, y, z, s;
  int checks = 0, failures = 0;
  three_term_adder dut (.*);
  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = 10'($urandom); y = 10'($urandom); z = 10'($urandom);
      if (i == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks++;
      if (s != 10'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", x, y, z, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

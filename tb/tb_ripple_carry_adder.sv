// tb_ripple_carry_adder: 10-bit and 13-bit ripple adders against integer sums.
module tb_ripple_carry_adder;
  logic [9:0]  a10, b10, s10;
  logic [12:0] a13, b13, s13;
  logic        ci10, co10, ci13, co13;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .cin(ci10), .sum(s10), .cout(co10));
  ripple_carry_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      if (i < 4) begin
        a10 = (i[0]) ? '1 : '0; b10 = (i[1]) ? '1 : '0; ci10 = i[0];
        a13 = (i[0]) ? '1 : '0; b13 = (i[1]) ? '1 : '0; ci13 = i[1];
      end else begin
        a10 = 10'($urandom); b10 = 10'($urandom); ci10 = 1'($urandom);
        a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      end
      #1;
      checks += 2;
      if ({co10, s10} != 11'(int'(a10) + int'(b10) + int'(ci10))) begin
        failures++;
        $display("FAIL10 %0d+%0d+%0d -> %0d", a10, b10, ci10, {co10, s10});
      end
      if ({co13, s13} != 14'(int'(a13) + int'(b13) + int'(ci13))) begin
        failures++;
        $display("FAIL13 %0d+%0d+%0d -> %0d", a13, b13, ci13, {co13, s13});
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

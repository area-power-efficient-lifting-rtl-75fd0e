// three_term_adder: 10-bit adder of three two's complement terms.
//
// Two two-term 10-bit ripple_carry_adder instances are cascaded:
// s = (x + y) + z. The result wraps modulo 2^10 like the 10-bit hardware
// adder; carries out of the top bit are dropped. Purely combinational.
module three_term_adder
  import dwt_pkg::*;
(
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  input  logic [DATA_W-1:0] z,
  output logic [DATA_W-1:0] s
);
  logic [DATA_W-1:0] s1;
  logic              unused_c1, unused_c2;
  ripple_carry_adder #(.WIDTH(DATA_W)) u_add1 (.a(x),  .b(y), .cin(1'b0), .sum(s1), .cout(unused_c1));
  ripple_carry_adder #(.WIDTH(DATA_W)) u_add2 (.a(s1), .b(z), .cin(1'b0), .sum(s),  .cout(unused_c2));
endmodule

// ripple_carry_adder: WIDTH-bit two's complement / unsigned adder built from
// a chain of full_adder cells, carry rippling from bit 0 upward.
//
// A ripple chain is used because delay is not a constraint in this
// low-bandwidth application while area and power are. The design uses a
// 10-bit instance (three-term adder) and a 13-bit instance (final adder of
// each multiplier). Purely combinational; the sum wraps modulo 2^WIDTH and
// the carry out of the top bit is available on cout.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 10
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule

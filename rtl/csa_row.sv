// csa_row: WIDTH-bit 3:2 compressor (carry-save adder) row.
//
// Each bit position is one full_adder: three input rows become a sum row and
// a carry row, with x + y + z == sum + 2*carry. The carry row is returned
// unshifted; the caller weights it by two. Used to build the Wallace tree of
// the array multiplier. Purely combinational.
module csa_row #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(sum[i]), .cout(carry[i]));
  end
endmodule

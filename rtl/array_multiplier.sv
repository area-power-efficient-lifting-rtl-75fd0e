// array_multiplier: 10x5 sign-magnitude multiplier.
//
// The magnitudes (9 bits of data by 4 bits of coefficient) are multiplied as
// an array: every data bit is ANDed with every coefficient bit, giving four
// shifted partial-product rows. A Wallace tree of two 3:2 compressor stages
// (csa_row) reduces the four rows to two, and a 13-bit ripple_carry_adder
// adds them. The product sign is the XOR of the two signs. Working in
// sign-magnitude keeps the multiplier at 10x5 instead of the 10x10 a two's
// complement multiplier would need.
//
// Interface: data (sign-magnitude 10 bit), coef (sign-magnitude 5 bit) ->
// sign and 13-bit unsigned magnitude product. Purely combinational.
module array_multiplier
  import dwt_pkg::*;
(
  input  sm_data_t            data,
  input  sm_coef_t            coef,
  output logic                prod_sign,
  output logic [PROD_W-1:0]   prod_mag
);
  logic [PROD_W-1:0] pp [CMAG_W];
  logic [PROD_W-1:0] s1, c1, s2, c2;
  logic              unused_cout;

  // AND-array partial products
  always_comb begin
    for (int j = 0; j < CMAG_W; j++) begin
      pp[j] = PROD_W'({MAG_W{coef.mag[j]}} & data.mag) << j;
    end
  end

  // Wallace tree: 4 rows -> 3 rows -> 2 rows. The full product fits in
  // PROD_W bits, so carries shifted out of the top are always zero.
  csa_row #(.WIDTH(PROD_W)) u_csa1 (.x(pp[0]), .y(pp[1]), .z(pp[2]), .sum(s1), .carry(c1));
  csa_row #(.WIDTH(PROD_W)) u_csa2 (.x(s1), .y({c1[PROD_W-2:0], 1'b0}), .z(pp[3]),
                                    .sum(s2), .carry(c2));

  // final 13-bit adder
  ripple_carry_adder #(.WIDTH(PROD_W)) u_final (
    .a(s2), .b({c2[PROD_W-2:0], 1'b0}), .cin(1'b0), .sum(prod_mag), .cout(unused_cout));

  assign prod_sign = data.sign ^ coef.sign;
endmodule

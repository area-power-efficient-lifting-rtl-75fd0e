// computation_core: the single arithmetic unit of the DWT, W = X + Bi*Y + Bj*Z.
//
// All five lifting steps share this general form, so one core executes them
// one per clock. Two array_multiplier instances form Bi*Y and Bj*Z in
// sign-magnitude; each 13-bit product magnitude is scaled by the coefficient's
// COEF_FRAC fractional bits (truncated, i.e. rounded toward zero) to a 9-bit
// magnitude. The two products and X are converted to two's complement,
// summed by the three-term 10-bit adder (wrapping modulo 2^10) and the sum is
// converted back to sign-magnitude. The structure (two multipliers, 2's
// complement stage, three-term adder, 2's complement stage) follows the
// design; the coefficient scaling and the wrap on overflow are this design's
// choices. Purely combinational: the critical path is one multiplier plus two
// adders.
module computation_core
  import dwt_pkg::*;
(
  input  sm_data_t x,
  input  sm_data_t y,
  input  sm_data_t z,
  input  sm_coef_t bi,
  input  sm_coef_t bj,
  output sm_data_t w
);
  logic              sy, sz;
  logic [PROD_W-1:0] my, mz;
  sm_data_t          py, pz;
  logic [DATA_W-1:0] tx, ty, tz, tw;

  array_multiplier u_mul_y (.data(y), .coef(bi), .prod_sign(sy), .prod_mag(my));
  array_multiplier u_mul_z (.data(z), .coef(bj), .prod_sign(sz), .prod_mag(mz));

  // drop the COEF_FRAC fraction bits; the rest is a 9-bit magnitude
  assign py = '{sign: sy, mag: my[COEF_FRAC +: MAG_W]};
  assign pz = '{sign: sz, mag: mz[COEF_FRAC +: MAG_W]};

  sm_to_tc u_tc_x (.sm(x),  .tc(tx));
  sm_to_tc u_tc_y (.sm(py), .tc(ty));
  sm_to_tc u_tc_z (.sm(pz), .tc(tz));

  three_term_adder u_add (.x(tx), .y(ty), .z(tz), .s(tw));

  tc_to_sm u_sm_w (.tc(tw), .sm(w));

  // the low fraction bits of the products are discarded by design
  logic unused_frac;
  assign unused_frac = ^{my[COEF_FRAC-1:0], mz[COEF_FRAC-1:0]};
endmodule

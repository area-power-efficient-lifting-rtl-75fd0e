// coefficient_memory: hard-wired ROM of the eight 5-bit filter coefficients.
//
// The coefficients B0..B7 are constants, so the memory is a ROM set by the
// COEFS parameter (B0 in the low five bits). It has two combinational read
// ports, one for each multiplier of the computation core: Bi at bi_addr and
// Bj at bj_addr. When bj_en is low, Bj reads as zero, which turns
// W = X + Bi*Y + Bj*Z into the two-term form of the P and d steps. The
// default values are placeholders chosen for this design (see dwt_pkg).
module coefficient_memory
  import dwt_pkg::*;
#(
  parameter coef_table_t COEFS = DEFAULT_COEFS
) (
  input  logic [2:0] bi_addr,
  input  logic [2:0] bj_addr,
  input  logic       bj_en,
  output sm_coef_t   bi,
  output sm_coef_t   bj
);
  always_comb begin
    bi = COEFS[bi_addr*COEF_W +: COEF_W];
    bj = bj_en ? sm_coef_t'(COEFS[bj_addr*COEF_W +: COEF_W]) : '0;
  end
endmodule

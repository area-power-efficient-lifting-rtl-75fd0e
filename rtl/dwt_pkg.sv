// dwt_pkg: types and constants shared by the lifting DWT datapath.
//
// Data words are 10-bit sign-magnitude (1 sign bit, 9 magnitude bits) and
// filter coefficients are 5-bit sign-magnitude (1 sign bit, 4 magnitude
// bits), the word sizes of the design. The binary point of a coefficient
// (COEF_FRAC fractional bits) and the coefficient values themselves are this
// design's own choice: the eight symmlet-4 lifting constants are meant to be
// replaced by the user's own quantised factorisation.
package dwt_pkg;

  localparam int unsigned DATA_W    = 10;            // data word, sign-magnitude
  localparam int unsigned MAG_W     = DATA_W - 1;    // 9-bit magnitude
  localparam int unsigned COEF_W    = 5;             // coefficient, sign-magnitude
  localparam int unsigned CMAG_W    = COEF_W - 1;    // 4-bit magnitude
  localparam int unsigned PROD_W    = MAG_W + CMAG_W;// 13-bit magnitude product
  localparam int unsigned COEF_FRAC = 4;             // coefficient fractional bits
  localparam int unsigned NUM_COEF  = 8;             // B0 .. B7

  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } sm_data_t;

  typedef struct packed {
    logic              sign;
    logic [CMAG_W-1:0] mag;
  } sm_coef_t;

  // One channel/level state word, in the order it leaves CC memory
  // (Z, M1, M2, M3 after the last computation step).
  typedef struct packed {
    sm_data_t f;
    sm_data_t p;
    sm_data_t q;
    sm_data_t r;
  } cl_state_t;

  // Eight phases of one channel slot: one read, five computations, two writes.
  typedef enum logic [2:0] {
    PH_READ   = 3'd0,
    PH_CALC_P = 3'd1,
    PH_CALC_Q = 3'd2,
    PH_CALC_R = 3'd3,
    PH_CALC_A = 3'd4,
    PH_CALC_D = 3'd5,
    PH_WR_CL  = 3'd6,
    PH_WR_PR  = 3'd7
  } phase_e;

  typedef logic [NUM_COEF*COEF_W-1:0] coef_table_t;

  // Default coefficient table, B0 in the low bits. Sign-magnitude with
  // COEF_FRAC fractional bits: {sign, mag} means (-1)^sign * mag / 16.
  // B0=-6/16 B1=+2/16 B2=-5/16 B3=+9/16 B4=-3/16 B5=+7/16 B6=-2/16 B7=+11/16
  localparam coef_table_t DEFAULT_COEFS = {
    5'b0_1011, // B7
    5'b1_0010, // B6
    5'b0_0111, // B5
    5'b1_0011, // B4
    5'b0_1001, // B3
    5'b1_0101, // B2
    5'b0_0010, // B1
    5'b1_0110  // B0
  };

endpackage

// controller: counter-based state machine and address generator.
//
// One free-running counter is the whole state. Its fields, LSB first:
//   phase  [2:0]            eight phases of one channel slot: read, five
//                           computation steps (P, Q, R, a, d), write of the
//                           channel/level state, write of the approximation
//   ch     [CH_W-1:0]       channel of the slot (NUM_CH slots per sample period)
//   s      [NUM_LVL-1:0]    sample count: s[0] is the pair parity (0: first
//                           sample h, 1: second sample f), s[NUM_LVL-1:1] are
//                           the level bits
// The level computed in a slot is one plus the number of trailing zeros of s:
// odd samples compute level 1, samples 2 mod 4 level 2, 4 mod 8 level 3 and
// so on, and s == 0 is a slot with no computation. Higher levels therefore run
// in the idle half of the level-1 pairs and the clock rate does not depend on
// the number of levels. The approximation of level l (l < NUM_LVL) goes to
// the pairing memory as the next level's h when s[l] is 1 and as its f when
// s[l] is 0; the top level sends it out.
//
// Everything below is decoded combinationally from the counter; memory
// addresses are level_index*NUM_CH + channel. The counter field layout,
// the level rule and the eight phases follow the design; the order of the two
// write phases and the output strobes are this design's choices.
// NUM_CH must be a power of two.
module controller
  import dwt_pkg::*;
#(
  parameter int unsigned NUM_CH  = 32,
  parameter int unsigned NUM_LVL = 4,
  localparam int unsigned CH_W   = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned LW     = (NUM_LVL > 1) ? $clog2(NUM_LVL) : 1,
  localparam int unsigned CL_AW  = (NUM_CH*NUM_LVL > 1) ? $clog2(NUM_CH*NUM_LVL) : 1,
  localparam int unsigned PR_D   = NUM_CH * ((NUM_LVL > 1) ? NUM_LVL - 1 : 1),
  localparam int unsigned PR_AW  = (PR_D > 1) ? $clog2(PR_D) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // slot decode
  output phase_e             phase,
  output logic [CH_W-1:0]    ch,
  output logic [NUM_LVL-1:0] sample,    // sample count within a frame
  output logic [LW-1:0]      lvl,       // level index (0 = level 1)
  output logic               calc_en,   // this slot computes
  output logic               lvl_first, // level 1: inputs from bus and input buffer
  output logic               lvl_top,   // highest level: approximation goes out
  // input buffer
  output logic               ib_we,
  // computation core and its memory
  output logic               cc_load,
  output logic               cc_shift,
  output logic               x_from_y,
  output logic               d_latch,
  output logic [2:0]         bi_addr,
  output logic [2:0]         bj_addr,
  output logic               bj_en,
  // channel/level memory
  output logic [CL_AW-1:0]   cl_addr,
  output logic               cl_we,
  // pairing memory
  output logic [PR_AW-1:0]   pr_addr,
  output logic               pr_we,
  output logic               pr_wsel_h,
  // output strobes
  output logic               d_valid,
  output logic               a_valid
);
  localparam int unsigned CW = 3 + CH_W + NUM_LVL;

  if ((1 << CH_W) != NUM_CH) begin : g_bad_ch
    $error("controller: NUM_CH must be a power of two");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + CW'(1);
  end

  assign phase  = phase_e'(cnt[2:0]);
  assign ch     = cnt[3 +: CH_W];
  assign sample = cnt[3 + CH_W +: NUM_LVL];

  // level = trailing zeros of the sample count
  always_comb begin
    lvl     = '0;
    calc_en = 1'b0;
    for (int i = NUM_LVL - 1; i >= 0; i--) begin
      if (sample[i]) begin
        lvl     = LW'(i);
        calc_en = 1'b1;
      end
    end
  end

  assign lvl_first = (lvl == '0);
  assign lvl_top   = (32'(lvl) == NUM_LVL - 1);

  // destination block of this level's approximation in the pairing memory
  always_comb begin
    pr_wsel_h = 1'b0;
    for (int i = 0; i < NUM_LVL - 1; i++) begin
      if (32'(lvl) == i) pr_wsel_h = sample[i+1];
    end
  end

  assign ib_we    = (phase == PH_READ) && !sample[0];
  assign cc_load  = (phase == PH_READ) && calc_en;
  assign cc_shift = calc_en && (phase inside {PH_CALC_P, PH_CALC_Q, PH_CALC_R, PH_CALC_A});
  assign x_from_y = (phase == PH_CALC_R);
  assign d_latch  = calc_en && (phase == PH_CALC_D);
  assign cl_we    = calc_en && (phase == PH_WR_CL);
  assign pr_we    = calc_en && (phase == PH_WR_PR) && !lvl_top;
  assign d_valid  = calc_en && (phase == PH_WR_CL);
  assign a_valid  = calc_en && (phase == PH_WR_PR) && lvl_top;

  // coefficient pair of each step: P:(B0,-) Q:(B1,B2) R:(B3,B4) a:(B5,B6) d:(B7,-)
  always_comb begin
    bi_addr = 3'd0;
    bj_addr = 3'd0;
    bj_en   = 1'b0;
    unique case (phase)
      PH_CALC_P: bi_addr = 3'd0;
      PH_CALC_Q: begin bi_addr = 3'd1; bj_addr = 3'd2; bj_en = 1'b1; end
      PH_CALC_R: begin bi_addr = 3'd3; bj_addr = 3'd4; bj_en = 1'b1; end
      PH_CALC_A: begin bi_addr = 3'd5; bj_addr = 3'd6; bj_en = 1'b1; end
      PH_CALC_D: bi_addr = 3'd7;
      default: ;
    endcase
  end

  // addresses: the channel/level word of this level; the pairing word read
  // is the one feeding this level (level_index-1), the one written is the
  // one this level feeds (level_index)
  always_comb begin
    cl_addr = CL_AW'(32'(lvl) * NUM_CH + 32'(ch));
    if (phase == PH_READ)
      pr_addr = PR_AW'((lvl_first ? 0 : 32'(lvl) - 1) * NUM_CH + 32'(ch));
    else
      pr_addr = PR_AW'((lvl_top ? 0 : 32'(lvl)) * NUM_CH + 32'(ch));
  end
endmodule

// dwt_top: multi-channel, multi-level lifting DWT (symmlet-4 lifting form).
//
// NUM_CH channels arrive time-multiplexed on one 10-bit sign-magnitude bus.
// Each channel slot is eight clocks; one sample of every channel is taken per
// sample period of 8*NUM_CH clocks (256 clocks for 32 channels, i.e. 6.4 MHz
// at 25 kS/s per channel). Samples of a channel are used in pairs (h first,
// f second). The first sample waits in the input buffer; when the second one
// arrives, the computation core runs the five lifting steps
//   P = h + B0*f
//   Q = f' + B1*P + B2*P'
//   R = P' + B3*Q + B4*Q'
//   a = Q + B5*R + B6*R'
//   d = R' + B7*a
// (primed values are those of the previous pair, kept in the
// channel/level memory) one step per clock, through the six registers of CC
// memory. The detail d is sent out; the approximation a of a level below
// NUM_LVL is parked in the pairing memory and becomes an input sample of the
// next level, which is computed in a slot where level 1 is idle (see
// controller). The approximation of level NUM_LVL is sent out.
//
// Timing in a slot whose channel is c (phase = clock within the slot):
//   phase 0  data_in is sampled (in_strobe=1, in_ch=c); memories are read
//   phase 1-5 the five lifting steps
//   phase 6  d_out/d_valid with d_ch, d_lvl; state written back
//   phase 7  a_out/a_valid (highest level only) or pairing-memory write
// Reset (rst_n low, asynchronous) clears only the counter; the memories are
// not reset, as SRAM is not, so the first outputs of each channel and level
// depend on their initial contents until the filter state has filled.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned NUM_CH  = 32,
  parameter int unsigned NUM_LVL = 4,
  parameter coef_table_t COEFS   = DEFAULT_COEFS,
  localparam int unsigned CH_W   = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned LW     = (NUM_LVL > 1) ? $clog2(NUM_LVL) : 1,
  localparam int unsigned CL_AW  = (NUM_CH*NUM_LVL > 1) ? $clog2(NUM_CH*NUM_LVL) : 1,
  localparam int unsigned PR_D   = NUM_CH * ((NUM_LVL > 1) ? NUM_LVL - 1 : 1),
  localparam int unsigned PR_AW  = (PR_D > 1) ? $clog2(PR_D) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // input bus
  input  sm_data_t        data_in,
  output logic            in_strobe,  // data_in is taken this clock
  output logic [CH_W-1:0] in_ch,      // ... as a sample of this channel
  // detail coefficients, every level
  output sm_data_t        d_out,
  output logic            d_valid,
  output logic [CH_W-1:0] d_ch,
  output logic [LW-1:0]   d_lvl,      // level index, 0 = level 1
  // approximation coefficients of the highest level
  output sm_data_t        a_out,
  output logic            a_valid,
  output logic [CH_W-1:0] a_ch
);
  phase_e             phase;
  logic [CH_W-1:0]    ch;
  logic [NUM_LVL-1:0] sample;
  logic [LW-1:0]      lvl;
  logic calc_en, lvl_first, lvl_top, ib_we, cc_load, cc_shift, x_from_y, d_latch;
  logic [2:0]         bi_addr, bj_addr;
  logic               bj_en;
  logic [CL_AW-1:0]   cl_addr;
  logic               cl_we;
  logic [PR_AW-1:0]   pr_addr;
  logic               pr_we, pr_wsel_h;

  controller #(.NUM_CH(NUM_CH), .NUM_LVL(NUM_LVL)) u_ctrl (
    .clk, .rst_n, .phase, .ch, .sample, .lvl, .calc_en, .lvl_first, .lvl_top,
    .ib_we, .cc_load, .cc_shift, .x_from_y, .d_latch, .bi_addr, .bj_addr, .bj_en,
    .cl_addr, .cl_we, .pr_addr, .pr_we, .pr_wsel_h, .d_valid, .a_valid);

  // memories
  sm_data_t  ib_rdata, pr_rdata_h, pr_rdata_f;
  cl_state_t cl_rdata, cc_state;
  sm_data_t  x, y, z, w;
  sm_coef_t  bi, bj;

  input_buffer #(.NUM_CH(NUM_CH)) u_ibuf (
    .clk, .addr(ch), .we(ib_we), .wdata(data_in), .rdata(ib_rdata));

  pairing_memory #(.NUM_CH(NUM_CH), .NUM_LVL(NUM_LVL)) u_pair (
    .clk, .addr(pr_addr), .we(pr_we), .wsel_h(pr_wsel_h), .wdata(y),
    .rdata_h(pr_rdata_h), .rdata_f(pr_rdata_f));

  channel_level_memory #(.NUM_CH(NUM_CH), .NUM_LVL(NUM_LVL)) u_clmem (
    .clk, .addr(cl_addr), .we(cl_we), .wdata(cc_state), .rdata(cl_rdata));

  coefficient_memory #(.COEFS(COEFS)) u_coef (
    .bi_addr, .bj_addr, .bj_en, .bi, .bj);

  // computation core and its register file
  sm_data_t h_sel, f_sel;
  assign h_sel = lvl_first ? ib_rdata : pr_rdata_h;
  assign f_sel = lvl_first ? data_in  : pr_rdata_f;

  cc_memory u_ccmem (
    .clk, .load(cc_load), .h_in(h_sel), .f_in(f_sel), .state_in(cl_rdata),
    .shift(cc_shift), .x_from_y, .w, .x, .y, .z, .state_out(cc_state));

  computation_core u_cc (.x, .y, .z, .bi, .bj, .w);

  // output registers
  always_ff @(posedge clk) begin
    if (d_latch) d_out <= w;
  end

  assign in_strobe = (phase == PH_READ);
  assign in_ch     = ch;
  assign d_ch      = ch;
  assign d_lvl     = lvl;
  assign a_out     = y;
  assign a_ch      = ch;

  // sample is consumed only through the level decode inside the controller
  logic unused_sample;
  assign unused_sample = ^sample;

  // schedule rules: results leave only from computing slots, the
  // approximation leaves only from the highest level, and every other level
  // parks its approximation in the pairing memory instead
  a_valid_top_only: assert property (@(posedge clk) disable iff (!rst_n)
    a_valid |-> calc_en && lvl_top);
  d_valid_calc_only: assert property (@(posedge clk) disable iff (!rst_n)
    d_valid |-> calc_en);
  pairing_below_top: assert property (@(posedge clk) disable iff (!rst_n)
    pr_we |-> calc_en && !lvl_top);
endmodule

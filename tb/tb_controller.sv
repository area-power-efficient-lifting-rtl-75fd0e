// tb_controller: runs the controller for three frames (16 sample periods of
// 32 channel slots of 8 clocks each) and checks every decoded output against
// a model computed from the clock count. It also checks the schedule's
// properties: per channel and frame, level 1 runs 8 times, level 2 four
// times, level 3 twice, level 4 once and one slot is idle; every
// higher-level computation finds a first (h) and a second (f) input written
// since its previous run, in that order.
module tb_controller;
  import dwt_pkg::*;
  localparam int NUM_CH = 32, NUM_LVL = 4;
  localparam int FRAME = 8 * NUM_CH * (1 << NUM_LVL);   // 4096 clocks

  logic clk = 0, rst_n = 0;
  phase_e     phase;
  logic [4:0] ch;
  logic [3:0] sample;
  logic [1:0] lvl;
  logic calc_en, lvl_first, lvl_top, ib_we, cc_load, cc_shift, x_from_y, d_latch;
  logic [2:0] bi_addr, bj_addr;
  logic       bj_en;
  logic [6:0] cl_addr, pr_addr;
  logic       cl_we, pr_we, pr_wsel_h, d_valid, a_valid;

  controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int runs [NUM_LVL+1];               // index NUM_LVL counts idle slots
  int th [NUM_LVL], tf [NUM_LVL], tr [NUM_LVL];

  task automatic check(bit ok, string what, int n);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at clock %0d", what, n);
    end
  endtask

  initial begin
    int n, ph, c, s, el, abs_s;
    bit ec;
    for (int i = 0; i < NUM_LVL; i++) begin th[i] = -1; tf[i] = -1; tr[i] = -1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < 3 * FRAME; n++) begin
      ph = n % 8; c = (n / 8) % NUM_CH; abs_s = n / (8 * NUM_CH); s = abs_s % 16;
      ec = (s != 0);
      el = (s % 2 == 1) ? 0 : (s % 4 == 2) ? 1 : (s % 8 == 4) ? 2 : 3;
      check(phase == phase_e'(ph) && ch == 5'(c) && sample == 4'(s), "counter fields", n);
      check(calc_en == ec, "calc_en", n);
      if (ec) begin
        check(lvl == 2'(el), "level", n);
        check(lvl_first == (el == 0) && lvl_top == (el == 3), "first/top", n);
        check(cl_addr == 7'(el * NUM_CH + c), "cl_addr", n);
      end
      check(ib_we == (ph == 0 && s % 2 == 0), "ib_we", n);
      check(cc_load == (ph == 0 && ec), "cc_load", n);
      check(cc_shift == (ec && ph >= 1 && ph <= 4), "cc_shift", n);
      check(d_latch == (ec && ph == 5), "d_latch", n);
      check(cl_we == (ec && ph == 6) && d_valid == (ec && ph == 6), "cl_we/d_valid", n);
      check(pr_we == (ec && ph == 7 && el < 3), "pr_we", n);
      check(a_valid == (ec && ph == 7 && el == 3), "a_valid", n);
      if (ph == 3) check(x_from_y, "x_from_y", n);
      case (ph)
        1: check(bi_addr == 0 && !bj_en, "coef P", n);
        2: check(bi_addr == 1 && bj_en && bj_addr == 2, "coef Q", n);
        3: check(bi_addr == 3 && bj_en && bj_addr == 4, "coef R", n);
        4: check(bi_addr == 5 && bj_en && bj_addr == 6, "coef a", n);
        5: check(bi_addr == 7 && !bj_en, "coef d", n);
        default: ;
      endcase
      // pairing traffic, tracked for channel 0 only
      if (c == 0 && ec) begin
        if (ph == 0) begin
          if (n < FRAME) runs[el]++;
          if (el > 0) begin
            check(pr_addr == 7'((el - 1) * NUM_CH), "pairing read address", n);
            if (abs_s >= 16) begin
              check(th[el-1] > tr[el-1] && tf[el-1] > th[el-1], "h then f written before use", n);
            end
            tr[el-1] = abs_s;
          end
        end
        if (ph == 7 && el < 3) begin
          check(pr_addr == 7'(el * NUM_CH), "pairing write address", n);
          if (pr_wsel_h) th[el] = abs_s; else tf[el] = abs_s;
        end
      end
      if (c == 0 && !ec && ph == 0 && n < FRAME) runs[NUM_LVL]++;
      @(negedge clk);                     // counter advances once
    end
    check(runs[0] == 8 && runs[1] == 4 && runs[2] == 2 && runs[3] == 1 && runs[4] == 1,
          "runs per level per frame", n);
    $display("runs per frame: L1=%0d L2=%0d L3=%0d L4=%0d idle=%0d",
             runs[0], runs[1], runs[2], runs[3], runs[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4 * FRAME) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dwt_configs: end-to-end checks of the other channel/level
// configurations the design is sized for: 2 channels with 2 levels, 8
// channels with 4 levels, and 4 channels with 5 levels (a level count other
// than four), and 128 channels with 4 levels (the "well over 100 channels"
// a single core has time for). Each runs in its own dwt_check_harness.
module tb_dwt_configs;
  bit done [4];
  int chk [4], fail [4];

  dwt_check_harness #(.NUM_CH(2), .NUM_LVL(2), .FRAMES(64)) u_2x2 (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  dwt_check_harness #(.NUM_CH(8), .NUM_LVL(4), .FRAMES(12)) u_8x4 (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  dwt_check_harness #(.NUM_CH(4), .NUM_LVL(5), .FRAMES(10)) u_4x5 (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  dwt_check_harness #(.NUM_CH(128), .NUM_LVL(4), .FRAMES(10)) u_128x4 (.done(done[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3], fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end
  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3], fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule

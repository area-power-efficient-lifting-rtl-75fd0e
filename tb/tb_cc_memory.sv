// tb_cc_memory: drives CC memory through one read phase and five computation
// steps and checks all six registers against the register-transfer table of
// one sample pair (rows P, Q, R, a, d), then checks that load wins over shift
// and that nothing moves when neither is asserted.
module tb_cc_memory;
  import dwt_pkg::*;
  logic      clk = 0;
  logic      load, shift, x_from_y;
  sm_data_t  h_in, f_in, w, x, y, z;
  cl_state_t state_in, state_out;
  int checks = 0, failures = 0;

  cc_memory dut (.*);
  always #5 clk = ~clk;

  // symbolic values: h0 f0 f-1 P-1 Q-1 R-1 P0 Q0 R0 a0
  localparam sm_data_t H0 = '{0, 9'd11}, F0 = '{1, 9'd22}, FM = '{0, 9'd33},
                       PM = '{1, 9'd44}, QM = '{0, 9'd55}, RM = '{1, 9'd66},
                       P0 = '{0, 9'd77}, Q0 = '{1, 9'd88}, R0 = '{0, 9'd99},
                       A0 = '{1, 9'd111};

  task automatic expect_row(string row, sm_data_t ey, ex, ez, em1, em2, em3);
    checks++;
    if (y !== ey || x !== ex || z !== ez || state_out.p !== em1 ||
        state_out.q !== em2 || state_out.r !== em3) begin
      failures++;
      $display("FAIL row %s: Y=%0d X=%0d Z=%0d M1=%0d M2=%0d M3=%0d", row,
               y.mag, x.mag, z.mag, state_out.p.mag, state_out.q.mag, state_out.r.mag);
    end
  endtask

  task automatic step(logic ld, logic sh, logic xy, sm_data_t wv);
    @(negedge clk);
    load = ld; shift = sh; x_from_y = xy; w = wv;
    @(negedge clk);
    load = 0; shift = 0; x_from_y = 0;
  endtask

  initial begin
    load = 0; shift = 0; x_from_y = 0; w = '0;
    h_in = H0; f_in = F0; state_in = '{f: FM, p: PM, q: QM, r: RM};
    step(1, 0, 0, '0);
    expect_row("P", F0, H0, FM, PM, QM, RM);
    step(0, 1, 0, P0);
    expect_row("Q", P0, FM, PM, QM, RM, F0);
    step(0, 1, 0, Q0);
    expect_row("R", Q0, PM, QM, RM, F0, P0);
    step(0, 1, 1, R0);
    expect_row("a", R0, Q0, RM, F0, P0, Q0);
    step(0, 1, 0, A0);
    expect_row("d", A0, RM, F0, P0, Q0, R0);
    checks++;
    if (state_out !== cl_state_t'{f: F0, p: P0, q: Q0, r: R0}) begin
      failures++; $display("FAIL state_out");
    end
    // hold
    step(0, 0, 0, '{0, 9'd5});
    expect_row("hold", A0, RM, F0, P0, Q0, R0);
    // load has priority over shift
    h_in = '{0, 9'd1}; f_in = '{0, 9'd2}; state_in = '{f: '{0, 9'd3}, p: '{0, 9'd4}, q: '{0, 9'd5}, r: '{0, 9'd6}};
    step(1, 1, 0, '{0, 9'd7});
    expect_row("load", '{0, 9'd2}, '{0, 9'd1}, '{0, 9'd3}, '{0, 9'd4}, '{0, 9'd5}, '{0, 9'd6});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

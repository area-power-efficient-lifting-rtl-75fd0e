// dwt_check_harness: end-to-end check of one dwt_top configuration
// (NUM_CH channels, NUM_LVL levels, FRAMES frames), so that several sizes can
// run side by side. It raises done and reports its own checks and failures.
// The procedure is the same as in tb_dwt_top:
//
// Random samples are fed on the input bus for FRAMES frames of 16 sample
// periods. A behavioural model, written on integers and per channel/level
// state variables, applies the same schedule (level = trailing zeros of the
// sample count, h/f pairing of each level's approximations) and the five
// lifting equations, and predicts every detail and top-level approximation
// output with its channel, level and clock cycle.
//
// The design's memories are not reset, so the model marks each stored value
// as known or unknown: everything starts unknown, input samples are known,
// and a result is known when every value it is computed from is known. The
// channel, level and cycle of every output are always checked; its value is
// checked when the model knows it. Because the lifting filter has a finite
// memory, every level's outputs become known after a few of its pairs; the
// test requires known outputs at every level.
//
// Counts how often each mechanism happened: level 1..4 computations, idle
// slots, input buffer writes, pairing-memory writes of h and of f,
// approximation outputs and datapath overflows; a mechanism that never
// happened is a failure.
module dwt_check_harness
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int NUM_CH  = 8,
  parameter int NUM_LVL = 4,
  parameter int FRAMES  = 12,
  localparam int CH_W = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int LW   = (NUM_LVL > 1) ? $clog2(NUM_LVL) : 1
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int SLOT = 8, PERIOD = SLOT * NUM_CH, FRAME = PERIOD * (1 << NUM_LVL);

  logic       clk = 0, rst_n = 0;
  sm_data_t   data_in, d_out, a_out;
  logic       in_strobe, d_valid, a_valid;
  logic [CH_W-1:0] in_ch, d_ch, a_ch;
  logic [LW-1:0]   d_lvl;

  dwt_top #(.NUM_CH(NUM_CH), .NUM_LVL(NUM_LVL)) dut (.*);
  always #5 clk = ~clk;

  // a model value and whether it is known
  typedef struct {
    sm_data_t v;
    bit       k;
  } mv_t;

  typedef struct {
    int  cyc;
    int  ch;
    int  lvl;
    mv_t e;
  } exp_t;
  exp_t dq[$], aq[$];

  // model state
  mv_t m_ib [NUM_CH];
  mv_t m_f [NUM_LVL][NUM_CH], m_p [NUM_LVL][NUM_CH], m_q [NUM_LVL][NUM_CH], m_r [NUM_LVL][NUM_CH];
  mv_t m_ph [NUM_LVL][NUM_CH], m_pf [NUM_LVL][NUM_CH];

  int n_lvl [NUM_LVL], n_known [NUM_LVL];
  int n_idle = 0, n_ibw = 0, n_pair_h = 0, n_pair_f = 0, n_aout = 0, n_wrap = 0, n_dout = 0;

  // one lifting step W = X + Bi*Y (+ Bj*Z when j >= 0)
  function automatic mv_t step_m(mv_t x, mv_t y, mv_t z, int i, int j);
    mv_t      r;
    sm_coef_t bj = (j < 0) ? sm_coef_t'('0) : ref_coef(j);
    int       s = sm2int(x.v) + ref_prod(y.v, ref_coef(i)) + ref_prod(z.v, bj);
    r.k = x.k && y.k && (j < 0 || z.k);
    if (r.k && (s > 511 || s < -512)) n_wrap++;
    r.v = ref_step(x.v, y.v, z.v, ref_coef(i), bj);
    return r;
  endfunction

  // one channel slot of the model: k = slot index since reset
  task automatic model_slot(int k, int cyc0, sm_data_t x_in);
    int  c = k % NUM_CH, s = (k / NUM_CH) % (1 << NUM_LVL), l;
    mv_t xin, h, f, p, q, r, a, d;
    xin = '{v: x_in, k: 1'b1};
    if (s % 2 == 0) begin m_ib[c] = xin; n_ibw++; end
    if (s == 0) begin n_idle++; return; end
    l = 0;
    while (((s >> l) & 1) == 0) l++;
    n_lvl[l]++;
    if (l == 0) begin h = m_ib[c]; f = xin; end
    else begin h = m_ph[l-1][c]; f = m_pf[l-1][c]; end
    p = step_m(h, f, m_f[l][c], 0, -1);                  // P = h + B0 f
    q = step_m(m_f[l][c], p, m_p[l][c], 1, 2);           // Q = f' + B1 P + B2 P'
    r = step_m(m_p[l][c], q, m_q[l][c], 3, 4);           // R = P' + B3 Q + B4 Q'
    a = step_m(q, r, m_r[l][c], 5, 6);                   // a = Q + B5 R + B6 R'
    d = step_m(m_r[l][c], a, f, 7, -1);                  // d = R' + B7 a
    dq.push_back('{cyc0 + 6, c, l, d});
    if (l == NUM_LVL - 1) aq.push_back('{cyc0 + 7, c, l, a});
    else if (((s >> (l + 1)) & 1) != 0) begin m_ph[l][c] = a; n_pair_h++; end
    else begin m_pf[l][c] = a; n_pair_f++; end
    m_f[l][c] = f; m_p[l][c] = p; m_q[l][c] = q; m_r[l][c] = r;
  endtask

  task automatic check(bit ok, string what, int n);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at clock %0d (%0d channels, %0d levels)", what, n, NUM_CH, NUM_LVL);
    end
  endtask

  // mostly moderate random samples, some full-scale ones, and every 32nd
  // pair a full-scale +511/-511 pair, which overflows the P step
  function automatic sm_data_t gen_sample(int k);
    sm_data_t v;
    int       s = k / NUM_CH;
    if (s % 64 == 10) v = '{sign: 1'b0, mag: 9'd511};
    else if (s % 64 == 11) v = '{sign: 1'b1, mag: 9'd511};
    else if ($urandom_range(19) == 0) v = rand_sm();
    else begin v.sign = 1'($urandom); v.mag = 9'($urandom_range(200)); end
    return v;
  endfunction

  initial begin
    int   k;
    exp_t e;
    done = 0; checks = 0; failures = 0;
    k = 0;
    for (int c = 0; c < NUM_CH; c++) begin
      m_ib[c].k = 0;
      for (int l = 0; l < NUM_LVL; l++) begin
        m_f[l][c].k = 0; m_p[l][c].k = 0; m_q[l][c].k = 0; m_r[l][c].k = 0;
        m_ph[l][c].k = 0; m_pf[l][c].k = 0;
      end
    end
    data_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < FRAMES * FRAME + SLOT; n++) begin
      // input side: one sample per slot, at the slot's first clock
      check(in_strobe == (n % SLOT == 0), "in_strobe timing", n);
      if (in_strobe) begin
        check(int'(in_ch) == k % NUM_CH, "in_ch", n);
        data_in = gen_sample(k);
        if (n < FRAMES * FRAME) model_slot(k, n, data_in);
        k++;
      end
      // output side
      if (d_valid) begin
        n_dout++;
        check(dq.size() > 0, "unexpected d output", n);
        if (dq.size() > 0) begin
          e = dq.pop_front();
          check(e.cyc == n, "d output cycle", n);
          check(int'(d_ch) == e.ch && int'(d_lvl) == e.lvl, "d channel/level", n);
          if (e.e.k) begin
            n_known[e.lvl]++;
            check(d_out === e.e.v, "d value", n);
            if (d_out !== e.e.v && failures < 20)
              $display("  ch %0d level %0d: got %0d expected %0d", e.ch, e.lvl + 1,
                       sm2int(d_out), sm2int(e.e.v));
          end
        end
      end
      if (a_valid) begin
        n_aout++;
        check(aq.size() > 0, "unexpected a output", n);
        if (aq.size() > 0) begin
          e = aq.pop_front();
          check(e.cyc == n && int'(a_ch) == e.ch, "a output cycle/channel", n);
          if (e.e.k) check(a_out === e.e.v, "a value", n);
        end
      end
      @(negedge clk);
    end
    check(dq.size() == 0 && aq.size() == 0, "all expected outputs seen", 0);
    // every channel produces 2^NUM_LVL-1 details and 1 approximation per frame
    check(n_dout == FRAMES * NUM_CH * ((1 << NUM_LVL) - 1) && n_aout == FRAMES * NUM_CH, "output rate", 0);
    $display("%0d channels, %0d levels", NUM_CH, NUM_LVL);
    for (int i = 0; i < NUM_LVL; i++)
      $display("  level %0d: %0d computations, %0d details checked by value", i + 1, n_lvl[i], n_known[i]);
    $display("  idle=%0d ibuf_wr=%0d pair_h=%0d pair_f=%0d a_out=%0d d_out=%0d overflow=%0d",
             n_idle, n_ibw, n_pair_h, n_pair_f, n_aout, n_dout, n_wrap);
    foreach (n_lvl[i]) check(n_lvl[i] > 0 && n_known[i] > 0, "level computed and checked", i);
    check(n_idle > 0 && n_ibw > 0 && n_pair_h > 0 && n_pair_f > 0 && n_aout > 0 && n_wrap > 0,
          "every mechanism exercised", 0);
    done = 1;
  end
  initial begin
    repeat (FRAMES * FRAME + 1000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("harness %0d/%0d: watchdog expired", NUM_CH, NUM_LVL);
      done = 1;
    end
  end
endmodule

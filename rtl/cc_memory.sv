// cc_memory: the six 10-bit registers around the computation core.
//
// X, Y and Z feed the core's three inputs; M1, M2 and M3 hold intermediate
// values. In the read phase all six are loaded in parallel: Y with the second
// sample of the pair (f), X with the first (h), and Z, M1, M2, M3 with the
// channel/level state (f, P, Q, R of the previous pair). After each of the
// first four computation steps the registers shift serially:
//   Y <- W,  M3 <- Y,  M2 <- M3,  M1 <- M2,  Z <- M1,  X <- Z
// except after the R step, where X takes Y (the new Q) instead of Z. After
// the fifth (d) step nothing moves: Y holds the approximation a and
// Z, M1, M2, M3 hold the new state f, P, Q, R, ready to be written back.
// This movement follows the register-transfer table of the design.
//
// Timing: load and shift act on the rising clock edge; load wins over shift.
// No reset: every register is loaded before it is read.
module cc_memory
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      load,      // parallel load (read phase)
  input  sm_data_t  h_in,      // first sample of the pair -> X
  input  sm_data_t  f_in,      // second sample of the pair -> Y
  input  cl_state_t state_in,  // f, P, Q, R of the previous pair -> Z, M1, M2, M3
  input  logic      shift,     // serial shift after a computation step
  input  logic      x_from_y,  // during shift: X <- Y (after the R step)
  input  sm_data_t  w,         // computation core result
  output sm_data_t  x,
  output sm_data_t  y,
  output sm_data_t  z,
  output cl_state_t state_out  // Z, M1, M2, M3 as f, P, Q, R
);
  sm_data_t m1, m2, m3;

  always_ff @(posedge clk) begin
    if (load) begin
      x  <= h_in;
      y  <= f_in;
      z  <= state_in.f;
      m1 <= state_in.p;
      m2 <= state_in.q;
      m3 <= state_in.r;
    end else if (shift) begin
      x  <= x_from_y ? y : z;
      y  <= w;
      z  <= m1;
      m1 <= m2;
      m2 <= m3;
      m3 <= y;
    end
  end

  assign state_out = '{f: z, p: m1, q: m2, r: m3};
endmodule

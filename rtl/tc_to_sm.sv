// tc_to_sm: two's complement to sign-magnitude converter (10 bit).
//
// The sign is the top bit; a negative word is negated to give its magnitude.
// The one value a 9-bit magnitude cannot hold, -512, comes out as "-0"
// (sign set, magnitude zero): this is the wrap of the 10-bit datapath, which
// has no saturation. This is the "2's complement" stage behind the
// three-term adder of the computation core. Purely combinational.
module tc_to_sm
  import dwt_pkg::*;
(
  input  logic [DATA_W-1:0] tc,
  output sm_data_t          sm
);
  logic [DATA_W-1:0] neg;
  always_comb begin
    neg     = ~tc + DATA_W'(1);
    sm.sign = tc[DATA_W-1];
    sm.mag  = tc[DATA_W-1] ? neg[MAG_W-1:0] : tc[MAG_W-1:0];
  end
endmodule

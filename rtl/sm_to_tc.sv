// sm_to_tc: sign-magnitude to two's complement converter (10 bit).
//
// A negative word has its magnitude inverted and incremented; a positive
// word is zero-extended. Both +0 and -0 map to zero. This is the
// "2's complement" stage in front of the three-term adder of the computation
// core. Purely combinational.
module sm_to_tc
  import dwt_pkg::*;
(
  input  sm_data_t          sm,
  output logic [DATA_W-1:0] tc
);
  always_comb begin
    tc = {1'b0, sm.mag};
    if (sm.sign) tc = ~tc + DATA_W'(1);
  end
endmodule

// input_buffer: one 10-bit word per channel for the first sample of a pair.
//
// Samples arrive in pairs per channel. The first one (h) is written here in
// its slot, when the first level has nothing to compute; the second one (f)
// is taken straight from the input bus, and h is read back from this buffer
// in the same read phase. Single port: synchronous write on the rising edge
// when we is high, combinational read at the same address. No reset.
module input_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned NUM_CH = 32,
  localparam int unsigned CH_W  = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic            clk,
  input  logic [CH_W-1:0] addr,
  input  logic            we,
  input  sm_data_t        wdata,
  output sm_data_t        rdata
);
  sm_data_t mem [NUM_CH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
  assign rdata = mem[addr];
endmodule

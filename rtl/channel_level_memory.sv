// channel_level_memory: lifting state of every channel at every level.
//
// Processing channels and levels one after another on one core means the
// filter state of each (channel, level) must be parked between its turns:
// the previous pair's f, P, Q and R, four 10-bit values in one 40-bit word.
// NUM_CH*NUM_LVL words (128 for 32 channels and 4 levels). Address =
// level_index*NUM_CH + channel. Single port: synchronous write on the rising
// edge, combinational read. No reset; the original is a 6T SRAM array.
module channel_level_memory
  import dwt_pkg::*;
#(
  parameter int unsigned NUM_CH  = 32,
  parameter int unsigned NUM_LVL = 4,
  localparam int unsigned DEPTH  = NUM_CH * NUM_LVL,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  cl_state_t     wdata,
  output cl_state_t     rdata
);
  cl_state_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
  assign rdata = mem[addr];
endmodule

// pairing_memory: input pairs of the higher decomposition levels.
//
// For every channel and every level below the highest, the approximation
// output of that level is kept until the next level can use it as its h or f
// input. The memory is two blocks, h and f, of NUM_CH*(NUM_LVL-1) 10-bit
// words sharing one address decoder: a write stores one word into the block
// picked by wsel_h, a read returns both words (20 bits) of the addressed
// channel/level. Address = level_index*NUM_CH + channel, where level_index 0
// holds the outputs of level 1 (inputs of level 2). Synchronous write on the
// rising edge, combinational read. No reset.
module pairing_memory
  import dwt_pkg::*;
#(
  parameter int unsigned NUM_CH  = 32,
  parameter int unsigned NUM_LVL = 4,
  localparam int unsigned DEPTH  = NUM_CH * ((NUM_LVL > 1) ? NUM_LVL - 1 : 1),
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic          wsel_h,   // 1: write the h block, 0: the f block
  input  sm_data_t      wdata,
  output sm_data_t      rdata_h,
  output sm_data_t      rdata_f
);
  sm_data_t mem_h [DEPTH];
  sm_data_t mem_f [DEPTH];

  always_ff @(posedge clk) begin
    if (we &&  wsel_h) mem_h[addr] <= wdata;
    if (we && !wsel_h) mem_f[addr] <= wdata;
  end
  assign rdata_h = mem_h[addr];
  assign rdata_f = mem_f[addr];
endmodule

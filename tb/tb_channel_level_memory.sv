// tb_channel_level_memory: random 40-bit writes and reads of the 128-word
// channel/level memory against an array model.
module tb_channel_level_memory;
  import dwt_pkg::*;
  localparam int DEPTH = 128;
  logic       clk = 0;
  logic [6:0] addr;
  logic       we;
  cl_state_t  wdata, rdata;
  cl_state_t  model [DEPTH];
  bit         known [DEPTH];
  int checks = 0, failures = 0;

  channel_level_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr = 7'($urandom); we = 1'($urandom);
      wdata = cl_state_t'({$urandom, $urandom});
      #1;
      if (known[addr]) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++; $display("FAIL addr %0d", addr);
        end
      end
      @(posedge clk);
      if (we) begin model[addr] = wdata; known[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pairing_memory: one-word writes into either block, two-word reads,
// against a model of both blocks (96 words each for 32 channels, 4 levels).
module tb_pairing_memory;
  import dwt_pkg::*;
  localparam int DEPTH = 96;
  logic       clk = 0;
  logic [6:0] addr;
  logic       we, wsel_h;
  sm_data_t   wdata, rdata_h, rdata_f;
  sm_data_t   mh [DEPTH], mf [DEPTH];
  bit         kh [DEPTH], kf [DEPTH];
  int checks = 0, failures = 0;

  pairing_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; wsel_h = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr = 7'($urandom_range(DEPTH - 1)); we = 1'($urandom); wsel_h = 1'($urandom);
      wdata = sm_data_t'($urandom);
      #1;
      if (kh[addr]) begin
        checks++;
        if (rdata_h !== mh[addr]) begin failures++; $display("FAIL h addr %0d", addr); end
      end
      if (kf[addr]) begin
        checks++;
        if (rdata_f !== mf[addr]) begin failures++; $display("FAIL f addr %0d", addr); end
      end
      @(posedge clk);
      if (we &&  wsel_h) begin mh[addr] = wdata; kh[addr] = 1; end
      if (we && !wsel_h) begin mf[addr] = wdata; kf[addr] = 1; end
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

// tb_input_buffer: random writes and reads against an array model.
module tb_input_buffer;
  import dwt_pkg::*;
  localparam int NUM_CH = 32;
  logic       clk = 0;
  logic [4:0] addr;
  logic       we;
  sm_data_t   wdata, rdata;
  sm_data_t   model [NUM_CH];
  bit         known [NUM_CH];
  int checks = 0, failures = 0;

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 5'($urandom); we = (i < 64) ? 1'b1 : 1'($urandom); wdata = sm_data_t'($urandom);
      #1;
      if (known[addr]) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++; $display("FAIL addr %0d read %p exp %p", addr, rdata, model[addr]);
        end
      end
      @(posedge clk);
      if (we) begin model[addr] = wdata; known[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

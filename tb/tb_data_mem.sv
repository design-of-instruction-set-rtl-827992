// tb_data_mem: self-checking test of the 256 x 16 data memory.
// Checks the all-zero start-up contents, then random writes and reads against
// a shadow array: writes take effect at the clock edge, reads are
// combinational and see the stored word.
module tb_data_mem;
  import mips16_pkg::*;

  localparam int CLK_PERIOD = 10;

  logic       clk = 0, we;
  logic [7:0] addr;
  word_t      wdata, rdata;
  word_t      shadow [256];
  int         checks = 0, failures = 0;

  data_mem dut (.clk, .we, .addr, .wdata, .rdata);

  always #(CLK_PERIOD/2) clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    #1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++; if (rdata !== 16'd0) begin failures++; $display("FAIL init [%0d]=%h", i, rdata); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      addr  = 8'($urandom_range(0, 31));   // small range so reads hit written words
      wdata = word_t'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL read [%0d]=%h exp %h", addr, rdata, shadow[addr]); end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL after write [%0d]=%h exp %h", addr, rdata, shadow[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

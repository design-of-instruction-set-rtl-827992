// tb_reg_file: self-checking test of the 8 x 16 register file.
// Random writes and reads on both ports against a shadow array. Checks reset
// clearing, R0 reading zero even after a write to it, and write-through: a
// read of the register being written in the same cycle returns the new data.
module tb_reg_file;
  import mips16_pkg::*;

  localparam int CLK_PERIOD = 10;

  logic      clk = 0, rst, we;
  reg_addr_t ra1, ra2, wa;
  word_t     rd1, rd2, wd;
  word_t     shadow [NREGS];
  int        checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #(CLK_PERIOD/2) clk = ~clk;

  function automatic word_t expect_rd(input reg_addr_t a);
    if (a == 0) return '0;
    if (we && a == wa) return wd;
    return shadow[a];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < NREGS; i++) shadow[i] = '0;
    for (int r = 0; r < NREGS; r++) begin
      ra1 = reg_addr_t'(r); #1;
      checks++; if (rd1 !== 16'd0) begin failures++; $display("FAIL reset R%0d=%h", r, rd1); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we  = $urandom_range(0, 1);
      wa  = reg_addr_t'($urandom);
      wd  = word_t'($urandom);
      ra1 = (i % 4 == 0) ? wa : reg_addr_t'($urandom);
      ra2 = reg_addr_t'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin failures++; $display("FAIL rd1 R%0d=%h exp %h", ra1, rd1, expect_rd(ra1)); end
      if (rd2 !== expect_rd(ra2)) begin failures++; $display("FAIL rd2 R%0d=%h exp %h", ra2, rd2, expect_rd(ra2)); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

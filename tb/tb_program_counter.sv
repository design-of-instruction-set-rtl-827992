// tb_program_counter: self-checking test of the program counter.
// Checks reset to 0, +1 per clock with wrap at 255, hold on stall, load of a
// branch target, and that stall has priority over a branch. A reference
// counter in the testbench is updated with the same rules each cycle.
module tb_program_counter;
  import mips16_pkg::*;

  localparam int CLK_PERIOD = 10;

  logic clk = 0, rst, stall, branch_taken;
  pc_t  branch_target, pc, exp_pc;
  int   checks = 0, failures = 0;

  program_counter dut (.clk, .rst, .stall, .branch_taken, .branch_target, .pc);

  always #(CLK_PERIOD/2) clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; branch_taken = 0; branch_target = '0;
    @(posedge clk); @(negedge clk);
    checks++; if (pc !== 8'd0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    exp_pc = 0;
    rst = 0;
    for (int i = 0; i < 700; i++) begin
      stall         = ($urandom_range(0, 5) == 0);
      branch_taken  = ($urandom_range(0, 7) == 0);
      branch_target = pc_t'($urandom);
      if (i > 600) begin stall = 0; branch_taken = 0; end  // run through the wrap
      @(posedge clk);
      if (stall)             exp_pc = exp_pc;
      else if (branch_taken) exp_pc = branch_target;
      else                   exp_pc = exp_pc + 8'd1;
      @(negedge clk);
      checks++;
      if (pc !== exp_pc) begin
        failures++;
        $display("FAIL cycle %0d pc=%0d exp=%0d", i, pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

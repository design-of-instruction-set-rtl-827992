// tb_alu: self-checking test of the 16-bit add/subtract unit.
// Drives directed corner values and random operands for both operations and
// compares y with an independent 17-bit reference computation truncated to
// 16 bits.
module tb_alu;
  import mips16_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  int      checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  task automatic check(input alu_op_e o, input word_t x, input word_t z);
    logic [16:0] ref17;
    op = o; a = x; b = z;
    #1;
    ref17 = (o == ALU_ADD) ? ({1'b0, x} + {1'b0, z}) : ({1'b0, x} + {1'b0, ~z} + 17'd1);
    checks++;
    if (y !== ref17[15:0]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, ref17[15:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_ADD, 16'd3, 16'd6);
    check(ALU_ADD, 16'hffff, 16'd1);
    check(ALU_ADD, 16'd7, 16'hfff8);
    check(ALU_SUB, 16'd9, 16'd9);
    check(ALU_SUB, 16'd0, 16'd1);
    check(ALU_SUB, 16'h8000, 16'h0001);
    for (int i = 0; i < 500; i++) begin
      check(ALU_ADD, word_t'($urandom), word_t'($urandom));
      check(ALU_SUB, word_t'($urandom), word_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

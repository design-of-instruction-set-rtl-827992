// tb_instr_mem: checks the instruction memory's start-up contents.
// Addresses 0..8 must hold the nine words of the demonstration program
// (9201 9442 9683 1898 b842 aa42 2d28 c1b8 9fc5) and every other address a
// zero word (NOP). Read is combinational, so each address is checked after a
// small delay. A second instance loads tb/imem_test.hex (1234 abcd 0f0f)
// through INIT_FILE, which replaces the first three words and keeps the rest.
module tb_instr_mem;
  import mips16_pkg::*;

  localparam word_t PROG [9] = '{16'h9201, 16'h9442, 16'h9683, 16'h1898, 16'hb842,
                                 16'haa42, 16'h2d28, 16'hc1b8, 16'h9fc5};

  logic [7:0] addr;
  word_t      instr;
  int         checks = 0, failures = 0;

  word_t      instr_f;

  instr_mem dut (.addr, .instr);
  instr_mem #(.INIT_FILE("tb/imem_test.hex")) dut_file (.addr, .instr(instr_f));

  localparam word_t FILE_WORDS [3] = '{16'h1234, 16'habcd, 16'h0f0f};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (instr !== ((i < 9) ? PROG[i] : 16'h0000)) begin
        failures++;
        $display("FAIL addr=%0d instr=%h", i, instr);
      end
      checks++;
      if (instr_f !== ((i < 3) ? FILE_WORDS[i] : (i < 9) ? PROG[i] : 16'h0000)) begin
        failures++;
        $display("FAIL file image addr=%0d instr=%h", i, instr_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

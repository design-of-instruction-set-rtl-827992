// tb_hazard_unit: self-checking test of the stall detection.
// Directed cases from the demonstration program (LD R5 then SUB using R5;
// SUB R6 then BZ on R6; ADDI R3 then ADD using R3, which must not stall),
// then random stage contents against the load-use and branch-operand rules.
module tb_hazard_unit;
  import mips16_pkg::*;

  logic      id_valid, id_branch, id_reads_ra1, id_reads_ra2;
  reg_addr_t id_ra1, id_ra2, idex_wa, exmem_wa;
  logic      idex_reg_write, idex_mem_read, exmem_reg_write, exmem_mem_read;
  logic      load_use, branch_wait, stall;
  int        checks = 0, failures = 0;

  hazard_unit dut (.*);

  task automatic check(input logic exp_lu, input logic exp_bw, input string what);
    #1;
    checks++;
    if (load_use !== exp_lu || branch_wait !== exp_bw || stall !== (exp_lu | exp_bw)) begin
      failures++;
      $display("FAIL %s: lu=%b bw=%b stall=%b exp %b %b", what, load_use, branch_wait, stall, exp_lu, exp_bw);
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
    // SUB R6, R4, R5 in ID, LD R5 in EX
    id_valid = 1; id_branch = 0; id_reads_ra1 = 1; id_reads_ra2 = 1; id_ra1 = 4; id_ra2 = 5;
    idex_reg_write = 1; idex_mem_read = 1; idex_wa = 5;
    exmem_reg_write = 0; exmem_mem_read = 0; exmem_wa = 0;
    check(1, 0, "load-use");
    // ADD R4, R2, R3 in ID, ADDI R3 in EX: bypass, no stall
    id_ra1 = 2; id_ra2 = 3; idex_mem_read = 0; idex_wa = 3;
    check(0, 0, "alu-alu");
    // BZ on R6 in ID, SUB R6 in EX
    id_branch = 1; id_reads_ra2 = 0; id_ra1 = 6; id_ra2 = 0; idex_wa = 6;
    check(0, 1, "branch after alu");
    // BZ on R6 in ID, SUB R6 in MEM: bypassed, no stall
    idex_reg_write = 0; idex_wa = 0; exmem_reg_write = 1; exmem_wa = 6;
    check(0, 0, "branch two after alu");
    // BZ on R6 in ID, LD R6 in MEM
    exmem_mem_read = 1;
    check(0, 1, "branch two after load");
    for (int n = 0; n < 5000; n++) begin
      logic lu, bw;
      id_valid = $urandom_range(0, 7) != 0; id_branch = $urandom_range(0, 2) == 0;
      id_reads_ra1 = $urandom_range(0, 3) != 0; id_reads_ra2 = $urandom_range(0, 3) != 0;
      id_ra1 = 3'($urandom_range(1, 3)); id_ra2 = 3'($urandom_range(1, 3));
      idex_reg_write = $urandom_range(0, 1); idex_mem_read = $urandom_range(0, 1);
      idex_wa = 3'($urandom_range(1, 3));
      exmem_reg_write = $urandom_range(0, 1); exmem_mem_read = $urandom_range(0, 1);
      exmem_wa = 3'($urandom_range(1, 3));
      lu = id_valid && idex_reg_write && idex_mem_read &&
           ((id_reads_ra1 && id_ra1 == idex_wa) || (id_reads_ra2 && id_ra2 == idex_wa));
      bw = id_valid && id_branch && ((idex_reg_write && idex_wa == id_ra1) ||
                                     (exmem_reg_write && exmem_mem_read && exmem_wa == id_ra1));
      check(lu, bw, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

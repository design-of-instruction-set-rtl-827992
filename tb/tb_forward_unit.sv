// tb_forward_unit: self-checking test of the bypass selection.
// Random register numbers over a small range (so matches are frequent) are
// compared with the rules: the MEM-stage writer (not a load) wins over the
// WB-stage writer, an operand that is not read is never bypassed, and the
// branch bypass takes only a non-load MEM-stage result.
module tb_forward_unit;
  import mips16_pkg::*;

  reg_addr_t ex_ra1, ex_ra2, id_ra1, exmem_wa, memwb_wa;
  logic      ex_reads_ra1, ex_reads_ra2, exmem_reg_write, exmem_mem_read, memwb_reg_write;
  fwd_sel_e  fwd_a, fwd_b;
  logic      br_fwd;
  int        checks = 0, failures = 0;
  int        seen_exmem = 0, seen_memwb = 0;

  forward_unit dut (.*);

  function automatic fwd_sel_e ref_sel(input logic rd, input reg_addr_t a);
    if (!rd) return FWD_REG;
    if (exmem_reg_write && !exmem_mem_read && exmem_wa == a) return FWD_EXMEM;
    if (memwb_reg_write && memwb_wa == a) return FWD_MEMWB;
    return FWD_REG;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      ex_ra1 = 3'($urandom_range(1, 3)); ex_ra2 = 3'($urandom_range(1, 3));
      id_ra1 = 3'($urandom_range(1, 3));
      exmem_wa = 3'($urandom_range(1, 3)); memwb_wa = 3'($urandom_range(1, 3));
      ex_reads_ra1 = $urandom_range(0, 3) != 0; ex_reads_ra2 = $urandom_range(0, 3) != 0;
      exmem_reg_write = $urandom_range(0, 1); exmem_mem_read = $urandom_range(0, 3) == 0;
      memwb_reg_write = $urandom_range(0, 1);
      #1;
      checks += 3;
      if (fwd_a !== ref_sel(ex_reads_ra1, ex_ra1)) begin failures++; $display("FAIL fwd_a"); end
      if (fwd_b !== ref_sel(ex_reads_ra2, ex_ra2)) begin failures++; $display("FAIL fwd_b"); end
      if (br_fwd !== (exmem_reg_write && !exmem_mem_read && exmem_wa == id_ra1)) begin
        failures++; $display("FAIL br_fwd");
      end
      if (fwd_a == FWD_EXMEM) seen_exmem++;
      if (fwd_a == FWD_MEMWB) seen_memwb++;
    end
    checks++;
    if (seen_exmem == 0 || seen_memwb == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// hazard_unit: decides when the ID stage must wait one cycle.
//
// Two cases, both found in the source's demonstration program:
//  * load-use: the instruction in EX is an LD whose destination is a source
//    of the instruction in ID (LD R5 followed by SUB R6, R4, R5). The loaded
//    word exists only after MEM, so ID waits one cycle and then takes it
//    through the MEM/WB bypass.
//  * branch operand: BZ tests its register in ID. If the instruction in EX
//    writes that register (SUB R6 followed by BZ on R6), or an LD in MEM does,
//    the value is not ready and ID waits.
// While stall is high the PC and the IF/ID register hold and a bubble enters
// EX. Combinational; the stall policy is this design's own choice (the
// source does not describe hazard handling). load_use and branch_wait tell
// the two causes apart.
module hazard_unit
  import mips16_pkg::*;
(
  input  logic      id_valid,
  input  logic      id_branch,
  input  logic      id_reads_ra1,
  input  logic      id_reads_ra2,
  input  reg_addr_t id_ra1,
  input  reg_addr_t id_ra2,
  input  logic      idex_reg_write,
  input  logic      idex_mem_read,
  input  reg_addr_t idex_wa,
  input  logic      exmem_reg_write,
  input  logic      exmem_mem_read,
  input  reg_addr_t exmem_wa,
  output logic      load_use,
  output logic      branch_wait,
  output logic      stall
);

  always_comb begin
    load_use = id_valid && idex_reg_write && idex_mem_read &&
               ((id_reads_ra1 && id_ra1 == idex_wa) ||
                (id_reads_ra2 && id_ra2 == idex_wa));
    branch_wait = id_valid && id_branch &&
                  ((idex_reg_write && idex_wa == id_ra1) ||
                   (exmem_reg_write && exmem_mem_read && exmem_wa == id_ra1));
    stall = load_use || branch_wait;
  end

endmodule

// forward_unit: bypass selection for the pipeline's operands.
//
// EX operands: if the instruction in MEM writes the register an EX operand
// names, its ALU result is used (FWD_EXMEM); else if the instruction in WB
// writes it, its write-back value is used (FWD_MEMWB); else the value read in
// ID (FWD_REG). The nearer instruction wins. A load in MEM is never chosen:
// the hazard unit has already held back any instruction that would need it.
//
// Branch operand in ID: the BZ test register is taken from the ALU result of
// the instruction in MEM when that instruction writes it and is not a load
// (br_fwd = 1). The WB-stage value reaches ID through the register file's
// write-through, and the remaining cases are stalls (see hazard_unit).
// Destination address 0 never matches: the decoder turns writes to R0 into
// no write. Purely combinational. The bypass network is this design's own:
// the source names a 5-stage pipeline and runs back-to-back dependent
// instructions, but does not say how the dependences are resolved.
module forward_unit
  import mips16_pkg::*;
(
  input  reg_addr_t ex_ra1,
  input  reg_addr_t ex_ra2,
  input  logic      ex_reads_ra1,
  input  logic      ex_reads_ra2,
  input  reg_addr_t id_ra1,
  input  logic      exmem_reg_write,
  input  logic      exmem_mem_read,
  input  reg_addr_t exmem_wa,
  input  logic      memwb_reg_write,
  input  reg_addr_t memwb_wa,
  output fwd_sel_e  fwd_a,
  output fwd_sel_e  fwd_b,
  output logic      br_fwd
);

  function automatic fwd_sel_e select(input logic reads, input reg_addr_t ra);
    if (reads && exmem_reg_write && !exmem_mem_read && exmem_wa == ra)
      return FWD_EXMEM;
    else if (reads && memwb_reg_write && memwb_wa == ra)
      return FWD_MEMWB;
    else
      return FWD_REG;
  endfunction

  assign fwd_a  = select(ex_reads_ra1, ex_ra1);
  assign fwd_b  = select(ex_reads_ra2, ex_ra2);
  assign br_fwd = exmem_reg_write && !exmem_mem_read && exmem_wa == id_ra1;

endmodule

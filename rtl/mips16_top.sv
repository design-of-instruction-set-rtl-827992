// mips16_top: 16-bit MIPS-subset processor with a five-stage pipeline.
//
// Stages: IF (fetch at pc), ID (decode, register read, BZ resolved), EX
// (ALU), MEM (data memory), WB (register write). Pipeline registers if_id,
// id_ex, ex_mem and mem_wb are structs from mips16_pkg; each carries a valid
// bit and the instruction's address.
//
// Hazards are handled without software help:
//  * the forward_unit bypasses the ALU result of the MEM-stage instruction and
//    the write-back value of the WB-stage instruction into EX, and the
//    MEM-stage ALU result into the BZ test in ID;
//  * the register file writes through, covering WB-to-ID;
//  * the hazard_unit stalls ID for one cycle after a load whose result the
//    next instruction needs, and holds a BZ whose register is still being
//    computed in EX (or loaded in MEM).
// BZ is resolved in ID and has one delay slot: the instruction fetched in the
// same cycle as the BZ is decoded always executes, and the fetch after it is
// from the target. This reproduces the fetch order 0..8, 0..8 and the final
// register values R0..R7 = 0,1,3,6,9,9,0,15 that the source reports for its
// demonstration program (after three passes of its loop).
//
// Ports: clk; rst (synchronous, active high) clears pc, pipeline valid bits
// and registers. Observation outputs: pc/instr of the fetch stage; wb_we,
// wb_addr, wb_data of the register write port; retire_valid/retire_pc for each
// instruction leaving WB (bubbles excluded); dmem_we, dmem_addr, dmem_wdata
// of the data memory write port. One instruction per clock when no stall.
// Widths: 16-bit data, 8 registers, 8-bit pc follow the source; the data
// memory size and the program-loading method (INIT_FILE) are this design's.
module mips16_top
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter string       IMEM_FILE  = ""
) (
  input  logic      clk,
  input  logic      rst,
  output pc_t       pc,
  output word_t     instr,
  output logic      wb_we,
  output reg_addr_t wb_addr,
  output word_t     wb_data,
  output logic      retire_valid,
  output pc_t       retire_pc,
  output logic      dmem_we,
  output logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  output word_t     dmem_wdata
);

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  logic  stall;
  // Stall causes, kept apart for observation in simulation only.
  logic  load_use, branch_wait;
  logic  branch_taken;
  pc_t   branch_target;

  // ---------------------------------------------------------------- IF
  program_counter u_pc (
    .clk, .rst, .stall, .branch_taken, .branch_target, .pc
  );

  instr_mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_FILE)) u_imem (
    .addr  (pc[$clog2(IMEM_DEPTH)-1:0]),
    .instr (instr)
  );

  always_ff @(posedge clk) begin
    if (rst)         if_id <= '0;
    else if (!stall) if_id <= '{valid: 1'b1, pc: pc, instr: instr};
  end

  // ---------------------------------------------------------------- ID
  decode_t id_dec;
  word_t   id_rd1, id_rd2, br_val;
  logic    br_fwd;
  fwd_sel_e fwd_a, fwd_b;

  control_unit u_ctrl (.instr(if_id.instr), .dec(id_dec));

  reg_file u_rf (
    .clk, .rst,
    .ra1 (id_dec.ra1), .ra2 (id_dec.ra2),
    .rd1 (id_rd1),     .rd2 (id_rd2),
    .we  (mem_wb.reg_write), .wa (mem_wb.wa), .wd (mem_wb.wdata)
  );

  hazard_unit u_haz (
    .id_valid        (if_id.valid),
    .id_branch       (id_dec.branch),
    .id_reads_ra1    (id_dec.reads_ra1),
    .id_reads_ra2    (id_dec.reads_ra2),
    .id_ra1          (id_dec.ra1),
    .id_ra2          (id_dec.ra2),
    .idex_reg_write  (id_ex.dec.reg_write),
    .idex_mem_read   (id_ex.dec.mem_read),
    .idex_wa         (id_ex.dec.wa),
    .exmem_reg_write (ex_mem.reg_write),
    .exmem_mem_read  (ex_mem.mem_read),
    .exmem_wa        (ex_mem.wa),
    .load_use, .branch_wait, .stall
  );

  forward_unit u_fwd (
    .ex_ra1          (id_ex.dec.ra1),
    .ex_ra2          (id_ex.dec.ra2),
    .ex_reads_ra1    (id_ex.dec.reads_ra1),
    .ex_reads_ra2    (id_ex.dec.reads_ra2),
    .id_ra1          (id_dec.ra1),
    .exmem_reg_write (ex_mem.reg_write),
    .exmem_mem_read  (ex_mem.mem_read),
    .exmem_wa        (ex_mem.wa),
    .memwb_reg_write (mem_wb.reg_write),
    .memwb_wa        (mem_wb.wa),
    .fwd_a, .fwd_b, .br_fwd
  );

  assign br_val        = br_fwd ? ex_mem.alu_y : id_rd1;
  assign branch_taken  = if_id.valid && id_dec.branch && !stall && (br_val == '0);
  assign branch_target = if_id.pc + pc_t'(1) + pc_t'(id_dec.imm);

  always_ff @(posedge clk) begin
    if (rst || stall || !if_id.valid) id_ex <= '0;
    else id_ex <= '{valid: 1'b1, pc: if_id.pc, dec: id_dec, rd1: id_rd1, rd2: id_rd2};
  end

  // ---------------------------------------------------------------- EX
  word_t ex_a, ex_b_reg, ex_b, ex_y;

  function automatic word_t pick(input fwd_sel_e sel, input word_t from_reg);
    unique case (sel)
      FWD_EXMEM: return ex_mem.alu_y;
      FWD_MEMWB: return mem_wb.wdata;
      default:   return from_reg;
    endcase
  endfunction

  assign ex_a     = pick(fwd_a, id_ex.rd1);
  assign ex_b_reg = pick(fwd_b, id_ex.rd2);
  assign ex_b     = id_ex.dec.use_imm ? id_ex.dec.imm : ex_b_reg;

  alu u_alu (.op(id_ex.dec.alu_op), .a(ex_a), .b(ex_b), .y(ex_y));

  always_ff @(posedge clk) begin
    if (rst) ex_mem <= '0;
    else ex_mem <= '{valid:      id_ex.valid,
                     pc:         id_ex.pc,
                     reg_write:  id_ex.dec.reg_write,
                     mem_read:   id_ex.dec.mem_read,
                     mem_write:  id_ex.dec.mem_write,
                     wa:         id_ex.dec.wa,
                     alu_y:      ex_y,
                     store_data: ex_b_reg};
  end

  // ---------------------------------------------------------------- MEM
  word_t mem_rdata;

  assign dmem_we    = ex_mem.mem_write;
  assign dmem_addr  = ex_mem.alu_y[$clog2(DMEM_DEPTH)-1:0];
  assign dmem_wdata = ex_mem.store_data;

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata), .rdata(mem_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) mem_wb <= '0;
    else mem_wb <= '{valid:     ex_mem.valid,
                     pc:        ex_mem.pc,
                     reg_write: ex_mem.reg_write,
                     wa:        ex_mem.wa,
                     wdata:     ex_mem.mem_read ? mem_rdata : ex_mem.alu_y};
  end

  // ---------------------------------------------------------------- WB
  assign wb_we        = mem_wb.reg_write;
  assign wb_addr      = mem_wb.wa;
  assign wb_data      = mem_wb.wdata;
  assign retire_valid = mem_wb.valid;
  assign retire_pc    = mem_wb.pc;

endmodule

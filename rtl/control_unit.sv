// control_unit: combinational instruction decoder of the ID stage.
//
// Splits a 16-bit instruction into register addresses, a sign-extended
// immediate and the control bits carried down the pipeline (decode_t):
//   ADD/SUB  rd <- rs op rt          (ra1 = [8:6], ra2 = [5:3], wa = [11:9])
//   ADDI     rt <- rs + imm          (ra1 = [8:6], wa = [11:9])
//   LD       rt <- mem[rs + imm]     (ra1 = [8:6], wa = [11:9])
//   ST       mem[rs + imm] <- rt     (ra1 = [8:6], ra2 = [11:9])
//   BZ       if rs == 0: pc <- pc+1+imm (ra1 = [8:6])
// Any other opcode decodes as a NOP. A write to R0 is decoded as no write,
// so the bypass and stall logic never matches R0. Opcode values of the
// I-type instructions follow the source; the rest is described in mips16_pkg.
module control_unit
  import mips16_pkg::*;
(
  input  word_t   instr,
  output decode_t dec
);

  opcode_e op;
  assign op = opcode_e'(instr[15:12]);

  always_comb begin
    dec           = '0;
    dec.alu_op    = ALU_ADD;
    dec.ra1       = instr[8:6];
    dec.wa        = instr[11:9];
    dec.ra2       = instr[5:3];
    dec.imm       = {{(XLEN-IMM_W){instr[IMM_W-1]}}, instr[IMM_W-1:0]};
    case (op)
      OP_ADD, OP_SUB: begin
        dec.reg_write = 1'b1;
        dec.reads_ra1 = 1'b1;
        dec.reads_ra2 = 1'b1;
        dec.alu_op    = (op == OP_SUB) ? ALU_SUB : ALU_ADD;
      end
      OP_ADDI: begin
        dec.reg_write = 1'b1;
        dec.reads_ra1 = 1'b1;
        dec.use_imm   = 1'b1;
      end
      OP_LD: begin
        dec.reg_write = 1'b1;
        dec.mem_read  = 1'b1;
        dec.reads_ra1 = 1'b1;
        dec.use_imm   = 1'b1;
      end
      OP_ST: begin
        dec.mem_write = 1'b1;
        dec.reads_ra1 = 1'b1;
        dec.reads_ra2 = 1'b1;
        dec.ra2       = instr[11:9];
        dec.use_imm   = 1'b1;
      end
      OP_BZ: begin
        dec.branch    = 1'b1;
        dec.reads_ra1 = 1'b1;
      end
      default: ;  // NOP and unlisted opcodes
    endcase
    if (!dec.reg_write || dec.wa == '0) begin
      dec.reg_write = 1'b0;
      dec.wa        = '0;
    end
    if (!dec.reads_ra1) dec.ra1 = '0;
    if (!dec.reads_ra2) dec.ra2 = '0;
  end

endmodule

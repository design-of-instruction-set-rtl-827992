// tb_control_unit: self-checking test of the instruction decoder.
// First the nine words of the demonstration program are decoded and compared
// with hand-decoded fields (e.g. 1898 = ADD R4, R2, R3; c1b8 = BZ on R6 with
// offset -8). Then random instructions are compared with a reference decoder
// written from the format table rather than from the module.
module tb_control_unit;
  import mips16_pkg::*;

  word_t   instr;
  decode_t dec;
  int      checks = 0, failures = 0;

  control_unit dut (.instr, .dec);

  // expected: {reg_write, mem_read, mem_write, branch, use_imm, sub} wa ra1 ra2 imm
  task automatic directed(input word_t i, input logic [5:0] flags, input int wa,
                          input int ra1, input int ra2, input int imm);
    instr = i; #1;
    checks++;
    if ({dec.reg_write, dec.mem_read, dec.mem_write, dec.branch, dec.use_imm,
         dec.alu_op == ALU_SUB} !== flags || dec.wa !== 3'(wa) ||
        dec.ra1 !== 3'(ra1) || dec.ra2 !== 3'(ra2) || dec.imm !== 16'(imm)) begin
      failures++;
      $display("FAIL %h: dec=%p", i, dec);
    end
  endtask

  function automatic decode_t ref_decode(input word_t i);
    decode_t d = '0;
    logic [3:0] op = i[15:12];
    logic [2:0] f119 = i[11:9], f86 = i[8:6], f53 = i[5:3];
    d.imm = (i[5] ? 16'hffc0 : 16'h0000) | 16'(i[5:0]);
    d.alu_op = ALU_ADD;
    if (op == 4'h1 || op == 4'h2) begin
      d.reg_write = (f119 != 0); d.wa = d.reg_write ? f119 : 3'd0;
      d.reads_ra1 = 1; d.ra1 = f86; d.reads_ra2 = 1; d.ra2 = f53;
      d.alu_op = (op == 4'h2) ? ALU_SUB : ALU_ADD;
    end else if (op == 4'h9 || op == 4'ha) begin
      d.reg_write = (f119 != 0); d.wa = d.reg_write ? f119 : 3'd0;
      d.reads_ra1 = 1; d.ra1 = f86; d.use_imm = 1; d.mem_read = (op == 4'ha);
    end else if (op == 4'hb) begin
      d.mem_write = 1; d.reads_ra1 = 1; d.ra1 = f86; d.reads_ra2 = 1; d.ra2 = f119; d.use_imm = 1;
    end else if (op == 4'hc) begin
      d.branch = 1; d.reads_ra1 = 1; d.ra1 = f86;
    end
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    directed(16'h9201, 6'b100010, 1, 0, 0, 1);
    directed(16'h9442, 6'b100010, 2, 1, 0, 2);
    directed(16'h9683, 6'b100010, 3, 2, 0, 3);
    directed(16'h1898, 6'b100000, 4, 2, 3, 16'h0018);
    directed(16'hb842, 6'b001010, 0, 1, 4, 2);
    directed(16'haa42, 6'b110010, 5, 1, 0, 2);
    directed(16'h2d28, 6'b100001, 6, 4, 5, 16'hffe8);
    directed(16'hc1b8, 6'b000100, 0, 6, 0, 16'hfff8);
    directed(16'h9fc5, 6'b100010, 7, 7, 0, 5);
    for (int n = 0; n < 3000; n++) begin
      instr = word_t'($urandom);
      #1;
      checks++;
      if (dec !== ref_decode(instr)) begin
        failures++;
        $display("FAIL %h: dec=%p exp=%p", instr, dec, ref_decode(instr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

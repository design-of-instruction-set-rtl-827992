// alu: the 16-bit arithmetic unit of the EX stage.
//
// Computes y = a + b or y = a - b (modulo 2^16), combinationally. Addition
// serves ADD, ADDI and the LD/ST address (base + offset); subtraction serves
// SUB. Only these two operations are visible in
// the source's instruction encodings, so no others are provided.
module alu
  import mips16_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      default: y = a + b;
    endcase
  end

endmodule

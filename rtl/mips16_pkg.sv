// mips16_pkg: types and constants shared by the 16-bit MIPS-subset pipeline.
//
// The machine has a 16-bit data path, eight general purpose registers R0..R7
// and a 4-bit opcode in bits [15:12] of every 16-bit instruction. Two formats:
//
//   R-type  [15:12] op | [11:9] rd | [8:6] rs | [5:3] rt | [2:0] unused
//   I-type  [15:12] op | [11:9] rt | [8:6] rs | [5:0] imm (two's complement)
//
// The I-type opcodes ADDI=1001, LD=1010, ST=1011 and BZ=1100 and the I-type
// operand order "OP rt, rs, IMM" follow the source description. The R-type
// layout, ADD=0001, SUB=0010 and the 6-bit signed immediate are read back
// from the encodings of its demonstration program; NOP=0000 is this design's
// own choice, and every opcode not listed here also executes as a NOP.
//
// BZ rt, rs, imm branches when register rs is zero, to (address of BZ)+1+imm.
// The instruction right after a BZ (its delay slot) always executes.
package mips16_pkg;

  localparam int unsigned XLEN  = 16;  // data and instruction width
  localparam int unsigned NREGS = 8;   // general purpose registers
  localparam int unsigned RA_W  = 3;   // register address width
  localparam int unsigned PC_W  = 8;   // program counter width (word address)
  localparam int unsigned IMM_W = 6;   // I-type immediate width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RA_W-1:0] reg_addr_t;
  typedef logic [PC_W-1:0] pc_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_SUB  = 4'b0010,
    OP_ADDI = 4'b1001,
    OP_LD   = 4'b1010,
    OP_ST   = 4'b1011,
    OP_BZ   = 4'b1100
  } opcode_e;

  typedef enum logic {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  // Operand source chosen by the bypass network.
  typedef enum logic [1:0] {
    FWD_REG   = 2'd0,  // value read from the register file
    FWD_EXMEM = 2'd1,  // ALU result of the instruction in MEM
    FWD_MEMWB = 2'd2   // write-back value of the instruction in WB
  } fwd_sel_e;

  // Decoded instruction, as produced in ID.
  typedef struct packed {
    logic      reg_write;  // writes register wa
    logic      mem_read;   // LD
    logic      mem_write;  // ST
    logic      branch;     // BZ
    logic      use_imm;    // ALU operand B is the immediate
    alu_op_e   alu_op;
    logic      reads_ra1;  // ra1 is a real source operand
    logic      reads_ra2;  // ra2 is a real source operand
    reg_addr_t ra1;        // rs
    reg_addr_t ra2;        // rt (R-type) or store data register (ST)
    reg_addr_t wa;         // destination register
    word_t     imm;        // sign-extended immediate
  } decode_t;

  // Pipeline registers.
  typedef struct packed {
    logic  valid;
    pc_t   pc;
    word_t instr;
  } if_id_t;

  typedef struct packed {
    logic    valid;
    pc_t     pc;
    decode_t dec;
    word_t   rd1;
    word_t   rd2;
  } id_ex_t;

  typedef struct packed {
    logic      valid;
    pc_t       pc;
    logic      reg_write;
    logic      mem_read;
    logic      mem_write;
    reg_addr_t wa;
    word_t     alu_y;
    word_t     store_data;
  } ex_mem_t;

  typedef struct packed {
    logic      valid;
    pc_t       pc;
    logic      reg_write;
    reg_addr_t wa;
    word_t     wdata;
  } mem_wb_t;

  // The demonstration program preloaded into instruction memory. It loops
  // forever: each pass recomputes R1..R6 and adds 5 to R7.
  //   0: ADDI R1, R0, 1     1: ADDI R2, R1, 2     2: ADDI R3, R2, 3
  //   3: ADD  R4, R2, R3    4: ST   R4, R1, 2     5: LD   R5, R1, 2
  //   6: SUB  R6, R4, R5    7: BZ   R0, R6, -8    8: ADDI R7, R7, 5 (delay slot)
  function automatic word_t demo_program(input int unsigned idx);
    case (idx)
      0: return 16'h9201;
      1: return 16'h9442;
      2: return 16'h9683;
      3: return 16'h1898;
      4: return 16'hb842;
      5: return 16'haa42;
      6: return 16'h2d28;
      7: return 16'hc1b8;
      8: return 16'h9fc5;
      default: return '0;
    endcase
  endfunction

endpackage

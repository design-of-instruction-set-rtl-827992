// reg_file: the eight 16-bit general purpose registers R0..R7.
//
// Two asynchronous read ports (rs and rt) and one write port written at the
// rising clock edge. R0 always reads zero and writes to it are dropped, as
// in MIPS; the source only shows R0 staying 0. A read of the register being
// written in the same cycle returns the new value (write-through), so the
// instruction in WB and the one in ID need no stall or extra bypass.
// Reset (synchronous, active high) clears all registers; this is this
// design's choice, the source does not describe reset contents.
module reg_file
  import mips16_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  reg_addr_t ra1,
  input  reg_addr_t ra2,
  output word_t     rd1,
  output word_t     rd2,
  input  logic      we,
  input  reg_addr_t wa,
  input  word_t     wd
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  function automatic word_t read_port(input reg_addr_t a);
    if (a == '0)             return '0;
    else if (we && a == wa)  return wd;
    else                     return regs[a];
  endfunction

  assign rd1 = read_port(ra1);
  assign rd2 = read_port(ra2);

endmodule

// instr_mem: instruction memory of the pipeline, DEPTH words of 16 bits.
//
// Read is asynchronous: instr follows addr in the same cycle, so the fetch
// stage needs a single clock. DEPTH defaults to 256, the reach of the 8-bit
// program counter. At start-up the memory holds the demonstration program of
// mips16_pkg (zeros, i.e. NOPs, elsewhere); if INIT_FILE is not empty it is
// then overwritten from that file with $readmemh. There is no write port:
// program loading is outside the scope of the source description.
module instr_mem
  import mips16_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = ""
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output word_t                    instr
);

  word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = demo_program(i);
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign instr = mem[addr];

endmodule

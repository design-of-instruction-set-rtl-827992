// data_mem: data memory for LD and ST, DEPTH words of 16 bits.
//
// Word addressed by the low $clog2(DEPTH) bits of the computed address.
// Write (ST) happens at the rising clock edge when we is high; read (LD) is
// asynchronous, so the MEM stage takes a single clock. DEPTH = 256 is this
// design's choice (the source gives no size). Contents start at zero.
module data_mem
  import mips16_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule

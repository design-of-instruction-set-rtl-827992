// program_counter: the fetch address register of the pipeline.
//
// An 8-bit word address (the source's waveform shows pc[7:0]). After reset it
// is 0. Each clock it normally steps to pc+1, wrapping at 255; when the BZ in
// ID is taken it loads the branch target instead, and while the hazard unit
// stalls the pipeline it holds its value. Priority: rst, stall, branch, +1.
//
// Interface: clk, rst (synchronous, active high: the polarity and the
// synchronous style are this design's choice), stall, branch_taken,
// branch_target; pc is the registered address used by fetch in the same cycle.
module program_counter
  import mips16_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic branch_taken,
  input  pc_t  branch_target,
  output pc_t  pc
);

  always_ff @(posedge clk) begin
    if (rst)               pc <= '0;
    else if (stall)        pc <= pc;
    else if (branch_taken) pc <= branch_target;
    else                   pc <= pc + pc_t'(1);
  end

endmodule

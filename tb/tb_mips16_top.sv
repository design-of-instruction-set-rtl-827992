// tb_mips16_top: end-to-end test of the pipelined processor at its default
// sizes (256-word instruction and data memories, 8-bit pc).
//
// Part 1 runs the demonstration program held in instruction memory after
// reset. It prints each fetched address and instruction, checks that the
// fetch order is 0..8, 0..8 (the BZ at 7 jumps back to 0 after its delay
// slot at 8), that after three passes of the loop R0..R7 hold
// 0,1,3,6,9,9,0,15, and that each pass takes 11 clocks: nine instructions,
// one load-use stall (LD R5 then SUB using R5) and one branch-operand stall
// (SUB R6 then BZ on R6).
//
// Part 2 loads random programs into instruction memory (by hierarchical
// write while reset is held) and runs each against an instruction-level
// reference model in this testbench, which executes one instruction at a
// time with the BZ delay slot. Every retired instruction is compared in
// order: its address, its register write, and each store's address and
// data; the register file and data memory are compared at the end.
//
// Each pipeline mechanism is counted (EX bypass from MEM and from WB, BZ
// bypass, register file write-through, load-use stall, branch stall, taken
// and not-taken branch, load, store); one that never happens is a failure.
module tb_mips16_top;
  import mips16_pkg::*;

  localparam int CLK_PERIOD = 10;
  localparam int N_PROGRAMS = 30;
  localparam int PROG_CYCLES = 600;

  logic       clk = 0, rst;
  pc_t        pc, retire_pc;
  word_t      instr, wb_data, dmem_wdata;
  logic       wb_we, retire_valid, dmem_we;
  reg_addr_t  wb_addr;
  logic [7:0] dmem_addr;

  int checks = 0, failures = 0;

  mips16_top dut (.*);

  always #(CLK_PERIOD/2) clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ------------------------------------------------ mechanism counters
  int n_fwd_exmem = 0, n_fwd_memwb = 0, n_br_fwd = 0, n_rf_through = 0;
  int n_load_use = 0, n_branch_wait = 0, n_taken = 0, n_not_taken = 0;
  int n_load = 0, n_store = 0;

  always @(negedge clk) if (!rst) begin
    if (dut.id_ex.valid && dut.id_ex.dec.reads_ra1 && dut.fwd_a == FWD_EXMEM) n_fwd_exmem++;
    if (dut.id_ex.valid && dut.id_ex.dec.reads_ra2 && dut.fwd_b == FWD_EXMEM) n_fwd_exmem++;
    if (dut.id_ex.valid && dut.id_ex.dec.reads_ra1 && dut.fwd_a == FWD_MEMWB) n_fwd_memwb++;
    if (dut.id_ex.valid && dut.id_ex.dec.reads_ra2 && dut.fwd_b == FWD_MEMWB) n_fwd_memwb++;
    if (dut.if_id.valid && dut.id_dec.branch && !dut.stall && dut.br_fwd) n_br_fwd++;
    if (dut.if_id.valid && dut.mem_wb.reg_write &&
        ((dut.id_dec.reads_ra1 && dut.id_dec.ra1 == dut.mem_wb.wa) ||
         (dut.id_dec.reads_ra2 && dut.id_dec.ra2 == dut.mem_wb.wa))) n_rf_through++;
    if (dut.load_use) n_load_use++;
    if (dut.branch_wait) n_branch_wait++;
    if (dut.branch_taken) n_taken++;
    if (dut.if_id.valid && dut.id_dec.branch && !dut.stall && !dut.branch_taken) n_not_taken++;
    if (dut.ex_mem.valid && dut.ex_mem.mem_read) n_load++;
    if (dmem_we) n_store++;
  end

  // ------------------------------------------------ reference model
  word_t g_regs [NREGS];
  word_t g_dmem [256];
  word_t g_imem [256];
  pc_t   g_pc, g_npc;
  logic [7:0] st_addr_q [$];
  word_t      st_data_q [$];
  int         retired;

  task automatic ref_reset();
    for (int i = 0; i < NREGS; i++) g_regs[i] = '0;
    for (int i = 0; i < 256; i++) g_dmem[i] = dut.u_dmem.mem[i];
    g_pc = 0; g_npc = 1; retired = 0;
    st_addr_q.delete(); st_data_q.delete();
  endtask

  // Execute one instruction of the reference and compare with what retired.
  task automatic ref_step();
    word_t i = g_imem[g_pc];
    logic [3:0] op = i[15:12];
    int rd = i[11:9], rs = i[8:6], rt = i[5:3];
    word_t imm = {{10{i[5]}}, i[5:0]};
    word_t a = g_regs[rs];
    logic  w = 0; int wr = 0; word_t wv = 0;
    pc_t   nn = g_npc + 8'd1;
    checks++;
    if (retire_pc !== g_pc) fail($sformatf("retired pc %0d, expected %0d", retire_pc, g_pc));
    case (op)
      4'h1: begin w = 1; wr = rd; wv = a + g_regs[rt]; end
      4'h2: begin w = 1; wr = rd; wv = a - g_regs[rt]; end
      4'h9: begin w = 1; wr = rd; wv = a + imm; end
      4'ha: begin w = 1; wr = rd; wv = g_dmem[8'(a + imm)]; end
      4'hb: begin
        logic [7:0] ad = 8'(a + imm);
        checks++;
        if (st_addr_q.size() == 0) fail("store expected, none seen");
        else begin
          logic [7:0] da = st_addr_q.pop_front();
          word_t      dd = st_data_q.pop_front();
          if (da !== ad || dd !== g_regs[rd])
            fail($sformatf("store [%0d]=%h, expected [%0d]=%h", da, dd, ad, g_regs[rd]));
        end
        g_dmem[ad] = g_regs[rd];
      end
      4'hc: if (a == 0) nn = g_pc + 8'd1 + 8'(imm);
      default: ;
    endcase
    if (wr == 0) w = 0;
    checks++;
    if (wb_we !== w || (w && (wb_addr !== 3'(wr) || wb_data !== wv)))
      fail($sformatf("pc %0d (%h): write %b R%0d=%h, expected %b R%0d=%h",
                     g_pc, i, wb_we, wb_addr, wb_data, w, wr, wv));
    if (w) g_regs[wr] = wv;
    g_pc = g_npc; g_npc = nn;
    retired++;
  endtask

  bit ref_on = 0;
  always @(negedge clk) if (!rst && ref_on) begin
    if (retire_valid) ref_step();
    if (dmem_we) begin st_addr_q.push_back(dmem_addr); st_data_q.push_back(dmem_wdata); end
  end

  task automatic compare_state(input string tag);
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== g_regs[r])
        fail($sformatf("%s: R%0d=%h expected %h", tag, r, dut.u_rf.regs[r], g_regs[r]));
    end
    for (int m = 0; m < 256; m++) begin
      checks++;
      if (dut.u_dmem.mem[m] !== g_dmem[m])
        fail($sformatf("%s: mem[%0d]=%h expected %h", tag, m, dut.u_dmem.mem[m], g_dmem[m]));
    end
  endtask

  function automatic word_t random_instr();
    int k = $urandom_range(0, 99);
    logic [3:0] op;
    if      (k < 18) op = 4'h1;
    else if (k < 32) op = 4'h2;
    else if (k < 55) op = 4'h9;
    else if (k < 68) op = 4'ha;
    else if (k < 80) op = 4'hb;
    else if (k < 92) op = 4'hc;
    else if (k < 96) op = 4'h0;
    else             op = 4'($urandom_range(3, 8));  // unlisted: NOP
    return {op, 12'($urandom)};
  endfunction

  // ------------------------------------------------ stimulus
  localparam word_t DEMO [9] = '{16'h9201, 16'h9442, 16'h9683, 16'h1898, 16'hb842,
                                 16'haa42, 16'h2d28, 16'hc1b8, 16'h9fc5};
  localparam word_t FINAL_REGS [8] = '{16'd0, 16'd1, 16'd3, 16'd6, 16'd9, 16'd9, 16'd0, 16'd15};

  initial begin
    int fetch_log [$];
    int passes, t_last, t_now;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // ---- part 1: demonstration program
    $display("16_Bit MIPS TESTING");
    for (int i = 0; i < 256; i++) g_imem[i] = dut.u_imem.mem[i];
    ref_reset();
    ref_on = 1;
    passes = 0; t_last = -1;
    for (int cyc = 0; cyc < 200 && passes < 3; cyc++) begin
      @(negedge clk);
      if (!dut.stall && fetch_log.size() < 18) begin
        $display("Program Counter: %0d ,Instruction: %h", pc, instr);
        fetch_log.push_back(int'(pc));
        checks++;
        if (instr !== DEMO[pc % 9]) fail($sformatf("instruction at %0d is %h", pc, instr));
      end
      if (retire_valid && retire_pc == 8'd8) begin
        passes++;
        t_now = cyc;
        if (t_last >= 0) begin
          checks++;
          if (t_now - t_last != 11) fail($sformatf("loop pass took %0d clocks, expected 11", t_now - t_last));
        end
        t_last = t_now;
      end
    end
    @(posedge clk); #1;
    for (int k = 0; k < 18; k++) begin
      checks++;
      if (k >= fetch_log.size() || fetch_log[k] != k % 9)
        fail($sformatf("fetch %0d went to address %0d", k, k < fetch_log.size() ? fetch_log[k] : -1));
    end
    checks++;
    if (passes != 3) fail("loop did not complete three passes");
    $write("R0..R7:");
    for (int r = 0; r < 8; r++) begin
      $write(" %0d", dut.u_rf.regs[r]);
      checks++;
      if (dut.u_rf.regs[r] !== FINAL_REGS[r]) fail($sformatf("R%0d=%0d", r, dut.u_rf.regs[r]));
    end
    $write("\n");
    compare_state("demo");
    ref_on = 0;

    // ---- part 2: random programs against the reference model
    for (int p = 0; p < N_PROGRAMS; p++) begin
      @(negedge clk);
      rst = 1;
      for (int i = 0; i < 256; i++) begin
        g_imem[i] = random_instr();
        dut.u_imem.mem[i] = g_imem[i];
      end
      repeat (2) @(posedge clk);
      ref_reset();
      #1 rst = 0;
      ref_on = 1;
      repeat (PROG_CYCLES) @(negedge clk);
      @(posedge clk); #1;
      ref_on = 0;
      checks++;
      if (retired < PROG_CYCLES / 3) fail($sformatf("program %0d retired only %0d", p, retired));
      if (st_addr_q.size() > 1) fail("stores left unmatched");
      compare_state($sformatf("program %0d", p));
    end

    $display("bypass EX<-MEM %0d, EX<-WB %0d, BZ<-MEM %0d, write-through %0d",
             n_fwd_exmem, n_fwd_memwb, n_br_fwd, n_rf_through);
    $display("load-use stalls %0d, branch stalls %0d, taken %0d, not taken %0d, loads %0d, stores %0d",
             n_load_use, n_branch_wait, n_taken, n_not_taken, n_load, n_store);
    checks += 10;
    if (n_fwd_exmem == 0) fail("no EX bypass from MEM");
    if (n_fwd_memwb == 0) fail("no EX bypass from WB");
    if (n_br_fwd == 0) fail("no BZ bypass");
    if (n_rf_through == 0) fail("no register file write-through");
    if (n_load_use == 0) fail("no load-use stall");
    if (n_branch_wait == 0) fail("no branch stall");
    if (n_taken == 0) fail("no taken branch");
    if (n_not_taken == 0) fail("no untaken branch");
    if (n_load == 0) fail("no load");
    if (n_store == 0) fail("no store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

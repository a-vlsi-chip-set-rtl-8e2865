// tb_spur_system: the whole multiprocessor at its default size (six
// processors, 128 KB cache per processor) running one program from a shared
// memory model on the bus.
// Every processor: reads its number from the interrupt-pending register
// (the testbench drives a different constant on each processor's external
// interrupt lines, masked off), enables traps and the prefetching
// instruction cache, programs its interval timer and waits for the timer
// interrupt (trap handler acknowledges it), loads the segment and page
// table registers and switches to virtual addressing (page tables built
// by the testbench in memory, so the first references miss on PTE and root
// PTE and are translated inside the cache), then for three rounds writes
// its own word of each of 16 shared blocks, reads it back (counting
// mismatches) and reads its neighbour's word of the same block, so the
// blocks move between caches by ReadShared, ReadForOwnership,
// WriteForInvalidation and owner-supplied data.  At the end it flushes
// the shared blocks and writes and flushes a completion word that carries
// its mismatch count.
// The testbench checks every completion word, the final contents of all
// shared words in memory, and counts each mechanism (pipeline freezes,
// double forwarding, taken delayed branches, I-cache misses and prefetch
// fills, traps, PTE and root PTE misses, each bus transaction, owner
// responses, asynchronous channel handshakes, WFI->RFO conversions);
// every one except the conversion, which depends on timing, must occur.
module tb_spur_system;
  import spur_pkg::*;
  localparam int NP = 6, BLK_W = 320;
  int checks = 0, failures = 0;
  logic clk_p = 0, clk_b = 0, rst_n = 0;
  always #5 clk_p = ~clk_p;
  always #7 clk_b = ~clk_b;
  initial begin repeat (200000) @(posedge clk_p); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bus_cmd_e mem_cmd; logic [31:0] mem_pa; logic [BLK_W-1:0] mem_wblock, mem_rblock; logic mem_owner, mem_done;
  logic [NP-1:0][21:0] fpu_instr; logic [NP-1:0][1:0] fpu_ctl; logic [NP-1:0][2:0] fpu_status; logic [NP-1:0][6:0] ext_irq;
  logic [NP-1:0][8:0] bus_pc; logic [NP-1:0] trap_taken, iu_miss, iu_prefetch, fwd_double;
  spur_system dut (.*);

  // ------------------------------------------------------------ memory
  logic [BLK_W-1:0] mem [int];
  function automatic logic [39:0] mword(logic [31:0] a);
    if (!mem.exists(int'(a >> 5))) return '0;
    return mem[int'(a >> 5)][a[4:2] * 40 +: 40];
  endfunction
  task automatic mset(logic [31:0] a, logic [39:0] v);
    logic [BLK_W-1:0] b; b = mem.exists(int'(a >> 5)) ? mem[int'(a >> 5)] : '0;
    b[a[4:2] * 40 +: 40] = v; mem[int'(a >> 5)] = b;
  endtask
  assign mem_rblock = mem.exists(int'(mem_pa >> 5)) ? mem[int'(mem_pa >> 5)] : '0;
  int mdly; int n_rs, n_rfo, n_wfi, n_wr, n_own; logic done_q;
  always @(posedge clk_b) begin
    if (mem_cmd == BUS_NONE) begin mem_done <= 0; mdly = $urandom_range(1, 3); end
    else if (mdly > 0) mdly--;
    else mem_done <= 1;
    done_q <= dut.bus_done;
    if (dut.bus_done && !done_q) begin
      if (mem_cmd == BUS_WRITE) begin mem[int'(mem_pa >> 5)] = mem_wblock; n_wr++; end
      if (mem_cmd == BUS_RS) n_rs++;
      if (mem_cmd == BUS_RFO) n_rfo++;
      if (mem_cmd == BUS_WFI) n_wfi++;
      if (mem_owner) n_own++;
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_freeze, n_dbl, n_br, n_miss, n_pref, n_trap, n_pte, n_rpte, n_hs, n_conv;
  for (genvar i = 0; i < NP; i++) begin : g_mon
    always @(posedge clk_p) if (rst_n) begin
      if (dut.g_node[i].u_cpu.freeze) n_freeze++;
      if (fwd_double[i]) n_dbl++;
      if (dut.g_node[i].u_cpu.xfer && dut.g_node[i].u_cpu.advance) n_br++;
      if (iu_miss[i]) n_miss++;
      if (iu_prefetch[i]) n_pref++;
      if (trap_taken[i]) n_trap++;
      if (dut.g_node[i].u_mmu.pcc_events[7]) n_pte++;
      if (dut.g_node[i].u_mmu.pcc_events[8]) n_rpte++;
      if (dut.g_node[i].u_mmu.p_ack) n_hs++;
    end
    always @(posedge clk_b) if (dut.g_node[i].u_mmu.u_sbc.pcc_ack && dut.g_node[i].u_mmu.u_sbc.pcc_ack_code[BLK_W]) n_conv++;
  end
  assign fpu_status = '0;
  for (genvar i = 0; i < NP; i++) begin : g_irq
    assign ext_irq[i] = 7'(i);     // processor number, read from the pending register
  end

  // ------------------------------------------------------------ assembler
  int pc; int lab [string];
  function automatic int A(string s); return lab.exists(s) ? lab[s] : 0; endfunction
  task automatic L(string s); lab[s] = pc; endtask
  task automatic emit(logic [31:0] i); mset(32'(pc * 4), {8'h00, i}); pc++; endtask
  task automatic R(opcode_e o, int rd, int rs1, int rs2); emit({o, 5'(rd), 5'(rs1), 1'b0, 5'(rs2), 9'd0}); endtask
  task automatic I(opcode_e o, int rd, int rs1, int imm); emit({o, 5'(rd), 5'(rs1), 1'b1, 14'(imm)}); endtask
  task automatic ST(opcode_e o, int rs1, int off, int rs2);
    logic [13:0] x; x = 14'(off); emit({o, x[13:9], 5'(rs1), 1'b0, 5'(rs2), x[8:0]});
  endtask
  task automatic BRI(cond_e c, int rs1, int imm5, string t); emit({OP_CMPBR, c, 5'(rs1), 1'b1, 5'(imm5), 9'(A(t) - pc)}); endtask
  task automatic JMP(string t); emit({4'b1111, 28'(A(t))}); endtask
  task automatic NOP(); emit(32'd0); endtask

  localparam int CONST = 32'h1800, DONE = 32'h1A00, ARR = 32'h1C00, TBR = 32'hC00;
  localparam logic [19:0] RPV = 20'h12345, RPP = 20'h00008;
  localparam logic [9:0] PTB = 10'h2AA;

  task automatic assemble();
    pc = 0;
    I(OP_LD32, 1, 0, CONST);           // 0xFFFFF0C0
    NOP();
    I(OP_LD32, 2, 1, 0);               // interrupt pending = {processor number, timer}
    NOP();
    I(OP_SRL, 2, 2, 1);
    I(OP_AND, 9, 2, 7);
    I(OP_ADD, 3, 0, TBR);
    I(OP_WRSR, 0, 3, int'(SR_TBR));
    I(OP_ADD, 3, 0, 32'h183);          // kernel, I-cache with prefetch, traps and interrupts on
    I(OP_WRSR, 0, 3, int'(SR_KPSW));
    NOP();
    I(OP_LD32, 1, 0, CONST + 4);       // 0xFFFFF080
    NOP();
    I(OP_ADD, 3, 9, 40);
    ST(OP_ST40, 1, 0, 3);              // timer period
    I(OP_ADD, 3, 0, 1);
    ST(OP_ST40, 1, 32'h44, 3);         // interrupt mask: timer only
    ST(OP_ST40, 1, 4, 3);              // timer on
    I(OP_ADD, 7, 0, 0);
    L("wait");
    BRI(C_EQ, 7, 0, "wait");
    NOP();
    I(OP_LD32, 1, 0, CONST + 8);       // 0xFFFFF000
    NOP();
    I(OP_ADD, 3, 0, 5);
    ST(OP_ST40, 1, 0, 3);              // segment 0
    I(OP_ADD, 3, 0, int'(PTB));
    ST(OP_ST40, 1, 32'h10, 3);
    I(OP_LD32, 3, 0, CONST + 12);
    NOP();
    ST(OP_ST40, 1, 32'h14, 3);
    I(OP_ADD, 3, 0, int'(RPP));
    ST(OP_ST40, 1, 32'h18, 3);
    I(OP_ADD, 3, 0, 32'h383);          // virtual addressing on
    I(OP_WRSR, 0, 3, int'(SR_KPSW));
    NOP();
    I(OP_ADD, 8, 0, 0);                // mismatches
    I(OP_ADD, 6, 0, 3);                // rounds
    L("round");
    I(OP_SLL, 4, 9, 2);
    I(OP_ADD, 4, 4, ARR);              // own word of block 0
    I(OP_ADD, 5, 0, 16);
    L("blk");
    I(OP_SLL, 3, 6, 3);
    I(OP_SLL, 3, 3, 3);
    R(OP_ADD, 3, 3, 5);                // value = round * 64 + r5
    ST(OP_ST40, 4, 0, 3);
    I(OP_LD40, 1, 4, 0);
    NOP();
    R(OP_SUB, 1, 1, 3);
    BRI(C_EQ, 1, 0, "ok");
    NOP();
    I(OP_ADD, 8, 8, 1);
    L("ok");
    I(OP_LD40, 2, 4, 4);               // neighbour's word
    I(OP_ADD, 4, 4, 32);
    BRI(C_NE, 5, 1, "blk");
    I(OP_SUB, 5, 5, 1);
    BRI(C_NE, 6, 1, "round");
    I(OP_SUB, 6, 6, 1);
    I(OP_ADD, 4, 0, ARR);
    I(OP_ADD, 5, 0, 16);
    L("fl");
    ST(OP_FLUSH, 4, 0, 0);
    I(OP_ADD, 4, 4, 32);
    BRI(C_NE, 5, 1, "fl");
    I(OP_SUB, 5, 5, 1);
    I(OP_SLL, 4, 9, 3);
    I(OP_SLL, 4, 4, 2);
    I(OP_ADD, 4, 4, DONE);
    I(OP_ADD, 3, 8, 32'h600);
    ST(OP_ST40, 4, 0, 3);
    ST(OP_FLUSH, 4, 0, 0);
    L("halt");
    BRI(C_ALWAYS, 0, 0, "halt");
    NOP();
    // trap vectors and the timer interrupt handler
    for (int t = 0; t < 16; t++) begin pc = TBR / 4 + t * 4; JMP("handler"); NOP(); end
    pc = 32'h100;
    L("handler");
    I(OP_ADD, 7, 0, 1);
    ST(OP_ST40, 1, 4, 0);              // timer off
    ST(OP_ST40, 1, 32'h40, 7);         // acknowledge (pending, write one to clear)
    I(OP_RDSR, 2, 0, int'(SR_TPC));
    I(OP_RETT, 0, 2, 0);
    NOP();
  endtask

  initial begin
    mem_done = 0;
    pc = 0; assemble(); assemble();
    mset(CONST,      {8'h0, 32'hFFFFF0C0});
    mset(CONST + 4,  {8'h0, 32'hFFFFF080});
    mset(CONST + 8,  {8'h0, 32'hFFFFF000});
    mset(CONST + 12, {8'h0, 12'h0, RPV});
    // page tables: root PTE -> PTE page 9; pages 0 and 1 mapped to themselves
    mset({RPP, 12'h000}, {8'h0, 20'h00009, 12'h001});
    mset(32'h9000, {8'h0, 20'h00000, 12'h001});
    mset(32'h9004, {8'h0, 20'h00001, 12'h001});
    repeat (4) @(posedge clk_b); #1 rst_n = 1;
    for (int p = 0; p < NP; p++) while (mword(DONE + p * 32) == 0) @(posedge clk_b);
    repeat (10) @(posedge clk_b);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (mword(DONE + p * 32) !== 40'h600) begin failures++; $display("FAIL processor %0d done word %h", p, mword(DONE + p * 32)); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (mword(ARR + k * 32 + p * 4) !== 40'(64 + 16 - k)) begin
          failures++; $display("FAIL word p%0d block %0d = %h", p, k, mword(ARR + k * 32 + p * 4)); end
      end
    end
    $display("freeze=%0d double_fwd=%0d taken_xfer=%0d icache_miss=%0d prefetch=%0d traps=%0d pte_miss=%0d rpte_miss=%0d",
             n_freeze, n_dbl, n_br, n_miss, n_pref, n_trap, n_pte, n_rpte);
    $display("bus rs=%0d rfo=%0d wfi=%0d write=%0d owner=%0d handshakes=%0d conversions=%0d",
             n_rs, n_rfo, n_wfi, n_wr, n_own, n_hs, n_conv);
    checks++;
    if (n_freeze == 0 || n_dbl == 0 || n_br == 0 || n_miss == 0 || n_pref == 0 || n_trap < NP ||
        n_pte == 0 || n_rpte == 0 || n_rs == 0 || n_rfo == 0 || n_wfi == 0 || n_wr == 0 || n_own == 0 || n_hs == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

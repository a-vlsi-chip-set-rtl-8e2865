// tb_spur_cpu: runs a self-checking program on the CPU against a memory
// model of the external cache (random busy cycles on every reference,
// prefetches ignored at random, a faulting address range, and three device
// addresses: raise interrupt, clear interrupt, end of test) and a small FPU
// model (busy for a few cycles after each issued instruction).
// The program exercises: single and double forwarding, the load delay slot,
// 32- and 40-bit loads, delayed compare-and-branch loops, tag branches,
// byte extract/insert, tag read/write, the instruction cache in
// enabled-with-prefetch mode, call/return with overlapping windows and
// private locals, recursion deep enough to overflow and underflow the
// window stack, and the fault, illegal, tag, generation, overflow,
// interrupt and FPU-disabled traps.  Trap handlers count each trap type in
// memory and fix up (window spill/fill emulated by moving the saved window
// pointer, other traps skip the instruction).  At the end the testbench
// compares every result word and trap count with the expected values, and
// requires the pipeline mechanisms (double forwarding, I-cache misses,
// prefetch fills, freezes on busy, FPU issue and stall) to have occurred.
module tb_spur_cpu;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  cache_op_e cc_op; logic [1:0] cc_mode; logic [31:0] cc_addr; word40_t cc_wdata, cc_rdata;
  logic cc_busy, cc_ignored, cc_fault, intr; logic [21:0] fpu_instr; logic [1:0] fpu_ctl; logic [2:0] fpu_status;
  logic [8:0] bus_pc; logic iu_miss, iu_prefetch, trap_taken, fwd_double;
  spur_cpu dut (.*);

  // ------------------------------------------------------------ assembler
  int pc; int pass; int lab [string]; logic [39:0] mem [int];
  function automatic int A(string s); return lab.exists(s) ? lab[s] : 0; endfunction
  task automatic L(string s); lab[s] = pc; endtask
  task automatic emit(logic [31:0] i); if (pass == 1) mem[pc] = {8'h00, i}; pc++; endtask
  task automatic R(opcode_e o, int rd, int rs1, int rs2); emit({o, 5'(rd), 5'(rs1), 1'b0, 5'(rs2), 9'd0}); endtask
  task automatic I(opcode_e o, int rd, int rs1, int imm); emit({o, 5'(rd), 5'(rs1), 1'b1, 14'(imm)}); endtask
  task automatic ST(opcode_e o, int rs1, int off, int rs2);
    logic [13:0] x; x = 14'(off); emit({o, x[13:9], 5'(rs1), 1'b0, 5'(rs2), x[8:0]});
  endtask
  task automatic BRI(cond_e c, int rs1, int imm5, string t); emit({OP_CMPBR, c, 5'(rs1), 1'b1, 5'(imm5), 9'(A(t) - pc)}); endtask
  task automatic BRT(cond_e c, int rs1, int tag, string t); emit({OP_CMPBRT, c, 5'(rs1), 6'(tag), 9'(A(t) - pc)}); endtask
  task automatic CALL(string t); emit({4'b1110, 28'(A(t))}); endtask
  task automatic JMP(string t);  emit({4'b1111, 28'(A(t))}); endtask
  task automatic NOP(); emit(32'd0); endtask

  localparam int RES = 32'h1000, CNT = 32'h1400, DAT = 32'h1800, TBR = 32'h1C00;

  task automatic assemble();
    pc = 0;
    // ---- forwarding
    I(OP_ADD, 9, 0, RES);
    I(OP_ADD, 1, 0, 5);
    I(OP_ADD, 2, 1, 7);            // r1 from D1
    R(OP_ADD, 3, 1, 2);            // r1 from D2, r2 from D1: double forwarding
    ST(OP_ST40, 9, 0, 3);          // res0 = 17
    R(OP_SUB, 4, 3, 1);
    R(OP_XOR, 5, 4, 2);
    R(OP_OR, 5, 5, 1);
    ST(OP_ST40, 9, 4, 5);          // res1 = 5
    I(OP_SLL, 6, 3, 3);
    ST(OP_ST40, 9, 8, 6);          // res2 = 136
    // ---- loads, load delay slot
    I(OP_LD40, 1, 0, DAT);
    NOP();
    I(OP_ADD, 2, 1, 1);
    ST(OP_ST40, 9, 12, 2);         // res3 = tagged 0x12345679
    I(OP_LD32, 3, 0, DAT);
    NOP();
    ST(OP_ST40, 9, 16, 3);         // res4 = fixnum 0x12345678
    // ---- delayed-branch loop, uncached (IU disabled at reset)
    I(OP_ADD, 1, 0, 0);
    I(OP_ADD, 2, 0, 10);
    L("loop1");
    R(OP_ADD, 1, 1, 2);
    BRI(C_NE, 2, 1, "loop1");
    I(OP_SUB, 2, 2, 1);            // delay slot
    ST(OP_ST40, 9, 20, 1);         // res5 = 55
    // ---- trap base, KPSW = kernel | IU prefetch | ET | IE
    I(OP_ADD, 4, 0, TBR);
    I(OP_WRSR, 0, 4, SR_TBR);
    I(OP_ADD, 4, 0, 32'h183);
    I(OP_WRSR, 0, 4, SR_KPSW);
    NOP();
    I(OP_ADD, 1, 0, 0);
    I(OP_ADD, 2, 0, 20);
    L("loop2");
    I(OP_ADD, 5, 0, 1);
    I(OP_ADD, 6, 0, 2);
    R(OP_ADD, 3, 5, 6);            // double forwarding once the loop is cached
    I(OP_ADD, 1, 1, 3);
    BRI(C_NE, 2, 1, "loop2");
    I(OP_SUB, 2, 2, 1);
    ST(OP_ST40, 9, 24, 1);         // res6 = 60
    // ---- call / return, windows
    I(OP_ADD, 16, 0, 7);
    I(OP_ADD, 27, 0, 30);
    I(OP_ADD, 28, 0, 12);
    CALL("fadd");
    NOP();
    ST(OP_ST40, 9, 28, 27);        // res7 = 42
    ST(OP_ST40, 9, 32, 16);        // res8 = 7 (local kept)
    // ---- tags and bytes
    I(OP_ADD, 3, 0, 5);
    I(OP_LD32, 1, 0, DAT);
    NOP();
    I(OP_WRTAG, 2, 1, 1);          // cons tag
    BRT(C_TEQ, 2, 1, "tagok");
    NOP();
    I(OP_ADD, 3, 0, 111);          // skipped
    L("tagok");
    ST(OP_ST40, 9, 36, 3);         // res9 = 5
    I(OP_EXTB, 4, 1, 2);
    ST(OP_ST40, 9, 40, 4);         // res10 = 0x34
    I(OP_ADD, 5, 0, 32'hAB);
    emit({OP_INSB, 5'd4, 5'd1, 1'b0, 5'd5, 9'd0});   // byte 0 := r5
    ST(OP_ST40, 9, 44, 4);         // res11 = 0x123456AB
    I(OP_LD40, 1, 0, DAT);
    NOP();
    I(OP_RDTAG, 4, 1, 0);
    ST(OP_ST40, 9, 48, 4);         // res12 = 0x45
    // ---- recursion: overflows then underflows the window stack
    I(OP_ADD, 27, 0, 7);
    CALL("frec");
    NOP();
    ST(OP_ST40, 9, 52, 27);        // res13 = 7
    // ---- traps
    I(OP_ADD, 4, 0, 32'h1C);
    I(OP_WRSR, 0, 4, SR_UPSW);     // tag, overflow, generation traps on
    NOP();
    R(OP_ADDT, 3, 2, 1);           // tag trap (r2 is cons), skipped
    I(OP_LD32, 1, 0, DAT + 8);
    NOP();
    I(OP_ADD, 2, 1, 1);            // overflow trap, skipped
    ST(OP_ST40, 9, 56, 2);         // res14 = cons-tagged 0x12345678 (r2 kept)
    I(OP_LD40, 3, 0, DAT);         // generation 1
    NOP();
    ST(OP_ST40, 9, 60, 3);         // generation trap: res15 stays 0
    I(OP_LD32, 1, 0, DAT + 4);
    NOP();
    I(OP_LD40, 2, 1, 0);           // fault trap, skipped
    emit({7'h5F, 25'd0});          // illegal
    emit({OP_FPOP, 25'd0});        // FPU disabled: illegal
    I(OP_ADD, 1, 0, -16);
    ST(OP_ST40, 1, 0, 0);          // raise interrupt
    repeat (6) NOP();
    I(OP_ADD, 4, 0, 32'h1A3);      // FPU on
    I(OP_WRSR, 0, 4, SR_KPSW);
    NOP();
    emit({OP_FPOP, 5'd1, 5'd2, 1'b0, 5'd3, 9'd0});
    emit({OP_FPOP, 5'd4, 5'd5, 1'b0, 5'd6, 9'd0});   // stalls on the busy FPU
    ST(OP_ST40, 1, 8, 0);          // end of test
    L("halt");
    BRI(C_ALWAYS, 0, 0, "halt");
    NOP();

    // ---- functions
    pc = 32'h200;
    L("fadd");
    R(OP_ADD, 11, 11, 12);
    I(OP_ADD, 16, 0, 99);
    I(OP_RET, 0, 10, 8);
    NOP();
    L("frec");
    BRI(C_EQ, 11, 0, "frec_ret");
    NOP();
    I(OP_SUB, 27, 11, 1);
    CALL("frec");
    NOP();
    I(OP_ADD, 11, 27, 1);
    L("frec_ret");
    I(OP_RET, 0, 10, 8);
    NOP();

    // ---- trap vectors: 4 words per type, each jumps to the handler
    for (int t = 0; t < 16; t++) begin pc = TBR / 4 + t * 4; JMP("handler"); NOP(); end
    pc = 32'h900;
    L("handler");
    I(OP_RDSR, 8, 0, SR_TTYPE);
    I(OP_SLL, 8, 8, 2);
    I(OP_LD40, 7, 8, CNT);
    NOP();
    I(OP_ADD, 7, 7, 1);
    ST(OP_ST40, 8, CNT, 7);
    I(OP_RDSR, 8, 0, SR_TTYPE);
    BRI(C_EQ, 8, TT_WOVF, "h_wovf");
    NOP();
    BRI(C_EQ, 8, TT_WUNF, "h_wunf");
    NOP();
    BRI(C_EQ, 8, TT_INTR, "h_intr");
    NOP();
    I(OP_RDSR, 8, 0, SR_TPC);      // others: skip the instruction
    I(OP_RETT, 0, 8, 4);
    NOP();
    L("h_wovf");
    I(OP_RDSR, 8, 0, SR_SWP);
    I(OP_ADD, 8, 8, 1);
    I(OP_AND, 8, 8, 7);
    I(OP_WRSR, 0, 8, SR_SWP);
    I(OP_RDSR, 8, 0, SR_TPC);
    I(OP_RETT, 0, 8, 0);
    NOP();
    L("h_wunf");
    I(OP_RDSR, 8, 0, SR_SWP);
    I(OP_SUB, 8, 8, 1);
    I(OP_AND, 8, 8, 7);
    I(OP_WRSR, 0, 8, SR_SWP);
    I(OP_RDSR, 8, 0, SR_TPC);
    I(OP_RETT, 0, 8, 0);
    NOP();
    L("h_intr");
    I(OP_ADD, 8, 0, -16);
    ST(OP_ST40, 8, 4, 0);          // clear interrupt
    I(OP_RDSR, 8, 0, SR_TPC);
    I(OP_RETT, 0, 8, 0);           // re-run the interrupted instruction
    NOP();
  endtask

  // ------------------------------------------------------------ memory model
  int bcnt; logic done = 0; logic dbg_on = 0;
  function automatic logic [39:0] rd(logic [31:0] a);
    return mem.exists(int'(a >> 2)) ? mem[int'(a >> 2)] : 40'd0;
  endfunction
  always_comb begin
    cc_rdata   = word40_t'(rd(cc_addr));
    cc_fault   = (cc_op == CO_READ || cc_op == CO_WRITE) && cc_addr[31:16] == 16'hDEAD;
    cc_ignored = (cc_op == CO_PREFETCH) && (bcnt == 1);
    cc_busy    = cc_op != CO_NONE && cc_op != CO_PREFETCH && !cc_fault && bcnt > 0;
  end
  int n_busy, n_fpu_issue, n_fpu_stall, n_miss, n_pref, n_dbl, n_trap, fpu_left;
  always @(posedge clk) if (rst_n) begin
    if (cc_busy) begin n_busy++; bcnt--; end
    else if (cc_op != CO_NONE) begin
      bcnt = $urandom_range(0, 3);
      if (cc_op == CO_WRITE && !cc_fault) begin
        if (cc_addr == 32'hFFFFFFF0) intr <= 1;
        else if (cc_addr == 32'hFFFFFFF4) intr <= 0;
        else if (cc_addr == 32'hFFFFFFF8) done = 1;
        else mem[int'(cc_addr >> 2)] = cc_wdata;
      end
    end
    if (fpu_ctl[0]) begin n_fpu_issue++; fpu_left = 12; end
    else if (fpu_left > 0) fpu_left--;
    if (dut.fpu_stall) n_fpu_stall++;
    if (iu_miss) n_miss++;
    if (iu_prefetch) n_pref++;
    if (fwd_double) n_dbl++;
    if (trap_taken) n_trap++;
    if (dbg_on && dut.ex_valid && dut.advance) $display("%0t ex pc=%h ins=%h cwp=%0d swp=%0d take=%b", $time, dut.ex_pc, dut.ex_instr, dut.cwp, dut.swp, dut.take);
  end
  assign fpu_status = {fpu_left > 0, 2'b00};

  task automatic expect_word(string what, int a, logic [39:0] v);
    checks++;
    if (rd(a) !== v) begin failures++; $display("FAIL %s got %h exp %h", what, rd(a), v); end
  endtask

  initial begin
    intr = 0; bcnt = 0; fpu_left = 0;
    pass = 0; assemble(); pass = 1; assemble();
    mem[DAT / 4]     = {2'b01, 6'd5, 32'h12345678};
    mem[DAT / 4 + 1] = {8'h00, 32'hDEAD0000};
    mem[DAT / 4 + 2] = {8'h00, 32'h7FFFFFFF};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    expect_word("double forwarding", RES + 0, 40'd17);
    expect_word("logic ops", RES + 4, 40'd5);
    expect_word("shift", RES + 8, 40'd136);
    expect_word("ld40 + add", RES + 12, {8'h45, 32'h12345679});
    expect_word("ld32", RES + 16, {8'h00, 32'h12345678});
    expect_word("loop uncached", RES + 20, 40'd55);
    expect_word("loop cached", RES + 24, 40'd60);
    expect_word("call result", RES + 28, 40'd42);
    expect_word("local kept", RES + 32, 40'd7);
    expect_word("tag branch", RES + 36, 40'd5);
    expect_word("extract", RES + 40, 40'h34);
    expect_word("insert", RES + 44, 40'h00123456AB);
    expect_word("read tag", RES + 48, 40'h45);
    expect_word("recursion", RES + 52, 40'd7);
    expect_word("overflow skipped", RES + 56, {8'h01, 32'h12345678});
    expect_word("generation store suppressed", RES + 60, 40'd0);
    expect_word("fault traps", CNT + 4 * TT_FAULT, 40'd1);
    expect_word("illegal traps", CNT + 4 * TT_ILLEGAL, 40'd2);
    expect_word("window overflow traps", CNT + 4 * TT_WOVF, 40'd2);
    expect_word("window underflow traps", CNT + 4 * TT_WUNF, 40'd1);
    expect_word("tag traps", CNT + 4 * TT_TAG, 40'd1);
    expect_word("generation traps", CNT + 4 * TT_GEN, 40'd1);
    expect_word("overflow traps", CNT + 4 * TT_OVF, 40'd1);
    expect_word("interrupts", CNT + 4 * TT_INTR, 40'd1);
    $display("busy=%0d miss=%0d prefetch=%0d double=%0d traps=%0d fpu_issue=%0d fpu_stall=%0d",
             n_busy, n_miss, n_pref, n_dbl, n_trap, n_fpu_issue, n_fpu_stall);
    checks++;
    if (n_busy == 0 || n_miss == 0 || n_pref == 0 || n_dbl == 0 || n_trap != 10 || n_fpu_issue != 2 || n_fpu_stall == 0) begin
      failures++; $display("FAIL mechanism counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spur_upper_dp: checks the branch adder and PC incrementer, the window
// pointer with overflow/underflow detection against the saved window
// pointer, special-register read/write, trap entry (saves PC and KPSW, clears
// the trap enable, sets kernel mode), return from trap, and the freeze input.
module tb_spur_upper_dp;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, call, ret, wovf, wunf, sr_we, trap, rett;
  logic [29:0] pc_ex, br_target, pc_if, pc_inc, trap_pc; logic [8:0] br_off;
  logic [3:0] sr_idx, sr_widx; logic [31:0] sr_rdata, sr_wdata, tbr;
  trap_e trap_type; logic [9:0] kpsw, upsw; logic [2:0] cwp, swp;
  spur_upper_dp dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask
  int sw;
  initial begin
    {en, call, ret, sr_we, trap, rett} = '0; pc_ex = 0; br_off = 0; pc_if = 0; trap_pc = 0;
    sr_idx = 0; sr_widx = 0; sr_wdata = 0; trap_type = TT_NONE;
    repeat (2) @(posedge clk); rst_n = 1; #1; en = 1;
    chk("reset kpsw", 32'(kpsw), 32'h100); chk("reset swp", 32'(swp), 7);
    for (int i = 0; i < 200; i++) begin
      pc_ex = 30'($urandom); br_off = 9'($urandom); pc_if = 30'($urandom); #1;
      chk("br", 32'(br_target), 32'(30'(pc_ex + 30'($signed(br_off)))));
      chk("inc", 32'(pc_if), 32'(pc_inc - 30'd1));
    end
    // calls until overflow: CWP 0 -> 6, the seventh call overflows (SWP = 7)
    for (int i = 0; i < 6; i++) begin call = 1; #1; chk("no ovf", wovf, 0); step(); end
    chk("cwp6", 32'(cwp), 6); #1; chk("ovf", wovf, 1); step(); chk("cwp held", 32'(cwp), 6);
    call = 0;
    // move SWP to 3 via special register write, return down to it
    sr_we = 1; sr_widx = SR_SWP; sr_wdata = 3; step(); sr_we = 0;
    for (int i = 0; i < 3; i++) begin ret = 1; #1; chk("no unf", wunf, 0); step(); end
    #1; chk("unf", wunf, 1); chk("cwp3", 32'(cwp), 3); ret = 0;
    // special registers
    sr_we = 1; sr_widx = SR_TBR; sr_wdata = 32'h1234_5600; step();
    sr_widx = SR_UPSW; sr_wdata = 32'h15; step();
    sr_widx = SR_KPSW; sr_wdata = 32'h103; step(); sr_we = 0;
    sr_idx = SR_TBR; #1; chk("tbr", sr_rdata, 32'h1234_5600);
    sr_idx = SR_UPSW; #1; chk("upsw", sr_rdata, 32'h15);
    // trap entry
    trap = 1; trap_type = TT_TAG; trap_pc = 30'h0ABCDE; step(); trap = 0;
    chk("et cleared", kpsw[PSW_ET], 0); chk("kern", kpsw[PSW_KERN], 1);
    sr_idx = SR_TPC; #1; chk("tpc", sr_rdata, {30'h0ABCDE, 2'b00});
    sr_idx = SR_TTYPE; #1; chk("ttype", sr_rdata, TT_TAG);
    sr_idx = SR_SKPSW; #1; chk("skpsw", sr_rdata, 32'h103);
    // frozen: nothing changes
    en = 0; rett = 1; step(); chk("frozen", kpsw[PSW_ET], 0);
    en = 1; step(); rett = 0; chk("rett", 32'(kpsw), 32'h103);
    // random window walk against a model
    sw = swp;
    for (int i = 0; i < 500; i++) begin
      int c;
      call = $urandom_range(0, 1); ret = !call && $urandom_range(0, 1); #1;
      c = cwp;
      chk("wovf", wovf, call && ((c + 1) % 8) == sw); chk("wunf", wunf, ret && c == sw);
      step();
      if (call && ((c + 1) % 8) != sw) c = (c + 1) % 8;
      else if (ret && c != sw) c = (c + 7) % 8;
      chk("walk", 32'(cwp), 32'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

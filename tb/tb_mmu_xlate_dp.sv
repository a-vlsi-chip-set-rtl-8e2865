// tb_mmu_xlate_dp: loads the segment and page-table base registers and
// checks every address the translation data path forms (global virtual
// address, PTE and root PTE addresses, physical data address) against the
// field layout computed separately in the testbench.
module tb_mmu_xlate_dp;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, reg_we; logic [7:0] reg_addr; logic [31:0] reg_wdata, reg_rdata, va, pte_word;
  logic [37:0] gva, va_pte, va_rpte; logic [31:0] pa_rpte, pa_pte, pa_data;
  logic [7:0] seg [4]; logic [9:0] ptb; logic [19:0] rv, rp;
  logic [37:0] e_gva, e_pte, e_rpte;
  mmu_xlate_dp dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(logic [7:0] a, logic [31:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d; @(posedge clk); #1; reg_we = 0;
  endtask
  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; va = 0; pte_word = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 4; i++) begin seg[i] = 8'($urandom); wr(8'(4*i), seg[i]); end
      ptb = 10'($urandom); rv = 20'($urandom); rp = 20'($urandom);
      wr(8'h10, ptb); wr(8'h14, rv); wr(8'h18, rp);
      reg_addr = 8'h14; #1; checks++; if (reg_rdata !== {12'd0, rv}) failures++;
      for (int i = 0; i < 100; i++) begin
        va = $urandom; pte_word = $urandom; #1;
        // global virtual address: segment number replaces the top two bits
        e_gva = {seg[va >> 30], va[29:0]};
        // PTE address: page table base, then the global virtual page number, words
        e_pte = {ptb, e_gva[37:12], 2'b00};
        // root PTE: a page of PTEs covers 1024 pages
        e_rpte = {rv, e_gva[37:22], 2'b00};
        checks++;
        if (gva !== e_gva || va_pte !== e_pte || va_rpte !== e_rpte ||
            pa_rpte !== {rp, 2'b00, e_gva[29:22], 2'b00} ||
            pa_pte !== {pte_word[31:12], e_gva[21:12], 2'b00} ||
            pa_data !== {pte_word[31:12], va[11:0]}) begin
          failures++; $display("FAIL va %h", va);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pcc_sequencer: the processor cache controller with the cache RAMs and
// translation datapath around it, and a behavioural bus controller in the
// testbench standing in for the SBC: it answers ReadShared and
// ReadForOwnership from a memory model, absorbs Writes and acknowledges
// WriteForInvalidation, each after a random delay.  The testbench also
// plays a foreign processor by sending snoops (ReadShared and
// ReadForOwnership) on random blocks; a block supplied by this cache as
// owner becomes the memory copy.
// Checked: every CPU read returns the value of the last write to that
// address (reference model), in physical mode and through two-level
// in-cache translation (PTE miss, root PTE miss), with conflicting blocks
// forcing write-backs of owned victims; register access; ignored prefetch
// misses; invalid PTE faults; counts of each PCC mechanism are required to
// be non-zero.
module tb_pcc_sequencer;
  import spur_pkg::*;
  localparam int BLK_W = 320;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  cache_op_e cpu_op; logic [1:0] cpu_mode; logic [31:0] cpu_addr; word40_t cpu_wdata, cpu_rdata;
  logic cpu_busy, cpu_ignored, cpu_fault;
  logic [31:0] xl_va, xl_pte_word, xl_pa_rpte, xl_pa_pte, xl_pa_data; logic [37:0] xl_gva, xl_va_pte, xl_va_rpte;
  logic [11:0] ram_idx; logic [2:0] ram_word; logic [20:0] ram_tag, ram_wtag; coh_state_e ram_state, ram_wstate;
  logic [26:0] ram_pblk, ram_wpblk; word40_t ram_data, ram_wword; logic [BLK_W-1:0] ram_block, ram_wblock;
  logic ram_meta_we, ram_word_we, ram_blk_we;
  logic sbc_req, sbc_ack, snp_req, snp_ack; logic [3+38+32+BLK_W-1:0] sbc_req_code; logic [BLK_W:0] sbc_ack_code;
  logic [40:0] snp_req_code; logic [BLK_W+1:0] snp_ack_code;
  logic reg_we; logic [7:0] reg_addr; logic [31:0] reg_wdata, reg_rdata; logic [15:0] events;

  pcc_sequencer dut (.*);
  mmu_xlate_dp u_xl (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .va (xl_va), .pte_word (xl_pte_word), .gva (xl_gva), .va_pte (xl_va_pte), .va_rpte (xl_va_rpte),
    .pa_rpte (xl_pa_rpte), .pa_pte (xl_pa_pte), .pa_data (xl_pa_data));
  cache_ram u_ram (.clk, .rst_n, .idx (ram_idx), .word (ram_word), .rd_tag (ram_tag), .rd_state (ram_state),
    .rd_pblk (ram_pblk), .rd_data (ram_data), .rd_block (ram_block), .meta_we (ram_meta_we), .wr_tag (ram_wtag),
    .wr_state (ram_wstate), .wr_pblk (ram_wpblk), .word_we (ram_word_we), .wr_word (ram_wword),
    .blk_we (ram_blk_we), .wr_block (ram_wblock));

  // ------------------------------------------------------------ memory model
  logic [BLK_W-1:0] mem [int];
  function automatic logic [BLK_W-1:0] mblk(logic [31:0] pa);
    int k; logic [BLK_W-1:0] b;
    k = int'(pa >> 5);
    if (mem.exists(k)) return mem[k];
    for (int w = 0; w < 8; w++) b[w*40 +: 40] = {8'h00, (pa & ~32'h1F) | 32'(w * 4)};
    return b;
  endfunction
  task automatic mset_word(logic [31:0] pa, logic [39:0] v);
    logic [BLK_W-1:0] b; b = mblk(pa); b[pa[4:2]*40 +: 40] = v; mem[int'(pa >> 5)] = b;
  endtask
  // reference: latest value of every word written (by physical address)
  logic [39:0] refm [int];
  function automatic logic [39:0] ref_word(logic [31:0] pa);
    if (refm.exists(int'(pa >> 2))) return refm[int'(pa >> 2)];
    return {8'h00, pa & ~32'h3};
  endfunction

  // ------------------------------------------------------------ SBC model
  int n_rs, n_rfo, n_wfi, n_wr, n_snp, n_resp;
  logic [3+38+32+BLK_W-1:0] q; int dly; logic busy_bus;
  logic snp_go; logic [40:0] snp_code; logic snp_wait;
  always @(posedge clk) begin
    sbc_ack <= 1'b0;
    if (sbc_req) begin q = sbc_req_code; dly = $urandom_range(1, 6); busy_bus = 1; end
    else if (busy_bus) begin
      if (dly > 0) dly--;
      else begin
        bus_cmd_e c; logic [31:0] pa; logic [BLK_W-1:0] blk;
        busy_bus = 0;
        c = bus_cmd_e'(q[3+38+32+BLK_W-1 -: 3]); pa = q[32+BLK_W-1 -: 32]; blk = q[BLK_W-1:0];
        sbc_ack <= 1'b1; sbc_ack_code <= {1'b0, (c == BUS_RS || c == BUS_RFO) ? mblk(pa) : '0};
        if (c == BUS_WRITE) begin mem[int'(pa >> 5)] = blk; n_wr++; end
        if (c == BUS_RS) n_rs++;
        if (c == BUS_RFO) n_rfo++;
        if (c == BUS_WFI) n_wfi++;
      end
    end
    snp_req <= 1'b0;
    if (snp_go && !snp_wait) begin snp_req <= 1'b1; snp_req_code <= snp_code; snp_wait = 1; snp_go = 0; end
    if (snp_ack) begin
      snp_wait = 0; n_snp++;
      if (snp_ack_code[BLK_W]) begin
        n_resp++;
        // the foreign processor now has the data; model it writing it back
        mem[int'({snp_code[31:5], 5'd0} >> 5)] = snp_ack_code[BLK_W-1:0];
      end
    end
  end

  // ------------------------------------------------------------ CPU side
  int n_fault, n_ign, n_pte_miss, n_rpte_miss;
  always @(posedge clk) begin
    if (events[7]) n_pte_miss++;
    if (events[8]) n_rpte_miss++;
  end
  task automatic access(cache_op_e op, logic [1:0] mode, logic [31:0] a, logic [39:0] wd, output word40_t rd, output logic flt);
    @(negedge clk);
    cpu_op = op; cpu_mode = mode; cpu_addr = a; cpu_wdata = wd;
    #1;
    while (cpu_busy) begin @(negedge clk); #1; end
    rd = cpu_rdata; flt = cpu_fault;
    if (cpu_ignored) n_ign++;
    @(posedge clk); #1; cpu_op = CO_NONE;
  endtask
  task automatic check_read(logic [1:0] mode, logic [31:0] va, logic [31:0] pa);
    word40_t r; logic f;
    access(cache_op_e'($urandom_range(0, 3) == 0 ? CO_READPRIV : CO_READ), mode, va, '0, r, f);
    checks++;
    if (r !== ref_word(pa) || f) begin failures++; $display("FAIL read va %h pa %h got %h exp %h", va, pa, r, ref_word(pa)); end
  endtask
  task automatic do_write(logic [1:0] mode, logic [31:0] va, logic [31:0] pa);
    word40_t r; logic f; logic [39:0] v;
    v = {8'($urandom), 32'($urandom)};
    access(CO_WRITE, mode, va, v, r, f);
    refm[int'(pa >> 2)] = v;
  endtask
  task automatic do_flush(logic [1:0] mode, logic [31:0] va);
    word40_t r; logic f; access(CO_FLUSH, mode, va, '0, r, f);
  endtask
  task automatic reg_write(logic [7:0] off, logic [31:0] v);
    word40_t r; logic f; access(CO_WRITE, 2'b11, 32'hFFFFF000 | 32'(off), {8'h0, v}, r, f);
  endtask
  task automatic snoop(bus_cmd_e c, logic [31:0] pa);
    // foreign transactions on physical-mode blocks (segment all ones)
    wait (!snp_wait && !snp_go);
    snp_code = {c, 6'h3F, pa}; snp_go = 1;
  endtask

  // physical addresses: 64 blocks, 8 per cache index -> conflicts
  function automatic logic [31:0] ppa(int k, int w);
    return 32'h0010_0000 + 32'((k % 8) * 32) + 32'((k / 8) * 32'h20000) + 32'(w * 4);
  endfunction

  // virtual mode set-up
  localparam logic [9:0]  PTB = 10'h155;
  localparam logic [19:0] RPV = 20'hABCDE, RPP = 20'h00321;
  logic [7:0] seg [4];
  int next_pfn = 32'h500;
  logic [19:0] rpte_pfn [int];
  function automatic logic [31:0] xlate(logic [31:0] va);
    // the testbench's own page tables: data page = 0x800 + virtual page
    return {20'(32'h800 + 32'(va[29:12])), va[11:0]};
  endfunction
  task automatic map_page(logic [31:0] va, logic valid);
    logic [7:0] s; logic [17:0] vpn; logic [31:0] rpa, ppa_;
    s = seg[va[31:30]]; vpn = va[29:12];
    rpa = {RPP, 2'b00, vpn[17:10], 2'b00};
    if (!rpte_pfn.exists(int'(rpa))) begin
      rpte_pfn[int'(rpa)] = 20'(next_pfn); next_pfn++;
      mset_word(rpa, {8'h0, rpte_pfn[int'(rpa)], 12'h001});
    end
    ppa_ = {rpte_pfn[int'(rpa)], vpn[9:0], 2'b00};
    mset_word(ppa_, {8'h0, xlate(va) >> 12 << 12 | 32'(valid)});
  endtask

  int nv;
  initial begin
    cpu_op = CO_NONE; cpu_mode = 2'b11; cpu_addr = 0; cpu_wdata = '0; snp_go = 0; snp_wait = 0; busy_bus = 0;
    sbc_ack_code = '0; snp_req_code = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // ---- physical mode: random reads, writes, flushes and foreign snoops
    for (int t = 0; t < 3000; t++) begin
      int k, w; k = $urandom_range(0, 63); w = $urandom_range(0, 7);
      case ($urandom_range(0, 9))
        0, 1, 2, 3: check_read(2'b11, ppa(k, w), ppa(k, w));
        4, 5, 6:    do_write(2'b11, ppa(k, w), ppa(k, w));
        7:          do_flush(2'b11, ppa(k, w));
        8:          snoop($urandom_range(0, 1) ? BUS_RS : BUS_RFO, ppa(k, 0));
        default: begin word40_t r; logic f; access(CO_PREFETCH, 2'b11, ppa(k, w), '0, r, f); end
      endcase
    end
    // ---- registers
    for (int i = 0; i < 4; i++) begin seg[i] = 8'(8'h10 + i); reg_write(8'(4 * i), seg[i]); end
    reg_write(8'h10, PTB); reg_write(8'h14, RPV); reg_write(8'h18, RPP);
    begin word40_t r; logic f; access(CO_READ, 2'b11, 32'hFFFFF014, '0, r, f);
      checks++; if (r.data !== {12'd0, RPV}) begin failures++; $display("FAIL reg readback"); end end
    // ---- virtual mode: 24 pages spread over two root PTE pages
    for (int p = 0; p < 24; p++) map_page({2'(p % 4), 30'((p / 4) * 32'h40_0000 + p * 32'h1000)}, 1'b1);
    nv = 0;
    for (int t = 0; t < 3000; t++) begin
      int p; logic [31:0] va;
      p = $urandom_range(0, 23);
      va = {2'(p % 4), 30'((p / 4) * 32'h40_0000 + p * 32'h1000)} | 32'($urandom_range(0, 15) * 4);
      if ($urandom_range(0, 2) == 0) do_write(2'b10, va, xlate(va));
      else check_read(2'b10, va, xlate(va));
      nv++;
    end
    // ---- invalid PTE: fault
    map_page(32'h0777_7000, 1'b0);
    begin word40_t r; logic f; access(CO_READ, 2'b10, 32'h0777_7000, '0, r, f);
      checks++; if (!f) begin failures++; $display("FAIL no fault"); end else n_fault++; end
    // ---- mechanisms seen
    checks++;
    if (n_rs == 0 || n_rfo == 0 || n_wfi == 0 || n_wr == 0 || n_snp == 0 || n_resp == 0 ||
        n_ign == 0 || n_pte_miss == 0 || n_rpte_miss == 0 || n_fault == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("rs=%0d rfo=%0d wfi=%0d write=%0d snoop=%0d respond=%0d ignored=%0d pte_miss=%0d rpte_miss=%0d fault=%0d",
             n_rs, n_rfo, n_wfi, n_wr, n_snp, n_resp, n_ign, n_pte_miss, n_rpte_miss, n_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

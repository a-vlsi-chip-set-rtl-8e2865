// tb_mmu_cc: two complete MMU/CC chips, each with its own processor clock,
// sharing one bus clock, the bus arbiter and a memory model.  Each
// processor drives random physical-mode reads, writes, read-for-ownership
// loads and flushes on a small set of shared blocks (blocks are shared,
// words are not: processor p writes only even/odd words, so every value
// has one writer).  Several block addresses map to the same cache line so
// owned victims are written back.
// Checked: a processor always reads back its own last write; a word owned
// by the other processor is read with a sequence number never older than
// one already seen and never newer than the latest written (coherence);
// after both processors flush everything, memory holds every latest value.
// Bus mechanisms (RS, RFO, WFI, Write, owner-supplied data, WFI->RFO
// conversion) are counted and each must occur.
module tb_mmu_cc;
  import spur_pkg::*;
  localparam int BLK_W = 320, N = 2;
  int checks = 0, failures = 0;
  logic clk_b = 0, rst_n = 0;
  logic [N-1:0] clk_p;
  initial clk_p = '0;
  always #5 clk_b = ~clk_b;
  always #4 clk_p[0] = ~clk_p[0];
  always #6 clk_p[1] = ~clk_p[1];
  initial begin #40000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  cache_op_e cpu_op [N]; logic [1:0] cpu_mode [N]; logic [31:0] cpu_addr [N]; word40_t cpu_wdata [N], cpu_rdata [N];
  logic cpu_busy [N], cpu_ignored [N], cpu_fault [N], cpu_intr [N];
  logic [N-1:0] bus_req, gnt, s_done, s_respond; bus_cmd_e [N-1:0] m_cmd; logic [N-1:0][37:0] m_gva;
  logic [N-1:0][31:0] m_pa; logic [N-1:0][BLK_W-1:0] m_block, s_block;
  bus_cmd_e bus_cmd; logic [37:0] bus_gva; logic [31:0] bus_pa; logic [BLK_W-1:0] bus_wblock, bus_rblock, mem_rblock;
  logic bus_owner, bus_done, mem_done;

  for (genvar i = 0; i < N; i++) begin : g_n
    mmu_cc u_mmu (.clk_p (clk_p[i]), .clk_b, .rst_n,
      .cpu_op (cpu_op[i]), .cpu_mode (cpu_mode[i]), .cpu_addr (cpu_addr[i]), .cpu_wdata (cpu_wdata[i]),
      .cpu_rdata (cpu_rdata[i]), .cpu_busy (cpu_busy[i]), .cpu_ignored (cpu_ignored[i]), .cpu_fault (cpu_fault[i]),
      .cpu_intr (cpu_intr[i]), .ext_irq (7'd0),
      .bus_req (bus_req[i]), .bus_gnt (gnt[i]), .m_cmd (m_cmd[i]), .m_gva (m_gva[i]), .m_pa (m_pa[i]),
      .m_block (m_block[i]), .bus_done, .bus_rblock, .bus_cmd, .bus_gva,
      .s_done (s_done[i]), .s_respond (s_respond[i]), .s_block (s_block[i]));
  end
  spurbus_arb #(.NPROC(N), .BLK_W(BLK_W)) u_arb (.clk (clk_b), .rst_n, .req (bus_req), .gnt, .m_cmd, .m_gva,
    .m_pa, .m_block, .s_done, .s_respond, .s_block, .bus_cmd, .bus_gva, .bus_pa, .bus_wblock, .bus_owner,
    .bus_done, .bus_rblock, .mem_done, .mem_rblock);

  // memory: answers a few bus cycles after the command appears
  logic [BLK_W-1:0] mem [int];
  int mdly; int n_rs, n_rfo, n_wfi, n_wr, n_own, n_conv;
  function automatic logic [BLK_W-1:0] mblk(logic [31:0] pa);
    if (mem.exists(int'(pa >> 5))) return mem[int'(pa >> 5)];
    return '0;
  endfunction
  assign mem_rblock = mblk(bus_pa);
  always @(posedge clk_b) begin
    if (bus_cmd == BUS_NONE) begin mem_done <= 0; mdly = $urandom_range(1, 4); end
    else if (mdly > 0) mdly--;
    else mem_done <= 1;
    if (bus_done) begin
      if (bus_cmd == BUS_WRITE) begin mem[int'(bus_pa >> 5)] = bus_wblock; n_wr++; end
      if (bus_cmd == BUS_RS) n_rs++;
      if (bus_cmd == BUS_RFO) n_rfo++;
      if (bus_cmd == BUS_WFI) n_wfi++;
      if (bus_owner) n_own++;
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge clk_p[i]) if (g_n[i].u_mmu.u_pcc.sbc_ack && g_n[i].u_mmu.u_pcc.conv) n_conv++;
  end

  // shared blocks: 8 blocks, pairs of them on the same cache line
  function automatic logic [31:0] addr(int b, int w);
    return 32'h0004_0000 + 32'((b % 4) * 32) + 32'((b / 4) * 32'h20000) + 32'(w * 4);
  endfunction
  int latest [64];         // latest sequence number written to word b*8+w
  int seen [N][64];        // newest sequence number each processor has read
  int seqc = 0;

  task automatic access(int p, cache_op_e op, logic [31:0] a, logic [39:0] wd, output word40_t rd);
    @(negedge clk_p[p]);
    cpu_op[p] = op; cpu_mode[p] = 2'b11; cpu_addr[p] = a; cpu_wdata[p] = wd; #1;
    while (cpu_busy[p]) begin @(negedge clk_p[p]); #1; end
    rd = cpu_rdata[p];
    @(posedge clk_p[p]); #1; cpu_op[p] = CO_NONE;
  endtask

  task automatic run(int p, int n);
    for (int t = 0; t < n; t++) begin
      int b, w, k; word40_t r;
      b = $urandom_range(0, 7); w = $urandom_range(0, 7); k = b * 8 + w;
      case ($urandom_range(0, 7))
        0, 1, 2: begin
          // write one of this processor's words
          w = (w & ~1) | p; k = b * 8 + w;
          seqc++; latest[k] = seqc;
          access(p, CO_WRITE, addr(b, w), {8'(k), 32'(seqc)}, r);
        end
        3: access(p, CO_FLUSH, addr(b, w), '0, r);
        default: begin
          access(p, $urandom_range(0, 3) == 0 ? CO_READPRIV : CO_READ, addr(b, w), '0, r);
          checks++;
          if (r.typ != 0 && 8'({r.gen, r.typ}) !== 8'(k)) begin failures++; $display("FAIL p%0d wrong word %0d", p, k); end
          else if ((w & 1) == p) begin
            if (int'(r.data) != latest[k]) begin failures++; $display("FAIL p%0d own word %0d got %0d exp %0d", p, k, r.data, latest[k]); end
          end else begin
            if (int'(r.data) < seen[p][k] || int'(r.data) > latest[k]) begin
              failures++; $display("FAIL p%0d coherence word %0d got %0d seen %0d latest %0d", p, k, r.data, seen[p][k], latest[k]); end
            seen[p][k] = int'(r.data);
          end
        end
      endcase
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin cpu_op[i] = CO_NONE; cpu_mode[i] = 2'b11; cpu_addr[i] = 0; cpu_wdata[i] = '0; end
    foreach (latest[k]) latest[k] = 0;
    foreach (seen[p, k]) seen[p][k] = 0;
    repeat (4) @(posedge clk_b); #1 rst_n = 1;
    repeat (4) @(posedge clk_b);
    fork run(0, 1500); run(1, 1500); join
    // flush everything from both caches, then memory must hold every latest value
    for (int p = 0; p < N; p++) for (int b = 0; b < 8; b++) begin word40_t r; access(p, CO_FLUSH, addr(b, 0), '0, r); end
    for (int k = 0; k < 64; k++) begin
      logic [39:0] v; v = mblk(addr(k / 8, 0))[(k % 8) * 40 +: 40];
      checks++;
      if (int'(v[31:0]) != latest[k]) begin failures++; $display("FAIL memory word %0d got %0d exp %0d", k, v[31:0], latest[k]); end
    end
    $display("rs=%0d rfo=%0d wfi=%0d write=%0d owner=%0d conv=%0d", n_rs, n_rfo, n_wfi, n_wr, n_own, n_conv);
    checks++; if (n_rs == 0 || n_rfo == 0 || n_wfi == 0 || n_wr == 0 || n_own == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

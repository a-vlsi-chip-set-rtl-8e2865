// tb_spur_iu: drives the instruction unit with fetch streams against a
// memory model behind a port that answers busy for a random number of
// cycles.  Checks that every returned instruction is the memory word at the
// PC, that a re-fetch of a cached word hits without using the port, that
// prefetch in mode 1x fills the rest of a block so a sequential run costs
// one miss, that mode 01 never prefetches, that mode 00 caches nothing, that
// an ignored prefetch stops the prefetcher, and that a flush empties the cache.
module tb_spur_iu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, phys = 0, flush = 0;
  logic [1:0] mode; logic [29:0] pc, ext_waddr; logic [31:0] instr, ext_rdata;
  logic instr_valid, ext_req, ext_pref, ext_gnt, ext_busy, ext_ignored, demand_miss, pf_fill;
  int busy_cnt, misses, pfills, port_uses;
  logic ignore_pref; logic dbg = 0;
  spur_iu dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [31:0] mem(logic [29:0] a); return {a[29:0], 2'b01} ^ 32'h5A5A_0000; endfunction
  // port model: a request is busy for busy_cnt cycles then answered
  assign ext_gnt     = ext_req;
  assign ext_busy    = ext_req && busy_cnt > 0;
  assign ext_ignored = ext_req && ext_pref && ignore_pref;
  assign ext_rdata   = mem(ext_waddr);
  always @(posedge clk) begin
    if (ext_req && busy_cnt > 0) busy_cnt--; else busy_cnt = $urandom_range(0, 2);
  end
  always @(negedge clk) begin
    if (ext_req) port_uses++;
    if (demand_miss && !ext_busy) misses++;
    if (pf_fill) pfills++;
    if (dbg) $display("%0t pc=%h req=%b pref=%b busy=%b dm=%b pf=%b iv=%b st=%0d pfa=%h", $time, pc, ext_req, ext_pref, ext_busy, demand_miss, pf_fill, instr_valid, dut.pf_state, dut.pf_addr);
  end
  // fetch one instruction, waiting until it is delivered
  task automatic fetch(logic [29:0] a);
    pc = a;
    do @(negedge clk); while (!instr_valid);
    checks++;
    if (instr !== mem(a)) begin failures++; $display("FAIL pc %h got %h", a, instr); end
    @(posedge clk); #1;
  endtask
  initial begin
    mode = 2'b10; pc = 0; ignore_pref = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // sequential run of one block with prefetch: one demand miss
    misses = 0;
    for (int i = 0; i < 8; i++) fetch(30'h100 + 30'(i));
    checks++; if (misses != 1) begin failures++; $display("FAIL prefetch misses=%0d", misses); end
    // re-fetch hits without the port
    port_uses = 0; misses = 0;
    for (int i = 0; i < 8; i++) fetch(30'h100 + 30'(i));
    checks++; if (port_uses != 0 || misses != 0) begin failures++; $display("FAIL rehit"); end
    // mode 01: every word misses once, no prefetch
    mode = 2'b01; misses = 0; pfills = 0;
    for (int i = 0; i < 8; i++) fetch(30'h200 + 30'(i));
    checks++; if (misses != 8 || pfills != 0) begin failures++; $display("FAIL mode01 %0d %0d", misses, pfills); end
    // mode 00: cached words are not used, nothing is stored
    mode = 2'b00; misses = 0;
    for (int i = 0; i < 4; i++) fetch(30'h100 + 30'(i));
    for (int i = 0; i < 4; i++) fetch(30'h100 + 30'(i));
    checks++; if (misses != 8) begin failures++; $display("FAIL mode00 %0d", misses); end
    // ignored prefetch stops the prefetcher
    mode = 2'b10; ignore_pref = 1; pfills = 0; misses = 0;
    // the re-fetch of 0x300 hits, so the prefetcher runs ahead to 0x301, is
    // ignored and stops; 0x301 is then a demand miss that restarts it
    fetch(30'h300); fetch(30'h300);
    for (int i = 1; i < 4; i++) fetch(30'h300 + 30'(i));
    checks++; if (pfills != 2 || misses != 2) begin failures++; $display("FAIL ignore %0d %0d", pfills, misses); end
    ignore_pref = 0;
    // flush
    flush = 1; @(posedge clk); #1; flush = 0; misses = 0;
    fetch(30'h104);
    checks++; if (misses != 1) begin failures++; $display("FAIL flush"); end
    // conflicting block (same index, other tag) and physical/virtual tags
    misses = 0; fetch(30'h100 + 30'h80 + 30'd4); fetch(30'h104);
    checks++; if (misses < 2) begin failures++; $display("FAIL conflict"); end
    // random program-like stream: loops, branches
    for (int i = 0; i < 3000; i++) begin
      logic [29:0] a;
      a = 30'($urandom_range(0, 400));
      mode = 2'($urandom_range(0, 2));
      if ($urandom_range(0, 50) == 0) phys = ~phys;
      fetch(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sbc: one snooping bus controller against a scripted bus.  The
// testbench grants the bus after a random wait, plays memory and the other
// caches, and drives foreign transactions for the slave side.  Checked:
// the master drives exactly the PCC's command/addresses/block while
// granted, returns the bus read data with one acknowledge per request, a
// pending WriteForInvalidation becomes ReadForOwnership (with the
// conversion flag) when a foreign RFO or WFI for the same block is seen
// while waiting; the slave forwards RS/RFO/WFI as snoop requests, answers
// snoop-done with the PCC's respond flag and block, and answers a foreign
// Write without asking the PCC.
module tb_sbc;
  import spur_pkg::*;
  localparam int BLK_W = 320;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pcc_req, pcc_ack, snp_req, snp_ack, bus_req, bus_gnt, bus_done, s_done, s_respond;
  logic [3+38+32+BLK_W-1:0] pcc_req_code; logic [BLK_W:0] pcc_ack_code; logic [40:0] snp_req_code;
  logic [BLK_W+1:0] snp_ack_code; bus_cmd_e m_cmd, bus_cmd, fcmd; logic [37:0] m_gva, bus_gva; logic [31:0] m_pa;
  logic [BLK_W-1:0] m_block, bus_rblock, s_block, rb;
  int nconv = 0, nsnp = 0;
  sbc dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // PCC model answering snoops after a random delay
  logic [BLK_W+1:0] pend_code; int sdly = -1;
  always @(posedge clk) begin
    snp_ack <= 0;
    if (snp_req) begin
      nsnp++;
      checks++; if (snp_req_code !== {fcmd, bus_gva}) begin failures++; $display("FAIL snoop code"); end
      pend_code = {1'b1, 1'($urandom), BLK_W'({10{32'($urandom)}})}; sdly = $urandom_range(0, 3);
    end else if (sdly == 0) begin snp_ack <= 1; snp_ack_code <= pend_code; sdly = -1; end
    else if (sdly > 0) sdly--;
  end

  // foreign transaction as the bus shows it to this SBC (not granted)
  task automatic foreign(bus_cmd_e c, logic [37:0] g);
    fcmd = c; bus_cmd = c; bus_gva = g;
    if (c == BUS_WRITE) begin
      @(posedge clk); #1; @(posedge clk); #1;
      checks++; if (!s_done || s_respond) begin failures++; $display("FAIL write snoop"); end
    end else begin
      int n = 0;
      while (!s_done && n < 50) begin @(posedge clk); #1; n++; end
      checks++;
      if (!s_done || s_respond !== pend_code[BLK_W] || s_block !== pend_code[BLK_W-1:0]) begin failures++; $display("FAIL snoop done"); end
    end
    bus_cmd = BUS_NONE; @(posedge clk); #1; @(posedge clk); #1;
    checks++; if (s_done) begin failures++; $display("FAIL done not cleared"); end
  endtask

  initial begin
    pcc_req = 0; pcc_req_code = '0; bus_gnt = 0; bus_done = 0; bus_rblock = '0; bus_cmd = BUS_NONE; bus_gva = '0;
    snp_ack_code = '0; fcmd = BUS_NONE;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bus_cmd_e c; logic [37:0] g; logic [31:0] pa; logic [BLK_W-1:0] blk; logic conv_exp;
      c = bus_cmd_e'($urandom_range(1, 4)); g = {6'($urandom), 32'($urandom)} & ~38'h1F; pa = $urandom & ~32'h1F;
      blk = BLK_W'({10{32'($urandom)}});
      if ($urandom_range(0, 3) == 0) foreign(bus_cmd_e'($urandom_range(1, 4)), {6'($urandom), 32'($urandom)});
      // PCC request
      pcc_req = 1; pcc_req_code = {c, g, pa, blk}; @(posedge clk); #1; pcc_req = 0;
      @(posedge clk); #1;
      checks++; if (!bus_req) begin failures++; $display("FAIL no bus request"); end
      conv_exp = 0;
      // while waiting: maybe another master invalidates the same block
      if ($urandom_range(0, 2) == 0) begin
        bus_cmd_e fc; fc = $urandom_range(0, 1) ? BUS_RFO : BUS_WFI;
        if (c == BUS_WFI) conv_exp = 1;
        foreign(fc, g | 38'($urandom_range(0, 31)));
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1; bus_gnt = 1; @(posedge clk); #1;   // the master drives the cycle after the grant
      checks++;
      if (m_cmd !== (conv_exp ? BUS_RFO : c) || m_gva !== g || m_pa !== pa || m_block !== blk) begin
        failures++; $display("FAIL master drive %0d %0d", m_cmd, c); end
      bus_cmd = m_cmd; bus_gva = m_gva;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      rb = BLK_W'({10{32'($urandom)}});
      #1; bus_done = 1; bus_rblock = rb; @(posedge clk); #1; bus_done = 0;
      checks++;
      if (!pcc_ack || pcc_ack_code !== {conv_exp, rb}) begin failures++; $display("FAIL ack"); end
      if (conv_exp) nconv++;
      bus_gnt = 0; bus_cmd = BUS_NONE; @(posedge clk); #1;
      checks++; if (pcc_ack || bus_req) begin failures++; $display("FAIL release"); end
    end
    checks++; if (nconv == 0 || nsnp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spurbus_arb: six masters request the bus at random and hold it for a
// random number of cycles.  Checks one grant at a time, the idle cycle
// between grants, round-robin fairness (no master waits more than NPROC-1
// other tenures), the bus multiplexers, owner data overriding memory, and
// that the transaction completes only when memory and every other node
// have answered.
module tb_spurbus_arb;
  import spur_pkg::*;
  localparam int N = 6, BW = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, s_done, s_respond; bus_cmd_e [N-1:0] m_cmd; logic [N-1:0][37:0] m_gva;
  logic [N-1:0][31:0] m_pa; logic [N-1:0][BW-1:0] m_block, s_block;
  bus_cmd_e bus_cmd; logic [37:0] bus_gva; logic [31:0] bus_pa; logic [BW-1:0] bus_wblock, bus_rblock, mem_rblock;
  logic bus_owner, bus_done, mem_done;
  int hold [N]; int waited [N]; int tenures; logic [N-1:0] gprev;
  spurbus_arb #(.NPROC(N), .BLK_W(BW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    req = 0; s_done = 0; s_respond = 0; mem_done = 0; mem_rblock = 16'hBEEF; gprev = 0;
    for (int i = 0; i < N; i++) begin
      m_cmd[i] = BUS_RS; m_gva[i] = 38'(i + 100); m_pa[i] = 32'(i + 200); m_block[i] = 16'(i + 300); s_block[i] = 16'(i + 400);
      hold[i] = 0; waited[i] = 0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // requesters: request at random, release after their tenure
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin if (hold[i] > 0) hold[i]--; else req[i] = 0; end
        else if (!req[i] && $urandom_range(0, 3) == 0) begin req[i] = 1; hold[i] = $urandom_range(0, 4); waited[i] = 0; end
      end
      mem_done = $urandom_range(0, 1); s_done = N'($urandom); s_respond = '0;
      if (gnt != 0 && $urandom_range(0, 3) == 0) s_respond = N'(1) << $urandom_range(0, N - 1);
      #1;
      checks++;
      if (!$onehot0(gnt)) begin failures++; $display("FAIL two grants"); end
      for (int i = 0; i < N; i++) if (gnt[i]) begin
        checks++;
        if (bus_gva !== m_gva[i] || bus_pa !== m_pa[i] || bus_wblock !== m_block[i] || bus_cmd !== m_cmd[i]) failures++;
        checks++;
        if (bus_done !== (mem_done && ((s_done | gnt) == '1))) begin failures++; $display("FAIL done"); end
        checks++;
        if ((s_respond & ~gnt) != 0) begin
          if (!bus_owner || bus_rblock !== s_block[$clog2(s_respond)]) begin failures++; $display("FAIL owner"); end
        end else if (bus_owner || bus_rblock !== mem_rblock) begin failures++; $display("FAIL mem data"); end
      end
      @(posedge clk); #1;
      // a new grant only after an idle cycle
      if (gnt != 0 && gnt != gprev) begin
        checks++; if (gprev != 0) begin failures++; $display("FAIL no idle cycle"); end
        tenures++;
        for (int i = 0; i < N; i++) if (req[i] && !gnt[i]) begin
          waited[i]++;
          checks++; if (waited[i] > N - 1) begin failures++; $display("FAIL starvation %0d", i); end
        end
      end
      gprev = gnt;
    end
    checks++; if (tenures < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

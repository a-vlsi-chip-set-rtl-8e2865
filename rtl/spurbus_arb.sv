// spurbus_arb: arbiter and signal combination of the shared snooping bus.
//
// Grants the bus to one requesting processor at a time, round robin, and
// keeps the grant while that processor holds its request; after a release
// the bus stays idle for one cycle so that every snooper sees the end of the
// transaction.  The granted master's command, addresses and write block are
// put on the shared bus.  A transaction is done when memory has answered and
// every other processor has signalled snoop done; the read block comes from
// the owning cache if one responded, otherwise from memory.  The document
// does not describe the arbitration; this is a simple stand-in for it.
module spurbus_arb
  import spur_pkg::*;
#(
  parameter int NPROC = 6,
  parameter int BLK_W = 320
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NPROC-1:0]           req,
  output logic [NPROC-1:0]           gnt,
  input  bus_cmd_e [NPROC-1:0]       m_cmd,
  input  logic [NPROC-1:0][37:0]     m_gva,
  input  logic [NPROC-1:0][31:0]     m_pa,
  input  logic [NPROC-1:0][BLK_W-1:0] m_block,
  input  logic [NPROC-1:0]           s_done,
  input  logic [NPROC-1:0]           s_respond,
  input  logic [NPROC-1:0][BLK_W-1:0] s_block,
  // shared bus
  output bus_cmd_e                   bus_cmd,
  output logic [37:0]                bus_gva,
  output logic [31:0]                bus_pa,
  output logic [BLK_W-1:0]           bus_wblock,
  output logic                       bus_owner,   // a cache supplies the data
  output logic                       bus_done,
  output logic [BLK_W-1:0]           bus_rblock,
  // memory
  input  logic                       mem_done,
  input  logic [BLK_W-1:0]           mem_rblock
);
  localparam int IW = (NPROC > 1) ? $clog2(NPROC) : 1;
  logic [IW-1:0] last;

  always_comb begin
    bus_cmd    = BUS_NONE;
    bus_gva    = '0;
    bus_pa     = '0;
    bus_wblock = '0;
    bus_owner  = 1'b0;
    bus_rblock = mem_rblock;
    for (int i = 0; i < NPROC; i++) begin
      if (gnt[i]) begin
        bus_cmd    = m_cmd[i];
        bus_gva    = m_gva[i];
        bus_pa     = m_pa[i];
        bus_wblock = m_block[i];
      end
      if (s_respond[i] && !gnt[i]) begin
        bus_owner  = 1'b1;
        bus_rblock = s_block[i];
      end
    end
    bus_done = (bus_cmd != BUS_NONE) && mem_done && ((s_done | gnt) == '1);
  end

  // round-robin choice: first requester after the last one granted
  logic          found;
  logic [IW-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = NPROC; k >= 1; k--) begin
      if (req[(int'(last) + k) % NPROC]) begin
        found = 1'b1;
        pick  = IW'((int'(last) + k) % NPROC);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(NPROC - 1);
    end else if (gnt != '0) begin
      if ((gnt & req) == '0) gnt <= '0;
    end else if (found) begin
      gnt  <= NPROC'(1) << pick;
      last <= pick;
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule

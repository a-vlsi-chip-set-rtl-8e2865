// sbc: snooping bus controller of the MMU/CC (bus clock domain).
//
// Master side: takes a request from the PCC (through the asynchronous
// channel), arbitrates for the bus, drives the transaction - ReadShared,
// ReadForOwnership, Write (write-back or flush) or WriteForInvalidation -
// with its 38-bit global virtual address, 32-bit physical address and, for a
// write, the block; waits until memory and every other cache have answered,
// and returns the block read (from memory or from the owning cache) to the
// PCC with a one-cycle acknowledge.  If, while it waits for the bus, another
// master's ReadForOwnership or WriteForInvalidation takes away the block this
// SBC wants to invalidate, its pending WriteForInvalidation is turned into a
// ReadForOwnership and the acknowledge says so (the block is no longer held
// locally, so it must be fetched).
// Slave side: for every other master's RS, RFO or WFI it asks the PCC to
// look up and update the local block (snoop channel), then signals snoop
// done and, as owner, supplies the block, overriding memory.  Write
// transactions need no snoop.
// The division into master and slave controllers follows the document's
// master/slave/virtmach/physrec PLAs in spirit; the bus signalling is a
// simplified request/grant bus of this design, not NuBus/SpurBus timing.
module sbc
  import spur_pkg::*;
#(
  parameter int BLOCK_WORDS = 8,
  localparam int BLK_W  = BLOCK_WORDS * 40,
  localparam int OFF_B  = $clog2(BLOCK_WORDS * 4),
  localparam int REQ_W  = 3 + 38 + 32 + BLK_W,
  localparam int ACK_W  = 1 + BLK_W,
  localparam int SREQ_W = 3 + 38,
  localparam int SACK_W = 2 + BLK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // from / to the PCC request channel
  input  logic              pcc_req,
  input  logic [REQ_W-1:0]  pcc_req_code,
  output logic              pcc_ack,
  output logic [ACK_W-1:0]  pcc_ack_code,
  // to / from the PCC snoop channel
  output logic              snp_req,
  output logic [SREQ_W-1:0] snp_req_code,
  input  logic              snp_ack,
  input  logic [SACK_W-1:0] snp_ack_code,
  // bus master
  output logic              bus_req,
  input  logic              bus_gnt,
  output bus_cmd_e          m_cmd,
  output logic [37:0]       m_gva,
  output logic [31:0]       m_pa,
  output logic [BLK_W-1:0]  m_block,
  input  logic              bus_done,
  input  logic [BLK_W-1:0]  bus_rblock,
  // bus slave (snooper)
  input  bus_cmd_e          bus_cmd,
  input  logic [37:0]       bus_gva,
  output logic              s_done,
  output logic              s_respond,
  output logic [BLK_W-1:0]  s_block
);
  typedef enum logic [1:0] { M_IDLE, M_ARB, M_XFER, M_REL } m_state_e;
  typedef enum logic [1:0] { SL_IDLE, SL_WAIT, SL_DONE } s_state_e;

  m_state_e        ms;
  s_state_e        ss;
  bus_cmd_e        q_cmd;
  logic [37:0]     q_gva;
  logic [31:0]     q_pa;
  logic [BLK_W-1:0] q_block;
  logic            q_conv;
  logic            foreign, snoop_hit_mine;

  assign foreign        = (bus_cmd != BUS_NONE) && !bus_gnt;
  assign snoop_hit_mine = foreign && (bus_cmd == BUS_RFO || bus_cmd == BUS_WFI) &&
                          bus_gva[37:OFF_B] == q_gva[37:OFF_B];

  // master
  assign bus_req = (ms == M_ARB) || (ms == M_XFER);
  assign m_cmd   = (ms == M_XFER && bus_gnt) ? q_cmd : BUS_NONE;
  assign m_gva   = q_gva;
  assign m_pa    = q_pa;
  assign m_block = q_block;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ms <= M_IDLE; q_cmd <= BUS_NONE; q_gva <= '0; q_pa <= '0; q_block <= '0;
      q_conv <= 1'b0; pcc_ack <= 1'b0; pcc_ack_code <= '0;
    end else begin
      pcc_ack <= 1'b0;
      unique case (ms)
        M_IDLE: if (pcc_req) begin
          {q_cmd, q_gva, q_pa, q_block} <= pcc_req_code;
          q_conv <= 1'b0;
          ms     <= M_ARB;
        end
        M_ARB: begin
          if (q_cmd == BUS_WFI && snoop_hit_mine) begin
            q_cmd  <= BUS_RFO;
            q_conv <= 1'b1;
          end
          if (bus_gnt) ms <= M_XFER;
        end
        M_XFER: if (bus_done) begin
          pcc_ack      <= 1'b1;
          pcc_ack_code <= {q_conv, bus_rblock};
          ms           <= M_REL;
        end
        default: ms <= M_IDLE;     // M_REL: request dropped for one cycle
      endcase
    end
  end

  // slave
  assign snp_req_code = {bus_cmd, bus_gva};
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ss <= SL_IDLE; snp_req <= 1'b0; s_done <= 1'b0; s_respond <= 1'b0; s_block <= '0;
    end else begin
      snp_req <= 1'b0;
      unique case (ss)
        SL_IDLE: if (foreign) begin
          if (bus_cmd == BUS_WRITE) begin
            s_done <= 1'b1; s_respond <= 1'b0; ss <= SL_DONE;
          end else begin
            snp_req <= 1'b1; ss <= SL_WAIT;
          end
        end
        SL_WAIT: if (snp_ack) begin
          s_done    <= 1'b1;
          s_respond <= snp_ack_code[SACK_W-2];
          s_block   <= snp_ack_code[BLK_W-1:0];
          ss        <= SL_DONE;
        end
        default: if (bus_cmd == BUS_NONE) begin
          s_done <= 1'b0; s_respond <= 1'b0; ss <= SL_IDLE;
        end
      endcase
    end
  end
endmodule

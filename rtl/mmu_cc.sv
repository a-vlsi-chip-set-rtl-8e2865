// mmu_cc: memory management unit and cache controller of one processor.
//
// Two controllers run side by side: the processor cache controller
// (pcc_sequencer, processor clock clk_p) serves the CPU's references with
// in-cache address translation (mmu_xlate_dp), and the snooping bus
// controller (sbc, bus clock clk_b) runs bus transactions and snoops other
// processors' transactions for the Berkeley Ownership protocol.  The two
// clocks are unrelated; they talk through two asynchronous channels
// (async_channel): PCC requests with SBC acknowledges, and SBC snoop
// requests with PCC acknowledges.  Performance counters, an interval timer
// and an interrupt controller share the translation registers' register
// port (physical-mode CPU accesses to 0xFFFFF000-0xFFFFFFFF; offsets 0x00-0x1C
// translation, 0x40-0x5C counters, 0x80-0x88 timer, 0xC0-0xC4 interrupts).
// The processor's 128 KB cache RAMs (cache_ram), separate chips on the
// board, are instantiated here so that the block is self-contained.
// Event lines 0-15 of the counters come from the PCC (see pcc_sequencer),
// 16 is the timer, 17 the CPU interrupt line; the rest read as zero.
module mmu_cc
  import spur_pkg::*;
#(
  parameter int CACHE_BYTES = 131072,
  parameter int BLOCK_WORDS = 8,
  localparam int BLK_W = BLOCK_WORDS * 40
) (
  input  logic             clk_p,
  input  logic             clk_b,
  input  logic             rst_n,
  // CPU interface
  input  cache_op_e        cpu_op,
  input  logic [1:0]       cpu_mode,
  input  logic [31:0]      cpu_addr,
  input  word40_t          cpu_wdata,
  output word40_t          cpu_rdata,
  output logic             cpu_busy,
  output logic             cpu_ignored,
  output logic             cpu_fault,
  output logic             cpu_intr,
  input  logic [6:0]       ext_irq,
  // bus
  output logic             bus_req,
  input  logic             bus_gnt,
  output bus_cmd_e         m_cmd,
  output logic [37:0]      m_gva,
  output logic [31:0]      m_pa,
  output logic [BLK_W-1:0] m_block,
  input  logic             bus_done,
  input  logic [BLK_W-1:0] bus_rblock,
  input  bus_cmd_e         bus_cmd,
  input  logic [37:0]      bus_gva,
  output logic             s_done,
  output logic             s_respond,
  output logic [BLK_W-1:0] s_block
);
  localparam int OFF_B  = $clog2(BLOCK_WORDS * 4);
  localparam int LINES  = CACHE_BYTES / (BLOCK_WORDS * 4);
  localparam int IDX_W  = $clog2(LINES);
  localparam int TAG_W  = 38 - IDX_W - OFF_B;
  localparam int PBLK_W = 32 - OFF_B;
  localparam int WOFF_W = $clog2(BLOCK_WORDS);
  localparam int REQ_W  = 3 + 38 + 32 + BLK_W;
  localparam int ACK_W  = 1 + BLK_W;
  localparam int SREQ_W = 3 + 38;
  localparam int SACK_W = 2 + BLK_W;

  // translation datapath
  logic [31:0] xl_va, xl_pte_word, xl_pa_rpte, xl_pa_pte, xl_pa_data;
  logic [37:0] xl_gva, xl_va_pte, xl_va_rpte;
  // registers
  logic        reg_we;
  logic [7:0]  reg_addr;
  logic [31:0] reg_wdata, rd_xl, rd_pc, rd_tm, rd_ic, reg_rdata;
  // cache RAM
  logic [IDX_W-1:0]  ram_idx;
  logic [WOFF_W-1:0] ram_word;
  logic [TAG_W-1:0]  ram_tag, ram_wtag;
  coh_state_e        ram_state, ram_wstate;
  logic [PBLK_W-1:0] ram_pblk, ram_wpblk;
  word40_t           ram_data, ram_wword;
  logic [BLK_W-1:0]  ram_block, ram_wblock;
  logic              ram_meta_we, ram_word_we, ram_blk_we;
  // channels
  logic              p_req, p_ack, b_req, b_ack;
  logic [REQ_W-1:0]  p_req_code, b_req_code;
  logic [ACK_W-1:0]  p_ack_code, b_ack_code;
  logic              sn_req_b, sn_req_p, sn_ack_p, sn_ack_b;
  logic [SREQ_W-1:0] sn_req_code_b, sn_req_code_p;
  logic [SACK_W-1:0] sn_ack_code_p, sn_ack_code_b;
  // misc
  logic [15:0] pcc_events;
  logic        timer_exp;

  pcc_sequencer #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_WORDS(BLOCK_WORDS)) u_pcc (
    .clk (clk_p), .rst_n,
    .cpu_op, .cpu_mode, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_busy, .cpu_ignored, .cpu_fault,
    .xl_va, .xl_pte_word, .xl_gva, .xl_va_pte, .xl_va_rpte, .xl_pa_rpte, .xl_pa_pte, .xl_pa_data,
    .ram_idx, .ram_word, .ram_tag, .ram_state, .ram_pblk, .ram_data, .ram_block,
    .ram_meta_we, .ram_wtag, .ram_wstate, .ram_wpblk, .ram_word_we, .ram_wword,
    .ram_blk_we, .ram_wblock,
    .sbc_req (p_req), .sbc_req_code (p_req_code), .sbc_ack (p_ack), .sbc_ack_code (p_ack_code),
    .snp_req (sn_req_p), .snp_req_code (sn_req_code_p), .snp_ack (sn_ack_p), .snp_ack_code (sn_ack_code_p),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .events (pcc_events)
  );

  mmu_xlate_dp u_xl (
    .clk (clk_p), .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata (rd_xl),
    .va (xl_va), .pte_word (xl_pte_word), .gva (xl_gva), .va_pte (xl_va_pte),
    .va_rpte (xl_va_rpte), .pa_rpte (xl_pa_rpte), .pa_pte (xl_pa_pte), .pa_data (xl_pa_data)
  );

  cache_ram #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_WORDS(BLOCK_WORDS)) u_ram (
    .clk (clk_p), .rst_n, .idx (ram_idx), .word (ram_word),
    .rd_tag (ram_tag), .rd_state (ram_state), .rd_pblk (ram_pblk), .rd_data (ram_data),
    .rd_block (ram_block), .meta_we (ram_meta_we), .wr_tag (ram_wtag), .wr_state (ram_wstate),
    .wr_pblk (ram_wpblk), .word_we (ram_word_we), .wr_word (ram_wword),
    .blk_we (ram_blk_we), .wr_block (ram_wblock)
  );

  // PCC -> SBC requests, SBC -> PCC acknowledges
  async_channel #(.REQ_W(REQ_W), .ACK_W(ACK_W)) u_ch_req (
    .rst_n,
    .clk_s (clk_p), .req_in (p_req), .req_code_in (p_req_code), .ack_out (p_ack), .ack_code_out (p_ack_code),
    .clk_r (clk_b), .req_out (b_req), .req_code_out (b_req_code), .ack_in (b_ack), .ack_code_in (b_ack_code)
  );
  // SBC -> PCC snoop requests, PCC -> SBC acknowledges
  async_channel #(.REQ_W(SREQ_W), .ACK_W(SACK_W)) u_ch_snp (
    .rst_n,
    .clk_s (clk_b), .req_in (sn_req_b), .req_code_in (sn_req_code_b), .ack_out (sn_ack_b), .ack_code_out (sn_ack_code_b),
    .clk_r (clk_p), .req_out (sn_req_p), .req_code_out (sn_req_code_p), .ack_in (sn_ack_p), .ack_code_in (sn_ack_code_p)
  );

  sbc #(.BLOCK_WORDS(BLOCK_WORDS)) u_sbc (
    .clk (clk_b), .rst_n,
    .pcc_req (b_req), .pcc_req_code (b_req_code), .pcc_ack (b_ack), .pcc_ack_code (b_ack_code),
    .snp_req (sn_req_b), .snp_req_code (sn_req_code_b), .snp_ack (sn_ack_b), .snp_ack_code (sn_ack_code_b),
    .bus_req, .bus_gnt, .m_cmd, .m_gva, .m_pa, .m_block, .bus_done, .bus_rblock,
    .bus_cmd, .bus_gva, .s_done, .s_respond, .s_block
  );

  perf_counters #(.NCNT(4), .NEVENTS(32)) u_perf (
    .clk (clk_p), .rst_n, .events ({14'd0, cpu_intr, timer_exp, pcc_events}),
    .kernel (cpu_mode[1]), .reg_we, .reg_addr, .reg_wdata, .reg_rdata (rd_pc)
  );

  interval_timer u_timer (
    .clk (clk_p), .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata (rd_tm), .expired (timer_exp)
  );

  intr_ctrl #(.NSRC(8)) u_intr (
    .clk (clk_p), .rst_n, .src ({ext_irq, timer_exp}), .reg_we, .reg_addr, .reg_wdata,
    .reg_rdata (rd_ic), .intr (cpu_intr)
  );

  always_comb begin
    unique casez (reg_addr)
      8'b000?_????: reg_rdata = rd_xl;
      8'b01??_????: reg_rdata = rd_pc;
      8'b10??_????: reg_rdata = rd_tm;
      8'b11??_????: reg_rdata = rd_ic;
      default:      reg_rdata = '0;
    endcase
  end
endmodule

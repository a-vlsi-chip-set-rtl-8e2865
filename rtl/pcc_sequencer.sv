// pcc_sequencer: the processor cache controller (PCC) of the MMU/CC.
//
// Serves the CPU's references to the virtually addressed, virtually tagged
// external cache.  A CPU reference is looked up in the cycle it is presented
// (idle state): a hit on a block in a suitable coherency state is answered at
// once with busy low.  Otherwise busy stays high while the sequencer works
// through the in-cache translation of the document:
//   1. the cache is read at VA(PTE); a hit gives the physical address of the
//      data and the block is fetched over the bus;
//   2. on a PTE miss the cache is read at VA(RPTE); a hit gives PA(PTE) and
//      the PTE's block is fetched (into the cache, which acts as the TLB),
//      after which step 1 is repeated;
//   3. on an RPTE miss PA(RPTE) is formed from the physical root-page-table
//      base and the RPTE's block is fetched, after which step 2 is repeated.
// This recursion is run as a push-down automaton: the current state is the
// top of a 4-entry stack (pcc_stack); going one level deeper pushes, and a
// completed fetch pops back to the level that asked for it, which now hits.
// Bus work (ReadShared, ReadForOwnership, WriteForInvalidation, write-back of
// an owned victim, flush) is handed to the snooping bus controller through
// the asynchronous request channel, and the sequencer waits for the
// acknowledge.  While waiting, or when idle, a snoop request from the SBC is
// served by pushing the snoop state on top of the current one: the block is
// looked up, its state updated by the Berkeley Ownership rules (coh_state),
// and the answer (hit, owner must respond, block data) returned.
// Physical-mode references skip translation; their cache tag is the physical
// address under the all-ones segment (this design's choice).  Physical-mode
// reads and writes to 0xFFFFF000-0xFFFFFFFF reach the MMU/CC's own registers.
// PTE/RPTE bit 0 is taken as a valid bit; an invalid entry ends the reference
// with 'fault' (the document does not describe protection or faults).
module pcc_sequencer
  import spur_pkg::*;
#(
  parameter int CACHE_BYTES = 131072,
  parameter int BLOCK_WORDS = 8,
  localparam int OFF_B  = $clog2(BLOCK_WORDS * 4),
  localparam int LINES  = CACHE_BYTES / (BLOCK_WORDS * 4),
  localparam int IDX_W  = $clog2(LINES),
  localparam int TAG_W  = 38 - IDX_W - OFF_B,
  localparam int PBLK_W = 32 - OFF_B,
  localparam int WOFF_W = $clog2(BLOCK_WORDS),
  localparam int BLK_W  = BLOCK_WORDS * 40,
  localparam int REQ_W  = 3 + 38 + 32 + BLK_W,
  localparam int ACK_W  = 1 + BLK_W,
  localparam int SREQ_W = 3 + 38,
  localparam int SACK_W = 2 + BLK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU
  input  cache_op_e         cpu_op,
  input  logic [1:0]        cpu_mode,     // {kernel, physical}
  input  logic [31:0]       cpu_addr,
  input  word40_t           cpu_wdata,
  output word40_t           cpu_rdata,
  output logic              cpu_busy,
  output logic              cpu_ignored,
  output logic              cpu_fault,
  // translation datapath
  output logic [31:0]       xl_va,
  output logic [31:0]       xl_pte_word,
  input  logic [37:0]       xl_gva,
  input  logic [37:0]       xl_va_pte,
  input  logic [37:0]       xl_va_rpte,
  input  logic [31:0]       xl_pa_rpte,
  input  logic [31:0]       xl_pa_pte,
  input  logic [31:0]       xl_pa_data,
  // cache RAMs
  output logic [IDX_W-1:0]  ram_idx,
  output logic [WOFF_W-1:0] ram_word,
  input  logic [TAG_W-1:0]  ram_tag,
  input  coh_state_e        ram_state,
  input  logic [PBLK_W-1:0] ram_pblk,
  input  word40_t           ram_data,
  input  logic [BLK_W-1:0]  ram_block,
  output logic              ram_meta_we,
  output logic [TAG_W-1:0]  ram_wtag,
  output coh_state_e        ram_wstate,
  output logic [PBLK_W-1:0] ram_wpblk,
  output logic              ram_word_we,
  output word40_t           ram_wword,
  output logic              ram_blk_we,
  output logic [BLK_W-1:0]  ram_wblock,
  // request channel to the SBC (PCC is the sender)
  output logic              sbc_req,
  output logic [REQ_W-1:0]  sbc_req_code,
  input  logic              sbc_ack,
  input  logic [ACK_W-1:0]  sbc_ack_code,
  // snoop channel from the SBC (PCC is the receiver)
  input  logic              snp_req,
  input  logic [SREQ_W-1:0] snp_req_code,
  output logic              snp_ack,
  output logic [SACK_W-1:0] snp_ack_code,
  // register port to the datapath registers
  output logic              reg_we,
  output logic [7:0]        reg_addr,
  output logic [31:0]       reg_wdata,
  input  logic [31:0]       reg_rdata,
  // event lines for the performance counters
  output logic [15:0]       events
);
  typedef enum logic [2:0] {
    S_IDLE = 3'd0, S_XL_PTE = 3'd1, S_XL_RPTE = 3'd2, S_FILL = 3'd3,
    S_WB_WAIT = 3'd4, S_FILL_WAIT = 3'd5, S_SNOOP = 3'd6
  } pcc_state_e;

  localparam logic [2:0] ST_NONE = 3'd0, ST_PUSH = 3'd1, ST_POP = 3'd2,
                         ST_REPL = 3'd3, ST_FLUSH = 3'd4;

  logic [2:0]  st_op, st_tos;
  pcc_state_e  st_din, state;
  logic [2:0]  st_depth;

  pcc_stack #(.DEPTH(4), .W(3)) u_stack (
    .clk, .rst_n, .op (st_op), .din (st_din), .tos (st_tos), .depth (st_depth)
  );
  assign state = pcc_state_e'(st_tos);

  // registers
  logic [37:0] d_gva;          // data block wanted by the CPU reference
  bus_cmd_e    d_cmd;
  logic [37:0] fill_gva;
  logic [31:0] fill_pa;
  bus_cmd_e    fill_cmd;
  logic        ack_pend, sreq_pend, fault_pend;
  logic [37:0] snp_gva;
  bus_cmd_e    snp_cmd;

  // next values
  logic        set_d, set_fill, set_fault, clr_fault, clr_ack, clr_sreq;
  logic [37:0] n_d_gva, n_fill_gva;
  bus_cmd_e    n_d_cmd, n_fill_cmd;
  logic [31:0] n_fill_pa;

  logic        phys, hit, regacc, conv;
  logic [37:0] cpu_gva, look_gva;
  proc_req_e   preq;
  coh_state_e  cur, p_next, s_next;
  bus_cmd_e    p_bus;
  logic        s_respond;
  logic [BLK_W-1:0] ack_block;

  assign phys      = cpu_mode[0];
  assign xl_va     = cpu_addr;
  assign xl_pte_word = ram_data.data;
  assign cpu_gva   = phys ? {6'h3F, cpu_addr} : xl_gva;
  assign regacc    = phys && cpu_addr[31:12] == 20'hFFFFF &&
                     (cpu_op == CO_READ || cpu_op == CO_WRITE);
  assign {conv, ack_block} = sbc_ack_code;

  always_comb begin
    unique case (cpu_op)
      CO_WRITE, CO_FPWRITE: preq = PR_WRITE;
      CO_READPRIV:          preq = PR_READPRIV;
      CO_FLUSH:             preq = PR_FLUSH;
      default:              preq = PR_READ;
    endcase
  end

  coh_state u_coh (
    .cur, .preq, .p_next, .p_bus,
    .scmd (snp_cmd), .s_next, .s_respond
  );

  always_comb begin
    // defaults
    st_op = ST_NONE; st_din = S_IDLE;
    set_d = 1'b0; set_fill = 1'b0; set_fault = 1'b0; clr_fault = 1'b0;
    clr_ack = 1'b0; clr_sreq = 1'b0;
    n_d_gva = d_gva; n_d_cmd = d_cmd;
    n_fill_gva = fill_gva; n_fill_cmd = fill_cmd; n_fill_pa = fill_pa;
    cpu_rdata   = ram_data;
    cpu_busy    = (cpu_op != CO_NONE) && (cpu_op != CO_PREFETCH);
    cpu_ignored = (cpu_op == CO_PREFETCH);
    cpu_fault   = 1'b0;
    ram_meta_we = 1'b0; ram_word_we = 1'b0; ram_blk_we = 1'b0;
    ram_wtag    = ram_tag; ram_wstate = ram_state; ram_wpblk = ram_pblk;
    ram_wword   = cpu_wdata; ram_wblock = ack_block;
    sbc_req     = 1'b0;
    sbc_req_code = {BUS_NONE, fill_gva, fill_pa, ram_block};
    snp_ack     = 1'b0;
    snp_ack_code = '0;
    reg_we      = 1'b0;
    reg_addr    = cpu_addr[7:0];
    reg_wdata   = cpu_wdata.data;
    events      = '0;
    look_gva    = cpu_gva;
    unique case (state)
      S_XL_PTE:    look_gva = xl_va_pte;
      S_XL_RPTE:   look_gva = xl_va_rpte;
      S_SNOOP:     look_gva = snp_gva;
      S_FILL, S_WB_WAIT, S_FILL_WAIT: look_gva = fill_gva;
      default:     look_gva = cpu_gva;
    endcase
    ram_idx  = look_gva[OFF_B +: IDX_W];
    ram_word = look_gva[2 +: WOFF_W];
    hit      = (ram_state != CS_INVALID) && (ram_tag == look_gva[37 -: TAG_W]);
    cur      = hit ? ram_state : CS_INVALID;

    unique case (state)
      S_IDLE: begin
        if (sreq_pend) begin
          st_op = ST_PUSH; st_din = S_SNOOP;
        end else if (cpu_op != CO_NONE) begin
          if (fault_pend) begin
            cpu_busy = 1'b0; cpu_ignored = 1'b0; cpu_fault = 1'b1; clr_fault = 1'b1;
          end else if (regacc) begin
            cpu_busy  = 1'b0;
            reg_we    = (cpu_op == CO_WRITE);
            cpu_rdata = word40_t'({8'h00, reg_rdata});
          end else if (cpu_op == CO_PREFETCH) begin
            cpu_ignored = !hit;
            events[3]   = hit;
          end else if (p_bus == BUS_NONE) begin
            cpu_busy = 1'b0;
            if (preq == PR_WRITE && hit) ram_word_we = 1'b1;
            if (preq == PR_FLUSH && hit) begin ram_meta_we = 1'b1; ram_wstate = p_next; end
            events[0] = (cpu_op == CO_READ || cpu_op == CO_FPREAD);
            events[1] = (preq == PR_WRITE);
            events[2] = (cpu_op == CO_IFETCH);
          end else begin
            // bus work needed
            set_d   = 1'b1;
            n_d_gva = cpu_gva;
            n_d_cmd = p_bus;
            events[4] = (preq == PR_READ && cpu_op != CO_IFETCH);
            events[5] = (preq != PR_READ);
            events[6] = (cpu_op == CO_IFETCH);
            if (p_bus == BUS_WFI || p_bus == BUS_WRITE) begin
              set_fill = 1'b1; n_fill_gva = cpu_gva; n_fill_cmd = p_bus;
              n_fill_pa = {ram_pblk, OFF_B'(0)};
              st_op = ST_PUSH; st_din = S_FILL;
            end else if (phys) begin
              set_fill = 1'b1; n_fill_gva = cpu_gva; n_fill_cmd = p_bus; n_fill_pa = cpu_addr;
              st_op = ST_PUSH; st_din = S_FILL;
            end else begin
              st_op = ST_PUSH; st_din = S_XL_PTE;
            end
          end
        end
      end
      S_XL_PTE: begin
        if (hit) begin
          if (ram_data.data[0]) begin
            set_fill = 1'b1; n_fill_gva = d_gva; n_fill_cmd = d_cmd; n_fill_pa = xl_pa_data;
            st_op = ST_REPL; st_din = S_FILL;
          end else begin
            set_fault = 1'b1; st_op = ST_FLUSH;
          end
        end else begin
          events[7] = 1'b1;
          st_op = ST_PUSH; st_din = S_XL_RPTE;
        end
      end
      S_XL_RPTE: begin
        set_fill = 1'b1; n_fill_cmd = BUS_RS;
        if (hit) begin
          if (ram_data.data[0]) begin
            n_fill_gva = xl_va_pte; n_fill_pa = xl_pa_pte;
            st_op = ST_REPL; st_din = S_FILL;
          end else begin
            set_fill = 1'b0; set_fault = 1'b1; st_op = ST_FLUSH;
          end
        end else begin
          events[8] = 1'b1;
          n_fill_gva = xl_va_rpte; n_fill_pa = xl_pa_rpte;
          st_op = ST_PUSH; st_din = S_FILL;
        end
      end
      S_FILL: begin
        sbc_req = 1'b1;
        if ((fill_cmd == BUS_RS || fill_cmd == BUS_RFO) &&
            (ram_state == CS_OWNSHARED || ram_state == CS_OWNPRIVATE) &&
            ram_tag != fill_gva[37 -: TAG_W]) begin
          sbc_req_code = {BUS_WRITE, ram_tag, fill_gva[OFF_B +: IDX_W], OFF_B'(0),
                          ram_pblk, OFF_B'(0), ram_block};
          st_op = ST_REPL; st_din = S_WB_WAIT;
          events[12] = 1'b1;
        end else begin
          sbc_req_code = {fill_cmd, fill_gva, fill_pa, ram_block};
          st_op = ST_REPL; st_din = S_FILL_WAIT;
          events[9]  = (fill_cmd == BUS_RS);
          events[10] = (fill_cmd == BUS_RFO);
          events[11] = (fill_cmd == BUS_WFI);
          events[12] = (fill_cmd == BUS_WRITE);
        end
      end
      S_WB_WAIT: begin
        events[15] = 1'b1;
        if (sreq_pend) begin
          st_op = ST_PUSH; st_din = S_SNOOP;
        end else if (ack_pend) begin
          clr_ack = 1'b1;
          ram_meta_we = 1'b1; ram_wstate = CS_INVALID;
          st_op = ST_REPL; st_din = S_FILL;
        end
      end
      S_FILL_WAIT: begin
        events[15] = 1'b1;
        if (sreq_pend) begin
          st_op = ST_PUSH; st_din = S_SNOOP;
        end else if (ack_pend) begin
          clr_ack = 1'b1;
          st_op   = ST_POP;
          if (fill_cmd == BUS_WRITE) begin
            ram_meta_we = 1'b1; ram_wstate = CS_INVALID;
          end else if (fill_cmd == BUS_WFI && !conv) begin
            if (hit) begin ram_meta_we = 1'b1; ram_wstate = CS_OWNPRIVATE; end
          end else begin
            ram_blk_we  = 1'b1;
            ram_meta_we = 1'b1;
            ram_wtag    = fill_gva[37 -: TAG_W];
            ram_wpblk   = fill_pa[31:OFF_B];
            ram_wstate  = (fill_cmd == BUS_RS) ? CS_UNOWNED : CS_OWNPRIVATE;
          end
        end
      end
      S_SNOOP: begin
        clr_sreq = 1'b1;
        st_op    = ST_POP;
        snp_ack  = 1'b1;
        snp_ack_code = {hit, hit && s_respond, ram_block};
        if (hit && s_next != ram_state) begin ram_meta_we = 1'b1; ram_wstate = s_next; end
        events[13] = 1'b1;
        events[14] = hit && s_respond;
      end
      default: st_op = ST_FLUSH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_gva <= '0; d_cmd <= BUS_NONE;
      fill_gva <= '0; fill_pa <= '0; fill_cmd <= BUS_NONE;
      ack_pend <= 1'b0; sreq_pend <= 1'b0; fault_pend <= 1'b0;
      snp_gva <= '0; snp_cmd <= BUS_NONE;
    end else begin
      if (set_d) begin d_gva <= n_d_gva; d_cmd <= n_d_cmd; end
      if (set_fill) begin fill_gva <= n_fill_gva; fill_pa <= n_fill_pa; fill_cmd <= n_fill_cmd; end
      if (set_fault) fault_pend <= 1'b1;
      else if (clr_fault) fault_pend <= 1'b0;
      if (sbc_ack) ack_pend <= 1'b1;
      else if (clr_ack) ack_pend <= 1'b0;
      if (snp_req) begin
        sreq_pend <= 1'b1;
        {snp_cmd, snp_gva} <= snp_req_code;
      end else if (clr_sreq) sreq_pend <= 1'b0;
    end
  end
endmodule

// spur_iu: instruction unit - 512-byte on-chip instruction cache with
// per-word valid bits, a demand-fetch controller and a prefetch controller.
//
// Organisation (document): 16 blocks of 8 instruction words, direct mapped;
// a 33-bit data word (the 32-bit instruction and its own valid bit, so any
// subset of a block may be valid) and a 24-bit tag per block.  The tag here
// is the 23 word-address bits above the 7 index/offset bits plus the
// physical/virtual mode bit.
//
// Fetch: the EU presents a word address every cycle.  A hit returns the
// instruction combinationally.  On a miss the IU asks for the single missing
// word on the external cache port (only when the EU is not using it for a
// data reference) and keeps asking while the MMU/CC answers busy; the word is
// returned to the EU in the cycle it arrives and written into the cache.
// Prefetch: after a demand miss is filled, in prefetch mode, the prefetch
// controller requests the following words of the same block, one per cycle,
// whenever the port is free.  It stops at the end of the block, on the next
// demand miss (which restarts it), when the MMU/CC ignores a prefetch that
// misses in the external cache, or when an EU data reference takes the port.
// When the EU asks for the very word the prefetcher is loading, that fetch is
// the prefetch (counted as a prefetch, not a demand miss), so a sequential run
// through a block costs one demand miss; a prefetch that got ahead while the
// EU was stalled turns later fetches into plain hits.
// Modes (two KPSW bits): 00 disabled (every fetch goes outside, nothing is
// cached), 01 cache without prefetch, 1x cache with prefetch; the encoding is
// this design's.
module spur_iu #(
  parameter int BLOCKS = 16,
  parameter int WORDS  = 8,
  parameter int TAG_W  = 24,
  parameter int DATA_W = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  mode,
  input  logic        phys,        // physical addressing (part of the tag)
  input  logic        flush,       // invalidate every word
  // EU side
  input  logic [29:0] pc,
  output logic [31:0] instr,
  output logic        instr_valid,
  // external cache port (through spur_cc_if)
  output logic        ext_req,
  output logic        ext_pref,
  output logic [29:0] ext_waddr,
  input  logic        ext_gnt,
  input  logic [31:0] ext_rdata,
  input  logic        ext_busy,
  input  logic        ext_ignored,
  // status, for observation and performance counting
  output logic        demand_miss,
  output logic        pf_fill
);
  localparam int IDX_W = $clog2(BLOCKS);
  localparam int OFF_W = $clog2(WORDS);

  logic [DATA_W-1:0] data_arr [BLOCKS*WORDS];
  logic [TAG_W-1:0]  tag_arr  [BLOCKS];

  typedef enum logic { PF_IDLE, PF_RUN } pf_state_e;
  pf_state_e        pf_state;
  logic [29:0]      pf_addr;

  logic [IDX_W-1:0] idx;
  logic [OFF_W-1:0] off;
  logic [TAG_W-1:0] tag;
  logic             enabled, tag_hit, hit, fill, pf_go;
  logic [IDX_W-1:0] pf_idx;
  logic [TAG_W-1:0] pf_tag;

  assign enabled = (mode != 2'b00);
  assign idx     = pc[OFF_W +: IDX_W];
  assign off     = pc[OFF_W-1:0];
  assign tag     = TAG_W'({phys, pc[29:OFF_W+IDX_W]});
  assign tag_hit = (tag_arr[idx] == tag);
  assign hit     = enabled && tag_hit && data_arr[{idx, off}][DATA_W-1];
  assign pf_idx  = pf_addr[OFF_W +: IDX_W];
  assign pf_tag  = TAG_W'({phys, pf_addr[29:OFF_W+IDX_W]});

  always_comb begin
    ext_req     = 1'b0;
    ext_pref    = 1'b0;
    ext_waddr   = pc;
    instr       = data_arr[{idx, off}][31:0];
    instr_valid = hit;
    demand_miss = 1'b0;
    fill        = 1'b0;
    pf_go       = 1'b0;
    if (!hit) begin
      ext_req     = 1'b1;
      instr       = ext_rdata;
      instr_valid = ext_gnt && !ext_busy;
      fill        = enabled && instr_valid;
      // a fetch of the word the prefetcher is about to load is that prefetch
      // (not ignorable, since the EU needs it); anything else is a demand miss
      if (pf_state == PF_RUN && pc == pf_addr && mode[1]) pf_go = instr_valid;
      else                                                 demand_miss = 1'b1;
    end else if (pf_state == PF_RUN && tag_arr[pf_idx] == pf_tag) begin
      ext_req   = 1'b1;
      ext_pref  = 1'b1;
      ext_waddr = pf_addr;
      pf_go     = ext_gnt && !ext_busy && !ext_ignored;
    end
  end
  assign pf_fill = pf_go;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pf_state <= PF_IDLE;
      pf_addr  <= '0;
      for (int i = 0; i < BLOCKS*WORDS; i++) data_arr[i] <= '0;
      for (int i = 0; i < BLOCKS; i++) tag_arr[i] <= '0;
    end else if (flush) begin
      pf_state <= PF_IDLE;
      for (int i = 0; i < BLOCKS*WORDS; i++) data_arr[i][DATA_W-1] <= 1'b0;
    end else begin
      if (fill) begin
        if (!tag_hit) begin
          tag_arr[idx] <= tag;
          for (int w = 0; w < WORDS; w++) data_arr[{idx, OFF_W'(w)}][DATA_W-1] <= 1'b0;
        end
        data_arr[{idx, off}] <= {1'b1, ext_rdata};
        // a demand miss (re)starts the prefetcher at the next word
        if (mode[1] && off != OFF_W'(WORDS-1)) begin
          pf_state <= PF_RUN;
          pf_addr  <= pc + 30'd1;
        end else begin
          pf_state <= PF_IDLE;
        end
      end else if (pf_state == PF_RUN) begin
        if (ext_req && ext_pref) begin
          if (pf_go) begin
            data_arr[{pf_idx, pf_addr[OFF_W-1:0]}] <= {1'b1, ext_rdata};
            if (pf_addr[OFF_W-1:0] == OFF_W'(WORDS-1)) pf_state <= PF_IDLE;
            else pf_addr <= pf_addr + 30'd1;
          end else begin
            // ignored by the MMU/CC, or the port was taken by a data reference
            pf_state <= PF_IDLE;
          end
        end else if (hit && tag_arr[pf_idx] != pf_tag) begin
          pf_state <= PF_IDLE;
        end
      end
    end
  end
endmodule

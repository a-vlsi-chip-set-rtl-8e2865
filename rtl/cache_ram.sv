// cache_ram: the processor's external cache RAMs (tag/state and data).
//
// Direct-mapped, CACHE_BYTES of data (128 KB by default, the document's
// size) in blocks of BLOCK_WORDS tagged 40-bit words; each word carries 32
// data bits, so the line count is CACHE_BYTES / (4 * BLOCK_WORDS).  Each line
// keeps the global-virtual-address tag, the 2-bit coherency state and the
// physical block address (used to write the block back and to fetch it).
// One combinational read port returns the line's tag, state, physical block
// address, the addressed word and the whole block; three synchronous write
// enables update the line information, one word, or the whole block.  States
// reset to Invalid; data and tags need no reset.  Block size and the line
// contents are this design's choices.
module cache_ram
  import spur_pkg::*;
#(
  parameter int CACHE_BYTES = 131072,
  parameter int BLOCK_WORDS = 8,
  localparam int OFF_B  = $clog2(BLOCK_WORDS * 4),
  localparam int LINES  = CACHE_BYTES / (BLOCK_WORDS * 4),
  localparam int IDX_W  = $clog2(LINES),
  localparam int TAG_W  = 38 - IDX_W - OFF_B,
  localparam int PBLK_W = 32 - OFF_B,
  localparam int WOFF_W = $clog2(BLOCK_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [IDX_W-1:0]         idx,
  input  logic [WOFF_W-1:0]        word,
  output logic [TAG_W-1:0]         rd_tag,
  output coh_state_e               rd_state,
  output logic [PBLK_W-1:0]        rd_pblk,
  output word40_t                  rd_data,
  output logic [BLOCK_WORDS*40-1:0] rd_block,
  input  logic                     meta_we,
  input  logic [TAG_W-1:0]         wr_tag,
  input  coh_state_e               wr_state,
  input  logic [PBLK_W-1:0]        wr_pblk,
  input  logic                     word_we,
  input  word40_t                  wr_word,
  input  logic                     blk_we,
  input  logic [BLOCK_WORDS*40-1:0] wr_block
);
  logic [TAG_W-1:0]  tags   [LINES];
  logic [LINES-1:0][1:0] states;   // packed so that reset is one assignment
  logic [PBLK_W-1:0] pblks  [LINES];
  word40_t           data   [LINES*BLOCK_WORDS];

  assign rd_tag   = tags[idx];
  assign rd_state = coh_state_e'(states[idx]);
  assign rd_pblk  = pblks[idx];
  assign rd_data  = data[{idx, word}];
  always_comb
    for (int w = 0; w < BLOCK_WORDS; w++)
      rd_block[w*40 +: 40] = data[{idx, WOFF_W'(w)}];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      states <= '0;                 // every line INVALID
    end else if (meta_we) begin
      states[idx] <= wr_state;
    end
  end

  always_ff @(posedge clk) begin
    if (meta_we) begin
      tags[idx]  <= wr_tag;
      pblks[idx] <= wr_pblk;
    end
    if (blk_we)
      for (int w = 0; w < BLOCK_WORDS; w++)
        data[{idx, WOFF_W'(w)}] <= wr_block[w*40 +: 40];
    else if (word_we)
      data[{idx, word}] <= wr_word;
  end
endmodule

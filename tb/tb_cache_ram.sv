// tb_cache_ram: full-size cache array.  Checks that reset leaves every line
// INVALID, then random metadata, word and block writes against a sparse
// model of the touched lines.
module tb_cache_ram;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [11:0] idx; logic [2:0] word; logic [20:0] rd_tag, wr_tag; coh_state_e rd_state, wr_state;
  logic [26:0] rd_pblk, wr_pblk; word40_t rd_data, wr_word; logic [319:0] rd_block, wr_block;
  logic meta_we, word_we, blk_we;
  logic [319:0] mblk [int]; logic [20:0] mtag [int]; coh_state_e mst [int]; logic [26:0] mpb [int];
  cache_ram dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    idx = 0; word = 0; {meta_we, word_we, blk_we} = 0; wr_tag = 0; wr_state = CS_INVALID; wr_pblk = 0; wr_word = '0; wr_block = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 4096; i += 97) begin idx = 12'(i); #1; checks++; if (rd_state !== CS_INVALID) failures++; end
    // give every line of the test set a known block and metadata
    for (int a = 0; a < 64; a++) for (int b = 0; b < 2; b++) begin
      int k; k = a * 64 + b; idx = 12'(k);
      meta_we = 1; blk_we = 1; wr_tag = 21'($urandom); wr_state = CS_UNOWNED; wr_pblk = 27'(k);
      for (int w = 0; w < 8; w++) wr_block[w*40 +: 40] = {8'($urandom), 32'($urandom)};
      @(posedge clk); #1;
      mblk[k] = wr_block; mtag[k] = wr_tag; mst[k] = wr_state;
    end
    {meta_we, blk_we} = 0;
    for (int t = 0; t < 4000; t++) begin
      int k;
      idx = 12'($urandom_range(0, 63) * 64 + $urandom_range(0, 1)); word = 3'($urandom); k = idx;
      meta_we = $urandom_range(0, 1); blk_we = $urandom_range(0, 3) == 0; word_we = !blk_we && $urandom_range(0, 1);
      wr_tag = 21'($urandom); wr_state = coh_state_e'($urandom_range(0, 3)); wr_pblk = 27'($urandom);
      wr_word = {8'($urandom), 32'($urandom)};
      for (int w = 0; w < 8; w++) wr_block[w*40 +: 40] = {8'($urandom), 32'($urandom)};
      @(posedge clk); #1;
      if (meta_we) begin mtag[k] = wr_tag; mst[k] = wr_state; end
      if (meta_we) mpb[k] = wr_pblk; else if (!mpb.exists(k)) mpb[k] = 27'(k);
      if (blk_we) mblk[k] = wr_block; else if (word_we) mblk[k][word*40 +: 40] = wr_word;
      {meta_we, word_we, blk_we} = 0; #1;
      checks++;
      if (rd_state !== mst[k] || rd_tag !== mtag[k] || rd_pblk !== mpb[k]) begin failures++; $display("FAIL meta %0d", k); end
      checks++;
      if (rd_block !== mblk[k] || rd_data !== mblk[k][word*40 +: 40]) begin failures++; $display("FAIL data %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

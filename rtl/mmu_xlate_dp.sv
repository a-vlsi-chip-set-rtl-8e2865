// mmu_xlate_dp: address translation datapath of the MMU/CC.
//
// Registers: four 8-bit global segment numbers, the page-table base
// (virtual, 10 bits), the root-page-table base (virtual, 20 bits) and the
// root-page-table base (physical, 20 bits), written through a small register
// port.  Shifters form, combinationally:
//   GVA      = {seg[VA[31:30]], VA[29:0]}                    (38 bits)
//   VA(PTE)  = {PTbase, seg, VPN[17:0], 2'b00}               (first reference)
//   VA(RPTE) = {RPTbase_v, seg, VPN[17:10], 2'b00}           (second)
//   PA(RPTE) = {RPTbase_p, 2'b00, VPN[17:10], 2'b00}         (when that misses)
//   PA(PTE)  = {RPTE[31:12], VPN[9:0], 2'b00}
//   PA(data) = {PTE[31:12], offset[11:0]}
// Field widths follow the document's address-mapping figure; the two zero
// bits in PA(RPTE) (a 10-bit field fed by an 8-bit one) are this design's
// reading.  Register addresses (reg_addr) are this design's: 0x00-0x0C
// segments, 0x10 PT base, 0x14 RPT base virtual, 0x18 RPT base physical.
module mmu_xlate_dp (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic [31:0] va,
  input  logic [31:0] pte_word,    // PTE or RPTE read from the cache or memory
  output logic [37:0] gva,
  output logic [37:0] va_pte,
  output logic [37:0] va_rpte,
  output logic [31:0] pa_rpte,
  output logic [31:0] pa_pte,
  output logic [31:0] pa_data
);
  logic [7:0]  seg [4];
  logic [9:0]  pt_base;
  logic [19:0] rpt_base_v, rpt_base_p;
  logic [7:0]  s;
  logic [17:0] vpn;

  assign s       = seg[va[31:30]];
  assign vpn     = va[29:12];
  assign gva     = {s, va[29:0]};
  assign va_pte  = {pt_base, s, vpn, 2'b00};
  assign va_rpte = {rpt_base_v, s, vpn[17:10], 2'b00};
  assign pa_rpte = {rpt_base_p, 2'b00, vpn[17:10], 2'b00};
  assign pa_pte  = {pte_word[31:12], vpn[9:0], 2'b00};
  assign pa_data = {pte_word[31:12], va[11:0]};

  always_comb begin
    unique case (reg_addr)
      8'h00:   reg_rdata = {24'd0, seg[0]};
      8'h04:   reg_rdata = {24'd0, seg[1]};
      8'h08:   reg_rdata = {24'd0, seg[2]};
      8'h0C:   reg_rdata = {24'd0, seg[3]};
      8'h10:   reg_rdata = {22'd0, pt_base};
      8'h14:   reg_rdata = {12'd0, rpt_base_v};
      8'h18:   reg_rdata = {12'd0, rpt_base_p};
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) seg[i] <= '0;
      pt_base    <= '0;
      rpt_base_v <= '0;
      rpt_base_p <= '0;
    end else if (reg_we) begin
      unique case (reg_addr)
        8'h00: seg[0] <= reg_wdata[7:0];
        8'h04: seg[1] <= reg_wdata[7:0];
        8'h08: seg[2] <= reg_wdata[7:0];
        8'h0C: seg[3] <= reg_wdata[7:0];
        8'h10: pt_base    <= reg_wdata[9:0];
        8'h14: rpt_base_v <= reg_wdata[19:0];
        8'h18: rpt_base_p <= reg_wdata[19:0];
        default: ;
      endcase
    end
  end
endmodule

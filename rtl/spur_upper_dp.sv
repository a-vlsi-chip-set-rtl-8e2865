// spur_upper_dp: upper (30-bit) data path of the execution unit.
//
// Holds the special registers - kernel and user processor status words
// (KPSW, UPSW), current and saved window pointers (CWP, SWP), trap base
// register, saved trap PC, saved KPSW and trap type - and the two address
// units: the 30-bit address adder that forms compare-and-branch targets
// (word PC + sign-extended 9-bit offset) in parallel with the ALU compare, and
// the incrementer for the next sequential word address.  CALL advances CWP,
// RET moves it back; a call that would reach SWP raises window overflow and
// a return from the SWP window raises underflow.  A trap saves the PC and
// KPSW, enters kernel mode and disables traps; RETT restores the KPSW.
// Registers change only when 'en' is high (the pipeline is not frozen).  The
// register set follows the document's block diagram; numbering, bit layout
// and reset values are this design's.
module spur_upper_dp
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // address units
  input  logic [29:0] pc_ex,
  input  logic [8:0]  br_off,
  output logic [29:0] br_target,
  input  logic [29:0] pc_if,
  output logic [29:0] pc_inc,
  // window control from the instruction in Execute
  input  logic        call,
  input  logic        ret,
  output logic        wovf,
  output logic        wunf,
  // special register access
  input  logic [3:0]  sr_idx,
  output logic [31:0] sr_rdata,
  input  logic        sr_we,
  input  logic [3:0]  sr_widx,
  input  logic [31:0] sr_wdata,
  // traps
  input  logic        trap,
  input  trap_e       trap_type,
  input  logic [29:0] trap_pc,
  input  logic        rett,
  // state
  output logic [9:0]  kpsw,
  output logic [9:0]  upsw,
  output logic [2:0]  cwp,
  output logic [2:0]  swp,
  output logic [31:0] tbr
);
  logic [29:0] tpc;
  logic [9:0]  skpsw;
  trap_e       ttype_q;

  assign br_target = pc_ex + {{21{br_off[8]}}, br_off};
  assign pc_inc    = pc_if + 30'd1;
  assign wovf      = call && ((cwp + 3'd1) == swp);
  assign wunf      = ret  && (cwp == swp);

  always_comb begin
    unique case (sr_idx)
      SR_KPSW:  sr_rdata = {22'd0, kpsw};
      SR_UPSW:  sr_rdata = {22'd0, upsw};
      SR_CWP:   sr_rdata = {29'd0, cwp};
      SR_SWP:   sr_rdata = {29'd0, swp};
      SR_TBR:   sr_rdata = tbr;
      SR_TPC:   sr_rdata = {tpc, 2'b00};
      SR_SKPSW: sr_rdata = {22'd0, skpsw};
      SR_TTYPE: sr_rdata = {28'd0, ttype_q};
      default:  sr_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kpsw    <= 10'd0 | (10'd1 << PSW_KERN);
      upsw    <= '0;
      cwp     <= '0;
      swp     <= 3'd7;
      tbr     <= '0;
      tpc     <= '0;
      skpsw   <= '0;
      ttype_q <= TT_NONE;
    end else if (en) begin
      if (trap) begin
        tpc     <= trap_pc;
        skpsw   <= kpsw;
        ttype_q <= trap_type;
        kpsw[PSW_ET]   <= 1'b0;
        kpsw[PSW_KERN] <= 1'b1;
      end else begin
        if (call && !wovf) cwp <= cwp + 3'd1;
        if (ret  && !wunf) cwp <= cwp - 3'd1;
        if (rett) kpsw <= skpsw;
        if (sr_we) begin
          unique case (sr_widx)
            SR_KPSW:  kpsw  <= sr_wdata[9:0];
            SR_UPSW:  upsw  <= sr_wdata[9:0];
            SR_CWP:   cwp   <= sr_wdata[2:0];
            SR_SWP:   swp   <= sr_wdata[2:0];
            SR_TBR:   tbr   <= sr_wdata;
            SR_TPC:   tpc   <= sr_wdata[31:2];
            SR_SKPSW: skpsw <= sr_wdata[9:0];
            default: ;
          endcase
        end
      end
    end
  end
endmodule

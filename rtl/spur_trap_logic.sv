// spur_trap_logic: trap detection and prioritisation in the third pipeline
// stage.
//
// Unusual conditions detected while an instruction moved through Execute
// (illegal opcode, window overflow/underflow, tag and generation checks,
// integer overflow) travel with it; in its third stage (Mem Acc) they are
// combined with the external conditions - a fault reported by the MMU/CC for
// this reference, an FPU exception, an interrupt - masked by the PSW enable
// bits, and the highest-priority one is taken.  Only one instruction is in
// that stage, so at most one trap is taken per cycle.  The vector is the trap
// base register concatenated with the trap type.  The priority order, type
// codes and vector layout are this design's; the stage, the source groups
// and the base||type vector are the document's.  Combinational.
module spur_trap_logic
  import spur_pkg::*;
(
  input  logic        valid,      // a real instruction is in stage 3
  input  logic        illegal,
  input  logic        wovf,
  input  logic        wunf,
  input  logic        tag_exc,
  input  logic        gen_exc,
  input  logic        ovf_exc,
  input  logic        fault,      // from the MMU/CC for this reference
  input  logic        fpu_exc,
  input  logic        intr,       // external interrupt request (level)
  input  logic [9:0]  kpsw,
  input  logic [9:0]  upsw,
  input  logic [31:0] tbr,
  output logic        take,
  output trap_e       ttype,
  output logic [31:0] vector
);
  logic et;
  always_comb begin
    et    = kpsw[PSW_ET];
    ttype = TT_NONE;
    if (et) begin
      if (valid && fault)                          ttype = TT_FAULT;
      else if (valid && illegal)                   ttype = TT_ILLEGAL;
      else if (fpu_exc)                            ttype = TT_FPU;
      else if (valid && wovf)                      ttype = TT_WOVF;
      else if (valid && wunf)                      ttype = TT_WUNF;
      else if (valid && tag_exc && upsw[PSW_TAGE]) ttype = TT_TAG;
      else if (valid && gen_exc && upsw[PSW_GENE]) ttype = TT_GEN;
      else if (valid && ovf_exc && upsw[PSW_OVFE]) ttype = TT_OVF;
      else if (valid && intr && kpsw[PSW_IE])      ttype = TT_INTR;
    end
    take   = (ttype != TT_NONE);
    vector = {tbr[31:8], ttype, 4'b0000};
  end
endmodule

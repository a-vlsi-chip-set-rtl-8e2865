// spur_fwd: internal forwarding between the three instructions that can be
// in flight between Execute and Write.
//
// The result of an instruction stays in temporary registers for two cycles
// (Destination Register 1, then Destination Register 2) before it reaches
// the register file.  Each source row of the instruction in Execute is
// compared with the destination rows of the two preceding instructions - four
// comparisons - and a match replaces the register-file value with the
// temporary register.  Both operands may be forwarded at once (double
// internal forwarding).  The nearer instruction wins when both match.
// Comparison on physical rows rather than on register numbers is this
// design's choice so that window changes between the instructions are
// handled.  Combinational.
module spur_fwd
  import spur_pkg::*;
(
  input  logic [RIDX_W-1:0] row1,
  input  logic [RIDX_W-1:0] row2,
  input  word40_t           rf1,
  input  word40_t           rf2,
  input  logic              d1_we,    // preceding instruction writes
  input  logic [RIDX_W-1:0] d1_row,
  input  word40_t           d1_val,   // Destination Register 1
  input  logic              d2_we,    // instruction before that writes
  input  logic [RIDX_W-1:0] d2_row,
  input  word40_t           d2_val,   // Destination Register 2
  output word40_t           op1,
  output word40_t           op2,
  output logic [1:0]        fwd1,     // 0 file, 1 from D1, 2 from D2
  output logic [1:0]        fwd2
);
  always_comb begin
    fwd1 = (d1_we && d1_row == row1) ? 2'd1 : (d2_we && d2_row == row1) ? 2'd2 : 2'd0;
    fwd2 = (d1_we && d1_row == row2) ? 2'd1 : (d2_we && d2_row == row2) ? 2'd2 : 2'd0;
    op1  = (fwd1 == 2'd1) ? d1_val : (fwd1 == 2'd2) ? d2_val : rf1;
    op2  = (fwd2 == 2'd1) ? d1_val : (fwd2 == 2'd2) ? d2_val : rf2;
  end
endmodule

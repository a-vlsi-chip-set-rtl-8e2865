// spur_branch_cond: condition evaluation for single-cycle compare-and-branch.
//
// The ALU subtracts the two operands; this block turns the flags into a
// taken/not-taken decision for the Cond field.  The tag-immediate format
// compares the 6-bit type tag of Rs1 with the tag immediate instead.
// Condition encodings are this design's (spur_pkg::cond_e).  Combinational.
module spur_branch_cond
  import spur_pkg::*;
(
  input  cond_e      cond,
  input  logic       z, n, v, c,   // flags of Rs1 - src2
  input  logic [5:0] tag_a,
  input  logic [5:0] tag_imm,
  output logic       taken
);
  always_comb begin
    unique case (cond)
      C_EQ:     taken = z;
      C_NE:     taken = !z;
      C_LT:     taken = n ^ v;
      C_LE:     taken = (n ^ v) || z;
      C_GT:     taken = !((n ^ v) || z);
      C_GE:     taken = !(n ^ v);
      C_LTU:    taken = !c;
      C_GEU:    taken = c;
      C_ALWAYS: taken = 1'b1;
      C_TEQ:    taken = (tag_a == tag_imm);
      C_TNE:    taken = (tag_a != tag_imm);
      default:  taken = 1'b0;
    endcase
  end
endmodule

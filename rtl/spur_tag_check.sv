// spur_tag_check: run-time LISP tag checks of the upper 8 bit slices.
//
// Checked in parallel with the data operation, as the document describes:
//  - data type check: both operands of a tagged add/subtract must carry the
//    fixnum type tag;
//  - pointer type check: the base register of a list load must carry the
//    cons type tag;
//  - generation check on ST40: storing an object of a higher (younger)
//    generation number into an object of a lower one raises an exception.
// Each result is raised only when the matching enable bit of the PSW is set.
// The tag values of fixnum (0) and cons (1) are this design's.  Combinational.
module spur_tag_check
  import spur_pkg::*;
(
  input  word40_t a,          // Rs1 operand
  input  word40_t b,          // Rs2 operand
  input  logic    tag_chk,
  input  logic    ptr_chk,
  input  logic    gen_chk,
  input  logic    tag_en,     // UPSW tag trap enable
  input  logic    gen_en,     // UPSW generation trap enable
  output logic    tag_trap,
  output logic    gen_trap
);
  always_comb begin
    tag_trap = tag_en && ((tag_chk && (a.typ != TAG_FIXNUM || b.typ != TAG_FIXNUM)) ||
                          (ptr_chk && a.typ != TAG_CONS));
    gen_trap = gen_en && gen_chk && (b.gen > a.gen);
  end
endmodule

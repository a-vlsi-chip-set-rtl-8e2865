// spur_shifter: the lower data path's simple shifter.
//
// Shifts a 32-bit operand by 0 to 3 bit positions, left, right logical or
// right arithmetic.  The three-bit limit is the document's; the choice of
// directions is this design's.  Combinational.
module spur_shifter
  import spur_pkg::*;
(
  input  shift_op_e   op,
  input  logic [1:0]  amt,
  input  logic [31:0] a,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      SH_LL:   y = a << amt;
      SH_RL:   y = a >> amt;
      SH_RA:   y = $unsigned($signed(a) >>> amt);
      default: y = a;
    endcase
  end
endmodule

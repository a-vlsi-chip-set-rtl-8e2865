// spur_alu: 32-bit ALU of the lower data path.
//
// Performs ADD, SUBTRACT, AND, OR and XOR on two 32-bit operands and
// produces the compare flags (zero, negative, signed overflow, carry) used by
// compare-and-branch and by the overflow trap.  The operation set follows the
// document; the flag set and the PASSB function (used to move an operand
// unchanged, e.g. for loads of special registers) are this design's choice.
// The carry-lookahead structure of the chip (four 8-bit groups) is left to
// synthesis.  Purely combinational.
module spur_alu
  import spur_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        z,   // result is zero
  output logic        n,   // result negative
  output logic        v,   // signed overflow of add/sub
  output logic        c    // carry out of add, "no borrow" of subtract
);
  logic [32:0] sum;
  always_comb begin
    sum = '0;
    v   = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        v   = (a[31] == b[31]) && (sum[31] != a[31]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + 33'd1;
        v   = (a[31] != b[31]) && (sum[31] != a[31]);
      end
      ALU_AND:   sum = {1'b0, a & b};
      ALU_OR:    sum = {1'b0, a | b};
      ALU_XOR:   sum = {1'b0, a ^ b};
      default:   sum = {1'b0, b};
    endcase
    y = sum[31:0];
    c = sum[32];
    z = (y == 32'd0);
    n = y[31];
  end
endmodule

// tb_spur_branch_cond: drives the branch condition unit with flags produced
// by a reference subtraction of random operands and compares each condition
// with a signed/unsigned comparison done directly on the operands.
module tb_spur_branch_cond;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  cond_e cond; logic z, n, v, c, taken, e; logic [5:0] tag_a, tag_imm;
  logic [31:0] x, y, d;
  spur_branch_cond dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = (i % 3 == 0) ? 32'($urandom_range(0, 3)) : $urandom;
      y = (i % 3 == 0) ? 32'($urandom_range(0, 3)) : $urandom;
      d = x - y;
      z = (d == 0); n = d[31]; c = (x >= y);
      v = (x[31] != y[31]) && (d[31] != x[31]);
      tag_a = 6'($urandom_range(0, 2)); tag_imm = 6'($urandom_range(0, 2));
      cond = cond_e'($urandom_range(0, 11)); #1;
      case (cond)
        C_EQ: e = x == y;  C_NE: e = x != y;
        C_LT: e = $signed(x) <  $signed(y); C_LE: e = $signed(x) <= $signed(y);
        C_GT: e = $signed(x) >  $signed(y); C_GE: e = $signed(x) >= $signed(y);
        C_LTU: e = x < y; C_GEU: e = x >= y; C_ALWAYS: e = 1;
        C_TEQ: e = tag_a == tag_imm; C_TNE: e = tag_a != tag_imm;
        default: e = 0;
      endcase
      checks++;
      if (taken !== e) begin failures++; $display("FAIL cond=%0d x=%h y=%h", cond, x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

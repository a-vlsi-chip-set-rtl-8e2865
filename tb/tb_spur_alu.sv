// tb_spur_alu: random and corner-case check of the ALU result and flags
// against an independent reference computed in the testbench.
module tb_spur_alu;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op; logic [31:0] a, b, y; logic z, n, v, c;
  spur_alu dut (.op, .a, .b, .y, .z, .n, .v, .c);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic one(alu_op_e o, logic [31:0] x, logic [31:0] w);
    logic [31:0] ey; logic ev, ec; longint s;
    op = o; a = x; b = w; #1;
    ev = 0; ec = 0;
    case (o)
      ALU_ADD: begin s = longint'(x) + longint'(w); ey = s[31:0]; ec = s[32];
                     ev = (64'($signed(x)) + 64'($signed(w))) != 64'($signed(ey)); end
      ALU_SUB: begin ey = x - w; ec = (x >= w); ev = (64'($signed(x)) - 64'($signed(w))) != 64'($signed(ey)); end
      ALU_AND: ey = x & w;
      ALU_OR:  ey = x | w;
      ALU_XOR: ey = x ^ w;
      default: ey = w;
    endcase
    checks++;
    if (y !== ey || z !== (ey == 0) || n !== ey[31] ||
        ((o == ALU_ADD || o == ALU_SUB) && (v !== ev || c !== ec))) begin
      failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp %h v=%b/%b c=%b/%b", o, x, w, y, ey, v, ev, c, ec);
    end
  endtask
  initial begin
    one(ALU_ADD, 32'h7fffffff, 32'd1);
    one(ALU_SUB, 32'h80000000, 32'd1);
    one(ALU_SUB, 32'd5, 32'd5);
    one(ALU_ADD, 32'hffffffff, 32'd1);
    for (int i = 0; i < 2000; i++) one(alu_op_e'($urandom_range(0, 5)), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

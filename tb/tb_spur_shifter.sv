// tb_spur_shifter: checks every direction and amount 0-3 on random operands.
module tb_spur_shifter;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  shift_op_e op; logic [1:0] amt; logic [31:0] a, y, e;
  spur_shifter dut (.op, .amt, .a, .y);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      op = shift_op_e'($urandom_range(0, 3)); amt = 2'($urandom); a = $urandom; #1;
      case (op)
        SH_LL: e = a * (32'd1 << amt);
        SH_RL: e = a / (32'd1 << amt);
        SH_RA: begin e = a; repeat (amt) e = {e[31], e[31:1]}; end
        default: e = a;
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL op=%0d amt=%0d a=%h y=%h e=%h", op, amt, a, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

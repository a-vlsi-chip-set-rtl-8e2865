// tb_spur_fpu_if: checks the 22 instruction pins, the issue/squash controls,
// the stall on a busy FPU and the exception status.
module tb_spur_fpu_if;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr; logic ex_valid, ex_fpu, advance, squash_in, fpu_stall, fpu_exc;
  logic [2:0] fpu_status; logic [21:0] fpu_instr; logic [1:0] fpu_ctl; logic est;
  spur_fpu_if dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      instr = $urandom; {ex_valid, ex_fpu, advance, squash_in} = 4'($urandom); fpu_status = 3'($urandom);
      #1;
      est = ex_valid && ex_fpu && fpu_status[2];
      checks++;
      if (fpu_instr !== {instr[31:15], instr[13:9]} || fpu_stall !== est ||
          fpu_ctl !== {squash_in, ex_valid && ex_fpu && advance && !est} || fpu_exc !== fpu_status[1]) begin
        failures++; $display("FAIL %h", instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

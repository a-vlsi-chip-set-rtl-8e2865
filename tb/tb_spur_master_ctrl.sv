// tb_spur_master_ctrl: decodes one instruction of each kind and checks the
// main control fields, the FPU enable rule (illegal when disabled, no-op
// except load/store when enabled) and illegal opcodes.
module tb_spur_master_ctrl;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr; logic ivalid, fpu_en; ctrl_t ctl;
  spur_master_ctrl dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b", what, got); end
  endtask
  function automatic logic [31:0] rrr(opcode_e o); return {o, 5'd3, 5'd4, 1'b0, 5'd5, 9'd0}; endfunction
  initial begin
    ivalid = 1; fpu_en = 0;
    instr = rrr(OP_ADD); #1;
    chk("add we", ctl.rd_we, 1); chk("add rs2", ctl.use_rs2, 1); chk("add ovf", ctl.ovf_chk, 1);
    chk("add alu", ctl.alu_op == ALU_ADD, 1);
    instr = rrr(OP_SUBT); #1; chk("subt tag", ctl.tag_chk, 1); chk("subt alu", ctl.alu_op == ALU_SUB, 1);
    instr = rrr(OP_LD40) | 32'h4000; #1; chk("ld40 load", ctl.load, 1); chk("ld40 imm", ctl.use_imm, 1);
    chk("ld40 keep", ctl.ld40, 1); chk("ld40 cop", ctl.cop == CO_READ, 1);
    instr = rrr(OP_ST40); #1; chk("st40 store", ctl.store, 1); chk("st40 gen", ctl.gen_chk, 1); chk("st no we", ctl.rd_we, 0);
    instr = rrr(OP_LDCAR); #1; chk("car ptr", ctl.ptr_chk, 1);
    instr = rrr(OP_LDPRIV); #1; chk("ldpriv", ctl.cop == CO_READPRIV, 1);
    instr = rrr(OP_CMPBR); #1; chk("cmpbr", ctl.branch, 1); chk("cmpbr we", ctl.rd_we, 0);
    instr = rrr(OP_CMPBRT); #1; chk("cmpbrt", ctl.tag_br, 1);
    instr = {4'b1110, 28'h123}; #1; chk("call", ctl.call, 1); chk("call we", ctl.rd_we, 1);
    instr = {4'b1111, 28'h123}; #1; chk("jump", ctl.jump, 1); chk("jump we", ctl.rd_we, 0);
    instr = rrr(OP_RET); #1; chk("ret", ctl.ret, 1);
    instr = rrr(OP_SRA); #1; chk("sra", ctl.sh_op == SH_RA, 1);
    instr = rrr(OP_FPOP); #1; chk("fp disabled illegal", ctl.illegal, 1);
    fpu_en = 1; #1; chk("fp enabled noop", ctl.illegal | ctl.load | ctl.store | ctl.rd_we, 0);
    instr = rrr(OP_FPLD); #1; chk("fpld mem", ctl.fpu_mem & ctl.load, 1); chk("fpld no we", ctl.rd_we, 0);
    instr = rrr(OP_FPST); #1; chk("fpst", ctl.cop == CO_FPWRITE, 1);
    instr = {7'h5F, 25'd0}; #1; chk("illegal", ctl.illegal, 1);
    ivalid = 0; instr = rrr(OP_ADD); #1; chk("bubble", ctl.valid | ctl.rd_we, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

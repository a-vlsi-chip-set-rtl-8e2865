// spur_master_ctrl: opcode decoder of the master control.
//
// Turns a 32-bit instruction into the high-level control word (spur_pkg::
// ctrl_t) that the Execute, Memory and Write stages carry along the pipeline,
// standing in for the chip's opcode PLA and fast logic.  Fields follow the
// seven published formats: opcode 31:25 (31:28 for call/jump), Rd/Cond
// 24:20, Rs1 19:15, immediate flag 14, Rs2 13:9, 14-bit immediate 13:0,
// store immediate {24:20, 8:0}, branch offset 8:0.  The opcode values are
// this design's.  FPU instructions are illegal when the FPU is disabled; when
// it is enabled they are no-ops for the CPU except FPU load/store, for which
// the CPU forms the address.  Combinational.
module spur_master_ctrl
  import spur_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        ivalid,     // 0 inserts a bubble (internal "miss")
  input  logic        fpu_en,
  output ctrl_t       ctl
);
  logic [6:0] opc;
  always_comb begin
    opc = instr[31:25];
    ctl = '0;
    ctl.valid   = ivalid;
    ctl.use_imm = instr[14];
    ctl.use_rs1 = 1'b1;
    ctl.use_rs2 = !instr[14];
    ctl.alu_op  = ALU_ADD;
    ctl.sh_op   = SH_NONE;
    ctl.res_sel = RES_ALU;
    ctl.cop     = CO_NONE;
    if (!ivalid) begin
      ctl.use_rs1 = 1'b0;
      ctl.use_rs2 = 1'b0;
    end else if (instr[31:28] == OP4_CALL) begin
      ctl.call = 1'b1; ctl.rd_we = 1'b1; ctl.res_sel = RES_PC;
      ctl.use_rs1 = 1'b0; ctl.use_rs2 = 1'b0;
    end else if (instr[31:28] == OP4_JUMP) begin
      ctl.jump = 1'b1; ctl.use_rs1 = 1'b0; ctl.use_rs2 = 1'b0;
    end else begin
      unique case (opc)
        OP_NOP:  begin ctl.use_rs1 = 1'b0; ctl.use_rs2 = 1'b0; end
        OP_ADD:  begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_ADD; ctl.ovf_chk = 1'b1; end
        OP_SUB:  begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_SUB; ctl.ovf_chk = 1'b1; end
        OP_AND:  begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_AND; end
        OP_OR:   begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_OR;  end
        OP_XOR:  begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_XOR; end
        OP_SLL:  begin ctl.rd_we = 1'b1; ctl.sh_op = SH_LL; ctl.res_sel = RES_SHIFT; end
        OP_SRL:  begin ctl.rd_we = 1'b1; ctl.sh_op = SH_RL; ctl.res_sel = RES_SHIFT; end
        OP_SRA:  begin ctl.rd_we = 1'b1; ctl.sh_op = SH_RA; ctl.res_sel = RES_SHIFT; end
        OP_ADDT: begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_ADD; ctl.tag_chk = 1'b1; ctl.ovf_chk = 1'b1; end
        OP_SUBT: begin ctl.rd_we = 1'b1; ctl.alu_op = ALU_SUB; ctl.tag_chk = 1'b1; ctl.ovf_chk = 1'b1; end
        OP_EXTB: begin ctl.rd_we = 1'b1; ctl.res_sel = RES_EXTB; end
        OP_INSB: begin ctl.rd_we = 1'b1; ctl.res_sel = RES_INSB; end
        OP_RDTAG:begin ctl.rd_we = 1'b1; ctl.res_sel = RES_RDTAG; ctl.use_rs2 = 1'b0; end
        OP_WRTAG:begin ctl.rd_we = 1'b1; ctl.res_sel = RES_WRTAG; end
        OP_LD32: begin ctl.rd_we = 1'b1; ctl.load = 1'b1; ctl.cop = CO_READ; end
        OP_LD40: begin ctl.rd_we = 1'b1; ctl.load = 1'b1; ctl.ld40 = 1'b1; ctl.cop = CO_READ; end
        OP_LDCAR:begin ctl.rd_we = 1'b1; ctl.load = 1'b1; ctl.ld40 = 1'b1; ctl.ptr_chk = 1'b1; ctl.cop = CO_READ; end
        OP_LDPRIV:begin ctl.rd_we = 1'b1; ctl.load = 1'b1; ctl.ld40 = 1'b1; ctl.cop = CO_READPRIV; end
        OP_ST32: begin ctl.store = 1'b1; ctl.use_rs2 = 1'b1; ctl.cop = CO_WRITE; end
        OP_ST40: begin ctl.store = 1'b1; ctl.use_rs2 = 1'b1; ctl.st40 = 1'b1; ctl.gen_chk = 1'b1; ctl.cop = CO_WRITE; end
        OP_FLUSH:begin ctl.store = 1'b1; ctl.cop = CO_FLUSH; ctl.use_rs2 = 1'b0; end
        OP_CMPBR: begin ctl.branch = 1'b1; ctl.alu_op = ALU_SUB; end
        OP_CMPBRT:begin ctl.branch = 1'b1; ctl.tag_br = 1'b1; ctl.use_rs2 = 1'b0; end
        OP_RET:  begin ctl.ret = 1'b1; end
        OP_RETT: begin ctl.rett = 1'b1; end
        OP_RDSR: begin ctl.rd_we = 1'b1; ctl.rdsr = 1'b1; ctl.res_sel = RES_SR; ctl.use_rs1 = 1'b0; end
        OP_WRSR: begin ctl.wrsr = 1'b1; ctl.use_rs2 = 1'b0; end
        OP_FPOP, OP_FPLD, OP_FPST: begin
          ctl.fpu = 1'b1;
          ctl.use_rs2 = 1'b0;
          if (!fpu_en) ctl.illegal = 1'b1;
          else if (opc == OP_FPLD) begin ctl.fpu_mem = 1'b1; ctl.load = 1'b1; ctl.cop = CO_FPREAD; end
          else if (opc == OP_FPST) begin ctl.fpu_mem = 1'b1; ctl.store = 1'b1; ctl.cop = CO_FPWRITE; end
          else ctl.use_rs1 = 1'b0;
        end
        default: begin ctl.illegal = 1'b1; ctl.use_rs1 = 1'b0; ctl.use_rs2 = 1'b0; end
      endcase
    end
  end
endmodule

// spur_cpu: the SPUR CPU - a tagged 40-bit RISC with a four-stage pipeline
// (I-Fetch, Execute, Mem Acc, Write), an on-chip prefetching instruction
// cache, a windowed register file, a coprocessor (FPU) interface and an
// interface to the external MMU/CC.
//
// Pipeline.  I-Fetch reads the instruction unit (spur_iu) at pc_if.  Execute
// decodes (spur_master_ctrl), reads two registers through the window decoder
// (spur_regfile), forwards results of the two previous instructions
// (spur_fwd), and runs the ALU, shifter, byte extractor/inserter and the tag
// checks in parallel; compare-and-branch compares in the ALU while the upper
// data path's adder forms the target, so branches take one cycle.  Branches,
// calls, jumps and returns are delayed by one instruction (the delay slot).
// Mem Acc sends loads and stores to the external cache through spur_cc_if and
// is where traps are taken (spur_trap_logic): the instructions in I-Fetch and
// Execute are annulled and fetch restarts at the vector.  An interrupt is not
// taken on a delay-slot instruction or on RETT (own choice: the trap PC holds
// one address, so these would lose the pending transfer); it is taken one
// instruction later.  Write stores the
// result in the register file.  A result waits in two temporary registers
// (D1 in Mem Acc, D2 in Write) before it is written, which is what the
// forwarding logic reads; load data arrives in Mem Acc and so reaches only
// D2: the instruction after a load must not use its result (one load delay
// slot).  There is no load interlock, as in the document.
//
// Stalls.  While the MMU/CC holds cc_busy for a data reference, or the FPU is
// busy with an FPU instruction in Execute, the whole pipeline is frozen.  An
// instruction-cache miss inserts a bubble (the internal 'miss' instruction)
// into Execute until the word arrives.
//
// Interface timing: cc_op/cc_addr/cc_wdata are valid in the cycle of the
// reference; cc_rdata, cc_busy, cc_ignored and cc_fault answer in the same
// cycle.  A reference is complete in the first cycle with cc_busy low.
// The single rising-edge clock replaces the chip's four-phase clock.
module spur_cpu
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // MMU/CC interface
  output cache_op_e   cc_op,
  output logic [1:0]  cc_mode,
  output logic [31:0] cc_addr,
  output word40_t     cc_wdata,
  input  word40_t     cc_rdata,
  input  logic        cc_busy,
  input  logic        cc_ignored,
  input  logic        cc_fault,
  input  logic        intr,
  // coprocessor interface
  output logic [21:0] fpu_instr,
  output logic [1:0]  fpu_ctl,
  input  logic [2:0]  fpu_status,
  // observation pins
  output logic [8:0]  bus_pc,       // busPC<10:2>
  output logic        iu_miss,
  output logic        iu_prefetch,
  output logic        trap_taken,
  output logic        fwd_double    // both operands forwarded this cycle
);
  // ------------------------------------------------------------ state
  logic [29:0] pc_if;
  logic        br_pend;
  logic [29:0] br_pend_tgt;

  logic [31:0] ex_instr;
  logic        ex_valid;
  logic [29:0] ex_pc;

  logic              mem_valid, mem_load, mem_store, mem_ld40, mem_rd_we, mem_fpu_mem;
  cache_op_e         mem_cop;
  logic [RIDX_W-1:0] mem_row;
  word40_t           mem_result, mem_wdata;
  logic [31:0]       mem_addr;
  logic [29:0]       mem_pc;
  logic              mem_illegal, mem_wovf, mem_wunf, mem_tag, mem_gen, mem_ovf;
  logic              ex_dslot, dslot_pend, mem_noint;  // interrupts wait past delay slots and RETT

  logic              wb_we;
  logic [RIDX_W-1:0] wb_row;
  word40_t           wb_val;

  // ------------------------------------------------------------ wires
  ctrl_t       ctl;
  logic [9:0]  kpsw, upsw;
  logic [2:0]  cwp, swp;
  logic [31:0] tbr, sr_rdata, trap_vec;
  logic [29:0] br_target, pc_inc;
  logic        wovf, wunf, freeze, advance;
  logic        take, take_nf;
  trap_e       ttype, ttype_nf;
  logic [31:0] nf_vec;

  logic [31:0] if_instr;
  logic        if_valid, i_req, i_pref, i_gnt;
  logic [29:0] i_waddr;
  logic        d_req;

  logic [RIDX_W-1:0] row1, row2, wrow_ex;
  word40_t     rf1, rf2, op1, op2, res, extb_y, insb_y;
  logic [1:0]  fwd1, fwd2;
  logic [31:0] imm14, st_imm, sh_imm, src2, alu_b, alu_y, sh_y;
  logic        z, n, v, c, br_taken, tag_trap, gen_trap;
  logic        xfer;          // control transfer in Execute
  logic [29:0] xfer_tgt;
  logic        fpu_stall, fpu_exc;

  // ------------------------------------------------------------ I-Fetch
  spur_iu u_iu (
    .clk, .rst_n,
    .mode       ({kpsw[PSW_IU1], kpsw[PSW_IU0]}),
    .phys       (!kpsw[PSW_VIRT]),
    .flush      (1'b0),
    .pc         (pc_if),
    .instr      (if_instr),
    .instr_valid(if_valid),
    .ext_req    (i_req),
    .ext_pref   (i_pref),
    .ext_waddr  (i_waddr),
    .ext_gnt    (i_gnt),
    .ext_rdata  (cc_rdata.data),
    .ext_busy   (cc_busy),
    .ext_ignored(cc_ignored),
    .demand_miss(iu_miss),
    .pf_fill    (iu_prefetch)
  );
  assign bus_pc = pc_if[8:0];

  // ------------------------------------------------------------ Execute
  spur_master_ctrl u_ctl (.instr(ex_instr), .ivalid(ex_valid), .fpu_en(kpsw[PSW_FPUE]), .ctl);

  spur_regfile u_rf (
    .clk, .rst_n, .cwp,
    .rs1 (ex_instr[19:15]), .rs2 (ex_instr[13:9]),
    .row1, .row2, .rd1 (rf1), .rd2 (rf2),
    .we (wb_we), .wrow (wb_row), .wd (wb_val)
  );

  spur_fwd u_fwd (
    .row1, .row2, .rf1, .rf2,
    .d1_we (mem_valid && mem_rd_we && !mem_load), .d1_row (mem_row), .d1_val (mem_result),
    .d2_we (wb_we), .d2_row (wb_row), .d2_val (wb_val),
    .op1, .op2, .fwd1, .fwd2
  );
  assign fwd_double = ctl.valid && ctl.use_rs1 && ctl.use_rs2 && fwd1 != 2'd0 && fwd2 != 2'd0;

  assign imm14  = {{18{ex_instr[13]}}, ex_instr[13:0]};
  assign st_imm = {{18{ex_instr[24]}}, ex_instr[24:20], ex_instr[8:0]};
  assign sh_imm = {{27{ex_instr[13]}}, ex_instr[13:9]};
  assign src2   = ctl.use_imm ? (ctl.branch ? sh_imm : imm14) : op2.data;
  assign alu_b  = ctl.store ? st_imm : src2;

  spur_alu u_alu (.op (ctl.alu_op), .a (op1.data), .b (alu_b), .y (alu_y), .z, .n, .v, .c);
  spur_shifter u_sh (.op (ctl.sh_op), .amt (src2[1:0]), .a (op1.data), .y (sh_y));
  spur_byte_extract u_ext (.a (op1), .sel (ctl.res_sel == RES_RDTAG ? 3'd4 : {1'b0, src2[1:0]}), .y (extb_y));
  spur_byte_insert u_ins (.a (op1), .b (ctl.res_sel == RES_WRTAG ? src2[7:0] : op2.data[7:0]),
                          .sel (ctl.res_sel == RES_WRTAG ? 3'd4 : ex_instr[2:0]), .y (insb_y));
  spur_tag_check u_tag (.a (op1), .b (op2), .tag_chk (ctl.tag_chk), .ptr_chk (ctl.ptr_chk),
                        .gen_chk (ctl.gen_chk), .tag_en (1'b1), .gen_en (1'b1),
                        .tag_trap, .gen_trap);
  spur_branch_cond u_bc (.cond (cond_e'(ex_instr[24:20])), .z, .n, .v, .c,
                         .tag_a (op1.typ), .tag_imm (ex_instr[14:9]), .taken (br_taken));

  always_comb begin
    res = '0;
    unique case (ctl.res_sel)
      RES_ALU:   begin res = op1; res.data = alu_y; end
      RES_SHIFT: begin res = op1; res.data = sh_y;  end
      RES_EXTB, RES_RDTAG: res = extb_y;
      RES_INSB, RES_WRTAG: res = insb_y;
      RES_SR:    res.data = sr_rdata;
      RES_PC:    res.data = {ex_pc, 2'b00};
      default:   res = op1;
    endcase
    if (ctl.call) wrow_ex = win_map(5'd26, cwp);
    else          wrow_ex = win_map(ex_instr[24:20], cwp);
    xfer     = ctl.valid && ((ctl.branch && br_taken) || ctl.call || ctl.jump || ctl.ret || ctl.rett);
    xfer_tgt = (ctl.call || ctl.jump) ? {ex_pc[29:28], ex_instr[27:0]} :
               (ctl.ret || ctl.rett)  ? alu_y[31:2] : br_target;
  end

  spur_fpu_if u_fpu (
    .instr (ex_instr), .ex_valid (ctl.valid), .ex_fpu (ctl.fpu && !ctl.illegal), .advance,
    .squash_in (take), .fpu_status, .fpu_instr, .fpu_ctl, .fpu_stall, .fpu_exc
  );

  spur_upper_dp u_udp (
    .clk, .rst_n, .en (advance),
    .pc_ex (ex_pc), .br_off (ex_instr[8:0]), .br_target, .pc_if, .pc_inc,
    .call (ctl.valid && ctl.call && !take), .ret (ctl.valid && ctl.ret && !take),
    .wovf, .wunf,
    .sr_idx (src2[3:0]), .sr_rdata,
    .sr_we (ctl.valid && ctl.wrsr && !take), .sr_widx (imm14[3:0]), .sr_wdata (op1.data),
    .trap (take), .trap_type (ttype), .trap_pc (mem_pc),
    .rett (ctl.valid && ctl.rett && !take),
    .kpsw, .upsw, .cwp, .swp, .tbr
  );

  // ------------------------------------------------------------ Mem Acc
  spur_trap_logic u_trap (
    .valid (mem_valid), .illegal (mem_illegal), .wovf (mem_wovf), .wunf (mem_wunf),
    .tag_exc (mem_tag), .gen_exc (mem_gen), .ovf_exc (mem_ovf),
    .fault (cc_fault && d_req), .fpu_exc, .intr (intr && !mem_noint), .kpsw, .upsw, .tbr,
    .take, .ttype, .vector (trap_vec)
  );
  // the same conditions without the MMU/CC fault decide whether the
  // reference goes out at all
  spur_trap_logic u_trap_nf (
    .valid (mem_valid), .illegal (mem_illegal), .wovf (mem_wovf), .wunf (mem_wunf),
    .tag_exc (mem_tag), .gen_exc (mem_gen), .ovf_exc (mem_ovf),
    .fault (1'b0), .fpu_exc, .intr (intr && !mem_noint), .kpsw, .upsw, .tbr,
    .take (take_nf), .ttype (ttype_nf), .vector (nf_vec)
  );
  assign trap_taken = take && advance;

  assign d_req = mem_valid && (mem_load || mem_store) && !take_nf;

  spur_cc_if u_ccif (
    .d_req, .d_op (mem_cop), .d_addr (mem_addr), .d_wdata (mem_wdata),
    .i_req, .i_pref, .i_waddr, .i_gnt,
    .kernel (kpsw[PSW_KERN]), .virt (kpsw[PSW_VIRT]),
    .cc_op, .cc_mode, .cc_addr, .cc_wdata
  );

  assign freeze  = (d_req && cc_busy) || fpu_stall;
  assign advance = !freeze;

  // ------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_if       <= '0;
      br_pend     <= 1'b0;
      br_pend_tgt <= '0;
      ex_instr    <= '0;
      ex_valid    <= 1'b0;
      ex_pc       <= '0;
      mem_valid   <= 1'b0;
      mem_load    <= 1'b0;
      mem_store   <= 1'b0;
      mem_ld40    <= 1'b0;
      mem_rd_we   <= 1'b0;
      mem_fpu_mem <= 1'b0;
      mem_cop     <= CO_NONE;
      mem_row     <= '0;
      mem_result  <= '0;
      mem_wdata   <= '0;
      mem_addr    <= '0;
      mem_pc      <= '0;
      {mem_illegal, mem_wovf, mem_wunf, mem_tag, mem_gen, mem_ovf} <= '0;
      {ex_dslot, dslot_pend, mem_noint} <= '0;
      wb_we       <= 1'b0;
      wb_row      <= '0;
      wb_val      <= '0;
    end else if (advance) begin
      // Write
      wb_we  <= mem_valid && mem_rd_we && !take && !mem_fpu_mem;
      wb_row <= mem_row;
      if (mem_load) wb_val <= mem_ld40 ? cc_rdata : word40_t'({2'b00, TAG_FIXNUM, cc_rdata.data});
      else          wb_val <= mem_result;
      // Mem Acc
      mem_valid   <= ctl.valid && !take;
      mem_load    <= ctl.load;
      mem_store   <= ctl.store;
      mem_ld40    <= ctl.ld40;
      mem_rd_we   <= ctl.rd_we;
      mem_fpu_mem <= ctl.fpu_mem;
      mem_cop     <= ctl.cop;
      mem_row     <= wrow_ex;
      mem_result  <= res;
      mem_addr    <= alu_y;
      mem_wdata   <= ctl.st40 ? op2 : word40_t'({8'h00, op2.data});
      mem_pc      <= ex_pc;
      mem_illegal <= ctl.illegal;
      mem_wovf    <= wovf;
      mem_wunf    <= wunf;
      mem_tag     <= tag_trap;
      mem_gen     <= gen_trap;
      mem_ovf     <= ctl.ovf_chk && v;
      mem_noint   <= ex_dslot || ctl.rett;
      // Execute
      ex_instr <= if_instr;
      ex_pc    <= pc_if;
      ex_valid <= if_valid && !take;
      ex_dslot <= (xfer || dslot_pend) && !take;
      dslot_pend <= (xfer || dslot_pend) && !if_valid && !take;
      // I-Fetch
      if (take) begin
        pc_if   <= trap_vec[31:2];
        br_pend <= 1'b0;
      end else if (xfer) begin
        if (if_valid) pc_if <= xfer_tgt;     // delay slot is leaving I-Fetch
        else begin
          br_pend     <= 1'b1;
          br_pend_tgt <= xfer_tgt;
        end
      end else if (if_valid) begin
        pc_if   <= br_pend ? br_pend_tgt : pc_inc;
        br_pend <= 1'b0;
      end
    end
  end

  // a trap and a control transfer both redirect fetch; the trap wins
  a_single_redirect: assert property (@(posedge clk) disable iff (!rst_n)
      (take && advance) |=> !ex_valid);
endmodule

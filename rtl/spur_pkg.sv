// spur_pkg: types and constants shared by the SPUR CPU and MMU/CC models.
//
// Holds the tagged 40-bit word layout (6-bit type tag, 2-bit generation,
// 32-bit data), the instruction field positions of the seven formats, the
// opcode and condition encodings, the cache opcodes sent from the CPU to the
// MMU/CC, the Berkeley Ownership coherency states and bus transactions, trap
// types, and the register-window mapping function.  Field positions follow
// the published instruction formats; every numeric encoding (opcodes,
// conditions, cache opcodes, trap types, special register numbers) is this
// design's own choice because no table of them is published.
package spur_pkg;

  // ---------------------------------------------------------------- words
  typedef struct packed {
    logic [1:0]  gen;   // generation number (2 MSBs of the tag byte)
    logic [5:0]  typ;   // object type tag
    logic [31:0] data;
  } word40_t;

  localparam logic [5:0] TAG_FIXNUM = 6'd0;
  localparam logic [5:0] TAG_CONS   = 6'd1;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [6:0] {
    OP_NOP     = 7'h00,
    OP_ADD     = 7'h01, OP_SUB  = 7'h02, OP_AND  = 7'h03, OP_OR   = 7'h04,
    OP_XOR     = 7'h05, OP_SLL  = 7'h06, OP_SRL  = 7'h07, OP_SRA  = 7'h08,
    OP_ADDT    = 7'h09,  // add with fixnum tag check
    OP_SUBT    = 7'h0A,  // subtract with fixnum tag check
    OP_EXTB    = 7'h0B,  // byte extract: rd = byte rs2[1:0] of rs1
    OP_INSB    = 7'h0C,  // byte insert:  byte rs2[1:0] of rd := rs1[7:0]
    OP_RDTAG   = 7'h0D,  // rd = tag byte of rs1 (zero-extended)
    OP_WRTAG   = 7'h0E,  // rd = rs1 with tag byte := rs2[7:0]
    OP_LD32    = 7'h10,  // rd.data = M[rs1+src2].data, tag fixnum
    OP_LD40    = 7'h11,  // rd = M[rs1+src2] (tag and data)
    OP_LDCAR   = 7'h12,  // 40-bit load with pointer (cons) type check on rs1
    OP_LDPRIV  = 7'h13,  // cache-control load: read for ownership
    OP_ST32    = 7'h18,  // M[rs1+imm].data = rs2
    OP_ST40    = 7'h19,  // M[rs1+imm] = rs2, generation check
    OP_FLUSH   = 7'h1A,  // cache-control store: flush block
    OP_CMPBR   = 7'h20,  // compare rs1 with rs2 / short imm, branch
    OP_CMPBRT  = 7'h21,  // compare tag of rs1 with tag imm, branch
    OP_RET     = 7'h28,  // jump to rs1+src2, window pointer - 1
    OP_RETT    = 7'h29,  // return from trap
    OP_RDSR    = 7'h2A,  // rd = special register [src2]
    OP_WRSR    = 7'h2B,  // special register [imm] = rs1
    OP_FPOP    = 7'h30,  // floating point operation
    OP_FPLD    = 7'h31,  // floating point load  (address from CPU)
    OP_FPST    = 7'h32,  // floating point store (address from CPU)
    OP_CALL    = 7'h70,  // bits 31:28 = 4'b1110: call, 28-bit word address
    OP_JUMP    = 7'h78   // bits 31:28 = 4'b1111: jump, 28-bit word address
  } opcode_e;

  localparam logic [3:0] OP4_CALL = 4'b1110;
  localparam logic [3:0] OP4_JUMP = 4'b1111;

  // compare-and-branch conditions, Cond field bits 24:20
  typedef enum logic [4:0] {
    C_NEVER = 5'd0, C_EQ = 5'd1, C_NE = 5'd2, C_LT = 5'd3, C_LE = 5'd4,
    C_GT = 5'd5, C_GE = 5'd6, C_LTU = 5'd7, C_GEU = 5'd8, C_ALWAYS = 5'd9,
    C_TEQ = 5'd10, C_TNE = 5'd11
  } cond_e;

  // ALU functions
  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] { SH_NONE, SH_LL, SH_RL, SH_RA } shift_op_e;

  // result source in Execute
  typedef enum logic [2:0] {
    RES_ALU, RES_SHIFT, RES_EXTB, RES_INSB, RES_RDTAG, RES_WRTAG, RES_SR, RES_PC
  } res_sel_e;

  // ---------------------------------------------------------------- cache ops
  // 4-bit cache opcode on the CPU / MMU-CC interface
  typedef enum logic [3:0] {
    CO_NONE      = 4'd0,
    CO_READ      = 4'd1,
    CO_WRITE     = 4'd2,
    CO_READPRIV  = 4'd3,
    CO_IFETCH    = 4'd4,
    CO_PREFETCH  = 4'd5,
    CO_FLUSH     = 4'd6,
    CO_FPREAD    = 4'd7,   // FPU takes the data
    CO_FPWRITE   = 4'd8    // FPU supplies the data
  } cache_op_e;

  // ---------------------------------------------------------------- coherency
  typedef enum logic [1:0] {
    CS_INVALID = 2'd0, CS_UNOWNED = 2'd1, CS_OWNSHARED = 2'd2, CS_OWNPRIVATE = 2'd3
  } coh_state_e;

  typedef enum logic [2:0] {
    BUS_NONE = 3'd0, BUS_RS = 3'd1, BUS_RFO = 3'd2, BUS_WRITE = 3'd3, BUS_WFI = 3'd4
  } bus_cmd_e;

  // processor-side request kinds seen by the coherency logic
  typedef enum logic [1:0] { PR_READ, PR_WRITE, PR_READPRIV, PR_FLUSH } proc_req_e;

  // ---------------------------------------------------------------- traps
  typedef enum logic [3:0] {
    TT_NONE = 4'd0, TT_FAULT = 4'd1, TT_ILLEGAL = 4'd2, TT_FPU = 4'd3,
    TT_WOVF = 4'd4, TT_WUNF = 4'd5, TT_TAG = 4'd6, TT_GEN = 4'd7,
    TT_OVF = 4'd8, TT_INTR = 4'd9
  } trap_e;

  // PSW bit positions (8 trap/control bits in each PSW)
  localparam int PSW_ET    = 0;  // traps enabled (KPSW)
  localparam int PSW_IE    = 1;  // interrupt enable
  localparam int PSW_TAGE  = 2;  // tag trap enable
  localparam int PSW_OVFE  = 3;  // overflow trap enable
  localparam int PSW_GENE  = 4;  // generation trap enable
  localparam int PSW_FPUE  = 5;  // FPU enable (KPSW)
  localparam int PSW_IU0   = 6;  // instruction-unit mode bits (KPSW)
  localparam int PSW_IU1   = 7;
  localparam int PSW_KERN  = 8;  // kernel mode (KPSW)
  localparam int PSW_VIRT  = 9;  // virtual addressing (KPSW)

  // special registers
  typedef enum logic [3:0] {
    SR_KPSW = 4'd0, SR_UPSW = 4'd1, SR_CWP = 4'd2, SR_SWP = 4'd3,
    SR_TBR = 4'd4, SR_TPC = 4'd5, SR_SKPSW = 4'd6, SR_TTYPE = 4'd7
  } sreg_e;

  // ---------------------------------------------------------------- windows
  localparam int NGLOBAL = 10;
  localparam int NLOCAL  = 10;
  localparam int NOVL    = 6;
  localparam int NWIN    = 8;
  localparam int NREGS   = NGLOBAL + NWIN * (NLOCAL + NOVL);  // 138
  localparam int RIDX_W  = 8;

  // Register number r in window cwp -> physical row.
  // rows 0..9 globals, 10..89 locals (10 per window), 90..137 overlap groups
  // (6 per group).  Group g is r10..r15 of window g and r26..r31 of window g-1.
  function automatic logic [RIDX_W-1:0] win_map(input logic [4:0] r, input logic [2:0] cwp);
    logic [2:0] nxt;
    nxt = cwp + 3'd1;
    if (r < 5'd10)       win_map = RIDX_W'(r);
    else if (r < 5'd16)  win_map = RIDX_W'(NGLOBAL + NWIN*NLOCAL + int'(cwp)*NOVL + int'(r) - 10);
    else if (r < 5'd26)  win_map = RIDX_W'(NGLOBAL + int'(cwp)*NLOCAL + int'(r) - 16);
    else                 win_map = RIDX_W'(NGLOBAL + NWIN*NLOCAL + int'(nxt)*NOVL + int'(r) - 26);
  endfunction

  // ---------------------------------------------------------------- decode
  typedef struct packed {
    logic       valid;      // a real instruction (not a bubble)
    logic       illegal;
    logic       rd_we;      // writes Rd
    logic       use_imm;    // src2 is the immediate
    logic       use_rs2;    // reads Rs2
    logic       use_rs1;
    alu_op_e    alu_op;
    shift_op_e  sh_op;
    res_sel_e   res_sel;
    logic       tag_chk;    // fixnum check on both operands
    logic       ptr_chk;    // cons check on rs1
    logic       gen_chk;    // generation check (ST40)
    logic       ovf_chk;    // overflow trap candidate
    logic       load;
    logic       store;
    logic       ld40;       // load keeps the tag
    logic       st40;       // store writes the tag
    cache_op_e  cop;        // cache opcode for memory instructions
    logic       branch;     // compare and branch
    logic       tag_br;     // tag compare branch
    logic       call;
    logic       jump;
    logic       ret;
    logic       rett;
    logic       rdsr;
    logic       wrsr;
    logic       fpu;        // any FPU instruction
    logic       fpu_mem;    // FPU load/store
  } ctrl_t;

endpackage

// spur_system: a SPUR multiprocessor - NPROC identical processors on one
// snooping bus with shared memory.
//
// Each processor is a CPU (spur_cpu) and its MMU/CC (mmu_cc, with the
// processor's 128 KB cache RAMs).  The CPU runs on the processor clock
// clk_p, the bus side of every MMU/CC on the bus clock clk_b; the two need
// not be related.  The bus (spurbus_arb) grants one master at a time; every
// other MMU/CC snoops the transaction and keeps its caches coherent with the
// Berkeley Ownership protocol.  Main memory is not part of this design: the
// bus's memory port (command, physical address, write block, whether a cache
// owner supplies the data; memory answers with done and a read block) is
// brought out, as are each CPU's floating-point coprocessor pins and
// external interrupt lines.  NPROC defaults to 6, the smallest configuration
// the document names (6 to 12 processors).
module spur_system
  import spur_pkg::*;
#(
  parameter int NPROC       = 6,
  parameter int CACHE_BYTES = 131072,
  parameter int BLOCK_WORDS = 8,
  localparam int BLK_W = BLOCK_WORDS * 40
) (
  input  logic                       clk_p,
  input  logic                       clk_b,
  input  logic                       rst_n,
  // shared memory port (bus clock)
  output bus_cmd_e                   mem_cmd,
  output logic [31:0]                mem_pa,
  output logic [BLK_W-1:0]           mem_wblock,
  output logic                       mem_owner,
  input  logic                       mem_done,
  input  logic [BLK_W-1:0]           mem_rblock,
  // per processor: FPU coprocessor pins and interrupts
  output logic [NPROC-1:0][21:0]     fpu_instr,
  output logic [NPROC-1:0][1:0]      fpu_ctl,
  input  logic [NPROC-1:0][2:0]      fpu_status,
  input  logic [NPROC-1:0][6:0]      ext_irq,
  // per processor: observation pins
  output logic [NPROC-1:0][8:0]      bus_pc,
  output logic [NPROC-1:0]           trap_taken,
  output logic [NPROC-1:0]           iu_miss,
  output logic [NPROC-1:0]           iu_prefetch,
  output logic [NPROC-1:0]           fwd_double
);
  logic [NPROC-1:0]            req, gnt, s_done, s_respond;
  bus_cmd_e [NPROC-1:0]        m_cmd;
  logic [NPROC-1:0][37:0]      m_gva;
  logic [NPROC-1:0][31:0]      m_pa;
  logic [NPROC-1:0][BLK_W-1:0] m_block, s_block;
  bus_cmd_e                    bus_cmd;
  logic [37:0]                 bus_gva;
  logic                        bus_done;
  logic [BLK_W-1:0]            bus_rblock;

  for (genvar i = 0; i < NPROC; i++) begin : g_node
    cache_op_e   cc_op;
    logic [1:0]  cc_mode;
    logic [31:0] cc_addr;
    word40_t     cc_wdata, cc_rdata;
    logic        cc_busy, cc_ignored, cc_fault, intr;

    spur_cpu u_cpu (
      .clk (clk_p), .rst_n,
      .cc_op, .cc_mode, .cc_addr, .cc_wdata, .cc_rdata, .cc_busy, .cc_ignored, .cc_fault,
      .intr,
      .fpu_instr (fpu_instr[i]), .fpu_ctl (fpu_ctl[i]), .fpu_status (fpu_status[i]),
      .bus_pc (bus_pc[i]), .iu_miss (iu_miss[i]), .iu_prefetch (iu_prefetch[i]),
      .trap_taken (trap_taken[i]), .fwd_double (fwd_double[i])
    );

    mmu_cc #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_WORDS(BLOCK_WORDS)) u_mmu (
      .clk_p, .clk_b, .rst_n,
      .cpu_op (cc_op), .cpu_mode (cc_mode), .cpu_addr (cc_addr), .cpu_wdata (cc_wdata),
      .cpu_rdata (cc_rdata), .cpu_busy (cc_busy), .cpu_ignored (cc_ignored),
      .cpu_fault (cc_fault), .cpu_intr (intr), .ext_irq (ext_irq[i]),
      .bus_req (req[i]), .bus_gnt (gnt[i]), .m_cmd (m_cmd[i]), .m_gva (m_gva[i]),
      .m_pa (m_pa[i]), .m_block (m_block[i]), .bus_done, .bus_rblock,
      .bus_cmd, .bus_gva, .s_done (s_done[i]), .s_respond (s_respond[i]), .s_block (s_block[i])
    );
  end

  spurbus_arb #(.NPROC(NPROC), .BLK_W(BLK_W)) u_arb (
    .clk (clk_b), .rst_n, .req, .gnt, .m_cmd, .m_gva, .m_pa, .m_block,
    .s_done, .s_respond, .s_block,
    .bus_cmd, .bus_gva, .bus_pa (mem_pa), .bus_wblock (mem_wblock), .bus_owner (mem_owner),
    .bus_done, .bus_rblock, .mem_done, .mem_rblock
  );
  assign mem_cmd = bus_cmd;
endmodule

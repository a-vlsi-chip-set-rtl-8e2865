// perf_counters: performance monitors of the MMU/CC.
//
// NCNT 32-bit counters.  Each has a configuration register holding a 5-bit
// event select (one of NEVENTS = 32 event lines such as bus transactions,
// cycles the PCC waits for the bus, instruction fetches, misses) and two
// enables for user and kernel mode.  A counter adds one in every cycle its
// event line is high while the processor is in an enabled mode, so events
// can be counted in user and/or kernel mode without disturbing the system.
// The 32 event kinds and the user/kernel split are the document's; the
// number of counters, the register layout (counter i at 0x40+8i,
// configuration at 0x44+8i: bits 4:0 event, 8 user, 9 kernel) and writable
// counts are this design's.
module perf_counters #(
  parameter int NCNT    = 4,
  parameter int NEVENTS = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NEVENTS-1:0] events,
  input  logic               kernel,
  input  logic               reg_we,
  input  logic [7:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata
);
  localparam int SW = $clog2(NEVENTS);
  logic [31:0]   cnt [NCNT];
  logic [SW-1:0] sel [NCNT];
  logic          en_u [NCNT];
  logic          en_k [NCNT];

  always_comb begin
    reg_rdata = '0;
    for (int i = 0; i < NCNT; i++) begin
      if (reg_addr == 8'(8'h40 + 8*i)) reg_rdata = cnt[i];
      if (reg_addr == 8'(8'h44 + 8*i)) reg_rdata = {22'd0, en_k[i], en_u[i], 3'd0, 5'(sel[i])};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCNT; i++) begin
        cnt[i] <= '0; sel[i] <= '0; en_u[i] <= 1'b0; en_k[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < NCNT; i++) begin
        if (reg_we && reg_addr == 8'(8'h40 + 8*i))
          cnt[i] <= reg_wdata;
        else if (events[sel[i]] && (kernel ? en_k[i] : en_u[i]))
          cnt[i] <= cnt[i] + 32'd1;
        if (reg_we && reg_addr == 8'(8'h44 + 8*i)) begin
          sel[i]  <= reg_wdata[SW-1:0];
          en_u[i] <= reg_wdata[8];
          en_k[i] <= reg_wdata[9];
        end
      end
    end
  end
endmodule

// intr_ctrl: interrupt controller and interrupt registers of the MMU/CC.
//
// NSRC interrupt sources (the interval timer, the bus, I/O) set their bits in a
// pending register in any cycle they are high; a mask
// register selects which pending bits raise the CPU's interrupt line.
// Software clears pending bits by writing ones to them (0xC0); the mask is
// at 0xC4.  The document only names the interrupt controller and
// registers; the register layout and write-one-to-clear are this design's.
module intr_ctrl #(
  parameter int NSRC = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src,
  input  logic            reg_we,
  input  logic [7:0]      reg_addr,
  input  logic [31:0]     reg_wdata,
  output logic [31:0]     reg_rdata,
  output logic            intr
);
  logic [NSRC-1:0] pending, mask;

  assign intr = |(pending & mask);

  always_comb begin
    unique case (reg_addr)
      8'hC0:   reg_rdata = 32'(pending);
      8'hC4:   reg_rdata = 32'(mask);
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= '0;
      mask    <= '0;
    end else begin
      if (reg_we && reg_addr == 8'hC0) pending <= (pending & ~reg_wdata[NSRC-1:0]) | src;
      else                             pending <= pending | src;
      if (reg_we && reg_addr == 8'hC4) mask <= reg_wdata[NSRC-1:0];
    end
  end
endmodule

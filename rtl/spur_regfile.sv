// spur_regfile: 138 x 40-bit windowed register file with two reads and one
// write per cycle.
//
// Thirty-two registers are visible at a time: r0-r9 are the 10 globals,
// r10-r15 are shared with the caller's window, r16-r25 are the 10 locals and
// r26-r31 are shared with the callee's window.  The window decoder maps a
// register number and the current window pointer (CWP) to a physical row
// (spur_pkg::win_map); a caller's r26-r31 and its callee's r10-r15 (same low
// four bits, complemented MSB) land on the same row, with the callee at
// CWP+1.  Reads are combinational and return the mapped row number so that
// the forwarding logic can compare rows; the write port takes a row.  A read
// of the row being written in the same cycle returns the new value, which
// stands in for the chip's time-multiplexed write-then-read access.  Counts
// (10/10/6/6, 8 windows, 40 bits) are the document's; the numbering of the
// groups inside the 32 visible registers, the window direction and reset to
// zero are this design's.
module spur_regfile
  import spur_pkg::*;
#(
  parameter int NROWS = NREGS   // 138
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        cwp,
  input  logic [4:0]        rs1,
  input  logic [4:0]        rs2,
  output logic [RIDX_W-1:0] row1,
  output logic [RIDX_W-1:0] row2,
  output word40_t           rd1,
  output word40_t           rd2,
  input  logic              we,
  input  logic [RIDX_W-1:0] wrow,
  input  word40_t           wd
);
  word40_t regs [NROWS];

  assign row1 = win_map(rs1, cwp);
  assign row2 = win_map(rs2, cwp);

  always_comb begin
    rd1 = (we && wrow == row1) ? wd : regs[row1];
    rd2 = (we && wrow == row2) ? wd : regs[row2];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NROWS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wrow] <= wd;
    end
  end
endmodule

// spur_cc_if: the CPU's interface to the MMU/CC (cache controller).
//
// The CPU has one external cache port.  Each cycle this block chooses who
// uses it - the data reference of the instruction in Mem Acc first, then the
// instruction unit (a demand fetch or, lowest, a prefetch) - and generates the
// 4-bit cache opcode and the two mode bits (kernel/user, physical/virtual).
// It reports back to the IU whether its request went out.  The priority
// order is the document's; the opcode values are this design's
// (spur_pkg::cache_op_e).  Combinational.
module spur_cc_if
  import spur_pkg::*;
(
  // data reference from stage 3
  input  logic        d_req,
  input  cache_op_e   d_op,
  input  logic [31:0] d_addr,
  input  word40_t     d_wdata,
  // instruction unit
  input  logic        i_req,
  input  logic        i_pref,     // the IU request is a prefetch
  input  logic [29:0] i_waddr,    // word address
  output logic        i_gnt,
  // status
  input  logic        kernel,
  input  logic        virt,
  // pins to the MMU/CC
  output cache_op_e   cc_op,
  output logic [1:0]  cc_mode,    // {kernel, physical}
  output logic [31:0] cc_addr,
  output word40_t     cc_wdata
);
  always_comb begin
    cc_mode  = {kernel, !virt};
    cc_wdata = d_wdata;
    i_gnt    = 1'b0;
    if (d_req) begin
      cc_op   = d_op;
      cc_addr = d_addr;
    end else if (i_req) begin
      cc_op   = i_pref ? CO_PREFETCH : CO_IFETCH;
      cc_addr = {i_waddr, 2'b00};
      i_gnt   = 1'b1;
    end else begin
      cc_op   = CO_NONE;
      cc_addr = '0;
    end
  end
endmodule

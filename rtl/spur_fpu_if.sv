// spur_fpu_if: coprocessor (FPU) interface of the CPU.
//
// Every cycle the instruction entering Execute is sent to the FPU on 22 pins
// (7-bit opcode and three 5-bit register specifiers) so that the FPU can
// track the instruction stream.  Two control signals go with it: issue (the
// instruction is valid and really proceeds) and squash (the instruction was
// annulled by a trap).  The FPU answers with a 3-bit status: {busy,
// exception, spare}.  The CPU holds an FPU instruction in Execute while the
// FPU is busy, and turns an FPU exception into a trap.  The pin counts are
// the document's; the meaning of the control and status bits is this
// design's.  Combinational.
module spur_fpu_if
  import spur_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        ex_valid,   // instruction in Execute is real
  input  logic        ex_fpu,     // and is an FPU instruction
  input  logic        advance,    // pipeline moves this cycle
  input  logic        squash_in,
  input  logic [2:0]  fpu_status,
  output logic [21:0] fpu_instr,
  output logic [1:0]  fpu_ctl,    // {squash, issue}
  output logic        fpu_stall,
  output logic        fpu_exc
);
  always_comb begin
    fpu_instr = {instr[31:25], instr[24:20], instr[19:15], instr[13:9]};
    fpu_stall = ex_valid && ex_fpu && fpu_status[2];
    fpu_ctl   = {squash_in, ex_valid && ex_fpu && advance && !fpu_stall};
    fpu_exc   = fpu_status[1];
  end
endmodule

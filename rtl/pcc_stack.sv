// pcc_stack: the state stack that makes the PCC sequencer a push-down
// automaton.
//
// The sequencer's current state is the top of stack (TOS).  Each cycle the
// sequencer may push a new state (the old one waits underneath, to be
// resumed), pop back to the state below, replace the TOS, or flush the whole
// stack.  An empty stack reads as the idle state (value 0).  Depth 4 is the
// document's; the empty-reads-idle convention is this design's.  Pushing a
// full stack or popping an empty one is a sequencer error and is flagged by
// an assertion.
module pcc_stack #(
  parameter int DEPTH = 4,
  parameter int W     = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   op,      // 0 none, 1 push, 2 pop, 3 replace, 4 flush
  input  logic [W-1:0] din,
  output logic [W-1:0] tos,
  output logic [$clog2(DEPTH+1)-1:0] depth
);
  localparam int DW = $clog2(DEPTH+1);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];

  assign tos = (depth == '0) ? '0 : mem[AW'(depth - DW'(1))];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      depth <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      unique case (op)
        3'd1: begin mem[AW'(depth)] <= din; depth <= depth + DW'(1); end
        3'd2: depth <= depth - DW'(1);
        3'd3: if (depth != '0) mem[AW'(depth - DW'(1))] <= din;
        3'd4: depth <= '0;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) op == 3'd1 |-> depth < DW'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) op == 3'd2 |-> depth != '0);
endmodule

// coh_state: Berkeley Ownership cache coherency - next state and bus action.
//
// A cache block is Invalid, UnOwned, OwnShared or OwnPrivate.  For a
// processor request (read, write, read-private, flush) the block moves as in
// the protocol's processor-side diagram and the controller may need a bus
// transaction: ReadShared (RS) or ReadForOwnership (RFO) to fetch a block,
// WriteForInvalidation (WFI) to gain ownership of a valid block, or Write to
// put an owned block back in memory on a flush.  For a transaction snooped
// on the bus (RS, RFO, WFI) the block moves as in the snoop-side diagram and
// an owner must respond with its data on RS and RFO.  Transitions and bus
// actions are the document's; FLUSH (left out of its diagram) writes back an
// owned block and invalidates it, which is this design's reading.
// Combinational.
module coh_state
  import spur_pkg::*;
(
  // processor side
  input  coh_state_e cur,
  input  proc_req_e  preq,
  output coh_state_e p_next,     // state once the bus action (if any) is done
  output bus_cmd_e   p_bus,      // bus transaction needed (BUS_NONE if none)
  // snoop side
  input  bus_cmd_e   scmd,
  output coh_state_e s_next,
  output logic       s_respond   // supply the block (owner)
);
  always_comb begin
    p_next = cur;
    p_bus  = BUS_NONE;
    unique case (preq)
      PR_READ: if (cur == CS_INVALID) begin p_next = CS_UNOWNED; p_bus = BUS_RS; end
      PR_WRITE, PR_READPRIV: begin
        p_next = CS_OWNPRIVATE;
        unique case (cur)
          CS_INVALID:               p_bus = BUS_RFO;
          CS_UNOWNED, CS_OWNSHARED: p_bus = BUS_WFI;
          default:                  p_bus = BUS_NONE;
        endcase
      end
      PR_FLUSH: begin
        p_next = CS_INVALID;
        p_bus  = (cur == CS_OWNSHARED || cur == CS_OWNPRIVATE) ? BUS_WRITE : BUS_NONE;
      end
      default: ;
    endcase
  end

  always_comb begin
    s_next    = cur;
    s_respond = 1'b0;
    unique case (cur)
      CS_UNOWNED:    if (scmd == BUS_WFI || scmd == BUS_RFO) s_next = CS_INVALID;
      CS_OWNSHARED: begin
        if (scmd == BUS_RS)  s_respond = 1'b1;
        if (scmd == BUS_RFO) begin s_respond = 1'b1; s_next = CS_INVALID; end
        if (scmd == BUS_WFI) s_next = CS_INVALID;
      end
      CS_OWNPRIVATE: begin
        if (scmd == BUS_RS)  begin s_respond = 1'b1; s_next = CS_OWNSHARED; end
        if (scmd == BUS_RFO) begin s_respond = 1'b1; s_next = CS_INVALID;   end
        // cannot happen with a single owner; invalidate to stay safe
        if (scmd == BUS_WFI) s_next = CS_INVALID;
      end
      default: ;
    endcase
  end
endmodule

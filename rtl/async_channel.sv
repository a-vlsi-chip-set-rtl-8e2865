// async_channel: one channel of the asynchronous interface between the PCC
// (processor clock) and the SBC (bus clock).
//
// The sender raises req_in for a single cycle with req_code_in valid; the
// code is captured and held, and a request flag changes state.  The flag
// crosses into the receiver's clock through a two-flip-flop synchronizer;
// the receiver sees a one-cycle req_out pulse with req_code_out already
// stable (the code needs no synchronizer because it is settled before the
// request arrives).  The receiver answers with a one-cycle ack_in pulse and
// ack_code_in, which travel back the same way to a one-cycle ack_out.  This
// is the document's "variant of the two-cycle handshake" in which neither
// side holds its line until the other answers; the edge detector and RS
// flip-flop of the chip are written here as a toggling flag and an edge
// compare after the synchronizer.  A new request must wait for the previous
// acknowledge.
module async_channel #(
  parameter int REQ_W = 8,
  parameter int ACK_W = 8
) (
  input  logic             rst_n,
  // sender side
  input  logic             clk_s,
  input  logic             req_in,
  input  logic [REQ_W-1:0] req_code_in,
  output logic             ack_out,
  output logic [ACK_W-1:0] ack_code_out,
  // receiver side
  input  logic             clk_r,
  output logic             req_out,
  output logic [REQ_W-1:0] req_code_out,
  input  logic             ack_in,
  input  logic [ACK_W-1:0] ack_code_in
);
  logic             req_tgl, ack_tgl;
  logic [2:0]       req_sync, ack_sync;     // two synchronizer stages + edge history
  logic [REQ_W-1:0] req_code_q;
  logic [ACK_W-1:0] ack_code_q;

  // sender clock domain
  always_ff @(posedge clk_s) begin
    if (!rst_n) begin
      req_tgl    <= 1'b0;
      req_code_q <= '0;
      ack_sync   <= '0;
    end else begin
      if (req_in) begin
        req_tgl    <= !req_tgl;
        req_code_q <= req_code_in;
      end
      ack_sync <= {ack_sync[1:0], ack_tgl};
    end
  end
  assign ack_out      = ack_sync[2] != ack_sync[1];
  assign ack_code_out = ack_code_q;

  // receiver clock domain
  always_ff @(posedge clk_r) begin
    if (!rst_n) begin
      ack_tgl    <= 1'b0;
      ack_code_q <= '0;
      req_sync   <= '0;
    end else begin
      if (ack_in) begin
        ack_tgl    <= !ack_tgl;
        ack_code_q <= ack_code_in;
      end
      req_sync <= {req_sync[1:0], req_tgl};
    end
  end
  assign req_out      = req_sync[2] != req_sync[1];
  assign req_code_out = req_code_q;
endmodule

// interval_timer: the MMU/CC's interval timer.
//
// A 32-bit down-counter.  Writing the period register (0x80) loads the
// period; bit 0 of the control register (0x84) enables counting.  While
// enabled the count drops by one per cycle; when it reaches zero the timer
// raises 'expired' for one cycle (an interrupt source) and reloads the
// period.  The count can be read at 0x88.  The document only names the
// timer: width, reload behaviour and register layout are this design's.
module interval_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        expired
);
  logic [31:0] period, count;
  logic        en;

  always_comb begin
    unique case (reg_addr)
      8'h80:   reg_rdata = period;
      8'h84:   reg_rdata = {31'd0, en};
      8'h88:   reg_rdata = count;
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period  <= '0;
      count   <= '0;
      en      <= 1'b0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (reg_we && reg_addr == 8'h80) begin
        period <= reg_wdata;
        count  <= reg_wdata;
      end else if (en) begin
        if (count == 32'd0 || count == 32'd1) begin
          expired <= 1'b1;
          count   <= period;
        end else begin
          count <= count - 32'd1;
        end
      end
      if (reg_we && reg_addr == 8'h84) en <= reg_wdata[0];
    end
  end
endmodule

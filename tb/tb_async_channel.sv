// tb_async_channel: sends request codes from one clock domain to another
// with unrelated clock periods and returns an acknowledge code for each;
// checks codes, one-cycle pulses, in-order delivery and no loss.
module tb_async_channel;
  int checks = 0, failures = 0;
  logic rst_n = 0, clk_s = 0, clk_r = 0;
  logic req_in, ack_out, req_out, ack_in;
  logic [15:0] req_code_in, req_code_out; logic [7:0] ack_code_out, ack_code_in;
  int sent = 0, got = 0, acked = 0;
  logic [15:0] exp_code [$];
  async_channel #(.REQ_W(16), .ACK_W(8)) dut (.*);
  always #5 clk_s = ~clk_s;
  always #7 clk_r = ~clk_r;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // receiver: acknowledges each request after a random delay, code = low byte + 1
  logic [7:0] pend_ack; int delay = -1; logic req_prev = 0;
  always @(posedge clk_r) begin
    ack_in <= 0;
    if (rst_n && req_out) begin
      got++; checks++;
      if (req_code_out !== exp_code[0]) begin failures++; $display("FAIL req code"); end
      pend_ack = req_code_out[7:0] + 8'd1; void'(exp_code.pop_front());
      delay = $urandom_range(0, 4);
      checks++; if (req_prev) begin failures++; $display("FAIL req pulse too long"); end
    end
    req_prev <= req_out;
    if (delay == 0) begin ack_in <= 1; ack_code_in <= pend_ack; delay = -1; end
    else if (delay > 0) delay--;
  end
  logic [7:0] want;
  initial begin
    req_in = 0; ack_in = 0; req_code_in = 0; ack_code_in = 0;
    repeat (3) @(posedge clk_s); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk_s); #1;
      req_in = 1; req_code_in = 16'($urandom); exp_code.push_back(req_code_in); want = req_code_in[7:0] + 8'd1;
      @(posedge clk_s); #1; req_in = 0;
      do @(posedge clk_s); while (!ack_out);
      #1; checks++;
      if (ack_code_out !== want) begin failures++; $display("FAIL ack code"); end
      @(posedge clk_s); #1;
      checks++; if (ack_out) begin failures++; $display("FAIL ack pulse too long"); end
      acked++;
    end
    checks++; if (got != 300 || acked != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

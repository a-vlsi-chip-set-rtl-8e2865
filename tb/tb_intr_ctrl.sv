// tb_intr_ctrl: random interrupt source pulses, mask writes and
// write-one-to-clear acknowledges against a model of pending bits.
module tb_intr_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, reg_we, intr; logic [7:0] src, pend, msk, reg_addr; logic [31:0] reg_wdata, reg_rdata;
  intr_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    src = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0; pend = 0; msk = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      src = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'd0;
      reg_we = $urandom_range(0, 3) == 0; reg_addr = $urandom_range(0, 1) ? 8'hC0 : 8'hC4; reg_wdata = $urandom;
      @(posedge clk); #1;
      if (reg_we && reg_addr == 8'hC0) pend = (pend & ~reg_wdata[7:0]) | src; else pend = pend | src;
      if (reg_we && reg_addr == 8'hC4) msk = reg_wdata[7:0];
      reg_we = 0; reg_addr = 8'hC0; #1;
      checks++;
      if (reg_rdata[7:0] !== pend || intr !== |(pend & msk)) begin failures++; $display("FAIL t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_interval_timer: checks that the timer expires every `period` cycles
// once enabled, reloads automatically, stops when disabled and that the
// registers read back.
module tb_interval_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, reg_we, expired; logic [7:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  int last, n;
  interval_timer dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(logic [7:0] a, logic [31:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d; @(posedge clk); #1; reg_we = 0;
  endtask
  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int p = 3; p < 40; p += 7) begin
      wr(8'h84, 0); wr(8'h80, p);
      reg_addr = 8'h80; #1; checks++; if (reg_rdata !== 32'(p)) failures++;
      wr(8'h84, 1);
      n = 0; last = -1;
      for (int t = 0; t < 10 * p; t++) begin
        @(posedge clk); #1;
        if (expired) begin
          if (last >= 0) begin checks++; if (t - last != p) begin failures++; $display("FAIL period %0d got %0d", p, t - last); end end
          last = t; n++;
        end
      end
      checks++; if (n < 9) begin failures++; $display("FAIL count %0d", n); end
    end
    wr(8'h84, 0); n = 0;
    repeat (100) begin @(posedge clk); #1; if (expired) n++; end
    checks++; if (n != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_perf_counters: programs each counter with an event, a user/kernel
// enable, counts random event streams and compares with a model; also
// checks preset by register write and configuration readback.
module tb_perf_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, kernel, reg_we; logic [31:0] events, reg_wdata, reg_rdata; logic [7:0] reg_addr;
  int model [4]; int sel [4]; logic eu [4]; logic ek [4];
  perf_counters dut (.*);
  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(logic [7:0] a, logic [31:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d; @(posedge clk); #1; reg_we = 0;
  endtask
  initial begin
    events = 0; kernel = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < 4; i++) begin
        sel[i] = $urandom_range(0, 31); eu[i] = $urandom_range(0, 1); ek[i] = $urandom_range(0, 1);
        model[i] = $urandom_range(0, 1000);
        wr(8'(8'h44 + 8*i), {22'd0, ek[i], eu[i], 3'd0, 5'(sel[i])});
        wr(8'(8'h40 + 8*i), model[i]);
        reg_addr = 8'(8'h44 + 8*i); #1;
        checks++; if (reg_rdata !== {22'd0, ek[i], eu[i], 3'd0, 5'(sel[i])}) begin failures++; $display("FAIL cfg"); end
      end
      for (int t = 0; t < 300; t++) begin
        events = $urandom; kernel = $urandom_range(0, 1);
        @(posedge clk); #1;
        for (int i = 0; i < 4; i++) if (events[sel[i]] && (kernel ? ek[i] : eu[i])) model[i]++;
      end
      events = 0;
      for (int i = 0; i < 4; i++) begin
        reg_addr = 8'(8'h40 + 8*i); #1;
        checks++; if (reg_rdata !== 32'(model[i])) begin failures++; $display("FAIL cnt %0d %0d %0d", i, reg_rdata, model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

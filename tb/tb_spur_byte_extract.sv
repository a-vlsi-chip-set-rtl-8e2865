// tb_spur_byte_extract: extracts each data byte and the tag byte of random
// words and compares with a shift-and-mask reference.
module tb_spur_byte_extract;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  word40_t a, y; logic [2:0] sel; logic [39:0] raw;
  spur_byte_extract dut (.a, .sel, .y);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 500; i++) begin
      raw = {8'($urandom), 32'($urandom)}; a = raw; sel = 3'($urandom_range(0, 4)); #1;
      checks++;
      if (y !== word40_t'({8'h00, 24'd0, 8'(raw >> (sel == 4 ? 32 : 8*sel))})) begin
        failures++; $display("FAIL sel=%0d a=%h y=%h", sel, raw, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spur_byte_insert: inserts random bytes at each position (data bytes and
// the tag byte) and compares with a mask-and-or reference.
module tb_spur_byte_insert;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  word40_t a, y; logic [7:0] b; logic [2:0] sel; logic [39:0] raw, m, e;
  spur_byte_insert dut (.a, .b, .sel, .y);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 500; i++) begin
      raw = {8'($urandom), 32'($urandom)}; a = raw; b = 8'($urandom); sel = 3'($urandom_range(0, 4)); #1;
      m = 40'hFF << (sel == 4 ? 32 : 8*sel);
      e = (raw & ~m) | ((40'(b)) << (sel == 4 ? 32 : 8*sel));
      checks++;
      if (y !== e) begin failures++; $display("FAIL sel=%0d a=%h b=%h y=%h e=%h", sel, raw, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spur_fwd: checks operand selection for no, single and double internal
// forwarding, including priority of the nearer instruction.
module tb_spur_fwd;
  import spur_pkg::*;
  int checks = 0, failures = 0, doubles = 0;
  logic [7:0] row1, row2, d1_row, d2_row; word40_t rf1, rf2, d1_val, d2_val, op1, op2, e1, e2;
  logic d1_we, d2_we; logic [1:0] fwd1, fwd2;
  spur_fwd dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      row1 = 8'($urandom_range(0, 5)); row2 = 8'($urandom_range(0, 5));
      d1_row = 8'($urandom_range(0, 5)); d2_row = 8'($urandom_range(0, 5));
      d1_we = $urandom_range(0, 1); d2_we = $urandom_range(0, 1);
      rf1 = {8'd1, 32'($urandom)}; rf2 = {8'd2, 32'($urandom)};
      d1_val = {8'd3, 32'($urandom)}; d2_val = {8'd4, 32'($urandom)};
      #1;
      e1 = rf1; if (d2_we && d2_row == row1) e1 = d2_val; if (d1_we && d1_row == row1) e1 = d1_val;
      e2 = rf2; if (d2_we && d2_row == row2) e2 = d2_val; if (d1_we && d1_row == row2) e2 = d1_val;
      if (fwd1 != 0 && fwd2 != 0) doubles++;
      checks++;
      if (op1 !== e1 || op2 !== e2) begin failures++; $display("FAIL %0d", i); end
    end
    checks++; if (doubles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

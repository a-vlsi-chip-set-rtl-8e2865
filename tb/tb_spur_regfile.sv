// tb_spur_regfile: checks the window decoder against an independent model
// of the overlapped windows (caller r26-r31 == callee r10-r15, globals shared
// by all windows, locals private) and the write-through read, with a shadow
// copy of all 138 rows kept in the testbench.
module tb_spur_regfile;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] cwp; logic [4:0] rs1, rs2; logic [7:0] row1, row2, wrow;
  word40_t rd1, rd2, wd;
  spur_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // reference mapping: written independently from the register groups
  function automatic int ref_row(int r, int w);
    if (r < 10) return r;
    if (r >= 16 && r < 26) return 10 + 10*w + (r - 16);
    if (r < 16) return 90 + 6*w + (r - 10);
    return 90 + 6*((w + 1) % 8) + (r - 26);
  endfunction
  word40_t shadow [138];
  initial begin
    cwp = 0; rs1 = 0; rs2 = 0; wrow = 0; wd = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    // overlap and distinctness of the mapping
    for (int w = 0; w < 8; w++) begin
      checks++;
      if (win_map(5'd26, 3'(w)) != win_map(5'd10, 3'((w + 1) % 8))) failures++;
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (int'(win_map(5'(r), 3'(w))) != ref_row(r, w)) begin failures++; $display("FAIL map r%0d w%0d", r, w); end
      end
    end
    // random writes by (register, window), reads in other windows
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cwp = 3'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      we = $urandom_range(0, 1);
      wrow = 8'(ref_row($urandom_range(0, 31), $urandom_range(0, 7)));
      wd = {8'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (rd1 !== ((we && wrow == ref_row(rs1, cwp)) ? wd : shadow[ref_row(rs1, cwp)]) ||
          rd2 !== ((we && wrow == ref_row(rs2, cwp)) ? wd : shadow[ref_row(rs2, cwp)])) begin
        failures++; $display("FAIL read cwp=%0d rs1=%0d rs2=%0d", cwp, rs1, rs2);
      end
      @(posedge clk);
      if (we) shadow[wrow] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

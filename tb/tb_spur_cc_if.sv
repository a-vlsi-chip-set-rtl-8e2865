// tb_spur_cc_if: checks port priority (data reference over demand fetch over
// prefetch), the cache opcodes, the mode bits and the grant to the IU.
module tb_spur_cc_if;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic d_req, i_req, i_pref, i_gnt, kernel, virt; cache_op_e d_op, cc_op;
  logic [31:0] d_addr, cc_addr; word40_t d_wdata, cc_wdata; logic [29:0] i_waddr; logic [1:0] cc_mode;
  spur_cc_if dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      {d_req, i_req, i_pref, kernel, virt} = 5'($urandom);
      d_op = cache_op_e'($urandom_range(1, 8)); d_addr = $urandom; i_waddr = 30'($urandom);
      d_wdata = {8'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (cc_mode !== {kernel, !virt} || cc_wdata !== d_wdata) failures++;
      checks++;
      if (d_req) begin
        if (cc_op !== d_op || cc_addr !== d_addr || i_gnt) begin failures++; $display("FAIL data"); end
      end else if (i_req) begin
        if (cc_op !== (i_pref ? CO_PREFETCH : CO_IFETCH) || cc_addr !== {i_waddr, 2'b0} || !i_gnt) begin
          failures++; $display("FAIL ifetch"); end
      end else if (cc_op !== CO_NONE || i_gnt) begin failures++; $display("FAIL idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

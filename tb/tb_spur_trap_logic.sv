// tb_spur_trap_logic: checks priority, PSW enables, the global trap enable
// and the vector (trap base concatenated with the type).
module tb_spur_trap_logic;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic valid, illegal, wovf, wunf, tag_exc, gen_exc, ovf_exc, fault, fpu_exc, intr, take;
  logic [9:0] kpsw, upsw; logic [31:0] tbr, vector; trap_e ttype, e;
  spur_trap_logic dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    tbr = 32'hABCD_1200;
    for (int i = 0; i < 3000; i++) begin
      {valid, illegal, wovf, wunf, tag_exc, gen_exc, ovf_exc, fault, fpu_exc, intr} = 10'($urandom);
      if ($urandom_range(0, 2) != 0) {illegal, wovf, wunf, tag_exc, gen_exc, ovf_exc, fault, fpu_exc} = 0;
      kpsw = 10'($urandom); upsw = 10'($urandom);
      #1;
      e = TT_NONE;
      if (kpsw[0]) begin
        if (valid && fault) e = TT_FAULT;
        else if (valid && illegal) e = TT_ILLEGAL;
        else if (fpu_exc) e = TT_FPU;
        else if (valid && wovf) e = TT_WOVF;
        else if (valid && wunf) e = TT_WUNF;
        else if (valid && tag_exc && upsw[2]) e = TT_TAG;
        else if (valid && gen_exc && upsw[4]) e = TT_GEN;
        else if (valid && ovf_exc && upsw[3]) e = TT_OVF;
        else if (valid && intr && kpsw[1]) e = TT_INTR;
      end
      checks++;
      if (ttype !== e || take !== (e != TT_NONE) || vector !== {24'hABCD12, 4'(e), 4'h0}) begin
        failures++; $display("FAIL got %0d exp %0d", ttype, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

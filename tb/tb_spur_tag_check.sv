// tb_spur_tag_check: checks the fixnum, cons-pointer and generation checks
// and their enables on random tags.
module tb_spur_tag_check;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  word40_t a, b; logic tag_chk, ptr_chk, gen_chk, tag_en, gen_en, tag_trap, gen_trap, et, eg;
  spur_tag_check dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom_range(0,3), 6'($urandom_range(0, 3)), 32'($urandom)};
      b = {$urandom_range(0,3), 6'($urandom_range(0, 3)), 32'($urandom)};
      {tag_chk, ptr_chk, gen_chk, tag_en, gen_en} = 5'($urandom);
      #1;
      et = tag_en && ((tag_chk && (a[37:32] != 0 || b[37:32] != 0)) || (ptr_chk && a[37:32] != 1));
      eg = gen_en && gen_chk && (b[39:38] > a[39:38]);
      checks++;
      if (tag_trap !== et || gen_trap !== eg) begin failures++; $display("FAIL a=%h b=%h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

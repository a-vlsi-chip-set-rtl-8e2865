// tb_pcc_stack: random push/pop/replace/flush against a queue model,
// never overflowing or underflowing; checks top of stack and depth.
module tb_pcc_stack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; logic [2:0] op, din, tos; logic [2:0] depth;
  logic [2:0] model [$];
  pcc_stack dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    op = 0; din = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      do op = 3'($urandom_range(0, 4));
      while ((op == 1 && model.size() == 4) || (op == 2 && model.size() == 0) || (op == 4 && $urandom_range(0, 5) != 0));
      din = 3'($urandom);
      @(posedge clk); #1;
      case (op)
        1: model.push_back(din);
        2: void'(model.pop_back());
        3: if (model.size() != 0) model[model.size()-1] = din;
        4: model.delete();
        default: ;
      endcase
      checks++;
      if (int'(depth) != model.size() || tos !== (model.size() == 0 ? 3'd0 : model[model.size()-1])) begin
        failures++; $display("FAIL op %0d depth %0d", op, depth);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_backtrack_stack: random push/pop against a queue model of a LIFO.
module tb_backtrack_stack;
  localparam int DEPTH = 4, W = 16;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [W-1:0] pd, top;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  backtrack_stack #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .clear, .push, .push_data(pd), .pop, .top, .empty, .full);
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) chk(top == model[$], "top");
      push = 0; pop = 0; clear = 0;
      if ($urandom_range(0, 99) == 0) clear = 1;
      else if (model.size() > 0 && ($urandom_range(0, 1) == 1 || model.size() == DEPTH)) pop = 1;
      else if (model.size() < DEPTH) begin push = 1; pd = W'($urandom); end
      @(posedge clk);
      if (clear) model.delete();
      else if (pop) void'(model.pop_back());
      else if (push) model.push_back(pd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

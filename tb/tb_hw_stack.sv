// tb_hw_stack: push/pop order, four levels, loss of the oldest entry on a
// fifth push, and random push/pop against a queue model of depth 4.
module tb_hw_stack;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  pc_t d = 0, top;
  pc_t model [$];
  int checks = 0, failures = 0;

  hw_stack #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic do_push(pc_t v);
    push = 1; d = v; @(negedge clk); push = 0;
    model.push_front(v);
    if (model.size() > 4) void'(model.pop_back());
  endtask

  task automatic do_pop();
    pop = 1; @(negedge clk); pop = 0;
    if (model.size() > 0) void'(model.pop_front());
  endtask

  function automatic pc_t mtop();
    return (model.size() > 0) ? model[0] : 16'h0000;
  endfunction

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 1; i <= 5; i++) do_push(pc_t'(16'h100 * i));
    check("top after 5 pushes", top, 16'h0500);
    do_pop(); check("pop 1", top, 16'h0400);
    do_pop(); check("pop 2", top, 16'h0300);
    do_pop(); check("pop 3", top, 16'h0200);
    do_pop(); check("oldest lost", top, 16'h0000);
    for (int i = 0; i < 500; i++) begin
      if ($urandom_range(0, 1)) do_push(pc_t'($urandom)); else do_pop();
      check("random", top, mtop());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

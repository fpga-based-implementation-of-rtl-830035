// tb_program_counter: reset to 0, increment, load, load priority, hold.
module tb_program_counter;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0, inc = 0, load = 0;
  pc_t d = 0, pc;
  pc_t model;
  int checks = 0, failures = 0;

  program_counter dut (.*);

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

  initial begin
    @(negedge clk);
    check("reset", pc, 0);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      inc = 1'($urandom); load = ($urandom_range(0, 4) == 0); d = pc_t'($urandom);
      @(negedge clk);
      if (load) model = d; else if (inc) model = model + 1;
      check("pc", pc, model);
    end
    load = 1; d = 16'hFFFF; inc = 0; @(negedge clk);
    load = 0; inc = 1; @(negedge clk);
    check("wrap", pc, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

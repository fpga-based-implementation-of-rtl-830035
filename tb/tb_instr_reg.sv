// tb_instr_reg: resets to NOP, loads only when load is high.
module tb_instr_reg;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  instr_t d = 24'hABCDEF, ir, model;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

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
    check("reset NOP", ir, NOP_WORD);
    rst_n = 1;
    model = NOP_WORD;
    for (int i = 0; i < 500; i++) begin
      load = 1'($urandom); d = instr_t'($urandom);
      @(negedge clk);
      if (load) model = d;
      check("ir", ir, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

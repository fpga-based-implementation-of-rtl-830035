// tb_program_rom: loads a word pattern through the load port and reads it
// back combinationally, including address wrap modulo DEPTH.
module tb_program_rom;
  import mcu_pkg::*;

  localparam int unsigned DEPTH = 1024;
  logic clk = 0, prog_we = 0;
  pc_t addr = 0, prog_addr = 0;
  instr_t q, prog_wdata = 0;
  int checks = 0, failures = 0;

  program_rom #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t pat(int a);
    return instr_t'(a * 32'h9E3779 + 32'h1234);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); prog_we = 1; prog_addr = pc_t'(a); prog_wdata = pat(a);
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      addr = pc_t'(a); #1;
      check("read", q, pat(a));
    end
    addr = pc_t'(DEPTH + 5); #1;
    check("wrap", q, pat(5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

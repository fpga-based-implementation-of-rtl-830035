// tb_reg_file: random writes and dual reads against a model array, the Z
// pointer port and the priority of the data-bus write over it.
module tb_reg_file;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_addr_t ra, rb, wa;
  word_t da, db, wd, z, z_wd;
  logic we = 0, z_we = 0;
  word_t model [16];
  int checks = 0, failures = 0;

  reg_file dut (.*);

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
    ra = 0; rb = 0; wa = 0; wd = 0; z_wd = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin ra = 4'(i); #1; check("reset value", da, 0); end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); wa = 4'($urandom); wd = word_t'($urandom);
      z_we = ($urandom_range(0, 3) == 0); z_wd = word_t'($urandom);
      @(negedge clk);
      if (z_we) model[15] = z_wd;
      if (we) model[wa] = wd;
      we = 0; z_we = 0;
      ra = 4'($urandom); rb = 4'($urandom); #1;
      check("port A", da, model[ra]);
      check("port B", db, model[rb]);
      check("Z", z, model[15]);
    end
    // both ports write R15: bus write wins
    we = 1; wa = 15; wd = 16'h1111; z_we = 1; z_wd = 16'h2222;
    @(negedge clk); we = 0; z_we = 0;
    check("bus write wins", z, 16'h1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_status_reg: masked flag update, I set/clear, write and read over the
// I/O bus, and priority of a bus write over a flag update.
module tb_status_reg;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  sreg_t alu_flags, alu_mask, sreg;
  logic flag_we = 0, i_set = 0, i_clr = 0;
  io_req_t io;
  word_t io_rdata;
  logic io_hit;
  int checks = 0, failures = 0;

  status_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    io = '0; alu_flags = '0; alu_mask = '0;
    @(negedge clk); rst_n = 1;
    check("reset", sreg, 8'h00);
    // update C and Z only
    alu_flags = 8'hFF; alu_mask = 8'h03; flag_we = 1;
    @(negedge clk); flag_we = 0;
    check("masked update", sreg, 8'h03);
    alu_flags = 8'h00; alu_mask = 8'h01; flag_we = 1;
    @(negedge clk); flag_we = 0;
    check("clear C only", sreg, 8'h02);
    i_set = 1; @(negedge clk); i_set = 0;
    check("I set", sreg, 8'h82);
    i_clr = 1; @(negedge clk); i_clr = 0;
    check("I clear", sreg, 8'h02);
    // bus write wins over flag update
    io = '{addr: IO_SREG, rd: 1'b0, wr: 1'b1, wdata: 16'h00A5};
    alu_flags = 8'h00; alu_mask = 8'hFF; flag_we = 1;
    @(negedge clk); flag_we = 0;
    io = '{addr: IO_SREG, rd: 1'b1, wr: 1'b0, wdata: 16'h0};
    #1;
    check("bus write", sreg, 8'hA5);
    check("bus read", io_rdata, 16'h00A5);
    check("hit", io_hit, 1);
    io.addr = IO_PORTB; #1;
    check("no hit", io_hit, 0);
    // random masked updates against a model
    for (int i = 0; i < 200; i++) begin
      logic [7:0] prev, f, m;
      prev = sreg; f = 8'($urandom); m = 8'($urandom);
      alu_flags = f; alu_mask = m; flag_we = 1; io = '0;
      @(negedge clk);
      check("random masked update", sreg, (prev & ~m) | (f & m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

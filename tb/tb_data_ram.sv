// tb_data_ram: random writes and reads against a model, address wrap.
module tb_data_ram;
  import mcu_pkg::*;

  localparam int unsigned DEPTH = 256;
  logic clk = 0, we = 0;
  word_t addr = 0, wd = 0, rd;
  word_t model [DEPTH];
  logic  valid [DEPTH];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      addr = word_t'($urandom_range(0, DEPTH - 1));
      if ($urandom_range(0, 1) == 0) begin
        we = 1; wd = word_t'($urandom);
        @(negedge clk); we = 0;
        model[addr] = wd; valid[addr] = 1;
      end else begin
        #1;
        if (valid[addr]) check("read", rd, model[addr]);
        @(negedge clk);
      end
    end
    we = 1; addr = 16'h0105; wd = 16'hBEEF; @(negedge clk); we = 0;
    addr = 16'h0005; #1;
    check("wrap", rd, 16'hBEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

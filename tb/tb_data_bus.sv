// tb_data_bus: each source selection, the I/O responder selection and the
// zero value of an unanswered I/O read.
module tb_data_bus;
  import mcu_pkg::*;

  localparam int unsigned NIO = 6;
  logic clk = 0;
  bus_src_e src;
  word_t alu, ram, tmp, bus;
  word_t io_rdata [NIO];
  logic  io_hit [NIO];
  int checks = 0, failures = 0;

  data_bus #(.NIO(NIO)) dut (.*);

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
    for (int i = 0; i < 200; i++) begin
      int k;
      alu = word_t'($urandom); ram = word_t'($urandom); tmp = word_t'($urandom);
      for (int j = 0; j < NIO; j++) begin io_rdata[j] = word_t'($urandom); io_hit[j] = 0; end
      k = $urandom_range(0, NIO);          // NIO: nobody answers
      if (k < NIO) io_hit[k] = 1;
      src = BUS_ALU;  #1; check("alu", bus, alu);
      src = BUS_RAM;  #1; check("ram", bus, ram);
      src = BUS_TMP;  #1; check("tmp", bus, tmp);
      src = BUS_NONE; #1; check("none", bus, 0);
      src = BUS_IO;   #1; check("io", bus, (k < NIO) ? io_rdata[k] : 16'h0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

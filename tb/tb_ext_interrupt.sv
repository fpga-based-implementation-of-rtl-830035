// tb_ext_interrupt: falling, rising and any-edge sense set the flag; the
// interrupt needs its enable; ack and writing 1 clear the flag; low-level
// mode follows the pin.
module tb_ext_interrupt;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0, int_pin = 1, ack = 0, irq;
  io_req_t io;
  word_t io_rdata;
  logic io_hit;
  int checks = 0, failures = 0;

  ext_interrupt dut (.*);

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

  task automatic wr(io_addr_t a, word_t v);
    io = '{addr: a, rd: 1'b0, wr: 1'b1, wdata: v}; @(negedge clk); io = '0;
  endtask

  task automatic rd(io_addr_t a, output word_t v);
    io = '{addr: a, rd: 1'b1, wr: 1'b0, wdata: 16'h0};
    #1 v = io_rdata;
    io = '0;
  endtask

  task automatic pin(logic v);
    int_pin = v; repeat (4) @(negedge clk);
  endtask

  initial begin
    word_t v;
    io = '0;
    @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // falling edge, disabled: flag but no irq
    wr(IO_MCUCR, 16'h0002);
    pin(0);
    rd(IO_GIFR, v); check("flag on falling edge", v, 16'h0040);
    check("no irq while disabled", irq, 0);
    wr(IO_GIMSK, 16'h0040);
    check("irq when enabled", irq, 1);
    ack = 1; @(negedge clk); ack = 0;
    check("ack clears", irq, 0);
    pin(1);
    check("rising ignored in falling mode", irq, 0);
    // rising edge
    wr(IO_MCUCR, 16'h0003);
    pin(0);
    check("falling ignored in rising mode", irq, 0);
    pin(1);
    check("rising sets", irq, 1);
    wr(IO_GIFR, 16'h0040);
    check("write 1 clears", irq, 0);
    // any edge
    wr(IO_MCUCR, 16'h0001);
    pin(0);
    check("any edge: falling", irq, 1);
    wr(IO_GIFR, 16'h0040);
    pin(1);
    check("any edge: rising", irq, 1);
    wr(IO_GIFR, 16'h0040);
    // low level
    wr(IO_MCUCR, 16'h0000);
    check("level high: no irq", irq, 0);
    pin(0);
    check("level low: irq", irq, 1);
    pin(1);
    check("level released", irq, 0);
    rd(IO_MCUCR, v); check("read MCUCR", v, 16'h0000);
    rd(IO_GIMSK, v); check("read GIMSK", v, 16'h0040);
    io = '{addr: IO_GIMSK, rd: 1'b1, wr: 1'b0, wdata: 16'h0}; #1 check("hit", io_hit, 1); io = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

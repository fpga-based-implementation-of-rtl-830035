// tb_timer16: counting at the prescaler rates, overflow flag and interrupt,
// compare match with clear-on-match and OC toggle/set/clear (period OCR+1),
// input capture on rising and falling edges, write-one-to-clear flags.
module tb_timer16;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0, icp = 0, oc, irq;
  io_req_t io;
  word_t io_rdata;
  logic io_hit;
  int checks = 0, failures = 0;

  timer16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    word_t t0, t1, v;
    int toggles;
    logic last;
    io = '0;
    @(negedge clk); rst_n = 1;
    // clk/1
    wr(IO_TCNT, 16'h0000);
    wr(IO_TCCR, 16'h0001);
    rd(IO_TCNT, t0);
    repeat (10) @(negedge clk);
    rd(IO_TCNT, t1);
    check("clk/1 rate", t1 - t0, 10);
    // clk/8 and clk/64
    wr(IO_TCCR, 16'h0002);
    rd(IO_TCNT, t0);
    repeat (64) @(negedge clk);
    rd(IO_TCNT, t1);
    check("clk/8 rate", t1 - t0, 8);
    wr(IO_TCCR, 16'h0003);
    rd(IO_TCNT, t0);
    repeat (640) @(negedge clk);
    rd(IO_TCNT, t1);
    check("clk/64 rate", t1 - t0, 10);
    wr(IO_TCCR, 16'h0000);
    rd(IO_TCNT, t0);
    repeat (50) @(negedge clk);
    rd(IO_TCNT, t1);
    check("stopped", t1 - t0, 0);
    // overflow
    wr(IO_TIFR, 16'h0007);
    wr(IO_TIMSK, 16'h0001);
    wr(IO_TCNT, 16'hFFFD);
    check("no irq before overflow", irq, 0);
    wr(IO_TCCR, 16'h0001);
    repeat (3) @(negedge clk);
    rd(IO_TIFR, v); check("overflow flag", v & 16'h1, 1);
    check("overflow irq", irq, 1);
    wr(IO_TIFR, 16'h0001);
    check("flag cleared by writing 1", irq, 0);
    // compare with clear on match, toggle OC
    wr(IO_TCCR, 16'h0000);
    wr(IO_TIMSK, 16'h0002);
    wr(IO_OCR, 16'd9);
    wr(IO_TCNT, 16'd0);
    wr(IO_TIFR, 16'h0007);
    wr(IO_TCCR, 16'h0019);       // clk/1, CTC, toggle
    toggles = 0; last = oc;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      if (oc != last) toggles++;
      last = oc;
    end
    check("OC toggles once per OCR+1 clocks", toggles, 10);
    check("compare irq", irq, 1);
    rd(IO_TCNT, v); check("TCNT stays below OCR+1", v <= 9, 1);
    // set and clear actions
    wr(IO_TCCR, 16'h0000);
    wr(IO_TCNT, 16'd0);
    wr(IO_TCCR, 16'h0039);       // set on match
    repeat (12) @(negedge clk);
    check("OC set on match", oc, 1);
    wr(IO_TCCR, 16'h0029);       // clear on match
    repeat (12) @(negedge clk);
    check("OC cleared on match", oc, 0);
    // input capture, rising edge, counter stopped at a known value
    wr(IO_TCCR, 16'h0040);
    wr(IO_TCNT, 16'h1234);
    wr(IO_TIFR, 16'h0007);
    icp = 1;
    repeat (4) @(negedge clk);
    rd(IO_ICR, v); check("capture rising", v, 16'h1234);
    rd(IO_TIFR, v); check("capture flag", v & 16'h4, 16'h4);
    // falling edge selected: the rising edge is ignored, the falling one captures
    wr(IO_TCCR, 16'h0000);
    wr(IO_TCNT, 16'h5678);
    icp = 0; repeat (4) @(negedge clk);
    rd(IO_ICR, v); check("capture falling", v, 16'h5678);
    wr(IO_TCNT, 16'h9ABC);
    icp = 1; repeat (4) @(negedge clk);
    rd(IO_ICR, v); check("rising ignored when falling selected", v, 16'h5678);
    #1 check("io hit", io_hit, 0);
    io = '{addr: IO_OCR, rd: 1'b1, wr: 1'b0, wdata: 16'h0}; #1 check("io hit on OCR", io_hit, 1); io = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_io_port: PORT and DDR write/read, pad outputs and enables, PIN read
// after the two-clock synchroniser, address decode and hit.
module tb_io_port;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  io_req_t io;
  word_t io_rdata;
  logic io_hit;
  logic [7:0] pin_in = 8'h00, pin_out, pin_oe;
  int checks = 0, failures = 0;

  io_port #(.W(8), .PIN_ADDR(IO_PINC), .DDR_ADDR(IO_DDRC), .PORT_ADDR(IO_PORTC)) dut (.*);

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

  task automatic rd(io_addr_t a, output word_t v, output logic h);
    io = '{addr: a, rd: 1'b1, wr: 1'b0, wdata: 16'h0}; #1; v = io_rdata; h = io_hit; @(negedge clk); io = '0;
  endtask

  initial begin
    word_t v; logic h;
    io = '0;
    @(negedge clk); rst_n = 1;
    check("reset oe", pin_oe, 0); check("reset out", pin_out, 0);
    for (int i = 0; i < 100; i++) begin
      logic [7:0] p, dd, pi;
      p = 8'($urandom); dd = 8'($urandom); pi = 8'($urandom);
      wr(IO_PORTC, {8'hFF, p});
      wr(IO_DDRC, {8'hFF, dd});
      check("pin_out", pin_out, p);
      check("pin_oe", pin_oe, dd);
      rd(IO_PORTC, v, h); check("read PORT", v, {8'h00, p}); check("hit", h, 1);
      rd(IO_DDRC, v, h);  check("read DDR", v, {8'h00, dd});
      pin_in = pi;
      @(negedge clk); @(negedge clk);
      rd(IO_PINC, v, h);  check("read PIN after sync", v, {8'h00, pi});
    end
    // synchroniser latency: one clock after a change PIN still shows the old value
    pin_in = 8'h3C; @(negedge clk); @(negedge clk);
    pin_in = 8'hC3; @(negedge clk);
    rd(IO_PINC, v, h); check("PIN one clock later still old", v, 16'h003C);
    rd(IO_PINC, v, h); check("PIN two clocks later new", v, 16'h00C3);
    rd(IO_PORTB, v, h); check("other address no hit", h, 0);
    wr(IO_PORTC, 16'h00AA);
    wr(IO_PORTB, 16'h0055); check("other address no write", pin_out, 8'hAA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

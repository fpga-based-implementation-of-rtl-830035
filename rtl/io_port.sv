// io_port: 8-bit bidirectional I/O port (used for ports B, C and D).
//
// Three I/O registers as on the AVR: PORT (output data, PORT_ADDR), DDR
// (direction, 1 = output, DDR_ADDR) and PIN (read-only pad levels, PIN_ADDR).
// A pad drives pin_out when its DDR bit is set (pin_oe); the pads themselves
// are outside, so this module has separate in/out/enable signals. Pad inputs
// pass a two-flip-flop synchroniser, so PIN shows a pad change two clocks
// later. Registers are written from the data bus at the rising edge when
// io.wr and the address match; reads are combinational and zero-extended to
// 16 bits. io_hit tells the data bus that this port answers the address.
// Reset clears PORT and DDR (all pads inputs). Three ports of eight lines give
// the design's 24 I/O lines; the register set and addresses are this design's
// choice, after the AVR.
module io_port
  import mcu_pkg::*;
#(
  parameter int unsigned W         = 8,
  parameter io_addr_t    PIN_ADDR  = IO_PINB,
  parameter io_addr_t    DDR_ADDR  = IO_DDRB,
  parameter io_addr_t    PORT_ADDR = IO_PORTB
) (
  input  logic         clk,
  input  logic         rst_n,
  input  io_req_t      io,
  output word_t        io_rdata,
  output logic         io_hit,
  input  logic [W-1:0] pin_in,
  output logic [W-1:0] pin_out,
  output logic [W-1:0] pin_oe
);

  logic [W-1:0] port_q, ddr_q, sync1_q, sync2_q;

  assign pin_out = port_q;
  assign pin_oe  = ddr_q;

  always_comb begin
    io_hit   = (io.rd || io.wr) &&
               (io.addr == PIN_ADDR || io.addr == DDR_ADDR || io.addr == PORT_ADDR);
    io_rdata = '0;
    if (io.addr == PORT_ADDR)     io_rdata[W-1:0] = port_q;
    else if (io.addr == DDR_ADDR) io_rdata[W-1:0] = ddr_q;
    else if (io.addr == PIN_ADDR) io_rdata[W-1:0] = sync2_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_q  <= '0;
      ddr_q   <= '0;
      sync1_q <= '0;
      sync2_q <= '0;
    end else begin
      sync1_q <= pin_in;
      sync2_q <= sync1_q;
      if (io.wr && io.addr == PORT_ADDR) port_q <= io.wdata[W-1:0];
      if (io.wr && io.addr == DDR_ADDR)  ddr_q  <= io.wdata[W-1:0];
    end
  end

endmodule

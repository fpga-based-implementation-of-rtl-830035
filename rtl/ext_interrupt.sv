// ext_interrupt: external interrupt input INT0.
//
// The pad is synchronised by two flip-flops. MCUCR[1:0] selects the sense:
// 00 low level, 01 any edge, 10 falling edge, 11 rising edge. An edge sets
// the flag GIFR[6]; the flag clears when the control unit takes the interrupt
// vector (ack) or when software writes a 1 to it. GIMSK[6] enables the
// interrupt. irq = enable and (flag, or the synchronised pin low in level
// mode). Register writes are at the rising edge; reads are combinational.
// The register names, addresses and sense codes follow the AT90S1200 and are
// this design's choice.
module ext_interrupt
  import mcu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  io_req_t io,
  output word_t   io_rdata,
  output logic    io_hit,
  input  logic    int_pin,
  input  logic    ack,
  output logic    irq
);

  logic [1:0] isc_q;
  logic       en_q, flag_q;
  logic       s1_q, s2_q, s3_q;
  logic       edge_ev;

  always_comb begin
    unique case (isc_q)
      2'b01:   edge_ev = s2_q ^ s3_q;
      2'b10:   edge_ev = !s2_q && s3_q;
      2'b11:   edge_ev = s2_q && !s3_q;
      default: edge_ev = 1'b0;
    endcase
  end

  assign irq = en_q && ((isc_q == 2'b00) ? !s2_q : flag_q);

  always_comb begin
    io_hit   = (io.rd || io.wr) && (io.addr inside {IO_MCUCR, IO_GIMSK, IO_GIFR});
    io_rdata = '0;
    unique case (io.addr)
      IO_MCUCR: io_rdata[1:0] = isc_q;
      IO_GIMSK: io_rdata[6]   = en_q;
      IO_GIFR:  io_rdata[6]   = flag_q;
      default:  io_rdata      = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      isc_q  <= '0;
      en_q   <= 1'b0;
      flag_q <= 1'b0;
      s1_q   <= 1'b1;
      s2_q   <= 1'b1;
      s3_q   <= 1'b1;
    end else begin
      s1_q <= int_pin;
      s2_q <= s1_q;
      s3_q <= s2_q;
      if (io.wr && io.addr == IO_MCUCR) isc_q <= io.wdata[1:0];
      if (io.wr && io.addr == IO_GIMSK) en_q  <= io.wdata[6];
      if (edge_ev)
        flag_q <= 1'b1;
      else if (ack || (io.wr && io.addr == IO_GIFR && io.wdata[6]))
        flag_q <= 1'b0;
    end
  end

endmodule

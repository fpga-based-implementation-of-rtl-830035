// timer16: 16-bit timer/counter with output compare and input capture.
//
// Built from a clock controller (clock_prescaler), the 16-bit counter TCNT, a
// comparator against the output compare register OCR, and the input capture
// register ICR. I/O registers (addresses from mcu_pkg):
//   TCCR  [2:0] clock select, [3] clear TCNT on compare match,
//         [5:4] OC pin action on match (01 toggle, 10 clear, 11 set),
//         [6] capture edge (1 rising, 0 falling)
//   TCNT  counter (writable)   OCR compare value   ICR capture (read only)
//   TIFR  flags: [0] overflow, [1] compare match, [2] capture; write 1 to clear
//   TIMSK enables, same bit positions
// On each prescaler tick the counter increments; when TCNT equals OCR on a
// tick the compare flag is set, the OC pin acts and, with TCCR[3], TCNT
// restarts at 0 (period OCR+1 ticks). Overflow is a tick at 0xFFFF. The ICP
// pin is synchronised by two flip-flops; the chosen edge copies TCNT into ICR
// and sets the capture flag. irq is high while any enabled flag is set; the
// interrupt routine clears flags by writing ones to TIFR (a flag set in the
// same cycle wins). All register writes are at the rising edge, reads are
// combinational. The design names the 16-bit timer, its input capture and
// output compare and the comparator; the register set is this design's own.
module timer16
  import mcu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  io_req_t io,
  output word_t   io_rdata,
  output logic    io_hit,
  input  logic    icp,
  output logic    oc,
  output logic    irq
);

  logic [6:0] tccr_q;
  word_t      tcnt_q, ocr_q, icr_q;
  logic [2:0] tifr_q, timsk_q;
  logic       oc_q;
  logic       icp1_q, icp2_q, icp3_q;
  logic       tick, match, ovf, cap;

  clock_prescaler u_presc (.clk(clk), .rst_n(rst_n), .sel(tccr_q[2:0]), .tick(tick));

  assign match = tick && (tcnt_q == ocr_q);
  assign ovf   = tick && (tcnt_q == 16'hFFFF) && !(tccr_q[3] && match);
  assign cap   = tccr_q[6] ? (icp2_q && !icp3_q) : (!icp2_q && icp3_q);
  assign oc    = oc_q;
  assign irq   = |(tifr_q & timsk_q);

  always_comb begin
    io_hit   = (io.rd || io.wr) &&
               (io.addr inside {IO_TCCR, IO_TCNT, IO_OCR, IO_ICR, IO_TIFR, IO_TIMSK});
    io_rdata = '0;
    unique case (io.addr)
      IO_TCCR:  io_rdata = {9'd0, tccr_q};
      IO_TCNT:  io_rdata = tcnt_q;
      IO_OCR:   io_rdata = ocr_q;
      IO_ICR:   io_rdata = icr_q;
      IO_TIFR:  io_rdata = {13'd0, tifr_q};
      IO_TIMSK: io_rdata = {13'd0, timsk_q};
      default:  io_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tccr_q  <= '0;
      tcnt_q  <= '0;
      ocr_q   <= '0;
      icr_q   <= '0;
      tifr_q  <= '0;
      timsk_q <= '0;
      oc_q    <= 1'b0;
      icp1_q  <= 1'b0;
      icp2_q  <= 1'b0;
      icp3_q  <= 1'b0;
    end else begin
      icp1_q <= icp;
      icp2_q <= icp1_q;
      icp3_q <= icp2_q;

      // counter
      if (io.wr && io.addr == IO_TCNT)  tcnt_q <= io.wdata;
      else if (tccr_q[3] && match)      tcnt_q <= '0;
      else if (tick)                    tcnt_q <= tcnt_q + 1'b1;

      if (io.wr && io.addr == IO_TCCR)  tccr_q  <= io.wdata[6:0];
      if (io.wr && io.addr == IO_OCR)   ocr_q   <= io.wdata;
      if (io.wr && io.addr == IO_TIMSK) timsk_q <= io.wdata[2:0];

      // output compare pin
      if (match) begin
        unique case (tccr_q[5:4])
          2'b01:   oc_q <= !oc_q;
          2'b10:   oc_q <= 1'b0;
          2'b11:   oc_q <= 1'b1;
          default: oc_q <= oc_q;
        endcase
      end

      // input capture
      if (cap) icr_q <= tcnt_q;

      // flags: write one to clear, a new event wins
      tifr_q <= ((io.wr && io.addr == IO_TIFR) ? (tifr_q & ~io.wdata[2:0]) : tifr_q)
                | {cap, match, ovf};
    end
  end

endmodule

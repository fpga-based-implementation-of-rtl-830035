// status_reg: the 8-bit status register (I P H S V N Z C, bit 7 to bit 0).
//
// The ALU writes its flags over a direct connection; only the flags named by
// alu_mask change when flag_we is high. The control unit sets and clears the
// global interrupt enable I (SEI/CLI, interrupt entry, RETI). The register is
// also an I/O register at address ADDR, so programs can read and write it over
// the data bus (a bus write has priority). Its value goes straight to the
// control unit for branch evaluation.
//
// Timing: all updates take effect at the rising clock edge; reads are
// combinational. Reset clears every flag. The I/O address and the bit layout
// are this design's choice (AVR layout with P in the place of the AVR T bit).
module status_reg
  import mcu_pkg::*;
#(
  parameter io_addr_t ADDR = IO_SREG
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sreg_t   alu_flags,
  input  sreg_t   alu_mask,
  input  logic    flag_we,
  input  logic    i_set,
  input  logic    i_clr,
  input  io_req_t io,
  output word_t   io_rdata,
  output logic    io_hit,
  output sreg_t   sreg
);

  sreg_t sreg_q;

  assign io_hit   = (io.addr == ADDR) && (io.rd || io.wr);
  assign io_rdata = {8'h00, sreg_q};
  assign sreg     = sreg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg_q <= '0;
    end else if (io.wr && io.addr == ADDR) begin
      sreg_q <= sreg_t'(io.wdata[7:0]);
    end else begin
      if (flag_we)
        sreg_q <= (sreg_q & ~alu_mask) | (alu_flags & alu_mask);
      if (i_set)
        sreg_q.i <= 1'b1;
      else if (i_clr)
        sreg_q.i <= 1'b0;
    end
  end

endmodule

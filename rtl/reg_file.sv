// reg_file: sixteen 16-bit general purpose registers.
//
// Two combinational read ports give the ALU its operands Rd (ra) and Rr (rb);
// the register addresses come straight from instruction-register fields. The
// one general write port takes its data from the common data bus. R15 doubles
// as the Z pointer of indirect data addressing: it is always visible on z, and
// the z_we/z_wd port lets the control unit decrement or increment it during
// LD/ST -Z / Z+ without using the data bus (a dedicated port is this design's
// choice). If both ports write R15 in the same cycle the data-bus write wins.
// Writes take effect at the rising edge; reset clears all registers.
module reg_file
  import mcu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t ra,
  input  reg_addr_t rb,
  output word_t     da,
  output word_t     db,
  input  logic      we,
  input  reg_addr_t wa,
  input  word_t     wd,
  output word_t     z,
  input  logic      z_we,
  input  word_t     z_wd
);

  word_t regs [NREG];

  assign da = regs[ra];
  assign db = regs[rb];
  assign z  = regs[ZREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      if (z_we) regs[ZREG] <= z_wd;
      if (we)   regs[wa]   <= wd;
    end
  end

endmodule

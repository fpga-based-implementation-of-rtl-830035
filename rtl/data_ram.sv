// data_ram: data SRAM of 16-bit words.
//
// Addressed indirectly through the Z pointer (LD/ST). A write (we) stores the
// data-bus value at the rising edge; the read is combinational so the LD state
// can put the word on the data bus in the same cycle. DEPTH (default 256) is
// this design's choice; addresses wrap modulo DEPTH. Contents are not reset.
module data_ram
  import mcu_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wd,
  output word_t rd
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t mem [DEPTH];

  assign rd = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wd;
  end

endmodule

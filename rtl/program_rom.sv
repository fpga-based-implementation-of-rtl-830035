// program_rom: program memory of 24-bit instruction words.
//
// Read combinationally at the address from the fetch logic so that the
// instruction register can latch the word in the same cycle. DEPTH words
// (default 1024, this design's choice); addresses wrap modulo DEPTH. The
// program is written through a synchronous load port (prog_we, prog_addr,
// prog_wdata), which stands for the FPGA configuration or flash-programming
// path; the processor itself never writes it.
module program_rom
  import mcu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic   clk,
  input  pc_t    addr,
  output instr_t q,
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_wdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t mem [DEPTH];

  assign q = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW-1:0]] <= prog_wdata;
  end

endmodule

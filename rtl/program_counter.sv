// program_counter: 16-bit program counter of the fetch unit.
//
// Holds the address of the next instruction to fetch from the program ROM.
// It increments by one on every fetch (inc) and loads a new address (load, d)
// for jumps, calls, returns, taken branches, interrupt vectors and skips; a
// load has priority over an increment. Updates happen at the rising edge;
// reset sets it to 0, the reset vector (this design's choice).
module program_counter
  import mcu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  input  logic load,
  input  pc_t  d,
  output pc_t  pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= VEC_RESET;
    else if (load) pc <= d;
    else if (inc)  pc <= pc + 1'b1;
  end

endmodule

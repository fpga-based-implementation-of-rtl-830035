// instr_reg: 24-bit instruction register.
//
// Latches the word read from the program ROM when load is high (the last
// cycle of each instruction, so the next instruction is prefetched while the
// current one finishes). The control unit decodes its content, and its
// register fields address the register file directly. Reset loads NOP, so the
// first cycle after reset fetches the instruction at address 0.
module instr_reg
  import mcu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  instr_t d,
  output instr_t ir
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ir <= NOP_WORD;
    else if (load) ir <= d;
  end

endmodule

// hw_stack: 4-level hardware return-address stack.
//
// Return addresses of RCALL and of interrupt entry are pushed, RET/RETI pop
// them. It is a shift register of DEPTH entries (default 4, the design's
// specified depth): a push shifts every entry one place down and the oldest
// entry falls off the end when the stack is full; a pop shifts up and fills
// the bottom with 0. top shows the most recent entry combinationally; push and
// pop act at the rising edge (push wins if both are high). The overflow
// behaviour follows the AT90S1200's hardware stack.
module hw_stack
  import mcu_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic pop,
  input  pc_t  d,
  output pc_t  top
);

  pc_t stk [DEPTH];

  assign top = stk[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (push) begin
      stk[0] <= d;
      for (int i = 1; i < DEPTH; i++) stk[i] <= stk[i-1];
    end else if (pop) begin
      for (int i = 0; i < DEPTH - 1; i++) stk[i] <= stk[i+1];
      stk[DEPTH-1] <= '0;
    end
  end

endmodule

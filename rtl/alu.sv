// alu: 16-bit combinational arithmetic and logic unit.
//
// Performs the eleven operations behind the instruction set (ADD, ADC, SUB,
// SBC, AND, OR, EOR, COM, NEG, INC, DEC) and a pass-through of operand B used
// to put a register or a constant on the data bus. Besides the result it
// returns the new status flags and a mask of the flags the operation updates,
// following the per-instruction flag table of the instruction set: arithmetic
// updates S,Z,C,N,V,H; logic S,Z,N,V; COM S,C,Z,N,V; NEG S,C,Z,N,V,H;
// INC/DEC S,Z,N,V; the pass-through none. The flag formulas are the AVR's
// widened to 16 bits (C out of bit 15, H out of bit 3); the parity flag P
// (set for an even number of ones) is updated with Z, which is this design's
// reading of its carry/zero/parity flag register.
//
// Purely combinational; a = Rd, b = Rr or the constant, c_in = carry flag.
module alu
  import mcu_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    c_in,
  output word_t   y,
  output sreg_t   flags,
  output sreg_t   mask
);

  logic [DW:0] sum;     // with carry out
  logic [4:0]  nib;     // low nibble with carry out of bit 3
  logic        v_add, v_sub;

  always_comb begin
    sum   = '0;
    nib   = '0;
    y     = '0;
    flags = '0;
    mask  = '0;
    v_add = 1'b0;
    v_sub = 1'b0;
    unique case (op)
      ALU_ADD, ALU_ADC: begin
        sum   = {1'b0, a} + {1'b0, b} + {{DW{1'b0}}, (op == ALU_ADC) & c_in};
        nib   = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'd0, (op == ALU_ADC) & c_in};
        y     = sum[DW-1:0];
        v_add = (a[DW-1] & b[DW-1] & ~y[DW-1]) | (~a[DW-1] & ~b[DW-1] & y[DW-1]);
        flags.c = sum[DW];
        flags.h = nib[4];
        flags.v = v_add;
        mask  = '{c: 1'b1, h: 1'b1, v: 1'b1, default: 1'b0};
      end
      ALU_SUB, ALU_SBC, ALU_NEG: begin
        // NEG is 0 - a
        if (op == ALU_NEG) begin
          sum = {1'b0, {DW{1'b0}}} - {1'b0, a};
          nib = 5'd0 - {1'b0, a[3:0]};
          y   = sum[DW-1:0];
          v_sub = (a[DW-1] & y[DW-1]);
        end else begin
          sum = {1'b0, a} - {1'b0, b} - {{DW{1'b0}}, (op == ALU_SBC) & c_in};
          nib = {1'b0, a[3:0]} - {1'b0, b[3:0]} - {4'd0, (op == ALU_SBC) & c_in};
          y   = sum[DW-1:0];
          v_sub = (a[DW-1] & ~b[DW-1] & ~y[DW-1]) | (~a[DW-1] & b[DW-1] & y[DW-1]);
        end
        flags.c = sum[DW];
        flags.h = nib[4];
        flags.v = v_sub;
        mask  = '{c: 1'b1, h: 1'b1, v: 1'b1, default: 1'b0};
      end
      ALU_AND: begin y = a & b; mask.v = 1'b1; end
      ALU_OR:  begin y = a | b; mask.v = 1'b1; end
      ALU_EOR: begin y = a ^ b; mask.v = 1'b1; end
      ALU_COM: begin
        y = ~a;
        flags.c = 1'b1;
        mask.c = 1'b1;
        mask.v = 1'b1;
      end
      ALU_INC: begin
        y = a + 16'd1;
        flags.v = (y == 16'h8000);
        mask.v  = 1'b1;
      end
      ALU_DEC: begin
        y = a - 16'd1;
        flags.v = (y == 16'h7FFF);
        mask.v  = 1'b1;
      end
      ALU_PASS: y = b;
      default:  y = '0;
    endcase
    // Flags common to every operation except the pass-through.
    flags.n = y[DW-1];
    flags.z = (y == '0);
    flags.s = flags.n ^ flags.v;
    flags.p = ~^y;
    if (op != ALU_PASS) begin
      mask.n = 1'b1;
      mask.z = 1'b1;
      mask.s = 1'b1;
      mask.p = 1'b1;
    end
  end

endmodule

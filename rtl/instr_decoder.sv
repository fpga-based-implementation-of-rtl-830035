// instr_decoder: decodes the 24-bit instruction register.
//
// Purely combinational. Produces the instruction class (one value per
// instruction kind, the decoder's output lines to the FSM) and the fields the
// data path needs: Rd and Rr addresses, the ALU operation and whether operand
// B is the 16-bit constant, whether the result and the flags are written, the
// I/O address, bit number, branch flag and polarity, pointer mode, and the
// sign-extended branch offset. The encoding is documented in mcu_pkg and is
// this design's own. Aliases need no decoding: SBR is ORI, TST is AND Rd,Rd,
// CLR is EOR Rd,Rd, SER is LDI Rd,0xFFFF. CBR is decoded as AND with the
// complemented constant. Undefined codes decode as NOP.
module instr_decoder
  import mcu_pkg::*;
(
  input  instr_t ir,
  output dec_t   d
);

  major_e     maj;
  alu_funct_e fn;
  misc_e      mc;
  bitop_e     bop;

  assign maj = major_e'(ir[23:20]);
  assign fn  = alu_funct_e'(ir[3:0]);
  assign mc  = misc_e'(ir[3:0]);
  assign bop = bitop_e'(ir[17:16]);

  always_comb begin
    d              = '0;
    d.op           = I_NOP;
    d.rd           = ir[19:16];
    d.rr           = ir[15:12];
    d.alu_op       = ALU_PASS;
    d.imm          = ir[15:0];
    d.ioa          = ir[5:0];
    d.bitn         = ir[11:8];
    d.flag_sel     = ir[18:16];
    d.if_set       = ir[19];
    d.ptr          = ptr_mode_e'(ir[1:0]);
    d.offset       = ir[15:0];
    unique case (maj)
      MAJ_MISC: begin
        unique case (mc)
          M_SLEEP: d.op = I_SLEEP;
          M_RET:   d.op = I_RET;
          M_RETI:  d.op = I_RETI;
          M_SEI:   d.op = I_SEI;
          M_CLI:   d.op = I_CLI;
          default: d.op = I_NOP;
        endcase
      end
      MAJ_ALU: begin
        d.op           = I_ALU;
        d.writes_rd    = 1'b1;
        d.writes_flags = 1'b1;
        unique case (fn)
          F_ADD: d.alu_op = ALU_ADD;
          F_ADC: d.alu_op = ALU_ADC;
          F_SUB: d.alu_op = ALU_SUB;
          F_SBC: d.alu_op = ALU_SBC;
          F_AND: d.alu_op = ALU_AND;
          F_OR:  d.alu_op = ALU_OR;
          F_EOR: d.alu_op = ALU_EOR;
          F_MOV: begin d.alu_op = ALU_PASS; d.writes_flags = 1'b0; end
          F_COM: d.alu_op = ALU_COM;
          F_NEG: d.alu_op = ALU_NEG;
          F_INC: d.alu_op = ALU_INC;
          F_DEC: d.alu_op = ALU_DEC;
          default: begin
            d.op = I_NOP;
            d.writes_rd = 1'b0;
            d.writes_flags = 1'b0;
          end
        endcase
      end
      MAJ_LDI, MAJ_SUBI, MAJ_SBCI, MAJ_ANDI, MAJ_ORI, MAJ_CBR: begin
        d.op           = I_ALUI;
        d.alu_b_imm    = 1'b1;
        d.writes_rd    = 1'b1;
        d.writes_flags = (maj != MAJ_LDI);
        unique case (maj)
          MAJ_SUBI: d.alu_op = ALU_SUB;
          MAJ_SBCI: d.alu_op = ALU_SBC;
          MAJ_ANDI: d.alu_op = ALU_AND;
          MAJ_ORI:  d.alu_op = ALU_OR;
          MAJ_CBR:  begin d.alu_op = ALU_AND; d.imm = ~ir[15:0]; end
          default:  d.alu_op = ALU_PASS;
        endcase
      end
      MAJ_IN:  begin d.op = I_IN;  d.writes_rd = 1'b1; end
      MAJ_OUT: d.op = I_OUT;
      MAJ_LD:  begin d.op = I_LD;  d.writes_rd = 1'b1; end
      MAJ_ST:  d.op = I_ST;
      MAJ_RJMP:  d.op = I_RJMP;
      MAJ_RCALL: d.op = I_RCALL;
      MAJ_BR: begin
        d.op     = I_BRANCH;
        d.offset = {{(PCW-7){ir[6]}}, ir[6:0]};
      end
      MAJ_BIT: begin
        unique case (bop)
          B_CBI:  d.op = I_CBI;
          B_SBI:  d.op = I_SBI;
          B_SBIC: d.op = I_SBIC;
          default: d.op = I_SBIS;
        endcase
      end
      default: d.op = I_NOP;
    endcase
  end

endmodule

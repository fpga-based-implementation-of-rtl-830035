// tb_instr_decoder: encodes each instruction with the package encoders and
// checks the decoded class, register fields, ALU operation, constant handling
// (including CBR's complement), I/O address, bit number, pointer mode and the
// sign extension of the conditional-branch offset.
module tb_instr_decoder;
  import mcu_pkg::*;

  instr_t ir;
  dec_t d;
  int checks = 0, failures = 0;

  instr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s (ir=%h): got %h expected %h", what, ir, got, exp); end
  endtask

  initial begin
    alu_funct_e fns [12] = '{F_ADD, F_ADC, F_SUB, F_SBC, F_AND, F_OR, F_EOR, F_MOV, F_COM, F_NEG, F_INC, F_DEC};
    alu_op_e    ops [12] = '{ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_EOR, ALU_PASS, ALU_COM, ALU_NEG, ALU_INC, ALU_DEC};
    for (int i = 0; i < 12; i++) begin
      ir = enc_alu(fns[i], 4'd3, 4'd9); #1;
      check("alu class", d.op, I_ALU);
      check("alu op", d.alu_op, ops[i]);
      check("rd", d.rd, 3); check("rr", d.rr, 9);
      check("b from reg", d.alu_b_imm, 0);
      check("writes rd", d.writes_rd, 1);
      check("flags", d.writes_flags, fns[i] != F_MOV);
    end
    ir = enc_imm(MAJ_LDI, 4'd1, 16'h0005); #1;
    check("ldi class", d.op, I_ALUI); check("ldi pass", d.alu_op, ALU_PASS);
    check("ldi imm", d.imm, 16'h0005); check("ldi rd", d.rd, 1); check("ldi no flags", d.writes_flags, 0);
    check("ldi b imm", d.alu_b_imm, 1);
    ir = enc_imm(MAJ_SUBI, 4'd2, 16'h1234); #1;
    check("subi", d.alu_op, ALU_SUB); check("subi flags", d.writes_flags, 1);
    ir = enc_imm(MAJ_SBCI, 4'd2, 16'h1234); #1; check("sbci", d.alu_op, ALU_SBC);
    ir = enc_imm(MAJ_ANDI, 4'd2, 16'h1234); #1; check("andi", d.alu_op, ALU_AND);
    ir = enc_imm(MAJ_ORI, 4'd2, 16'h1234);  #1; check("ori", d.alu_op, ALU_OR);
    ir = enc_imm(MAJ_CBR, 4'd2, 16'h00F0);  #1;
    check("cbr", d.alu_op, ALU_AND); check("cbr complement", d.imm, 16'hFF0F);
    ir = enc_in(4'd7, IO_PINC); #1;
    check("in", d.op, I_IN); check("in rd", d.rd, 7); check("in a", d.ioa, IO_PINC);
    ir = enc_out(IO_PORTB, 4'd6); #1;
    check("out", d.op, I_OUT); check("out rr", d.rr, 6); check("out a", d.ioa, IO_PORTB);
    ir = enc_ld(4'd4, PTR_ZDEC); #1;
    check("ld", d.op, I_LD); check("ld rd", d.rd, 4); check("ld mode", d.ptr, PTR_ZDEC);
    ir = enc_st(4'd5, PTR_ZINC); #1;
    check("st", d.op, I_ST); check("st rr", d.rr, 5); check("st mode", d.ptr, PTR_ZINC);
    ir = enc_rjmp(16'hFF00); #1; check("rjmp", d.op, I_RJMP); check("rjmp off", d.offset, 16'hFF00);
    ir = enc_rcall(16'h0042); #1; check("rcall", d.op, I_RCALL); check("rcall off", d.offset, 16'h0042);
    ir = enc_br(1'b1, FLAG_C, 7'h40); #1;
    check("br", d.op, I_BRANCH); check("br -64", d.offset, 16'hFFC0);
    check("br flag", d.flag_sel, FLAG_C); check("br pol", d.if_set, 1);
    ir = enc_br(1'b0, FLAG_Z, 7'h3F); #1;
    check("br +63", d.offset, 16'h003F); check("br flag z", d.flag_sel, FLAG_Z); check("br pol 0", d.if_set, 0);
    ir = enc_bit(B_CBI, IO_PORTD, 4'd3);  #1; check("cbi", d.op, I_CBI); check("bitn", d.bitn, 3); check("cbi a", d.ioa, IO_PORTD);
    ir = enc_bit(B_SBI, IO_PORTD, 4'd15); #1; check("sbi", d.op, I_SBI); check("bitn 15", d.bitn, 15);
    ir = enc_bit(B_SBIC, IO_PIND, 4'd1);  #1; check("sbic", d.op, I_SBIC);
    ir = enc_bit(B_SBIS, IO_PIND, 4'd1);  #1; check("sbis", d.op, I_SBIS);
    ir = enc_misc(M_NOP);   #1; check("nop", d.op, I_NOP); check("nop no write", d.writes_rd, 0);
    ir = enc_misc(M_SLEEP); #1; check("sleep", d.op, I_SLEEP);
    ir = enc_misc(M_RET);   #1; check("ret", d.op, I_RET);
    ir = enc_misc(M_RETI);  #1; check("reti", d.op, I_RETI);
    ir = enc_misc(M_SEI);   #1; check("sei", d.op, I_SEI);
    ir = enc_misc(M_CLI);   #1; check("cli", d.op, I_CLI);
    ir = {MAJ_ALU, 16'h0000, 4'hE}; #1; check("undefined alu is nop", d.op, I_NOP);
    ir = {MAJ_MISC, 16'h0000, 4'hC}; #1; check("undefined misc is nop", d.op, I_NOP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

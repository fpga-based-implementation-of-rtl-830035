// tb_mcu_top: end-to-end test of the microcontroller at its default sizes.
//
// Phase A runs the single instruction MVI (LDI) R1,0x0005 placed at address 0
// and checks that the register write happens in the cycle the instruction is
// executed, one clock after it is fetched.
// Phase B loads a program that uses every instruction class: the ALU
// operations with their flags, constants, MOV, IN/OUT on the ports, LD/ST with
// Z, Z+ and -Z, a counted loop with a conditional branch, four nested calls
// (the full hardware stack), SBIS/SBIC skips, SBI/CBI, the timer compare
// interrupt waking the core from SLEEP (with an input capture while asleep),
// and an external interrupt taken while the core runs. The expected register,
// RAM and port values below were worked out by hand from the instruction
// definitions. The single-cycle instruction rate is checked on a run of 24
// ALU instructions. Each mechanism (every FSM state, skip, branch request,
// push to depth 4, interrupt from EXE and from SLEEP, pre-decrement,
// post-increment, compare match, capture) is counted and must occur.
module tb_mcu_top;
  import mcu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  pc_t prog_addr = '0;
  instr_t prog_wdata = '0;
  logic [7:0] portb_in = 8'h00, portc_in = 8'hA5, portd_in = 8'h01;
  logic [7:0] portb_out, portb_oe, portc_out, portc_oe, portd_out, portd_oe;
  logic int0 = 1'b1, icp = 1'b0, oc;
  state_e state;
  pc_t pc;

  int checks = 0, failures = 0;
  longint cyc = 0;

  localparam int unsigned DEPTH = 1024;
  instr_t prog [DEPTH];

  mcu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish();
  end

  task automatic load_program();
    rst_n = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      prog_we = 1'b1;
      prog_addr = pc_t'(a);
      prog_wdata = prog[a];
    end
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  // relative offset from the instruction at `from` to `to`
  function automatic pc_t rel(int from, int to);
    return pc_t'(to - (from + 1));
  endfunction

  // ---- mechanism counters ----
  int n_state [8];
  int n_skip = 0, n_brreq = 0, n_irq_exe = 0, n_irq_sleep = 0, n_push = 0;
  int depth = 0, max_depth = 0;
  int n_predec = 0, n_postinc = 0, n_match = 0, n_capture = 0;
  logic counting = 1'b0;

  always @(posedge clk) if (rst_n && counting) begin
    n_state[dut.u_cu.state_q]++;
    if (dut.u_cu.skip_req) n_skip++;
    if (dut.u_cu.state_q == S_EXE && dut.u_cu.branch_req) n_brreq++;
    if (dut.u_cu.irq_taken && dut.u_cu.state_q == S_EXE) n_irq_exe++;
    if (dut.u_cu.irq_taken && dut.u_cu.state_q == S_SLEEP) n_irq_sleep++;
    if (dut.u_cu.push) begin n_push++; depth++; if (depth > max_depth) max_depth = depth; end
    else if (dut.u_cu.pop) depth--;
    if (dut.u_cu.state_q == S_EXE && (dut.u_cu.d.op inside {I_LD, I_ST})) begin
      if (dut.u_cu.d.ptr == PTR_ZDEC) n_predec++;
      if (dut.u_cu.d.ptr == PTR_ZINC) n_postinc++;
    end
    if (dut.u_timer.match) n_match++;
    if (dut.u_timer.cap) n_capture++;
  end

  int t17 = -1, t41 = -1;
  always @(posedge clk) if (rst_n && counting) begin
    if (pc == 17 && t17 < 0) t17 = int'(cyc);
    if (pc == 41 && t41 < 0) t41 = int'(cyc);
  end

  initial begin
    // ---------------- Phase A: MVI R1,0x0005 at address 0 ----------------
    for (int a = 0; a < DEPTH; a++) prog[a] = NOP_WORD;
    prog[0] = enc_imm(MAJ_LDI, 4'd1, 16'h0005);
    load_program();
    @(negedge clk) rst_n = 1'b1;
    // first cycle: NOP from reset executes, address 0 is fetched
    @(negedge clk);
    check("MVI in IR after one cycle", dut.u_ir.ir, enc_imm(MAJ_LDI, 4'd1, 16'h0005));
    check("MVI destination decoded", dut.u_cu.d.rd, 1);
    check("MVI immediate decoded", dut.u_cu.d.imm, 16'h0005);
    check("MVI reg_wr high", dut.u_cu.rf_we, 1);
    check("MVI reg_wr_data", dut.bus, 16'h0005);
    check("R1 not yet written", dut.u_rf.regs[1], 0);
    @(negedge clk);
    check("R1 written at next edge", dut.u_rf.regs[1], 16'h0005);

    // ---------------- Phase B: full program ----------------
    for (int a = 0; a < DEPTH; a++) prog[a] = NOP_WORD;
    prog[0]  = enc_rjmp(rel(0, 16));
    prog[1]  = enc_rjmp(rel(1, 200));
    prog[2]  = enc_rjmp(rel(2, 220));
    prog[16] = enc_imm(MAJ_LDI, 1, 16'h1234);
    prog[17] = enc_imm(MAJ_LDI, 2, 16'h0FFF);
    prog[18] = enc_alu(F_ADD, 1, 2);            // R1 = 2233
    prog[19] = enc_imm(MAJ_LDI, 3, 16'hFFFF);   // SER
    prog[20] = enc_imm(MAJ_LDI, 4, 16'h0001);
    prog[21] = enc_alu(F_ADD, 3, 4);            // R3 = 0, C = 1
    prog[22] = enc_imm(MAJ_LDI, 5, 16'h0010);
    prog[23] = enc_alu(F_ADC, 5, 4);            // R5 = 12
    prog[24] = enc_imm(MAJ_SUBI, 5, 16'h0002);  // R5 = 10
    prog[25] = enc_imm(MAJ_LDI, 6, 16'h0000);
    prog[26] = enc_alu(F_SUB, 6, 4);            // R6 = FFFF, C = 1
    prog[27] = enc_alu(F_SBC, 6, 4);            // R6 = FFFD
    prog[28] = enc_imm(MAJ_SBCI, 6, 16'h000D);  // R6 = FFF0
    prog[29] = enc_imm(MAJ_ANDI, 1, 16'h0FF0);  // R1 = 0230
    prog[30] = enc_imm(MAJ_ORI, 1, 16'hF000);   // R1 = F230 (SBR)
    prog[31] = enc_imm(MAJ_CBR, 1, 16'h0030);   // R1 = F200
    prog[32] = enc_alu(F_EOR, 2, 1);            // R2 = FDFF
    prog[33] = enc_alu(F_COM, 2, 0);            // R2 = 0200
    prog[34] = enc_alu(F_NEG, 4, 0);            // R4 = FFFF
    prog[35] = enc_alu(F_INC, 4, 0);            // R4 = 0
    prog[36] = enc_alu(F_DEC, 4, 0);            // R4 = FFFF
    prog[37] = enc_alu(F_AND, 2, 2);            // TST R2
    prog[38] = enc_alu(F_OR, 5, 2);             // R5 = 0210
    prog[39] = enc_alu(F_MOV, 7, 5);            // R7 = 0210
    prog[40] = enc_imm(MAJ_LDI, 8, 16'h00FF);
    prog[41] = enc_out(IO_DDRB, 8);
    prog[42] = enc_out(IO_PORTB, 7);            // PORTB = 10
    prog[43] = enc_in(9, IO_PINC);              // R9 = 00A5
    prog[44] = enc_imm(MAJ_LDI, 15, 16'h0040);  // Z = 40
    prog[45] = enc_st(1, PTR_ZINC);             // [40] = F200
    prog[46] = enc_st(2, PTR_ZINC);             // [41] = 0200
    prog[47] = enc_st(9, PTR_Z);                // [42] = 00A5
    prog[48] = enc_ld(10, PTR_ZDEC);            // R10 = [41] = 0200
    prog[49] = enc_ld(11, PTR_ZDEC);            // R11 = [40] = F200
    prog[50] = enc_ld(12, PTR_ZINC);            // R12 = F200, Z = 41
    prog[51] = enc_imm(MAJ_LDI, 13, 16'h0003);
    prog[52] = enc_imm(MAJ_LDI, 14, 16'h0000);
    prog[53] = enc_alu(F_INC, 14, 0);
    prog[54] = enc_alu(F_DEC, 13, 0);
    prog[55] = enc_br(1'b0, FLAG_Z, 7'(rel(55, 53)));  // BRNE
    prog[56] = enc_rcall(rel(56, 100));
    prog[57] = enc_bit(B_SBIS, IO_PIND, 4'd0);   // PIND.0 = 1: skip
    prog[58] = enc_imm(MAJ_LDI, 0, 16'hDEAD);
    prog[59] = enc_bit(B_SBIC, IO_PIND, 4'd0);   // no skip
    prog[60] = enc_alu(F_INC, 0, 0);             // R0 = 2
    prog[61] = enc_bit(B_SBI, IO_PORTB, 4'd7);   // PORTB = 90
    prog[62] = enc_bit(B_CBI, IO_PORTB, 4'd4);   // PORTB = 80
    prog[63] = enc_imm(MAJ_LDI, 8, 16'd20);
    prog[64] = enc_out(IO_OCR, 8);
    prog[65] = enc_imm(MAJ_LDI, 8, 16'h0002);
    prog[66] = enc_out(IO_TIMSK, 8);             // compare interrupt
    prog[67] = enc_imm(MAJ_LDI, 8, 16'h0059);
    prog[68] = enc_out(IO_TCCR, 8);              // clk/1, clear on match, toggle OC, capture on rising edge
    prog[69] = enc_misc(M_SEI);
    prog[70] = enc_misc(M_SLEEP);
    prog[71] = enc_in(12, IO_ICR);
    prog[72] = enc_imm(MAJ_LDI, 8, 16'h0002);
    prog[73] = enc_out(IO_MCUCR, 8);             // falling edge
    prog[74] = enc_imm(MAJ_LDI, 8, 16'h0040);
    prog[75] = enc_out(IO_GIMSK, 8);
    prog[76] = enc_imm(MAJ_LDI, 8, 16'h0004);    // wait until R14 = 4
    prog[77] = enc_alu(F_SUB, 8, 14);
    prog[78] = enc_br(1'b0, FLAG_Z, 7'(rel(78, 76)));
    prog[79] = enc_imm(MAJ_LDI, 8, 16'h00FF);
    prog[80] = enc_out(IO_DDRC, 8);
    prog[81] = enc_imm(MAJ_LDI, 8, 16'h005A);
    prog[82] = enc_out(IO_PORTC, 8);
    prog[83] = enc_rjmp(rel(83, 83));
    // four nested calls
    prog[100] = enc_rcall(rel(100, 110));
    prog[101] = enc_misc(M_RET);
    prog[110] = enc_rcall(rel(110, 120));
    prog[111] = enc_misc(M_RET);
    prog[120] = enc_rcall(rel(120, 130));
    prog[121] = enc_misc(M_RET);
    prog[130] = enc_alu(F_INC, 0, 0);            // R0 = 1
    prog[131] = enc_misc(M_RET);
    // external interrupt routine
    prog[200] = enc_alu(F_INC, 14, 0);
    prog[201] = enc_misc(M_RETI);
    // timer interrupt routine
    prog[220] = enc_alu(F_INC, 13, 0);
    prog[221] = enc_imm(MAJ_LDI, 8, 16'h0007);
    prog[222] = enc_out(IO_TIFR, 8);
    prog[223] = enc_imm(MAJ_LDI, 8, 16'h0000);
    prog[224] = enc_out(IO_TCCR, 8);
    prog[225] = enc_misc(M_RETI);

    load_program();
    counting = 1'b1;
    @(negedge clk) rst_n = 1'b1;

    // input capture while asleep, external interrupt while in the wait loop
    wait (state == S_SLEEP);
    repeat (3) @(negedge clk);
    icp = 1'b1;
    wait (pc >= 77 && pc <= 79);
    repeat (5) @(negedge clk);
    int0 = 1'b0;
    wait (pc == 84);
    repeat (4) @(negedge clk);

    // ---- results ----
    check("R0", dut.u_rf.regs[0], 16'h0002);
    check("R1", dut.u_rf.regs[1], 16'hF200);
    check("R2", dut.u_rf.regs[2], 16'h0200);
    check("R3", dut.u_rf.regs[3], 16'h0000);
    check("R4", dut.u_rf.regs[4], 16'hFFFF);
    check("R5", dut.u_rf.regs[5], 16'h0210);
    check("R6", dut.u_rf.regs[6], 16'hFFF0);
    check("R7", dut.u_rf.regs[7], 16'h0210);
    check("R8", dut.u_rf.regs[8], 16'h005A);
    check("R9", dut.u_rf.regs[9], 16'h00A5);
    check("R10", dut.u_rf.regs[10], 16'h0200);
    check("R11", dut.u_rf.regs[11], 16'hF200);
    check("R12 capture in range", (dut.u_rf.regs[12] >= 1 && dut.u_rf.regs[12] <= 20), 1);
    check("R13", dut.u_rf.regs[13], 16'h0001);
    check("R14", dut.u_rf.regs[14], 16'h0004);
    check("R15 (Z)", dut.u_rf.regs[15], 16'h0041);
    check("RAM[40]", dut.u_ram.mem[8'h40], 16'hF200);
    check("RAM[41]", dut.u_ram.mem[8'h41], 16'h0200);
    check("RAM[42]", dut.u_ram.mem[8'h42], 16'h00A5);
    check("PORTB", portb_out, 8'h80);
    check("DDRB", portb_oe, 8'hFF);
    check("PORTC", portc_out, 8'h5A);
    check("DDRC", portc_oe, 8'hFF);
    check("OC toggled once", oc, 1'b1);
    check("I flag set after RETI", dut.u_sr.sreg_q.i, 1'b1);
    check("24 single-cycle instructions in 24 clocks", t41 - t17, 24);

    // ---- mechanisms ----
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (n_state[s] == 0) begin
        failures++;
        $display("FAIL state %s never visited", state_e'(s));
      end
    end
    check("skip happened", n_skip > 0, 1);
    check("branch request twice in loop, then others", n_brreq >= 2, 1);
    check("interrupt from EXE", n_irq_exe > 0, 1);
    check("interrupt from SLEEP", n_irq_sleep > 0, 1);
    check("stack reached depth 4", max_depth, 4);
    check("pre-decrement used", n_predec > 0, 1);
    check("post-increment used", n_postinc > 0, 1);
    check("compare match", n_match > 0, 1);
    check("input capture", n_capture > 0, 1);
    $display("states: EXE %0d SLEEP %0d BR1 %0d BR2 %0d SBICS %0d CBISBI %0d ST %0d LD %0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5], n_state[6], n_state[7]);
    $display("skips %0d branch requests %0d irq(exe) %0d irq(sleep) %0d pushes %0d max depth %0d matches %0d captures %0d",
             n_skip, n_brreq, n_irq_exe, n_irq_sleep, n_push, max_depth, n_match, n_capture);
    finish();
  end

endmodule

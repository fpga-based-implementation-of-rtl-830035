// tb_control_unit: drives the control unit alone with instructions in the IR
// and checks its control outputs and state sequence against the intended
// behaviour: single-cycle fetch, ALU write-back, RJMP (3 cycles through
// BRANCH1/BRANCH2), RCALL/RET through the hardware stack, taken and untaken
// conditional branches, LD with pre-decrement and ST with post-increment,
// SBIS/SBIC skip, SBI read-modify-write, SLEEP and wake-up by an interrupt,
// interrupt entry from EXE, and no interrupt in the cycle of CLI.
module tb_control_unit;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  instr_t ir;
  pc_t pc, rom_addr, pc_d;
  logic ir_load, pc_inc, pc_load;
  reg_addr_t rf_ra, rf_rb, rf_wa;
  logic rf_we, z_we;
  word_t z, z_wd, imm, bus, tmp, ram_addr;
  alu_op_e alu_op;
  logic alu_b_imm;
  sreg_t sreg;
  logic sr_flag_we, sr_i_set, sr_i_clr;
  bus_src_e bus_src;
  io_addr_t io_addr;
  logic io_rd, io_wr, ram_we;
  logic ext_irq, timer_irq, ext_ack;
  state_e state;
  logic branch_req, skip_req, irq_taken;
  int checks = 0, failures = 0;

  control_unit #(.VEC_INT0(16'd1), .VEC_TIMER(16'd2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step();
    @(negedge clk); #1;
  endtask

  initial begin
    ir = NOP_WORD; pc = 16'd10; z = 16'h0050; bus = 16'h0000; sreg = '0;
    ext_irq = 0; timer_irq = 0;
    #1;
    @(negedge clk); rst_n = 1; #1;
    check("reset state", state, S_EXE);
    // NOP: fetch
    check("nop fetch", ir_load, 1); check("nop inc", pc_inc, 1); check("nop rom addr", rom_addr, 10);
    check("nop no write", rf_we, 0);
    // ALU
    ir = enc_alu(F_ADD, 4'd1, 4'd2); #1;
    check("alu bus", bus_src, BUS_ALU); check("alu we", rf_we, 1); check("alu wa", rf_wa, 1);
    check("alu ra", rf_ra, 1); check("alu rb", rf_rb, 2); check("alu flags", sr_flag_we, 1);
    check("alu op", alu_op, ALU_ADD); check("alu fetch", ir_load, 1);
    // RJMP +5 at pc 10 -> 15, three cycles
    ir = enc_rjmp(16'd5); #1;
    check("rjmp load", pc_load, 1); check("rjmp target", pc_d, 15); check("rjmp no fetch", ir_load, 0);
    step(); check("BRANCH1", state, S_BRANCH1); check("b1 idle", ir_load | pc_load | pc_inc, 0);
    step(); check("BRANCH2", state, S_BRANCH2); check("b2 fetch", ir_load & pc_inc, 1);
    step(); check("back to EXE", state, S_EXE);
    // RCALL then RET returns to the pushed address
    pc = 16'd20; ir = enc_rcall(16'hFFF6); #1;       // 20 - 10 = 10
    check("rcall target", pc_d, 10);
    step(); step(); step();
    pc = 16'd11; ir = enc_misc(M_RET); #1;
    check("ret load", pc_load, 1); check("ret target", pc_d, 20);
    step(); step(); step();
    // conditional branch taken (BREQ with Z = 1): 2 cycles
    sreg.z = 1; pc = 16'd40; ir = enc_br(1'b1, FLAG_Z, 7'h7E); #1;   // -2
    check("branch request", branch_req, 1); check("branch target", pc_d, 38); check("taken no fetch", ir_load, 0);
    step(); check("taken -> BRANCH2", state, S_BRANCH2);
    step(); check("taken -> EXE", state, S_EXE);
    // not taken: single cycle
    sreg.z = 0; #1;
    check("not taken", branch_req, 0); check("not taken fetch", ir_load & pc_inc, 1); check("not taken no load", pc_load, 0);
    step(); check("not taken stays EXE", state, S_EXE);
    // LD -Z
    z = 16'h0050; ir = enc_ld(4'd3, PTR_ZDEC); #1;
    check("ld z update", z_we, 1); check("ld z new", z_wd, 16'h004F); check("ld no fetch", ir_load, 0);
    step(); check("LD state", state, S_LD);
    check("ld addr", ram_addr, 16'h004F); check("ld bus", bus_src, BUS_RAM); check("ld we", rf_we, 1);
    check("ld wa", rf_wa, 3); check("ld fetch", ir_load, 1);
    step();
    // ST Z+
    z = 16'h0060; ir = enc_st(4'd4, PTR_ZINC); #1;
    check("st z new", z_wd, 16'h0061); check("st z we", z_we, 1);
    step(); check("ST state", state, S_ST);
    check("st addr", ram_addr, 16'h0060); check("st we", ram_we, 1); check("st rb", rf_rb, 4);
    check("st pass", alu_op, ALU_PASS); check("st bus", bus_src, BUS_ALU);
    step();
    // ST plain Z leaves Z alone
    ir = enc_st(4'd4, PTR_Z); #1; check("st Z no update", z_we, 0);
    step(); check("st plain addr", ram_addr, 16'h0060); step();
    // SBIS with bit set: skip
    pc = 16'd50; bus = 16'h0008; ir = enc_bit(B_SBIS, IO_PIND, 4'd3); #1;
    check("sbis no fetch in EXE", ir_load, 0);
    step(); check("SBICS state", state, S_SBICS); check("sbics io read", io_rd, 1);
    check("skip", skip_req, 1); check("skip rom addr", rom_addr, 51); check("skip pc", pc_d, 52);
    check("skip load", pc_load, 1); check("skip fetch", ir_load, 1);
    step();
    // SBIC with bit set: no skip
    ir = enc_bit(B_SBIC, IO_PIND, 4'd3); #1; step();
    check("no skip", skip_req, 0); check("no skip rom addr", rom_addr, 50); check("no skip inc", pc_inc, 1);
    step();
    // SBI bit 2 on a register reading 0x0009
    bus = 16'h0009; ir = enc_bit(B_SBI, IO_PORTB, 4'd2); #1;
    check("sbi read", io_rd, 1); check("sbi bus io", bus_src, BUS_IO);
    step(); check("CBISBI state", state, S_CBISBI);
    check("sbi tmp", tmp, 16'h000D); check("sbi write", io_wr, 1); check("sbi bus tmp", bus_src, BUS_TMP);
    step();
    bus = 16'h000D; ir = enc_bit(B_CBI, IO_PORTB, 4'd0); #1; step();
    check("cbi tmp", tmp, 16'h000C);
    step();
    // SLEEP, stays without IRQ, wakes to the timer vector with I set
    pc = 16'd70; ir = enc_misc(M_SLEEP); #1;
    step(); check("SLEEP", state, S_SLEEP);
    step(); check("stays asleep", state, S_SLEEP);
    timer_irq = 1; #1;
    check("no wake with I clear", irq_taken, 0);
    sreg.i = 1; #1;
    check("wake", irq_taken, 1); check("timer vector", pc_d, 2); check("i cleared", sr_i_clr, 1);
    step(); check("wake -> BRANCH1", state, S_BRANCH1);
    timer_irq = 0;
    step(); step();
    pc = 16'd3; ir = enc_misc(M_RETI); #1;
    check("reti target", pc_d, 70); check("reti sets I", sr_i_set, 1);
    step(); step(); step();
    // interrupt from EXE, external has priority
    pc = 16'd90; ir = enc_alu(F_INC, 4'd1, 4'd0); ext_irq = 1; timer_irq = 1; #1;
    check("irq from EXE", irq_taken, 1); check("ext vector", pc_d, 1); check("ack", ext_ack, 1);
    check("instruction still completes", rf_we, 1); check("no fetch", ir_load, 0);
    // not in the cycle of CLI
    ir = enc_misc(M_CLI); #1;
    check("no irq on CLI", irq_taken, 0); check("cli", sr_i_clr, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// mcu_top: 16-bit RISC microcontroller.
//
// Fetch unit: program counter -> program ROM -> instruction register ->
// control unit. Execute unit: register file (addressed by IR fields) feeding
// the ALU, status register, data RAM addressed indirectly by the Z pointer.
// I/O unit: ports B, C and D (8 lines each), a 16-bit timer with output
// compare and input capture, and the external interrupt INT0. The register
// file, ALU, status register, data RAM and all I/O registers meet on the one
// common 16-bit data bus, whose single source the control unit selects each
// cycle; the register file only receives from it.
//
// Interface: clk, rst_n (asynchronous, active low); a program-load port
// (prog_we/prog_addr/prog_wdata) writing the program ROM while the core is
// held in reset or running; the 24 port pads as separate in/out/output-enable
// vectors; int0, icp and oc pins; state and pc for observation.
// Timing: one instruction per clock for ALU, LDI, IN, OUT and untaken
// branches; see control_unit for the multi-cycle instructions.
// The block structure is the design's; widths of the ROM and RAM
// (ROM_DEPTH, RAM_DEPTH) are this implementation's choice.
module mcu_top
  import mcu_pkg::*;
#(
  parameter int unsigned ROM_DEPTH = 1024,
  parameter int unsigned RAM_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prog_we,
  input  pc_t        prog_addr,
  input  instr_t     prog_wdata,
  input  logic [7:0] portb_in,
  output logic [7:0] portb_out,
  output logic [7:0] portb_oe,
  input  logic [7:0] portc_in,
  output logic [7:0] portc_out,
  output logic [7:0] portc_oe,
  input  logic [7:0] portd_in,
  output logic [7:0] portd_out,
  output logic [7:0] portd_oe,
  input  logic       int0,
  input  logic       icp,
  output logic       oc,
  output state_e     state,
  output pc_t        pc
);

  localparam int unsigned NIO = 6;

  // fetch unit
  pc_t       rom_addr, pc_d;
  instr_t    rom_q, ir;
  logic      ir_load, pc_inc, pc_load;
  // execute unit
  reg_addr_t rf_ra, rf_rb, rf_wa;
  logic      rf_we, z_we;
  word_t     rf_da, rf_db, z, z_wd;
  alu_op_e   alu_op;
  logic      alu_b_imm;
  word_t     imm, alu_b, alu_y;
  sreg_t     alu_flags, alu_mask, sreg;
  logic      sr_flag_we, sr_i_set, sr_i_clr;
  word_t     ram_addr, ram_rd;
  logic      ram_we;
  // bus and I/O
  bus_src_e  bus_src;
  word_t     bus, tmp;
  io_addr_t  io_addr;
  logic      io_rd, io_wr;
  io_req_t   io;
  word_t     io_rdata [NIO];
  logic      io_hit   [NIO];
  logic      ext_irq, timer_irq, ext_ack;
  logic      branch_req, skip_req, irq_taken;

  assign io    = '{addr: io_addr, rd: io_rd, wr: io_wr, wdata: bus};
  assign alu_b = alu_b_imm ? imm : rf_db;

  program_counter u_pc (
    .clk(clk), .rst_n(rst_n), .inc(pc_inc), .load(pc_load), .d(pc_d), .pc(pc)
  );

  program_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .addr(rom_addr), .q(rom_q),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata)
  );

  instr_reg u_ir (.clk(clk), .rst_n(rst_n), .load(ir_load), .d(rom_q), .ir(ir));

  control_unit u_cu (
    .clk(clk), .rst_n(rst_n),
    .ir(ir), .pc(pc), .rom_addr(rom_addr), .ir_load(ir_load),
    .pc_inc(pc_inc), .pc_load(pc_load), .pc_d(pc_d),
    .rf_ra(rf_ra), .rf_rb(rf_rb), .rf_we(rf_we), .rf_wa(rf_wa),
    .z(z), .z_we(z_we), .z_wd(z_wd),
    .alu_op(alu_op), .alu_b_imm(alu_b_imm), .imm(imm),
    .sreg(sreg), .sr_flag_we(sr_flag_we), .sr_i_set(sr_i_set), .sr_i_clr(sr_i_clr),
    .bus_src(bus_src), .bus(bus), .tmp(tmp),
    .io_addr(io_addr), .io_rd(io_rd), .io_wr(io_wr),
    .ram_addr(ram_addr), .ram_we(ram_we),
    .ext_irq(ext_irq), .timer_irq(timer_irq), .ext_ack(ext_ack),
    .state(state), .branch_req(branch_req), .skip_req(skip_req), .irq_taken(irq_taken)
  );

  reg_file u_rf (
    .clk(clk), .rst_n(rst_n), .ra(rf_ra), .rb(rf_rb), .da(rf_da), .db(rf_db),
    .we(rf_we), .wa(rf_wa), .wd(bus), .z(z), .z_we(z_we), .z_wd(z_wd)
  );

  alu u_alu (
    .op(alu_op), .a(rf_da), .b(alu_b), .c_in(sreg.c),
    .y(alu_y), .flags(alu_flags), .mask(alu_mask)
  );

  status_reg u_sr (
    .clk(clk), .rst_n(rst_n), .alu_flags(alu_flags), .alu_mask(alu_mask),
    .flag_we(sr_flag_we), .i_set(sr_i_set), .i_clr(sr_i_clr),
    .io(io), .io_rdata(io_rdata[0]), .io_hit(io_hit[0]), .sreg(sreg)
  );

  data_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk(clk), .addr(ram_addr), .we(ram_we), .wd(bus), .rd(ram_rd)
  );

  io_port #(.W(8), .PIN_ADDR(IO_PINB), .DDR_ADDR(IO_DDRB), .PORT_ADDR(IO_PORTB)) u_portb (
    .clk(clk), .rst_n(rst_n), .io(io), .io_rdata(io_rdata[1]), .io_hit(io_hit[1]),
    .pin_in(portb_in), .pin_out(portb_out), .pin_oe(portb_oe)
  );

  io_port #(.W(8), .PIN_ADDR(IO_PINC), .DDR_ADDR(IO_DDRC), .PORT_ADDR(IO_PORTC)) u_portc (
    .clk(clk), .rst_n(rst_n), .io(io), .io_rdata(io_rdata[2]), .io_hit(io_hit[2]),
    .pin_in(portc_in), .pin_out(portc_out), .pin_oe(portc_oe)
  );

  io_port #(.W(8), .PIN_ADDR(IO_PIND), .DDR_ADDR(IO_DDRD), .PORT_ADDR(IO_PORTD)) u_portd (
    .clk(clk), .rst_n(rst_n), .io(io), .io_rdata(io_rdata[3]), .io_hit(io_hit[3]),
    .pin_in(portd_in), .pin_out(portd_out), .pin_oe(portd_oe)
  );

  timer16 u_timer (
    .clk(clk), .rst_n(rst_n), .io(io), .io_rdata(io_rdata[4]), .io_hit(io_hit[4]),
    .icp(icp), .oc(oc), .irq(timer_irq)
  );

  ext_interrupt u_extint (
    .clk(clk), .rst_n(rst_n), .io(io), .io_rdata(io_rdata[5]), .io_hit(io_hit[5]),
    .int_pin(int0), .ack(ext_ack), .irq(ext_irq)
  );

  data_bus #(.NIO(NIO)) u_bus (
    .clk(clk), .src(bus_src), .alu(alu_y), .ram(ram_rd), .tmp(tmp),
    .io_rdata(io_rdata), .io_hit(io_hit), .bus(bus)
  );

endmodule

// mcu_pkg: types, constants and instruction encoding of the 16-bit RISC
// microcontroller.
//
// The machine has a 16-bit data path, sixteen 16-bit registers, a 16-bit
// program counter and 24-bit instruction words; those widths are the design's
// specification. The instruction format, the I/O address map and the
// interrupt vectors below are this implementation's own choices, modelled on
// the AVR AT90S1200 the instruction set is derived from.
//
// Instruction word (24 bits):
//   [23:20] major opcode         [19:16] Rd (destination / first operand)
//   [15:12] Rr (source)          [15:0]  16-bit constant or RJMP/RCALL offset
//   [11:8]  bit number (CBI/SBI/SBIC/SBIS)
//   [6:0]   conditional-branch offset (-64..63), [18:16] flag index, [19] polarity
//   [5:0]   I/O address          [3:0]   ALU function / misc code
//   [1:0]   pointer mode of LD/ST (0: Z, 1: Z+, 2: -Z)
// The all-zero word is NOP.
package mcu_pkg;

  localparam int unsigned DW   = 16;  // data width
  localparam int unsigned IW   = 24;  // instruction width
  localparam int unsigned PCW  = 16;  // program counter width
  localparam int unsigned NREG = 16;  // general purpose registers
  localparam int unsigned RAW  = 4;   // register address width
  localparam int unsigned IOAW = 6;   // I/O address width

  typedef logic [DW-1:0]   word_t;
  typedef logic [IW-1:0]   instr_t;
  typedef logic [PCW-1:0]  pc_t;
  typedef logic [RAW-1:0]  reg_addr_t;
  typedef logic [IOAW-1:0] io_addr_t;

  // Register used as the Z pointer of indirect addressing.
  localparam reg_addr_t ZREG = 4'd15;

  typedef enum logic [3:0] {
    MAJ_MISC  = 4'h0, MAJ_LDI  = 4'h1, MAJ_SUBI = 4'h2, MAJ_SBCI  = 4'h3,
    MAJ_ANDI  = 4'h4, MAJ_ORI  = 4'h5, MAJ_CBR  = 4'h6, MAJ_IN    = 4'h7,
    MAJ_OUT   = 4'h8, MAJ_LD   = 4'h9, MAJ_ST   = 4'hA, MAJ_RJMP  = 4'hB,
    MAJ_RCALL = 4'hC, MAJ_BR   = 4'hD, MAJ_BIT  = 4'hE, MAJ_ALU   = 4'hF
  } major_e;

  // Function field of register-register / single-register instructions.
  typedef enum logic [3:0] {
    F_ADD = 4'h0, F_ADC = 4'h1, F_SUB = 4'h2, F_SBC = 4'h3,
    F_AND = 4'h4, F_OR  = 4'h5, F_EOR = 4'h6, F_MOV = 4'h7,
    F_COM = 4'h8, F_NEG = 4'h9, F_INC = 4'hA, F_DEC = 4'hB
  } alu_funct_e;

  typedef enum logic [3:0] {
    M_NOP = 4'h0, M_SLEEP = 4'h1, M_RET = 4'h2, M_RETI = 4'h3,
    M_SEI = 4'h4, M_CLI   = 4'h5
  } misc_e;

  typedef enum logic [1:0] {B_CBI = 2'd0, B_SBI = 2'd1, B_SBIC = 2'd2, B_SBIS = 2'd3} bitop_e;

  typedef enum logic [1:0] {PTR_Z = 2'd0, PTR_ZINC = 2'd1, PTR_ZDEC = 2'd2} ptr_mode_e;

  // The eleven ALU operations plus a pass-through of operand B.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_EOR,
    ALU_COM, ALU_NEG, ALU_INC, ALU_DEC, ALU_PASS
  } alu_op_e;

  // Status register, bit 7 down to bit 0.
  typedef struct packed {
    logic i;  // global interrupt enable
    logic p;  // parity: result has an even number of ones
    logic h;  // half carry (out of bit 3)
    logic s;  // sign, N xor V
    logic v;  // two's complement overflow
    logic n;  // negative
    logic z;  // zero
    logic c;  // carry / borrow
  } sreg_t;

  // Indices of the flags inside sreg_t, used by conditional branches.
  localparam logic [2:0] FLAG_C = 3'd0, FLAG_Z = 3'd1, FLAG_N = 3'd2, FLAG_V = 3'd3,
                         FLAG_S = 3'd4, FLAG_H = 3'd5, FLAG_P = 3'd6, FLAG_I = 3'd7;

  // States of the control FSM.
  typedef enum logic [2:0] {
    S_EXE, S_SLEEP, S_BRANCH1, S_BRANCH2, S_SBICS, S_CBISBI, S_ST, S_LD
  } state_e;

  // Sources of the common data bus.
  typedef enum logic [2:0] {BUS_NONE, BUS_ALU, BUS_RAM, BUS_IO, BUS_TMP} bus_src_e;

  // One instruction class per decoder output line.
  typedef enum logic [4:0] {
    I_NOP, I_SLEEP, I_RET, I_RETI, I_SEI, I_CLI,
    I_ALU,   // register-register or single-register ALU instruction, MOV
    I_ALUI,  // register-constant instruction, LDI (MVI)
    I_IN, I_OUT, I_LD, I_ST, I_RJMP, I_RCALL, I_BRANCH,
    I_CBI, I_SBI, I_SBIC, I_SBIS
  } instr_e;

  typedef struct packed {
    instr_e     op;
    reg_addr_t  rd;
    reg_addr_t  rr;
    alu_op_e    alu_op;
    logic       alu_b_imm;   // operand B is the constant
    logic       writes_rd;   // result goes to Rd
    logic       writes_flags;
    word_t      imm;
    io_addr_t   ioa;
    logic [3:0] bitn;
    logic [2:0] flag_sel;
    logic       if_set;
    ptr_mode_e  ptr;
    pc_t        offset;      // sign-extended branch offset
  } dec_t;

  // Request from the control unit to the I/O registers; wdata is the data bus.
  typedef struct packed {
    io_addr_t addr;
    logic     rd;
    logic     wr;
    word_t    wdata;
  } io_req_t;

  // I/O address map (AVR-style).
  localparam io_addr_t IO_SREG  = 6'h3F;
  localparam io_addr_t IO_GIMSK = 6'h3B;
  localparam io_addr_t IO_GIFR  = 6'h3A;
  localparam io_addr_t IO_TIMSK = 6'h39;
  localparam io_addr_t IO_TIFR  = 6'h38;
  localparam io_addr_t IO_MCUCR = 6'h35;
  localparam io_addr_t IO_TCCR  = 6'h33;
  localparam io_addr_t IO_TCNT  = 6'h32;
  localparam io_addr_t IO_OCR   = 6'h31;
  localparam io_addr_t IO_ICR   = 6'h30;
  localparam io_addr_t IO_PORTB = 6'h18;
  localparam io_addr_t IO_DDRB  = 6'h17;
  localparam io_addr_t IO_PINB  = 6'h16;
  localparam io_addr_t IO_PORTC = 6'h15;
  localparam io_addr_t IO_DDRC  = 6'h14;
  localparam io_addr_t IO_PINC  = 6'h13;
  localparam io_addr_t IO_PORTD = 6'h12;
  localparam io_addr_t IO_DDRD  = 6'h11;
  localparam io_addr_t IO_PIND  = 6'h10;

  localparam pc_t VEC_RESET = 16'd0;

  localparam instr_t NOP_WORD = 24'h000000;

  // ---- Instruction encoders (used by programs written in SystemVerilog) ----
  function automatic instr_t enc_alu(alu_funct_e f, reg_addr_t rd, reg_addr_t rr);
    return {MAJ_ALU, rd, rr, 8'h00, f};
  endfunction
  function automatic instr_t enc_imm(major_e maj, reg_addr_t rd, word_t k);
    return {maj, rd, k};
  endfunction
  function automatic instr_t enc_in(reg_addr_t rd, io_addr_t a);
    return {MAJ_IN, rd, 10'd0, a};
  endfunction
  function automatic instr_t enc_out(io_addr_t a, reg_addr_t rr);
    return {MAJ_OUT, 4'd0, rr, 6'd0, a};
  endfunction
  function automatic instr_t enc_ld(reg_addr_t rd, ptr_mode_e m);
    return {MAJ_LD, rd, 14'd0, m};
  endfunction
  function automatic instr_t enc_st(reg_addr_t rr, ptr_mode_e m);
    return {MAJ_ST, 4'd0, rr, 10'd0, m};
  endfunction
  function automatic instr_t enc_rjmp(pc_t off);
    return {MAJ_RJMP, 4'd0, off};
  endfunction
  function automatic instr_t enc_rcall(pc_t off);
    return {MAJ_RCALL, 4'd0, off};
  endfunction
  function automatic instr_t enc_br(logic if_set, logic [2:0] flag, logic [6:0] off);
    return {MAJ_BR, if_set, flag, 9'd0, off};
  endfunction
  function automatic instr_t enc_bit(bitop_e b, io_addr_t a, logic [3:0] bitn);
    return {MAJ_BIT, 2'd0, b, 4'd0, bitn, 2'd0, a};
  endfunction
  function automatic instr_t enc_misc(misc_e m);
    return {MAJ_MISC, 16'd0, m};
  endfunction

endpackage

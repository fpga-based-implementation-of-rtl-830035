// control_unit: instruction decoder, branch evaluation, hardware stack and the
// eight-state control FSM of the microcontroller.
//
// States (the design's state diagram): EXE executes the instruction in the IR;
// SLEEP waits for an interrupt; BRANCH1 and BRANCH2 are the extra cycles of
// jumps, calls, returns, interrupt entry and taken branches; SBICS tests a bit
// of an I/O register and may skip the next instruction; CBISBI writes back an
// I/O register with one bit cleared or set; ST and LD move a word between a
// register and the data RAM. Transitions:
//   EXE -> EXE      single-cycle instruction (ALU, LDI, IN, OUT, NOP, SEI, CLI,
//                   branch not taken)
//   EXE -> BRANCH1  RJMP, RCALL, RET, RETI or interrupt entry; -> BRANCH2 -> EXE
//   EXE -> BRANCH2  conditional branch whose condition holds (branch request)
//   EXE -> LD / ST / SBICS / CBISBI -> EXE
//   EXE -> SLEEP    SLEEP; SLEEP stays until an accepted IRQ, then -> BRANCH1
// Cycle counts therefore are: single-cycle 1, taken branch 2, LD/ST/SBIC/SBIS/
// CBI/SBI 2, RJMP/RCALL/RET/RETI 3, interrupt entry 3 after the interrupted
// instruction.
//
// Fetching: the next instruction is latched into the IR (ir_load) in the last
// cycle of every instruction, from rom_addr = PC, and the PC increments, so
// the PC always holds the address after the instruction in the IR. A branch
// loads the PC in EXE and BRANCH2 refetches. A skip fetches from PC+1 and
// loads PC+2.
//
// Data bus: bus_src names the one source that drives the common bus in each
// cycle; this replaces the tri-state bus of a board-level design. The bus value
// comes back on `bus` for the bit tests of SBIC/SBIS and the read-modify-write
// of CBI/SBI (held in tmp in between).
//
// Interrupts: when I = 1 and ext_irq or timer_irq is high, the single-cycle
// instruction in EXE completes, the PC (its return address) is pushed, I is
// cleared and the PC loads VEC_INT0 (external, higher priority) or VEC_TIMER;
// not in the cycle of CLI or OUT, which may change I. ext_ack tells the
// external interrupt its vector was taken. RETI pops and sets I.
//
// LD/ST address the data RAM with Z (R15), Z before a post-increment (Z+) or
// Z-1 for a pre-decrement (-Z); the new Z is written through the register
// file's pointer port in EXE and the address is held for the LD/ST cycle.
//
// The state set and its transitions follow the design's state diagram; what
// each state does cycle by cycle, the vectors and the interrupt rules are this
// implementation's choices.
module control_unit
  import mcu_pkg::*;
#(
  parameter pc_t VEC_INT0  = 16'd1,
  parameter pc_t VEC_TIMER = 16'd2
) (
  input  logic      clk,
  input  logic      rst_n,
  // fetch unit
  input  instr_t    ir,
  input  pc_t       pc,
  output pc_t       rom_addr,
  output logic      ir_load,
  output logic      pc_inc,
  output logic      pc_load,
  output pc_t       pc_d,
  // register file
  output reg_addr_t rf_ra,
  output reg_addr_t rf_rb,
  output logic      rf_we,
  output reg_addr_t rf_wa,
  input  word_t     z,
  output logic      z_we,
  output word_t     z_wd,
  // ALU and status register
  output alu_op_e   alu_op,
  output logic      alu_b_imm,
  output word_t     imm,
  input  sreg_t     sreg,
  output logic      sr_flag_we,
  output logic      sr_i_set,
  output logic      sr_i_clr,
  // data bus, I/O and data RAM
  output bus_src_e  bus_src,
  input  word_t     bus,
  output word_t     tmp,
  output io_addr_t  io_addr,
  output logic      io_rd,
  output logic      io_wr,
  output word_t     ram_addr,
  output logic      ram_we,
  // interrupts
  input  logic      ext_irq,
  input  logic      timer_irq,
  output logic      ext_ack,
  // observation
  output state_e    state,
  output logic      branch_req,
  output logic      skip_req,
  output logic      irq_taken
);

  dec_t   d;
  state_e state_q, state_d;
  word_t  mem_addr_q, mem_addr_d;
  word_t  tmp_q;
  logic   push, pop;
  pc_t    stack_top;
  logic   irq_ok;
  pc_t    vec;
  logic   bit_val;
  logic   single;      // single-cycle instruction completes in EXE
  logic   fetch;       // normal fetch from PC
  logic   pc_load_m;   // PC load from the main FSM logic
  pc_t    pc_d_m;

  instr_decoder u_dec (.ir(ir), .d(d));

  branch_eval u_br (
    .sreg(sreg), .flag_sel(d.flag_sel), .if_set(d.if_set),
    .is_branch(d.op == I_BRANCH), .branch_req(branch_req)
  );

  hw_stack #(.DEPTH(4)) u_stack (
    .clk(clk), .rst_n(rst_n), .push(push), .pop(pop), .d(pc), .top(stack_top)
  );

  assign irq_ok = sreg.i && (ext_irq || timer_irq);
  assign vec    = ext_irq ? VEC_INT0 : VEC_TIMER;
  assign state  = state_q;
  assign tmp    = tmp_q;
  assign imm    = d.imm;

  // Main control: everything that does not depend on the data bus value.
  always_comb begin
    state_d    = state_q;
    mem_addr_d = mem_addr_q;
    fetch      = 1'b0;
    pc_load_m  = 1'b0;
    pc_d_m     = pc;
    rf_ra      = d.rd;
    rf_rb      = d.rr;
    rf_we      = 1'b0;
    rf_wa      = d.rd;
    z_we       = 1'b0;
    z_wd       = z;
    alu_op     = d.alu_op;
    alu_b_imm  = d.alu_b_imm;
    sr_flag_we = 1'b0;
    sr_i_set   = 1'b0;
    sr_i_clr   = 1'b0;
    bus_src    = BUS_NONE;
    io_addr    = d.ioa;
    io_rd      = 1'b0;
    io_wr      = 1'b0;
    ram_addr   = mem_addr_q;
    ram_we     = 1'b0;
    push       = 1'b0;
    pop        = 1'b0;
    ext_ack    = 1'b0;
    irq_taken  = 1'b0;
    single     = 1'b0;

    unique case (state_q)
      S_EXE: begin
        unique case (d.op)
          I_ALU, I_ALUI: begin
            bus_src    = BUS_ALU;
            rf_we      = 1'b1;
            sr_flag_we = d.writes_flags;
            single     = 1'b1;
          end
          I_IN: begin
            io_rd   = 1'b1;
            bus_src = BUS_IO;
            rf_we   = 1'b1;
            single  = 1'b1;
          end
          I_OUT: begin
            alu_op    = ALU_PASS;
            alu_b_imm = 1'b0;
            bus_src   = BUS_ALU;
            io_wr     = 1'b1;
            single    = 1'b1;
          end
          I_SEI: begin sr_i_set = 1'b1; single = 1'b1; end
          I_CLI: begin sr_i_clr = 1'b1; single = 1'b1; end
          I_LD, I_ST: begin
            mem_addr_d = (d.ptr == PTR_ZDEC) ? z - 1'b1 : z;
            z_we       = (d.ptr == PTR_ZINC) || (d.ptr == PTR_ZDEC);
            z_wd       = (d.ptr == PTR_ZINC) ? z + 1'b1 : z - 1'b1;
            state_d    = (d.op == I_LD) ? S_LD : S_ST;
          end
          I_RJMP: begin
            pc_load_m = 1'b1;
            pc_d_m    = pc + d.offset;
            state_d   = S_BRANCH1;
          end
          I_RCALL: begin
            push      = 1'b1;
            pc_load_m = 1'b1;
            pc_d_m    = pc + d.offset;
            state_d   = S_BRANCH1;
          end
          I_RET, I_RETI: begin
            pop       = 1'b1;
            pc_load_m = 1'b1;
            pc_d_m    = stack_top;
            sr_i_set  = (d.op == I_RETI);
            state_d   = S_BRANCH1;
          end
          I_BRANCH: begin
            if (branch_req) begin
              pc_load_m = 1'b1;
              pc_d_m    = pc + d.offset;
              state_d   = S_BRANCH2;
            end else begin
              single = 1'b1;
            end
          end
          I_SBIC, I_SBIS: state_d = S_SBICS;
          I_CBI, I_SBI: begin
            io_rd   = 1'b1;
            bus_src = BUS_IO;
            state_d = S_CBISBI;
          end
          I_SLEEP: state_d = S_SLEEP;
          default: single = 1'b1;  // NOP
        endcase
        if (single) begin
          if (irq_ok && d.op != I_CLI && d.op != I_OUT) begin
            push      = 1'b1;
            pc_load_m = 1'b1;
            pc_d_m    = vec;
            sr_i_clr  = 1'b1;
            ext_ack   = ext_irq;
            irq_taken = 1'b1;
            state_d   = S_BRANCH1;
          end else begin
            fetch   = 1'b1;
            state_d = S_EXE;
          end
        end
      end
      S_SLEEP: begin
        if (irq_ok) begin
          push      = 1'b1;
          pc_load_m = 1'b1;
          pc_d_m    = vec;
          sr_i_clr  = 1'b1;
          ext_ack   = ext_irq;
          irq_taken = 1'b1;
          state_d   = S_BRANCH1;
        end
      end
      S_BRANCH1: state_d = S_BRANCH2;
      S_BRANCH2: begin
        fetch   = 1'b1;
        state_d = S_EXE;
      end
      S_SBICS: begin
        io_rd   = 1'b1;
        bus_src = BUS_IO;
        state_d = S_EXE;      // fetch (with or without skip) below
      end
      S_CBISBI: begin
        bus_src = BUS_TMP;
        io_wr   = 1'b1;
        fetch   = 1'b1;
        state_d = S_EXE;
      end
      S_ST: begin
        alu_op    = ALU_PASS;
        alu_b_imm = 1'b0;
        bus_src   = BUS_ALU;
        ram_we    = 1'b1;
        fetch     = 1'b1;
        state_d   = S_EXE;
      end
      S_LD: begin
        bus_src = BUS_RAM;
        rf_we   = 1'b1;
        fetch   = 1'b1;
        state_d = S_EXE;
      end
      default: state_d = S_EXE;
    endcase
  end

  // Bit test of SBIC/SBIS on the value read onto the data bus.
  assign bit_val  = bus[d.bitn];
  assign skip_req = (state_q == S_SBICS) && ((d.op == I_SBIS) ? bit_val : !bit_val);

  // Fetch address and PC update, including the skip of SBIC/SBIS.
  assign rom_addr = skip_req ? pc + 1'b1 : pc;
  assign ir_load  = fetch || (state_q == S_SBICS);
  assign pc_inc   = fetch || (state_q == S_SBICS && !skip_req);
  assign pc_load  = pc_load_m || skip_req;
  assign pc_d     = skip_req ? pc + 16'd2 : pc_d_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_EXE;
      mem_addr_q <= '0;
      tmp_q      <= '0;
    end else begin
      state_q    <= state_d;
      mem_addr_q <= mem_addr_d;
      if (state_q == S_EXE && (d.op == I_CBI || d.op == I_SBI)) begin
        tmp_q          <= bus;
        tmp_q[d.bitn]  <= (d.op == I_SBI);
      end
    end
  end

  // Only one of the data RAM and the I/O registers is written in a cycle, and
  // register writes only take a value that something drives onto the bus.
  assert property (@(posedge clk) disable iff (!rst_n) !(ram_we && io_wr));
  assert property (@(posedge clk) disable iff (!rst_n) rf_we |-> bus_src != BUS_NONE);

endmodule

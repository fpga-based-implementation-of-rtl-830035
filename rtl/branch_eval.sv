// branch_eval: branch evaluation unit.
//
// For a conditional branch in the instruction register (is_branch) it picks
// the status flag named by flag_sel (index into I P H S V N Z C, bit 7..0) and
// raises branch_req when that flag equals the wanted polarity (if_set = 1:
// branch when set, 0: branch when clear). This covers BREQ/BRNE, BRCS/BRCC,
// BRMI/BRPL, BRVS/BRVC, BRLT/BRGE, BRHS/BRHC and branches on parity and I.
// The set/clear-on-flag scheme is the AVR's (BRBS/BRBC). Combinational.
module branch_eval
  import mcu_pkg::*;
(
  input  sreg_t      sreg,
  input  logic [2:0] flag_sel,
  input  logic       if_set,
  input  logic       is_branch,
  output logic       branch_req
);

  logic [7:0] bits;
  assign bits       = sreg;
  assign branch_req = is_branch && (bits[flag_sel] == if_set);

endmodule

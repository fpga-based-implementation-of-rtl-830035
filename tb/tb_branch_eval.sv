// tb_branch_eval: every flag, both polarities, all flag values, and no
// request when the instruction is not a branch.
module tb_branch_eval;
  import mcu_pkg::*;

  sreg_t sreg;
  logic [2:0] flag_sel;
  logic if_set, is_branch, branch_req;
  int checks = 0, failures = 0;

  branch_eval dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++)
      for (int f = 0; f < 8; f++)
        for (int p = 0; p < 2; p++)
          for (int b = 0; b < 2; b++) begin
            logic [7:0] sv;
            sv = 8'(s);
            sreg = sreg_t'(sv); flag_sel = 3'(f); if_set = p[0]; is_branch = b[0];
            #1;
            checks++;
            if (branch_req !== (b[0] && (sv[f] == p[0]))) begin
              failures++;
              $display("FAIL s=%h f=%0d p=%0d b=%0d got %b", s, f, p, b, branch_req);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

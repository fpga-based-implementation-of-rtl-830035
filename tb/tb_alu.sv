// tb_alu: checks every ALU operation on directed and random operands against
// a reference computed here with 32-bit integer arithmetic, including each
// flag and the mask of updated flags given by the instruction-set flag table.
module tb_alu;
  import mcu_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  logic c_in;
  sreg_t flags, mask;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h c=%b: got %h expected %h", what, op.name(), a, b, c_in, got, exp);
    end
  endtask

  task automatic run(alu_op_e o, word_t ta, word_t tb, logic tc);
    int unsigned ea, eb, ec, r;
    logic [7:0] em;   // expected mask I P H S V N Z C
    logic ecf, ehf, evf;
    op = o; a = ta; b = tb; c_in = tc;
    #1;
    ea = ta; eb = tb; ec = tc;
    ecf = 0; ehf = 0; evf = 0;
    case (o)
      ALU_ADD, ALU_ADC: begin
        if (o == ALU_ADD) ec = 0;
        r   = ea + eb + ec;
        ecf = r[16];
        ehf = ((ea & 15) + (eb & 15) + ec) > 15;
        evf = (ta[15] == tb[15]) && (r[15] != ta[15]);
        em  = 8'b0111_1111;
      end
      ALU_SUB, ALU_SBC: begin
        if (o == ALU_SUB) ec = 0;
        r   = ea - eb - ec;
        ecf = (eb + ec) > ea;
        ehf = ((eb & 15) + ec) > (ea & 15);
        evf = (ta[15] != tb[15]) && (r[15] != ta[15]);
        em  = 8'b0111_1111;
      end
      ALU_NEG: begin
        r   = 0 - ea;
        ecf = ea != 0;
        ehf = (ea & 15) != 0;
        evf = ta == 16'h8000;
        em  = 8'b0111_1111;
      end
      ALU_AND: begin r = ea & eb; em = 8'b0101_1110; end
      ALU_OR:  begin r = ea | eb; em = 8'b0101_1110; end
      ALU_EOR: begin r = ea ^ eb; em = 8'b0101_1110; end
      ALU_COM: begin r = ~ea; ecf = 1; em = 8'b0101_1111; end
      ALU_INC: begin r = ea + 1; evf = ta == 16'h7FFF; em = 8'b0101_1110; end
      ALU_DEC: begin r = ea - 1; evf = ta == 16'h8000; em = 8'b0101_1110; end
      default: begin r = eb; em = 8'h00; end
    endcase
    check("result", y, r[15:0]);
    check("mask", mask, em);
    if (em[0]) check("C", flags.c, ecf);
    if (em[5]) check("H", flags.h, ehf);
    if (em[1]) check("Z", flags.z, r[15:0] == 0);
    if (em[2]) check("N", flags.n, r[15]);
    if (em[3]) check("V", flags.v, evf);
    if (em[4]) check("S", flags.s, r[15] ^ evf);
    if (em[6]) check("P", flags.p, ($countones(r[15:0]) % 2) == 0);
  endtask

  initial begin
    // directed corner cases
    run(ALU_ADD, 16'hFFFF, 16'h0001, 0);
    run(ALU_ADD, 16'h7FFF, 16'h0001, 0);
    run(ALU_ADC, 16'h000F, 16'h0000, 1);
    run(ALU_SUB, 16'h0000, 16'h0001, 0);
    run(ALU_SUB, 16'h8000, 16'h0001, 0);
    run(ALU_SBC, 16'h0010, 16'h000F, 1);
    run(ALU_NEG, 16'h8000, 0, 0);
    run(ALU_NEG, 16'h0000, 0, 0);
    run(ALU_INC, 16'h7FFF, 0, 0);
    run(ALU_DEC, 16'h8000, 0, 0);
    run(ALU_COM, 16'h00FF, 0, 0);
    run(ALU_PASS, 16'h1234, 16'h0005, 1);
    // random
    for (int i = 0; i < 3000; i++)
      run(alu_op_e'($urandom_range(0, 11)), word_t'($urandom), word_t'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_y86_alu: checks the four ALU operations and the condition codes against
// a model written with 64-bit integers, on directed overflow cases and random
// operands.
module tb_y86_alu;
  import y86_pkg::*;

  word_t      alua, alub, vale;
  logic [3:0] alufun;
  cc_t        new_cc;
  int         checks = 0, failures = 0;

  y86_alu dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(word_t a, word_t b, logic [3:0] f);
    longint exact;
    word_t  ev;
    logic   eof;
    alua = a; alub = b; alufun = f;
    #1;
    case (f)
      A_ADD: begin exact = longint'(signed'(b)) + longint'(signed'(a)); ev = b + a; end
      A_SUB: begin exact = longint'(signed'(b)) - longint'(signed'(a)); ev = b - a; end
      A_AND: begin ev = b & a; exact = longint'(signed'(ev)); end
      default: begin ev = b ^ a; exact = longint'(signed'(ev)); end
    endcase
    eof = (exact > 64'sd2147483647) || (exact < -64'sd2147483648);
    checks++;
    if (vale !== ev || new_cc.zf !== (ev == 0) || new_cc.sf !== ev[31] || new_cc.of !== eof) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h: %h zf%b sf%b of%b, expected %h of%b", f, a, b, vale,
               new_cc.zf, new_cc.sf, new_cc.of, ev, eof);
    end
  endtask

  initial begin
    apply(32'h1, 32'h7FFF_FFFF, A_ADD);
    apply(32'h1, 32'h8000_0000, A_SUB);
    apply(32'hFFFF_FFFF, 32'h7FFF_FFFF, A_SUB);
    apply(32'h5, 32'h5, A_SUB);
    apply(32'hF0F0, 32'h0F0F, A_AND);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, A_XOR);
    for (int i = 0; i < 4000; i++) apply($urandom, $urandom, 4'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_y86_execute: checks the Execute stage: ALU operand selection for each
// instruction class, the bound flags of SMOV instructions (including edge
// addresses), condition-code update rules (only OPl/iaddl, not under an
// exception) and the seven branch conditions, and the cancelled destination of
// a conditional move that is not taken.
module tb_y86_execute;
  import y86_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  e_reg_t  E;
  stat_t   m_stat, W_stat;
  m_reg_t  e_out;
  reg_id_t e_dste;
  word_t   e_vale;
  logic    e_cnd;
  int      checks = 0, failures = 0;

  y86_execute dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set(icode_t ic, logic [3:0] fn, word_t c, word_t a, word_t b, word_t u, word_t l);
    E = E_BUBBLE;
    E.stat = S_AOK; E.icode = ic; E.ifun = fn; E.valc = c; E.vala = a; E.valb = b;
    E.valu = u; E.vall = l; E.dste = R_EDX; E.dstm = R_EBX;
    #1;
  endtask

  // run one OPl through a clock edge so that it sets CC
  task automatic op(logic [3:0] fn, word_t a, word_t b);
    @(negedge clk);
    set(I_OPL, fn, 0, a, b, 0, 0);
    @(negedge clk);
    set(I_JXX, C_YES, 0, 0, 0, 0, 0);
  endtask

  // expected jXX conditions for the flags left by b - a
  task automatic check_conds(word_t a, word_t b);
    int sa = a, sb = b;
    logic [6:0] exp_c;
    exp_c = {sb > sa, sb >= sa, sb != sa, sb == sa, sb < sa, sb <= sa, 1'b1};
    for (int c = 0; c <= 6; c++) begin
      set(I_JXX, 4'(c), 0, 0, 0, 0, 0);
      check($sformatf("condition %0d after %0d - %0d", c, sb, sa), e_cnd === exp_c[c]);
    end
  endtask

  initial begin
    m_stat = S_AOK; W_stat = S_AOK;
    set(I_NOP, 0, 0, 0, 0, 0, 0);
    #2 rst_n = 1'b1;
    set(I_SMRMOVL, 0, 32'h1000, 32'h0, 32'h8, 32'h1000 + 1597, 32'h1000);
    check("smrmovl address", e_vale === 32'h1008 && e_out.vale === 32'h1008);
    check("smrmovl in bounds", e_out.ub && e_out.lb);
    set(I_SRMMOVL, 0, 32'h1000, 32'h55, 32'd1596, 32'h1000 + 1597, 32'h1000);
    check("srmmovl last element", e_out.ub && e_out.lb && e_out.vala === 32'h55);
    set(I_SRMMOVL, 0, 32'h1000, 32'h55, 32'd1600, 32'h1000 + 1597, 32'h1000);
    check("srmmovl past the end", !e_out.ub && e_out.lb);
    set(I_SMRMOVL, 0, 32'h1000, 0, -32'sd4, 32'h1000 + 1597, 32'h1000);
    check("smrmovl before the start", e_out.ub && !e_out.lb);
    set(I_MRMOVL, 0, 32'h10, 0, 32'h20, 0, 0);
    check("mrmovl address", e_vale === 32'h30);
    set(I_RRMOVL, C_YES, 0, 32'h77, 32'h99, 0, 0);
    check("rrmovl passes valA", e_vale === 32'h77 && e_dste === R_EDX);
    set(I_IRMOVL, 0, 32'h1234, 0, 32'h99, 0, 0);
    check("irmovl passes valC", e_vale === 32'h1234);
    set(I_PUSHL, 0, 0, 0, 32'h400, 0, 0);
    check("pushl decrements esp", e_vale === 32'h3FC);
    set(I_CALL, 0, 0, 0, 32'h400, 0, 0);
    check("call decrements esp", e_vale === 32'h3FC);
    set(I_POPL, 0, 0, 0, 32'h400, 0, 0);
    check("popl increments esp", e_vale === 32'h404);
    set(I_LEAVE, 0, 0, 32'h3F0, 32'h3F0, 0, 0);
    check("leave computes ebp + 4", e_vale === 32'h3F4);
    set(I_IADDL, 0, -32'sd5, 0, 32'd3, 0, 0);
    check("iaddl", e_vale === -32'sd2);
    set(I_OPL, A_SUB, 0, 32'd3, 32'd10, 0, 0);
    check("subl", e_vale === 32'd7);
    set(I_OPL, A_AND, 0, 32'hF0, 32'h3C, 0, 0);
    check("andl", e_vale === 32'h30);

    // condition codes and branch conditions
    op(A_SUB, 5, 5);                  check_conds(5, 5);
    op(A_SUB, 7, 3);                  check_conds(7, 3);
    op(A_SUB, 3, 7);                  check_conds(3, 7);
    op(A_SUB, 32'h1, 32'h8000_0000);  check_conds(32'h1, 32'h8000_0000);   // overflow
    op(A_SUB, 32'hFFFF_FFFF, 32'h7FFF_FFFF); check_conds(32'hFFFF_FFFF, 32'h7FFF_FFFF);
    // an exception further down the pipeline blocks the update
    m_stat = S_BND;
    op(A_SUB, 9, 1);                  check_conds(32'hFFFF_FFFF, 32'h7FFF_FFFF);
    m_stat = S_AOK; W_stat = S_ADR;
    op(A_SUB, 9, 1);                  check_conds(32'hFFFF_FFFF, 32'h7FFF_FFFF);
    W_stat = S_AOK;
    // a non-arithmetic instruction leaves CC alone
    @(negedge clk); set(I_IRMOVL, 0, 0, 0, 0, 0, 0); @(negedge clk);
    check_conds(32'hFFFF_FFFF, 32'h7FFF_FFFF);
    // conditional move not taken: destination cancelled
    op(A_SUB, 5, 5);
    set(I_RRMOVL, C_NE, 0, 32'h1, 32'h2, 0, 0);
    check("cmovne not taken", e_dste === R_NONE && e_out.dste === R_NONE);
    set(I_RRMOVL, C_E, 0, 32'h1, 32'h2, 0, 0);
    check("cmove taken", e_dste === R_EDX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

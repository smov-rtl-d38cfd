// tb_y86_fetch: feeds the Fetch stage with every instruction form, assembled
// independently by y86_asm_pkg, and checks the split fields, the length
// (valP), the predicted PC and the status. SMOV instructions must be 7 bytes
// with rU:rL from the seventh byte. Constants of instructions without valC
// read as zero because the bytes after them are zero. Also checks the three Select PC sources and
// the invalid-instruction and bad-address statuses.
module tb_y86_fetch;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  word_t       F_pred_pc, M_vala, W_valm, f_pc, f_pred_pc;
  icode_t      M_icode, W_icode;
  logic        M_cnd, imem_error;
  logic [55:0] ibytes;
  d_reg_t      f_out;
  int          checks = 0, failures = 0;

  y86_fetch dut (.*);

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

  // Present the bytes at address a of img (the assembled instruction)
  // Model of the instruction memory: the bytes of img at f_pc
  task automatic present(int a);
    F_pred_pc = a;
    #1;
    for (int i = 0; i < 7; i++) ibytes[8*i +: 8] = img.exists(f_pc + i) ? img[f_pc + i] : 8'h00;
    #1;
  endtask

  task automatic expect_instr(string name, int a, int len, icode_t ic, logic [3:0] fn,
                              reg_id_t ra, reg_id_t rb, reg_id_t ru, reg_id_t rl,
                              word_t valc, word_t pred);
    present(a);
    check({name, " pc"}, f_pc === a);
    check({name, " icode/ifun"}, f_out.icode === ic && f_out.ifun === fn);
    check({name, " registers"}, f_out.ra === ra && f_out.rb === rb && f_out.ru === ru && f_out.rl === rl);
    check({name, " valC"}, f_out.valc === valc);
    check({name, " valP"}, f_out.valp === a + len);
    check({name, " predPC"}, f_pred_pc === pred);
    check({name, " stat"}, f_out.stat === ((ic === I_HALT) ? S_HLT : S_AOK));
  endtask

  function automatic void build();
    org(32'h100); smrmovl(32'h1234_5678, EBX, EDX, ECX, ESI);
    org(32'h200); srmmovl(EAX, 32'hFFFF_FFFC, EDI, EBP, EBX);
    org(32'h300); mrmovl(32'h40, ESP, EAX);
    org(32'h400); rmmovl(ECX, 32'h44, EBP);
    org(32'h500); irmovl(32'hDEAD_BEEF, EDX);
    org(32'h600); opl(A_XOR, ESI, EDI);
    org(32'h700); jxx(LE, "x"); label("x");
    org(32'h800); call("x");
    org(32'h900); ret();
    org(32'hA00); pushl(EBX);
    org(32'hA10); popl(ECX);
    org(32'hA20); iaddl(-5, EAX);
    org(32'hA30); leave();
    org(32'hA40); halt();
    org(32'hA50); nop();
    org(32'hA60); cmov(G, EAX, EBX);
    org(32'hA70); b(8'h67);   // OPl with an undefined function
  endfunction

  initial begin
    M_icode = I_NOP; W_icode = I_NOP; M_cnd = 1'b1; M_vala = 0; W_valm = 0; imem_error = 1'b0;
    start(1); build();
    start(2); build();
    expect_instr("smrmovl", 32'h100, 7, I_SMRMOVL, 0, EDX, EBX, ECX, ESI, 32'h1234_5678, 32'h107);
    expect_instr("srmmovl", 32'h200, 7, I_SRMMOVL, 0, EAX, EDI, EBP, EBX, 32'hFFFF_FFFC, 32'h207);
    expect_instr("mrmovl",  32'h300, 6, I_MRMOVL, 0, EAX, ESP, R_NONE, R_NONE, 32'h40, 32'h306);
    expect_instr("rmmovl",  32'h400, 6, I_RMMOVL, 0, ECX, EBP, R_NONE, R_NONE, 32'h44, 32'h406);
    expect_instr("irmovl",  32'h500, 6, I_IRMOVL, 0, R_NONE, EDX, R_NONE, R_NONE, 32'hDEAD_BEEF, 32'h506);
    expect_instr("xorl",    32'h600, 2, I_OPL, A_XOR, ESI, EDI, R_NONE, R_NONE, 0, 32'h602);
    expect_instr("jle",     32'h700, 5, I_JXX, C_LE, R_NONE, R_NONE, R_NONE, R_NONE, 32'h705, 32'h705);
    expect_instr("call",    32'h800, 5, I_CALL, 0, R_NONE, R_NONE, R_NONE, R_NONE, 32'h705, 32'h705);
    expect_instr("ret",     32'h900, 1, I_RET, 0, R_NONE, R_NONE, R_NONE, R_NONE, 0, 32'h901);
    expect_instr("pushl",   32'hA00, 2, I_PUSHL, 0, EBX, R_NONE, R_NONE, R_NONE, 0, 32'hA02);
    expect_instr("popl",    32'hA10, 2, I_POPL, 0, ECX, R_NONE, R_NONE, R_NONE, 0, 32'hA12);
    expect_instr("iaddl",   32'hA20, 6, I_IADDL, 0, R_NONE, EAX, R_NONE, R_NONE, -5, 32'hA26);
    expect_instr("leave",   32'hA30, 1, I_LEAVE, 0, R_NONE, R_NONE, R_NONE, R_NONE, 0, 32'hA31);
    expect_instr("halt",    32'hA40, 1, I_HALT, 0, R_NONE, R_NONE, R_NONE, R_NONE, 0, 32'hA41);
    expect_instr("nop",     32'hA50, 1, I_NOP, 0, R_NONE, R_NONE, R_NONE, R_NONE, 0, 32'hA51);
    expect_instr("cmovg",   32'hA60, 2, I_RRMOVL, C_G, EAX, EBX, R_NONE, R_NONE, 0, 32'hA62);
    present(32'hA70);
    check("invalid function", f_out.stat === S_INS && f_out.icode === I_NOP);
    imem_error = 1'b1; present(32'h100);
    check("bad fetch address", f_out.stat === S_ADR && f_out.icode === I_NOP);
    imem_error = 1'b0;
    // Select PC
    M_icode = I_JXX; M_cnd = 1'b0; M_vala = 32'h600; present(32'h100);
    check("mispredicted jump refetches fall-through", f_pc === 32'h600 && f_out.icode === I_OPL);
    M_cnd = 1'b1; present(32'h100);
    check("taken jump keeps prediction", f_pc === 32'h100);
    M_icode = I_NOP; W_icode = I_RET; W_valm = 32'h300; present(32'h100);
    check("ret takes return address", f_pc === 32'h300 && f_out.icode === I_MRMOVL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

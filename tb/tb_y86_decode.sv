// tb_y86_decode: checks register selection for every instruction class and
// the forwarding priority of valA, valB and the SMOV bound values valU/valL.
// Register-file values are supplied by the testbench as a function of the
// register id, so a forwarded value is always distinguishable from a read one.
module tb_y86_decode;
  import y86_pkg::*;

  d_reg_t  D;
  reg_id_t d_srca, d_srcb, d_srcu, d_srcl;
  word_t   rvala, rvalb, rvalu, rvall;
  reg_id_t e_dste, M_dstm, M_dste, W_dstm, W_dste;
  word_t   e_vale, m_valm, M_vale, W_valm, W_vale;
  e_reg_t  d_out;
  int      checks = 0, failures = 0;

  y86_decode dut (.*);

  // register file model: register r holds 0x100 + r
  assign rvala = (d_srca == R_NONE) ? 0 : 32'h100 + d_srca;
  assign rvalb = (d_srcb == R_NONE) ? 0 : 32'h100 + d_srcb;
  assign rvalu = (d_srcu == R_NONE) ? 0 : 32'h100 + d_srcu;
  assign rvall = (d_srcl == R_NONE) ? 0 : 32'h100 + d_srcl;

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

  task automatic set(icode_t ic, reg_id_t ra, reg_id_t rb, reg_id_t ru, reg_id_t rl);
    D = D_BUBBLE;
    D.stat = S_AOK; D.icode = ic; D.ra = ra; D.rb = rb; D.ru = ru; D.rl = rl;
    D.valc = 32'hC0C0; D.valp = 32'hBEE0;
    #1;
  endtask

  task automatic no_fwd();
    e_dste = R_NONE; M_dstm = R_NONE; M_dste = R_NONE; W_dstm = R_NONE; W_dste = R_NONE;
  endtask

  task automatic expect_regs(string n, reg_id_t sa, reg_id_t sb, reg_id_t su, reg_id_t sl,
                             reg_id_t de, reg_id_t dm);
    check({n, " sources"}, d_srca === sa && d_srcb === sb && d_srcu === su && d_srcl === sl);
    check({n, " destinations"}, d_out.dste === de && d_out.dstm === dm);
    check({n, " source ids in E"}, d_out.srca === sa && d_out.srcb === sb && d_out.srcu === su && d_out.srcl === sl);
  endtask

  initial begin
    e_vale = 32'hE; m_valm = 32'hA; M_vale = 32'hB; W_valm = 32'hC; W_vale = 32'hD;
    no_fwd();
    set(I_SMRMOVL, R_EAX, R_EBX, R_ECX, R_EDX);
    expect_regs("smrmovl", R_NONE, R_EBX, R_ECX, R_EDX, R_NONE, R_EAX);
    check("smrmovl values", d_out.valb === 32'h103 && d_out.valu === 32'h101 && d_out.vall === 32'h102);
    set(I_SRMMOVL, R_ESI, R_EDI, R_EBP, R_EBX);
    expect_regs("srmmovl", R_ESI, R_EDI, R_EBP, R_EBX, R_NONE, R_NONE);
    check("srmmovl values", d_out.vala === 32'h106 && d_out.valb === 32'h107
          && d_out.valu === 32'h105 && d_out.vall === 32'h103 && d_out.valc === 32'hC0C0);
    set(I_MRMOVL, R_EAX, R_EBX, R_ECX, R_EDX);
    expect_regs("mrmovl", R_NONE, R_EBX, R_NONE, R_NONE, R_NONE, R_EAX);
    set(I_RMMOVL, R_EAX, R_EBX, R_NONE, R_NONE);
    expect_regs("rmmovl", R_EAX, R_EBX, R_NONE, R_NONE, R_NONE, R_NONE);
    set(I_OPL, R_ECX, R_EDX, R_NONE, R_NONE);
    expect_regs("opl", R_ECX, R_EDX, R_NONE, R_NONE, R_EDX, R_NONE);
    set(I_RRMOVL, R_ECX, R_EDX, R_NONE, R_NONE);
    expect_regs("rrmovl", R_ECX, R_NONE, R_NONE, R_NONE, R_EDX, R_NONE);
    set(I_IRMOVL, R_NONE, R_EDX, R_NONE, R_NONE);
    expect_regs("irmovl", R_NONE, R_NONE, R_NONE, R_NONE, R_EDX, R_NONE);
    set(I_IADDL, R_NONE, R_EDI, R_NONE, R_NONE);
    expect_regs("iaddl", R_NONE, R_EDI, R_NONE, R_NONE, R_EDI, R_NONE);
    set(I_PUSHL, R_EBX, R_NONE, R_NONE, R_NONE);
    expect_regs("pushl", R_EBX, R_ESP, R_NONE, R_NONE, R_ESP, R_NONE);
    set(I_POPL, R_EBX, R_NONE, R_NONE, R_NONE);
    expect_regs("popl", R_ESP, R_ESP, R_NONE, R_NONE, R_ESP, R_EBX);
    set(I_CALL, R_NONE, R_NONE, R_NONE, R_NONE);
    expect_regs("call", R_NONE, R_ESP, R_NONE, R_NONE, R_ESP, R_NONE);
    check("call valA is valP", d_out.vala === 32'hBEE0);
    set(I_RET, R_NONE, R_NONE, R_NONE, R_NONE);
    expect_regs("ret", R_ESP, R_ESP, R_NONE, R_NONE, R_ESP, R_NONE);
    set(I_LEAVE, R_NONE, R_NONE, R_NONE, R_NONE);
    expect_regs("leave", R_EBP, R_EBP, R_NONE, R_NONE, R_ESP, R_EBP);
    set(I_JXX, R_NONE, R_NONE, R_NONE, R_NONE);
    check("jxx valA is valP", d_out.vala === 32'hBEE0);

    // forwarding priority: every source register is the same (ecx)
    set(I_SRMMOVL, R_ECX, R_ECX, R_ECX, R_ECX);
    W_dste = R_ECX; #1;
    check("fwd W_valE", d_out.vala === 32'hD && d_out.valb === 32'hD && d_out.valu === 32'hD && d_out.vall === 32'hD);
    W_dstm = R_ECX; #1;
    check("fwd W_valM over W_valE", d_out.vala === 32'hC && d_out.valu === 32'hC && d_out.vall === 32'hC);
    M_dste = R_ECX; #1;
    check("fwd M_valE over W", d_out.valb === 32'hB && d_out.valu === 32'hB && d_out.vall === 32'hB);
    M_dstm = R_ECX; #1;
    check("fwd m_valM over M_valE", d_out.vala === 32'hA && d_out.valu === 32'hA && d_out.vall === 32'hA);
    e_dste = R_ECX; #1;
    check("fwd e_valE first", d_out.vala === 32'hE && d_out.valb === 32'hE && d_out.valu === 32'hE && d_out.vall === 32'hE);
    // only the bound register matches
    no_fwd();
    set(I_SMRMOVL, R_EAX, R_EBX, R_ECX, R_EDX);
    e_dste = R_EDX; M_dste = R_ECX; #1;
    check("fwd into valU and valL only", d_out.valb === 32'h103 && d_out.valu === 32'hB && d_out.vall === 32'hE);
    // R_NONE never matches
    no_fwd();
    set(I_NOP, R_NONE, R_NONE, R_NONE, R_NONE);
    e_dste = R_NONE; #1;
    check("no forwarding of R_NONE", d_out.valb === 0 && d_out.valu === 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

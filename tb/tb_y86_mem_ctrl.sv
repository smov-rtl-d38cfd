// tb_y86_mem_ctrl: checks the Memory-stage control for every instruction
// class: address source, read and write enables, store data, status, and for
// the two SMOV instructions all four UB/LB combinations, where only UB && LB
// may reach memory and any other combination must raise the interruption,
// give status S_BND and cancel the load's register write.
module tb_y86_mem_ctrl;
  import y86_pkg::*;

  m_reg_t M;
  word_t  mem_addr, mem_wdata, mem_rdata, m_valm;
  logic   mem_read, mem_write, dmem_error, interruption;
  stat_t  m_stat;
  w_reg_t m_out;
  int     checks = 0, failures = 0;

  y86_mem_ctrl dut (.*);

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

  task automatic set(icode_t ic, logic ub, logic lb);
    M = M_BUBBLE;
    M.stat = S_AOK; M.icode = ic; M.ub = ub; M.lb = lb;
    M.vale = 32'h1E0; M.vala = 32'h1A0; M.dste = R_NONE; M.dstm = R_ESI;
    #1;
  endtask

  initial begin
    mem_rdata = 32'hD00D; dmem_error = 1'b0;
    // plain accesses ignore UB/LB
    set(I_MRMOVL, 0, 0);
    check("mrmovl", mem_read && !mem_write && mem_addr === 32'h1E0 && !interruption
          && m_stat === S_AOK && m_valm === 32'hD00D && m_out.dstm === R_ESI);
    set(I_RMMOVL, 0, 0);
    check("rmmovl", !mem_read && mem_write && mem_addr === 32'h1E0 && mem_wdata === 32'h1A0 && !interruption);
    set(I_PUSHL, 0, 0);  check("pushl", mem_write && mem_addr === 32'h1E0);
    set(I_CALL, 0, 0);   check("call", mem_write && mem_addr === 32'h1E0 && mem_wdata === 32'h1A0);
    set(I_POPL, 0, 0);   check("popl", mem_read && mem_addr === 32'h1A0);
    set(I_RET, 0, 0);    check("ret", mem_read && mem_addr === 32'h1A0);
    set(I_LEAVE, 0, 0);  check("leave", mem_read && mem_addr === 32'h1A0);
    set(I_OPL, 1, 1);    check("opl no access", !mem_read && !mem_write && !interruption);
    // secure accesses
    for (int c = 0; c < 4; c++) begin
      logic ub, lb, ok;
      ub = c[1]; lb = c[0]; ok = c[1] & c[0];
      set(I_SMRMOVL, ub, lb);
      check($sformatf("smrmovl ub=%0d lb=%0d", ub, lb),
            mem_read === ok && !mem_write && interruption === !ok && mem_addr === 32'h1E0
            && m_stat === (ok ? S_AOK : S_BND) && m_out.dstm === (ok ? R_ESI : R_NONE));
      set(I_SRMMOVL, ub, lb);
      check($sformatf("srmmovl ub=%0d lb=%0d", ub, lb),
            mem_write === ok && !mem_read && interruption === !ok && mem_wdata === 32'h1A0
            && m_stat === (ok ? S_AOK : S_BND));
    end
    // address errors
    dmem_error = 1'b1;
    set(I_MRMOVL, 0, 0);   check("bad load address", m_stat === S_ADR);
    set(I_SRMMOVL, 0, 1);  check("bound failure wins over bad address", m_stat === S_BND);
    set(I_OPL, 0, 0);      check("no access, no address error", m_stat === S_AOK);
    dmem_error = 1'b0;
    set(I_NOP, 0, 0); M.stat = S_HLT; #1;
    check("status passes through", m_stat === S_HLT && m_out.stat === S_HLT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

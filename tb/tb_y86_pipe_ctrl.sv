// tb_y86_pipe_ctrl: checks the stall and bubble outputs for each hazard:
// load/use on srcA, srcB and the SMOV bound sources srcU/srcL (including the
// secure load as producer), ret in each of D, E and M, a mispredicted jump,
// the combination of a mispredict with a ret, and exceptions in Memory and
// Write-back.
module tb_y86_pipe_ctrl;
  import y86_pkg::*;

  icode_t  D_icode, E_icode, M_icode;
  reg_id_t d_srca, d_srcb, d_srcu, d_srcl, E_dstm;
  logic    e_cnd;
  stat_t   m_stat, W_stat;
  logic    F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall;
  logic    load_use, ret_wait, mispredict;
  int      checks = 0, failures = 0;

  y86_pipe_ctrl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    D_icode = I_NOP; E_icode = I_NOP; M_icode = I_NOP; E_dstm = R_NONE;
    d_srca = R_NONE; d_srcb = R_NONE; d_srcu = R_NONE; d_srcl = R_NONE;
    e_cnd = 1'b1; m_stat = S_AOK; W_stat = S_AOK;
  endtask

  // expected: {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall}
  task automatic expect_ctl(string what, logic [5:0] e);
    #1;
    checks++;
    if ({F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall} !== e) begin
      failures++;
      $display("FAIL: %s got %b expected %b", what,
               {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall}, e);
    end
  endtask

  initial begin
    idle(); expect_ctl("no hazard", 6'b000000);
    idle(); E_icode = I_MRMOVL; E_dstm = R_EAX; d_srca = R_EAX; expect_ctl("load/use srcA", 6'b110100);
    idle(); E_icode = I_POPL;   E_dstm = R_EBX; d_srcb = R_EBX; expect_ctl("load/use srcB", 6'b110100);
    idle(); E_icode = I_SMRMOVL; E_dstm = R_ECX; d_srcu = R_ECX; expect_ctl("load/use srcU", 6'b110100);
    idle(); E_icode = I_MRMOVL; E_dstm = R_EDX; d_srcl = R_EDX; expect_ctl("load/use srcL", 6'b110100);
    idle(); E_icode = I_LEAVE;  E_dstm = R_EBP; d_srcb = R_EBP; expect_ctl("load/use after leave", 6'b110100);
    idle(); E_icode = I_MRMOVL; E_dstm = R_EDX; d_srca = R_EAX; d_srcu = R_ECX; expect_ctl("load, no use", 6'b000000);
    idle(); E_icode = I_OPL;    E_dstm = R_EAX; d_srca = R_EAX; expect_ctl("not a load", 6'b000000);
    idle(); D_icode = I_RET; expect_ctl("ret in D", 6'b101000);
    idle(); E_icode = I_RET; expect_ctl("ret in E", 6'b101000);
    idle(); M_icode = I_RET; expect_ctl("ret in M", 6'b101000);
    idle(); E_icode = I_JXX; e_cnd = 1'b0; expect_ctl("mispredict", 6'b001100);
    idle(); E_icode = I_JXX; e_cnd = 1'b1; expect_ctl("jump taken", 6'b000000);
    idle(); E_icode = I_JXX; e_cnd = 1'b0; D_icode = I_RET; expect_ctl("mispredict with ret", 6'b101100);
    idle(); m_stat = S_BND; expect_ctl("bound exception in M", 6'b000010);
    idle(); m_stat = S_ADR; expect_ctl("address exception in M", 6'b000010);
    idle(); W_stat = S_HLT; expect_ctl("halt in W", 6'b000011);
    idle(); W_stat = S_BND; expect_ctl("bound exception in W", 6'b000011);
    idle(); W_stat = S_BUB; m_stat = S_AOK; expect_ctl("bubble in W", 6'b000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

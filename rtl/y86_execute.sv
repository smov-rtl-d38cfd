// y86_execute: the Execute stage of the SMOV-extended Y86 pipeline.
//
// ALU A selects valA (rrmovl, OPl), valC (irmovl, the memory moves including
// SMOV, iaddl), -4 (call, pushl) or +4 (ret, popl, leave); ALU B selects valB,
// or zero for rrmovl/irmovl. The ALU adds, except that OPl uses its ifun.
// The condition-code register (CC) is loaded by OPl and iaddl, unless an
// exception is already in the Memory or Write-back stage; it resets to ZF=1.
// From CC and ifun the condition e_Cnd is formed for jXX and conditional
// moves; a conditional move whose condition fails gets dstE = R_NONE.
// For every instruction the bound-check subtractors compare valE with valU and
// valL; their UB/LB results travel to the Memory stage in the M register, where
// only SMOV instructions use them. The stage is combinational apart from CC.
//
// The source-register ids in E are not used here (they are carried for
// observation only). The ALU operand choices and CC rules follow the Y86 pipeline; the bound
// check placed alongside the ALU follows the SMOV design.
module y86_execute
  import y86_pkg::*;
#(
  parameter bit UNSIGNED_CMP = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  e_reg_t  E,
  input  stat_t   m_stat,
  input  stat_t   W_stat,
  output m_reg_t  e_out,
  output reg_id_t e_dste,
  output word_t   e_vale,
  output logic    e_cnd
);

  word_t      alua, alub, vale;
  logic [3:0] alufun;
  cc_t        cc, new_cc;
  logic       set_cc, ub, lb;

  always_comb begin
    unique case (E.icode)
      I_RRMOVL, I_OPL:                                       alua = E.vala;
      I_IRMOVL, I_RMMOVL, I_MRMOVL, I_IADDL,
      I_SRMMOVL, I_SMRMOVL:                                  alua = E.valc;
      I_CALL, I_PUSHL:                                       alua = -32'sd4;
      I_RET, I_POPL, I_LEAVE:                                alua = 32'd4;
      default:                                               alua = '0;
    endcase
    unique case (E.icode)
      I_RMMOVL, I_MRMOVL, I_OPL, I_CALL, I_PUSHL, I_RET, I_POPL,
      I_IADDL, I_LEAVE, I_SRMMOVL, I_SMRMOVL:                alub = E.valb;
      default:                                               alub = '0;
    endcase
    alufun = (E.icode == I_OPL) ? E.ifun : A_ADD;
  end

  y86_alu u_alu (.alua(alua), .alub(alub), .alufun(alufun), .vale(vale), .new_cc(new_cc));

  smov_bound_check #(.UNSIGNED_CMP(UNSIGNED_CMP)) u_bound (
    .vale(vale), .valu(E.valu), .vall(E.vall), .ub(ub), .lb(lb));

  assign set_cc = (E.icode inside {I_OPL, I_IADDL}) && !is_exc(m_stat) && !is_exc(W_stat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= new_cc;
  end

  always_comb begin
    unique case (E.ifun)
      C_YES:   e_cnd = 1'b1;
      C_LE:    e_cnd = (cc.sf ^ cc.of) | cc.zf;
      C_L:     e_cnd = cc.sf ^ cc.of;
      C_E:     e_cnd = cc.zf;
      C_NE:    e_cnd = !cc.zf;
      C_GE:    e_cnd = !(cc.sf ^ cc.of);
      C_G:     e_cnd = !(cc.sf ^ cc.of) && !cc.zf;
      default: e_cnd = 1'b0;
    endcase
  end

  assign e_dste = (E.icode == I_RRMOVL && !e_cnd) ? R_NONE : E.dste;
  assign e_vale = vale;

  always_comb begin
    e_out.stat  = E.stat;
    e_out.icode = E.icode;
    e_out.cnd   = e_cnd;
    e_out.ub    = ub;
    e_out.lb    = lb;
    e_out.vale  = vale;
    e_out.vala  = E.vala;
    e_out.dste  = e_dste;
    e_out.dstm  = E.dstm;
  end

endmodule

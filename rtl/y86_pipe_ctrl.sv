// y86_pipe_ctrl: stall and bubble control of the five pipeline registers.
//
// Three hazards are handled, as in the Y86 pipeline:
//   * load/use: the instruction in Execute loads a register (mrmovl, popl,
//     leave, smrmovl) that the instruction in Decode reads. Forwarding cannot
//     help, so F and D hold for one cycle and a bubble enters E. With SMOV the
//     sources checked are srcA, srcB and the bound registers srcU and srcL.
//   * ret: while a ret is in Decode, Execute or Memory the return address is
//     unknown; F holds and bubbles enter D until the ret reaches Write-back.
//   * mispredicted jump: a jXX in Execute whose condition fails was predicted
//     taken; the two wrongly fetched instructions in D and E become bubbles.
// An exception (halt, bad address, invalid instruction or an SMOV bound
// violation) in Memory or Write-back stops state updates: a bubble enters M and
// W holds, so the faulting instruction stays in Write-back. Purely
// combinational. The load_use, ret_wait and mispredict outputs report which
// hazard is being handled.
//
// The stall/bubble rules are those of the Y86 pipeline; including srcU/srcL in
// the load/use check is this design's choice, needed because the bound
// registers are forwarded like the other sources.
module y86_pipe_ctrl
  import y86_pkg::*;
(
  input  icode_t  D_icode,
  input  reg_id_t d_srca,
  input  reg_id_t d_srcb,
  input  reg_id_t d_srcu,
  input  reg_id_t d_srcl,
  input  icode_t  E_icode,
  input  reg_id_t E_dstm,
  input  logic    e_cnd,
  input  icode_t  M_icode,
  input  stat_t   m_stat,
  input  stat_t   W_stat,
  output logic    F_stall,
  output logic    D_stall,
  output logic    D_bubble,
  output logic    E_bubble,
  output logic    M_bubble,
  output logic    W_stall,
  output logic    load_use,
  output logic    ret_wait,
  output logic    mispredict
);

  always_comb begin
    load_use   = (E_icode inside {I_MRMOVL, I_POPL, I_LEAVE, I_SMRMOVL})
               && (E_dstm != R_NONE)
               && (E_dstm == d_srca || E_dstm == d_srcb || E_dstm == d_srcu || E_dstm == d_srcl);
    ret_wait   = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);
    mispredict = (E_icode == I_JXX) && !e_cnd;

    F_stall  = load_use || ret_wait;
    D_stall  = load_use;
    D_bubble = mispredict || (!load_use && ret_wait);
    E_bubble = mispredict || load_use;
    M_bubble = is_exc(m_stat) || is_exc(W_stat);
    W_stall  = is_exc(W_stat);
  end

endmodule

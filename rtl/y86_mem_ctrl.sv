// y86_mem_ctrl: memory control of the Memory stage, with the SMOV gate.
//
// The data address is valE for rmmovl, mrmovl, pushl, call and both SMOV
// instructions, and valA for popl, ret and leave (which read at the old stack
// or frame pointer). Loads are mrmovl, popl, ret, leave and smrmovl; stores are
// rmmovl, pushl, call and srmmovl, with valA as the data.
// For a secure move the bound flags from Execute are ANDed: the access is let
// through only if UB && LB. Otherwise neither read nor write happens, the
// interruption output is raised for that cycle and the instruction's status
// becomes S_BND, which stops the processor when it reaches write-back (program
// execution is terminated). A data address outside memory gives S_ADR.
// A refused smrmovl writes no register. The next content of the W register is
// formed here. Purely combinational.
//
// The AND of UB and LB gating the access and the interruption follow the SMOV
// design; the status code S_BND that carries the interruption is this design's.
module y86_mem_ctrl
  import y86_pkg::*;
(
  input  m_reg_t M,
  // data memory
  output word_t  mem_addr,
  output logic   mem_read,
  output logic   mem_write,
  output word_t  mem_wdata,
  input  word_t  mem_rdata,
  input  logic   dmem_error,
  // results
  output logic   interruption,
  output word_t  m_valm,
  output stat_t  m_stat,
  output w_reg_t m_out
);

  logic sec_read, sec_write, top_read, top_write, bounds_ok;

  always_comb begin
    unique case (M.icode)
      I_RMMOVL, I_PUSHL, I_CALL, I_MRMOVL, I_SRMMOVL, I_SMRMOVL: mem_addr = M.vale;
      I_POPL, I_RET, I_LEAVE:                                   mem_addr = M.vala;
      default:                                                  mem_addr = '0;
    endcase
  end

  assign sec_read  = (M.icode == I_SMRMOVL);
  assign sec_write = (M.icode == I_SRMMOVL);
  assign top_read  = M.icode inside {I_MRMOVL, I_POPL, I_RET, I_LEAVE, I_SMRMOVL};
  assign top_write = M.icode inside {I_RMMOVL, I_PUSHL, I_CALL, I_SRMMOVL};
  assign bounds_ok = M.ub && M.lb;

  assign mem_read     = top_read  && (!sec_read  || bounds_ok);
  assign mem_write    = top_write && (!sec_write || bounds_ok);
  assign mem_wdata    = M.vala;
  assign interruption = (sec_read || sec_write) && !bounds_ok;
  assign m_valm       = mem_rdata;

  always_comb begin
    if (interruption)                            m_stat = S_BND;
    else if ((mem_read || mem_write) && dmem_error) m_stat = S_ADR;
    else                                         m_stat = M.stat;
  end

  always_comb begin
    m_out.stat  = m_stat;
    m_out.icode = M.icode;
    m_out.vale  = M.vale;
    m_out.valm  = m_valm;
    m_out.dste  = M.dste;
    m_out.dstm  = interruption ? R_NONE : M.dstm;  // a refused load writes no register
  end

endmodule

// y86_decode: register selection and forwarding of the Decode stage.
//
// From the instruction in the D register it names the source registers
// (srcA, srcB and, for SMOV, the bound registers srcU = rU and srcL = rL) and
// the destinations dstE/dstM. The register file reads the sources; this block
// then replaces each value by the newest one still in flight, checking in
// priority order the ALU result in Execute (e_dstE/e_valE), the memory result
// in Memory (M_dstM/m_valM), the ALU result in Memory (M_dstE/M_valE), and the
// two write-back results (W_dstM/W_valM, W_dstE/W_valE). valA is the
// fall-through address valP for call and jXX ("Sel+Fwd A"). The result is the
// next content of the E register. Purely combinational.
//
// The bound registers get the same forwarding paths as valB, so that an
// instruction setting a bound right before a secure move sees it; this is a
// choice of this design (the SMOV pipeline drawing takes valU and valL straight
// from the register file). Load/use hazards on any source are stalled by the
// pipeline control.
module y86_decode
  import y86_pkg::*;
(
  input  d_reg_t  D,
  // register file
  output reg_id_t d_srca,
  output reg_id_t d_srcb,
  output reg_id_t d_srcu,
  output reg_id_t d_srcl,
  input  word_t   rvala,
  input  word_t   rvalb,
  input  word_t   rvalu,
  input  word_t   rvall,
  // forwarding sources
  input  reg_id_t e_dste,
  input  word_t   e_vale,
  input  reg_id_t M_dstm,
  input  word_t   m_valm,
  input  reg_id_t M_dste,
  input  word_t   M_vale,
  input  reg_id_t W_dstm,
  input  word_t   W_valm,
  input  reg_id_t W_dste,
  input  word_t   W_vale,
  output e_reg_t  d_out
);

  reg_id_t d_dste, d_dstm;

  always_comb begin
    unique case (D.icode)
      I_RRMOVL, I_RMMOVL, I_OPL, I_PUSHL, I_SRMMOVL: d_srca = D.ra;
      I_POPL, I_RET:                                 d_srca = R_ESP;
      I_LEAVE:                                       d_srca = R_EBP;
      default:                                       d_srca = R_NONE;
    endcase
    unique case (D.icode)
      I_OPL, I_RMMOVL, I_MRMOVL, I_IADDL, I_SRMMOVL, I_SMRMOVL: d_srcb = D.rb;
      I_PUSHL, I_POPL, I_CALL, I_RET:                           d_srcb = R_ESP;
      I_LEAVE:                                                  d_srcb = R_EBP;
      default:                                                  d_srcb = R_NONE;
    endcase
    d_srcu = is_smov(D.icode) ? D.ru : R_NONE;
    d_srcl = is_smov(D.icode) ? D.rl : R_NONE;
    unique case (D.icode)
      I_RRMOVL, I_IRMOVL, I_OPL, I_IADDL:        d_dste = D.rb;
      I_PUSHL, I_POPL, I_CALL, I_RET, I_LEAVE:   d_dste = R_ESP;
      default:                                   d_dste = R_NONE;
    endcase
    unique case (D.icode)
      I_MRMOVL, I_POPL, I_SMRMOVL: d_dstm = D.ra;
      I_LEAVE:                     d_dstm = R_EBP;
      default:                     d_dstm = R_NONE;
    endcase
  end

  function automatic word_t fwd(reg_id_t src, word_t rval);
    if (src == R_NONE)      return rval;
    else if (src == e_dste) return e_vale;
    else if (src == M_dstm) return m_valm;
    else if (src == M_dste) return M_vale;
    else if (src == W_dstm) return W_valm;
    else if (src == W_dste) return W_vale;
    else                    return rval;
  endfunction

  always_comb begin
    d_out.stat  = D.stat;
    d_out.icode = D.icode;
    d_out.ifun  = D.ifun;
    d_out.valc  = D.valc;
    d_out.vala  = (D.icode inside {I_CALL, I_JXX}) ? D.valp : fwd(d_srca, rvala);
    d_out.valb  = fwd(d_srcb, rvalb);
    d_out.valu  = fwd(d_srcu, rvalu);
    d_out.vall  = fwd(d_srcl, rvall);
    d_out.dste  = d_dste;
    d_out.dstm  = d_dstm;
    d_out.srca  = d_srca;
    d_out.srcb  = d_srcb;
    d_out.srcu  = d_srcu;
    d_out.srcl  = d_srcl;
  end

endmodule

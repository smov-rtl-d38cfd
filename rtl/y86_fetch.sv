// y86_fetch: the Fetch stage of the SMOV-extended Y86 pipeline.
//
// Select PC picks the address of the instruction to fetch: the fall-through
// address of a mispredicted jump (M_valA, when the jump in Memory was not
// taken), the return address read by a ret (W_valM), or the predicted PC.
// The instruction bytes from memory are split into icode:ifun, rA:rB, the
// 4-byte constant valC and, for the two SMOV instructions only, a seventh
// byte rU:rL holding the upper- and lower-bound register ids (high and low
// nibble). Register fields that an instruction does not carry read as R_NONE.
// valP = PC + 1 + need_regids + 4*need_valC + need_plus_regids, so SMOV
// instructions are 7 bytes long, one more than rmmovl/mrmovl. Predict PC
// takes valC for jXX and call, valP otherwise (jumps predicted taken).
// An instruction with an invalid ifun is passed on as a nop with status
// S_INS. The stage is purely combinational; its outputs feed the D register and the
// F register (pred_pc).
//
// The SMOV byte layout and the length of 7 follow the SMOV design; the
// checking of ifun values for instruction validity is this design's choice.
module y86_fetch
  import y86_pkg::*;
(
  // Select PC inputs
  input  word_t       F_pred_pc,
  input  icode_t      M_icode,
  input  logic        M_cnd,
  input  word_t       M_vala,
  input  icode_t      W_icode,
  input  word_t       W_valm,
  // instruction memory
  output word_t       f_pc,
  input  logic [55:0] ibytes,
  input  logic        imem_error,
  // decoded fields
  output d_reg_t      f_out,
  output word_t       f_pred_pc
);

  icode_t     imem_icode, f_icode;
  logic [3:0] imem_ifun, f_ifun;
  logic       instr_valid, need_regids, need_valc, need_plus_regids;
  logic [7:0] regbyte, plusbyte;
  word_t      valc, valp;
  stat_t      f_stat;

  always_comb begin
    if (M_icode == I_JXX && !M_cnd) f_pc = M_vala;
    else if (W_icode == I_RET)      f_pc = W_valm;
    else                            f_pc = F_pred_pc;
  end

  assign imem_icode = icode_t'(ibytes[7:4]);
  assign imem_ifun  = ibytes[3:0];
  assign f_icode    = imem_error ? I_NOP  : imem_icode;
  assign f_ifun     = imem_error ? F_NONE : imem_ifun;

  always_comb begin
    unique case (f_icode)
      I_OPL:            instr_valid = (f_ifun <= A_XOR);
      I_JXX, I_RRMOVL:  instr_valid = (f_ifun <= C_G);
      default:          instr_valid = (f_ifun == F_NONE);
    endcase
  end

  assign need_regids = f_icode inside {I_RRMOVL, I_OPL, I_PUSHL, I_POPL, I_IRMOVL,
                                       I_RMMOVL, I_MRMOVL, I_IADDL, I_SRMMOVL, I_SMRMOVL};
  assign need_valc   = f_icode inside {I_IRMOVL, I_RMMOVL, I_MRMOVL, I_JXX, I_CALL,
                                       I_IADDL, I_SRMMOVL, I_SMRMOVL};
  assign need_plus_regids = is_smov(f_icode);

  // Byte 1 holds rA:rB when present; valC follows; SMOV adds rU:rL at byte 6
  assign regbyte  = need_regids ? ibytes[15:8] : {R_NONE, R_NONE};
  assign valc     = need_regids ? ibytes[47:16] : ibytes[39:8];
  assign plusbyte = need_plus_regids ? ibytes[55:48] : {R_NONE, R_NONE};

  assign valp = f_pc + 32'd1 + word_t'(need_regids) + (need_valc ? 32'd4 : 32'd0)
              + word_t'(need_plus_regids);

  always_comb begin
    if (imem_error)          f_stat = S_ADR;
    else if (!instr_valid)   f_stat = S_INS;
    else if (f_icode == I_HALT) f_stat = S_HLT;
    else                     f_stat = S_AOK;
  end

  assign f_pred_pc = (f_icode inside {I_JXX, I_CALL}) ? valc : valp;

  always_comb begin
    f_out.stat  = f_stat;
    // an invalid instruction travels on as a nop carrying S_INS, so that it
    // reads, writes and checks nothing on its way to Write-back
    f_out.icode = instr_valid ? f_icode : I_NOP;
    f_out.ifun  = instr_valid ? f_ifun  : F_NONE;
    f_out.ra    = regbyte[7:4];
    f_out.rb    = regbyte[3:0];
    f_out.ru    = plusbyte[7:4];
    f_out.rl    = plusbyte[3:0];
    f_out.valc  = valc;
    f_out.valp  = valp;
  end

endmodule

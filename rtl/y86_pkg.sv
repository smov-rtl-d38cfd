// y86_pkg: instruction-set constants and pipeline-register types shared by the
// SMOV-extended Y86 pipeline.
//
// The base Y86 encodings (icode values 0..D, register ids, status codes) are the
// usual 32-bit Y86 ones, including the iaddl and leave extensions. The two SMOV
// instructions need icodes of their own; the encoding values chosen for them
// (srmmovl = 0xE, smrmovl = 0xF) and the bounds-violation status code S_BND are
// choices of this design. Everything is 32 bits wide, as in Y86.
package y86_pkg;

  localparam int unsigned WORD = 32;
  typedef logic [WORD-1:0] word_t;

  // Instruction codes (upper nibble of the first instruction byte)
  typedef enum logic [3:0] {
    I_HALT    = 4'h0,
    I_NOP     = 4'h1,
    I_RRMOVL  = 4'h2,  // also the conditional moves
    I_IRMOVL  = 4'h3,
    I_RMMOVL  = 4'h4,
    I_MRMOVL  = 4'h5,
    I_OPL     = 4'h6,
    I_JXX     = 4'h7,
    I_CALL    = 4'h8,
    I_RET     = 4'h9,
    I_PUSHL   = 4'hA,
    I_POPL    = 4'hB,
    I_IADDL   = 4'hC,
    I_LEAVE   = 4'hD,
    I_SRMMOVL = 4'hE,  // secure store:  srmmovl rA, D(rB), rU, rL
    I_SMRMOVL = 4'hF   // secure load:   smrmovl D(rB), rA, rU, rL
  } icode_t;

  // ALU functions (ifun of OPl)
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // Branch / conditional-move conditions (ifun of jXX and rrmovl)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam logic [3:0] F_NONE = 4'h0;

  // Register identifiers
  typedef logic [3:0] reg_id_t;
  localparam reg_id_t R_EAX  = 4'h0;
  localparam reg_id_t R_ECX  = 4'h1;
  localparam reg_id_t R_EDX  = 4'h2;
  localparam reg_id_t R_EBX  = 4'h3;
  localparam reg_id_t R_ESP  = 4'h4;
  localparam reg_id_t R_EBP  = 4'h5;
  localparam reg_id_t R_ESI  = 4'h6;
  localparam reg_id_t R_EDI  = 4'h7;
  localparam reg_id_t R_NONE = 4'hF;

  // Status of an instruction as it moves down the pipeline
  typedef enum logic [2:0] {
    S_BUB = 3'd0,  // bubble
    S_AOK = 3'd1,  // normal
    S_HLT = 3'd2,  // halt executed
    S_ADR = 3'd3,  // bad instruction or data address
    S_INS = 3'd4,  // invalid instruction
    S_BND = 3'd5   // SMOV bound check failed (access suppressed)
  } stat_t;

  // Condition codes: zero, sign, overflow
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // Pipeline registers F, D, E, M and W of the SMOV pipeline
  typedef struct packed {
    word_t pred_pc;
  } f_reg_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    reg_id_t ra;
    reg_id_t rb;
    reg_id_t ru;
    reg_id_t rl;
    word_t   valc;
    word_t   valp;
  } d_reg_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic [3:0] ifun;
    word_t   valc;
    word_t   vala;
    word_t   valb;
    word_t   valu;
    word_t   vall;
    reg_id_t dste;
    reg_id_t dstm;
    reg_id_t srca;
    reg_id_t srcb;
    reg_id_t srcu;
    reg_id_t srcl;
  } e_reg_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    logic    cnd;
    logic    ub;
    logic    lb;
    word_t   vale;
    word_t   vala;
    reg_id_t dste;
    reg_id_t dstm;
  } m_reg_t;

  typedef struct packed {
    stat_t   stat;
    icode_t  icode;
    word_t   vale;
    word_t   valm;
    reg_id_t dste;
    reg_id_t dstm;
  } w_reg_t;

  // Bubble (no-op) contents of each pipeline register
  localparam d_reg_t D_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: F_NONE,
                                  ra: R_NONE, rb: R_NONE, ru: R_NONE, rl: R_NONE,
                                  valc: '0, valp: '0};
  localparam e_reg_t E_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: F_NONE,
                                  valc: '0, vala: '0, valb: '0, valu: '0, vall: '0,
                                  dste: R_NONE, dstm: R_NONE, srca: R_NONE, srcb: R_NONE,
                                  srcu: R_NONE, srcl: R_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_BUB, icode: I_NOP, cnd: 1'b0, ub: 1'b0, lb: 1'b0,
                                  vale: '0, vala: '0, dste: R_NONE, dstm: R_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_BUB, icode: I_NOP, vale: '0, valm: '0,
                                  dste: R_NONE, dstm: R_NONE};

  function automatic logic is_smov(icode_t ic);
    return (ic == I_SRMMOVL) || (ic == I_SMRMOVL);
  endfunction

  // An exception status stops the pipeline once it reaches write-back
  function automatic logic is_exc(stat_t s);
    return (s == S_ADR) || (s == S_INS) || (s == S_HLT) || (s == S_BND);
  endfunction

endpackage

// y86_alu: the 32-bit Y86 arithmetic and logic unit of the Execute stage.
//
// valE = aluB OP aluA, with OP one of add (A_ADD), subtract (A_SUB, computing
// aluB - aluA), bitwise and (A_AND) and exclusive or (A_XOR). It also returns
// the condition codes that this result would set: zero, sign, and two's
// complement overflow (meaningful for add and subtract, zero for the logic
// operations). Whether the codes are latched is decided by the Execute stage.
// Purely combinational.
//
// The operation set and operand order are those of the Y86 ISA.
module y86_alu
  import y86_pkg::*;
(
  input  word_t      alua,
  input  word_t      alub,
  input  logic [3:0] alufun,
  output word_t      vale,
  output cc_t        new_cc
);

  always_comb begin
    unique case (alufun)
      A_SUB:   vale = alub - alua;
      A_AND:   vale = alub & alua;
      A_XOR:   vale = alub ^ alua;
      default: vale = alub + alua;
    endcase
    new_cc.zf = (vale == '0);
    new_cc.sf = vale[WORD-1];
    unique case (alufun)
      A_ADD:   new_cc.of = (alua[WORD-1] == alub[WORD-1]) && (vale[WORD-1] != alub[WORD-1]);
      A_SUB:   new_cc.of = (alua[WORD-1] != alub[WORD-1]) && (vale[WORD-1] != alub[WORD-1]);
      default: new_cc.of = 1'b0;
    endcase
  end

endmodule

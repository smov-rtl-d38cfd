// smov_bound_check: the two bound-checking subtractors that SMOV adds to the
// Execute stage.
//
// While the ALU forms the effective address valE = valB + valC of a secure
// move, two dedicated subtractors compare it with the bounds read from rU and
// rL:
//   UB = (valU - valE > 0)    the address lies below the upper bound
//   LB = (valE - valL >= 0)   the address lies at or above the lower bound
// Each subtractor is followed by flag logic (zero, sign, overflow), and the
// comparison is read from the flags in two's complement, as the Y86 condition
// codes are: "greater than zero" is not zero and sign equal to overflow,
// "greater or equal" is sign equal to overflow. With UNSIGNED_CMP = 1 the
// subtractors' carry is used instead, comparing the values as unsigned
// addresses. Purely combinational; UB and LB are stored in the M register.
//
// The two formulas, the subtractor-plus-flags structure and the signed reading
// follow the SMOV design; the UNSIGNED_CMP option is this design's addition.
module smov_bound_check
  import y86_pkg::*;
#(
  parameter bit UNSIGNED_CMP = 1'b0
) (
  input  word_t vale,
  input  word_t valu,
  input  word_t vall,
  output logic  ub,
  output logic  lb
);

  logic [WORD:0] du, dl;     // one extra bit: the borrow
  logic zu, su, ou, sl, ol;   // greater-or-equal needs no zero flag

  assign du = {1'b0, valu} - {1'b0, vale};
  assign dl = {1'b0, vale} - {1'b0, vall};

  assign zu = (du[WORD-1:0] == '0);
  assign su = du[WORD-1];
  assign ou = (valu[WORD-1] != vale[WORD-1]) && (du[WORD-1] != valu[WORD-1]);
  assign sl = dl[WORD-1];
  assign ol = (vale[WORD-1] != vall[WORD-1]) && (dl[WORD-1] != vale[WORD-1]);

  always_comb begin
    if (UNSIGNED_CMP) begin
      ub = !du[WORD] && !zu;
      lb = !dl[WORD];
    end else begin
      ub = (su == ou) && !zu;
      lb = (sl == ol);
    end
  end

endmodule

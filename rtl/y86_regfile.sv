// y86_regfile: the eight 32-bit Y86 program registers, with the four read
// ports that SMOV needs.
//
// Read ports A and B serve the base ISA; ports U and L read the upper- and
// lower-bound registers named by an SMOV instruction, so all four operands of
// a secure move are read in the Decode stage in one cycle. Reads are
// combinational; a register id of R_NONE (or any id above 7) reads as zero.
// Two write ports, E (ALU result) and M (memory result), write on the rising
// clock edge; an id of R_NONE writes nothing. If both name the same register,
// port M wins. Reset clears all registers. All eight registers are also
// brought out (regs) for observation.
//
// The four read ports follow the SMOV design; the M-over-E write priority and
// the reset to zero are choices of this design.
module y86_regfile
  import y86_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  reg_id_t srca,
  output word_t   vala,
  input  reg_id_t srcb,
  output word_t   valb,
  input  reg_id_t srcu,
  output word_t   valu,
  input  reg_id_t srcl,
  output word_t   vall,
  input  reg_id_t dste,
  input  word_t   vale,
  input  reg_id_t dstm,
  input  word_t   valm,
  output word_t   regs [8]
);

  word_t r [8];

  function automatic word_t rd(reg_id_t id);
    return id[3] ? '0 : r[id[2:0]];
  endfunction

  assign vala = rd(srca);
  assign valb = rd(srcb);
  assign valu = rd(srcu);
  assign vall = rd(srcl);
  assign regs = r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else begin
      if (!dste[3]) r[dste[2:0]] <= vale;
      if (!dstm[3]) r[dstm[2:0]] <= valm;
    end
  end

endmodule

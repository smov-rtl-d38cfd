// tb_y86_regfile: writes random values through the E and M ports and reads
// them back through all four read ports (A, B, U, L), comparing with a model
// array. Also checks R_NONE reads as zero and writes nothing, and that port M
// wins when both ports write the same register.
module tb_y86_regfile;
  import y86_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  reg_id_t srca, srcb, srcu, srcl, dste, dstm;
  word_t   vala, valb, valu, vall, vale, valm;
  word_t   regs [8];
  word_t   model [8];
  int      checks = 0, failures = 0;

  y86_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mrd(reg_id_t id);
    return id[3] ? '0 : model[id[2:0]];
  endfunction

  initial begin
    dste = R_NONE; dstm = R_NONE; vale = '0; valm = '0;
    srca = 0; srcb = 0; srcu = 0; srcl = 0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      dste = ($urandom_range(0, 3) == 0) ? R_NONE : reg_id_t'($urandom_range(0, 7));
      dstm = ($urandom_range(0, 3) == 0) ? R_NONE : reg_id_t'($urandom_range(0, 7));
      vale = $urandom; valm = $urandom;
      @(negedge clk);
      if (!dste[3]) model[dste[2:0]] = vale;
      if (!dstm[3]) model[dstm[2:0]] = valm;
      dste = R_NONE; dstm = R_NONE;
      srca = reg_id_t'($urandom_range(0, 8)); srcb = reg_id_t'($urandom_range(0, 8));
      srcu = reg_id_t'($urandom_range(0, 8)); srcl = reg_id_t'($urandom_range(0, 8));
      if (srca == 8) srca = R_NONE;
      if (srcl == 8) srcl = R_NONE;
      #1;
      checks++;
      if (vala !== mrd(srca) || valb !== mrd(srcb) || valu !== mrd(srcu) || vall !== mrd(srcl)) begin
        failures++;
        $display("FAIL read %0d %0d %0d %0d", srca, srcb, srcu, srcl);
      end
      checks++;
      if (regs != model) begin
        failures++;
        $display("FAIL regs output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

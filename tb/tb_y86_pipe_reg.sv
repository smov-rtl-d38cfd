// tb_y86_pipe_reg: drives a pipeline register with random data and random
// stall/bubble controls and compares its output with a one-line model:
// hold on stall, load the bubble value on bubble, load the input otherwise.
module tb_y86_pipe_reg;
  import y86_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, stall, bubble;
  m_reg_t d, q, model;
  int     checks = 0, failures = 0;

  y86_pipe_reg #(.T(m_reg_t), .BUBBLE(M_BUBBLE), .RESET(M_BUBBLE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 1'b0; bubble = 1'b0; d = '0;
    #12;
    checks++;
    if (q !== M_BUBBLE) begin failures++; $display("FAIL reset value"); end
    model = M_BUBBLE;
    stall = 1'b1;   // hold the reset value until the first random cycle
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      stall = ($urandom_range(0, 3) == 0);
      bubble = ($urandom_range(0, 3) == 0);
      d = {$urandom, $urandom, $urandom};
      @(posedge clk);
      if (stall)       model = model;
      else if (bubble) model = M_BUBBLE;
      else             model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

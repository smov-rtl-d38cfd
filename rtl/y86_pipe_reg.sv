// y86_pipe_reg: one pipeline register (F, D, E, M or W) of the Y86 pipeline.
//
// On each rising clock edge it loads d, unless stall is high (it holds its
// value) or bubble is high (it loads BUBBLE, the register's no-op content).
// Stall has priority over bubble. Asynchronous active-low reset loads RESET.
// The register's content is a packed type T given as a parameter, so one
// module serves all five stages.
module y86_pipe_reg #(
  parameter type T      = logic [31:0],
  parameter T    BUBBLE = '0,
  parameter T    RESET  = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= RESET;
    else if (stall)  q <= q;
    else if (bubble) q <= BUBBLE;
    else             q <= d;
  end

endmodule

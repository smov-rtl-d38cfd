// tb_smov_bound_check: checks the SMOV bound-check subtractors against exact
// 64-bit arithmetic, both in the default signed mode and with UNSIGNED_CMP = 1.
// Directed cases cover the bound edges (valE = valL, valE = valU - 1,
// valE = valU) and values where a 32-bit subtraction overflows; random cases
// follow.
module tb_smov_bound_check;
  import y86_pkg::*;

  word_t vale, valu, vall;
  logic  ub_s, lb_s, ub_u, lb_u;
  int    checks = 0, failures = 0;

  smov_bound_check dut_s (.vale, .valu, .vall, .ub(ub_s), .lb(lb_s));
  smov_bound_check #(.UNSIGNED_CMP(1'b1)) dut_u (.vale, .valu, .vall, .ub(ub_u), .lb(lb_u));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(word_t e, word_t u, word_t l);
    logic eub_s, elb_s, eub_u, elb_u;
    vale = e; valu = u; vall = l;
    #1;
    eub_s = (longint'(signed'(u)) - longint'(signed'(e))) > 0;
    elb_s = (longint'(signed'(e)) - longint'(signed'(l))) >= 0;
    eub_u = longint'(u) > longint'(e);
    elb_u = longint'(e) >= longint'(l);
    checks += 4;
    if (ub_s !== eub_s || lb_s !== elb_s || ub_u !== eub_u || lb_u !== elb_u) begin
      failures++;
      $display("FAIL e=%h u=%h l=%h: signed %b%b (exp %b%b) unsigned %b%b (exp %b%b)",
               e, u, l, ub_s, lb_s, eub_s, elb_s, ub_u, lb_u, eub_u, elb_u);
    end
  endtask

  initial begin
    // array of 400 words at 0x1000, upper bound set to base + 1600 - 3
    apply(32'h1000, 32'h1000 + 1597, 32'h1000);        // first element
    apply(32'h1000 + 1596, 32'h1000 + 1597, 32'h1000); // last element
    apply(32'h1000 + 1597, 32'h1000 + 1597, 32'h1000); // at the upper bound
    apply(32'h1000 + 1600, 32'h1000 + 1597, 32'h1000); // one past the end
    apply(32'h0FFC, 32'h1000 + 1597, 32'h1000);        // one before the start
    apply(32'h0FFF, 32'h1000 + 1597, 32'h1000);
    // overflowing subtractions
    apply(32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_0001);
    apply(32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF);
    apply(32'h8000_0001, 32'h8000_0002, 32'h8000_0000);
    apply(32'hFFFF_FFF0, 32'h0000_0010, 32'hFFFF_FF00);
    for (int i = 0; i < 3000; i++) begin
      word_t base, len;
      base = $urandom;
      len = $urandom_range(0, 4096);
      apply(base + $urandom_range(0, 8192) - 2048, base + len, base);
      apply($urandom, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

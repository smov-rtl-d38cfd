// tb_y86_smov_random: random programs on y86_smov_cpu (default parameters),
// compared with an instruction-by-instruction reference model of the ISA.
//
// Each program sets all eight registers, then runs PROG_LEN random
// instructions drawn from nop, irmovl, rrmovl/cmovXX, OPl, iaddl, rmmovl,
// mrmovl, pushl, popl, forward jXX and the two secure moves, and ends with
// halt. Registers are used at random as sources, destinations, bases and
// bounds, so back-to-back dependences, load/use hazards, mispredicted jumps
// and forwarding into all four Decode operands happen often. Secure moves
// pass or fail their bound check at random; accesses can leave memory.
//
// The reference model executes the same bytes one instruction at a time,
// with the SMOV rule "access only if R[rL] <= R[rB]+D < R[rU] (signed),
// otherwise stop with S_BND", bad data addresses stopping with S_ADR, and the
// usual Y86 semantics for everything else. Its memory starts as a copy of the
// processor's memory after loading, so bytes never written compare equal.
// After each program the final status, the eight registers and every memory
// byte must match. Programs whose model run stores into the code area are
// skipped (the pipeline may already have fetched the old bytes).
// The test also requires every final status kind (HLT, ADR, BND) and passed
// secure loads and stores to have occurred.
`timescale 1ns/1ps
module tb_y86_smov_random;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  localparam int N_PROGS   = 2000;
  localparam int PROG_LEN  = 40;
  localparam int MEMB      = 65536;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  word_t       host_addr = '0;
  logic        host_we = 1'b0;
  logic [7:0]  host_wdata = '0;
  logic [7:0]  host_rdata;
  stat_t       stat;
  logic        bound_violation;
  word_t       regs [8];
  word_t       cycles, instrs;
  logic        load_use_stall, ret_stall, branch_mispredict;

  int checks = 0;
  int failures = 0;

  y86_smov_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program generator ----------------
  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // the seed is replayed identically in both assembler passes
  function automatic void gen_prog(int unsigned seed);
    int dummy;
    dummy = $urandom(seed);
    irmovl(32'h8000, ESP);
    irmovl(32'h6000, EBP);
    for (int r = 0; r < 8; r++)
      if (r != ESP && r != EBP) irmovl(rnd(32'h2000, 32'h5FFF), r);
    for (int i = 0; i < PROG_LEN; i++) begin
      label($sformatf("L%0d", i));
      case (rnd(0, 18))
        0:  nop();
        1:  irmovl(rnd(32'h1800, 32'h7FFF), rnd(0, 7));
        2:  cmov(rnd(0, 6), rnd(0, 7), rnd(0, 7));
        3:  opl(rnd(0, 3), rnd(0, 7), rnd(0, 7));
        4:  iaddl(rnd(-64, 64), rnd(0, 7));
        5, 6: rmmovl(rnd(0, 7), rnd(-16, 16), rnd(0, 7));
        7, 8: mrmovl(rnd(-16, 16), rnd(0, 7), rnd(0, 7));
        9:  pushl(rnd(0, 7));
        10: popl(rnd(0, 7));
        11: jxx(rnd(0, 6), $sformatf("L%0d", i + rnd(1, 4)));
        12, 13, 14: begin
          // mostly bounds that pass (rL = base, positive displacement,
          // rU set just before to a value above the data), sometimes any
          // registers
          int ra, rb, ru, rl, dd;
          ra = rnd(0, 7);
          rb = rnd(0, 7);
          if (rnd(0, 4) != 0) begin
            rl = rb;
            ru = (rb + rnd(1, 7)) % 8;
            dd = rnd(0, 16);
            irmovl(rnd(32'hF000, 32'hFFFF), ru);
          end else begin
            rl = rnd(0, 7);
            ru = rnd(0, 7);
            dd = rnd(-16, 16);
          end
          if (rnd(0, 1)) smrmovl(dd, rb, ra, ru, rl);
          else           srmmovl(ra, dd, rb, ru, rl);
        end
        15: call($sformatf("L%0d", i + rnd(1, 4)));
        16: ret();
        17: leave();
        default: nop();
      endcase
    end
    for (int i = PROG_LEN; i < PROG_LEN + 5; i++) label($sformatf("L%0d", i));
    halt();
  endfunction

  // ---------------- reference model ----------------
  logic [7:0] mm [MEMB];
  word_t      mr [8];
  stat_t      mstat;
  bit         unsafe;       // program outside what the model decides
  int         m_sload, m_sstore;
  bit         exec_b [MEMB];
  int         exec_q [$];
  int         store_q [$];

  function automatic word_t rdm(word_t a);
    return {mm[a+3], mm[a+2], mm[a+1], mm[a]};
  endfunction

  function automatic void wrm(word_t a, word_t v);
    for (int i = 0; i < 4; i++) begin
      mm[a+i] = v[8*i +: 8];
      store_q.push_back(a + i);
    end
  endfunction

  // registers 8..14 do not exist; the pipeline would still forward them
  function automatic word_t rget(logic [3:0] id);
    if (id == R_NONE) return '0;
    if (id[3]) unsafe = 1;
    return mr[id[2:0]];
  endfunction

  function automatic void rset(logic [3:0] id, word_t v);
    if (id == R_NONE) return;
    if (id[3]) unsafe = 1;
    else mr[id[2:0]] = v;
  endfunction

  function automatic bit valid(logic [3:0] ic, logic [3:0] fn);
    case (ic)
      4'h6:       return fn <= A_XOR;
      4'h2, 4'h7: return fn <= C_G;
      default:    return fn == 0;
    endcase
  endfunction


  function automatic bit bad(word_t a);
    return a > MEMB - 4;
  endfunction

  function automatic bit cond(logic [3:0] fn, cc_t cc);
    case (fn)
      C_YES: return 1;
      C_LE:  return (cc.sf ^ cc.of) | cc.zf;
      C_L:   return cc.sf ^ cc.of;
      C_E:   return cc.zf;
      C_NE:  return !cc.zf;
      C_GE:  return !(cc.sf ^ cc.of);
      C_G:   return !(cc.sf ^ cc.of) && !cc.zf;
      default: return 0;
    endcase
  endfunction

  function automatic void model_run();
    word_t pc, a, b, v, d;
    logic [3:0] ic, fn, ra, rb, ru, rl;
    cc_t cc;
    cc = '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    for (int i = 0; i < 8; i++) mr[i] = '0;
    pc = 0;
    unsafe = 0;
    mstat = S_AOK;
    store_q.delete();
    for (int step = 0; step < 10000 && mstat == S_AOK; step++) begin
      if (pc >= MEMB) begin
        mstat = S_ADR;
        break;
      end
      ic = mm[pc][7:4];
      fn = mm[pc][3:0];
      // the whole fetch window counts as code, valid instruction or not
      for (int k = 0; k < 7; k++)
        if (pc + k < MEMB && !exec_b[pc+k]) begin
          exec_b[pc+k] = 1;
          exec_q.push_back(pc + k);
        end
      if (!valid(ic, fn)) begin
        mstat = S_INS;
        break;
      end
      ra = mm[pc+1][7:4];
      rb = mm[pc+1][3:0];
      d  = {mm[pc+5], mm[pc+4], mm[pc+3], mm[pc+2]};
      ru = mm[pc+6][7:4];
      rl = mm[pc+6][3:0];
      case (ic)
        4'h0: mstat = S_HLT;
        4'h1: pc += 1;
        4'h2: begin v = rget(ra); if (cond(fn, cc)) rset(rb, v); pc += 2; end
        4'h3: begin rset(rb, d); pc += 6; end
        4'h4, 4'h5: begin
          a = rget(rb) + d;
          v = rget(ra);
          if (bad(a)) mstat = S_ADR;
          else begin
            if (ic == 4'h4) wrm(a, v); else rset(ra, rdm(a));
            pc += 6;
          end
        end
        4'h6, 4'hC: begin
          a = (ic == 4'hC) ? d : rget(ra);
          b = rget(rb);
          case (ic == 4'hC ? A_ADD : fn)
            A_ADD: v = b + a;
            A_SUB: v = b - a;
            A_AND: v = b & a;
            default: v = b ^ a;
          endcase
          cc.zf = (v == 0);
          cc.sf = v[31];
          cc.of = (ic == 4'hC || fn == A_ADD) ? (a[31] == b[31]) && (v[31] != b[31]) :
                  (fn == A_SUB) ? (a[31] != b[31]) && (v[31] != b[31]) : 1'b0;
          rset(rb, v);
          pc += (ic == 4'hC) ? 6 : 2;
        end
        4'h7: pc = cond(fn, cc) ? {mm[pc+4], mm[pc+3], mm[pc+2], mm[pc+1]} : pc + 5;
        4'h8: begin
          a = mr[R_ESP] - 4;
          if (bad(a)) mstat = S_ADR;
          else begin
            wrm(a, pc + 5);
            mr[R_ESP] = a;
            pc = {mm[pc+4], mm[pc+3], mm[pc+2], mm[pc+1]};
          end
        end
        4'h9: begin
          a = mr[R_ESP];
          if (bad(a)) mstat = S_ADR;
          else begin mr[R_ESP] = a + 4; pc = rdm(a); end
        end
        4'hA: begin
          v = rget(ra);
          a = mr[R_ESP] - 4;
          if (bad(a)) mstat = S_ADR;
          else begin wrm(a, v); mr[R_ESP] = a; pc += 2; end
        end
        4'hB: begin
          a = mr[R_ESP];
          if (bad(a)) mstat = S_ADR;
          else begin v = rdm(a); mr[R_ESP] = a + 4; rset(ra, v); pc += 2; end
        end
        4'hD: begin
          a = mr[R_EBP];
          if (bad(a)) mstat = S_ADR;
          else begin mr[R_ESP] = a + 4; mr[R_EBP] = rdm(a); pc += 1; end
        end
        default: begin
          a = rget(rb) + d;
          v = rget(ra);
          if (!($signed(rget(ru)) > $signed(a) && $signed(a) >= $signed(rget(rl))))
            mstat = S_BND;
          else if (bad(a)) mstat = S_ADR;
          else begin
            if (ic == 4'hE) begin wrm(a, v); m_sstore++; end
            else begin rset(ra, rdm(a)); m_sload++; end
            pc += 7;
          end
        end
      endcase
    end
    if (mstat == S_AOK) unsafe = 1;                 // did not stop
    foreach (store_q[i]) if (exec_b[store_q[i]]) unsafe = 1;  // code was overwritten
    foreach (exec_q[i]) exec_b[exec_q[i]] = 0;
    exec_q.delete();
  endfunction

  // ---------------- running ----------------
  task automatic load_image();
    rst_n = 1'b0;
    host_we = 1'b0;
    @(negedge clk);
    foreach (img[a]) begin
      host_addr = a;
      host_wdata = img[a];
      host_we = 1'b1;
      @(negedge clk);
    end
    host_we = 1'b0;
  endtask

  int n_hlt, n_adr, n_bnd, n_ins, n_skip, n_run, bad_bytes;

  task automatic run_one(int p);
    n_run++;
      rst_n = 1'b1;
      while (stat == S_AOK && cycles < 50000) @(negedge clk);
      check($sformatf("program %0d: status %s, model %s", p, stat.name(), mstat.name()),
            stat === mstat);
      for (int r = 0; r < 8; r++)
        check($sformatf("program %0d: register %0d = %h, model %h", p, r, regs[r], mr[r]),
              regs[r] === mr[r]);
      bad_bytes = 0;
      for (int i = 0; i < MEMB; i++) if (dut.u_mem.mem[i] !== mm[i]) bad_bytes++;
      check($sformatf("program %0d: %0d memory bytes differ", p, bad_bytes), bad_bytes === 0);
      case (mstat)
        S_HLT: n_hlt++;
        S_ADR: n_adr++;
        S_BND: n_bnd++;
        S_INS: n_ins++;
        default: ;
      endcase
  endtask

  initial begin : main
    n_hlt = 0; n_adr = 0; n_ins = 0; n_bnd = 0; n_skip = 0; n_run = 0;
    m_sload = 0; m_sstore = 0;
    for (int p = 0; p < N_PROGS; p++) begin
      start(1); gen_prog(1000 + p);
      start(2); gen_prog(1000 + p);
      load_image();
      for (int i = 0; i < MEMB; i++) mm[i] = dut.u_mem.mem[i];
      model_run();
      if (unsafe) n_skip++;
      else run_one(p);
    end
    $display("programs run %0d (skipped %0d): halt %0d, bad address %0d, bound violation %0d, invalid instruction %0d; secure loads %0d, stores %0d",
             n_run, n_skip, n_hlt, n_adr, n_bnd, n_ins, m_sload, m_sstore);
    check("some programs halt", n_hlt > 0);
    check("some programs stop on a bad address", n_adr > 0);
    check("some programs stop on a bound violation", n_bnd > 0);
    check("secure loads and stores pass", m_sload > 0 && m_sstore > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

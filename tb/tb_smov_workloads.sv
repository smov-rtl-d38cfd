// tb_smov_workloads: the three Stanford benchmark kernels (Bubblesort,
// Quicksort, Perm) run on y86_smov_cpu at its default parameters, each in
// three versions:
//   * unprotected: plain mrmovl/rmmovl for every array access;
//   * software:    before every array access, a compare-and-branch against
//                  each bound of the array (branch to an abort halt);
//   * SMOV:        every array access is a secure move; the bound registers
//                  are loaded right before each access, as a compiler that
//                  tracks global arrays would emit (irmovl base, rL;
//                  irmovl base, rU; iaddl 4n-3, rU).
// All three versions of a kernel share the same code around the accesses, so
// the difference in cycles is the cost of the bounds checking alone.
//
// Sizes: Bubblesort sorts 400 words (the size the SMOV bound constant 1597 =
// 400*4-3 implies); Quicksort sorts 5000 words and Perm runs Permute(7) five
// times, as in the Stanford suite. The list values come from the suite's
// generator seed = (seed*1309 + 13849) mod 65536, minus 50000. Quicksort takes
// a[l] as its pivot instead of the middle element, because Y86 has no shift
// or divide to halve an index; indices are kept as byte offsets (4*i).
//
// Checks: each run halts normally, without a bound violation, and gives the
// right answer (sorted list equal to a reference sort; Perm's call count
// 43300 and the restored permutation array). For every kernel, the SMOV
// version must execute more instructions than the unprotected one and take
// fewer cycles than the software-checked one. Instructions, cycles, CPI and
// the runtime overhead against the unprotected version are printed.
`timescale 1ns/1ps
module tb_smov_workloads;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  localparam int UNPROT = 0, SOFT = 1, SMOV = 2;
  localparam int ARR    = 32'h4000;   // the global array
  localparam int STACK  = 32'hFF00;
  localparam int N_BUB  = 400;
  localparam int N_QS   = 5000;
  localparam int N_PERM = 11;         // permarray[0..10]

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
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- array access in the three versions ----------------
  // Access word base + off + R[x] of an n-word array at base. ECX and EBX are
  // scratch registers in every kernel.
  function automatic void guard(int v, int n, int x, int off);
    if (v == SOFT) begin
      rrmovl(x, ECX);
      if (off != 0) iaddl(off, ECX); else andl(ECX, ECX);
      jxx(L, "abort");                  // index < 0
      iaddl(-4*n, ECX);
      jxx(GE, "abort");                 // index >= n
    end else if (v == SMOV) begin
      irmovl(ARR, EBX);                 // rL
      irmovl(ARR, ECX);
      iaddl(4*n - 3, ECX);              // rU
    end
  endfunction

  function automatic void ld(int v, int n, int x, int off, int dst);
    guard(v, n, x, off);
    if (v == SMOV) smrmovl(ARR + off, x, dst, ECX, EBX);
    else           mrmovl(ARR + off, x, dst);
  endfunction

  function automatic void st(int v, int n, int src, int x, int off);
    guard(v, n, x, off);
    if (v == SMOV) srmmovl(src, ARR + off, x, ECX, EBX);
    else           rmmovl(src, ARR + off, x);
  endfunction

  function automatic void prologue();
    irmovl(STACK, ESP);
    call("main");
    halt();
    label("abort");
    irmovl(32'hDEAD, EAX);
    halt();
    label("main");
  endfunction

  // Stanford list generator
  function automatic void gen_list(int n);
    int unsigned seed;
    seed = 74755;
    org(ARR);
    for (int i = 0; i < n; i++) begin
      seed = (seed * 1309 + 13849) & 32'hFFFF;
      w(seed - 50000);
    end
    w(32'h5EED_0000);                   // guard word after the array
  endfunction

  // ---------------- Bubblesort ----------------
  // ESI = top (elements still to bubble), EDI = 4*i, EBP = inner count
  function automatic void prog_bubble(int v);
    prologue();
    irmovl(N_BUB - 1, ESI);
    label("outer");
    andl(ESI, ESI);
    jxx(LE, "done");
    irmovl(0, EDI);
    rrmovl(ESI, EBP);
    label("inner");
    ld(v, N_BUB, EDI, 0, EAX);          // list[i]
    ld(v, N_BUB, EDI, 4, EDX);          // list[i+1]
    rrmovl(EDX, ECX);
    subl(EAX, ECX);
    jxx(GE, "noswap");
    st(v, N_BUB, EDX, EDI, 0);
    st(v, N_BUB, EAX, EDI, 4);
    label("noswap");
    iaddl(4, EDI);
    iaddl(-1, EBP);
    jxx(NE, "inner");
    iaddl(-1, ESI);
    jmp("outer");
    label("done");
    ret();
    gen_list(N_BUB);
  endfunction

  // ---------------- Quicksort ----------------
  // quick(l, r) with byte offsets on the stack: 4(%esp) = l, 8(%esp) = r.
  // ESI = i, EDI = j, EBP = pivot x.
  function automatic void prog_quick(int v);
    prologue();
    irmovl(4*(N_QS - 1), EAX);
    pushl(EAX);
    irmovl(0, EAX);
    pushl(EAX);
    call("quick");
    popl(EAX);
    popl(EAX);
    ret();

    label("quick");
    mrmovl(4, ESP, ESI);
    mrmovl(8, ESP, EDI);
    ld(v, N_QS, ESI, 0, EBP);           // x = a[l]
    label("q_loop");
    label("q_wi");                      // while (a[i] < x) i++
    ld(v, N_QS, ESI, 0, EAX);
    rrmovl(EAX, ECX);
    subl(EBP, ECX);
    jxx(GE, "q_wj");
    iaddl(4, ESI);
    jmp("q_wi");
    label("q_wj");                      // while (x < a[j]) j--
    ld(v, N_QS, EDI, 0, EAX);
    rrmovl(EBP, ECX);
    subl(EAX, ECX);
    jxx(GE, "q_chk");
    iaddl(-4, EDI);
    jmp("q_wj");
    label("q_chk");                     // if (i <= j) swap, i++, j--
    rrmovl(ESI, ECX);
    subl(EDI, ECX);
    jxx(G, "q_skip");
    ld(v, N_QS, ESI, 0, EAX);
    ld(v, N_QS, EDI, 0, EDX);
    st(v, N_QS, EDX, ESI, 0);
    st(v, N_QS, EAX, EDI, 0);
    iaddl(4, ESI);
    iaddl(-4, EDI);
    label("q_skip");
    rrmovl(ESI, ECX);
    subl(EDI, ECX);
    jxx(LE, "q_loop");
    mrmovl(4, ESP, EAX);                // if (l < j) quick(l, j)
    rrmovl(EAX, ECX);
    subl(EDI, ECX);
    jxx(GE, "q_right");
    pushl(ESI);
    pushl(EDI);
    pushl(EAX);
    call("quick");
    popl(EAX);
    popl(EAX);
    popl(ESI);
    label("q_right");                   // if (i < r) quick(i, r)
    mrmovl(8, ESP, EAX);
    rrmovl(ESI, ECX);
    subl(EAX, ECX);
    jxx(GE, "q_done");
    pushl(EAX);
    pushl(ESI);
    call("quick");
    popl(EAX);
    popl(EAX);
    label("q_done");
    ret();
    gen_list(N_QS);
  endfunction

  // ---------------- Perm ----------------
  // permute(n) with EDI = 4*n; ESI counts calls; EBP = 4*k.
  function automatic void prog_perm(int v);
    prologue();
    irmovl(0, ESI);
    irmovl(5, EAX);
    pushl(EAX);                         // run counter
    label("p_run");
    irmovl(4, EDX);                     // Initialize: permarray[i] = i-1, i = 1..7
    irmovl(0, EAX);
    label("p_init");
    st(v, N_PERM, EAX, EDX, 0);
    iaddl(1, EAX);
    iaddl(4, EDX);
    rrmovl(EDX, ECX);
    iaddl(-32, ECX);
    jxx(NE, "p_init");
    irmovl(28, EDI);
    call("permute");
    popl(EAX);
    iaddl(-1, EAX);
    pushl(EAX);
    jxx(NE, "p_run");
    popl(EAX);
    ret();

    label("permute");
    iaddl(1, ESI);
    rrmovl(EDI, ECX);
    iaddl(-4, ECX);
    jxx(E, "p_ret");                    // n == 1
    pushl(EBP);
    iaddl(-4, EDI);
    call("permute");
    iaddl(4, EDI);
    rrmovl(EDI, EBP);
    iaddl(-4, EBP);                     // k = n-1
    label("p_k");
    ld(v, N_PERM, EDI, 0, EAX);         // swap(permarray[n], permarray[k])
    ld(v, N_PERM, EBP, 0, EDX);
    st(v, N_PERM, EDX, EDI, 0);
    st(v, N_PERM, EAX, EBP, 0);
    iaddl(-4, EDI);
    call("permute");
    iaddl(4, EDI);
    ld(v, N_PERM, EDI, 0, EAX);         // swap back
    ld(v, N_PERM, EBP, 0, EDX);
    st(v, N_PERM, EDX, EDI, 0);
    st(v, N_PERM, EAX, EBP, 0);
    iaddl(-4, EBP);
    jxx(G, "p_k");
    popl(EBP);
    label("p_ret");
    ret();
    org(ARR);
    for (int i = 0; i < N_PERM; i++) w(32'h7777_0000 + i);
  endfunction

  // ---------------- running ----------------
  function automatic void build(int kernel, int v);
    for (int p = 1; p <= 2; p++) begin
      start(p);
      case (kernel)
        0: prog_bubble(v);
        1: prog_quick(v);
        default: prog_perm(v);
      endcase
    end
  endfunction

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

  function automatic word_t rdw(int a);
    return {dut.u_mem.mem[a+3], dut.u_mem.mem[a+2], dut.u_mem.mem[a+1], dut.u_mem.mem[a]};
  endfunction

  // result check of one run; returns 1 if correct
  function automatic bit result_ok(int kernel);
    int n;
    int ref_list [];
    int tmp;
    bit ok;
    ok = 1;
    if (kernel == 2) begin
      if (regs[ESI] != 43300) ok = 0;
      for (int i = 1; i <= 7; i++) if (rdw(ARR + 4*i) != word_t'(i - 1)) ok = 0;
      if (rdw(ARR) != 32'h7777_0000) ok = 0;
      return ok;
    end
    n = (kernel == 0) ? N_BUB : N_QS;
    ref_list = new[n];
    for (int i = 0; i < n; i++)
      ref_list[i] = int'({img[ARR+4*i+3], img[ARR+4*i+2], img[ARR+4*i+1], img[ARR+4*i]});
    for (int i = 1; i < n; i++)
      for (int j = i; j > 0 && ref_list[j-1] > ref_list[j]; j--) begin
        tmp = ref_list[j];
        ref_list[j] = ref_list[j-1];
        ref_list[j-1] = tmp;
      end
    for (int i = 0; i < n; i++) if (int'(rdw(ARR + 4*i)) != ref_list[i]) ok = 0;
    if (rdw(ARR + 4*n) != 32'h5EED_0000) ok = 0;
    return ok;
  endfunction

  initial begin : main
    string kname [3];
    string vname [3];
    int unsigned ins [3];
    int unsigned cyc [3];
    kname[0] = "Bubblesort";
    kname[1] = "Quicksort";
    kname[2] = "Perm";
    vname[0] = "unprotected";
    vname[1] = "software";
    vname[2] = "SMOV";
    for (int k = 0; k < 3; k++) begin
      for (int v = 0; v < 3; v++) begin
        build(k, v);
        load_image();
        rst_n = 1'b1;
        while (stat == S_AOK && cycles < 200_000_000) @(negedge clk);
        ins[v] = instrs;
        cyc[v] = cycles;
        check($sformatf("%s %s: halted normally", kname[k], vname[v]),
              stat === S_HLT && regs[EAX] !== 32'hDEAD);
        check($sformatf("%s %s: result correct", kname[k], vname[v]), result_ok(k));
        $display("%-10s %-11s instructions %9d  cycles %9d  CPI %0.3f  overhead %0.1f%%",
                 kname[k], vname[v], ins[v], cyc[v], real'(cyc[v]) / ins[v],
                 100.0 * (real'(cyc[v]) / cyc[0] - 1.0));
      end
      check($sformatf("%s: SMOV executes more instructions than unprotected", kname[k]),
            ins[SMOV] > ins[UNPROT]);
      check($sformatf("%s: SMOV takes fewer cycles than software checks", kname[k]),
            cyc[SMOV] < cyc[SOFT]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_y86_smov_cpu: end-to-end test of the SMOV-extended Y86 pipeline at its
// default parameters.
//
// Programs are assembled with y86_asm_pkg, written through the host port while
// reset is held, and run until the processor stops. The test covers:
//   1. a mix of base instructions (OPl, cmov, iaddl, call/ret, push/pop,
//      leave, mrmovl/rmmovl) with forwarding and load/use hazards;
//   2. the cost of a secure load: a run of smrmovl takes exactly as many
//      cycles as the same run of mrmovl, and hazard-free code runs at one
//      instruction per cycle (cycles = instructions + 4);
//   3. bound edges: an access at the lower bound and at upper bound - 1
//      passes, one below the lower bound or at the upper bound is refused;
//   4. a store overflow: filling BUFSIZE+1 words with srmmovl stops with
//      S_BND and leaves the word past the buffer intact, while the same loop
//      with rmmovl overwrites it;
//   5. Bubblesort of a 400-element list (the list size of the evaluated
//      Bubblesort) using smrmovl/srmmovl for every array access, checked
//      against a sort done in the testbench, and the same program with an
//      off-by-one loop bound, which the bound check stops.
// It counts load/use stalls, ret stalls, mispredicted jumps, passed secure
// loads and stores and bound violations, and fails if any never happened.
module tb_y86_smov_cpu;
  import y86_pkg::*;
  import y86_asm_pkg::*;

  localparam int N_SORT = 400;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  word_t      host_addr;
  logic       host_we;
  logic [7:0] host_wdata, host_rdata;
  stat_t      stat;
  logic       bound_violation, load_use_stall, ret_stall, branch_mispredict;
  word_t      regs [8];
  word_t      cycles, instrs;

  int checks = 0, failures = 0;
  int n_load_use = 0, n_ret = 0, n_mispred = 0, n_bound = 0, n_sload = 0, n_sstore = 0;

  y86_smov_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && stat == S_AOK) begin
    if (load_use_stall) n_load_use++;
    if (ret_stall) n_ret++;
    if (branch_mispredict) n_mispred++;
    if (bound_violation) n_bound++;
    if (dut.M.icode == I_SMRMOVL && !bound_violation) n_sload++;
    if (dut.M.icode == I_SRMMOVL && !bound_violation) n_sstore++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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

  task automatic run(int max_cycles);
    rst_n = 1'b1;
    for (int i = 0; i < max_cycles && stat == S_AOK; i++) @(negedge clk);
    check("program stopped", stat !== S_AOK);
  endtask

  function automatic word_t rdw(int a);
    return {dut.u_mem.mem[a+3], dut.u_mem.mem[a+2], dut.u_mem.mem[a+1], dut.u_mem.mem[a]};
  endfunction

  task automatic host_read_word(int a, output word_t v);
    for (int i = 0; i < 4; i++) begin
      host_addr = a + i;
      #1;
      v[8*i +: 8] = host_rdata;
    end
  endtask

  // ---------------- program 1: base instructions ----------------
  function automatic void prog_base();
    irmovl(32'h400, ESP);
    irmovl(5, EAX);
    irmovl(7, ECX);
    addl(EAX, ECX);            // ecx = 12 (forwarded eax)
    subl(EAX, ECX);            // ecx = 7
    irmovl(32'hF0, EDX);
    andl(ECX, EDX);            // edx = 0
    xorl(EAX, EDX);            // edx = 5
    iaddl(100, EDX);           // edx = 105
    irmovl(32'h200, EBX);
    rmmovl(EDX, 8, EBX);       // M[0x208] = 105
    mrmovl(8, EBX, ESI);       // esi = 105
    addl(ESI, ESI);            // load/use -> esi = 210
    pushl(ESI);
    popl(EDI);                 // edi = 210
    rrmovl(EDI, EBP);
    subl(EAX, EAX);            // zero flag set
    cmov(E, ECX, EAX);         // taken: eax = 7
    cmov(NE, EDX, EAX);        // not taken
    call("func");
    irmovl(1, EBX);            // returns here: ebx = 1
    halt();
    label("func");
    pushl(EBP);
    rrmovl(ESP, EBP);
    irmovl(32'h55, EBP);
    irmovl(32'h3F8, EBP);      // ebp = address of saved ebp
    leave();                   // esp = 0x3FC, ebp = M[0x3F8] = 210
    ret();
  endfunction

  // ---------------- program 2: timing of secure against plain loads --------
  function automatic void prog_loads(bit secure);
    irmovl(32'h300, EBX);      // lower bound / base
    irmovl(32'h340, ECX);      // upper bound
    nop(); nop(); nop();
    for (int i = 0; i < 8; i++)
      if (secure) smrmovl(4*i, EBX, EAX, ECX, EBX);
      else        mrmovl(4*i, EBX, EAX);
    halt();
    org(32'h300);
    for (int i = 0; i < 16; i++) w(32'h1000 + i);
  endfunction

  // ---------------- program 3: bound edges ----------------
  // mode 0: loads at the lower bound and at upper bound - 1 (both pass)
  // mode 1: load at lower bound - 1; mode 2: store at the upper bound
  function automatic void prog_edges(int mode);
    irmovl(32'h500, EBX);      // rL
    irmovl(32'h510, ECX);      // rU (exclusive)
    irmovl(32'h500, ESI);      // base
    irmovl(32'h77, EDX);
    case (mode)
      0: begin
        smrmovl(0, ESI, EAX, ECX, EBX);
        smrmovl(32'hF, ESI, EDI, ECX, EBX);
      end
      1: smrmovl(32'hFFFF_FFFF, ESI, EAX, ECX, EBX);
      default: srmmovl(EDX, 32'h10, ESI, ECX, EBX);
    endcase
    irmovl(32'h99, EBP);
    halt();
    org(32'h500);
    for (int i = 0; i < 8; i++) w(32'hA0 + i);
  endfunction

  // ---------------- program 4: store overflow ----------------
  localparam int BUF = 32'h600, BUFSIZE = 12;
  function automatic void prog_fill(bit secure);
    irmovl(BUF, EBX);                      // rL
    irmovl(BUF + 4*BUFSIZE - 3, ECX);      // rU, as a compiler sets it for words
    irmovl(0, EDI);                        // byte offset
    irmovl(BUFSIZE + 1, ESI);              // one word too many
    irmovl(32'h41414141, EDX);
    label("fill");
    if (secure) srmmovl(EDX, BUF, EDI, ECX, EBX);
    else        rmmovl(EDX, BUF, EDI);
    iaddl(4, EDI);
    iaddl(-1, ESI);
    jxx(NE, "fill");
    halt();
    org(BUF + 4*BUFSIZE);
    w(32'hCAFE_F00D);                      // word right after the buffer
  endfunction

  // ---------------- program 5: Bubblesort with SMOV ----------------
  localparam int LIST = 32'h1000;
  function automatic void prog_bubble(int n, bit off_by_one, int seed);
    int unsigned s = seed;
    irmovl(LIST, EBX);                     // rL
    irmovl(LIST + 4*n - 3, ECX);           // rU
    irmovl(n - 1, ESI);                    // top
    label("outer");
    andl(ESI, ESI);
    jxx(LE, "done");
    irmovl(0, EDI);                        // i * 4
    rrmovl(ESI, EBP);                      // inner count = top
    if (off_by_one) iaddl(1, EBP);
    label("inner");
    smrmovl(LIST, EDI, EAX, ECX, EBX);     // a = list[i]
    smrmovl(LIST + 4, EDI, EDX, ECX, EBX); // b = list[i+1]
    rrmovl(EDX, ESP);
    subl(EAX, ESP);                        // b - a
    jxx(GE, "noswap");
    srmmovl(EDX, LIST, EDI, ECX, EBX);
    srmmovl(EAX, LIST + 4, EDI, ECX, EBX);
    label("noswap");
    iaddl(4, EDI);
    iaddl(-1, EBP);
    jxx(NE, "inner");
    iaddl(-1, ESI);
    jmp("outer");
    label("done");
    halt();
    org(LIST);
    for (int i = 0; i < n; i++) begin
      s = s * 1103515245 + 12345;
      w((s >> 8) % 100000 - 50000);
    end
    w(32'h5EED_0000);                      // guard word after the list
  endfunction

  task automatic assemble_base();   start(1); prog_base();  start(2); prog_base();  endtask

  initial begin : main
    word_t c_plain, c_secure, v;
    int ref_list [$];
    int tmp;

    // 1. base instructions
    assemble_base();
    load_image();
    run(2000);
    check("base: halted", stat === S_HLT);
    check("base: eax", regs[EAX] === 7);
    check("base: ecx", regs[ECX] === 7);
    check("base: edx", regs[EDX] === 105);
    check("base: ebx", regs[EBX] === 1);
    check("base: esi", regs[ESI] === 210);
    check("base: edi", regs[EDI] === 210);
    check("base: ebp restored by leave", regs[EBP] === 210);
    check("base: esp back at top", regs[ESP] === 32'h400);
    check("base: memory word", rdw(32'h208) === 105);

    // 2. timing
    start(1); prog_loads(0); start(2); prog_loads(0);
    load_image(); run(200);
    c_plain = cycles;
    check("loads: plain result", regs[EAX] === 32'h1007);
    check("loads: one instruction per cycle", cycles === instrs + 4);
    start(1); prog_loads(1); start(2); prog_loads(1);
    load_image(); run(200);
    c_secure = cycles;
    check("loads: secure result", regs[EAX] === 32'h1007 && stat === S_HLT);
    check("loads: secure load costs no extra cycle", c_secure === c_plain);
    check("loads: same instruction count", instrs === 13);

    // 3. bound edges
    start(1); prog_edges(0); start(2); prog_edges(0);
    load_image(); run(200);
    check("edges: in-bounds loads pass", stat === S_HLT && regs[EAX] === 32'hA0 && regs[EBP] === 32'h99);
    // bytes 0x50F..0x512: top byte of word 0xA3, then the low bytes of 0xA4
    check("edges: load at upper bound - 1 passes", regs[EDI] === 32'h0000_A400);
    start(1); prog_edges(1); start(2); prog_edges(1);
    load_image(); run(200);
    check("edges: below lower bound refused", stat === S_BND);
    check("edges: refused load writes nothing", regs[EAX] === 0 && regs[EBP] === 0);
    start(1); prog_edges(2); start(2); prog_edges(2);
    load_image(); run(200);
    check("edges: store at upper bound refused", stat === S_BND);
    check("edges: refused store leaves memory", rdw(32'h510) === 32'hA4);

    // 4. store overflow
    start(1); prog_fill(0); start(2); prog_fill(0);
    load_image(); run(2000);
    check("fill: plain loop halts", stat === S_HLT);
    check("fill: plain store overwrote the next word", rdw(BUF + 4*BUFSIZE) === 32'h41414141);
    start(1); prog_fill(1); start(2); prog_fill(1);
    load_image(); run(2000);
    check("fill: secure loop stopped by bound check", stat === S_BND);
    check("fill: next word intact", rdw(BUF + 4*BUFSIZE) === 32'hCAFE_F00D);
    check("fill: last buffer word written", rdw(BUF + 4*BUFSIZE - 4) === 32'h41414141);
    check("fill: stopped at the 13th store", regs[EDI] === 4*BUFSIZE && regs[ESI] === 1);

    // 5. Bubblesort
    start(1); prog_bubble(N_SORT, 0, 7); start(2); prog_bubble(N_SORT, 0, 7);
    ref_list = {};
    for (int i = 0; i < N_SORT; i++)
      ref_list.push_back(int'({img[LIST+4*i+3], img[LIST+4*i+2], img[LIST+4*i+1], img[LIST+4*i]}));
    // reference: insertion sort on signed values
    for (int i = 1; i < N_SORT; i++)
      for (int j = i; j > 0 && ref_list[j-1] > ref_list[j]; j--) begin
        tmp = ref_list[j];
        ref_list[j] = ref_list[j-1];
        ref_list[j-1] = tmp;
      end
    load_image(); run(5_000_000);
    check("bubble: halted", stat === S_HLT);
    begin
      int bad = 0;
      for (int i = 0; i < N_SORT; i++) begin
        host_read_word(LIST + 4*i, v);
        if (int'(v) != ref_list[i]) begin
          if (bad < 4) $display("  list[%0d] = %0d, expected %0d", i, int'(v), ref_list[i]);
          bad++;
        end
      end
      check("bubble: list sorted", bad === 0);
    end
    check("bubble: guard intact", rdw(LIST + 4*N_SORT) === 32'h5EED_0000);
    $display("bubble: %0d instructions, %0d cycles, CPI %0.3f", instrs, cycles, real'(cycles) / instrs);
    start(1); prog_bubble(16, 1, 3); start(2); prog_bubble(16, 1, 3);
    load_image(); run(100_000);
    check("bubble off-by-one: stopped by bound check", stat === S_BND);
    check("bubble off-by-one: stopped reading list[n]", regs[EDI] === 4*15);

    $display("events: load_use=%0d ret=%0d mispredict=%0d secure_load=%0d secure_store=%0d bound_violation=%0d",
             n_load_use, n_ret, n_mispred, n_sload, n_sstore, n_bound);
    check("event load/use stall seen", n_load_use > 0);
    check("event ret stall seen", n_ret > 0);
    check("event mispredict seen", n_mispred > 0);
    check("event secure load seen", n_sload > 0);
    check("event secure store seen", n_sstore > 0);
    check("event bound violation seen", n_bound >= 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

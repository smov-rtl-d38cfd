// y86_asm_pkg: a small Y86 + SMOV assembler for the testbenches.
//
// Each function appends one instruction's bytes to the image img at address pc.
// Labels are resolved in two passes: a program generator is run once with
// pass = 1 (label() records addresses, lab() returns 0 for unknown labels) and
// again with pass = 2, when every label is known. Encodings: first byte
// icode:ifun, then rA:rB, then the 4-byte little-endian constant, and for the
// secure moves (srmmovl = 0xE, smrmovl = 0xF) a final rU:rL byte.
package y86_asm_pkg;

  logic [7:0] img [int];
  int         pc;
  int         pass;
  int         labels [string];

  function automatic void start(int p);
    pass = p;
    pc = 0;
    img.delete();
    if (p == 1) labels.delete();
  endfunction

  function automatic void org(int a);
    pc = a;
  endfunction

  function automatic void label(string n);
    labels[n] = pc;
  endfunction

  function automatic int lab(string n);
    if (labels.exists(n)) return labels[n];
    if (pass == 2) $error("undefined label %s", n);
    return 0;
  endfunction

  function automatic void b(logic [7:0] v);
    img[pc] = v;
    pc++;
  endfunction

  function automatic void w(logic [31:0] v);
    for (int i = 0; i < 4; i++) b(v[8*i +: 8]);
  endfunction

  function automatic void halt();                 b(8'h00); endfunction
  function automatic void nop();                  b(8'h10); endfunction
  function automatic void cmov(int fn, int ra, int rb); b({4'h2, 4'(fn)}); b({4'(ra), 4'(rb)}); endfunction
  function automatic void rrmovl(int ra, int rb); cmov(0, ra, rb); endfunction
  function automatic void irmovl(logic [31:0] v, int rb); b(8'h30); b({4'hF, 4'(rb)}); w(v); endfunction
  function automatic void rmmovl(int ra, logic [31:0] d, int rb); b(8'h40); b({4'(ra), 4'(rb)}); w(d); endfunction
  function automatic void mrmovl(logic [31:0] d, int rb, int ra); b(8'h50); b({4'(ra), 4'(rb)}); w(d); endfunction
  function automatic void opl(int fn, int ra, int rb); b({4'h6, 4'(fn)}); b({4'(ra), 4'(rb)}); endfunction
  function automatic void addl(int ra, int rb); opl(0, ra, rb); endfunction
  function automatic void subl(int ra, int rb); opl(1, ra, rb); endfunction
  function automatic void andl(int ra, int rb); opl(2, ra, rb); endfunction
  function automatic void xorl(int ra, int rb); opl(3, ra, rb); endfunction
  function automatic void jxx(int fn, string t);  b({4'h7, 4'(fn)}); w(lab(t)); endfunction
  function automatic void jmp(string t);          jxx(0, t); endfunction
  function automatic void call(string t);         b(8'h80); w(lab(t)); endfunction
  function automatic void ret();                  b(8'h90); endfunction
  function automatic void pushl(int ra);          b(8'hA0); b({4'(ra), 4'hF}); endfunction
  function automatic void popl(int ra);           b(8'hB0); b({4'(ra), 4'hF}); endfunction
  function automatic void iaddl(logic [31:0] v, int rb); b(8'hC0); b({4'hF, 4'(rb)}); w(v); endfunction
  function automatic void leave();                b(8'hD0); endfunction
  function automatic void srmmovl(int ra, logic [31:0] d, int rb, int ru, int rl);
    b(8'hE0); b({4'(ra), 4'(rb)}); w(d); b({4'(ru), 4'(rl)});
  endfunction
  function automatic void smrmovl(logic [31:0] d, int rb, int ra, int ru, int rl);
    b(8'hF0); b({4'(ra), 4'(rb)}); w(d); b({4'(ru), 4'(rl)});
  endfunction

  // Condition codes of jXX / cmovXX
  localparam int YES = 0, LE = 1, L = 2, E = 3, NE = 4, GE = 5, G = 6;
  // Registers
  localparam int EAX = 0, ECX = 1, EDX = 2, EBX = 3, ESP = 4, EBP = 5, ESI = 6, EDI = 7, RNONE = 15;

endpackage

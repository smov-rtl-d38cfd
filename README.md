# SMOV: bound-checked loads and stores in a pipelined Y86 processor

C and C++ do not check array indices, so `buf[i]` with `i` out of range reads or
overwrites whatever lies next to the array (a buffer overflow). Checking the
index in software costs a compare and a branch per bound before every access.
SMOV moves the check into the memory instruction itself. A secure load or store
names two more registers, holding the array's upper and lower bound. The
processor checks the effective address against both while it computes it, and
performs the access only if the address is inside. Otherwise the access is
suppressed and the program stops.

This repository holds synthesizable SystemVerilog for a five-stage pipelined
Y86 processor (the 32-bit teaching subset of IA-32) extended with the two SMOV
instructions, and a self-checking testbench for every block.

## The two instructions

| assembly | meaning |
|---|---|
| `srmmovl rA, D(rB), rU, rL` | if `R[rL] <= R[rB]+D < R[rU]` then `M4[R[rB]+D] <- R[rA]`, else stop with status BND |
| `smrmovl D(rB), rA, rU, rL` | if `R[rL] <= R[rB]+D < R[rU]` then `R[rA] <- M4[R[rB]+D]`, else stop with status BND |

Both are 7 bytes long, one byte more than `rmmovl`/`mrmovl`:

```
byte  0        1        2..5               6
      icode:0  rA:rB    D (little endian)  rU:rL
```

`icode` is `0xE` for `srmmovl` and `0xF` for `smrmovl`. `rA` and `rU` sit in
the high nibbles, `rB` and `rL` in the low ones, for both instructions.

The check compares one address with both bounds. A 4-byte access at address
`a` touches bytes `a..a+3`, so software sets the upper bound to 3 less than
the end of the array. For an array of 400 words at `list`:

```
irmovl list, %ebx              # lower bound: first byte
irmovl list, %ecx
iaddl  $1597, %ecx             # upper bound: 400*4 - 3
smrmovl list(%edi), %edx, %ecx, %ebx
```

The last element sits at `list+1596`, which is below the upper bound
(`1597 - 1596 > 0`). The next word, at `list+1600`, is not.

All the data that a plain `mrmovl`/`rmmovl` needs is in the secure form. The
only difference is the extra byte.

## How SMOV fits in the pipeline

The processor is the classic five-stage Y86 pipeline. It has pipeline
registers F, D, E, M and W, forwarding into Decode, a one-cycle load/use stall
and jumps predicted as taken. SMOV touches every stage but adds no cycle:

* **Fetch** (`y86_fetch`) reads a seventh byte when the icode is a secure
  move. It puts `rU`/`rL` into the D register and adds 1 to `valP`. The
  memory delivers 7 instruction bytes per cycle.
* **Decode** (`y86_decode`, `y86_regfile`) reads four registers in one cycle.
  The register file has read ports A, B, U and L. The bound values `valU` and
  `valL` get the same forwarding paths as `valB`. A bound computed by the
  instruction just before the secure move is therefore used without a stall.
  Only a bound loaded from memory by the instruction just before costs the
  usual one-cycle load/use stall.
* **Execute** (`y86_execute`) computes the address `valE = valB + valC` in
  the ALU, as for `mrmovl`. Two dedicated subtractors
  (`smov_bound_check`) work alongside it:

  ```
  UB = (valU - valE > 0)
  LB = (valE - valL >= 0)
  ```

  UB and LB are stored in the M register.
* **Memory** (`y86_mem_ctrl`) ANDs UB and LB for a secure move. If the result
  is 0, neither read nor write reaches memory. The `bound_violation` output
  pulses for one cycle, and the instruction's status becomes `S_BND`.
  A refused load also writes no register.
* **Write-back**: an instruction whose status is `S_BND` behaves like `halt`
  once it reaches W. W holds, bubbles enter M, and `stat` shows `S_BND`.
  Nothing after the faulting instruction changes memory, registers or the
  condition codes.

A secure move costs exactly as many cycles as the plain move it replaces. The
end-to-end test checks this by running the same sequence of loads in both forms.

### Signed or unsigned bounds

Each subtractor is followed by zero, sign and overflow flags. The result is
read as a two's-complement comparison, the same way the Y86 condition codes
are read: "> 0" means not zero and sign = overflow. Addresses are therefore
compared as signed numbers. This only matters for an array that straddles
address `0x8000_0000`. The parameter `UNSIGNED_CMP = 1` (on `y86_smov_cpu`,
`y86_execute` and `smov_bound_check`) compares with the borrow instead,
treating addresses as unsigned. The default is signed. The published
material is not consistent on this point: its simulator uses the signed
flags, while its hardware listing compares unsigned.

## The base processor

Instruction set (32-bit Y86 with the `iaddl` and `leave` extensions, plus SMOV):

| icode | instruction | bytes | | icode | instruction | bytes |
|---|---|---|---|---|---|---|
| 0 | `halt` | 1 | | 8 | `call Dest` | 5 |
| 1 | `nop` | 1 | | 9 | `ret` | 1 |
| 2 | `rrmovl` / `cmovXX rA, rB` | 2 | | A | `pushl rA` | 2 |
| 3 | `irmovl V, rB` | 6 | | B | `popl rA` | 2 |
| 4 | `rmmovl rA, D(rB)` | 6 | | C | `iaddl V, rB` | 6 |
| 5 | `mrmovl D(rB), rA` | 6 | | D | `leave` | 1 |
| 6 | `addl/subl/andl/xorl rA, rB` (ifun 0-3) | 2 | | E | `srmmovl rA, D(rB), rU, rL` | 7 |
| 7 | `jmp/jle/jl/je/jne/jge/jg Dest` (ifun 0-6) | 5 | | F | `smrmovl D(rB), rA, rU, rL` | 7 |

Registers 0-7 are `eax ecx edx ebx esp ebp esi edi`. The id `F` means "no
register". An undefined ifun gives status `S_INS`. Such an instruction
moves down the pipeline as a `nop`, so it has no effect before it stops the
processor.

Pipeline control (`y86_pipe_ctrl`) handles three hazards:

| hazard | cost |
|---|---|
| load/use: a load in Execute writes a register that Decode reads (srcA, srcB, srcU or srcL) | 1 bubble |
| mispredicted jump (predicted taken, not taken) | 2 bubbles |
| `ret` (return address known only in Write-back) | 3 bubbles |

Code without hazards completes one instruction per cycle. A program of *n*
instructions with no hazards finishes in *n* + 4 cycles.

Memory (`y86_memory`) is an idealised single-cycle byte array with three
ports:

* an instruction port returning 7 bytes at any address;
* a 32-bit little-endian data port at any byte alignment;
* a byte-wide host port for loading programs and reading results.

Addresses beyond `MEM_BYTES` (default 65536) give status `S_ADR`.

## Files

| file | block |
|---|---|
| `rtl/y86_pkg.sv` | encodings, status codes, pipeline-register structs and their bubble values |
| `rtl/y86_smov_cpu.sv` | top: the pipeline wired together, host port, counters |
| `rtl/y86_fetch.sv` | Select PC, instruction split (with rU:rL), valP, predict PC |
| `rtl/y86_regfile.sv` | 8 x 32-bit registers, read ports A/B/U/L, write ports E/M |
| `rtl/y86_decode.sv` | source/destination selection, forwarding of valA/valB/valU/valL |
| `rtl/y86_execute.sv` | ALU operand selection, condition codes, branch condition |
| `rtl/y86_alu.sv` | add, sub, and, xor and the condition-code flags |
| `rtl/smov_bound_check.sv` | the two bound subtractors with their flag logic |
| `rtl/y86_mem_ctrl.sv` | memory address/read/write, the UB && LB gate, interruption |
| `rtl/y86_memory.sv` | unified byte memory |
| `rtl/y86_pipe_ctrl.sv` | stall and bubble control |
| `rtl/y86_pipe_reg.sv` | pipeline register with stall and bubble, typed by a parameter |
| `tb/y86_asm_pkg.sv` | two-pass assembler used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Using the top module

`y86_smov_cpu` has the following ports:

* `clk`, `rst_n`: clock and asynchronous active-low reset.
* `host_addr`, `host_we`, `host_wdata`, `host_rdata`: byte-wide access to the
  memory.
* `stat`: processor status. It is `S_AOK` while running. When the processor
  stops it shows `S_HLT`, `S_ADR`, `S_INS` or `S_BND`.
* `bound_violation`: one-cycle pulse when a secure move is refused.
* `regs[8]`: the program registers.
* `cycles`, `instrs`: cycles and completed instructions since reset.
* `load_use_stall`, `ret_stall`, `branch_mispredict`: the hazard being handled
  in the current cycle.

To run a program:

1. Hold `rst_n` low.
2. Write the program and its data through the host port, one byte per clock.
3. Release `rst_n`. Execution starts at address 0.
4. Wait until `stat` is no longer `S_AOK`.

Simulate a testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/y86_pkg.sv tb/y86_asm_pkg.sv rtl/*.sv tb/tb_y86_smov_cpu.sv \
  --top-module tb_y86_smov_cpu -Mdir obj
./obj/Vtb_y86_smov_cpu
```

Every testbench ends with `TB_RESULT checks=N failures=M`. For another block,
replace the testbench file and top-module name.

## Verification

`tb_y86_smov_cpu` runs the top at its default parameters. It covers:

* a program that uses every base instruction class, with forwarding,
  load/use and `ret` hazards;
* the same eight loads written with `mrmovl` and with `smrmovl`, which must
  take the same number of cycles, with *n* + 4 cycles for *n* hazard-free
  instructions;
* accesses at the lower bound and at upper bound − 1, which must pass, and
  one byte outside either bound, which must be refused;
* a loop that stores one word past a 12-word buffer: with `rmmovl` it
  overwrites the next word, with `srmmovl` it stops there and the word is
  intact;
* Bubblesort of a 400-element list with every array access secure, checked
  against a sort done in the testbench, and the same sort with an off-by-one
  loop bound, which the bound check stops.

The test counts load/use stalls, `ret` stalls, mispredictions, passed secure
loads and stores, and bound violations. It fails if any of them never occurs.

The 400-element Bubblesort runs 720,443 instructions in 881,487 cycles
(CPI 1.22). The whole testbench takes well under a second of simulation.

`tb_y86_smov_random` checks the processor against an instruction-level
reference model in the testbench, using 2000 random programs. Each program
has 40 instructions drawn from:

* register moves and conditional moves;
* arithmetic and `iaddl`;
* loads, stores, push and pop;
* forward jumps, `call`, `ret` and `leave`;
* secure moves, whose bound checks pass or fail.

Registers are reused at random, so dependences between neighbouring
instructions, load/use stalls and forwarding into all four Decode operands
are frequent. After each program the status, all registers and all 64 KiB of
memory must equal the model's. Programs end by halting, on a bad address, on an invalid instruction or on
a bound violation. The halt, bad-address and bound-violation endings must all
occur.

`tb_smov_workloads` runs three small benchmark kernels, each in three
versions:

* Bubblesort of 400 words;
* Quicksort of 5000 words, with the first element as pivot because Y86 has
  no shift to halve an index;
* Perm, which runs `Permute(7)` five times for 43,300 calls.

The versions are:

* **unprotected**: plain loads and stores;
* **software**: a compare and a branch against each bound before every array
  access;
* **SMOV**: every array access is a secure move. The bounds are loaded right
  before each access: `irmovl base, rL; irmovl base, rU; iaddl 4n-3, rU`.

Each run must halt normally with the correct result. The SMOV version must
take fewer cycles than the software one. Measured at default parameters:

| kernel | unprotected cycles | software cycles (overhead) | SMOV cycles (overhead) | CPI unprot. / soft. / SMOV |
|---|---|---|---|---|
| Bubblesort | 886,735 | 3,063,529 (+245%) | 1,612,333 (+82%) | 1.23 / 1.59 / 1.11 |
| Quicksort | 983,084 | 2,385,682 (+143%) | 1,439,920 (+46%) | 1.31 / 1.55 / 1.18 |
| Perm | 923,706 | 2,687,671 (+191%) | 1,478,101 (+60%) | 1.38 / 1.60 / 1.16 |

The original evaluation used compiler-generated code and much longer runs.
It reported these runtime overheads:

| kernel | software checks | SMOV |
|---|---|---|
| Bubblesort | 149% | 22% |
| Quicksort | 92% | 15% |
| Perm | 94% | 16% |

Both kinds of checking cost more in these kernels. These
kernels keep every variable in a register, so the array accesses, and the
checks added to them, make up a larger share of the work. The ranking is the
same as in the original evaluation:

* SMOV versions need 53-60% of the cycles of the software-checked ones.
* SMOV lowers the CPI. The added `irmovl`/`iaddl` instructions never stall,
  while the software checks add mispredicted branches.

The block testbenches compare each block with an independent model:

* the ALU and the bound check against 64-bit arithmetic, on random and edge
  values;
* the register file and pipeline register against model arrays;
* the memory against a byte array;
* Fetch against assembler output;
* Decode, Execute, memory control and pipeline control against tables of
  expected behaviour.

For every block there is a broken variant that its testbench has been shown
to reject.

Two assertions in `y86_smov_cpu` hold in every simulation:

* a refused secure access never drives a memory read or write;
* no memory write happens once an exception has reached Write-back.

## Design choices and departures

The published description of SMOV fixes the following:

* the instruction forms and their seventh byte, with `rU` in its high nibble;
* the four-port register file;
* the two subtractors and their formulas;
* gating the access with UB && LB;
* the idea of a bounds "interruption".

Everything below is a choice made here:

* **Encodings**: icodes `0xE`/`0xF` for the secure moves. They are the two
  codes left free after `iaddl` and `leave`. Because every icode is now in use,
  Fetch also checks ifun to detect invalid instructions.
* **Stopping on a violation**: this is a new status `S_BND` that halts the
  processor. There is no exception handler or trap vector. "Program
  terminated" is taken literally.
* **Forwarding of the bounds**: the bound registers are forwarded, and the
  load/use check includes them. Without this, a program that sets a bound
  just before using it would read a stale value. The published pipeline takes
  the bounds straight from the register file and suggests, at worst, a rule
  that forbids writing a bound register while it is being read. Forwarding
  makes such a rule unnecessary.
* **Signed comparison** by default, following the flag-based subtractors
  (see above).
* **Memory**: an ideal single-cycle memory of 64 KiB that reads a whole
  instruction at once. A board-level design using external SRAM would need
  an instruction buffer and arbitration between fetch and data access. That
  design is not included.
* **Not implemented**: `sall` and `js`, which appear in some Y86 code
  listings for SMOV but have no defined encoding.
* **Not implemented**: the MPX-style comparison design (`bndmk`, `bndcl`,
  `bndcu` with separate bound registers). It is a baseline, not part of SMOV.
* **Counters and host port**: the cycle/instruction counters and the host
  port are additions for measurement and loading.

Sizes after coarse synthesis with yosys: 454 word-level cells and 786
flip-flop bits in the processor, plus the 64 KiB memory array. SMOV itself
adds:

* two 33-bit subtractors and their flag logic;
* two register-file read ports;
* 8 bits of register ids in D, 64 bits of bounds and 8 bits of ids in E;
* 2 flag bits in M.

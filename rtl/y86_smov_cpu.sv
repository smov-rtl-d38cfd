// y86_smov_cpu: five-stage pipelined Y86 processor with the SMOV secure
// load/store instructions.
//
// SMOV adds two instructions that check array bounds and access memory in one
// step:  srmmovl rA, D(rB), rU, rL  and  smrmovl D(rB), rA, rU, rL.
// Register rU holds the (exclusive) upper bound and rL the (inclusive) lower
// bound of the array. Fetch reads a seventh instruction byte rU:rL, Decode
// reads the two bound registers through two extra register-file ports, Execute
// computes UB = (valU - valE > 0) and LB = (valE - valL >= 0) with two
// dedicated subtractors next to the ALU, and the Memory stage lets the access
// happen only when UB && LB. A failed check suppresses the access, pulses
// bound_violation and stops the processor with status S_BND.
//
// Stages: Fetch (y86_fetch) -> D register -> Decode (y86_decode, y86_regfile)
// -> E register -> Execute (y86_execute with y86_alu and smov_bound_check) ->
// M register -> Memory (y86_mem_ctrl, y86_memory) -> W register -> Write-back
// (register-file write ports). y86_pipe_ctrl inserts stalls and bubbles.
// One instruction enters per cycle when there is no hazard; a load/use costs
// one bubble, a mispredicted jump two, a ret three.
//
// Interface: hold rst_n low while the program is written byte by byte through
// the host port (host_we/host_addr/host_wdata), then release it; execution
// starts at address 0. stat is S_AOK while running and shows the reason once
// the processor stops (S_HLT, S_ADR, S_INS or S_BND). regs shows the eight
// program registers; cycles and instrs count clock cycles and completed
// instructions since reset; load_use_stall, ret_stall and branch_mispredict
// flag the hazard the pipeline control is handling in the current cycle.
// The memory size MEM_BYTES is this design's choice.
module y86_smov_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES    = 65536,
  parameter bit          UNSIGNED_CMP = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // host port to the memory
  input  word_t       host_addr,
  input  logic        host_we,
  input  logic [7:0]  host_wdata,
  output logic [7:0]  host_rdata,
  // status and observation
  output stat_t       stat,
  output logic        bound_violation,
  output word_t       regs [8],
  output word_t       cycles,
  output word_t       instrs,
  // hazard events of the current cycle
  output logic        load_use_stall,
  output logic        ret_stall,
  output logic        branch_mispredict
);

  // pipeline registers
  f_reg_t F, f_next;
  d_reg_t D, f_out;
  e_reg_t E, d_out;
  m_reg_t M, e_out;
  w_reg_t W, m_out;

  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall;

  // ---------------- Fetch ----------------
  word_t       f_pc, f_pred_pc;
  logic [55:0] ibytes;
  logic        imem_error;

  y86_fetch u_fetch (
    .F_pred_pc(F.pred_pc), .M_icode(M.icode), .M_cnd(M.cnd), .M_vala(M.vala),
    .W_icode(W.icode), .W_valm(W.valm), .f_pc(f_pc), .ibytes(ibytes),
    .imem_error(imem_error), .f_out(f_out), .f_pred_pc(f_pred_pc));

  assign f_next.pred_pc = f_pred_pc;

  y86_pipe_reg #(.T(f_reg_t), .BUBBLE('0), .RESET('0)) u_F (
    .clk, .rst_n, .stall(F_stall), .bubble(1'b0), .d(f_next), .q(F));

  y86_pipe_reg #(.T(d_reg_t), .BUBBLE(D_BUBBLE), .RESET(D_BUBBLE)) u_D (
    .clk, .rst_n, .stall(D_stall), .bubble(D_bubble), .d(f_out), .q(D));

  // ---------------- Decode ----------------
  reg_id_t d_srca, d_srcb, d_srcu, d_srcl;
  word_t   rvala, rvalb, rvalu, rvall;
  reg_id_t e_dste;
  word_t   e_vale, m_valm;
  logic    e_cnd;

  y86_regfile u_rf (
    .clk, .rst_n,
    .srca(d_srca), .vala(rvala), .srcb(d_srcb), .valb(rvalb),
    .srcu(d_srcu), .valu(rvalu), .srcl(d_srcl), .vall(rvall),
    .dste(W.dste), .vale(W.vale), .dstm(W.dstm), .valm(W.valm), .regs(regs));

  y86_decode u_decode (
    .D(D), .d_srca, .d_srcb, .d_srcu, .d_srcl,
    .rvala, .rvalb, .rvalu, .rvall,
    .e_dste, .e_vale, .M_dstm(M.dstm), .m_valm, .M_dste(M.dste), .M_vale(M.vale),
    .W_dstm(W.dstm), .W_valm(W.valm), .W_dste(W.dste), .W_vale(W.vale),
    .d_out(d_out));

  y86_pipe_reg #(.T(e_reg_t), .BUBBLE(E_BUBBLE), .RESET(E_BUBBLE)) u_E (
    .clk, .rst_n, .stall(1'b0), .bubble(E_bubble), .d(d_out), .q(E));

  // ---------------- Execute ----------------
  stat_t m_stat;

  y86_execute #(.UNSIGNED_CMP(UNSIGNED_CMP)) u_execute (
    .clk, .rst_n, .E(E), .m_stat, .W_stat(W.stat),
    .e_out(e_out), .e_dste, .e_vale, .e_cnd);

  y86_pipe_reg #(.T(m_reg_t), .BUBBLE(M_BUBBLE), .RESET(M_BUBBLE)) u_M (
    .clk, .rst_n, .stall(1'b0), .bubble(M_bubble), .d(e_out), .q(M));

  // ---------------- Memory ----------------
  word_t mem_addr, mem_wdata, mem_rdata;
  logic  mem_read, mem_write, dmem_error;

  y86_mem_ctrl u_mem_ctrl (
    .M(M), .mem_addr, .mem_read, .mem_write, .mem_wdata, .mem_rdata, .dmem_error,
    .interruption(bound_violation), .m_valm, .m_stat, .m_out(m_out));

  y86_memory #(.MEM_BYTES(MEM_BYTES), .IBYTES(7)) u_mem (
    .clk, .ipc(f_pc), .ibytes, .imem_error,
    .daddr(mem_addr), .dre(mem_read), .dwe(mem_write), .dwdata(mem_wdata), .drdata(mem_rdata),
    .dmem_error, .haddr(host_addr), .hwe(host_we), .hwdata(host_wdata),
    .hrdata(host_rdata));

  y86_pipe_reg #(.T(w_reg_t), .BUBBLE(W_BUBBLE), .RESET(W_BUBBLE)) u_W (
    .clk, .rst_n, .stall(W_stall), .bubble(1'b0), .d(m_out), .q(W));

  // ---------------- Control ----------------
  y86_pipe_ctrl u_ctrl (
    .D_icode(D.icode), .d_srca, .d_srcb, .d_srcu, .d_srcl,
    .E_icode(E.icode), .E_dstm(E.dstm), .e_cnd, .M_icode(M.icode),
    .m_stat, .W_stat(W.stat),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .M_bubble, .W_stall,
    .load_use(load_use_stall), .ret_wait(ret_stall), .mispredict(branch_mispredict));

  // ---------------- Write-back status and counters ----------------
  assign stat = (W.stat == S_BUB) ? S_AOK : W.stat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0;
      instrs <= '0;
    end else if (!is_exc(W.stat)) begin
      cycles <= cycles + 1;
      if (W.stat == S_AOK) instrs <= instrs + 1;
    end
  end

  // ---------------- protection rules ----------------
  // A secure move that fails its bound check never reaches the memory, and
  // once an exception (halt, bad address, invalid instruction, bound
  // violation) has reached Write-back no later instruction writes memory.
  always_comb begin
    if (rst_n) begin
      assert (!(bound_violation && (mem_read || mem_write)))
        else $error("refused secure access reached memory");
      assert (!(is_exc(W.stat) && mem_write))
        else $error("memory written after an exception");
    end
  end

endmodule

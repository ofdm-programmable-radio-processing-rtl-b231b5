// pcu: program control unit (Decode stage of the pipeline).
//
// Chooses the next fetch address PCP from four sources, as in the architecture
// description: PC + 1 (complex mode) or PC + 2 (real mode), the top of the PC
// stack (return), the branch target of the instruction in Decode (IRD), or the
// branch target of the instruction in Execute (IRE). The last case serves
// conditional branches whose condition depends on the arithmetic status (ASTA)
// of the instruction just ahead of them: Decode cannot see that status yet, so
// the branch is marked "deferred", travels to Execute, and is resolved there one
// cycle later, one bubble more than a normal taken branch (two instead of one).
// A deferred "counter" condition works the same way when the instruction ahead
// loads the loop counter.
//
// It also holds the mode register (complex/real), the arithmetic status register
// ASTA, the loop counter register LCR, the PC stack, and the sleep state.
//
// Interface and timing (one clock):
//  * d_live/d: the decoded instruction in Decode; e: the one in Execute.
//  * kill_f: the instruction now in Fetch must become a NOP when it enters
//    Decode (any taken redirect). kill_d: the instruction now in Decode must
//    enter Execute as a NOP (redirect from Execute).
//  * stall (pc_halt): PC, Fetch and Decode hold and Execute receives NOPs; it
//    is raised by SLEEP from the cycle after SLEEP leaves Decode until wake.
//  * d_defer: tag for the Decode instruction, stored with it into Execute.
//
// Design choices (not given in the description): the PC stack is STACK_DEPTH
// deep and wraps on overflow; a call pushes its return address when it is
// taken; CallPR also pushes LCR and ASTA (as the instruction in Execute leaves
// them), which the matching return restores;
// RTI returns like RTS; the counter condition is "LCR != 0" and decrements LCR
// when the branch is taken; a mode switch is a taken redirect to the next
// instruction (rounded up to a 32-bit boundary when entering real mode);
// after reset the core starts in complex mode at address 0.
module pcu
  import rpe_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wake,
  input  logic           d_live,
  input  dop_t           d,
  input  dop_t           e,
  input  logic           e_asta_we,
  input  asta_t          e_asta_new,
  output logic [PCW-1:0] pcp,
  output logic           mode,
  output logic           stall,
  output logic           kill_f,
  output logic           kill_d,
  output logic           d_defer,
  output logic [W-1:0]   lcr,
  output asta_t          asta,
  output logic           e_take,
  output logic           d_take
);

  localparam int unsigned SPW = $clog2(STACK_DEPTH);

  typedef struct packed {
    logic [PCW-1:0] ret;
    logic           pr;
    logic [W-1:0]   lcr;
    asta_t          asta;
  } stk_t;

  stk_t           stack [STACK_DEPTH];
  logic [SPW-1:0] sp;       // number of entries, modulo depth
  logic [PCW-1:0] pc;
  logic           sleeping;
  stk_t           top;

  assign top   = stack[sp - 1'b1];
  assign stall = sleeping;

  logic e_cf, d_cf, d_modesw, d_sleep;
  logic lcr_nz;
  assign lcr_nz = (lcr != '0);

  assign e_cf   = e.valid & e.deferred & (e.br | e.call | e.ret);
  assign e_take = e_cf & eval_cond(e.cond, asta, lcr_nz);

  assign d_cf    = d_live & d.valid & (d.br | d.call | d.ret);
  assign d_defer = d_cf & ((cond_uses_asta(d.cond) & e_asta_we) |
                           (d.cond == CND_CNT & e.valid & e.lcr_we));
  assign d_take  = d_cf & ~d_defer & ~e_take & eval_cond(d.cond, asta, lcr_nz);
  assign d_modesw = d_live & d.valid & d.mode_sw & ~e_take;
  assign d_sleep  = d_live & d.valid & d.sleep & ~e_take;

  assign kill_f = e_take | d_take | d_modesw;
  assign kill_d = e_take;

  // LCR and ASTA as they stand after the instruction in Execute: a CallPR
  // right behind an LCR load or an arithmetic instruction saves the new values
  logic [W-1:0] lcr_cur;
  asta_t        asta_cur;
  assign lcr_cur  = (e.valid && e.lcr_we) ? e.lcr_val : lcr;
  assign asta_cur = e_asta_we ? e_asta_new : asta;

  // the branch being taken this cycle, if any
  dop_t tk;
  assign tk = e_take ? e : d;

  always_comb begin
    if (e_take || d_take)  pcp = tk.ret ? top.ret : tk.target;
    else if (d_modesw)     pcp = d.target;
    else if (stall)        pcp = pc;
    else                   pcp = pc + (mode ? PCW'(2) : PCW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '1;           // so that the first PCP is 0
      mode     <= 1'b0;
      sp       <= '0;
      lcr      <= '0;
      asta     <= '0;
      sleeping <= 1'b0;
      for (int i = 0; i < int'(STACK_DEPTH); i++) stack[i] <= '0;
    end else begin
      pc <= pcp;
      if (d_modesw) mode <= ~mode;
      if (sleeping && wake) sleeping <= 1'b0;
      else if (d_sleep)     sleeping <= 1'b1;
      if (e.valid && e.lcr_we) lcr <= e.lcr_val;
      if (e_asta_we) asta <= e_asta_new;
      if (e_take || d_take) begin
        if (tk.cond == CND_CNT) lcr <= lcr - 1'b1;
        if (tk.call) begin
          stack[sp] <= '{ret: tk.retaddr, pr: tk.pushregs, lcr: lcr_cur, asta: asta_cur};
          sp <= sp + 1'b1;
        end else if (tk.ret) begin
          sp <= sp - 1'b1;
          if (top.pr) begin
            lcr  <= top.lcr;
            asta <= top.asta;
          end
        end
      end
    end
  end

  // real-mode instructions are whole 32-bit words: every fetch address is even
  a_real_aligned: assert property (@(posedge clk) disable iff (!rst_n) mode |-> !pcp[0])
    else $error("real-mode fetch from odd address %0h", pcp);

endmodule

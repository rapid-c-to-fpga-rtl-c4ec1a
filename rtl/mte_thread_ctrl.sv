// Thread scheduler and per-thread program counters (IF stage).
//
// Interleaved multithreading: a 2-bit counter picks thread 0,1,2,3,0,... in
// fixed rotation, one thread per cycle, so the pipeline never holds two
// adjacent instructions of the same thread. Each thread owns a PC and a
// next-PC (MIPS delay-slot style): at its fetch slot pc <= npc and
// npc <= npc + 4. Two cycles later (EX) a taken branch of that thread writes
// its npc; the delay-slot instruction at pc is still fetched next, then the
// target. A trap or ERET (system thread) rewrites pc and npc together, so no
// delay slot follows it. Both writes land before the thread's next fetch slot.
// The fixed rotation and one PC per thread follow the description; the pc/npc
// pair, the per-thread run enables and the kernel's PC-set port are this
// design's choices. A disabled thread's slot becomes a bubble (fetch_valid=0).
// At reset thread t starts at BOOT_PC + t*THREAD_STRIDE.
module mte_thread_ctrl
  import mte_pkg::*;
#(
  parameter word_t BOOT_PC       = 32'h0000_0000,
  parameter word_t THREAD_STRIDE = 32'h0000_0400
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NTHREADS-1:0] thread_en,
  // fetch slot
  output tid_t                fetch_tid,
  output word_t               fetch_pc,
  output logic                fetch_valid,
  // redirect from EX
  input  tid_t                ex_tid,
  input  logic                ex_set_npc,   // taken branch/jump: npc <= target
  input  logic                ex_set_pc,    // trap / ERET: pc <= target, npc <= target+4
  input  word_t               ex_target,
  // kernel dispatch: load a (disabled) thread's PC
  input  logic                ks_valid,
  input  tid_t                ks_tid,
  input  word_t               ks_pc
);
  word_t pc  [NTHREADS];
  word_t npc [NTHREADS];
  tid_t  slot;

  assign fetch_tid   = slot;
  assign fetch_pc    = pc[slot];
  assign fetch_valid = !rst && thread_en[slot];

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      for (int t = 0; t < NTHREADS; t++) begin
        pc[t]  <= BOOT_PC + THREAD_STRIDE * t;
        npc[t] <= BOOT_PC + THREAD_STRIDE * t + 32'd4;
      end
    end else begin
      slot <= slot + 1'b1;
      if (fetch_valid) begin
        pc[slot]  <= npc[slot];
        npc[slot] <= npc[slot] + 32'd4;
      end
      // EX is two slots behind IF, so ex_tid never equals slot while
      // instructions are in flight; these writes take priority regardless.
      if (ex_set_pc) begin
        pc[ex_tid]  <= ex_target;
        npc[ex_tid] <= ex_target + 32'd4;
      end else if (ex_set_npc) begin
        npc[ex_tid] <= ex_target;
      end
      if (ks_valid) begin
        pc[ks_tid]  <= ks_pc;
        npc[ks_tid] <= ks_pc + 32'd4;
      end
    end
  end

`ifndef SYNTHESIS
  // Interleaving rule: the thread in EX is never the thread being fetched.
  a_ex_not_fetch: assert property (@(posedge clk) disable iff (rst)
    (ex_set_pc || ex_set_npc) |-> (ex_tid != slot));
`endif
endmodule

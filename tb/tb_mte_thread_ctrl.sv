// Self-checking testbench for mte_thread_ctrl: checks the fixed 0,1,2,3
// fetch rotation, sequential PC advance per thread from its boot address,
// delay-slot branch redirection (npc only), trap redirection (pc and npc),
// disabled-thread bubbles and the kernel PC-set port, against a model.
module tb_mte_thread_ctrl;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] en;
  tid_t ftid, etid, kstid; word_t fpc, target, kspc; logic fv, set_npc, set_pc, ksv;
  word_t m_pc[4], m_npc[4];
  int slot;
  mte_thread_ctrl #(.BOOT_PC(32'h100), .THREAD_STRIDE(32'h1000)) dut (
    .clk, .rst, .thread_en(en), .fetch_tid(ftid), .fetch_pc(fpc), .fetch_valid(fv),
    .ex_tid(etid), .ex_set_npc(set_npc), .ex_set_pc(set_pc), .ex_target(target),
    .ks_valid(ksv), .ks_tid(kstid), .ks_pc(kspc));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 4'hF; set_npc = 0; set_pc = 0; target = 0; etid = 0; ksv = 0; kstid = 0; kspc = 0;
    for (int t = 0; t < 4; t++) begin m_pc[t] = 32'h100 + 32'h1000 * t; m_npc[t] = m_pc[t] + 4; end
    repeat (2) @(posedge clk); @(negedge clk); rst = 0; slot = 0;
    for (int i = 0; i < 2000; i++) begin
      // drive random redirect for the thread two slots behind, as EX would
      set_npc = 0; set_pc = 0; ksv = 0;
      etid = tid_t'(slot + 2);
      case ($urandom_range(0, 9))
        0, 1: begin set_npc = 1; target = $urandom & ~3; end
        2:    begin set_pc = 1;  target = $urandom & ~3; end
        default: ;
      endcase
      if (i > 1000 && $urandom_range(0, 7) == 0) en = 4'($urandom);
      if (!en[etid] && $urandom_range(0, 3) == 0) begin ksv = 1; kstid = etid; kspc = $urandom & ~3; set_npc = 0; set_pc = 0; end
      #1;
      checks += 3;
      if (ftid !== tid_t'(slot)) begin failures++; $display("FAIL slot %0d got %0d", slot, ftid); end
      if (fv !== en[slot]) begin failures++; $display("FAIL fetch_valid"); end
      if (fv && fpc !== m_pc[slot]) begin failures++; $display("FAIL pc t%0d %h exp %h", slot, fpc, m_pc[slot]); end
      @(posedge clk);
      if (en[slot]) begin m_pc[slot] = m_npc[slot]; m_npc[slot] = m_npc[slot] + 4; end
      if (set_pc) begin m_pc[etid] = target; m_npc[etid] = target + 4; end
      else if (set_npc) m_npc[etid] = target;
      if (ksv) begin m_pc[kstid] = kspc; m_npc[kstid] = kspc + 4; end
      slot = (slot + 1) % 4;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
